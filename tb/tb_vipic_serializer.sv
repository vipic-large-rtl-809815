// Self-checking testbench of vipic_serializer.
//
// For several word lengths, latches a random counter value every word length
// cycles, sometimes with zero_force and sometimes larger than the word can hold.
// Reassembles the serial stream MSB first from word_start and checks it, and the
// parallel outputs, against the value expected here: zero when forced, all ones
// when the count does not fit, the count otherwise. Also checks that words follow
// each other without gaps.
module tb_vipic_serializer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  word_len;
  logic        latch, zero_force, bus_valid;
  logic [19:0] bus_data;
  logic [5:0]  bus_addr;
  logic        sdo, word_start, word_valid;
  logic [19:0] word;
  logic [5:0]  word_addr;
  int checks = 0, failures = 0;

  vipic_serializer dut (.clk, .rst_n, .word_len, .latch, .zero_force, .bus_data,
                        .bus_valid, .bus_addr, .sdo, .word_start, .word,
                        .word_addr, .word_valid);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL len=%0d: %s", word_len, what); end
  endtask

  initial begin
    int lens[$] = '{7, 20, 12, 9};
    latch = 0; zero_force = 0; bus_valid = 0; bus_data = 0; bus_addr = 0;
    word_len = 7;
    @(negedge clk) rst_n = 1'b1;
    foreach (lens[k]) begin
      int len;
      len = lens[k];
      word_len = 5'(len);
      repeat (3) @(negedge clk);
      for (int w = 0; w < 30; w++) begin
        logic [19:0] d, exp;
        logic [19:0] maxv;
        maxv = 20'((64'd1 << len) - 1);
        case ($urandom % 4)
          0: d = 20'($urandom);
          1: d = 20'($urandom % (int'(maxv) + 1));
          2: d = maxv;
          default: d = 20'(1 + $urandom % 5);
        endcase
        zero_force = ($urandom % 5 == 0);
        bus_valid = 1'b1;
        bus_data = d;
        bus_addr = 6'($urandom);
        exp = zero_force ? 20'd0 : (d > maxv ? maxv : d);
        latch = 1'b1;
        @(negedge clk);
        latch = 1'b0;
        check(word_start, "word_start after latch");
        check(word == exp, "parallel word");
        check(word_valid == (exp != 0), "word_valid");
        if (exp != 0) check(word_addr == bus_addr, "word address");
        begin
          logic [19:0] got;
          got = '0;
          for (int b = 0; b < len; b++) begin
            got = {got[18:0], sdo};
            if (b > 0) check(!word_start, "no word_start inside a word");
            if (b < len - 1) @(negedge clk);
          end
          check(got == exp, $sformatf("serial word %h expected %h", got, exp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
