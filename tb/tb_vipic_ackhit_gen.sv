// Self-checking testbench of vipic_ackhit_gen.
//
// For every word length 7..20, and for settings outside that range (clamped),
// measures the ack-hit pulses: one cycle wide, one every word-length cycles on
// both lines, ACKHIT_L half a word after ACKHIT_R, and each pre_* flag exactly in
// the cycle before its pulse.
module tb_vipic_ackhit_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] word_len;
  logic ack_r, ack_l, pre_r, pre_l;
  int checks = 0, failures = 0;

  vipic_ackhit_gen dut (.clk, .rst_n, .word_len, .ack_r, .ack_l, .pre_r, .pre_l);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL len=%0d: %s", word_len, what); end
  endtask

  initial begin
    int lens[$] = '{7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19, 20, 3, 0, 25, 31};
    foreach (lens[k]) begin
      int exp_len, last_r, last_l, n_r, prev_ack_r, prev_ack_l;
      word_len = 5'(lens[k]);
      exp_len = lens[k] < 7 ? 7 : (lens[k] > 20 ? 20 : lens[k]);
      rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      last_r = -1; last_l = -1; n_r = 0; prev_ack_r = 0; prev_ack_l = 0;
      for (int c = 0; c < 6 * exp_len; c++) begin
        @(posedge clk); #1;
        if (ack_r) begin
          if (last_r >= 0) check(c - last_r == exp_len, "R period");
          check(!prev_ack_r, "R pulse one cycle wide");
          last_r = c; n_r++;
        end
        if (ack_l) begin
          if (last_l >= 0) check(c - last_l == exp_len, "L period");
          if (last_r >= 0) check(c - last_r == exp_len / 2, "L offset half a word");
          check(!prev_ack_l, "L pulse one cycle wide");
          last_l = c;
        end
        prev_ack_r = ack_r; prev_ack_l = ack_l;
        // pre flags: compare with the line one cycle later
        begin
          logic pr, pl;
          pr = pre_r; pl = pre_l;
          @(posedge clk); #1;
          check(pr == ack_r && pl == ack_l, "pre flags lead their pulses by one cycle");
          c++;
          if (ack_r) begin
            if (last_r >= 0) check(c - last_r == exp_len, "R period");
            check(!prev_ack_r, "R pulse one cycle wide");
            last_r = c; n_r++;
          end
          if (ack_l) begin
            if (last_l >= 0) check(c - last_l == exp_len, "L period");
            if (last_r >= 0) check(c - last_r == exp_len / 2, "L offset half a word");
            check(!prev_ack_l, "L pulse one cycle wide");
            last_l = c;
          end
          prev_ack_r = ack_r; prev_ack_l = ack_l;
        end
      end
      check(n_r >= 5, "enough pulses seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
