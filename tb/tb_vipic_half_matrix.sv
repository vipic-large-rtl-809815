// Self-checking testbench of vipic_half_matrix.
//
// An 8-pixel half matrix gets random hits in a frame, then a frame edge, then a
// train of one-cycle ack-hit pulses every 7 cycles. The bus is sampled in the
// cycle before each pulse, as the serializer does. The words read must be the
// pixels with hits, in ascending address order, each with the count of hits the
// testbench sent it, and nothing else; an empty frame must read nothing, and a
// frame edge before the readout ends must replace the unread pixels.
module tb_vipic_half_matrix;
  localparam int N = 8, L = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] hit, req;
  logic tsclk_pix, ack_mod, bus_valid;
  logic [2:0]  bus_addr;
  logic [19:0] bus_data;
  int checks = 0, failures = 0;
  int cnt [N];
  int ph;
  logic run_ack = 1'b0;
  initial ph = 0;

  vipic_half_matrix #(.N(N)) dut (.clk, .rst_n, .hit, .tsclk_pix, .ack_mod,
                                  .req, .bus_valid, .bus_addr, .bus_data);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ack-hit pulse train: one cycle high every L cycles, like the controller's
  always @(posedge clk) ph <= (ph == L - 1) ? 0 : ph + 1;
  assign ack_mod = !run_ack || ph == 0;

  task automatic make_frame(input int density);
    foreach (cnt[i]) cnt[i] = 0;
    for (int c = 0; c < 30; c++) begin
      @(posedge clk) #1;
      for (int i = 0; i < N; i++) begin
        hit[i] = ($urandom % 100) < density;
        if (hit[i]) cnt[i]++;
      end
    end
    @(posedge clk) #1 hit = '0;
    // frame edge while ack-hit is high: align to the pulse
    while (ph != 0) @(posedge clk) #1;
    tsclk_pix = 1'b1;
    @(posedge clk) #1 tsclk_pix = 1'b0;
  endtask

  // read `limit` words (or until nothing requests) and compare
  task automatic read_frame(input int limit, output int nread);
    int exp_addr = 0;
    nread = 0;
    while (nread < limit) begin
      while (exp_addr < N && cnt[exp_addr] == 0) exp_addr++;
      // wait for the cycle before a pulse
      do @(posedge clk) #1; while (ph != L - 1);
      if (exp_addr >= N) begin
        check(!bus_valid && bus_data == 0 && req == 0, "nothing left to read");
        break;
      end
      check(bus_valid && bus_addr == 3'(exp_addr) && bus_data == 20'(cnt[exp_addr]),
            $sformatf("pixel %0d count %0d, got valid=%0b addr=%0d data=%0d",
                      exp_addr, cnt[exp_addr], bus_valid, bus_addr, bus_data));
      exp_addr++;
      nread++;
    end
  endtask

  initial begin
    int n;
    hit = '0; tsclk_pix = 0;
    repeat (3) @(posedge clk) #1;
    rst_n = 1'b1;
    run_ack = 1'b1;
    for (int f = 0; f < 12; f++) begin
      make_frame(f % 4 == 0 ? 0 : (f % 4) * 15);
      read_frame(N + 1, n);
    end
    // interrupted frame: read two pixels, then a new frame replaces the rest
    foreach (cnt[i]) cnt[i] = 0;
    make_frame(60);
    read_frame(2, n);
    make_frame(30);
    read_frame(N + 1, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
