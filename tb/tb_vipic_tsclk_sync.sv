// Self-checking testbench of vipic_tsclk_sync.
//
// Toggles TSCLK at random times not aligned to the clock and checks that every
// rising edge gives exactly one ts_det pulse, after the 2nd clock edge following it,
// that falling edges give none, and that tsclk_pix follows the synchronised
// TSCLK DELAY cycles after ts_det (DELAY 4 and 1).
module tb_vipic_tsclk_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tsclk;
  logic ts_det, tsclk_pix, ts_det1, tsclk_pix1;
  int checks = 0, failures = 0;
  int n_rise = 0, n_det = 0, n_det1 = 0;
  int last_rise_edge = -100, edge_no = 0;
  int det_edge[$], det1_edge[$];

  vipic_tsclk_sync dut (.clk, .rst_n, .tsclk, .ts_det, .tsclk_pix);
  vipic_tsclk_sync #(.DELAY(1)) dut1 (.clk, .rst_n, .tsclk, .ts_det(ts_det1),
                                      .tsclk_pix(tsclk_pix1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // history of tsclk_pix to check the delay
  logic [15:0] hist_pix, hist_pix1;
  always @(posedge clk) begin
    edge_no++;
    #1;
    hist_pix  <= {hist_pix[14:0], tsclk_pix};
    hist_pix1 <= {hist_pix1[14:0], tsclk_pix1};
    if (ts_det) begin
      n_det++;
      check(edge_no - last_rise_edge == 2, "ts_det after the 2nd clock edge following the TSCLK rise");
      det_edge.push_back(edge_no);
    end
    if (ts_det1) begin n_det1++; det1_edge.push_back(edge_no); end
    if (det_edge.size() > 0 && edge_no - det_edge[0] == 4) begin
      check(tsclk_pix && !hist_pix[0], "tsclk_pix rises 4 cycles after ts_det");
      void'(det_edge.pop_front());
    end
    if (det1_edge.size() > 0 && edge_no - det1_edge[0] == 1) begin
      check(tsclk_pix1 && !hist_pix1[0], "tsclk_pix rises 1 cycle after ts_det (DELAY 1)");
      void'(det1_edge.pop_front());
    end
  end

  initial begin
    tsclk = 1'b0;
    hist_pix = '0; hist_pix1 = '0;
    #23 rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      // change TSCLK 2..8 ns after a rising clock edge
      repeat (10 + $urandom % 30) @(posedge clk);
      #(2 + $urandom % 7);
      tsclk = ~tsclk;
      if (tsclk) begin n_rise++; last_rise_edge = edge_no; end
    end
    repeat (20) @(posedge clk);
    check(n_det == n_rise, "one detection per rising edge");
    check(n_det1 == n_rise, "one detection per rising edge (DELAY 1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
