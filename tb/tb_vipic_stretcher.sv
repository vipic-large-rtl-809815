// Self-checking testbench of vipic_stretcher.
//
// Runs periodic one-cycle ack-hit pulses (word lengths 7 and 13) with TSCLK
// detections at random phases, including detections in the pulse cycle, in the
// cycle before it and during a running stretch. The expected stretch is built
// here from the whole trace: from each detection up to and including the
// PULSES-th original pulse after it. ack_mod must equal the original OR the
// stretch, and zero_force the stretch, for PULSES = 2 and PULSES = 1.
module tb_vipic_stretcher;
  localparam int T = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ts_det, ack_orig;
  logic ack_mod2, zf2, st2, ack_mod1, zf1, st1;
  int checks = 0, failures = 0, n_stretch = 0;
  bit a_tr [T], d_tr [T], e2 [T], e1 [T];

  vipic_stretcher dut2 (.clk, .rst_n, .ts_det, .ack_orig,
                        .ack_mod(ack_mod2), .zero_force(zf2), .stretching(st2));
  vipic_stretcher #(.PULSES(1)) dut1 (.clk, .rst_n, .ts_det, .ack_orig,
                        .ack_mod(ack_mod1), .zero_force(zf1), .stretching(st1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void mark(ref bit e [T], input int t0, input int pulses);
    int seen = 0;
    for (int c = t0; c < T; c++) begin
      e[c] = 1'b1;
      if (c > t0 && a_tr[c]) begin
        seen++;
        if (seen == pulses) return;
      end
    end
  endfunction

  initial begin
    // build the trace
    for (int c = 0; c < T; c++) begin
      int len;
      len = (c < T / 2) ? 7 : 13;
      a_tr[c] = (c % len == 3);
      d_tr[c] = 1'b0;
      e2[c] = 1'b0; e1[c] = 1'b0;
    end
    for (int c = 20; c < T - 60; c += 25 + $urandom % 40) d_tr[c] = 1'b1;
    // chosen corner cases: in a pulse cycle, just before one, inside a stretch
    d_tr[3 + 7 * 20] = 1'b1; d_tr[2 + 7 * 40] = 1'b1;
    d_tr[3 + 7 * 60] = 1'b1; d_tr[3 + 7 * 60 + 5] = 1'b1;
    for (int c = 0; c < T; c++)
      if (d_tr[c]) begin mark(e2, c, 2); mark(e1, c, 1); n_stretch++; end

    ts_det = 0; ack_orig = 0;
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < T; c++) begin
      ts_det = d_tr[c]; ack_orig = a_tr[c];
      #1;
      checks++;
      if (ack_mod2 != (a_tr[c] | e2[c]) || zf2 != e2[c] || st2 != e2[c] ||
          ack_mod1 != (a_tr[c] | e1[c]) || zf1 != e1[c]) begin
        failures++;
        $display("FAIL c=%0d ack=%0b det=%0b mod2=%0b exp2=%0b mod1=%0b exp1=%0b",
                 c, a_tr[c], d_tr[c], ack_mod2, a_tr[c] | e2[c], ack_mod1, a_tr[c] | e1[c]);
      end
      @(negedge clk);
    end
    checks++;
    if (n_stretch < 40) failures++;
    $display("stretches: %0d", n_stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
