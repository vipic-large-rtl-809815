// End-to-end testbench of vipic_large_top at its default size (64 pixels per
// half, TSCLK delay 4, stretch over 2 ack-hit pulses).
//
// Runs three word lengths (20, 7, 13), each after a reset. An asynchronous TSCLK
// with long and short frames is applied while random hits arrive in both halves:
// sparse, dense, none, and one pixel hit every cycle. A reference model here
// counts the hits of every pixel per frame, using the frame edges the pixels
// see, and checks for each lane that:
//   - every valid word is the next pixel with hits, in ascending address order,
//     with its count (all ones when it exceeds the word), and no pixel twice;
//   - the two words latched after each TSCLK detection are zero (useless data)
//     and the third is the first pixel of the new frame when it has hits;
//   - the serial stream on sdo reassembles, MSB first, to the parallel word;
//   - the R and L words never start in the same cycle.
// It counts each mechanism (stretch, useless word, complete frame, frame cut by
// TSCLK, empty frame, saturated word, both lanes, each word length) and fails
// one that never happened.
module tb_vipic_large_top;
  import vipic_pkg::*;
  localparam int N = 64;
  localparam int MAXC = (1 << 20) - 1;

  logic clk = 1'b0, rst_n = 1'b0, tsclk = 1'b0;
  word_len_t word_len;
  logic [N-1:0] hit_r, hit_l, req_r, req_l;
  logic sdo_r, sdo_l, ws_r, ws_l, wv_r, wv_l;
  logic [19:0] word_r, word_l;
  logic [5:0]  wa_r, wa_l;
  logic ack_mod_r, ack_mod_l, stretch_r, stretch_l, tsclk_pix;

  vipic_large_top dut (
    .clk, .rst_n, .tsclk, .word_len, .hit_r, .hit_l,
    .sdo_r, .sdo_l, .word_start_r(ws_r), .word_start_l(ws_l),
    .word_r, .word_l, .word_addr_r(wa_r), .word_addr_l(wa_l),
    .word_valid_r(wv_r), .word_valid_l(wv_l),
    .ack_mod_r, .ack_mod_l, .stretch_r, .stretch_l, .tsclk_pix, .req_r, .req_l
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stretch = 0, n_useless = 0, n_complete = 0, n_cut = 0, n_empty = 0;
  int n_sat = 0, n_valid [2] = '{0, 0}, n_first = 0, n_modes = 0, n_lost = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- reference model, sampled at the falling edge -------------
  int  cnt   [2][N];        // hits per pixel in the running frame
  int  exp_a [2][$];        // pixels of the frame being read out
  int  exp_c [2][$];
  int  ws_after [2];        // word starts since the last TSCLK detection
  bit  ts_prev, st_prev [2];
  bit  frame_nonempty [2];
  int  len_now;

  function automatic int clampw(int c);
    int m = (1 << len_now) - 1;
    return c > m ? m : c;
  endfunction

  task automatic model_reset();
    for (int l = 0; l < 2; l++) begin
      foreach (cnt[l][i]) cnt[l][i] = 0;
      exp_a[l].delete(); exp_c[l].delete();
      ws_after[l] = 100; st_prev[l] = 0; frame_nonempty[l] = 0; sbits[l] = -1;
    end
    ts_prev = 0;
  endtask

  // serial reassembly per lane
  int  sbits [2];
  logic [19:0] sacc [2], sexp [2];

  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] h [2];
    logic ws [2], wv [2], sd [2], st [2];
    logic [19:0] w [2];
    logic [5:0]  wa [2];
    h[0] = hit_r; h[1] = hit_l;
    ws[0] = ws_r; ws[1] = ws_l; wv[0] = wv_r; wv[1] = wv_l;
    w[0] = word_r; w[1] = word_l; wa[0] = wa_r; wa[1] = wa_l;
    sd[0] = sdo_r; sd[1] = sdo_l; st[0] = stretch_r; st[1] = stretch_l;
    check(!(ws_r && ws_l), "R and L words interleaved");
    for (int l = 0; l < 2; l++) begin
      // words
      if (st[l] && !st_prev[l]) begin
        ws_after[l] = 0;
        n_stretch++;
      end else if (ws[l]) begin
        ws_after[l]++;
        if (ws_after[l] <= 2) begin
          check(w[l] == 0 && !wv[l], "word latched during the stretch is zero");
          n_useless++;
        end
        if (ws_after[l] == 3 && frame_nonempty[l]) begin
          check(wv[l], "first pixel of the new frame read right after the stretch");
          n_first++;
        end
      end
      if (ws[l] && wv[l]) begin
        n_valid[l]++;
        if (exp_a[l].size() == 0) begin
          check(0, $sformatf("lane %0d: unexpected word addr %0d count %0d", l, wa[l], w[l]));
        end else begin
          check(wa[l] == 6'(exp_a[l][0]) && w[l] == 20'(clampw(exp_c[l][0])),
                $sformatf("lane %0d: got addr %0d count %0d, expected addr %0d count %0d",
                          l, wa[l], w[l], exp_a[l][0], clampw(exp_c[l][0])));
          if (exp_c[l][0] > clampw(exp_c[l][0])) n_sat++;
          void'(exp_a[l].pop_front()); void'(exp_c[l].pop_front());
        end
      end else if (ws[l]) begin
        check(w[l] == 0, "invalid word is zero");
      end
      // serial stream
      if (ws[l]) begin
        if (sbits[l] > 0) check(0, "previous serial word incomplete");
        sbits[l] = 0; sacc[l] = '0; sexp[l] = w[l];
      end
      if (sbits[l] >= 0) begin
        sacc[l] = {sacc[l][18:0], sd[l]};
        sbits[l]++;
        if (sbits[l] == len_now) begin
          check(sacc[l] == sexp[l], $sformatf("lane %0d serial %h parallel %h", l, sacc[l], sexp[l]));
          sbits[l] = -1;
        end
      end
      st_prev[l] = st[l];
    end
    // frame edges as the pixels see them
    if (tsclk_pix && !ts_prev) begin
      for (int l = 0; l < 2; l++) begin
        if (exp_a[l].size() > 0) begin n_cut++; n_lost += exp_a[l].size(); end
        else if (frame_nonempty[l]) n_complete++;
        exp_a[l].delete(); exp_c[l].delete();
        for (int i = 0; i < N; i++)
          if (cnt[l][i] > 0) begin
            exp_a[l].push_back(i);
            exp_c[l].push_back(cnt[l][i] > MAXC ? MAXC : cnt[l][i]);
          end
        frame_nonempty[l] = exp_a[l].size() > 0;
        if (!frame_nonempty[l]) n_empty++;
        foreach (cnt[l][i]) cnt[l][i] = 0;
      end
    end
    ts_prev = tsclk_pix;
    for (int l = 0; l < 2; l++)
      for (int i = 0; i < N; i++)
        if (h[l][i]) cnt[l][i]++;
  end

  // ---------------- stimulus ---------------------------------------------------
  typedef enum {NONE, SPARSE, DENSE, HEAVY} hits_e;
  hits_e mode;

  always @(posedge clk) begin
    #1;
    hit_r = '0; hit_l = '0;
    case (mode)
      SPARSE: begin
        if ($urandom % 12 == 0) hit_r[$urandom % N] = 1'b1;
        if ($urandom % 12 == 0) hit_l[$urandom % N] = 1'b1;
      end
      DENSE: begin
        hit_r[$urandom % N] = 1'b1; hit_r[$urandom % N] = 1'b1;
        hit_l[$urandom % N] = 1'b1;
      end
      HEAVY: begin
        hit_r[5] = 1'b1; hit_l[60] = 1'b1;
        if ($urandom % 8 == 0) hit_r[$urandom % N] = 1'b1;
      end
      default: ;
    endcase
  end

  // one TSCLK period of `cycles` clocks, rising edge off the clock grid
  task automatic frame(input int cycles, input hits_e m);
    mode = m;
    @(posedge clk) #3 tsclk = 1'b1;
    repeat (cycles / 2) @(posedge clk);
    #7 tsclk = 1'b0;
    repeat (cycles - cycles / 2) @(posedge clk);
  endtask

  initial begin
    int lens[3] = '{20, 7, 13};
    mode = NONE; hit_r = '0; hit_l = '0; word_len = 20;
    sbits[0] = -1; sbits[1] = -1;
    for (int p = 0; p < 3; p++) begin
      rst_n = 1'b0;
      word_len = word_len_t'(lens[p]);
      len_now = lens[p];
      model_reset();
      repeat (4) @(posedge clk);
      #2 rst_n = 1'b1;
      n_modes++;
      frame(400, SPARSE);                 // first frame: nothing to read yet
      frame(4000, DENSE);                 // reads the sparse frame
      frame(300, SPARSE);                 // dense frame is cut by this edge
      frame(3000, NONE);
      frame(3000, HEAVY);                 // empty frame read
      frame(3000, SPARSE);                // heavy frame, saturates at 7 and 13 bits
      frame(200, DENSE);
      frame(90, NONE);                    // short frames back to back
      frame(3000, NONE);
      frame(3000, NONE);
    end
    check(n_stretch >= 2 * 30, "stretch happened on every TSCLK edge");
    check(n_useless >= 2 * 30 * 2 - 4, "useless words sent");
    check(n_complete > 0, "a frame was read completely");
    check(n_cut > 0, "a frame was cut by TSCLK");
    check(n_empty > 0, "an empty frame occurred");
    check(n_sat > 0, "a count saturated the word");
    check(n_valid[0] > 0 && n_valid[1] > 0, "both lanes sent data");
    check(n_first > 0, "first pixel of a new frame checked");
    check(n_modes == 3, "three word lengths run");
    $display("stretches=%0d useless=%0d complete=%0d cut=%0d (pixels lost %0d) empty=%0d",
             n_stretch, n_useless, n_complete, n_cut, n_lost, n_empty);
    $display("saturated=%0d valid_r=%0d valid_l=%0d first_after_stretch=%0d modes=%0d",
             n_sat, n_valid[0], n_valid[1], n_first, n_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
