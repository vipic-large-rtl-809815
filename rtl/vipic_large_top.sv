// RStrobe-less readout of the VIPIC-L pixel matrix.
//
// Hits are counted in the pixels during a time frame set by the external TSCLK.
// At each frame edge the pixels with hits raise their request lines. A sparsifier
// per half matrix routes that half's ack-hit line to one requesting pixel at a
// time; the controller pulses the line once per serial word, synchronously to the
// serializer clock `clk`, and each rising edge ends one pixel's readout, latches
// its counter into the serializer and steps the sparsifier on. No RStrobe is
// distributed. The two halves use interleaved lines, ACKHIT_R and ACKHIT_L, and
// have a serial output each.
//
// TSCLK is decoupled from the readout: its detected rising edge makes the
// stretchers hold both ack-hit lines high until the end of the second original
// pulse, the words latched meanwhile are sent as zeros, and the pixels receive
// TSCLK DT serializer cycles after detection, while ack-hit is high. The first
// pixel of the new frame is then read in the first full step after the stretch.
//
// Interface: `word_len` (7..20) sets the bits per word and so the ack-hit period.
// `hit_r`/`hit_l` take one-cycle hit pulses per pixel. `sdo_*` carries words MSB
// first, `word_start_*` marks the first bit; the latched words are also given in
// parallel with their pixel address. The architecture follows the notes; the
// matrix size, DT, the synchronous pixel model and all encodings are this
// design's.
module vipic_large_top #(
  parameter int unsigned N_HALF = 64,  // pixels per half matrix
  parameter int unsigned DT     = 4,   // TSCLK delay to the pixels, clk cycles
  parameter int unsigned PULSES = 2,   // ack-hit rising edges a stretch spans
  localparam int unsigned CNT_W  = vipic_pkg::MAX_WORD_LEN,
  localparam int unsigned ADDR_W = (N_HALF > 1) ? $clog2(N_HALF) : 1
) (
  input  logic                 clk,          // serializer clock
  input  logic                 rst_n,
  input  logic                 tsclk,        // external frame clock
  input  vipic_pkg::word_len_t word_len,     // bits per word, 7..20
  input  logic [N_HALF-1:0]    hit_r,        // hit pulses, right half
  input  logic [N_HALF-1:0]    hit_l,        // hit pulses, left half
  output logic                 sdo_r,
  output logic                 sdo_l,
  output logic                 word_start_r,
  output logic                 word_start_l,
  output logic [CNT_W-1:0]     word_r,
  output logic [CNT_W-1:0]     word_l,
  output logic [ADDR_W-1:0]    word_addr_r,
  output logic [ADDR_W-1:0]    word_addr_l,
  output logic                 word_valid_r,
  output logic                 word_valid_l,
  output logic                 ack_mod_r,    // ack-hit lines as sent to the matrix
  output logic                 ack_mod_l,
  output logic                 stretch_r,    // stretch in progress
  output logic                 stretch_l,
  output logic                 tsclk_pix,    // TSCLK as sent to the pixels
  output logic [N_HALF-1:0]    req_r,        // pixel request lines, right half
  output logic [N_HALF-1:0]    req_l         // pixel request lines, left half
);

  logic ack_r, ack_l, pre_r, pre_l, ts_det;
  logic zf_r, zf_l;
  logic              bv_r, bv_l;
  logic [ADDR_W-1:0] ba_r, ba_l;
  logic [CNT_W-1:0]  bd_r, bd_l;

  vipic_ackhit_gen u_gen (
    .clk, .rst_n, .word_len,
    .ack_r, .ack_l, .pre_r, .pre_l
  );

  vipic_tsclk_sync #(.DELAY(DT)) u_ts (
    .clk, .rst_n, .tsclk, .ts_det, .tsclk_pix
  );

  vipic_stretcher #(.PULSES(PULSES)) u_str_r (
    .clk, .rst_n, .ts_det, .ack_orig(ack_r),
    .ack_mod(ack_mod_r), .zero_force(zf_r), .stretching(stretch_r)
  );

  vipic_stretcher #(.PULSES(PULSES)) u_str_l (
    .clk, .rst_n, .ts_det, .ack_orig(ack_l),
    .ack_mod(ack_mod_l), .zero_force(zf_l), .stretching(stretch_l)
  );

  vipic_half_matrix #(.N(N_HALF), .CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_half_r (
    .clk, .rst_n, .hit(hit_r), .tsclk_pix, .ack_mod(ack_mod_r),
    .req(req_r), .bus_valid(bv_r), .bus_addr(ba_r), .bus_data(bd_r)
  );

  vipic_half_matrix #(.N(N_HALF), .CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_half_l (
    .clk, .rst_n, .hit(hit_l), .tsclk_pix, .ack_mod(ack_mod_l),
    .req(req_l), .bus_valid(bv_l), .bus_addr(ba_l), .bus_data(bd_l)
  );

  vipic_serializer #(.CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_ser_r (
    .clk, .rst_n, .word_len, .latch(pre_r), .zero_force(zf_r),
    .bus_data(bd_r), .bus_valid(bv_r), .bus_addr(ba_r),
    .sdo(sdo_r), .word_start(word_start_r), .word(word_r),
    .word_addr(word_addr_r), .word_valid(word_valid_r)
  );

  vipic_serializer #(.CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_ser_l (
    .clk, .rst_n, .word_len, .latch(pre_l), .zero_force(zf_l),
    .bus_data(bd_l), .bus_valid(bv_l), .bus_addr(ba_l),
    .sdo(sdo_l), .word_start(word_start_l), .word(word_l),
    .word_addr(word_addr_l), .word_valid(word_valid_l)
  );

  // The pixels must see the new frame while ack-hit is still stretched: the
  // shortest stretch lasts (PULSES-1) words of the shortest length plus 2 cycles.
  // Pixels must see every new frame while their ack-hit is held high.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $rose(tsclk_pix) |-> (ack_mod_r && ack_mod_l))
    else $error("TSCLK reached the pixels while ack-hit was low");

  initial assert (DT + 1 < (PULSES - 1) * vipic_pkg::MIN_WORD_LEN + 2)
    else $error("DT too long for the shortest ack-hit stretch");

endmodule
