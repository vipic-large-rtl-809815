// One half of the VIPIC-L pixel matrix with its sparsifier.
//
// N pixels raise their request lines at each frame edge of `tsclk_pix` if they
// counted hits; the sparsifier routes the ack-hit line of this half (ACKHIT_R or
// ACKHIT_L after stretching) to the requesting pixel of highest priority and puts
// its counter and address on the readout bus. Each rising edge of ack-hit ends
// one pixel's readout, after which the next requesting pixel is chosen.
//
// Timing is that of the pixels: a pixel's request falls one clock after the
// ack-hit rising edge, and the bus follows the sparsifier combinationally. The
// split of the matrix in two halves with their own ack-hit lines follows the
// notes; the number of pixels per half is this design's choice.
module vipic_half_matrix #(
  parameter int unsigned N      = 64,
  parameter int unsigned CNT_W  = vipic_pkg::MAX_WORD_LEN,
  parameter int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      hit,        // one-cycle hit pulses, one per pixel
  input  logic              tsclk_pix,  // delayed frame clock
  input  logic              ack_mod,    // stretched ack-hit of this half
  output logic [N-1:0]      req,        // request lines (for monitoring)
  output logic              bus_valid,  // some pixel is selected
  output logic [ADDR_W-1:0] bus_addr,   // selected pixel
  output logic [CNT_W-1:0]  bus_data    // its data while ack-hit is low
);

  logic [N-1:0]     ack_pix;
  logic [CNT_W-1:0] pix_data [N];

  for (genvar i = 0; i < N; i++) begin : g_pix
    vipic_pixel #(.CNT_W(CNT_W)) u_pix (
      .clk       (clk),
      .rst_n     (rst_n),
      .hit       (hit[i]),
      .tsclk_pix (tsclk_pix),
      .ack       (ack_pix[i]),
      .req       (req[i]),
      .data      (pix_data[i])
    );
  end

  vipic_sparsifier #(.N(N), .CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_sparse (
    .req       (req),
    .pix_data  (pix_data),
    .ack_mod   (ack_mod),
    .ack_pix   (ack_pix),
    .sel_valid (bus_valid),
    .sel_addr  (bus_addr),
    .bus_data  (bus_data)
  );

endmodule
