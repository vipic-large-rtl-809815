// Sparsifier of one half of the VIPIC-L matrix.
//
// A priority encoder looks at the request ("in") lines of N pixels and picks the
// requesting pixel of highest priority; the lowest index comes first. The
// controller's (modified) ack-hit line is routed to that pixel only, so it acts as
// a switch that connects the "low state" of ack-hit to one pixel with a hit; all
// other pixels see ack-hit high. The chosen pixel's data and address are put on
// the readout bus. When that pixel drops its request after the ack-hit rising
// edge, the encoder moves on to the next requesting pixel.
//
// Purely combinational; an assertion checks that ack-hit is low at no more than
// one pixel. The function is the notes'; the lowest-index-first
// priority order and the address output are choices of this design.
module vipic_sparsifier #(
  parameter int unsigned N      = 64,
  parameter int unsigned CNT_W  = vipic_pkg::MAX_WORD_LEN,
  parameter int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]      req,            // request lines of the pixels
  input  logic [CNT_W-1:0]  pix_data [N],   // data driven by each pixel
  input  logic              ack_mod,        // ack-hit from the stretcher
  output logic [N-1:0]      ack_pix,        // ack-hit as seen by each pixel
  output logic              sel_valid,      // some pixel requests
  output logic [ADDR_W-1:0] sel_addr,       // address of the chosen pixel
  output logic [CNT_W-1:0]  bus_data        // data of the chosen pixel
);

  always_comb begin
    sel_valid = 1'b0;
    sel_addr  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        sel_valid = 1'b1;
        sel_addr  = ADDR_W'(i);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      ack_pix[i] = (sel_valid && sel_addr == ADDR_W'(i)) ? ack_mod : 1'b1;
  end

  assign bus_data = sel_valid ? pix_data[sel_addr] : '0;

  // The switch connects the low state of ack-hit to at most one pixel.
  always_comb assert ($onehot0(~ack_pix)) else $error("ack-hit low at several pixels");

endmodule
