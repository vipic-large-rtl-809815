// Hit-holder logic of one VIPIC-L pixel for the RStrobe-less readout.
//
// During a time frame the pixel counts hits in `cnt`. On each rising edge of the
// TSCLK it receives (`tsclk_pix`, already delayed by the controller) the count is
// moved to the readout register `rd`, the counter restarts, and the request line
// `req` (the pixel's "in" line to the sparsifier) is raised if the frame held any
// hit. Unread data of the previous frame is overwritten: first pixels of a new
// frame matter more than the last ones of an old frame.
//
// The sparsifier routes the ack-hit line to the pixel it has chosen; every other
// pixel sees it high. While `ack` is low the chosen pixel drives `rd` on `data`
// (zero otherwise, so the half-matrix bus can be an OR). A rising edge of `ack`
// marks the end of the pixel's readout: `req` drops and `rd` is cleared, which
// hands the sparsifier on to the next pixel. There is no RStrobe.
//
// Timing: everything is sampled on `clk`, the serializer clock; edges of `ack`
// and `tsclk_pix` are found by comparing with their value one cycle earlier.
// `req` falls one cycle after the ack rising edge. `hit` is a one-cycle pulse per
// hit; the counter saturates. A frame edge wins over an end of readout in the
// same cycle. The synchronous sampling, the saturating counter and the hit pulse
// are choices of this design; the req/ack behaviour follows the notes.
module vipic_pixel #(
  parameter int unsigned CNT_W = vipic_pkg::MAX_WORD_LEN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hit,        // one-cycle pulse per detected hit
  input  logic             tsclk_pix,  // frame clock, delayed, as sent to pixels
  input  logic             ack,        // routed ack-hit: low = this pixel is read
  output logic             req,        // "in" line: pixel holds data to read
  output logic [CNT_W-1:0] data        // readout register while ack is low, else 0
);

  logic [CNT_W-1:0] cnt, rd;
  logic             ack_q, ts_q;
  logic             ts_rise, ack_rise;

  assign ts_rise  = tsclk_pix && !ts_q;
  assign ack_rise = ack && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      rd    <= '0;
      req   <= 1'b0;
      ack_q <= 1'b1;
      ts_q  <= 1'b0;
    end else begin
      ack_q <= ack;
      ts_q  <= tsclk_pix;
      if (ts_rise) begin
        rd  <= cnt;
        req <= (cnt != '0);
        cnt <= hit ? CNT_W'(1) : '0;
      end else begin
        if (hit && cnt != '1) cnt <= cnt + 1'b1;
        if (req && ack_rise) begin
          req <= 1'b0;
          rd  <= '0;
        end
      end
    end
  end

  assign data = (req && !ack) ? rd : '0;

endmodule
