// Ack-hit stretcher of one readout lane.
//
// A rising edge of TSCLK can arrive at any time and breaks the continuity of the
// readout. Rather than move the tempo of the ack-hit pulses, the stretcher holds
// the ack-hit line sent to the pixels high from the cycle in which the TSCLK edge
// is detected until the falling edge of the original ack-hit that follows its
// PULSES-th rising edge after the detection (2 by default: stretching over two
// rising edges leaves room for the delayed TSCLK to reach every pixel while
// ack-hit is high). After that the modified line follows the original again.
//
// The serializer keeps latching words at every original rising edge; a word
// latched while the stretch is active holds no meaningful data, so `zero_force`
// tells the serializer to latch all zeros. The pixel cut short by the stretch and
// the empty step inside it are thereby sent as zero words, and the first pixel of
// the new frame is read in the first full step after the stretch.
//
// Timing: `ack_mod` = `ack_orig` OR the stretch state, rising combinationally in
// the detection cycle. An original pulse in the detection cycle itself is not
// counted. A new detection during a stretch restarts the count. The count of
// PULSES and the zero forcing follow the notes; the synchronous form is this
// design's.
module vipic_stretcher #(
  parameter int unsigned PULSES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ts_det,      // TSCLK rising edge detected (one cycle)
  input  logic ack_orig,    // original ack-hit pulse
  output logic ack_mod,     // stretched ack-hit sent to the matrix
  output logic zero_force,  // a word latched now carries no data
  output logic stretching   // stretch in progress (for monitoring)
);

  localparam int unsigned CW = $clog2(PULSES + 1);

  logic          active;
  logic [CW-1:0] rises;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      rises  <= '0;
    end else if (ts_det) begin
      active <= 1'b1;
      rises  <= '0;
    end else if (active && ack_orig) begin
      if (rises == CW'(PULSES - 1)) begin
        active <= 1'b0;
        rises  <= '0;
      end else begin
        rises <= rises + 1'b1;
      end
    end
  end

  assign stretching = active || ts_det;
  assign ack_mod    = ack_orig || stretching;
  assign zero_force = stretching;

  initial assert (PULSES >= 1) else $error("PULSES must be at least 1");

endmodule
