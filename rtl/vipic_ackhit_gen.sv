// Generator of the original ack-hit pulses of the RStrobe-less readout.
//
// Instead of a global RStrobe, the controller pulses the ack-hit line once per
// readout word: the rising edge ends the readout of the current pixel and lets
// the sparsifier step to the next one. The pulses are synchronous to the
// serializer clock, high for one clock cycle and spaced `word_len` cycles apart,
// so the readout runs continuously at the tempo of the serializer.
//
// Two interleaved lines are made, ACKHIT_R and ACKHIT_L, one per half of the
// matrix; L is delayed by word_len/2 cycles relative to R. For each line the
// generator also flags the cycle just before the pulse (`pre_*`): the serializer
// latches the pixel data at the clock edge that ends that cycle, which is the
// rising edge of ack-hit.
//
// The one-cycle pulse width, the synchronous tempo and the two interleaved lines
// follow the notes; the half-period offset of L and the clamping of `word_len`
// to 7..20 are choices of this design. A new word length takes effect at once.
module vipic_ackhit_gen (
  input  logic                clk,
  input  logic                rst_n,
  input  vipic_pkg::word_len_t word_len,  // cycles per readout word, 7..20
  output logic                ack_r,      // original ack-hit, right half
  output logic                ack_l,      // original ack-hit, left half
  output logic                pre_r,      // next clock edge is a rising edge of ack_r
  output logic                pre_l       // next clock edge is a rising edge of ack_l
);
  import vipic_pkg::*;

  word_len_t len, half, ph;

  assign len  = clamp_len(word_len);
  assign half = len >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ph <= '0;
    else if (ph >= len - 1) ph <= '0;
    else                    ph <= ph + 1'b1;
  end

  assign ack_r = (ph == '0);
  assign pre_r = (ph >= len - 1);
  assign ack_l = (ph == half);
  assign pre_l = (ph == half - 1'b1);

endmodule
