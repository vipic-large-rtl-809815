// Serializer of one readout lane.
//
// At every rising edge of the original ack-hit (the clock edge ending a cycle in
// which `latch` is high) the serializer takes the word on the half-matrix bus,
// the counter value of the pixel just read, and shifts it out on `sdo`, most
// significant bit first, one bit per serializer clock. A word is `word_len` bits
// long, equal to the spacing of the ack-hit pulses, so words follow each other
// without gaps. When `zero_force` is set the word is replaced by all zeros, which
// the receiver reads as "no meaningful data" (a read pixel always holds a count
// of at least one). A count that does not fit `word_len` bits is sent as all ones.
//
// Timing: the first bit of a word appears on `sdo` in the cycle after the latch
// edge, together with `word_start`. The latched word, its pixel address and a
// valid flag are also given in parallel. Latching at the ack-hit rising edge and
// the zero word follow the notes; bit order, saturation and the parallel outputs
// are choices of this design.
module vipic_serializer #(
  parameter int unsigned CNT_W  = vipic_pkg::MAX_WORD_LEN,
  parameter int unsigned ADDR_W = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  vipic_pkg::word_len_t word_len,    // bits per word, 7..20
  input  logic                 latch,       // next edge is an ack-hit rising edge
  input  logic                 zero_force,  // latch all zeros
  input  logic [CNT_W-1:0]     bus_data,    // counter of the pixel being read
  input  logic                 bus_valid,   // a pixel is selected
  input  logic [ADDR_W-1:0]    bus_addr,    // its address
  output logic                 sdo,         // serial data out
  output logic                 word_start,  // sdo carries the first bit of a word
  output logic [CNT_W-1:0]     word,        // last latched word
  output logic [ADDR_W-1:0]    word_addr,   // address belonging to it
  output logic                 word_valid   // it came from a pixel (not zero)
);
  import vipic_pkg::*;

  localparam int unsigned SR_W = MAX_WORD_LEN;

  word_len_t        len;
  logic [SR_W-1:0]  sr;
  logic [CNT_W-1:0] max_val, clamped, next_word;

  assign len     = clamp_len(word_len);
  assign max_val = CNT_W'((64'd1 << len) - 64'd1);
  assign clamped = (bus_data > max_val) ? max_val : bus_data;
  assign next_word = zero_force ? '0 : clamped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      word       <= '0;
      word_addr  <= '0;
      word_valid <= 1'b0;
      word_start <= 1'b0;
    end else begin
      word_start <= latch;
      if (latch) begin
        sr         <= SR_W'(next_word) << (SR_W - int'(len));
        word       <= next_word;
        word_addr  <= zero_force ? '0 : bus_addr;
        word_valid <= bus_valid && !zero_force && (next_word != '0);
      end else begin
        sr <= sr << 1;
      end
    end
  end

  assign sdo = sr[SR_W-1];

  initial assert (CNT_W <= MAX_WORD_LEN) else $error("CNT_W above the longest word");

endmodule
