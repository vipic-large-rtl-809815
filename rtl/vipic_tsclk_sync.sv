// TSCLK input stage of the readout controller.
//
// The time-frame clock TSCLK comes from outside with a period unrelated to the
// serializer clock. It is brought into the serializer clock domain with a
// two-flop synchroniser and its rising edge is turned into a one-cycle pulse
// `ts_det` for the stretchers. The TSCLK sent to the pixel matrix, `tsclk_pix`,
// is the synchronised TSCLK delayed by DELAY further serializer clock cycles
// (dt): the stretched ack-hit is then already high everywhere in the matrix
// when the pixels see the new frame, so the falling edge of ack-hit cannot race
// the rising edge of TSCLK at any pixel. DELAY must exceed any skew between the
// two signals in the matrix and stay shorter than the shortest stretch.
//
// Timing: `ts_det` is high in the cycle after the second clock edge that follows
// the TSCLK rise (two synchroniser flops); `tsclk_pix` rises DELAY cycles after
// `ts_det`. The synchroniser and the default DELAY are choices of this design;
// the architecture only asks for a delay of some number of serializer clock
// cycles, longer than any skew between ack-hit and TSCLK in the matrix.
module vipic_tsclk_sync #(
  parameter int unsigned DELAY = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tsclk,      // external frame clock, asynchronous
  output logic ts_det,     // one-cycle pulse: TSCLK rising edge detected
  output logic tsclk_pix   // TSCLK for the pixels, delayed by DELAY cycles
);

  logic [2:0]       sync;    // [0],[1] synchroniser, [2] previous value
  logic [DELAY-1:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      dly  <= '0;
    end else begin
      sync <= {sync[1:0], tsclk};
      dly  <= DELAY'({dly, sync[1]});
    end
  end

  assign ts_det    = sync[1] && !sync[2];
  assign tsclk_pix = dly[DELAY-1];

  initial assert (DELAY >= 1) else $error("DELAY must be at least 1");

endmodule
