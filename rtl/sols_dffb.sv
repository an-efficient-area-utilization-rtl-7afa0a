// sols_dffb: the encoder's only state element, DFFB, holding B(t-1).
//
// A 1-bit positive-edge flip-flop with an active-low clear. FM0 needs to
// remember only the last half-symbol B of the previous bit, so a single flop
// suffices. In Manchester mode the clear is held active, which keeps Q at 0
// and makes the shared XNOR of the B leg pass X; in FM0 mode a pulse on the
// clear initialises the code before the first bit.
//
// Interface: clk, clr_n, d in; q out. q takes d at each rising clk edge
// (one-cycle latency). The positive edge and the active-low clear follow the
// published architecture; making the clear asynchronous is this design's
// choice, as the source does not say.
module sols_dffb (
  input  logic clk,    // CLK
  input  logic clr_n,  // CLR, active low, asynchronous
  input  logic d,      // B(t)
  output logic q       // B(t-1)
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= d;
  end

endmodule : sols_dffb
