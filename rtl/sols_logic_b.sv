// sols_logic_b: the shared exclusive-or of the "logic for B(t) / X" leg.
//
// The FM0 second half-symbol is B(t) = X xor B(t-1); the Manchester second
// half-symbol is X, which equals X xor 0. One gate therefore serves both
// codes: in Manchester mode the state flop is held clear, so B(t-1) = 0 and
// the gate passes X. Because the balanced architecture puts the shared
// inverter after the CLK multiplexer, this leg is an XNOR, so that after the
// inverter it carries X xor B(t-1).
//
// Interface: x, b_prev in; b_pre out (purely combinational).
module sols_logic_b (
  input  logic x,       // data bit X
  input  logic b_prev,  // B(t-1), the stored state (0 in Manchester mode)
  output logic b_pre    // XNOR output, inverted downstream
);

  assign b_pre = ~(x ^ b_prev);

endmodule : sols_logic_b
