// sols_logic_a: operand multiplexer of the "logic for A(t) / not X" leg.
//
// The FM0 first half-symbol is A(t) = not B(t-1); the Manchester first
// half-symbol is not X. Both are an inversion, so one inverter serves both
// codes and only its operand has to be switched: this multiplexer (MUX-2)
// passes B(t-1) when mode is FM0 and X when mode is Manchester. The inverter
// that completes the leg is not in this module; in the balanced architecture
// it is placed after the CLK multiplexer (see sols_encoder), where it is
// shared with the B leg.
//
// Interface: mode, x, b_prev in; a_pre out (purely combinational).
// MUX-2 input 0 = B(t-1), input 1 = X, select = Mode, as in the published
// architecture.
module sols_logic_a
  import sols_pkg::*;
(
  input  mode_e mode,    // MODE_FM0 or MODE_MANCHESTER
  input  logic  x,       // data bit X
  input  logic  b_prev,  // B(t-1), the stored state
  output logic  a_pre    // MUX-2 output, inverted downstream
);

  always_comb begin
    unique case (mode)
      MODE_FM0:        a_pre = b_prev;
      MODE_MANCHESTER: a_pre = x;
      default:         a_pre = b_prev;
    endcase
  end

endmodule : sols_logic_a
