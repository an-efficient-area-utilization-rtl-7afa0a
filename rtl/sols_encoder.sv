// sols_encoder: fully reused FM0 / Manchester encoder with one flip-flop.
//
// Each data bit X occupies one CLK cycle and is sent as two half-symbols:
// A while CLK is high, then B while CLK is low.
//   FM0       (mode = MODE_FM0, clr_n = 1):       A(t) = not B(t-1),
//                                                 B(t) = X xor B(t-1).
//             So the level always changes at a bit boundary, and changes
//             again mid-bit only when X = 0.
//   Manchester (mode = MODE_MANCHESTER, clr_n = 0): A = not X, B = X,
//             i.e. code = X xor CLK.
// Both codes are a CLK-selected choice between two legs, and every gate is
// used by both: MUX-2 (sols_logic_a) picks B(t-1) or X for the A leg, one
// XNOR (sols_logic_b) forms the B leg, MUX-1 selects the A leg while CLK is
// high and the B leg while it is low, and one inverter after MUX-1 finishes
// both legs. Placing the inverter after MUX-1, rather than in the A leg only,
// gives both legs the same depth (one mux or XNOR stage) so that MUX-1 does
// not see the A leg arrive late. DFFB (sols_dffb) stores B(t) at the rising
// CLK edge that ends the bit.
//
// Interface:
//   clk    bit clock, and the select of MUX-1
//   clr_n  active-low clear of DFFB; keep 0 in Manchester mode, pulse it
//          low to initialise FM0 (B(t-1) = 0 before the first bit)
//   mode   MODE_FM0 / MODE_MANCHESTER
//   x      data bit; change it just after a rising edge, hold it one cycle
//   code   encoded output, combinational in clk, x and the state
//   q      DFFB output, B(t-1)
// Timing: one data bit per CLK cycle; q shows a bit's B half-symbol from
// the rising edge that ends that bit (one-cycle latency).
//
// Structure, mode settings and the flop's edge follow the published balanced
// architecture. One departure is this design's: the flop's D is shown there
// as the inverter output, which during the low CLK phase before each rising
// edge is the inverted B leg. Here D is taken from the inverted B leg
// directly, so that the flop does not sample a signal that changes with its
// own clock edge; the stored value and its timing are the same.
// CLK is used as data (the MUX-1 select) by design: that is what turns one
// bit per cycle into two half-symbols per cycle.
module sols_encoder
  import sols_pkg::*;
(
  input  logic  clk,
  input  logic  clr_n,
  input  mode_e mode,
  input  logic  x,
  output logic  code,
  output logic  q
);

  logic a_pre;  // MUX-2 output: B(t-1) in FM0, X in Manchester
  logic b_pre;  // XNOR output:  not (X xor B(t-1))
  logic mux1;   // MUX-1 output, before the shared inverter
  logic b_cur;  // B(t), the value DFFB stores

  sols_logic_a u_logic_a (
    .mode   (mode),
    .x      (x),
    .b_prev (q),
    .a_pre  (a_pre)
  );

  sols_logic_b u_logic_b (
    .x      (x),
    .b_prev (q),
    .b_pre  (b_pre)
  );

  // MUX-1: input 1 (CLK high) = A leg, input 0 (CLK low) = B leg.
  assign mux1 = clk ? a_pre : b_pre;

  // Shared inverter: its output is the FM0/Manchester code.
  assign code = ~mux1;

  // What the inverter presents to DFFB while CLK is low.
  assign b_cur = ~b_pre;

  sols_dffb u_dffb (
    .clk   (clk),
    .clr_n (clr_n),
    .d     (b_cur),
    .q     (q)
  );

  // Manchester coding relies on DFFB being held clear (B(t-1) = 0), so the
  // two controls must agree whenever Manchester is selected. They are
  // separate inputs because FM0 also needs the clear, to initialise the code.
  always_comb begin
    if (mode == MODE_MANCHESTER)
      a_manchester_needs_clear : assert final (!clr_n)
        else $error("Manchester mode with DFFB not held clear");
  end

endmodule : sols_encoder
