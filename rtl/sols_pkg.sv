// sols_pkg: types shared by the FM0/Manchester encoder and its testbenches.
//
// The encoder has a single mode input. Its two values follow the operating
// points the architecture is specified with: FM0 is selected with Mode = 0
// (and the state flop released, CLR = 1), Manchester with Mode = 1 (and the
// state flop held clear, CLR = 0).
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } mode_e;

endpackage : sols_pkg
