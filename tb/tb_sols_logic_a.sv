// tb_sols_logic_a: exhaustive self-check of the A-leg operand multiplexer.
//
// All eight combinations of mode, x and b_prev are applied several times in
// random order; the expected output is the FM0/Manchester operand rule
// (FM0 -> B(t-1), Manchester -> X) written out independently of the module.
module tb_sols_logic_a;
  import sols_pkg::*;

  mode_e mode;
  logic  x, b_prev, a_pre;
  int    checks = 0, failures = 0;

  sols_logic_a dut (.mode(mode), .x(x), .b_prev(b_prev), .a_pre(a_pre));

  task automatic apply(input logic [2:0] v);
    logic expect_a;
    mode   = mode_e'(v[2]);
    x      = v[1];
    b_prev = v[0];
    #1;
    expect_a = v[2] ? v[1] : v[0];
    checks++;
    if (a_pre !== expect_a) begin
      failures++;
      $display("FAIL mode=%0d x=%0b b_prev=%0b a_pre=%0b expected %0b",
               v[2], v[1], v[0], a_pre, expect_a);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) apply(3'(i));
    for (int i = 0; i < 64; i++) apply(3'($urandom_range(0, 7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_sols_logic_a
