// tb_sols_logic_b: exhaustive self-check of the B-leg XNOR.
//
// All four combinations of x and b_prev are applied, then random ones; the
// expected value is the inverse of X xor B(t-1), taken from a truth table
// written out below rather than from an expression.
module tb_sols_logic_b;

  logic x, b_prev, b_pre;
  int   checks = 0, failures = 0;

  // Truth table indexed by {x, b_prev}: XNOR.
  localparam logic [3:0] XNOR_TT = 4'b1001;

  sols_logic_b dut (.x(x), .b_prev(b_prev), .b_pre(b_pre));

  task automatic apply(input logic [1:0] v);
    x      = v[1];
    b_prev = v[0];
    #1;
    checks++;
    if (b_pre !== XNOR_TT[v]) begin
      failures++;
      $display("FAIL x=%0b b_prev=%0b b_pre=%0b expected %0b",
               v[1], v[0], b_pre, XNOR_TT[v]);
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
    for (int i = 0; i < 4; i++) apply(2'(i));
    for (int i = 0; i < 32; i++) apply(2'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_sols_logic_b
