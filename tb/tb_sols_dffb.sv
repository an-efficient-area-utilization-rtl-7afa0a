// tb_sols_dffb: self-check of the clearable state flip-flop.
//
// Random data is clocked through; q must equal the d applied before the
// previous rising edge (one-cycle latency). The clear is asserted at random
// points in the middle of a cycle: q must drop to 0 at once, without a clock
// edge, stay 0 over rising edges while the clear is held, and follow d again
// after release.
module tb_sols_dffb;

  logic clk, clr_n = 1'b0, d = 1'b0, q;
  logic model_q = 1'b0;
  int   checks = 0, failures = 0;
  int   async_clears = 0;

  sols_dffb dut (.clk(clk), .clr_n(clr_n), .d(d), .q(q));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check(input logic expect_q, input string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b expected %0b", what, $time, q, expect_q);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // held clear over two rising edges with d = 1
    d = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(1'b0, "held clear");
    clr_n = 1'b1;
    model_q = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // new d just after the edge, as the encoder's data does
      d = 1'($urandom_range(0, 1));
      @(negedge clk);
      #1 check(model_q, "mid-cycle hold");
      if ($urandom_range(0, 9) == 0) begin
        // asynchronous clear in the low phase, no clock edge
        clr_n = 1'b0;
        #1 check(1'b0, "asynchronous clear");
        async_clears++;
        @(posedge clk);
        #1 check(1'b0, "clear held over an edge");
        clr_n = 1'b1;
        model_q = 1'b0;
        continue;
      end
      @(posedge clk);
      model_q = d;
      #1 check(model_q, "capture on rising edge");
    end
    if (async_clears == 0) begin
      failures++;
      $display("FAIL no asynchronous clear was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_sols_dffb
