// tb_sols_encoder: end-to-end self-check of the FM0/Manchester encoder.
//
// The encoder has no parameters, so this bench runs the design exactly as
// it is built. One data bit is applied per clock cycle, just after the
// rising edge; the code is sampled in the middle of the high half (A) and of
// the low half (B) and again just before the next rising edge (B must still
// hold). Expected half-symbols come from a reference model written from the
// coding rules, not from the gate structure:
//   FM0:        A = not (previous B); B = A when X = 1, B = not A when X = 0
//   Manchester: A = not X, B = X          (code = X xor CLK)
// Independently of the model, the measured waveform is also checked against
// the rules themselves: FM0 always changes level at a bit boundary and
// changes mid-bit exactly when X = 0; Manchester changes mid-bit on every
// bit and spends as many half-symbols high as low. q must carry the bit's B
// half-symbol from the rising edge that ends the bit (one-cycle latency),
// and must be 0 throughout Manchester operation. One bit is encoded per
// cycle: the bench compares elapsed clock cycles with bits sent.
//
// Scenarios: the bit pattern 0,1,1,0,1 in both codes, long random streams
// in both codes, switches FM0 -> Manchester and Manchester -> FM0, and an
// FM0 re-initialisation by a clear pulse in the middle of a stream. Each of
// these, and each FM0 rule, is counted; a mechanism that never occurred is
// a failure.
module tb_sols_encoder;
  import sols_pkg::*;

  localparam int unsigned HALF = 5;  // half clock period

  logic  clk, clr_n = 1'b0, x = 1'b0;
  mode_e mode = MODE_MANCHESTER;
  logic  code, q;

  int checks = 0, failures = 0;

  // reference state and measured history
  logic ref_b = 1'b0;        // model's B(t-1)
  logic last_b_meas = 1'b0;  // measured B of the previous bit
  bit   prev_was_fm0 = 1'b0; // previous bit was FM0 (rule 3 applies)

  // mechanism counters
  int n_fm0_bits = 0, n_man_bits = 0;
  int n_rule1 = 0, n_rule2 = 0, n_rule3 = 0;
  int n_to_fm0 = 0, n_to_man = 0, n_reinit = 0;
  int man_high = 0, man_low = 0;

  // rate: bits sent against clock cycles elapsed
  int bits_sent = 0;

  sols_encoder dut (
    .clk   (clk),
    .clr_n (clr_n),
    .mode  (mode),
    .x     (x),
    .code  (code),
    .q     (q)
  );

  initial begin
    clk = 1'b0;
    forever #HALF clk = ~clk;
  end

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, want);
    end
  endtask

  // Drive one bit for one whole cycle. Called 1 time unit after a rising
  // edge; returns 1 time unit after the next rising edge.
  task automatic send_bit(input logic bit_x);
    logic exp_a, exp_b, a_meas, b_meas, b_late;
    x = bit_x;
    if (mode == MODE_FM0) begin
      exp_a = ~ref_b;
      exp_b = bit_x ? exp_a : ~exp_a;
    end else begin
      exp_a = ~bit_x;
      exp_b = bit_x;
    end
    // A half-symbol, mid high phase
    #(HALF / 2);
    a_meas = code;
    check(a_meas, exp_a, "A half-symbol");
    // B half-symbol, mid low phase
    @(negedge clk);
    #(HALF / 2);
    b_meas = code;
    check(b_meas, exp_b, "B half-symbol");
    // B still held just before the rising edge
    #(HALF - HALF / 2 - 1);
    b_late = code;
    check(b_late, exp_b, "B held to end of bit");

    if (mode == MODE_FM0) begin
      n_fm0_bits++;
      if (prev_was_fm0) begin
        checks++;
        if (a_meas == last_b_meas) begin
          failures++;
          $display("FAIL FM0 rule 3 (boundary transition) at %0t", $time);
        end else n_rule3++;
      end
      checks++;
      if (bit_x == 1'b0) begin
        if (a_meas == b_meas) begin
          failures++;
          $display("FAIL FM0 rule 1 (X=0 mid-bit transition) at %0t", $time);
        end else n_rule1++;
      end else begin
        if (a_meas != b_meas) begin
          failures++;
          $display("FAIL FM0 rule 2 (X=1 no mid-bit transition) at %0t", $time);
        end else n_rule2++;
      end
      ref_b = exp_b;
      prev_was_fm0 = 1'b1;
    end else begin
      n_man_bits++;
      checks++;
      if (a_meas == b_meas) begin
        failures++;
        $display("FAIL Manchester mid-bit transition missing at %0t", $time);
      end
      man_high += int'(a_meas) + int'(b_meas);
      man_low  += 2 - (int'(a_meas) + int'(b_meas));
      ref_b = 1'b0;
      prev_was_fm0 = 1'b0;
    end
    last_b_meas = b_meas;
    bits_sent++;

    @(posedge clk);
    #1;
    // one-cycle latency: DFFB now holds this bit's B (0 in Manchester)
    check(q, (mode == MODE_FM0) ? exp_b : 1'b0, "DFFB latency");
  endtask

  // Mode changes happen together with CLR, right after a rising edge.
  task automatic to_fm0();
    mode  = MODE_FM0;
    clr_n = 1'b1;
    ref_b = 1'b0;
    prev_was_fm0 = 1'b0;
    n_to_fm0++;
  endtask

  task automatic to_manchester();
    mode  = MODE_MANCHESTER;
    clr_n = 1'b0;
    #0;
    #1;
    check(q, 1'b0, "clear on entering Manchester");
    n_to_man++;
    // keep the cycle's timing: the bit that follows starts 1 unit later,
    // still well inside the high phase
  endtask

  task automatic fm0_reinit();
    // pulse the clear while X is being set up, then release it
    clr_n = 1'b0;
    #1;
    check(q, 1'b0, "FM0 re-initialisation clear");
    clr_n = 1'b1;
    ref_b = 1'b0;
    prev_was_fm0 = 1'b0;
    n_reinit++;
  endtask

  task automatic send_random(input int n);
    for (int i = 0; i < n; i++) send_bit(1'($urandom_range(0, 1)));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] PATTERN = 5'b10110;  // bits 0,1,1,0,1 from bit 0 up

  initial begin
    time t0;
    // start in Manchester with DFFB held clear
    @(posedge clk);
    #1;
    t0 = $time;

    // the 0,1,1,0,1 pattern in Manchester: X xor CLK gives 10,01,01,10,01
    for (int i = 0; i < 5; i++) send_bit(PATTERN[i]);
    send_random(200);

    // Manchester -> FM0, same pattern, then a long random stream
    to_fm0();
    for (int i = 0; i < 5; i++) send_bit(PATTERN[i]);
    send_random(300);

    // re-initialise FM0 mid-stream
    fm0_reinit();
    send_random(100);

    // FM0 -> Manchester -> FM0 a few times, with random run lengths
    for (int k = 0; k < 8; k++) begin
      to_manchester();
      send_random($urandom_range(1, 40));
      to_fm0();
      send_random($urandom_range(1, 40));
    end

    // rate: one bit per clock cycle
    checks++;
    if (($time - t0) / (2 * HALF) != time'(bits_sent)) begin
      failures++;
      $display("FAIL rate: %0d bits in %0d cycles", bits_sent,
               ($time - t0) / (2 * HALF));
    end

    // Manchester dc balance over everything sent in Manchester mode
    checks++;
    if (man_high != man_low) begin
      failures++;
      $display("FAIL Manchester balance: %0d high, %0d low half-symbols",
               man_high, man_low);
    end

    // every mechanism must have occurred
    checks++;
    if (n_fm0_bits == 0 || n_man_bits == 0 || n_rule1 == 0 || n_rule2 == 0 ||
        n_rule3 == 0 || n_to_fm0 == 0 || n_to_man == 0 || n_reinit == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end

    $display("fm0 bits=%0d manchester bits=%0d rule1=%0d rule2=%0d rule3=%0d",
             n_fm0_bits, n_man_bits, n_rule1, n_rule2, n_rule3);
    $display("switches to fm0=%0d to manchester=%0d fm0 re-inits=%0d cycles=%0d",
             n_to_fm0, n_to_man, n_reinit, ($time - t0) / (2 * HALF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_sols_encoder
