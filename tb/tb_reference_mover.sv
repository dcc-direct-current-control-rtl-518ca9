// tb_reference_mover - self-checking test of reference_mover.
// Checks that only the reference whose comparator is not watched moves
// (lower while the current rises, upper while it falls, for both signs of
// the reference), that IDLE moves both, that STOP centres the band on the
// zero-current code, and that the band shrink steps the watched reference
// one code per shrink_period after shrink_timeout, stops one code short of
// the other reference, and is undone after the next vector change.
module tb_reference_mover;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, pos_region = 1'b1, shrinking;
  mode_t mode = MODE_FIXED_HYST;
  vvec_t vec = VEC_POS;
  logic [7:0] upper_target = 8'd150, lower_target = 8'd100, zero_code = 8'd128;
  logic [7:0] upper_dac, lower_dac;
  logic [15:0] shrink_timeout = '0, shrink_period = 16'd4;
  int checks = 0, failures = 0;

  reference_mover #(.DAC_BITS(8), .WIDTH(16)) dut (.clk, .rst_n, .mode,
    .pos_region, .vec, .upper_target, .lower_target, .zero_code,
    .shrink_timeout, .shrink_period, .upper_dac, .lower_dac, .shrinking);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: upper=%0d lower=%0d", what, upper_dac, lower_dac);
    end
  endtask

  // both references must never change in the same clock outside IDLE
  logic [7:0] u_q, l_q;
  mode_t mode_q = MODE_IDLE;
  always @(negedge clk) begin
    u_q <= upper_dac; l_q <= lower_dac; mode_q <= mode;
    if (rst_n && mode != MODE_IDLE && mode_q != MODE_IDLE &&
        u_q != upper_dac && l_q != lower_dac) begin
      failures++;
      $display("FAIL both references moved in one clock");
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc(2);
    check(upper_dac == 8'd128 && lower_dac == 8'd128, "reset at zero code");
    rst_n = 1'b1;
    cyc(1);
    check(lower_dac == 8'd100 && upper_dac == 8'd128, "rising: only lower moves");
    cyc(5);
    check(upper_dac == 8'd128, "upper waits while rising");
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd150 && lower_dac == 8'd100, "falling (zero vector, positive): upper moves");
    upper_target = 8'd160; lower_target = 8'd90; cyc(1);
    check(upper_dac == 8'd160 && lower_dac == 8'd100, "falling: new upper, lower waits");
    vec = VEC_POS; cyc(1);
    check(upper_dac == 8'd160 && lower_dac == 8'd90, "rising: new lower");
    // negative reference: zero vector means rising
    pos_region = 1'b0; upper_target = 8'd110; lower_target = 8'd80;
    vec = VEC_ZERO; cyc(1);
    check(lower_dac == 8'd80 && upper_dac == 8'd160, "negative, zero vector: lower moves");
    vec = VEC_NEG; cyc(1);
    check(upper_dac == 8'd110, "negative, [0,1]: upper moves");
    // IDLE: both at once
    mode = MODE_IDLE; upper_target = 8'd140; lower_target = 8'd120; cyc(1);
    check(upper_dac == 8'd140 && lower_dac == 8'd120, "idle: both move");
    // STOP: band of 20 centred on 128
    mode = MODE_STOP; pos_region = 1'b1; vec = VEC_POS; cyc(1);
    check(lower_dac == 8'd118 && upper_dac == 8'd140, "stop: lower to 118");
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd138, "stop: upper to 138");
    // band shrink while rising for a long time
    mode = MODE_FIXED_HYST; upper_target = 8'd150; lower_target = 8'd100;
    vec = VEC_POS; cyc(1);
    check(lower_dac == 8'd100, "lower to 100");
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd150, "upper to 150");
    shrink_timeout = 16'd50;
    vec = VEC_POS; cyc(1);
    cyc(45);
    check(upper_dac == 8'd150 && !shrinking, "no shrink before the timeout");
    cyc(5 + 40);
    check(shrinking, "shrinking after the timeout");
    check(upper_dac >= 8'd139 && upper_dac <= 8'd141,
          $sformatf("about ten steps in 40 clocks: %0d", upper_dac));
    cyc(400);
    check(upper_dac == 8'd101 && lower_dac == 8'd100, "shrink stops one code above lower");
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd150 && !shrinking, "vector change: upper restored");
    // and the same while falling: lower creeps up
    cyc(50 + 20);
    check(lower_dac > 8'd100 && lower_dac < 8'd110, "falling: lower shrinks upward");
    vec = VEC_POS; cyc(1);
    check(lower_dac == 8'd100, "vector change: lower restored");
    // a band moved below the old one walks down without crossing over
    upper_target = 8'd90; lower_target = 8'd80;
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd101 && lower_dac == 8'd100, "falling: upper clamped above lower");
    vec = VEC_POS; cyc(1);
    check(lower_dac == 8'd80, "rising: lower to 80");
    vec = VEC_ZERO; cyc(1);
    check(upper_dac == 8'd90, "falling: upper to 90");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
