// tb_vector_selector - self-checking test of vector_selector.
// Checks the vector table for both signs of the reference, the one-clock
// acknowledge, the fast vector after a timeout that only acts on a zero
// vector, IDLE mode (zero vector, interrupts acknowledged), and the vector
// applied on entering a running mode.
module tb_vector_selector;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_t mode = MODE_IDLE;
  logic pos_region = 1'b1, irq = 1'b0, timeout = 1'b0, ack, slow, fast;
  action_t action = ACT_INC;
  vvec_t vec_req;
  int checks = 0, failures = 0;

  vector_selector dut (.clk, .rst_n, .mode, .pos_region, .irq, .action,
    .timeout, .ack, .vec_req, .slow, .fast);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: vec=%b ack=%b fast=%b", what, vec_req, ack, fast); end
  endtask

  // raise an interrupt, expect ack and the vector one clock later
  task automatic interrupt(input action_t a, input vvec_t exp, input string what);
    action = a; irq = 1'b1;
    cyc(1);
    check(ack == 1'b1, {what, ": ack"});
    check(vec_req == exp, {what, ": vector"});
    irq = 1'b0;   // the DCC logic drops it one clock after ack
    cyc(1);
    check(ack == 1'b0, {what, ": single ack"});
    check(vec_req == exp, {what, ": vector held"});
  endtask

  task automatic pulse_timeout();
    timeout = 1'b1; cyc(1); timeout = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc(2); rst_n = 1'b1; cyc(1);
    check(vec_req == VEC_ZERO, "reset: zero vector");
    interrupt(ACT_INC, VEC_ZERO, "idle ignores interrupt");
    // enter fixed hysteresis with the DCC logic holding INC
    mode = MODE_FIXED_HYST; action = ACT_INC;
    cyc(1);
    check(vec_req == VEC_POS, "start: INC applied on mode entry");
    // positive region
    interrupt(ACT_DEC, VEC_ZERO, "pos DEC -> zero (slow)");
    check(slow, "slow flag on zero vector");
    interrupt(ACT_INC, VEC_POS, "pos INC -> [1,0]");
    pulse_timeout();
    check(vec_req == VEC_POS && !fast, "timeout on active vector does nothing");
    interrupt(ACT_DEC, VEC_ZERO, "pos DEC again");
    pulse_timeout();
    check(vec_req == VEC_NEG && fast, "timeout on slow DEC -> fast [0,1]");
    interrupt(ACT_INC, VEC_POS, "INC after fast");
    check(!fast, "fast flag cleared");
    // negative region
    pos_region = 1'b0;
    interrupt(ACT_DEC, VEC_NEG, "neg DEC -> [0,1]");
    interrupt(ACT_INC, VEC_ZERO, "neg INC -> zero (slow)");
    pulse_timeout();
    check(vec_req == VEC_POS && fast, "timeout on slow INC -> fast [1,0]");
    // stop mode runs like fixed hysteresis
    mode = MODE_STOP;
    interrupt(ACT_DEC, VEC_NEG, "stop mode neg DEC");
    // back to idle
    mode = MODE_IDLE;
    cyc(1);
    check(vec_req == VEC_ZERO && !fast, "idle: zero vector");
    pulse_timeout();
    check(vec_req == VEC_ZERO, "idle: timeout ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
