// tb_dcc_logic - self-checking test of dcc_logic.
// Plays comparator waveforms of a current going up and down through the
// band, acknowledges each interrupt like the vector selector does, and
// checks: the interrupt comes SYNC_STAGES + 2 clocks after the comparator
// edge, the action is DEC after an upper crossing and INC after a lower
// one, edges of the comparator not being watched give no interrupt, and a
// chattering comparator gives a single interrupt.
module tb_dcc_logic;
  import dcc_pkg::*;
  localparam int SYNC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_upper = 1'b0, comp_lower = 1'b0, ack_cpu = 1'b0, intr;
  action_t action;
  logic [2:0] state;
  int checks = 0, failures = 0;

  dcc_logic #(.SYNC_STAGES(SYNC)) dut (.clk, .rst_n, .comp_upper,
    .comp_lower, .ack_cpu, .intr, .action, .state);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // wait for the interrupt, check latency and action, acknowledge it
  task automatic expect_irq(input action_t exp_act, input int exp_lat,
                            input string what);
    int n = 0;
    while (!intr && n < 50) begin cyc(1); n++; end
    check(intr, {what, ": interrupt"});
    check(n == exp_lat, $sformatf("%s: latency %0d, expected %0d", what, n, exp_lat));
    check(action == exp_act, {what, ": action"});
    if (intr) begin ack_cpu = 1'b1; cyc(1); ack_cpu = 1'b0; end
    cyc(1);
    check(!intr, {what, ": interrupt cleared"});
  endtask

  task automatic expect_quiet(input int n, input string what);
    logic seen = 1'b0;
    repeat (n) begin cyc(1); seen |= intr; end
    check(!seen, what);
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc(3);
    rst_n = 1'b1;
    cyc(1);
    expect_quiet(5, "no interrupt without a crossing");
    // current starts below the band: lower comparator high
    comp_lower = 1'b1;
    expect_irq(ACT_INC, SYNC + 2, "start below band");
    // current rises into the band, then above it
    cyc(3); comp_lower = 1'b0;
    cyc(5);
    comp_upper = 1'b1;
    expect_irq(ACT_DEC, SYNC + 2, "upper crossing");
    // after DEC the lower comparator is watched; upper chatter is ignored
    comp_upper = 1'b0; cyc(2);
    comp_upper = 1'b1; cyc(2);
    comp_upper = 1'b0;
    expect_quiet(8, "upper chatter ignored while falling");
    // lower crossing
    comp_lower = 1'b1;
    expect_irq(ACT_INC, SYNC + 2, "lower crossing");
    // lower chatters while the current rises: ignored
    comp_lower = 1'b0; cyc(1); comp_lower = 1'b1; cyc(1);
    comp_lower = 1'b0;
    expect_quiet(8, "lower chatter ignored while rising");
    // several full periods
    for (int k = 0; k < 20; k++) begin
      comp_upper = 1'b1;
      expect_irq(ACT_DEC, SYNC + 2, "period up");
      cyc(k % 4);
      comp_upper = 1'b0;
      cyc(4);
      comp_lower = 1'b1;
      expect_irq(ACT_INC, SYNC + 2, "period down");
      comp_lower = 1'b0;
      cyc(4);
    end
    // a chattering edge on the watched comparator gives one interrupt
    comp_upper = 1'b1; cyc(1); comp_upper = 1'b0; cyc(1);
    comp_upper = 1'b1; cyc(1); comp_upper = 1'b0;
    expect_irq(ACT_DEC, SYNC - 1, "chattering upper edge");
    expect_quiet(10, "only one interrupt for a chattering edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
