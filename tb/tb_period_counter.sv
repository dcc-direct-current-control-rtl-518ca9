// tb_period_counter - self-checking test of period_counter.
// Sends marks at random spacings and checks that period equals the number
// of clocks between the last two marks, that valid rises only after the
// second mark, and that stopped rises when no mark comes for 2^WIDTH - 1
// clocks (WIDTH is reduced to 8 here) and falls at the next mark.
module tb_period_counter;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, mark = 1'b0, valid, stopped;
  logic [W-1:0] period;
  int checks = 0, failures = 0;

  period_counter #(.WIDTH(W)) dut (.clk, .rst_n, .mark, .period, .valid, .stopped);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_mark();
    mark = 1'b1; cyc(1); mark = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    cyc(2); rst_n = 1'b1; cyc(3);
    check(!valid && !stopped, "nothing before the first mark");
    do_mark();
    cyc(10);
    check(!valid, "no period after one mark");
    do_mark();
    check(valid && period == 8'd11, $sformatf("first period %0d", period));
    for (int k = 0; k < 50; k++) begin
      gap = $urandom_range(1, 200);
      cyc(gap - 1);
      do_mark();
      check(valid && int'(period) == gap, $sformatf("period %0d expected %0d", period, gap));
      check(!stopped, "not stopped while switching");
    end
    cyc(255);
    check(stopped, "stopped after 255 clocks without a mark");
    cyc(50);
    check(stopped, "stays stopped");
    do_mark();
    check(!stopped, "stopped clears on a mark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
