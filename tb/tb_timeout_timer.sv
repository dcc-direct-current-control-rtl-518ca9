// tb_timeout_timer - self-checking test of timeout_timer.
// For several limits, checks that the single expired pulse comes exactly
// limit clocks after a restart, that a restart before then postpones it,
// that it does not repeat, and that limit = 0 disables it.
module tb_timeout_timer;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, expired;
  logic [15:0] limit = '0;
  int checks = 0, failures = 0;

  timeout_timer #(.WIDTH(16)) dut (.clk, .rst_n, .restart, .limit, .expired);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // restart, then count clocks until expired; -1 if none within max
  task automatic measure(input int max, output int n);
    restart = 1'b1; cyc(1); restart = 1'b0;
    n = -1;
    for (int i = 1; i <= max; i++) begin
      cyc(1);
      if (expired) begin n = i; break; end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cnt;
    cyc(2); rst_n = 1'b1; cyc(1);
    for (int l = 1; l < 40; l += 3) begin
      limit = 16'(l);
      measure(100, n);
      check(n == l, $sformatf("limit %0d: expired after %0d", l, n));
      cnt = 0;
      repeat (100) begin cyc(1); cnt += int'(expired); end
      check(cnt == 0, "expired only once");
    end
    // restart before expiry postpones it
    limit = 16'd20;
    restart = 1'b1; cyc(1); restart = 1'b0;
    cnt = 0;
    repeat (15) begin cyc(1); cnt += int'(expired); end
    measure(40, n);
    check(cnt == 0 && n == 20, "restart postpones expiry");
    // disabled
    limit = '0;
    measure(300, n);
    check(n == -1, "limit 0 disables the timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
