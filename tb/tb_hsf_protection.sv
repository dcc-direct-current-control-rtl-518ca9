// tb_hsf_protection - self-checking test of hsf_protection.
// Compares sw with a reference model of the rule "off at once, on again no
// earlier than min_off clocks after turning off" under random requests, and
// checks directed cases: immediate turn-on after reset, a held turn-on that
// goes through when the timer runs out, and the blocked flag.
module tb_hsf_protection;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, sw, blocked;
  logic [15:0] min_off = 16'd10;
  int checks = 0, failures = 0;

  hsf_protection #(.WIDTH(16)) dut (.clk, .rst_n, .req, .min_off, .sw, .blocked);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since_off, on_edges;
    logic m_sw;
    cyc(2); rst_n = 1'b1; cyc(1);
    req = 1'b1; cyc(1);
    check(sw, "turn-on right after reset");
    req = 1'b0; cyc(1);
    check(!sw, "turn-off at once");
    req = 1'b1; cyc(1);
    check(!sw && blocked, "turn-on held back");
    cyc(8);
    check(!sw, "still held at 9 clocks");
    cyc(1);
    check(sw && !blocked, "turned on 10 clocks after turning off");
    // random against a model
    for (int m = 0; m < 3; m++) begin
      min_off = 16'(m * 7 + 1);
      req = 1'b0; cyc(100);
      m_sw = 1'b0; since_off = 1000; on_edges = 0;
      for (int i = 0; i < 3000; i++) begin
        req = 1'($urandom_range(3) != 0 ? !m_sw : m_sw);
        cyc(1);
        if (m_sw) begin
          if (!req) begin m_sw = 1'b0; since_off = 1; end
        end else begin
          if (req && since_off >= int'(min_off)) begin m_sw = 1'b1; on_edges++; end
          else since_off++;
        end
        check(sw == m_sw, $sformatf("random min_off=%0d step %0d", min_off, i));
      end
      check(on_edges > 50, "random test switched often enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
