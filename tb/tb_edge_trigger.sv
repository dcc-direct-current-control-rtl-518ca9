// tb_edge_trigger - self-checking test of edge_trigger.
// Drives comparator and acknowledge sequences and compares req, sampled
// between clock edges, with the values the three-state trigger must give:
// one request per rising edge, held until ack, no new request until the
// comparator and ack have both been low, one request for a chattering edge.
module tb_edge_trigger;
  logic clk = 1'b0, rst_n = 1'b0, comp = 1'b0, ack = 1'b0, req;
  int checks = 0, failures = 0;

  edge_trigger dut (.clk, .rst_n, .comp, .ack, .req);

  always #5 clk = ~clk;

  task automatic step(input logic c, input logic a, input logic exp_req,
                      input string what);
    comp = c; ack = a;
    @(posedge clk); #1;
    checks++;
    if (req !== exp_req) begin
      failures++;
      $display("FAIL %s: req=%0b expected %0b", what, req, exp_req);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    step(0, 0, 0, "idle after reset");
    step(0, 0, 0, "idle");
    step(1, 0, 1, "edge caught one clock later");
    step(0, 0, 1, "request held after comp falls");
    step(1, 0, 1, "request held");
    step(1, 1, 0, "ack clears request");
    step(1, 1, 0, "no new request while ack high");
    step(1, 0, 0, "no new request while comp stays high");
    step(0, 1, 0, "ack high keeps it waiting");
    step(0, 0, 0, "both low, re-armed");
    step(1, 0, 1, "second edge");
    // chatter while waiting for ack: still one request
    step(0, 0, 1, "chatter low");
    step(1, 0, 1, "chatter high");
    step(0, 1, 0, "acked");
    step(0, 0, 0, "re-armed");
    step(0, 0, 0, "quiet");
    // edge during ack: acked before it is seen low is thrown away
    step(1, 1, 1, "edge with ack high is caught");
    step(1, 1, 0, "and immediately acknowledged");
    step(0, 0, 0, "re-armed again");
    // random stress against a reference model of the three states
    begin
      int st = 0; // 0 wait edge, 1 wait ack, 2 wait low
      logic c, a;
      for (int i = 0; i < 2000; i++) begin
        c = 1'($urandom_range(1)); a = 1'($urandom_range(3) == 0);
        case (st)
          0: if (c) st = 1;
          1: if (a) st = 2;
          default: if (!c && !a) st = 0;
        endcase
        step(c, a, st == 1, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
