// tb_comparator_logic - self-checking test of comparator_logic.
// Drives the two trigger requests and the acknowledge and checks state,
// interrupt, action and the trigger acknowledges against the S0..S4 machine:
// start in S4, take either trigger there, then alternate between watching
// the upper (S0/S1) and the lower (S2/S3) trigger, ignoring the other one.
module tb_comparator_logic;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trig_up = 1'b0, trig_lo = 1'b0, ack_cpu = 1'b0;
  logic intr, ack_up, ack_lo;
  action_t action;
  logic [2:0] st;
  int checks = 0, failures = 0;

  comparator_logic dut (.clk, .rst_n, .trig_up, .trig_lo, .ack_cpu,
    .interrupt_cpu(intr), .action, .ack_up, .ack_lo, .state_o(st));

  always #5 clk = ~clk;

  task automatic step(input logic u, input logic l, input logic a,
                      input int exp_st, input string what);
    logic e_int, e_act, e_au, e_al;
    trig_up = u; trig_lo = l; ack_cpu = a;
    @(posedge clk); #1;
    e_int = (exp_st == 1) || (exp_st == 3);
    e_act = !((exp_st == 1) || (exp_st == 2));
    e_au  = (exp_st == 1) || (exp_st == 2) || (exp_st == 3);
    e_al  = (exp_st == 3) || (exp_st == 0) || (exp_st == 1);
    checks++;
    if (int'(st) != exp_st || intr !== e_int || action !== action_t'(e_act) ||
        ack_up !== e_au || ack_lo !== e_al) begin
      failures++;
      $display("FAIL %s: state=%0d (exp %0d) int=%0b act=%0b acks=%0b%0b",
               what, st, exp_st, intr, action, ack_up, ack_lo);
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
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (st != 3'd4 || intr) begin failures++; $display("FAIL reset state"); end
    rst_n = 1'b1;
    step(0, 0, 0, 4, "start waits");
    step(0, 1, 0, 3, "lower first from start -> S3");
    step(0, 1, 0, 3, "waits for cpu ack");
    step(0, 0, 1, 0, "ack -> S0");
    step(0, 1, 0, 0, "lower ignored in S0");
    step(1, 0, 0, 1, "upper -> S1");
    step(1, 0, 0, 1, "held");
    step(0, 0, 1, 2, "ack -> S2");
    step(1, 0, 0, 2, "upper ignored in S2");
    step(0, 1, 0, 3, "lower -> S3");
    step(0, 0, 1, 0, "ack -> S0");
    // reset again and start on the upper comparator
    rst_n = 1'b0; #1; rst_n = 1'b1;
    step(1, 1, 0, 1, "both at start: upper wins -> S1");
    step(0, 0, 1, 2, "ack -> S2");
    // random sequence against a reference model
    begin
      int m = 2;
      logic u, l, a;
      for (int i = 0; i < 3000; i++) begin
        u = 1'($urandom_range(1)); l = 1'($urandom_range(1));
        // acknowledge only a raised interrupt, as the protocol requires
        a = (m == 1 || m == 3) && intr ? 1'($urandom_range(2) == 0) : 1'b0;
        case (m)
          0: if (u) m = 1;
          1: if (a) m = 2;
          2: if (l) m = 3;
          3: if (a) m = 0;
          default: m = 4;
        endcase
        step(u, l, a, m, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
