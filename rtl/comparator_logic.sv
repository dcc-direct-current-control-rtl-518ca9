// comparator_logic - follows the comparator that matters for the present
// direction of the load current and interrupts the vector selector.
//
// While the current rises only the upper comparator matters, while it falls
// only the lower one. Five Moore states:
//   S4 : start state after reset; the direction is unknown, so a request from
//        either edge trigger is taken.
//   S0 : current rising, waits for the upper edge trigger.
//   S1 : upper crossing seen: interrupt high, action = DEC, waits for ack_cpu.
//   S2 : current falling, waits for the lower edge trigger.
//   S3 : lower crossing seen: interrupt high, action = INC, waits for ack_cpu.
// S1 -> S2 and S3 -> S0 on ack_cpu. The edge trigger of the comparator that
// does not matter is held acknowledged (ack_up in S1, S2, S3; ack_lo in S3,
// S0, S1), so an edge on it is thrown away and it re-arms only after the
// state pair changes. In S1 and S3 the same ack releases the trigger that
// caused the interrupt.
//
// Interface: trig_up / trig_lo are the edge-trigger requests of the upper and
// lower comparator; ack_cpu is a one-clock acknowledge from the consumer of
// the interrupt. Timing: interrupt_cpu rises one clock after a request; it
// falls one clock after ack_cpu. action is registered with the state and
// stays valid until the next interrupt.
// The states S0..S4 and their roles follow the design's comparator logic;
// which triggers are held acknowledged, and the action shown in S4 (INC),
// are this design's own choices.
module comparator_logic
  import dcc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    trig_up,
  input  logic    trig_lo,
  input  logic    ack_cpu,
  output logic    interrupt_cpu,
  output action_t action,
  output logic    ack_up,
  output logic    ack_lo,
  output logic [2:0] state_o
);

  typedef enum logic [2:0] {
    S0 = 3'd0,
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4
  } cl_state_t;

  cl_state_t state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S4: if (trig_up)      state_nx = S1;
          else if (trig_lo) state_nx = S3;
      S0: if (trig_up)      state_nx = S1;
      S1: if (ack_cpu)      state_nx = S2;
      S2: if (trig_lo)      state_nx = S3;
      S3: if (ack_cpu)      state_nx = S0;
      default:              state_nx = S4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S4;
    else        state <= state_nx;

  assign interrupt_cpu = (state == S1) || (state == S3);
  assign action        = (state == S1 || state == S2) ? ACT_DEC : ACT_INC;
  assign ack_up        = (state == S1) || (state == S2) || (state == S3);
  assign ack_lo        = (state == S3) || (state == S0) || (state == S1);
  assign state_o       = state;

`ifndef SYNTHESIS
  // The acknowledge is a pulse: it must not be held into the next interrupt.
  a_ack_only_when_irq: assert property (@(posedge clk) disable iff (!rst_n)
    ack_cpu |-> interrupt_cpu);
`endif

endmodule
