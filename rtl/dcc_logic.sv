// dcc_logic - the DCC logic core: turns the two comparator outputs of the
// interface electronics into an interrupt and an action for the vector
// selector.
//
// The upper comparator is high when the measured current is above the upper
// reference, the lower comparator when it is below the lower reference. Both
// come from analog comparators, asynchronous to the clock, so each first goes
// through a SYNC_STAGES flip-flop synchroniser. Each then feeds an
// edge_trigger, and comparator_logic picks the one that matters for the
// present current direction.
//
// Interface: comp_upper / comp_lower from the comparators; ack_cpu is a
// one-clock acknowledge of intr (the interrupt); action says whether the next vector
// must increase or decrease the current.
// Timing: intr rises SYNC_STAGES + 2 clocks after a comparator edge.
// The edge triggers and the comparator logic follow the design; the
// synchroniser is this design's own addition.
module dcc_logic
  import dcc_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       comp_upper,
  input  logic       comp_lower,
  input  logic       ack_cpu,
  output logic       intr,
  output action_t    action,
  output logic [2:0] state
);

  logic [SYNC_STAGES-1:0] sync_up, sync_lo;
  logic trig_up, trig_lo, ack_up, ack_lo;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync_up <= '0;
      sync_lo <= '0;
    end else begin
      sync_up <= {sync_up[SYNC_STAGES-2:0], comp_upper};
      sync_lo <= {sync_lo[SYNC_STAGES-2:0], comp_lower};
    end

  edge_trigger u_et_up (
    .clk, .rst_n, .comp(sync_up[SYNC_STAGES-1]), .ack(ack_up), .req(trig_up)
  );

  edge_trigger u_et_lo (
    .clk, .rst_n, .comp(sync_lo[SYNC_STAGES-1]), .ack(ack_lo), .req(trig_lo)
  );

  comparator_logic u_cl (
    .clk, .rst_n,
    .trig_up, .trig_lo, .ack_cpu,
    .interrupt_cpu(intr), .action,
    .ack_up, .ack_lo, .state_o(state)
  );

endmodule
