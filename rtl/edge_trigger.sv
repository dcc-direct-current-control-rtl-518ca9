// edge_trigger - catches a positive edge of one comparator and holds it as a
// request until it is acknowledged.
//
// Moore machine with three states:
//   WAIT_EDGE : waits for the comparator to go high          (req = 0)
//   WAIT_ACK  : edge caught, request held until ack is high   (req = 1)
//   WAIT_LOW  : waits until comparator and ack are both low   (req = 0)
// Because WAIT_LOW only returns to WAIT_EDGE once the comparator is low, a
// high comparator seen in WAIT_EDGE is always a new rising edge, and chatter
// of a comparator near its threshold gives one request only.
//
// Interface: comp is the (already synchronised) comparator output, ack the
// acknowledge from the comparator logic, req the held request.
// Timing: req rises one clock after comp rises and falls one clock after ack.
// The three states follow the edge trigger of the design's DCC logic; reset
// enters the waiting state, as the original start state does.
module edge_trigger (
  input  logic clk,
  input  logic rst_n,
  input  logic comp,
  input  logic ack,
  output logic req
);

  typedef enum logic [1:0] {
    WAIT_EDGE = 2'd0,
    WAIT_ACK  = 2'd1,
    WAIT_LOW  = 2'd2
  } et_state_t;

  et_state_t state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      WAIT_EDGE: if (comp)          state_nx = WAIT_ACK;
      WAIT_ACK:  if (ack)           state_nx = WAIT_LOW;
      WAIT_LOW:  if (!comp && !ack) state_nx = WAIT_EDGE;
      default:                      state_nx = WAIT_EDGE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= WAIT_EDGE;
    else        state <= state_nx;

  assign req = (state == WAIT_ACK);

endmodule
