// vector_selector - chooses the next voltage vector when the DCC logic
// interrupts, and falls back to the fast vector when the slow one takes too
// long.
//
// Two vectors can move the current in the same direction at different
// speeds. With a positive current reference (pos_region = 1):
//   INC -> [1,0]            (only choice)
//   DEC -> zero vector      (slow), or [0,1] (fast) after a timeout
// With a negative reference (pos_region = 0) the roles swap:
//   DEC -> [0,1]            (only choice)
//   INC -> zero vector      (slow), or [1,0] (fast) after a timeout
// The zero vector used is [0,0]: from [1,0] or [0,1] it only turns a switch
// off, which the switching protection never delays.
// In IDLE mode the vector is [0,0] and interrupts are acknowledged and
// dropped. Entering a running mode applies the vector for the action the DCC
// logic holds, so the controller starts without waiting for a crossing.
//
// Interface: irq/action from dcc_logic; ack is a one-clock acknowledge;
// timeout is a one-clock pulse from timeout_timer; vec_req goes to the
// switching protections; fast is high while a fast vector chosen by a
// timeout is requested; slow is high while a slow (zero) vector is
// requested in a running mode.
// Timing: vec_req and ack change one clock after irq rises.
// The slow/fast choice and the timeout follow the design; the vector table
// and the choice of [0,0] as zero vector are this design's own reading.
module vector_selector
  import dcc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_t   mode,
  input  logic    pos_region,
  input  logic    irq,
  input  action_t action,
  input  logic    timeout,
  output logic    ack,
  output vvec_t   vec_req,
  output logic    slow,
  output logic    fast
);

  logic    running, running_q;
  action_t last_action;

  assign running = (mode == MODE_FIXED_HYST) || (mode == MODE_STOP);

  function automatic vvec_t slow_choice(action_t a, logic pos);
    if (a == ACT_INC) return pos ? VEC_POS  : VEC_ZERO;
    else              return pos ? VEC_ZERO : VEC_NEG;
  endfunction

  function automatic vvec_t fast_choice(action_t a);
    return (a == ACT_INC) ? VEC_POS : VEC_NEG;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running_q   <= 1'b0;
      last_action <= ACT_INC;
      ack         <= 1'b0;
      vec_req     <= VEC_ZERO;
      fast        <= 1'b0;
    end else begin
      running_q <= running;
      ack       <= 1'b0;
      if (irq && !ack) ack <= 1'b1;
      if (!running) begin
        vec_req <= VEC_ZERO;
        fast    <= 1'b0;
      end else if (irq && !ack) begin
        last_action <= action;
        vec_req     <= slow_choice(action, pos_region);
        fast        <= 1'b0;
      end else if (!running_q) begin
        last_action <= action;
        vec_req     <= slow_choice(action, pos_region);
        fast        <= 1'b0;
      end else if (timeout && vec_req == VEC_ZERO) begin
        vec_req <= fast_choice(last_action);
        fast    <= 1'b1;
      end
    end

  assign slow = running_q && (vec_req == VEC_ZERO);

endmodule
