// reference_mover - sets the two comparator references (the codes of the
// upper and lower R-2R DACs) that bound the hysteresis band.
//
// Only one reference may change at a time, and only the one whose
// comparator does not matter at the moment. The present voltage vector
// tells which that is: while the current rises (vector [1,0], or the zero
// vector with a negative reference) the upper comparator is watched and the
// lower reference may move; while it falls the upper reference may move. The
// allowed reference is written straight to its target, so a new band takes
// effect over two vector changes; a target on the far side of the other
// reference is clamped to one code from it and reached over later periods.
//
// Band shrink: if the vector has not changed for shrink_timeout clocks, the
// watched reference steps one DAC code toward the other every shrink_period
// clocks, so that a crossing, and with it a vector change, must come. It
// stops one code short of the other reference. After the next vector change
// the shrunk reference is the allowed one and returns to its target.
// shrink_timeout = 0 turns the shrink off.
//
// Targets: upper_target / lower_target in FIXED_HYST; in STOP the band keeps
// its width but is centred on zero_code, the code of zero current; in IDLE
// both references may move at once.
//
// Interface: vec is the applied voltage vector, pos_region is high for a
// positive current reference; upper_dac / lower_dac drive the DACs.
// Timing: a reference is written one clock after it becomes allowed.
// After reset both references sit at zero_code.
// The one-at-a-time rule, its choice by the present vector, and the band
// shrink after a timeout follow the design; the step size, the stop rule
// and the STOP-mode targets are this design's own.
module reference_mover
  import dcc_pkg::*;
#(
  parameter int unsigned DAC_BITS = 8,
  parameter int unsigned WIDTH    = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_t               mode,
  input  logic                pos_region,
  input  vvec_t               vec,
  input  logic [DAC_BITS-1:0] upper_target,
  input  logic [DAC_BITS-1:0] lower_target,
  input  logic [DAC_BITS-1:0] zero_code,
  input  logic [WIDTH-1:0]    shrink_timeout,
  input  logic [WIDTH-1:0]    shrink_period,
  output logic [DAC_BITS-1:0] upper_dac,
  output logic [DAC_BITS-1:0] lower_dac,
  output logic                shrinking
);

  logic [DAC_BITS-1:0] up_t, lo_t, half, up_mv, lo_mv;
  logic                rising;
  vvec_t               vec_q;
  logic [WIDTH-1:0]    idle_cnt, step_cnt;
  logic                may_up, may_lo;

  // targets for the present mode
  always_comb begin
    half = DAC_BITS'((upper_target - lower_target) >> 1);
    if (mode == MODE_STOP) begin
      up_t = zero_code + half;
      lo_t = zero_code - half;
    end else begin
      up_t = upper_target;
      lo_t = lower_target;
    end
  end

  // A reference that may move is kept on its own side of the other one.
  // Otherwise, for example, an upper reference written below the lower one
  // would already be below the current when the current starts to rise
  // again, its comparator would never see a rising edge, and the rising
  // vector would stay on. A large band change thus walks over a few periods.
  always_comb begin
    up_mv = up_t;
    lo_mv = lo_t;
    if (mode != MODE_IDLE) begin
      if (up_t <= lower_dac) up_mv = (lower_dac == '1) ? '1 : lower_dac + 1'b1;
      if (lo_t >= upper_dac) lo_mv = (upper_dac == '0) ? '0 : upper_dac - 1'b1;
    end
  end

  assign rising = (vec == VEC_POS) || (!vec.sa && !vec.sb && !pos_region) ||
                  (vec.sa && vec.sb && !pos_region);
  assign may_up = (mode == MODE_IDLE) || !rising;
  assign may_lo = (mode == MODE_IDLE) || rising;
  assign shrinking = (mode != MODE_IDLE) && (shrink_timeout != '0) &&
                     (idle_cnt >= shrink_timeout) && (vec == vec_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      upper_dac <= zero_code;
      lower_dac <= zero_code;
      vec_q     <= VEC_ZERO;
      idle_cnt  <= '0;
      step_cnt  <= '0;
    end else begin
      vec_q <= vec;
      if (vec != vec_q) begin
        idle_cnt <= '0;
        step_cnt <= '0;
      end else if (idle_cnt != '1) begin
        idle_cnt <= idle_cnt + 1'b1;
      end

      if (shrinking) begin
        if (step_cnt + 1'b1 >= shrink_period) begin
          step_cnt <= '0;
          if (rising) begin
            if ({1'b0, upper_dac} > {1'b0, lower_dac} + 1'b1) upper_dac <= upper_dac - 1'b1;
          end else begin
            if ({1'b0, lower_dac} + 1'b1 < {1'b0, upper_dac}) lower_dac <= lower_dac + 1'b1;
          end
        end else begin
          step_cnt <= step_cnt + 1'b1;
        end
      end

      if (may_up && upper_dac != up_mv && !shrinking)
        upper_dac <= up_mv;
      if (may_lo && lower_dac != lo_mv && !shrinking)
        lower_dac <= lo_mv;
    end

endmodule
