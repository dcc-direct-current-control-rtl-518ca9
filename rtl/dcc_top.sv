// dcc_top - direct current controller for a two-switch bridge.
//
// The load current is kept inside a hysteresis band set by two analog
// comparators whose references come from two DACs. The chain is:
//   comparators -> dcc_logic (interrupt + action)
//               -> vector_selector (slow or fast vector; timeout_timer)
//               -> hsf_protection x2 (minimum off time per switch)
//               -> S_A, S_B
// reference_mover sets the DAC codes from the user's targets, moving only
// the reference whose comparator is not being watched, and shrinks the band
// when no crossing comes. period_counter measures the switching period,
// from one application of the vector that drives the current away from zero
// ([1,0] for a positive reference, [0,1] for a negative one) to the next.
// The crc8 coprocessor sits beside the controller on its own word stream; it
// protects the serial packets that set the parameters below.
//
// Interface: the comparator inputs are asynchronous; every other input is
// a parameter register written by the host side (mode, DAC targets, zero
// current code, timeout and protection times, all in clocks). Outputs are
// the switch commands, the DAC codes and the measured period.
// Timing: a comparator edge reaches S_A / S_B SYNC_STAGES + 4 clocks later
// when the protection does not hold the switch back.
// The split into these blocks and their connections follow the design; the
// controller blocks that the original ran as software on a soft processor
// are logic here, and the parameter ports stand in for the serial link.
module dcc_top
  import dcc_pkg::*;
#(
  parameter int unsigned DAC_BITS    = 8,
  parameter int unsigned TW          = TIMER_W,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // interface electronics
  input  logic                comp_upper,
  input  logic                comp_lower,
  output logic                s_a,
  output logic                s_b,
  output logic [DAC_BITS-1:0] upper_dac,
  output logic [DAC_BITS-1:0] lower_dac,
  // parameters
  input  mode_t               mode,
  input  logic [DAC_BITS-1:0] upper_target,
  input  logic [DAC_BITS-1:0] lower_target,
  input  logic [DAC_BITS-1:0] zero_code,
  input  logic [TW-1:0]       timeout_cycles,
  input  logic [TW-1:0]       min_off_cycles,
  input  logic [TW-1:0]       shrink_timeout,
  input  logic [TW-1:0]       shrink_period,
  // status
  output logic [TW-1:0]       switch_period,
  output logic                period_valid,
  output logic                switching_stopped,
  output logic                fast_vector,
  output logic                band_shrinking,
  output logic                sw_blocked,
  output logic [2:0]          dcc_state,
  // CRC coprocessor stream
  input  logic [31:0]         crc_s_data,
  input  logic                crc_s_ctrl,
  input  logic                crc_s_exists,
  output logic                crc_s_read,
  output logic [31:0]         crc_m_data,
  output logic                crc_m_ctrl,
  output logic                crc_m_write,
  input  logic                crc_m_full
);

  logic    irq, ack, timeout, slow, blk_a, blk_b, pos_region;
  action_t action;
  vvec_t   vec_req, vec_app, vec_app_q;

  // sign of the current reference: mean of the targets against zero current
  assign pos_region = ({1'b0, upper_target} + {1'b0, lower_target}) >=
                      {zero_code, 1'b0};

  dcc_logic #(.SYNC_STAGES(SYNC_STAGES)) u_dcc_logic (
    .clk, .rst_n, .comp_upper, .comp_lower, .ack_cpu(ack),
    .intr(irq), .action, .state(dcc_state)
  );

  vector_selector u_vsel (
    .clk, .rst_n, .mode, .pos_region, .irq, .action, .timeout,
    .ack, .vec_req, .slow, .fast(fast_vector)
  );

  hsf_protection #(.WIDTH(TW)) u_hsf_a (
    .clk, .rst_n, .req(vec_req.sa), .min_off(min_off_cycles),
    .sw(vec_app.sa), .blocked(blk_a)
  );

  hsf_protection #(.WIDTH(TW)) u_hsf_b (
    .clk, .rst_n, .req(vec_req.sb), .min_off(min_off_cycles),
    .sw(vec_app.sb), .blocked(blk_b)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vec_app_q <= VEC_ZERO;
    else        vec_app_q <= vec_app;

  timeout_timer #(.WIDTH(TW)) u_timeout (
    .clk, .rst_n, .restart(vec_app != vec_app_q || !slow),
    .limit(timeout_cycles), .expired(timeout)
  );

  period_counter #(.WIDTH(TW)) u_period (
    .clk, .rst_n,
    .mark(vec_app != vec_app_q && vec_app == (pos_region ? VEC_POS : VEC_NEG)),
    .period(switch_period), .valid(period_valid), .stopped(switching_stopped)
  );

  reference_mover #(.DAC_BITS(DAC_BITS), .WIDTH(TW)) u_refmove (
    .clk, .rst_n, .mode, .pos_region, .vec(vec_app),
    .upper_target, .lower_target, .zero_code,
    .shrink_timeout, .shrink_period,
    .upper_dac, .lower_dac, .shrinking(band_shrinking)
  );

  crc8 u_crc (
    .clk, .rst_n,
    .s_data(crc_s_data), .s_ctrl(crc_s_ctrl), .s_exists(crc_s_exists),
    .s_read(crc_s_read),
    .m_data(crc_m_data), .m_ctrl(crc_m_ctrl), .m_write(crc_m_write),
    .m_full(crc_m_full)
  );

  assign s_a        = vec_app.sa;
  assign s_b        = vec_app.sb;
  assign sw_blocked = blk_a || blk_b;

endmodule
