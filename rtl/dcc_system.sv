// dcc_system - the complete controller: dcc_top plus the serial packet
// handler that sets its parameters.
//
// packet_engine receives the host's packets from a byte stream (the serial
// port's receive and transmit bytes), checks and encodes every CRC with the
// crc8 coprocessor inside dcc_top, and writes the mode, the two reference
// targets and the vector selector timeout. It answers each packet with
// ACK, NACK or the measured switching period, and forces STOP mode when the
// link goes quiet. The remaining settings (zero-current code from
// calibration, switch protection time, band shrink) are ports.
//
// The coprocessor's result control flag is always 0 and is left open.
//
// Interface: comparator inputs, switch and DAC outputs as in dcc_top; the
// rx/tx byte stream of the serial port; the register values as status.
// Timing: see dcc_top for the control loop and packet_engine for replies.
// The host-set parameters and the link timer follow the design; which
// settings are ports rather than packets is this design's own choice.
module dcc_system
  import dcc_pkg::*;
#(
  parameter int unsigned DAC_BITS     = 8,
  parameter int unsigned TW           = TIMER_W,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BYTE_TIMEOUT = CLK_HZ / 50,
  parameter int unsigned LINK_TIMEOUT = CLK_HZ
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
  // serial port bytes
  input  logic                rx_valid,
  input  logic [7:0]          rx_data,
  output logic [7:0]          tx_data,
  output logic                tx_valid,
  input  logic                tx_ready,
  // settings not carried by packets
  input  logic [DAC_BITS-1:0] zero_code,
  input  logic [TW-1:0]       min_off_cycles,
  input  logic [TW-1:0]       shrink_timeout,
  input  logic [TW-1:0]       shrink_period,
  // status
  output mode_t               mode,
  output logic [DAC_BITS-1:0] upper_target,
  output logic [DAC_BITS-1:0] lower_target,
  output logic [TW-1:0]       timeout_cycles,
  output logic [15:0]         max_curr,
  output logic [15:0]         ref_curr,
  output logic [31:0]         ref_switch_freq,
  output logic                link_lost,
  output logic                nack_sent,
  output logic [TW-1:0]       switch_period,
  output logic                period_valid,
  output logic                switching_stopped,
  output logic                fast_vector,
  output logic                band_shrinking,
  output logic                sw_blocked,
  output logic [2:0]          dcc_state
);

  logic [31:0] crc_s_data, crc_m_data;
  logic        crc_s_ctrl, crc_s_exists, crc_s_read, crc_m_write;
  logic        crc_m_full;
  logic        unused_crc_m_ctrl;

  packet_engine #(
    .DAC_BITS(DAC_BITS), .TW(TW), .CLK_HZ(CLK_HZ),
    .BYTE_TIMEOUT(BYTE_TIMEOUT), .LINK_TIMEOUT(LINK_TIMEOUT)
  ) u_pkt (
    .clk, .rst_n, .rx_valid, .rx_data, .tx_data, .tx_valid, .tx_ready,
    .crc_s_data, .crc_s_ctrl, .crc_s_exists, .crc_s_read,
    .crc_m_data, .crc_m_write, .crc_m_full,
    .switch_period,
    .mode, .upper_ref(upper_target), .lower_ref(lower_target),
    .timeout_switch(timeout_cycles), .max_curr, .ref_curr, .ref_switch_freq,
    .link_lost, .nack_sent
  );

  dcc_top #(.DAC_BITS(DAC_BITS), .TW(TW), .SYNC_STAGES(SYNC_STAGES)) u_dcc (
    .clk, .rst_n, .comp_upper, .comp_lower, .s_a, .s_b, .upper_dac, .lower_dac,
    .mode, .upper_target, .lower_target, .zero_code, .timeout_cycles,
    .min_off_cycles, .shrink_timeout, .shrink_period,
    .switch_period, .period_valid, .switching_stopped, .fast_vector,
    .band_shrinking, .sw_blocked, .dcc_state,
    .crc_s_data, .crc_s_ctrl, .crc_s_exists, .crc_s_read,
    .crc_m_data, .crc_m_ctrl(unused_crc_m_ctrl), .crc_m_write, .crc_m_full
  );

endmodule
