// tb_dcc_top_full - one complete operation of dcc_top with every parameter
// at its default (32-bit timers, 8-bit DACs, two synchroniser stages), in
// closed loop with load_model: IDLE, start of fixed hysteresis control with
// a positive reference, regulation, STOP (band around zero current), back
// to IDLE, and one CRC encode and check.
// Checks: no switching in IDLE, the current inside the band once settled,
// references at their targets, a measured switching period equal to the
// one the testbench sees, no [1,1] vector, and the CRC results.
module tb_dcc_top_full;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_upper, comp_lower, s_a, s_b;
  logic [7:0] upper_dac, lower_dac;
  mode_t mode = MODE_IDLE;
  logic [7:0] upper_target = 8'd150, lower_target = 8'd140, zero_code = 8'd128;
  logic [31:0] timeout_cycles = 32'd200, min_off_cycles = 32'd20;
  logic [31:0] shrink_timeout = '0, shrink_period = 32'd10;
  logic [31:0] switch_period;
  logic period_valid, switching_stopped, fast_vector, band_shrinking, sw_blocked;
  logic [2:0] dcc_state;
  logic [31:0] crc_s_data = '0, crc_m_data;
  logic crc_s_ctrl = 1'b0, crc_s_exists = 1'b0, crc_s_read, crc_m_ctrl, crc_m_write;
  logic crc_m_full = 1'b0;
  int current;
  int checks = 0, failures = 0;

  dcc_top dut (.*);

  load_model plant (.clk, .s_a, .s_b, .upper_dac, .lower_dac, .zero_code,
    .k_u(64), .k_r(4), .k_e(2), .noise(48),
    .comp_upper, .comp_lower, .current);

  always #5 clk = ~clk;

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic band_en = 1'b0, sa_q = 1'b0;
  int n_out = 0, n_shoot = 0, n_idle_sw = 0, since = 0, gap = 0, n_on = 0;
  mode_t mode_d1 = MODE_IDLE, mode_d2 = MODE_IDLE, mode_d3 = MODE_IDLE;
  always @(posedge clk) begin
    mode_d1 <= mode; mode_d2 <= mode_d1; mode_d3 <= mode_d2;
  end

  always @(posedge clk) if (rst_n) begin
    sa_q <= s_a;
    since <= since + 1;
    if (s_a && !s_b && !sa_q) begin gap <= since + 1; since <= 0; n_on++; end
    if (s_a && s_b) n_shoot++;
    if (mode == MODE_IDLE && mode_d3 == MODE_IDLE && (s_a || s_b)) n_idle_sw++;
    if (band_en &&
        (current > (int'(upper_dac) - int'(zero_code) + 3) * 256 ||
         current < (int'(lower_dac) - int'(zero_code) - 3) * 256)) begin
      if (n_out < 5) $display("out: i=%0d codes at %0t", current / 256, $time);
      n_out++;
    end
  end

  function automatic logic [7:0] ref_crc(logic [31:0] d);
    logic [7:0] c = 8'h00;
    for (int b = 3; b >= 0; b--) begin
      c ^= d[8*b +: 8];
      for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c;
  endfunction

  task automatic crc_send(input logic [31:0] d, input logic c);
    crc_s_data = d; crc_s_ctrl = c; crc_s_exists = 1'b1;
    do @(posedge clk); while (!crc_s_read);
    #1; crc_s_exists = 1'b0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc(3); rst_n = 1'b1;
    cyc(1000);
    mode = MODE_FIXED_HYST;
    cyc(3000);
    band_en = 1'b1;
    cyc(30000);
    band_en = 1'b0;
    check(upper_dac == 8'd150 && lower_dac == 8'd140, "references at targets");
    check(n_out == 0, $sformatf("current in band (%0d clocks outside)", n_out));
    check(n_on > 20, "controller switching");
    check(period_valid && int'(switch_period) == gap,
          $sformatf("switching period %0d, seen %0d", switch_period, gap));
    mode = MODE_STOP;
    cyc(5000);
    band_en = 1'b1;
    cyc(20000);
    band_en = 1'b0;
    check(upper_dac == 8'd133 && lower_dac == 8'd123, "stop band around zero");
    check(n_out == 0, "current in stop band");
    mode = MODE_IDLE;
    cyc(1000);
    check(n_idle_sw == 0 && !s_a && !s_b, "no switching in IDLE");
    check(n_shoot == 0, "never [1,1]");
    // CRC: encode then check a 4-byte dataword
    crc_send(32'h0000_0004, 1'b1);
    crc_send(32'hCAFE_F00D, 1'b0);
    while (!crc_m_write) cyc(1);
    check(crc_m_data[7:0] == ref_crc(32'hCAFE_F00D), "CRC remainder");
    crc_send({8'h00, crc_m_data[7:0], 16'h0104}, 1'b1);
    crc_send(32'hCAFE_F00D, 1'b0);
    while (!crc_m_write) cyc(1);
    check(crc_m_data[8] && crc_m_data[7:0] == 8'h00, "CRC syndrome zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
