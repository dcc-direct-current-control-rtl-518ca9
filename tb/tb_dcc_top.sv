// tb_dcc_top - end-to-end test of dcc_top in closed loop with load_model.
// Timers are 16 bits wide here so that the stalled-switching flag can be
// reached; everything else is at its default. Phases:
//   IDLE, fixed hysteresis with a positive reference, a band change, band
//   shrink, a long switching protection time, a negative reference, STOP,
//   IDLE again until switching is flagged as stopped, and CRC operations.
// Checks: no switching in IDLE, the current stays inside the band (plus the
// overshoot of the loop delay) once settled, the comparator-to-switch delay
// of SYNC_STAGES + 4 clocks, no shoot-through vector [1,1], measured periods
// against the switching the testbench sees, the references reaching their
// targets, and CRC results against a byte-wise CRC-8 in the testbench.
// Each mechanism (slow and fast vector, timeout, protection hold-off,
// reference moves, band shrink, comparator chatter, period measurement,
// stalled flag, every mode, both reference signs, CRC encode and check)
// is counted and must happen at least once.
module tb_dcc_top;
  import dcc_pkg::*;
  localparam int TW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_upper, comp_lower, s_a, s_b;
  logic [7:0] upper_dac, lower_dac;
  mode_t mode = MODE_IDLE;
  logic [7:0] upper_target = 8'd148, lower_target = 8'd138, zero_code = 8'd128;
  logic [TW-1:0] timeout_cycles = 16'd200, min_off_cycles = 16'd20;
  logic [TW-1:0] shrink_timeout = '0, shrink_period = 16'd10;
  logic [TW-1:0] switch_period;
  logic period_valid, switching_stopped, fast_vector, band_shrinking, sw_blocked;
  logic [2:0] dcc_state;
  logic [31:0] crc_s_data = '0, crc_m_data;
  logic crc_s_ctrl = 1'b0, crc_s_exists = 1'b0, crc_s_read, crc_m_ctrl, crc_m_write;
  logic crc_m_full = 1'b0;
  int current, k_e = 2, noise = 48;
  int checks = 0, failures = 0;

  dcc_top #(.TW(TW)) dut (.*);

  load_model plant (.clk, .s_a, .s_b, .upper_dac, .lower_dac, .zero_code,
    .k_u(64), .k_r(4), .k_e(k_e), .noise(noise),
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

  // ---- event counters --------------------------------------------------
  int n_slow, n_fast, n_blocked, n_shrink, n_up_moves, n_lo_moves, n_period;
  int n_comp_edges, n_irq, n_shoot, n_idle_switch, n_stopped;
  int n_band_checks, n_band_fail, n_lat, n_lat_fail, n_neg_vec, n_pos_vec;
  int n_period_bad;
  logic band_check_en = 1'b0;
  logic [7:0] ud_q, ld_q;
  logic cu_q, cl_q, irq_q, sa_q, sb_q, fast_q, pv_q;
  logic [TW-1:0] per_q;
  int lat_cnt = -1, since_pos = 0, last_pos_gap = 0;

  mode_t mode_d1 = MODE_IDLE, mode_d2 = MODE_IDLE, mode_d3 = MODE_IDLE;
  always @(posedge clk) begin
    mode_d1 <= mode; mode_d2 <= mode_d1; mode_d3 <= mode_d2;
  end

  always @(posedge clk) if (rst_n) begin
    ud_q <= upper_dac; ld_q <= lower_dac;
    cu_q <= comp_upper; cl_q <= comp_lower;
    irq_q <= dut.irq; sa_q <= s_a; sb_q <= s_b; fast_q <= fast_vector;
    pv_q <= period_valid; per_q <= switch_period;
    if (upper_dac != ud_q) n_up_moves++;
    if (lower_dac != ld_q) n_lo_moves++;
    if (fast_vector && !fast_q) n_fast++;
    if (dut.slow && s_a == s_b) n_slow++;
    if (sw_blocked) n_blocked++;
    if (band_shrinking) n_shrink++;
    if ((comp_upper && !cu_q) || (comp_lower && !cl_q)) n_comp_edges++;
    if (dut.irq && !irq_q) n_irq++;
    if (s_a && s_b) n_shoot++;
    if (mode == MODE_IDLE && mode_d3 == MODE_IDLE && (s_a || s_b)) n_idle_switch++;
    if (switching_stopped) n_stopped++;
    if (s_a && !s_b && !sa_q) n_pos_vec++;
    if (s_b && !s_a && !sb_q) n_neg_vec++;
    // period: the controller's count against the testbench's own
    since_pos <= since_pos + 1;
    if ((int'(upper_target) + int'(lower_target) >= 2 * int'(zero_code)) ?
        (s_a && !s_b && !(sa_q && !sb_q)) : (s_b && !s_a && !(sb_q && !sa_q))) begin
      last_pos_gap <= since_pos + 1;
      since_pos <= 0;
    end
    if (period_valid && pv_q && switch_period != per_q) begin
      n_period++;
      if (int'(switch_period) != last_pos_gap) n_period_bad++;
    end else if (period_valid && !pv_q) n_period++;
    // comparator-to-switch delay: upper crossing while [1,0] is applied
    if (lat_cnt >= 0) begin
      if (!s_a) begin
        n_lat++;
        if (lat_cnt + 1 != 6) n_lat_fail++;
        lat_cnt <= -1;
      end else lat_cnt <= lat_cnt + 1;
    end else if (mode == MODE_FIXED_HYST && s_a && !s_b && comp_upper && !cu_q &&
                 dut.dcc_state == 3'd0)
      lat_cnt <= 0;
    // band
    if (band_check_en) begin
      n_band_checks++;
      if (current > (int'(upper_dac) - int'(zero_code) + 3) * 256 ||
          current < (int'(lower_dac) - int'(zero_code) - 3) * 256) begin
        if (n_band_fail < 5)
          $display("band: current %0d outside [%0d,%0d] codes", current / 256,
                   int'(lower_dac) - int'(zero_code), int'(upper_dac) - int'(zero_code));
        n_band_fail++;
      end
    end
  end

  // byte-wise CRC-8 reference
  function automatic logic [7:0] ref_crc(logic [31:0] d, int nbytes);
    logic [7:0] c = 8'h00;
    for (int b = nbytes - 1; b >= 0; b--) begin
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

  task automatic crc_op(input logic [31:0] d, input int n, input logic chk,
                        input logic [7:0] crc, output logic [31:0] res);
    crc_send({8'h00, crc, 7'b0, chk, 5'b0, 3'(n)}, 1'b1);
    crc_send(d, 1'b0);
    while (!crc_m_write) cyc(1);
    res = crc_m_data;
    cyc(1);
  endtask

  task automatic run_settled(input int settle, input int n);
    cyc(settle);
    band_check_en = 1'b1;
    cyc(n);
    band_check_en = 1'b0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] res;
    int n_fast0, n_lat0;
    cyc(3); rst_n = 1'b1;
    // IDLE
    cyc(2000);
    check(n_idle_switch == 0, "no switching in IDLE");
    // fixed hysteresis, positive reference +10..+20 codes
    mode = MODE_FIXED_HYST;
    run_settled(3000, 40000);
    check(upper_dac == 8'd148 && lower_dac == 8'd138, "references at targets");
    check(n_band_fail == 0, $sformatf("current in band (%0d of %0d outside)", n_band_fail, n_band_checks));
    check(n_lat > 10 && n_lat_fail == 0,
          $sformatf("comparator to switch delay 6 clocks (%0d of %0d wrong)", n_lat_fail, n_lat));
    check(n_period > 10 && n_period_bad == 0,
          $sformatf("period measurement (%0d of %0d wrong)", n_period_bad, n_period));
    check(switch_period > 16'd40 && switch_period < 16'd1000, $sformatf("plausible period %0d", switch_period));
    // band change while running
    upper_target = 8'd160; lower_target = 8'd150;
    run_settled(3000, 20000);
    check(upper_dac == 8'd160 && lower_dac == 8'd150, "new band reached");
    check(n_band_fail == 0, "current in new band");
    // band shrink: no fast vector, slow fall longer than the shrink timeout
    timeout_cycles = '0; shrink_timeout = 16'd100;
    n_fast0 = n_fast;
    cyc(20000);
    check(n_fast == n_fast0, "no fast vector with the timeout off");
    shrink_timeout = '0; timeout_cycles = 16'd200;
    cyc(3000);
    check(upper_dac == 8'd160 && lower_dac == 8'd150, "band restored after shrink");
    // long protection time: turn-ons are held back
    min_off_cycles = 16'd1500;
    cyc(10000);
    min_off_cycles = 16'd20;
    // negative reference -20..-10 codes
    upper_target = 8'd118; lower_target = 8'd108;
    run_settled(5000, 40000);
    check(upper_dac == 8'd118 && lower_dac == 8'd108, "negative references");
    check(n_band_fail == 0, "current in negative band");
    // STOP: the same band width around zero current
    mode = MODE_STOP;
    run_settled(5000, 30000);
    check(upper_dac == 8'd133 && lower_dac == 8'd123, "stop band around zero");
    check(n_band_fail == 0, "current in stop band");
    // IDLE until the period counter flags that switching stopped
    mode = MODE_IDLE;
    cyc(70000);
    check(switching_stopped, "switching flagged as stopped");
    check(s_a == 1'b0 && s_b == 1'b0, "zero vector in IDLE");
    // CRC coprocessor
    for (int t = 0; t < 12; t++) begin
      logic [31:0] d;
      int n;
      n = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 2 : 4;
      d = $urandom() & ((n == 4) ? 32'hFFFF_FFFF : ((32'h1 << (8 * n)) - 1));
      crc_op(d, n, 1'b0, 8'h00, res);
      check(res[7:0] == ref_crc(d, n), "CRC remainder");
      crc_op(d, n, 1'b1, res[7:0], res);
      check(res[8], "CRC check of the codeword");
      crc_op(d ^ 32'h1, n, 1'b1, ref_crc(d, n), res);
      check(!res[8], "CRC check finds an error");
    end
    // every mechanism must have happened
    check(n_slow > 0,        $sformatf("slow vector used (%0d)", n_slow));
    check(n_fast > 0,        $sformatf("fast vector after timeout (%0d)", n_fast));
    check(n_blocked > 0,     $sformatf("protection held a turn-on (%0d)", n_blocked));
    check(n_shrink > 0,      $sformatf("band shrink (%0d)", n_shrink));
    check(n_up_moves > 0 && n_lo_moves > 0, "reference moves");
    check(n_comp_edges > n_irq, $sformatf("comparator chatter absorbed (%0d edges, %0d irqs)", n_comp_edges, n_irq));
    check(n_period > 0,      "period measured");
    check(n_stopped > 0,     "stopped flag");
    check(n_pos_vec > 0 && n_neg_vec > 0, "both active vectors used");
    check(n_shoot == 0,      "never [1,1]");
    $display("events: slow=%0d fast=%0d blocked=%0d shrink=%0d up=%0d lo=%0d edges=%0d irqs=%0d periods=%0d lat=%0d pos=%0d neg=%0d",
             n_slow, n_fast, n_blocked, n_shrink, n_up_moves, n_lo_moves, n_comp_edges, n_irq, n_period, n_lat, n_pos_vec, n_neg_vec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
