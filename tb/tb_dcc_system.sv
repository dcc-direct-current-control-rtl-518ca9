// tb_dcc_system - end-to-end test of dcc_system: a host model sends real
// packets (ID, CRC, dataword, CRC) over the byte interface, and the bridge
// and load are load_model, so the whole path from a packet to the current
// in the load is exercised.
// Sequence: references, switching timeout and mode written by packets,
// regulation in a positive band, a period request, a corrupted packet,
// a short switching timeout (fast vector) and with it a long protection
// time (held turn-ons), band shrink, a negative band, link loss (forced
// STOP), and IDLE by packet.
// Timers are shortened: byte timeout 2000 clocks, link timeout 60000.
// Every mechanism is counted and the test fails if one never occurred.
module tb_dcc_system;
  import dcc_pkg::*;
  localparam int BT = 2000, LT = 60000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_upper, comp_lower, s_a, s_b;
  logic [7:0] upper_dac, lower_dac;
  logic rx_valid = 1'b0, tx_valid, tx_ready = 1'b1;
  logic [7:0] rx_data = 8'h00, tx_data;
  logic [7:0] zero_code = 8'd128;
  logic [31:0] min_off_cycles = 32'd20, shrink_timeout = '0, shrink_period = 32'd10;
  mode_t mode;
  logic [7:0] upper_target, lower_target;
  logic [31:0] timeout_cycles, ref_switch_freq, switch_period;
  logic [15:0] max_curr, ref_curr;
  logic link_lost, nack_sent, period_valid, switching_stopped;
  logic fast_vector, band_shrinking, sw_blocked;
  logic [2:0] dcc_state;
  int current;
  int checks = 0, failures = 0;

  dcc_system #(.BYTE_TIMEOUT(BT), .LINK_TIMEOUT(LT)) dut (.*);

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

  // ---------------- mechanism counters ----------------
  logic band_en = 1'b0, sa_q = 1'b0, sb_q = 1'b0, fast_q = 1'b0, shr_q = 1'b0;
  logic blk_q = 1'b0;
  int n_out = 0, n_shoot = 0, n_idle_sw = 0, since = 0, gap = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0, n_fast = 0, n_blocked = 0, n_shrink = 0;
  int n_ack = 0, n_nack = 0, n_freq = 0, n_link = 0;
  mode_t mode_d1 = MODE_IDLE, mode_d2 = MODE_IDLE, mode_d3 = MODE_IDLE;

  always @(posedge clk) begin
    mode_d1 <= mode; mode_d2 <= mode_d1; mode_d3 <= mode_d2;
  end

  always @(posedge clk) if (rst_n) begin
    sa_q <= s_a; sb_q <= s_b; fast_q <= fast_vector; shr_q <= band_shrinking;
    blk_q <= sw_blocked;
    since <= since + 1;
    if (s_a && !s_b && !sa_q) begin gap <= since + 1; since <= 0; n_pos++; end
    if (!s_a && s_b && !sb_q) n_neg++;
    if (!s_a && !s_b && (sa_q || sb_q)) n_zero++;
    if (fast_vector && !fast_q) n_fast++;
    if (band_shrinking && !shr_q) n_shrink++;
    if (sw_blocked && !blk_q) n_blocked++;
    if (s_a && s_b) n_shoot++;
    if (mode == MODE_IDLE && mode_d3 == MODE_IDLE && (s_a || s_b)) n_idle_sw++;
    if (band_en &&
        (current > (int'(upper_dac) - int'(zero_code) + 3) * 256 ||
         current < (int'(lower_dac) - int'(zero_code) - 3) * 256)) begin
      if (n_out < 5) $display("out: i=%0d codes at %0t", current / 256, $time);
      n_out++;
    end
  end

  // ---------------- host model ----------------
  function automatic logic [7:0] crc_bytes(logic [7:0] b [], int n);
    logic [7:0] c;
    c = 8'h00;
    for (int k = 0; k < n; k++) begin
      c ^= b[k];
      for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [7:0] crc1(logic [7:0] b);
    logic [7:0] a [];
    a = new[1];
    a[0] = b;
    return crc_bytes(a, 1);
  endfunction

  task automatic send_byte(input logic [7:0] b);
    rx_data = b; rx_valid = 1'b1; cyc(1); rx_valid = 1'b0;
    cyc($urandom_range(0, 40));
  endtask

  task automatic send_pkt(input logic [7:0] id, input logic [7:0] data [],
                          input logic [7:0] dflip = 0);
    send_byte(id);
    send_byte(crc1(id));
    foreach (data[k]) send_byte(data[k]);
    send_byte(crc_bytes(data, data.size()) ^ dflip);
  endtask

  task automatic get_reply(input int n, output logic [7:0] r [], output int got);
    int t;
    t = 0;
    r = new[n];
    got = 0;
    while (got < n && t < 2000) begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin r[got] = tx_data; got++; end
      t++;
    end
    #1;
  endtask

  // send a 1-byte or 4-byte packet and expect its ACK
  task automatic write_pkt(input logic [7:0] id, input logic [7:0] data [],
                           input string what);
    logic [7:0] r [];
    int got;
    send_pkt(id, data);
    get_reply(4, r, got);
    if (got == 4 && r[0] == 8'd255 && r[1] == crc1(8'd255) && r[2] == id &&
        r[3] == crc1(id)) n_ack++;
    else begin failures++; $display("FAIL %s: no ACK (t=%0t)", what, $time); end
    checks++;
  endtask

  task automatic write1(input logic [7:0] id, input logic [7:0] v, input string what);
    logic [7:0] d [];
    d = new[1];
    d[0] = v;
    write_pkt(id, d, what);
  endtask

  task automatic write4(input logic [7:0] id, input logic [31:0] v, input string what);
    logic [7:0] d [];
    d = new[4];
    for (int b = 0; b < 4; b++) d[b] = v[8 * (3 - b) +: 8];
    write_pkt(id, d, what);
  endtask

  task automatic regulate(input int settle, input int run, input string what);
    n_out = 0;
    cyc(settle);
    band_en = 1'b1;
    cyc(run);
    band_en = 1'b0;
    check(n_out == 0, $sformatf("%s: current in band (%0d clocks outside)", what, n_out));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r [];
    logic [7:0] d [];
    int got, p0, p1;
    cyc(3); rst_n = 1'b1; cyc(10);
    check(mode == MODE_IDLE && !s_a && !s_b, "IDLE after reset");

    // configure and start by packets
    write1(8'd6, 8'd150, "UPPERREF");
    write1(8'd7, 8'd140, "LOWERREF");
    write4(8'd5, 32'd5000, "TIMEOUTSWITCH");
    check(upper_target == 8'd150 && lower_target == 8'd140 && timeout_cycles == 32'd5000,
          "parameters written");
    check(n_idle_sw == 0, "no switching while IDLE");
    write1(8'd0, 8'd1, "MODE fixed");
    check(mode == MODE_FIXED_HYST, "FIXED_HYST by packet");
    regulate(3000, 20000, "positive band");
    check(upper_dac == 8'd150 && lower_dac == 8'd140, "DACs at the written references");

    // period request: the reply carries the measured period
    d = new[1]; d[0] = 8'd0;
    p0 = int'(switch_period);
    send_pkt(8'd1, d);
    get_reply(7, r, got);
    p1 = int'(switch_period);
    if (got == 7 && r[0] == 8'd253 && r[1] == crc1(8'd253)) begin
      logic [7:0] w [];
      int pr;
      w = new[4];
      for (int b = 0; b < 4; b++) w[b] = r[2 + b];
      pr = {r[2], r[3], r[4], r[5]};
      check(r[6] == crc_bytes(w, 4), "REQUESTEDFREQ CRC");
      check(period_valid && (pr == p0 || pr == p1),
            $sformatf("REQUESTEDFREQ period %0d (seen %0d)", pr, gap));
      n_freq++;
    end
    checks++;
    if (n_freq == 0) begin failures++; $display("FAIL no REQUESTEDFREQ reply"); end

    // corrupted dataword CRC: NACK, references unchanged
    d = new[1]; d[0] = 8'd10;
    send_pkt(8'd6, d, 8'h40);
    get_reply(2, r, got);
    if (got == 2 && r[0] == 8'd254 && r[1] == crc1(8'd254)) n_nack++;
    check(n_nack == 1, "NACK for a corrupted packet");
    check(upper_target == 8'd150, "corrupted packet not applied");

    // short switching timeout: the fast vector takes over the slow decay
    write4(8'd5, 32'd60, "TIMEOUTSWITCH short");
    cyc(20000);
    check(n_fast > 0, "fast vector after the timeout");
    // with the short off times, a long protection time holds turn-ons back
    min_off_cycles = 32'd400;
    cyc(20000);
    check(n_blocked > 0, "turn-on held by the protection");
    min_off_cycles = 32'd20;
    write4(8'd5, 32'd5000, "TIMEOUTSWITCH long");

    // band shrink
    shrink_timeout = 32'd150;
    cyc(20000);
    check(n_shrink > 0, "band shrink");
    shrink_timeout = '0;

    // negative band
    write1(8'd7, 8'd100, "LOWERREF negative");
    write1(8'd6, 8'd110, "UPPERREF negative");
    regulate(8000, 20000, "negative band");
    check(upper_dac == 8'd110 && lower_dac == 8'd100, "DACs at the negative references");
    check(n_neg > 0, "[0,1] applied");

    // link loss: no packets -> STOP with the band around zero
    check(!link_lost, "link alive");
    cyc(LT + 10);
    check(link_lost && mode == MODE_STOP, "link loss forces STOP");
    if (link_lost) n_link++;
    regulate(8000, 15000, "stop band");
    check(upper_dac == 8'd133 && lower_dac == 8'd123, "stop band around zero");

    // IDLE by packet
    write1(8'd0, 8'd0, "MODE idle");
    check(!link_lost, "link restored");
    cyc(1000);
    check(mode == MODE_IDLE && !s_a && !s_b && n_idle_sw == 0, "no switching in IDLE");
    check(n_shoot == 0, "never [1,1]");

    $display("mechanisms: ack=%0d nack=%0d freq=%0d link=%0d pos=%0d neg=%0d zero=%0d fast=%0d blocked=%0d shrink=%0d",
             n_ack, n_nack, n_freq, n_link, n_pos, n_neg, n_zero, n_fast, n_blocked, n_shrink);
    check(n_ack > 0 && n_nack > 0 && n_freq > 0 && n_link > 0 && n_pos > 0 && n_neg > 0 &&
          n_zero > 0 && n_fast > 0 && n_blocked > 0 && n_shrink > 0, "every mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
