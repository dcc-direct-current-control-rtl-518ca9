// tb_packet_engine - self-checking test of packet_engine with the crc8
// coprocessor attached, as in the controller.
// A host model in the testbench builds packets with its own byte-wise CRC-8
// and checks every reply byte: ACK with the packet's ID for each parameter
// packet, REQUESTEDFREQ with the switching period, NACK (two bytes) for a
// corrupted ID, a corrupted dataword and an unknown ID, no reply for a
// packet cut short by the byte timeout, and STOP mode with link_lost when
// the host goes quiet. The transmit side sees random back-pressure.
// Timers are shortened: byte timeout 200 clocks, link timeout 3000 clocks.
module tb_packet_engine;
  import dcc_pkg::*;
  localparam int BT = 200, LT = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 1'b0, tx_valid, tx_ready = 1'b0;
  logic [7:0] rx_data = '0, tx_data;
  logic [31:0] crc_s_data, crc_m_data;
  logic crc_s_ctrl, crc_s_exists, crc_s_read, crc_m_ctrl, crc_m_write, crc_m_full;
  logic [31:0] switch_period = 32'h0001_2345;
  mode_t mode;
  logic [7:0] upper_ref, lower_ref;
  logic [31:0] timeout_switch, ref_switch_freq;
  logic [15:0] max_curr, ref_curr;
  logic link_lost, nack_sent;
  int checks = 0, failures = 0;

  packet_engine #(.BYTE_TIMEOUT(BT), .LINK_TIMEOUT(LT)) dut (
    .clk, .rst_n, .rx_valid, .rx_data, .tx_data, .tx_valid, .tx_ready,
    .crc_s_data, .crc_s_ctrl, .crc_s_exists, .crc_s_read,
    .crc_m_data, .crc_m_write, .crc_m_full, .switch_period,
    .mode, .upper_ref, .lower_ref, .timeout_switch, .max_curr, .ref_curr,
    .ref_switch_freq, .link_lost, .nack_sent);

  crc8 u_crc (.clk, .rst_n, .s_data(crc_s_data), .s_ctrl(crc_s_ctrl),
    .s_exists(crc_s_exists), .s_read(crc_s_read), .m_data(crc_m_data),
    .m_ctrl(crc_m_ctrl), .m_write(crc_m_write), .m_full(crc_m_full));

  always #5 clk = ~clk;
  always @(posedge clk) tx_ready <= ($urandom_range(3) != 0);

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [7:0] crc_bytes(logic [7:0] b [], int n);
    logic [7:0] c = 8'h00;
    for (int k = 0; k < n; k++) begin
      c ^= b[k];
      for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [7:0] crc1(logic [7:0] b);
    logic [7:0] a [] = new[1];
    a[0] = b;
    return crc_bytes(a, 1);
  endfunction

  task automatic send_byte(input logic [7:0] b);
    rx_data = b; rx_valid = 1'b1; cyc(1); rx_valid = 1'b0;
    cyc($urandom_range(0, 5));
  endtask

  // send a packet: ID, its CRC (xor idflip), data bytes, data CRC (xor dflip)
  task automatic send_pkt(input logic [7:0] id, input logic [7:0] data [],
                          input logic [7:0] idflip = 0, input logic [7:0] dflip = 0);
    send_byte(id);
    send_byte(crc1(id) ^ idflip);
    if (data.size() > 0) begin
      foreach (data[k]) send_byte(data[k]);
      send_byte(crc_bytes(data, data.size()) ^ dflip);
    end
  endtask

  // collect n reply bytes (with a time limit)
  task automatic get_reply(input int n, output logic [7:0] r [], output int got);
    int t = 0;
    r = new[n];
    got = 0;
    while (got < n && t < 2000) begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin r[got] = tx_data; got++; end
      t++;
    end
    #1;
  endtask

  task automatic expect_ack(input logic [7:0] id, input string what);
    logic [7:0] r [];
    int got;
    get_reply(4, r, got);
    check(got == 4 && r[0] == 8'd255 && r[1] == crc1(8'd255) && r[2] == id &&
          r[3] == crc1(id), {what, ": ACK"});
  endtask

  task automatic expect_silence(input int n, input string what);
    logic seen = 1'b0;
    repeat (n) begin @(posedge clk); seen |= tx_valid; end
    #1;
    check(!seen, what);
  endtask

  task automatic expect_nack(input string what);
    logic [7:0] r [];
    int got;
    get_reply(2, r, got);
    check(got == 2 && r[0] == 8'd254 && r[1] == crc1(8'd254), {what, ": NACK"});
    expect_silence(100, {what, ": NACK is two bytes"});
  endtask


  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r [];
    int got;
    cyc(3); rst_n = 1'b1; cyc(2);
    check(mode == MODE_IDLE && upper_ref == 8'd128 && lower_ref == 8'd128, "reset values");
    send_pkt(8'd0, '{8'd1});
    expect_ack(8'd0, "MODE fixed");
    check(mode == MODE_FIXED_HYST, "mode = FIXED_HYST");
    send_pkt(8'd6, '{8'd150});
    expect_ack(8'd6, "UPPERREF");
    send_pkt(8'd7, '{8'd140});
    expect_ack(8'd7, "LOWERREF");
    check(upper_ref == 8'd150 && lower_ref == 8'd140, "references written");
    send_pkt(8'd5, '{8'h00, 8'h00, 8'h12, 8'h34});
    expect_ack(8'd5, "TIMEOUTSWITCH");
    check(timeout_switch == 32'h1234, "timeout written");
    send_pkt(8'd2, '{8'h01, 8'h02});
    expect_ack(8'd2, "MAXCURR");
    send_pkt(8'd3, '{8'hFF, 8'hF0});
    expect_ack(8'd3, "REFCURR");
    send_pkt(8'd4, '{8'hDE, 8'hAD, 8'hBE, 8'hEF});
    expect_ack(8'd4, "REFSWITCHFREQ");
    check(max_curr == 16'h0102 && ref_curr == 16'hFFF0 && ref_switch_freq == 32'hDEADBEEF,
          "stored values");
    // period request
    send_pkt(8'd1, '{8'd0});
    get_reply(7, r, got);
    begin
      logic [7:0] p [];
      p = new[4];
      p[0] = 8'h00; p[1] = 8'h01; p[2] = 8'h23; p[3] = 8'h45;
      check(got == 7 && r[0] == 8'd253 && r[1] == crc1(8'd253) && r[2] == 8'h00 &&
            r[3] == 8'h01 && r[4] == 8'h23 && r[5] == 8'h45 && r[6] == crc_bytes(p, 4),
            "REQUESTEDFREQ reply");
    end
    send_pkt(8'd1, '{8'd7});
    expect_ack(8'd1, "other REQUEST (ping)");
    // corrupted ID CRC: NACK, the rest of the packet is not read as data
    send_pkt(8'd6, '{}, 8'h10);
    expect_nack("bad ID CRC");
    // corrupted dataword CRC: NACK and nothing written
    send_pkt(8'd6, '{8'd99}, 8'h00, 8'h01);
    expect_nack("bad data CRC");
    check(upper_ref == 8'd150, "bad packet not applied");
    // unknown ID
    send_pkt(8'd9, '{});
    expect_nack("unknown ID");
    // a packet cut short: dropped without reply after the byte timeout
    send_byte(8'd7); send_byte(crc1(8'd7));
    expect_silence(BT + 80, "no reply to a cut packet");
    send_pkt(8'd7, '{8'd120});
    expect_ack(8'd7, "packet after a timeout");
    check(lower_ref == 8'd120, "written after timeout");
    // link loss: no packets for LT clocks -> STOP
    check(!link_lost && mode == MODE_FIXED_HYST, "link alive");
    cyc(LT + 10);
    check(link_lost && mode == MODE_STOP, "link lost forces STOP");
    send_pkt(8'd0, '{8'd0});
    expect_ack(8'd0, "MODE idle");
    check(!link_lost && mode == MODE_IDLE, "link restored, IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
