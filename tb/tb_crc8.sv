// tb_crc8 - self-checking test of crc8.
// The expected CRCs come from a byte-wise CRC-8 (x^8 + x^2 + x + 1, zero
// start value, MSB first) written in the testbench, not from the bit-serial
// augmented division of the block. Checks: remainders of 1, 2 and 4 byte
// datawords, a zero syndrome for each intact codeword and a non-zero one
// for every single-bit error, the latency of 8 * len + 9 clocks (40 shift
// clocks for a 4-byte word), and back-pressure from m_full.
module tb_crc8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_data = '0, m_data;
  logic s_ctrl = 1'b0, s_exists = 1'b0, s_read, m_ctrl, m_write, m_full = 1'b0;
  int checks = 0, failures = 0;

  crc8 dut (.clk, .rst_n, .s_data, .s_ctrl, .s_exists, .s_read,
            .m_data, .m_ctrl, .m_write, .m_full);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_crc(logic [31:0] d, int nbytes);
    logic [7:0] c = 8'h00;
    for (int b = nbytes - 1; b >= 0; b--) begin
      c ^= d[8*b +: 8];
      for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [31:0] d, input logic c);
    s_data = d; s_ctrl = c; s_exists = 1'b1;
    do @(posedge clk); while (!s_read);
    #1; s_exists = 1'b0;
  endtask

  // one operation; returns the result word and the clocks it took
  task automatic run(input logic [31:0] d, input int n, input logic chk,
                     input logic [7:0] crc, output logic [31:0] res,
                     output int lat);
    send({8'h00, crc, 7'b0, chk, 5'b0, 3'(n)}, 1'b1);
    send(d, 1'b0);
    lat = 1;
    while (!m_write) begin @(posedge clk); #1; lat++; end
    res = m_data;
    @(posedge clk); #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, res;
    logic [7:0] e;
    int lat, n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // known values of this CRC-8
    check(ref_crc(32'h01, 1) == 8'h07, "reference model 0x01");
    check(ref_crc(32'hFF, 1) == 8'hF3, "reference model 0xFF");
    for (int t = 0; t < 60; t++) begin
      n = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 2 : 4;
      d = $urandom();
      if (n < 4) d &= (32'h1 << (8 * n)) - 1;
      e = ref_crc(d, n);
      run(d, n, 1'b0, 8'h00, res, lat);
      check(res[7:0] == e, $sformatf("remainder %h (%0d B): %h expected %h", d, n, res[7:0], e));
      check(lat == 8 * n + 9, $sformatf("encode latency %0d for %0d bytes", lat, n));
      check(res[9:8] == 2'b00, "encode flags");
      run(d, n, 1'b1, e, res, lat);
      check(res[7:0] == 8'h00 && res[9:8] == 2'b11, "zero syndrome for intact codeword");
      check(lat == 8 * n + 9, "check latency");
      // single bit error in dataword or CRC
      begin
        int bitpos;
        logic [39:0] cw;
        bitpos = $urandom_range(8 * n + 7);
        cw = ({8'h00, d} << 8) | 40'(e);
        cw ^= 40'h1 << bitpos;
        run(cw[39:8], n, 1'b1, cw[7:0], res, lat);
        check(res[7:0] != 8'h00 && res[9:8] == 2'b10, $sformatf("single-bit error at %0d in %h: %h", bitpos, cw, res));
      end
    end
    // a 4-byte dataword shifts 40 bits: 40 shift clocks + 1
    run(32'hDEADBEEF, 4, 1'b0, 8'h00, res, lat);
    check(lat == 41, "40 iterations for a 32-bit dataword");
    check(res[7:0] == ref_crc(32'hDEADBEEF, 4), "DEADBEEF");
    // back-pressure: result held while m_full
    m_full = 1'b1;
    send(32'h0000_0004, 1'b1);
    send(32'h1234_5678, 1'b0);
    repeat (60) @(posedge clk);
    #1;
    check(!m_write, "no write while full");
    m_full = 1'b0; #1;
    check(m_write && m_data[7:0] == ref_crc(32'h12345678, 4), "result after full clears");
    @(posedge clk); #1;
    check(!m_write, "one write only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
