// packet_engine - serial packet handler of the controller (slave side).
//
// The host is the master: it sends a packet, and the controller answers each
// one. Every packet is made of bytes:
//   [ID] [CRC-8 of ID] [dataword, 1/2/4 bytes, MSB first] [CRC-8 of dataword]
// The ID gets its own CRC so that the length of the rest is known safely.
// Host-to-controller IDs and dataword lengths (see pkt_len below):
//   MODE 0 (1 B: 0 IDLE, 1 FIXED_HYST, 2 STOP), REQUEST 1 (1 B),
//   MAXCURR 2 (2 B), REFCURR 3 (2 B), REFSWITCHFREQ 4 (4 B),
//   TIMEOUTSWITCH 5 (4 B, clocks), UPPERREF 6 (1 B DAC code),
//   LOWERREF 7 (1 B DAC code).
// Replies:
//   NACK 254 : [254][CRC]                 a syndrome was not zero, or the ID
//                                          is unknown (the only 2-byte packet)
//   ACK 255  : [255][CRC][ID][CRC]         packet applied; carries its ID
//   REQUESTEDFREQ 253 : [253][CRC][4 B switching period][CRC]
//                                          answer to REQUEST with code 0
// Every CRC, received or sent, goes through the crc8 coprocessor on the
// crc_* stream: a syndrome check for each received part, a remainder for
// each sent part.
//
// Timers: a packet whose next byte does not come within BYTE_TIMEOUT clocks
// is dropped without a reply. Once a valid packet has been received, the
// link timer restarts at each valid packet; if it reaches LINK_TIMEOUT
// clocks the mode register is set to STOP and link_lost rises, until the
// next valid packet.
//
// Interface: rx_valid/rx_data deliver one received byte per pulse;
// tx_data/tx_valid/tx_ready send one byte per handshake. Register outputs
// hold the last value written; max_curr, ref_curr and ref_switch_freq are
// only stored.
// Received bytes go through an 8-byte queue, so they may arrive while a
// CRC check runs; a byte that finds the queue full is lost.
// Timing: the reply starts some 40 to 60 clocks after the last byte of a
// packet (CRC checks and encodes at one bit per clock).
// The packet layout, the ID values, the CRC per part, NACK as the only
// two-byte packet, the period reply and the link timer that forces STOP
// follow the design. The dataword length of each ID, the mode codes, the
// ACK payload, the REQUEST code and the byte timeout are this design's own.
module packet_engine
  import dcc_pkg::*;
#(
  parameter int unsigned DAC_BITS     = 8,
  parameter int unsigned TW           = TIMER_W,
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BYTE_TIMEOUT = CLK_HZ / 50,   // 20 ms
  parameter int unsigned LINK_TIMEOUT = CLK_HZ,        // 1 s
  parameter logic [DAC_BITS-1:0] REF_RESET = DAC_BITS'(1) << (DAC_BITS - 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // byte stream from / to the serial port
  input  logic                rx_valid,
  input  logic [7:0]          rx_data,
  output logic [7:0]          tx_data,
  output logic                tx_valid,
  input  logic                tx_ready,
  // CRC coprocessor stream
  output logic [31:0]         crc_s_data,
  output logic                crc_s_ctrl,
  output logic                crc_s_exists,
  input  logic                crc_s_read,
  input  logic [31:0]         crc_m_data,
  input  logic                crc_m_write,
  output logic                crc_m_full,
  // status to report
  input  logic [TW-1:0]       switch_period,
  // parameter registers
  output mode_t               mode,
  output logic [DAC_BITS-1:0] upper_ref,
  output logic [DAC_BITS-1:0] lower_ref,
  output logic [TW-1:0]       timeout_switch,
  output logic [15:0]         max_curr,
  output logic [15:0]         ref_curr,
  output logic [31:0]         ref_switch_freq,
  output logic                link_lost,
  output logic                nack_sent
);

  localparam logic [7:0] ID_MODE = 8'd0, ID_REQUEST = 8'd1, ID_MAXCURR = 8'd2,
                         ID_REFCURR = 8'd3, ID_REFSWITCHFREQ = 8'd4,
                         ID_TIMEOUTSWITCH = 8'd5, ID_UPPERREF = 8'd6,
                         ID_LOWERREF = 8'd7;
  // (252 is CALACK, the reply of the calibration routine, not built here)
  localparam logic [7:0] ID_REQUESTEDFREQ = 8'd253,
                         ID_NACK = 8'd254, ID_ACK = 8'd255;

  // dataword length in bytes of each host ID; 0 = unknown ID
  function automatic logic [2:0] pkt_len(logic [7:0] id);
    unique case (id)
      ID_MODE, ID_REQUEST, ID_UPPERREF, ID_LOWERREF: return 3'd1;
      ID_MAXCURR, ID_REFCURR:                        return 3'd2;
      ID_REFSWITCHFREQ, ID_TIMEOUTSWITCH:            return 3'd4;
      default:                                       return 3'd0;
    endcase
  endfunction

  // ---------------- CRC client -------------------------------------------
  typedef enum logic [1:0] {Q_IDLE, Q_CTRL, Q_DATA, Q_WAIT} crcq_t;
  crcq_t       q;
  logic        crc_start, crc_check, crc_done;
  logic [2:0]  crc_len;
  logic [7:0]  crc_in, crc_res;
  logic [31:0] crc_word;
  logic        crc_zero;

  assign crc_s_ctrl   = (q == Q_CTRL);
  assign crc_s_exists = (q == Q_CTRL) || (q == Q_DATA);
  assign crc_s_data   = (q == Q_CTRL) ? {8'h00, crc_in, 7'b0, crc_check, 5'b0, crc_len}
                                      : crc_word;
  assign crc_m_full   = (q != Q_WAIT);

  // result bits [31:9] carry nothing this client needs
  logic unused_crc_bits;
  assign unused_crc_bits = ^crc_m_data[31:9];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q        <= Q_IDLE;
      crc_done <= 1'b0;
      crc_res  <= 8'h00;
      crc_zero <= 1'b0;
    end else begin
      crc_done <= 1'b0;
      unique case (q)
        Q_IDLE: if (crc_start) q <= Q_CTRL;
        Q_CTRL: if (crc_s_read) q <= Q_DATA;
        Q_DATA: if (crc_s_read) q <= Q_WAIT;
        Q_WAIT: if (crc_m_write) begin
          crc_res  <= crc_m_data[7:0];
          crc_zero <= crc_m_data[8];          // check mode and zero syndrome
          crc_done <= 1'b1;
          q        <= Q_IDLE;
        end
        default: q <= Q_IDLE;
      endcase
    end

  // ---------------- packet state machine ---------------------------------
  typedef enum logic [3:0] {
    P_ID, P_IDCRC, P_CHK_ID, P_DATA, P_DCRC, P_CHK_DATA, P_APPLY,
    P_ENC_ID, P_ENC_DATA, P_SEND
  } pstate_t;

  pstate_t     ps;
  logic [7:0]  id, idcrc, dcrc;
  logic [31:0] dword;
  logic [2:0]  dlen, dcnt;
  logic        crc_busy;         // a CRC operation of this state was started
  // reply being built
  logic [7:0]  r_id;
  logic [31:0] r_word;
  logic [2:0]  r_len;            // reply dataword bytes (0 for NACK)
  logic [7:0]  txbuf [7];
  logic [2:0]  tx_n, tx_i;
  logic [$clog2(BYTE_TIMEOUT+1)-1:0] byte_cnt;
  logic [$clog2(LINK_TIMEOUT+1)-1:0] link_cnt;
  logic        link_armed, pkt_ok;

  // receive queue: bytes keep arriving while a CRC check runs
  localparam int unsigned RXQ = 8;
  logic [7:0] rxq [RXQ];
  logic [$clog2(RXQ):0] wp, rp;
  logic       rb_valid, rb_take;
  logic [7:0] rb_data;

  assign rb_valid = (wp != rp);
  assign rb_data  = rxq[rp[$clog2(RXQ)-1:0]];
  assign rb_take  = rb_valid &&
                    (ps == P_ID || ps == P_IDCRC || ps == P_DATA || ps == P_DCRC);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      for (int i = 0; i < RXQ; i++) rxq[i] <= 8'h00;
    end else begin
      if (rx_valid && (wp - rp) != RXQ[$clog2(RXQ):0]) begin
        rxq[wp[$clog2(RXQ)-1:0]] <= rx_data;
        wp <= wp + 1'b1;
      end
      if (rb_take) rp <= rp + 1'b1;
    end

  assign tx_valid = (ps == P_SEND);
  assign tx_data  = txbuf[tx_i];

  // one CRC operation per checking or encoding state
  always_comb begin
    crc_start = 1'b0;
    crc_check = 1'b0;
    crc_len   = 3'd1;
    crc_in    = 8'h00;
    crc_word  = 32'h0;
    unique case (ps)
      P_CHK_ID:   begin crc_start = !crc_busy; crc_check = 1'b1; crc_in = idcrc;
                        crc_word = {24'h0, id}; end
      P_CHK_DATA: begin crc_start = !crc_busy; crc_check = 1'b1; crc_in = dcrc;
                        crc_len = dlen; crc_word = dword; end
      P_ENC_ID:   begin crc_start = !crc_busy; crc_word = {24'h0, r_id}; end
      P_ENC_DATA: begin crc_start = !crc_busy; crc_len = r_len; crc_word = r_word; end
      default: ;
    endcase
  end

  // place a reply dataword byte: byte b (0 = first sent) of a len-byte word
  function automatic logic [7:0] word_byte(logic [31:0] w, logic [2:0] len,
                                           logic [2:0] b);
    return w[8 * (32'(len) - 1 - 32'(b)) +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ps              <= P_ID;
      id              <= 8'h00;
      idcrc           <= 8'h00;
      dcrc            <= 8'h00;
      dword           <= '0;
      dlen            <= 3'd0;
      dcnt            <= 3'd0;
      crc_busy        <= 1'b0;
      r_id            <= 8'h00;
      r_word          <= '0;
      r_len           <= 3'd0;
      for (int i = 0; i < 7; i++) txbuf[i] <= 8'h00;
      tx_n            <= 3'd0;
      tx_i            <= 3'd0;
      byte_cnt        <= '0;
      link_cnt        <= '0;
      link_armed      <= 1'b0;
      link_lost       <= 1'b0;
      pkt_ok          <= 1'b0;
      nack_sent       <= 1'b0;
      mode            <= MODE_IDLE;
      upper_ref       <= REF_RESET;
      lower_ref       <= REF_RESET;
      timeout_switch  <= '0;
      max_curr        <= '0;
      ref_curr        <= '0;
      ref_switch_freq <= '0;
    end else begin
      pkt_ok    <= 1'b0;
      nack_sent <= 1'b0;
      if (crc_start) crc_busy <= 1'b1;

      // byte timeout inside a packet
      if (rx_valid || rb_valid || ps == P_ID || ps > P_DCRC) byte_cnt <= '0;
      else if (ps == P_IDCRC || ps == P_DATA || ps == P_DCRC) begin
        byte_cnt <= byte_cnt + 1'b1;
        if (32'(byte_cnt) == BYTE_TIMEOUT - 1) ps <= P_ID;
      end

      // link timer
      if (pkt_ok) begin
        link_cnt   <= '0;
        link_armed <= 1'b1;
        link_lost  <= 1'b0;
      end else if (link_armed) begin
        link_cnt <= link_cnt + 1'b1;
        if (32'(link_cnt) == LINK_TIMEOUT - 1) begin
          link_armed <= 1'b0;
          link_lost  <= 1'b1;
          mode       <= MODE_STOP;
        end
      end

      unique case (ps)
        P_ID: if (rb_valid) begin id <= rb_data; ps <= P_IDCRC; end
        P_IDCRC: if (rb_valid) begin idcrc <= rb_data; ps <= P_CHK_ID; end
        P_CHK_ID: if (crc_done) begin
          crc_busy <= 1'b0;
          if (!crc_zero || pkt_len(id) == 3'd0) begin
            r_id <= ID_NACK; r_len <= 3'd0; ps <= P_ENC_ID;
          end else begin
            dlen <= pkt_len(id); dcnt <= 3'd0; dword <= '0; ps <= P_DATA;
          end
        end
        P_DATA: if (rb_valid) begin
          dword <= {dword[23:0], rb_data};
          dcnt  <= dcnt + 3'd1;
          if (dcnt + 3'd1 == dlen) ps <= P_DCRC;
        end
        P_DCRC: if (rb_valid) begin dcrc <= rb_data; ps <= P_CHK_DATA; end
        P_CHK_DATA: if (crc_done) begin
          crc_busy <= 1'b0;
          if (!crc_zero) begin
            r_id <= ID_NACK; r_len <= 3'd0; ps <= P_ENC_ID;
          end else ps <= P_APPLY;
        end
        P_APPLY: begin
          pkt_ok <= 1'b1;
          r_id   <= ID_ACK;
          r_len  <= 3'd1;
          r_word <= {24'h0, id};
          unique case (id)
            ID_MODE: mode <= (dword[1:0] == 2'd1) ? MODE_FIXED_HYST :
                             (dword[1:0] == 2'd2) ? MODE_STOP : MODE_IDLE;
            ID_REQUEST: if (dword[7:0] == 8'd0) begin
              r_id   <= ID_REQUESTEDFREQ;
              r_len  <= 3'd4;
              r_word <= 32'(switch_period);
            end
            ID_MAXCURR:       max_curr        <= dword[15:0];
            ID_REFCURR:       ref_curr        <= dword[15:0];
            ID_REFSWITCHFREQ: ref_switch_freq <= dword;
            ID_TIMEOUTSWITCH: timeout_switch  <= TW'(dword);
            ID_UPPERREF:      upper_ref       <= dword[DAC_BITS-1:0];
            ID_LOWERREF:      lower_ref       <= dword[DAC_BITS-1:0];
            default: ;
          endcase
          ps <= P_ENC_ID;
        end
        P_ENC_ID: if (crc_done) begin
          crc_busy <= 1'b0;
          txbuf[0] <= r_id;
          txbuf[1] <= crc_res;
          if (r_len == 3'd0) begin
            tx_n <= 3'd2; tx_i <= 3'd0; ps <= P_SEND;
            nack_sent <= 1'b1;
          end else ps <= P_ENC_DATA;
        end
        P_ENC_DATA: if (crc_done) begin
          crc_busy <= 1'b0;
          for (int b = 0; b < 4; b++)
            if (3'(b) < r_len) txbuf[2 + b] <= word_byte(r_word, r_len, 3'(b));
          txbuf[3'd2 + r_len] <= crc_res;
          tx_n <= 3'd3 + r_len; tx_i <= 3'd0; ps <= P_SEND;
        end
        P_SEND: if (tx_ready) begin
          if (tx_i + 3'd1 == tx_n) ps <= P_ID;
          tx_i <= tx_i + 3'd1;
        end
        default: ps <= P_ID;
      endcase
    end

endmodule
