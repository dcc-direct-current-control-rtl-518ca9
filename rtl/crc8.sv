// crc8 - bit-serial CRC-8 coprocessor on an FSL-style word stream.
//
// Divisor 263 = x^8 + x^2 + x + 1 (standard CRC-8). One 8-bit shift register
// does the polynomial long division one bit per clock:
//   fb = r[7];  r = {r[6:0], in_bit} ^ (fb ? 8'h07 : 8'h00)
// Remainder (encode): the dataword is shifted in MSB first, followed by eight
// zeros; what is left in r is the CRC appended to the dataword.
// Syndrome (check): the dataword is shifted in followed by the received CRC;
// r == 0 means the codeword is very probably intact. The same hardware does
// both, as in the design; a 4-byte dataword takes 32 + 8 = 40 shift clocks.
//
// Interface (FSL-like, one word per clock when s_exists && s_read):
//   control word (s_ctrl = 1): [2:0] dataword length in bytes (1, 2 or 4;
//     anything else means 4), [8] 1 = check (syndrome), 0 = encode,
//     [23:16] received CRC for a check. It is kept for later datawords.
//   data word (s_ctrl = 0): the dataword, right aligned in [8*len-1:0].
//   result (m_write for one clock, held until !m_full): [7:0] remainder or
//     syndrome, [8] 1 when a check found a zero syndrome, [9] the mode bit;
//     m_ctrl is 0.
// Timing: a data word accepted in clock t gives m_write in clock
// t + 8*len + 9 (8*len + 8 shift clocks and one clock to present the result).
// After reset the length is 4 bytes and the mode is encode.
// The division, its register and the 40-iteration count follow the design;
// the word format of the stream is this design's own.
module crc8
  import dcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FSL slave: words from the processor
  input  logic [31:0] s_data,
  input  logic        s_ctrl,
  input  logic        s_exists,
  output logic        s_read,
  // FSL master: results to the processor
  output logic [31:0] m_data,
  output logic        m_ctrl,
  output logic        m_write,
  input  logic        m_full
);

  typedef enum logic [1:0] {
    C_IDLE  = 2'd0,
    C_SHIFT = 2'd1,
    C_OUT   = 2'd2
  } crc_state_t;

  crc_state_t  state;
  logic [2:0]  len_bytes;     // 1, 2 or 4
  logic        check;
  logic [7:0]  crc_in;
  logic [39:0] msg;           // message bits, MSB is shifted in first
  logic [5:0]  bits_left;
  logic [7:0]  r;

  function automatic logic [7:0] crc_step(logic [7:0] cur, logic in_bit);
    return {cur[6:0], in_bit} ^ (cur[7] ? CRC_POLY : 8'h00);
  endfunction

  function automatic logic [2:0] norm_len(logic [2:0] l);
    return (l == 3'd1 || l == 3'd2) ? l : 3'd4;
  endfunction

  assign s_read = (state == C_IDLE) && s_exists;

  // message for a dataword: low len*8 bits, then 8 tail bits, left aligned
  function automatic logic [39:0] build_msg(logic [31:0] d, logic [2:0] l,
                                            logic [7:0] tail);
    unique case (l)
      3'd1:    return {d[7:0],  tail, 24'b0};
      3'd2:    return {d[15:0], tail, 16'b0};
      default: return {d,       tail};
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= C_IDLE;
      len_bytes <= 3'd4;
      check     <= 1'b0;
      crc_in    <= 8'h00;
      msg       <= '0;
      bits_left <= '0;
      r         <= 8'h00;
    end else begin
      unique case (state)
        C_IDLE: if (s_exists) begin
          if (s_ctrl) begin
            len_bytes <= norm_len(s_data[2:0]);
            check     <= s_data[8];
            crc_in    <= s_data[23:16];
          end else begin
            msg       <= build_msg(s_data, len_bytes, check ? crc_in : 8'h00);
            bits_left <= 6'(8 * len_bytes + 8);
            r         <= 8'h00;
            state     <= C_SHIFT;
          end
        end
        C_SHIFT: begin
          r         <= crc_step(r, msg[39]);
          msg       <= {msg[38:0], 1'b0};
          bits_left <= bits_left - 6'd1;
          if (bits_left == 6'd1) state <= C_OUT;
        end
        C_OUT: if (!m_full) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end

  assign m_write = (state == C_OUT) && !m_full;
  assign m_ctrl  = 1'b0;
  assign m_data  = {22'b0, check, check && (r == 8'h00), r};

endmodule
