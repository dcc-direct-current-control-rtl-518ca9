// dcc_pkg - types and constants shared by the direct current controller.
//
// The controller drives a two-leg bridge with the voltage vector {S_A, S_B}:
// [1,0] puts +Udc across the load, [0,1] puts -Udc, and [0,0] or [1,1]
// are the two zero vectors. The CRC constants are those of the standard
// CRC-8 with the 9-bit divisor 263 (x^8 + x^2 + x + 1); the leading divisor
// bit is implied, so only the low byte 0x07 is stored. The encoding of the
// enums below is this design's own choice.
package dcc_pkg;

  // Voltage vector: sa drives switch S_A, sb drives switch S_B.
  typedef struct packed {
    logic sa;
    logic sb;
  } vvec_t;

  localparam vvec_t VEC_POS  = '{sa: 1'b1, sb: 1'b0};
  localparam vvec_t VEC_NEG  = '{sa: 1'b0, sb: 1'b1};
  localparam vvec_t VEC_ZERO = '{sa: 1'b0, sb: 1'b0};

  // What the next vector must do to the load current.
  typedef enum logic {
    ACT_DEC = 1'b0,
    ACT_INC = 1'b1
  } action_t;

  // Operating mode set by the user.
  //   IDLE       : zero vector, no switching.
  //   FIXED_HYST : fixed hysteresis band around the user's references.
  //   STOP       : keep controlling, but with the band centred on zero current.
  typedef enum logic [1:0] {
    MODE_IDLE       = 2'd0,
    MODE_FIXED_HYST = 2'd1,
    MODE_STOP       = 2'd2
  } mode_t;

  // CRC-8, divisor 263 = 9'b1_0000_0111.
  localparam int unsigned CRC_DIVISOR = 263;
  localparam logic [7:0]  CRC_POLY    = CRC_DIVISOR[7:0];

  // Width of the timers (the 32-bit timers of the original system).
  localparam int unsigned TIMER_W = 32;

endpackage
