// lns_pkg: types and constants shared by the 32-bit logarithmic number system
// (LNS) arithmetic unit.
//
// Word format (32 bits): bit 31 is the sign of the real value; bits 30:0 hold
// log2|x| as a two's complement fixed-point number with 8 integer bits and 23
// fraction bits, so the word covers magnitudes from about 2^-128 to 2^128 with
// the same relative step (2^-23 in the log) everywhere. The sign / 8-bit
// integer / 23-bit fraction split follows the single-precision layout; the
// zero code (most negative log, 0x4000_0000 in bits 30:0) is this design's
// choice, as are the flag set and the operation encoding.
//
// Internally the add/subtract path carries function values with GUARD extra
// fraction bits (FB = 23 + GUARD = 27 fraction bits).
package lns_pkg;

  localparam int FRAC   = 23;                 // fraction bits of the log
  localparam int LOGW   = 31;                 // width of the log field
  localparam int GUARD  = 4;                  // guard bits inside add/sub
  localparam int FB     = FRAC + GUARD;       // internal fraction bits

  localparam logic [LOGW-1:0] LOG_ZERO = 31'h4000_0000;  // reserved zero code
  localparam logic [LOGW-1:0] LOG_MAX  = 31'h3FFF_FFFF;  // largest log

  typedef struct packed {
    logic            sign;
    logic [LOGW-1:0] lg;
  } lns_t;

  // Exception flags returned with every result.
  typedef struct packed {
    logic overflow;    // result magnitude above the range: saturated
    logic underflow;   // result magnitude below the range: flushed to zero
    logic invalid;     // square root of a negative number
    logic div_zero;    // division by zero
  } lns_flags_t;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_MUL  = 3'd2,
    OP_DIV  = 3'd3,
    OP_SQR  = 3'd4,
    OP_SQRT = 3'd5
  } lns_op_e;

  typedef enum logic [1:0] {
    MD_MUL  = 2'd0,
    MD_DIV  = 2'd1,
    MD_SQR  = 2'd2,
    MD_SQRT = 2'd3
  } muldiv_op_e;

  function automatic logic is_zero(lns_t x);
    return x.lg == LOG_ZERO;
  endfunction

  // Clamp a wide signed log (FRAC fraction bits) into the word range.
  // Returns the 31-bit field and sets ovf / unf.
  function automatic logic [LOGW-1:0] clamp_log(input logic signed [33:0] v,
                                                output logic ovf, output logic unf);
    ovf = 1'b0;
    unf = 1'b0;
    if (v > 34'sh0_3FFF_FFFF) begin
      ovf = 1'b1;
      return LOG_MAX;
    end else if (v < -34'sh0_3FFF_FFFF) begin
      unf = 1'b1;
      return LOG_ZERO;
    end
    return v[LOGW-1:0];
  endfunction

endpackage
