// rsa_pkg: types shared by the bit-serial Montgomery RSA processor.
//
// The processor computes M^E mod N with n-bit operands by a chain of
// modified Montgomery multiplications MM(A,B) = A*B*2^-(n+2) mod N.  Each
// multiplication streams one bit per clock through three overlapped units:
// a serial-parallel multiplier, a carry-save Montgomery reduction module and
// a bit-serial carry-propagation adder.  This package holds the selector
// encodings those units share with the controller, and the controller's
// state encoding (eleven states, as the design's controller is described).
// The encodings themselves are this design's own choice.
package rsa_pkg;

  // Parallel operand of the serial-parallel multiplier.
  typedef enum logic [1:0] {
    PP_TEXT = 2'd0,  // text register (M for pre-processing, M' for multiplies)
    PP_SELF = 2'd1,  // squaring: operand latched from the serial stream itself
    PP_ONE  = 2'd2   // constant one (post-processing MM(R,1))
  } pp_sel_t;

  // Source of the multiplier's serial input (the selector in front of it).
  typedef enum logic {
    SER_CONST = 1'b0,  // constant register 2^(2n+4) mod N (pre-processing)
    SER_CPA   = 1'b1   // previous result, straight from the carry-propagation adder
  } ser_sel_t;

  // Operation of the Montgomery module in one clock.
  typedef enum logic [2:0] {
    MO_HOLD      = 3'd0,  // keep state
    MO_RED_FIRST = 3'd1,  // first reduction step, P[0] = 0
    MO_RED       = 3'd2,  // reduction step: P = (P + q*N + c) / 2
    MO_ADD_SUM   = 3'd3,  // add the sum vector of the multiplier's high part
    MO_ADD_CARRY = 3'd4,  // add the carry vector of the multiplier's high part
    MO_ADD_H     = 3'd5   // fold the serial LSB carry into the carry-save pair
  } mont_op_t;

  // Serial input of the text register.
  typedef enum logic [1:0] {
    TS_IO   = 2'd0,  // message bits from the I/O buffer
    TS_CPA  = 2'd1,  // result bits from the carry-propagation adder
    TS_ZERO = 2'd2   // zero fill (padding, unloading)
  } text_src_t;

  // Controller states.
  typedef enum logic [3:0] {
    ST_IDLE   = 4'd0,
    ST_LOAD_N = 4'd1,   // modulus
    ST_LOAD_C = 4'd2,   // constant 2^(2(n+2)) mod N
    ST_LOAD_E = 4'd3,   // exponent
    ST_LOAD_M = 4'd4,   // message, exponent normalised meanwhile
    ST_PRE    = 4'd5,   // M' = MM(M, C)
    ST_SQR    = 4'd6,   // R = MM(R, R)
    ST_MUL    = 4'd7,   // R = MM(R, M')
    ST_POST   = 4'd8,   // R = MM(R, 1)
    ST_CAPT   = 4'd9,   // result shifted into the text register
    ST_UNLOAD = 4'd10   // result shifted out through the I/O buffer
  } state_t;

endpackage
