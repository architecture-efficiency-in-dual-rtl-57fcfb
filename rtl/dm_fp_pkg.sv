// Shared types and constants of the dual-mode floating-point divider.
//
// The divider works either on one IEEE-754 binary64 (double precision, DP)
// operand pair or on two independent binary32 (single precision, SP) operand
// pairs packed into the same 64-bit words: SP lane 1 in bits [63:32], SP
// lane 0 in bits [31:0]. The mode flag dp_sp selects between them
// (1 = one DP division, 0 = two SP divisions); the polarity of the flag is a
// choice of this design.
//
// Inside the datapath every lane carries a small side record: the result
// sign, the biased quotient exponent before normalisation, held as a signed
// number wide enough for subnormal operands, and the class of the result
// (ordinary number or one of the IEEE special results).
package dm_fp_pkg;

  // Formats
  localparam int DP_P    = 53;     // significand bits, hidden bit included
  localparam int SP_P    = 24;
  localparam int DP_EW   = 11;     // exponent field bits
  localparam int SP_EW   = 8;
  localparam int DP_BIAS = 1023;
  localparam int SP_BIAS = 127;

  // Signed working exponent, wide enough for ea - eb + bias with
  // subnormal operands in either format.
  localparam int EXPW = 13;

  // Quotient significand handed from the mantissa divider to the rounder:
  // floor(q * 2^(P+1)) for q = ma/mb in (0.5, 2), i.e. P+2 bits.
  localparam int DP_QW = DP_P + 2;  // 55
  localparam int SP_QW = SP_P + 2;  // 26

  // Canonical quiet NaNs produced for invalid operations
  localparam logic [63:0] DP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [31:0] SP_QNAN = 32'h7FC0_0000;

  typedef enum logic [1:0] {
    CLS_NUM  = 2'd0,   // finite non-zero quotient, computed by the datapath
    CLS_ZERO = 2'd1,   // 0/x or x/inf
    CLS_INF  = 2'd2,   // inf/x or x/0
    CLS_NAN  = 2'd3    // NaN operand, 0/0 or inf/inf
  } res_cls_e;

  typedef struct packed {
    logic                   sign;
    logic signed [EXPW-1:0] exp;   // biased exponent of ma/mb's leading bit
    res_cls_e               cls;
  } lane_info_t;

endpackage
