// Stage 1 of the dual-mode divider: unpacking and subnormal normalisation.
//
// Both 64-bit operands, in1 (dividend) and in2 (divisor), hold either one
// DP number (dp_sp = 1) or two SP numbers (dp_sp = 0, lane 1 in [63:32],
// lane 0 in [31:0]). For each operand the significand, hidden bit
// included, is placed left-aligned in its field (DP [63:11], SP [63:40]
// and [31:8]). A dual-mode LOD then counts its leading zeros and a
// dual-mode dynamic left shifter removes them, so a subnormal significand
// leaves this stage normalised in [1, 2) like any other; the same count
// adjusts the operand's exponent. Normal numbers have a count of zero.
// Per lane the stage also forms the result sign, the biased quotient
// exponent ea - eb + bias (before the quotient is normalised) and the
// class of the result (number, zero, infinity or NaN, after IEEE 754).
// The LOD-plus-shifter subnormal path follows the published design; the special-value
// classification is standard IEEE 754 behaviour, which the published design does not
// discuss.
//
// Interface: in1, in2, dp_sp; ma, mb = normalised significands;
// info_hi = DP lane or SP lane 1, info_lo = SP lane 0. Combinational;
// the divider registers its outputs.
module dm_prenorm
  import dm_fp_pkg::*;
(
  input  logic [63:0] in1,
  input  logic [63:0] in2,
  input  logic        dp_sp,
  output logic [63:0] ma,
  output logic [63:0] mb,
  output lane_info_t  info_hi,
  output lane_info_t  info_lo
);

  // Per-operand unpacked fields
  typedef struct packed {
    logic                   sign;
    logic signed [EXPW-1:0] eeff;   // exponent of the field's leading bit
    logic                   zero;
    logic                   inf;
    logic                   nan;
  } opnd_t;

  function automatic logic [63:0] align(input logic [63:0] x, input logic dp);
    if (dp) return {(x[62:52] != 0), x[51:0], 11'b0};
    return {(x[62:55] != 0), x[54:32], 8'b0, (x[30:23] != 0), x[22:0], 8'b0};
  endfunction

  function automatic opnd_t fields_dp(input logic [63:0] x);
    opnd_t o;
    o.sign = x[63];
    o.eeff = (x[62:52] == 0) ? EXPW'(1) : EXPW'({2'b00, x[62:52]});
    o.zero = (x[62:52] == 0)     && (x[51:0] == 0);
    o.inf  = (x[62:52] == '1)    && (x[51:0] == 0);
    o.nan  = (x[62:52] == '1)    && (x[51:0] != 0);
    return o;
  endfunction

  function automatic opnd_t fields_sp(input logic [31:0] x);
    opnd_t o;
    o.sign = x[31];
    o.eeff = (x[30:23] == 0) ? EXPW'(1) : EXPW'({5'b0, x[30:23]});
    o.zero = (x[30:23] == 0)  && (x[22:0] == 0);
    o.inf  = (x[30:23] == '1) && (x[22:0] == 0);
    o.nan  = (x[30:23] == '1) && (x[22:0] != 0);
    return o;
  endfunction

  function automatic lane_info_t combine(input opnd_t a, input opnd_t b,
                                         input logic [5:0] lza,
                                         input logic [5:0] lzb,
                                         input int bias);
    lane_info_t r;
    r.sign = a.sign ^ b.sign;
    r.exp  = (a.eeff - EXPW'(lza)) - (b.eeff - EXPW'(lzb)) + EXPW'(bias);
    if (a.nan || b.nan || (a.zero && b.zero) || (a.inf && b.inf)) r.cls = CLS_NAN;
    else if (a.inf || b.zero)                                       r.cls = CLS_INF;
    else if (a.zero || b.inf)                                       r.cls = CLS_ZERO;
    else                                                            r.cls = CLS_NUM;
    return r;
  endfunction

  logic [63:0] fa, fb;
  logic [5:0]  lza_hi, lzb_hi;
  logic [4:0]  lza_lo, lzb_lo;
  logic        za_hi, za_lo, zb_hi, zb_lo;

  assign fa = align(in1, dp_sp);
  assign fb = align(in2, dp_sp);

  dm_lod u_lod_a (.d(fa), .dp_sp(dp_sp), .cnt_hi(lza_hi), .cnt_lo(lza_lo),
                  .zero_hi(za_hi), .zero_lo(za_lo));
  dm_lod u_lod_b (.d(fb), .dp_sp(dp_sp), .cnt_hi(lzb_hi), .cnt_lo(lzb_lo),
                  .zero_hi(zb_hi), .zero_lo(zb_lo));

  dm_lshift u_lsh_a (.d(fa), .dp_sp(dp_sp), .amt_hi(lza_hi), .amt_lo(lza_lo), .q(ma));
  dm_lshift u_lsh_b (.d(fb), .dp_sp(dp_sp), .amt_hi(lzb_hi), .amt_lo(lzb_lo), .q(mb));

  always_comb begin
    // an all-zero significand (operand zero) keeps a count of 0; its lane is
    // classified as a special result and the exponent is then unused
    if (dp_sp) begin
      info_hi = combine(fields_dp(in1), fields_dp(in2),
                        za_hi ? 6'd0 : lza_hi, zb_hi ? 6'd0 : lzb_hi, DP_BIAS);
      info_lo = info_hi;
    end else begin
      info_hi = combine(fields_sp(in1[63:32]), fields_sp(in2[63:32]),
                        za_hi ? 6'd0 : lza_hi, zb_hi ? 6'd0 : lzb_hi, SP_BIAS);
      info_lo = combine(fields_sp(in1[31:0]), fields_sp(in2[31:0]),
                        za_lo ? 6'd0 : {1'b0, lza_lo}, zb_lo ? 6'd0 : {1'b0, lzb_lo},
                        SP_BIAS);
    end
  end

endmodule
