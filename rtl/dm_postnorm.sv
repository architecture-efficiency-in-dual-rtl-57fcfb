// Stage 3 of the dual-mode divider: normalisation, denormalisation,
// rounding and packing.
//
// Input per lane is the exact quotient significand from stage 2,
// Q = floor(q * 2^(P+1)) with q in (0.5, 2), its sticky bit, and the lane's
// side record from stage 1. Per lane:
//  1. normalise: if q >= 1 the significand is Q[P+1:2] with round bit Q[1],
//     else Q[P:1] with round bit Q[0] and the exponent one lower;
//  2. if the exponent is 0 or below, the quotient is subnormal: the
//     significand and round bit are moved right by 1 - exp (limited to the
//     lane width) with the shared dual-mode right shifter, whose lost bits
//     join the sticky bit; the exponent field becomes 0;
//  3. round to nearest, ties to even: {exponent field, fraction} + 1 when
//     round & (sticky | lsb); a carry out of the fraction moves the result
//     to the next binade, including from subnormal to the least normal
//     number and from the largest finite number to infinity;
//  4. an exponent of 2^EW - 1 or above gives infinity; the special classes
//     from stage 1 override the number (a NaN is the canonical quiet NaN).
// Round to nearest even is the only rounding mode. The published design mentions
// rounding and a right shifter; the detailed steps are this design's.
//
// Interface: dp_sp, info_hi/info_lo, q_hi/q_lo, sticky_hi/sticky_lo;
// result = one DP number or two packed SP numbers. Combinational.
module dm_postnorm
  import dm_fp_pkg::*;
(
  input  logic             dp_sp,
  input  lane_info_t       info_hi,
  input  lane_info_t       info_lo,
  input  logic [DP_QW-1:0] q_hi,
  input  logic [SP_QW-1:0] q_lo,
  input  logic             sticky_hi,
  input  logic             sticky_lo,
  output logic [63:0]      result
);

  // ---- step 1: normalise, and the denormalising shift amounts ----------
  logic signed [EXPW-1:0] e_dp, e_s1, e_s0;
  logic [DP_P-1:0]        sig_dp;
  logic [SP_P-1:0]        sig_s1, sig_s0;
  logic                   rnd_dp, rnd_s1, rnd_s0;
  logic                   st_dp, st_s1, st_s0;
  logic [5:0]             sh_dp, sh_t1, sh_t0;
  logic [4:0]             sh_s1, sh_s0;
  logic [63:0]            sh_in, sh_out;
  logic                   lost_hi, lost_lo;

  function automatic logic [5:0] denorm_amt(input logic signed [EXPW-1:0] e,
                                            input int cap);
    logic signed [EXPW-1:0] n;
    if (e > 0) return 6'd0;
    n = EXPW'(1) - e;
    if (n > EXPW'(cap)) return 6'(cap);
    return n[5:0];
  endfunction

  always_comb begin
    // DP lane
    if (q_hi[DP_QW-1]) begin
      sig_dp = q_hi[DP_QW-1:2];  rnd_dp = q_hi[1];  st_dp = q_hi[0] | sticky_hi;
      e_dp   = info_hi.exp;
    end else begin
      sig_dp = q_hi[DP_QW-2:1];  rnd_dp = q_hi[0];  st_dp = sticky_hi;
      e_dp   = info_hi.exp - EXPW'(1);
    end
    // SP lane 1
    if (q_hi[SP_QW-1]) begin
      sig_s1 = q_hi[SP_QW-1:2];  rnd_s1 = q_hi[1];  st_s1 = q_hi[0] | sticky_hi;
      e_s1   = info_hi.exp;
    end else begin
      sig_s1 = q_hi[SP_QW-2:1];  rnd_s1 = q_hi[0];  st_s1 = sticky_hi;
      e_s1   = info_hi.exp - EXPW'(1);
    end
    // SP lane 0
    if (q_lo[SP_QW-1]) begin
      sig_s0 = q_lo[SP_QW-1:2];  rnd_s0 = q_lo[1];  st_s0 = q_lo[0] | sticky_lo;
      e_s0   = info_lo.exp;
    end else begin
      sig_s0 = q_lo[SP_QW-2:1];  rnd_s0 = q_lo[0];  st_s0 = sticky_lo;
      e_s0   = info_lo.exp - EXPW'(1);
    end

    sh_dp = denorm_amt(e_dp, 63);
    sh_t1 = denorm_amt(e_s1, 31);
    sh_t0 = denorm_amt(e_s0, 31);
    sh_s1 = sh_t1[4:0];
    sh_s0 = sh_t0[4:0];
    sh_in = dp_sp ? {sig_dp, rnd_dp, 10'b0}
                  : {sig_s1, rnd_s1, 7'b0, sig_s0, rnd_s0, 7'b0};
  end

  // ---- step 2: shared dual-mode right shifter ----------------------------
  dm_rshift u_rsh (
    .d         (sh_in),
    .dp_sp     (dp_sp),
    .amt_hi    (dp_sp ? sh_dp : {1'b0, sh_s1}),
    .amt_lo    (sh_s0),
    .q         (sh_out),
    .sticky_hi (lost_hi),
    .sticky_lo (lost_lo)
  );

  // ---- steps 3 and 4: round and pack -------------------------------------
  function automatic logic [63:0] pack_dp(input lane_info_t info,
                                          input logic signed [EXPW-1:0] e,
                                          input logic [63:0] w,
                                          input logic st_in);
    logic [DP_P-1:0] s;
    logic            r, st, inc;
    logic [62:0]     mag;
    s   = w[63:11];
    r   = w[10];
    st  = st_in | (|w[9:0]);
    inc = r & (st | s[0]);
    mag = {((e > 0) ? e[DP_EW-1:0] : {DP_EW{1'b0}}), s[DP_P-2:0]} + 63'(inc);
    unique case (info.cls)
      CLS_NAN:  return DP_QNAN;
      CLS_INF:  return {info.sign, {DP_EW{1'b1}}, {(DP_P-1){1'b0}}};
      CLS_ZERO: return {info.sign, 63'b0};
      default:  begin
        if (e >= EXPW'((1 << DP_EW) - 1))
          return {info.sign, {DP_EW{1'b1}}, {(DP_P-1){1'b0}}};
        return {info.sign, mag};
      end
    endcase
  endfunction

  function automatic logic [31:0] pack_sp(input lane_info_t info,
                                          input logic signed [EXPW-1:0] e,
                                          input logic [31:0] w,
                                          input logic st_in);
    logic [SP_P-1:0] s;
    logic            r, st, inc;
    logic [30:0]     mag;
    s   = w[31:8];
    r   = w[7];
    st  = st_in | (|w[6:0]);
    inc = r & (st | s[0]);
    mag = {((e > 0) ? e[SP_EW-1:0] : {SP_EW{1'b0}}), s[SP_P-2:0]} + 31'(inc);
    unique case (info.cls)
      CLS_NAN:  return SP_QNAN;
      CLS_INF:  return {info.sign, {SP_EW{1'b1}}, {(SP_P-1){1'b0}}};
      CLS_ZERO: return {info.sign, 31'b0};
      default:  begin
        if (e >= EXPW'((1 << SP_EW) - 1))
          return {info.sign, {SP_EW{1'b1}}, {(SP_P-1){1'b0}}};
        return {info.sign, mag};
      end
    endcase
  endfunction

  always_comb begin
    if (dp_sp)
      result = pack_dp(info_hi, e_dp, sh_out, st_dp | lost_lo);
    else
      result = {pack_sp(info_hi, e_s1, sh_out[63:32], st_s1 | lost_hi),
                pack_sp(info_lo, e_s0, sh_out[31:0],  st_s0 | lost_lo)};
  end

endmodule
