// Reference arithmetic for the divider testbenches, written independently
// of the RTL: bit-serial round-to-nearest-even packing of an exact value,
// exact SP -> DP widening, DP -> SP rounding, and reference quotients.
// DP quotients come from the simulator's own binary64 division, SP
// quotients from the binary64 quotient rounded once more to binary32,
// which gives the correctly rounded binary32 quotient because 53 >= 2*24+2.
// NaN results are returned as the canonical quiet NaN.
package tb_fp_ref_pkg;

  localparam logic [63:0] REF_DP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [31:0] REF_SP_QNAN = 32'h7FC0_0000;

  // Round x * 2^scale (x > 0; its LSB may be a sticky bit provided at
  // least two bits are dropped) to a format with p significand bits and
  // ew exponent bits, round to nearest even, and pack it.
  function automatic logic [63:0] round_pack(input logic sign, input logic [127:0] x,
                                             input int scale, input int p, input int ew);
    int lead, e, bias, emin, kept, n, emaxf;
    logic [127:0] keep, rem, half, k;
    logic [63:0]  r;
    bias  = (1 << (ew - 1)) - 1;
    emin  = 1 - bias;
    emaxf = (1 << ew) - 1;
    r     = 64'(sign) << (ew + p - 1);
    if (x == 0) return r;
    lead = 127;
    while (!x[lead]) lead--;
    e    = lead + scale;
    kept = (e >= emin) ? p : p - (emin - e);
    n    = lead + 1 - kept;
    if (kept < 0) k = '0;
    else if (n <= 0) k = x << (-n);
    else begin
      keep = x >> n;
      rem  = x & ((128'd1 << n) - 128'd1);
      half = 128'd1 << (n - 1);
      k    = keep + (((rem > half) || (rem == half && keep[0])) ? 128'd1 : 128'd0);
    end
    if (kept == p) begin
      if (k == (128'd1 << p)) begin
        k = k >> 1;
        e++;
      end
      if (e + bias >= emaxf) return r | (64'(emaxf) << (p - 1));
      return r | (64'(e + bias) << (p - 1)) | (k[63:0] & ((64'd1 << (p - 1)) - 64'd1));
    end
    return r | k[63:0];
  endfunction

  function automatic logic is_nan_dp(input logic [63:0] d);
    return (d[62:52] == 11'h7FF) && (d[51:0] != 0);
  endfunction

  function automatic logic is_nan_sp(input logic [31:0] s);
    return (s[30:23] == 8'hFF) && (s[22:0] != 0);
  endfunction

  function automatic logic [63:0] sp_to_dp(input logic [31:0] s);
    if (s[30:23] == 8'hFF)
      return {s[31], 11'h7FF, s[22:0], 29'b0};
    if (s[30:23] == 0)
      return round_pack(s[31], {105'b0, s[22:0]}, -149, 53, 11);
    return {s[31], 11'(int'(s[30:23]) + 896), s[22:0], 29'b0};
  endfunction

  function automatic logic [31:0] dp_to_sp(input logic [63:0] d);
    logic [63:0] r;
    if (is_nan_dp(d)) return REF_SP_QNAN;
    if (d[62:52] == 11'h7FF) return {d[63], 8'hFF, 23'b0};
    if (d[62:52] == 0)
      r = round_pack(d[63], {76'b0, d[51:0]}, -1074, 24, 8);
    else
      r = round_pack(d[63], {75'b0, 1'b1, d[51:0]}, int'(d[62:52]) - 1075, 24, 8);
    return r[31:0];
  endfunction

  function automatic logic [63:0] ref_div_dp(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] r;
    r = $realtobits($bitstoreal(a) / $bitstoreal(b));
    return is_nan_dp(r) ? REF_DP_QNAN : r;
  endfunction

  function automatic logic [31:0] ref_div_sp(input logic [31:0] a, input logic [31:0] b);
    return dp_to_sp(ref_div_dp(sp_to_dp(a), sp_to_dp(b)));
  endfunction

  // Random operands biased towards the interesting regions: ordinary
  // numbers, exponents near both ends, subnormals, zeros, infinities, NaNs.
  function automatic logic [63:0] rand_dp();
    int unsigned k;
    logic [51:0] f;
    logic [10:0] e;
    k = $urandom_range(99);
    f = 52'({$urandom, $urandom});
    if (k < 50)      e = 11'($urandom_range(1023 + 300, 1023 - 300));
    else if (k < 65) e = 11'($urandom_range(60, 1));
    else if (k < 80) e = 11'($urandom_range(2046, 1990));
    else if (k < 90) e = 11'd0;                         // subnormal
    else if (k < 93) begin e = 11'd0; f = '0; end       // zero
    else if (k < 96) begin e = 11'h7FF; f = '0; end     // infinity
    else if (k < 98) begin e = 11'h7FF; f[51] = 1'b1; end // NaN
    else             e = 11'($urandom_range(2046, 1));
    if (k >= 85 && k < 90) f = f >> $urandom_range(51);  // deep subnormal
    return {1'($urandom), e, f};
  endfunction

  function automatic logic [31:0] rand_sp();
    int unsigned k;
    logic [22:0] f;
    logic [7:0]  e;
    k = $urandom_range(99);
    f = 23'($urandom);
    if (k < 50)      e = 8'($urandom_range(127 + 40, 127 - 40));
    else if (k < 65) e = 8'($urandom_range(30, 1));
    else if (k < 80) e = 8'($urandom_range(254, 225));
    else if (k < 90) e = 8'd0;
    else if (k < 93) begin e = 8'd0; f = '0; end
    else if (k < 96) begin e = 8'hFF; f = '0; end
    else if (k < 98) begin e = 8'hFF; f[22] = 1'b1; end
    else             e = 8'($urandom_range(254, 1));
    if (k >= 85 && k < 90) f = f >> $urandom_range(22);
    return {1'($urandom), e, f};
  endfunction

endpackage
