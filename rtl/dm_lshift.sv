// Dual-mode dynamic left shifter (64 bits, or two independent 32-bit lanes).
//
// A logarithmic shifter in six stages (1, 2, 4, 8, 16, 32 bits). Each of the
// first five stages shifts both 32-bit halves; in DP mode (dp_sp = 1) the
// bits leaving the lower half enter the upper half and both halves follow
// the same amount, so the pair acts as one 64-bit shifter. In dual-SP mode
// the crossing path is cut and each half follows its own amount. The 32-bit
// stage is used only in DP mode. The stage structure is this design's
// choice; the published design gives only the shifter's function.
//
// Interface: d, dp_sp; amt_hi = DP amount (0..63) or lane-1 amount
// (0..31, bit 5 ignored); amt_lo = lane-0 amount (SP mode only). Zeros
// shift in. Purely combinational.
module dm_lshift (
  input  logic [63:0] d,
  input  logic        dp_sp,
  input  logic [5:0]  amt_hi,
  input  logic [4:0]  amt_lo,
  output logic [63:0] q
);

  logic [31:0] hi, lo;
  logic [4:0]  ctl_lo;

  always_comb begin
    hi     = d[63:32];
    lo     = d[31:0];
    ctl_lo = dp_sp ? amt_hi[4:0] : amt_lo;
    for (int k = 0; k < 5; k++) begin
      // the upper half is updated first, from the lower half before its shift
      if (amt_hi[k])
        hi = (hi << (1 << k)) | (dp_sp ? (lo >> (32 - (1 << k))) : 32'd0);
      if (ctl_lo[k])
        lo = lo << (1 << k);
    end
    if (dp_sp && amt_hi[5]) begin
      hi = lo;
      lo = '0;
    end
    q = {hi, lo};
  end

endmodule
