// Dual-mode right shifter with sticky collection (64 bits, or two
// independent 32-bit lanes).
//
// Mirror image of dm_lshift: six logarithmic stages; in DP mode
// (dp_sp = 1) bits leaving the upper half enter the lower half, in dual-SP
// mode each half shifts on its own. Every bit pushed out of the bottom of a
// lane is ORed into that lane's sticky output, which the rounder needs when
// it denormalises a tiny quotient. The stage structure is this design's
// choice; the published design names the right shifter and its dual-mode use only.
//
// Interface: d, dp_sp; amt_hi = DP amount (0..63) or lane-1 amount (bit 5
// ignored); amt_lo = lane-0 amount; q = shifted word (zeros shift in);
// sticky_lo = bits lost from lane 0, or from the whole word in DP mode;
// sticky_hi = bits lost from lane 1 (SP mode only, 0 in DP mode).
// Purely combinational.
module dm_rshift (
  input  logic [63:0] d,
  input  logic        dp_sp,
  input  logic [5:0]  amt_hi,
  input  logic [4:0]  amt_lo,
  output logic [63:0] q,
  output logic        sticky_hi,
  output logic        sticky_lo
);

  logic [31:0] hi, lo, mask;
  logic [4:0]  ctl_lo;

  always_comb begin
    hi        = d[63:32];
    lo        = d[31:0];
    sticky_hi = 1'b0;
    sticky_lo = 1'b0;
    ctl_lo    = dp_sp ? amt_hi[4:0] : amt_lo;
    for (int k = 0; k < 5; k++) begin
      mask = (32'd1 << (1 << k)) - 32'd1;
      // the lower half is updated first, from the upper half before its shift
      if (ctl_lo[k]) begin
        sticky_lo = sticky_lo | (|(lo & mask));
        lo = (lo >> (1 << k)) | (dp_sp ? (hi << (32 - (1 << k))) : 32'd0);
      end
      if (amt_hi[k]) begin
        if (!dp_sp) sticky_hi = sticky_hi | (|(hi & mask));
        hi = hi >> (1 << k);
      end
    end
    if (dp_sp && amt_hi[5]) begin
      sticky_lo = sticky_lo | (|lo);
      lo = hi;
      hi = '0;
    end
    q = {hi, lo};
  end

endmodule
