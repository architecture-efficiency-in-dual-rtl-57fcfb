// Seed table for the series-expansion divider: an approximation of 1/b.
//
// Indexed by the 8 fraction bits of b in [1, 2) that follow the leading one,
// it returns x0 = round(2^10 / b_mid) in units of 2^-10, where b_mid is the
// centre of the table interval, (2*i + 513) / 512. Entries lie in
// [513, 1022], so x0 is in (0.5, 1), and |1 - b*x0| < 1.5 * 2^-9. The
// entries are computed at elaboration from that formula; nothing is read
// from a file. Two read ports serve the two SP lanes (port 1 also serves a
// DP divisor). The published design mentions a look-up table for the first
// approximation only in passing; its size and contents are this design's.
//
// Combinational.
module recip_rom #(
  parameter int IDXW = 8,
  parameter int OUTW = 10
) (
  input  logic [IDXW-1:0] idx1,
  input  logic [IDXW-1:0] idx0,
  output logic [OUTW-1:0] x1,
  output logic [OUTW-1:0] x0
);

  localparam int N = 1 << IDXW;

  // round(2^OUTW / ((2i + 2^(IDXW+1) + 1) / 2^(IDXW+1)))
  function automatic logic [OUTW-1:0] entry(input int i);
    longint num, den;
    den = 2 * i + (1 << (IDXW + 1)) + 1;
    num = longint'(1) << (OUTW + IDXW + 1);
    return OUTW'((2 * num + den) / (2 * den));
  endfunction

  logic [OUTW-1:0] rom [N];

  for (genvar i = 0; i < N; i++) begin : g_rom
    assign rom[i] = entry(i);
  end

  assign x1 = rom[idx1];
  assign x0 = rom[idx0];

endmodule
