// Dual-mode 64:6 leading-one detector.
//
// Two 32:5 LODs (lod_tree) look at the upper and lower halves of the
// 64-bit word. In dual-SP mode (dp_sp = 0) each works alone on its own SP
// lane. In DP mode (dp_sp = 1) their outputs are combined into the 6-bit
// count of the whole word: the upper count when the upper half holds a one,
// otherwise 32 plus the lower count. No logic is spent on DP alone beyond
// this final combination, so both modes share all of the detector.
//
// Interface: d, dp_sp; cnt_hi = DP count (DP mode) or lane-1 count with a
// zero MSB (SP mode); cnt_lo = lane-0 count; zero_hi / zero_lo flag an
// all-zero word (DP) or lane. Purely combinational.
module dm_lod (
  input  logic [63:0] d,
  input  logic        dp_sp,
  output logic [5:0]  cnt_hi,
  output logic [4:0]  cnt_lo,
  output logic        zero_hi,
  output logic        zero_lo
);

  logic       v_hi, v_lo;
  logic [4:0] c_hi, c_lo;

  lod_tree #(.W(32)) u_lod_hi (.d(d[63:32]), .valid(v_hi), .cnt(c_hi));
  lod_tree #(.W(32)) u_lod_lo (.d(d[31:0]),  .valid(v_lo), .cnt(c_lo));

  always_comb begin
    if (dp_sp) begin
      cnt_hi  = v_hi ? {1'b0, c_hi} : {1'b1, c_lo};
      zero_hi = ~(v_hi | v_lo);
    end else begin
      cnt_hi  = {1'b0, c_hi};
      zero_hi = ~v_hi;
    end
    cnt_lo  = c_lo;
    zero_lo = ~v_lo;
  end

endmodule
