// Dual-mode radix-4 modified Booth multiplier, W x W bits (W = 64).
//
// The multiplier b is recoded into W/2+1 radix-4 digits in {-2..+2}; digit j
// looks at bits b[2j+1], b[2j], b[2j-1] and selects 0, +-a or +-2a, shifted
// left by 2j. The partial products are summed into a 2W-bit product.
//
// Dual-mode operation: in DP mode (dp_sp = 1) this is a plain unsigned
// W x W multiplier. In dual-SP mode each 64-bit operand holds two 32-bit
// lanes; digits 0..W/4-1 (the lower lane of b) see only the lower lane of a,
// digits W/4..W/2 see only the upper lane of a, so no cross products arise
// and p[127:64] = a[63:32]*b[63:32], p[63:0] = a[31:0]*b[31:0]. For this to
// hold, b[31] must be 0 in SP mode, so SP lane operands are at most 31 bits
// wide (the mantissa divider uses 31-bit lanes). This lane masking is this
// design's way of sharing one Booth array between the modes; the published design names
// the dual-mode radix-4 Booth multiplier but does not show its insides.
//
// STAGES = 1: combinational, one product per cycle in the caller's register.
// STAGES = 2: the two halves of the partial-product array are summed and
// registered, and the final addition follows in the next cycle, so p is
// valid one clock after the operands (which must be held for that clock).
module dm_booth_mul #(
  parameter int W      = 64,
  parameter int STAGES = 1
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           dp_sp,
  output logic [2*W-1:0] p
);

  localparam int ND    = W / 2 + 1;   // radix-4 digits of an unsigned W-bit b
  localparam int LANE1 = W / 4;       // first digit of the upper SP lane
  localparam int SPLIT = ND / 2;      // rows summed in the first half (STAGES = 2)

  if (STAGES != 1 && STAGES != 2) begin : g_bad_stages
    $error("dm_booth_mul: STAGES must be 1 or 2");
  end

  // One Booth row: digit from the bit triple, times m, at weight 4^j.
  function automatic logic [2*W-1:0] booth_row(input logic [2:0] trip,
                                               input logic [W-1:0] m,
                                               input int j);
    logic [2*W-1:0] mm, v;
    mm = {{W{1'b0}}, m};
    unique case (trip)
      3'b001, 3'b010: v = mm;
      3'b011:         v = mm << 1;
      3'b100:         v = -(mm << 1);
      3'b101, 3'b110: v = -mm;
      default:        v = '0;          // 000, 111
    endcase
    return v << (2 * j);
  endfunction

  logic [W+2:0]   bext;
  logic [W-1:0]   a_lo, a_hi;
  logic [2*W-1:0] sum_a, sum_b;

  always_comb begin
    bext = {2'b00, b, 1'b0};
    a_lo = dp_sp ? a : {{(W/2){1'b0}}, a[W/2-1:0]};
    a_hi = dp_sp ? a : {a[W-1:W/2], {(W/2){1'b0}}};
    sum_a = '0;
    sum_b = '0;
    for (int j = 0; j < ND; j++) begin
      if (j < SPLIT) sum_a = sum_a + booth_row(bext[2*j +: 3], (j < LANE1) ? a_lo : a_hi, j);
      else           sum_b = sum_b + booth_row(bext[2*j +: 3], (j < LANE1) ? a_lo : a_hi, j);
    end
  end

  if (STAGES == 1) begin : g_comb
    assign p = sum_a + sum_b;
  end else begin : g_pipe
    logic [2*W-1:0] sum_a_q, sum_b_q;
    always_ff @(posedge clk) begin
      sum_a_q <= sum_a;
      sum_b_q <= sum_b;
    end
    assign p = sum_a_q + sum_b_q;
  end

endmodule
