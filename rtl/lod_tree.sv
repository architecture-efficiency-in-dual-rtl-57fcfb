// Leading-one detector of W bits, built as a binary tree of 2:1 LOD cells.
//
// Level 1 holds W/2 leaf cells. A leaf looks at two bits d[1:0]:
// valid = d1 | d0 (OR) and the leading-one position counted from the MSB
// is ~d1 & d0 (NOT and AND). Each higher level joins pairs of nodes: a
// node is valid when either child is; its count's MSB is set when the upper
// child holds no one, and its lower count bits come from the upper child if
// that child is valid, from the lower child otherwise. After log2(W) levels
// the root gives the count for the whole word. W must be a power of two;
// W = 32 gives the 32:5 LOD of the dual-mode 64:6 LOD. The leaf gate set
// follows the description of the 2:1 LOD building block; the node
// multiplexer is the usual way to join halves.
//
// Interface: d (data), valid (d has a one), cnt (number of leading zeros,
// meaningful only when valid). Purely combinational.
module lod_tree #(
  parameter int W = 32
) (
  input  logic [W-1:0]         d,
  output logic                 valid,
  output logic [$clog2(W)-1:0] cnt
);

  localparam int L = $clog2(W);

  if (W < 2 || (W & (W - 1)) != 0) begin : g_bad_width
    $error("lod_tree: W must be a power of two of at least 2");
  end

  // node i of level k covers d[(i+1)*2^k-1 : i*2^k]; its count has k bits
  logic [L:1][W/2-1:0]        v;
  logic [L:1][W/2-1:0][L-1:0] c;

  always_comb begin
    v = '0;
    c = '0;
    for (int i = 0; i < W / 2; i++) begin
      v[1][i] = d[2*i+1] | d[2*i];
      c[1][i][0] = ~d[2*i+1] & d[2*i];
    end
    for (int k = 2; k <= L; k++) begin
      for (int i = 0; i < (W >> k); i++) begin
        v[k][i] = v[k-1][2*i+1] | v[k-1][2*i];
        c[k][i] = v[k-1][2*i+1] ? c[k-1][2*i+1]
                                : (L'(1) << (k - 1)) | c[k-1][2*i];
      end
    end
  end

  assign valid = v[L][0];
  assign cnt   = c[L][0];

endmodule
