// Dual-mode iterative mantissa divider (stage 2 of the divider).
//
// Computes q = a/b for normalised significands a, b in [1, 2): one DP pair
// or two SP pairs at once. It uses the series-expansion (Goldschmidt) form
// of multiplicative division on one shared dual-mode Booth multiplier:
//   x0 = seed(b) from recip_rom,  D0 = b*x0,  N0 = a*x0,
//   F_i = 2 - D_i,  N_i+1 = N_i*F_i,  D_i+1 = D_i*F_i,
// which multiplies a*x0 by (1+e)(1+e^2)(1+e^4)... with e = 1 - b*x0. The
// seed is good to about 8.4 bits, so SP needs two and DP three iterations.
// The same multiplier then forms Qc*B for the truncated candidate
// Qc = floor(N * 2^(P+1)). The remainder R = A*2^(P+1) - Qc*B, taken modulo
// 2^(P+3), moves Qc by one step if needed and gives the sticky bit. The
// quotient is therefore exact: Q = floor(q*2^(P+1)) plus sticky = (R != 0),
// which is what correct rounding needs.
//
// Fixed-point words: DP uses Q2.61 in bits [62:0]; each SP lane uses Q2.29
// in its 31 low bits (lane 1 in [63:32], lane 0 in [31:0]), so the Booth
// lane rule (bit 31 clear) always holds.
//
// Sequence, one multiplication per MUL_STAGES cycles:
//   DP: D0 N0 N1 D1 N2 D2 N3 REM  (8)     SP: D0 N0 N1 D1 N2 REM  (6)
// The published design gives the method (series expansion on an iterated dual-mode
// Booth multiplier); the seed table, the iteration counts, the word formats
// and the remainder correction are this design's.
//
// Interface: start (only when ready) with dp_sp, ma, mb; ma/mb hold the
// significands left-aligned as the stage-1 shifter leaves them (DP in
// [63:11], SP lane 1 in [63:40], lane 0 in [31:8]). done pulses with
// q_hi (DP quotient, or lane 1 in [25:0]), q_lo (lane 0) and the sticky bits.
// Latency start -> done: (8 DP / 6 SP) * MUL_STAGES + 2 cycles; ready rises
// in the cycle done is high, so a new start can follow at once.
module dm_mant_div
  import dm_fp_pkg::*;
#(
  parameter int MUL_STAGES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dp_sp,
  input  logic [63:0]      ma,
  input  logic [63:0]      mb,
  output logic             ready,
  output logic             done,
  output logic [DP_QW-1:0] q_hi,
  output logic [SP_QW-1:0] q_lo,
  output logic             sticky_hi,
  output logic             sticky_lo
);

  localparam int DP_STEPS = 8;
  localparam int SP_STEPS = 6;

  typedef enum logic [2:0] {OP_DX, OP_NX, OP_NF, OP_DF, OP_REM} op_e;
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;

  typedef struct packed {
    logic [DP_QW-1:0] q;
    logic             st;
  } fix_t;

  function automatic op_e op_at(input logic dp, input logic [3:0] s);
    if (s == 4'd0) return OP_DX;
    if (s == 4'd1) return OP_NX;
    if (dp) begin
      if (s == 4'd7) return OP_REM;
      return s[0] ? OP_DF : OP_NF;     // 2:NF 3:DF 4:NF 5:DF 6:NF
    end
    if (s == 4'd5) return OP_REM;
    return s[0] ? OP_DF : OP_NF;       // 2:NF 3:DF 4:NF
  endfunction

  // One step of quotient correction from a signed remainder.
  function automatic fix_t fix(input logic [DP_QW-1:0] qc,
                               input logic signed [55:0] r,
                               input logic [DP_P-1:0] b);
    fix_t f;
    logic signed [55:0] r2, bs;
    bs = $signed({3'b000, b});
    if (r < 0) begin
      f.q = qc - 1'b1;
      r2  = r + bs;
    end else if (r >= bs) begin
      f.q = qc + 1'b1;
      r2  = r - bs;
    end else begin
      f.q = qc;
      r2  = r;
    end
    f.st = (r2 != 0);
    return f;
  endfunction

  state_e               state;
  logic                 dp_r;
  logic [3:0]           step;
  logic [1:0]           wcnt;
  logic [DP_P-1:0]      a_hi, b_hi;     // DP significand, or SP lane 1 in [23:0]
  logic [SP_P-1:0]      a_lo, b_lo;     // SP lane 0
  logic [63:0]          d_r, n_r;
  logic [55:0]          p_hi;           // low remainder-product bits
  logic [26:0]          p_lo;

  // ---- operand formation -------------------------------------------------
  logic [9:0]   x1, x0;
  logic [63:0]  fa, fb, xw, fw, ra, rb, mul_a, mul_b, ext;
  logic [127:0] prod;
  logic [31:0]  f1, f0;
  op_e          op;

  recip_rom #(.IDXW(8), .OUTW(10)) u_seed (
    .idx1 (dp_r ? b_hi[51:44] : b_hi[22:15]),
    .idx0 (b_lo[22:15]),
    .x1   (x1),
    .x0   (x0)
  );

  always_comb begin
    op = op_at(dp_r, step);
    f1 = (32'd1 << 30) - d_r[63:32];
    f0 = (32'd1 << 30) - d_r[31:0];
    if (dp_r) begin
      fa = {2'b00, a_hi, 9'b0};
      fb = {2'b00, b_hi, 9'b0};
      xw = {3'b000, x1, 51'b0};
      fw = (64'd1 << 62) - d_r;
      ra = {9'b0, n_r[61:7]};
      rb = {11'b0, b_hi};
    end else begin
      fa = {2'b00, a_hi[SP_P-1:0], 6'b0, 2'b00, a_lo, 6'b0};
      fb = {2'b00, b_hi[SP_P-1:0], 6'b0, 2'b00, b_lo, 6'b0};
      xw = {3'b000, x1, 19'b0, 3'b000, x0, 19'b0};
      fw = {1'b0, f1[30:0], 1'b0, f0[30:0]};
      ra = {6'b0, n_r[61:36], 6'b0, n_r[29:4]};
      rb = {8'b0, b_hi[SP_P-1:0], 8'b0, b_lo};
    end
    unique case (op)
      OP_DX:   begin mul_a = fb;  mul_b = xw; end
      OP_NX:   begin mul_a = fa;  mul_b = xw; end
      OP_NF:   begin mul_a = n_r; mul_b = fw; end
      OP_DF:   begin mul_a = d_r; mul_b = fw; end
      default: begin mul_a = ra;  mul_b = rb; end
    endcase
  end

  dm_booth_mul #(.W(64), .STAGES(MUL_STAGES)) u_mul (
    .clk   (clk),
    .a     (mul_a),
    .b     (mul_b),
    .dp_sp (dp_r),
    .p     (prod)
  );

  // Q4.122 -> Q2.61 (DP), Q4.58 -> Q2.29 per lane (SP), truncating
  assign ext = dp_r ? {1'b0, prod[123:61]}
                    : {1'b0, prod[123:93], 1'b0, prod[59:29]};

  // ---- remainder correction ----------------------------------------------
  logic [55:0] r_dp;
  logic [26:0] r_s1, r_s0;
  fix_t        fx_dp, fx_s1, fx_s0;

  always_comb begin
    r_dp  = {a_hi[1:0], 54'b0} - p_hi;
    r_s1  = {a_hi[1:0], 25'b0} - p_hi[26:0];
    r_s0  = {a_lo[1:0], 25'b0} - p_lo;
    fx_dp = fix(n_r[61:7], $signed(r_dp), b_hi);
    fx_s1 = fix({29'b0, n_r[61:36]}, $signed({{29{r_s1[26]}}, r_s1}),
                {29'b0, b_hi[SP_P-1:0]});
    fx_s0 = fix({29'b0, n_r[29:4]}, $signed({{29{r_s0[26]}}, r_s0}),
                {29'b0, b_lo});
  end

  // ---- control -----------------------------------------------------------
  logic last_step, mul_ready;
  assign mul_ready = (wcnt == 2'(MUL_STAGES - 1));
  assign last_step = dp_r ? (step == 4'(DP_STEPS - 1)) : (step == 4'(SP_STEPS - 1));
  assign ready     = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dp_r      <= 1'b1;
      step      <= '0;
      wcnt      <= '0;
      done      <= 1'b0;
      a_hi      <= '0;
      b_hi      <= '0;
      a_lo      <= '0;
      b_lo      <= '0;
      d_r       <= '0;
      n_r       <= '0;
      p_hi      <= '0;
      p_lo      <= '0;
      q_hi      <= '0;
      q_lo      <= '0;
      sticky_hi <= 1'b0;
      sticky_lo <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          dp_r  <= dp_sp;
          step  <= '0;
          wcnt  <= '0;
          if (dp_sp) begin
            a_hi <= ma[63:11];
            b_hi <= mb[63:11];
          end else begin
            a_hi <= {29'b0, ma[63:40]};
            b_hi <= {29'b0, mb[63:40]};
          end
          a_lo <= ma[31:8];
          b_lo <= mb[31:8];
        end
        S_RUN: begin
          if (mul_ready) begin
            wcnt <= '0;
            unique case (op)
              OP_DX, OP_DF: d_r <= ext;
              OP_NX, OP_NF: n_r <= ext;
              default: begin
                p_hi <= dp_r ? prod[55:0] : {29'b0, prod[90:64]};
                p_lo <= prod[26:0];
              end
            endcase
            if (last_step) state <= S_FIN;
            else           step  <= step + 4'd1;
          end else begin
            wcnt <= wcnt + 2'd1;
          end
        end
        default: begin          // S_FIN
          state <= S_IDLE;
          done  <= 1'b1;
          if (dp_r) begin
            q_hi      <= fx_dp.q;
            sticky_hi <= fx_dp.st;
            q_lo      <= '0;
            sticky_lo <= 1'b0;
          end else begin
            q_hi      <= {29'b0, fx_s1.q[SP_QW-1:0]};
            sticky_hi <= fx_s1.st;
            q_lo      <= fx_s0.q[SP_QW-1:0];
            sticky_lo <= fx_s0.st;
          end
        end
      endcase
    end
  end

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("dm_mant_div: start while busy");

endmodule
