// Dual-mode floating-point divider: one binary64 division or two binary32
// divisions in parallel, in three pipeline stages.
//
// The 64-bit operands in1 (dividend) and in2 (divisor) and the mode flag
// dp_sp (1 = DP, 0 = two SP lanes, lane 1 in [63:32]) enter stage 1
// (dm_prenorm): unpacking, LOD and left shift of subnormal significands,
// exponent difference and special-value classes; its result is registered.
// Stage 2 (dm_mant_div) divides the significands by series expansion on one
// dual-mode radix-4 Booth multiplier, iteratively, over several cycles.
// Stage 3 (dm_postnorm) normalises, denormalises tiny results with the
// dual-mode right shifter, rounds to nearest even and packs; its result is
// registered as the output. All of the datapath is shared between the
// DP operation and the two SP operations.
//
// Handshake: an operation is taken when in_valid && in_ready. Stage 1 holds
// one operation while stage 2 works on the previous one, and stage 3 can
// deliver an older result in the same cycle. out_valid is a one-cycle pulse
// with out_result and out_dp_sp; there is no back-pressure on the output.
// Latency from acceptance to out_valid, with MUL_STAGES = 1: 12 cycles (DP)
// and 10 cycles (SP); at full load one operation finishes every 10 (DP) or
// 8 (SP, two quotients) cycles. With MUL_STAGES = 2 the Booth array is
// split over two cycles and stage 2 takes 8 (DP) or 6 (SP) cycles more.
// The three stages and the shared dual-mode units follow the published design; the
// handshake, the timing and the single-stage multiplier default are this
// design's.
module dm_fp_div
  import dm_fp_pkg::*;
#(
  parameter int MUL_STAGES = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        dp_sp,
  input  logic [63:0] in1,
  input  logic [63:0] in2,
  output logic        out_valid,
  output logic        out_dp_sp,
  output logic [63:0] out_result
);

  // ---- stage 1 -----------------------------------------------------------
  logic [63:0] ma_c, mb_c;
  lane_info_t  ih_c, il_c;

  dm_prenorm u_pre (
    .in1 (in1), .in2 (in2), .dp_sp (dp_sp),
    .ma (ma_c), .mb (mb_c), .info_hi (ih_c), .info_lo (il_c)
  );

  logic        v1, dp1;
  logic [63:0] ma1, mb1;
  lane_info_t  ih1, il1;
  logic        md_ready, md_done, start;

  assign start    = v1 && md_ready;
  assign in_ready = !v1 || md_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      dp1 <= 1'b1;
      ma1 <= '0;
      mb1 <= '0;
      ih1 <= '0;
      il1 <= '0;
    end else if (in_ready) begin
      v1 <= in_valid;
      if (in_valid) begin
        dp1 <= dp_sp;
        ma1 <= ma_c;
        mb1 <= mb_c;
        ih1 <= ih_c;
        il1 <= il_c;
      end
    end
  end

  // ---- stage 2 -----------------------------------------------------------
  logic             dp2;
  lane_info_t       ih2, il2;
  logic [DP_QW-1:0] q_hi;
  logic [SP_QW-1:0] q_lo;
  logic             st_hi, st_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp2 <= 1'b1;
      ih2 <= '0;
      il2 <= '0;
    end else if (start) begin
      dp2 <= dp1;
      ih2 <= ih1;
      il2 <= il1;
    end
  end

  dm_mant_div #(.MUL_STAGES(MUL_STAGES)) u_mdiv (
    .clk (clk), .rst_n (rst_n), .start (start), .dp_sp (dp1),
    .ma (ma1), .mb (mb1), .ready (md_ready), .done (md_done),
    .q_hi (q_hi), .q_lo (q_lo), .sticky_hi (st_hi), .sticky_lo (st_lo)
  );

  // ---- stage 3 -----------------------------------------------------------
  logic [63:0] res_c;

  dm_postnorm u_post (
    .dp_sp (dp2), .info_hi (ih2), .info_lo (il2),
    .q_hi (q_hi), .q_lo (q_lo), .sticky_hi (st_hi), .sticky_lo (st_lo),
    .result (res_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_dp_sp  <= 1'b1;
      out_result <= '0;
    end else begin
      out_valid <= md_done;
      if (md_done) begin
        out_dp_sp  <= dp2;
        out_result <= res_c;
      end
    end
  end

endmodule
