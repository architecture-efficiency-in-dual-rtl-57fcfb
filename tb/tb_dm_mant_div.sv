// Testbench for dm_mant_div: random normalised significands in both modes,
// checked against the exact quotient floor(A * 2^(P+1) / B) and its sticky
// bit from wide integer division, together with the start-to-done latency
// ((8 DP / 6 SP) * MUL_STAGES + 2 cycles), for MUL_STAGES = 1 and 2.
module tb_dm_mant_div;
  import dm_fp_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, dp_sp;
  logic [63:0] ma, mb;
  logic        ready [2], done [2], st_hi [2], st_lo [2];
  logic [DP_QW-1:0] q_hi [2];
  logic [SP_QW-1:0] q_lo [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    dm_mant_div #(.MUL_STAGES(g + 1)) dut (
      .clk, .rst_n, .start, .dp_sp, .ma, .mb,
      .ready (ready[g]), .done (done[g]), .q_hi (q_hi[g]), .q_lo (q_lo[g]),
      .sticky_hi (st_hi[g]), .sticky_lo (st_lo[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // exact reference
  function automatic void ref_q(input logic [52:0] a, input logic [52:0] b, input int p,
                                output logic [54:0] q, output logic st);
    logic [127:0] num;
    num = {75'b0, a} << (p + 1);
    q   = 55'(num / {75'b0, b});
    st  = (num % {75'b0, b}) != 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [52:0] a53, b53;
    logic [23:0] a1, b1, a0, b0;
    logic [54:0] eq_hi, eq_lo;
    logic        es_hi, es_lo;
    int          t0, lat [2];
    bit          got [2];
    start = 0;
    dp_sp = 1;
    ma = '0;
    mb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      dp_sp = 1'($urandom);
      a53 = {1'b1, 20'($urandom), $urandom};
      b53 = {1'b1, 20'($urandom), $urandom};
      a1 = {1'b1, 23'($urandom)};  b1 = {1'b1, 23'($urandom)};
      a0 = {1'b1, 23'($urandom)};  b0 = {1'b1, 23'($urandom)};
      case (i % 8)
        0: begin b53 = a53; b1 = a1; b0 = a0; end            // q = 1
        1: begin a53 = '1; b53 = {1'b1, 52'b0}; a1 = '1; b1 = 24'h800000; a0 = '1; b0 = 24'h800000; end
        2: begin a53 = {1'b1, 52'b0}; b53 = '1; a1 = 24'h800000; b1 = '1; a0 = 24'h800000; b0 = '1; end
        default: ;
      endcase
      if (dp_sp) begin
        ma = {a53, 11'b0};
        mb = {b53, 11'b0};
        ref_q(a53, b53, 53, eq_hi, es_hi);
      end else begin
        ma = {a1, 8'b0, a0, 8'b0};
        mb = {b1, 8'b0, b0, 8'b0};
        ref_q({29'b0, a1}, {29'b0, b1}, 24, eq_hi, es_hi);
        ref_q({29'b0, a0}, {29'b0, b0}, 24, eq_lo, es_lo);
      end
      check(ready[0] && ready[1], "ready before start");
      start = 1;
      t0 = 0;
      got = '{0, 0};
      @(negedge clk);
      start = 0;
      while (!(got[0] && got[1])) begin
        t0++;
        for (int g = 0; g < 2; g++) if (done[g] && !got[g]) begin
          got[g] = 1;
          lat[g] = t0;
          check(lat[g] == (dp_sp ? 8 : 6) * (g + 1) + 2,
                $sformatf("latency %0d stages=%0d dp=%b", lat[g], g + 1, dp_sp));
          if (dp_sp) begin
            check(q_hi[g] == eq_hi && st_hi[g] == es_hi,
                  $sformatf("dp a=%h b=%h q=%h/%b exp %h/%b", a53, b53, q_hi[g], st_hi[g], eq_hi, es_hi));
          end else begin
            check(q_hi[g][SP_QW-1:0] == eq_hi[SP_QW-1:0] && st_hi[g] == es_hi,
                  $sformatf("sp1 a=%h b=%h q=%h/%b exp %h/%b", a1, b1, q_hi[g], st_hi[g], eq_hi, es_hi));
            check(q_lo[g] == eq_lo[SP_QW-1:0] && st_lo[g] == es_lo,
                  $sformatf("sp0 a=%h b=%h q=%h/%b exp %h/%b", a0, b0, q_lo[g], st_lo[g], eq_lo, es_lo));
          end
        end
        if (t0 > 40) begin
          check(0, "no done");
          break;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
