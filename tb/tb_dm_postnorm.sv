// Testbench for dm_postnorm: random exact quotients Q (with q >= 1 and
// q < 1), sticky bits and quotient exponents spanning overflow, the normal
// range, the subnormal range and total underflow, in DP and dual-SP mode.
// The reference rounds the exact value {Q, sticky} * 2^(exp - bias - P - 2)
// bit by bit to nearest even (tb_fp_ref_pkg::round_pack); special classes
// must give the IEEE special results.
module tb_dm_postnorm;
  import dm_fp_pkg::*;
  import tb_fp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic             dp_sp, sticky_hi, sticky_lo;
  lane_info_t       info_hi, info_lo;
  logic [DP_QW-1:0] q_hi;
  logic [SP_QW-1:0] q_lo;
  logic [63:0]      result;

  dm_postnorm dut (.*);

  function automatic lane_info_t rand_info(input int bias, input int emaxf, input int p);
    lane_info_t f;
    int k;
    k = $urandom_range(99);
    f.sign = 1'($urandom);
    if (k < 30)      f.exp = EXPW'($urandom_range(emaxf - 2, 2));
    else if (k < 45) f.exp = EXPW'($urandom_range(emaxf + 3, emaxf - 3));
    else if (k < 75) f.exp = EXPW'(3 - int'($urandom_range(p + 3)));
    else if (k < 85) f.exp = EXPW'(-int'($urandom_range(1200)));
    else             f.exp = EXPW'($urandom_range(emaxf, 1));
    f.cls = (k >= 95) ? res_cls_e'($urandom_range(3, 1)) : CLS_NUM;
    return f;
  endfunction

  function automatic logic [63:0] expect_lane(input lane_info_t f, input logic [54:0] q,
                                              input logic st, input int p, input int ew);
    int bias;
    logic [63:0] s;
    bias = (1 << (ew - 1)) - 1;
    s = 64'(f.sign) << (ew + p - 1);
    unique case (f.cls)
      CLS_NAN:  return (ew == 11) ? REF_DP_QNAN : {32'b0, REF_SP_QNAN};
      CLS_INF:  return s | (64'((1 << ew) - 1) << (p - 1));
      CLS_ZERO: return s;
      default:  return round_pack(f.sign, {72'b0, q, st}, int'(f.exp) - bias - p - 2, p, ew);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    logic [54:0] qr;
    for (int i = 0; i < 6000; i++) begin
      dp_sp = 1'($urandom);
      sticky_hi = 1'($urandom);
      sticky_lo = 1'($urandom);
      if (dp_sp) begin
        qr = 55'({$urandom, $urandom});
        qr[54] = 1'($urandom);
        qr[53] = qr[53] | !qr[54];
        if ($urandom_range(3) == 0) qr[52:0] = ($urandom_range(1) == 1) ? '1 : {qr[52:3], 3'b100};
        q_hi = qr;
        q_lo = 26'($urandom);
        info_hi = rand_info(1023, 2047, 53);
        info_lo = info_hi;
        #1;
        e = expect_lane(info_hi, q_hi, sticky_hi, 53, 11);
        check(result == e, $sformatf("dp q=%h st=%b exp=%0d cls=%0d -> %h, expected %h",
                                     q_hi, sticky_hi, info_hi.exp, info_hi.cls, result, e));
      end else begin
        qr = 55'($urandom);
        qr[25] = 1'($urandom);
        qr[24] = qr[24] | !qr[25];
        if ($urandom_range(3) == 0) qr[23:0] = '1;
        q_hi = {29'b0, qr[25:0]};
        qr = 55'($urandom);
        qr[25] = 1'($urandom);
        qr[24] = qr[24] | !qr[25];
        q_lo = qr[25:0];
        info_hi = rand_info(127, 255, 24);
        info_lo = rand_info(127, 255, 24);
        #1;
        e = expect_lane(info_hi, {29'b0, q_hi[25:0]}, sticky_hi, 24, 8);
        check(result[63:32] == e[31:0], $sformatf("sp1 q=%h st=%b exp=%0d cls=%0d -> %h, expected %h",
                                   q_hi[25:0], sticky_hi, info_hi.exp, info_hi.cls, result[63:32], e[31:0]));
        e = expect_lane(info_lo, {29'b0, q_lo}, sticky_lo, 24, 8);
        check(result[31:0] == e[31:0], $sformatf("sp0 q=%h st=%b exp=%0d cls=%0d -> %h, expected %h",
                                   q_lo, sticky_lo, info_lo.exp, info_lo.cls, result[31:0], e[31:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
