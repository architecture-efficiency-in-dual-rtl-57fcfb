// Testbench for dm_prenorm: random DP and dual-SP operand pairs, subnormals
// and special values included. The reference normalises each significand
// by shifting until its leading one reaches the top of the field, derives
// the exponent of that leading bit, and classifies the quotient after
// IEEE 754; the normalised significands, sign, quotient exponent and class
// are compared for every finite non-zero lane.
module tb_dm_prenorm;
  import dm_fp_pkg::*;
  import tb_fp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [63:0] in1, in2, ma, mb;
  logic        dp_sp;
  lane_info_t  info_hi, info_lo;

  dm_prenorm dut (.*);

  typedef struct {
    logic [63:0] m;     // significand left-aligned at bit 63
    int          e;     // biased exponent of that bit
    bit          zero, inf, nan;
    bit          sign;
  } unp_t;

  function automatic unp_t unpack(input logic [63:0] x, input int p, input int ew);
    unp_t u;
    int bias, e;
    logic [63:0] f;
    bias = (1 << (ew - 1)) - 1;
    e = int'((x >> (p - 1)) & ((64'd1 << ew) - 1));
    f = x & ((64'd1 << (p - 1)) - 1);
    u.sign = x[ew + p - 1];
    u.zero = (e == 0) && (f == 0);
    u.inf  = (e == (1 << ew) - 1) && (f == 0);
    u.nan  = (e == (1 << ew) - 1) && (f != 0);
    u.m = ((e != 0) ? (64'd1 << (p - 1)) | f : f) << (64 - p);
    u.e = (e == 0) ? 1 : e;
    if (!u.zero)
      while (!u.m[63]) begin
        u.m = u.m << 1;
        u.e--;
      end
    return u;
  endfunction

  function automatic res_cls_e cls_of(input unp_t a, input unp_t b);
    if (a.nan || b.nan || (a.zero && b.zero) || (a.inf && b.inf)) return CLS_NAN;
    if (a.inf || b.zero) return CLS_INF;
    if (a.zero || b.inf) return CLS_ZERO;
    return CLS_NUM;
  endfunction

  task automatic check_lane(input logic [63:0] x, input logic [63:0] y, input int p,
                            input int ew, input logic [63:0] gm_a, input logic [63:0] gm_b,
                            input lane_info_t info, input string tag);
    unp_t a, b;
    int bias;
    bias = (1 << (ew - 1)) - 1;
    a = unpack(x, p, ew);
    b = unpack(y, p, ew);
    checks++;
    if (info.cls != cls_of(a, b)) begin
      failures++;
      $display("FAIL %s class %h / %h -> %0d", tag, x, y, info.cls);
    end
    if (info.cls == CLS_NUM) begin
      checks++;
      if (gm_a != a.m || gm_b != b.m || int'(info.exp) != a.e - b.e + bias ||
          info.sign != (a.sign ^ b.sign)) begin
        failures++;
        $display("FAIL %s %h / %h: ma=%h mb=%h exp=%0d, expected %h %h %0d",
                 tag, x, y, gm_a, gm_b, info.exp, a.m, b.m, a.e - b.e + bias);
      end
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
    for (int i = 0; i < 4000; i++) begin
      dp_sp = 1'($urandom);
      if (dp_sp) begin
        in1 = rand_dp();
        in2 = rand_dp();
      end else begin
        in1 = {rand_sp(), rand_sp()};
        in2 = {rand_sp(), rand_sp()};
      end
      #1;
      if (dp_sp)
        check_lane(in1, in2, 53, 11, ma, mb, info_hi, "dp");
      else begin
        check_lane({32'b0, in1[63:32]}, {32'b0, in2[63:32]}, 24, 8,
                   {ma[63:40], 40'b0}, {mb[63:40], 40'b0}, info_hi, "sp1");
        check_lane({32'b0, in1[31:0]}, {32'b0, in2[31:0]}, 24, 8,
                   {ma[31:8], 40'b0}, {mb[31:8], 40'b0}, info_lo, "sp0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
