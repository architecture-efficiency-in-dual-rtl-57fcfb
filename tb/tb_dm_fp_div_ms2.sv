// End-to-end testbench for dm_fp_div built with the two-stage Booth
// multiplier (MUL_STAGES = 2); otherwise the same as tb_dm_fp_div.
//
// Phase 1 issues directed and random operations one at a time and checks
// each result and the acceptance-to-result latency (4 + 8*MS cycles DP,
// 4 + 6*MS SP, with MS multiplier stages: 12 and 10 at the defaults).
// Phase 2 streams random DP and dual-SP operations with random gaps,
// checks every result in order against the reference quotient (binary64
// division of the simulator, and for SP that quotient rounded to binary32),
// and checks that a saturated DP stream delivers one result per 10 cycles
// and a saturated SP stream one pair per 8 cycles (2 + 8*MS, 2 + 6*MS).
// It counts how often each mechanism of the design occurs and counts a
// failure for any that never does: DP and SP operations, mode switches,
// subnormal operands (LOD and left shift at work), subnormal results
// (right shift), rounding up, overflow to infinity, special operands,
// quotient correction in the mantissa divider, and input stalls while
// stage 2 is busy.
module tb_dm_fp_div_ms2;
  import dm_fp_pkg::*;
  import tb_fp_ref_pkg::*;
  localparam int MS = 2;   // multiplier stages of the device under test
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_ready, dp_sp, out_valid, out_dp_sp;
  logic [63:0] in1, in2, out_result;

  always #5 clk = ~clk;

  dm_fp_div #(.MUL_STAGES(MS)) dut (.*);

  typedef struct {
    logic        dp;
    logic [63:0] a, b, r;
    int          t_in;
  } op_t;

  op_t q[$];
  int  cycle = 0;
  int  last_out = -1;
  int  n_dp = 0, n_sp = 0, n_switch = 0, n_sub_in = 0, n_sub_out = 0, n_round_up = 0;
  int  n_ovf = 0, n_special = 0, n_corr = 0, n_stall = 0, n_lat = 0, n_rate = 0;
  logic last_mode = 1'b1;
  bit   have_last = 0;
  bit   check_latency = 0;
  int   rate_mode = -1;     // 1: saturated DP stream, 0: saturated SP stream

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic bit is_sub(input logic [63:0] x, input bit dp);
    if (dp) return x[62:52] == 0 && x[51:0] != 0;
    return x[30:23] == 0 && x[22:0] != 0;
  endfunction

  function automatic bit is_special(input logic [63:0] x, input bit dp);
    if (dp) return x[62:52] == '1 || x[62:0] == 0;
    return x[30:23] == '1 || x[30:0] == 0;
  endfunction

  function automatic bit is_inf(input logic [63:0] x, input bit dp);
    if (dp) return x[62:0] == 63'h7FF0_0000_0000_0000;
    return x[30:0] == 31'h7F80_0000;
  endfunction

  // quotient truncated to P bits, to see whether rounding went up
  function automatic bit rounded_up(input logic [63:0] a, input logic [63:0] b,
                                    input logic [63:0] r, input bit dp);
    if (dp) begin
      if (is_special(a, 1) || is_special(b, 1) || r[62:52] == '1) return 0;
      return $bitstoreal({1'b0, r[62:0]}) > ($bitstoreal({1'b0, a[62:0]}) / $bitstoreal({1'b0, b[62:0]}));
    end
    if (is_special(a, 0) || is_special(b, 0) || r[30:23] == '1) return 0;
    return $bitstoreal(sp_to_dp({1'b0, r[30:0]})) >
           ($bitstoreal(sp_to_dp({1'b0, a[30:0]})) / $bitstoreal(sp_to_dp({1'b0, b[30:0]})));
  endfunction

  function automatic op_t make_op(input logic dp, input logic [63:0] a, input logic [63:0] b);
    op_t o;
    o.dp = dp;
    o.a  = a;
    o.b  = b;
    if (dp) o.r = ref_div_dp(a, b);
    else    o.r = {ref_div_sp(a[63:32], b[63:32]), ref_div_sp(a[31:0], b[31:0])};
    return o;
  endfunction

  function automatic op_t rand_op(input int mode);
    logic dp;
    dp = (mode < 0) ? 1'($urandom) : 1'(mode);
    if (dp) return make_op(1, rand_dp(), rand_dp());
    return make_op(0, {rand_sp(), rand_sp()}, {rand_sp(), rand_sp()});
  endfunction

  // ---- driver ----
  task automatic issue(input op_t o);
    // inputs change at the falling edge; in_ready, read there, is stable
    // until the rising edge that takes the operation
    @(negedge clk);
    in_valid = 1'b1;
    dp_sp    = o.dp;
    in1      = o.a;
    in2      = o.b;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    o.t_in = cycle;
    q.push_back(o);
    if (o.dp) n_dp++; else n_sp++;
    if (have_last && last_mode != o.dp) n_switch++;
    have_last = 1;
    last_mode = o.dp;
    if (o.dp ? (is_sub(o.a, 1) || is_sub(o.b, 1))
             : (is_sub({32'b0, o.a[63:32]}, 0) || is_sub({32'b0, o.b[63:32]}, 0) ||
                is_sub({32'b0, o.a[31:0]}, 0) || is_sub({32'b0, o.b[31:0]}, 0)))
      n_sub_in++;
    if (o.dp ? (is_special(o.a, 1) || is_special(o.b, 1))
             : (is_special({32'b0, o.a[63:32]}, 0) || is_special({32'b0, o.b[63:32]}, 0) ||
                is_special({32'b0, o.a[31:0]}, 0) || is_special({32'b0, o.b[31:0]}, 0)))
      n_special++;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  // ---- monitor ----
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      if (q.size() == 0) check(0, "result without operation");
      else begin
        o = q.pop_front();
        check(out_dp_sp == o.dp, "mode of result");
        if (o.dp) begin
          check(out_result == o.r, $sformatf("dp %h / %h = %h, expected %h", o.a, o.b, out_result, o.r));
          if (is_sub(o.r, 1)) n_sub_out++;
          if (is_inf(o.r, 1) && !is_special(o.a, 1) && !is_special(o.b, 1)) n_ovf++;
          if (rounded_up(o.a, o.b, o.r, 1)) n_round_up++;
        end else begin
          check(out_result == o.r, $sformatf("sp %h / %h = %h, expected %h", o.a, o.b, out_result, o.r));
          for (int l = 0; l < 2; l++) begin
            logic [63:0] la, lb, lr;
            la = {32'b0, o.a[32*l +: 32]};
            lb = {32'b0, o.b[32*l +: 32]};
            lr = {32'b0, o.r[32*l +: 32]};
            if (is_sub(lr, 0)) n_sub_out++;
            if (is_inf(lr, 0) && !is_special(la, 0) && !is_special(lb, 0)) n_ovf++;
            if (rounded_up(la, lb, lr, 0)) n_round_up++;
          end
        end
        if (check_latency) begin
          n_lat++;
          check(cycle - o.t_in == (o.dp ? 4 + 8 * MS : 4 + 6 * MS),
                $sformatf("latency %0d (dp=%b)", cycle - o.t_in, o.dp));
        end
        if (rate_mode >= 0 && last_out >= 0 && q.size() > 0) begin
          n_rate++;
          check(cycle - last_out == ((rate_mode == 1) ? 2 + 8 * MS : 2 + 6 * MS),
                $sformatf("result interval %0d in saturated %s stream", cycle - last_out,
                          (rate_mode == 1) ? "DP" : "SP"));
        end
        last_out = cycle;
      end
    end
  end

  // quotient corrections made from the remainder in stage 2
  always @(posedge clk) begin
    if (rst_n && dut.u_mdiv.state == 2'd2) begin
      if (dut.u_mdiv.dp_r) begin
        if (dut.u_mdiv.fx_dp.q != dut.u_mdiv.n_r[61:7]) n_corr++;
      end else begin
        if (dut.u_mdiv.fx_s1.q[25:0] != dut.u_mdiv.n_r[61:36]) n_corr++;
        if (dut.u_mdiv.fx_s0.q[25:0] != dut.u_mdiv.n_r[29:4]) n_corr++;
      end
    end
  end

  task automatic drain();
    int guard = 0;
    while (q.size() != 0 && guard < 1000) begin
      @(posedge clk);
      guard++;
    end
    check(q.size() == 0, "pipeline drained");
  endtask

  task automatic report();
    $display("dp=%0d sp=%0d switches=%0d subnormal_in=%0d subnormal_out=%0d round_up=%0d",
             n_dp, n_sp, n_switch, n_sub_in, n_sub_out, n_round_up);
    $display("overflow=%0d special=%0d corrections=%0d stalls=%0d latency_checks=%0d rate_checks=%0d",
             n_ovf, n_special, n_corr, n_stall, n_lat, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    in_valid = 0;
    dp_sp = 1;
    in1 = '0;
    in2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Phase 1: directed cases, one at a time, latency checked
    check_latency = 1;
    issue(make_op(1, 64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000)); drain();  // 1/3
    issue(make_op(1, 64'h7FEF_FFFF_FFFF_FFFF, 64'h0010_0000_0000_0000)); drain();  // overflow
    issue(make_op(1, 64'h0010_0000_0000_0000, 64'h4000_0000_0000_0000)); drain();  // subnormal result
    issue(make_op(1, 64'h0000_0000_0000_0001, 64'h3FE0_0000_0000_0000)); drain();  // subnormal operand
    issue(make_op(1, 64'h000F_FFFF_FFFF_FFFF, 64'h3FEF_FFFF_FFFF_FFFF)); drain();  // rounds to min normal?
    issue(make_op(1, 64'h0000_0000_0000_0001, 64'h4000_0000_0000_0000)); drain();  // tie to zero
    issue(make_op(1, 64'h0000_0000_0000_0003, 64'h4000_0000_0000_0000)); drain();  // tie to even
    issue(make_op(0, {32'h3F80_0000, 32'h4049_0FDB}, {32'h4040_0000, 32'h402D_F854})); drain();
    issue(make_op(0, {32'h7F7F_FFFF, 32'h0000_0001}, {32'h0080_0000, 32'h3F00_0000})); drain();
    issue(make_op(0, {32'h0080_0000, 32'h0000_0003}, {32'h4000_0000, 32'h4000_0000})); drain();
    issue(make_op(0, {32'h0000_0000, 32'h7F80_0000}, {32'h0000_0000, 32'h7F80_0000})); drain();
    issue(make_op(1, 64'h7FF8_0000_0000_0001, 64'h3FF0_0000_0000_0000)); drain();
    issue(make_op(1, 64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000)); drain();
    issue(make_op(1, 64'hC000_0000_0000_0000, 64'h0000_0000_0000_0000)); drain();
    for (int i = 0; i < 300; i++) begin
      issue(rand_op(-1));
      drain();
    end
    check_latency = 0;

    // Phase 2a: saturated DP stream, then saturated SP stream
    for (int m = 1; m >= 0; m--) begin
      rate_mode = m;
      last_out = -1;
      for (int i = 0; i < 200; i++) issue(rand_op(m));
      rate_mode = -1;
      drain();
    end

    // Phase 2b: random stream with random gaps and mode switches
    for (int i = 0; i < 5000; i++) begin
      if ($urandom_range(3) == 0) repeat ($urandom_range(12)) @(posedge clk);
      issue(rand_op(-1));
    end
    drain();

    check(n_dp > 0, "DP operations occurred");
    check(n_sp > 0, "SP operations occurred");
    check(n_switch > 0, "mode switches occurred");
    check(n_sub_in > 0, "subnormal operands occurred");
    check(n_sub_out > 0, "subnormal results occurred");
    check(n_round_up > 0, "rounding up occurred");
    check(n_ovf > 0, "overflow occurred");
    check(n_special > 0, "special operands occurred");
    check(n_corr > 0, "quotient corrections occurred");
    check(n_stall > 0, "input stalls occurred");
    check(n_lat > 0 && n_rate > 0, "latency and rate checked");
    report();
    $finish;
  end
endmodule
