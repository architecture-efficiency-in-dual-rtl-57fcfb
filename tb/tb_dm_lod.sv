// Testbench for dm_lod: leading-zero counts of random 64-bit words in DP
// mode and of each 32-bit lane in dual-SP mode, zero flags included,
// against a reference scan.
module tb_dm_lod;
  int checks = 0, failures = 0;

  logic [63:0] d;
  logic        dp_sp;
  logic [5:0]  cnt_hi;
  logic [4:0]  cnt_lo;
  logic        zero_hi, zero_lo;

  dm_lod dut (.*);

  function automatic int ref_lz(input logic [63:0] x, input int w);
    for (int i = w - 1; i >= 0; i--) if (x[i]) return w - 1 - i;
    return w;
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
    for (int i = 0; i < 3000; i++) begin
      dp_sp = 1'($urandom);
      d = {$urandom >> $urandom_range(32), $urandom >> $urandom_range(32)};
      if ($urandom_range(3) == 0) d = d >> $urandom_range(63);
      #1;
      if (dp_sp) begin
        check(zero_hi == (d == 0), $sformatf("dp zero %h", d));
        if (d != 0) check(int'(cnt_hi) == ref_lz(d, 64), $sformatf("dp cnt %h -> %0d", d, cnt_hi));
      end else begin
        check(zero_hi == (d[63:32] == 0), $sformatf("sp1 zero %h", d));
        check(zero_lo == (d[31:0] == 0), $sformatf("sp0 zero %h", d));
        if (d[63:32] != 0)
          check(int'(cnt_hi) == ref_lz({32'b0, d[63:32]}, 32), $sformatf("sp1 cnt %h -> %0d", d, cnt_hi));
        if (d[31:0] != 0)
          check(int'(cnt_lo) == ref_lz({32'b0, d[31:0]}, 32), $sformatf("sp0 cnt %h -> %0d", d, cnt_lo));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
