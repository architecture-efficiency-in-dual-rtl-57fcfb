// Testbench for dm_rshift: random words and amounts in both modes against
// plain shifts, with the sticky bits recomputed from the bits shifted out.
module tb_dm_rshift;
  int checks = 0, failures = 0;

  logic [63:0] d, q, exp_q;
  logic        dp_sp, sticky_hi, sticky_lo, exp_hi, exp_lo;
  logic [5:0]  amt_hi;
  logic [4:0]  amt_lo;

  dm_rshift dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      dp_sp  = 1'($urandom);
      d      = {$urandom, $urandom};
      if ($urandom_range(1) == 0) d = d & ~((64'd1 << $urandom_range(63)) - 1);
      amt_hi = 6'($urandom);
      amt_lo = 5'($urandom);
      #1;
      if (dp_sp) begin
        exp_q  = d >> amt_hi;
        exp_lo = |(d & ((64'd1 << amt_hi) - 64'd1));
        exp_hi = 1'b0;
      end else begin
        exp_q  = {d[63:32] >> amt_hi[4:0], d[31:0] >> amt_lo};
        exp_hi = |(d[63:32] & ((32'd1 << amt_hi[4:0]) - 32'd1));
        exp_lo = |(d[31:0] & ((32'd1 << amt_lo) - 32'd1));
      end
      checks++;
      if (q !== exp_q || sticky_hi !== exp_hi || sticky_lo !== exp_lo) begin
        failures++;
        $display("FAIL dp=%b d=%h hi=%0d lo=%0d q=%h exp=%h st=%b%b exp=%b%b",
                 dp_sp, d, amt_hi, amt_lo, q, exp_q, sticky_hi, sticky_lo, exp_hi, exp_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
