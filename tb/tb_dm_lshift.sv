// Testbench for dm_lshift: random words and amounts in both modes against
// a 64-bit shift (DP) and two separate 32-bit shifts (dual SP).
module tb_dm_lshift;
  int checks = 0, failures = 0;

  logic [63:0] d, q, exp_q;
  logic        dp_sp;
  logic [5:0]  amt_hi;
  logic [4:0]  amt_lo;

  dm_lshift dut (.*);

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
      amt_hi = 6'($urandom);
      amt_lo = 5'($urandom);
      #1;
      if (dp_sp) exp_q = d << amt_hi;
      else       exp_q = {d[63:32] << amt_hi[4:0], d[31:0] << amt_lo};
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL dp=%b d=%h hi=%0d lo=%0d q=%h exp=%h", dp_sp, d, amt_hi, amt_lo, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
