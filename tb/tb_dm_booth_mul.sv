// Testbench for dm_booth_mul: full 64 x 64 unsigned products in DP mode and
// two independent lane products in dual-SP mode (lane-0 multiplier below
// 2^31), for the combinational array (STAGES = 1) and for the two-stage
// array (STAGES = 2, product one clock later), against the 128-bit product.
module tb_dm_booth_mul;
  int checks = 0, failures = 0;

  logic         clk = 1'b0;
  logic [63:0]  a, b;
  logic         dp_sp;
  logic [127:0] p1, p2, exp_p;

  always #5 clk = ~clk;

  dm_booth_mul #(.W(64), .STAGES(1)) dut1 (.clk(clk), .a(a), .b(b), .dp_sp(dp_sp), .p(p1));
  dm_booth_mul #(.W(64), .STAGES(2)) dut2 (.clk(clk), .a(a), .b(b), .dp_sp(dp_sp), .p(p2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      dp_sp = 1'($urandom);
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i < 4) begin
        a = '1;
        b = (i < 2) ? '1 : 64'h7FFF_FFFF_7FFF_FFFF;
      end
      if (!dp_sp) b[31] = 1'b0;
      if (dp_sp) exp_p = {64'b0, a} * {64'b0, b};
      else       exp_p = {{32'b0, a[63:32]} * {32'b0, b[63:32]}, {32'b0, a[31:0]} * {32'b0, b[31:0]}};
      #1;
      checks++;
      if (p1 !== exp_p) begin
        failures++;
        $display("FAIL 1-stage dp=%b a=%h b=%h p=%h exp=%h", dp_sp, a, b, p1, exp_p);
      end
      @(posedge clk);
      #1;
      checks++;
      if (p2 !== exp_p) begin
        failures++;
        $display("FAIL 2-stage dp=%b a=%h b=%h p=%h exp=%h", dp_sp, a, b, p2, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
