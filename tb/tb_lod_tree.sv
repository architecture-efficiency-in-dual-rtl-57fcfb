// Testbench for lod_tree: the 32-bit detector on random words with a random
// number of leading zeros, and an 8-bit detector exhaustively, against a
// scan for the first one from the MSB.
module tb_lod_tree;
  int checks = 0, failures = 0;

  logic [31:0] d32;
  logic        v32;
  logic [4:0]  c32;
  logic [7:0]  d8;
  logic        v8;
  logic [2:0]  c8;

  lod_tree #(.W(32)) dut32 (.d(d32), .valid(v32), .cnt(c32));
  lod_tree #(.W(8))  dut8  (.d(d8),  .valid(v8),  .cnt(c8));

  function automatic int ref_lz(input logic [31:0] x, input int w);
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
    for (int i = 0; i < 256; i++) begin
      d8 = 8'(i);
      #1;
      check(v8 == (i != 0), $sformatf("valid8 %0d", i));
      if (i != 0) check(int'(c8) == ref_lz(32'(i), 8), $sformatf("cnt8 %0d -> %0d", i, c8));
    end
    d32 = 0;
    #1;
    check(!v32, "valid32 zero");
    for (int i = 0; i < 2000; i++) begin
      d32 = $urandom >> $urandom_range(31);
      if (d32 == 0) d32 = 1;
      #1;
      check(v32, "valid32");
      check(int'(c32) == ref_lz(d32, 32), $sformatf("cnt32 %h -> %0d", d32, c32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
