// tb_sap1_alu: checks A+B and A-B (modulo 256) for every pair of operands,
// including the design's example 28 + 14 = 42.
module tb_sap1_alu;
  logic [7:0] a, b, result;
  logic su;
  int checks = 0, failures = 0;
  int expv;

  sap1_alu dut (.*);

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd28; b = 8'd14; su = 0; #1;
    checks++; if (result !== 8'd42) failures++;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int s = 0; s < 2; s++) begin
          a = 8'(x); b = 8'(y); su = 1'(s); #1;
          expv = (s != 0) ? (x - y + 256) % 256 : (x + y) % 256;
          checks++;
          if (result !== 8'(expv)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %s %0d = %0d", x, (s != 0) ? "-" : "+", y, result);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
