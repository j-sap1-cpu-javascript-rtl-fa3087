// tb_sap1_out: checks the output register and its decimal display for every
// 8-bit value. Reference digits are found by repeated subtraction, and the
// segment patterns are compared with a table of the usual 7-segment digits.
module tb_sap1_out;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise, oi;
  logic [7:0] bus_in, value;
  logic [2:0][3:0] digits;
  logic [2:0][6:0] segments;
  int checks = 0, failures = 0;
  // g f e d c b a for 0..9
  logic [6:0] seg_ref [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  sap1_out dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_display(int v);
    int h, t, o;
    h = 0; t = 0; o = v;
    while (o >= 100) begin o -= 100; h++; end
    while (o >= 10)  begin o -= 10;  t++; end
    checks++;
    if (value !== 8'(v) || digits[2] !== 4'(h) || digits[1] !== 4'(t) || digits[0] !== 4'(o) ||
        segments[2] !== seg_ref[h] || segments[1] !== seg_ref[t] || segments[0] !== seg_ref[o]) begin
      failures++; $display("FAIL display of %0d: %0d%0d%0d", v, digits[2], digits[1], digits[0]);
    end
  endtask

  initial begin
    rise = 0; oi = 0; bus_in = 8'd99;
    @(negedge clk); check_display(0);   // shows 000 after reset
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk) begin bus_in = 8'(v); rise = 1; oi = 1; end
      @(negedge clk) begin rise = 0; oi = 0; bus_in = 8'($urandom); end
      check_display(v);
      // OI without the strobe, and the strobe without OI, change nothing
      @(negedge clk) begin rise = 1; oi = 0; end
      @(negedge clk) begin rise = 0; oi = 1; end
      @(negedge clk) oi = 0;
      check_display(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
