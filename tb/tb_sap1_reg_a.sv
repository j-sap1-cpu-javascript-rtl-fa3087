// tb_sap1_reg_a: checks register A: it latches the bus only on a
// leading-edge strobe with AI set, holds otherwise, and resets to 0.
module tb_sap1_reg_a;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise, ai;
  logic [7:0] bus_in, value;
  logic [7:0] model;
  int checks = 0, failures = 0;

  sap1_reg_a dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rise = 0; ai = 0; bus_in = 8'hA5;
    @(negedge clk); model = 0;
    checks++; if (value !== model) failures++;
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk) begin rise = 1'($urandom); ai = 1'($urandom); bus_in = 8'($urandom); end
      if (rise && ai) model = bus_in;
      @(posedge clk); #1;
      checks++;
      if (value !== model) begin failures++; $display("FAIL got %0d exp %0d", value, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
