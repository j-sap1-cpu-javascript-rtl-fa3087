// tb_sap1_pc: checks the program counter against a reference model under
// random CE, J, bus values and strobes; includes wrap from 15 to 0.
module tb_sap1_pc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise, ce, j;
  logic [3:0] bus_in, value;
  int checks = 0, failures = 0;
  logic [3:0] model;
  int wraps = 0;

  sap1_pc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rise = 0; ce = 0; j = 0; bus_in = 0;
    @(negedge clk);
    checks++; if (value !== 4'd0) begin failures++; $display("FAIL reset value %0d", value); end
    rst_n = 1; model = 0;
    // plain counting through a wrap
    for (int k = 0; k < 20; k++) begin
      @(negedge clk) begin rise = 1; ce = 1; end
      @(negedge clk) begin rise = 0; end
      if (model == 4'd15) wraps++;
      model = model + 4'd1;
      checks++; if (value !== model) begin failures++; $display("FAIL count %0d exp %0d", value, model); end
    end
    // random
    for (int k = 0; k < 500; k++) begin
      @(negedge clk) begin
        rise = 1'($urandom); ce = 1'($urandom); j = ($urandom % 4) == 0; bus_in = 4'($urandom);
      end
      if (rise && j) model = bus_in;
      else if (rise && ce) model = model + 4'd1;
      @(posedge clk); #1;
      checks++; if (value !== model) begin failures++; $display("FAIL rnd %0d exp %0d", value, model); end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
