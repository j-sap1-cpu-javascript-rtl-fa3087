// tb_sap1_mar: checks the memory address register and its manual/bus
// address select against a reference model with random stimulus.
module tb_sap1_mar;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise, mi, manual_sel;
  logic [3:0] bus_in, manual_addr, addr;
  logic [3:0] reg_model;
  int checks = 0, failures = 0;

  sap1_mar dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rise = 0; mi = 0; manual_sel = 0; bus_in = 0; manual_addr = 0;
    @(negedge clk);
    checks++; if (addr !== 4'd0) failures++;
    rst_n = 1; reg_model = 0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk) begin
        rise = 1'($urandom); mi = 1'($urandom); manual_sel = 1'($urandom);
        bus_in = 4'($urandom); manual_addr = 4'($urandom);
      end
      #1;
      checks++;
      if (addr !== (manual_sel ? manual_addr : reg_model)) begin
        failures++; $display("FAIL comb addr %0d", addr);
      end
      if (rise && mi) reg_model = bus_in;
      @(posedge clk); #1;
      checks++;
      if (addr !== (manual_sel ? manual_addr : reg_model)) begin
        failures++; $display("FAIL latched addr %0d exp %0d", addr, reg_model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
