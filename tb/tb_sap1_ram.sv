// tb_sap1_ram: checks the 16-byte RAM: manual store, RI writes on the
// leading-edge strobe only, asynchronous read at any address, and clear.
module tb_sap1_ram;
  logic clk = 1'b0;
  logic rise, ri, store, clear;
  logic [3:0] addr;
  logic [7:0] bus_in, manual_value, rdata;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  sap1_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d got %0d exp %0d", a, rdata, model[a]); end
    end
  endtask

  initial begin
    rise = 0; ri = 0; store = 0; addr = 0; bus_in = 0; manual_value = 0;
    clear = 1;
    @(negedge clk) clear = 0;
    foreach (model[i]) model[i] = 8'd0;
    read_all();
    // the first worked example: 28 at address 0, 14 at address 1
    @(negedge clk) begin addr = 0; manual_value = 8'd28; store = 1; end
    @(negedge clk) begin addr = 1; manual_value = 8'd14; store = 1; end
    @(negedge clk) store = 0;
    model[0] = 8'd28; model[1] = 8'd14;
    read_all();
    // random traffic
    for (int k = 0; k < 400; k++) begin
      @(negedge clk) begin
        addr = 4'($urandom); bus_in = 8'($urandom); manual_value = 8'($urandom);
        rise = 1'($urandom); ri = 1'($urandom); store = ($urandom % 5) == 0;
      end
      if (store) model[addr] = manual_value;
      else if (rise && ri) model[addr] = bus_in;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL rnd addr %0d", addr); end
    end
    @(negedge clk) begin rise = 0; ri = 0; store = 0; end
    read_all();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (model[i]) model[i] = 8'd0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
