// tb_sap1_ir: checks the instruction register's latching on II and the split
// into instruction (bits 7:4) and operand (bits 3:0), including the value
// 0001 1110 (LDA 14).
module tb_sap1_ir;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise, ii;
  logic [7:0] bus_in, value;
  logic [3:0] opcode, operand;
  logic [7:0] model;
  int checks = 0, failures = 0;

  sap1_ir dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    checks++;
    if (value !== model || opcode !== model[7:4] || operand !== model[3:0]) begin
      failures++; $display("FAIL ir %h exp %h op %h opd %h", value, model, opcode, operand);
    end
  endtask

  initial begin
    rise = 0; ii = 0; bus_in = 8'hFF;
    @(negedge clk); model = 0; cmp();
    rst_n = 1;
    @(negedge clk) begin bus_in = 8'b0001_1110; rise = 1; ii = 1; end
    @(negedge clk) begin rise = 0; ii = 0; end
    model = 8'h1E; cmp();
    checks++; if (opcode !== 4'd1 || operand !== 4'd14) failures++;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk) begin rise = 1'($urandom); ii = 1'($urandom); bus_in = 8'($urandom); end
      if (rise && ii) model = bus_in;
      @(posedge clk); #1 cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
