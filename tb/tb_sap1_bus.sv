// tb_sap1_bus: checks the bus with each single driver (4-bit sources fill
// bits 7:4 with 0), with no driver (0), and the conflict flag under random
// combinations of out lines.
module tb_sap1_bus;
  logic co, ro, io, ao, eo;
  logic [3:0] pc, ir_operand;
  logic [7:0] ram, a, alu, bus;
  logic conflict;
  int checks = 0, failures = 0;

  sap1_bus dut (.*);

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [4:0] oe;
      logic [7:0] expv;
      int n;
      pc = 4'($urandom); ir_operand = 4'($urandom);
      ram = 8'($urandom); a = 8'($urandom); alu = 8'($urandom);
      // mostly one driver, sometimes none or several
      case ($urandom % 8)
        0: oe = 5'b0;
        1: oe = 5'($urandom);
        default: oe = 5'b1 << ($urandom % 5);
      endcase
      {co, ro, io, ao, eo} = oe;
      #1;
      expv = 8'h00; n = 0;
      if (co) begin expv |= {4'h0, pc}; n++; end
      if (ro) begin expv |= ram; n++; end
      if (io) begin expv |= {4'h0, ir_operand}; n++; end
      if (ao) begin expv |= a; n++; end
      if (eo) begin expv |= alu; n++; end
      checks++;
      if (bus !== expv || conflict !== (n > 1)) begin
        failures++; $display("FAIL oe=%b bus=%h exp %h conflict=%b", oe, bus, expv, conflict);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
