// sap1_reg_b: register B, the ALU's second operand.
//
// Latches the bus on a leading clock edge (`rise`) when BI is set. It has no
// bus output: its value goes only to the ALU. Reset clears it (this design's
// choice).
module sap1_reg_b
  import sap1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rise,
  input  logic             bi,
  input  logic [BUS_W-1:0] bus_in,
  output logic [BUS_W-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          value <= '0;
    else if (rise && bi) value <= bus_in;
  end

endmodule
