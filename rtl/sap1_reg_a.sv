// sap1_reg_a: register A, the 8-bit accumulator.
//
// Latches the bus on a leading clock edge (`rise`) when AI is set and holds
// it until overwritten. Its value feeds the ALU continuously and is put on
// the bus by the bus block under AO. Reset clears it (this design's choice).
module sap1_reg_a
  import sap1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rise,
  input  logic             ai,
  input  logic [BUS_W-1:0] bus_in,
  output logic [BUS_W-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          value <= '0;
    else if (rise && ai) value <= bus_in;
  end

endmodule
