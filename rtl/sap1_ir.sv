// sap1_ir: instruction register.
//
// Latches the whole bus on a leading clock edge (`rise`) when II is set.
// Bits 7:4 are the instruction, passed to the microcode; bits 3:0 are the
// operand address, the only part IO puts on the bus (the bus block fills
// bits 7:4 with 0). An instruction without an operand has 0000 there.
// Reset clears the register, which makes the instruction NOP.
module sap1_ir
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rise,
  input  logic              ii,
  input  logic [BUS_W-1:0]  bus_in,
  output logic [BUS_W-1:0]  value,
  output logic [OP_W-1:0]   opcode,
  output logic [ADDR_W-1:0] operand
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          value <= '0;
    else if (rise && ii) value <= bus_in;
  end

  assign opcode  = value[BUS_W-1 -: OP_W];
  assign operand = value[ADDR_W-1:0];

endmodule
