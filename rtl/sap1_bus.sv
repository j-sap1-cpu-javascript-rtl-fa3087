// sap1_bus: the 8-bit shared bus.
//
// Each source drives the bus as soon as its out line is set: the program
// counter (CO) and the IR operand (IO) on bits 3:0 with bits 7:4 at 0, RAM
// (RO), register A (AO) and the ALU (Sigma-out, EO) on all 8 bits. With no
// out line set the bus reads 0. Only one out line should be set at a time;
// if several are, this implementation gives the OR of their values and
// raises `conflict`. The OR combining is this design's choice, standing in
// for the tri-state bus of a breadboard build.
module sap1_bus
  import sap1_pkg::*;
(
  input  logic              co,
  input  logic [ADDR_W-1:0] pc,
  input  logic              ro,
  input  logic [BUS_W-1:0]  ram,
  input  logic              io,
  input  logic [ADDR_W-1:0] ir_operand,
  input  logic              ao,
  input  logic [BUS_W-1:0]  a,
  input  logic              eo,
  input  logic [BUS_W-1:0]  alu,
  output logic [BUS_W-1:0]  bus,
  output logic              conflict
);

  always_comb begin
    bus = '0;
    if (co) bus |= BUS_W'(pc);
    if (ro) bus |= ram;
    if (io) bus |= BUS_W'(ir_operand);
    if (ao) bus |= a;
    if (eo) bus |= alu;
  end

  assign conflict = (3'(co) + 3'(ro) + 3'(io) + 3'(ao) + 3'(eo)) > 3'd1;

endmodule
