// sap1_alu: 8-bit adder/subtractor.
//
// Combinational: result = A + B, or A - B when SU is set, modulo 256. The
// result is always shown and goes onto the bus under the Sigma-out line
// (handled by the bus block). Subtraction is done as A + ~B + 1, one adder
// for both operations. No carry or zero flag is produced.
module sap1_alu
  import sap1_pkg::*;
(
  input  logic [BUS_W-1:0] a,
  input  logic [BUS_W-1:0] b,
  input  logic             su,
  output logic [BUS_W-1:0] result
);

  logic [BUS_W-1:0] b_op;

  assign b_op   = su ? ~b : b;
  assign result = a + b_op + BUS_W'(su);

endmodule
