// sap1_pc: 4-bit program counter.
//
// On each leading clock edge (`rise` strobe) the counter increments when CE is
// set, wrapping from 15 to 0, as in the J-SAP1 design. J (jump) loads bus
// bits 3:0 instead; the J-SAP1 design only names J, so loading from the bus and
// giving J priority over CE are this design's choices. The value is put on the
// bus by the bus block under CO. Reset clears the counter.
module sap1_pc
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rise,
  input  logic              ce,
  input  logic              j,
  input  logic [ADDR_W-1:0] bus_in,
  output logic [ADDR_W-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         value <= '0;
    else if (rise && j) value <= bus_in;
    else if (rise && ce) value <= value + 1'b1;
  end

endmodule
