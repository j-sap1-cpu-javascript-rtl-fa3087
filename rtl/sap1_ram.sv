// sap1_ram: 16-byte RAM of the SAP-1.
//
// One 8-bit word per address. The word at `addr` (from the MAR) is read
// combinationally: it is shown on the "Ram Value" LEDs and goes onto the bus
// at once under RO. It is written from the bus on a leading clock edge
// (`rise`) when RI is set, or at once from the manual value switches on a
// `store` strobe. RESET does not touch the contents; `clear` (the CLR program,
// also asserted while power is off) zeroes every word. Giving `clear`
// priority, then `store`, then RI is this design's choice.
module sap1_ram
  import sap1_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = BUS_W
) (
  input  logic          clk,
  input  logic          rise,
  input  logic          ri,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] bus_in,
  input  logic          store,
  input  logic [DW-1:0] manual_value,
  input  logic          clear,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < 2**AW; i++) mem[i] <= '0;
    end else if (store) begin
      mem[addr] <= manual_value;
    end else if (rise && ri) begin
      mem[addr] <= bus_in;
    end
  end

  assign rdata = mem[addr];

endmodule
