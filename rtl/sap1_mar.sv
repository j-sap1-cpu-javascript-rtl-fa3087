// sap1_mar: memory address register with manual address select.
//
// On a leading clock edge (`rise`) with MI set the register latches bus bits
// 3:0. The "Address Select (manual / bus)" switch chooses what RAM sees:
// with manual_sel = 1 the manual address switches, otherwise the latched
// register. `addr` is the address in use (the "Address Value" LEDs), a
// combinational function of the switch and the register. Reset clears the
// register; that reset value is this design's choice.
module sap1_mar
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rise,
  input  logic              mi,
  input  logic [ADDR_W-1:0] bus_in,
  input  logic              manual_sel,
  input  logic [ADDR_W-1:0] manual_addr,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] mar_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          mar_q <= '0;
    else if (rise && mi) mar_q <= bus_in;
  end

  assign addr = manual_sel ? manual_addr : mar_q;

endmodule
