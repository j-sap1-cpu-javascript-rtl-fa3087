// sap1_out: output register with a three-digit decimal display.
//
// Latches the bus on a leading clock edge (`rise`) when OI is set. The value
// is shown as an unsigned decimal number on three 7-segment digits, hundreds
// first ("000" after reset). digits[i] is the BCD value of a digit and
// segments[i] its pattern, bit order g f e d c b a, 1 = segment lit. The
// decimal conversion is combinational. The segment encoding and its bit
// order are this design's choice; the register and its OI line follow the
// rest of the design's bus registers.
module sap1_out
  import sap1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rise,
  input  logic             oi,
  input  logic [BUS_W-1:0] bus_in,
  output logic [BUS_W-1:0] value,
  output logic [2:0][3:0]  digits,
  output logic [2:0][6:0]  segments
);

  function automatic logic [6:0] seg7(logic [3:0] d);
    case (d)
      4'd0:    return 7'b0111111;
      4'd1:    return 7'b0000110;
      4'd2:    return 7'b1011011;
      4'd3:    return 7'b1001111;
      4'd4:    return 7'b1100110;
      4'd5:    return 7'b1101101;
      4'd6:    return 7'b1111101;
      4'd7:    return 7'b0000111;
      4'd8:    return 7'b1111111;
      4'd9:    return 7'b1101111;
      default: return 7'b0000000;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          value <= '0;
    else if (rise && oi) value <= bus_in;
  end

  always_comb begin
    digits[2] = 4'(value / 8'd100);
    digits[1] = 4'((value / 8'd10) % 8'd10);
    digits[0] = 4'(value % 8'd10);
    for (int i = 0; i < 3; i++) segments[i] = seg7(digits[i]);
  end

endmodule
