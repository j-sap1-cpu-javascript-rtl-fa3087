// sap1_microcode: the programmable microcode store and control-word select.
//
// 128 words of 16 bits, addressed by 0AAAABBB: the IR's instruction field
// (AAAA) and the step counter (BBB); bit 7 of the 8-bit address is always 0.
// With manual_sel set the address comes from the manual address switches
// instead. The word at the address in use is read combinationally (`word`,
// the Control Word display). A `store` strobe writes manual_value at that
// address; `clear` (the CLR program) erases every word. The store starts
// empty and keeps its contents through reset and power-off; only
// programming changes it.
//
// While `enable` is set the stored word is the control word applied to the
// CPU (`cw`); while disabled the manual control-line switches (`manual_cw`)
// are applied instead, which is how the CPU is driven by hand. The
// asynchronous read and the clear-before-store priority are this design's
// choices.
module sap1_microcode
  import sap1_pkg::*;
(
  input  logic                   clk,
  input  logic                   enable,
  input  logic [OP_W-1:0]        opcode,
  input  logic [STEP_W-1:0]      step,
  input  logic                   manual_sel,
  input  logic [MC_ADDR_W-1:0]   manual_addr,
  input  logic                   store,
  input  control_word_t          manual_value,
  input  logic                   clear,
  input  control_word_t          manual_cw,
  output logic [MC_ADDR_W:0]     addr,
  output control_word_t          word,
  output control_word_t          cw
);

  control_word_t mem [2**MC_ADDR_W];

  initial begin
    for (int i = 0; i < 2**MC_ADDR_W; i++) mem[i] = '0;
  end

  assign addr = manual_sel ? {1'b0, manual_addr} : mc_address(opcode, step);

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < 2**MC_ADDR_W; i++) mem[i] <= '0;
    end else if (store) begin
      mem[addr[MC_ADDR_W-1:0]] <= manual_value;
    end
  end

  assign word = mem[addr[MC_ADDR_W-1:0]];
  assign cw   = enable ? word : manual_cw;

endmodule
