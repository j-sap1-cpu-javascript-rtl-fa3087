// sap1_pkg: types and constants shared by the SAP-1 CPU blocks.
//
// The control word holds the 16 control lines. Bit 15 is HLT and bit 0 is FI,
// i.e. the left-to-right order of the Control Word display read with the
// rightmost line as bit 0 (HLT MI RI RO IO II AI AO EO SU BI OI CE CO J FI).
// "EO" stands for the Sigma-out line (ALU to bus). The low byte (bits 7:0) is
// what a two-chip EEPROM microcode store keeps in ROM #0, the high byte in ROM #1.
//
// Microcode addresses have the form 0AAAABBB: bits 6:3 are the instruction
// (IR bits 7:4) and bits 2:0 the step counter. Only NOP (0000) and LDA (0001)
// have defined opcodes; the remaining codes are free for user microcode.
package sap1_pkg;

  localparam int unsigned BUS_W     = 8;   // 8-lane data bus
  localparam int unsigned ADDR_W    = 4;   // 16 RAM addresses
  localparam int unsigned OP_W      = 4;   // instruction field of the IR
  localparam int unsigned STEP_W    = 3;   // step counter width
  localparam int unsigned NUM_STEPS = 5;   // T0..T4
  localparam int unsigned CW_W      = 16;  // control lines
  localparam int unsigned MC_ADDR_W = OP_W + STEP_W;  // 7 meaningful address bits

  typedef struct packed {
    logic hlt;  // 15 halt the clock
    logic mi;   // 14 memory address register in
    logic ri;   // 13 RAM in
    logic ro;   // 12 RAM out
    logic io;   // 11 instruction register out (bits 3:0)
    logic ii;   // 10 instruction register in
    logic ai;   //  9 A in
    logic ao;   //  8 A out
    logic eo;   //  7 ALU (Sigma) out
    logic su;   //  6 subtract
    logic bi;   //  5 B in
    logic oi;   //  4 output register in
    logic ce;   //  3 program counter enable (count)
    logic co;   //  2 program counter out
    logic j;    //  1 jump (program counter in)
    logic fi;   //  0 flags in
  } control_word_t;

  typedef enum logic [OP_W-1:0] {
    OP_NOP = 4'b0000,
    OP_LDA = 4'b0001
  } opcode_t;

  // Microcode address 0AAAABBB.
  function automatic logic [MC_ADDR_W:0] mc_address(logic [OP_W-1:0] op, logic [STEP_W-1:0] step);
    return {1'b0, op, step};
  endfunction

endpackage
