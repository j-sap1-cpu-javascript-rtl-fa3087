// sap1_top: the J-SAP1 "Simple As Possible" CPU.
//
// An 8-bit bus connects the program counter, memory address register, 16-byte
// RAM, instruction register, registers A and B, the adder/subtractor and the
// output register. A 16-bit control word decides, each CPU clock cycle, which
// block drives the bus and which blocks latch it. Outputs drive the bus at
// once; inputs latch on the leading clock edge. The step counter advances on
// the trailing edge, so the control word for the next step is in place before
// the next leading edge.
//
// The control word comes from the microcode store, addressed by the
// instruction (IR bits 7:4) and the step, while the microcode is enabled;
// otherwise from the manual control-line switches `manual_cw`. The clock
// stops when either the HLT switch or the control word's HLT line is set, and
// is then stepped by `pulse`.
//
// Front-panel controls: RESET (rst_n) clears the registers and the step
// counter but not RAM or microcode; power off (power = 0) holds the CPU in
// reset and clears RAM, but not the microcode. The RAM and the microcode are
// written through their manual address/value/store inputs. The FI line is
// brought out as `fi`, since no flags register is built.
//
// All logic runs on the system clock `clk`; the CPU clock is a pair of
// enable strobes from sap1_clock.
module sap1_top
  import sap1_pkg::*;
#(
  parameter int unsigned TICKS_PER_MS     = 50_000,
  parameter int unsigned DEFAULT_DELAY_MS = 1000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 power,
  // clock panel
  input  logic                 hlt_sw,
  input  logic                 pulse,
  input  logic [15:0]          delay_ms,
  input  logic                 delay_update,
  // memory address register panel
  input  logic                 mar_manual_sel,
  input  logic [ADDR_W-1:0]    mar_manual_addr,
  // RAM panel
  input  logic                 ram_store,
  input  logic [BUS_W-1:0]     ram_manual_value,
  input  logic                 ram_clear,
  // instruction decoder and microcode panels
  input  logic                 id_enable,
  input  logic                 mc_enable,
  input  logic                 mc_manual_sel,
  input  logic [MC_ADDR_W-1:0] mc_manual_addr,
  input  logic                 mc_store,
  input  control_word_t        mc_manual_value,
  input  logic                 mc_clear,
  input  control_word_t        manual_cw,
  // displays
  output logic                 clk_led,
  output logic [BUS_W-1:0]     bus,
  output logic [ADDR_W-1:0]    pc,
  output logic [ADDR_W-1:0]    mar_addr,
  output logic [BUS_W-1:0]     ram_value,
  output logic [BUS_W-1:0]     ir,
  output logic [BUS_W-1:0]     reg_a,
  output logic [BUS_W-1:0]     alu,
  output logic [BUS_W-1:0]     reg_b,
  output logic [BUS_W-1:0]     out_value,
  output logic [2:0][3:0]      out_digits,
  output logic [2:0][6:0]      out_segments,
  output logic [STEP_W-1:0]    step,
  output logic [NUM_STEPS-1:0] tstep,
  output logic [MC_ADDR_W:0]   mc_addr,
  output control_word_t        mc_word,
  output control_word_t        cw,
  output logic                 fi,
  output logic                 bus_conflict
);

  logic              core_rst_n;
  logic              rise, fall;
  logic [OP_W-1:0]   opcode;
  logic [ADDR_W-1:0] operand;

  assign core_rst_n = rst_n & power;
  assign fi         = cw.fi;

  sap1_clock #(
    .TICKS_PER_MS    (TICKS_PER_MS),
    .DEFAULT_DELAY_MS(DEFAULT_DELAY_MS)
  ) u_clock (
    .clk, .rst_n(core_rst_n),
    .hlt         (hlt_sw | cw.hlt),
    .pulse, .delay_ms, .delay_update,
    .level       (clk_led),
    .rise, .fall
  );

  sap1_pc u_pc (
    .clk, .rst_n(core_rst_n), .rise,
    .ce(cw.ce), .j(cw.j), .bus_in(bus[ADDR_W-1:0]), .value(pc)
  );

  sap1_mar u_mar (
    .clk, .rst_n(core_rst_n), .rise,
    .mi(cw.mi), .bus_in(bus[ADDR_W-1:0]),
    .manual_sel(mar_manual_sel), .manual_addr(mar_manual_addr), .addr(mar_addr)
  );

  sap1_ram u_ram (
    .clk, .rise,
    .ri(cw.ri), .addr(mar_addr), .bus_in(bus),
    .store(ram_store), .manual_value(ram_manual_value),
    .clear(ram_clear | ~power), .rdata(ram_value)
  );

  sap1_ir u_ir (
    .clk, .rst_n(core_rst_n), .rise,
    .ii(cw.ii), .bus_in(bus), .value(ir), .opcode, .operand
  );

  sap1_reg_a u_reg_a (
    .clk, .rst_n(core_rst_n), .rise, .ai(cw.ai), .bus_in(bus), .value(reg_a)
  );

  sap1_reg_b u_reg_b (
    .clk, .rst_n(core_rst_n), .rise, .bi(cw.bi), .bus_in(bus), .value(reg_b)
  );

  sap1_alu u_alu (
    .a(reg_a), .b(reg_b), .su(cw.su), .result(alu)
  );

  sap1_out u_out (
    .clk, .rst_n(core_rst_n), .rise, .oi(cw.oi), .bus_in(bus),
    .value(out_value), .digits(out_digits), .segments(out_segments)
  );

  sap1_bus u_bus (
    .co(cw.co), .pc,
    .ro(cw.ro), .ram(ram_value),
    .io(cw.io), .ir_operand(operand),
    .ao(cw.ao), .a(reg_a),
    .eo(cw.eo), .alu,
    .bus, .conflict(bus_conflict)
  );

  sap1_step_counter u_id (
    .clk, .rst_n(core_rst_n), .fall, .enable(id_enable), .step, .tstep
  );

  sap1_microcode u_mc (
    .clk, .enable(mc_enable), .opcode, .step,
    .manual_sel(mc_manual_sel), .manual_addr(mc_manual_addr),
    .store(mc_store), .manual_value(mc_manual_value), .clear(mc_clear),
    .manual_cw, .addr(mc_addr), .word(mc_word), .cw
  );

  // Bus rule: at most one source drives the bus when a latching edge occurs.
  a_one_bus_driver: assert property (@(posedge clk) disable iff (!(rst_n && power))
                                     rise |-> !bus_conflict)
    else $error("several outputs drive the bus at a leading clock edge");

endmodule
