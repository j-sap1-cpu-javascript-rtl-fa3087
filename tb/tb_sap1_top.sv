// tb_sap1_top: end-to-end test of the SAP-1 CPU at its default parameters.
//
// 1. Power on with the clock halted; store 28 and 14 in RAM by hand through
//    the manual address select; let the clock run with CE, CO and MI set so
//    the program counter addresses RAM; check that RESET keeps RAM.
// 2. Add 28 + 14 by setting control lines by hand and pulsing the clock:
//    MI|CO, CE|RO|AI, MI|CO, RO|BI, OI|EO; the output shows 042. Then
//    subtract (SU) and show 014.
// 3. Cycle power (RAM is cleared), store LDA 14 (0001 1110) at address 0 and
//    28 at address 14, and run the fetch cycle and LDA by hand; check that IO
//    puts only the operand on the bus and that J loads the program counter.
// 4. Program the microcode through its manual port: first only the LDA rows,
//    where five pulses do nothing but step T0..T4; then the NOP/fetch rows,
//    after which five pulses execute LDA 14 and load 28 into A.
// 5. Let the clock run by itself with a 1 ms period, executing LDA 14 and
//    then an instruction whose microcode raises HLT; check the period and
//    that the clock stops.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_sap1_top;
  import sap1_pkg::*;

  localparam int unsigned TICKS_PER_MS = 50_000;  // the top's default

  logic clk = 1'b0, rst_n = 1'b1, power = 1'b0;
  logic hlt_sw, pulse, delay_update;
  logic [15:0] delay_ms;
  logic mar_manual_sel;
  logic [3:0] mar_manual_addr;
  logic ram_store, ram_clear;
  logic [7:0] ram_manual_value;
  logic id_enable, mc_enable, mc_manual_sel, mc_store, mc_clear;
  logic [6:0] mc_manual_addr;
  control_word_t mc_manual_value, manual_cw;
  logic clk_led;
  logic [7:0] bus, ram_value, ir, reg_a, alu, reg_b, out_value;
  logic [3:0] pc, mar_addr;
  logic [2:0][3:0] out_digits;
  logic [2:0][6:0] out_segments;
  logic [2:0] step;
  logic [4:0] tstep;
  logic [7:0] mc_addr;
  control_word_t mc_word, cw;
  logic fi, bus_conflict;

  sap1_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // control lines as 16-bit words, HLT = bit 15 ... FI = bit 0
  localparam logic [15:0] HLT = 16'h8000, MI = 16'h4000, RI = 16'h2000, RO = 16'h1000,
                          IO = 16'h0800, II = 16'h0400, AI = 16'h0200, AO = 16'h0100,
                          EO = 16'h0080, SU = 16'h0040, BI = 16'h0020, OI = 16'h0010,
                          CE = 16'h0008, CO = 16'h0004, J  = 16'h0002, FI = 16'h0001;

  // mechanism counters
  int n_manual_pulse = 0, n_auto_pulse = 0, n_cw_halt = 0, n_step_wrap = 0;
  int n_ram_store = 0, n_mc_store = 0, n_mar_manual = 0, n_ram_power_clear = 0;
  int n_reset_keeps_ram = 0, n_subtract = 0, n_jump = 0, n_io_operand = 0;
  int n_pc_wrap = 0, n_mc_disabled = 0, n_mc_enabled = 0, n_delay_update = 0;

  always @(posedge clk) begin
    if (dut.rise &&  hlt_sw) n_manual_pulse++;
    if (dut.rise && !hlt_sw) n_auto_pulse++;
    if (dut.fall && id_enable && step == 3'd4) n_step_wrap++;
    if (dut.rise && cw.ce && !cw.j && pc == 4'd15) n_pc_wrap++;
    if (dut.rise && cw.j) n_jump++;
    if (dut.rise && cw.su && cw.eo) n_subtract++;
    if (dut.rise &&  mc_enable) n_mc_enabled++;
    if (dut.rise && !mc_enable) n_mc_disabled++;
    if (ram_store) n_ram_store++;
    if (mc_store) n_mc_store++;
    if (delay_update) n_delay_update++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // one manual clock pulse with the given control lines (clock halted)
  task automatic step_manual(logic [15:0] lines);
    tick(); manual_cw = lines;
    tick(); pulse = 1;
    tick(); pulse = 0;
    tick(2);
  endtask

  task automatic pulse_only(int n);
    repeat (n) begin
      tick(); pulse = 1;
      tick(); pulse = 0;
      tick(2);
    end
  endtask

  task automatic ram_write(logic [3:0] a, logic [7:0] v);
    tick(); mar_manual_sel = 1; mar_manual_addr = a; ram_manual_value = v;
    tick(); ram_store = 1;
    tick(); ram_store = 0;
    tick(); mar_manual_sel = 0;
  endtask

  task automatic ram_check(logic [3:0] a, logic [7:0] v, string what);
    tick(); mar_manual_sel = 1; mar_manual_addr = a;
    #1;
    check(mar_addr == a && ram_value == v,
          $sformatf("%s: RAM[%0d] = %0d, expected %0d", what, a, ram_value, v));
    n_mar_manual++;
    tick(); mar_manual_sel = 0;
  endtask

  task automatic mc_write(logic [6:0] a, logic [15:0] w);
    tick(); mc_manual_sel = 1; mc_manual_addr = a; mc_manual_value = w;
    tick(); mc_store = 1;
    tick(); mc_store = 0;
    tick(); mc_manual_sel = 0;
  endtask

  task automatic do_reset();
    tick(); rst_n = 0;
    tick(2); rst_n = 1;
    tick();
  endtask

  // The watchdog: the whole test needs well under 2 million system cycles.
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t1;
  int period, pulses_before;

  initial begin
    hlt_sw = 1; pulse = 0; delay_ms = 16'd1000; delay_update = 0;
    mar_manual_sel = 0; mar_manual_addr = 0; ram_store = 0; ram_clear = 0; ram_manual_value = 0;
    id_enable = 0; mc_enable = 0; mc_manual_sel = 0; mc_store = 0; mc_clear = 0;
    mc_manual_addr = 0; mc_manual_value = '0; manual_cw = '0;
    tick(3);                    // power off: everything held, RAM cleared
    mc_clear = 1; tick(); mc_clear = 0;   // start with an empty microcode store
    power = 1;
    tick(2);
    check(pc == 0 && reg_a == 0 && reg_b == 0 && out_value == 0 && ir == 0 && step == 0,
          "state after power on");
    check(tstep == 5'b00001, "T0 lit after power on");
    check(out_digits == {4'd0, 4'd0, 4'd0}, "display reads 000");
    // halted: no pulses by itself
    tick(200);
    check(n_manual_pulse == 0 && n_auto_pulse == 0 && !clk_led, "no clock while halted");

    // ---- 1. RAM by hand ------------------------------------------------------
    ram_write(4'd0, 8'd28);
    ram_write(4'd1, 8'd14);
    ram_check(4'd0, 8'd28, "manual store");
    ram_check(4'd1, 8'd14, "manual store");
    ram_check(4'd2, 8'd0, "untouched word");
    // free-running clock with CE and MI|CO: the PC walks through RAM and the
    // RAM shows 28 at address 0, 14 at address 1 and 0 elsewhere
    tick(); delay_ms = 16'd1; delay_update = 1; manual_cw = CE | CO | MI;
    tick(); delay_update = 0; hlt_sw = 0;
    repeat (18) begin
      @(posedge dut.rise);
      tick(2);
      check(mar_addr == pc - 4'd1 &&
            ram_value == (mar_addr == 4'd0 ? 8'd28 : mar_addr == 4'd1 ? 8'd14 : 8'd0),
            $sformatf("PC-driven RAM read at %0d gave %0d", mar_addr, ram_value));
    end
    wait (!clk_led);
    tick(); hlt_sw = 1; manual_cw = '0;
    do_reset();
    ram_check(4'd0, 8'd28, "RESET keeps RAM");
    if (ram_value == 8'd28) n_reset_keeps_ram++;

    // ---- 2. add 28 + 14 with manual control lines -------------------------
    step_manual(MI | CO);
    check(mar_addr == 4'd0, "MAR latched PC 0");
    tick(); manual_cw = CE | RO | AI; #1;
    check(bus == 8'd28, "RAM word on the bus before the pulse");
    check(reg_a == 8'd0, "A does not latch before the pulse");
    step_manual(CE | RO | AI);
    check(reg_a == 8'd28 && pc == 4'd1 && alu == 8'd28, "A = 28, PC = 1, ALU = 28");
    step_manual(MI | CO);
    check(mar_addr == 4'd1 && ram_value == 8'd14, "MAR = 1, RAM shows 14");
    step_manual(RO | BI);
    check(reg_b == 8'd14 && alu == 8'd42, "B = 14, ALU shows 42");
    step_manual(OI | EO);
    check(out_value == 8'd42, $sformatf("output = %0d, expected 42", out_value));
    check(out_digits == {4'd0, 4'd4, 4'd2}, "display reads 042");
    step_manual(OI | EO | SU);
    check(out_value == 8'd14, $sformatf("28 - 14 shown as %0d", out_value));
    step_manual(AO | BI);                         // B = A, then A - B = 0
    check(reg_b == 8'd28, "AO puts A on the bus");
    manual_cw = '0;

    // ---- 3. power cycle, fetch and LDA by hand -----------------------------
    tick(); power = 0;
    tick(3); power = 1;
    tick();
    ram_check(4'd0, 8'd0, "power cycle clears RAM");
    if (ram_value == 8'd0) n_ram_power_clear++;
    ram_check(4'd1, 8'd0, "power cycle clears RAM");
    check(reg_a == 0 && pc == 0, "power cycle resets registers");
    ram_write(4'd0, 8'b0001_1110);                // LDA 14
    ram_write(4'd14, 8'd28);
    do_reset();
    step_manual(MI | CO);                         // T0
    step_manual(RO | II | CE);                    // T1
    check(ir == 8'h1E && pc == 4'd1, "fetch: IR = 0001 1110, PC = 1");
    check(dut.opcode == OP_LDA, "IR decodes LDA");
    tick(); manual_cw = IO | MI; #1;
    check(bus == 8'h0E, $sformatf("IO puts only the operand on the bus (%h)", bus));
    if (bus == 8'h0E) n_io_operand++;
    step_manual(IO | MI);                         // T2
    check(mar_addr == 4'd14, "MAR = 14");
    step_manual(RO | AI);                         // T3
    check(reg_a == 8'd28, "LDA by hand: A = 28");
    step_manual(IO | J);                          // jump to the operand address
    check(pc == 4'd14, "J loads the PC from the bus");
    step_manual(CE); step_manual(CE);
    check(pc == 4'd0, "PC wraps from 15 to 0");
    manual_cw = '0;

    // ---- 4. microcode ------------------------------------------------------
    // LDA rows only (addresses 0b0001xxx)
    mc_write(7'b0001_000, MI | CO);
    mc_write(7'b0001_001, RO | II | CE);
    mc_write(7'b0001_010, MI | IO);
    mc_write(7'b0001_011, RO | AI);
    mc_write(7'b0001_100, 16'h0000);
    tick(); mc_manual_sel = 1; mc_manual_addr = 7'b0001_010; #1;
    check(mc_addr == 8'b0000_1010 && mc_word == (MI | IO), "microcode readback at 0b00001010");
    tick(); mc_manual_sel = 0;
    do_reset();
    step_manual(16'h0000);
    id_enable = 1; mc_enable = 1;
    for (int s = 1; s <= 5; s++) begin
      pulse_only(1);
      check(step == 3'(s % 5) && tstep == (5'b1 << (s % 5)),
            $sformatf("step T%0d after pulse %0d", step, s));
    end
    check(ir == 8'h00 && reg_a == 8'd0 && pc == 4'd0, "empty NOP microcode: nothing happens");
    // NOP rows: the fetch cycle
    mc_enable = 0; id_enable = 0;
    mc_write(7'b0000_000, MI | CO);
    mc_write(7'b0000_001, RO | II | CE);
    do_reset();
    id_enable = 1; mc_enable = 1;
    tick(); #1;
    check(cw == (MI | CO), "T0 control word is MI|CO");
    pulse_only(1);
    check(mar_addr == 4'd0 && step == 3'd1, "T0: MAR = PC");
    pulse_only(1);
    check(ir == 8'h1E && pc == 4'd1 && step == 3'd2 && mc_addr == 8'b0000_1010,
          "T1: IR loaded, address 0b00001010");
    pulse_only(1);
    check(mar_addr == 4'd14, "T2: MAR = operand");
    pulse_only(1);
    check(reg_a == 8'd28, $sformatf("T3: A = %0d, expected 28", reg_a));
    pulse_only(1);
    check(step == 3'd0, "T4 returns to T0");

    // ---- 5. automatic clock, halted by the control word -------------------
    // instruction 0010 (only for this test): fetch, then HLT at T2
    mc_enable = 0; id_enable = 0;
    mc_write(7'b0010_000, MI | CO);
    mc_write(7'b0010_001, RO | II | CE);
    mc_write(7'b0010_010, HLT);
    ram_write(4'd1, 8'b0010_0000);
    do_reset();
    check(dut.u_clock.delay_q == 16'd1000, "default delay is 1000 ms");
    tick(); delay_ms = 16'd1; delay_update = 1;
    tick(); delay_update = 0;
    id_enable = 1; mc_enable = 1;
    tick(); hlt_sw = 0;
    @(posedge dut.rise); t0 = $time;
    @(posedge dut.rise); t1 = $time;
    period = int'((t1 - t0) / 10);
    check(period == int'(TICKS_PER_MS), $sformatf("1 ms period = %0d cycles, expected %0d", period, TICKS_PER_MS));
    // wait for the HLT step: the clock must stop
    wait (cw.hlt);
    n_cw_halt++;
    tick(TICKS_PER_MS * 3);
    check(!clk_led && step == 3'd2 && cw.hlt, "HLT line stops the clock at T2");
    check(reg_a == 8'd28 && ir == 8'h20 && pc == 4'd2, "LDA then the HLT instruction ran");
    pulses_before = n_auto_pulse;
    tick(TICKS_PER_MS * 2);
    check(n_auto_pulse == pulses_before, "no pulses while halted by the control word");
    check(fi == 1'b0, "FI line idle");

    // ---- mechanism coverage ------------------------------------------------
    $display("mechanisms: manual_pulse=%0d auto_pulse=%0d cw_halt=%0d step_wrap=%0d ram_store=%0d mc_store=%0d",
             n_manual_pulse, n_auto_pulse, n_cw_halt, n_step_wrap, n_ram_store, n_mc_store);
    $display("            mar_manual=%0d ram_power_clear=%0d reset_keeps_ram=%0d subtract=%0d jump=%0d io_operand=%0d pc_wrap=%0d",
             n_mar_manual, n_ram_power_clear, n_reset_keeps_ram, n_subtract, n_jump, n_io_operand, n_pc_wrap);
    $display("            mc_disabled=%0d mc_enabled=%0d delay_update=%0d", n_mc_disabled, n_mc_enabled, n_delay_update);
    check(n_manual_pulse > 0, "manual pulse happened");
    check(n_auto_pulse > 0, "automatic pulse happened");
    check(n_cw_halt > 0, "control-word halt happened");
    check(n_step_wrap > 0, "step wrap happened");
    check(n_ram_store > 0, "RAM manual store happened");
    check(n_mc_store > 0, "microcode store happened");
    check(n_mar_manual > 0, "manual address select happened");
    check(n_ram_power_clear > 0, "RAM clear at power off happened");
    check(n_reset_keeps_ram > 0, "RESET kept RAM");
    check(n_subtract > 0, "subtract happened");
    check(n_jump > 0, "jump happened");
    check(n_io_operand > 0, "IO operand transfer happened");
    check(n_pc_wrap > 0, "PC wrap happened");
    check(n_mc_disabled > 0 && n_mc_enabled > 0, "both control-word sources used");
    check(n_delay_update > 0, "delay update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
