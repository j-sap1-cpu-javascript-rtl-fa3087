// tb_sap1_clock: checks the SAP-1 clock generator.
//
// With TICKS_PER_MS = 2 and a default delay of 3 ms a period is 6 system
// cycles, high for 3. The test measures rise-to-rise and rise-to-fall
// distances while running, checks that HLT stops automatic pulses, that each
// manual pulse gives one rise followed by a fall one cycle later, and that a
// delay update changes the period.
module tb_sap1_clock;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hlt, pulse, delay_update;
  logic [15:0] delay_ms;
  logic level, rise, fall;
  int checks = 0, failures = 0;
  int cyc = 0;

  sap1_clock #(.TICKS_PER_MS(2), .DEFAULT_DELAY_MS(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Returns the number of cycles until the next strobe of the given kind.
  task automatic wait_strobe(bit want_rise, int limit, output int n);
    n = 0;
    do begin @(posedge clk); n++; end
    while (!(want_rise ? rise : fall) && n < limit);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, n2;
  initial begin
    hlt = 0; pulse = 0; delay_update = 0; delay_ms = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // first rise after 3 low cycles
    wait_strobe(1, 100, n);
    // rise-to-rise and rise-to-fall at the default delay
    for (int k = 0; k < 4; k++) begin
      #1;
      check(level == 1'b1, "level high after a rise strobe");
      wait_strobe(0, 100, n);
      check(n == 3, $sformatf("high phase %0d cycles, expected 3", n));
      #1 check(level == 1'b0, "level low after a fall strobe");
      wait_strobe(1, 100, n2);
      check(n + n2 == 6, $sformatf("period %0d cycles, expected 6", n + n2));
    end
    // halt: no rises for a long time
    @(negedge clk) hlt = 1;
    wait_strobe(0, 100, n);
    wait_strobe(1, 50, n);
    check(n == 50 && !rise, "no rise while halted");
    // manual pulses
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) pulse = 1;
      #1 check(rise == 1'b1, "manual pulse gives a rise");
      @(negedge clk) pulse = 0;
      check(level == 1'b1 && fall == 1'b1, "manual pulse falls after one cycle");
      @(negedge clk);
      check(level == 1'b0 && !rise && !fall, "manual pulse completed");
      repeat (4) @(negedge clk);
    end
    // update delay to 5 ms -> period 10, then run
    @(negedge clk) begin delay_ms = 16'd5; delay_update = 1; end
    @(negedge clk) begin delay_update = 0; hlt = 0; end
    wait_strobe(1, 100, n);
    for (int k = 0; k < 3; k++) begin
      wait_strobe(0, 100, n);
      check(n == 5, $sformatf("high phase %0d, expected 5", n));
      wait_strobe(1, 100, n2);
      check(n + n2 == 10, $sformatf("period %0d, expected 10", n + n2));
    end
    // zero delay: shortest period, 2 cycles
    @(negedge clk) begin delay_ms = 16'd0; delay_update = 1; end
    @(negedge clk) delay_update = 0;
    wait_strobe(1, 100, n);
    wait_strobe(1, 100, n);
    check(n == 2, $sformatf("zero-delay period %0d, expected 2", n));
    // reset restores the default period
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    wait_strobe(1, 100, n);
    wait_strobe(1, 100, n);
    check(n == 6, $sformatf("period after reset %0d, expected 6", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
