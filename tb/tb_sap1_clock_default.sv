// tb_sap1_clock_default: checks the clock generator at its default
// parameters: 50 000 system cycles per ms and a 1000 ms period, i.e. 25
// million cycles high and 25 million low. Also checks that HLT stops it.
module tb_sap1_clock_default;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hlt, pulse, delay_update;
  logic [15:0] delay_ms;
  logic level, rise, fall;
  int checks = 0, failures = 0;
  int unsigned n_high, n_low;

  localparam int unsigned HALF = 50_000 * 1000 / 2;

  sap1_clock dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hlt = 0; pulse = 0; delay_update = 0; delay_ms = 16'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // skip to the first rise, then time one whole period
    do @(posedge clk); while (!rise);
    n_high = 0; do begin @(posedge clk); n_high++; end while (!fall);
    n_low  = 0; do begin @(posedge clk); n_low++;  end while (!rise);
    checks++;
    if (n_high != HALF) begin failures++; $display("FAIL high %0d cycles, expected %0d", n_high, HALF); end
    checks++;
    if (n_low != HALF) begin failures++; $display("FAIL low %0d cycles, expected %0d", n_low, HALF); end
    // halt: the high phase finishes, then nothing
    @(negedge clk) hlt = 1;
    do @(posedge clk); while (!fall);
    repeat (1000) begin
      @(posedge clk);
      checks++;
      if (rise || level) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
