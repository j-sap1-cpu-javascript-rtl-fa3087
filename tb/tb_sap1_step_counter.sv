// tb_sap1_step_counter: checks that the step counter counts T0..T4 on
// trailing-edge strobes only, returns to T0 after T4, holds while disabled,
// and that the time-step output is one-hot.
module tb_sap1_step_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fall, enable;
  logic [2:0] step;
  logic [4:0] tstep;
  int checks = 0, failures = 0;
  int model, wraps = 0;

  sap1_step_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    checks++;
    if (step !== 3'(model) || tstep !== (5'b1 << model)) begin
      failures++; $display("FAIL step %0d tstep %b exp %0d", step, tstep, model);
    end
  endtask

  initial begin
    fall = 0; enable = 0;
    @(negedge clk); model = 0; cmp();
    rst_n = 1;
    // the five steps of an instruction, then back to T0
    enable = 1;
    for (int k = 1; k <= 10; k++) begin
      @(negedge clk) fall = 1;
      @(negedge clk) fall = 0;
      model = k % 5; cmp();
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk) begin fall = 1'($urandom); enable = ($urandom % 4) != 0; end
      if (fall && enable) begin
        if (model == 4) wraps++;
        model = (model + 1) % 5;
      end
      @(posedge clk); #1 cmp();
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
