// sap1_step_counter: the instruction decoder's step counter.
//
// A 3-bit counter that advances on the trailing clock edge (`fall` strobe)
// while enabled, counting T0..T4 and returning to T0 after T4 (NUM_STEPS = 5:
// two fetch steps plus up to three execute steps). Advancing on the trailing
// edge means the microcode presents the next step's control word before the
// next leading edge, where the registers act. `tstep` is the one-hot
// time-step display (bit i = Ti). Holding the count while disabled is this
// design's choice; reset returns it to T0.
module sap1_step_counter
  import sap1_pkg::*;
#(
  parameter int unsigned NSTEPS = NUM_STEPS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fall,
  input  logic              enable,
  output logic [STEP_W-1:0] step,
  output logic [NSTEPS-1:0] tstep
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
    end else if (fall && enable) begin
      if (step == STEP_W'(NSTEPS - 1)) step <= '0;
      else                             step <= step + 1'b1;
    end
  end

  always_comb begin
    tstep = '0;
    for (int i = 0; i < NSTEPS; i++) tstep[i] = (step == STEP_W'(i));
  end

endmodule
