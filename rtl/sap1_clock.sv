// sap1_clock: the CPU clock of the SAP-1.
//
// The CPU clock is derived from a free-running system clock `clk`. While not
// halted it toggles by itself with a period of delay_ms milliseconds
// (TICKS_PER_MS system cycles per ms, default period 1000 ms), high for the
// first half of each period. While `hlt` is set it stops at the end of the
// current high phase; each `pulse` request then gives one manual clock pulse,
// high for a single system cycle. `delay_update` loads a new period from
// delay_ms, as the "update" button does.
//
// Outputs: `level` is the clock level (the indicator LED); `rise` and `fall`
// are one-system-cycle strobes at the leading and trailing edge. Registers of
// the CPU act on `rise`, the step counter on `fall`, in line with the
// leading/trailing-edge split of the design. The period divider, the 50/50
// duty cycle and the one-cycle manual pulse are choices of this design.
module sap1_clock #(
  parameter int unsigned TICKS_PER_MS     = 50_000,
  parameter int unsigned DEFAULT_DELAY_MS = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hlt,
  input  logic        pulse,
  input  logic [15:0] delay_ms,
  input  logic        delay_update,
  output logic        level,
  output logic        rise,
  output logic        fall
);

  localparam int unsigned CNT_W = 40;

  logic [15:0]      delay_q;
  logic [CNT_W-1:0] half;     // system cycles per half period, at least 1
  logic [CNT_W-1:0] cnt;      // cycles spent in the current phase
  logic             manual_q; // current high phase came from a manual pulse
  logic             phase_done;

  always_comb begin
    half = (CNT_W'(delay_q) * CNT_W'(TICKS_PER_MS)) >> 1;
    if (half == '0) half = CNT_W'(1);
  end

  assign phase_done = (cnt + 1'b1 >= half);

  always_comb begin
    rise = 1'b0;
    fall = 1'b0;
    if (level) begin
      fall = manual_q || phase_done;
    end else if (hlt) begin
      rise = pulse;
    end else begin
      rise = phase_done;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay_q  <= 16'(DEFAULT_DELAY_MS);
      level    <= 1'b0;
      cnt      <= '0;
      manual_q <= 1'b0;
    end else begin
      if (delay_update) delay_q <= delay_ms;
      if (rise) begin
        level    <= 1'b1;
        cnt      <= '0;
        manual_q <= hlt;
      end else if (fall) begin
        level    <= 1'b0;
        cnt      <= '0;
        manual_q <= 1'b0;
      end else if (!(hlt && !level)) begin
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
      end
    end
  end

endmodule
