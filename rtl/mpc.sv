// Multi-phase clock (MPC) -- behavioural model, not synthesizable.
//
// In the counter a chain of buffers turns the 500 MHz clock into PHASES
// copies, each delayed by one PHASES-th of the clock period (0, 22.5, 45 ...
// 337.5 degrees for 16 phases). Real buffer delays are set by placement; this
// model is an ideal buffer chain: phase[i] is phase[i-1] delayed by
// CLK_PERIOD_PS / PHASES picoseconds, so phase[i] lags the clock by
// i * CLK_PERIOD_PS / PHASES. phase[0] is the clock itself.
// The number of phases and the 500 MHz clock follow the design; the ideal,
// jitter-free delays are this model's simplification.
module mpc #(
  parameter int unsigned PHASES       = 16,
  parameter real         CLK_PERIOD_PS = 2000.0
) (
  input  logic              clk,
  output logic [PHASES-1:0] phase
);
  timeunit 1ps; timeprecision 1fs;

  localparam real STEP_PS = CLK_PERIOD_PS / PHASES;

  assign phase[0] = clk;
  for (genvar i = 1; i < PHASES; i++) begin : g_tap
    always @(phase[i-1]) phase[i] <= #(STEP_PS) phase[i-1];
  end
endmodule
