// First stage of interpolation (FIS) of one measurement channel.
//
// The hit (START or STOP edge) is timed against the PHASES phases of the
// multi-phase clock:
//  - On the hit's rising edge all phases are sampled. For a 50 % duty clock
//    the sample is a circular run of ones; the phase that rose last before
//    the hit is the one that is high while its successor is low. Its number
//    is the 4-bit first-stage code ("phase after which the hit occurred").
//  - hit_flag goes high at the hit and stays high; it is the trigger that the
//    period counter synchronises.
//  - sync rises with the first phase edge after the hit (a flop per phase,
//    clocked by that phase, loads hit_flag; sync is their OR). It latches the
//    second-stage delay lines.
// rst (active high, asynchronous) clears everything for the next
// measurement. Code converter output is combinational from the samples.
// Follows the design: 16 phases, phase detection, sync and counter triggers.
// The flop-per-phase sync circuit and the run-end decoding are this design's
// own.
module fis #(
  parameter int unsigned PHASES = 16,
  parameter int unsigned CODE_W = $clog2(PHASES)
) (
  input  logic              hit,
  input  logic              rst,
  input  logic [PHASES-1:0] phase,
  output logic              hit_flag,
  output logic              sync,
  output logic [CODE_W-1:0] code
);
  timeunit 1ps; timeprecision 1fs;

  logic [PHASES-1:0] samp, armed;

  always_ff @(posedge hit or posedge rst) begin
    if (rst) begin
      hit_flag <= 1'b0;
      samp     <= '0;
    end else if (!hit_flag) begin
      hit_flag <= 1'b1;
      samp     <= phase;
    end
  end

  for (genvar i = 0; i < PHASES; i++) begin : g_arm
    logic armed_q;
    always_ff @(posedge phase[i] or posedge rst) begin
      if (rst) armed_q <= 1'b0;
      else     armed_q <= armed_q | hit_flag;
    end
    assign armed[i] = armed_q;
  end

  assign sync = |armed;

  always_comb begin
    code = '0;
    for (int k = 0; k < PHASES; k++)
      if (samp[k] && !samp[(k + 1) % PHASES]) code = CODE_W'(k);
  end
endmodule
