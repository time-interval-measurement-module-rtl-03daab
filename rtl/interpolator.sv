// One interpolation channel of the time interval counter (START or STOP).
//
// First stage: fis times the hit against the multi-phase clock, gives the
// 4-bit phase code, the counter trigger and the sync edge. Second stage:
// LINES independent time coded delay lines (tcdl, one shared pattern
// trigger, each with its own pattern offset) are latched by the sync edge;
// each line's 256 taps go through a bubble error decoder and code converter
// (sis_code_converter) to a 128-bit code. sis holds line j in bits
// 128*j+127 : 128*j. rst (active high) re-arms the whole channel.
// Three coding lines per channel follow the design; offsetting the pattern of
// line j by j/3 of a tap, so that the lines interleave, is this design's
// choice. The converters' edge-mark outputs are for observation in tests and
// are left unread here, which the linter reports as an unused signal.
module interpolator
  import tim_pkg::*;
#(
  parameter int unsigned PHASES = tim_pkg::C_PHASES,
  parameter int unsigned LINES  = tim_pkg::C_LINES,
  parameter int unsigned TAPS   = tim_pkg::C_TAPS
) (
  input  logic                       hit,
  input  logic                       rst,
  input  logic [PHASES-1:0]          phase,
  output logic                       hit_flag,
  output logic [$clog2(PHASES)-1:0]  fis_code,
  output logic [LINES*TAPS/2-1:0]    sis
);
  timeunit 1ps; timeprecision 1fs;

  localparam real TAP_PS = 125.0 / 256.0;

  logic sync;

  fis #(.PHASES(PHASES)) u_fis (
    .hit, .rst, .phase, .hit_flag, .sync, .code(fis_code)
  );

  for (genvar j = 0; j < LINES; j++) begin : g_line
    logic [TAPS-1:0] taps;
    logic [TAPS-1:0] edges;
    tcdl #(.TAPS(TAPS), .TAP_PS(TAP_PS), .PG_DELAY_PS(20.0 + TAP_PS * j / 3.0)) u_line (
      .trig(hit), .sync, .rst, .taps
    );
    sis_code_converter #(.TAPS(TAPS)) u_conv (
      .taps, .code(sis[j*TAPS/2 +: TAPS/2]), .edges
    );
  end
endmodule
