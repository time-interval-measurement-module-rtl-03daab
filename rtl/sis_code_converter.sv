// Bubble error decoder and code converter of one coding line.
//
// Input: the TAPS flip-flop outputs of a time coded delay line, in which the
// six-edge pattern lies. Three steps, all combinational:
//  1. Bubble removal (low-pass filter): each tap is replaced by the majority
//     of itself and its two neighbours (the line ends repeat their own
//     value), which removes isolated wrong bits caused by unequal flip-flop
//     thresholds or supply noise.
//  2. Edge marking (derivative): bit i is 1 where the filtered level changes
//     between tap i-1 and tap i (i >= 1); bit 0 is always 0.
//  3. Compression: the marked word is cut into 8-bit groups, each replaced
//     by a 4-bit code (tim_pkg::encode_group): no edge, one of eight single
//     edges, or one of six edge pairs at least five taps apart; anything else
//     is code 15 (error). 256 taps become 128 bits, a 2:1 ratio, as the
//     design specifies. Group k of the line is code[4k+3:4k].
// The majority filter, the group size of eight and the numbering of the 15
// codes are this design's own reading of the converter.
module sis_code_converter
  import tim_pkg::*;
#(
  parameter int unsigned TAPS = tim_pkg::C_TAPS
) (
  input  logic [TAPS-1:0]   taps,
  output logic [TAPS/2-1:0] code,
  output logic [TAPS-1:0]   edges   // marked edges, for observation
);
  timeunit 1ps; timeprecision 1fs;

  logic [TAPS+1:0] padded;
  logic [TAPS-1:0] filt;

  assign padded = {taps[TAPS-1], taps, taps[0]};

  always_comb begin
    for (int i = 0; i < TAPS; i++)
      filt[i] = (padded[i] & padded[i+1]) | (padded[i+1] & padded[i+2]) |
                (padded[i] & padded[i+2]);
    edges[0] = 1'b0;
    for (int i = 1; i < TAPS; i++) edges[i] = filt[i] ^ filt[i-1];
    for (int g = 0; g < TAPS / 8; g++) code[4*g +: 4] = encode_group(edges[8*g +: 8]);
  end
endmodule
