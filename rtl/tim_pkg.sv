// Shared constants and types of the time interval measurement system.
//
// The measurement frame produced by the time interval counter (TIC) is 896
// bits: seven 128-bit words. Word 1 (bits 127:0) is the generic field, from
// most to least significant 32-bit word: FIS STOP, FIS START, PERIOD NUMBER,
// FRAME NUMBER. Words 2..7 hold the second-stage interpolator (SIS) codes in
// the order START0, STOP0, START1, STOP1, START2, STOP2. This layout follows
// the frame table of the design; the field helpers below are this design's.
package tim_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned C_FRAME_BITS  = 896;  // measurement frame
  localparam int unsigned C_TDATA_W     = 32;   // AXI-Stream data width
  localparam int unsigned C_FIS_W       = 4;    // first stage code (16 phases)
  localparam int unsigned C_PHASES      = 16;   // multi-phase clock phases
  localparam int unsigned C_CNT_W       = 30;   // period counter width
  localparam int unsigned C_TAPS        = 256;  // taps per coding line
  localparam int unsigned C_LINE_CODE_W = C_TAPS / 2; // 128-bit compressed line
  localparam int unsigned C_LINES       = 3;    // coding lines per channel
  localparam int unsigned C_SIS_W       = C_LINES * C_LINE_CODE_W; // 384
  localparam int unsigned C_WORD_BITS   = 128;  // frame word

  // Transmission order: the frame's 128-bit words go out first to last, each
  // big endian, so the n-th TDATA_W-bit word sent is slice stream_slice(n) of
  // the frame (slices numbered from bit 0).
  function automatic int unsigned stream_slice(input int unsigned n,
                                               input int unsigned tdata_w);
    int unsigned per;
    per = C_WORD_BITS / tdata_w;
    return (n / per) * per + (per - 1) - (n % per);
  endfunction

  // Stream controller states (translation module state diagram).
  typedef enum logic [2:0] {
    ST_RESET = 3'd0,
    ST_IDLE  = 3'd1,
    ST_REQ   = 3'd2,
    ST_WR    = 3'd3,
    ST_STEP  = 3'd4
  } tm_state_e;

  // Generic field of the frame (frame bits 127:0).
  typedef struct packed {
    logic [31:0] fis_stop;
    logic [31:0] fis_start;
    logic [31:0] period;
    logic [31:0] frame_no;
  } generic_field_t;

  // Whole frame, most significant word first as packed.
  typedef struct packed {
    logic [C_LINE_CODE_W-1:0] sis_stop2;  // 895:768
    logic [C_LINE_CODE_W-1:0] sis_start2; // 767:640
    logic [C_LINE_CODE_W-1:0] sis_stop1;  // 639:512
    logic [C_LINE_CODE_W-1:0] sis_start1; // 511:384
    logic [C_LINE_CODE_W-1:0] sis_stop0;  // 383:256
    logic [C_LINE_CODE_W-1:0] sis_start0; // 255:128
    generic_field_t         gen;        // 127:0
  } tic_frame_t;

  // Code of one 8-tap group of the edge-marked delay line word. With
  // pattern edges at least five taps apart a group holds no edge, one edge
  // (8 ways) or two edges (6 ways): 15 legal patterns, code 15 = error.
  localparam logic [3:0] GRP_ERROR = 4'd15;

  function automatic logic [3:0] encode_group(input logic [7:0] g);
    logic [3:0] c;
    unique case (g)
      8'b0000_0000: c = 4'd0;
      8'b0000_0001: c = 4'd1;
      8'b0000_0010: c = 4'd2;
      8'b0000_0100: c = 4'd3;
      8'b0000_1000: c = 4'd4;
      8'b0001_0000: c = 4'd5;
      8'b0010_0000: c = 4'd6;
      8'b0100_0000: c = 4'd7;
      8'b1000_0000: c = 4'd8;
      8'b0010_0001: c = 4'd9;   // edges at 0 and 5
      8'b0100_0001: c = 4'd10;  // 0 and 6
      8'b1000_0001: c = 4'd11;  // 0 and 7
      8'b0100_0010: c = 4'd12;  // 1 and 6
      8'b1000_0010: c = 4'd13;  // 1 and 7
      8'b1000_0100: c = 4'd14;  // 2 and 7
      default:      c = GRP_ERROR;
    endcase
    return c;
  endfunction
endpackage
