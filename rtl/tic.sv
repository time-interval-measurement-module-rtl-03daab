// Time interval counter (TIC) with two-stage interpolation.
//
// Measures the time T between the rising edges of START and STOP:
//   T = N*T0 + (T_ST1 + T_ST2) - (T_SP1 + T_SP2)
// N is the number of 500 MHz clock periods (30-bit period counter), the
// first stage resolves which of 16 clock phases preceded each edge (4 bits
// each), and the second stage resolves the time within one phase step with
// three independent coding lines per edge (3 x 128 bits each). The TIC
// interface resets the channels before each measurement and serves the
// 896-bit frame on the asynchronous READY/VALID/FRAME bus; turning the raw
// codes into seconds (calibration, decoding) is done by software.
// Structure as in the design: a START and a STOP interpolator, each with its
// own multi-phase clock, a period counter fed through a synchroniser by both
// first stages, and the TIC interface. The multi-phase clocks and delay lines
// are behavioural models, so this module simulates but does not synthesize.
// clk must be the 500 MHz counter clock; rst_n is asynchronous, active low.
// The linter notes the phase nets as used both as clocks and as data: the
// first stage clocks flip-flops with them, and the multi-phase clock model
// builds each phase from the one before. Both uses are intended.
module tic
  import tim_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    stop,
  input  logic                    ready,
  output logic                    valid,
  output logic [C_FRAME_BITS-1:0] frame
);
  timeunit 1ps; timeprecision 1fs;

  logic [C_PHASES-1:0] ph_start, ph_stop;
  logic                meas_rst, trig_start, trig_stop, done;
  logic [C_FIS_W-1:0]  fis_start, fis_stop;
  logic [C_SIS_W-1:0]  sis_start, sis_stop;
  logic [C_CNT_W-1:0]  period;
  tic_frame_t          frame_s;

  mpc #(.PHASES(C_PHASES)) u_mpc_start (.clk, .phase(ph_start));
  mpc #(.PHASES(C_PHASES)) u_mpc_stop  (.clk, .phase(ph_stop));

  interpolator u_start (
    .hit(start), .rst(meas_rst), .phase(ph_start),
    .hit_flag(trig_start), .fis_code(fis_start), .sis(sis_start)
  );
  interpolator u_stop (
    .hit(stop), .rst(meas_rst), .phase(ph_stop),
    .hit_flag(trig_stop), .fis_code(fis_stop), .sis(sis_stop)
  );

  period_counter #(.CNT_W(C_CNT_W)) u_cnt (
    .clk, .rst(meas_rst), .start_trig(trig_start), .stop_trig(trig_stop),
    .count(period), .done
  );

  tic_interface u_if (
    .clk, .rst_n, .ready, .valid, .frame(frame_s),
    .meas_rst, .meas_done(done), .period, .fis_start, .fis_stop,
    .sis_start, .sis_stop
  );

  assign frame = frame_s;
endmodule
