// Period counter with trigger synchroniser.
//
// Counts periods of the 500 MHz clock between the START and STOP triggers of
// the two first-stage interpolators. Each trigger is a level that goes high
// at its hit; both pass identical two-flop synchronisers, and the counter
// advances on every clock edge at which the synchronised START is high and
// the synchronised STOP is still low. Because both paths have the same
// latency, the final count N is the number of clock rising edges after the
// START hit up to and including the first edge after the STOP hit, which is
// the N of T = N*T0 + T_START - T_STOP, where T_START and T_STOP are the
// times from each hit to the next clock edge.
// done goes high at the clock edge after the first one following STOP, when
// the count is final. rst (active high, asynchronous) clears the counter.
// The 30-bit width and the synchronised counter enable follow the design; the
// two-flop synchroniser depth is this design's choice. The count wraps after
// 2^CNT_W periods (about 2.1 s at 500 MHz).
module period_counter #(
  parameter int unsigned CNT_W = 30
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_trig,
  input  logic             stop_trig,
  output logic [CNT_W-1:0] count,
  output logic             done
);
  timeunit 1ps; timeprecision 1fs;

  logic [1:0] s_sync, p_sync;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_sync <= '0;
      p_sync <= '0;
      count  <= '0;
    end else begin
      s_sync <= {s_sync[0], start_trig};
      p_sync <= {p_sync[0], stop_trig};
      if (s_sync[1] && !p_sync[1]) count <= count + CNT_W'(1);
    end
  end

  assign done = s_sync[1] && p_sync[1];
endmodule
