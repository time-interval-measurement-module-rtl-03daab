// Time coded delay line (TCDL) with its pattern generator -- behavioural
// model, not synthesizable.
//
// Second stage of interpolation, multi-edge coding in an independent coding
// line. When the measured signal (trig) rises, the pattern generator emits a
// square wave with six edges (first edge rising) at PG_DELAY_PS +
// k*EDGE_GAP_TAPS*TAP_PS, k = 0..5. The wave runs down a chain of TAPS
// buffers of TAP_PS each. The synchronisation signal (sync, the next
// multi-phase clock edge from the first stage), delayed by DT_PS, clocks the
// TAPS flip-flops, which then hold the pattern as it lies in the line: tap i
// holds the pattern level that entered the line i*TAP_PS before the latch
// instant. rst clears the flip-flops and re-arms the generator.
// Follows the design: 256 taps covering one 125 ps phase step, six pattern
// edges, latch on the sync delayed by about the pattern generator delay.
// This model's own choices: ideal equal tap delays, an edge spacing of 20
// taps, and DT_PS = PG_DELAY_PS + 2 taps, so that for a hit just before the
// sync the first pattern edge sits at tap 2; later edges enter the line as
// the hit moves earlier, so at least one edge is always inside. A second
// trig before rst does not restart the pattern.
module tcdl #(
  parameter int unsigned TAPS          = 256,
  parameter real         TAP_PS        = 125.0 / 256.0,
  parameter real         PG_DELAY_PS   = 20.0,
  parameter int unsigned EDGE_GAP_TAPS = 20,
  parameter real         DT_PS         = 20.0 + 2.0 * (125.0 / 256.0)
) (
  input  logic            trig,
  input  logic            sync,
  input  logic            rst,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  realtime t_trig;
  bit      armed;

  always @(posedge trig or posedge rst) begin
    if (rst) begin
      armed <= 1'b0;
    end else if (!armed) begin
      armed  <= 1'b1;
      t_trig <= $realtime;
    end
  end

  // pattern level at elapsed time x after the trigger
  function automatic logic level_at(input real x);
    int n = 0;
    for (int k = 0; k < 6; k++)
      if (x >= PG_DELAY_PS + real'(k * EDGE_GAP_TAPS) * TAP_PS) n++;
    return n[0];
  endfunction

  // latch flip-flops: clocked by sync delayed by DT_PS, cleared by rst
  initial begin
    taps = '0;
    forever begin
      @(posedge sync or posedge rst);
      if (rst) begin
        taps = '0;
      end else begin
        #(DT_PS);
        if (armed && !rst)
          for (int i = 0; i < TAPS; i++)
            taps[i] = level_at(($realtime - t_trig) - real'(i) * TAP_PS);
      end
    end
  end
endmodule
