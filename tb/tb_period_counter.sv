// Testbench for period_counter: 500 MHz clock (rising edges at 1000 ps +
// k*2000 ps); START and STOP trigger levels rise at random times. The count
// must equal the number of clock rising edges after START up to the first
// edge after STOP, and done must rise one edge later.
module tb_period_counter;
  timeunit 1ps; timeprecision 1fs;

  localparam real T0 = 2000.0;

  logic        clk = 0, rst, st, sp, done;
  logic [29:0] count;
  always #(T0 / 2) clk = ~clk;

  period_counter #(.CNT_W(30)) dut (.clk, .rst, .start_trig(st), .stop_trig(sp), .count, .done);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edges in (a, b]: rising edges at 1000 + k*T0
  function automatic longint edges_between(input real a, input real b);
    return longint'($floor((b - 1000.0) / T0)) - longint'($floor((a - 1000.0) / T0));
  endfunction

  initial begin
    st = 0; sp = 0; rst = 0;
    #1 rst = 1;
    for (int n = 0; n < 60; n++) begin
      realtime ts, tp, tdone, ep;
      longint gap;
      #(T0 * 2 + real'($urandom_range(0, 1999)));
      rst = 0;
      check("cleared", longint'(count), 0);
      #(real'($urandom_range(5, 1995)));
      if (((($realtime - 1000.0) / T0) - $floor(($realtime - 1000.0) / T0)) * T0 < 5.0) #10;
      st = 1; ts = $realtime;
      gap = (n < 10) ? longint'($urandom_range(0, 3)) : longint'($urandom_range(0, 3000));
      #(real'(gap) * T0 + real'($urandom_range(20, 1980)));
      sp = 1; tp = $realtime;
      @(posedge done);
      tdone = $realtime;
      ep = 1000.0 + T0 * ($floor((tp - 1000.0) / T0) + 1.0);   // first edge after STOP
      check("period count", longint'(count), edges_between(ts, tp));
      check("done latency (ps)", longint'(tdone - ep), longint'(T0));
      #(T0 * 3);
      check("count frozen", longint'(count), edges_between(ts, tp));
      st = 0; sp = 0; rst = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
