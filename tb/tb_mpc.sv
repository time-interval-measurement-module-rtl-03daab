// Testbench for the multi-phase clock model: every rising edge of phase i
// must follow the matching clock rising edge by i * 125 ps, and each phase
// must keep the 2000 ps period.
module tb_mpc;
  timeunit 1ps; timeprecision 1fs;

  logic        clk = 0;
  logic [15:0] phase;
  always #1000 clk = ~clk;

  mpc #(.PHASES(16), .CLK_PERIOD_PS(2000.0)) dut (.clk, .phase);

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_clk;
  always @(posedge clk) t_clk = $realtime;

  for (genvar i = 0; i < 16; i++) begin : g_chk
    realtime last = -1.0;
    always @(posedge phase[i]) begin
      if ($realtime > 5000.0) begin
        real rel;
        rel = $realtime - t_clk;
        if (rel < 0.0) rel += 2000.0;
        checks++;
        if (rel < 125.0 * i - 0.01 || rel > 125.0 * i + 0.01) begin
          failures++; $display("FAIL phase %0d edge at +%f ps", i, rel);
        end
        if (last > 0.0) begin
          checks++;
          if ($realtime - last < 1999.99 || $realtime - last > 2000.01) begin
            failures++; $display("FAIL phase %0d period %f", i, $realtime - last);
          end
        end
      end
      last = $realtime;
    end
  end

  initial begin
    #200000;
    // 100 clock periods: every phase must have shown about 100 rising edges
    checks++;
    if (checks < 16 * 90) begin
      failures++;
      $display("FAIL only %0d edge checks made", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
