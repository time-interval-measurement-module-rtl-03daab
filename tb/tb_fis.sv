// Testbench for fis: 16 ideal clock phases (2000 ps period, 125 ps apart)
// are generated here; hits at random times must give the number of the phase
// that rose last, a sync edge at the next phase edge and a hit flag, and a
// reset must clear all of them.
module tb_fis;
  timeunit 1ps; timeprecision 1fs;

  localparam real T0 = 2000.0, STEP = 125.0;

  logic        hit, rst, hit_flag, sync;
  logic [15:0] phase;
  logic [3:0]  code;

  fis #(.PHASES(16)) dut (.hit, .rst, .phase, .hit_flag, .sync, .code);

  // phase i is high during [i*STEP, i*STEP + T0/2) of each period
  initial begin
    phase = '0;
    forever begin
      for (int s = 0; s < 16; s++) begin
        phase[s] = 1'b1;
        phase[(s + 8) % 16] = 1'b0;
        #(STEP);
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_sync;
  always @(posedge sync) t_sync = $realtime;

  initial begin
    hit = 0; rst = 0;
    #1 rst = 1;
    #(3 * T0);
    for (int n = 0; n < 200; n++) begin
      realtime th, off;
      int k;
      rst = 1;
      #($urandom_range(100, 4000));
      rst = 0;
      check("flag cleared", longint'(hit_flag), 0);
      check("sync cleared", longint'(sync), 0);
      // hit at a random offset, at least 3 ps from any phase edge
      off = real'($urandom_range(3, 122)) + real'($urandom_range(0, 15)) * STEP;
      th = $realtime;
      #(T0 - (th - T0 * $floor(th / T0)) + off);   // align to period start + off
      hit = 1;
      th = $realtime;
      k = int'($floor((th - T0 * $floor(th / T0)) / STEP));
      #(2 * STEP);
      hit = 0;
      #(T0);
      check("hit flag", longint'(hit_flag), 1);
      check("fis code", longint'(code), longint'(k));
      check("sync at next phase edge (fs)",
            longint'((t_sync - th) * 1000.0), longint'((STEP * (k + 1) - (th - T0 * $floor(th / T0))) * 1000.0));
      // a second hit before reset changes nothing
      hit = 1; #(300); hit = 0;
      check("code held", longint'(code), longint'(k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
