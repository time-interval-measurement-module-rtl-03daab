// Testbench for the time interval counter: START/STOP pairs at random
// times (intervals from 0.3 ns to 100 us), frames requested over the
// asynchronous bus. Each frame is decoded as the processing software would:
//   T = N*T0 + T_START - T_STOP,  T_x = (15 - FIS_x) * T0/16 + fine_x
// where fine_x, the time from the hit to the next phase edge, is recovered
// from the pattern edge positions in the compressed coding-line words. The
// result must match the true interval to within two delay-line taps, the
// frame numbers must count up, and every coding line must decode.
module tb_tic;
  timeunit 1ps; timeprecision 1fs;

  localparam real T0 = 2000.0, STEP = 125.0, TAP = 125.0 / 256.0;
  localparam real PG = 20.0, DT = 20.0 + 2.0 * TAP;
  localparam int  GAP = 20;

  logic         clk = 0, rst_n, start, stop, ready, valid;
  logic [895:0] frame;
  always #(T0 / 2) clk = ~clk;

  tic dut (.clk, .rst_n, .start, .stop, .ready, .valid, .frame);

  int checks = 0, failures = 0, n_short = 0, n_long = 0;

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decode one 128-bit line code into the fine time (ps) of line j
  function automatic real line_fine(input logic [127:0] c, input int j, output bit ok);
    int m[$];
    int p0;
    ok = 1;
    for (int g = 0; g < 32; g++) begin
      int v;
      v = int'(c[4*g +: 4]);
      if (v == 15) ok = 0;
      else if (v >= 1 && v <= 8) m.push_back(8 * g + v - 1);
      else if (v >= 9) begin
        int a [6] = '{0, 0, 0, 1, 1, 2};
        int b [6] = '{5, 6, 7, 6, 7, 7};
        m.push_back(8 * g + a[v - 9]);
        m.push_back(8 * g + b[v - 9]);
      end
    end
    if (m.size() == 0) begin ok = 0; return 0.0; end
    m.sort();
    // the highest mark is edge 0 unless edge 0 has already left the line
    if (m.size() == 6 || (m[m.size() - 1] >= 236 && m[0] >= 100))
      p0 = m[0] - 1 + 5 * GAP;
    else
      p0 = m[m.size() - 1] - 1;
    return PG + TAP * j / 3.0 + (real'(p0) + 0.5) * TAP - DT;
  endfunction

  initial begin
    start = 0; stop = 0; ready = 0;
    rst_n = 1; #1 rst_n = 0; #(3 * T0) rst_n = 1;
    #(5 * T0);
    for (int n = 0; n < 40; n++) begin
      real t_gap, ts, tp, t_true, t_meas, fine_s[3], fine_p[3], t_st, t_sp;
      int  N, ks, kp;
      bit  ok;
      ready = 1;
      #(20000.0 + real'($urandom_range(0, 1999999)) / 1000.0);
      // interval: short, medium or long
      case (n % 4)
        0: t_gap = 300.0 + real'($urandom_range(0, 3000000)) / 1000.0;
        1, 2: t_gap = real'($urandom_range(3000, 2000000)) + real'($urandom_range(0, 999)) / 1000.0;
        default: t_gap = real'($urandom_range(20000000, 100000000)) + real'($urandom_range(0, 999)) / 1000.0;
      endcase
      if (t_gap < T0) n_short++;
      if (t_gap > 1.0e7) n_long++;
      start = 1; ts = $realtime;
      #(t_gap);
      stop = 1; tp = $realtime;
      #(100.0) start = 0;
      stop = 0;
      t_true = tp - ts;
      wait (valid === 1'b1);
      #1;
      N  = int'(frame[63:32]);
      ks = int'(frame[95:64]);
      kp = int'(frame[127:96]);
      checks++;
      if (frame[31:0] !== 32'(n)) begin failures++; $display("FAIL frame number %0d expected %0d", frame[31:0], n); end
      for (int j = 0; j < 3; j++) begin
        fine_s[j] = line_fine(frame[128 + 256 * j +: 128], j, ok);
        checks++; if (!ok) begin failures++; $display("FAIL START line %0d does not decode", j); end
        fine_p[j] = line_fine(frame[256 + 256 * j +: 128], j, ok);
        checks++; if (!ok) begin failures++; $display("FAIL STOP line %0d does not decode", j); end
      end
      t_st = real'(15 - ks) * STEP + (fine_s[0] + fine_s[1] + fine_s[2]) / 3.0;
      t_sp = real'(15 - kp) * STEP + (fine_p[0] + fine_p[1] + fine_p[2]) / 3.0;
      t_meas = real'(N) * T0 + t_st - t_sp;
      checks++;
      if (t_meas - t_true > 2.0 * TAP || t_true - t_meas > 2.0 * TAP) begin
        failures++;
        $display("FAIL interval %f ps measured %f ps (N=%0d FIS %0d/%0d)", t_true, t_meas, N, ks, kp);
      end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (fine_s[j] < -TAP || fine_s[j] > STEP + TAP) begin
          failures++; $display("FAIL fine START line %0d = %f", j, fine_s[j]);
        end
      end
      #(real'($urandom_range(0, 5000)));
      ready = 0;
      wait (valid === 1'b0);
      #(real'($urandom_range(1000, 10000)));
    end
    checks++;
    if (n_short == 0 || n_long == 0) begin failures++; $display("FAIL coverage short=%0d long=%0d", n_short, n_long); end
    $display("intervals below one clock period: %0d, above 10 us: %0d", n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
