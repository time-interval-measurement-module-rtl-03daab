// Testbench for the time coded delay line model: for random times between
// the trigger and the sync edge the latched word must show the six pattern
// edges at the taps the pattern has reached after the elapsed time plus the
// sync delay, with the first pattern edge rising. Reset must clear the word,
// and a second trigger pulse before the sync must not restart the pattern.
module tb_tcdl;
  timeunit 1ps; timeprecision 1fs;

  localparam real TAP = 125.0 / 256.0, PG = 20.0, DT = 20.0 + 2.0 * TAP;
  localparam int  GAP = 20;

  logic       trig, sync, rst;
  logic [255:0] taps;

  tcdl #(.TAPS(256), .TAP_PS(TAP), .PG_DELAY_PS(PG), .EDGE_GAP_TAPS(GAP), .DT_PS(DT)) dut (
    .trig, .sync, .rst, .taps
  );

  int checks = 0, failures = 0, n_edges_seen = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = 0; sync = 0; rst = 0;
    #1 rst = 1;
    #100;
    for (int n = 0; n < 100; n++) begin
      real el, L;
      int  pos [6];
      int  nmis;
      rst = 1; #50;
      checks++;
      if (taps !== '0) begin failures++; $display("FAIL reset did not clear"); end
      rst = 0; #50;
      el = real'($urandom_range(0, 124000)) / 1000.0;
      trig = 1;
      #(el / 2.0) trig = 0;        // a second trigger pulse must be ignored
      #(el / 4.0) trig = 1;
      #(el / 4.0);
      sync = 1;
      #(DT + 10.0);
      trig = 0; sync = 0;
      L = el + DT;
      // edge k has passed tap i when L - PG - k*GAP*TAP >= i*TAP
      for (int k = 0; k < 6; k++) pos[k] = int'($floor((L - PG - real'(k * GAP) * TAP) / TAP));
      nmis = 0;
      for (int i = 0; i < 256; i++) begin
        int n_passed;
        bit near;
        n_passed = 0; near = 0;
        for (int k = 0; k < 6; k++) begin
          if (pos[k] >= i) n_passed++;
          if (i == pos[k] || i == pos[k] + 1) near = 1;
        end
        if (!near && taps[i] !== 1'(n_passed % 2)) nmis++;
      end
      for (int i = 1; i < 256; i++) if (taps[i] != taps[i-1]) n_edges_seen++;
      checks++;
      if (nmis != 0) begin failures++; $display("FAIL %0d taps wrong, elapsed %f", nmis, el); end
      // at least one pattern edge lies n_in the line
      begin
        int n_in = 0;
        for (int k = 0; k < 6; k++) if (pos[k] >= 0 && pos[k] < 255) n_in++;
        checks++;
        if (n_in == 0) begin failures++; $display("FAIL no edge n_in, elapsed %f", el); end
      end
    end
    checks++;
    if (n_edges_seen == 0) begin failures++; $display("FAIL no edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
