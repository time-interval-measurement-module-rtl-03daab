// Workload testbench: the memory-path throughput test and the frame contents
// of the emulated counter, run on tim_top at its default parameters.
// The processor side is played here: for each transfer size of the
// throughput sweep (16 B to 64 KiB, doubling) it builds one measurement
// frame the way the emulation software does, loads it into the frame
// generator, resets the translation module, programs the frame count
// ceil(size / 112 B) and starts a DMA sink that always accepts (TREADY high).
// Frames alternate between the two emulation modes:
//   calibration - six pattern edges per coding line, each uniform within its
//                 own tap range (15-30, 30-55, 45-68, 58-85, 70-90, 88-112),
//                 FIS codes uniform 0..15, period 0;
//   measurement - edges near fixed means (22, 42, 56, 71, 80, 100 taps) with
//                 a small spread, fixed FIS codes and period.
// An edge closer than 5 taps to the previous one is pushed to 5 taps. The
// edge positions are compressed into the 128-bit line codes by an encoder
// written here (8-tap groups, 4-bit codes), independently of the RTL.
// Checks: every streamed word against the frame in big-endian word order,
// TLAST only on the very last word, and a software-style decode of every
// received frame (generic field, six lines, edge positions) against what was
// generated. The cycles from the first word to TLAST are counted per size;
// with the frame generator's DELAY at 0 a frame must not take more than
// 45 aclk cycles in steady state, and the resulting throughput is printed
// for a 100 MHz aclk. The counter's clock is left stopped: the counter is not
// the selected source here.
module tb_stream_workload;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  localparam int WORDS = 28;
  localparam int NSIZES = 13;                 // 16 B .. 65536 B
  localparam int MAX_CYC_PER_FRAME = 45;

  logic aclk = 0, clk500 = 0, aresetn, start = 0, stop = 0, src_sel = 1;
  always #5000 aclk = ~aclk;                  // 100 MHz

  logic [7:0]  tm_awaddr, tm_araddr;
  logic        tm_awvalid, tm_awready, tm_wvalid, tm_wready, tm_bvalid, tm_bready;
  logic        tm_arvalid, tm_arready, tm_rvalid, tm_rready;
  logic [31:0] tm_wdata, tm_rdata;
  logic [3:0]  tm_wstrb;
  logic [1:0]  tm_bresp, tm_rresp;
  logic [8:0]  fg_awaddr, fg_araddr;
  logic        fg_awvalid, fg_awready, fg_wvalid, fg_wready, fg_bvalid, fg_bready;
  logic        fg_arvalid, fg_arready, fg_rvalid, fg_rready;
  logic [31:0] fg_wdata, fg_rdata;
  logic [3:0]  fg_wstrb;
  logic [1:0]  fg_bresp, fg_rresp;
  logic [31:0] tdata;
  logic        tvalid, tready, tlast;

  tim_top dut (
    .aclk, .aresetn,
    .tm_axil_awaddr(tm_awaddr), .tm_axil_awvalid(tm_awvalid), .tm_axil_awready(tm_awready),
    .tm_axil_wdata(tm_wdata), .tm_axil_wstrb(tm_wstrb), .tm_axil_wvalid(tm_wvalid),
    .tm_axil_wready(tm_wready), .tm_axil_bresp(tm_bresp), .tm_axil_bvalid(tm_bvalid),
    .tm_axil_bready(tm_bready), .tm_axil_araddr(tm_araddr), .tm_axil_arvalid(tm_arvalid),
    .tm_axil_arready(tm_arready), .tm_axil_rdata(tm_rdata), .tm_axil_rresp(tm_rresp),
    .tm_axil_rvalid(tm_rvalid), .tm_axil_rready(tm_rready),
    .fg_axil_awaddr(fg_awaddr), .fg_axil_awvalid(fg_awvalid), .fg_axil_awready(fg_awready),
    .fg_axil_wdata(fg_wdata), .fg_axil_wstrb(fg_wstrb), .fg_axil_wvalid(fg_wvalid),
    .fg_axil_wready(fg_wready), .fg_axil_bresp(fg_bresp), .fg_axil_bvalid(fg_bvalid),
    .fg_axil_bready(fg_bready), .fg_axil_araddr(fg_araddr), .fg_axil_arvalid(fg_arvalid),
    .fg_axil_arready(fg_arready), .fg_axil_rdata(fg_rdata), .fg_axil_rresp(fg_rresp),
    .fg_axil_rvalid(fg_rvalid), .fg_axil_rready(fg_rready),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .clk500, .start, .stop, .src_sel
  );

  axil_master #(.ADDR_W(8)) tm (
    .aclk, .awaddr(tm_awaddr), .awvalid(tm_awvalid), .awready(tm_awready), .wdata(tm_wdata),
    .wstrb(tm_wstrb), .wvalid(tm_wvalid), .wready(tm_wready), .bresp(tm_bresp),
    .bvalid(tm_bvalid), .bready(tm_bready), .araddr(tm_araddr), .arvalid(tm_arvalid),
    .arready(tm_arready), .rdata(tm_rdata), .rresp(tm_rresp), .rvalid(tm_rvalid), .rready(tm_rready)
  );
  axil_master #(.ADDR_W(9)) fg (
    .aclk, .awaddr(fg_awaddr), .awvalid(fg_awvalid), .awready(fg_awready), .wdata(fg_wdata),
    .wstrb(fg_wstrb), .wvalid(fg_wvalid), .wready(fg_wready), .bresp(fg_bresp),
    .bvalid(fg_bvalid), .bready(fg_bready), .araddr(fg_araddr), .arvalid(fg_arvalid),
    .arready(fg_arready), .rdata(fg_rdata), .rresp(fg_rresp), .rvalid(fg_rvalid), .rready(fg_rready)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- frame construction, as the emulation software does it ----
  // edge position ranges of the calibration mode and means of the measurement mode
  int lo [6] = '{15, 30, 45, 58, 70, 88};
  int hi [6] = '{30, 55, 68, 85, 90, 112};
  int mu [6] = '{22, 42, 56, 71, 80, 100};
  int sd [6] = '{1, 3, 2, 3, 2, 3};

  // the six legal two-edge groups, in code order 9..14
  int pa [6] = '{0, 0, 0, 1, 1, 2};
  int pb [6] = '{5, 6, 7, 6, 7, 7};

  function automatic logic [127:0] encode_line(input int pos [6]);
    logic [127:0] c = '0;
    for (int g = 0; g < 32; g++) begin
      int n = 0, a = -1, b = -1;
      logic [3:0] v = 4'd0;
      for (int e = 0; e < 6; e++)
        if (pos[e] / 8 == g) begin
          if (n == 0) a = pos[e] % 8; else b = pos[e] % 8;
          n++;
        end
      if (n == 1) v = 4'(a + 1);
      else if (n == 2) begin
        v = 4'd15;
        for (int k = 0; k < 6; k++) if (pa[k] == a && pb[k] == b) v = 4'(9 + k);
      end else if (n > 2) v = 4'd15;
      c[4*g +: 4] = v;
    end
    return c;
  endfunction

  // software-level decode of one line: edge positions in tap order
  function automatic void decode_line(input logic [127:0] c, output int pos [6], output int n);
    n = 0;
    for (int e = 0; e < 6; e++) pos[e] = -1;
    for (int g = 0; g < 32; g++) begin
      int v = int'(c[4*g +: 4]);
      if (v >= 1 && v <= 8) begin
        if (n < 6) pos[n] = 8 * g + v - 1;
        n++;
      end else if (v >= 9 && v <= 14) begin
        if (n < 6) pos[n] = 8 * g + pa[v - 9];
        if (n < 5) pos[n + 1] = 8 * g + pb[v - 9];
        n += 2;
      end else if (v == 15) n += 100;
    end
  endfunction

  // approximately normal integer: mean m, deviation s (sum of 12 uniforms)
  function automatic int normal_int(input int m, input int s);
    int acc = 0;
    for (int k = 0; k < 12; k++) acc += int'($urandom_range(0, 999));
    return m + ((acc - 6000) * s) / 1000;
  endfunction

  int          gen_pos [6][6];              // [line][edge]
  logic [31:0] gen_fis_start, gen_fis_stop, gen_period;

  function automatic tic_frame_t build_frame(input bit calib);
    tic_frame_t f;
    logic [127:0] lines [6];
    for (int l = 0; l < 6; l++) begin
      int p [6];
      for (int e = 0; e < 6; e++) begin
        p[e] = calib ? int'($urandom_range(hi[e], lo[e])) : normal_int(mu[e], sd[e]);
        if (e > 0 && p[e] < p[e - 1] + 5) p[e] = p[e - 1] + 5;
        gen_pos[l][e] = p[e];
      end
      lines[l] = encode_line(p);
    end
    gen_fis_start = calib ? 32'($urandom_range(0, 15)) : 32'd7;
    gen_fis_stop  = calib ? 32'($urandom_range(0, 15)) : 32'd12;
    gen_period    = calib ? 32'd0 : 32'd1234;
    f.gen.fis_stop  = gen_fis_stop;
    f.gen.fis_start = gen_fis_start;
    f.gen.period    = gen_period;
    f.gen.frame_no  = 32'd0;
    f.sis_start0 = lines[0]; f.sis_stop0 = lines[1];
    f.sis_start1 = lines[2]; f.sis_stop1 = lines[3];
    f.sis_start2 = lines[4]; f.sis_stop2 = lines[5];
    return f;
  endfunction

  // ---- DMA sink ----
  logic [31:0] rx [$];
  bit   dma_on = 0;
  int   n_tlast = 0, cyc = 0, first_cyc = -1, last_cyc = -1;
  always @(negedge aclk) tready = dma_on;
  always @(posedge aclk) begin
    cyc++;
    if (tvalid && tready) begin
      if (first_cyc < 0) first_cyc = cyc;
      rx.push_back(tdata);
      if (tlast) begin n_tlast++; last_cyc = cyc; dma_on = 0; end
    end
  end

  initial begin
    tic_frame_t  f;
    logic [31:0] d;
    int          size, nfr, total_bytes, steady_frames, steady_cycles;
    real         mbps;
    aresetn = 1; #1 aresetn = 0;
    repeat (4) @(posedge aclk);
    aresetn = 1;
    fg.write(9'h100, 32'd0);                 // DELAY 0: the generator answers at once
    steady_frames = 0; steady_cycles = 0;

    for (int s = 0; s < NSIZES; s++) begin
      bit calib;
      calib = (s % 2 == 0);
      size = 16 << s;
      nfr  = (size + 111) / 112;
      f = build_frame(calib);
      for (int w = 0; w < WORDS; w++) fg.write(9'(4 * w), f[32 * w +: 32]);
      tm.write(8'h00, 32'h0);                // reset after each run
      tm.write(8'h04, 32'(nfr));
      tm.write(8'h00, 32'h1);
      rx.delete(); first_cyc = -1;
      dma_on = 1;
      wait (n_tlast == s + 1);
      repeat (2) @(posedge aclk);

      check($sformatf("words for %0d B", size), 32'(rx.size()), 32'(nfr * WORDS));
      for (int i = 0; i < rx.size(); i++)
        if (rx[i] !== f[32 * stream_slice(i % WORDS, 32) +: 32]) begin
          check($sformatf("size %0d word %0d", size, i), rx[i], f[32 * stream_slice(i % WORDS, 32) +: 32]);
          break;
        end
      checks++;

      // decode every received frame as the frame decoder would
      for (int k = 0; k < nfr; k++) begin
        tic_frame_t r;
        for (int i = 0; i < WORDS; i++) r[32 * stream_slice(i, 32) +: 32] = rx[k * WORDS + i];
        check("FIS START", r.gen.fis_start, gen_fis_start);
        check("FIS STOP", r.gen.fis_stop, gen_fis_stop);
        check("PERIOD", r.gen.period, gen_period);
        for (int l = 0; l < 6; l++) begin
          int p [6], n;
          logic [127:0] c;
          case (l)
            0: c = r.sis_start0; 1: c = r.sis_stop0; 2: c = r.sis_start1;
            3: c = r.sis_stop1;  4: c = r.sis_start2; default: c = r.sis_stop2;
          endcase
          decode_line(c, p, n);
          check($sformatf("line %0d edge count", l), 32'(n), 32'd6);
          for (int e = 0; e < 6; e++) check($sformatf("line %0d edge %0d", l, e), 32'(p[e]), 32'(gen_pos[l][e]));
        end
      end

      tm.read(8'h0C, d); check("FRAMES register", d, 32'(nfr));
      total_bytes = nfr * 4 * WORDS;
      mbps = real'(total_bytes) / (real'(last_cyc - first_cyc + 1) * 10.0e-9) / 1.0e6;
      $display("size %6d B: %4d frames, %7d cycles, %7.1f MB/s at 100 MHz (%s frame)",
               size, nfr, last_cyc - first_cyc + 1, mbps, calib ? "calibration" : "measurement");
      if (nfr >= 8) begin
        steady_frames += nfr;
        steady_cycles += last_cyc - first_cyc + 1;
      end
    end

    check("TLAST count", 32'(n_tlast), 32'(NSIZES));
    checks++;
    if (steady_cycles > steady_frames * MAX_CYC_PER_FRAME) begin
      failures++;
      $display("FAIL %0d cycles for %0d frames exceeds %0d per frame",
               steady_cycles, steady_frames, MAX_CYC_PER_FRAME);
    end
    $display("steady state: %0d frames in %0d cycles", steady_frames, steady_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
