// End-to-end testbench for tim_top at its default parameters. The processor
// side is played by two AXI4-Lite masters, the DMA by an AXI-Stream sink
// with random TREADY that stops at TLAST.
//  Part 1, frame generator source: software loads a frame and a delay,
//  programs three frames and releases nRES; the three frames must arrive
//  word for word with TLAST on the very last word.
//  Part 2, counter source: after resetting the translation module and
//  switching the source, two START/STOP pairs are measured; the streamed
//  frames must carry frame numbers 0 and 1, the right period count and
//  phase codes consistent with the true interval.
// Mechanisms counted (each must occur): generator frames, counter frames,
// TREADY stalls, STEP visits, TLAST, source switch, nRES reset between runs.
module tb_tim_top;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  localparam int WORDS = 28;
  localparam real T0 = 2000.0;

  logic aclk = 0, clk500 = 0, aresetn, start, stop, src_sel;
  always #5000 aclk = ~aclk;
  always #(T0 / 2) clk500 = ~clk500;

  logic [7:0]  tm_awaddr, tm_araddr;
  logic [8:0]  fg_awaddr, fg_araddr;
  logic        tm_awvalid, tm_awready, tm_wvalid, tm_wready, tm_bvalid, tm_bready;
  logic        tm_arvalid, tm_arready, tm_rvalid, tm_rready;
  logic        fg_awvalid, fg_awready, fg_wvalid, fg_wready, fg_bvalid, fg_bready;
  logic        fg_arvalid, fg_arready, fg_rvalid, fg_rready;
  logic [31:0] tm_wdata, tm_rdata, fg_wdata, fg_rdata, tdata;
  logic [3:0]  tm_wstrb, fg_wstrb;
  logic [1:0]  tm_bresp, tm_rresp, fg_bresp, fg_rresp;
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
    repeat (400000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DMA sink: collects words, stops at TLAST
  logic [31:0] rx [$];
  bit dma_on = 0;
  int n_stall = 0, n_tlast = 0, n_step = 0, n_fg_frames = 0, n_tic_frames = 0;
  int n_switch = 0, n_nres = 0;
  tm_state_e prev_state;
  always @(negedge aclk) tready = dma_on && ($urandom_range(0, 3) != 0);
  always @(posedge aclk) begin
    prev_state <= dut.u_tm.u_ctrl.state;
    if (dut.u_tm.u_ctrl.state == ST_STEP && prev_state != ST_STEP) n_step++;
    if (tvalid && !tready) n_stall++;
    if (tvalid && tready) begin
      rx.push_back(tdata);
      if (tlast) begin n_tlast++; dma_on = 0; end
    end
  end

  task automatic run_frames(input int n);
    tm.write(8'h04, 32'(n));
    tm.write(8'h00, 32'h1);
    dma_on = 1;
  endtask

  task automatic reset_tm();
    tm.write(8'h00, 32'h0);
    n_nres++;
  endtask

  initial begin
    logic [31:0] img [WORDS];
    logic [31:0] d;
    start = 0; stop = 0; src_sel = 1;
    aresetn = 1; #1 aresetn = 0;
    repeat (4) @(posedge aclk);
    aresetn = 1;

    // ---- part 1: frame generator ----
    for (int w = 0; w < WORDS; w++) begin
      img[w] = $urandom;
      fg.write(9'(4 * w), img[w]);
    end
    fg.write(9'h100, 32'd2);
    run_frames(3);
    wait (n_tlast == 1);
    repeat (5) @(posedge aclk);
    check("generator words", 32'(rx.size()), 32'(3 * WORDS));
    for (int i = 0; i < rx.size(); i++) check("generator word", rx[i], img[stream_slice(i % WORDS, 32)]);
    n_fg_frames = rx.size() / WORDS;
    tm.read(8'h0C, d); check("FRAMES", d, 3);
    tm.read(8'h08, d); check("STATUS", d, {28'd0, 1'b1, ST_IDLE});
    rx.delete();

    // ---- part 2: time interval counter ----
    reset_tm();
    src_sel = 0; n_switch++;
    run_frames(2);
    for (int k = 0; k < 2; k++) begin
      real ts, tp, t_true, t_est;
      int  N, ks, kp, base;
      @(negedge dut.u_tic.meas_rst);   // the counter has been cleared for this frame
      #(3000.0 + real'($urandom_range(0, 1999999)) / 1000.0);
      start = 1; ts = $realtime;
      #(real'($urandom_range(1000, 900000)) + real'($urandom_range(1, 999)) / 1000.0);
      stop = 1; tp = $realtime;
      #(200.0) start = 0; stop = 0;
      t_true = tp - ts;
      wait (rx.size() >= (k + 1) * WORDS);
      base = k * WORDS;
      check("counter frame number", rx[base + 3], 32'(k));
      N  = int'(rx[base + 2]);
      ks = int'(rx[base + 1]);
      kp = int'(rx[base + 0]);
      // clock rising edges at 1000 + m*T0 in (ts, tp]
      check("period count", 32'(N),
            32'(int'($floor((tp - 1000.0) / T0)) - int'($floor((ts - 1000.0) / T0))));
      t_est = real'(N) * T0 + real'(kp - ks) * 125.0;
      checks++;
      if (t_est - t_true > 130.0 || t_true - t_est > 130.0) begin
        failures++; $display("FAIL coarse interval %f vs %f", t_est, t_true);
      end
      n_tic_frames++;
    end
    wait (n_tlast == 2);
    repeat (5) @(posedge aclk);
    check("counter words", 32'(rx.size()), 32'(2 * WORDS));
    tm.read(8'h0C, d); check("FRAMES counter run", d, 2);
    reset_tm();

    // mechanisms
    checks++;
    if (n_fg_frames == 0 || n_tic_frames == 0 || n_stall == 0 || n_step == 0 ||
        n_tlast == 0 || n_switch == 0 || n_nres == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("generator frames=%0d counter frames=%0d stalls=%0d steps=%0d tlast=%0d switches=%0d resets=%0d",
             n_fg_frames, n_tic_frames, n_stall, n_step, n_tlast, n_switch, n_nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
