// Testbench for translation_module: the processor side programs the frame
// count and releases nRES over AXI4-Lite, a DMA sink takes the stream with
// random TREADY, and an asynchronous TIC model serves frames. Checks every
// word, TLAST, the status and frame-count registers, the hold in RESET while
// nRES is 0 and an abort by clearing nRES in the middle of a run.
module tb_translation_module;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  localparam int WORDS = 28;

  logic aclk = 0, aresetn;
  always #5000 aclk = ~aclk;

  logic [7:0]   awaddr, araddr;
  logic         awvalid, awready, wvalid, wready, bvalid, bready;
  logic         arvalid, arready, rvalid, rready;
  logic [31:0]  wdata, rdata, tdata;
  logic [3:0]   wstrb;
  logic [1:0]   bresp, rresp;
  logic         tic_ready, tic_valid, tvalid, tready, tlast;
  logic [895:0] tic_frame;

  translation_module dut (
    .aclk, .aresetn,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .tic_ready, .tic_valid, .tic_frame,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast)
  );

  axil_master #(.ADDR_W(8)) m (
    .aclk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp,
    .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  tic_slave_model #(.FRAME_BITS(896)) tic (.ready(tic_ready), .valid(tic_valid), .frame(tic_frame));

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  rx_words, rx_frames, base_frame, n_count, n_tlast;
  bit  dma_on = 0;
  always @(negedge aclk) tready = dma_on && ($urandom_range(0, 2) != 0);
  always @(posedge aclk) begin
    if (tvalid && tready) begin
      check("tdata", tdata, tic.frames[base_frame + rx_frames][32*stream_slice(rx_words, 32) +: 32]);
      check("tlast", 32'(tlast), 32'(rx_words == WORDS - 1 && rx_frames == n_count - 1));
      if (tlast) begin n_tlast++; dma_on = 0; end   // the DMA transfer ends with TLAST
      if (rx_words == WORDS - 1) begin rx_words = 0; rx_frames++; end
      else rx_words++;
    end
  end

  task automatic start_run(input int n);
    n_count = n; rx_words = 0; rx_frames = 0; base_frame = tic.issued;
    m.write(8'h04, 32'(n));
    m.write(8'h00, 32'h1);
    dma_on = 1;
  endtask

  initial begin
    logic [31:0] d;
    aresetn = 1; #1 aresetn = 0;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    n_tlast = 0;
    // after power-up the controller is held in RESET until nRES is written
    dma_on = 1;
    repeat (10) @(posedge aclk);
    m.read(8'h08, d); check("STATUS after power-up", d, {28'd0, 1'b0, ST_RESET});
    check("no READY while in reset", 32'(tic_ready), 0);
    dma_on = 0;
    // run 1: 4 frames
    start_run(4);
    wait (rx_frames == 4);
    repeat (5) @(posedge aclk);
    m.read(8'h08, d); check("STATUS done, IDLE", d, {28'd0, 1'b1, ST_IDLE});
    m.read(8'h0C, d); check("FRAMES", d, 4);
    dma_on = 0;
    m.write(8'h00, 32'h0);      // reset after each run
    m.read(8'h0C, d); check("FRAMES cleared", d, 0);
    // run 2: abort in the middle by clearing nRES, then a clean run of 2
    start_run(6);
    wait (rx_frames == 2);
    m.write(8'h00, 32'h0);
    dma_on = 0;
    m.read(8'h08, d); check("aborted to RESET", d[2:0], 32'(ST_RESET));
    repeat (20) @(posedge aclk);
    check("READY released on abort", 32'(tic_ready), 0);
    start_run(2);
    wait (rx_frames == 2);
    repeat (5) @(posedge aclk);
    m.read(8'h0C, d); check("FRAMES run 3", d, 2);
    check("TLAST count", 32'(n_tlast), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
