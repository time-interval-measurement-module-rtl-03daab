// Programmable-logic part of the time interval measurement system.
//
// Frames of raw measurement data come from one of two sources on the
// asynchronous READY/VALID/FRAME bus: the two-stage interpolating time
// interval counter (tic, driven by START/STOP and the 500 MHz clock) or the
// frame generator (a stand-in loaded by software over AXI4-Lite). The
// translation module requests frames, cuts each 896-bit frame into 28 32-bit
// words and streams them over AXI-Stream to the DMA engine, which writes them
// to processor memory (the DMA and processor are outside this module: their
// sides are the AXI ports below). The processor configures the translation
// module (reset bit, frame count, status) over a second AXI4-Lite port.
// src_sel chooses the frame source: 0 the counter, 1 the frame generator. The
// unselected source sees READY low. Having both sources side by side with a
// select pin is this design's choice; the design itself uses one or the other
// depending on the board. aclk and clk500 are independent clocks; the frame
// bus needs no common clock.
module tim_top
  import tim_pkg::*;
(
  input  logic        aclk,
  input  logic        aresetn,
  // translation module registers (AXI4-Lite)
  input  logic [7:0]  tm_axil_awaddr,
  input  logic        tm_axil_awvalid,
  output logic        tm_axil_awready,
  input  logic [31:0] tm_axil_wdata,
  input  logic [3:0]  tm_axil_wstrb,
  input  logic        tm_axil_wvalid,
  output logic        tm_axil_wready,
  output logic [1:0]  tm_axil_bresp,
  output logic        tm_axil_bvalid,
  input  logic        tm_axil_bready,
  input  logic [7:0]  tm_axil_araddr,
  input  logic        tm_axil_arvalid,
  output logic        tm_axil_arready,
  output logic [31:0] tm_axil_rdata,
  output logic [1:0]  tm_axil_rresp,
  output logic        tm_axil_rvalid,
  input  logic        tm_axil_rready,
  // frame generator (AXI4-Lite)
  input  logic [8:0]  fg_axil_awaddr,
  input  logic        fg_axil_awvalid,
  output logic        fg_axil_awready,
  input  logic [31:0] fg_axil_wdata,
  input  logic [3:0]  fg_axil_wstrb,
  input  logic        fg_axil_wvalid,
  output logic        fg_axil_wready,
  output logic [1:0]  fg_axil_bresp,
  output logic        fg_axil_bvalid,
  input  logic        fg_axil_bready,
  input  logic [8:0]  fg_axil_araddr,
  input  logic        fg_axil_arvalid,
  output logic        fg_axil_arready,
  output logic [31:0] fg_axil_rdata,
  output logic [1:0]  fg_axil_rresp,
  output logic        fg_axil_rvalid,
  input  logic        fg_axil_rready,
  // AXI-Stream to the DMA
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // time interval counter
  input  logic        clk500,
  input  logic        start,
  input  logic        stop,
  input  logic        src_sel
);
  timeunit 1ps; timeprecision 1fs;

  logic                    tm_ready, tic_valid, fg_valid, bus_valid;
  logic [C_FRAME_BITS-1:0] tic_frame, fg_frame, bus_frame;

  assign bus_valid = src_sel ? fg_valid : tic_valid;
  assign bus_frame = src_sel ? fg_frame : tic_frame;

  translation_module #(.FRAME_BITS(C_FRAME_BITS), .TDATA_W(32), .ADDR_W(8)) u_tm (
    .aclk, .aresetn,
    .s_axil_awaddr(tm_axil_awaddr), .s_axil_awvalid(tm_axil_awvalid),
    .s_axil_awready(tm_axil_awready), .s_axil_wdata(tm_axil_wdata),
    .s_axil_wstrb(tm_axil_wstrb), .s_axil_wvalid(tm_axil_wvalid),
    .s_axil_wready(tm_axil_wready), .s_axil_bresp(tm_axil_bresp),
    .s_axil_bvalid(tm_axil_bvalid), .s_axil_bready(tm_axil_bready),
    .s_axil_araddr(tm_axil_araddr), .s_axil_arvalid(tm_axil_arvalid),
    .s_axil_arready(tm_axil_arready), .s_axil_rdata(tm_axil_rdata),
    .s_axil_rresp(tm_axil_rresp), .s_axil_rvalid(tm_axil_rvalid),
    .s_axil_rready(tm_axil_rready),
    .tic_ready(tm_ready), .tic_valid(bus_valid), .tic_frame(bus_frame),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );

  frame_generator #(.FRAME_BITS(C_FRAME_BITS), .ADDR_W(9)) u_fg (
    .aclk, .aresetn,
    .s_axil_awaddr(fg_axil_awaddr), .s_axil_awvalid(fg_axil_awvalid),
    .s_axil_awready(fg_axil_awready), .s_axil_wdata(fg_axil_wdata),
    .s_axil_wstrb(fg_axil_wstrb), .s_axil_wvalid(fg_axil_wvalid),
    .s_axil_wready(fg_axil_wready), .s_axil_bresp(fg_axil_bresp),
    .s_axil_bvalid(fg_axil_bvalid), .s_axil_bready(fg_axil_bready),
    .s_axil_araddr(fg_axil_araddr), .s_axil_arvalid(fg_axil_arvalid),
    .s_axil_arready(fg_axil_arready), .s_axil_rdata(fg_axil_rdata),
    .s_axil_rresp(fg_axil_rresp), .s_axil_rvalid(fg_axil_rvalid),
    .s_axil_rready(fg_axil_rready),
    .tic_ready(tm_ready & src_sel), .tic_valid(fg_valid), .tic_frame(fg_frame)
  );

  tic u_tic (
    .clk(clk500), .rst_n(aresetn), .start, .stop,
    .ready(tm_ready & ~src_sel), .valid(tic_valid), .frame(tic_frame)
  );
endmodule
