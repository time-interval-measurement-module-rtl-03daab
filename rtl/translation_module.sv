// Translation module: bridge from the asynchronous TIC frame bus to
// AXI-Stream.
//
// A register bank on AXI4-Lite (the processor's general-purpose port) holds
// the reset bit and the measurement count and reports status; a stream
// controller requests measurement frames from the TIC over READY/VALID/FRAME
// and cuts each wide frame into TDATA_W-bit AXI-Stream words for the DMA,
// marking the last word of the last frame with TLAST. The controller is held
// in reset while either the power-on reset (aresetn, asynchronous) or the
// CTRL.nRES bit (synchronous) is low, as the design describes; the register
// bank itself only follows aresetn so that the processor can release the
// controller again.
// Interface timing: see register_bank (register map) and stream_ctrl
// (state machine, one word per cycle while TREADY is high).
module translation_module
  import tim_pkg::*;
#(
  parameter int unsigned FRAME_BITS = tim_pkg::C_FRAME_BITS,
  parameter int unsigned TDATA_W    = tim_pkg::C_TDATA_W,
  parameter int unsigned ADDR_W     = 8
) (
  input  logic                  aclk,
  input  logic                  aresetn,
  input  logic [ADDR_W-1:0]     s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [31:0]           s_axil_wdata,
  input  logic [3:0]            s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [ADDR_W-1:0]     s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [31:0]           s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  output logic                  tic_ready,
  input  logic                  tic_valid,
  input  logic [FRAME_BITS-1:0] tic_frame,
  output logic [TDATA_W-1:0]    m_axis_tdata,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  m_axis_tlast
);
  timeunit 1ps; timeprecision 1fs;

  logic        ctrl_nres;
  logic [31:0] meas_count, frames_done;
  logic        run_done;
  tm_state_e   state;

  register_bank #(.ADDR_W(ADDR_W)) u_regs (
    .aclk, .aresetn,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .ctrl_nres, .meas_count,
    .st_state(state), .st_run_done(run_done), .st_frames(frames_done)
  );

  stream_ctrl #(.FRAME_BITS(FRAME_BITS), .TDATA_W(TDATA_W)) u_ctrl (
    .aclk, .aresetn, .soft_nres(ctrl_nres), .meas_count,
    .tic_ready, .tic_valid, .tic_frame,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .state, .frames_done, .run_done
  );
endmodule
