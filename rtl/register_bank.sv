// Register bank of the translation module.
//
// Memory-mapped control and status registers on the processor's AXI GP port
// (AXI4-Lite). The design asks for one configuration register that resets
// the module and starts a run, a measurement count, and a status register;
// the map below is this design's own:
//   0x00 CTRL    R/W  bit 0 = nRES: 0 holds the stream controller in RESET,
//                     1 releases it. Resets to 0.
//   0x04 COUNT   R/W  number of measurement frames per run. Resets to 0.
//   0x08 STATUS  R    bits 2:0 controller state (0 RESET, 1 IDLE, 2 REQ,
//                     3 WR, 4 STEP), bit 3 run finished.
//   0x0C FRAMES  R    frames sent since the last reset.
// Other addresses read as zero and ignore writes. Byte strobes are honoured
// on CTRL and COUNT. Writes take effect one cycle after the AXI handshake;
// reads return the value at the time the address is accepted.
module register_bank
  import tim_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // to / from the stream controller
  output logic              ctrl_nres,
  output logic [31:0]       meas_count,
  input  tm_state_e         st_state,
  input  logic              st_run_done,
  input  logic [31:0]       st_frames
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [ADDR_W-3:0] A_CTRL = 0, A_COUNT = 1, A_STATUS = 2, A_FRAMES = 3;

  logic              wr_en, rd_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data, ctrl_q;
  logic [3:0]        wr_strb;

  axil_regif #(.ADDR_W(ADDR_W)) u_if (
    .aclk, .aresetn,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  function automatic logic [31:0] apply_strb(input logic [31:0] old, input logic [31:0] d,
                                             input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      ctrl_q     <= '0;
      meas_count <= '0;
    end else if (wr_en) begin
      unique case (wr_addr[ADDR_W-1:2])
        A_CTRL:  ctrl_q     <= apply_strb(ctrl_q, wr_data, wr_strb);
        A_COUNT: meas_count <= apply_strb(meas_count, wr_data, wr_strb);
        default: ;
      endcase
    end
  end

  assign ctrl_nres = ctrl_q[0];

  always_comb begin
    unique case (rd_addr[ADDR_W-1:2])
      A_CTRL:   rd_data = {31'd0, ctrl_q[0]};
      A_COUNT:  rd_data = meas_count;
      A_STATUS: rd_data = {28'd0, st_run_done, st_state};
      A_FRAMES: rd_data = st_frames;
      default:  rd_data = '0;
    endcase
  end

  logic unused;
  assign unused = ^{rd_en, ctrl_q[31:1], wr_addr[1:0], rd_addr[1:0]};
endmodule
