// Frame generator: a stand-in for the time interval counter (TIC).
//
// Where the board cannot host the real TIC, this peripheral takes its place
// on the asynchronous frame bus. Software composes a measurement frame
// (random or fixed contents are the software's business) and writes it over
// AXI4-Lite into a frame buffer of FRAME_BITS/32 words; the peripheral then
// behaves as the TIC slave: when READY rises it "measures" for DELAY clock
// cycles, presents the buffered frame on FRAME and raises VALID; when READY
// falls it drops VALID and is ready for the next transaction. The same frame
// is served until software rewrites the buffer.
// Register map (this design's choice):
//   0x000 + 4*i  FRAME word i (frame bits 32*i+31 : 32*i), i = 0..WORDS-1, R/W
//   0x100        DELAY: clock cycles from READY seen to VALID, R/W, resets to 0
// READY is synchronised with two flops, so VALID follows READY by DELAY+4
// cycles and is released 3 cycles after READY falls. FRAME is registered
// when VALID is raised and held until the next request.
module frame_generator
  import tim_pkg::*;
#(
  parameter int unsigned FRAME_BITS = tim_pkg::C_FRAME_BITS,
  parameter int unsigned ADDR_W     = 9
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
  // asynchronous frame bus (slave side)
  input  logic                  tic_ready,
  output logic                  tic_valid,
  output logic [FRAME_BITS-1:0] tic_frame
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned WORDS = FRAME_BITS / 32;
  localparam int unsigned WI_W  = $clog2(WORDS);
  localparam logic [ADDR_W-1:0] A_DELAY = ADDR_W'(9'h100);

  typedef enum logic [1:0] {FG_IDLE, FG_MEAS, FG_HOLD} fg_state_e;

  logic              wr_en, rd_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data, delay_q, cnt;
  logic [3:0]        wr_strb;
  logic [31:0]       buf_q [WORDS];
  logic [1:0]        ready_sync;
  fg_state_e         state;

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

  // frame buffer and DELAY register
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      for (int i = 0; i < WORDS; i++) buf_q[i] <= '0;
      delay_q <= '0;
    end else if (wr_en) begin
      for (int b = 0; b < 4; b++) begin
        if (wr_strb[b]) begin
          if (wr_addr == A_DELAY)
            delay_q[8*b +: 8] <= wr_data[8*b +: 8];
          else if (wr_addr < ADDR_W'(4*WORDS))
            buf_q[wr_addr[WI_W+1:2]][8*b +: 8] <= wr_data[8*b +: 8];
        end
      end
    end
  end

  always_comb begin
    if (rd_addr == A_DELAY)              rd_data = delay_q;
    else if (rd_addr < ADDR_W'(4*WORDS)) rd_data = buf_q[rd_addr[WI_W+1:2]];
    else                                 rd_data = '0;
  end

  // slave side of the frame bus
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      ready_sync <= '0;
      state      <= FG_IDLE;
      cnt        <= '0;
      tic_valid  <= 1'b0;
      tic_frame  <= '0;
    end else begin
      ready_sync <= {ready_sync[0], tic_ready};
      unique case (state)
        FG_IDLE: if (ready_sync[1]) begin
          cnt   <= delay_q;
          state <= FG_MEAS;
        end
        FG_MEAS: begin
          if (cnt == 32'd0) begin
            for (int i = 0; i < WORDS; i++) tic_frame[32*i +: 32] <= buf_q[i];
            tic_valid <= 1'b1;
            state     <= FG_HOLD;
          end else begin
            cnt <= cnt - 32'd1;
          end
        end
        FG_HOLD: if (!ready_sync[1]) begin
          tic_valid <= 1'b0;
          state     <= FG_IDLE;
        end
        default: state <= FG_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{rd_en, wr_addr[1:0], rd_addr[1:0]};
endmodule
