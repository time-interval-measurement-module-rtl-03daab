// TIC interface: measurement control and frame bus slave of the counter.
//
// Runs in the 500 MHz counter clock domain. When READY from the translation
// module is seen high (two-flop synchroniser) the measuring parts
// (interpolators, period counter) are reset with a RST_CYCLES-long pulse on
// meas_rst, so every measurement starts clean and hits that came while no
// frame was requested are discarded (single-shot mode). After the pulse the
// counter waits for a START and a STOP. When the period
// counter reports done, SETTLE further cycles let the second-stage latches
// and code converters settle; then the frame is assembled, VALID is raised
// and the frame number advances. When READY falls VALID is released, ready
// for the next request.
// Frame layout (896 bits, per the design's frame table): bits 127:0 generic
// field {FIS STOP, FIS START, PERIOD NUMBER, FRAME NUMBER} as 32-bit words,
// each zero-extended; then 128-bit SIS words START0, STOP0, START1, STOP1,
// START2, STOP2 from bit 128 upward. FRAME is held from VALID until the next
// request. The first frame after rst_n carries frame number 0 (this design's
// choice, as are SETTLE and RST_CYCLES). rst_n resets asynchronously; its
// release is synchronised to clk.
module tic_interface
  import tim_pkg::*;
#(
  parameter int unsigned CNT_W  = tim_pkg::C_CNT_W,
  parameter int unsigned FIS_W  = tim_pkg::C_FIS_W,
  parameter int unsigned SETTLE     = 3,
  parameter int unsigned RST_CYCLES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,        // asynchronous, active low
  // frame bus (slave side)
  input  logic                  ready,
  output logic                  valid,
  output tic_frame_t            frame,
  // measuring parts
  output logic                  meas_rst,
  input  logic                  meas_done,
  input  logic [CNT_W-1:0]      period,
  input  logic [FIS_W-1:0]      fis_start,
  input  logic [FIS_W-1:0]      fis_stop,
  input  logic [C_SIS_W-1:0]    sis_start,
  input  logic [C_SIS_W-1:0]    sis_stop
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [2:0] {TI_IDLE, TI_CLEAR, TI_ARM, TI_SETTLE, TI_HOLD} ti_state_e;

  ti_state_e   state;
  logic [1:0]  ready_sync;
  logic [1:0]  rst_sync;
  logic [7:0]  settle_cnt;
  logic [31:0] frame_no;

  // reset synchroniser: asynchronous assertion, synchronous release
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end

  logic rst_q_n;
  assign rst_q_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= TI_IDLE;
      ready_sync <= '0;
      settle_cnt <= '0;
      frame_no   <= '0;
      valid      <= 1'b0;
      meas_rst   <= 1'b0;
      frame      <= '0;
    end else if (!rst_q_n) begin        // held until the release is synchronised
      state      <= TI_IDLE;
      ready_sync <= '0;
      settle_cnt <= '0;
      frame_no   <= '0;
      valid      <= 1'b0;
      meas_rst   <= 1'b0;
      frame      <= '0;
    end else begin
      ready_sync <= {ready_sync[0], ready};
      unique case (state)
        TI_IDLE: if (ready_sync[1]) begin
          meas_rst   <= 1'b1;
          settle_cnt <= 8'(RST_CYCLES - 1);
          state      <= TI_CLEAR;
        end
        TI_CLEAR: begin
          if (settle_cnt == 8'd0) begin
            meas_rst <= 1'b0;
            state    <= TI_ARM;
          end else begin
            settle_cnt <= settle_cnt - 8'd1;
          end
        end
        TI_ARM: if (meas_done) begin
          settle_cnt <= 8'(SETTLE);
          state      <= TI_SETTLE;
        end
        TI_SETTLE: begin
          if (settle_cnt == 8'd0) begin
            frame.gen.fis_stop   <= 32'(fis_stop);
            frame.gen.fis_start  <= 32'(fis_start);
            frame.gen.period     <= 32'(period);
            frame.gen.frame_no   <= frame_no;
            frame.sis_start0     <= sis_start[0*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame.sis_stop0      <= sis_stop [0*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame.sis_start1     <= sis_start[1*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame.sis_stop1      <= sis_stop [1*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame.sis_start2     <= sis_start[2*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame.sis_stop2      <= sis_stop [2*C_LINE_CODE_W +: C_LINE_CODE_W];
            frame_no             <= frame_no + 32'd1;
            valid                <= 1'b1;
            state                <= TI_HOLD;
          end else begin
            settle_cnt <= settle_cnt - 8'd1;
          end
        end
        TI_HOLD: if (!ready_sync[1]) begin
          valid <= 1'b0;
          state <= TI_IDLE;
        end
        default: state <= TI_IDLE;
      endcase
    end
  end

  // Frame bus rule: the frame does not change while VALID is high.
  a_frame_stable: assert property (@(posedge clk) disable iff (!rst_q_n)
      valid && $past(valid) |-> $stable(frame));
endmodule
