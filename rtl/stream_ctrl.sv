// Stream controller of the translation module.
//
// Bridges the asynchronous TIC frame bus (READY out, VALID and FRAME in) and
// an AXI-Stream master (TDATA/TVALID/TREADY/TLAST) that feeds the DMA. A
// five-state machine follows the design's state diagram:
//   RESET - held while the power-on reset (aresetn, asynchronous) or the
//           nRES control bit (soft_nres, sampled on aclk) is low; all
//           registers at their defaults.
//   IDLE  - the measurement count is sampled here only; a high TREADY from
//           the DMA starts a run (REQ).
//   REQ   - READY is raised to ask the TIC for a new measurement; when VALID
//           is seen high the frame is captured and the machine enters WR.
//   WR    - the frame is sent as FRAME_BITS/TDATA_W words, one per TREADY
//           handshake. TLAST marks the last word of the last frame, after
//           which READY/TVALID/TLAST drop and the machine returns to IDLE.
//           After the last word of any other frame READY and TVALID drop and
//           the machine enters STEP.
//   STEP  - the measurement counter is decremented (once, on entry); the
//           machine waits for the TIC to release VALID, then goes to REQ.
// Timing: VALID passes a two-flop synchronizer, so a REQ->WR step takes two
// or three clock cycles after the TIC raises VALID. In WR one word moves per
// cycle while TREADY is high. FRAME is sampled once, with VALID, as the bus
// protocol guarantees it is stable then.
// Each 128-bit frame word is sent big endian, as the frame table says: the
// generic field first, starting with FIS STOP (frame bits 127:96), and FRAME
// NUMBER (bits 31:0) fourth; then the SIS words from START0 to STOP2.
// This design's own choices: a count of zero keeps the machine in IDLE, and so
// does a VALID still high from an earlier frame; READY is a
// registered output so that no glitch crosses into the TIC clock domain.
// The linter notes aresetn as used both as an asynchronous reset and as data:
// the data use is the disable condition of the handshake assertions.
module stream_ctrl
  import tim_pkg::*;
#(
  parameter int unsigned FRAME_BITS = tim_pkg::C_FRAME_BITS,
  parameter int unsigned TDATA_W    = tim_pkg::C_TDATA_W
) (
  input  logic                  aclk,
  input  logic                  aresetn,      // power-on reset, asynchronous
  input  logic                  soft_nres,    // nRES control bit, synchronous
  input  logic [31:0]           meas_count,   // frames per run
  // asynchronous TIC frame bus (master side)
  output logic                  tic_ready,
  input  logic                  tic_valid,
  input  logic [FRAME_BITS-1:0] tic_frame,
  // AXI-Stream master
  output logic [TDATA_W-1:0]    m_axis_tdata,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  m_axis_tlast,
  // status
  output tm_state_e             state,
  output logic [31:0]           frames_done,
  output logic                  run_done
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned WORDS = FRAME_BITS / TDATA_W;
  localparam int unsigned WI_W  = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [1:0]            valid_sync;
  logic                  valid_s;
  logic [FRAME_BITS-1:0] frame_q;
  logic [WI_W-1:0]       widx;
  logic [31:0]           remaining;
  tm_state_e             next_state;
  logic                  beat, last_word, last_frame;

  assign valid_s    = valid_sync[1];
  assign beat       = m_axis_tvalid && m_axis_tready;
  assign last_word  = (widx == WI_W'(WORDS - 1));
  assign last_frame = (remaining == 32'd1);

  always_comb begin
    next_state = state;
    unique case (state)
      ST_RESET: next_state = ST_IDLE;
      ST_IDLE:  if (m_axis_tready && meas_count != 32'd0 && !valid_s)
                  next_state = ST_REQ;
      ST_REQ:   if (valid_s) next_state = ST_WR;
      ST_WR:    if (beat && last_word) next_state = last_frame ? ST_IDLE : ST_STEP;
      ST_STEP:  if (!valid_s) next_state = ST_REQ;
      default:  next_state = ST_RESET;
    endcase
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state       <= ST_RESET;
      valid_sync  <= '0;
      frame_q     <= '0;
      widx        <= '0;
      remaining   <= '0;
      tic_ready   <= 1'b0;
      frames_done <= '0;
      run_done    <= 1'b0;
    end else if (!soft_nres) begin
      state       <= ST_RESET;
      valid_sync  <= '0;
      frame_q     <= '0;
      widx        <= '0;
      remaining   <= '0;
      tic_ready   <= 1'b0;
      frames_done <= '0;
      run_done    <= 1'b0;
    end else begin
      valid_sync <= {valid_sync[0], tic_valid};
      state      <= next_state;
      tic_ready  <= (next_state == ST_REQ) || (next_state == ST_WR);
      unique case (state)
        ST_IDLE: begin
          remaining <= meas_count;
          widx      <= '0;
          if (next_state == ST_REQ) run_done <= 1'b0;
        end
        ST_REQ: if (valid_s) frame_q <= tic_frame;
        ST_WR: if (beat) begin
          if (last_word) begin
            widx        <= '0;
            frames_done <= frames_done + 32'd1;
            if (last_frame) run_done  <= 1'b1;
            else            remaining <= remaining - 32'd1;
          end else begin
            widx <= widx + WI_W'(1);
          end
        end
        default: ;
      endcase
    end
  end

  assign m_axis_tvalid = (state == ST_WR);
  assign m_axis_tdata  = frame_q[stream_slice(int'(widx), TDATA_W)*TDATA_W +: TDATA_W];
  assign m_axis_tlast  = (state == ST_WR) && last_word && last_frame;

  // AXI-Stream: a word offered is held until taken.
  a_axis_hold: assert property (@(posedge aclk) disable iff (!aresetn || !soft_nres)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata)
                                          && $stable(m_axis_tlast));
  // Frame bus: READY is only raised while VALID is low.
  a_ready_rise: assert property (@(posedge aclk) disable iff (!aresetn || !soft_nres)
      $rose(tic_ready) |-> !valid_s);
endmodule
