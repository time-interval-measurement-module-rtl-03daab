// Testbench for stream_ctrl: runs of several frames against an asynchronous
// TIC model and a DMA sink with random TREADY. Checks every word and TLAST
// against the frames the model issued, the one-word-per-cycle rate under
// full TREADY, the state sequence (REQ, WR, STEP visits), the counter and the
// reset behaviour.
module tb_stream_ctrl;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  localparam int WORDS = 896 / 32;

  logic aclk = 0, nres, aresetn;
  always #5000 aclk = ~aclk;

  logic [31:0]  meas_count, tdata, frames_done;
  logic         tic_ready, tic_valid, tvalid, tready, tlast, run_done;
  logic [895:0] tic_frame;
  tm_state_e    state;

  stream_ctrl dut (
    .aclk, .aresetn, .soft_nres(nres), .meas_count, .tic_ready, .tic_valid, .tic_frame,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tlast(tlast), .state, .frames_done, .run_done
  );

  tic_slave_model #(.FRAME_BITS(896)) tic (.ready(tic_ready), .valid(tic_valid), .frame(tic_frame));

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: compare each accepted word with the frame the model issued
  int  rx_words = 0, rx_frames = 0, base_frame = 0, n_stall = 0, n_step = 0, n_req = 0;
  int  bp_mode = 1;          // 1: random TREADY, 0: always ready while running
  bit  running = 0;
  tm_state_e prev_state;
  always @(negedge aclk) tready = running && (bp_mode == 0 || ($urandom_range(0, 3) != 0));
  always @(posedge aclk) begin
    prev_state <= state;
    if (state == ST_STEP && prev_state != ST_STEP) n_step++;
    if (state == ST_REQ  && prev_state != ST_REQ)  n_req++;
    if (tvalid && !tready) n_stall++;
    if (tvalid && tready) begin
      check($sformatf("tdata f%0d w%0d t%0t", rx_frames, rx_words, $time), 64'(tdata), 64'(tic.frames[base_frame + rx_frames][32*stream_slice(rx_words, 32) +: 32]));
      check("tlast", 64'(tlast), 64'(rx_words == WORDS - 1 && rx_frames == meas_count - 1));
      if (rx_words == WORDS - 1) begin rx_words = 0; rx_frames++; end
      else rx_words++;
    end
  end

  task automatic run(input int n, input int mode);
    int t0, t_first, t_last;
    bp_mode = mode;
    rx_words = 0; rx_frames = 0; base_frame = tic.issued;
    meas_count = n;
    @(negedge aclk) nres = 1;
    repeat (3) @(posedge aclk);
    check("IDLE waits for TREADY", 64'(state), 64'(ST_IDLE));
    running = 1;
    wait (run_done);
    @(posedge aclk);
    running = 0;
    check("frames received", 64'(rx_frames), 64'(n));
    check("frames_done", 64'(frames_done), 64'(n));
    check("back in IDLE", 64'(state), 64'(ST_IDLE));
    check("READY released", 64'(tic_ready), 0);
    @(negedge aclk) nres = 0;   // software resets after each run
    @(negedge aclk);            // synchronous: taken at the edge in between
    check("RESET state", 64'(state), 64'(ST_RESET));
    repeat (20) @(posedge aclk);
  endtask

  // rate: with TREADY always high a frame's words come in consecutive cycles
  int burst = 0, max_burst = 0;
  always @(posedge aclk) begin
    if (tvalid && tready) begin burst++; if (burst > max_burst) max_burst = burst; end
    else burst = 0;
  end

  initial begin
    meas_count = 0;
    nres = 0;
    aresetn = 1;
    #1 aresetn = 0;         // power-on reset edge
    #20000 aresetn = 1;
    repeat (3) @(posedge aclk);
    // count zero: stays in IDLE
    @(negedge aclk) nres = 1;
    running = 1;
    repeat (10) @(posedge aclk);
    check("count 0 stays IDLE", 64'(state), 64'(ST_IDLE));
    running = 0;
    @(negedge aclk) nres = 0;
    run(5, 1);
    run(1, 1);
    max_burst = 0;
    run(3, 0);
    check("one word per cycle", 64'(max_burst), 64'(WORDS));
    check("STEP visited", 64'(n_step), 64'(4 + 0 + 2));
    check("REQ visited", 64'(n_req), 64'(5 + 1 + 3));
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no backpressure seen"); end
    $display("stalls=%0d steps=%0d reqs=%0d", n_stall, n_step, n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
