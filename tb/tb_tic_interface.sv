// Testbench for tic_interface: drives the frame bus master side
// asynchronously and plays the measuring parts. Checks the reset pulse
// before each measurement, that no frame is offered before the measurement is done, the frame
// field positions of the frame table, the frame number sequence, the
// VALID/READY handshake order and the latency from done to VALID.
module tb_tic_interface;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  localparam real T0 = 2000.0;
  localparam int  SETTLE = 3;

  logic         clk = 0, rst_n, ready, valid, meas_rst, meas_done;
  tic_frame_t   frame;
  logic [895:0] fv;
  logic [29:0]  period;
  logic [3:0]   fis_start, fis_stop;
  logic [383:0] sis_start, sis_stop;
  always #(T0 / 2) clk = ~clk;

  tic_interface #(.SETTLE(SETTLE)) dut (
    .clk, .rst_n, .ready, .valid, .frame, .meas_rst, .meas_done, .period,
    .fis_start, .fis_stop, .sis_start, .sis_stop
  );
  assign fv = frame;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ready = 0; meas_done = 0; period = '0; fis_start = '0; fis_stop = '0;
    sis_start = '0; sis_stop = '0;
    rst_n = 1; #1 rst_n = 0; #(5 * T0) rst_n = 1;
    #(5 * T0);
    for (int n = 0; n < 40; n++) begin
      int cyc;
      check("idle: no reset pulse", 128'(meas_rst), 0);
      check("idle: VALID low", 128'(valid), 0);
      #(real'($urandom_range(0, 1999)));
      ready = 1;
      cyc = 0;
      while (!meas_rst) begin @(negedge clk); cyc++; end
      check("reset pulse within 4 cycles of READY", 128'(cyc <= 4), 1);
      cyc = 0;
      while (meas_rst) begin @(negedge clk); cyc++; end
      check("reset pulse length", 128'(cyc), 2);
      for (int w = 0; w < 12; w++) begin
        sis_start[32*w +: 32] = $urandom; sis_stop[32*w +: 32] = $urandom;
      end
      period = 30'($urandom); fis_start = 4'($urandom); fis_stop = 4'($urandom);
      repeat ($urandom_range(2, 20)) @(posedge clk);
      check("no VALID before done", 128'(valid), 0);
      @(negedge clk) meas_done = 1;
      cyc = 0;
      while (!valid) begin @(negedge clk); cyc++; end
      check("done to VALID cycles", 128'(cyc), 128'(SETTLE + 2));
      // Table I positions
      check("frame number (31:0)",  128'(fv[31:0]),   128'(n));
      check("period (63:32)",       128'(fv[63:32]),  128'(period));
      check("FIS START (95:64)",    128'(fv[95:64]),  128'(fis_start));
      check("FIS STOP (127:96)",    128'(fv[127:96]), 128'(fis_stop));
      check("SIS START0 (255:128)", fv[255:128], sis_start[127:0]);
      check("SIS STOP0 (383:256)",  fv[383:256], sis_stop[127:0]);
      check("SIS START1 (511:384)", fv[511:384], sis_start[255:128]);
      check("SIS STOP1 (639:512)",  fv[639:512], sis_stop[255:128]);
      check("SIS START2 (767:640)", fv[767:640], sis_start[383:256]);
      check("SIS STOP2 (895:768)",  fv[895:768], sis_stop[383:256]);
      // VALID holds while READY is high, frame stable
      repeat ($urandom_range(1, 10)) @(posedge clk);
      check("VALID held", 128'(valid), 1);
      check("frame stable", 128'(fv[31:0]), 128'(n));
      #(real'($urandom_range(0, 1999)));
      ready = 0;
      while (valid) @(posedge clk);
      @(posedge clk);
      check("no reset pulse after VALID drops", 128'(meas_rst), 0);
      meas_done = 0;
      repeat ($urandom_range(1, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
