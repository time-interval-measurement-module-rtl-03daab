// Simulation-only slave for the asynchronous READY/VALID/FRAME bus. After
// READY rises it waits a random "measurement" time, presents a fresh random
// frame whose lowest word is its sequence number and raises VALID; after
// READY falls it drops VALID after a random delay. Every frame it issues is
// kept in frames[] for the checker.
module tic_slave_model #(
  parameter int unsigned FRAME_BITS = 896,
  parameter int unsigned MAX_FRAMES = 64
) (
  input  logic                  ready,
  output logic                  valid,
  output logic [FRAME_BITS-1:0] frame
);
  timeunit 1ps; timeprecision 1fs;

  logic [FRAME_BITS-1:0] frames [MAX_FRAMES];
  int issued = 0;

  initial begin
    valid = 0;
    frame = '0;
    forever begin
      wait (ready === 1'b1);
      #($urandom_range(1000, 60000));
      for (int w = 0; w < FRAME_BITS / 32; w++) frame[32*w +: 32] = $urandom;
      frame[31:0] = issued;
      if (issued < MAX_FRAMES) frames[issued] = frame;
      issued++;
      valid = 1;
      wait (ready === 1'b0);
      #($urandom_range(1000, 30000));
      valid = 0;
      #($urandom_range(0, 3000));
      frame = '1;   // contents are undefined between transactions
    end
  end
endmodule
