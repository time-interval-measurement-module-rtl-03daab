// Simulation-only AXI4-Lite master with blocking write and read tasks.
// Drives address and data together, waits for the handshakes and the
// response; each task returns after the response has been taken.
module axil_master #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              aclk,
  output logic [ADDR_W-1:0] awaddr,
  output logic              awvalid,
  input  logic              awready,
  output logic [31:0]       wdata,
  output logic [3:0]        wstrb,
  output logic              wvalid,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output logic [ADDR_W-1:0] araddr,
  output logic              arvalid,
  input  logic              arready,
  input  logic [31:0]       rdata,
  input  logic [1:0]        rresp,
  input  logic              rvalid,
  output logic              rready
);
  timeunit 1ps; timeprecision 1fs;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  // Signals change at the falling edge; the slave samples at the rising edge.
  task automatic write(input logic [ADDR_W-1:0] a, input logic [31:0] d,
                       input logic [3:0] strb = 4'hf);
    @(negedge aclk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = strb; wvalid = 1; bready = 1;
    while (!(awready && wready)) @(negedge aclk);
    @(negedge aclk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge aclk);
    @(negedge aclk);
    bready = 0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge aclk);
    araddr = a; arvalid = 1; rready = 1;
    while (!arready) @(negedge aclk);
    @(negedge aclk);
    arvalid = 0;
    while (!rvalid) @(negedge aclk);
    d = rdata;
    @(negedge aclk);
    rready = 0;
  endtask

  logic unused;
  assign unused = ^{bresp, rresp};
endmodule
