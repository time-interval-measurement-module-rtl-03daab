// Testbench for frame_generator: software writes a frame and a delay over
// AXI4-Lite and reads them back; then the frame bus master side requests
// frames. Checks the served frame word by word, that the frame repeats until
// rewritten, the READY-to-VALID delay and the release of VALID.
module tb_frame_generator;
  timeunit 1ps; timeprecision 1fs;

  localparam int WORDS = 28;

  logic aclk = 0, aresetn;
  always #5000 aclk = ~aclk;

  logic [8:0]   awaddr, araddr;
  logic         awvalid, awready, wvalid, wready, bvalid, bready;
  logic         arvalid, arready, rvalid, rready;
  logic [31:0]  wdata, rdata;
  logic [3:0]   wstrb;
  logic [1:0]   bresp, rresp;
  logic         tic_ready, tic_valid;
  logic [895:0] tic_frame;

  frame_generator dut (
    .aclk, .aresetn,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .tic_ready, .tic_valid, .tic_frame
  );

  axil_master #(.ADDR_W(9)) m (
    .aclk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp,
    .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] img [WORDS];

  task automatic load_frame();
    for (int w = 0; w < WORDS; w++) begin
      img[w] = $urandom;
      m.write(9'(4 * w), img[w]);
    end
  endtask

  task automatic request(input int delay);
    int cyc;
    @(negedge aclk) tic_ready = 1;
    cyc = 0;
    while (!tic_valid) begin @(negedge aclk); cyc++; end
    check("READY to VALID cycles", 32'(cyc), 32'(delay + 4));
    for (int w = 0; w < WORDS; w++)
      check($sformatf("frame word %0d", w), tic_frame[32*w +: 32], img[w]);
    repeat (4) @(posedge aclk);
    check("VALID held", 32'(tic_valid), 1);
    @(negedge aclk) tic_ready = 0;
    cyc = 0;
    while (tic_valid) begin @(negedge aclk); cyc++; end
    check("VALID release cycles", 32'(cyc), 3);
    repeat (3) @(posedge aclk);
  endtask

  initial begin
    logic [31:0] d;
    tic_ready = 0;
    aresetn = 1; #1 aresetn = 0;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    m.read(9'h100, d); check("DELAY reset", d, 0);
    load_frame();
    for (int w = 0; w < WORDS; w++) begin
      m.read(9'(4 * w), d); check("readback", d, img[w]);
    end
    m.write(9'h100, 32'd5);
    m.read(9'h100, d); check("DELAY readback", d, 5);
    request(5);
    request(5);               // same frame served again
    m.write(9'h100, 32'd0);
    load_frame();
    request(0);
    m.write(9'h100, 32'd17);
    request(17);
    m.read(9'h1F0, d); check("unmapped", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
