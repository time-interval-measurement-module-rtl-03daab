// Testbench for register_bank: register map, reset values, byte strobes,
// read-only status words and the nRES / COUNT outputs.
module tb_register_bank;
  timeunit 1ps; timeprecision 1fs;
  import tim_pkg::*;

  logic aclk = 0, aresetn;
  always #5000 aclk = ~aclk;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        ctrl_nres, st_run_done;
  logic [31:0] meas_count, st_frames;
  tm_state_e   st_state;

  register_bank dut (
    .aclk, .aresetn,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .ctrl_nres, .meas_count, .st_state, .st_run_done, .st_frames
  );

  axil_master #(.ADDR_W(8)) m (
    .aclk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp,
    .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, cnt_model;
    st_state = ST_IDLE; st_run_done = 0; st_frames = 32'h0;
    aresetn = 1;
    #1 aresetn = 0;         // reset edge at power-up
    repeat (3) @(posedge aclk);
    aresetn = 1;
    repeat (2) @(posedge aclk);
    check("nres after reset", 32'(ctrl_nres), 0);
    check("count after reset", meas_count, 0);
    m.read(8'h00, d); check("CTRL reset", d, 0);
    m.write(8'h04, 32'd1000000); check("COUNT out", meas_count, 32'd1000000);
    m.read(8'h04, d);            check("COUNT read", d, 32'd1000000);
    m.write(8'h00, 32'h1);       check("nres set", 32'(ctrl_nres), 1);
    m.read(8'h00, d);            check("CTRL read", d, 1);
    // byte strobe: only byte 1 of COUNT
    cnt_model = 32'd1000000;
    m.write(8'h04, 32'hAABBCCDD, 4'b0010);
    cnt_model[15:8] = 8'hCC;
    check("COUNT strobe", meas_count, cnt_model);
    // status words follow their inputs
    for (int i = 0; i < 20; i++) begin
      tm_state_e s;
      s = tm_state_e'(3'($urandom_range(0, 4)));
      st_state = s; st_run_done = 1'($urandom); st_frames = $urandom;
      m.read(8'h08, d); check("STATUS", d, {28'd0, st_run_done, s});
      m.read(8'h0C, d); check("FRAMES", d, st_frames);
    end
    // read-only and unmapped addresses
    m.write(8'h08, 32'hFFFF_FFFF);
    m.write(8'h40, 32'hFFFF_FFFF);
    check("COUNT untouched", meas_count, cnt_model);
    m.read(8'h40, d); check("unmapped", d, 0);
    m.write(8'h00, 32'h0); check("nres cleared", 32'(ctrl_nres), 0);
    // random COUNT values
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v;
      v = $urandom;
      m.write(8'h04, v);
      m.read(8'h04, d); check("COUNT random", d, v);
      check("COUNT out random", meas_count, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
