// AXI4-Lite slave front end for small register files.
//
// Turns the five AXI4-Lite channels of a processor general-purpose port into
// a one-cycle register write strobe and a one-cycle register read strobe.
// A write is accepted when address and data are both valid and no write
// response is pending; the response (OKAY) follows in the next cycle. A read
// is accepted when no read response is pending; rd_data, driven
// combinationally by the register file from rd_addr, is captured in the same
// cycle and returned in the next. The bus itself is standard AXI4-Lite; using
// this adapter for the register bank and the frame generator is this design's
// choice. Word addresses are byte addresses with the two low bits ignored.
// The linter notes aresetn as used both as an asynchronous reset and as data:
// the data use is the disable condition of the handshake assertions.
module axil_regif #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // register file side
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data
);
  timeunit 1ps; timeprecision 1fs;

  assign wr_en     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_en;
  assign s_wready  = wr_en;
  assign wr_addr   = s_awaddr;
  assign wr_data   = s_wdata;
  assign wr_strb   = s_wstrb;
  assign s_bresp   = 2'b00;

  assign rd_en     = s_arvalid && !s_rvalid;
  assign s_arready = rd_en;
  assign rd_addr   = s_araddr;
  assign s_rresp   = 2'b00;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (wr_en)                     s_bvalid <= 1'b1;
      else if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (rd_en) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_data;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // A response stays valid until the master takes it.
  a_bhold: assert property (@(posedge aclk) disable iff (!aresetn)
                            s_bvalid && !s_bready |=> s_bvalid);
  a_rhold: assert property (@(posedge aclk) disable iff (!aresetn)
                            s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
