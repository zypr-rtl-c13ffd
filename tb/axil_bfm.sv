// axil_bfm: AXI4-Lite master used by the testbenches to play the part of
// the processor's MMIO port. write() and read() each run one transaction
// and wait for its response; both return the response code. Signals change
// on the falling clock edge and readies are sampled 1 ns later, so every
// handshake completes on the following rising edge.
module axil_bfm
  import zypr_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  timeunit 1ns; timeprecision 1ps;
  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output logic [1:0] resp);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1'b1;
    req.wdata = data; req.wstrb = 4'hF; req.wvalid = 1'b1;
    req.bready = 1'b1;
    while (req.awvalid || req.wvalid) begin
      #1;
      aw_hs = req.awvalid && rsp.awready;
      w_hs  = req.wvalid && rsp.wready;
      @(negedge clk);
      if (aw_hs) req.awvalid = 1'b0;
      if (w_hs)  req.wvalid  = 1'b0;
    end
    b_hs = 0;
    while (!b_hs) begin
      #1;
      b_hs = rsp.bvalid;
      resp = rsp.bresp;
      @(negedge clk);
    end
    req.bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    bit ar_hs, r_hs;
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1'b1; req.rready = 1'b1;
    ar_hs = 0;
    while (!ar_hs) begin
      #1;
      ar_hs = rsp.arready;
      @(negedge clk);
    end
    req.arvalid = 1'b0;
    r_hs = 0;
    while (!r_hs) begin
      #1;
      r_hs = rsp.rvalid;
      data = rsp.rdata;
      resp = rsp.rresp;
      @(negedge clk);
    end
    req.rready = 1'b0;
  endtask
endmodule
