// axil_regif: AXI4-Lite slave front end that turns bus transactions into a
// simple register port for the shell's control blocks.
//
// A write is accepted when both the address and data channels are valid and
// no write response is outstanding; the register write strobe (wr_en) is
// then high for exactly one cycle and the OKAY response follows on the next
// cycle. A read is accepted when no read response is outstanding; rd_en is
// high for one cycle, the register file returns rd_data combinationally in
// that cycle and it is held on R until the master takes it. One transaction
// per channel is in flight at a time, which is all a PS MMIO master issues
// to control registers. Addresses are passed on as byte addresses of the
// low ADDR_W bits.
module axil_regif
  import zypr_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         req,
  output axil_rsp_t         rsp,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data
);

  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;

  assign wr_en   = req.awvalid && req.wvalid && !bvalid_q;
  assign wr_addr = req.awaddr[ADDR_W-1:0];
  assign wr_data = req.wdata;
  assign wr_strb = req.wstrb;
  assign rd_en   = req.arvalid && !rvalid_q;
  assign rd_addr = req.araddr[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en) bvalid_q <= 1'b1;
      else if (req.bready) bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (req.rready) rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = RESP_OKAY;
  end

endmodule
