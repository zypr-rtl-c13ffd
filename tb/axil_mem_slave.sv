// axil_mem_slave: AXI4-Lite memory used as a test slave. It holds 64
// words, takes its address, data and read address with random delays
// (independent readies), answers writes and reads after a random wait, and
// answers SLVERR for the word at byte offset 0xFFC. Read data are the
// stored word XOR TAG so tests can tell the slaves apart; writes counts
// the writes it has taken.
// It is a test fixture of this design only; nothing in it comes from the
// framework the shell belongs to.
module axil_mem_slave
  import zypr_pkg::*;
#(
  parameter logic [31:0] TAG = '0
) (
  input  logic      clk,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output int        writes
);
  timeunit 1ns; timeprecision 1ps;
  logic [31:0] mem [64];
  logic aw_got, w_got;
  logic [31:0] a_q, d_q;

  initial begin
    rsp = '0; writes = 0; aw_got = 0; w_got = 0;
    foreach (mem[k]) mem[k] = '0;
  end

  always @(posedge clk) begin
    // write address and data with random readiness
    if (req.awvalid && rsp.awready) begin aw_got <= 1; a_q <= req.awaddr; end
    if (req.wvalid && rsp.wready) begin w_got <= 1; d_q <= req.wdata; end
    rsp.awready <= !aw_got && !(req.awvalid && rsp.awready) && $urandom_range(1);
    rsp.wready  <= !w_got && !(req.wvalid && rsp.wready) && $urandom_range(1);
    if (aw_got && w_got && !rsp.bvalid && $urandom_range(1)) begin
      rsp.bvalid <= 1;
      rsp.bresp  <= (a_q[11:0] == 12'hFFC) ? RESP_SLVERR : RESP_OKAY;
      mem[a_q[7:2]] <= d_q;
      writes <= writes + 1;
    end
    if (rsp.bvalid && req.bready) begin
      rsp.bvalid <= 0; aw_got <= 0; w_got <= 0;
    end
    // reads
    rsp.arready <= req.arvalid && !rsp.arready && !rsp.rvalid && $urandom_range(1);
    if (req.arvalid && rsp.arready) begin
      rsp.rvalid <= 1;
      rsp.rdata  <= mem[req.araddr[7:2]] ^ TAG;
      rsp.rresp  <= (req.araddr[11:0] == 12'hFFC) ? RESP_SLVERR : RESP_OKAY;
    end
    if (rsp.rvalid && req.rready) rsp.rvalid <= 0;
  end
endmodule
