// axil_interconnect: one-master, N_SLV-slave AXI4-Lite router that carries
// the processor's MMIO accesses to the shell's control blocks and to the
// control port of each PR region.
//
// Slave i owns the 2**SLOT_BITS-byte window at BASE_ADDR + i * 2**SLOT_BITS;
// an address outside all windows is answered with DECERR and reaches no
// slave. Each channel pair (write, read) handles one transaction at a time:
// the request is accepted and registered (write address and data together),
// driven to the decoded slave until it takes it, and the slave's response
// is registered and returned, so a write costs about four cycles plus the
// slave's own time. Writes and reads proceed independently of each other.
// The full address is passed on; slaves decode their low bits.
//
// Routing MMIO by address to a number of ports set at build time follows
// the framework this shell belongs to (where the vendor's interconnect
// core does it); the window size, the base address (the first PL window of
// the Zynq UltraScale+ processor) and the single-outstanding timing are
// this design's choices.
module axil_interconnect
  import zypr_pkg::*;
#(
  parameter int unsigned N_SLV     = 5,
  parameter logic [31:0] BASE_ADDR = 32'hA000_0000,
  parameter int unsigned SLOT_BITS = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [N_SLV],
  input  axil_rsp_t m_rsp [N_SLV]
);

  localparam int unsigned SW = (N_SLV > 1) ? $clog2(N_SLV) : 1;

  typedef enum logic [1:0] {C_IDLE, C_FWD, C_WAIT, C_RESP} ch_state_e;

  function automatic logic decode(input logic [31:0] a, output logic [SW-1:0] slot);
    logic [31:0] off = a - BASE_ADDR;
    logic [31:0] idx = off >> SLOT_BITS;
    slot = idx[SW-1:0];
    return (a >= BASE_ADDR) && (idx < N_SLV);
  endfunction

  // ------------------------------------------------------------- write
  ch_state_e   ws;
  logic [31:0] waddr, wdata;
  logic [3:0]  wstrb;
  logic [SW-1:0] wslot;
  logic        aw_done, w_done;
  logic [1:0]  bresp;

  // ------------------------------------------------------------- read
  ch_state_e   rs;
  logic [31:0] raddr, rdata;
  logic [SW-1:0] rslot;
  logic [1:0]  rresp;

  logic [SW-1:0] wdec, rdec;
  logic          whit, rhit;
  always_comb begin
    whit = decode(s_req.awaddr, wdec);
    rhit = decode(s_req.araddr, rdec);
  end

  wire w_accept = ws == C_IDLE && s_req.awvalid && s_req.wvalid;
  wire r_accept = rs == C_IDLE && s_req.arvalid;

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = w_accept;
    s_rsp.wready  = w_accept;
    s_rsp.bvalid  = ws == C_RESP;
    s_rsp.bresp   = bresp;
    s_rsp.arready = r_accept;
    s_rsp.rvalid  = rs == C_RESP;
    s_rsp.rdata   = rdata;
    s_rsp.rresp   = rresp;
    for (int i = 0; i < int'(N_SLV); i++) begin
      m_req[i]        = '0;
      m_req[i].awaddr = waddr;
      m_req[i].wdata  = wdata;
      m_req[i].wstrb  = wstrb;
      m_req[i].araddr = raddr;
      if (32'(wslot) == i) begin
        m_req[i].awvalid = ws == C_FWD && !aw_done;
        m_req[i].wvalid  = ws == C_FWD && !w_done;
        m_req[i].bready  = ws == C_WAIT;
      end
      if (32'(rslot) == i) begin
        m_req[i].arvalid = rs == C_FWD;
        m_req[i].rready  = rs == C_WAIT;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= C_IDLE;
      waddr   <= '0;
      wdata   <= '0;
      wstrb   <= '0;
      wslot   <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      bresp   <= RESP_OKAY;
      rs      <= C_IDLE;
      raddr   <= '0;
      rslot   <= '0;
      rdata   <= '0;
      rresp   <= RESP_OKAY;
    end else begin
      unique case (ws)
        C_IDLE: if (w_accept) begin
          waddr   <= s_req.awaddr;
          wdata   <= s_req.wdata;
          wstrb   <= s_req.wstrb;
          wslot   <= wdec;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (whit) ws <= C_FWD;
          else begin
            bresp <= RESP_DECERR;
            ws    <= C_RESP;
          end
        end
        C_FWD: begin
          automatic logic aw_ok = aw_done || m_rsp[wslot].awready;
          automatic logic w_ok  = w_done || m_rsp[wslot].wready;
          aw_done <= aw_ok;
          w_done  <= w_ok;
          if (aw_ok && w_ok) ws <= C_WAIT;
        end
        C_WAIT: if (m_rsp[wslot].bvalid) begin
          bresp <= m_rsp[wslot].bresp;
          ws    <= C_RESP;
        end
        C_RESP: if (s_req.bready) ws <= C_IDLE;
        default: ws <= C_IDLE;
      endcase

      unique case (rs)
        C_IDLE: if (r_accept) begin
          raddr <= s_req.araddr;
          rslot <= rdec;
          if (rhit) rs <= C_FWD;
          else begin
            rdata <= '0;
            rresp <= RESP_DECERR;
            rs    <= C_RESP;
          end
        end
        C_FWD: if (m_rsp[rslot].arready) rs <= C_WAIT;
        C_WAIT: if (m_rsp[rslot].rvalid) begin
          rdata <= m_rsp[rslot].rdata;
          rresp <= m_rsp[rslot].rresp;
          rs    <= C_RESP;
        end
        C_RESP: if (s_req.rready) rs <= C_IDLE;
        default: rs <= C_IDLE;
      endcase
    end
  end

endmodule
