// zypr_pkg: types and constants shared by the PR shell.
//
// The shell moves data on 32-bit AXI-Stream links and is controlled over
// 32-bit AXI4-Lite, the widths used throughout the reference evaluation.
// AXI4-Lite is carried as two packed structs (master-to-slave request and
// slave-to-master response) so that arrays of ports stay plain signals.
// AXI-Stream links are carried as tdata/tkeep/tlast/tvalid in one struct
// with tready kept separate, because tready flows the other way.
// The 32-bit bus widths follow the framework's evaluated configuration; the
// struct packing, the response codes and the endpoint numbering are this
// design's own.
package zypr_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;
  localparam int unsigned AXIS_W  = 32;

  // AXI response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_rsp_t;

  typedef struct packed {
    logic [AXIS_W-1:0]   tdata;
    logic [AXIS_W/8-1:0] tkeep;
    logic                tlast;
    logic                tvalid;
  } axis_t;

  // Stream endpoints of the shell switch. Sources feed the switch, sinks are
  // fed by it; PR region r is source/sink FIRST_REGION + r.
  localparam int unsigned SRC_DMA      = 0;  // DMA MM2S (memory to PL)
  localparam int unsigned SRC_ICAP_RD  = 1;  // ICAP readback data
  localparam int unsigned SRC_EXT      = 2;  // external PL peripheral input
  localparam int unsigned SNK_DMA      = 0;  // DMA S2MM (PL to memory)
  localparam int unsigned SNK_ICAP     = 1;  // ICAP configuration write
  localparam int unsigned SNK_EXT      = 2;  // external PL peripheral output
  localparam int unsigned FIRST_REGION = 3;

  // Reverse the bit order inside every byte of a word (configuration-port
  // byte convention for raw .bin bitstreams).
  function automatic logic [31:0] bitswap32(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        r[8*b+i] = w[8*b+7-i];
    return r;
  endfunction

endpackage
