// zypr_shell: static programmable-logic shell of a partially reconfigurable
// Zynq / Zynq UltraScale+ system, as generated for a set of PR regions.
//
// The processor reaches everything through one AXI4-Lite MMIO port that an
// address router splits into windows: the stream switch (slot 0), the ICAP
// PR controller (slot 1) and the control port of PR region r (slot 2 + r),
// each 2**SLOT_BITS bytes from BASE_ADDR. One DMA engine in the processor
// system is shared by reconfiguration and by the accelerators: its memory-
// to-PL stream (s_dma) and PL-to-memory stream (m_dma) enter a software-
// routed AXI-Stream switch. Routing the DMA stream to the ICAP sink loads a
// partial bitstream at one 32-bit word per clock; routing it to a region
// sends data to an accelerator; routing one region's output to the next
// region's input chains accelerators inside the PL, first region fed by the
// DMA (or by the external stream input s_ext from a PL peripheral) and last
// region returning to the DMA (or to m_ext). ICAP readback data are a
// switch source as well. Each region sits in a wrapper that gives the shell
// the same 32-bit stream and AXI4-Lite interface whatever the loaded module
// uses; the module itself is reconfigured at run time and is outside this
// netlist, so its ports (rm_*) are ports of the shell, as are the ICAP
// primitive's.
//
// Switch endpoints: sources 0 DMA MM2S, 1 ICAP readback, 2 external input,
// 3 + r region r output; sinks 0 DMA S2MM, 1 ICAP, 2 external output,
// 3 + r region r input. One clock (200 MHz on the UltraScale+ part, where
// the ICAPE3 runs at that rate; 100 MHz with ICAPE2) drives the whole shell.
//
// The structure (shared DMA, software-controlled stream switch, ICAP
// controller, per-region wrappers, chaining, external stream IO, one to
// four regions, 32-bit buses, three regions as in the image-processing
// example) follows the framework this shell belongs to; the address map,
// the endpoint numbering and the single clock are this design's choices.
module zypr_shell
  import zypr_pkg::*;
#(
  parameter int unsigned N_REGIONS       = 3,
  parameter int unsigned REGION_AXIS_W [4] = '{32, 32, 32, 32},
  parameter logic [3:0]  REGION_HAS_AXIS = 4'hF,
  parameter logic [3:0]  REGION_HAS_AXIL = 4'hF,
  parameter int unsigned ICAP_TYPE       = 3,
  parameter logic [31:0] BASE_ADDR       = 32'hA000_0000,
  parameter int unsigned SLOT_BITS       = 16,
  parameter int unsigned RM_MAX_W        = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor MMIO
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  // shared DMA
  input  axis_t       s_dma,
  output logic        s_dma_tready,
  output axis_t       m_dma,
  input  logic        m_dma_tready,
  // external PL stream peripheral
  input  axis_t       s_ext,
  output logic        s_ext_tready,
  output axis_t       m_ext,
  input  logic        m_ext_tready,
  // PR controller interrupt
  output logic        icap_irq,
  // ICAP primitive
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic        icap_avail,
  input  logic        icap_prdone,
  input  logic        icap_prerror,
  // reconfigurable modules, one set per region
  output axil_req_t                 rm_axil_req   [N_REGIONS],
  input  axil_rsp_t                 rm_axil_rsp   [N_REGIONS],
  output logic [RM_MAX_W-1:0]       rm_in_tdata   [N_REGIONS],
  output logic [RM_MAX_W/8-1:0]     rm_in_tkeep   [N_REGIONS],
  output logic                      rm_in_tlast   [N_REGIONS],
  output logic                      rm_in_tvalid  [N_REGIONS],
  input  logic                      rm_in_tready  [N_REGIONS],
  input  logic [RM_MAX_W-1:0]       rm_out_tdata  [N_REGIONS],
  input  logic [RM_MAX_W/8-1:0]     rm_out_tkeep  [N_REGIONS],
  input  logic                      rm_out_tlast  [N_REGIONS],
  input  logic                      rm_out_tvalid [N_REGIONS],
  output logic                      rm_out_tready [N_REGIONS]
);

  localparam int unsigned NP    = FIRST_REGION + N_REGIONS;
  localparam int unsigned N_SLV = 2 + N_REGIONS;

  initial begin
    assert (N_REGIONS >= 1 && N_REGIONS <= 4) else $error("one to four PR regions");
  end

  // ---------------------------------------------------------------- MMIO
  axil_req_t slv_req [N_SLV];
  axil_rsp_t slv_rsp [N_SLV];

  axil_interconnect #(.N_SLV(N_SLV), .BASE_ADDR(BASE_ADDR), .SLOT_BITS(SLOT_BITS)) u_mmio (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp), .m_req(slv_req), .m_rsp(slv_rsp));

  // -------------------------------------------------------------- switch
  axis_t src      [NP];
  logic  src_rdy  [NP];
  axis_t snk      [NP];
  logic  snk_rdy  [NP];

  axis_switch #(.N_SRC(NP), .N_SNK(NP)) u_switch (
    .clk, .rst_n, .s_axil_req(slv_req[0]), .s_axil_rsp(slv_rsp[0]),
    .s_axis(src), .s_axis_tready(src_rdy), .m_axis(snk), .m_axis_tready(snk_rdy));

  assign src[SRC_DMA]     = s_dma;
  assign s_dma_tready     = src_rdy[SRC_DMA];
  assign src[SRC_EXT]     = s_ext;
  assign s_ext_tready     = src_rdy[SRC_EXT];
  assign m_dma            = snk[SNK_DMA];
  assign snk_rdy[SNK_DMA] = m_dma_tready;
  assign m_ext            = snk[SNK_EXT];
  assign snk_rdy[SNK_EXT] = m_ext_tready;

  // -------------------------------------------------------- PR controller
  icap_ctrl #(.ICAP_TYPE(ICAP_TYPE)) u_icap (
    .clk, .rst_n, .s_axil_req(slv_req[1]), .s_axil_rsp(slv_rsp[1]), .irq(icap_irq),
    .s_axis(snk[SNK_ICAP]), .s_axis_tready(snk_rdy[SNK_ICAP]),
    .m_axis(src[SRC_ICAP_RD]), .m_axis_tready(src_rdy[SRC_ICAP_RD]),
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o, .icap_avail, .icap_prdone, .icap_prerror);

  // ------------------------------------------------------------ PR regions
  for (genvar r = 0; r < N_REGIONS; r++) begin : g_region
    localparam int unsigned W = REGION_AXIS_W[r];
    logic [W-1:0]   in_d;
    logic [W/8-1:0] in_k;

    pr_region_wrapper #(
      .RM_AXIS_W(W), .HAS_AXIS(REGION_HAS_AXIS[r]), .HAS_AXIL(REGION_HAS_AXIL[r])
    ) u_wrap (
      .clk, .rst_n,
      .s_axil_req(slv_req[2+r]), .s_axil_rsp(slv_rsp[2+r]),
      .s_axis(snk[FIRST_REGION+r]), .s_axis_tready(snk_rdy[FIRST_REGION+r]),
      .m_axis(src[FIRST_REGION+r]), .m_axis_tready(src_rdy[FIRST_REGION+r]),
      .rm_axil_req(rm_axil_req[r]), .rm_axil_rsp(rm_axil_rsp[r]),
      .rm_in_tdata(in_d), .rm_in_tkeep(in_k), .rm_in_tlast(rm_in_tlast[r]),
      .rm_in_tvalid(rm_in_tvalid[r]), .rm_in_tready(rm_in_tready[r]),
      .rm_out_tdata(rm_out_tdata[r][W-1:0]), .rm_out_tkeep(rm_out_tkeep[r][W/8-1:0]),
      .rm_out_tlast(rm_out_tlast[r]), .rm_out_tvalid(rm_out_tvalid[r]),
      .rm_out_tready(rm_out_tready[r]));

    assign rm_in_tdata[r] = RM_MAX_W'(in_d);
    assign rm_in_tkeep[r] = (RM_MAX_W/8)'(in_k);
  end

endmodule
