// pr_region_wrapper: static wrapper around one reconfigurable partition
// (PR region) of the shell.
//
// Toward the shell every region presents the same union interface: an
// AXI4-Lite control port and a 32-bit AXI-Stream input and output. Toward
// the reconfigurable module (rm_*) it presents the module's own interface:
// a stream RM_AXIS_W bits wide and the control port. When RM_AXIS_W differs
// from 32 the wrapper inserts a width converter in each direction (32 to
// RM_AXIS_W on the way in, RM_AXIS_W to 32 on the way out). An interface
// the modules of this region do not have is tied off on the shell side:
// without a stream (HAS_AXIS = 0) the input is accepted and discarded so
// that a misrouted DMA transfer cannot hang, and the output never asserts
// valid; without a control port (HAS_AXIL = 0) every access is completed
// with DECERR. Tied-off module-side outputs are driven to zero.
//
// Timing: the converters add one register stage in each direction and keep
// full throughput on the 32-bit side; equal widths and the control port pass
// straight through.
//
// The union interface, the tie-off of unused interfaces and the width
// converters follow the framework this shell belongs to; the DECERR answer,
// the discard of unused input streams and RM_AXIS_W = 64 as the default
// (the wider of the two example widths) are this design's choices.
module pr_region_wrapper
  import zypr_pkg::*;
#(
  parameter int unsigned RM_AXIS_W = 64,
  parameter bit          HAS_AXIS  = 1'b1,
  parameter bit          HAS_AXIL  = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // shell side
  input  axil_req_t              s_axil_req,
  output axil_rsp_t              s_axil_rsp,
  input  axis_t                  s_axis,
  output logic                   s_axis_tready,
  output axis_t                  m_axis,
  input  logic                   m_axis_tready,
  // reconfigurable-module side
  output axil_req_t              rm_axil_req,
  input  axil_rsp_t              rm_axil_rsp,
  output logic [RM_AXIS_W-1:0]   rm_in_tdata,
  output logic [RM_AXIS_W/8-1:0] rm_in_tkeep,
  output logic                   rm_in_tlast,
  output logic                   rm_in_tvalid,
  input  logic                   rm_in_tready,
  input  logic [RM_AXIS_W-1:0]   rm_out_tdata,
  input  logic [RM_AXIS_W/8-1:0] rm_out_tkeep,
  input  logic                   rm_out_tlast,
  input  logic                   rm_out_tvalid,
  output logic                   rm_out_tready
);

  // ------------------------------------------------------------ stream
  if (HAS_AXIS) begin : g_axis
    axis_width_conv #(.S_W(AXIS_W), .M_W(RM_AXIS_W)) u_in (
      .clk, .rst_n,
      .s_tdata(s_axis.tdata), .s_tkeep(s_axis.tkeep), .s_tlast(s_axis.tlast),
      .s_tvalid(s_axis.tvalid), .s_tready(s_axis_tready),
      .m_tdata(rm_in_tdata), .m_tkeep(rm_in_tkeep), .m_tlast(rm_in_tlast),
      .m_tvalid(rm_in_tvalid), .m_tready(rm_in_tready));
    axis_width_conv #(.S_W(RM_AXIS_W), .M_W(AXIS_W)) u_out (
      .clk, .rst_n,
      .s_tdata(rm_out_tdata), .s_tkeep(rm_out_tkeep), .s_tlast(rm_out_tlast),
      .s_tvalid(rm_out_tvalid), .s_tready(rm_out_tready),
      .m_tdata(m_axis.tdata), .m_tkeep(m_axis.tkeep), .m_tlast(m_axis.tlast),
      .m_tvalid(m_axis.tvalid), .m_tready(m_axis_tready));
  end else begin : g_no_axis
    assign s_axis_tready = 1'b1;
    assign m_axis        = '0;
    assign rm_in_tdata   = '0;
    assign rm_in_tkeep   = '0;
    assign rm_in_tlast   = 1'b0;
    assign rm_in_tvalid  = 1'b0;
    assign rm_out_tready = 1'b0;
  end

  // ------------------------------------------------------------ control
  if (HAS_AXIL) begin : g_axil
    assign rm_axil_req = s_axil_req;
    assign s_axil_rsp  = rm_axil_rsp;
  end else begin : g_no_axil
    logic bvalid_q, rvalid_q;
    wire  w_take = s_axil_req.awvalid && s_axil_req.wvalid && !bvalid_q;
    wire  r_take = s_axil_req.arvalid && !rvalid_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        bvalid_q <= 1'b0;
        rvalid_q <= 1'b0;
      end else begin
        if (w_take) bvalid_q <= 1'b1;
        else if (s_axil_req.bready) bvalid_q <= 1'b0;
        if (r_take) rvalid_q <= 1'b1;
        else if (s_axil_req.rready) rvalid_q <= 1'b0;
      end
    end
    always_comb begin
      s_axil_rsp         = '0;
      s_axil_rsp.awready = w_take;
      s_axil_rsp.wready  = w_take;
      s_axil_rsp.bvalid  = bvalid_q;
      s_axil_rsp.bresp   = RESP_DECERR;
      s_axil_rsp.arready = r_take;
      s_axil_rsp.rvalid  = rvalid_q;
      s_axil_rsp.rresp   = RESP_DECERR;
    end
    assign rm_axil_req = '0;
  end

endmodule
