// axis_switch: software-routed AXI-Stream switch of the PR shell (the
// stream "arbitrator" that multiplexes and demultiplexes the shared DMA).
//
// N_SRC stream sources (DMA read channel, ICAP readback, external input,
// one output per PR region) and N_SNK sinks (DMA write channel, ICAP,
// external output, one input per PR region) are connected by a routing
// table with one entry per sink: the index of the source that feeds it, or
// "disabled". Pointing the ICAP sink at the DMA source provisions a
// bitstream; pointing a region's input at another region's output chains
// accelerators without a trip through processor memory; pointing a region
// at the external input feeds it from a PL peripheral.
//
// The runtime writes new entries into a staging copy and then sets COMMIT.
// The new table takes effect only at a packet boundary: from the commit
// request on, sinks that are between packets accept no new first beat,
// sinks inside a packet finish it (tlast), and when no sink is inside a
// packet the staged table is copied in one cycle. If two enabled sinks name
// the same source, only the lower-numbered one is connected. Data, keep,
// last and valid pass combinationally from source to sink and ready back,
// so the switch adds no latency and no bubbles.
//
// Registers (AXI4-Lite, byte offsets, the layout of the vendor switch's
// control interface):
//   0x000 CTRL      [1] COMMIT: write 1 to request; reads 1 while pending
//   0x004 IN_PKT    [N_SNK-1:0] sinks currently inside a packet
//   0x040 + 4*k     routing entry of sink k: [3:0] source, [31] disable
// After reset every sink is disabled.
//
// The switch's role, its software control, chaining and the 16-port limit
// follow the framework this shell belongs to; the commit-at-packet-boundary
// rule and the priority between sinks are this design's choices.
//
// The concurrent assertion at the end checks that a sink's route never
// changes inside a packet. Its "disable iff (!rst_n)" makes Verilator report
// rst_n as used both synchronously and asynchronously; the assertion is not
// synthesized, so the message is expected and harmless.
module axis_switch
  import zypr_pkg::*;
#(
  parameter int unsigned N_SRC = 6,
  parameter int unsigned N_SNK = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  axis_t     s_axis        [N_SRC],
  output logic      s_axis_tready [N_SRC],
  output axis_t     m_axis        [N_SNK],
  input  logic      m_axis_tready [N_SNK]
);

  initial begin
    assert (N_SRC <= 16 && N_SNK <= 16) else $error("at most 16 ports per side");
  end

  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_regif #(.ADDR_W(12)) u_regif (
    .clk, .rst_n, .req(s_axil_req), .rsp(s_axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  logic [3:0]       stage_sel [N_SNK];
  logic [N_SNK-1:0] stage_dis;
  logic [3:0]       sel       [N_SNK];
  logic [N_SNK-1:0] dis;
  logic [N_SNK-1:0] in_pkt;
  logic             pending;
  logic [N_SNK-1:0] route;   // sink k connected and allowed to move data

  // register reads
  always_comb begin
    rd_data = '0;
    if (rd_addr == 12'h000) rd_data[1] = pending;
    else if (rd_addr == 12'h004) rd_data[N_SNK-1:0] = in_pkt;
    else
      for (int k = 0; k < int'(N_SNK); k++)
        if (rd_addr == 12'(12'h040 + 4*k)) rd_data = {stage_dis[k], 27'd0, stage_sel[k]};
  end

  // routing: connection, ownership and commit gating
  always_comb begin
    for (int k = 0; k < int'(N_SNK); k++) begin
      route[k] = !dis[k] && 32'(sel[k]) < N_SRC && !(pending && !in_pkt[k]);
      for (int j = 0; j < k; j++)
        if (!dis[j] && sel[j] == sel[k]) route[k] = 1'b0;
    end
  end

  always_comb begin
    for (int j = 0; j < int'(N_SRC); j++) s_axis_tready[j] = 1'b0;
    for (int k = 0; k < int'(N_SNK); k++) begin
      m_axis[k] = '0;
      if (route[k]) begin
        m_axis[k] = s_axis[sel[k][$clog2(N_SRC)-1:0]];
        s_axis_tready[sel[k][$clog2(N_SRC)-1:0]] = m_axis_tready[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_SNK); k++) begin
        stage_sel[k] <= '0;
        sel[k]       <= '0;
      end
      stage_dis <= '1;
      dis       <= '1;
      in_pkt    <= '0;
      pending   <= 1'b0;
    end else begin
      for (int k = 0; k < int'(N_SNK); k++) begin
        if (wr_en && wr_addr == 12'(12'h040 + 4*k)) begin
          stage_sel[k] <= wr_data[3:0];
          stage_dis[k] <= wr_data[31];
        end
        if (m_axis[k].tvalid && m_axis_tready[k]) in_pkt[k] <= !m_axis[k].tlast;
      end
      if (wr_en && wr_addr == 12'h000 && wr_data[1]) pending <= 1'b1;
      else if (pending && in_pkt == '0) begin
        pending <= 1'b0;
        sel     <= stage_sel;
        dis     <= stage_dis;
      end
    end
  end

  // a sink's source never changes in the middle of a packet
  for (genvar k = 0; k < N_SNK; k++) begin : g_chk
    a_stable_route : assert property (@(posedge clk) disable iff (!rst_n)
      in_pkt[k] |=> (sel[k] == $past(sel[k]) && dis[k] == $past(dis[k])));
  end

endmodule
