// tb_axis_switch: self-checking test of the routed AXI-Stream switch.
// Six sources send numbered 8-beat packets ({source, sequence} in tdata)
// with random valid gaps into six sinks with random ready. The test checks
// that nothing moves after reset, that every beat reaches a sink the
// routing table connects to its source, in order and without loss, that a
// source named by two sinks only feeds the lower-numbered one, that a
// commit issued while packets are in flight stays pending and changes the
// routing only between packets (packets never mix sources), and that a
// chained path (region 0 output into region 1 input) carries data.
// Software routing and chaining follow the framework; the commit rule and
// the sink priority it checks are this design's own.
module tb_axis_switch;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  axil_req_t req; axil_rsp_t rsp;
  axis_t s_axis [N]; logic s_tready [N];
  axis_t m_axis [N]; logic m_tready [N];
  axil_bfm bfm (.clk, .req, .rsp);
  axis_switch #(.N_SRC(N), .N_SNK(N)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .s_axis, .s_axis_tready(s_tready), .m_axis, .m_axis_tready(m_tready));

  // sources
  int  cnt [N];
  bit  v   [N];
  bit  src_en = 0;
  always_comb
    for (int j = 0; j < N; j++) begin
      s_axis[j].tvalid = v[j];
      s_axis[j].tdata  = {4'(j), 28'(cnt[j])};
      s_axis[j].tkeep  = '1;
      s_axis[j].tlast  = (cnt[j] % 8) == 7;
    end
  always @(posedge clk)
    for (int j = 0; j < N; j++) begin
      automatic int nxt = cnt[j] + ((v[j] && s_tready[j]) ? 1 : 0);
      cnt[j] <= nxt;
      // sources stop only between packets
      if (!v[j] || s_tready[j]) v[j] <= (src_en || (nxt % 8) != 0) && ($urandom_range(3) != 0);
    end

  // sinks and scoreboard
  int  next [N];      // next expected sequence number per source
  int  got  [N];      // beats received per sink
  int  from [N][N];   // beats received by sink k from source j
  int  cur_src [N];   // source of the packet sink k is receiving, -1 between
  bit  sink_rdy = 1;
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      m_tready[k] <= sink_rdy && ($urandom_range(4) != 0);
      if (m_axis[k].tvalid && m_tready[k]) begin
        automatic int j = int'(m_axis[k].tdata[31:28]);
        automatic int q = int'(m_axis[k].tdata[27:0]);
        got[k]++;
        from[k][j]++;
        if (q != next[j]) begin
          failures++; $display("FAIL: sink %0d source %0d seq %0d expected %0d", k, j, q, next[j]);
        end
        next[j] = q + 1;
        if (cur_src[k] < 0) begin
          if (q % 8 != 0) begin failures++; $display("FAIL: sink %0d packet starts mid-packet", k); end
          cur_src[k] = j;
        end else if (cur_src[k] != j) begin
          failures++; $display("FAIL: sink %0d mixed sources in one packet", k);
        end
        if (m_axis[k].tlast) cur_src[k] = -1;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] resp; logic [31:0] d;
  bit saw_pending;
  initial begin
    for (int j = 0; j < N; j++) begin
      cnt[j] = 0; v[j] = 0; next[j] = 0; got[j] = 0; cur_src[j] = -1; m_tready[j] = 0;
      for (int k = 0; k < N; k++) from[j][k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // nothing moves after reset
    src_en = 1;
    repeat (50) @(negedge clk);
    begin
      automatic int tot = 0;
      for (int k = 0; k < N; k++) tot += got[k];
      check(tot == 0, "all sinks disabled after reset");
    end
    bfm.read(32'h040, d, resp);
    check(d[31] == 1'b1, "routing entry reads disabled after reset");

    // map A: ICAP(1)<-DMA(0), region0(3)<-ext(2), region1(4)<-region0(3),
    //        DMA(0)<-region1(4), ext(2)<-icap readback(1), region2(5)<-DMA(0) (duplicate)
    bfm.write(32'h044, 32'd0, resp);
    bfm.write(32'h04C, 32'd2, resp);
    bfm.write(32'h050, 32'd3, resp);
    bfm.write(32'h040, 32'd4, resp);
    bfm.write(32'h048, 32'd1, resp);
    bfm.write(32'h054, 32'd0, resp);
    bfm.read(32'h050, d, resp);
    check(d == 32'd3, "staged entry reads back");
    bfm.write(32'h000, 32'h2, resp);
    repeat (2000) @(negedge clk);
    check(from[1][0] > 0, "DMA source reaches ICAP sink");
    check(from[4][3] > 0, "chained region0 -> region1");
    check(from[3][2] > 0, "external input reaches region0");
    check(from[0][4] > 0, "region1 output reaches DMA sink");
    check(got[5] == 0, "duplicate selection of a source stays unconnected");
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++)
        if (from[k][j] != 0)
          check((k==1&&j==0)||(k==3&&j==2)||(k==4&&j==3)||(k==0&&j==4)||(k==2&&j==1),
                $sformatf("beats only on mapped paths (sink %0d src %0d)", k, j));

    // map B while traffic flows: ICAP disabled, region2(5)<-DMA(0), region0 swaps to region2 output
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) from[k][j] = 0;
    bfm.write(32'h044, 32'h8000_0000, resp);
    bfm.write(32'h04C, 32'd5, resp);
    sink_rdy = 0;                   // hold sinks so packets are in flight at the commit
    bfm.write(32'h000, 32'h2, resp);
    bfm.read(32'h000, d, resp);
    saw_pending = d[1];
    check(saw_pending, "commit stays pending while packets are in flight");
    bfm.read(32'h004, d, resp);
    check(d[5:0] != 0, "IN_PKT shows open packets");
    sink_rdy = 1;
    repeat (2000) @(negedge clk);
    bfm.read(32'h000, d, resp);
    check(!d[1], "commit applied after packets closed");
    check(from[5][0] > 0, "region2 fed from DMA after commit");
    check(from[3][5] > 0, "region0 fed from region2 after commit");

    // drain
    src_en = 0;
    repeat (200) @(negedge clk);
    for (int k = 0; k < N; k++) check(cur_src[k] == -1, $sformatf("sink %0d ends between packets", k));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
