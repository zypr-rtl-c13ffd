// tb_zypr_full: the shell at its default size (three 32-bit PR regions,
// ICAPE3) taken through the work of the image-processing example at full
// scale, clocked at 200 MHz (5 ns):
//   1. partial bitstreams of 5.430, 2.565 and 1.330 MiB are streamed from
//      the DMA into the ICAP; the words and checksum reaching the port, the
//      interrupt, and the transfer time (one word per cycle, so 1.330 MiB
//      takes about 1.74 ms, well inside a 33.3 ms frame period) are checked;
//   2. one 1920 x 1080 frame of 32-bit pixels, one packet per line, runs
//      through DMA -> region 0 -> region 1 -> region 2 -> DMA and every
//      pixel is checked against the composition of the three modules.
// Data are generated from the word index, so nothing is stored.
// The bitstream sizes, the 200 MHz clock, the three chained regions and the
// 1080p30 frame follow the framework's evaluation; the 32-bit pixel word is
// this test's own assumption.
module tb_zypr_full;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NR = 3;
  localparam logic [31:0] BASE = 32'hA000_0000;
  localparam int W = 1920, H = 1080;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #2.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] swp(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) r[8*b+k] = w[8*b+7-k];
    return r;
  endfunction
  function automatic logic [31:0] gen(input int k, input logic [31:0] seed);
    return (32'(k) * 32'h9E37_79B1) ^ seed;
  endfunction

  axil_req_t req; axil_rsp_t rsp;
  axis_t s_dma, m_dma, s_ext, m_ext;
  logic s_dma_tready, m_dma_tready, s_ext_tready, irq;
  logic csib, rdwrb, avail, prdone, prerror;
  logic [31:0] icap_i, icap_o, wr_sum;
  int wr_count, rd_count, stall_count;
  axil_req_t rm_req [NR]; axil_rsp_t rm_rsp [NR];
  logic [63:0] in_d [NR], out_d [NR];
  logic [7:0]  in_k [NR], out_k [NR];
  logic in_l [NR], in_v [NR], in_r [NR], out_l [NR], out_v [NR], out_r [NR];

  axil_bfm bfm (.clk, .req, .rsp);
  zypr_shell dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .s_dma, .s_dma_tready, .m_dma, .m_dma_tready,
    .s_ext, .s_ext_tready, .m_ext, .m_ext_tready(1'b1), .icap_irq(irq),
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o,
    .icap_avail(avail), .icap_prdone(prdone), .icap_prerror(prerror),
    .rm_axil_req(rm_req), .rm_axil_rsp(rm_rsp),
    .rm_in_tdata(in_d), .rm_in_tkeep(in_k), .rm_in_tlast(in_l), .rm_in_tvalid(in_v), .rm_in_tready(in_r),
    .rm_out_tdata(out_d), .rm_out_tkeep(out_k), .rm_out_tlast(out_l), .rm_out_tvalid(out_v), .rm_out_tready(out_r));
  icape3_model icap (
    .clk, .stall_en(1'b0), .csib, .rdwrb, .i_data(icap_i), .o_data(icap_o),
    .avail, .prdone, .prerror, .wr_count, .wr_sum, .rd_count, .stall_count);

  logic [31:0] key [NR];
  for (genvar r = 0; r < NR; r++) begin : g_rm
    logic [31:0] od; logic [3:0] ok;
    rm_model #(.W(32)) rm (
      .clk, .rst_n, .variant(1'(r % 2)), .axil_req(rm_req[r]), .axil_rsp(rm_rsp[r]),
      .in_tdata(in_d[r][31:0]), .in_tkeep(in_k[r][3:0]), .in_tlast(in_l[r]),
      .in_tvalid(in_v[r]), .in_tready(in_r[r]),
      .out_tdata(od), .out_tkeep(ok), .out_tlast(out_l[r]), .out_tvalid(out_v[r]), .out_tready(out_r[r]));
    assign out_d[r] = 64'(od);
    assign out_k[r] = 8'(ok);
  end
  function automatic logic [31:0] chain(input logic [31:0] x);
    return ((x ^ key[0]) + key[1]) ^ key[2];
  endfunction

  // frame checker on the DMA write channel
  int rx = 0, rx_bad = 0;
  logic [31:0] frame_seed = 32'h1234_5678;
  always @(posedge clk) begin
    m_dma_tready <= ($urandom_range(7) != 0);
    if (m_dma.tvalid && m_dma_tready) begin
      if (m_dma.tdata != chain(gen(rx, frame_seed)) || m_dma.tlast != ((rx + 1) % W == 0)) rx_bad++;
      rx++;
    end
  end

  logic [1:0] resp; logic [31:0] d;
  function automatic logic [31:0] slot(input int s, input int off);
    return BASE + 32'(s) * 32'h1_0000 + 32'(off);
  endfunction

  // stream n words from the DMA; gen(k, seed) with bitstream framing or line tlast
  task automatic dma_stream(input int n, input logic [31:0] seed, input bit bitstream, input bit gaps);
    int k = 0;
    @(negedge clk);
    while (k < n) begin
      logic [31:0] w;
      if (bitstream) w = (k == 0) ? 32'hFFFFFFFF : (k == 1) ? 32'hAA995566 :
                         (k == n - 1) ? 32'h0000000D : gen(k, seed);
      else w = gen(k, seed);
      s_dma.tvalid = !gaps || ($urandom_range(15) != 0);
      s_dma.tdata = w; s_dma.tkeep = '1;
      s_dma.tlast = bitstream ? (k == n - 1) : ((k + 1) % W == 0);
      #0.5;
      if (s_dma.tvalid && s_dma_tready) k++;
      @(negedge clk);
    end
    s_dma = '0;
  endtask

  task automatic route(input int sink, input int src);
    bfm.write(slot(0, 'h40 + 4 * sink), src < 0 ? 32'h8000_0000 : 32'(src), resp);
  endtask
  task automatic commit();
    bfm.write(slot(0, 0), 32'h2, resp);
    do bfm.read(slot(0, 0), d, resp); while (d[1]);
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mib [3] = '{5.430, 2.565, 1.330};
  initial begin
    s_dma = '0; s_ext = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.write(slot(1, 0), 32'h1, resp);
    route(SNK_ICAP, SRC_DMA);
    commit();
    foreach (mib[i]) begin
      automatic int n = int'(mib[i] * 1048576.0 / 4.0);
      automatic logic [31:0] s0 = wr_sum, e = 0, seed = 32'(i) * 32'h0101_0101;
      automatic int w0 = wr_count;
      automatic realtime t0, t1;
      e = swp(32'hFFFFFFFF) + swp(32'hAA995566) + swp(32'h0000000D);
      for (int k = 2; k < n - 1; k++) e += swp(gen(k, seed));
      t0 = $realtime;
      dma_stream(n, seed, 1, 0);
      while (!irq) @(negedge clk);
      t1 = $realtime;
      bfm.read(slot(1, 'h0C), d, resp);
      check(wr_count - w0 == n && wr_sum - s0 == e, $sformatf("%.3f MiB bitstream reached the ICAP intact", mib[i]));
      check(d == 32'(n), $sformatf("%.3f MiB: %0d words in %0d cycles", mib[i], n, d));
      check(t1 - t0 < real'(n) * 5.0 + 200.0, $sformatf("%.3f MiB loaded in %.3f ms", mib[i], (t1 - t0) / 1.0e6));
      $display("%.3f MiB bitstream: %0d words, %0d cycles, %.3f ms at 200 MHz, %.1f MiB/s",
               mib[i], n, d, real'(d) * 5.0e-6, mib[i] / (real'(d) * 5.0e-9));
      bfm.write(slot(1, 'h04), 32'h2, resp);
    end

    // full-HD frame through the three-region chain
    route(SNK_ICAP, -1);
    route(FIRST_REGION, SRC_DMA);
    route(FIRST_REGION + 1, FIRST_REGION);
    route(FIRST_REGION + 2, FIRST_REGION + 1);
    route(SNK_DMA, FIRST_REGION + 2);
    commit();
    for (int r = 0; r < NR; r++) begin
      key[r] = $urandom;
      bfm.write(slot(2 + r, 0), key[r], resp);
    end
    begin
      automatic realtime t0 = $realtime;
      dma_stream(W * H, frame_seed, 0, 1);
      while (rx < W * H && $realtime - t0 < 30ms) @(negedge clk);
      check(rx == W * H && rx_bad == 0, $sformatf("1920x1080 frame: %0d pixels back, %0d wrong", rx, rx_bad));
      check($realtime - t0 < 33.3ms, $sformatf("frame through the chain in %.3f ms", ($realtime - t0) / 1.0e6));
      $display("frame: %.3f ms", ($realtime - t0) / 1.0e6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
