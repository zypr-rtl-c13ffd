// tb_zypr_shell: end-to-end test of the PR shell, following the image-
// processing example: three PR regions chained between the shared DMA
// channels, region 1 holding a 64-bit module behind width converters.
//
// The processor side is played by an AXI4-Lite master, the DMA channels
// and an external stream peripheral by stream drivers and collectors, the
// ICAP by a behavioural ICAPE3 and each loaded module by a small keyed
// XOR/ADD stage whose variant changes when a bitstream for its region has
// been loaded. The test
//   - loads a partial bitstream for every region over DMA into the ICAP
//     (one with random AVAIL stalls) and checks words, checksum, the
//     one-word-per-cycle rate and the completion interrupt;
//   - chains DMA -> region 0 -> region 1 -> region 2 -> DMA and checks a
//     frame of lines against the composition of the three functions;
//   - switches a region's mode (a control-register write) and re-checks;
//   - issues a routing commit while packets are in flight (deferred commit);
//   - reconfigures region 0 over DMA while region 2 keeps processing a
//     stream from the external input to the external output;
//   - reads configuration data back out of the ICAP into the DMA;
//   - sends a bitstream without sync (PR error) and touches an unmapped
//     address (decode error).
// Every one of these must happen at least once.
module tb_zypr_shell;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NR = 3;
  localparam logic [31:0] BASE = 32'hA000_0000;
  localparam int BS_WORDS = 3000;            // payload words per bitstream
  localparam int LINE = 64, LINES = 12;      // frame size for the chain test
  localparam int unsigned RW [4] = '{32, 64, 32, 32};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

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

  // ------------------------------------------------------------- harness
  axil_req_t req; axil_rsp_t rsp;
  axis_t s_dma, m_dma, s_ext, m_ext;
  logic s_dma_tready, m_dma_tready, s_ext_tready, m_ext_tready, irq;
  logic csib, rdwrb, avail, prdone, prerror, stall_en;
  logic [31:0] icap_i, icap_o, wr_sum;
  int wr_count, rd_count, stall_count;
  axil_req_t rm_req [NR]; axil_rsp_t rm_rsp [NR];
  logic [63:0] in_d [NR], out_d [NR];
  logic [7:0]  in_k [NR], out_k [NR];
  logic in_l [NR], in_v [NR], in_r [NR], out_l [NR], out_v [NR], out_r [NR];
  logic variant [NR];

  axil_bfm bfm (.clk, .req, .rsp);
  zypr_shell #(.N_REGIONS(NR), .REGION_AXIS_W(RW)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .s_dma, .s_dma_tready, .m_dma, .m_dma_tready,
    .s_ext, .s_ext_tready, .m_ext, .m_ext_tready, .icap_irq(irq),
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o,
    .icap_avail(avail), .icap_prdone(prdone), .icap_prerror(prerror),
    .rm_axil_req(rm_req), .rm_axil_rsp(rm_rsp),
    .rm_in_tdata(in_d), .rm_in_tkeep(in_k), .rm_in_tlast(in_l), .rm_in_tvalid(in_v), .rm_in_tready(in_r),
    .rm_out_tdata(out_d), .rm_out_tkeep(out_k), .rm_out_tlast(out_l), .rm_out_tvalid(out_v), .rm_out_tready(out_r));
  icape3_model #(.STALL_PCT(25)) icap (
    .clk, .stall_en, .csib, .rdwrb, .i_data(icap_i), .o_data(icap_o),
    .avail, .prdone, .prerror, .wr_count, .wr_sum, .rd_count, .stall_count);

  for (genvar r = 0; r < NR; r++) begin : g_rm
    localparam int W = RW[r];
    logic [W-1:0] od;
    logic [W/8-1:0] ok;
    rm_model #(.W(W)) rm (
      .clk, .rst_n, .variant(variant[r]), .axil_req(rm_req[r]), .axil_rsp(rm_rsp[r]),
      .in_tdata(in_d[r][W-1:0]), .in_tkeep(in_k[r][W/8-1:0]), .in_tlast(in_l[r]),
      .in_tvalid(in_v[r]), .in_tready(in_r[r]),
      .out_tdata(od), .out_tkeep(ok), .out_tlast(out_l[r]), .out_tvalid(out_v[r]), .out_tready(out_r[r]));
    assign out_d[r] = 64'(od);
    assign out_k[r] = 8'(ok);
  end

  // ----------------------------------------------------- mechanism counters
  int n_pr_load = 0, n_chain_frame = 0, n_mode_switch = 0, n_deferred = 0;
  int n_concurrent = 0, n_readback = 0, n_prerror = 0, n_decerr = 0, n_ext = 0;
  int n_w64 = 0;
  always @(posedge clk) if (in_v[1] && in_r[1]) n_w64++;

  // ----------------------------------------------------- stream endpoints
  typedef struct { logic [31:0] d; logic last; } beat_t;
  beat_t rx_dma [$], rx_ext [$];
  bit hold_dma = 0, rgaps = 1;
  always @(posedge clk) begin
    m_dma_tready <= !hold_dma && (!rgaps || $urandom_range(3) != 0);
    m_ext_tready <= (!rgaps || $urandom_range(3) != 0);
    if (m_dma.tvalid && m_dma_tready) rx_dma.push_back('{m_dma.tdata, m_dma.tlast});
    if (m_ext.tvalid && m_ext_tready) rx_ext.push_back('{m_ext.tdata, m_ext.tlast});
  end

  task automatic send_dma(input logic [31:0] w [$], input int pkt, input bit gaps);
    int k = 0;
    @(negedge clk);
    while (k < w.size()) begin
      s_dma.tvalid = !gaps || ($urandom_range(3) != 0);
      s_dma.tdata = w[k]; s_dma.tkeep = '1;
      s_dma.tlast = ((k + 1) % pkt == 0) || (k == w.size() - 1);
      #1;
      if (s_dma.tvalid && s_dma_tready) k++;
      @(negedge clk);
    end
    s_dma = '0;
  endtask

  task automatic send_ext(input logic [31:0] w [$], input int pkt);
    int k = 0;
    @(negedge clk);
    while (k < w.size()) begin
      s_ext.tvalid = ($urandom_range(3) != 0);
      s_ext.tdata = w[k]; s_ext.tkeep = '1;
      s_ext.tlast = ((k + 1) % pkt == 0);
      #1;
      if (s_ext.tvalid && s_ext_tready) k++;
      @(negedge clk);
    end
    s_ext = '0;
  endtask

  // ------------------------------------------------------------ MMIO
  logic [1:0] resp; logic [31:0] d;
  function automatic logic [31:0] slot(input int s, input int off);
    return BASE + 32'(s) * 32'h1_0000 + 32'(off);
  endfunction

  task automatic mmio_wr(input logic [31:0] a, input logic [31:0] v);
    logic [1:0] rs;
    bfm.write(a, v, rs);
    if (rs != RESP_OKAY) begin failures++; $display("FAIL: write %h response %0d", a, rs); end
  endtask

  task automatic set_routes(input int sink [$], input int src [$]);
    logic [1:0] rs; logic [31:0] v;
    foreach (sink[i]) mmio_wr(slot(0, 'h40 + 4 * sink[i]), src[i] < 0 ? 32'h8000_0000 : 32'(src[i]));
    mmio_wr(slot(0, 0), 32'h2);
    do bfm.read(slot(0, 0), v, rs); while (v[1]);
  endtask

  // ------------------------------------------------------------ functions
  logic [31:0] key [NR];
  function automatic logic [31:0] f(input int r, input logic [31:0] x);
    return variant[r] ? x + key[r] : x ^ key[r];
  endfunction

  task automatic wait_irq(input int max_cycles);
    int n = 0;
    while (!irq && n < max_cycles) begin @(negedge clk); n++; end
    check(irq, "PR controller interrupt");
  endtask

  // load a bitstream for region r; the module's variant changes when done
  task automatic pr_load(input int r, input bit var_, input bit stalls);
    logic [31:0] bs [$];
    logic [31:0] s0, exp_sum = 0;
    int w0;
    bs.push_back(32'hFFFFFFFF);
    bs.push_back(32'hAA995566);
    bs.push_back({16'hB175, 8'(r), 8'(var_)});
    for (int k = 0; k < BS_WORDS; k++) bs.push_back($urandom);
    bs.push_back(32'h0000000D);
    foreach (bs[k]) exp_sum += swp(bs[k]);
    w0 = wr_count; s0 = wr_sum;
    stall_en = stalls;
    send_dma(bs, bs.size(), 0);
    wait_irq(BS_WORDS * 4);
    stall_en = 0;
    bfm.read(slot(1, 'h08), d, resp);
    check(d == bs.size(), "WORDS equals bitstream length");
    bfm.read(slot(1, 'h0C), d, resp);
    if (!stalls) check(d == bs.size(), $sformatf("bitstream at one word per cycle (%0d cycles, %0d words)", d, bs.size()));
    else check(d > bs.size() && stall_count > 0, "AVAIL stalls slowed the bitstream");
    check(wr_count - w0 == bs.size() && wr_sum - s0 == exp_sum, "ICAP received the bitstream intact");
    bfm.read(slot(1, 'h04), d, resp);
    check(d[1] && !d[2], "DONE without ERROR");
    mmio_wr(slot(1, 'h04), 32'h2);
    variant[r] = var_;
    n_pr_load++;
  endtask

  // run one frame through the chain and check it
  task automatic chain_frame(input bit deferred_commit);
    logic [31:0] w [$];
    int n;
    bit ok = 1;
    rx_dma.delete();
    for (int k = 0; k < LINE * LINES; k++) w.push_back($urandom);
    fork
      send_dma(w, LINE, 1);
      if (deferred_commit) begin
        logic [1:0] rs; logic [31:0] v;
        repeat (200) @(negedge clk);
        hold_dma = 1;
        repeat (40) @(negedge clk);
        bfm.write(slot(0, 0), 32'h2, rs);       // re-commit the same table
        bfm.read(slot(0, 0), v, rs);
        if (v[1]) n_deferred++;
        check(v[1], "commit pending while packets are in flight");
        hold_dma = 0;
      end
    join
    n = 0;
    while (rx_dma.size() < w.size() && n < 20 * w.size()) begin @(negedge clk); n++; end
    check(rx_dma.size() == w.size(), $sformatf("frame returned %0d of %0d words", rx_dma.size(), w.size()));
    foreach (w[k]) if (k < rx_dma.size()) begin
      if (rx_dma[k].d != f(2, f(1, f(0, w[k])))) ok = 0;
      if (rx_dma[k].last != ((k + 1) % LINE == 0)) ok = 0;
    end
    check(ok, "frame equals region2(region1(region0(x))) with line tlast");
    if (ok) n_chain_frame++;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int w64_0;
  initial begin
    s_dma = '0; s_ext = '0; stall_en = 0;
    foreach (variant[r]) begin variant[r] = 0; key[r] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    bfm.read(slot(1, 'h18), d, resp);
    check(resp == RESP_OKAY && d == 3, "PR controller reachable, ICAPE3");
    bfm.read(slot(NR + 2, 0), d, resp);
    check(resp == RESP_DECERR, "unmapped address answers DECERR");
    if (resp == RESP_DECERR) n_decerr++;
    mmio_wr(slot(1, 'h00), 32'h1);            // interrupt enable

    // initial configuration: one bitstream per region
    set_routes('{SNK_ICAP}, '{SRC_DMA});
    pr_load(0, 0, 0);
    pr_load(1, 0, 1);
    pr_load(2, 1, 0);

    // chain DMA -> R0 -> R1 -> R2 -> DMA, set the modes
    set_routes('{SNK_ICAP, FIRST_REGION, FIRST_REGION + 1, FIRST_REGION + 2, SNK_DMA},
               '{-1, SRC_DMA, FIRST_REGION, FIRST_REGION + 1, FIRST_REGION + 2});
    for (int r = 0; r < NR; r++) begin
      key[r] = $urandom;
      mmio_wr(slot(2 + r, 0), key[r]);
    end
    w64_0 = n_w64;
    chain_frame(0);
    check(n_w64 - w64_0 == LINE * LINES / 2, "region 1 saw 64-bit beats");

    // mode switch: new register setting in region 1
    key[1] = $urandom;
    mmio_wr(slot(3, 0), key[1]);
    bfm.read(slot(3, 0), d, resp);
    check(d == key[1], "mode register reads back");
    n_mode_switch++;
    chain_frame(1);

    // reconfigure region 0 while region 2 processes the external stream
    set_routes('{SNK_DMA, FIRST_REGION, FIRST_REGION + 1, SNK_ICAP, SNK_EXT, FIRST_REGION + 2},
               '{-1, -1, -1, SRC_DMA, FIRST_REGION + 2, SRC_EXT});
    begin
      logic [31:0] w [$];
      automatic bit ok = 1;
      automatic int n = 0;
      rx_ext.delete();
      for (int k = 0; k < 2048; k++) w.push_back($urandom);
      fork
        send_ext(w, 256);
        pr_load(0, 1, 0);
      join
      while (rx_ext.size() < w.size() && n < 20000) begin @(negedge clk); n++; end
      check(rx_ext.size() == w.size(), "external stream fully processed");
      foreach (w[k]) if (k < rx_ext.size() && (rx_ext[k].d != f(2, w[k]) || rx_ext[k].last != ((k + 1) % 256 == 0))) ok = 0;
      check(ok, "external stream through region 2 correct during reconfiguration");
      if (ok) begin n_ext++; n_concurrent++; end
    end

    // back to the chain with the new module in region 0
    set_routes('{SNK_ICAP, SNK_EXT, FIRST_REGION, FIRST_REGION + 1, FIRST_REGION + 2, SNK_DMA},
               '{-1, -1, SRC_DMA, FIRST_REGION, FIRST_REGION + 1, FIRST_REGION + 2});
    chain_frame(0);

    // readback into the DMA
    set_routes('{SNK_DMA, FIRST_REGION}, '{SRC_ICAP_RD, -1});
    rx_dma.delete();
    mmio_wr(slot(1, 'h10), 32'd16);
    mmio_wr(slot(1, 'h00), 32'h3);
    begin
      automatic int n = 0; automatic bit ok = 1;
      while (rx_dma.size() < 16 && n < 1000) begin @(negedge clk); n++; end
      check(rx_dma.size() == 16, "readback returned 16 words");
      foreach (rx_dma[k]) if (rx_dma[k].d != 32'hC0DE0000 + 32'(k) || rx_dma[k].last != (k == 15)) ok = 0;
      check(ok, "readback data and tlast");
      if (ok) n_readback++;
    end
    mmio_wr(slot(1, 'h04), 32'h80);

    // bitstream without sync word
    set_routes('{SNK_DMA, SNK_ICAP}, '{-1, SRC_DMA});
    begin
      logic [31:0] bad [$];
      bad.push_back(32'hFFFFFFFF);
      for (int k = 0; k < 20; k++) bad.push_back($urandom);
      bad.push_back(32'h0000000D);
      send_dma(bad, bad.size(), 0);
      wait_irq(200);
      bfm.read(slot(1, 'h04), d, resp);
      check(d[2], "ERROR reported for a corrupt bitstream");
      if (d[2]) n_prerror++;
    end

    // every mechanism happened
    check(n_pr_load >= 4, $sformatf("partial bitstream loads: %0d", n_pr_load));
    check(stall_count > 0, $sformatf("ICAP AVAIL stalls: %0d", stall_count));
    check(n_chain_frame >= 3, $sformatf("chained frames: %0d", n_chain_frame));
    check(n_w64 > 0, $sformatf("64-bit beats through width converters: %0d", n_w64));
    check(n_mode_switch > 0, "mode switch");
    check(n_deferred > 0, $sformatf("deferred commits: %0d", n_deferred));
    check(n_concurrent > 0 && n_ext > 0, "reconfiguration while another region streams from external IO");
    check(n_readback > 0, "ICAP readback");
    check(n_prerror > 0, "PR error");
    check(n_decerr > 0, "MMIO decode error");
    $display("mechanisms: loads=%0d stalls=%0d frames=%0d w64=%0d modes=%0d deferred=%0d concurrent=%0d readback=%0d prerror=%0d decerr=%0d",
             n_pr_load, stall_count, n_chain_frame, n_w64, n_mode_switch, n_deferred, n_concurrent, n_readback, n_prerror, n_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
