// tb_zypr_lite: the shell in a small control-only arrangement on the older
// device family: two PR regions whose modules have an AXI4-Lite port and no
// stream (REGION_HAS_AXIS = 0), and an ICAPE2 configuration port clocked at
// 100 MHz (10 ns).
//
// It checks that
//   - a partial bitstream routed from the DMA to the ICAP reaches the port
//     intact at one word per cycle (about 381 MiB/s at 100 MHz), and that
//     with the ICAPE2, which has no status outputs, DONE and the interrupt
//     follow the tlast word;
//   - INFO reports the ICAPE2;
//   - each region's control port is reached in its own address window;
//   - a stream routed by mistake into a region without a stream interface is
//     swallowed by the tie-off, never reaches the module and never comes
//     back;
//   - an address above the last window is answered with DECERR.
// Each of these mechanisms is counted and must occur at least once. The
// region modules are AXI4-Lite memories; the ICAP is the behavioural port
// model, whose status outputs the ICAPE2 build ignores.
module tb_zypr_lite;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NR = 2;
  localparam logic [31:0] BASE = 32'hA000_0000;
  localparam int BS_WORDS = 2000;

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
  logic s_dma_tready, s_ext_tready, irq;
  logic csib, rdwrb, avail, prdone, prerror;
  logic [31:0] icap_i, icap_o, wr_sum;
  int wr_count, rd_count, stall_count;
  axil_req_t rm_req [NR]; axil_rsp_t rm_rsp [NR];
  logic [63:0] in_d [NR], out_d [NR];
  logic [7:0]  in_k [NR], out_k [NR];
  logic in_l [NR], in_v [NR], in_r [NR], out_l [NR], out_v [NR], out_r [NR];
  int rm_writes [NR];

  axil_bfm bfm (.clk, .req, .rsp);
  zypr_shell #(.N_REGIONS(NR), .REGION_HAS_AXIS(4'h0), .ICAP_TYPE(2)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .s_dma, .s_dma_tready, .m_dma, .m_dma_tready(1'b1),
    .s_ext, .s_ext_tready, .m_ext, .m_ext_tready(1'b1), .icap_irq(irq),
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o,
    .icap_avail(avail), .icap_prdone(prdone), .icap_prerror(prerror),
    .rm_axil_req(rm_req), .rm_axil_rsp(rm_rsp),
    .rm_in_tdata(in_d), .rm_in_tkeep(in_k), .rm_in_tlast(in_l), .rm_in_tvalid(in_v), .rm_in_tready(in_r),
    .rm_out_tdata(out_d), .rm_out_tkeep(out_k), .rm_out_tlast(out_l), .rm_out_tvalid(out_v), .rm_out_tready(out_r));
  icape3_model icap (
    .clk, .stall_en(1'b0), .csib, .rdwrb, .i_data(icap_i), .o_data(icap_o),
    .avail, .prdone, .prerror, .wr_count, .wr_sum, .rd_count, .stall_count);

  for (genvar r = 0; r < NR; r++) begin : g_rm
    axil_mem_slave #(.TAG(32'h5100_0000 + 32'(r))) m (
      .clk, .req(rm_req[r]), .rsp(rm_rsp[r]), .writes(rm_writes[r]));
    assign out_d[r] = '0;
    assign out_k[r] = '0;
    assign out_l[r] = 1'b0;
    assign out_v[r] = 1'b0;
    assign in_r[r]  = 1'b1;
  end

  // ----------------------------------------------------- mechanism counters
  int n_pr_load = 0, n_rm_mmio = 0, n_discard = 0, n_decerr = 0;
  int leaked_in = 0, leaked_out = 0;
  always @(posedge clk) begin
    for (int r = 0; r < NR; r++) if (in_v[r]) leaked_in++;
    if (m_dma.tvalid || m_ext.tvalid) leaked_out++;
  end

  // ------------------------------------------------------------ helpers
  logic [1:0] resp; logic [31:0] d;
  function automatic logic [31:0] slot(input int s, input int off);
    return BASE + 32'(s) * 32'h1_0000 + 32'(off);
  endfunction

  task automatic mmio_wr(input logic [31:0] a, input logic [31:0] v);
    logic [1:0] rs;
    bfm.write(a, v, rs);
    if (rs != RESP_OKAY) begin failures++; $display("FAIL: write %h response %0d", a, rs); end
  endtask

  task automatic set_route(input int sink, input int src);
    logic [1:0] rs; logic [31:0] v;
    mmio_wr(slot(0, 'h40 + 4 * sink), src < 0 ? 32'h8000_0000 : 32'(src));
    mmio_wr(slot(0, 0), 32'h2);
    do bfm.read(slot(0, 0), v, rs); while (v[1]);
  endtask

  // DMA stream source; returns the number of cycles from first to last beat
  task automatic send_dma(input logic [31:0] w [$], output int cycles);
    int k = 0, n = 0;
    @(negedge clk);
    while (k < w.size()) begin
      s_dma.tvalid = 1'b1;
      s_dma.tdata = w[k]; s_dma.tkeep = '1;
      s_dma.tlast = (k == w.size() - 1);
      #1;
      if (s_dma_tready) k++;
      n++;
      @(negedge clk);
      if (n > 4 * w.size()) break;
    end
    s_dma = '0;
    cycles = n;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_dma = '0; s_ext = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // ---- ICAPE2 identified
    bfm.read(slot(1, 'h18), d, resp);
    check(resp == RESP_OKAY && d == 32'd2, "INFO reports ICAPE2");

    // ---- partial bitstream over DMA into the ICAPE2
    begin
      logic [31:0] bs [$];
      automatic logic [31:0] exp_sum = 0;
      int w0, cyc, n;
      realtime t0;
      bs.push_back(32'hFFFFFFFF);
      bs.push_back(32'hAA995566);
      for (int k = 0; k < BS_WORDS; k++) bs.push_back($urandom);
      bs.push_back(32'h0000000D);
      foreach (bs[k]) exp_sum += swp(bs[k]);
      mmio_wr(slot(1, 'h00), 32'h1);                 // IRQ_EN
      set_route(SNK_ICAP, SRC_DMA);
      w0 = wr_count;
      t0 = $realtime;
      send_dma(bs, cyc);
      n = 0;
      while (!irq && n < 100) begin @(negedge clk); n++; end
      check(irq, "interrupt after the tlast word");
      check(wr_count - w0 == bs.size(), $sformatf("ICAPE2 port took %0d of %0d words", wr_count - w0, bs.size()));
      check(wr_sum == exp_sum, "bit-swapped words reached the ICAPE2 intact");
      check(cyc == bs.size(), $sformatf("one word per cycle at the stream (%0d cycles)", cyc));
      bfm.read(slot(1, 'h0C), d, resp);
      check(d == bs.size(), $sformatf("CYCLES = %0d for %0d words", d, bs.size()));
      bfm.read(slot(1, 'h04), d, resp);
      check(d[1] && !d[2], "DONE without ERROR on the ICAPE2");
      $display("ICAPE2 load: %0d words in %0.1f us, %0.1f MiB/s at 100 MHz",
               bs.size(), (realtime'($realtime) - t0) / 1000.0,
               (bs.size() * 4.0) / ((realtime'($realtime) - t0) * 1.0e-9) / 1048576.0);
      mmio_wr(slot(1, 'h04), 32'h2);
      bfm.read(slot(1, 'h04), d, resp);
      check(!d[1] && !irq, "DONE and interrupt cleared");
      if (irq == 0 && wr_sum == exp_sum) n_pr_load++;
    end

    // ---- each region's control port in its own window
    for (int r = 0; r < NR; r++) begin
      automatic logic [31:0] v = $urandom;
      automatic int wb = rm_writes[r];
      mmio_wr(slot(2 + r, 'h10), v);
      bfm.read(slot(2 + r, 'h10), d, resp);
      check(resp == RESP_OKAY && d == (v ^ (32'h5100_0000 + 32'(r))),
            $sformatf("region %0d control register", r));
      check(rm_writes[r] == wb + 1, $sformatf("write reached region %0d only", r));
      if (d == (v ^ (32'h5100_0000 + 32'(r)))) n_rm_mmio++;
    end

    // ---- stream into a region without a stream interface
    begin
      logic [31:0] w [$];
      int cyc;
      for (int k = 0; k < 50; k++) w.push_back($urandom);
      set_route(SNK_ICAP, -1);
      set_route(FIRST_REGION + 0, SRC_DMA);
      set_route(SNK_DMA, FIRST_REGION + 0);
      send_dma(w, cyc);
      repeat (10) @(negedge clk);
      check(cyc == w.size(), "tie-off accepted every beat at full rate");
      check(leaked_in == 0, "nothing reached the module without a stream port");
      check(leaked_out == 0, "nothing came back out of the tied-off region");
      if (cyc == w.size() && leaked_in == 0) n_discard++;
    end

    // ---- above the last window
    bfm.read(slot(2 + NR, 0), d, resp);
    check(resp == RESP_DECERR, "read above the last window gets DECERR");
    bfm.write(slot(2 + NR, 0), 32'h1234, resp);
    check(resp == RESP_DECERR, "write above the last window gets DECERR");
    if (resp == RESP_DECERR) n_decerr++;

    $display("mechanisms: pr_load=%0d rm_mmio=%0d discard=%0d decerr=%0d",
             n_pr_load, n_rm_mmio, n_discard, n_decerr);
    check(n_pr_load > 0, "bitstream load happened");
    check(n_rm_mmio == NR, "control access to every region happened");
    check(n_discard > 0, "stream tie-off happened");
    check(n_decerr > 0, "decode error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
