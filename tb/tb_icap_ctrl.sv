// tb_icap_ctrl: self-checking test of the ICAP partial-reconfiguration
// controller against a behavioural ICAPE3 (and a second controller built for
// ICAPE2). It streams a synthetic partial bitstream (dummy word, sync word,
// payload, DESYNC) and checks the words and checksum that reach the port,
// the one-word-per-cycle rate through the WORDS/CYCLES registers, DONE and
// the interrupt, AVAIL back-pressure, PRERROR on a bitstream without sync,
// readback ordering and tlast under random sink back-pressure, and
// tlast-based completion of the ICAPE2 variant.
// The rate, the interrupt on completion, the ICAPE3 status signals and
// readback follow the framework; the register layout, the bit reversal and
// the DONE rules it checks are this design's own. The test also checks that
// the ICAPE2 interrupt never rises before the port has taken the last word.
module tb_icap_ctrl;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset before the first clock
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] swp(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) r[8*b+k] = w[8*b+7-k];
    return r;
  endfunction

  // ---------------- DUT 1: ICAPE3
  axil_req_t req; axil_rsp_t rsp;
  axis_t s_axis, m_axis; logic s_tready, m_tready, irq;
  logic csib, rdwrb, avail, prdone, prerror, stall_en;
  logic [31:0] icap_i, icap_o, wr_sum;
  int wr_count, rd_count, stall_count;

  axil_bfm bfm (.clk, .req, .rsp);
  icap_ctrl #(.ICAP_TYPE(3)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .irq,
    .s_axis, .s_axis_tready(s_tready), .m_axis, .m_axis_tready(m_tready),
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o,
    .icap_avail(avail), .icap_prdone(prdone), .icap_prerror(prerror));
  icape3_model #(.STALL_PCT(30)) icap (
    .clk, .stall_en, .csib, .rdwrb, .i_data(icap_i), .o_data(icap_o),
    .avail, .prdone, .prerror, .wr_count, .wr_sum, .rd_count, .stall_count);

  // ---------------- DUT 2: ICAPE2 (no status outputs used)
  axil_req_t req2; axil_rsp_t rsp2;
  axis_t s_axis2, m_axis2; logic s_tready2, irq2;
  logic csib2, rdwrb2, avail2, prdone2, prerror2;
  logic [31:0] icap_i2, icap_o2, wr_sum2;
  int wr_count2, rd_count2, stall_count2;
  axil_bfm bfm2 (.clk, .req(req2), .rsp(rsp2));
  icap_ctrl #(.ICAP_TYPE(2)) dut2 (
    .clk, .rst_n, .s_axil_req(req2), .s_axil_rsp(rsp2), .irq(irq2),
    .s_axis(s_axis2), .s_axis_tready(s_tready2), .m_axis(m_axis2), .m_axis_tready(1'b1),
    .icap_csib(csib2), .icap_rdwrb(rdwrb2), .icap_i(icap_i2), .icap_o(icap_o2),
    .icap_avail(1'b0), .icap_prdone(1'b0), .icap_prerror(1'b0));
  icape3_model icap2 (
    .clk, .stall_en(1'b0), .csib(csib2), .rdwrb(rdwrb2), .i_data(icap_i2), .o_data(icap_o2),
    .avail(avail2), .prdone(prdone2), .prerror(prerror2), .wr_count(wr_count2),
    .wr_sum(wr_sum2), .rd_count(rd_count2), .stall_count(stall_count2));

  // words the ICAPE2 port had taken when its interrupt first rose
  int cnt_at_irq2 = -1;
  always @(negedge clk) if (irq2 && cnt_at_irq2 < 0) cnt_at_irq2 = wr_count2;

  // bitstream image: dummy, sync, payload, desync
  logic [31:0] bs [$];
  logic [31:0] exp_sum;
  task automatic make_bitstream(input int n, input bit with_sync);
    bs.delete();
    bs.push_back(32'hFFFFFFFF);
    if (with_sync) bs.push_back(32'hAA995566);
    for (int k = 0; k < n; k++) bs.push_back($urandom | 32'h1);
    bs.push_back(32'h0000000D);
    exp_sum = '0;
    foreach (bs[k]) exp_sum += swp(bs[k]);
  endtask

  task automatic send(ref axis_t s, ref logic rdy, input bit gaps);
    int k = 0;
    @(negedge clk);
    while (k < bs.size()) begin
      s.tvalid = !gaps || ($urandom_range(3) != 0);
      s.tdata = bs[k]; s.tkeep = '1; s.tlast = (k == bs.size() - 1);
      #1;
      if (s.tvalid && rdy) k++;
      @(negedge clk);
    end
    s = '0;
  endtask

  logic [1:0] resp; logic [31:0] d;
  int w0, rd_seen; bit rd_order_ok, rd_last_ok;

  // readback sink with random ready; checks data order and tlast
  always @(posedge clk) begin
    if (m_axis.tvalid && m_tready) begin
      if (m_axis.tdata != 32'hC0DE0000 + 32'(rd_seen)) rd_order_ok = 0;
      if (m_axis.tlast != (rd_seen == 19)) rd_last_ok = 0;
      rd_seen <= rd_seen + 1;
    end
  end
  always @(negedge clk) m_tready <= ($urandom_range(2) != 0);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_axis = '0; s_axis2 = '0; stall_en = 0; rd_seen = 0; rd_order_ok = 1; rd_last_ok = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // --- 1: full-rate bitstream write
    bfm.read(32'h18, d, resp);
    check(d == 32'd3, "INFO reports ICAPE3");
    bfm.write(32'h00, 32'h1, resp);            // IRQ_EN
    make_bitstream(200, 1);
    w0 = wr_count;
    send(s_axis, s_tready, 0);
    repeat (10) @(negedge clk);
    check(wr_count - w0 == bs.size(), $sformatf("port saw %0d words, expected %0d", wr_count - w0, bs.size()));
    check(wr_sum == exp_sum, "checksum of bit-swapped words at the port");
    bfm.read(32'h08, d, resp);
    check(d == bs.size(), "WORDS register");
    bfm.read(32'h0C, d, resp);
    check(d == bs.size(), $sformatf("one word per cycle: CYCLES=%0d for %0d words", d, bs.size()));
    bfm.read(32'h04, d, resp);
    check(d[1] && !d[2], "DONE set after PRDONE, no ERROR");
    check(irq, "interrupt raised on completion");
    bfm.write(32'h04, 32'h2, resp);            // W1C DONE
    bfm.read(32'h04, d, resp);
    check(!d[1] && !irq, "DONE cleared by write-1-to-clear");

    // --- 2: AVAIL back-pressure
    stall_en = 1;
    make_bitstream(300, 1);
    exp_sum = exp_sum + wr_sum;
    w0 = wr_count;
    send(s_axis, s_tready, 1);
    stall_en = 0;
    repeat (10) @(negedge clk);
    check(wr_count - w0 == bs.size(), "all words written under AVAIL stalls");
    check(wr_sum == exp_sum, "checksum under AVAIL stalls");
    check(stall_count > 0, "AVAIL stalls happened");
    bfm.read(32'h0C, d, resp);
    check(d > bs.size(), "CYCLES counts stall cycles");
    bfm.read(32'h04, d, resp);
    check(d[1], "DONE after stalled bitstream");
    bfm.write(32'h04, 32'h2, resp);

    // --- 3: bitstream without sync -> PRERROR
    make_bitstream(10, 0);
    send(s_axis, s_tready, 0);
    repeat (5) @(negedge clk);
    bfm.read(32'h04, d, resp);
    check(d[2] && !d[1], "ERROR set on PRERROR");
    check(irq, "interrupt raised on error");
    bfm.write(32'h00, 32'h5, resp);            // CLEAR, keep IRQ_EN
    bfm.read(32'h04, d, resp);
    check(d[2:1] == 2'b00, "CLEAR clears sticky flags");

    // --- 4: readback of 20 words
    bfm.write(32'h10, 32'd20, resp);
    bfm.write(32'h00, 32'h3, resp);            // RD_START
    repeat (200) @(negedge clk);
    check(rd_seen == 20, $sformatf("readback returned %0d words", rd_seen));
    check(rd_order_ok, "readback data in order");
    check(rd_last_ok, "readback tlast on last word");
    bfm.read(32'h14, d, resp);
    check(d == 20, "RD_COUNT register");
    bfm.read(32'h04, d, resp);
    check(d[7] && !d[3], "RD_DONE set, RD_BUSY clear");
    check(rdwrb == 0 && csib == 1, "port back in write mode, deselected");

    // --- 5: ICAPE2 variant, completion on tlast
    bfm2.write(32'h00, 32'h1, resp);
    make_bitstream(50, 1);
    send(s_axis2, s_tready2, 1);
    repeat (5) @(negedge clk);
    check(wr_count2 == bs.size() && wr_sum2 == exp_sum, $sformatf("ICAPE2 port received bitstream %0d/%0d %h/%h", wr_count2, bs.size(), wr_sum2, exp_sum));
    bfm2.read(32'h04, d, resp);
    check(d[1], "ICAPE2 DONE on tlast");
    check(irq2, "ICAPE2 interrupt");
    check(cnt_at_irq2 == bs.size(), $sformatf("ICAPE2 interrupt only after the port took the last word (%0d of %0d)", cnt_at_irq2, bs.size()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
