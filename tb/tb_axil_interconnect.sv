// tb_axil_interconnect: self-checking test of the AXI4-Lite MMIO router
// with three memory slaves that stall at random. It writes a distinct value
// into every slave window and checks that each write lands only in its own
// slave, reads every value back through the router, checks DECERR for
// addresses below, between and above the windows (and that those reach no
// slave), and checks that a slave's SLVERR comes back to the master.
module tb_axil_interconnect;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 3;
  localparam logic [31:0] BASE = 32'hA000_0000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  axil_req_t req; axil_rsp_t rsp;
  axil_req_t m_req [NS]; axil_rsp_t m_rsp [NS];
  int writes [NS];
  axil_bfm bfm (.clk, .req, .rsp);
  axil_interconnect #(.N_SLV(NS), .BASE_ADDR(BASE), .SLOT_BITS(16)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp);
  for (genvar i = 0; i < NS; i++) begin : g_s
    axil_mem_slave #(.TAG(32'h1111_1111 * (i + 1))) s (
      .clk, .req(m_req[i]), .rsp(m_rsp[i]), .writes(writes[i]));
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] resp; logic [31:0] d;
  int wr_before [NS];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++)
      for (int r = 0; r < 4; r++) begin
        foreach (wr_before[k]) wr_before[k] = writes[k];
        bfm.write(BASE + 32'(i) * 32'h1_0000 + 32'(4 * r), 32'hBEEF_0000 + 32'(16 * i + r), resp);
        check(resp == RESP_OKAY, "write OKAY");
        for (int k = 0; k < NS; k++)
          check(writes[k] - wr_before[k] == ((k == i) ? 1 : 0), $sformatf("write to slot %0d reached slave %0d only", i, k));
      end
    for (int i = 0; i < NS; i++)
      for (int r = 0; r < 4; r++) begin
        bfm.read(BASE + 32'(i) * 32'h1_0000 + 32'(4 * r), d, resp);
        check(resp == RESP_OKAY && d == ((32'hBEEF_0000 + 32'(16 * i + r)) ^ (32'h1111_1111 * 32'(i + 1))),
              $sformatf("read back slot %0d reg %0d: %h", i, r, d));
      end
    foreach (wr_before[k]) wr_before[k] = writes[k];
    bfm.write(BASE - 4, 32'h1, resp);
    check(resp == RESP_DECERR, "DECERR below the windows");
    bfm.write(BASE + NS * 32'h1_0000, 32'h1, resp);
    check(resp == RESP_DECERR, "DECERR above the windows");
    bfm.read(BASE + NS * 32'h1_0000 + 8, d, resp);
    check(resp == RESP_DECERR, "read DECERR above the windows");
    for (int k = 0; k < NS; k++) check(writes[k] == wr_before[k], "decode errors reach no slave");
    bfm.write(BASE + 32'h1_0FFC, 32'h5, resp);
    check(resp == RESP_SLVERR, "slave error returned on write");
    bfm.read(BASE + 32'h2_0FFC, d, resp);
    check(resp == RESP_SLVERR, "slave error returned on read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
