// tb_pr_region_wrapper: self-checking test of the PR region wrapper.
// Region A wraps a 64-bit behavioural module (each lane XORed with a key
// written over the control port): 32-bit packets of random length go in
// with random gaps and come out transformed, in order, with tlast intact,
// and the module sees half as many (64-bit) beats. Region B is built with
// neither interface: its stream input is accepted and dropped, its output
// stays idle, and control accesses complete with DECERR.
// Tie-off of unused interfaces and 32/64-bit conversion follow the
// framework; how the tie-offs answer is this design's own.
module tb_pr_region_wrapper;
  import zypr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // region A
  axil_req_t req, rm_req; axil_rsp_t rsp, rm_rsp;
  axis_t s_axis, m_axis; logic s_tready, m_tready;
  logic [63:0] i_d, o_d; logic [7:0] i_k, o_k; logic i_l, i_v, i_r, o_l, o_v, o_r;
  axil_bfm bfm (.clk, .req, .rsp);
  pr_region_wrapper #(.RM_AXIS_W(64)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .s_axis, .s_axis_tready(s_tready), .m_axis, .m_axis_tready(m_tready),
    .rm_axil_req(rm_req), .rm_axil_rsp(rm_rsp),
    .rm_in_tdata(i_d), .rm_in_tkeep(i_k), .rm_in_tlast(i_l), .rm_in_tvalid(i_v), .rm_in_tready(i_r),
    .rm_out_tdata(o_d), .rm_out_tkeep(o_k), .rm_out_tlast(o_l), .rm_out_tvalid(o_v), .rm_out_tready(o_r));
  rm_model #(.W(64)) rm (
    .clk, .rst_n, .variant(1'b0), .axil_req(rm_req), .axil_rsp(rm_rsp),
    .in_tdata(i_d), .in_tkeep(i_k), .in_tlast(i_l), .in_tvalid(i_v), .in_tready(i_r),
    .out_tdata(o_d), .out_tkeep(o_k), .out_tlast(o_l), .out_tvalid(o_v), .out_tready(o_r));

  // region B: nothing inside
  axil_req_t req2, rm_req2; axil_rsp_t rsp2;
  axis_t s_axis2, m_axis2; logic s_tready2;
  logic [63:0] i_d2; logic [7:0] i_k2; logic i_l2, i_v2, o_r2;
  axil_bfm bfm2 (.clk, .req(req2), .rsp(rsp2));
  pr_region_wrapper #(.RM_AXIS_W(64), .HAS_AXIS(1'b0), .HAS_AXIL(1'b0)) dut2 (
    .clk, .rst_n, .s_axil_req(req2), .s_axil_rsp(rsp2),
    .s_axis(s_axis2), .s_axis_tready(s_tready2), .m_axis(m_axis2), .m_axis_tready(1'b1),
    .rm_axil_req(rm_req2), .rm_axil_rsp('0),
    .rm_in_tdata(i_d2), .rm_in_tkeep(i_k2), .rm_in_tlast(i_l2), .rm_in_tvalid(i_v2), .rm_in_tready(1'b1),
    .rm_out_tdata('0), .rm_out_tkeep('0), .rm_out_tlast(1'b0), .rm_out_tvalid(1'b1), .rm_out_tready(o_r2));

  typedef struct { logic [31:0] d; logic last; } beat_t;
  beat_t q [$];
  logic [31:0] key = 32'h5A5A_0F0F;
  int n_in = 0, n_out = 0, n_rm = 0, n_b_out = 0;

  always @(posedge clk) begin
    m_tready <= ($urandom_range(3) != 0);
    if (i_v && i_r) n_rm++;
    if (m_axis2.tvalid) n_b_out++;
    if (m_axis.tvalid && m_tready) begin
      n_out++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected beat"); end
      else begin
        automatic beat_t e = q.pop_front();
        checks++;
        if (m_axis.tdata != (e.d ^ key) || m_axis.tlast != e.last || m_axis.tkeep != 4'hF) begin
          failures++; $display("FAIL: out %h/%b expected %h/%b", m_axis.tdata, m_axis.tlast, e.d ^ key, e.last);
        end
      end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] resp; logic [31:0] d;
  int even_words = 0;
  initial begin
    s_axis = '0; s_axis2 = '0; m_tready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.write(32'h0, key, resp);
    bfm.read(32'h0, d, resp);
    check(resp == RESP_OKAY && d == key, "control port reaches the module");
    for (int p = 0; p < 60; p++) begin
      automatic int len = 2 * $urandom_range(1, 6);   // even lengths: no half-filled wide beats
      for (int i = 0; i < len; i++) begin
        beat_t b;
        b.d = $urandom; b.last = (i == len - 1);
        @(negedge clk);
        while ($urandom_range(3) == 0) begin s_axis.tvalid = 0; @(negedge clk); end
        s_axis.tvalid = 1; s_axis.tdata = b.d; s_axis.tkeep = 4'hF; s_axis.tlast = b.last;
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
        q.push_back(b);
        n_in++;
      end
    end
    @(negedge clk);
    s_axis.tvalid = 0;
    repeat (100) @(negedge clk);
    check(q.size() == 0 && n_out == n_in, $sformatf("all %0d words returned (%0d)", n_in, n_out));
    check(n_rm * 2 == n_in, $sformatf("module saw %0d 64-bit beats for %0d words", n_rm, n_in));
    bfm.read(32'h4, d, resp);
    check(d == 32'(n_rm), "module beat counter over the control port");

    // region B
    s_axis2.tvalid = 1; s_axis2.tdata = 32'h1234; s_axis2.tkeep = 4'hF; s_axis2.tlast = 1;
    @(negedge clk); #1;
    check(s_tready2 == 1'b1, "unused stream input accepted");
    @(negedge clk);
    s_axis2.tvalid = 0;
    repeat (5) @(negedge clk);
    check(n_b_out == 0 && !i_v2, "unused stream output idle, nothing reaches the module");
    bfm2.write(32'h0, 32'h1, resp);
    check(resp == RESP_DECERR, "unused control port answers DECERR on write");
    bfm2.read(32'h0, d, resp);
    check(resp == RESP_DECERR, "unused control port answers DECERR on read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
