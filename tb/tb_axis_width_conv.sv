// tb_axis_width_conv: self-checking test of the AXI-Stream width converter.
// A 32-to-64 upsizer feeds a 64-to-32 downsizer. Random-length packets (1
// to 9 words, so odd lengths close a wide beat early) go in with random
// valid gaps and come out with random ready. The wide beats are checked
// against packing worked out in the testbench (lanes, tkeep, tlast), the
// narrow output against the input, and a final burst with no gaps checks
// that both converters move one narrow beat per cycle.
module tb_axis_width_conv;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] s_tdata, o_tdata; logic [3:0] s_tkeep, o_tkeep;
  logic s_tlast, s_tvalid, s_tready, o_tlast, o_tvalid, o_tready;
  logic [63:0] w_tdata; logic [7:0] w_tkeep; logic w_tlast, w_tvalid, w_tready;

  axis_width_conv #(.S_W(32), .M_W(64)) up (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tlast, .s_tvalid, .s_tready,
    .m_tdata(w_tdata), .m_tkeep(w_tkeep), .m_tlast(w_tlast), .m_tvalid(w_tvalid), .m_tready(w_tready));
  axis_width_conv #(.S_W(64), .M_W(32)) down (
    .clk, .rst_n, .s_tdata(w_tdata), .s_tkeep(w_tkeep), .s_tlast(w_tlast), .s_tvalid(w_tvalid), .s_tready(w_tready),
    .m_tdata(o_tdata), .m_tkeep(o_tkeep), .m_tlast(o_tlast), .m_tvalid(o_tvalid), .m_tready(o_tready));

  typedef struct { logic [31:0] d; logic last; } beat_t;
  typedef struct { logic [63:0] d; logic [7:0] k; logic last; } wbeat_t;
  beat_t  nq [$];    // narrow beats expected at the output
  wbeat_t wq [$];    // wide beats expected between the converters
  beat_t  pend [$];  // narrow beats not yet packed into wq

  task automatic pack(input beat_t b);
    pend.push_back(b);
    if (pend.size() == 2 || b.last) begin
      wbeat_t w;
      w.d = '0; w.k = '0; w.last = b.last;
      foreach (pend[i]) begin
        w.d[32*i +: 32] = pend[i].d;
        w.k[4*i +: 4]   = 4'hF;
      end
      wq.push_back(w);
      pend.delete();
    end
  endtask

  bit gaps = 1, rgaps = 1;
  int n_out = 0, n_wide = 0, stall_in = 0;

  // source
  int remaining = 0;
  task automatic send_packets(input int npk);
    for (int p = 0; p < npk; p++) begin
      int len = $urandom_range(1, 9);
      for (int i = 0; i < len; i++) begin
        beat_t b;
        b.d = $urandom; b.last = (i == len - 1);
        @(negedge clk);
        while (gaps && $urandom_range(3) == 0) begin
          s_tvalid = 0; @(negedge clk);
        end
        s_tvalid = 1; s_tdata = b.d; s_tkeep = 4'hF; s_tlast = b.last;
        #1;
        while (!s_tready) begin stall_in++; @(negedge clk); #1; end
        nq.push_back(b);
        pack(b);
      end
    end
    @(negedge clk);
    s_tvalid = 0;
  endtask

  // checkers
  always @(posedge clk) begin
    o_tready <= !rgaps || ($urandom_range(3) != 0);
    if (w_tvalid && w_tready) begin
      n_wide++;
      if (wq.size() == 0) begin failures++; $display("FAIL: unexpected wide beat"); end
      else begin
        automatic wbeat_t e = wq.pop_front();
        checks++;
        if (w_tdata != e.d || w_tkeep != e.k || w_tlast != e.last) begin
          failures++; $display("FAIL: wide beat %h/%h/%b expected %h/%h/%b", w_tdata, w_tkeep, w_tlast, e.d, e.k, e.last);
        end
      end
    end
    if (o_tvalid && o_tready) begin
      n_out++;
      if (nq.size() == 0) begin failures++; $display("FAIL: unexpected narrow beat"); end
      else begin
        automatic beat_t e = nq.pop_front();
        checks++;
        if (o_tdata != e.d || o_tkeep != 4'hF || o_tlast != e.last) begin
          failures++; $display("FAIL: narrow beat %h/%b expected %h/%b", o_tdata, o_tlast, e.d, e.last);
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

  int t0, t1, n0;
  initial begin
    s_tvalid = 0; s_tdata = 0; s_tkeep = 0; s_tlast = 0; o_tready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_packets(200);
    repeat (50) @(negedge clk);
    check(nq.size() == 0 && wq.size() == 0, "every beat came out");
    check(n_wide > 0 && n_out > 0, "traffic seen");

    // full-rate burst: 64 narrow beats in one packet, no gaps, sink always ready
    gaps = 0; rgaps = 0;
    repeat (3) @(negedge clk);
    stall_in = 0; n0 = n_out; t0 = $time;
    for (int i = 0; i < 64; i++) begin
      beat_t b;
      b.d = $urandom; b.last = (i == 63);
      @(negedge clk);
      s_tvalid = 1; s_tdata = b.d; s_tkeep = 4'hF; s_tlast = b.last;
      #1;
      while (!s_tready) begin stall_in++; @(negedge clk); #1; end
      nq.push_back(b); pack(b);
    end
    @(negedge clk);
    s_tvalid = 0;
    while (n_out - n0 < 64 && $time - t0 < 2000) @(negedge clk);
    t1 = $time;
    check(stall_in == 0, $sformatf("upsizer takes one beat per cycle (%0d stalls)", stall_in));
    check((t1 - t0) / 10 <= 64 + 4, $sformatf("64 beats through both converters in %0d cycles", (t1 - t0) / 10));
    check(nq.size() == 0, "burst fully delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
