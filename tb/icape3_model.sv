// icape3_model: behavioural model of the FPGA's ICAPE3 configuration port
// (the ICAPE2 behaves the same on CSIB/RDWRB/I/O and lacks the status
// outputs). Simulation only; the real port is a hard macro.
//
// Writes (CSIB low, RDWRB low, sampled on the rising clock edge) are
// counted and folded into a checksum. A configuration session is recognised
// by the sync word and ended by the DESYNC command word; both are compared
// in the bit-reversed-per-byte form in which the port receives them. On
// DESYNC after a sync, PRDONE rises DONE_DELAY cycles later and stays high
// until the next write; DESYNC without a preceding sync raises PRERROR
// instead. While stall_en is high, AVAIL drops at random in STALL_PCT percent
// of cycles. Reads
// (CSIB low, RDWRB high) return 32'hC0DE0000 + n for the n-th read,
// bit-reversed per byte, on O one edge after they are sampled.
// The port's signal set (CSIB, RDWRB, I, O, AVAIL, PRDONE, PRERROR) and its
// 200 MHz word-per-cycle use follow the framework; the sync/DESYNC
// recognition, the timing of PRDONE and the readback data are this model's
// own simplifications of the hard macro.
module icape3_model #(
  parameter int STALL_PCT  = 0,
  parameter int DONE_DELAY = 4
) (
  input  logic        clk,
  input  logic        stall_en,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i_data,
  output logic [31:0] o_data,
  output logic        avail,
  output logic        prdone,
  output logic        prerror,
  output int          wr_count,
  output logic [31:0] wr_sum,
  output int          rd_count,
  output int          stall_count
);
  timeunit 1ns; timeprecision 1ps;

  function automatic logic [31:0] swp(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) r[8*b+k] = w[8*b+7-k];
    return r;
  endfunction

  logic synced;
  int   done_cnt;

  initial begin
    o_data = '0; avail = 1'b1; prdone = 1'b0; prerror = 1'b0;
    wr_count = 0; wr_sum = '0; rd_count = 0; stall_count = 0;
    synced = 1'b0; done_cnt = -1;
  end

  always @(posedge clk) begin
    if (STALL_PCT > 0) begin
      avail <= !stall_en || (int'($urandom_range(99)) >= STALL_PCT);
      if (!avail) stall_count <= stall_count + 1;
    end
    if (done_cnt > 0) done_cnt <= done_cnt - 1;
    if (done_cnt == 0) begin
      prdone   <= 1'b1;
      done_cnt <= -1;
    end
    if (!csib && !rdwrb) begin
      wr_count <= wr_count + 1;
      wr_sum   <= wr_sum + i_data;
      prdone   <= 1'b0;
      prerror  <= 1'b0;
      if (i_data == swp(32'hAA995566)) synced <= 1'b1;
      if (i_data == swp(32'h0000000D)) begin
        if (synced) done_cnt <= DONE_DELAY;
        else        prerror  <= 1'b1;
        synced <= 1'b0;
      end
    end
    if (!csib && rdwrb) begin
      o_data   <= swp(32'hC0DE0000 + 32'(rd_count));
      rd_count <= rd_count + 1;
    end
  end
endmodule
