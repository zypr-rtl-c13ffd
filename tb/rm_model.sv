// rm_model: behavioural stand-in for a reconfigurable accelerator module
// (the real ones are HLS-generated image filters). It has an AXI4-Lite
// register KEY at byte offset 0x0 and a read-only beat counter at 0x4.
// Every stream beat is passed through one register stage with each 32-bit
// lane XORed with KEY (variant 0) or added to KEY (variant 1); tkeep and
// tlast are kept. One beat per cycle. The variant input stands for which
// module has been loaded into the region by reconfiguration.
// That regions hold stream filters with a control port follows the
// framework's image-processing example; the XOR/ADD function, the register
// layout and the one-cycle latency are this model's own.
module rm_model
  import zypr_pkg::*;
#(
  parameter int W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           variant,
  input  axil_req_t      axil_req,
  output axil_rsp_t      axil_rsp,
  input  logic [W-1:0]   in_tdata,
  input  logic [W/8-1:0] in_tkeep,
  input  logic           in_tlast,
  input  logic           in_tvalid,
  output logic           in_tready,
  output logic [W-1:0]   out_tdata,
  output logic [W/8-1:0] out_tkeep,
  output logic           out_tlast,
  output logic           out_tvalid,
  input  logic           out_tready
);
  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data, key, beats;
  logic [3:0]  wr_strb;
  axil_regif #(.ADDR_W(12)) u_regif (
    .clk, .rst_n, .req(axil_req), .rsp(axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data);
  assign rd_data = (rd_addr[2]) ? beats : key;

  assign in_tready = !out_tvalid || out_tready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key <= '0; beats <= '0; out_tvalid <= 1'b0;
      out_tdata <= '0; out_tkeep <= '0; out_tlast <= 1'b0;
    end else begin
      if (wr_en && wr_addr[3:2] == 2'd0) key <= wr_data;
      if (out_tvalid && out_tready) out_tvalid <= 1'b0;
      if (in_tvalid && in_tready) begin
        for (int l = 0; l < W / 32; l++) out_tdata[32*l +: 32] <= variant ? in_tdata[32*l +: 32] + key
                                                     : in_tdata[32*l +: 32] ^ key;
        out_tkeep  <= in_tkeep;
        out_tlast  <= in_tlast;
        out_tvalid <= 1'b1;
        beats      <= beats + 1;
      end
    end
  end
endmodule
