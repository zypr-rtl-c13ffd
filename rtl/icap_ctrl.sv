// icap_ctrl: partial-reconfiguration controller that feeds the FPGA's
// internal configuration access port (ICAP) from an AXI-Stream link.
//
// Partial bitstreams are kept in contiguous PS memory and pushed by a DMA
// engine through the shell's stream switch into s_axis. Every accepted
// 32-bit word is registered and written to the ICAP (CSIB low, RDWRB low)
// on the next cycle, so the port takes one word per clock: 800 MB/s at the
// 200 MHz the ICAPE3 of a Zynq UltraScale+ supports, 400 MB/s for the
// ICAPE2 of a Zynq-7000 at 100 MHz. The DMA transfer is started by
// software which is then free; completion is signalled by an interrupt.
//
// ICAP_TYPE selects the primitive. With ICAPE3 (3) the controller stalls
// the stream while AVAIL is low, sets the sticky DONE flag when the port
// raises PRDONE and the sticky ERROR flag when it raises PRERROR. ICAPE2 (2)
// has none of those outputs, so DONE is set on the clock edge at which the
// port takes the word flagged tlast (one cycle after it was accepted).
//
// Readback: writing RD_START (after a readback command sequence has been
// written as an ordinary bitstream) switches the port to read (RDWRB high
// with CSIB high for one cycle on either side of the switch), issues
// RD_WORDS reads and returns the words on m_axis, tlast on the last one.
// Data arrive READ_LAT cycles after a read is issued; reads are only issued
// while the RD_FIFO_DEPTH-entry output FIFO has room for every word in
// flight, so back-pressure on m_axis never loses data.
//
// Registers (AXI4-Lite, byte offsets):
//   0x00 CTRL     [0] IRQ_EN, [1] RD_START (write 1), [2] CLEAR (write 1:
//                 sticky flags and counters)
//   0x04 STATUS   [0] WR_BUSY, [1] DONE, [2] ERROR, [3] RD_BUSY, [4] AVAIL,
//                 [5] PRDONE, [6] PRERROR, [7] RD_DONE; bits 1, 2, 7 are
//                 write-1-to-clear
//   0x08 WORDS    words written in the current or last bitstream
//   0x0C CYCLES   clock cycles from its first to its last word
//   0x10 RD_WORDS readback length in words
//   0x14 RD_COUNT words returned by the current or last readback
//   0x18 INFO     [7:0] ICAP_TYPE
// irq = IRQ_EN & (DONE | ERROR | RD_DONE), level.
//
// Streaming bitstreams over DMA into the ICAP, the 200/100 MHz operating
// points, the readback path and reporting ICAP status over AXI-Lite follow
// the framework this shell belongs to; the register map, the flag
// semantics, the per-byte bit reversal (BITSWAP, the usual convention for
// raw .bin bitstreams) and the readback latency are this design's choices.
module icap_ctrl
  import zypr_pkg::*;
#(
  parameter int unsigned ICAP_TYPE     = 3,
  parameter bit          BITSWAP       = 1'b1,
  parameter int unsigned READ_LAT      = 3,
  parameter int unsigned RD_FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  output logic        irq,
  // bitstream in
  input  axis_t       s_axis,
  output logic        s_axis_tready,
  // readback out
  output axis_t       m_axis,
  input  logic        m_axis_tready,
  // ICAP primitive
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic        icap_avail,
  input  logic        icap_prdone,
  input  logic        icap_prerror
);

  localparam bit IS_E3 = (ICAP_TYPE == 3);
  localparam int unsigned FA = (RD_FIFO_DEPTH > 1) ? $clog2(RD_FIFO_DEPTH) : 1;
  localparam int unsigned PL = (READ_LAT > 1) ? READ_LAT - 1 : 1;

  typedef enum logic [2:0] {RD_IDLE, RD_SETUP, RD_RUN, RD_DRAIN, RD_END} rd_state_e;

  // ---------------------------------------------------------------- registers
  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_regif #(.ADDR_W(12)) u_regif (
    .clk, .rst_n, .req(s_axil_req), .rsp(s_axil_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  logic        irq_en, done, error, rd_done;
  logic [31:0] words, cycles, rd_words, rd_count;
  logic        in_pkt;
  logic        prdone_q, prerror_q;
  logic        last_q;                 // tlast word is on the port
  rd_state_e   rd_state;

  wire ctrl_wr   = wr_en && wr_addr[7:2] == 6'h00;
  wire status_wr = wr_en && wr_addr[7:2] == 6'h01;
  wire clear     = ctrl_wr && wr_data[2];
  wire rd_start  = ctrl_wr && wr_data[1] && rd_state == RD_IDLE && !in_pkt && rd_words != 0;

  always_comb begin
    unique case (rd_addr[7:2])
      6'h00:   rd_data = {31'd0, irq_en};
      6'h01:   rd_data = {24'd0, rd_done, icap_prerror, icap_prdone, icap_avail,
                          rd_state != RD_IDLE, error, done, in_pkt};
      6'h02:   rd_data = words;
      6'h03:   rd_data = cycles;
      6'h04:   rd_data = rd_words;
      6'h05:   rd_data = rd_count;
      6'h06:   rd_data = 32'(ICAP_TYPE);
      default: rd_data = '0;
    endcase
  end

  assign irq = irq_en && (done || error || rd_done);

  // ------------------------------------------------------------ write path
  wire wr_accept = s_axis.tvalid && s_axis_tready;
  assign s_axis_tready = rd_state == RD_IDLE && (!IS_E3 || icap_avail);

  // read issue (declared here, computed below)
  logic issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icap_csib  <= 1'b1;
      icap_rdwrb <= 1'b0;
      icap_i     <= '0;
    end else begin
      icap_csib  <= !(wr_accept || issue);
      icap_rdwrb <= rd_state inside {RD_SETUP, RD_RUN, RD_DRAIN};
      if (wr_accept) icap_i <= BITSWAP ? bitswap32(s_axis.tdata) : s_axis.tdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en    <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
      rd_done   <= 1'b0;
      words     <= '0;
      cycles    <= '0;
      rd_words  <= '0;
      in_pkt    <= 1'b0;
      prdone_q  <= 1'b0;
      prerror_q <= 1'b0;
      last_q    <= 1'b0;
    end else begin
      prdone_q  <= icap_prdone;
      prerror_q <= icap_prerror;
      last_q    <= wr_accept && s_axis.tlast;
      if (ctrl_wr && wr_strb[0]) irq_en <= wr_data[0];
      if (wr_en && wr_addr[7:2] == 6'h04) rd_words <= wr_data;

      // bitstream word and cycle counters
      if (in_pkt) cycles <= cycles + 1;
      if (wr_accept) begin
        if (!in_pkt) begin
          words  <= 32'd1;
          cycles <= 32'd1;
        end else begin
          words <= words + 1;
        end
        in_pkt <= !s_axis.tlast;
      end

      // completion and error flags
      if (IS_E3) begin
        if (icap_prdone && !prdone_q) done <= 1'b1;
        if (icap_prerror && !prerror_q) error <= 1'b1;
      end else begin
        if (last_q) done <= 1'b1;
      end
      if (rd_state == RD_END) rd_done <= 1'b1;

      if (status_wr) begin
        if (wr_data[1]) done <= 1'b0;
        if (wr_data[2]) error <= 1'b0;
        if (wr_data[7]) rd_done <= 1'b0;
      end
      if (clear) begin
        done    <= 1'b0;
        error   <= 1'b0;
        rd_done <= 1'b0;
        words   <= '0;
        cycles  <= '0;
      end
    end
  end

  // ------------------------------------------------------------- read path
  logic [31:0]   issued;
  logic [PL-1:0] pipe;
  logic [31:0]   fifo_mem [RD_FIFO_DEPTH];
  logic [FA-1:0] wp, rp;
  logic [FA:0]   fcnt;
  logic [FA:0]   inflight;

  always_comb begin
    inflight = '0;
    for (int k = 0; k < int'(PL); k++) inflight += (FA+1)'(pipe[k]);
  end

  assign issue = rd_state == RD_RUN && issued < rd_words &&
                 (32'(fcnt) + 32'(inflight)) < RD_FIFO_DEPTH &&
                 (!IS_E3 || icap_avail);

  wire capture = pipe[PL-1];
  wire pop     = m_axis.tvalid && m_axis_tready;

  always_comb begin
    m_axis        = '0;
    m_axis.tvalid = fcnt != 0;
    m_axis.tdata  = fifo_mem[rp];
    m_axis.tkeep  = '1;
    m_axis.tlast  = rd_count == rd_words - 1;
  end

  always_ff @(posedge clk) begin
    if (capture) fifo_mem[wp] <= BITSWAP ? bitswap32(icap_o) : icap_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_state <= RD_IDLE;
      issued   <= '0;
      rd_count <= '0;
      pipe     <= '0;
      wp       <= '0;
      rp       <= '0;
      fcnt     <= '0;
    end else begin
      pipe <= PL'({pipe, issue});
      if (issue) issued <= issued + 1;
      if (capture) wp <= (32'(wp) == RD_FIFO_DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop) begin
        rp       <= (32'(rp) == RD_FIFO_DEPTH - 1) ? '0 : rp + 1'b1;
        rd_count <= rd_count + 1;
      end
      fcnt <= fcnt + (FA+1)'(capture) - (FA+1)'(pop);

      unique case (rd_state)
        RD_IDLE:  if (rd_start) begin
                    rd_state <= RD_SETUP;
                    issued   <= '0;
                    rd_count <= '0;
                  end
        RD_SETUP: rd_state <= RD_RUN;
        RD_RUN:   if (issued == rd_words) rd_state <= RD_DRAIN;
        RD_DRAIN: if (rd_count == rd_words) rd_state <= RD_END;
        RD_END:   rd_state <= RD_IDLE;
        default:  rd_state <= RD_IDLE;
      endcase
    end
  end

endmodule
