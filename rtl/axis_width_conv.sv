// axis_width_conv: AXI-Stream data-width converter between the shell's
// stream width and the stream width of a reconfigurable module, for
// modules whose interface is wider or narrower than the 32-bit shell.
//
// Upsizing (M_W = R * S_W): R narrow beats are packed into one wide beat,
// first beat in the least significant lane. A narrow beat with tlast closes
// the wide beat early; the lanes it did not fill have tkeep low
// and zero data. The wide
// beat is held in an output register, and a new narrow beat is taken in the
// same cycle the previous wide beat leaves, so the input runs at one beat
// per cycle.
//
// Downsizing (S_W = R * M_W): a wide beat is held and sent as narrow beats,
// least significant lane first. Lanes above the highest lane that has any
// tkeep bit set are dropped, and tlast goes on the last lane sent. The next
// wide beat is taken in the cycle the last lane leaves, so the output runs
// at one beat per cycle.
//
// Equal widths connect straight through. S_W and M_W must be multiples of
// 8 and one must divide the other. That such converters sit between the
// shell and a module of a different width, at some cost in throughput,
// follows the framework this shell belongs to; the lane order and the
// tkeep/tlast rules are this design's choices (those of the usual AXI-Stream
// converters).
module axis_width_conv #(
  parameter int unsigned S_W = 32,
  parameter int unsigned M_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [S_W-1:0]   s_tdata,
  input  logic [S_W/8-1:0] s_tkeep,
  input  logic             s_tlast,
  input  logic             s_tvalid,
  output logic             s_tready,
  output logic [M_W-1:0]   m_tdata,
  output logic [M_W/8-1:0] m_tkeep,
  output logic             m_tlast,
  output logic             m_tvalid,
  input  logic             m_tready
);

  initial begin
    assert (S_W % 8 == 0 && M_W % 8 == 0 && (S_W % M_W == 0 || M_W % S_W == 0))
      else $error("widths must be byte multiples and one must divide the other");
  end

  if (M_W > S_W) begin : g_up
    localparam int unsigned R  = M_W / S_W;
    localparam int unsigned IW = $clog2(R);
    logic [IW-1:0] idx;
    logic          full;

    assign s_tready = !full || m_tready;
    assign m_tvalid = full;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        idx     <= '0;
        full    <= 1'b0;
        m_tdata <= '0;
        m_tkeep <= '0;
        m_tlast <= 1'b0;
      end else begin
        if (full && m_tready) full <= 1'b0;
        if (s_tvalid && s_tready) begin
          if (idx == '0) begin
            m_tkeep <= '0;
            m_tdata <= '0;
          end
          m_tdata[idx*S_W +: S_W]     <= s_tdata;
          m_tkeep[idx*S_W/8 +: S_W/8] <= s_tkeep;
          if (32'(idx) == R - 1 || s_tlast) begin
            full    <= 1'b1;
            m_tlast <= s_tlast;
            idx     <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end else if (S_W > M_W) begin : g_down
    localparam int unsigned R  = S_W / M_W;
    localparam int unsigned IW = $clog2(R);
    logic [S_W-1:0]   data_q;
    logic [S_W/8-1:0] keep_q;
    logic             last_q, held;
    logic [IW-1:0]    idx, top;

    // highest lane with any byte kept (lane 0 if none)
    always_comb begin
      top = '0;
      for (int l = 0; l < int'(R); l++)
        if (keep_q[l*M_W/8 +: M_W/8] != '0) top = IW'(l);
    end

    wire at_top = idx == top;
    assign m_tvalid = held;
    assign m_tdata  = data_q[idx*M_W +: M_W];
    assign m_tkeep  = keep_q[idx*M_W/8 +: M_W/8];
    assign m_tlast  = last_q && at_top;
    assign s_tready = !held || (m_tready && at_top);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        data_q <= '0;
        keep_q <= '0;
        last_q <= 1'b0;
        held   <= 1'b0;
        idx    <= '0;
      end else begin
        if (held && m_tready) begin
          if (at_top) begin
            held <= 1'b0;
            idx  <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        if (s_tvalid && s_tready) begin
          data_q <= s_tdata;
          keep_q <= s_tkeep;
          last_q <= s_tlast;
          held   <= 1'b1;
          idx    <= '0;
        end
      end
    end
  end else begin : g_same
    assign m_tdata  = s_tdata;
    assign m_tkeep  = s_tkeep;
    assign m_tlast  = s_tlast;
    assign m_tvalid = s_tvalid;
    assign s_tready = m_tready;
  end

endmodule
