// Video input to AXI4-Stream bridge.
//
// Takes decoded video (data enable, vertical sync, 24-bit RGB, one pixel per
// clock) and turns it into stream beats. The first active pixel after a
// vertical sync pulse is marked start of frame (user). End of line (last) can
// only be known when data enable falls, so each pixel is held one clock and
// written out when the next pixel or the end of the line arrives. Beats go
// through a FIFO of FIFO_DEPTH entries so the stream can be held up briefly;
// a live source cannot wait, so a pixel arriving at a full FIFO is lost and
// the sticky overflow flag is set. The behaviour is this design's; only the
// bridge's purpose is part of the design description. Interface: video in,
// AXI4-Stream out, overflow status. Latency: 2 cycles from pixel to output
// valid when the FIFO is empty.
module vid_in_axis
  import vp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   vid_de,
  input  logic   vid_vsync,
  input  rgb_t   vid_rgb,
  output logic   m_valid,
  output vbeat_t m_beat,
  input  logic   m_ready,
  output logic   overflow
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic          hold_v, hold_sof, sof_pend;
  rgb_t          hold_d;
  logic          push;
  vbeat_t        push_beat;
  vbeat_t        mem [FIFO_DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic          full, empty, pop;

  // Pixel holding register: a held pixel is pushed when the next active pixel
  // arrives (last = 0) or when data enable drops (last = 1).
  assign push      = hold_v;
  assign push_beat = '{data: hold_d, user: hold_sof, last: !vid_de};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold_v   <= 1'b0;
      hold_sof <= 1'b0;
      sof_pend <= 1'b0;
    end else begin
      if (vid_vsync) sof_pend <= 1'b1;
      hold_v <= vid_de;
      if (vid_de) begin
        hold_sof <= sof_pend;
        sof_pend <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (vid_de) hold_d <= vid_rgb;
  end

  assign full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign empty   = wr_ptr == rd_ptr;
  assign pop     = m_valid && m_ready;
  assign m_valid = !empty;
  assign m_beat  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (push && !full) wr_ptr <= wr_ptr + 1'b1;
      if (push && full)  overflow <= 1'b1;
      if (pop)           rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr[AW-1:0]] <= push_beat;
  end

endmodule
