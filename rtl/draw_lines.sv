// Draw-lines core: paints two horizontal and two vertical lines.
//
// A pixel is painted with the line colour when its row lies in
// [hpos_k, hpos_k + hwidth_k) for a horizontal line k, or its column lies in
// [vpos_k, vpos_k + vwidth_k) for a vertical line k. Positions come from the
// stream flags (user = row 0 column 0, last = end of row). Command registers
// (this design's layout): 0,1 rows of the horizontal lines, 2,3 columns of the
// vertical lines, 4-7 the four widths in the same order, 8 colour (24-bit RGB).
// Widths reset to 0, which hides the line. One pixel per clock, latency
// LAT = 5 cycles as in the core table. Interface: AXI4-Stream video in and out
// plus the command bus.
module draw_lines
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 5,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  input  vbeat_t s_beat,
  output logic   s_ready,
  output logic   m_valid,
  output vbeat_t m_beat,
  input  logic   m_ready,
  input  cmd_t   cmd
);

  localparam int unsigned CW = $clog2(MAX_WIDTH + 1);

  vbeat_t        b;
  logic [CW-1:0] pos [4];
  logic [CW-1:0] wid [4];
  rgb_t          colour;
  logic [CW-1:0] col, row;
  logic          hit;

  pixel_counter #(.W(CW)) u_pos (
    .clk, .rst_n, .acc(s_valid && s_ready), .user(s_beat.user), .last(s_beat.last),
    .col, .row
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        pos[i] <= '0;
        wid[i] <= '0;
      end
      colour <= '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
    end else if (cmd.we) begin
      if (cmd.addr < 4)                       pos[cmd.addr[1:0]] <= cmd.data[CW-1:0];
      else if (cmd.addr < 8)                  wid[cmd.addr[1:0]] <= cmd.data[CW-1:0];
      else if (cmd.addr == 8)                 colour             <= cmd.data[23:0];
    end
  end

  always_comb begin
    hit = 1'b0;
    for (int k = 0; k < 2; k++) begin
      if ({1'b0, row} >= {1'b0, pos[k]} && {1'b0, row} < {1'b0, pos[k]} + {1'b0, wid[k]})
        hit = 1'b1;
      if ({1'b0, col} >= {1'b0, pos[k+2]} && {1'b0, col} < {1'b0, pos[k+2]} + {1'b0, wid[k+2]})
        hit = 1'b1;
    end
    b = s_beat;
    if (hit) b.data = colour;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
