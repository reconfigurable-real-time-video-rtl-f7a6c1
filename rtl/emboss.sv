// Emboss core: relief effect from the difference with the upper-left neighbour.
//
// Per channel, out = clamp(p(r-1,c-1) - p(r-2,c-2) + 128, 0, 255): flat areas
// become mid grey and edges facing up-left or down-right turn light or dark.
// The kernel is this design's choice. The neighbourhood comes from window3x3,
// so the result is centred one line and one pixel behind the input pixel, and
// output row 0 and column 0 are black. One pixel per clock, latency LAT = 6
// cycles as in the core table. Interface: AXI4-Stream video in and out.
module emboss
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 6,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  input  vbeat_t s_beat,
  output logic   s_ready,
  output logic   m_valid,
  output vbeat_t m_beat,
  input  logic   m_ready
);

  logic acc;
  rgb_t win [3][3];
  logic centre_ok;

  assign acc = s_valid && s_ready;

  window3x3 #(.T(rgb_t), .MAX_WIDTH(MAX_WIDTH)) u_win (
    .clk, .rst_n, .acc, .user(s_beat.user), .last(s_beat.last), .pix(s_beat.data),
    .win, .centre_ok
  );

  vbeat_t b;

  always_comb begin
    b        = s_beat;
    b.data.r = sat8(int'(win[1][1].r) - int'(win[0][0].r) + 128);
    b.data.g = sat8(int'(win[1][1].g) - int'(win[0][0].g) + 128);
    b.data.b = sat8(int'(win[1][1].b) - int'(win[0][0].b) + 128);
    if (!centre_ok) b.data = '0;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
