// Erode core: morphological erosion with a 3x3 square structuring element.
//
// Each output channel is the minimum of that channel over the 3x3 neighbourhood.
// The neighbourhood comes from window3x3, so the output at the position of
// input pixel (r, c) is centred on (r-1, c-1): the picture moves down and right
// by one pixel, output row 0 and column 0 are black, and missing taps at the
// top and left edges take the centre value. The square element and the edge
// handling are this design's choices. One pixel per clock; the stream latency
// is LAT = 8 cycles as in the core table, which does not count the one line
// held in the line buffers. Interface: AXI4-Stream video in and out.
module erode
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 8,
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
    rgb_t m;
    m = win[1][1];
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        if (win[i][j].r < m.r) m.r = win[i][j].r;
        if (win[i][j].g < m.g) m.g = win[i][j].g;
        if (win[i][j].b < m.b) m.b = win[i][j].b;
      end
    end
    b      = s_beat;
    b.data = centre_ok ? m : '0;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
