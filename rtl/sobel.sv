// Sobel core: edge strength from the Sobel gradient of the luma.
//
// Each input pixel is reduced to its luma, (77 R + 150 G + 29 B) / 256, and
// only the luma is line-buffered. Gx uses the kernel -1 0 1 / -2 0 2 / -1 0 1,
// Gy its transpose, and the output |Gx| + |Gy|, saturated to 255, goes to all
// three channels. The magnitude approximation and the luma weights are this
// design's choices. The window is centred one line and one pixel behind the
// input; output row 0 and column 0 are black. One pixel per clock, latency
// LAT = 51 cycles as in the core table (line buffering not counted).
// Interface: AXI4-Stream video in and out.
module sobel
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 51,
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

  logic       acc;
  logic [7:0] y;
  logic [7:0] win [3][3];
  logic       centre_ok;
  vbeat_t     b;

  assign acc = s_valid && s_ready;
  assign y   = luma(s_beat.data);

  window3x3 #(.T(logic [7:0]), .MAX_WIDTH(MAX_WIDTH)) u_win (
    .clk, .rst_n, .acc, .user(s_beat.user), .last(s_beat.last), .pix(y),
    .win, .centre_ok
  );

  always_comb begin
    int gx, gy, mag;
    gx = (int'(win[0][2]) + 2 * int'(win[1][2]) + int'(win[2][2]))
       - (int'(win[0][0]) + 2 * int'(win[1][0]) + int'(win[2][0]));
    gy = (int'(win[2][0]) + 2 * int'(win[2][1]) + int'(win[2][2]))
       - (int'(win[0][0]) + 2 * int'(win[0][1]) + int'(win[0][2]));
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    b      = s_beat;
    b.data = centre_ok ? '{r: sat8(mag), g: sat8(mag), b: sat8(mag)} : '0;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
