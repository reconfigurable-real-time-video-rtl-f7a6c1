// ASCII overlay core: draws a programmable string of ASCII characters.
//
// A 128-entry glyph table indexed by the 7-bit ASCII code.
// The drawing itself is done by text_overlay: 8x8 glyphs magnified by a power
// of two at a programmable position and colour. The glyph bitmaps are loaded
// at run time through command register 6 because no font is built in. One
// pixel per clock, latency LAT = 11 cycles as in the core table. Interface:
// AXI4-Stream video in and out plus the command bus; see text_overlay for the
// register layout.
module ascii_overlay
  import vp_pkg::*;
#(
  parameter int unsigned LAT       = 11,
  parameter int unsigned GLYPHS    = 128,
  parameter int unsigned MAX_CHARS = 32,
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

  text_overlay #(
    .LAT(LAT), .GLYPHS(GLYPHS), .MAX_CHARS(MAX_CHARS), .MAX_WIDTH(MAX_WIDTH)
  ) u_text (
    .clk, .rst_n, .s_valid, .s_beat, .s_ready, .m_valid, .m_beat, .m_ready, .cmd
  );

endmodule
