// Character overlay engine shared by the ASCII and Hiragana overlay cores.
//
// A string of up to MAX_CHARS character codes is drawn as 8x8-pixel glyphs,
// magnified by 2^scale, with its top-left corner at column x, row y. Pixels
// covered by a set glyph bit take the text colour; all others pass unchanged.
// The glyph table (GLYPHS codes x 8 rows x 8 bits, bit 7 = leftmost pixel)
// and the string are RAMs written through the command bus, since no font is
// built in. Command registers: 0 x, 1 y, 2 log2 of the scale (0-3), 3 colour
// (24-bit RGB), 4 string length (0 hides the text), 5 string write
// {index[23:16], code[7:0]}, 6 glyph-row write {code[23:16], row[10:8],
// bits[7:0]}. The register layout and the 8x8 glyph size are this design's.
// One pixel per clock, latency LAT cycles (11 for both cores in the core
// table). Interface: AXI4-Stream video in and out plus the command bus.
module text_overlay
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

  localparam int unsigned CW = $clog2(MAX_WIDTH + 1);
  localparam int unsigned GW = $clog2(GLYPHS);
  localparam int unsigned SW = $clog2(MAX_CHARS);

  logic [7:0]    glyph [GLYPHS * 8];
  logic [GW-1:0] str   [MAX_CHARS];
  logic [CW-1:0] xpos, ypos;
  logic [1:0]    scale;
  rgb_t          colour;
  logic [SW:0]   len;

  logic [CW-1:0] col, row;
  logic [CW:0]   dx, dy;
  logic [CW:0]   cidx;
  logic [2:0]    gx, gy;
  logic          in_box, bit_on;
  vbeat_t        b;

  pixel_counter #(.W(CW)) u_pos (
    .clk, .rst_n, .acc(s_valid && s_ready), .user(s_beat.user), .last(s_beat.last),
    .col, .row
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xpos   <= '0;
      ypos   <= '0;
      scale  <= '0;
      colour <= '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
      len    <= '0;
    end else if (cmd.we) begin
      case (cmd.addr)
        8'd0: xpos   <= cmd.data[CW-1:0];
        8'd1: ypos   <= cmd.data[CW-1:0];
        8'd2: scale  <= cmd.data[1:0];
        8'd3: colour <= cmd.data[23:0];
        8'd4: len    <= (cmd.data > MAX_CHARS) ? (SW+1)'(MAX_CHARS) : cmd.data[SW:0];
        default: ;
      endcase
    end
  end

  // String and glyph RAMs: write-only from the command bus.
  always_ff @(posedge clk) begin
    if (cmd.we && cmd.addr == 8'd5 && 32'(cmd.data[23:16]) < MAX_CHARS)
      str[cmd.data[16+SW-1:16]] <= cmd.data[GW-1:0];
    if (cmd.we && cmd.addr == 8'd6 && 32'(cmd.data[23:16]) < GLYPHS)
      glyph[{cmd.data[16+GW-1:16], cmd.data[10:8]}] <= cmd.data[7:0];
  end

  always_comb begin
    dx     = {1'b0, col} - {1'b0, xpos};
    dy     = {1'b0, row} - {1'b0, ypos};
    cidx   = dx >> (3 + scale);
    gx     = 3'(dx >> scale);
    gy     = 3'(dy >> scale);
    in_box = (col >= xpos) && (row >= ypos) && ((dy >> (3 + scale)) == 0) &&
             (cidx < (CW+1)'(len));
    bit_on = 1'b0;
    if (in_box) bit_on = glyph[{str[SW'(cidx)], gy}][3'd7 - gx];
    b = s_beat;
    if (bit_on) b.data = colour;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
