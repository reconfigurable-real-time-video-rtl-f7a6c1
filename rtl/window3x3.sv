// 3x3 neighbourhood generator with two line buffers.
//
// For the pixel being accepted at (row r, column c) it presents the 3x3 window
// centred on (r-1, c-1): the line buffers give rows r-1 and r-2 at column c,
// and two column registers hold columns c-1 and c-2. The window is therefore
// one line and one pixel behind the input, which keeps the stream real-time
// (one output per input, same frame shape) at the cost of shifting the picture
// down and right by one pixel. centre_ok is low for output row 0 and column 0,
// whose centre lies outside the frame. Taps above the top row or left of the
// left column are replaced by the centre pixel. The window is combinational
// from the accepted pixel; buffers update on acc. Row and column counts come
// from the stream's user/last flags, so any frame up to MAX_WIDTH wide works.
module window3x3
  import vp_pkg::*;
#(
  parameter type         T         = rgb_t,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic clk,
  input  logic rst_n,
  input  logic acc,
  input  logic user,
  input  logic last,
  input  T     pix,
  output T     win [3][3],   // [row 0=top .. 2=bottom][col 0=left .. 2=right]
  output logic centre_ok
);

  localparam int unsigned CW = $clog2(MAX_WIDTH + 1);

  T lb1 [MAX_WIDTH];   // row r-1
  T lb2 [MAX_WIDTH];   // row r-2
  T c1 [3];            // column c-1, rows r-2, r-1, r
  T c2 [3];            // column c-2
  T c0 [3];            // column c
  logic [CW-1:0] col, row;
  logic          top_ok, left_ok;
  logic [CW-1:0] ci;

  pixel_counter #(.W(CW)) u_pos (
    .clk, .rst_n, .acc, .user, .last, .col, .row
  );

  assign ci    = (col < CW'(MAX_WIDTH)) ? col : CW'(MAX_WIDTH - 1);
  assign c0[0] = lb2[ci];
  assign c0[1] = lb1[ci];
  assign c0[2] = pix;

  assign centre_ok = (row >= CW'(1)) && (col >= CW'(1));
  assign top_ok    = row >= CW'(2);
  assign left_ok   = col >= CW'(2);

  always_comb begin
    // rows: 0 = r-2, 1 = r-1 (centre row), 2 = r ; cols: 0 = c-2, 1 = c-1, 2 = c
    for (int i = 0; i < 3; i++) begin
      win[i][0] = c2[i];
      win[i][1] = c1[i];
      win[i][2] = c0[i];
    end
    if (!top_ok) begin
      for (int j = 0; j < 3; j++) win[0][j] = c1[1];
    end
    if (!left_ok) begin
      for (int i = 0; i < 3; i++) win[i][0] = c1[1];
    end
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      lb1[ci] <= pix;
      lb2[ci] <= lb1[ci];
      for (int i = 0; i < 3; i++) begin
        c2[i] <= c1[i];
        c1[i] <= c0[i];
      end
    end
  end

endmodule
