// Mirror core: reverses each line left to right.
//
// Two line buffers alternate: while line r is written into one, line r-1 is
// read backwards from the other, its width taken from the position of its
// end-of-line flag. Output line r is therefore input line r-1 mirrored; the
// picture moves down one line and output line 0 of each frame is black, which
// keeps one output per input pixel. Columns beyond the previous line's width
// are black. The one-line shift and black first line are this design's
// choices. One pixel per clock, latency LAT = 4 cycles as in the core table
// (the line held in the buffer not counted). Interface: AXI4-Stream video in
// and out.
module mirror
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 4,
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

  localparam int unsigned CW = $clog2(MAX_WIDTH + 1);

  logic          acc;
  logic [CW-1:0] col, row, rd_col, ci;
  logic [CW:0]   prev_w;
  rgb_t          bank0 [MAX_WIDTH];
  rgb_t          bank1 [MAX_WIDTH];
  rgb_t          rd;
  vbeat_t        b;

  assign acc = s_valid && s_ready;

  pixel_counter #(.W(CW)) u_pos (
    .clk, .rst_n, .acc, .user(s_beat.user), .last(s_beat.last), .col, .row
  );

  assign ci     = (col < CW'(MAX_WIDTH)) ? col : CW'(MAX_WIDTH - 1);
  assign rd_col = CW'(prev_w - 1'b1 - (CW+1)'(col));
  assign rd     = row[0] ? bank0[rd_col] : bank1[rd_col];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_w <= '0;
    end else if (acc && s_beat.last) begin
      prev_w <= (CW+1)'(col) + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      if (row[0]) bank1[ci] <= s_beat.data;
      else        bank0[ci] <= s_beat.data;
    end
  end

  always_comb begin
    b = s_beat;
    if (row == 0 || (CW+1)'(col) >= prev_w || rd_col >= CW'(MAX_WIDTH)) b.data = '0;
    else                                                                 b.data = rd;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
