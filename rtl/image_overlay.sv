// Image overlay core: pastes an IMG_W x IMG_H picture held in on-chip RAM.
//
// Pixels in_box the rectangle whose top-left corner is (x, y) are replaced by
// the stored image; all others pass unchanged. The image RAM starts with a
// computed test picture (red rising left to right, green rising top to bottom,
// blue a checkerboard of 16-pixel squares) and can be rewritten through the
// command bus. Command registers: 0 x, 1 y, 2 enable (bit 0, resets to 1),
// 3 write address (row-major pixel index), 4 write data (24-bit RGB; the
// address then advances by one). Image size and register layout are this
// design's choices. One pixel per clock, latency LAT = 9 cycles as in the core
// table. Interface: AXI4-Stream video in and out plus the command bus.
module image_overlay
  import vp_pkg::*;
#(
  parameter int unsigned LAT       = 9,
  parameter int unsigned IMG_W     = 128,
  parameter int unsigned IMG_H     = 128,
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
  localparam int unsigned NP = IMG_W * IMG_H;
  localparam int unsigned AW = $clog2(NP);

  rgb_t          img [NP];
  logic [CW-1:0] xpos, ypos, col, row;
  logic          enable;
  logic [AW-1:0] waddr;
  logic [CW:0]   dx, dy;
  logic          in_box;
  vbeat_t        b;

  initial begin
    for (int i = 0; i < NP; i++) begin
      img[i].r = 8'((i % IMG_W) * 256 / IMG_W);
      img[i].g = 8'((i / IMG_W) * 256 / IMG_H);
      img[i].b = ((((i % IMG_W) / 16) + ((i / IMG_W) / 16)) % 2 == 1) ? 8'hFF : 8'h00;
    end
  end

  pixel_counter #(.W(CW)) u_pos (
    .clk, .rst_n, .acc(s_valid && s_ready), .user(s_beat.user), .last(s_beat.last),
    .col, .row
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xpos   <= '0;
      ypos   <= '0;
      enable <= 1'b1;
      waddr  <= '0;
    end else if (cmd.we) begin
      case (cmd.addr)
        8'd0: xpos   <= cmd.data[CW-1:0];
        8'd1: ypos   <= cmd.data[CW-1:0];
        8'd2: enable <= cmd.data[0];
        8'd3: waddr  <= cmd.data[AW-1:0];
        8'd4: waddr  <= (waddr == AW'(NP - 1)) ? '0 : waddr + 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cmd.we && cmd.addr == 8'd4) img[waddr] <= cmd.data[23:0];
  end

  always_comb begin
    dx     = {1'b0, col} - {1'b0, xpos};
    dy     = {1'b0, row} - {1'b0, ypos};
    in_box = enable && (col >= xpos) && (row >= ypos) &&
             (dx < (CW+1)'(IMG_W)) && (dy < (CW+1)'(IMG_H));
    b = s_beat;
    if (in_box) b.data = img[AW'(dy) * AW'(IMG_W) + AW'(dx)];
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
