// Kernel 3x3 core: programmable 3x3 convolution on each colour channel.
//
// out = clamp((sum of k[i][j] * p[i][j]) >>> shift, 0, 255) per channel, with
// nine signed 8-bit coefficients in command registers 0-8 (row-major, top-left
// first) and the arithmetic right shift in register 9. The coefficients reset
// to the identity kernel. Blur (1 2 1 / 2 4 2 / 1 2 1, shift 4) and sharpen
// (0 -1 0 / -1 5 -1 / 0 -1 0, shift 0) are two settings. The number format
// is this design's choice. The neighbourhood comes from window3x3 and is
// centred one line and one pixel behind the input; output row 0 and column 0
// are black. One pixel per clock, latency LAT = 51 cycles as in the core table
// (line buffering not counted). Interface: AXI4-Stream video in and out plus
// the command bus.
module kernel3x3
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
  input  logic   m_ready,
  input  cmd_t   cmd
);

  logic acc;
  rgb_t win [3][3];
  logic centre_ok;

  assign acc = s_valid && s_ready;

  window3x3 #(.T(rgb_t), .MAX_WIDTH(MAX_WIDTH)) u_win (
    .clk, .rst_n, .acc, .user(s_beat.user), .last(s_beat.last), .pix(s_beat.data),
    .win, .centre_ok
  );

  vbeat_t            b;
  logic signed [7:0] k [9];
  logic [3:0]        shift;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) k[i] <= (i == 4) ? 8'sd1 : 8'sd0;
      shift <= '0;
    end else if (cmd.we) begin
      if (cmd.addr < 9)       k[cmd.addr[3:0]] <= cmd.data[7:0];
      else if (cmd.addr == 9) shift            <= cmd.data[3:0];
    end
  end

  function automatic logic [7:0] conv(input logic [7:0] p [9]);
    logic signed [19:0] acc_s;
    acc_s = '0;
    for (int i = 0; i < 9; i++) acc_s += 20'(k[i]) * $signed({12'd0, p[i]});
    acc_s = acc_s >>> shift;
    return sat8(int'(acc_s));
  endfunction

  always_comb begin
    logic [7:0] pr [9];
    logic [7:0] pg [9];
    logic [7:0] pb [9];
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        pr[3*i+j] = win[i][j].r;
        pg[3*i+j] = win[i][j].g;
        pb[3*i+j] = win[i][j].b;
      end
    end
    b        = s_beat;
    b.data.r = conv(pr);
    b.data.g = conv(pg);
    b.data.b = conv(pb);
    if (!centre_ok) b.data = '0;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
