// Green-screen core for the Mux region: keys a live picture over a background.
//
// Takes beat pairs from stream_sync: the foreground (real-time HDMI stream) and
// the background (stream read from the frame buffer). Where every channel of
// the foreground pixel lies within [low, high] the background pixel is output,
// elsewhere the foreground pixel. A foreground beat that arrives without a
// partner (s_paired low, while the background waits for its frame start)
// passes unchanged. Frame and line flags follow the foreground. Command
// registers (this design's layout): 0-2 low R, G, B, 3-5 high R, G, B; reset
// range R 0-100, G 128-255, B 0-100. One pixel per clock, latency LAT = 4
// cycles as in the core table. Interface: paired stream in, AXI4-Stream out,
// command bus.
module green_screen
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  input  vbeat_t s_fg,
  input  vbeat_t s_bg,
  input  logic   s_paired,
  output logic   s_ready,
  output logic   m_valid,
  output vbeat_t m_beat,
  input  logic   m_ready,
  input  cmd_t   cmd
);

  logic [7:0] lo [3];
  logic [7:0] hi [3];
  logic       key;
  vbeat_t     b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo[0] <= 8'd0;   lo[1] <= 8'd128; lo[2] <= 8'd0;
      hi[0] <= 8'd100; hi[1] <= 8'd255; hi[2] <= 8'd100;
    end else if (cmd.we) begin
      if (cmd.addr < 3)      lo[cmd.addr[1:0]]          <= cmd.data[7:0];
      else if (cmd.addr < 6) hi[2'(cmd.addr - 8'd3)]    <= cmd.data[7:0];
    end
  end

  assign key = s_paired &&
               (s_fg.data.r >= lo[0]) && (s_fg.data.r <= hi[0]) &&
               (s_fg.data.g >= lo[1]) && (s_fg.data.g <= hi[1]) &&
               (s_fg.data.b >= lo[2]) && (s_fg.data.b <= hi[2]);

  always_comb begin
    b = s_fg;
    if (key) b.data = s_bg.data;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
