// Color limiter core: caps each RGB channel at a programmable maximum.
//
// Command register 0 holds the maximum red value (the reference set-up for
// this core writes 0xA0 there); registers 1 and 2 hold the green and blue
// maxima, a layout this design extends by analogy. All reset to 0xFF, so the
// core starts transparent. One pixel per clock, latency LAT = 3 cycles as in
// the core table. Interface: AXI4-Stream video in and out plus command bus.
module color_limiter
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 3
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

  vbeat_t     b;
  logic [7:0] max_c [3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) max_c[i] <= 8'hFF;
    end else if (cmd.we && cmd.addr < 3) begin
      max_c[cmd.addr[1:0]] <= cmd.data[7:0];
    end
  end

  always_comb begin
    b        = s_beat;
    b.data.r = (s_beat.data.r > max_c[0]) ? max_c[0] : s_beat.data.r;
    b.data.g = (s_beat.data.g > max_c[1]) ? max_c[1] : s_beat.data.g;
    b.data.b = (s_beat.data.b > max_c[2]) ? max_c[2] : s_beat.data.b;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
