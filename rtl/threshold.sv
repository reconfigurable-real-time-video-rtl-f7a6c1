// Threshold core: turns each pixel into black or white.
//
// The pixel's luma, (77 R + 150 G + 29 B) / 256, is compared with command
// register 0; at or above it the output is white (FF,FF,FF), below it black.
// The threshold resets to 128. The luma weights and the register layout are
// this design's choice. One pixel per clock, latency LAT = 6 cycles as in the
// core table. Interface: AXI4-Stream video in and out plus the command bus.
module threshold
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 6
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
  logic [7:0] thr;

  always_ff @(posedge clk) begin
    if (!rst_n)                        thr <= 8'd128;
    else if (cmd.we && cmd.addr == 0)  thr <= cmd.data[7:0];
  end

  always_comb begin
    b      = s_beat;
    b.data = (luma(s_beat.data) >= thr) ? 24'hFFFFFF : 24'h000000;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
