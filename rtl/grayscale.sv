// Grayscale core: writes the pixel's luma to all three channels.
//
// Luma is (77 R + 150 G + 29 B) / 256, an integer form of the BT.601 weights
// chosen by this design (the weights are not part of the core's description).
// One pixel per clock, latency LAT = 6 cycles as in the core table. Interface:
// AXI4-Stream video in and out.
module grayscale
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
  input  logic   m_ready
);

  vbeat_t     b;
  logic [7:0] y;

  assign y = luma(s_beat.data);

  always_comb begin
    b      = s_beat;
    b.data = '{r: y, g: y, b: y};
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
