// Invert core: replaces each colour channel x by 255-x.
//
// One pixel per clock; latency LAT = 2 cycles as listed in the core table.
// Start-of-frame and end-of-line flags travel with the pixel. Interface:
// AXI4-Stream video in and out, no run-time parameters.
module invert
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 2
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

  vbeat_t b;

  always_comb begin
    b        = s_beat;
    b.data.r = ~s_beat.data.r;
    b.data.g = ~s_beat.data.g;
    b.data.b = ~s_beat.data.b;
  end

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(b), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
