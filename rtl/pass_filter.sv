// Pass core: forwards every pixel unchanged.
//
// The simplest library core, used to route a stream through a region without
// altering it. The beat is registered through LAT stages (2, the latency the
// core table lists), one pixel per clock, with whole-pipeline stall when the
// output is not ready. Interface: AXI4-Stream video in and out.
module pass_filter
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

  vid_pipe #(.LAT(LAT)) u_pipe (
    .clk, .rst_n, .in_valid(s_valid), .in_beat(s_beat), .in_ready(s_ready),
    .m_valid, .m_beat, .m_ready
  );

endmodule
