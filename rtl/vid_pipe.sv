// Fixed-latency pipeline shell shared by the filter cores.
//
// Each core computes its output beat combinationally from the beat being
// accepted (and from its own state) and hands it to this shell, which delays
// it by LAT register stages. The whole pipeline advances when its last stage
// is empty or being taken, so one pixel can enter every clock (initiation
// interval one) and a beat accepted in cycle t is presented at the output in
// cycle t+LAT while the output is not stalled. Output back-pressure stalls
// every stage at once; s_ready is the advance signal, so the core updates its
// own state exactly when s_valid && s_ready.
module vid_pipe
  import vp_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  vbeat_t in_beat,
  output logic   in_ready,
  output logic   m_valid,
  output vbeat_t m_beat,
  input  logic   m_ready
);

  logic   vld [LAT];
  vbeat_t dat [LAT];
  logic   adv;

  assign adv      = !vld[LAT-1] || m_ready;
  assign in_ready = adv;
  assign m_valid  = vld[LAT-1];
  assign m_beat   = dat[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) vld[i] <= 1'b0;
    end else if (adv) begin
      vld[0] <= in_valid;
      for (int i = 1; i < LAT; i++) vld[i] <= vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      dat[0] <= in_beat;
      for (int i = 1; i < LAT; i++) dat[i] <= dat[i-1];
    end
  end

  // AXI4-Stream rule: a presented beat stays until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_valid && !m_ready) |=> (m_valid && $stable(m_beat));
  endproperty
  a_hold: assert property (p_hold);

endmodule
