// Stream broadcaster: copies one AXI4-Stream video channel to N_OUT outputs.
//
// A beat is taken from the input only when every enabled output can hold it,
// then it is presented on all enabled outputs at once; each output drops it
// when its own ready is seen, and the next beat waits until all copies are
// gone. One register stage, so a beat accepted in cycle t appears in cycle
// t+1 and back-to-back beats flow at one per clock while all outputs are
// ready. en_mask selects the outputs in use (a disabled output never shows
// valid and never holds the input up); it is this design's addition and is
// tied to all-ones where a plain broadcaster is wanted.
module axis_broadcaster
  import vp_pkg::*;
#(
  parameter int unsigned N_OUT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_OUT-1:0] en_mask,
  input  logic             s_valid,
  input  vbeat_t           s_beat,
  output logic             s_ready,
  output logic             m_valid [N_OUT],
  output vbeat_t           m_beat  [N_OUT],
  input  logic             m_ready [N_OUT]
);

  logic   pend [N_OUT];
  vbeat_t dat;
  logic   acc;

  always_comb begin
    s_ready = 1'b1;
    for (int i = 0; i < N_OUT; i++)
      if (pend[i] && !m_ready[i]) s_ready = 1'b0;
  end

  assign acc = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) pend[i] <= 1'b0;
    end else begin
      for (int i = 0; i < N_OUT; i++)
        pend[i] <= acc ? en_mask[i] : (pend[i] && !m_ready[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (acc) dat <= s_beat;
  end

  always_comb begin
    for (int i = 0; i < N_OUT; i++) begin
      m_valid[i] = pend[i];
      m_beat[i]  = dat;
    end
  end

endmodule
