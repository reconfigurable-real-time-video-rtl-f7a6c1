// Frame aligner of the Mux region: lines the frame-buffer stream up with the
// live stream.
//
// Stream A is real time (HDMI input) and is never held back by this block;
// stream B comes from the frame buffer and can wait. When B's next beat is a
// start of frame and A's is not, B is stalled and A's beats pass alone,
// flagged unpaired. Otherwise a beat of A and a beat of B are taken together
// and presented as a pair, so once both frame starts meet the two pictures
// stay pixel-aligned. Stalling B at its frame start follows the design
// description; letting A pass alone meanwhile is this design's choice.
// The output is registered (one cycle). stall_cnt counts cycles in which B was
// held at its frame start. Interface: two AXI4-Stream inputs, one paired
// output (valid, A beat, B beat, paired flag, ready).
module stream_sync
  import vp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_valid,
  input  vbeat_t      a_beat,
  output logic        a_ready,
  input  logic        b_valid,
  input  vbeat_t      b_beat,
  output logic        b_ready,
  output logic        m_valid,
  output vbeat_t      m_a,
  output vbeat_t      m_b,
  output logic        m_paired,
  input  logic        m_ready,
  output logic [31:0] stall_cnt
);

  logic hold_b, take, take_a_only, take_pair, adv;

  assign adv         = !m_valid || m_ready;
  assign hold_b      = b_valid && b_beat.user && a_valid && !a_beat.user;
  assign take_a_only = a_valid && hold_b;
  assign take_pair   = a_valid && b_valid && !hold_b;
  assign take        = adv && (take_a_only || take_pair);
  assign a_ready     = take;
  assign b_ready     = adv && take_pair;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid   <= 1'b0;
      m_paired  <= 1'b0;
      stall_cnt <= '0;
    end else begin
      if (adv) begin
        m_valid  <= take_a_only || take_pair;
        m_paired <= take_pair;
      end
      if (hold_b && adv) stall_cnt <= stall_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      m_a <= a_beat;
      m_b <= b_beat;
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_valid && !m_ready) |=> (m_valid && $stable(m_a) && $stable(m_paired));
  endproperty
  a_hold: assert property (p_hold);

endmodule
