// The Mux region: the two-input reconfigurable slot with its frame aligner.
//
// Stream A (live, real-time) and stream B (from the frame buffer) first pass
// stream_sync, the static logic of this template that stalls B at its frame
// start until A reaches its own. The aligned pairs feed the region's core,
// and the core's result is fanned out to the region's two outputs through a
// broadcaster whose enable mask is command register 8 (bit 0 output 0, bit 1
// output 1, reset 2'b11), so the result can go to one or both outputs. The
// only core for this region is Green Screen; loading it (load_we, load_core)
// holds the region in reset for one cycle, and any other core leaves the
// region empty, in which case it takes no input and gives no output.
// Latency A to output: 1 (aligner) + 4 (green screen) + 1 (fan-out) cycles.
// Interface: two AXI4-Stream inputs, two outputs, command bus, load port.
module prr_mux_slot
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
  output logic        m_valid [2],
  output vbeat_t      m_beat  [2],
  input  logic        m_ready [2],
  input  cmd_t        cmd,
  input  logic        load_we,
  input  core_id_t    load_core,
  output core_id_t    loaded,
  output logic [31:0] stall_cnt
);

  logic   on, load_q, core_rst_n;
  logic   sa_ready, sb_ready;
  logic   p_valid, p_paired, p_ready;
  vbeat_t p_a, p_b;
  logic   g_valid, g_ready;
  vbeat_t g_beat;
  logic   [1:0] out_mask;
  logic   bv [2];
  logic   br [2];
  cmd_t   gcmd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loaded   <= CORE_NONE;
      load_q   <= 1'b0;
      out_mask <= 2'b11;
    end else begin
      load_q <= load_we;
      if (load_we) loaded <= (load_core == CORE_GREEN) ? CORE_GREEN : CORE_NONE;
      if (cmd.we && cmd.addr == 8'd8) out_mask <= cmd.data[1:0];
    end
  end

  assign on         = loaded == CORE_GREEN;
  assign core_rst_n = rst_n && !load_q;
  assign a_ready    = on && sa_ready;
  assign b_ready    = on && sb_ready;

  always_comb begin
    gcmd    = cmd;
    gcmd.we = cmd.we && on;
  end

  stream_sync u_sync (
    .clk, .rst_n(core_rst_n),
    .a_valid(a_valid && on), .a_beat, .a_ready(sa_ready),
    .b_valid(b_valid && on), .b_beat, .b_ready(sb_ready),
    .m_valid(p_valid), .m_a(p_a), .m_b(p_b), .m_paired(p_paired), .m_ready(p_ready),
    .stall_cnt
  );

  green_screen u_core (
    .clk, .rst_n(core_rst_n),
    .s_valid(p_valid), .s_fg(p_a), .s_bg(p_b), .s_paired(p_paired), .s_ready(p_ready),
    .m_valid(g_valid), .m_beat(g_beat), .m_ready(g_ready), .cmd(gcmd)
  );

  axis_broadcaster #(.N_OUT(2)) u_fan (
    .clk, .rst_n(core_rst_n), .en_mask(out_mask),
    .s_valid(g_valid), .s_beat(g_beat), .s_ready(g_ready),
    .m_valid(bv), .m_beat, .m_ready(br)
  );

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      m_valid[i] = bv[i] && on;
      br[i]      = m_ready[i];
    end
  end

endmodule
