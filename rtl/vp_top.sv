// Reconfigurable real-time video pipeline: the static framework with its
// reconfigurable regions.
//
// Live video enters through vid_in_axis and leaves through axis_vid_out; the
// frame-buffer path (VDMA with its colour conversion and pixel packing, which
// lie outside this RTL) is reached through the vdma_s2mm (to memory) and
// vdma_mm2s (from memory) stream ports. Every source and sink meets at a
// 16x16 AXI4-Stream switch programmed by the processor, so any chain of
// regions can be built at run time: ten basic regions (L0 large, M0-M2
// medium, S0-S5 small), each holding one library core chosen at run time; the
// two-input Mux region (green screen with frame alignment); and a broadcaster
// that copies one stream to two. The processor controls routing, region
// loading and core parameters through one AXI-Lite port (map in ctrl_bus).
//
// Switch inputs:  0 HDMI_IN, 1 VDMA (mm2s), 2-3 broadcaster, 4-5 Mux,
//                 6-15 regions L0, M0, M1, M2, S0..S5.
// Switch outputs: 0 HDMI_OUT, 1 VDMA (s2mm), 2 broadcaster, 3 Mux A (live),
//                 4 Mux B (frame buffer), 5-14 regions L0..S5, 15 unused.
// Region slots on the control bus: 0 L0, 1-3 M0-M2, 4-9 S0-S5, 10 Mux.
// The port numbering is this design's; the set of connections follows the
// framework's block diagram. One clock drives everything.
// Timing: a path through the top costs 2 cycles per switch hop plus the
// latencies of the blocks on it; the HDMI output runs on the raster started
// by the first frame start it receives. Rerouting while video runs can hold
// the new chain up until the output resynchronises, which at 1080p may
// overflow the input FIFO once (vin_overflow is sticky).
module vp_top
  import vp_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1920,
  parameter int unsigned H_ACTIVE  = 1920,
  parameter int unsigned H_FP      = 88,
  parameter int unsigned H_SYNC    = 44,
  parameter int unsigned H_BP      = 148,
  parameter int unsigned V_ACTIVE  = 1080,
  parameter int unsigned V_FP      = 4,
  parameter int unsigned V_SYNC    = 5,
  parameter int unsigned V_BP      = 36
) (
  input  logic        clk,
  input  logic        rst_n,
  // decoded HDMI input
  input  logic        vin_de,
  input  logic        vin_vsync,
  input  rgb_t        vin_rgb,
  // video to the HDMI encoder
  output logic        vout_de,
  output logic        vout_hsync,
  output logic        vout_vsync,
  output rgb_t        vout_rgb,
  // frame-buffer write stream (to VDMA)
  output logic        vdma_s2mm_valid,
  output vbeat_t      vdma_s2mm_beat,
  input  logic        vdma_s2mm_ready,
  // frame-buffer read stream (from VDMA)
  input  logic        vdma_mm2s_valid,
  input  vbeat_t      vdma_mm2s_beat,
  output logic        vdma_mm2s_ready,
  // AXI-Lite control
  input  logic [15:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [15:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // status
  output logic        vin_overflow,
  output logic        vout_underflow,
  output logic        vout_locked,
  output logic [31:0] mux_stall_cnt,
  output logic [31:0] route_commits
);

  localparam int unsigned NP      = 16;
  localparam int unsigned N_SLOTS = 11;
  localparam int unsigned N_PRR   = 10;

  // switch side
  logic   sv [NP];
  vbeat_t sb [NP];
  logic   sr [NP];
  logic   mv [NP];
  vbeat_t mb [NP];
  logic   mr [NP];

  logic        sw_we;
  logic [5:0]  sw_addr, sw_raddr;
  logic [31:0] sw_wdata, sw_rdata;
  cmd_t        cmd     [N_SLOTS];
  logic        load_we [N_SLOTS];
  core_id_t    load_core;
  core_id_t    loaded  [N_SLOTS];

  ctrl_bus #(.ADDR_W(16), .N_SLOTS(N_SLOTS)) u_ctrl (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .sw_we, .sw_addr, .sw_wdata, .sw_raddr, .sw_rdata,
    .cmd, .load_we, .load_core, .loaded
  );

  axis_switch #(.N_S(NP), .N_M(NP)) u_switch (
    .clk, .rst_n,
    .s_valid(sv), .s_beat(sb), .s_ready(sr),
    .m_valid(mv), .m_beat(mb), .m_ready(mr),
    .reg_we(sw_we), .reg_addr(sw_addr), .reg_wdata(sw_wdata),
    .reg_raddr(sw_raddr), .reg_rdata(sw_rdata), .commit_cnt(route_commits)
  );

  // ---- HDMI in -> switch input 0
  vid_in_axis u_vin (
    .clk, .rst_n, .vid_de(vin_de), .vid_vsync(vin_vsync), .vid_rgb(vin_rgb),
    .m_valid(sv[0]), .m_beat(sb[0]), .m_ready(sr[0]), .overflow(vin_overflow)
  );

  // ---- switch output 0 -> HDMI out
  axis_vid_out #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vout (
    .clk, .rst_n, .s_valid(mv[0]), .s_beat(mb[0]), .s_ready(mr[0]),
    .vid_de(vout_de), .vid_hsync(vout_hsync), .vid_vsync(vout_vsync), .vid_rgb(vout_rgb),
    .locked(vout_locked), .underflow(vout_underflow)
  );

  // ---- frame-buffer path
  assign vdma_s2mm_valid = mv[1];
  assign vdma_s2mm_beat  = mb[1];
  assign mr[1]           = vdma_s2mm_ready;
  assign sv[1]           = vdma_mm2s_valid;
  assign sb[1]           = vdma_mm2s_beat;
  assign vdma_mm2s_ready = sr[1];

  // ---- broadcaster: switch output 2 -> switch inputs 2, 3
  logic   bc_v [2];
  vbeat_t bc_b [2];
  logic   bc_r [2];

  axis_broadcaster #(.N_OUT(2)) u_bcast (
    .clk, .rst_n, .en_mask(2'b11),
    .s_valid(mv[2]), .s_beat(mb[2]), .s_ready(mr[2]),
    .m_valid(bc_v), .m_beat(bc_b), .m_ready(bc_r)
  );

  // ---- Mux region: switch outputs 3 (A), 4 (B) -> switch inputs 4, 5
  logic   mx_v [2];
  vbeat_t mx_b [2];
  logic   mx_r [2];

  prr_mux_slot u_mux (
    .clk, .rst_n,
    .a_valid(mv[3]), .a_beat(mb[3]), .a_ready(mr[3]),
    .b_valid(mv[4]), .b_beat(mb[4]), .b_ready(mr[4]),
    .m_valid(mx_v), .m_beat(mx_b), .m_ready(mx_r),
    .cmd(cmd[10]), .load_we(load_we[10]), .load_core, .loaded(loaded[10]),
    .stall_cnt(mux_stall_cnt)
  );

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      sv[2+i]  = bc_v[i];
      sb[2+i]  = bc_b[i];
      bc_r[i]  = sr[2+i];
      sv[4+i]  = mx_v[i];
      sb[4+i]  = mx_b[i];
      mx_r[i]  = sr[4+i];
    end
  end

  // ---- basic regions: switch output 5+k -> region k -> switch input 6+k
  for (genvar k = 0; k < N_PRR; k++) begin : g_prr
    localparam region_t RG = (k == 0) ? REGION_LARGE :
                             (k <= 3) ? REGION_MEDIUM : REGION_SMALL;
    prr_slot #(.REGION(RG), .MAX_WIDTH(MAX_WIDTH)) u_slot (
      .clk, .rst_n,
      .s_valid(mv[5+k]), .s_beat(mb[5+k]), .s_ready(mr[5+k]),
      .m_valid(sv[6+k]), .m_beat(sb[6+k]), .m_ready(sr[6+k]),
      .cmd(cmd[k]), .load_we(load_we[k]), .load_core, .loaded(loaded[k])
    );
  end

  // Output 15 has no sink: it never takes a beat, so routing a stream to it
  // stalls that stream.
  assign mr[15] = 1'b0;

endmodule
