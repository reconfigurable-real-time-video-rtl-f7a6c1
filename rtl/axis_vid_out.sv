// AXI4-Stream to video output bridge with its own timing generator.
//
// A free-running raster counter produces data enable, horizontal and vertical
// sync (active high) for a frame of H_ACTIVE x V_ACTIVE pixels with the given
// porches and sync widths; the defaults are the standard 1920x1080 raster.
// The raster is started by the stream, so that a live input can reach the
// output without a frame buffer (the output then runs on the input's pixel
// timing, shifted by the pipeline latency): while unlocked the raster stands
// at its first active pixel with all outputs low, beats other than a start of
// frame are discarded, and the first start-of-frame beat is shown there,
// locks the bridge and sets the raster running. While locked one beat is
// consumed per active pixel. A missing beat gives a
// black pixel and sets the sticky underflow flag; a start of frame that does
// not coincide with the raster's, or a first pixel without one, drops the lock
// so that the next frame starts cleanly. The locking rules are this design's;
// only the bridge's purpose is part of the design description. Outputs are
// registered: a pixel consumed in cycle t is on vid_rgb in cycle t+1, together
// with the matching enable and syncs.
module axis_vid_out
  import vp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned H_FP     = 88,
  parameter int unsigned H_SYNC   = 44,
  parameter int unsigned H_BP     = 148,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned V_FP     = 4,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 36
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  input  vbeat_t s_beat,
  output logic   s_ready,
  output logic   vid_de,
  output logic   vid_hsync,
  output logic   vid_vsync,
  output rgb_t   vid_rgb,
  output logic   locked,
  output logic   underflow
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          active, first, hs, vs;
  logic          take, bad_sync;

  assign active = (hcnt < HW'(H_ACTIVE)) && (vcnt < VW'(V_ACTIVE));
  assign first  = (hcnt == '0) && (vcnt == '0);
  assign hs     = (hcnt >= HW'(H_ACTIVE + H_FP)) && (hcnt < HW'(H_ACTIVE + H_FP + H_SYNC));
  assign vs     = (vcnt >= VW'(V_ACTIVE + V_FP)) && (vcnt < VW'(V_ACTIVE + V_FP + V_SYNC));

  // Lost synchronisation: frame start seen at the wrong place or missing.
  assign bad_sync = locked && active && s_valid && (s_beat.user != first);

  always_comb begin
    if (!locked) s_ready = !s_beat.user || first;
    else         s_ready = active && !bad_sync;
  end
  assign take = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcnt      <= '0;
      vcnt      <= '0;
      locked    <= 1'b0;
      underflow <= 1'b0;
      vid_de    <= 1'b0;
      vid_hsync <= 1'b0;
      vid_vsync <= 1'b0;
      vid_rgb   <= '0;
    end else begin
      if (!locked && !(take && s_beat.user)) begin
        hcnt <= '0;
        vcnt <= '0;
      end else if (hcnt == HW'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == VW'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
      if (!locked && take && s_beat.user && first) locked <= 1'b1;
      else if (bad_sync)                           locked <= 1'b0;
      if (locked && active && !s_valid)            underflow <= 1'b1;
      vid_de    <= active && (locked || (take && s_beat.user));
      vid_hsync <= hs && locked;
      vid_vsync <= vs && locked;
      vid_rgb   <= (active && take && (locked || s_beat.user)) ? s_beat.data : '0;
    end
  end

endmodule
