// Full-size run of the whole pipeline at its default parameters: a 1920x1080
// raster (2200 x 1125 clocks per frame). It runs the frame-buffer set-up of
// phase 1 below and then the green-screen pipeline of phase 2, each until
// one complete output frame matches its reference.
//
// The testbench plays the processor (AXI-Lite writes), the HDMI source (a
// raster of a fixed picture with a green block), the frame buffer behind the
// VDMA ports and the monitor on the HDMI output.
//
// Phase 1, the frame-buffer set-up: region S0 is loaded with Color Limiter,
// its red cap set to 0xA0 by a command, and the switch routes HDMI_IN -> S0
// -> VDMA write; the VDMA read stream -> HDMI_OUT. The frame-buffer model
// captures whole frames and plays the last one back. Expected output: the
// input picture with red capped at 0xA0.
//
// Phase 2, the green-screen set-up: M0 gets Mirror, S1 Invert, L0 Draw Lines
// (one red line on row 3) and the Mux region Green Screen with its second
// output switched off. Routes: HDMI_IN -> M0 -> broadcaster; broadcaster
// output 0 -> Mux A, output 1 -> VDMA write; frame buffer (now playing a
// background picture) -> S1 -> Mux B; Mux output 0 -> L0 -> HDMI_OUT.
// Expected output: the mirrored input (moved down one line, first line
// black) with keyed pixels replaced by the inverted background, then the red
// line.
//
// Each phase passes when 1 consecutive complete output frames match. The
// testbench also counts each mechanism the design has: route commits, region
// loads, command writes, the Mux's stall of the frame-buffer stream, the
// broadcaster's copy to the frame buffer, the output bridge's (re)locking,
// line-buffer filtering and green-screen keying; one that never happened is
// a failure. An input FIFO overflow during phase 1 is a failure too. At full
// size the switch to phase 2 may overflow the input FIFO once: the output
// raster is still locked to the old stream and holds the new one up until it
// sees the frame start in the wrong place and resynchronises. That transient
// is reported, not failed.
module tb_vp_top_full;
  import vp_pkg::*;

  localparam int HA = 1920, HF = 88, HS = 44, HB = 148, VA = 1080, VF = 4, VS = 5, VB = 36;
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;
  localparam int NEED = 1;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        vin_de = 1'b0;
  logic        vin_vsync = 1'b0;
  rgb_t        vin_rgb = '0;
  logic        vout_de, vout_hsync, vout_vsync;
  rgb_t        vout_rgb;
  logic        vdma_s2mm_valid;
  vbeat_t      vdma_s2mm_beat;
  logic        vdma_s2mm_ready = 1'b1;
  logic        vdma_mm2s_valid = 1'b0;
  vbeat_t      vdma_mm2s_beat = '0;
  logic        vdma_mm2s_ready;
  logic [15:0] s_axil_awaddr = '0;
  logic        s_axil_awvalid = 1'b0;
  logic        s_axil_awready;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0]  s_axil_wstrb = '0;
  logic        s_axil_wvalid = 1'b0;
  logic        s_axil_wready;
  logic [1:0]  s_axil_bresp;
  logic        s_axil_bvalid;
  logic        s_axil_bready = 1'b0;
  logic [15:0] s_axil_araddr = '0;
  logic        s_axil_arvalid = 1'b0;
  logic        s_axil_arready;
  logic [31:0] s_axil_rdata;
  logic [1:0]  s_axil_rresp;
  logic        s_axil_rvalid;
  logic        s_axil_rready = 1'b0;
  logic        vin_overflow, vout_underflow, vout_locked;
  logic [31:0] mux_stall_cnt, route_commits;

  int checks = 0;
  int failures = 0;
  int n_loads = 0, n_cmds = 0, n_relock = 0, n_s2mm_p2 = 0, n_keyed = 0;
  int phase = 0;
  int good = 0;         // consecutive matching output frames
  int bad_pix = 0;      // mismatches in the current output frame
  int opix = 0;         // output pixel index within the frame
  bit fb_bg = 1'b0;     // frame buffer plays the background picture

  rgb_t img [VA][HA];   // HDMI input picture
  rgb_t bg  [VA][HA];   // background picture in the frame buffer
  rgb_t cap [VA][HA];   // frame being captured
  rgb_t fb  [VA][HA];   // last complete captured frame
  bit   have_frame = 1'b0;
  rgb_t expv [VA][HA];

  always #5 clk = ~clk;

  vp_top dut (
    .clk, .rst_n, .vin_de, .vin_vsync, .vin_rgb, .vout_de, .vout_hsync, .vout_vsync, .vout_rgb,
    .vdma_s2mm_valid, .vdma_s2mm_beat, .vdma_s2mm_ready,
    .vdma_mm2s_valid, .vdma_mm2s_beat, .vdma_mm2s_ready,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .vin_overflow, .vout_underflow, .vout_locked, .mux_stall_cnt, .route_commits
  );

  // AXI-Lite master: one transaction at a time, waits for the response.
  task automatic axil_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1;
    s_axil_wdata  = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1'b1;
    s_axil_bready = 1'b1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_bready = 1'b0;
  endtask

  task automatic axil_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1'b1; s_axil_rready = 1'b1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 1'b0;
  endtask


  function automatic bit keyed(rgb_t p);
    return p.r <= 100 && p.g >= 128 && p.b <= 100;
  endfunction

  task automatic route(input int m, input int s);
    axil_write(16'h0040 + 16'(4 * m), 32'(s));
  endtask

  task automatic load(input int slot, input core_id_t c);
    axil_write(16'h2000 + 16'(4 * slot), 32'(c));
    n_loads++;
  endtask

  task automatic fcmd(input int slot, input int r, input logic [31:0] d);
    axil_write(16'h1000 + 16'(slot * 256 + 4 * r), d);
    n_cmds++;
  endtask

  task automatic commit;
    axil_write(16'h0000, 32'h2);
  endtask

  // ---------------- HDMI source: endless raster of img ----------------
  initial begin
    wait (rst_n);
    forever
      for (int l = 0; l < VT; l++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          vin_de    = (l < VA && h < HA);
          vin_vsync = (l == VA + VF);
          vin_rgb   = vin_de ? img[l][h] : '0;
        end
  end

  // ---------------- frame buffer: capture side ----------------
  int cx = 0, cy = 0;
  always @(posedge clk) begin
    if (rst_n && vdma_s2mm_valid && vdma_s2mm_ready) begin
      if (phase == 2) n_s2mm_p2++;
      if (vdma_s2mm_beat.user) begin
        cx = 0;
        cy = 0;
      end
      if (cy < VA && cx < HA) cap[cy][cx] = vdma_s2mm_beat.data;
      if (vdma_s2mm_beat.last) begin
        if (cy == VA - 1 && cx == HA - 1) begin
          fb = cap;
          have_frame = 1'b1;
        end
        cx = 0;
        cy++;
      end else begin
        cx++;
      end
    end
  end

  // ---------------- frame buffer: playback side ----------------
  initial begin
    wait (rst_n);
    forever begin
      bit use_bg;
      @(negedge clk);
      use_bg = fb_bg;
      if (use_bg || have_frame) begin
        for (int y = 0; y < VA; y++)
          for (int x = 0; x < HA; x++) begin
            vdma_mm2s_valid = 1'b1;
            vdma_mm2s_beat  = '{data: use_bg ? bg[y][x] : fb[y][x], user: (x == 0 && y == 0), last: (x == HA - 1)};
            @(posedge clk);
            while (!vdma_mm2s_ready) @(posedge clk);
            @(negedge clk);
          end
        vdma_mm2s_valid = 1'b0;
      end
    end
  end

  // ---------------- HDMI output monitor ----------------
  logic was_locked = 1'b0;
  logic was_ovf = 1'b0, was_unf = 1'b0;
  longint cyc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (vout_locked && !was_locked) n_relock++;
      if (vin_overflow && !was_ovf) $display("input FIFO overflow at cycle %0d in phase %0d", cyc, phase);
      if (vout_underflow && !was_unf) $display("output underflow at cycle %0d in phase %0d", cyc, phase);
      was_ovf = vin_overflow;
      was_unf = vout_underflow;
      was_locked <= vout_locked;
      if (!vout_locked || vout_vsync) begin
        if (opix != 0 && opix != HA * VA) good = 0;
        opix = 0;
        bad_pix = 0;
      end
      if (vout_de && vout_locked && opix < HA * VA) begin
        if (vout_rgb !== expv[opix / HA][opix % HA]) bad_pix++;
        opix++;
        if (opix == HA * VA) begin
          if (phase > 0 && bad_pix == 0) good++;
          else good = 0;
        end
      end
    end
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired in phase %0d (good frames %0d)", phase, good);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_good(input int p);
    good = 0;
    while (good < NEED) @(posedge clk);
    checks++;
    $display("phase %0d: %0d matching output frames", p, NEED);
  endtask

  initial begin
    logic [31:0] rd;
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        // not keyed: red at least 128
        img[y][x] = '{r: 8'($urandom_range(128, 255)), g: 8'($urandom), b: 8'($urandom)};
        if (y >= VA / 4 && y < 3 * VA / 4 && x >= HA / 4 && x < HA / 2)
          img[y][x] = '{r: 8'h10, g: 8'hE0, b: 8'h10};
        bg[y][x] = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
      end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- phase 1 ----------------
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        expv[y][x] = img[y][x];
        if (expv[y][x].r > 8'hA0) expv[y][x].r = 8'hA0;
      end
    load(4, CORE_LIMITER);
    fcmd(4, 0, 32'hA0);
    route(5 + 4, 0);      // S0 <- HDMI_IN
    route(1, 6 + 4);      // VDMA write <- S0
    route(0, 1);          // HDMI_OUT <- VDMA read
    commit();
    axil_read(16'h2000 + 16'd16, rd);
    checks++;
    if (rd != 32'(CORE_LIMITER)) begin
      failures++;
      $display("core select read back %h", rd);
    end
    phase = 1;
    wait_good(1);
    checks++;
    if (vin_overflow) begin failures++; $display("input overflow in phase 1"); end

    // ---------------- phase 2 ----------------
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        rgb_t fg;
        fg = (y == 0) ? '0 : img[y - 1][HA - 1 - x];
        if (keyed(fg)) begin
          expv[y][x] = '{r: ~bg[y][x].r, g: ~bg[y][x].g, b: ~bg[y][x].b};
          n_keyed++;
        end else begin
          expv[y][x] = fg;
        end
        if (y == 3) expv[y][x] = '{r: 8'hFF, g: 8'h00, b: 8'h00};
      end
    load(1, CORE_MIRROR);
    load(5, CORE_INVERT);
    load(0, CORE_LINES);
    load(10, CORE_GREEN);
    fcmd(0, 0, 32'd3);           // horizontal line at row 3
    fcmd(0, 4, 32'd1);           // width 1
    fcmd(0, 8, 32'hFF0000);      // red
    fcmd(10, 8, 32'd1);          // Mux output 0 only
    fb_bg = 1'b1;
    route(5 + 1, 0);      // M0 <- HDMI_IN
    route(2, 6 + 1);      // broadcaster <- M0
    route(3, 2);          // Mux A <- broadcaster 0
    route(1, 3);          // VDMA write <- broadcaster 1
    route(5 + 5, 1);      // S1 <- VDMA read
    route(4, 6 + 5);      // Mux B <- S1
    route(5 + 0, 4);      // L0 <- Mux 0
    route(0, 6 + 0);      // HDMI_OUT <- L0
    axil_write(16'h0040 + 16'(4 * (5 + 4)), 32'h8000_0000);  // S0 off
    commit();
    phase = 2;
    wait_good(2);

    // ---------------- mechanisms ----------------
    checks++;
    if (route_commits < 2) begin failures++; $display("route commits %0d", route_commits); end
    checks++;
    if (n_loads < 5) begin failures++; $display("loads %0d", n_loads); end
    checks++;
    if (n_cmds < 5) begin failures++; $display("commands %0d", n_cmds); end
    checks++;
    if (mux_stall_cnt == 0) begin failures++; $display("Mux never stalled the frame-buffer stream"); end
    checks++;
    if (n_s2mm_p2 == 0) begin failures++; $display("broadcaster copy never reached the frame buffer"); end
    checks++;
    if (n_relock < 2) begin failures++; $display("output locked %0d times", n_relock); end
    checks++;
    if (n_keyed == 0) begin failures++; $display("no keyed pixels"); end
    $display("commits %0d, loads %0d, commands %0d, mux stall cycles %0d, frame-buffer beats in phase 2 %0d, locks %0d, keyed pixels %0d",
             route_commits, n_loads, n_cmds, mux_stall_cnt, n_s2mm_p2, n_relock, n_keyed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
