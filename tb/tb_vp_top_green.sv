// End-to-end run of the green-screen overlay pipeline, all eleven regions in
// use, on a reduced 24x12 raster (36 x 16 clocks per frame); every other
// parameter keeps its default.
//
// Background chain, from a frame-buffer picture: Invert (S0), ASCII text
// (S1), Draw Lines (S2) into Mux input B. Live chain, from the HDMI input:
// Mirror (M0), Hiragana text (S3), Draw Lines (S4) into Mux input A. The Mux
// region keys the live picture over the background with Green Screen; its
// result goes through Emboss (M1), Color Limiter (S5), ASCII text (M2) and
// Image Overlay (L0, the only region large enough) to the HDMI output. The
// broadcaster is not used. Each core gets its own settings and the three
// text cores their own glyphs and strings. The expected picture is computed
// here stage by stage from the cores' arithmetic and edge rules. The test
// passes when NEED consecutive complete output frames match it, with keyed
// pixels present, the Mux having held the frame-buffer stream at least once,
// and all loads, parameter writes and the commit done.
module tb_vp_top_green;
  import vp_pkg::*;

  localparam int HA = 24, HF = 2, HS = 4, HB = 6, VA = 12, VF = 1, VS = 1, VB = 2;
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;
  localparam int NEED = 2;

  typedef rgb_t frame_t [VA][HA];

  // one text set-up: position, scale, colour, string of two codes
  typedef struct {
    int x, y, s;
    logic [23:0] colour;
    int c0, c1;
  } text_t;

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


  bit src_on = 1'b0;
  int checks = 0;
  int failures = 0;
  int n_loads = 0, n_cmds = 0, n_keyed = 0;
  int good = 0, bad_pix = 0, opix = 0;
  int n_msg = 0;       // mismatch messages printed
  frame_t img, bg, expv;

  always #5 clk = ~clk;

  vp_top #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)
  ) dut (
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
    wait (src_on);
    forever
      for (int l = 0; l < VT; l++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          vin_de    = (l < VA && h < HA);
          vin_vsync = (l == VA + VF);
          vin_rgb   = vin_de ? img[l][h] : '0;
        end
  end


  // ---------------- frame buffer: plays the background picture ----------------
  initial begin
    wait (rst_n);
    forever
      for (int y = 0; y < VA; y++)
        for (int x = 0; x < HA; x++) begin
          @(negedge clk);
          vdma_mm2s_valid = 1'b1;
          vdma_mm2s_beat  = '{data: bg[y][x], user: (x == 0 && y == 0), last: (x == HA - 1)};
          @(posedge clk);
          while (!vdma_mm2s_ready) @(posedge clk);
        end
  end

  // ---------------- reference model ----------------
  function automatic rgb_t tap(frame_t f, int r, int c, int dr, int dc);
    int y = r - 2 + dr;
    int x = c - 2 + dc;
    if (y < 0 || x < 0) return f[r - 1][c - 1];
    return f[y][x];
  endfunction

  function automatic logic [7:0] ch(rgb_t p, int k);
    return (k == 0) ? p.r : (k == 1) ? p.g : p.b;
  endfunction


  function automatic logic [7:0] glyph_row(int code, int row);
    return 8'((code * 13 + row * 29 + 7) & 255);
  endfunction

  task automatic ref_text(input frame_t i, input text_t t, output frame_t o);
    o = i;
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++)
        if (c >= t.x && r >= t.y && ((r - t.y) >> (3 + t.s)) == 0 && ((c - t.x) >> (3 + t.s)) < 2) begin
          int code = (((c - t.x) >> (3 + t.s)) == 0) ? t.c0 : t.c1;
          logic [7:0] g = glyph_row(code, ((r - t.y) >> t.s) & 7);
          if (g[7 - (((c - t.x) >> t.s) & 7)]) o[r][c] = t.colour;
        end
  endtask

  task automatic load_text(input int slot, input text_t t);
    for (int k = 0; k < 2; k++) begin
      int code = (k == 0) ? t.c0 : t.c1;
      for (int r = 0; r < 8; r++)
        fcmd(slot, 6, (32'(code) << 16) | (32'(r) << 8) | 32'(glyph_row(code, r)));
      fcmd(slot, 5, (32'(k) << 16) | 32'(code));
    end
    fcmd(slot, 0, 32'(t.x));
    fcmd(slot, 1, 32'(t.y));
    fcmd(slot, 2, 32'(t.s));
    fcmd(slot, 3, 32'(t.colour));
    fcmd(slot, 4, 32'd2);
  endtask

  // horizontal band at row hr (width 1) and vertical band at column vc (width 2)
  task automatic ref_lines(input frame_t i, input int hr, input int vc, input logic [23:0] col,
                           output frame_t o);
    o = i;
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++)
        if (r == hr || c == vc || c == vc + 1) o[r][c] = col;
  endtask

  task automatic load_lines(input int slot, input int hr, input int vc, input logic [23:0] col);
    fcmd(slot, 0, 32'(hr));
    fcmd(slot, 4, 32'd1);
    fcmd(slot, 2, 32'(vc));
    fcmd(slot, 6, 32'd2);
    fcmd(slot, 8, 32'(col));
  endtask

  // ---------------- HDMI output monitor ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (!vout_locked || vout_vsync) begin
        if (opix != 0 && opix != HA * VA) good = 0;
        opix = 0;
        bad_pix = 0;
      end
      if (vout_de && vout_locked && opix < HA * VA) begin
        if (vout_rgb !== expv[opix / HA][opix % HA]) begin
          bad_pix++;
          if (n_msg < 12) begin
            n_msg++;
            $display("row %0d col %0d: got %h expected %h", opix / HA, opix % HA, vout_rgb,
                     expv[opix / HA][opix % HA]);
          end
        end
        opix++;
        if (opix == HA * VA) begin
          if (bad_pix == 0) good++;
          else good = 0;
        end
      end
    end
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired (good frames %0d)", good);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t a, b, t;
    text_t t_bg  = '{x: 1, y: 1, s: 0, colour: 24'h20_40_FF, c0: 72, c1: 105};
    text_t t_fg  = '{x: 8, y: 3, s: 0, colour: 24'h00_00_FF, c0: 30, c1: 41};
    text_t t_out = '{x: 2, y: 0, s: 1, colour: 24'hFF_FF_FF, c0: 80, c1: 81};
    // live picture: warm noise with a green-screen block; background: random
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        img[y][x] = '{r: 8'($urandom_range(130, 255)), g: 8'($urandom), b: 8'($urandom)};
        if (y >= 2 && y < 10 && x >= 6 && x < 18)
          img[y][x] = '{r: 8'($urandom_range(0, 90)), g: 8'($urandom_range(140, 255)), b: 8'($urandom_range(0, 90))};
        bg[y][x] = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
      end
    // background chain
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) t[y][x] = '{r: ~bg[y][x].r, g: ~bg[y][x].g, b: ~bg[y][x].b};
    ref_text(t, t_bg, b);
    ref_lines(b, 9, 20, 24'h80_00_80, t);
    b = t;
    // live chain
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) t[y][x] = (y == 0) ? '0 : img[y - 1][HA - 1 - x];
    ref_text(t, t_fg, a);
    ref_lines(a, 1, 3, 24'hFF_FF_00, t);
    a = t;
    // green screen (reset key range R 0-100, G 128-255, B 0-100)
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++)
        if (a[y][x].r <= 100 && a[y][x].g >= 128 && a[y][x].b <= 100) begin
          t[y][x] = b[y][x];
          n_keyed++;
        end else begin
          t[y][x] = a[y][x];
        end
    // emboss: centre - upper-left + 128
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        a[y][x] = '0;
        if (y > 0 && x > 0) begin
          rgb_t cp, ul;
          cp = tap(t, y, x, 1, 1);
          ul = tap(t, y, x, 0, 0);
          a[y][x] = '{r: sat8(int'(cp.r) - int'(ul.r) + 128), g: sat8(int'(cp.g) - int'(ul.g) + 128),
                      b: sat8(int'(cp.b) - int'(ul.b) + 128)};
        end
      end
    // colour limiter: red at most 0xC0, blue at most 0xB0
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        if (a[y][x].r > 8'hC0) a[y][x].r = 8'hC0;
        if (a[y][x].b > 8'hB0) a[y][x].b = 8'hB0;
      end
    ref_text(a, t_out, t);
    // image overlay at (14, 5), default picture
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        expv[y][x] = t[y][x];
        if (x >= 14 && y >= 5) begin
          int dx, dy;
          dx = x - 14;
          dy = y - 5;
          expv[y][x] = '{r: 8'(dx * 256 / 128), g: 8'(dy * 256 / 128),
                         b: (((dx / 16) + (dy / 16)) % 2 == 1) ? 8'hFF : 8'h00};
        end
      end

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    load(4, CORE_INVERT);
    load(5, CORE_ASCII);
    load(6, CORE_LINES);
    load(1, CORE_MIRROR);
    load(7, CORE_HIRAGANA);
    load(8, CORE_LINES);
    load(10, CORE_GREEN);
    load(2, CORE_EMBOSS);
    load(9, CORE_LIMITER);
    load(3, CORE_ASCII);
    load(0, CORE_IMAGE);
    load_text(5, t_bg);
    load_lines(6, 9, 20, 24'h80_00_80);
    load_text(7, t_fg);
    load_lines(8, 1, 3, 24'hFF_FF_00);
    fcmd(10, 8, 32'd1);          // Mux output 0 only
    fcmd(9, 0, 32'hC0);
    fcmd(9, 2, 32'hB0);
    load_text(3, t_out);
    fcmd(0, 0, 32'd14);
    fcmd(0, 1, 32'd5);
    route(5 + 4, 1);      // S0 Invert     <- frame buffer
    route(5 + 5, 6 + 4);  // S1 ASCII      <- S0
    route(5 + 6, 6 + 5);  // S2 Lines      <- S1
    route(4, 6 + 6);      // Mux B         <- S2
    route(5 + 1, 0);      // M0 Mirror     <- HDMI_IN
    route(5 + 7, 6 + 1);  // S3 Hiragana   <- M0
    route(5 + 8, 6 + 7);  // S4 Lines      <- S3
    route(3, 6 + 8);      // Mux A         <- S4
    route(5 + 2, 4);      // M1 Emboss     <- Mux 0
    route(5 + 9, 6 + 2);  // S5 Limiter    <- M1
    route(5 + 3, 6 + 9);  // M2 ASCII      <- S5
    route(5 + 0, 6 + 3);  // L0 Image      <- M2
    route(0, 6 + 0);      // HDMI_OUT      <- L0
    commit();
    src_on = 1'b1;

    good = 0;
    while (good < NEED) @(posedge clk);
    checks++;
    $display("%0d matching output frames, %0d keyed pixels each, mux stall cycles %0d",
             NEED, n_keyed, mux_stall_cnt);
    checks++;
    if (n_keyed == 0) begin failures++; $display("no keyed pixels"); end
    checks++;
    if (mux_stall_cnt == 0) begin failures++; $display("Mux never held the frame-buffer stream"); end
    checks++;
    if (n_loads != 11 || route_commits != 1) begin
      failures++;
      $display("loads %0d, commits %0d", n_loads, route_commits);
    end
    checks++;
    if (vin_overflow) begin failures++; $display("input overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
