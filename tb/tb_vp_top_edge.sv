// End-to-end run of the edge-detection pipeline on a reduced 24x12 raster
// (36 x 16 clocks per frame); every other parameter keeps its default.
//
// Seven regions are loaded and chained between the HDMI input and output,
// without the frame buffer: Grayscale (S0), Kernel 3x3 set to a blur (M0),
// Threshold (S1), Erode (S2), Dilate (S3), Sobel (M1), Kernel 3x3 set to a
// sharpen (M2). The Sobel and Kernel cores need the medium regions. The
// expected picture is computed here stage by stage with the cores'
// arithmetic and edge rules (a 3x3 neighbourhood is centred one line and one
// pixel behind, output row 0 and column 0 are black, taps above the top row
// or left of the left column take the centre pixel). The test passes when
// NEED consecutive complete output frames match it, the output contains both
// edge and non-edge pixels, and the loads, parameter writes and the commit
// all took place.
module tb_vp_top_edge;
  import vp_pkg::*;

  localparam int HA = 24, HF = 2, HS = 4, HB = 6, VA = 12, VF = 1, VS = 1, VB = 2;
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;
  localparam int NEED = 2;
  localparam logic [7:0] THR = 8'd100;

  typedef rgb_t frame_t [VA][HA];

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


  bit src_on = 1'b0;  // HDMI source starts once the pipeline is set up
  int checks = 0;
  int failures = 0;
  int n_loads = 0, n_cmds = 0;
  int good = 0, bad_pix = 0, opix = 0;
  int n_white = 0, n_dark = 0;
  frame_t img, expv;

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

  task automatic ref_gray(input frame_t i, output frame_t o);
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) begin
        logic [7:0] y = luma(i[r][c]);
        o[r][c] = '{r: y, g: y, b: y};
      end
  endtask

  task automatic ref_thr(input frame_t i, output frame_t o);
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++)
        o[r][c] = (luma(i[r][c]) >= THR) ? 24'hFFFFFF : 24'h000000;
  endtask

  // kind 0 kernel, 1 erode, 2 dilate, 3 sobel
  task automatic ref_win(input frame_t i, input int kind, input int kk[9], input int sh,
                         output frame_t o);
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) begin
        o[r][c] = '0;
        if (r > 0 && c > 0) begin
          if (kind == 3) begin
            int l[3][3];
            int gx, gy, m;
            for (int a = 0; a < 3; a++)
              for (int b = 0; b < 3; b++) l[a][b] = int'(luma(tap(i, r, c, a, b)));
            gx = l[0][2] + 2 * l[1][2] + l[2][2] - l[0][0] - 2 * l[1][0] - l[2][0];
            gy = l[2][0] + 2 * l[2][1] + l[2][2] - l[0][0] - 2 * l[0][1] - l[0][2];
            m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
            o[r][c] = '{r: sat8(m), g: sat8(m), b: sat8(m)};
          end else begin
            logic [7:0] v [3];
            for (int k = 0; k < 3; k++) begin
              int acc = (kind == 1) ? 255 : 0;
              for (int a = 0; a < 3; a++)
                for (int b = 0; b < 3; b++) begin
                  int p = int'(ch(tap(i, r, c, a, b), k));
                  if (kind == 0) acc += kk[3 * a + b] * p;
                  else if (kind == 1) acc = (p < acc) ? p : acc;
                  else acc = (p > acc) ? p : acc;
                end
              if (kind == 0) acc = acc >>> sh;
              v[k] = sat8(acc);
            end
            o[r][c] = '{r: v[0], g: v[1], b: v[2]};
          end
        end
      end
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
        if (vout_rgb !== expv[opix / HA][opix % HA]) bad_pix++;
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
    frame_t t0, t1;
    int blur[9]    = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    int sharpen[9] = '{0, -1, 0, -1, 5, -1, 0, -1, 0};
    int none[9]    = '{0, 0, 0, 0, 0, 0, 0, 0, 0};
    // picture: dim noisy background with a bright square and a bright bar
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        logic [7:0] v;
        v = 8'($urandom_range(10, 70));
        if ((y >= 3 && y < 9 && x >= 5 && x < 13) || (x >= 17 && x < 20))
          v = 8'($urandom_range(180, 250));
        img[y][x] = '{r: v, g: 8'(v + 8'($urandom_range(0, 5))), b: v};
      end
    ref_gray(img, t0);
    ref_win(t0, 0, blur, 4, t1);
    ref_thr(t1, t0);
    ref_win(t0, 1, none, 0, t1);
    ref_win(t1, 2, none, 0, t0);
    ref_win(t0, 3, none, 0, t1);
    ref_win(t1, 0, sharpen, 0, expv);
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++)
        if (expv[y][x].r > 128) n_white++;
        else n_dark++;

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    load(4, CORE_GRAY);
    load(1, CORE_KERNEL);
    load(5, CORE_THRESHOLD);
    load(6, CORE_ERODE);
    load(7, CORE_DILATE);
    load(2, CORE_SOBEL);
    load(3, CORE_KERNEL);
    for (int i = 0; i < 9; i++) fcmd(1, i, 32'(blur[i]) & 32'hFF);
    fcmd(1, 9, 32'd4);
    fcmd(5, 0, 32'(THR));
    for (int i = 0; i < 9; i++) fcmd(3, i, 32'(sharpen[i]) & 32'hFF);
    fcmd(3, 9, 32'd0);
    route(5 + 4, 0);      // S0 Grayscale  <- HDMI_IN
    route(5 + 1, 6 + 4);  // M0 blur       <- S0
    route(5 + 5, 6 + 1);  // S1 Threshold  <- M0
    route(5 + 6, 6 + 5);  // S2 Erode      <- S1
    route(5 + 7, 6 + 6);  // S3 Dilate     <- S2
    route(5 + 2, 6 + 7);  // M1 Sobel      <- S3
    route(5 + 3, 6 + 2);  // M2 sharpen    <- M1
    route(0, 6 + 3);      // HDMI_OUT      <- M2
    commit();
    src_on = 1'b1;

    good = 0;
    while (good < NEED) @(posedge clk);
    checks++;
    $display("%0d matching output frames (%0d edge, %0d flat pixels each)", NEED, n_white, n_dark);
    checks++;
    if (n_white == 0 || n_dark == 0) begin failures++; $display("degenerate reference picture"); end
    checks++;
    if (n_loads != 7 || n_cmds != 21 || route_commits != 1) begin
      failures++;
      $display("loads %0d, commands %0d, commits %0d", n_loads, n_cmds, route_commits);
    end
    checks++;
    if (vin_overflow) begin failures++; $display("input overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
