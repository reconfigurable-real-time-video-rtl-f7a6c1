// A basic reconfigurable region: one slot of the pipeline that can hold any
// library core of its size class.
//
// On the FPGA a region is reprogrammed with a partial bitstream. In RTL the
// region instead contains every core its class can hold (small: 12 cores,
// medium: those plus Sobel and Kernel 3x3, large: those plus Image Overlay)
// and a core-select register picks the active one. Loading a core (load_we
// with load_core) selects it and holds the region's cores in reset for one
// cycle, as a freshly configured region would start from reset; a core the
// class cannot hold leaves the region empty. An empty region neither accepts
// nor produces beats. Inactive cores see no input beats, and the command bus
// reaches only the active core. The stream passes straight through the
// selection, so the region adds no delay of its own: the latency is the
// active core's. Interface: AXI4-Stream video in and out, command bus, load
// port, and the loaded core for read-back.
module prr_slot
  import vp_pkg::*;
#(
  parameter region_t     REGION    = REGION_SMALL,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     s_valid,
  input  vbeat_t   s_beat,
  output logic     s_ready,
  output logic     m_valid,
  output vbeat_t   m_beat,
  input  logic     m_ready,
  input  cmd_t     cmd,
  input  logic     load_we,
  input  core_id_t load_core,
  output core_id_t loaded
);

  logic   cv [N_CORES];
  logic   cr [N_CORES];
  logic   mv [N_CORES];
  vbeat_t mb [N_CORES];
  logic   mr [N_CORES];
  cmd_t   ccmd;
  logic   load_q, core_rst_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loaded <= CORE_NONE;
      load_q <= 1'b0;
    end else begin
      load_q <= load_we;
      if (load_we) loaded <= core_fits(REGION, load_core) ? load_core : CORE_NONE;
    end
  end

  assign core_rst_n = rst_n && !load_q;

  always_comb begin
    ccmd    = cmd;
    ccmd.we = cmd.we && loaded != CORE_NONE;
    for (int c = 0; c < N_CORES; c++) begin
      cv[c] = s_valid && loaded == core_id_t'(c);
      mr[c] = m_ready && loaded == core_id_t'(c);
    end
  end

  assign s_ready = cr[loaded[3:0]] && loaded != CORE_NONE && !loaded[4];
  assign m_valid = mv[loaded[3:0]] && loaded != CORE_NONE && !loaded[4];
  assign m_beat  = mb[loaded[3:0]];

  // Slot 0 of the arrays stands for "no core".
  assign cr[0] = 1'b0;
  assign mv[0] = 1'b0;
  assign mb[0] = '0;

  if (core_fits(REGION, CORE_PASS)) begin : g_pass_filter
    pass_filter u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_PASS)]), .s_beat, .s_ready(cr[4'(CORE_PASS)]),
      .m_valid(mv[4'(CORE_PASS)]), .m_beat(mb[4'(CORE_PASS)]), .m_ready(mr[4'(CORE_PASS)])
    );
  end else begin : g_no_pass_filter
    assign cr[4'(CORE_PASS)] = 1'b0;
    assign mv[4'(CORE_PASS)] = 1'b0;
    assign mb[4'(CORE_PASS)] = '0;
  end

  if (core_fits(REGION, CORE_THRESHOLD)) begin : g_threshold
    threshold u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_THRESHOLD)]), .s_beat, .s_ready(cr[4'(CORE_THRESHOLD)]),
      .m_valid(mv[4'(CORE_THRESHOLD)]), .m_beat(mb[4'(CORE_THRESHOLD)]), .m_ready(mr[4'(CORE_THRESHOLD)]), .cmd(ccmd)
    );
  end else begin : g_no_threshold
    assign cr[4'(CORE_THRESHOLD)] = 1'b0;
    assign mv[4'(CORE_THRESHOLD)] = 1'b0;
    assign mb[4'(CORE_THRESHOLD)] = '0;
  end

  if (core_fits(REGION, CORE_LIMITER)) begin : g_color_limiter
    color_limiter u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_LIMITER)]), .s_beat, .s_ready(cr[4'(CORE_LIMITER)]),
      .m_valid(mv[4'(CORE_LIMITER)]), .m_beat(mb[4'(CORE_LIMITER)]), .m_ready(mr[4'(CORE_LIMITER)]), .cmd(ccmd)
    );
  end else begin : g_no_color_limiter
    assign cr[4'(CORE_LIMITER)] = 1'b0;
    assign mv[4'(CORE_LIMITER)] = 1'b0;
    assign mb[4'(CORE_LIMITER)] = '0;
  end

  if (core_fits(REGION, CORE_LINES)) begin : g_draw_lines
    draw_lines #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_LINES)]), .s_beat, .s_ready(cr[4'(CORE_LINES)]),
      .m_valid(mv[4'(CORE_LINES)]), .m_beat(mb[4'(CORE_LINES)]), .m_ready(mr[4'(CORE_LINES)]), .cmd(ccmd)
    );
  end else begin : g_no_draw_lines
    assign cr[4'(CORE_LINES)] = 1'b0;
    assign mv[4'(CORE_LINES)] = 1'b0;
    assign mb[4'(CORE_LINES)] = '0;
  end

  if (core_fits(REGION, CORE_INVERT)) begin : g_invert
    invert u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_INVERT)]), .s_beat, .s_ready(cr[4'(CORE_INVERT)]),
      .m_valid(mv[4'(CORE_INVERT)]), .m_beat(mb[4'(CORE_INVERT)]), .m_ready(mr[4'(CORE_INVERT)])
    );
  end else begin : g_no_invert
    assign cr[4'(CORE_INVERT)] = 1'b0;
    assign mv[4'(CORE_INVERT)] = 1'b0;
    assign mb[4'(CORE_INVERT)] = '0;
  end

  if (core_fits(REGION, CORE_GRAY)) begin : g_grayscale
    grayscale u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_GRAY)]), .s_beat, .s_ready(cr[4'(CORE_GRAY)]),
      .m_valid(mv[4'(CORE_GRAY)]), .m_beat(mb[4'(CORE_GRAY)]), .m_ready(mr[4'(CORE_GRAY)])
    );
  end else begin : g_no_grayscale
    assign cr[4'(CORE_GRAY)] = 1'b0;
    assign mv[4'(CORE_GRAY)] = 1'b0;
    assign mb[4'(CORE_GRAY)] = '0;
  end

  if (core_fits(REGION, CORE_MIRROR)) begin : g_mirror
    mirror #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_MIRROR)]), .s_beat, .s_ready(cr[4'(CORE_MIRROR)]),
      .m_valid(mv[4'(CORE_MIRROR)]), .m_beat(mb[4'(CORE_MIRROR)]), .m_ready(mr[4'(CORE_MIRROR)])
    );
  end else begin : g_no_mirror
    assign cr[4'(CORE_MIRROR)] = 1'b0;
    assign mv[4'(CORE_MIRROR)] = 1'b0;
    assign mb[4'(CORE_MIRROR)] = '0;
  end

  if (core_fits(REGION, CORE_EMBOSS)) begin : g_emboss
    emboss #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_EMBOSS)]), .s_beat, .s_ready(cr[4'(CORE_EMBOSS)]),
      .m_valid(mv[4'(CORE_EMBOSS)]), .m_beat(mb[4'(CORE_EMBOSS)]), .m_ready(mr[4'(CORE_EMBOSS)])
    );
  end else begin : g_no_emboss
    assign cr[4'(CORE_EMBOSS)] = 1'b0;
    assign mv[4'(CORE_EMBOSS)] = 1'b0;
    assign mb[4'(CORE_EMBOSS)] = '0;
  end

  if (core_fits(REGION, CORE_ERODE)) begin : g_erode
    erode #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_ERODE)]), .s_beat, .s_ready(cr[4'(CORE_ERODE)]),
      .m_valid(mv[4'(CORE_ERODE)]), .m_beat(mb[4'(CORE_ERODE)]), .m_ready(mr[4'(CORE_ERODE)])
    );
  end else begin : g_no_erode
    assign cr[4'(CORE_ERODE)] = 1'b0;
    assign mv[4'(CORE_ERODE)] = 1'b0;
    assign mb[4'(CORE_ERODE)] = '0;
  end

  if (core_fits(REGION, CORE_DILATE)) begin : g_dilate
    dilate #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_DILATE)]), .s_beat, .s_ready(cr[4'(CORE_DILATE)]),
      .m_valid(mv[4'(CORE_DILATE)]), .m_beat(mb[4'(CORE_DILATE)]), .m_ready(mr[4'(CORE_DILATE)])
    );
  end else begin : g_no_dilate
    assign cr[4'(CORE_DILATE)] = 1'b0;
    assign mv[4'(CORE_DILATE)] = 1'b0;
    assign mb[4'(CORE_DILATE)] = '0;
  end

  if (core_fits(REGION, CORE_SOBEL)) begin : g_sobel
    sobel #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_SOBEL)]), .s_beat, .s_ready(cr[4'(CORE_SOBEL)]),
      .m_valid(mv[4'(CORE_SOBEL)]), .m_beat(mb[4'(CORE_SOBEL)]), .m_ready(mr[4'(CORE_SOBEL)])
    );
  end else begin : g_no_sobel
    assign cr[4'(CORE_SOBEL)] = 1'b0;
    assign mv[4'(CORE_SOBEL)] = 1'b0;
    assign mb[4'(CORE_SOBEL)] = '0;
  end

  if (core_fits(REGION, CORE_KERNEL)) begin : g_kernel3x3
    kernel3x3 #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_KERNEL)]), .s_beat, .s_ready(cr[4'(CORE_KERNEL)]),
      .m_valid(mv[4'(CORE_KERNEL)]), .m_beat(mb[4'(CORE_KERNEL)]), .m_ready(mr[4'(CORE_KERNEL)]), .cmd(ccmd)
    );
  end else begin : g_no_kernel3x3
    assign cr[4'(CORE_KERNEL)] = 1'b0;
    assign mv[4'(CORE_KERNEL)] = 1'b0;
    assign mb[4'(CORE_KERNEL)] = '0;
  end

  if (core_fits(REGION, CORE_ASCII)) begin : g_ascii_overlay
    ascii_overlay #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_ASCII)]), .s_beat, .s_ready(cr[4'(CORE_ASCII)]),
      .m_valid(mv[4'(CORE_ASCII)]), .m_beat(mb[4'(CORE_ASCII)]), .m_ready(mr[4'(CORE_ASCII)]), .cmd(ccmd)
    );
  end else begin : g_no_ascii_overlay
    assign cr[4'(CORE_ASCII)] = 1'b0;
    assign mv[4'(CORE_ASCII)] = 1'b0;
    assign mb[4'(CORE_ASCII)] = '0;
  end

  if (core_fits(REGION, CORE_HIRAGANA)) begin : g_hiragana_overlay
    hiragana_overlay #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_HIRAGANA)]), .s_beat, .s_ready(cr[4'(CORE_HIRAGANA)]),
      .m_valid(mv[4'(CORE_HIRAGANA)]), .m_beat(mb[4'(CORE_HIRAGANA)]), .m_ready(mr[4'(CORE_HIRAGANA)]), .cmd(ccmd)
    );
  end else begin : g_no_hiragana_overlay
    assign cr[4'(CORE_HIRAGANA)] = 1'b0;
    assign mv[4'(CORE_HIRAGANA)] = 1'b0;
    assign mb[4'(CORE_HIRAGANA)] = '0;
  end

  if (core_fits(REGION, CORE_IMAGE)) begin : g_image_overlay
    image_overlay #(.MAX_WIDTH(MAX_WIDTH)) u_core (
      .clk, .rst_n(core_rst_n), .s_valid(cv[4'(CORE_IMAGE)]), .s_beat, .s_ready(cr[4'(CORE_IMAGE)]),
      .m_valid(mv[4'(CORE_IMAGE)]), .m_beat(mb[4'(CORE_IMAGE)]), .m_ready(mr[4'(CORE_IMAGE)]), .cmd(ccmd)
    );
  end else begin : g_no_image_overlay
    assign cr[4'(CORE_IMAGE)] = 1'b0;
    assign mv[4'(CORE_IMAGE)] = 1'b0;
    assign mb[4'(CORE_IMAGE)] = '0;
  end

endmodule
