// Shared types and constants of the reconfigurable video pipeline.
//
// A video beat is one pixel of an AXI4-Stream video channel: 24 bits of RGB,
// "user" marking the first pixel of a frame and "last" marking the last pixel
// of a line, as the AXI4-Stream video convention does. Valid and ready travel
// beside the beat as separate signals. The command bus carries run-time
// parameters to the filter cores: one write of a 32-bit value to a numbered
// register per cycle. The core identifiers name the sixteen library cores that
// a reconfigurable region can hold; which region classes can hold which core
// follows the placement column of the core table (S, M, L, MUX).
package vp_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    rgb_t data;
    logic user;   // start of frame
    logic last;   // end of line
  } vbeat_t;

  typedef struct packed {
    logic        we;
    logic [7:0]  addr;
    logic [31:0] data;
  } cmd_t;

  typedef enum logic [4:0] {
    CORE_NONE      = 5'd0,
    CORE_PASS      = 5'd1,
    CORE_THRESHOLD = 5'd2,
    CORE_LIMITER   = 5'd3,
    CORE_LINES     = 5'd4,
    CORE_INVERT    = 5'd5,
    CORE_GRAY      = 5'd6,
    CORE_MIRROR    = 5'd7,
    CORE_EMBOSS    = 5'd8,
    CORE_ERODE     = 5'd9,
    CORE_DILATE    = 5'd10,
    CORE_SOBEL     = 5'd11,
    CORE_KERNEL    = 5'd12,
    CORE_ASCII     = 5'd13,
    CORE_HIRAGANA  = 5'd14,
    CORE_IMAGE     = 5'd15,
    CORE_GREEN     = 5'd16
  } core_id_t;

  typedef enum logic [1:0] {
    REGION_SMALL  = 2'd0,
    REGION_MEDIUM = 2'd1,
    REGION_LARGE  = 2'd2
  } region_t;

  // Number of library cores: 12 fit a small region, 14 a medium, 15 the large.
  localparam int unsigned N_CORES = 16;

  // Whether a region of class rg can hold core c.
  function automatic logic core_fits(region_t rg, core_id_t c);
    case (c)
      CORE_PASS, CORE_THRESHOLD, CORE_LIMITER, CORE_LINES, CORE_INVERT,
      CORE_GRAY, CORE_MIRROR, CORE_EMBOSS, CORE_ERODE, CORE_DILATE,
      CORE_ASCII, CORE_HIRAGANA: return 1'b1;
      CORE_SOBEL, CORE_KERNEL:   return rg != REGION_SMALL;
      CORE_IMAGE:                return rg == REGION_LARGE;
      default:                   return 1'b0;
    endcase
  endfunction

  // Integer luma, weights 77/150/29 out of 256 (BT.601 rounded).
  function automatic logic [7:0] luma(rgb_t p);
    logic [15:0] s;
    s = 16'(p.r) * 16'd77 + 16'(p.g) * 16'd150 + 16'(p.b) * 16'd29;
    return s[15:8];
  endfunction

  function automatic logic [7:0] sat8(int v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return 8'(v);
  endfunction

endpackage
