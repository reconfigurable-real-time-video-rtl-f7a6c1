// Self-checking testbench for the grayscale core.
//
// Reference: luma (77R+150G+29B)/256 on all channels.
// Two 9x6 frames of pseudo-random pixels are streamed through the core. The
// first frame is sent back to back with the output always ready, and the
// cycle distance between the first accepted input and the first output must
// equal the core's latency of 6 cycles. The second frame has random input
// gaps and random output back-pressure. Every output pixel and its
// start-of-frame / end-of-line flags are compared with a reference model
// written independently in this file.
module tb_grayscale;
  import vp_pkg::*;

  localparam int W   = 9;
  localparam int H   = 6;
  localparam int FR  = 2;
  localparam int LAT = 6;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   s_valid = 1'b0;
  vbeat_t s_beat = '0;
  logic   s_ready;
  logic   m_valid;
  vbeat_t m_beat;
  logic   m_ready = 1'b1;
  cmd_t   cmd = '0;

  int   checks = 0;
  int   failures = 0;
  int   cycle = 0;
  int   t_in = -1;
  int   t_out = -1;
  rgb_t img [FR][H][W];
  bit   random_phase = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  grayscale dut (
    .clk, .rst_n, .s_valid, .s_beat, .s_ready, .m_valid, .m_beat, .m_ready
  );

  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int y_of(rgb_t p);
    return (77 * p.r + 150 * p.g + 29 * p.b) / 256;
  endfunction

  // Pixel at (y, x) of frame f for a window centred on (cy, cx): taps above
  // row 0 or left of column 0 take the centre value.
  function automatic rgb_t tap(int f, int y, int x, int cy, int cx);
    if (y < 0 || x < 0) return img[f][cy][cx];
    return img[f][y][x];
  endfunction

  function automatic rgb_t ref_px(int f, int y, int x);
    rgb_t o = img[f][y][x];
    o = '{r: 8'(y_of(o)), g: 8'(y_of(o)), b: 8'(y_of(o))};
    return o;
  endfunction

  task automatic send_cmd(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cmd = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cmd = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random back-pressure in the second frame
  always @(negedge clk) m_ready <= random_phase ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin : drive
    for (int f = 0; f < FR; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[f][y][x] = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int f = 0; f < FR; f++) begin
      random_phase = (f == 1);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          if (random_phase) while ($urandom_range(0, 2) == 0) begin
            s_valid = 1'b0;
            @(negedge clk);
          end
          s_valid = 1'b1;
          s_beat  = '{data: img[f][y][x], user: (x == 0 && y == 0), last: (x == W - 1)};
          @(posedge clk);
          while (!s_ready) @(posedge clk);
          if (t_in < 0) t_in = cycle;
          @(negedge clk);
        end
      end
    end
    s_valid = 1'b0;
  end

  initial begin : monitor
    rgb_t e;
    wait (rst_n);
    for (int f = 0; f < FR; f++) begin
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(posedge clk);
          while (!(m_valid && m_ready)) @(posedge clk);
          if (t_out < 0) t_out = cycle;
          e = ref_px(f, y, x);
          checks++;
          if (m_beat.data !== e || m_beat.user !== (x == 0 && y == 0) || m_beat.last !== (x == W - 1)) begin
            failures++;
            if (failures < 10)
              $display("mismatch f%0d (%0d,%0d): got %h u%b l%b exp %h", f, y, x,
                       m_beat.data, m_beat.user, m_beat.last, e);
          end
        end
      end
    end
    checks++;
    if (t_out - t_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", t_out - t_in, LAT);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (m_valid) begin
      failures++;
      $display("extra output beat");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
