// Self-checking testbench for vid_in_axis.
//
// Drives a small raster (6 active pixels of 10 per line, 4 active lines of
// 7, vertical sync on line 5, starting with a sync line) for three frames
// whose pixels encode frame, row and column. Every stream beat must carry the
// right pixel, start of frame on row 0 column 0 and end of line on column 5.
// Output ready drops at random but never for long, so nothing may be lost.
// The first pixel must appear 2 cycles after it was on the input. Finally the
// output is held off for two frames (48 pixels, more than the 32-entry FIFO) and the overflow flag must rise.
module tb_vid_in_axis;
  import vp_pkg::*;

  localparam int W = 6, HT = 10, H = 4, VT = 7, FR = 3;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   vid_de = 1'b0;
  logic   vid_vsync = 1'b0;
  rgb_t   vid_rgb = '0;
  logic   m_valid;
  vbeat_t m_beat;
  logic   m_ready = 1'b1;
  logic   overflow;
  int     checks = 0;
  int     failures = 0;
  int     cycle = 0;
  int     t_in = -1;
  int     t_out = -1;
  int     got = 0;
  bit     hold_off = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) m_ready <= hold_off ? 1'b0 : ($urandom_range(0, 3) != 0);

  vid_in_axis dut (.*);

  function automatic rgb_t pix(int f, int y, int x);
    return '{r: 8'(f), g: 8'(y), b: 8'(x)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int f);
    for (int l = 0; l < VT; l++)
      for (int h = 0; h < HT; h++) begin
        @(negedge clk);
        vid_de    = (l < H && h < W);
        vid_vsync = (l == 5);
        vid_rgb   = vid_de ? pix(f, l, h) : '0;
        if (vid_de && t_in < 0) t_in = cycle;
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < HT; h++) begin
      @(negedge clk);
      vid_vsync = 1'b1;
    end
    for (int f = 0; f < FR; f++) frame(f);
    repeat (20) @(negedge clk);
    checks++;
    if (got != FR * W * H || overflow) begin
      failures++;
      $display("got %0d beats, overflow %b", got, overflow);
    end
    checks++;
    if (t_out - t_in != 2) begin
      failures++;
      $display("latency %0d", t_out - t_in);
    end
    hold_off = 1'b1;
    frame(FR);
    frame(FR + 1);
    checks++;
    if (!overflow) begin
      failures++;
      $display("no overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready && got < FR * W * H) begin
      int f, y, x;
      if (t_out < 0) t_out = cycle;
      f = got / (W * H);
      y = (got / W) % H;
      x = got % W;
      checks++;
      if (m_beat.data !== pix(f, y, x) || m_beat.user !== (x == 0 && y == 0) || m_beat.last !== (x == W - 1)) begin
        failures++;
        if (failures < 10) $display("beat %0d: %h u%b l%b", got, m_beat.data, m_beat.user, m_beat.last);
      end
      got++;
    end
  end

endmodule
