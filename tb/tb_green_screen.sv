// Self-checking testbench for the green_screen core.
//
// Streams 200 beat pairs with random pixels, a third of the foreground pixels
// forced into the key range, and one pair in ten flagged unpaired. Random input
// gaps and output back-pressure. Reference: a paired foreground pixel whose
// R, G and B all lie inside the key range (set here through the command bus to
// R 0-40, G 150-255, B 0-40) is replaced by the background pixel, any other
// passes; flags follow the foreground. The first beat's latency must be 4
// cycles.
module tb_green_screen;
  import vp_pkg::*;

  localparam int N   = 200;
  localparam int LAT = 4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   s_valid = 1'b0;
  vbeat_t s_fg = '0;
  vbeat_t s_bg = '0;
  logic   s_paired = 1'b0;
  logic   s_ready;
  logic   m_valid;
  vbeat_t m_beat;
  logic   m_ready = 1'b1;
  cmd_t   cmd = '0;
  int     checks = 0;
  int     failures = 0;
  int     cycle = 0;
  int     t_in = -1;
  int     t_out = -1;
  int     keyed = 0;
  vbeat_t fg [N];
  vbeat_t bg [N];
  bit     pr [N];
  bit     rnd = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) m_ready <= rnd ? ($urandom_range(0, 3) != 0) : 1'b1;

  green_screen dut (
    .clk, .rst_n, .s_valid, .s_fg, .s_bg, .s_paired, .s_ready, .m_valid, .m_beat, .m_ready, .cmd
  );

  task automatic send_cmd(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cmd = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cmd = '0;
  endtask

  function automatic bit in_key(rgb_t p);
    return p.r <= 40 && p.g >= 150 && p.b <= 40;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : drive
    for (int i = 0; i < N; i++) begin
      fg[i] = '{data: 24'($urandom), user: (i % 50 == 0), last: (i % 10 == 9)};
      if ($urandom_range(0, 2) == 0) fg[i].data = '{r: 8'($urandom_range(0, 40)), g: 8'($urandom_range(150, 255)), b: 8'($urandom_range(0, 40))};
      bg[i] = '{data: 24'($urandom), user: 1'($urandom), last: 1'($urandom)};
      pr[i] = ($urandom_range(0, 9) != 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send_cmd(8'd0, 32'd0);  send_cmd(8'd1, 32'd150); send_cmd(8'd2, 32'd0);
    send_cmd(8'd3, 32'd40); send_cmd(8'd4, 32'd255); send_cmd(8'd5, 32'd40);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      rnd = (i > 20);
      if (rnd) while ($urandom_range(0, 3) == 0) begin
        s_valid = 1'b0;
        @(negedge clk);
      end
      s_valid = 1'b1; s_fg = fg[i]; s_bg = bg[i]; s_paired = pr[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      if (t_in < 0) t_in = cycle;
      @(negedge clk);
    end
    s_valid = 1'b0;
  end

  initial begin : monitor
    vbeat_t e;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      while (!(m_valid && m_ready)) @(posedge clk);
      if (t_out < 0) t_out = cycle;
      e = fg[i];
      if (pr[i] && in_key(fg[i].data)) begin
        e.data = bg[i].data;
        keyed++;
      end
      checks++;
      if (m_beat !== e) begin
        failures++;
        if (failures < 10) $display("beat %0d: got %h exp %h", i, m_beat, e);
      end
    end
    checks++;
    if (t_out - t_in != LAT) begin
      failures++;
      $display("latency %0d", t_out - t_in);
    end
    checks++;
    if (keyed == 0) failures++;
    $display("keyed pixels: %0d", keyed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
