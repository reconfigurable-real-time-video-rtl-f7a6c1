// Self-checking testbench for prr_slot (a small region).
//
// Checks that the region starts empty and takes no beats, that loading Invert
// makes it invert a stream with Invert's 2-cycle latency, that loading Sobel
// (a medium-region core) leaves a small region empty, and that after loading
// Color Limiter a command write reaches the new core (red capped at 0x10)
// with the limiter's 3-cycle latency. Output back-pressure is random.
module tb_prr_slot;
  import vp_pkg::*;

  localparam int N = 40;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     s_valid = 1'b0;
  vbeat_t   s_beat = '0;
  logic     s_ready;
  logic     m_valid;
  vbeat_t   m_beat;
  logic     m_ready = 1'b1;
  cmd_t     cmd = '0;
  logic     load_we = 1'b0;
  core_id_t load_core = CORE_NONE;
  core_id_t loaded;
  int       checks = 0;
  int       failures = 0;
  int       cycle = 0;
  bit       rnd = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) m_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;

  prr_slot dut (.*);

  task automatic load(input core_id_t c);
    @(negedge clk);
    load_we = 1'b1; load_core = c;
    @(negedge clk);
    load_we = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  // Streams N beats; mode 0 expects inversion, mode 1 red capped at 0x10.
  task automatic run(input int mode, input int lat);
    vbeat_t in [N];
    int t_in, t_out;
    t_in = -1; t_out = -1;
    for (int i = 0; i < N; i++) in[i] = '{data: 24'($urandom), user: (i == 0), last: (i % 8 == 7)};
    fork
      begin
        for (int i = 0; i < N; i++) begin
          rnd = (i > 0);
          s_valid = 1'b1; s_beat = in[i];
          @(posedge clk);
          while (!s_ready) @(posedge clk);
          if (t_in < 0) t_in = cycle;
          @(negedge clk);
        end
        s_valid = 1'b0;
      end
      begin
        for (int i = 0; i < N; i++) begin
          vbeat_t e;
          @(posedge clk);
          while (!(m_valid && m_ready)) @(posedge clk);
          if (t_out < 0) t_out = cycle;
          e = in[i];
          if (mode == 0) e.data = ~in[i].data;
          else if (e.data.r > 8'h10) e.data.r = 8'h10;
          checks++;
          if (m_beat !== e) begin
            failures++;
            if (failures < 10) $display("mode %0d beat %0d: %h vs %h", mode, i, m_beat, e);
          end
        end
      end
    join
    rnd = 1'b0;
    checks++;
    if (t_out - t_in != lat) begin
      failures++;
      $display("latency %0d, expected %0d", t_out - t_in, lat);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s_valid = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (s_ready || m_valid || loaded != CORE_NONE) begin
      failures++;
      $display("empty region is not idle");
    end
    s_valid = 1'b0;
    load(CORE_INVERT);
    checks++;
    if (loaded != CORE_INVERT) failures++;
    run(0, 2);
    load(CORE_SOBEL);
    checks++;
    if (loaded != CORE_NONE || s_ready) begin
      failures++;
      $display("small region accepted Sobel");
    end
    load(CORE_LIMITER);
    @(negedge clk);
    cmd = '{we: 1'b1, addr: 8'd0, data: 32'h10};
    @(negedge clk);
    cmd = '0;
    run(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
