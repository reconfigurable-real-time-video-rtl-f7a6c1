// Self-checking testbench for stream_sync, the Mux region's frame aligner.
//
// The real-time stream A starts in the middle of a frame (7 beats without a
// start-of-frame flag) and then sends two 12-beat frames; the frame-buffer
// stream B sends two frames from its own start of frame. Expected: the 7
// mid-frame A beats come out alone (unpaired) while B is held at its frame
// start, then every following A beat comes out paired with the B beat of the
// same frame position. Random gaps on both inputs and random output
// back-pressure. Also checks that B was stalled (stall counter above zero),
// that B was never taken during the unpaired beats, and the one-cycle latency.
module tb_stream_sync;
  import vp_pkg::*;

  localparam int PRE = 7;
  localparam int FL  = 12;
  localparam int NA  = PRE + 2 * FL;
  localparam int NB  = 2 * FL;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        a_valid = 1'b0;
  vbeat_t      a_beat = '0;
  logic        a_ready;
  logic        b_valid = 1'b0;
  vbeat_t      b_beat = '0;
  logic        b_ready;
  logic        m_valid;
  vbeat_t      m_a, m_b;
  logic        m_paired;
  logic        m_ready = 1'b1;
  logic [31:0] stall_cnt;
  int          checks = 0;
  int          failures = 0;
  int          cycle = 0;
  int          t_in = -1;
  int          t_out = -1;
  vbeat_t      av [NA];
  vbeat_t      bv [NB];
  int          b_taken = 0;
  bit          rnd = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) m_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (b_valid && b_ready) b_taken <= b_taken + 1;

  stream_sync dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NA; i++)
      av[i] = '{data: 24'($urandom), user: (i >= PRE && (i - PRE) % FL == 0), last: ((i - PRE) % 4 == 3)};
    for (int i = 0; i < NB; i++)
      bv[i] = '{data: 24'($urandom), user: (i % FL == 0), last: (i % 4 == 3)};
  end

  initial begin : drive_a
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NA; i++) begin
      rnd = (i > PRE + 2);
      if (rnd) while ($urandom_range(0, 3) == 0) begin
        a_valid = 1'b0;
        @(negedge clk);
      end
      a_valid = 1'b1; a_beat = av[i];
      @(posedge clk);
      while (!a_ready) @(posedge clk);
      if (t_in < 0) t_in = cycle;
      @(negedge clk);
    end
    a_valid = 1'b0;
  end

  initial begin : drive_b
    repeat (4) @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      if (rnd) while ($urandom_range(0, 3) == 0) begin
        b_valid = 1'b0;
        @(negedge clk);
      end
      b_valid = 1'b1; b_beat = bv[i];
      @(posedge clk);
      while (!b_ready) @(posedge clk);
      @(negedge clk);
    end
    b_valid = 1'b0;
  end

  initial begin : monitor
    wait (rst_n);
    for (int i = 0; i < NA; i++) begin
      @(posedge clk);
      while (!(m_valid && m_ready)) @(posedge clk);
      if (t_out < 0) t_out = cycle;
      checks++;
      if (m_a !== av[i] || m_paired !== (i >= PRE) || (i >= PRE && m_b !== bv[i - PRE])) begin
        failures++;
        if (failures < 10) $display("out %0d: a %h paired %b b %h", i, m_a, m_paired, m_b);
      end
      if (i == PRE - 1) begin
        checks++;
        if (b_taken != 0) begin
          failures++;
          $display("B advanced before alignment");
        end
      end
    end
    checks++;
    if (stall_cnt == 0) begin
      failures++;
      $display("B was never stalled");
    end
    checks++;
    if (t_out - t_in != 1) begin
      failures++;
      $display("latency %0d", t_out - t_in);
    end
    $display("stall cycles: %0d", stall_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
