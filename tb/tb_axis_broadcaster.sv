// Self-checking testbench for axis_broadcaster.
//
// Sends 300 random beats in three phases: both outputs enabled, only output 0,
// only output 1. Each output has its own random ready. Every enabled output
// must receive the phase's beats in order, each exactly once, a disabled
// output must never show valid, and a beat offered to an idle broadcaster with
// ready outputs must appear one cycle later.
module tb_axis_broadcaster;
  import vp_pkg::*;

  localparam int N = 300;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] en_mask = 2'b11;
  logic       s_valid = 1'b0;
  vbeat_t     s_beat = '0;
  logic       s_ready;
  logic       m_valid [2];
  vbeat_t     m_beat  [2];
  logic       m_ready [2];
  int         checks = 0;
  int         failures = 0;
  int         cycle = 0;
  int         t_in = -1;
  int         t_out = -1;
  vbeat_t     beats [N];
  int         exp_q0 [$];
  int         exp_q1 [$];
  bit         rnd = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) begin
    m_ready[0] <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
    m_ready[1] <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  axis_broadcaster #(.N_OUT(2)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : drive
    for (int i = 0; i < N; i++) beats[i] = '{data: 24'($urandom), user: 1'($urandom), last: 1'($urandom)};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      if (i == 100 || i == 200) begin
        s_valid = 1'b0;
        repeat (20) @(negedge clk);     // let the previous phase drain
        en_mask = (i == 100) ? 2'b01 : 2'b10;
      end
      rnd = (i > 0);
      if (rnd) while ($urandom_range(0, 3) == 0) begin
        s_valid = 1'b0;
        @(negedge clk);
      end
      s_valid = 1'b1; s_beat = beats[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      if (t_in < 0) t_in = cycle;
      if (en_mask[0]) exp_q0.push_back(i);
      if (en_mask[1]) exp_q1.push_back(i);
      @(negedge clk);
    end
    s_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q0.size() != 0 || exp_q1.size() != 0) begin
      failures++;
      $display("undelivered beats: %0d %0d", exp_q0.size(), exp_q1.size());
    end
    checks++;
    if (t_out - t_in != 1) begin
      failures++;
      $display("latency %0d", t_out - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_valid[0] && m_ready[0]) begin
        if (t_out < 0) t_out = cycle;
        checks++;
        if (exp_q0.size() == 0 || m_beat[0] !== beats[exp_q0[0]]) begin
          failures++;
          $display("output 0 wrong beat at %0d", cycle);
        end
        if (exp_q0.size() != 0) void'(exp_q0.pop_front());
      end
      if (m_valid[1] && m_ready[1]) begin
        checks++;
        if (exp_q1.size() == 0 || m_beat[1] !== beats[exp_q1[0]]) begin
          failures++;
          $display("output 1 wrong beat at %0d", cycle);
        end
        if (exp_q1.size() != 0) void'(exp_q1.pop_front());
      end
    end
  end

endmodule
