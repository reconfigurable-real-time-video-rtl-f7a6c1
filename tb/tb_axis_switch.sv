// Self-checking testbench for the 16x16 axis_switch.
//
// Programs routes through the register port (output 0 <- input 3,
// 1 <- 0, 5 <- 5, 7 <- 7, 2 and 4 both <- 9), commits them, reads one back,
// and streams 150 random beats into each used input with random gaps and
// random output ready. Each routed output must deliver its input's beats in
// order; of outputs 2 and 4, only the lower-numbered one gets input 9's
// stream. Before the commit no output may show valid. The delay of a beat
// through an idle connection must be exactly 2 cycles. Then a second
// topology (output 1 <- 3) is committed and checked the same way.
module tb_axis_switch;
  import vp_pkg::*;

  localparam int NP = 16;
  localparam int N  = 150;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        s_valid [NP];
  vbeat_t      s_beat  [NP];
  logic        s_ready [NP];
  logic        m_valid [NP];
  vbeat_t      m_beat  [NP];
  logic        m_ready [NP];
  logic        reg_we = 1'b0;
  logic [5:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0;
  logic [5:0]  reg_raddr = '0;
  logic [31:0] reg_rdata;
  logic [31:0] commit_cnt;
  int          checks = 0;
  int          failures = 0;
  int          cycle = 0;
  int          route [NP];          // expected source per output, -1 none
  int          sent  [NP];          // beats sent per input in the phase
  int          got   [NP];          // beats received per output in the phase
  vbeat_t      data  [NP][N];
  bit          rnd = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk)
    for (int m = 0; m < NP; m++) m_ready[m] <= rnd ? ($urandom_range(0, 3) != 0) : 1'b1;

  axis_switch #(.N_S(NP), .N_M(NP)) dut (.*);

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = 6'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic stream(input int s);
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        s_valid[s] = 1'b0;
        @(negedge clk);
      end
      s_valid[s] = 1'b1; s_beat[s] = data[s][i];
      @(posedge clk);
      while (!s_ready[s]) @(posedge clk);
      @(negedge clk);
    end
    s_valid[s] = 1'b0;
  endtask

  // checker: an output routed from s must show data[s][got] in order
  always @(posedge clk) begin
    if (rst_n) for (int m = 0; m < NP; m++) begin
      if (m_valid[m] && m_ready[m]) begin
        checks++;
        if (route[m] < 0 || got[m] >= N || m_beat[m] !== data[route[m]][got[m]]) begin
          failures++;
          if (failures < 10) $display("output %0d beat %0d wrong", m, got[m]);
        end
        got[m]++;
      end
    end
  end

  task automatic phase;
    for (int m = 0; m < NP; m++) got[m] = 0;
    for (int s = 0; s < NP; s++)
      for (int i = 0; i < N; i++) data[s][i] = '{data: 24'($urandom), user: (i == 0), last: 1'($urandom)};
    rnd = 1'b1;
    fork
      stream(0); stream(3); stream(5); stream(7); stream(9);
    join
    rnd = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int s = 0; s < NP; s++) begin
      s_valid[s] = 1'b0;
      s_beat[s]  = '0;
    end
    for (int m = 0; m < NP; m++) route[m] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // routes staged, not committed: nothing may pass
    wr(16 + 0, 32'd3);
    wr(16 + 1, 32'd0);
    wr(16 + 5, 32'd5);
    wr(16 + 7, 32'd7);
    wr(16 + 2, 32'd9);
    wr(16 + 4, 32'd9);
    s_valid[3] = 1'b1; s_beat[3] = '0;
    repeat (5) @(negedge clk);
    checks++;
    if (m_valid[0]) begin
      failures++;
      $display("data passed before commit");
    end
    s_valid[3] = 1'b0;
    reg_raddr = 6'(16 + 7);
    #1;
    checks++;
    if (reg_rdata !== 32'd7) begin
      failures++;
      $display("readback %h", reg_rdata);
    end
    // the input buffer of 3 holds two zero beats; they go out after commit
    data[3][0] = '0;
    data[3][1] = '0;
    wr(0, 32'h2);  // commit
    route[0] = 3; route[1] = 0; route[5] = 5; route[7] = 7; route[2] = 9;
    // drain the beat held at input 3
    repeat (5) @(negedge clk);
    checks++;
    if (got[0] != 2) begin
      failures++;
      $display("held beats: %0d", got[0]);
    end
    for (int m = 0; m < NP; m++) got[m] = 0;
    // two-cycle delay on output 0
    data[3][0] = '{data: 24'hC0FFEE, user: 1'b1, last: 1'b0};
    s_valid[3] = 1'b1; s_beat[3] = data[3][0];
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    s_valid[3] = 1'b0;
    while (!m_valid[0]) @(posedge clk);
    checks++;
    if (cycle - t0 != 2) begin
      failures++;
      $display("switch delay %0d", cycle - t0);
    end
    repeat (4) @(negedge clk);
    phase();
    for (int m = 0; m < NP; m++) begin
      checks++;
      if ((route[m] >= 0 && got[m] != N) || (route[m] < 0 && got[m] != 0)) begin
        failures++;
        $display("output %0d delivered %0d", m, got[m]);
      end
    end
    // second topology
    wr(16 + 1, 32'd3);
    wr(16 + 0, 32'd0);
    wr(0, 32'h2);
    route[0] = 0; route[1] = 3;
    phase();
    checks++;
    if (got[1] != N || got[0] != N) begin
      failures++;
      $display("second topology: %0d %0d", got[1], got[0]);
    end
    checks++;
    if (commit_cnt != 2) begin
      failures++;
      $display("commits %0d", commit_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
