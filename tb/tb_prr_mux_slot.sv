// Self-checking testbench for prr_mux_slot (aligner + green screen + fan-out).
//
// After loading Green Screen, the live stream A sends 5 mid-frame beats and
// then two 16-beat frames, a quarter of whose pixels are pure green; any
// pixel inside the reset key range (R 0-100, G 128-255, B 0-100) is keyed; the frame-buffer stream B sends two frames. The 5
// early beats must leave unchanged, and afterwards each keyed pixel of A must
// be replaced by the B pixel of the same frame position, on both outputs.
// Then command register 8 is set to 1, and a further frame must appear only
// on output 0. The region must also report B stalls.
module tb_prr_mux_slot;
  import vp_pkg::*;

  localparam int PRE = 5;
  localparam int FL  = 16;
  localparam int NA  = PRE + 3 * FL;
  localparam int NB  = 3 * FL;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        a_valid = 1'b0;
  vbeat_t      a_beat = '0;
  logic        a_ready;
  logic        b_valid = 1'b0;
  vbeat_t      b_beat = '0;
  logic        b_ready;
  logic        m_valid [2];
  vbeat_t      m_beat  [2];
  logic        m_ready [2];
  cmd_t        cmd = '0;
  logic        load_we = 1'b0;
  core_id_t    load_core = CORE_NONE;
  core_id_t    loaded;
  logic [31:0] stall_cnt;
  int          checks = 0;
  int          failures = 0;
  vbeat_t      av [NA];
  vbeat_t      bv [NB];
  vbeat_t      ev [NA];
  int          got [2];
  int          keyed = 0;
  bit          mask_phase = 1'b0;

  always #5 clk = ~clk;
  always @(negedge clk) begin
    m_ready[0] <= ($urandom_range(0, 3) != 0);
    m_ready[1] <= ($urandom_range(0, 3) != 0);
  end

  prr_mux_slot dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) bv[i] = '{data: 24'($urandom), user: (i % FL == 0), last: (i % 4 == 3)};
    for (int i = 0; i < NA; i++) begin
      av[i] = '{data: 24'($urandom), user: (i >= PRE && (i - PRE) % FL == 0), last: ((i - PRE) % 4 == 3)};
      if (i % 4 == 1) av[i].data = 24'h00FF00;
      ev[i] = av[i];
      if (i >= PRE && av[i].data.r <= 100 && av[i].data.g >= 128 && av[i].data.b <= 100) begin
        ev[i].data = bv[i - PRE].data;
        keyed++;
      end
    end
  end

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (m_valid[k] && m_ready[k]) begin
        checks++;
        if (got[k] >= NA || m_beat[k] !== ev[got[k]] || (k == 1 && got[k] >= PRE + 2 * FL)) begin
          failures++;
          if (failures < 10) $display("out %0d beat %0d wrong: %h", k, got[k], m_beat[k]);
        end
        got[k]++;
      end
    end
  end

  initial begin : drive_a
    got[0] = 0;
    got[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_we = 1'b1; load_core = CORE_GREEN;
    @(negedge clk);
    load_we = 1'b0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < NA; i++) begin
      if (i == PRE + 2 * FL) begin
        a_valid = 1'b0;
        repeat (30) @(negedge clk);
        cmd = '{we: 1'b1, addr: 8'd8, data: 32'd1};
        @(negedge clk);
        cmd = '0;
      end
      a_valid = 1'b1; a_beat = av[i];
      @(posedge clk);
      while (!a_ready) @(posedge clk);
      @(negedge clk);
    end
    a_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (got[0] != NA || got[1] != PRE + 2 * FL) begin
      failures++;
      $display("delivered %0d / %0d", got[0], got[1]);
    end
    checks++;
    if (stall_cnt == 0 || keyed == 0 || loaded != CORE_GREEN) failures++;
    $display("stall cycles %0d, keyed %0d", stall_cnt, keyed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : drive_b
    repeat (7) @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      b_valid = 1'b1; b_beat = bv[i];
      @(posedge clk);
      while (!b_ready) @(posedge clk);
      @(negedge clk);
    end
    b_valid = 1'b0;
  end

endmodule
