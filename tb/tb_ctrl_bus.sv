// Self-checking testbench for ctrl_bus, the AXI-Lite control slave.
//
// Writes to the switch page, to the command page of every region and to the
// core-select page of every region, and checks that exactly the right strobe
// fires with the right register number and data. Reads back a switch register
// (the switch is modelled as returning 0x100 plus the word address) and the
// core selects (modelled as returning slot number + 1).
module tb_ctrl_bus;
  import vp_pkg::*;

  localparam int NS = 11;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] s_axil_awaddr = '0;
  logic        s_axil_awvalid = 1'b0;
  logic        s_axil_awready;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0]  s_axil_wstrb = '0;
  logic        s_axil_wvalid = 1'b0;
  logic        s_axil_wready;
  logic [1:0]  s_axil_bresp;
  logic        s_axil_bvalid;
  logic        s_axil_bready = 1'b0;
  logic [15:0] s_axil_araddr = '0;
  logic        s_axil_arvalid = 1'b0;
  logic        s_axil_arready;
  logic [31:0] s_axil_rdata;
  logic [1:0]  s_axil_rresp;
  logic        s_axil_rvalid;
  logic        s_axil_rready = 1'b0;
  logic        sw_we;
  logic [5:0]  sw_addr, sw_raddr;
  logic [31:0] sw_wdata, sw_rdata;
  cmd_t        cmd [NS];
  logic        load_we [NS];
  core_id_t    load_core;
  core_id_t    loaded [NS];
  int          checks = 0;
  int          failures = 0;
  // strobe log
  int          n_sw, n_cmd [NS], n_load [NS];
  logic [31:0] last_data;
  logic [7:0]  last_reg;

  always #5 clk = ~clk;

  ctrl_bus #(.ADDR_W(16), .N_SLOTS(NS)) dut (.*);

  assign sw_rdata = 32'h100 + 32'(sw_raddr);
  always_comb for (int i = 0; i < NS; i++) loaded[i] = core_id_t'(i + 1);

  always @(posedge clk) begin
    if (sw_we) begin
      n_sw++;
      last_data = sw_wdata;
      last_reg  = 8'(sw_addr);
    end
    for (int i = 0; i < NS; i++) begin
      if (cmd[i].we) begin
        n_cmd[i]++;
        last_data = cmd[i].data;
        last_reg  = cmd[i].addr;
      end
      if (load_we[i]) begin
        n_load[i]++;
        last_data = 32'(load_core);
      end
    end
  end

  // AXI-Lite master: one transaction at a time, waits for the response.
  task automatic axil_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1;
    s_axil_wdata  = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1'b1;
    s_axil_bready = 1'b1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_bready = 1'b0;
  endtask

  task automatic axil_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1'b1; s_axil_rready = 1'b1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 1'b0;
  endtask

  task automatic clear;
    n_sw = 0;
    for (int i = 0; i < NS; i++) begin
      n_cmd[i] = 0;
      n_load[i] = 0;
    end
  endtask

  task automatic expect_one(input int kind, input int slot, input logic [7:0] r, input logic [31:0] d);
    int total;
    repeat (2) @(negedge clk);
    total = n_sw;
    for (int i = 0; i < NS; i++) total += n_cmd[i] + n_load[i];
    checks++;
    if (total != 1 ||
        (kind == 0 && n_sw != 1) || (kind == 1 && n_cmd[slot] != 1) || (kind == 2 && n_load[slot] != 1) ||
        last_data !== d || (kind != 2 && last_reg !== r)) begin
      failures++;
      $display("kind %0d slot %0d: total %0d data %h reg %0d", kind, slot, total, last_data, last_reg);
    end
    clear();
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    clear();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    axil_write(16'h0040 + 16'd12, 32'h8000_0003);
    expect_one(0, 0, 8'd19, 32'h8000_0003);
    for (int s = 0; s < NS; s++) begin
      axil_write(16'h1000 + 16'(s) * 16'h100 + 16'd8, 32'hA0 + 32'(s));
      expect_one(1, s, 8'd2, 32'hA0 + 32'(s));
      axil_write(16'h2000 + 16'(s) * 16'd4, 32'(s + 3));
      expect_one(2, s, 8'd0, 32'(s + 3));
    end
    axil_read(16'h0044, d);
    checks++;
    if (d !== 32'h111) begin
      failures++;
      $display("switch readback %h", d);
    end
    for (int s = 0; s < NS; s++) begin
      axil_read(16'h2000 + 16'(s) * 16'd4, d);
      checks++;
      if (d !== 32'(s + 1)) begin
        failures++;
        $display("core readback %0d: %h", s, d);
      end
    end
    checks++;
    if (s_axil_bresp !== 2'b00 || s_axil_rresp !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
