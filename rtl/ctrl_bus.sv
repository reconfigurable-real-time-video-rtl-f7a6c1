// AXI-Lite control slave of the static framework.
//
// The processor reaches three things through it: the switch's routing
// registers, the command bus that sets each region's core parameters, and the
// core-select register of each region (the stand-in for loading a partial
// bitstream). Address map (byte addresses, this design's choice):
//   0x0000-0x00FF  switch register word (addr[7:2])
//   0x1000 + 0x100*slot + 4*reg   command write to region slot, register reg
//   0x2000 + 4*slot               core select of region slot (read/write)
// Slots 0-9 are the basic regions, slot N_SLOTS-1 the Mux region. A write is
// taken when address and data are both valid and turns into a one-cycle
// strobe on the matching port in the next cycle, with the write response in
// that cycle too. Reads return the switch registers and the core selects;
// command registers read as zero. Responses are always OKAY.
module ctrl_bus
  import vp_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned N_SLOTS = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // switch register port
  output logic              sw_we,
  output logic [5:0]        sw_addr,
  output logic [31:0]       sw_wdata,
  output logic [5:0]        sw_raddr,
  input  logic [31:0]       sw_rdata,
  // regions
  output cmd_t              cmd       [N_SLOTS],
  output logic              load_we   [N_SLOTS],
  output core_id_t          load_core,
  input  core_id_t          loaded    [N_SLOTS]
);

  logic        wr;
  logic [3:0]  wpage;
  logic [3:0]  wslot;
  logic [31:0] wd;

  assign wr             = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr;
  assign s_axil_wready  = wr;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign wpage          = s_axil_awaddr[15:12];

  // Byte lanes: a partial write leaves unwritten bytes zero (registers here
  // are written whole).
  always_comb begin
    for (int i = 0; i < 4; i++) wd[8*i +: 8] = s_axil_wstrb[i] ? s_axil_wdata[8*i +: 8] : 8'h00;
  end

  assign wslot = (wpage == 4'h1) ? s_axil_awaddr[11:8] : s_axil_awaddr[5:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      sw_we         <= 1'b0;
      for (int i = 0; i < N_SLOTS; i++) begin
        cmd[i].we  <= 1'b0;
        load_we[i] <= 1'b0;
      end
    end else begin
      if (wr)                 s_axil_bvalid <= 1'b1;
      else if (s_axil_bready) s_axil_bvalid <= 1'b0;
      sw_we <= wr && wpage == 4'h0;
      for (int i = 0; i < N_SLOTS; i++) begin
        cmd[i].we  <= wr && wpage == 4'h1 && 32'(wslot) == i;
        load_we[i] <= wr && wpage == 4'h2 && 32'(wslot) == i;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr) begin
      sw_addr   <= s_axil_awaddr[7:2];
      sw_wdata  <= wd;
      load_core <= core_id_t'(wd[4:0]);
      for (int i = 0; i < N_SLOTS; i++) begin
        cmd[i].addr <= {2'b00, s_axil_awaddr[7:2]};
        cmd[i].data <= wd;
      end
    end
  end

  // Read channel: one outstanding read, data registered.
  assign s_axil_arready = !s_axil_rvalid;
  assign sw_raddr       = s_axil_araddr[7:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else if (s_axil_arvalid && s_axil_arready) begin
      s_axil_rvalid <= 1'b1;
      case (s_axil_araddr[15:12])
        4'h0:    s_axil_rdata <= sw_rdata;
        4'h2:    s_axil_rdata <= (32'(s_axil_araddr[5:2]) < N_SLOTS) ?
                                 32'(loaded[s_axil_araddr[5:2]]) : 32'd0;
        default: s_axil_rdata <= '0;
      endcase
    end else if (s_axil_rready) begin
      s_axil_rvalid <= 1'b0;
    end
  end

  // AXI rule: a response stays until it is taken.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axil_rvalid && !s_axil_rready) |=> (s_axil_rvalid && $stable(s_axil_rdata)));

endmodule
