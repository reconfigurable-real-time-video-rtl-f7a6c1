// Register-programmed AXI4-Stream switch: N_S input streams to N_M outputs.
//
// Every output m has a routing register naming the input it takes (bits 3:0,
// wider for larger N_S) and a disable bit (bit 31). Writes go to a staging
// copy; writing 1 to bit 1 of the control register (word 0) commits all
// staged routes at once, so a whole pipeline topology changes in one cycle.
// After reset every output is disabled. Register words: 0 control, 16+m the
// route of output m; both read back the staged value. The datapath has an
// input buffer per input and an output register per output, which gives the
// two cycles of delay per connection: a beat accepted at an input in cycle t
// is presented at its output in cycle t+2, and one beat per clock flows
// through each connection. An input routed to several outputs feeds only the
// lowest-numbered of them (fan-out is the broadcaster's job). The register
// map and the conflict rule are this design's choices; the port count, the
// register programming and the two-cycle delay follow the design description.
module axis_switch
  import vp_pkg::*;
#(
  parameter int unsigned N_S = 16,
  parameter int unsigned N_M = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid [N_S],
  input  vbeat_t      s_beat  [N_S],
  output logic        s_ready [N_S],
  output logic        m_valid [N_M],
  output vbeat_t      m_beat  [N_M],
  input  logic        m_ready [N_M],
  input  logic        reg_we,
  input  logic [5:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic [5:0]  reg_raddr,
  output logic [31:0] reg_rdata,
  output logic [31:0] commit_cnt
);

  localparam int unsigned SW  = (N_S > 1) ? $clog2(N_S) : 1;
  localparam int unsigned SMW = (N_M > 1) ? $clog2(N_M) : 1;

  typedef struct packed {
    logic          dis;
    logic [SW-1:0] src;
  } route_t;

  route_t stage [N_M];
  route_t live  [N_M];

  logic   v1 [N_S];   // head of the input buffer
  vbeat_t d1 [N_S];
  logic   vb [N_S];   // second entry
  vbeat_t db [N_S];
  logic   pop1 [N_S];
  logic   own  [N_M];   // output m is the one that drains its source
  logic   load2 [N_M];
  logic   v2 [N_M];
  vbeat_t d2 [N_M];

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < N_M; m++) begin
        stage[m] <= '{dis: 1'b1, src: '0};
        live[m]  <= '{dis: 1'b1, src: '0};
      end
      commit_cnt <= '0;
    end else if (reg_we) begin
      if (reg_addr == 6'd0 && reg_wdata[1]) begin
        for (int m = 0; m < N_M; m++) live[m] <= stage[m];
        commit_cnt <= commit_cnt + 1'b1;
      end else if (reg_addr >= 6'd16 && 32'(reg_addr) < 32'(16 + N_M)) begin
        stage[SMW'(reg_addr - 6'd16)] <= '{dis: reg_wdata[31], src: reg_wdata[SW-1:0]};
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_raddr >= 6'd16 && 32'(reg_raddr) < 32'(16 + N_M)) begin
      reg_rdata[31]   = stage[SMW'(reg_raddr - 6'd16)].dis;
      reg_rdata[SW-1:0] = stage[SMW'(reg_raddr - 6'd16)].src;
    end
  end

  // ---------------- routing ----------------
  always_comb begin
    logic taken [N_S];
    for (int s = 0; s < N_S; s++) taken[s] = 1'b0;
    for (int m = 0; m < N_M; m++) begin
      own[m] = 1'b0;
      if (!live[m].dis && 32'(live[m].src) < 32'(N_S) && !taken[live[m].src]) begin
        own[m] = 1'b1;
        taken[live[m].src] = 1'b1;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N_S; s++) pop1[s] = 1'b0;
    for (int m = 0; m < N_M; m++) begin
      load2[m] = own[m] && v1[live[m].src] && (!v2[m] || m_ready[m]);
      if (load2[m]) pop1[live[m].src] = 1'b1;
    end
  end

  // ---------------- input stage ----------------
  // Two-entry buffer per input: ready depends only on registers, so no
  // combinational path runs from an output's ready back to an input's ready
  // and a region routed into itself cannot form a loop.
  always_comb begin
    for (int s = 0; s < N_S; s++) s_ready[s] = !vb[s];
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < N_S; s++) begin
      if (!rst_n) begin
        v1[s] <= 1'b0;
        vb[s] <= 1'b0;
      end else if (vb[s]) begin
        if (pop1[s]) begin
          d1[s] <= db[s];
          vb[s] <= 1'b0;
        end
      end else if (v1[s] && !pop1[s]) begin
        if (s_valid[s]) begin
          db[s] <= s_beat[s];
          vb[s] <= 1'b1;
        end
      end else begin
        v1[s] <= s_valid[s];
        if (s_valid[s]) d1[s] <= s_beat[s];
      end
    end
  end

  // ---------------- output stage ----------------
  always_ff @(posedge clk) begin
    for (int m = 0; m < N_M; m++) begin
      if (!rst_n)              v2[m] <= 1'b0;
      else if (load2[m])       v2[m] <= 1'b1;
      else if (m_ready[m])     v2[m] <= 1'b0;
      if (load2[m]) d2[m] <= d1[live[m].src];
    end
  end

  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      m_valid[m] = v2[m];
      m_beat[m]  = d2[m];
    end
  end

endmodule
