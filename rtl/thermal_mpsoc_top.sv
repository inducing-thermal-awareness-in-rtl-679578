// thermal_mpsoc_top: 4-core MPSoC with network-on-chip based thermal control.
//
// The on-chip network (noc_fabric, three 5x5 switches) connects four
// processor network interfaces, four private memories, a shared memory, a
// thermal management unit (TMU) and one DVFS unit that drives all four
// processors. Each processor's network interface also reads the processor's
// thermal sensor and watches its transactions. The TMU polls every sensor
// over the network, applies the selected thermal policy and sends new
// operating points to the DVFS unit over the network; the DVFS unit turns
// them into per-processor clock enables and voltage codes. No wire other
// than the network links joins the sensors, the TMU and the DVFS unit.
//
// The processors themselves are outside: each has a request/response port
// (pe_req_*, pe_resp_*) and receives pe_clk_en, the enable of its clock
// (500/250/125/62.5 MHz out of the 500 MHz clk), and pe_vsel, its voltage
// code. The emulation side writes the sensor registers (ts_wr_*), may freeze
// emulated time (freeze: processor clocks, the poll timer and the idle
// timers stop), selects the policy (policy: 0 local DVFS,
// 1 with local communication monitoring, 2 with the global workload
// predictor, 3 as 2 with the prediction updated at run time) and loads the
// predictor table (cfg_*). pe_level, tmu_falling,
// pe_idle and evt_round are for observation.
//
// Processor address map: bits [31:28] of pe_req_addr name the target node
// (4 + i: private memory of processor i, 8: shared memory), bits [17:2] the
// word. A single clock and an active-low asynchronous reset serve the whole
// design.
//
// The set of parts and how they talk follows the document; the network's
// insides, the address map and all timing are this design's own.
module thermal_mpsoc_top
  import thermal_pkg::*;
#(
  parameter int unsigned N_PE         = 4,
  parameter int unsigned POLL_CYCLES  = 500_000,     // 1 ms at 500 MHz
  parameter int unsigned IDLE_TIMEOUT = 5_000_000,   // 10 ms at 500 MHz
  parameter int unsigned MEM_DEPTH    = 4096,
  parameter int unsigned TH_H         = 340,
  parameter int unsigned TH_M         = 331,
  parameter int unsigned TH_L         = 325,
  parameter int unsigned TH_SAFE      = 321,
  parameter int unsigned SLACK_ROUNDS = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // processor ports
  input  logic [N_PE-1:0]              pe_req_valid,
  output logic [N_PE-1:0]              pe_req_ready,
  input  logic [N_PE-1:0]              pe_req_we,
  input  logic [N_PE-1:0][31:0]        pe_req_addr,
  input  logic [N_PE-1:0][31:0]        pe_req_wdata,
  output logic [N_PE-1:0]              pe_resp_valid,
  output logic [N_PE-1:0]              pe_resp_we,
  output logic [N_PE-1:0][31:0]        pe_resp_rdata,
  output logic [N_PE-1:0]              pe_clk_en,
  output logic [N_PE-1:0][1:0]         pe_vsel,
  // emulation control
  input  logic [N_PE-1:0]              ts_wr_en,
  input  logic [N_PE-1:0][TEMP_W-1:0]  ts_wr_temp,
  input  logic                         freeze,
  input  logic [1:0]                   policy,
  input  logic                         cfg_we,
  input  logic [7:0]                   cfg_pe,
  input  freq_level_e                  cfg_level,
  // observation
  output freq_level_e [N_PE-1:0]       pe_level,
  output logic [N_PE-1:0]              tmu_falling,
  output logic [N_PE-1:0]              pe_idle,
  output logic                         evt_round
);
  flit_t [N_NODES-1:0] tx_flit, rx_flit;
  logic  [N_NODES-1:0] tx_valid, tx_ready, rx_valid, rx_ready;

  noc_fabric u_noc (
    .clk, .rst_n,
    .ep_tx_flit (tx_flit), .ep_tx_valid(tx_valid), .ep_tx_ready(tx_ready),
    .ep_rx_flit (rx_flit), .ep_rx_valid(rx_valid), .ep_rx_ready(rx_ready)
  );

  // --- processors' network interfaces and thermal sensors ------------------
  logic [N_PE-1:0][TEMP_W-1:0] ts_temp;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    localparam node_t NID = NODE_PE0 + node_t'(i);
    logic [OUTS_W-1:0] outs;

    thermal_sensor u_ts (
      .clk, .rst_n, .wr_en(ts_wr_en[i]), .wr_temp(ts_wr_temp[i]), .temp(ts_temp[i])
    );

    ni_pe #(.NODE_ID(NID), .TMU_ID(NODE_TMU), .IDLE_TIMEOUT(IDLE_TIMEOUT)) u_ni (
      .clk, .rst_n, .freeze,
      .pe_req_valid (pe_req_valid[i]), .pe_req_ready(pe_req_ready[i]),
      .pe_req_we    (pe_req_we[i]),    .pe_req_addr (pe_req_addr[i]),
      .pe_req_wdata (pe_req_wdata[i]),
      .pe_resp_valid(pe_resp_valid[i]), .pe_resp_we(pe_resp_we[i]),
      .pe_resp_rdata(pe_resp_rdata[i]),
      .ts_temp      (ts_temp[i]),
      .tx_flit (tx_flit[NID]), .tx_valid(tx_valid[NID]), .tx_ready(tx_ready[NID]),
      .rx_flit (rx_flit[NID]), .rx_valid(rx_valid[NID]), .rx_ready(rx_ready[NID]),
      .mon_idle(pe_idle[i]), .mon_outstanding(outs)
    );
  end

  // --- memories: four private, one shared ----------------------------------
  for (genvar m = 0; m < N_PE + 1; m++) begin : g_mem
    localparam node_t NID = NODE_MEM0 + node_t'(m);
    logic              bvalid, bwe;
    logic [ADDR_W-1:0] baddr;
    logic [DATA_W-1:0] bwdata, brdata;
    node_t             bsrc;

    ni_slave #(.NODE_ID(NID)) u_ni (
      .clk, .rst_n,
      .rx_flit (rx_flit[NID]), .rx_valid(rx_valid[NID]), .rx_ready(rx_ready[NID]),
      .tx_flit (tx_flit[NID]), .tx_valid(tx_valid[NID]), .tx_ready(tx_ready[NID]),
      .bus_valid(bvalid), .bus_we(bwe), .bus_addr(baddr), .bus_wdata(bwdata),
      .bus_src(bsrc), .bus_rdata(brdata)
    );

    mem_sram #(.DEPTH(MEM_DEPTH)) u_mem (
      .clk, .bus_valid(bvalid), .bus_we(bwe), .bus_addr(baddr),
      .bus_wdata(bwdata), .bus_rdata(brdata)
    );
  end

  // --- DVFS unit ------------------------------------------------------------
  logic              d_valid, d_we;
  logic [ADDR_W-1:0] d_addr;
  logic [DATA_W-1:0] d_wdata, d_rdata;
  node_t             d_src;

  ni_slave #(.NODE_ID(NODE_DVFS)) u_ni_dvfs (
    .clk, .rst_n,
    .rx_flit (rx_flit[NODE_DVFS]), .rx_valid(rx_valid[NODE_DVFS]), .rx_ready(rx_ready[NODE_DVFS]),
    .tx_flit (tx_flit[NODE_DVFS]), .tx_valid(tx_valid[NODE_DVFS]), .tx_ready(tx_ready[NODE_DVFS]),
    .bus_valid(d_valid), .bus_we(d_we), .bus_addr(d_addr), .bus_wdata(d_wdata),
    .bus_src(d_src), .bus_rdata(d_rdata)
  );

  dvfs_unit #(.N_PE(N_PE)) u_dvfs (
    .clk, .rst_n, .freeze,
    .bus_valid(d_valid), .bus_we(d_we), .bus_addr(d_addr), .bus_wdata(d_wdata),
    .bus_rdata(d_rdata),
    .pe_level(pe_level), .pe_vsel(pe_vsel), .pe_clk_en(pe_clk_en)
  );

  // --- thermal management unit ---------------------------------------------
  logic              m_valid, m_ready, s_valid;
  node_t             m_dst, s_src;
  cmd_e              m_cmd;
  logic [ADDR_W-1:0] m_addr, s_addr;
  logic [DATA_W-1:0] m_data, s_data;
  logic [7:0]        s_dropped;
  freq_level_e [N_PE-1:0] tmu_level;

  ni_tmu #(.NODE_ID(NODE_TMU)) u_ni_tmu (
    .clk, .rst_n,
    .m_valid, .m_ready, .m_dst, .m_cmd, .m_addr, .m_data,
    .s_valid, .s_src, .s_addr, .s_data, .s_dropped,
    .tx_flit (tx_flit[NODE_TMU]), .tx_valid(tx_valid[NODE_TMU]), .tx_ready(tx_ready[NODE_TMU]),
    .rx_flit (rx_flit[NODE_TMU]), .rx_valid(rx_valid[NODE_TMU]), .rx_ready(rx_ready[NODE_TMU])
  );

  tmu #(
    .N_PE(N_PE), .POLL_CYCLES(POLL_CYCLES),
    .TH_H(TH_H), .TH_M(TH_M), .TH_L(TH_L), .TH_SAFE(TH_SAFE), .SLACK_ROUNDS(SLACK_ROUNDS),
    .DVFS_ID(NODE_DVFS), .PE_BASE(NODE_PE0)
  ) u_tmu (
    .clk, .rst_n, .policy, .freeze,
    .cfg_we, .cfg_pe, .cfg_level,
    .m_valid, .m_ready, .m_dst, .m_cmd, .m_addr, .m_data,
    .s_valid, .s_src, .s_addr, .s_data,
    .level(tmu_level), .falling(tmu_falling), .evt_round
  );
endmodule
