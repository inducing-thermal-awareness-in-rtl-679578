// noc_fabric: the on-chip network of the 4-core case study, three 5x5
// switches in a chain (S0 - S1 - S2) with eleven endpoint ports.
//
// Endpoint e of the arrays is network node e (thermal_pkg): PE0..PE3 are
// nodes 0..3, their private memories 4..7, the shared memory 8, the thermal
// management unit 9 and the DVFS unit 10. S0 serves PE0, PE1 and their
// memories; S1 the other two private memories and the shared memory; S2
// PE2, PE3, the TMU and the DVFS unit, so that the TMU and the DVFS unit
// share a switch. Each endpoint has an injection link (ep_tx_*, into the
// network) and an ejection link (ep_rx_*, out of it), both valid/ready.
// A flit crosses each switch in at least one cycle.
//
// Three 5x5 switches and the TMU sharing a switch with the DVFS unit follow
// the document; the chain and the placement of nodes on switches are this
// design's reading of its floorplan.
module noc_fabric
  import thermal_pkg::*;
#(
  parameter int unsigned IN_DEPTH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t [N_NODES-1:0]  ep_tx_flit,
  input  logic  [N_NODES-1:0]  ep_tx_valid,
  output logic  [N_NODES-1:0]  ep_tx_ready,
  output flit_t [N_NODES-1:0]  ep_rx_flit,
  output logic  [N_NODES-1:0]  ep_rx_valid,
  input  logic  [N_NODES-1:0]  ep_rx_ready
);
  flit_t [N_SW-1:0][SW_PORTS-1:0] sw_in_flit, sw_out_flit;
  logic  [N_SW-1:0][SW_PORTS-1:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;

  for (genvar s = 0; s < N_SW; s++) begin : g_sw
    noc_switch #(.SW_ID(s), .N_PORTS(SW_PORTS), .IN_DEPTH(IN_DEPTH)) u_sw (
      .clk, .rst_n,
      .in_flit  (sw_in_flit[s]),  .in_valid (sw_in_valid[s]),  .in_ready (sw_in_ready[s]),
      .out_flit (sw_out_flit[s]), .out_valid(sw_out_valid[s]), .out_ready(sw_out_ready[s])
    );
  end

  always_comb begin
    sw_in_flit   = '0;
    sw_in_valid  = '0;
    sw_out_ready = '0;
    ep_tx_ready  = '0;
    ep_rx_flit   = '0;
    ep_rx_valid  = '0;
    // endpoints
    for (int n = 0; n < N_NODES; n++) begin
      int unsigned s;
      int unsigned p;
      s = node_switch(node_t'(n));
      p = int'(node_port(node_t'(n)));
      sw_in_flit[s][p]   = ep_tx_flit[n];
      sw_in_valid[s][p]  = ep_tx_valid[n];
      ep_tx_ready[n]     = sw_in_ready[s][p];
      ep_rx_flit[n]      = sw_out_flit[s][p];
      ep_rx_valid[n]     = sw_out_valid[s][p];
      sw_out_ready[s][p] = ep_rx_ready[n];
    end
    // inter-switch links: east port of S(k) <-> west port of S(k+1)
    for (int k = 0; k < N_SW - 1; k++) begin
      int unsigned w;
      w = int'(west_port(k + 1));
      sw_in_flit[k+1][w]          = sw_out_flit[k][EAST_PORT];
      sw_in_valid[k+1][w]         = sw_out_valid[k][EAST_PORT];
      sw_out_ready[k][EAST_PORT]  = sw_in_ready[k+1][w];
      sw_in_flit[k][EAST_PORT]    = sw_out_flit[k+1][w];
      sw_in_valid[k][EAST_PORT]   = sw_out_valid[k+1][w];
      sw_out_ready[k+1][w]        = sw_in_ready[k][EAST_PORT];
    end
  end
endmodule
