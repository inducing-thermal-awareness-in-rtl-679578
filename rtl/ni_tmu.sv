// ni_tmu: dual master/slave network interface of the thermal management unit.
//
// Master side: a request (m_dst, m_cmd, m_addr, m_data) accepted when
// m_valid && m_ready is packed into a flit with this node as source and
// offered on tx from the next cycle; m_ready is high whenever the single
// injection register is free or being emptied. The TMU uses it to poll the
// thermal sensors (CMD_RD) and to set operating points in the DVFS unit
// (CMD_WR_NA).
// Slave side: every non-acknowledged write arriving from the network (the
// sensors' status replies and wake notices) is presented for one cycle on
// s_valid with its source, address and data, one cycle after arrival. The
// receive side is always ready; other commands are dropped and counted in
// s_dropped.
//
// The dual master/slave arrangement and the non-acknowledged replies follow
// the document; the port-level protocol is this design's own.
module ni_tmu
  import thermal_pkg::*;
#(
  parameter node_t NODE_ID = NODE_TMU
) (
  input  logic              clk,
  input  logic              rst_n,
  // master request port
  input  logic              m_valid,
  output logic              m_ready,
  input  node_t             m_dst,
  input  cmd_e              m_cmd,
  input  logic [ADDR_W-1:0] m_addr,
  input  logic [DATA_W-1:0] m_data,
  // slave write port
  output logic              s_valid,
  output node_t             s_src,
  output logic [ADDR_W-1:0] s_addr,
  output logic [DATA_W-1:0] s_data,
  output logic [7:0]        s_dropped,
  // network
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready
);
  assign m_ready  = !tx_valid || tx_ready;
  assign rx_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid  <= 1'b0;
      tx_flit   <= '0;
      s_valid   <= 1'b0;
      s_src     <= '0;
      s_addr    <= '0;
      s_data    <= '0;
      s_dropped <= '0;
    end else begin
      if (m_valid && m_ready) begin
        tx_valid <= 1'b1;
        tx_flit  <= '{dst: m_dst, src: NODE_ID, cmd: m_cmd, addr: m_addr, data: m_data};
      end else if (tx_ready) begin
        tx_valid <= 1'b0;
      end
      s_valid <= rx_valid && (rx_flit.cmd == CMD_WR_NA);
      if (rx_valid) begin
        s_src  <= rx_flit.src;
        s_addr <= rx_flit.addr;
        s_data <= rx_flit.data;
        if (rx_flit.cmd != CMD_WR_NA && s_dropped != 8'hFF) s_dropped <= s_dropped + 1'b1;
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_flit));
endmodule
