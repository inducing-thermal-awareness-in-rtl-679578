// ni_slave: slave network interface, used in front of each memory and of the
// DVFS unit.
//
// A CMD_RD, CMD_WR or CMD_WR_NA flit that arrives is turned into a one-cycle
// access on a simple synchronous slave bus (bus_valid, bus_we, bus_addr,
// bus_wdata, plus bus_src naming the requesting node). The slave returns read
// data on bus_rdata in the next cycle. A read is answered with CMD_RD_RESP, a
// write with CMD_WR_ACK; a non-acknowledged write gets no answer, which is how
// thermal-control writes reach the DVFS unit.
//
// Timing: the bus access happens in the cycle the flit is accepted, the
// slave's data arrives in the next cycle, and the answer is offered on tx
// from the cycle after that. The interface handles one
// transaction at a time and accepts no new flit while an answer waits.
//
// The document says only that memories and DVFS units sit behind slave
// interfaces and that thermal writes are not acknowledged; the bus and the
// one-at-a-time behaviour are this design's own.
module ni_slave
  import thermal_pkg::*;
#(
  parameter node_t NODE_ID = NODE_MEM0
) (
  input  logic              clk,
  input  logic              rst_n,
  // network
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  // slave bus
  output logic              bus_valid,
  output logic              bus_we,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [DATA_W-1:0] bus_wdata,
  output node_t             bus_src,
  input  logic [DATA_W-1:0] bus_rdata
);
  logic              resp_wait;
  node_t             resp_dst;
  cmd_e              resp_cmd;
  logic [ADDR_W-1:0] resp_addr;
  logic              accept, is_access;

  assign is_access = (rx_flit.cmd == CMD_RD) || (rx_flit.cmd == CMD_WR) ||
                     (rx_flit.cmd == CMD_WR_NA);
  assign rx_ready  = !resp_wait && !tx_valid;
  assign accept    = rx_valid && rx_ready;

  assign bus_valid = accept && is_access;
  assign bus_we    = (rx_flit.cmd != CMD_RD);
  assign bus_addr  = rx_flit.addr;
  assign bus_wdata = rx_flit.data;
  assign bus_src   = rx_flit.src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_wait <= 1'b0;
      resp_dst  <= '0;
      resp_cmd  <= CMD_RD_RESP;
      resp_addr <= '0;
      tx_valid  <= 1'b0;
      tx_flit   <= '0;
    end else begin
      if (accept && (rx_flit.cmd == CMD_RD || rx_flit.cmd == CMD_WR)) begin
        resp_wait <= 1'b1;
        resp_dst  <= rx_flit.src;
        resp_cmd  <= (rx_flit.cmd == CMD_RD) ? CMD_RD_RESP : CMD_WR_ACK;
        resp_addr <= rx_flit.addr;
      end
      if (resp_wait) begin
        resp_wait <= 1'b0;
        tx_valid  <= 1'b1;
        tx_flit   <= '{dst: resp_dst, src: NODE_ID, cmd: resp_cmd,
                       addr: resp_addr,
                       data: (resp_cmd == CMD_RD_RESP) ? bus_rdata : '0};
      end else if (tx_valid && tx_ready) begin
        tx_valid  <= 1'b0;
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_flit));
endmodule
