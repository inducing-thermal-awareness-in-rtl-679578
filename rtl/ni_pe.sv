// ni_pe: network interface of a processing element, extended for thermal
// monitoring.
//
// Three jobs share one injection port:
//  * Master side of the PE. A PE request (read or write, 32-bit address whose
//    bits [31:28] name the target node, see thermal_pkg) becomes a CMD_RD or
//    CMD_WR flit; the CMD_RD_RESP / CMD_WR_ACK that comes back is handed to
//    the PE as a one-cycle pe_resp_valid pulse.
//  * Thermal-sensor port. The temperature of the PE's thermal sensor is read
//    on ts_temp. When the thermal management unit (TMU) sends a CMD_RD to
//    ADDR_TS_STATUS, the interface answers with a non-acknowledged write
//    (CMD_WR_NA) of a status word: temperature, idle flag and the number of
//    outstanding PE transactions.
//  * Transaction monitor. It counts outstanding transactions and the cycles
//    since the PE last had one in flight. The PE is idle when nothing is
//    outstanding and IDLE_TIMEOUT such cycles have passed.
//    The first request of an idle PE also sends an unsolicited status word to
//    ADDR_TS_WAKE of the TMU, so that the TMU can raise the frequency at once
//    instead of waiting for its next poll.
//
// While freeze is high the idle timer does not advance.
//
// Timing: a PE request accepted in cycle t is offered on tx in cycle t+1.
// Injection priority is status reply, then wake notice, then PE request. The
// receive side is always ready. At most MAX_OUTSTANDING transactions are in
// flight.
//
// From the document: the extra temperature input port of the NI, the reply
// as a non-acknowledged write, the outstanding-transaction count and the
// 10 ms idle time-out (5,000,000 cycles at an assumed 500 MHz network clock).
// The wake notice, status-word layout and priorities are this design's own.
module ni_pe
  import thermal_pkg::*;
#(
  parameter node_t       NODE_ID         = NODE_PE0,
  parameter node_t       TMU_ID          = NODE_TMU,
  parameter int unsigned IDLE_TIMEOUT    = 5_000_000,
  parameter int unsigned MAX_OUTSTANDING = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              freeze,    // emulation freeze: idle timer holds
  // PE master port
  input  logic              pe_req_valid,
  output logic              pe_req_ready,
  input  logic              pe_req_we,
  input  logic [31:0]       pe_req_addr,
  input  logic [31:0]       pe_req_wdata,
  output logic              pe_resp_valid,
  output logic              pe_resp_we,
  output logic [31:0]       pe_resp_rdata,
  // thermal sensor input
  input  logic [TEMP_W-1:0] ts_temp,
  // network
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  // monitor, for observation
  output logic              mon_idle,
  output logic [OUTS_W-1:0] mon_outstanding
);
  localparam int unsigned CNT_W = $clog2(IDLE_TIMEOUT + 1) + 1;

  logic              status_pending, wake_pending;
  node_t             status_dst;
  logic [OUTS_W-1:0] outstanding;
  logic [CNT_W-1:0]  idle_cnt;
  logic              idle;
  logic              can_load, pe_accept, send_status, send_wake;
  logic              resp_in, poll_in;
  ts_status_t        status_word;

  assign idle      = (outstanding == '0) && (idle_cnt >= CNT_W'(IDLE_TIMEOUT));
  assign can_load  = !tx_valid || tx_ready;
  assign send_status = can_load && status_pending;
  assign send_wake   = can_load && !status_pending && wake_pending;
  assign pe_req_ready = can_load && !status_pending && !wake_pending &&
                        (outstanding < OUTS_W'(MAX_OUTSTANDING));
  assign pe_accept = pe_req_valid && pe_req_ready;

  assign rx_ready = 1'b1;
  assign resp_in  = rx_valid && (rx_flit.cmd == CMD_RD_RESP || rx_flit.cmd == CMD_WR_ACK);
  assign poll_in  = rx_valid && (rx_flit.cmd == CMD_RD) && (rx_flit.addr == ADDR_TS_STATUS);

  always_comb begin
    status_word             = '0;
    status_word.temp        = ts_temp;
    status_word.idle        = idle;
    status_word.outstanding = outstanding;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid       <= 1'b0;
      tx_flit        <= '0;
      status_pending <= 1'b0;
      status_dst     <= '0;
      wake_pending   <= 1'b0;
      outstanding    <= '0;
      idle_cnt       <= '0;
      pe_resp_valid  <= 1'b0;
      pe_resp_we     <= 1'b0;
      pe_resp_rdata  <= '0;
    end else begin
      // injection register
      if (send_status) begin
        tx_valid       <= 1'b1;
        tx_flit        <= '{dst: status_dst, src: NODE_ID, cmd: CMD_WR_NA,
                            addr: ADDR_TS_STATUS, data: status_word};
      end else if (send_wake) begin
        tx_valid       <= 1'b1;
        tx_flit        <= '{dst: TMU_ID, src: NODE_ID, cmd: CMD_WR_NA,
                            addr: ADDR_TS_WAKE, data: status_word};
      end else if (pe_accept) begin
        tx_valid       <= 1'b1;
        tx_flit        <= '{dst: pe_addr_node(pe_req_addr), src: NODE_ID,
                            cmd: pe_req_we ? CMD_WR : CMD_RD,
                            addr: pe_req_addr[ADDR_W+1:2], data: pe_req_wdata};
      end else if (tx_ready) begin
        tx_valid       <= 1'b0;
      end

      if (send_status) status_pending <= 1'b0;
      if (poll_in) begin
        status_pending <= 1'b1;
        status_dst     <= rx_flit.src;
      end

      if (send_wake) wake_pending <= 1'b0;
      if (pe_accept && idle) wake_pending <= 1'b1;

      outstanding <= outstanding + OUTS_W'(pe_accept) - OUTS_W'(resp_in);

      if (pe_accept || outstanding != '0)     idle_cnt <= '0;
      else if (!freeze && idle_cnt < CNT_W'(IDLE_TIMEOUT)) idle_cnt <= idle_cnt + 1'b1;

      pe_resp_valid <= resp_in;
      pe_resp_we    <= resp_in && (rx_flit.cmd == CMD_WR_ACK);
      if (resp_in) pe_resp_rdata <= rx_flit.data;
    end
  end

  assign mon_idle        = idle;
  assign mon_outstanding = outstanding;

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_flit));
endmodule
