// tb_ni_pe: plays the processor and the network around one PE interface
// (node 1, idle time-out shortened to 20 cycles). Checks request packing,
// response delivery, the outstanding-transaction limit, the status reply to
// a TMU poll (temperature, idle flag, outstanding count), the idle time-out
// (which freeze holds) and the wake notice sent when an idle processor
// starts a transaction.
// The injection link sees random back-pressure.
module tb_ni_pe;
  import thermal_pkg::*;
  localparam int TO = 20, MAXO = 4;
  localparam node_t ME = 4'd1;
  logic clk = 0, rst_n = 0, freeze = 0;
  logic pe_req_valid = 0, pe_req_ready, pe_req_we = 0;
  logic [31:0] pe_req_addr = '0, pe_req_wdata = '0;
  logic pe_resp_valid, pe_resp_we;
  logic [31:0] pe_resp_rdata;
  logic [TEMP_W-1:0] ts_temp = 16'd5280;
  flit_t tx_flit, rx_flit = '0;
  logic tx_valid, tx_ready = 0, rx_valid = 0, rx_ready;
  logic mon_idle;
  logic [OUTS_W-1:0] mon_outstanding;
  int checks = 0, failures = 0, wakes = 0, resps = 0;
  logic [31:0] last_rdata;
  flit_t txq [$];

  ni_pe #(.NODE_ID(ME), .TMU_ID(NODE_TMU), .IDLE_TIMEOUT(TO), .MAX_OUTSTANDING(MAXO)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      txq.push_back(tx_flit);
      if (tx_flit.addr == ADDR_TS_WAKE && tx_flit.cmd == CMD_WR_NA) wakes++;
    end
    if (pe_resp_valid) begin resps++; last_rdata = pe_resp_rdata; end
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  task automatic pe_req(input bit we, input node_t n, input int word, input logic [31:0] d);
    @(negedge clk);
    pe_req_valid = 1; pe_req_we = we; pe_req_wdata = d;
    pe_req_addr = {n, 10'd0, 16'(word), 2'b00};
    do @(posedge clk); while (!pe_req_ready);
    @(negedge clk); pe_req_valid = 0;
  endtask

  task automatic net_send(input node_t src, input cmd_e c, input logic [ADDR_W-1:0] a,
                          input logic [31:0] d);
    @(negedge clk);
    rx_valid = 1; rx_flit = '{dst: ME, src: src, cmd: c, addr: a, data: d};
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic wait_tx(output flit_t f);
    int n = 0;
    while (txq.size() == 0 && n < 100) begin @(posedge clk); n++; end
    if (txq.size() == 0) begin f = '0; chk(0, "no flit injected"); end
    else f = txq.pop_front();
  endtask

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    ts_status_t st;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (TO + 3) @(negedge clk);
    chk(mon_idle, "idle after time-out at start");

    // a read from an idle PE: request flit, then a wake notice
    pe_req(0, 4'd5, 16'h12, '0);
    wait_tx(f);
    chk(f.dst == 4'd5 && f.src == ME && f.cmd == CMD_RD && f.addr == 16'h12, "read request flit");
    wait_tx(f);
    chk(f.dst == NODE_TMU && f.cmd == CMD_WR_NA && f.addr == ADDR_TS_WAKE, "wake notice");
    st = ts_status_t'(f.data);
    chk(!st.idle && st.temp == 16'd5280 && st.outstanding == 1, "wake notice status word");
    chk(!mon_idle && mon_outstanding == 1, "busy, one outstanding");
    net_send(4'd5, CMD_RD_RESP, 16'h12, 32'hCAFE_0001);
    repeat (2) @(posedge clk);
    chk(resps == 1 && last_rdata == 32'hCAFE_0001, "read data to PE");
    chk(mon_outstanding == 0, "outstanding back to 0");

    // fill the outstanding limit with writes to the shared memory
    for (int k = 0; k < MAXO; k++) begin
      pe_req(1, NODE_SHMEM, k, 32'h100 + k);
      wait_tx(f);
      chk(f.dst == NODE_SHMEM && f.cmd == CMD_WR && f.data == 32'h100 + k && f.addr == 16'(k),
          "write request flit");
    end
    @(negedge clk);
    pe_req_valid = 1; pe_req_we = 1; pe_req_addr = {NODE_SHMEM, 28'h40};
    repeat (5) @(posedge clk);
    chk(!pe_req_ready, "request held back at the outstanding limit");
    pe_req_valid = 0;

    // TMU poll: status reply carries temperature, busy, 4 outstanding
    ts_temp = 16'd5440;
    net_send(NODE_TMU, CMD_RD, ADDR_TS_STATUS, '0);
    wait_tx(f);
    st = ts_status_t'(f.data);
    chk(f.dst == NODE_TMU && f.src == ME && f.cmd == CMD_WR_NA && f.addr == ADDR_TS_STATUS,
        "status reply header");
    chk(st.temp == 16'd5440 && !st.idle && st.outstanding == 4, "status reply content");

    for (int k = 0; k < MAXO; k++) net_send(NODE_SHMEM, CMD_WR_ACK, 16'(k), '0);
    repeat (2) @(posedge clk);
    chk(resps == 1 + MAXO, "write acks to PE");
    chk(mon_outstanding == 0, "nothing outstanding");
    repeat (TO / 2) @(posedge clk);
    chk(!mon_idle, "not idle before the time-out");
    @(negedge clk); freeze = 1;
    repeat (2 * TO) @(negedge clk);
    chk(!mon_idle, "idle timer holds under freeze");
    freeze = 0;
    repeat (TO) @(posedge clk);
    chk(mon_idle, "idle after the time-out");
    net_send(NODE_TMU, CMD_RD, ADDR_TS_STATUS, '0);
    wait_tx(f);
    st = ts_status_t'(f.data);
    chk(st.idle && st.outstanding == 0, "status reply reports idle");
    chk(wakes == 1, "exactly one wake notice so far");
    pe_req(0, 4'd5, 1, '0);
    wait_tx(f);
    wait_tx(f);
    chk(wakes == 2, "second wake notice after the second idle phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
