// tb_ni_slave: a slave interface (node 6) in front of a 64-word memory model
// kept in the testbench. Sends random reads, acknowledged writes and
// non-acknowledged writes; checks the bus accesses, that reads come back as
// CMD_RD_RESP with the right data, writes as CMD_WR_ACK, that
// non-acknowledged writes get no answer, and that an answer is offered in the
// second cycle after the request is accepted. The answer link sees back-pressure.
module tb_ni_slave;
  import thermal_pkg::*;
  localparam node_t ME = 4'd6;
  logic clk = 0, rst_n = 0;
  flit_t rx_flit = '0, tx_flit;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  logic bus_valid, bus_we;
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata, bus_rdata;
  node_t bus_src;
  logic [31:0] ref_mem [64];
  logic [31:0] dut_mem [64];
  int checks = 0, failures = 0, answers = 0, na_writes = 0;

  ni_slave #(.NODE_ID(ME)) dut (.*);
  always #5 clk = ~clk;

  // memory model behind the bus: one-cycle read
  always @(posedge clk) begin
    if (bus_valid && bus_we) dut_mem[bus_addr[5:0]] <= bus_wdata;
    if (bus_valid && !bus_we) bus_rdata <= dut_mem[bus_addr[5:0]];
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin ref_mem[i] = 0; dut_mem[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      cmd_e c;
      int a, n, src;
      logic [31:0] d;
      case ($urandom_range(0, 2))
        0: c = CMD_RD;
        1: c = CMD_WR;
        default: c = CMD_WR_NA;
      endcase
      a = $urandom_range(0, 63); d = $urandom; src = $urandom_range(0, 3);
      @(negedge clk);
      rx_valid = 1; rx_flit = '{dst: ME, src: node_t'(src), cmd: c, addr: ADDR_W'(a), data: d};
      while (!rx_ready) @(negedge clk);
      @(posedge clk);
      chk(bus_valid && bus_we == (c != CMD_RD) && bus_addr == ADDR_W'(a) &&
          bus_src == node_t'(src), "bus access");
      @(negedge clk); rx_valid = 0;
      if (c != CMD_RD) ref_mem[a] = d;
      if (c == CMD_WR_NA) begin
        na_writes++;
        repeat (3) @(posedge clk);
        chk(!tx_valid, "no answer to a non-acknowledged write");
      end else begin
        @(posedge clk);
        chk(!tx_valid, "no answer while the slave returns its data");
        @(posedge clk);
        chk(tx_valid, "answer offered two cycles after the request");
        n = 0;
        while (!(tx_valid && tx_ready) && n < 20) begin
          @(negedge clk); tx_ready = ($urandom_range(0, 1) == 1); @(posedge clk); n++;
        end
        chk(tx_flit.dst == node_t'(src) && tx_flit.src == ME &&
            tx_flit.cmd == ((c == CMD_RD) ? CMD_RD_RESP : CMD_WR_ACK), "answer header");
        if (c == CMD_RD) chk(tx_flit.data == ref_mem[a], "read data");
        answers++;
        @(negedge clk); tx_ready = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
