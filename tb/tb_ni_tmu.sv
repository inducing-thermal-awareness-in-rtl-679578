// tb_ni_tmu: checks the TMU's dual interface. Master requests must come out
// as flits with the TMU as source, in order, under random back-pressure;
// arriving non-acknowledged writes must appear on the slave port one cycle
// later; other commands must be dropped and counted.
module tb_ni_tmu;
  import thermal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic m_valid = 0, m_ready;
  node_t m_dst = '0;
  cmd_e m_cmd = CMD_RD;
  logic [ADDR_W-1:0] m_addr = '0;
  logic [DATA_W-1:0] m_data = '0;
  logic s_valid;
  node_t s_src;
  logic [ADDR_W-1:0] s_addr;
  logic [DATA_W-1:0] s_data;
  logic [7:0] s_dropped;
  flit_t tx_flit, rx_flit = '0;
  logic tx_valid, tx_ready = 0, rx_valid = 0, rx_ready;
  int checks = 0, failures = 0, got = 0;
  flit_t expq [$];

  ni_tmu #(.NODE_ID(NODE_TMU)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (tx_valid && tx_ready) begin
    flit_t e;
    e = expq.pop_front();
    chk(tx_flit == e, "master flit");
    got++;
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      m_valid = 1; m_dst = node_t'($urandom_range(0, 10));
      m_cmd = ($urandom_range(0, 1) == 1) ? CMD_RD : CMD_WR_NA;
      m_addr = ADDR_W'($urandom); m_data = $urandom;
      @(posedge clk);
      while (!m_ready) @(posedge clk);
      expq.push_back('{dst: m_dst, src: NODE_TMU, cmd: m_cmd, addr: m_addr, data: m_data});
      @(negedge clk); m_valid = 0;
    end
    repeat (20) @(posedge clk);
    chk(got == 100 && expq.size() == 0, "all master requests sent");

    for (int k = 0; k < 50; k++) begin
      flit_t f;
      f = '{dst: NODE_TMU, src: node_t'($urandom_range(0, 3)),
            cmd: (k % 5 == 4) ? CMD_RD_RESP : CMD_WR_NA,
            addr: ADDR_W'($urandom_range(0, 1)), data: $urandom};
      @(negedge clk); rx_valid = 1; rx_flit = f;
      @(negedge clk); rx_valid = 0;
      if (f.cmd == CMD_WR_NA)
        chk(s_valid && s_src == f.src && s_addr == f.addr && s_data == f.data, "slave write");
      else
        chk(!s_valid, "other command not passed on");
    end
    chk(s_dropped == 8'd10, "dropped count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
