// tb_thermal_mpsoc_full: the MPSoC at its default sizes (1 ms poll period and
// 10 ms idle time-out at 500 MHz, 4096-word memories). Four processor models
// run memory traffic while the emulation side writes the sensors. Round 1
// must put PE0 (341 K) into the falling region at 250 MHz and leave the
// others at 500 MHz; after PE0 is cooled to 322 K, round 2 must lower it
// one step, to 125 MHz, rather than straight to 62.5 MHz. Rounds must come
// 500,000 cycles apart, and all read data must be correct.
module tb_thermal_mpsoc_full;
  import thermal_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pe_req_valid, pe_req_ready, pe_req_we, pe_resp_valid, pe_resp_we;
  logic [N-1:0][31:0] pe_req_addr, pe_req_wdata, pe_resp_rdata;
  logic [N-1:0] pe_clk_en;
  logic [N-1:0][1:0] pe_vsel;
  logic [N-1:0] ts_wr_en = '0;
  logic [N-1:0][TEMP_W-1:0] ts_wr_temp = '0;
  logic freeze = 0;
  logic [1:0] policy = 2'd0;
  logic cfg_we = 0;
  logic [7:0] cfg_pe = '0;
  freq_level_e cfg_level = F_500M;
  freq_level_e [N-1:0] pe_level;
  logic [N-1:0] tmu_falling, pe_idle;
  logic evt_round;
  logic [N-1:0] active = '1;
  int done [N], errors [N];
  int checks = 0, failures = 0;
  longint cyc = 0, t_round [$];

  thermal_mpsoc_top dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_pe
    pe_model #(.ID(i)) u_pe (
      .clk, .rst_n, .clk_en(pe_clk_en[i]), .active(active[i]),
      .req_valid(pe_req_valid[i]), .req_ready(pe_req_ready[i]), .req_we(pe_req_we[i]),
      .req_addr(pe_req_addr[i]), .req_wdata(pe_req_wdata[i]),
      .resp_valid(pe_resp_valid[i]), .resp_we(pe_resp_we[i]), .resp_rdata(pe_resp_rdata[i]),
      .done(done[i]), .errors(errors[i])
    );
  end

  always #1 clk = ~clk;
  // a round starts when the TMU first offers its poll of PE0
  bit prev_p0 = 0;
  always @(posedge clk) begin
    bit p0;
    cyc++;
    p0 = dut.u_tmu.m_valid && dut.u_tmu.m_cmd == CMD_RD && dut.u_tmu.m_dst == NODE_PE0;
    if (p0 && !prev_p0) t_round.push_back(cyc);
    prev_p0 = p0;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_temp(input int i, input int kelvin16);
    @(negedge clk); ts_wr_en[i] = 1; ts_wr_temp[i] = TEMP_W'(kelvin16);
    @(negedge clk); ts_wr_en[i] = 0;
  endtask

  initial begin
    #3000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    write_temp(0, 341 * 16);
    write_temp(1, 333 * 16);
    @(posedge clk);
    while (!evt_round) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(pe_level[0] == F_250M && tmu_falling[0], "PE0 falling at 250 MHz after round 1");
    for (int i = 1; i < N; i++) chk(pe_level[i] == F_500M && !tmu_falling[i], "others stay at 500 MHz");
    write_temp(0, 322 * 16);
    @(posedge clk);
    while (!evt_round) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(pe_level[0] == F_125M, $sformatf("PE0 one step lower after round 2 (level %0d)", pe_level[0]));
    chk(t_round.size() == 2 && t_round[1] - t_round[0] == 500_000,
        $sformatf("rounds 500,000 cycles apart (%0d)", t_round[1] - t_round[0]));
    chk(t_round[0] > 500_000 && t_round[0] < 500_000 + 20, "first round starts 1 ms after reset");
    for (int i = 0; i < N; i++) begin
      chk(errors[i] == 0 && done[i] > 1000, $sformatf("pe%0d done=%0d errors=%0d", i, done[i], errors[i]));
      chk(!pe_idle[i], "busy processors are not idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
