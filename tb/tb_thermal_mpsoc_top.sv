// tb_thermal_mpsoc_top: end-to-end run of the whole MPSoC in a closed thermal
// loop, with the poll period shortened to 300 cycles and the idle time-out
// to 1100 cycles (so that idle flags never change while a round is polling).
//
// Four processor models generate memory traffic at the rate their clock
// enables allow. After every TMU round the testbench acts as the emulation
// controller: it freezes the processor clocks, computes each processor's new
// temperature from the clock enables it counted during the round
// (T += 7.5 K * duty - (T - 300 K) / 8, so 500 MHz settles near 360 K and
// 62.5 MHz near 308 K); once it also forces a sudden 345 K -> 322 K drop on
// PE0 to exercise the one-step limit and writes it into the sensor registers. A reference
// model of the policy, written here, predicts every operating point, and
// the DVFS outputs must match it; the enable rate must match the level.
// Four phases run policy 0, 1, 2 and 3; in phases 1 to 3 processors
// pause long enough to be declared idle and then resume (wake notice).
// Every mechanism is counted and must occur at least once: the rise to
// 340 K, each of the four operating points, the one-step limit, the return
// at 321 K, idle detection, the wake notice, the predictor cap, the
// run-time prediction update, freeze and flits blocked in the network.
module tb_thermal_mpsoc_top;
  import thermal_pkg::*;
  localparam int N = 4, POLL = 300, TO = 1100;
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

  thermal_mpsoc_top #(.POLL_CYCLES(POLL), .IDLE_TIMEOUT(TO), .MEM_DEPTH(512)) dut (.*);

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

  int checks = 0, failures = 0;
  int temp [N];                 // 1/16 K
  int en_cnt [N], cyc_cnt = 0;
  bit r_fall [N];
  int r_th [N], r_lv [N], r_pred [N];
  int n_fall = 0, n_rise = 0, n_step = 0, n_idle = 0, n_wake = 0, n_pred = 0;
  int n_freeze = 0, n_block = 0, n_rate = 0, n_learn = 0;
  int r_slack [N];
  int n_lv [4];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ref_decide(input int i, input bit idl);
    int t, band, th;
    t = temp[i];
    if (!r_fall[i] && t >= 340 * 16) begin r_fall[i] = 1; n_fall++; end
    else if (r_fall[i] && t <= 321 * 16) begin r_fall[i] = 0; n_rise++; end
    band = (t >= 331 * 16) ? 2 : (t >= 325 * 16) ? 1 : 0;
    if (!r_fall[i]) th = 3;
    else if (band < r_th[i] - 1) begin th = r_th[i] - 1; n_step++; end
    else th = band;
    r_th[i] = th;
    if (policy != 0 && idl) begin r_lv[i] = 0; n_idle++; end
    else if (policy >= 2 && r_pred[i] < th) begin r_lv[i] = r_pred[i]; n_pred++; end
    else r_lv[i] = th;
    n_lv[r_lv[i]]++;
  endtask

  // clock-enable and network-blocking counters
  always @(posedge clk) if (rst_n) begin
    cyc_cnt++;
    for (int i = 0; i < N; i++) if (pe_clk_en[i]) en_cnt[i]++;
    if (freeze) begin
      n_freeze++;
      if (pe_clk_en != '0) begin failures++; $display("FAIL clock enabled during freeze"); end
    end
    if ((dut.u_noc.g_sw[0].u_sw.out_valid & ~dut.u_noc.g_sw[0].u_sw.out_ready) != '0 ||
        (dut.u_noc.g_sw[1].u_sw.out_valid & ~dut.u_noc.g_sw[1].u_sw.out_ready) != '0 ||
        (dut.u_noc.g_sw[2].u_sw.out_valid & ~dut.u_noc.g_sw[2].u_sw.out_ready) != '0)
      n_block++;
  end

  initial begin
    #2000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one round: wait for the TMU, check, update temperatures, manage activity
  task automatic round(input int k, input bit [N-1:0] act_next, input int force_t = 0);
    bit [N-1:0] idl;
    freq_level_e lv_before [N];
    @(posedge clk);
    while (!evt_round) @(posedge clk);
    idl = pe_idle;
    // the round just finished decided every PE from the temperatures and
    // idle flags it read
    for (int i = 0; i < N; i++) begin
      if (policy == 3 && idl[i] && r_slack[i] < 7) r_slack[i]++;
      ref_decide(i, idl[i]);
    end
    repeat (20) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      chk(int'(pe_level[i]) == r_lv[i],
          $sformatf("round %0d pe%0d level %0d expected %0d (policy %0d, T=%0d/16)",
                    k, i, pe_level[i], r_lv[i], policy, temp[i]));
      chk(int'(pe_vsel[i]) == r_lv[i], "voltage code follows level");
    end
    // enable rate over the last window at a constant level
    for (int i = 0; i < N; i++) begin
      en_cnt[i] = 0;
    end
    cyc_cnt = 0;
    for (int i = 0; i < N; i++) lv_before[i] = pe_level[i];
    repeat (128) @(posedge clk);
    for (int i = 0; i < N; i++) if (pe_level[i] == lv_before[i]) begin
      chk(en_cnt[i] == (128 >> (3 - int'(pe_level[i]))),
          $sformatf("pe%0d enable rate %0d/128 at level %0d", i, en_cnt[i], pe_level[i]));
      n_rate++;
    end
    // emulation controller: freeze, update the sensors, release
    @(negedge clk);
    freeze = 1;
    for (int i = 0; i < N; i++) begin
      int duty16;
      duty16 = 16 >> (3 - int'(pe_level[i]));   // duty cycle in 1/16
      temp[i] = temp[i] + (120 * duty16) / 16 - (temp[i] - 300 * 16) / 8;
      if (i == 0 && force_t > 0) temp[i] = force_t;
      ts_wr_en[i] = 1; ts_wr_temp[i] = TEMP_W'(temp[i]);
    end
    @(negedge clk);
    ts_wr_en = '0;
    repeat (3) @(negedge clk);
    freeze = 0;
    // activity changes; a PE that resumes after an idle phase sends a wake
    for (int i = 0; i < N; i++) begin
      if (act_next[i] && !active[i]) begin
        if (pe_idle[i]) begin
          n_wake++;
          if (policy == 3) begin
            if (r_slack[i] >= 2 && r_pred[i] > 0) begin r_pred[i]--; n_learn++; end
            else if (r_slack[i] == 0 && r_pred[i] < 3) begin r_pred[i]++; n_learn++; end
          end
          r_slack[i] = 0;
          if (policy != 0) ref_decide(i, 1'b0);
        end
      end
      active[i] = act_next[i];
    end
    repeat (40) @(posedge clk);
    for (int i = 0; i < N; i++)
      chk(int'(pe_level[i]) == r_lv[i], $sformatf("after activity change pe%0d level %0d expected %0d",
                                                 i, pe_level[i], r_lv[i]));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      temp[i] = 300 * 16; en_cnt[i] = 0;
      r_fall[i] = 0; r_th[i] = 3; r_lv[i] = 3; r_pred[i] = 3; r_slack[i] = 0;
    end
    for (int k = 0; k < 4; k++) n_lv[k] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // phase 0: local DVFS, all busy
    policy = 2'd0;
    for (int k = 0; k < 90; k++)
      round(k, '1, (k == 40) ? 345 * 16 : (k == 41) ? 322 * 16 : 0);
    // phase 1: local communication monitoring; PE2 and PE3 pause
    policy = 2'd1;
    for (int k = 0; k < 40; k++) round(100 + k, (k >= 5 && k < 15) ? 4'b0011 : 4'b1111);
    // phase 2: global workload predictor
    policy = 2'd2;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); cfg_we = 1; cfg_pe = 8'(i); cfg_level = freq_level_e'(3 - (i % 3));
      r_pred[i] = 3 - (i % 3);
      @(negedge clk); cfg_we = 0;
    end
    for (int k = 0; k < 40; k++) round(200 + k, (k >= 5 && k < 15) ? 4'b0110 : 4'b1111);
    // phase 3: the predictor learns from slack; PE1 pauses twice
    policy = 2'd3;
    for (int k = 0; k < 40; k++)
      round(300 + k, ((k >= 5 && k < 12) || (k >= 20 && k < 27)) ? 4'b1101 : 4'b1111);
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      chk(errors[i] == 0, $sformatf("pe%0d read data errors %0d", i, errors[i]));
      chk(done[i] > 100, $sformatf("pe%0d completed %0d transactions", i, done[i]));
    end
    $display("INFO falls=%0d rises=%0d step=%0d idle=%0d wake=%0d pred=%0d learn=%0d freeze=%0d block=%0d rate=%0d lv=%0d/%0d/%0d/%0d",
             n_fall, n_rise, n_step, n_idle, n_wake, n_pred, n_learn, n_freeze, n_block, n_rate,
             n_lv[0], n_lv[1], n_lv[2], n_lv[3]);
    chk(n_fall > 0, "rise to 340 K seen");
    chk(n_rise > 0, "return at 321 K seen");
    chk(n_step > 0, "one-step limit seen");
    chk(n_idle > 0, "idle detection seen");
    chk(n_wake > 0, "wake notice seen");
    chk(n_learn > 0, "run-time prediction update seen");
    chk(n_pred > 0, "predictor cap seen");
    chk(n_freeze > 0, "freeze seen");
    chk(n_block > 0, "blocked flit seen");
    for (int k = 0; k < 4; k++) chk(n_lv[k] > 0, $sformatf("operating point %0d used", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
