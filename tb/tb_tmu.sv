// tb_tmu: the TMU alone, with the network around it modelled here. Polls are
// answered after a random delay with status words built from testbench
// temperatures and idle flags; writes to the DVFS unit are recorded. A
// reference model written here applies the three-threshold rule (rise to
// 340 K -> falling; 250 MHz at >= 331 K, 125 MHz at >= 325 K, else 62.5 MHz,
// at most one step down per decision; back to 500 MHz at <= 321 K), the idle
// rule and the predictor cap. After each round the recorded DVFS settings
// must match the model. The test walks the temperatures through every band
// under each of the four policy settings (policy 3 adds the run-time slack
// update of the predictor, modelled here too), sends wake notices, and checks that a
// round starts every POLL_CYCLES cycles, not counting cycles under freeze.
module tb_tmu;
  import thermal_pkg::*;
  localparam int N = 4, POLL = 200;
  logic clk = 0, rst_n = 0;
  logic [1:0] policy = 2'd0;
  logic freeze = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_pe = '0;
  freq_level_e cfg_level = F_500M;
  logic m_valid, m_ready = 0;
  node_t m_dst;
  cmd_e m_cmd;
  logic [ADDR_W-1:0] m_addr;
  logic [DATA_W-1:0] m_data;
  logic s_valid = 0;
  node_t s_src = '0;
  logic [ADDR_W-1:0] s_addr = '0;
  logic [DATA_W-1:0] s_data = '0;
  freq_level_e [N-1:0] level;
  logic [N-1:0] falling;
  logic evt_round;

  int checks = 0, failures = 0, cyc = 0, rounds = 0, last_round_start = -1;
  int polls = 0, dvfs_writes = 0, wakes_sent = 0;
  int temp_k [N];          // temperature, 1/16 K
  bit idle [N];
  int dvfs_lv [N];
  // reference model state
  bit r_fall [N];
  int r_th [N], r_lv [N], r_pred [N], r_slack [N];
  int seen_learn_down = 0, seen_learn_up = 0;
  // mechanisms seen
  int seen_lv [4];
  int seen_fall = 0, seen_rise = 0, seen_idle_min = 0, seen_pred_cap = 0, seen_step_limit = 0;
  int reply_cnt = -1, reply_pe = 0;

  tmu #(.N_PE(N), .POLL_CYCLES(POLL)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] status_of(input int i);
    ts_status_t s;
    s = '0;
    s.temp = TEMP_W'(temp_k[i]);
    s.idle = idle[i];
    return s;
  endfunction

  // reference decision for PE i
  task automatic ref_decide(input int i);
    int t, band, th;
    t = temp_k[i];
    if (!r_fall[i] && t >= 340 * 16) begin r_fall[i] = 1; seen_fall++; end
    else if (r_fall[i] && t <= 321 * 16) begin r_fall[i] = 0; seen_rise++; end
    band = (t >= 331 * 16) ? 2 : (t >= 325 * 16) ? 1 : 0;
    if (!r_fall[i]) th = 3;
    else if (band < r_th[i] - 1) begin th = r_th[i] - 1; seen_step_limit++; end
    else th = band;
    r_th[i] = th;
    if (policy != 0 && idle[i]) begin r_lv[i] = 0; seen_idle_min++; end
    else if (policy >= 2 && r_pred[i] < th) begin r_lv[i] = r_pred[i]; seen_pred_cap++; end
    else r_lv[i] = th;
    seen_lv[r_lv[i]]++;
  endtask

  // a round starts when the poll of PE0 is first offered
  // (freeze stops the poll timer, so frozen cycles lengthen the period)
  logic prev_p0 = 0;
  int reset_cyc = 0, frz = 0, frz_total = 0;
  always @(posedge clk) begin
    logic p0;
    p0 = rst_n && m_valid && m_cmd == CMD_RD && m_dst == 0;
    if (freeze) begin frz++; frz_total++; end
    if (p0 && !prev_p0) begin
      if (last_round_start >= 0)
        chk(cyc - last_round_start == POLL + frz,
            $sformatf("round period %0d with %0d frozen cycles", cyc - last_round_start, frz));
      else
        chk(cyc - reset_cyc >= POLL && cyc - reset_cyc <= POLL + 3,
            $sformatf("first round %0d cycles after reset", cyc - reset_cyc));
      frz = 0;
      last_round_start = cyc;
    end
    prev_p0 = p0;
  end

  // network model
  always @(posedge clk) begin
    cyc++;
    s_valid <= 0;
    if (rst_n && m_valid && m_ready) begin
      if (m_cmd == CMD_RD) begin
        chk(m_dst < N && m_addr == ADDR_TS_STATUS, "poll header");
        reply_pe = int'(m_dst);
        reply_cnt = $urandom_range(2, 8);
        polls++;
      end else begin
        chk(m_cmd == CMD_WR_NA && m_dst == NODE_DVFS && m_addr < N, "DVFS write header");
        dvfs_lv[m_addr] = int'(m_data);
        dvfs_writes++;
      end
    end
    if (reply_cnt == 0) begin
      s_valid <= 1; s_src <= node_t'(reply_pe); s_addr <= ADDR_TS_STATUS;
      s_data  <= status_of(reply_pe);
      if (policy == 3 && idle[reply_pe] && r_slack[reply_pe] < 7) r_slack[reply_pe]++;
      ref_decide(reply_pe);
    end
    if (reply_cnt >= 0) reply_cnt--;
  end
  always @(negedge clk) m_ready = ($urandom_range(0, 3) != 0);

  task automatic wait_round();
    @(posedge clk);
    while (!evt_round) @(posedge clk);
    rounds++;
    repeat (4) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      chk(dvfs_lv[i] == r_lv[i], $sformatf("round %0d pe%0d level %0d expected %0d (policy %0d)",
          rounds, i, dvfs_lv[i], r_lv[i], policy));
      chk(falling[i] == r_fall[i], "falling flag");
    end
  endtask

  task automatic send_wake(input int i);
    @(negedge clk);
    idle[i] = 0;
    s_valid <= 1; s_src <= node_t'(i); s_addr <= ADDR_TS_WAKE; s_data <= status_of(i);
    @(negedge clk);
    if (policy == 3) begin
      if (r_slack[i] >= 2 && r_pred[i] > 0) begin r_pred[i]--; seen_learn_down++; end
      else if (r_slack[i] == 0 && r_pred[i] < 3) begin r_pred[i]++; seen_learn_up++; end
    end
    r_slack[i] = 0;
    if (policy != 0) ref_decide(i);
    wakes_sent++;
    repeat (10) @(posedge clk);
    chk(dvfs_lv[i] == r_lv[i], $sformatf("after wake pe%0d level %0d expected %0d", i, dvfs_lv[i], r_lv[i]));
  endtask

  initial begin
    #2000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prof [N][$];
    for (int i = 0; i < N; i++) begin
      temp_k[i] = 300 * 16; idle[i] = 0; dvfs_lv[i] = 3;
      r_fall[i] = 0; r_th[i] = 3; r_lv[i] = 3; r_pred[i] = 3; r_slack[i] = 0;
    end
    for (int k = 0; k < 4; k++) seen_lv[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    reset_cyc = cyc;
    for (int p = 0; p < 4; p++) begin
      policy = 2'(p);
      if (p == 2) begin
        for (int i = 0; i < N; i++) begin
          @(negedge clk); cfg_we = 1; cfg_pe = 8'(i); cfg_level = freq_level_e'(i);
          r_pred[i] = i;
          @(negedge clk); cfg_we = 0;
        end
      end
      // a temperature sweep: up past 340, down in steps, a jump, below 321
      for (int step = 0; step < 14; step++) begin
        int base [14] = '{330, 336, 341, 343, 338, 332, 329, 326, 319, 345, 323, 318, 335, 300};
        for (int i = 0; i < N; i++) begin
          temp_k[i] = (base[step] + i) * 16 + $urandom_range(0, 15);
          idle[i]   = (policy != 0) && ($urandom_range(0, 3) == 0);
        end
        wait_round();
        if (step == 5) begin
          @(negedge clk); freeze = 1;
          repeat (37) @(negedge clk);
          freeze = 0;
        end
        if (policy != 0) for (int i = 0; i < N; i++) if (idle[i]) begin send_wake(i); break; end
        // under policy 3 also wake a PE no poll found idle (zero slack)
        if (policy == 3 && step % 3 == 0)
          for (int i = N - 1; i >= 0; i--) if (!idle[i] && r_slack[i] == 0) begin send_wake(i); break; end
      end
    end
    chk(seen_fall > 0 && seen_rise > 0 && seen_step_limit > 0, "threshold crossings and step limit seen");
    chk(seen_lv[0] > 0 && seen_lv[1] > 0 && seen_lv[2] > 0 && seen_lv[3] > 0, "all four operating points used");
    chk(seen_idle_min > 0 && seen_pred_cap > 0 && wakes_sent > 0, "idle rule, predictor cap and wake seen");
    chk(frz_total > 0, "freeze seen");
    chk(seen_learn_down > 0 && seen_learn_up > 0, "run-time predictor lowered and raised a cap");
    $display("INFO rounds=%0d polls=%0d dvfs_writes=%0d falls=%0d rises=%0d steplimit=%0d idle=%0d pred=%0d wakes=%0d learn_down=%0d learn_up=%0d",
             rounds, polls, dvfs_writes, seen_fall, seen_rise, seen_step_limit, seen_idle_min, seen_pred_cap, wakes_sent, seen_learn_down, seen_learn_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
