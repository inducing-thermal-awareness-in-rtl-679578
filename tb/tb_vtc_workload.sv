// tb_vtc_workload: runs a model of the evaluated multimedia workload, a
// four-way parallel texture-coding kernel, on the whole MPSoC under each of
// the three thermal policies in turn, with the thermal loop closed, and then
// under policy 3, the third policy with its prediction updated at run time.
//
// Each processor multiplies its 8 rows of two 32x32 complex windows
// (vtc_pe_model) for 3 iterations; processor 0 then gathers all products
// and reports a checksum, after which the next iteration is released. The
// windows are generated here and preloaded into the private memories; the
// expected checksums are computed here. After every TMU round the
// testbench, as emulation controller, freezes the clocks and updates each
// sensor: T += 7.5 K * (busy duty + idle duty / 4) - (T - 300 K) / 8.
// Poll period 1000 cycles, idle time-out 3000 cycles.
//
// Checks: every checksum; policy 0 never applies the idle rule; policies 1
// and 2 detect sleeping processors and wake them; policy 2 caps busy
// processors 1-3 at their predicted 250 MHz; policy 3 changes predictions
// at run time; temperatures stay below 350 K.
// Cycles, mean and peak temperature per policy are printed for comparison.
module tb_vtc_workload;
  import thermal_pkg::*;
  localparam int N = 4, POLL = 1000, TO = 3000, N_ITER = 3;
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
  logic run = 0;
  int go = 0;
  logic [N-1:0] busy, finished;
  logic gathered;
  logic [31:0] checksum;

  thermal_mpsoc_top #(.POLL_CYCLES(POLL), .IDLE_TIMEOUT(TO)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_pe
    logic g;
    logic [31:0] cs;
    vtc_pe_model #(.ID(i), .N_ITER(N_ITER)) u_pe (
      .clk, .clk_en(pe_clk_en[i]), .run, .go,
      .req_valid(pe_req_valid[i]), .req_ready(pe_req_ready[i]), .req_we(pe_req_we[i]),
      .req_addr(pe_req_addr[i]), .req_wdata(pe_req_wdata[i]),
      .resp_valid(pe_resp_valid[i]), .resp_rdata(pe_resp_rdata[i]),
      .busy(busy[i]), .gathered(g), .checksum(cs), .finished(finished[i])
    );
    if (i == 0) begin : g_root
      assign gathered = g;
      assign checksum = cs;
    end
  end

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int temp [N];
  int busy_en [N], idle_en [N], win = 0;
  longint temp_sum = 0, temp_n = 0;
  int temp_peak = 0;
  int n_idle_rule0 = 0, n_idle [4], n_wake [4], n_cap = 0, n_learn = 0;
  freq_level_e pred_q [N];
  logic [N-1:0] idle_q = '0;
  int low_run [N];          // cycles at 62.5 MHz while rising, policy 0

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // window element e of PE p, iteration t: real/imag parts of A and B
  function automatic logic [31:0] wval(input int p, input int t, input int w);
    return 32'((p * 7919 + t * 104729 + w * 2654435) % 65521) - 32'd32760;
  endfunction

  function automatic logic [31:0] expected_sum(input int t);
    logic [31:0] s, a, b, c, d;
    s = '0;
    for (int p = 0; p < N; p++)
      for (int e = 0; e < 256; e++) begin
        a = wval(p, t, 2 * e); b = wval(p, t, 2 * e + 1);
        c = wval(p, t, 512 + 2 * e); d = wval(p, t, 512 + 2 * e + 1);
        s = s + (a * c - b * d) + (a * d + b * c);
      end
    return s;
  endfunction

  task automatic preload();
    for (int t = 0; t < N_ITER; t++)
      for (int w = 0; w < 1024; w++) begin
        dut.g_mem[0].u_mem.mem[t * 1024 + w] = wval(0, t, w);
        dut.g_mem[1].u_mem.mem[t * 1024 + w] = wval(1, t, w);
        dut.g_mem[2].u_mem.mem[t * 1024 + w] = wval(2, t, w);
        dut.g_mem[3].u_mem.mem[t * 1024 + w] = wval(3, t, w);
      end
    for (int w = 0; w < 2052; w++) dut.g_mem[4].u_mem.mem[w] = '0;
  endtask

  // activity counters and mechanism counters
  always @(posedge clk) if (rst_n && run) begin
    win++;
    for (int i = 0; i < N; i++) if (pe_clk_en[i]) begin
      if (busy[i]) busy_en[i]++; else idle_en[i]++;
    end
    for (int i = 0; i < N; i++) begin
      // the DVFS write trails the TMU's decision by a few cycles
      if (policy == 0 && pe_level[i] == F_62M5 && !tmu_falling[i]) low_run[i]++;
      else low_run[i] = 0;
      if (low_run[i] == 20) n_idle_rule0++;
      if (pe_idle[i] && !idle_q[i]) n_idle[policy]++;
      if (!pe_idle[i] && idle_q[i]) n_wake[policy]++;
      if (policy == 3 && dut.u_tmu.pred[i] != pred_q[i]) n_learn++;
      pred_q[i] = dut.u_tmu.pred[i];
      if (policy == 2 && i > 0 && busy[i] && !tmu_falling[i] && pe_level[i] == F_250M) n_cap++;
    end
    idle_q <= pe_idle;
  end

  // emulation controller: after each round freeze, update sensors, release
  always @(posedge clk) if (rst_n && run && evt_round) begin
    repeat (10) @(negedge clk);
    freeze = 1;
    for (int i = 0; i < N; i++) begin
      if (win > 0)
        temp[i] = temp[i] + (120 * busy_en[i] + 30 * idle_en[i]) / win - (temp[i] - 300 * 16) / 8;
      busy_en[i] = 0; idle_en[i] = 0;
      ts_wr_en[i] = 1; ts_wr_temp[i] = TEMP_W'(temp[i]);
      temp_sum += temp[i]; temp_n++;
      if (temp[i] > temp_peak) temp_peak = temp[i];
    end
    win = 0;
    @(negedge clk);
    ts_wr_en = '0;
    repeat (3) @(negedge clk);
    freeze = 0;
  end

  initial begin
    #20000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_sum [N_ITER];
    longint t0;
    for (int t = 0; t < N_ITER; t++) exp_sum[t] = expected_sum(t);
    for (int p = 0; p < 4; p++) begin n_idle[p] = 0; n_wake[p] = 0; end
    for (int i = 0; i < N; i++) pred_q[i] = F_500M;
    for (int p = 0; p < 4; p++) begin
      rst_n = 0; run = 0; go = 0;
      repeat (4) @(negedge clk);
      preload();
      for (int i = 0; i < N; i++) begin
        temp[i] = 300 * 16; busy_en[i] = 0; idle_en[i] = 0; low_run[i] = 0;
      end
      win = 0; temp_sum = 0; temp_n = 0; temp_peak = 0;
      policy = 2'(p);
      rst_n = 1;
      if (p >= 2)
        for (int i = 0; i < N; i++) begin
          @(negedge clk); cfg_we = 1; cfg_pe = 8'(i); cfg_level = (i == 0) ? F_500M : F_250M;
          @(negedge clk); cfg_we = 0;
          pred_q[i] = dut.u_tmu.pred[i];
        end
      t0 = $time;
      run = 1;
      for (int t = 0; t < N_ITER; t++) begin
        go = t + 1;
        @(posedge clk);
        while (!gathered) @(posedge clk);
        chk(checksum == exp_sum[t], $sformatf("policy %0d iteration %0d checksum %h expected %h",
                                              p, t, checksum, exp_sum[t]));
        // let the others sleep long enough to be seen idle
        repeat (2 * TO + POLL) @(posedge clk);
      end
      wait (finished == '1);
      $display("INFO policy %0d: %0d cycles, mean %0d.%0d K, peak %0d.%0d K, idle phases %0d, wakes %0d",
               p, ($time - t0) / 2, int'(temp_sum / temp_n) / 16, (int'(temp_sum / temp_n) % 16) * 10 / 16,
               temp_peak / 16, (temp_peak % 16) * 10 / 16, n_idle[p], n_wake[p]);
      chk(temp_peak < 350 * 16, $sformatf("policy %0d peak temperature below 350 K", p));
      run = 0;
      @(negedge clk);
    end
    chk(n_idle_rule0 == 0, "policy 0 never applies the idle rule");
    chk(n_idle[1] > 0 && n_wake[1] > 0, "policy 1 detects sleeping processors and wakes them");
    chk(n_idle[2] > 0 && n_wake[2] > 0, "policy 2 detects sleeping processors and wakes them");
    chk(n_cap > 0, "policy 2 caps busy processors at their predicted 250 MHz");
    chk(n_idle[3] > 0 && n_wake[3] > 0 && n_learn > 0, "policy 3 updates its predictions at run time");
    $display("INFO policy 3 prediction changes: %0d", n_learn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
