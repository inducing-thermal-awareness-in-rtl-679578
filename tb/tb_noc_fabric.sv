// tb_noc_fabric: every one of the eleven endpoints injects random flits to
// random other nodes while the ejection links apply random back-pressure.
// Checks that each flit comes out at the endpoint it was addressed to,
// unchanged, in order per source/destination pair, that none is lost, and
// that flits crossing two inter-switch links (S0 <-> S2) take at least three
// cycles.
module tb_noc_fabric;
  import thermal_pkg::*;
  localparam int NN = N_NODES, NPKT = 120;
  logic clk = 0, rst_n = 0;
  flit_t [NN-1:0] ep_tx_flit, ep_rx_flit;
  logic  [NN-1:0] ep_tx_valid, ep_tx_ready, ep_rx_valid, ep_rx_ready;
  int checks = 0, failures = 0, delivered = 0, far = 0, cyc = 0;
  int sent [NN];
  bit acc [NN];
  flit_t q [NN][NN][$];
  int    t0 [NN][NN][$];

  noc_fabric dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic int sw_of(input int n);   // switch of each node
    if (n == 0 || n == 1 || n == 4 || n == 5) return 0;
    if (n == 6 || n == 7 || n == 8) return 1;
    return 2;
  endfunction

  initial begin
    #500000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ep_tx_valid = '0; ep_tx_flit = '0; ep_rx_ready = '0;
    for (int i = 0; i < NN; i++) sent[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NN; d++) begin
      if (ep_rx_valid[d] && ep_rx_ready[d]) begin
        int s;
        flit_t e;
        int t;
        s = int'(ep_rx_flit[d].src);
        checks++;
        if (int'(ep_rx_flit[d].dst) != d || q[s][d].size() == 0) begin
          failures++;
          $display("FAIL flit for %0d out at %0d", ep_rx_flit[d].dst, d);
        end else begin
          e = q[s][d].pop_front();
          t = t0[s][d].pop_front();
          if (e !== ep_rx_flit[d]) begin
            failures++;
            $display("FAIL order/content %0d -> %0d", s, d);
          end
          if (sw_of(s) != 1 && sw_of(d) != 1 && sw_of(s) != sw_of(d)) begin
            far++;
            checks++;
            if (cyc - t < 3) begin
              failures++;
              $display("FAIL %0d -> %0d took %0d cycles", s, d, cyc - t);
            end
          end
        end
        delivered++;
      end
    end
    for (int s = 0; s < NN; s++) begin
      acc[s] = ep_tx_valid[s] && ep_tx_ready[s];
      if (acc[s]) begin
        q[s][int'(ep_tx_flit[s].dst)].push_back(ep_tx_flit[s]);
        t0[s][int'(ep_tx_flit[s].dst)].push_back(cyc);
        sent[s]++;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NN; s++) begin
      if (acc[s]) begin ep_tx_valid[s] = 0; acc[s] = 0; end
      if (!ep_tx_valid[s] && sent[s] < NPKT && $urandom_range(0, 2) == 0) begin
        int d;
        do d = $urandom_range(0, NN - 1); while (d == s);
        ep_tx_flit[s].dst  = node_t'(d);
        ep_tx_flit[s].src  = node_t'(s);
        ep_tx_flit[s].cmd  = cmd_e'($urandom_range(0, 4));
        ep_tx_flit[s].addr = ADDR_W'(sent[s]);
        ep_tx_flit[s].data = $urandom;
        ep_tx_valid[s] = 1;
      end
    end
    for (int d = 0; d < NN; d++) ep_rx_ready[d] = ($urandom_range(0, 4) != 0);
  end

  initial begin
    bit all_sent;
    wait (rst_n);
    do begin
      @(posedge clk);
      all_sent = 1;
      for (int i = 0; i < NN; i++) if (sent[i] < NPKT) all_sent = 0;
    end while (!all_sent);
    repeat (200) @(posedge clk);
    checks++;
    if (delivered != NN * NPKT || far == 0) begin
      failures++;
      $display("FAIL delivered %0d of %0d, S0<->S2 flits %0d", delivered, NN * NPKT, far);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
