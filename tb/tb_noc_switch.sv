// tb_noc_switch: drives all five inputs of the middle switch (S1) with random
// flits to random nodes, applies random back-pressure on the outputs, and
// checks that every flit leaves on the port the chain topology calls for
// (a table written out here), that flits from one input to one output keep
// their order, and that none is lost. Inputs obey valid/ready.
module tb_noc_switch;
  import thermal_pkg::*;
  localparam int NP = 5, NPKT = 200;
  logic clk = 0, rst_n = 0;
  flit_t [NP-1:0] in_flit, out_flit;
  logic  [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0, delivered = 0, stalls = 0, contention = 0;
  int sent [NP];
  flit_t q [NP][NP][$];   // q[in][out]

  noc_switch #(.SW_ID(1), .N_PORTS(NP), .IN_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;

  // Expected output port of S1 for each destination node.
  function automatic int exp_port(input node_t d);
    case (d)
      4'd6: return 0;  4'd7: return 1;  4'd8: return 2;
      4'd0, 4'd1, 4'd4, 4'd5: return 3;
      default: return 4;
    endcase
  endfunction

  function automatic flit_t mk(input int i, input int s);
    flit_t f;
    f.dst  = node_t'($urandom_range(0, 10));
    f.src  = node_t'(i);
    f.cmd  = CMD_WR;
    f.addr = ADDR_W'(s);
    f.data = $urandom;
    return f;
  endfunction

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0; in_flit = '0; out_ready = '0;
    for (int i = 0; i < NP; i++) sent[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  // monitor at the clock edge (values before the edge), drivers at negedge
  bit acc [NP];
  always @(posedge clk) if (rst_n) begin
    int wanted;
    for (int o = 0; o < NP; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int i;
        flit_t e;
        i = int'(out_flit[o].src);
        checks++;
        if (exp_port(out_flit[o].dst) != o) begin
          failures++;
          $display("FAIL flit for node %0d left on port %0d", out_flit[o].dst, o);
        end else if (q[i][o].size() == 0) begin
          failures++;
          $display("FAIL unexpected flit on port %0d", o);
        end else begin
          e = q[i][o].pop_front();
          if (e !== out_flit[o]) begin
            failures++;
            $display("FAIL order/content on port %0d from input %0d", o, i);
          end
        end
        delivered++;
      end
      if (out_valid[o] && !out_ready[o]) stalls++;
    end
    wanted = 0;
    for (int i = 0; i < NP; i++) if (in_valid[i] && !in_ready[i]) wanted++;
    if (wanted > 1) contention++;
    for (int i = 0; i < NP; i++) begin
      acc[i] = in_valid[i] && in_ready[i];
      if (acc[i]) begin
        q[i][exp_port(in_flit[i].dst)].push_back(in_flit[i]);
        sent[i]++;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NP; i++) begin
      if (acc[i]) begin in_valid[i] = 0; acc[i] = 0; end
      if (!in_valid[i] && sent[i] < NPKT && $urandom_range(0, 3) != 0) begin
        in_flit[i]  = mk(i, sent[i]);
        in_valid[i] = 1;
      end
    end
    for (int o = 0; o < NP; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
  end

  initial begin
    bit all_sent;
    wait (rst_n);
    do begin
      @(posedge clk);
      all_sent = 1;
      for (int i = 0; i < NP; i++) if (sent[i] < NPKT) all_sent = 0;
    end while (!all_sent);
    repeat (50) @(posedge clk);
    checks++;
    if (delivered != NP * NPKT) begin
      failures++;
      $display("FAIL delivered %0d of %0d", delivered, NP * NPKT);
    end
    checks++;
    if (stalls == 0 || contention == 0) begin
      failures++;
      $display("FAIL back-pressure (%0d) or contention (%0d) never happened", stalls, contention);
    end
    $display("delivered=%0d stalls=%0d contention=%0d", delivered, stalls, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
