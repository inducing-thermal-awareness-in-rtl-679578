// noc_switch: N-port packet switch of the on-chip network (5x5 by default,
// as in the 4-core case study).
//
// Every input port has a FIFO buffer (IN_DEPTH flits). The head flit of each
// input is routed by thermal_pkg::route(SW_ID, dst), a fixed table for the
// three-switch chain. Each output port has a round-robin arbiter over the
// inputs whose head flit wants it; the winner is driven straight to the
// output and popped when the output's ready is high. A flit therefore spends
// at least one cycle per switch. Links use valid/ready: a sender holds its
// flit steady until ready is seen (checked by an assertion on each output).
//
// The document builds its network with an existing NoC library and gives
// only the switch size (5x5) and count (three); buffering, arbitration and
// routing here are this design's own, chosen as the simplest that works.
module noc_switch
  import thermal_pkg::*;
#(
  parameter int unsigned SW_ID    = 0,
  parameter int unsigned N_PORTS  = SW_PORTS,
  parameter int unsigned IN_DEPTH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t [N_PORTS-1:0]  in_flit,
  input  logic  [N_PORTS-1:0]  in_valid,
  output logic  [N_PORTS-1:0]  in_ready,
  output flit_t [N_PORTS-1:0]  out_flit,
  output logic  [N_PORTS-1:0]  out_valid,
  input  logic  [N_PORTS-1:0]  out_ready
);
  flit_t [N_PORTS-1:0] head;
  logic  [N_PORTS-1:0] head_valid, head_pop;
  logic  [N_PORTS-1:0][PORT_W-1:0] head_port;
  logic  [N_PORTS-1:0][N_PORTS-1:0] req;      // req[o][i]
  logic  [N_PORTS-1:0][N_PORTS-1:0] gnt;      // gnt[o][i]
  logic  [N_PORTS-1:0][N_PORTS-1:0] gnt_hold; // grant kept while output stalls
  logic  [N_PORTS-1:0]              hold;
  logic  [N_PORTS-1:0][$clog2(N_PORTS)-1:0] rr_ptr;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    sync_fifo #(.T(flit_t), .DEPTH(IN_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in_data (in_flit[i]),
      .out_valid(head_valid[i]), .out_ready(head_pop[i]), .out_data(head[i])
    );
    assign head_port[i] = route(SW_ID, head[i].dst);
  end

  always_comb begin
    for (int o = 0; o < N_PORTS; o++)
      for (int i = 0; i < N_PORTS; i++)
        req[o][i] = head_valid[i] && (head_port[i] == PORT_W'(o));
  end

  // Round-robin arbitration: search starts at rr_ptr[o]. A grant given to a
  // flit that the output could not take is kept until the flit leaves.
  always_comb begin
    int unsigned i;
    i   = 0;
    gnt = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      if (hold[o]) gnt[o] = gnt_hold[o];
      else begin
        for (int k = 0; k < N_PORTS; k++) begin
          i = (int'(rr_ptr[o]) + k) % N_PORTS;
          if (req[o][i] && gnt[o] == '0) gnt[o][i] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    head_pop  = '0;
    out_flit  = '0;
    out_valid = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        if (gnt[o][i]) begin
          out_flit[o]  = head[i];
          out_valid[o] = 1'b1;
          head_pop[i]  = out_ready[o];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr   <= '0;
      hold     <= '0;
      gnt_hold <= '0;
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        hold[o]     <= out_valid[o] && !out_ready[o];
        gnt_hold[o] <= gnt[o];
        for (int i = 0; i < N_PORTS; i++) begin
          if (gnt[o][i] && out_ready[o])
            rr_ptr[o] <= ($clog2(N_PORTS))'((i + 1) % N_PORTS);
        end
      end
    end
  end

  // Valid/ready rule: an offered flit stays offered, unchanged, until taken.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_flit[o]));
  end
endmodule
