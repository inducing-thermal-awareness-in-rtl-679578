// dvfs_unit: dynamic voltage and frequency scaling unit for N_PE processing
// elements.
//
// It holds one operating-point register per PE, written over the network by
// the thermal management unit through a slave interface (bus address = PE
// index, bus_wdata[1:0] = freq_level_e). From the 500 MHz base clock it
// derives a clock enable for each PE: one pulse every 2**(3-level) cycles,
// i.e. 500, 250, 125 or 62.5 MHz. pe_vsel gives the matching voltage-level
// code for the external regulator (0 = lowest voltage). freeze holds every PE
// enable low: the global clock gating the emulation controller applies while
// it updates the sensors. A read returns the PE's level.
//
// Timing: a write changes pe_level, pe_vsel and the enable pattern from the
// next cycle. Reset sets every PE to 500 MHz.
//
// The four operating points and one unit driving all four PEs follow the
// document. Generating clock enables rather than gated clocks, the
// voltage-code output and the register map are this design's own.
module dvfs_unit
  import thermal_pkg::*;
#(
  parameter int unsigned N_PE = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   freeze,
  // slave bus from the network interface
  input  logic                   bus_valid,
  input  logic                   bus_we,
  input  logic [ADDR_W-1:0]      bus_addr,
  input  logic [DATA_W-1:0]      bus_wdata,
  output logic [DATA_W-1:0]      bus_rdata,
  // per-PE outputs
  output freq_level_e [N_PE-1:0] pe_level,
  output logic [N_PE-1:0][1:0]   pe_vsel,
  output logic [N_PE-1:0]        pe_clk_en
);
  localparam int unsigned IW = (N_PE > 1) ? $clog2(N_PE) : 1;

  logic [2:0]    div_cnt;
  logic [IW-1:0] idx;

  assign idx = bus_addr[IW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PE; i++) pe_level[i] <= F_500M;
      div_cnt   <= '0;
      bus_rdata <= '0;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      if (bus_valid && bus_we && (int'(bus_addr) < N_PE))
        pe_level[idx] <= freq_level_e'(bus_wdata[1:0]);
      if (bus_valid && !bus_we)
        bus_rdata <= (int'(bus_addr) < N_PE) ? DATA_W'(pe_level[idx]) : '0;
    end
  end

  always_comb begin
    for (int i = 0; i < N_PE; i++) begin
      logic [2:0] mask;
      mask         = 3'((8 >> pe_level[i]) - 1);   // 7, 3, 1, 0
      pe_clk_en[i] = !freeze && ((div_cnt & mask) == 3'd0);
      pe_vsel[i]   = pe_level[i];
    end
  end
endmodule
