// mem_sram: on-chip memory (private memory of a PE or the shared memory),
// a single-port synchronous RAM of DEPTH 32-bit words.
//
// A write (bus_valid && bus_we) stores bus_wdata at bus_addr at the clock
// edge. A read (bus_valid && !bus_we) returns the word on bus_rdata in the
// next cycle; bus_rdata holds its value otherwise. Addresses wrap modulo
// DEPTH. Contents are cleared by nothing: the array models an SRAM macro and
// is synthesized as a memory.
//
// The document names private and shared memories but gives no size; the
// 4096-word default is this design's choice.
module mem_sram
  import thermal_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic              clk,
  input  logic              bus_valid,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_wdata,
  output logic [DATA_W-1:0] bus_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     a;

  assign a = bus_addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (bus_valid && bus_we)  mem[a]    <= bus_wdata;
    if (bus_valid && !bus_we) bus_rdata <= mem[a];
  end
endmodule
