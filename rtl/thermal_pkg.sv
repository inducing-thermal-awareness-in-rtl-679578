// thermal_pkg: types and constants shared by the thermal-control MPSoC.
//
// The network carries single-flit packets. A flit holds the destination and
// source node, a command, a 16-bit word address and a 32-bit data word. Node
// numbers, the address map of a processing element, the layout of the status
// word a processor's network interface returns to the thermal management unit,
// and the four DVFS operating points are all defined here.
//
// The four operating points (500, 250, 125 and 62.5 MHz) and the temperature
// thresholds 340/331/325/321 K follow the document. The flit layout, node
// numbering, status-word layout and temperature format (unsigned Kelvin with
// four fraction bits) are choices of this design.
package thermal_pkg;

  localparam int unsigned NODE_W   = 4;
  localparam int unsigned ADDR_W   = 16;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned TEMP_W   = 16;   // temperature, unsigned Kelvin
  localparam int unsigned TEMP_FRAC = 4;   // ... with 4 fraction bits (1/16 K)
  localparam int unsigned OUTS_W   = 4;    // outstanding-transaction counter width

  typedef logic [NODE_W-1:0] node_t;

  // Node numbers of the 4-core case study: 4 processors, 4 private memories,
  // one shared memory, the thermal management unit and the DVFS unit.
  localparam node_t NODE_PE0   = 4'd0;
  localparam node_t NODE_MEM0  = 4'd4;   // private memory of PE i is NODE_MEM0 + i
  localparam node_t NODE_SHMEM = 4'd8;
  localparam node_t NODE_TMU   = 4'd9;
  localparam node_t NODE_DVFS  = 4'd10;
  localparam int unsigned N_NODES = 11;

  typedef enum logic [2:0] {
    CMD_RD      = 3'd0,   // read request, answered by CMD_RD_RESP
    CMD_RD_RESP = 3'd1,
    CMD_WR      = 3'd2,   // write request, answered by CMD_WR_ACK
    CMD_WR_ACK  = 3'd3,
    CMD_WR_NA   = 3'd4    // non-acknowledged write (thermal control traffic)
  } cmd_e;

  typedef struct packed {
    node_t              dst;
    node_t              src;
    cmd_e               cmd;
    logic [ADDR_W-1:0]  addr;
    logic [DATA_W-1:0]  data;
  } flit_t;

  // Addresses of thermal-control packets.
  localparam logic [ADDR_W-1:0] ADDR_TS_STATUS = 16'h0000; // poll of a PE's TS / its reply
  localparam logic [ADDR_W-1:0] ADDR_TS_WAKE   = 16'h0001; // unsolicited "PE became active"

  // Status word sent by a PE network interface to the TMU.
  typedef struct packed {
    logic [DATA_W-TEMP_W-OUTS_W-2:0] rsvd;
    logic [OUTS_W-1:0]               outstanding;
    logic                            idle;
    logic [TEMP_W-1:0]               temp;
  } ts_status_t;

  // DVFS operating points; the divider of the 500 MHz base clock is 2**(3-level).
  typedef enum logic [1:0] {
    F_62M5 = 2'd0,
    F_125M = 2'd1,
    F_250M = 2'd2,
    F_500M = 2'd3
  } freq_level_e;

  // Processor address map: bits [31:28] name the target node, [17:2] the word.
  function automatic node_t pe_addr_node(input logic [31:0] a);
    return a[31:28];
  endfunction

  // Temperature in Kelvin (integer) to the internal fixed-point format.
  function automatic logic [TEMP_W-1:0] kelvin(input int unsigned k);
    return TEMP_W'(k << TEMP_FRAC);
  endfunction

  // --- Topology: three 5x5 switches in a chain, S0 - S1 - S2 ---------------
  localparam int unsigned N_SW     = 3;
  localparam int unsigned SW_PORTS = 5;
  localparam int unsigned PORT_W   = 3;

  // Switch a node hangs on.
  function automatic int unsigned node_switch(input node_t n);
    case (n)
      4'd0, 4'd1, 4'd4, 4'd5: return 0;   // PE0, PE1, MEM0, MEM1
      4'd6, 4'd7, 4'd8:       return 1;   // MEM2, MEM3, shared memory
      default:                return 2;   // PE2, PE3, TMU, DVFS
    endcase
  endfunction

  // Local port of a node on its switch.
  function automatic logic [PORT_W-1:0] node_port(input node_t n);
    case (n)
      4'd0: return 3'd0;  4'd1: return 3'd1;  4'd4: return 3'd2;  4'd5: return 3'd3;
      4'd6: return 3'd0;  4'd7: return 3'd1;  4'd8: return 3'd2;
      4'd2: return 3'd0;  4'd3: return 3'd1;  4'd9: return 3'd2;  4'd10: return 3'd3;
      default: return 3'd0;
    endcase
  endfunction

  // Ports towards the neighbouring switches. S0: east = 4. S1: west = 3,
  // east = 4. S2: west = 4.
  function automatic logic [PORT_W-1:0] west_port(input int unsigned sw);
    return (sw == 1) ? 3'd3 : 3'd4;
  endfunction
  localparam logic [PORT_W-1:0] EAST_PORT = 3'd4;

  // Output port at switch sw for a flit bound to node dst.
  function automatic logic [PORT_W-1:0] route(input int unsigned sw, input node_t dst);
    int unsigned ds;
    ds = node_switch(dst);
    if (ds == sw)      return node_port(dst);
    else if (ds < sw)  return west_port(sw);
    else               return EAST_PORT;
  endfunction

endpackage
