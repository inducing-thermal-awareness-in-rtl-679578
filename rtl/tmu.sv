// tmu: thermal management unit, a hard-wired controller that runs the three
// DVFS thermal policies for N_PE processing elements.
//
// Every POLL_CYCLES cycles the unit runs a round: for each PE in turn it sends
// a read (CMD_RD, ADDR_TS_STATUS) to the PE's network interface, waits for the
// status word that comes back as a non-acknowledged write, decides the PE's
// operating point and, if it changed, writes it to the DVFS unit (CMD_WR_NA,
// address = PE index). Between rounds it serves wake notices: a PE whose
// interface reports the end of an idle phase is re-evaluated at once.
//
// Thermal part, common to all policies (three-threshold hysteresis): a PE
// runs at 500 MHz while "rising". When its temperature reaches TH_H it is
// "falling": 250 MHz at or above TH_M, 125 MHz from TH_L up to TH_M, 62.5 MHz
// below TH_L, lowering by at most one step per decision. When the
// temperature is back at or below TH_SAFE the PE is "rising" again at 500 MHz.
//   policy 0, DVFS local:               the thermal level alone.
//   policy 1, DVFS + local communication: 62.5 MHz while the interface
//                                        reports the PE idle, else thermal.
//   policy 2, DVFS + global workload predictor: as policy 1, but a busy PE
//                                        runs no faster than its predicted
//                                        level, loaded per PE through cfg_*
//                                        from an off-line characterisation.
//   policy 3, policy 2 with the prediction updated at run time: the
//                                        unit counts, per PE, the polls that
//                                        found it idle (its slack while
//                                        waiting for the collecting PE). When
//                                        the PE wakes, a slack of SLACK_ROUNDS
//                                        polls or more lowers its cap one
//                                        step, a slack of zero raises it one
//                                        step; the count then restarts.
//
// Ports: a master request port and a slave write port towards ni_tmu,
// policy selection, freeze (stops the poll timer while emulated time is
// stopped), the predictor table write port, and the current levels
// and falling flags for observation. evt_round pulses when a round ends.
//
// The policies, the thresholds 340/331/325/321 K and the four operating
// points follow the document, which runs the policies as software on a
// soft-core processor; this hard-wired controller, the polling order, the
// one-step limit, the wake notice and the 1 ms period (500,000 cycles at an
// assumed 500 MHz clock) are this design's reading of it. The document's
// third policy predicts, per PE, when the collecting PE will gather its data;
// the table of policy 2 and the slack rule of policy 3 are two simple ways
// of building that prediction, both chosen here.
module tmu
  import thermal_pkg::*;
#(
  parameter int unsigned N_PE        = 4,
  parameter int unsigned POLL_CYCLES = 500_000,
  parameter int unsigned TH_H        = 340,
  parameter int unsigned TH_M        = 331,
  parameter int unsigned TH_L        = 325,
  parameter int unsigned TH_SAFE     = 321,
  parameter int unsigned SLACK_ROUNDS = 2,
  parameter node_t       DVFS_ID     = NODE_DVFS,
  parameter node_t       PE_BASE     = NODE_PE0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [1:0]             policy,
  input  logic                   freeze,     // emulation freeze: poll timer holds
  // predictor table (off-line characterisation of the application)
  input  logic                   cfg_we,
  input  logic [7:0]             cfg_pe,
  input  freq_level_e            cfg_level,
  // master request port to ni_tmu
  output logic                   m_valid,
  input  logic                   m_ready,
  output node_t                  m_dst,
  output cmd_e                   m_cmd,
  output logic [ADDR_W-1:0]      m_addr,
  output logic [DATA_W-1:0]      m_data,
  // slave write port from ni_tmu
  input  logic                   s_valid,
  input  node_t                  s_src,
  input  logic [ADDR_W-1:0]      s_addr,
  input  logic [DATA_W-1:0]      s_data,
  // observation
  output freq_level_e [N_PE-1:0] level,
  output logic [N_PE-1:0]        falling,
  output logic                   evt_round
);
  localparam int unsigned IW = (N_PE > 1) ? $clog2(N_PE) : 1;
  localparam int unsigned TW = $clog2(POLL_CYCLES + 1) + 1;
  localparam logic [TEMP_W-1:0] T_H    = kelvin(TH_H);
  localparam logic [TEMP_W-1:0] T_M    = kelvin(TH_M);
  localparam logic [TEMP_W-1:0] T_L    = kelvin(TH_L);
  localparam logic [TEMP_W-1:0] T_SAFE = kelvin(TH_SAFE);

  typedef enum logic [2:0] {S_IDLE, S_POLL, S_WAIT, S_DECIDE, S_SET} state_e;

  state_e                   state;
  logic                     in_round;
  logic [IW-1:0]            idx;
  logic [TW-1:0]            timer;
  logic                     poll_due;
  ts_status_t [N_PE-1:0]    status;
  logic [N_PE-1:0]          fresh, wake;
  freq_level_e [N_PE-1:0]   th_level, pred;
  freq_level_e              new_level, new_th;
  logic                     new_fall;
  logic                     s_pe_ok;
  logic [IW-1:0]            s_idx, wake_idx;
  ts_status_t               st;
  logic [2:0]               slack [N_PE];

  assign s_pe_ok = (s_src >= PE_BASE) && (s_src < PE_BASE + node_t'(N_PE));
  assign s_idx   = IW'(s_src - PE_BASE);

  always_comb begin
    wake_idx = '0;
    for (int i = N_PE - 1; i >= 0; i--) if (wake[i]) wake_idx = IW'(i);
  end

  // Decision for PE idx from its latest status word.
  always_comb begin
    freq_level_e band;
    st = status[idx];
    new_fall = falling[idx];
    if (!falling[idx] && st.temp >= T_H)      new_fall = 1'b1;
    else if (falling[idx] && st.temp <= T_SAFE) new_fall = 1'b0;

    if (st.temp >= T_M)      band = F_250M;
    else if (st.temp >= T_L) band = F_125M;
    else                     band = F_62M5;

    if (!new_fall)                               new_th = F_500M;
    else if (th_level[idx] == F_62M5)            new_th = band;
    else if (band < freq_level_e'(th_level[idx] - 2'd1))
                                                 new_th = freq_level_e'(th_level[idx] - 2'd1);
    else                                         new_th = band;

    new_level = new_th;
    if (policy != 2'd0 && st.idle)               new_level = F_62M5;
    else if (policy[1] && pred[idx] < new_th)    new_level = pred[idx];
  end

  // Request to the network interface.
  always_comb begin
    m_valid = 1'b0;
    m_dst   = PE_BASE + node_t'(idx);
    m_cmd   = CMD_RD;
    m_addr  = ADDR_TS_STATUS;
    m_data  = '0;
    if (state == S_POLL) m_valid = 1'b1;
    if (state == S_SET) begin
      m_valid = 1'b1;
      m_dst   = DVFS_ID;
      m_cmd   = CMD_WR_NA;
      m_addr  = ADDR_W'(idx);
      m_data  = DATA_W'(level[idx]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      in_round  <= 1'b0;
      idx       <= '0;
      timer     <= '0;
      poll_due  <= 1'b0;
      status    <= '0;
      fresh     <= '0;
      wake      <= '0;
      falling   <= '0;
      evt_round <= 1'b0;
      for (int i = 0; i < N_PE; i++) begin
        th_level[i] <= F_500M;
        level[i]    <= F_500M;
        pred[i]     <= F_500M;
        slack[i]    <= '0;
      end
    end else begin
      evt_round <= 1'b0;

      if (freeze) begin
        timer <= timer;
      end else if (timer >= TW'(POLL_CYCLES - 1)) begin
        timer    <= '0;
        poll_due <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end

      if (s_valid && s_pe_ok) begin
        status[s_idx] <= ts_status_t'(s_data);
        if (s_addr == ADDR_TS_STATUS) fresh[s_idx] <= 1'b1;
        if (s_addr == ADDR_TS_WAKE && policy != 2'd0) wake[s_idx] <= 1'b1;
      end

      case (state)
        S_IDLE: begin
          if (poll_due) begin
            poll_due <= 1'b0;
            in_round <= 1'b1;
            idx      <= '0;
            state    <= S_POLL;
          end else if (wake != '0) begin
            in_round <= 1'b0;
            idx      <= wake_idx;
            wake[wake_idx] <= 1'b0;
            slack[wake_idx] <= '0;
            if (policy == 2'd3) begin
              if (32'(slack[wake_idx]) >= SLACK_ROUNDS && pred[wake_idx] != F_62M5)
                pred[wake_idx] <= freq_level_e'(pred[wake_idx] - 2'd1);
              else if (slack[wake_idx] == '0 && pred[wake_idx] != F_500M)
                pred[wake_idx] <= freq_level_e'(pred[wake_idx] + 2'd1);
            end
            state    <= S_DECIDE;
          end
        end
        S_POLL: if (m_ready) begin
          fresh[idx] <= 1'b0;
          state      <= S_WAIT;
        end
        S_WAIT: if (fresh[idx]) begin
          fresh[idx] <= 1'b0;
          state      <= S_DECIDE;
        end
        S_DECIDE: begin
          if (in_round && policy == 2'd3 && st.idle && slack[idx] != 3'd7)
            slack[idx] <= slack[idx] + 3'd1;
          falling[idx]  <= new_fall;
          th_level[idx] <= new_th;
          level[idx]    <= new_level;
          if (new_level != level[idx]) begin
            state <= S_SET;                      // tell the DVFS unit
          end else if (in_round && int'(idx) != N_PE - 1) begin
            idx   <= idx + 1'b1;                 // unchanged: next PE
            state <= S_POLL;
          end else begin
            if (in_round) evt_round <= 1'b1;
            in_round <= 1'b0;
            state    <= S_IDLE;
          end
        end
        S_SET: if (m_ready) begin
          if (in_round && int'(idx) != N_PE - 1) begin
            idx   <= idx + 1'b1;
            state <= S_POLL;
          end else begin
            if (in_round) evt_round <= 1'b1;
            in_round <= 1'b0;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase

      // a table write takes precedence over the run-time update
      if (cfg_we && int'(cfg_pe) < N_PE) pred[IW'(cfg_pe)] <= cfg_level;
    end
  end
endmodule
