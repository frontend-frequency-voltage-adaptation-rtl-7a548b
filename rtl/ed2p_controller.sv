`timescale 1ps/1fs
// ed2p_controller: chooses the frontend frequency-voltage level for the next interval.
//
// At the end of every interval the controller predicts, for each of the 21 levels l, the
// execution time T and the energy E of the next interval if the frontend ran at l, and picks
// the level with the smallest energy-delay-squared product T*T*E. Behaviour is assumed to
// repeat from one interval to the next, so the predictions start from the measurements of
// the interval just ended, run at level n:
//
//   time:    T_l / T_n = 1 + (f_n / f_l - 1) * k,     k = (1 - p) / (1 + b)
//   energy:  E_l       = E_n + E_FE,n * (V_l^2 / V_n^2 - 1)
//
// p is the interval's average fetch-queue utilisation (occupied fraction), b the branch
// misprediction rate since the start of execution, E_n the energy of all domains during
// the interval and E_FE,n that of the frontend alone, the only domain that is scaled. A full
// fetch queue (p = 1) makes time insensitive to the frontend clock, so the lowest-energy level
// wins; an empty queue and few mispredictions make time follow the frontend clock.
// T_n is common to all candidates and drops out of the comparison.
//
// Sequence, after `stats_valid` from fe_perf_monitor:
//   1. energy: raise `energy_req` to the NUM_DOMAINS energy monitors (domain 0 is the
//      frontend), wait until every `energy_ack` is high, sum the energies, drop the request
//      and wait for every acknowledge to fall (four-phase, across clock domains);
//   2. k = (cycles*QDEPTH - occ_sum) * branches / (cycles*QDEPTH * (branches + mispredicts)),
//      one division in Q.16, on a sequential divider (DIV_W cycles);
//   3. one candidate level per cycle, keeping the smallest cost (ties keep the faster level);
//   4. `decision_valid` pulses with `target_level`, which holds until the next decision.
// A decision takes about 2*sync + NUM_EVENTS + DIV_W + 21 + 4 cycles, a few hundred cycles
// against an interval of 100K micro-ops.
// The two prediction formulas and the exhaustive search are the published method. Choices
// of this design: Q.16 fixed point; EARs hold energy at the nominal (level 0) voltage, so the
// frontend's measured energy is first scaled by V_n^2/V_0^2 to the voltage it ran at; the
// misprediction rate is per resolved branch. Reset is synchronous, active low.
module ed2p_controller
  import fv_pkg::*;
#(
  parameter int unsigned QDEPTH      = 64,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned NUM_DOMAINS = 6,
  parameter int unsigned ENERGY_W    = 48,
  parameter int unsigned DIV_W       = 96
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // interval statistics
  input  logic                                stats_valid,
  input  logic [CNT_W+$clog2(QDEPTH+1)-1:0]   occ_sum,
  input  logic [CNT_W-1:0]                    cycles,
  input  logic [CNT_W-1:0]                    branch_total,
  input  logic [CNT_W-1:0]                    mispredict_total,
  input  level_t                              cur_level,
  // energy monitors
  output logic                                energy_req,
  input  logic [NUM_DOMAINS-1:0]              energy_ack,
  input  logic [NUM_DOMAINS-1:0][ENERGY_W-1:0] domain_energy,
  // decision
  output logic                                busy,
  output logic                                decision_valid,
  output level_t                              target_level,
  output logic [FRAC:0]                       k_q16,        // (1-p)/(1+b), Q.16
  output logic [ENERGY_W+$clog2(NUM_DOMAINS)-1:0] energy_total, // E_n
  output logic [ENERGY_W+$clog2(NUM_DOMAINS)-1:0] energy_fe     // E_FE,n
);
  localparam int unsigned SW   = CNT_W + $clog2(QDEPTH + 1);
  localparam int unsigned EW   = ENERGY_W + $clog2(NUM_DOMAINS);
  localparam int unsigned COSTW = 96;

  typedef enum logic [2:0] {S_IDLE, S_ACK, S_NACK, S_SCALE, S_DIV, S_SEARCH, S_DONE} state_t;
  state_t state;

  logic [SW-1:0]    occ_r, cap_r;
  logic [CNT_W-1:0] br_r, mp_r;
  level_t           n_r, l_r, best_l;
  logic [EW-1:0]    e_fe_nom, e_other;
  logic [COSTW-1:0] best_cost;
  logic [NUM_DOMAINS-1:0] ack_s;

  sync_2ff #(.WIDTH(NUM_DOMAINS)) u_sync_ack (
    .clk(clk), .rst_n(rst_n), .d(energy_ack), .q(ack_s));

  // ---------------- k = (1 - p) / (1 + b) ----------------
  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_num, div_den, div_q;
  logic [CNT_W-1:0] br_eff;

  assign br_eff  = (br_r == '0) ? CNT_W'(1) : br_r;
  assign div_num = DIV_W'({DIV_W'(cap_r - occ_r) * DIV_W'(br_eff), FRAC'(0)});
  assign div_den = DIV_W'(cap_r) * DIV_W'({1'b0, br_eff} + {1'b0, mp_r});

  seq_divider #(.WIDTH(DIV_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .dividend(div_num), .divisor(div_den),
    .busy(div_busy), .done(div_done), .quotient(div_q));

  // ---------------- cost of candidate level l_r ----------------
  logic signed [RATIO_W:0]   dfreq, dvsq;        // f_n/f_l - 1, V_l^2/V_n^2 - 1 (Q.16)
  logic signed [47:0]        rt;                 // T_l / T_n (Q.16)
  logic signed [EW+RATIO_W+2:0] de;              // E_FE,n * dvsq (Q.16)
  logic signed [EW+2:0]      re;                 // E_l
  logic [COSTW-1:0]          cost;

  always_comb begin
    dfreq = $signed({1'b0, FREQ_RATIO[n_r][l_r]}) - $signed((RATIO_W+1)'(ONE));
    dvsq  = $signed({1'b0, VSQ_RATIO[l_r][n_r]})  - $signed((RATIO_W+1)'(ONE));
    rt    = 48'(signed'(ONE)) + ((48'(dfreq) * $signed({31'b0, k_q16})) >>> FRAC);
    de    = ($signed({3'b0, energy_fe}) * dvsq) >>> FRAC;
    re    = $signed({3'b0, energy_total}) + (EW+3)'(de);
    if (rt < 0) rt = '0;
    if (re < 0) re = '0;
    cost  = COSTW'(unsigned'(rt) * unsigned'(rt)) * COSTW'(unsigned'(re));
  end

  // ---------------- sequencer ----------------
  logic [EW-1:0] e_sum;
  logic [EW+RATIO_W-1:0] e_fe_scaled;
  always_comb begin
    e_sum = '0;
    for (int d = 1; d < NUM_DOMAINS; d++) e_sum = EW'(e_sum + domain_energy[d]);
    e_fe_scaled = (EW+RATIO_W)'(e_fe_nom) * (EW+RATIO_W)'(VSQ_RATIO[n_r][0]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      occ_r          <= '0;
      cap_r          <= '0;
      br_r           <= '0;
      mp_r           <= '0;
      n_r            <= '0;
      l_r            <= '0;
      best_l         <= '0;
      best_cost      <= '1;
      e_fe_nom       <= '0;
      e_other        <= '0;
      energy_req     <= 1'b0;
      div_start      <= 1'b0;
      decision_valid <= 1'b0;
      target_level   <= '0;
      k_q16          <= '0;
      energy_total   <= '0;
      energy_fe      <= '0;
    end else begin
      div_start      <= 1'b0;
      decision_valid <= 1'b0;
      case (state)
        S_IDLE: if (stats_valid) begin
          occ_r      <= occ_sum;
          cap_r      <= SW'(cycles) * SW'(QDEPTH);
          br_r       <= branch_total;
          mp_r       <= mispredict_total;
          n_r        <= cur_level;
          energy_req <= 1'b1;
          state      <= S_ACK;
        end
        S_ACK: if (&ack_s) begin
          e_fe_nom   <= EW'(domain_energy[0]);
          e_other    <= e_sum;
          energy_req <= 1'b0;
          state      <= S_NACK;
        end
        S_NACK: if (ack_s == '0) begin
          state <= S_SCALE;
        end
        S_SCALE: begin
          energy_fe    <= EW'(e_fe_scaled >> FRAC);
          energy_total <= EW'(e_other + EW'(e_fe_scaled >> FRAC));
          div_start    <= 1'b1;
          state        <= S_DIV;
        end
        S_DIV: if (div_done) begin
          k_q16     <= (div_q > DIV_W'(ONE)) ? (FRAC+1)'(ONE) : (FRAC+1)'(div_q);
          l_r       <= '0;
          best_cost <= '1;
          best_l    <= '0;
          state     <= S_SEARCH;
        end
        S_SEARCH: begin
          if (cost < best_cost) begin
            best_cost <= cost;
            best_l    <= l_r;
          end
          if (l_r == LEVEL_SLOWEST) state <= S_DONE;
          else                      l_r   <= level_t'(l_r + 1'b1);
        end
        S_DONE: begin
          target_level   <= best_l;
          decision_valid <= 1'b1;
          state          <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(stats_valid && busy))
    else $error("ed2p_controller: interval ended before the previous decision was made");
endmodule
