`timescale 1ps/1fs
// cmcd_top: frontend of a clustered multiple-clock-domain processor with ED2P-driven
// frequency-voltage adaptation.
//
// The processor is split into clock domains along its clusters: one frontend (fetch,
// rename/steer, reorder buffer and commit), NUM_BACKENDS backends and the L2 cache, each with
// its own clock, and every path between domains crossing a synchronizing FIFO. Only the
// frontend's clock and supply are adapted. This top holds everything of that scheme that is
// digital and described in enough detail to build:
//   - the frontend micro-op queue (fetch_queue), whose occupancy drives the predictor;
//   - the frontend-to-backend dispatch queues: for every backend one dc_fifo per micro-op
//     class (integer, floating point, memory, copy), BQ_DEPTH = 20 entries each; with
//     BQ_TIMING_MODEL = 1 they are sync_fifo_model, the threshold synchronizer's timing;
//   - fe_perf_monitor, which cuts execution into INTERVAL_MOPS-micro-op intervals;
//   - an energy_monitor in every domain (performance counters times energy-per-access
//     constants), read by the controller over a four-phase handshake;
//   - ed2p_controller, which picks the level of minimum predicted energy * delay^2;
//   - fv_stepper, which walks the frontend there one adjacent level at a time;
//   - behavioural models of the frontend's voltage regulator and clock generator, which
//     produce `fe_clk` (simulation only).
// The trace cache, branch predictor, IA-32 decoder, rename/steering logic, reorder buffer,
// backends, L2 cache and copy crossbar are outside: their connections are this module's ports.
//
// Domains and timing: signals named fe_* / fq_* / bq_wr_* / commit_* / br_* are in the
// frontend domain (fe_clk, output); bq_rd_*, bq_empty and be_events[b] in backend b's domain
// (be_clk[b]); l2_events in the L2 domain (l2_clk). `rst_n` is asynchronous to all of them:
// it resets every domain at once and each domain leaves reset two of its own clock edges
// after `rst_n` rises (reset_sync). A level decision follows an interval's end by about
// 160 frontend cycles, and a step of one level takes the regulator's 50 ns plus a few cycles.
module cmcd_top
  import fv_pkg::*;
#(
  parameter int unsigned NUM_BACKENDS  = 4,
  parameter int unsigned NUM_QCLASS    = 4,       // integer, floating point, memory, copy
  parameter int unsigned BQ_DEPTH      = 20,
  parameter int unsigned MOP_W         = 64,
  parameter int unsigned FQ_DEPTH      = 64,
  parameter int unsigned FETCH_W       = 8,
  parameter int unsigned DISPATCH_W    = 8,
  parameter int unsigned INTERVAL_MOPS = 100_000,
  parameter int unsigned EV_INC_W      = 4,
  parameter int unsigned FE_EVENTS     = 4,
  parameter int unsigned FE_EAR [FE_EVENTS] = '{60, 30, 20, 12},
  parameter int unsigned BE_EVENTS     = 4,
  parameter int unsigned BE_EAR [BE_EVENTS] = '{20, 25, 30, 6},
  parameter int unsigned L2_EVENTS     = 2,
  parameter int unsigned L2_EAR [L2_EVENTS] = '{200, 8},
  parameter longint unsigned VREG_FULL_RANGE_PS = 1_000_000,
  // 0: dispatch queues are dc_fifo (synthesizable, 2-3 read edges of latency);
  // 1: they are sync_fifo_model, the 30%-threshold synchronizer timing (simulation only)
  parameter bit              BQ_TIMING_MODEL    = 1'b0
) (
  input  logic                                   rst_n,
  input  logic [NUM_BACKENDS-1:0]                be_clk,
  input  logic                                   l2_clk,
  output logic                                   fe_clk,

  // fetch side of the frontend queue (from the trace cache)
  input  logic [$clog2(FETCH_W+1)-1:0]           fq_in_count,
  input  logic [FETCH_W-1:0][MOP_W-1:0]          fq_in_data,
  output logic                                   fq_in_ready,
  input  logic                                   fq_flush,
  // dispatch side of the frontend queue (to rename/steering)
  output logic [$clog2(DISPATCH_W+1)-1:0]        fq_out_count,
  output logic [DISPATCH_W-1:0][MOP_W-1:0]       fq_out_data,
  input  logic [$clog2(DISPATCH_W+1)-1:0]        fq_pop_count,

  // backend queues, frontend side
  input  logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0]            bq_wr_en,
  input  logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0][MOP_W-1:0] bq_wr_data,
  output logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0]            bq_full,
  // backend queues, backend side
  input  logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0]            bq_rd_en,
  output logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0][MOP_W-1:0] bq_rd_data,
  output logic [NUM_BACKENDS-1:0][NUM_QCLASS-1:0]            bq_empty,

  // commit and branch resolution (frontend domain)
  input  logic [$clog2(DISPATCH_W+1)-1:0]        commit_mops,
  input  logic [$clog2(DISPATCH_W+1)-1:0]        br_resolved,
  input  logic [$clog2(DISPATCH_W+1)-1:0]        br_mispredicted,

  // activity of each domain, accesses per cycle of that domain's clock
  input  logic [FE_EVENTS-1:0][EV_INC_W-1:0]                   fe_events,
  input  logic [NUM_BACKENDS-1:0][BE_EVENTS-1:0][EV_INC_W-1:0] be_events,
  input  logic [L2_EVENTS-1:0][EV_INC_W-1:0]                   l2_events,

  // adaptation status
  output logic                                   interval_end,
  output logic                                   decision_valid,
  output level_t                                 target_level,
  output level_t                                 fe_freq_level,
  output level_t                                 fe_volt_level,
  output mhz_t                                   fe_mhz,      // frequency of fe_freq_level
  output mv_t                                    fe_vdd_mv,   // regulator output, as it ramps
  output logic                                   fe_step_up,
  output logic                                   fe_step_down
);
  localparam int unsigned NUM_DOMAINS = NUM_BACKENDS + 2;  // frontend, backends, L2
  localparam int unsigned CNT_W       = 32;
  localparam int unsigned ENERGY_W    = 48;

  // ---------------- clocks and resets ----------------
  logic                    fe_rst_n, l2_rst_n;
  logic [NUM_BACKENDS-1:0] be_rst_n;
  logic                    vreq, vack;
  level_t                  vreg_level;

  fv_clock_gen u_fe_clkgen (
    .enable(1'b1), .freq_level(fe_freq_level), .clk(fe_clk), .cur_mhz());

  // nominal frequency of the frontend's present clock level, for status
  mv_t fe_level_mv;
  fv_level_rom u_fe_level (.level(fe_freq_level), .mhz(fe_mhz), .mv(fe_level_mv));

  // The supply must never be below the nominal voltage of the level the clock runs at.
  a_supply_ok: assert property (@(posedge fe_clk) disable iff (!fe_rst_n) fe_vdd_mv >= fe_level_mv)
    else $error("cmcd_top: frontend clock level %0d above what %0d mV supports", fe_freq_level, fe_vdd_mv);

  voltage_regulator #(.FULL_RANGE_PS(VREG_FULL_RANGE_PS)) u_fe_vreg (
    .vreq(vreq), .level(fe_volt_level), .vack(vack), .cur_level(vreg_level),
    .vdd_mv(fe_vdd_mv));

  reset_sync u_fe_rst (.clk(fe_clk), .rst_n_in(rst_n), .rst_n_out(fe_rst_n));
  reset_sync u_l2_rst (.clk(l2_clk), .rst_n_in(rst_n), .rst_n_out(l2_rst_n));

  // ---------------- frontend queue ----------------
  logic [$clog2(FQ_DEPTH+1)-1:0] fq_occupancy;

  fetch_queue #(.DEPTH(FQ_DEPTH), .WIDTH(MOP_W), .IN_W(FETCH_W), .OUT_W(DISPATCH_W)) u_fq (
    .clk(fe_clk), .rst_n(fe_rst_n), .flush(fq_flush),
    .in_count(fq_in_count), .in_data(fq_in_data), .in_ready(fq_in_ready),
    .out_count(fq_out_count), .out_data(fq_out_data), .pop_count(fq_pop_count),
    .occupancy(fq_occupancy));

  // ---------------- backends: dispatch queues and energy monitors ----------------
  logic                                      energy_req;
  logic [NUM_DOMAINS-1:0]                    energy_ack;
  logic [NUM_DOMAINS-1:0][ENERGY_W-1:0]      domain_energy;

  for (genvar b = 0; b < NUM_BACKENDS; b++) begin : g_be
    reset_sync u_be_rst (.clk(be_clk[b]), .rst_n_in(rst_n), .rst_n_out(be_rst_n[b]));

    for (genvar q = 0; q < NUM_QCLASS; q++) begin : g_q
      if (BQ_TIMING_MODEL) begin : g_model
        sync_fifo_model #(.DEPTH(BQ_DEPTH), .WIDTH(MOP_W)) u_bq (
          .wr_clk(fe_clk), .wr_rst_n(fe_rst_n), .wr_en(bq_wr_en[b][q]),
          .wr_data(bq_wr_data[b][q]), .full(bq_full[b][q]), .wr_level(),
          .rd_clk(be_clk[b]), .rd_rst_n(be_rst_n[b]), .rd_en(bq_rd_en[b][q]),
          .rd_data(bq_rd_data[b][q]), .empty(bq_empty[b][q]), .rd_level());
      end else begin : g_rtl
        dc_fifo #(.DEPTH(BQ_DEPTH), .WIDTH(MOP_W)) u_bq (
          .wr_clk(fe_clk), .wr_rst_n(fe_rst_n), .wr_en(bq_wr_en[b][q]),
          .wr_data(bq_wr_data[b][q]), .full(bq_full[b][q]), .wr_level(),
          .rd_clk(be_clk[b]), .rd_rst_n(be_rst_n[b]), .rd_en(bq_rd_en[b][q]),
          .rd_data(bq_rd_data[b][q]), .empty(bq_empty[b][q]), .rd_level());
      end
    end

    energy_monitor #(.NUM_EVENTS(BE_EVENTS), .INC_W(EV_INC_W), .CNT_W(CNT_W),
                     .ENERGY_W(ENERGY_W), .EAR(BE_EAR)) u_be_energy (
      .clk(be_clk[b]), .rst_n(be_rst_n[b]), .events(be_events[b]), .snap_req(energy_req),
      .snap_ack(energy_ack[1+b]), .energy(domain_energy[1+b]));
  end

  energy_monitor #(.NUM_EVENTS(FE_EVENTS), .INC_W(EV_INC_W), .CNT_W(CNT_W),
                   .ENERGY_W(ENERGY_W), .EAR(FE_EAR)) u_fe_energy (
    .clk(fe_clk), .rst_n(fe_rst_n), .events(fe_events), .snap_req(energy_req),
    .snap_ack(energy_ack[0]), .energy(domain_energy[0]));

  energy_monitor #(.NUM_EVENTS(L2_EVENTS), .INC_W(EV_INC_W), .CNT_W(CNT_W),
                   .ENERGY_W(ENERGY_W), .EAR(L2_EAR)) u_l2_energy (
    .clk(l2_clk), .rst_n(l2_rst_n), .events(l2_events), .snap_req(energy_req),
    .snap_ack(energy_ack[NUM_DOMAINS-1]), .energy(domain_energy[NUM_DOMAINS-1]));

  // ---------------- interval statistics and the controller ----------------
  logic [CNT_W+$clog2(FQ_DEPTH+1)-1:0] occ_sum;
  logic [CNT_W-1:0]                    cycles, branch_total, mispredict_total;

  fe_perf_monitor #(.INTERVAL_MOPS(INTERVAL_MOPS), .COMMIT_W(DISPATCH_W), .BR_W(DISPATCH_W),
                    .QDEPTH(FQ_DEPTH), .CNT_W(CNT_W)) u_perf (
    .clk(fe_clk), .rst_n(fe_rst_n), .commit_mops(commit_mops), .branches(br_resolved),
    .mispredicts(br_mispredicted), .fq_occupancy(fq_occupancy),
    .stats_valid(interval_end), .occ_sum(occ_sum), .cycles(cycles),
    .branch_total(branch_total), .mispredict_total(mispredict_total));

  ed2p_controller #(.QDEPTH(FQ_DEPTH), .CNT_W(CNT_W), .NUM_DOMAINS(NUM_DOMAINS),
                    .ENERGY_W(ENERGY_W)) u_ctrl (
    .clk(fe_clk), .rst_n(fe_rst_n), .stats_valid(interval_end), .occ_sum(occ_sum),
    .cycles(cycles), .branch_total(branch_total), .mispredict_total(mispredict_total),
    .cur_level(fe_freq_level), .energy_req(energy_req), .energy_ack(energy_ack),
    .domain_energy(domain_energy), .busy(), .decision_valid(decision_valid),
    .target_level(target_level), .k_q16(), .energy_total(), .energy_fe());

  fv_stepper u_stepper (
    .clk(fe_clk), .rst_n(fe_rst_n), .target_level(target_level),
    .freq_level(fe_freq_level), .volt_level(fe_volt_level), .vreq(vreq), .vack(vack),
    .changing(), .step_up_pulse(fe_step_up), .step_down_pulse(fe_step_down));
endmodule
