`timescale 1ps/1fs
// fe_perf_monitor: interval boundaries and the statistics of the frontend's time predictor.
//
// Execution is cut into intervals of a fixed number of committed micro-ops (INTERVAL_MOPS,
// 100K by default). During an interval the monitor adds the fetch-queue occupancy of every
// frontend cycle into `occ_sum` and counts the cycles, so that the average queue utilisation
// of the interval is occ_sum / (cycles * queue depth). Branch outcomes are counted from reset
// on, never per interval: the misprediction rate is mispredicts / branches since the start
// of execution. When both branch counters would reach 2^(CNT_W-1) they are halved, which keeps
// their ratio and never overflows.
//
// Interface: every cycle the frontend reports how many micro-ops committed (`commit_mops`),
// how many branches resolved and how many of them were mispredicted, and the current queue
// occupancy. In the cycle after the one in which the interval's micro-op count is reached,
// `stats_valid` pulses for one cycle with the interval's occ_sum and cycle count (that cycle
// included) and the branch totals; the outputs hold until the next pulse. Micro-ops beyond
// the interval length count towards the next interval. Reset is synchronous, active low.
module fe_perf_monitor #(
  parameter int unsigned INTERVAL_MOPS = 100_000,
  parameter int unsigned COMMIT_W      = 8,    // micro-ops committed per cycle, at most
  parameter int unsigned BR_W          = 8,    // branches resolved per cycle, at most
  parameter int unsigned QDEPTH        = 64,   // fetch queue depth
  parameter int unsigned CNT_W         = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(COMMIT_W+1)-1:0] commit_mops,
  input  logic [$clog2(BR_W+1)-1:0]     branches,
  input  logic [$clog2(BR_W+1)-1:0]     mispredicts,
  input  logic [$clog2(QDEPTH+1)-1:0]   fq_occupancy,

  output logic                          stats_valid,
  output logic [CNT_W+$clog2(QDEPTH+1)-1:0] occ_sum,
  output logic [CNT_W-1:0]              cycles,
  output logic [CNT_W-1:0]              branch_total,
  output logic [CNT_W-1:0]              mispredict_total
);
  localparam int unsigned MW = $clog2(INTERVAL_MOPS + COMMIT_W + 1);
  localparam int unsigned SW = CNT_W + $clog2(QDEPTH + 1);

  logic [MW-1:0]    mops_acc, mops_next;
  logic [SW-1:0]    occ_acc, occ_next;
  logic [CNT_W-1:0] cyc_acc, cyc_next;
  logic [CNT_W-1:0] br_acc, mp_acc, br_next, mp_next;
  logic             boundary;

  assign mops_next = MW'(mops_acc + commit_mops);
  assign occ_next  = SW'(occ_acc + fq_occupancy);
  assign cyc_next  = CNT_W'(cyc_acc + 1'b1);
  assign boundary  = mops_next >= MW'(INTERVAL_MOPS);

  always_comb begin
    br_next = CNT_W'(br_acc + branches);
    mp_next = CNT_W'(mp_acc + mispredicts);
    if (br_next[CNT_W-1]) begin
      br_next = br_next >> 1;
      mp_next = mp_next >> 1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mops_acc         <= '0;
      occ_acc          <= '0;
      cyc_acc          <= '0;
      br_acc           <= '0;
      mp_acc           <= '0;
      stats_valid      <= 1'b0;
      occ_sum          <= '0;
      cycles           <= '0;
      branch_total     <= '0;
      mispredict_total <= '0;
    end else begin
      br_acc      <= br_next;
      mp_acc      <= mp_next;
      stats_valid <= boundary;
      if (boundary) begin
        mops_acc         <= MW'(mops_next - MW'(INTERVAL_MOPS));
        occ_acc          <= '0;
        cyc_acc          <= '0;
        occ_sum          <= occ_next;
        cycles           <= cyc_next;
        branch_total     <= br_next;
        mispredict_total <= mp_next;
      end else begin
        mops_acc <= mops_next;
        occ_acc  <= occ_next;
        cyc_acc  <= cyc_next;
      end
    end
  end

  a_mp_le_br: assert property (@(posedge clk) disable iff (!rst_n) mispredicts <= branches)
    else $error("fe_perf_monitor: more mispredicts than branches in a cycle");
endmodule
