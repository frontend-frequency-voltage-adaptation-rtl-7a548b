`timescale 1ps/1fs
// sync_fifo_model: behavioural timing model of the threshold-based synchronizing FIFO.
//
// This is a simulation model, not synthesizable logic. It has the ports and the show-ahead
// behaviour of dc_fifo but reproduces the timing of the custom synchronizer that dc_fifo
// stands in for: an entry written at a `wr_clk` edge becomes visible to the reader at the
// first `rd_clk` edge that follows the write by at least THRESHOLD_PCT percent of the read
// clock period (30% by default); if the next read edge comes sooner, the entry is visible one
// read edge later. Space freed by a read reaches the writer by the same rule, measured
// against the write clock period. Each period is measured as the time between the last two
// edges of that clock, so the model follows clocks that change frequency.
// Timing: visible 1 or 2 read edges after the write (dc_fifo: 2 or 3). An entry that
// becomes visible at a read edge can be popped at the next one. Both resets (active low,
// sampled at the clock edges) must be applied together.
// The threshold rule and its 30% value are the published ones; the period measurement and
// the way the rule is applied to freed space are choices of this model.
module sync_fifo_model #(
  parameter int unsigned DEPTH         = 20,
  parameter int unsigned WIDTH         = 64,
  parameter int unsigned THRESHOLD_PCT = 30
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] wr_level,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] rd_level
);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  int      wr_idx, rd_idx;          // slots of the next write and the next read
  int      n_written, n_read;       // totals since reset
  int      vis_written, vis_read;   // totals as seen by the reader and by the writer
  realtime write_times [$];         // writes not yet visible to the reader
  realtime read_times  [$];         // reads not yet visible to the writer
  realtime last_wr_edge, last_rd_edge, wr_period, rd_period;

  assign rd_level = LW'(vis_written - n_read);
  assign wr_level = LW'(n_written - vis_read);
  assign empty    = (rd_level == '0);
  assign full     = (wr_level == LW'(DEPTH));
  assign rd_data  = mem[rd_idx];

  initial begin
    wr_idx = 0; rd_idx = 0; n_written = 0; n_read = 0; vis_written = 0; vis_read = 0;
    last_wr_edge = 0; last_rd_edge = 0; wr_period = 0; rd_period = 0;
  end

  // Counters and pointers that the ports depend on change with nonblocking assignments, so
  // logic clocked by the same edges sees them as flip-flops; the time stamps are internal.
  always @(posedge wr_clk) begin
    int freed;
    if (last_wr_edge > 0) wr_period = $realtime - last_wr_edge;
    last_wr_edge = $realtime;
    if (!wr_rst_n) begin
      wr_idx    <= 0;
      n_written <= 0;
      vis_read  <= 0;
      write_times.delete();
    end else begin
      // space freed by reads that led this edge by at least the threshold
      freed = 0;
      while (read_times.size() > 0 &&
             $realtime - read_times[0] >= wr_period * THRESHOLD_PCT / 100.0) begin
        void'(read_times.pop_front());
        freed++;
      end
      vis_read <= vis_read + freed;
      if (wr_en && !full) begin
        mem[wr_idx] <= wr_data;
        wr_idx      <= (wr_idx == int'(DEPTH) - 1) ? 0 : wr_idx + 1;
        n_written   <= n_written + 1;
        write_times.push_back($realtime);
      end
    end
  end

  always @(posedge rd_clk) begin
    int arrived;
    if (last_rd_edge > 0) rd_period = $realtime - last_rd_edge;
    last_rd_edge = $realtime;
    if (!rd_rst_n) begin
      rd_idx      <= 0;
      n_read      <= 0;
      vis_written <= 0;
      read_times.delete();
    end else begin
      if (rd_en && !empty) begin
        rd_idx <= (rd_idx == int'(DEPTH) - 1) ? 0 : rd_idx + 1;
        n_read <= n_read + 1;
        read_times.push_back($realtime);
      end
      // entries written at least the threshold before this edge become visible now
      arrived = 0;
      while (write_times.size() > 0 &&
             $realtime - write_times[0] >= rd_period * THRESHOLD_PCT / 100.0) begin
        void'(write_times.pop_front());
        arrived++;
      end
      vis_written <= vis_written + arrived;
    end
  end
endmodule
