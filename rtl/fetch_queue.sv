`timescale 1ps/1fs
// fetch_queue: the frontend micro-op queue between the trace cache and dispatch.
//
// A circular buffer of DEPTH micro-ops, written up to IN_W micro-ops per cycle on the fetch
// side and read up to OUT_W micro-ops per cycle on the dispatch side, entirely inside the
// frontend clock domain. Its occupancy, reported every cycle on `occupancy`, is what the
// frontend's execution-time predictor averages over an interval: a queue that stays full
// means dispatch, not the frontend clock, limits the pipeline.
//
// Fetch side: `in_count` micro-ops (in_data[0] oldest) are accepted at a clock edge when
// `in_ready` is high, which it is whenever at least IN_W entries are free; a group is taken
// whole or not at all. Dispatch side: `out_count` = min(occupancy, OUT_W) micro-ops are shown
// on out_data (out_data[0] oldest); `pop_count` (at most out_count) of them are removed at the
// clock edge. `flush` empties the queue (a branch misprediction squashes the fetched path)
// and takes priority over both ports. Reset is synchronous and active low.
// The dispatch width (8 micro-ops per cycle) is the published one; the queue depth, the fetch
// width and the micro-op width are choices of this design.
module fetch_queue #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  // fetch side
  input  logic [$clog2(IN_W+1)-1:0]  in_count,
  input  logic [IN_W-1:0][WIDTH-1:0] in_data,
  output logic                       in_ready,
  // dispatch side
  output logic [$clog2(OUT_W+1)-1:0] out_count,
  output logic [OUT_W-1:0][WIDTH-1:0] out_data,
  input  logic [$clog2(OUT_W+1)-1:0] pop_count,
  // statistics
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned OW = $clog2(DEPTH + 1);
  localparam int unsigned IW = $clog2(IN_W + 1);
  localparam int unsigned PW = $clog2(OUT_W + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    head, tail;      // head: oldest entry, tail: next free slot
  logic [OW-1:0]    count;

  function automatic logic [AW-1:0] wrap(logic [AW-1:0] base, int unsigned off);
    int unsigned s = int'(base) + off;
    return AW'((s >= DEPTH) ? s - DEPTH : s);
  endfunction

  logic do_push;
  logic [IW-1:0] push_n;
  logic [PW-1:0] pop_n;

  assign occupancy = count;
  assign in_ready  = (OW'(DEPTH) - count) >= OW'(IN_W);
  assign out_count = (count >= OW'(OUT_W)) ? PW'(OUT_W) : PW'(count);
  assign do_push   = in_ready && (in_count != '0);
  assign push_n    = do_push ? in_count : '0;
  assign pop_n     = (pop_count > out_count) ? out_count : pop_count;

  always_comb begin
    for (int i = 0; i < OUT_W; i++) out_data[i] = mem[wrap(head, i)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head  <= wrap(head, pop_n);
      tail  <= wrap(tail, push_n);
      count <= OW'(count + push_n - pop_n);
    end
  end

  always_ff @(posedge clk) begin
    if (!flush && do_push)
      for (int i = 0; i < IN_W; i++)
        if (IW'(i) < in_count) mem[wrap(tail, i)] <= in_data[i];
  end

  a_pop_le_avail: assert property (@(posedge clk) disable iff (!rst_n) pop_count <= out_count)
    else $error("fetch_queue: popped more micro-ops than shown");
  a_count_le_depth: assert property (@(posedge clk) disable iff (!rst_n) count <= OW'(DEPTH))
    else $error("fetch_queue: occupancy above depth");
endmodule
