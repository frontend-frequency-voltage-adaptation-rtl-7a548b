`timescale 1ps/1fs
// dc_fifo: synchronizing FIFO between two clock domains.
//
// Every path between clock domains goes through one of these queues: the write port runs on
// `wr_clk`, the read port on `rd_clk`, and the two clocks may have any frequency and phase
// relation (the frontend clock changes frequency at run time). Each side keeps its own
// pointer, which counts modulo 2*DEPTH so that full and empty can be told apart. A pointer is
// passed to the other side as a Gray code through a two-flop synchronizer, so each side always
// sees a value the other side really held: the write side may believe the queue fuller than
// it is and the read side may believe it emptier, never the reverse, so data is stable when
// read and neither side overruns the other.
//
// DEPTH need not be a power of two (the default, 20, is the size of each backend queue). The
// Gray code of (pointer + OFFSET), with OFFSET = 2^(PW-1) - DEPTH, is used: those 2*DEPTH codes
// sit symmetrically in the middle of the reflected Gray sequence, so the wrap from the last to
// the first value also changes a single bit.
//
// Interface: the write side asserts `wr_en` with `wr_data` when `full` is low. The read side
// sees the oldest entry on `rd_data` whenever `empty` is low (show-ahead) and pops it with
// `rd_en`. `wr_level`/`rd_level` are each side's view of the number of entries.
// Timing: an entry written at a `wr_clk` edge reaches the read side after two to three
// `rd_clk` edges; a pop frees space for the writer two to three `wr_clk` edges later.
// This is the generic two-flop scheme. The queue the design is based on uses a circuit that
// makes data visible one read edge after the write when the write edge precedes the read edge
// by more than a fixed fraction of the read period (30%); that circuit is a timing property of
// custom cells and is not reproduced here, so crossings take about one read cycle longer.
// Each side has its own synchronous, active-low reset; both must be applied together.
module dc_fifo #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = 64
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
  localparam int unsigned PW     = $clog2(DEPTH) + 1;        // pointer width
  localparam int unsigned SPAN   = 2 * DEPTH;                // pointer modulus
  localparam int unsigned OFFSET = (1 << (PW - 1)) - DEPTH;  // centres the Gray range
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW     = $clog2(DEPTH + 1);

  typedef logic [PW-1:0] ptr_t;

  function automatic ptr_t to_gray(ptr_t p);
    ptr_t v = ptr_t'(p + ptr_t'(OFFSET));
    return v ^ (v >> 1);
  endfunction

  function automatic ptr_t from_gray(ptr_t g);
    ptr_t v;
    v[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) v[i] = v[i+1] ^ g[i];
    return ptr_t'(v - ptr_t'(OFFSET));
  endfunction

  function automatic ptr_t ptr_inc(ptr_t p);
    return (p == ptr_t'(SPAN - 1)) ? '0 : ptr_t'(p + 1'b1);
  endfunction

  // entries between two pointers, modulo 2*DEPTH
  function automatic logic [LW-1:0] ptr_dist(ptr_t ahead, ptr_t behind);
    return (ahead >= behind) ? LW'(ahead - behind) : LW'(ahead + ptr_t'(SPAN) - behind);
  endfunction

  function automatic logic [AW-1:0] ptr_addr(ptr_t p);
    return (p >= ptr_t'(DEPTH)) ? AW'(p - ptr_t'(DEPTH)) : AW'(p);
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------- write domain ----------------
  ptr_t wptr, wptr_gray, rptr_gray_w, rptr_w;   // write-domain registers and views
  ptr_t rptr, rptr_gray_r, wptr_gray_r, wptr_r;   // read-domain registers and views

  sync_2ff #(.WIDTH(PW), .RESET_VAL(to_gray('0))) u_sync_r2w (
    .clk(wr_clk), .rst_n(wr_rst_n), .d(rptr_gray_r), .q(rptr_gray_w));

  assign rptr_w   = from_gray(rptr_gray_w);
  assign wr_level = ptr_dist(wptr, rptr_w);
  assign full     = (wr_level == LW'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wptr      <= '0;
      wptr_gray <= to_gray('0);
    end else if (wr_en && !full) begin
      wptr      <= ptr_inc(wptr);
      wptr_gray <= to_gray(ptr_inc(wptr));
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[ptr_addr(wptr)] <= wr_data;
  end

  // ---------------- read domain ----------------
  sync_2ff #(.WIDTH(PW), .RESET_VAL(to_gray('0))) u_sync_w2r (
    .clk(rd_clk), .rst_n(rd_rst_n), .d(wptr_gray), .q(wptr_gray_r));

  assign wptr_r   = from_gray(wptr_gray_r);
  assign rd_level = ptr_dist(wptr_r, rptr);
  assign empty    = (rd_level == '0);
  assign rd_data  = mem[ptr_addr(rptr)];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rptr        <= '0;
      rptr_gray_r <= to_gray('0);
    end else if (rd_en && !empty) begin
      rptr        <= ptr_inc(rptr);
      rptr_gray_r <= to_gray(ptr_inc(rptr));
    end
  end

  // Handshake rules: never write a full queue, never pop an empty one.
  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n) !(wr_en && full))
    else $error("dc_fifo: write while full");
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) !(rd_en && empty))
    else $error("dc_fifo: read while empty");
endmodule
