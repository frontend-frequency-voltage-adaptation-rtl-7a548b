`timescale 1ps/1fs
// tb_fetch_queue: random groups of micro-ops written and dispatched, checked against a
// reference queue. Also checks the all-or-nothing rule of `in_ready`, the dispatch width
// limit, the reported occupancy and `flush`.
module tb_fetch_queue;
  localparam int DEPTH = 64, WIDTH = 32, IN_W = 8, OUT_W = 8;
  int checks = 0, failures = 0;
  int n_full = 0, n_flush = 0;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [$clog2(IN_W+1)-1:0]  in_count = '0;
  logic [IN_W-1:0][WIDTH-1:0] in_data = '0;
  logic                       in_ready;
  logic [$clog2(OUT_W+1)-1:0] out_count, pop_count = '0;
  logic [OUT_W-1:0][WIDTH-1:0] out_data;
  logic [$clog2(DEPTH+1)-1:0] occupancy;

  always #50 clk = ~clk;

  fetch_queue #(.DEPTH(DEPTH), .WIDTH(WIDTH), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  logic [WIDTH-1:0] ref_q [$];
  int seq = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int exp_avail, push, pop;
      @(negedge clk);
      // compare the dispatch side with the reference
      exp_avail = (ref_q.size() < OUT_W) ? ref_q.size() : OUT_W;
      check(int'(occupancy) == ref_q.size(), $sformatf("occupancy %0d exp %0d", occupancy, ref_q.size()));
      check(int'(out_count) == exp_avail, $sformatf("out_count %0d exp %0d", out_count, exp_avail));
      check(in_ready == (DEPTH - ref_q.size() >= IN_W), "in_ready");
      for (int i = 0; i < exp_avail; i++)
        check(out_data[i] == ref_q[i], $sformatf("out_data[%0d]", i));
      if (!in_ready) n_full++;
      // next cycle's stimulus; phases bias towards full and towards empty
      flush = ((cyc % 997) == 500);
      push  = $urandom_range(0, IN_W);
      pop   = (cyc < 1500) ? $urandom_range(0, exp_avail / 2) : $urandom_range(0, exp_avail);
      in_count  = push[$clog2(IN_W+1)-1:0];
      pop_count = pop[$clog2(OUT_W+1)-1:0];
      for (int i = 0; i < IN_W; i++) in_data[i] = WIDTH'(seq + i);
      @(posedge clk);
      #1;
      if (flush) begin
        ref_q.delete();
        n_flush++;
      end else begin
        for (int i = 0; i < pop; i++) void'(ref_q.pop_front());
        if (in_ready_q) for (int i = 0; i < push; i++) ref_q.push_back(WIDTH'(seq + i));
      end
      seq += IN_W;
    end
    check(n_full > 0, "queue reached full");
    check(n_flush > 0, "flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in_ready as it was at the clock edge
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;
endmodule
