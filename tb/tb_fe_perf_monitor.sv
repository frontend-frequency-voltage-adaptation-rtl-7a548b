`timescale 1ps/1fs
// tb_fe_perf_monitor: random commit counts, branch outcomes and queue occupancies; at every
// `stats_valid` the interval's occupancy sum and cycle count and the branch totals are
// compared with sums kept by the testbench. A short interval (100 micro-ops) and narrow
// counters (12 bits) make intervals and counter halving frequent.
module tb_fe_perf_monitor;
  localparam int INTERVAL = 100, CNT_W = 12, QDEPTH = 64;
  int checks = 0, failures = 0, n_intervals = 0, n_halve = 0;

  logic clk = 0, rst_n = 0;
  logic [3:0] commit_mops = '0, branches = '0, mispredicts = '0;
  logic [6:0] fq_occupancy = '0;
  logic       stats_valid;
  logic [CNT_W+6:0] occ_sum;
  logic [CNT_W-1:0] cycles, branch_total, mispredict_total;

  always #50 clk = ~clk;

  fe_perf_monitor #(.INTERVAL_MOPS(INTERVAL), .COMMIT_W(8), .BR_W(8), .QDEPTH(QDEPTH),
                    .CNT_W(CNT_W)) dut (.*);

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

  longint mops = 0, occ = 0, cyc = 1, br = 0, mp = 0;  // the cycle after reset counts, with no activity
  longint e_occ, e_cyc, e_br, e_mp;
  bit     pending = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (pending) begin
        check(stats_valid, "stats_valid one cycle after the boundary");
        check(longint'(occ_sum) == e_occ, $sformatf("occ_sum %0d exp %0d", occ_sum, e_occ));
        check(longint'(cycles) == e_cyc, $sformatf("cycles %0d exp %0d", cycles, e_cyc));
        check(longint'(branch_total) == e_br, $sformatf("branches %0d exp %0d", branch_total, e_br));
        check(longint'(mispredict_total) == e_mp, $sformatf("mispredicts %0d exp %0d", mispredict_total, e_mp));
        n_intervals++;
        pending = 0;
      end else check(!stats_valid, "no stray stats_valid");
      commit_mops  = 4'($urandom_range(0, 8));
      branches     = 4'($urandom_range(0, 4));
      mispredicts  = 4'($urandom_range(0, branches));
      fq_occupancy = 7'($urandom_range(0, QDEPTH));
      // reference
      mops += commit_mops; occ += fq_occupancy; cyc++;
      br += branches; mp += mispredicts;
      if (br >= (1 << (CNT_W - 1))) begin br = br / 2; mp = mp / 2; n_halve++; end
      if (mops >= INTERVAL) begin
        e_occ = occ; e_cyc = cyc; e_br = br; e_mp = mp; pending = 1;
        mops -= INTERVAL; occ = 0; cyc = 0;
      end
    end
    check(n_intervals > 20, $sformatf("%0d intervals seen", n_intervals));
    check(n_halve > 0, "branch counters halved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
