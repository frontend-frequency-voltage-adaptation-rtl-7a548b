`timescale 1ps/1fs
// tb_ed2p_controller: the testbench plays the six energy monitors (answering the four-phase
// request after a random delay) and presents interval statistics. For every decision it
// evaluates the time and energy predictions of all 21 levels in real arithmetic, straight
// from the operating points, and accepts the controller's level if its predicted ED2P is
// within 0.01% of the true minimum. The corner cases are a saturated fetch queue (time does
// not depend on the frontend clock: the lowest-voltage level must win) and an empty queue
// with no mispredictions (time follows the clock: with the frontend at 40% of the energy,
// full speed must win). Also checks k, the scaled energies and the decision latency.
module tb_ed2p_controller;
  import fv_pkg::*;
  localparam int ND = 6, QD = 64;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic stats_valid = 0;
  logic [38:0] occ_sum = '0;
  logic [31:0] cycles = '0, branch_total = '0, mispredict_total = '0;
  level_t cur_level = '0;
  logic energy_req;
  logic [ND-1:0] energy_ack = '0;
  logic [ND-1:0][47:0] domain_energy = '0;
  logic busy, decision_valid;
  level_t target_level;
  logic [16:0] k_q16;
  logic [50:0] energy_total, energy_fe;

  always #50 clk = ~clk;

  ed2p_controller #(.QDEPTH(QD), .NUM_DOMAINS(ND)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // energy monitors: acknowledge after a random delay, release after the request drops
  always begin
    @(posedge energy_req);
    repeat ($urandom_range(1, 12)) @(posedge clk);
    energy_ack <= '1;
    @(negedge energy_req);
    repeat ($urandom_range(1, 12)) @(posedge clk);
    energy_ack <= '0;
  end

  function automatic real mhz(int l); return 10000.0 - 236.0 * l; endfunction
  function automatic real vsq(int l); return real'(LEVEL_MV[l]) * real'(LEVEL_MV[l]); endfunction

  function automatic real cost(int n, int l, real k, real e_n, real e_fe);
    real rt, re;
    rt = 1.0 + (mhz(n) / mhz(l) - 1.0) * k;
    re = e_n + e_fe * (vsq(l) / vsq(n) - 1.0);
    return rt * rt * re;
  endfunction

  task automatic decide(int n, longint cyc, longint occ, longint br, longint mp,
                        longint e_fe_nom, longint e_rest, int expect_level);
    real k, e_fe, e_n, best, got;
    int  best_l, lat;
    cur_level = level_t'(n);
    cycles = 32'(cyc); occ_sum = 39'(occ); branch_total = 32'(br); mispredict_total = 32'(mp);
    domain_energy[0] = 48'(e_fe_nom);
    for (int d = 1; d < ND; d++) domain_energy[d] = 48'(e_rest / (ND - 1));
    e_rest = (e_rest / (ND - 1)) * (ND - 1);
    @(negedge clk) stats_valid = 1;
    @(negedge clk) stats_valid = 0;
    lat = 1;
    while (!decision_valid) begin @(negedge clk); lat++; end
    // reference
    k    = (1.0 - real'(occ) / (real'(cyc) * QD)) / (1.0 + ((br == 0) ? 0.0 : real'(mp) / real'(br)));
    e_fe = real'(e_fe_nom) * vsq(n) / vsq(0);
    e_n  = real'(e_rest) + e_fe;
    best = cost(n, 0, k, e_n, e_fe); best_l = 0;
    for (int l = 1; l < 21; l++)
      if (cost(n, l, k, e_n, e_fe) < best) begin best = cost(n, l, k, e_n, e_fe); best_l = l; end
    got = cost(n, int'(target_level), k, e_n, e_fe);
    check(got <= best * 1.0001, $sformatf("n=%0d k=%f: chose %0d (%e), best %0d (%e)",
                                          n, k, target_level, got, best_l, best));
    if (expect_level >= 0)
      check(int'(target_level) == expect_level, $sformatf("expected level %0d, got %0d", expect_level, target_level));
    check((real'(k_q16) / 65536.0 - k) < 3.0e-5 && (k - real'(k_q16) / 65536.0) < 3.0e-5,
          $sformatf("k %f exp %f", real'(k_q16) / 65536.0, k));
    check((real'(energy_fe) - e_fe) < 1.0 + e_fe * 1.0e-4 && (e_fe - real'(energy_fe)) < 1.0 + e_fe * 1.0e-4,
          $sformatf("E_FE %0d exp %f", energy_fe, e_fe));
    check((real'(energy_total) - e_n) < 2.0 + e_n * 1.0e-4 && (e_n - real'(energy_total)) < 2.0 + e_n * 1.0e-4,
          $sformatf("E %0d exp %f", energy_total, e_n));
    // sync + up to 12 + sync + up to 12 + 96 divider + 21 levels + a few state cycles
    check(lat >= 120 && lat <= 180, $sformatf("decision latency %0d cycles", lat));
    check(!busy, "idle after the decision");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(negedge clk);
    // full queue: dispatch-bound, lowest voltage wins from any level
    decide(0, 25000, 25000 * QD, 1000, 50, 400_000, 600_000, 20);
    decide(13, 25000, 25000 * QD, 1000, 50, 400_000, 600_000, 20);
    // empty queue, perfect prediction: fetch-bound, full speed wins
    decide(0, 25000, 0, 1000, 0, 400_000, 600_000, 0);
    decide(20, 25000, 0, 0, 0, 400_000, 600_000, 0);
    // random intervals
    for (int r = 0; r < 40; r++) begin
      longint cyc = $urandom_range(10_000, 200_000);
      longint br  = $urandom_range(1, 1_000_000);
      decide($urandom_range(0, 20), cyc, (cyc * QD * $urandom_range(0, 1000)) / 1000,
             br, (br * $urandom_range(0, 300)) / 1000,
             $urandom_range(1_000, 50_000_000), $urandom_range(1_000, 80_000_000), -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
