`timescale 1ps/1fs
// tb_cmcd_top: end-to-end run of the adaptive frontend at its full-size parameters
// (100K-micro-op intervals, 64-entry frontend queue, 4 backends x 4 queues of 20 entries).
//
// The testbench plays the parts around the frontend: a trace cache that writes the frontend
// queue, dispatch that reads it and commits what it read, branch resolution with occasional
// mispredictions (which flush the queue), random traffic into the 16 backend queues read by
// the backends on their own clocks, and activity on every domain's energy counters.
//   Phase A, dispatch-bound: fetch delivers 8 micro-ops a cycle but dispatch takes 2, so the
//   queue stays nearly full. The predicted time hardly depends on the frontend clock, and
//   the controller must slow the frontend down deeply (level 10 or slower).
//   Phase B, fetch-bound: fetch delivers 3 a cycle and dispatch takes all, so the queue is
//   nearly empty; the frontend's clock sets the pace and the controller must return to
//   level 0 (10 GHz).
// Checked: the data through the frontend queue and every backend queue, the chosen levels,
// the frontend clock period and supply voltage at both ends, the 50 ns-per-level walk, and
// that every mechanism happened: interval end, energy read-out, decision, step down, step
// up, queue full (frontend and backend), queue empty (backend), flush.
module tb_cmcd_top;
  import fv_pkg::*;
  localparam int NB = 4, NQ = 4, MW = 64, FW = 8, DW = 8, FQD = 64;
  int checks = 0, failures = 0;

  logic rst_n = 1;
  logic [NB-1:0] be_clk = '0;
  logic l2_clk = 0, fe_clk;
  logic [3:0] fq_in_count = '0;
  logic [FW-1:0][MW-1:0] fq_in_data = '0;
  logic fq_in_ready, fq_flush = 0;
  logic [3:0] fq_out_count, fq_pop_count = '0;
  logic [DW-1:0][MW-1:0] fq_out_data;
  logic [NB-1:0][NQ-1:0] bq_wr_en = '0, bq_full, bq_rd_en = '0, bq_empty;
  logic [NB-1:0][NQ-1:0][MW-1:0] bq_wr_data = '0, bq_rd_data;
  logic [3:0] commit_mops = '0, br_resolved = '0, br_mispredicted = '0;
  logic [3:0][3:0] fe_events = '0;
  logic [NB-1:0][3:0][3:0] be_events = '0;
  logic [1:0][3:0] l2_events = '0;
  logic interval_end, decision_valid, fe_step_up, fe_step_down;
  level_t target_level, fe_freq_level, fe_volt_level;
  mhz_t fe_mhz;
  mv_t fe_vdd_mv;

  cmcd_top dut (.*);

  // backend clocks about 8 GHz, L2 at 4 GHz (not given; any unrelated clocks do)
  for (genvar b = 0; b < NB; b++) begin : g_clk
    initial forever #(61 + 3 * b) be_clk[b] = ~be_clk[b];
  end
  always #125 l2_clk = ~l2_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_interval = 0, n_decision = 0, n_down = 0, n_up = 0, n_fq_full = 0, n_flush = 0;
  int n_bq_full = 0, n_bq_empty = 0, n_energy = 0;
  always @(posedge fe_clk) if (rst_n) begin
    if (interval_end) n_interval++;
    if (decision_valid) begin
      n_decision++;
      $display("%t decision %0d: level %0d (k=%0d/65536, E=%0d, E_FE=%0d)", $realtime, n_decision,
               target_level, dut.u_ctrl.k_q16, dut.u_ctrl.energy_total, dut.u_ctrl.energy_fe);
    end
    if (fe_step_down) n_down++;
    if (fe_step_up) n_up++;
    if (!fq_in_ready) n_fq_full++;
    if (|bq_full) n_bq_full++;
  end
  always @(posedge dut.energy_req) n_energy++;

  // ---------------- frontend side ----------------
  int phase = 0;            // 0: dispatch-bound, 1: fetch-bound
  longint fetch_seq = 0;
  logic [MW-1:0] fq_ref [$];
  logic [MW-1:0] bq_ref [NB][NQ][$];
  longint bq_seq [NB][NQ];

  initial begin
    for (int b = 0; b < NB; b++) for (int q = 0; q < NQ; q++) bq_seq[b][q] = 0;
  end

  always @(negedge fe_clk) if (dut.fe_rst_n) begin
    int avail, push, pop;
    // check the dispatch side against the reference
    avail = (fq_ref.size() < DW) ? fq_ref.size() : DW;
    check(int'(fq_out_count) == avail, "frontend queue: micro-ops shown to dispatch");
    for (int i = 0; i < avail; i++)
      if (fq_out_data[i] != fq_ref[i]) check(0, $sformatf("frontend queue data slot %0d", i));
    // stimulus for the coming edge
    fq_flush = ($urandom_range(0, 4999) == 0);
    push = (phase == 0) ? FW : 3;
    pop  = (phase == 0) ? ((avail < 2) ? avail : 2) : ((avail < 3) ? avail : 3);
    fq_in_count  = 4'(push);
    for (int i = 0; i < FW; i++) fq_in_data[i] = MW'(fetch_seq + i);
    fq_pop_count = 4'(pop);
    commit_mops  = 4'(pop);
    br_resolved  = 4'(pop > 0);
    br_mispredicted = 4'(fq_flush && pop > 0);
    // reference update as the edge will do it
    if (fq_flush) begin
      fq_ref.delete();
      n_flush++;
    end else begin
      for (int i = 0; i < pop; i++) void'(fq_ref.pop_front());
      if (fq_in_ready) for (int i = 0; i < push; i++) fq_ref.push_back(MW'(fetch_seq + i));
    end
    if (fq_in_ready) fetch_seq += push;
    // energy activity
    for (int e = 0; e < 4; e++) fe_events[e] = 4'($urandom_range(0, 3));
    // backend queue writes
    for (int b = 0; b < NB; b++)
      for (int q = 0; q < NQ; q++) begin
        bq_wr_en[b][q] = 1'b0;
        if (!bq_full[b][q] && $urandom_range(0, 99) < 30) begin
          bq_wr_en[b][q]   = 1'b1;
          bq_wr_data[b][q] = {8'(b), 8'(q), 48'(bq_seq[b][q])};
          bq_ref[b][q].push_back(bq_wr_data[b][q]);
          bq_seq[b][q]++;
        end
      end
  end

  // ---------------- backend side ----------------
  for (genvar b = 0; b < NB; b++) begin : g_be
    always @(negedge be_clk[b]) if (dut.be_rst_n[b]) begin
      for (int q = 0; q < NQ; q++) begin
        bq_rd_en[b][q] = 1'b0;
        // backends 0 and 1 read slowly, so their queues fill up
        if ($urandom_range(0, 99) < ((b < 2) ? 20 : 60)) begin
          if (bq_empty[b][q]) n_bq_empty++;
          else begin
            check(bq_rd_data[b][q] == bq_ref[b][q][0],
                  $sformatf("backend %0d queue %0d data %h exp %h", b, q, bq_rd_data[b][q], bq_ref[b][q][0]));
            void'(bq_ref[b][q].pop_front());
            bq_rd_en[b][q] = 1'b1;
          end
        end
      end
      for (int e = 0; e < 4; e++) be_events[b][e] = 4'($urandom_range(0, 3));
    end
  end
  always @(negedge l2_clk) for (int e = 0; e < 2; e++) l2_events[e] = 4'($urandom_range(0, 3));

  // ---------------- scenario ----------------
  function automatic bit period_ok(realtime p, int level);
    realtime exp = 1.0e6 / (10000.0 - 236.0 * level);
    return (p - exp < 0.5) && (exp - p < 0.5);
  endfunction

  realtime measured;
  task automatic measure_period();
    realtime t0;
    @(posedge fe_clk) t0 = $realtime;
    repeat (20) @(posedge fe_clk);
    measured = ($realtime - t0) / 20.0;
  endtask

  initial begin
    realtime t_walk;
    int slow;
    #1 rst_n = 0;
    repeat (20) @(posedge l2_clk);
    rst_n = 1;
    measure_period();
    check(period_ok(measured, 0), $sformatf("start at 10 GHz, period %f ps", measured));

    // phase A: dispatch-bound
    phase = 0;
    while (n_decision < 1) @(posedge fe_clk);
    check(target_level >= 10, $sformatf("dispatch-bound: chose level %0d, expected 10 or slower", target_level));
    slow = int'(target_level);
    t_walk = $realtime;
    while (!(int'(fe_freq_level) == slow && !dut.u_stepper.changing)) @(posedge fe_clk);
    t_walk = $realtime - t_walk;
    // the regulator needs 50 ns per level; the handshakes add a few cycles per step
    check(t_walk >= 50.0e3 * slow && t_walk < 50.0e3 * slow + 3.0e3 * slow,
          $sformatf("walk 0 -> %0d took %f ps", slow, t_walk));
    repeat (10) @(posedge fe_clk);
    check(n_down == slow, $sformatf("%0d steps down", n_down));
    check(int'(fe_vdd_mv) == int'(LEVEL_MV[slow]) && int'(fe_mhz) == 10000 - 236 * slow,
          $sformatf("at level %0d: %0d MHz, %0d mV", slow, fe_mhz, fe_vdd_mv));
    measure_period();
    check(period_ok(measured, slow), $sformatf("at level %0d, period %f ps", slow, measured));

    // phase B: fetch-bound
    @(negedge fe_clk) phase = 1;
    while (!(decision_valid && target_level == 0) && n_decision < 8) @(posedge fe_clk);
    check(target_level == 0, $sformatf("fetch-bound: chose level %0d, expected 0", target_level));
    while (!(fe_freq_level == 0 && !dut.u_stepper.changing)) @(posedge fe_clk);
    repeat (10) @(posedge fe_clk);
    check(n_up == slow, $sformatf("%0d steps up", n_up));
    check(int'(fe_vdd_mv) == 1100 && int'(fe_mhz) == 10000, "back at level 0: 10000 MHz, 1100 mV");
    measure_period();
    check(period_ok(measured, 0), $sformatf("back at 10 GHz, period %f ps", measured));

    // every mechanism happened
    check(n_interval >= 2, $sformatf("interval ends: %0d", n_interval));
    check(n_energy >= 2, $sformatf("energy read-outs: %0d", n_energy));
    check(n_decision >= 2, $sformatf("decisions: %0d", n_decision));
    check(n_down > 0, "step down happened");
    check(n_up > 0, "step up happened");
    check(n_fq_full > 0, $sformatf("frontend queue full: %0d cycles", n_fq_full));
    check(n_flush > 0, $sformatf("flushes: %0d", n_flush));
    check(n_bq_full > 0, $sformatf("backend queue full: %0d cycles", n_bq_full));
    check(n_bq_empty > 0, $sformatf("backend queue empty on read: %0d", n_bq_empty));
    $display("intervals=%0d energy_reads=%0d decisions=%0d steps_down=%0d steps_up=%0d fq_full=%0d flushes=%0d bq_full=%0d bq_empty=%0d",
             n_interval, n_energy, n_decision, n_down, n_up, n_fq_full, n_flush, n_bq_full, n_bq_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
