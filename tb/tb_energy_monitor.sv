`timescale 1ps/1fs
// tb_energy_monitor: random activity on four event sources; the requester runs on its own,
// unrelated clock. Quiet snapshots (no activity around the handshake) must return exactly
// sum(count_i * EAR_i); snapshots taken while activity continues must together account for
// every event exactly once. Also checks the four-phase order and the snapshot latency.
module tb_energy_monitor;
  localparam int N = 4;
  localparam int unsigned EARS [N] = '{40, 25, 10, 5};
  int checks = 0, failures = 0;

  logic clk = 0, rq_clk = 0, rst_n = 0;
  logic [N-1:0][3:0] events = '0;
  logic snap_req = 0, snap_ack;
  logic [47:0] energy;

  always #50 clk = ~clk;
  always #37 rq_clk = ~rq_clk;

  energy_monitor #(.NUM_EVENTS(N), .INC_W(4), .EAR(EARS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expect_e = 0;       // energy of events driven since the last quiet snapshot
  bit     counting = 1;

  // every event applied at a clock edge after reset is worth its EAR
  always @(posedge clk) if (rst_n && counting)
    for (int i = 0; i < N; i++) expect_e += longint'(events[i]) * EARS[i];

  task automatic handshake(output longint e, output int lat);
    int c = 0;
    @(posedge rq_clk) snap_req <= 1;
    while (!snap_ack) begin @(posedge rq_clk); c++; end
    e = longint'(energy);
    lat = c;
    @(posedge rq_clk) snap_req <= 0;
    while (snap_ack) @(posedge rq_clk);
  endtask

  initial begin
    longint e, sum_busy;
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // quiet snapshots
    for (int r = 0; r < 10; r++) begin
      for (int c = 0; c < 50 + r * 7; c++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) events[i] = 4'($urandom_range(0, 15));
      end
      @(negedge clk) events = '0;
      repeat (2) @(posedge clk);
      handshake(e, lat);
      check(e == expect_e, $sformatf("quiet snapshot %0d: energy %0d exp %0d", r, e, expect_e));
      // 2-3 monitor cycles to synchronise, N to accumulate, 1 to publish, 2-3 back
      check(lat >= 4 && lat <= 16, $sformatf("snapshot latency %0d requester cycles", lat));
      expect_e = 0;
    end
    // busy snapshots: activity never stops
    sum_busy = 0;
    fork
      begin : drive
        for (int c = 0; c < 2000; c++) begin
          @(negedge clk);
          for (int i = 0; i < N; i++) events[i] = 4'($urandom_range(0, 15));
        end
        @(negedge clk) events = '0;
      end
      begin : sample
        for (int r = 0; r < 8; r++) begin
          repeat (150) @(posedge rq_clk);
          handshake(e, lat);
          sum_busy += e;
        end
      end
    join
    repeat (3) @(posedge clk);
    handshake(e, lat);
    sum_busy += e;
    check(sum_busy == expect_e, $sformatf("busy snapshots total %0d exp %0d", sum_busy, expect_e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the four-phase order: acknowledge only rises while a request is up
  always @(posedge snap_ack) if (rst_n) check(snap_req, "ack rose without a request");
endmodule
