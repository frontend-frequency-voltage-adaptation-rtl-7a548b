`timescale 1ps/1fs
// tb_sync_fifo_model: the threshold rule of the synchronizing FIFO model. With a 100 ps
// read clock and a 30% threshold, a write 50 ps or 30 ps before a read edge must be visible
// right after that edge, a write 10 ps or 29 ps before it only after the next one. Then a
// random stream on two free-running unrelated clocks checks order, the DEPTH limit and that
// no entry is lost.
module tb_sync_fifo_model;
  localparam int DEPTH = 20, WIDTH = 16;
  int checks = 0, failures = 0;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] wr_level, rd_level;
  bit   free_run = 0;

  sync_fifo_model #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

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

  // read clock: rising edges at multiples of 100 ps
  initial forever begin #50 rd_clk = 1; #50 rd_clk = 0; end

  task automatic wr_pulse();   // one write-clock edge now
    wr_clk = 1; #5 wr_clk = 0;
  endtask

  // write one entry so that its edge leads read edge `t_edge` by `lead` ps, then report on
  // which read edge it became visible (1 = that edge, 2 = the next)
  task automatic probe(int lead, int exp_edges, logic [WIDTH-1:0] v);
    time t_edge;
    t_edge = ((($time + 300) / 100) + 1) * 100 - 50;   // a rising edge of rd_clk
    #(t_edge - lead - $time - 100);
    wr_pulse();                                          // keeps the write period at 100 ps
    #(95);
    wr_en = 1; wr_data = v;
    wr_pulse();
    wr_en = 0;
    #(lead - 5 + 1);                                     // just after the read edge
    if (exp_edges == 1) check(!empty && rd_data == v, $sformatf("lead %0d ps: visible at the first edge", lead));
    else begin
      check(empty, $sformatf("lead %0d ps: not visible at the first edge", lead));
      #100;
      check(!empty && rd_data == v, $sformatf("lead %0d ps: visible at the second edge", lead));
    end
    // pop it
    @(negedge rd_clk) rd_en = 1;
    @(negedge rd_clk) rd_en = 0;
    check(empty, "empty again");
  endtask

  logic [WIDTH-1:0] ref_q [$];
  initial begin
    repeat (3) begin wr_pulse(); #95; end
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    repeat (3) begin wr_pulse(); #95; end
    repeat (2) @(posedge rd_clk);
    probe(50, 1, 16'h0050);
    probe(30, 1, 16'h0030);
    probe(29, 2, 16'h0029);
    probe(10, 2, 16'h0010);

    // random stream, write clock 73 ps
    free_run = 1;
    fork
      forever begin #36 wr_clk = 1; #37 wr_clk = 0; end
      begin : writer
        int put = 0, seen_full = 0;
        while (put < 1500) begin
          @(negedge wr_clk);
          check(int'(wr_level) <= DEPTH, "level within DEPTH");
          if (full) seen_full++;
          if (!full && ($urandom % 4 != 0)) begin
            wr_en = 1; wr_data = WIDTH'($urandom); ref_q.push_back(wr_data); put++;
          end else wr_en = 0;
        end
        @(negedge wr_clk) wr_en = 0;
        check(seen_full > 0, "queue filled up");
      end
      begin : reader
        int got = 0;
        while (got < 1500) begin
          @(negedge rd_clk);
          if (!empty && ($urandom % 2 == 0)) begin
            check(rd_data == ref_q[0], $sformatf("stream data %h exp %h", rd_data, ref_q[0]));
            void'(ref_q.pop_front());
            rd_en = 1; got++;
          end else rd_en = 0;
        end
        @(negedge rd_clk) rd_en = 0;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end
endmodule
