`timescale 1ps/1fs
// tb_dc_fifo: the synchronizing FIFO between two unrelated clocks.
// Phase 1 fills the queue with the reader stopped and checks that exactly DEPTH entries are
// taken before `full`. Phase 2 checks how many read edges an entry needs to cross (2 or 3).
// Phase 3 streams random traffic both ways, with the writer clock changing frequency, and
// compares every entry read against a reference queue.
module tb_dc_fifo;
  localparam int DEPTH = 20;
  localparam int WIDTH = 16;
  int checks = 0, failures = 0;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] wr_level, rd_level;
  int   wr_half = 50, rd_half = 73;

  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  dc_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] ref_q [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_written, edges;
  initial begin
    repeat (5) @(posedge rd_clk);
    @(negedge wr_clk) wr_rst_n = 1;
    @(negedge rd_clk) rd_rst_n = 1;
    repeat (4) @(posedge wr_clk);
    check(empty && !full && wr_level == 0, "empty after reset");

    // phase 1: fill
    n_written = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      @(negedge wr_clk);
      if (!full) begin
        wr_en = 1; wr_data = WIDTH'(16'hA000 + i); ref_q.push_back(wr_data); n_written++;
      end else wr_en = 0;
    end
    @(negedge wr_clk) wr_en = 0;
    check(n_written == DEPTH, $sformatf("accepted %0d entries before full", n_written));
    check(full && wr_level == DEPTH, "full when DEPTH entries");
    repeat (4) @(posedge rd_clk);
    check(rd_level == DEPTH, $sformatf("reader sees %0d entries", rd_level));
    // drain
    while (ref_q.size() > 0) begin
      @(negedge rd_clk);
      if (!empty) begin
        check(rd_data == ref_q[0], $sformatf("drain data %h exp %h", rd_data, ref_q[0]));
        void'(ref_q.pop_front());
        rd_en = 1;
      end else rd_en = 0;
    end
    @(negedge rd_clk) rd_en = 0;
    repeat (5) @(posedge wr_clk);
    check(!full && wr_level == 0, "writer sees space again");

    // phase 2: crossing latency in read edges
    @(negedge wr_clk) begin wr_en = 1; wr_data = 16'h1234; end
    @(posedge wr_clk) #1 wr_en = 0;
    edges = 0;
    while (empty) begin @(posedge rd_clk); #1; edges++; end
    check(edges >= 2 && edges <= 3, $sformatf("crossing took %0d read edges", edges));
    check(rd_data == 16'h1234, "crossed data");
    @(negedge rd_clk) rd_en = 1;
    @(negedge rd_clk) rd_en = 0;

    // phase 3: random traffic, writer clock changes
    fork
      begin : writer
        int put = 0;
        while (put < 2000) begin
          @(negedge wr_clk);
          if (put == 700) wr_half = 31;
          if (put == 1400) wr_half = 97;
          if (!full && ($urandom % 3 != 0)) begin
            wr_en = 1; wr_data = WIDTH'($urandom); ref_q.push_back(wr_data); put++;
          end else wr_en = 0;
        end
        @(negedge wr_clk) wr_en = 0;
      end
      begin : reader
        int got = 0;
        while (got < 2000) begin
          @(negedge rd_clk);
          if (!empty && ($urandom % 4 != 0)) begin
            check(rd_data == ref_q[0], $sformatf("stream data %h exp %h", rd_data, ref_q[0]));
            void'(ref_q.pop_front());
            rd_en = 1; got++;
          end else rd_en = 0;
        end
        @(negedge rd_clk) rd_en = 0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
