`timescale 1ps/1fs
// sync_2ff: two-flop synchronizer for signals that enter a clock domain from another one.
//
// Each bit of `d` is sampled by two flip-flops in series clocked by `clk`; `q` follows `d`
// two to three `clk` edges later. Only single bits, or multi-bit values of which at most
// one bit changes at a time (Gray code), may pass through it. Reset is synchronous and
// active low and loads RESET_VAL.
module sync_2ff #(
  parameter int unsigned WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
