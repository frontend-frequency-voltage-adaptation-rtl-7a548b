`timescale 1ps/1fs
// reset_sync: reset synchronizer of a clock domain.
//
// `rst_n_out` falls as soon as `rst_n_in` falls, without waiting for a clock edge, and rises
// on the second rising edge of `clk` after `rst_n_in` rises, so every flip-flop of the domain
// leaves reset on the same edge, in step with its own clock.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage     <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage     <= 1'b1;
      rst_n_out <= stage;
    end
  end
endmodule
