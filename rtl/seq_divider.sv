`timescale 1ps/1fs
// seq_divider: unsigned restoring divider, one quotient bit per clock cycle.
//
// `start` (while `busy` is low) loads `dividend` and `divisor`; WIDTH cycles later `done`
// pulses for one cycle with `quotient` = dividend / divisor, which then holds. A zero
// divisor gives an all-ones quotient. Reset is synchronous, active low.
module seq_divider #(
  parameter int unsigned WIDTH = 96
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] rem, dsr, quo;
  logic [CW-1:0]    bits_left;
  logic [WIDTH:0]   trial;

  assign trial = {rem, quo[WIDTH-1]} - {1'b0, dsr};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      rem       <= '0;
      dsr       <= '0;
      quo       <= '0;
      quotient  <= '0;
      bits_left <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          rem       <= '0;
          dsr       <= divisor;
          quo       <= dividend;
          bits_left <= CW'(WIDTH);
        end
      end else begin
        // shift the next dividend bit into the remainder and try to subtract
        if (!trial[WIDTH]) begin
          rem <= trial[WIDTH-1:0];
          quo <= {quo[WIDTH-2:0], 1'b1};
        end else begin
          rem <= {rem[WIDTH-2:0], quo[WIDTH-1]};
          quo <= {quo[WIDTH-2:0], 1'b0};
        end
        bits_left <= CW'(bits_left - 1'b1);
        if (bits_left == CW'(1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= trial[WIDTH] ? {quo[WIDTH-2:0], 1'b0} : {quo[WIDTH-2:0], 1'b1};
        end
      end
    end
  end
endmodule
