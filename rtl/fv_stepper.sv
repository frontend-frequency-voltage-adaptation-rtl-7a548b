`timescale 1ps/1fs
// fv_stepper: moves a clock domain's operating point to a target level, one level at a time.
//
// The controller may ask for any level, but the domain keeps running during a change only if
// frequency and voltage move between adjacent levels, so the stepper walks there one step at
// a time. On each step the supply must always be high enough for the clock:
//   - speeding up (towards level 0): first the voltage rises one level, and once the
//     regulator reports the new voltage settled, the clock switches to the faster frequency;
//   - slowing down: first the clock switches to the slower frequency, then the voltage
//     drops one level and the stepper waits for it to settle.
// A new target may arrive at any time; it is taken up at the next step boundary.
//
// Regulator interface (four-phase, the regulator is not clocked by `clk`): the stepper puts
// the requested level on `volt_level`, raises `vreq`; the regulator ramps and raises `vack`
// (synchronised here); the stepper drops `vreq`, the regulator drops `vack`.
// `freq_level` goes to the domain's clock generator. After reset both are level 0 (fastest),
// which the regulator must also start at. One step takes the regulator's ramp time plus
// about six `clk` cycles of handshake. The adjacent-level rule is the published one; the
// ordering of voltage and frequency and the handshake are choices of this design.
module fv_stepper
  import fv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t target_level,
  output level_t freq_level,
  output level_t volt_level,
  output logic   vreq,
  input  logic   vack,
  output logic   changing,       // a step is in progress
  output logic   step_up_pulse,  // one step towards level 0 completed
  output logic   step_down_pulse // one step towards level 20 completed
);
  typedef enum logic [2:0] {S_IDLE, S_UP_ACK, S_UP_NACK, S_DN_ACK, S_DN_NACK} state_t;
  state_t state;
  logic   vack_s;
  level_t tgt;

  sync_2ff u_sync_ack (.clk(clk), .rst_n(rst_n), .d(vack), .q(vack_s));

  assign tgt      = (target_level > LEVEL_SLOWEST) ? LEVEL_SLOWEST : target_level;
  assign changing = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      freq_level      <= LEVEL_FASTEST;
      volt_level      <= LEVEL_FASTEST;
      vreq            <= 1'b0;
      step_up_pulse   <= 1'b0;
      step_down_pulse <= 1'b0;
    end else begin
      step_up_pulse   <= 1'b0;
      step_down_pulse <= 1'b0;
      case (state)
        S_IDLE: if (!vack_s) begin
          if (tgt < freq_level) begin         // faster: voltage first
            volt_level <= level_t'(freq_level - 1'b1);
            vreq       <= 1'b1;
            state      <= S_UP_ACK;
          end else if (tgt > freq_level) begin // slower: frequency first
            freq_level <= level_t'(freq_level + 1'b1);
            volt_level <= level_t'(freq_level + 1'b1);
            vreq       <= 1'b1;
            state      <= S_DN_ACK;
          end
        end
        S_UP_ACK: if (vack_s) begin
          vreq       <= 1'b0;
          freq_level <= volt_level;
          state      <= S_UP_NACK;
        end
        S_UP_NACK: if (!vack_s) begin
          step_up_pulse <= 1'b1;
          state         <= S_IDLE;
        end
        S_DN_ACK: if (vack_s) begin
          vreq  <= 1'b0;
          state <= S_DN_NACK;
        end
        S_DN_NACK: if (!vack_s) begin
          step_down_pulse <= 1'b1;
          state           <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_adjacent: assert property (@(posedge clk) disable iff (!rst_n)
      (freq_level == volt_level) || (freq_level == level_t'(volt_level + 1'b1)))
    else $error("fv_stepper: frequency ahead of voltage");
endmodule
