`timescale 1ps/1fs
// energy_monitor: activity-based energy measurement of one clock domain.
//
// Each of NUM_EVENTS activity sources of the domain (an array access, an issued micro-op,
// clock cycles, ...) has a performance counter and an Energy per Access Register (EAR): a
// constant, fixed by the designer, holding the average energy of one access. When the
// frontend's controller asks for the energy of the interval that just ended, the monitor
// freezes its counters into a snapshot, restarts them from zero (so no event is lost or
// counted twice), multiplies each snapshot counter with its EAR one per clock cycle, and
// returns the sum.
//
// The request comes from the frontend clock domain, so it uses a four-phase handshake:
// `snap_req` (asynchronous to `clk`, synchronised inside) rises; the monitor takes the
// snapshot, accumulates, drives `energy` and raises `snap_ack`; the requester may then read
// `energy`, which stays stable until the next request, and drops `snap_req`; the monitor
// drops `snap_ack`. Latency: 2-3 cycles of synchronisation plus NUM_EVENTS cycles.
// The EAR principle is the published one; the EAR values (in arbitrary energy units, e.g.
// picojoules at the nominal voltage), the counter widths and the handshake are choices of
// this design. Reset is synchronous, active low.
module energy_monitor #(
  parameter int unsigned NUM_EVENTS = 4,
  parameter int unsigned INC_W      = 4,    // width of a per-cycle event count
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned EAR_W      = 16,
  parameter int unsigned ENERGY_W   = 48,
  parameter int unsigned EAR [NUM_EVENTS] = '{40, 25, 10, 5}
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NUM_EVENTS-1:0][INC_W-1:0]   events,    // accesses this cycle, per source
  input  logic                               snap_req,  // from the requester's domain
  output logic                               snap_ack,
  output logic [ENERGY_W-1:0]                energy
);
  localparam int unsigned IW = (NUM_EVENTS > 1) ? $clog2(NUM_EVENTS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ACCUM, S_ACK} state_t;
  state_t state;

  logic [NUM_EVENTS-1:0][CNT_W-1:0] cnt, snap;
  logic [ENERGY_W-1:0]              acc;
  logic [IW-1:0]                    idx;
  logic                             req_s;
  logic [EAR_W-1:0]                 ear_sel;

  sync_2ff u_sync_req (.clk(clk), .rst_n(rst_n), .d(snap_req), .q(req_s));

  always_comb begin
    ear_sel = '0;
    for (int i = 0; i < NUM_EVENTS; i++)
      if (idx == IW'(i)) ear_sel = EAR_W'(EAR[i]);
  end

  wire take = (state == S_IDLE) && req_s && !snap_ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int i = 0; i < NUM_EVENTS; i++)
        cnt[i] <= take ? CNT_W'(events[i]) : CNT_W'(cnt[i] + events[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      snap     <= '0;
      acc      <= '0;
      idx      <= '0;
      snap_ack <= 1'b0;
      energy   <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (!req_s) snap_ack <= 1'b0;
          if (take) begin
            snap  <= cnt;
            acc   <= '0;
            idx   <= '0;
            state <= S_ACCUM;
          end
        end
        S_ACCUM: begin
          acc <= ENERGY_W'(acc + snap[idx] * ear_sel);
          if (idx == IW'(NUM_EVENTS - 1)) state <= S_ACK;
          else                            idx   <= IW'(idx + 1'b1);
        end
        S_ACK: begin
          energy   <= acc;
          snap_ack <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
