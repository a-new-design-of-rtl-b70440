// hit_reset: the hit-bit reset generator. When a hit is detected it waits
// DELAY clock cycles and then drives a reset pulse WIDTH cycles long, which
// clears the hit-bit latches ahead of the card. The design description gives
// only "a pulse after some delay when a hit-bit is detected"; the delay and
// width values, and the three-state controller below, are this design's
// choices.
//
// States: IDLE -> WAIT (DELAY cycles) -> PULSE (WIDTH cycles) -> IDLE. A hit
// that is still present when the pulse ends is detected again, so a latch
// that failed to clear is reset once more.
//
// Timing: if hit is first sampled high at clock edge t0, rst_pulse is high
// from edge t0+DELAY to edge t0+DELAY+WIDTH. Hits seen while WAIT or PULSE
// is in progress are ignored. Synchronous active-low reset to IDLE.
module hit_reset #(
  parameter int unsigned DELAY = 10,  // clock cycles from detection to pulse
  parameter int unsigned WIDTH = 5    // pulse length in clock cycles
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hit,        // synchronous: some enabled hit-bit is set
  output logic rst_pulse
);

  localparam int unsigned MAXC = (DELAY > WIDTH) ? DELAY : WIDTH;
  localparam int unsigned CW   = (MAXC > 1) ? $clog2(MAXC) : 1;

  typedef enum logic [1:0] {IDLE, WAIT, PULSE} state_t;

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (hit) begin
          state <= WAIT;
          cnt   <= CW'(DELAY - 1);
        end
        WAIT: if (cnt == '0) begin
          state <= PULSE;
          cnt   <= CW'(WIDTH - 1);
        end else begin
          cnt <= cnt - 1'b1;
        end
        PULSE: if (cnt == '0) begin
          state <= IDLE;
        end else begin
          cnt <= cnt - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign rst_pulse = (state == PULSE);

  initial assert (DELAY >= 1 && WIDTH >= 1)
    else $error("hit_reset: DELAY and WIDTH must be at least 1");

endmodule
