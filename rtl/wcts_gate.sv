// wcts_gate: gate for the Wire Chamber Test Stand (WCTS). When hit-bits
// become active the gate opens after a programmable delay and stays open
// for GATE_LEN clock cycles. The delay, in clock cycles, is a byte the
// microcontroller writes to this block (load / load_value); the design
// description says only that the gate is generated when there are active
// hit-bits and that its delay comes from the value received from the
// microcontroller. Counting the delay in 20 ns clock cycles, the fixed gate
// length and the reset value of the delay (zero) are this design's choices.
//
// States: IDLE -> WAIT (delay cycles, skipped for delay 0) -> OPEN
// (GATE_LEN cycles) -> DONE, which returns to IDLE once active has gone low,
// so each burst of activity gives one gate. The delay is read when activity
// is detected; a load during WAIT or OPEN affects the next gate.
//
// Timing: if active is sampled high in IDLE at clock edge t0 and the delay
// register holds d, gate is high from edge t0+d to edge t0+d+GATE_LEN.
module wcts_gate #(
  parameter int unsigned GATE_W   = scc_pkg::GATE_W,
  parameter int unsigned GATE_LEN = 16   // gate length in clock cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,        // one-cycle write of the delay
  input  logic [GATE_W-1:0] load_value,
  input  logic              active,      // synchronous: enabled hit present
  output logic              gate
);

  localparam int unsigned LW = (GATE_LEN > 1) ? $clog2(GATE_LEN) : 1;
  localparam int unsigned CW = (LW > GATE_W) ? LW : GATE_W;

  typedef enum logic [1:0] {IDLE, WAIT, OPEN, DONE} state_t;

  state_t            state;
  logic [CW-1:0]     cnt;
  logic [GATE_W-1:0] delay;   // delay register, in clock cycles

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      delay <= '0;
    end else if (load) begin
      delay <= load_value;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (active) begin
          if (delay == '0) begin
            state <= OPEN;
            cnt   <= CW'(GATE_LEN - 1);
          end else begin
            state <= WAIT;
            cnt   <= CW'(delay) - 1'b1;
          end
        end
        WAIT: if (cnt == '0) begin
          state <= OPEN;
          cnt   <= CW'(GATE_LEN - 1);
        end else begin
          cnt <= cnt - 1'b1;
        end
        OPEN: if (cnt == '0) begin
          state <= DONE;
        end else begin
          cnt <= cnt - 1'b1;
        end
        DONE: if (!active) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign gate = (state == OPEN);

  initial assert (GATE_LEN >= 1) else $error("wcts_gate: GATE_LEN must be at least 1");

endmodule
