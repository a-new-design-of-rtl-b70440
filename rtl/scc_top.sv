// scc_top: the FPGA of the segment collector card (SCC) for the drift
// chamber readout. The card receives 96 hit-bits; a 96-bit mask chooses
// which of them (each covers about 1.4 degrees of polar angle) take part,
// and the OR of the enabled hit-bits is the card's segment bit for the
// Level 2 trigger. The FPGA also produces a hit-bit reset pulse, a gate and
// a trigger for the Wire Chamber Test Stand (WCTS), and the clock of the
// microcontroller that loads the mask and the gate delay.
//
// The six functions - clock divider, OR, hit-bit reset, WCTS gate, WCTS
// trigger and full mask creator - follow the design description. The port
// receiver, the synchroniser on the segment bit and the port address map
// are this design's choices.
//
// Data flow: port_wr/port_addr/port_data -> pic_port_rx -> mask_creator
// (areas 0..11) or the wcts_gate delay register (address 12). hits & mask
// -> hit_or -> seg_or (combinational output) and, through two flip-flops,
// the synchronous "active" signal that drives hit_reset, wcts_gate and
// wcts_trigger.
//
// Timing: seg_or follows hits with no clock. A hit first seen at clock edge
// t0 by the synchroniser makes "active" high two edges later; wcts_trig is
// high one cycle after that, the gate opens "delay" cycles after "active"
// is sampled, and the hit-bit reset pulse starts RESET_DELAY cycles after.
// rst_n is synchronous and active low; it stands for the end of FPGA
// configuration.
module scc_top
  import scc_pkg::*;
#(
  parameter int unsigned RESET_DELAY = 10,  // hit-bit reset delay, cycles
  parameter int unsigned RESET_WIDTH = 5,   // hit-bit reset width, cycles
  parameter int unsigned GATE_LEN    = 16   // WCTS gate length, cycles
) (
  input  logic              clk,         // 50 MHz
  input  logic              rst_n,
  input  logic [N_HITS-1:0] hits,
  input  logic              port_wr,
  input  port_addr_t        port_addr,
  input  logic [AREA_W-1:0] port_data,
  output logic              pic_clk,     // 5 MHz
  output logic              seg_or,
  output logic              hit_rst,
  output logic              wcts_gate_o,
  output logic              wcts_trig
);

  port_write_t       wr;
  logic [N_HITS-1:0] mask;
  logic [1:0]        active_s;
  logic              active;

  clk_divider #(.DIV(CLK_DIV)) u_clkdiv (
    .clk, .rst_n, .clk_out(pic_clk)
  );

  pic_port_rx u_port (
    .clk, .rst_n, .port_wr, .port_addr, .port_data, .wr
  );

  mask_creator #(.AREAS(N_AREAS), .AW(AREA_W)) u_mask (
    .clk, .rst_n, .wr, .mask
  );

  hit_or #(.N(N_HITS)) u_or (
    .hits, .mask, .out(seg_or)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) active_s <= '0;
    else        active_s <= {active_s[0], seg_or};
  end
  assign active = active_s[1];

  hit_reset #(.DELAY(RESET_DELAY), .WIDTH(RESET_WIDTH)) u_hrst (
    .clk, .rst_n, .hit(active), .rst_pulse(hit_rst)
  );

  wcts_gate #(.GATE_W(GATE_W), .GATE_LEN(GATE_LEN)) u_gate (
    .clk, .rst_n,
    .load(wr.valid && wr.addr == ADDR_GATE),
    .load_value(wr.data),
    .active,
    .gate(wcts_gate_o)
  );

  wcts_trigger u_trig (
    .clk, .rst_n, .active, .trig(wcts_trig)
  );

endmodule
