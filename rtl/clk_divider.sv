// clk_divider: divides the FPGA's 50 MHz clock by DIV to make the
// microcontroller's clock (5 MHz with the default DIV of ten, as the design
// description specifies).
//
// A counter runs from 0 to DIV-1; the output is high for the first DIV/2
// counts and low for the rest, so for an even DIV the output has a 50 %
// duty cycle (for an odd DIV it is high one cycle less than low). The output
// comes straight from a flip-flop, so it is glitch-free. The duty cycle and
// the synchronous active-low reset (output low, counter zero) are this
// design's choices.
//
// Timing: clk_out rises on the first clk edge after reset is released and
// then has a period of exactly DIV clk cycles.
module clk_divider #(
  parameter int unsigned DIV = scc_pkg::CLK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_out <= (cnt < CW'(DIV / 2));
    end
  end

  initial assert (DIV >= 2) else $error("clk_divider: DIV must be at least 2");

endmodule
