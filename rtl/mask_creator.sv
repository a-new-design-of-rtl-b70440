// mask_creator: the full mask creator. The microcontroller sends the 96-bit
// hit-bit mask as twelve eight-bit sections ("areas"); this block stores
// each section in its place and presents the whole mask as one 96-bit
// value, as the design description specifies. Area k holds mask bits
// [8k+7:8k]; a set bit enables the matching hit-bit.
//
// Interface: one port_write_t per cycle. A write with valid set and an
// address below N_AREAS replaces that area; other addresses are left to
// other registers and ignored here. The register resets to MASK_DEFAULT in
// every area (all hit-bits enabled), the same value the microcontroller
// restores as its default; resetting the FPGA copy to it is this design's
// choice, since the FPGA holds no mask until the microcontroller writes one.
//
// Timing: the new area value appears on mask one clock after the write.
module mask_creator
  import scc_pkg::*;
#(
  parameter int unsigned AREAS = scc_pkg::N_AREAS,
  parameter int unsigned AW    = scc_pkg::AREA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  port_write_t         wr,
  output logic [AREAS*AW-1:0] mask
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mask <= {AREAS{AW'(MASK_DEFAULT)}};
    end else if (wr.valid && wr.addr < port_addr_t'(AREAS)) begin
      mask[wr.addr*AW +: AW] <= AW'(wr.data);
    end
  end

endmodule
