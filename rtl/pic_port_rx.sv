// pic_port_rx: receiver for the parallel port the microcontroller writes
// mask areas and the gate delay through. The design description says only
// that the microcontroller writes a value "to the port connected to the
// FPGA"; the port's form is this design's choice: an eight-bit data bus, a
// four-bit address (0..11 mask area, 12 gate delay) and a write strobe.
//
// The microcontroller runs from its own (divided) clock, so the strobe is
// passed through two flip-flops and its rising edge makes a one-cycle write.
// Address and data go through the same two stages, so they line up with the
// strobe; the microcontroller must hold them steady while the strobe is
// high, and hold the strobe high and low for at least two FPGA clocks each
// (a microcontroller instruction takes far longer). An assertion flags
// address or data changing while the strobe is high.
//
// Timing: wr.valid is high for one clock, from the third clock edge after
// the strobe rises (counting the edge that first samples it as the first).
module pic_port_rx
  import scc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              port_wr,    // strobe, asynchronous
  input  port_addr_t        port_addr,
  input  logic [AREA_W-1:0] port_data,
  output port_write_t       wr
);

  logic [2:0]        wr_s;      // two synchroniser stages and edge history
  port_addr_t        addr_s [2];
  logic [AREA_W-1:0] data_s [2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_s   <= '0;
      addr_s <= '{default: '0};
      data_s <= '{default: '0};
      wr     <= '0;
    end else begin
      wr_s      <= {wr_s[1:0], port_wr};
      addr_s[0] <= port_addr;
      addr_s[1] <= addr_s[0];
      data_s[0] <= port_data;
      data_s[1] <= data_s[0];
      wr.valid  <= wr_s[1] & ~wr_s[2];
      wr.addr   <= addr_s[1];
      wr.data   <= data_s[1];
    end
  end

  // Port rule: address and data hold steady while the strobe is high.
  a_port_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_s[0] && wr_s[1]) |-> (addr_s[0] == addr_s[1] && data_s[0] == data_s[1]))
    else $error("pic_port_rx: address or data changed while the strobe was high");

endmodule
