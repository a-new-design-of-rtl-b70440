// scc_pkg: constants and types shared by the segment collector card (SCC)
// FPGA modules.
//
// The card sees 96 hit-bits, split into twelve eight-bit "areas"; the
// microcontroller writes the hit-bit mask to the FPGA one area at a time.
// These counts, the 50 MHz / 10 clock division and the default mask byte
// 8'hFF (every hit-bit enabled) follow the design description. The layout of
// the microcontroller port (a four-bit address selecting an area or the gate
// register) is this design's own choice.
package scc_pkg;

  localparam int unsigned N_HITS    = 96;               // hit-bits per card
  localparam int unsigned AREA_W    = 8;                // bits per mask area
  localparam int unsigned N_AREAS   = N_HITS / AREA_W;  // twelve areas
  localparam int unsigned CLK_DIV   = 10;               // 50 MHz -> 5 MHz
  localparam int unsigned GATE_W    = 8;                // gate delay byte
  localparam int unsigned PORT_AW   = 4;                // port address bits
  localparam logic [AREA_W-1:0] MASK_DEFAULT = 8'hFF;   // default area mask

  // Microcontroller-to-FPGA port address map: addresses 0..11 select a mask
  // area, address 12 the WCTS gate delay register, the rest are ignored.
  typedef logic [PORT_AW-1:0] port_addr_t;
  localparam port_addr_t ADDR_GATE = port_addr_t'(N_AREAS);

  // One write from the microcontroller, after synchronisation.
  typedef struct packed {
    logic              valid;
    port_addr_t        addr;
    logic [AREA_W-1:0] data;
  } port_write_t;

endpackage
