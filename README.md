# Segment collector card FPGA: masked hit-bit OR for a drift chamber trigger

A segment collector card (SCC) sits in the readout of a drift chamber
sector. It receives 96 hit-bits, each covering about 1.4 degrees of polar
angle, and reduces them to one bit that says "a track segment was seen
here", which feeds the Level 2 trigger. Older cards let the operator pick
only three fixed angular windows (8-45, 8-90 or 8-142 degrees). This design
puts a 96-bit mask in front of the OR, so any subset of the hit-bits can be
enabled: 2^96 choices instead of three.

The mask is kept by a small microcontroller on the card, which talks to a
host PC over a serial line and stores the mask and a gate setting in its
EEPROM. The microcontroller writes the mask into the FPGA eight bits at a
time. The FPGA, which this RTL describes, does six things:

| function | module | what it does |
|---|---|---|
| clock divider | `clk_divider` | 50 MHz in, 5 MHz out for the microcontroller |
| OR | `hit_or` | `|(hits & mask)`: the segment bit |
| hit-bit reset | `hit_reset` | a pulse, some time after a hit, that clears the hit latches |
| WCTS gate | `wcts_gate` | a gate for the Wire Chamber Test Stand, opened a programmable delay after a hit |
| WCTS trigger | `wcts_trigger` | a one-clock pulse when hits appear |
| full mask creator | `mask_creator` | builds the 96-bit mask from twelve 8-bit writes |

`pic_port_rx` (the microcontroller port receiver), `scc_pkg` (shared
constants and types) and `scc_top` (the wiring) complete the FPGA.

## Structure

```
                 port_wr, port_addr[3:0], port_data[7:0]   (from microcontroller)
                                   |
                             pic_port_rx  (2-flop sync, strobe edge -> 1-cycle write)
                                   |  port_write_t {valid, addr, data}
                  +----------------+-----------------+
           addr 0..11                           addr 12
                  |                                  |
            mask_creator                      wcts_gate delay register
                  | mask[95:0]                       |
 hits[95:0] --> hit_or --> seg_or (output, no clock)  |
                  |                                  |
             2-flop synchroniser -> active           |
                  +--------------+-------------------+-----------+
                  |              |                               |
              hit_reset      wcts_gate                      wcts_trigger
                  |              |                               |
               hit_rst      wcts_gate_o                      wcts_trig

 clk (50 MHz) --> clk_divider --> pic_clk (5 MHz)
```

All registers run on the one 50 MHz clock `clk`. `rst_n` is a synchronous,
active-low reset; on the board it stands for the end of FPGA configuration.

## Loading the mask

The mask is split into twelve *areas* of eight bits. Area `k` holds mask
bits `[8k+7:8k]`; a set bit enables the matching hit-bit. After reset every
area holds `8'hFF`, so every hit-bit is enabled, which is also the default
the microcontroller restores on request.

The microcontroller writes through a parallel port:

| signal | width | meaning |
|---|---|---|
| `port_addr` | 4 | 0..11: mask area; 12: WCTS gate delay; 13..15: ignored |
| `port_data` | 8 | the byte to write |
| `port_wr` | 1 | write strobe; a write happens on its rising edge |

The microcontroller runs from `pic_clk`, but its outputs are still treated
as asynchronous: strobe, address and data each pass two flip-flops in
`pic_port_rx`, and the rising edge of the synchronised strobe makes one
write that lasts one clock. The rules for the writer are:

* address and data must be steady whenever the strobe is high (an
  assertion in `pic_port_rx` checks this in simulation);
* the strobe must stay high, and then low, for at least two 50 MHz clocks.
  A microcontroller instruction lasts 40 such clocks, so any
  firmware-driven strobe meets this easily.

The write reaches `mask_creator` on the third clock edge after the strobe
rises, counting the edge that first samples it. The new mask bits are in
effect one clock later. A whole mask therefore takes twelve port writes.
Between the first and the last of them the FPGA works with a mask that is
part old, part new.

## The segment OR

`seg_or = |(hits & mask)` is purely combinational, so the segment bit
follows the hit-bits without waiting for a clock edge. It is the only
output that does not come from a flip-flop.

## What happens after a hit

Inside the FPGA, `seg_or` is passed through two flip-flops to give
`active`, which drives the three timed blocks. The hit-bits are asynchronous
to the clock, so this synchroniser is what makes them safe to use. Only
*enabled* hit-bits count: a hit whose mask bit is clear gives no trigger,
gate or reset.

Let `e1` be the first clock edge that samples `seg_or` high, and let `d` be
the gate-delay byte last written to address 12. Outputs, as clock edges
after which each signal is high:

| output | starts after edge | lasts | parameter |
|---|---|---|---|
| `wcts_trig` | e1 + 2 | 1 clock | fixed |
| `wcts_gate_o` | e1 + 2 + d | `GATE_LEN` clocks (16) | `d` from the port, 0..255 |
| `hit_rst` | e1 + 2 + `RESET_DELAY` (10) | `RESET_WIDTH` clocks (5) | `RESET_DELAY`, `RESET_WIDTH` |

With a 20 ns clock the default hit-bit reset comes 240 ns after the hit is
first seen and lasts 100 ns. The gate delay can be set from 0 to 5.1 us.

How each block treats repeated or held activity:

* **WCTS trigger** fires on the rising edge of `active`, so a hit held for
  many clocks still gives one pulse. Activity already present when reset is
  released does not fire.
* **WCTS gate** gives one gate per burst of activity. After the gate closes
  it waits for `active` to go low before it can open again. The delay is
  read when activity is detected, so a new delay written meanwhile applies
  to the next gate. It resets to 0.
* **Hit-bit reset** ignores activity during its delay and its pulse. If a
  hit is still present when the pulse ends, it starts again: a latch that
  did not clear gets another reset.

## The microcontroller clock

`clk_divider` counts 0..9 and drives `pic_clk` high for counts 0..4, so
the clock has a 50 % duty cycle and a 200 ns period. It comes straight from
a flip-flop, so it is glitch-free. It rises on the first clock edge after
reset.

## Parameters

| name | where | default | origin |
|---|---|---|---|
| `N_HITS` | `scc_pkg` | 96 | design specification |
| `AREA_W`, `N_AREAS` | `scc_pkg` | 8, 12 | design specification |
| `CLK_DIV` | `scc_pkg` | 10 | design specification (50 MHz to 5 MHz) |
| `MASK_DEFAULT` | `scc_pkg` | `8'hFF` | the microcontroller's default mask byte |
| `GATE_W` | `scc_pkg` | 8 | chosen: one port write |
| `RESET_DELAY`, `RESET_WIDTH` | `scc_top` | 10, 5 clocks | chosen |
| `GATE_LEN` | `scc_top` | 16 clocks | chosen |

## Which parts are specified, and which are choices

The list of six functions and these facts follow the original
specification:

* the 96 hit-bits;
* twelve 8-bit mask sections;
* the divide-by-ten clock;
* the masked reduction OR;
* the one-clock trigger;
* a gate whose delay comes from the microcontroller;
* a reset pulse some time after a hit.

The specification does not give the following, so everything below is this
design's choice and the first place to look when matching real hardware:

* the port's layout, address map and strobe protocol;
* the synchroniser on the segment bit;
* which signal the timed blocks respond to: the *masked* OR, not any raw
  hit;
* the unit of the gate delay (one clock) and the gate's length;
* the hit-bit reset's delay and width;
* the reset values: mask all ones, gate delay zero;
* the rules for repeated and held activity described above.

The original FPGA had no reset input and reached a known state a few
clocks after configuration. This design uses an explicit synchronous reset
instead.

These parts of the card are outside the FPGA and have no RTL here:

* the microcontroller and its firmware: serial commands, EEPROM storage of
  the mask and gate, A/D measurements;
* the RS-232/RS-485 line drivers;
* the configuration PROM;
* the board itself.

`scc_top_tb` models the microcontroller's port writes.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops by itself, with a watchdog for
hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module scc_top_tb -y rtl -y tb +libext+.sv rtl/scc_pkg.sv tb/scc_top_tb.sv
./obj_dir/Vscc_top_tb
```

Replace `scc_top_tb` with any other testbench name. The simulator's two-state
model means every register that is read must be reset. All are.

| testbench | covers |
|---|---|
| `scc_top_tb` | the whole FPGA at default parameters; the full description is below the table |
| `mask_creator_tb` | reset value; random writes, including ignored addresses and idle cycles; a full twelve-area load |
| `pic_port_rx_tb` | random strobe lengths and bus noise; one write per strobe, with the right address, data and latency |
| `hit_or_tb` | a single hit walked across all 96 positions with its mask bit on and off; random sparse and dense patterns |
| `hit_reset_tb` | delay and width at default and at 1/1; a short hit; a hit that does not clear |
| `wcts_gate_tb` | delays 0, 1, 2, 5, 17, 255 and random delays; gate lengths 16 and 3; one gate per burst |
| `wcts_trigger_tb` | 300 random bursts; exactly one pulse each |
| `clk_divider_tb` | waveform and 200 ns period at /10; an odd divider (/7) |

`scc_top_tb` runs the whole FPGA at its default parameters, with a model
of the microcontroller:

* It loads the three classic angular windows as masks: the first 27, 59 and
  96 hit-bits, for 8-45, 8-90 and 8-142 degrees at about 1.4 degrees per
  bit.
* For each window it walks a single hit across all 96 positions.
* It then runs random masks with groups of up to four hits.
* For every hit it checks `seg_or` and the exact clock timing of the
  trigger, gate and reset.
* It counts each mechanism (area writes, gate-delay writes, masked-out
  hits, triggers, gates, resets, microcontroller clock periods) and fails
  if any of them never happened.

Exhaustive testing is out of reach: there are 2^96 masks and 2^96 hit
patterns.
