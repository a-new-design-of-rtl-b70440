// scc_top_tb: end-to-end test of the segment collector FPGA at its default
// parameters (96 hit-bits, twelve mask areas, clock division by ten).
//
// A small model of the microcontroller keeps the twelve mask bytes and the
// gate delay in an "EEPROM" array and writes them to the FPGA through the
// parallel port, holding the strobe for one microcontroller instruction
// (four 5 MHz clocks, 40 FPGA clocks). Hit-bits are modelled as latches
// that the card's hit-bit reset pulse clears.
//
// Sequence:
//  1. reset: the mask must enable every hit-bit (default 8'hFF per area);
//  2. for each polar-angle selection of the existing card - 8..45, 8..90
//     and 8..142 degrees, taken as the first 27, 59 and all 96 hit-bits at
//     about 1.4 degrees each - load the mask area by area and walk a single
//     hit across all 96 positions: seg_or must follow the mask, and every
//     enabled hit must give one WCTS trigger two cycles after the first
//     clock edge that sees it, a gate opening "delay" cycles after that,
//     and a hit-bit reset pulse ten cycles after that which clears it;
//  3. random masks (a single area rewritten at a time) with random groups
//     of several hit-bits, checked the same way;
//  4. the microcontroller clock must have a 200 ns period.
// Each mechanism (area write, gate-delay write, masked-out hit, trigger,
// gate, hit-bit reset, divided clock) is counted; one that never happened
// counts as a failure.
`timescale 1ns/1ps
module scc_top_tb;
  import scc_pkg::*;

  localparam int RESET_DELAY = 10;
  localparam int RESET_WIDTH = 5;
  localparam int GATE_LEN    = 16;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [N_HITS-1:0] hits = '0;
  logic              port_wr = 1'b0;
  port_addr_t        port_addr = '0;
  logic [AREA_W-1:0] port_data = '0;
  logic              pic_clk, seg_or, hit_rst, wcts_gate_o, wcts_trig;

  int cyc = 0;
  int checks = 0, failures = 0;
  int n_area_wr = 0, n_gate_wr = 0, n_masked = 0, n_trig = 0, n_gate = 0,
      n_hrst = 0, n_pic_clk = 0;

  logic [7:0]        eeprom [N_AREAS + 1];   // areas 0..11, gate delay at 12
  logic [N_HITS-1:0] ref_mask;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  scc_top dut (.clk, .rst_n, .hits, .port_wr, .port_addr, .port_data,
               .pic_clk, .seg_or, .hit_rst, .wcts_gate_o, .wcts_trig);

  // hit latches cleared by the card's reset pulse
  always @(posedge clk) if (hit_rst) hits <= '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- microcontroller model ------------------------------------------
  task automatic pic_port_write(input int addr, input logic [7:0] data);
    @(negedge clk);
    port_addr = port_addr_t'(addr);
    port_data = data;
    repeat (2) @(negedge clk);
    port_wr = 1'b1;
    repeat (40) @(negedge clk);
    port_wr = 1'b0;
    repeat (40) @(negedge clk);
    if (addr < int'(N_AREAS)) n_area_wr++;
    else n_gate_wr++;
  endtask

  // "write a single mask to FPGA"
  task automatic write_area(input int a);
    pic_port_write(a, eeprom[a]);
    for (int b = 0; b < 8; b++) ref_mask[a * 8 + b] = eeprom[a][b];
  endtask

  // "write gate"
  task automatic write_gate(input logic [7:0] d);
    eeprom[N_AREAS] = d;
    pic_port_write(N_AREAS, eeprom[N_AREAS]);
  endtask

  // save a 96-bit mask in EEPROM and send all twelve areas
  task automatic load_mask(input logic [N_HITS-1:0] m);
    for (int a = 0; a < int'(N_AREAS); a++) begin
      eeprom[a] = m[a * 8 +: 8];
      write_area(a);
    end
  endtask

  // ---- one hit event ------------------------------------------------------
  // Set the given hit-bits and follow the card's response cycle by cycle.
  task automatic hit_event(input logic [N_HITS-1:0] h);
    int  e1, t_trig, t_gate, t_rst, gate_len, rst_len, ntrig;
    bit  enabled, pg, pr;
    int  d;
    d = int'(eeprom[N_AREAS]);
    enabled = |(h & ref_mask);
    @(negedge clk);
    hits = h;
    #1 check(seg_or == enabled, "seg_or follows hits and mask");
    if (!enabled) n_masked++;
    e1 = cyc + 1;
    t_trig = -1; t_gate = -1; t_rst = -1;
    gate_len = 0; rst_len = 0; ntrig = 0; pg = 0; pr = 0;
    for (int k = 0; k < d + GATE_LEN + RESET_DELAY + RESET_WIDTH + 20; k++) begin
      @(negedge clk);
      if (wcts_trig) begin
        ntrig++;
        if (t_trig < 0) t_trig = cyc - e1;
      end
      if (wcts_gate_o) begin
        gate_len++;
        if (!pg) t_gate = cyc - e1;
      end
      if (hit_rst) begin
        rst_len++;
        if (!pr) t_rst = cyc - e1;
      end
      pg = wcts_gate_o;
      pr = hit_rst;
    end
    if (enabled) begin
      check(ntrig == 1 && t_trig == 2, $sformatf("trigger once at +2 (n=%0d t=%0d)", ntrig, t_trig));
      check(t_gate == 2 + d && gate_len == GATE_LEN,
            $sformatf("gate at +%0d for %0d (got +%0d for %0d)", 2 + d, GATE_LEN, t_gate, gate_len));
      check(t_rst == 2 + RESET_DELAY && rst_len == RESET_WIDTH,
            $sformatf("hit reset at +%0d (got +%0d for %0d)", 2 + RESET_DELAY, t_rst, rst_len));
      check(hits == '0 && !seg_or, "hit latches cleared by the reset pulse");
      n_trig += ntrig;
      if (gate_len > 0) n_gate++;
      if (rst_len > 0) n_hrst++;
    end else begin
      check(ntrig == 0 && gate_len == 0 && rst_len == 0, "masked hit gives no response");
      @(negedge clk) hits = '0;
    end
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [N_HITS-1:0] first_bits(input int n);
    logic [N_HITS-1:0] m = '0;
    for (int i = 0; i < n; i++) m[i] = 1'b1;
    return m;
  endfunction

  // ---- microcontroller clock --------------------------------------------
  real t_last = 0.0;
  always @(posedge pic_clk) begin
    if (n_pic_clk > 0) check($realtime - t_last == 200.0, "pic_clk period 200 ns");
    t_last = $realtime;
    n_pic_clk++;
  end

  initial begin
    automatic int ranges [3] = '{27, 59, 96};
    for (int a = 0; a <= int'(N_AREAS); a++) eeprom[a] = (a < int'(N_AREAS)) ? 8'hFF : 8'h00;
    ref_mask = '1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4) @(negedge clk);

    // 1. default mask after reset, gate delay zero
    hit_event(N_HITS'(1) << 0);
    hit_event(N_HITS'(1) << 95);

    // 2. polar-angle selections, single hits walked across the card
    foreach (ranges[r]) begin
      write_gate(8'(3 + 7 * r));
      load_mask(first_bits(ranges[r]));
      for (int i = 0; i < int'(N_HITS); i++) hit_event(N_HITS'(1) << i);
    end

    // 3. random masks and groups of hits
    write_gate(8'd0);
    for (int k = 0; k < 60; k++) begin
      logic [N_HITS-1:0] h;
      if (k % 10 == 5) write_gate(8'($urandom % 40));
      eeprom[$urandom % N_AREAS] = 8'($urandom);
      write_area(k % N_AREAS);
      h = '0;
      repeat (1 + $urandom % 4) h[$urandom % N_HITS] = 1'b1;
      hit_event(h);
    end

    // 4. mechanisms
    check(n_area_wr > 0, "mask area writes happened");
    check(n_gate_wr > 0, "gate delay writes happened");
    check(n_masked > 0, "masked-out hits happened");
    check(n_trig > 0, "WCTS triggers happened");
    check(n_gate > 0, "WCTS gates happened");
    check(n_hrst > 0, "hit-bit resets happened");
    check(n_pic_clk > 100, "microcontroller clock ran");
    $display("mechanisms: area writes %0d, gate writes %0d, masked hits %0d, triggers %0d, gates %0d, hit resets %0d, pic_clk periods %0d",
             n_area_wr, n_gate_wr, n_masked, n_trig, n_gate, n_hrst, n_pic_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
