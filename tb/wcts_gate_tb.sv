// wcts_gate_tb: checks the WCTS gate. For a range of delay values loaded
// through the load port (0, 1, small, random and the largest, 255) it raises
// activity and measures, in clock cycles, when the gate opens and how long
// it stays open: the gate must open "delay" cycles after activity is first
// sampled and stay open GATE_LEN cycles (16 by default, 3 in a second
// instance). It also checks that activity held past the gate gives no second
// gate, that a new burst after activity has gone low does, and that the delay
// resets to zero.
`timescale 1ns/1ps
module wcts_gate_tb;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       load = 1'b0;
  logic [7:0] load_value = '0;
  logic       active = 1'b0;
  logic       gate16, gate3;
  int         cyc = 0;
  int         checks = 0, failures = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  wcts_gate dut16 (.clk, .rst_n, .load, .load_value, .active, .gate(gate16));
  wcts_gate #(.GATE_LEN(3)) dut3 (.clk, .rst_n, .load, .load_value, .active, .gate(gate3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_delay(input logic [7:0] d);
    @(negedge clk);
    load = 1'b1;
    load_value = d;
    @(negedge clk);
    load = 1'b0;
    load_value = 8'($urandom);   // must not matter while load is low
  endtask

  // Raise activity for hold cycles and measure both gates.
  task automatic burst(input int d, input int hold);
    int t0, s16, s3, n16, n3, opens16;
    bit p16;
    @(negedge clk);
    active = 1'b1;
    t0 = cyc + 1;
    s16 = -1; s3 = -1; n16 = 0; n3 = 0; opens16 = 0; p16 = 1'b0;
    for (int k = 0; k < d + 16 + hold + 10; k++) begin
      @(negedge clk);
      if (k == hold) active = 1'b0;
      if (gate16) begin
        if (s16 < 0) s16 = cyc - t0;
        n16++;
      end
      if (gate16 && !p16) opens16++;
      p16 = gate16;
      if (gate3) begin
        if (s3 < 0) s3 = cyc - t0;
        n3++;
      end
    end
    check(s16 == d, $sformatf("delay %0d: gate opened after %0d", d, s16));
    check(n16 == 16, $sformatf("delay %0d: gate length %0d", d, n16));
    check(s3 == d, $sformatf("delay %0d: short gate opened after %0d", d, s3));
    check(n3 == 3, $sformatf("delay %0d: short gate length %0d", d, n3));
    check(opens16 == 1, "one gate per burst");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // delay resets to zero
    burst(0, 2);
    for (int i = 0; i < 6; i++) begin
      int d;
      d = (i == 0) ? 0 : (i == 1) ? 1 : (i == 2) ? 2 : (i == 3) ? 5 : (i == 4) ? 17 : 255;
      set_delay(8'(d));
      burst(d, 1);          // short burst
      burst(d, d + 40);     // activity held past the end of the gate
    end
    for (int i = 0; i < 15; i++) begin
      int d;
      d = $urandom % 64;
      set_delay(8'(d));
      burst(d, $urandom % 80);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
