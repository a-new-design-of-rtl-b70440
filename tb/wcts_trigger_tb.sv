// wcts_trigger_tb: drives random bursts of activity (lengths 1..20 cycles,
// gaps 1..20 cycles) into the WCTS trigger and checks every cycle against a
// model: trig must be high exactly in the cycle after active is first
// sampled high, one cycle wide, however long the burst lasts. Activity held
// across reset release must not fire. Counts that one pulse came per burst.
`timescale 1ns/1ps
module wcts_trigger_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic active = 1'b1;
  logic trig;
  int   checks = 0, failures = 0;
  int   pulses = 0, bursts = 0;
  logic prev;
  bit   expect_trig;

  always #10 clk = ~clk;

  wcts_trigger dut (.clk, .rst_n, .active, .trig);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the previous sampled value of active, starting "high" so a
  // hit present at reset release does not count as new.
  always @(posedge clk) begin
    if (!rst_n) begin
      prev        <= 1'b1;
      expect_trig <= 1'b0;
    end else begin
      expect_trig <= active && !prev;
      prev        <= active;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(trig == expect_trig, "trig matches model");
    if (trig) pulses++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(pulses == 0, "no pulse for activity present at reset");
    active = 1'b0;
    for (int b = 0; b < 300; b++) begin
      repeat (1 + $urandom % 20) @(negedge clk);
      active = 1'b1;
      bursts++;
      repeat (1 + $urandom % 20) @(negedge clk);
      active = 1'b0;
    end
    repeat (3) @(negedge clk);
    check(pulses == bursts, "one pulse per burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
