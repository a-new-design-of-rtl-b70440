// hit_reset_tb: checks the hit-bit reset generator at its default timing
// (delay 10 cycles, width 5 cycles) and at a short setting (delay 1, width
// 1). The hit input is modelled as a latch set by a hit and cleared by the
// reset pulse. For each hit the testbench measures, in clock cycles, when
// the pulse starts and how long it lasts, and compares them with the
// programmed delay and width. It also checks that a second hit during the
// delay gives no extra pulse and that a hit the pulse fails to clear gives
// a second pulse.
`timescale 1ns/1ps
module hit_reset_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hit_a = 1'b0, hit_b = 1'b0;
  logic pulse_a, pulse_b;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hit_reset dut_a (.clk, .rst_n, .hit(hit_a), .rst_pulse(pulse_a));
  hit_reset #(.DELAY(1), .WIDTH(1)) dut_b (.clk, .rst_n, .hit(hit_b), .rst_pulse(pulse_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One hit on channel a or b: raise the latch, wait for the pulse, let the
  // pulse clear the latch (unless held), and measure the pulse.
  task automatic one_hit(input bit use_b, input int delay, input int width,
                         input bit extra_hit, output int start, output int len);
    int t0;
    bit seen;
    @(negedge clk);
    if (use_b) hit_b = 1'b1; else hit_a = 1'b1;
    t0    = cyc + 1;
    start = -1;
    len   = 0;
    seen  = 1'b0;
    for (int k = 0; k < delay + width + 30; k++) begin
      @(negedge clk);
      if ((use_b ? pulse_b : pulse_a)) begin
        if (!seen) start = cyc - t0;
        seen = 1'b1;
        len++;
        if (use_b) hit_b = 1'b0; else hit_a = 1'b0;   // latch cleared
      end
      // a short hit that ends and comes back while the delay runs must
      // still give a single pulse at the original time
      if (extra_hit && !use_b && k == 1) hit_a = 1'b0;
      if (extra_hit && !use_b && k == delay / 2) hit_a = 1'b1;
    end
  endtask

  initial begin
    int start, len;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!pulse_a && !pulse_b, "no pulse without a hit");

    for (int i = 0; i < 20; i++) begin
      one_hit(1'b0, 10, 5, i[0], start, len);
      check(start == 10, $sformatf("default delay: pulse after %0d cycles", start));
      check(len == 5, $sformatf("default width: %0d cycles", len));
      one_hit(1'b1, 1, 1, 1'b0, start, len);
      check(start == 1, $sformatf("short delay: pulse after %0d cycles", start));
      check(len == 1, $sformatf("short width: %0d cycles", len));
      repeat ($urandom % 7) @(negedge clk);
    end

    // A hit that stays set after the pulse is detected again.
    begin
      automatic int pulses = 0;
      automatic bit prev = 1'b0;
      @(negedge clk) hit_a = 1'b1;
      for (int k = 0; k < 2 * (10 + 5) + 4; k++) begin
        @(negedge clk);
        if (pulse_a && !prev) pulses++;
        prev = pulse_a;
      end
      hit_a = 1'b0;
      check(pulses == 2, $sformatf("held hit gives repeated pulses (%0d)", pulses));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
