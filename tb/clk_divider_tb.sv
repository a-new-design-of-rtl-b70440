// clk_divider_tb: checks the clock divider at the default division of ten
// (50 MHz to 5 MHz) and at an odd division of seven. After reset the output
// must be high for the first floor(DIV/2) cycles of every DIV-cycle period
// and low for the rest; the period between rising edges of the output is
// measured and must be exactly DIV input cycles (200 ns at DIV = 10).
`timescale 1ns/1ps
module clk_divider_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic out10, out7;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  clk_divider dut10 (.clk, .rst_n, .clk_out(out10));
  clk_divider #(.DIV(7)) dut7 (.clk, .rst_n, .clk_out(out7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   n;
    real  t_rise, t_prev;
    int   rises;
    repeat (3) @(posedge clk);
    #1 check(out10 == 1'b0 && out7 == 1'b0, "outputs low in reset");
    @(negedge clk) rst_n = 1'b1;
    rises = 0;
    t_prev = 0.0;
    for (n = 0; n < 200; n++) begin
      @(posedge clk);
      #1;
      check(out10 == ((n % 10) < 5), $sformatf("div10 cycle %0d", n));
      check(out7  == ((n % 7)  < 3), $sformatf("div7 cycle %0d", n));
      if (n % 10 == 0) begin
        t_rise = $realtime;
        if (rises > 0) check(t_rise - t_prev == 200.0, "div10 period 200 ns");
        t_prev = t_rise;
        rises++;
      end
    end
    check(rises == 20, "twenty output periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
