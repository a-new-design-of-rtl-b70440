// mask_creator_tb: checks the full mask creator. After reset every area
// must read 8'hFF (all 96 hit-bits enabled). Then random writes, including
// writes to the gate address and unused addresses 13..15 and cycles with
// valid low, are applied and the 96-bit mask is compared each cycle with a
// reference kept as twelve separate bytes. Finally all twelve areas are
// loaded in order, as a mass load would, and the whole value is checked.
`timescale 1ns/1ps
module mask_creator_tb;
  import scc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  port_write_t       wr;
  logic [N_HITS-1:0] mask;
  logic [7:0]        ref_area [N_AREAS];
  int                checks = 0, failures = 0;

  always #10 clk = ~clk;

  mask_creator dut (.clk, .rst_n, .wr, .mask);

  task automatic check_mask(input string what);
    checks++;
    for (int a = 0; a < int'(N_AREAS); a++) begin
      for (int b = 0; b < 8; b++) begin
        if (mask[a * 8 + b] !== ref_area[a][b]) begin
          failures++;
          $display("FAIL %s: area %0d bit %0d is %b at %0t", what, a, b, mask[a*8+b], $time);
          return;
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0;
    for (int a = 0; a < int'(N_AREAS); a++) ref_area[a] = 8'hFF;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check_mask("reset value");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      wr.valid = ($urandom % 4) != 0;
      wr.addr  = port_addr_t'($urandom);
      wr.data  = 8'($urandom);
      @(posedge clk);
      if (wr.valid && int'(wr.addr) < int'(N_AREAS)) ref_area[wr.addr] = wr.data;
      #1 check_mask($sformatf("random write %0d", k));
    end
    for (int a = 0; a < int'(N_AREAS); a++) begin
      @(negedge clk);
      wr.valid = 1'b1;
      wr.addr  = port_addr_t'(a);
      wr.data  = 8'(8'h11 * (a + 1));
      ref_area[a] = wr.data;
    end
    @(negedge clk) wr = '0;
    check_mask("mass load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
