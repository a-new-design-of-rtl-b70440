// pic_port_rx_tb: checks the microcontroller port receiver. The strobe is
// driven high and low for random times (at least two clocks each) with
// random address and data held steady while it is high, and the data lines
// are changed while it is low. Each strobe must give exactly one one-cycle
// write carrying its address and data, on the third clock edge after the
// strobe rises (the edge that first samples it counts as the first);
// nothing else may produce a write.
`timescale 1ns/1ps
module pic_port_rx_tb;
  import scc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              port_wr = 1'b0;
  port_addr_t        port_addr = '0;
  logic [AREA_W-1:0] port_data = '0;
  port_write_t       wr;
  int                cyc = 0;
  int                checks = 0, failures = 0;
  int                writes = 0;
  // expected write: cycle, address, data
  int                exp_cyc = -1;
  port_addr_t        exp_addr;
  logic [7:0]        exp_data;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pic_port_rx dut (.clk, .rst_n, .port_wr, .port_addr, .port_data, .wr);

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

  always @(negedge clk) if (rst_n) begin
    if (cyc == exp_cyc) begin
      check(wr.valid, "write appears at the third edge after the strobe rises");
      check(wr.addr == exp_addr && wr.data == exp_data, "write carries address and data");
    end else begin
      check(!wr.valid, "no write outside a strobe");
    end
    if (wr.valid) writes++;
  end

  initial begin
    automatic int strobes = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      // bus noise while the strobe is low
      repeat (2 + $urandom % 6) begin
        @(negedge clk);
        port_addr = port_addr_t'($urandom);
        port_data = 8'($urandom);
      end
      @(negedge clk);
      port_addr = port_addr_t'($urandom);
      port_data = 8'($urandom);
      port_wr   = 1'b1;
      exp_addr  = port_addr;
      exp_data  = port_data;
      exp_cyc   = cyc + 3;   // sampled at edge cyc+1, write after edge cyc+3
      strobes++;
      repeat (2 + $urandom % 6) @(negedge clk);
      port_wr = 1'b0;
    end
    repeat (8) @(negedge clk);
    check(writes == strobes, $sformatf("%0d writes for %0d strobes", writes, strobes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
