// hit_or_tb: checks the masked segment OR. Directed cases walk a single hit
// across all 96 positions with the mask bit on and off, then random hit and
// mask patterns (sparse and dense) are compared with a bit-by-bit loop that
// looks for any position where both the hit and its mask bit are set.
`timescale 1ns/1ps
module hit_or_tb;

  localparam int N = 96;

  logic [N-1:0] hits, mask;
  logic         out;
  int           checks = 0, failures = 0;

  hit_or dut (.hits, .mask, .out);

  function automatic bit model(input logic [N-1:0] h, input logic [N-1:0] m);
    for (int i = 0; i < N; i++) if (h[i] && m[i]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [N-1:0] rand_vec(input int density);  // percent
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (($urandom % 100) < density);
    return v;
  endfunction

  task automatic apply(input logic [N-1:0] h, input logic [N-1:0] m);
    hits = h;
    mask = m;
    #1;
    checks++;
    if (out !== model(h, m)) begin
      failures++;
      $display("FAIL hits=%h mask=%h out=%b", h, m, out);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '1);
    apply('1, '0);
    for (int i = 0; i < N; i++) begin
      apply(N'(1) << i, '1);
      apply(N'(1) << i, ~(N'(1) << i));
      apply('1, N'(1) << i);
    end
    for (int k = 0; k < 2000; k++) begin
      apply(rand_vec(2), rand_vec(50));
      apply(rand_vec(50), rand_vec(3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
