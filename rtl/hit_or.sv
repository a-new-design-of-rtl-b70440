// hit_or: the segment OR. Each hit-bit is ANDed with its mask bit and the
// 96 results are reduced to one bit by a single OR, as the design
// description specifies: the output is high whenever any enabled hit-bit is
// set.
//
// Purely combinational: out follows hits and mask after gate delay only, so
// the segment bit reaches the trigger without waiting for a clock.
module hit_or #(
  parameter int unsigned N = scc_pkg::N_HITS
) (
  input  logic [N-1:0] hits,
  input  logic [N-1:0] mask,
  output logic         out
);

  always_comb out = |(hits & mask);

endmodule
