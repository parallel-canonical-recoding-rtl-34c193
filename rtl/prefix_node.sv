// prefix_node: one node of the parallel prefix network.
//
// Computes (g_hi, p_hi) . (g_lo, p_lo) = (g_hi + p_hi g_lo, p_hi p_lo):
// two AND gates and one OR gate, two gate delays. "hi" is the pair covering
// the more significant bit positions, "lo" the adjacent less significant
// span. Purely combinational.
module prefix_node
  import csd_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t q
);

  always_comb begin
    q.g = hi.g | (hi.p & lo.g);
    q.p = hi.p & lo.p;
  end

endmodule
