// lf_prefix: Ladner-Fischer minimum-depth parallel prefix network.
//
// Given the pairs Q_{N-1}..Q_0 it returns every prefix product
//   R_i = Q_i . Q_{i-1} . ... . Q_0,   i = 0..N-1,
// using the associative operator of prefix_node. The network is the
// Ladner-Fischer network P_0(N), defined recursively:
//   P_0(N): P_1 on the low ceil(N/2) inputs, P_0 on the high floor(N/2)
//           inputs, then one node per high output joining it with the last
//           (complete) low output.
//   P_k(N), k >= 1: a row of nodes joins neighbours (Q_{2j+1} . Q_{2j}),
//           P_{k-1} runs on those pairs and gives every odd output, and one
//           node per even output combines its input with the odd output
//           just below.
// P_1 is one level deeper than P_0, but its top output is ready as early,
// which is what lets P_0 use it for the low half and keep depth log2 N.
// For N = 2^d the network has 4N - F(5+d) + 1 nodes (F = Fibonacci): 12
// nodes in 3 levels for the default N = 8, the network of the recoding
// method. Each level costs two gate delays.
//
// The recursion is unrolled by the constant functions of csd_pkg into a
// table: at level t, position i either passes through or is replaced by
// R_i . R_j with j = lf_partner(N, 0, t, i). Each node sits at the first
// level at which both its operands are final. The handling of N that is not
// a power of two (the low half takes the extra input) and the
// as-soon-as-possible placement are this design's own choices. Purely
// combinational.
module lf_prefix
  import csd_pkg::*;
#(
  parameter int unsigned N = 8   // number of input pairs
) (
  input  gp_t [N-1:0] q,   // Q_{N-1}..Q_0
  output gp_t [N-1:0] r    // R_{N-1}..R_0
);

  localparam int D = lf_depth(int'(N), 0);

  // lvl[t] holds the running products after level t.
  gp_t [N-1:0] lvl [D+1];

  assign lvl[0] = q;

  for (genvar t = 1; t <= D; t++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_pos
      localparam int J = lf_partner(int'(N), 0, t, i);
      if (J >= 0) begin : g_node
        prefix_node u_node (
          .hi (lvl[t-1][i]),
          .lo (lvl[t-1][J]),
          .q  (lvl[t][i])
        );
      end else begin : g_wire
        assign lvl[t][i] = lvl[t-1][i];
      end
    end
  end

  assign r = lvl[D];

endmodule
