// csd_pkg: types and helper functions shared by the canonical signed-digit
// (CSD) recoders.
//
// A canonical signed-digit number uses digits {-1, 0, +1} with no two
// adjacent nonzero digits. Each digit is carried on two wires {u, v}:
// 00 = 0, 01 = +1, 10 = -1 (11 never occurs). This encoding is the one the
// recoding method defines; the enum names are this design's own.
//
// gp_t is the (generate, propagate) pair that flows through the parallel
// prefix network. The operator on pairs,
//   (g1, p1) . (g2, p2) = (g1 + p1 g2, p1 p2),
// is associative, so the recoding carries can be found with any prefix
// network, exactly like the carries of a carry look-ahead adder.
package csd_pkg;

  typedef enum logic [1:0] {
    CSD_ZERO = 2'b00,
    CSD_POS  = 2'b01,
    CSD_NEG  = 2'b10
  } csd_digit_e;

  typedef struct packed {
    logic g;   // generate
    logic p;   // propagate
  } gp_t;

  // The prefix operator, for reference models and assertions.
  function automatic gp_t gp_dot(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // The Ladner-Fischer prefix network P_k(n), described level by level.
  // Every node updates one position in place, R[i] <= R[i] . R[j]; the
  // family is defined recursively (see lf_prefix):
  //   P_0(n): P_1 on the low ceil(n/2) positions, P_0 on the rest, then a
  //           join node on every high position with partner ceil(n/2)-1.
  //   P_k(n), k >= 1: pair nodes (2j+1 with 2j), P_{k-1} on the odd
  //           positions, then fix nodes (2j with 2j-1) on the even ones.
  // Each node is placed at the first level at which both operands are
  // final. lf_ready gives the level at which position i becomes final
  // (0: it is an input), lf_partner the partner of position i at level t
  // (-1: no node there).
  function automatic int lf_ready(int n, int k, int i);
    int r_lo, r_hi;
    if (n <= 1) return 0;
    if (n == 2) return (i == 1) ? 1 : 0;
    if (k == 0) begin
      if (i < (n + 1) / 2) return lf_ready((n + 1) / 2, 1, i);
      r_lo = lf_ready((n + 1) / 2, 1, (n + 1) / 2 - 1);
      r_hi = lf_ready(n / 2, 0, i - (n + 1) / 2);
      return ((r_lo > r_hi) ? r_lo : r_hi) + 1;
    end
    if (i == 0) return 0;
    if (i % 2 == 1) return 1 + lf_ready(n / 2, k - 1, (i - 1) / 2);
    return lf_ready(n, k, i - 1) + 1;
  endfunction

  function automatic int lf_partner(int n, int k, int t, int i);
    int p;
    if (n <= 1) return -1;
    if (n == 2) return (t == 1 && i == 1) ? 0 : -1;
    if (k == 0) begin
      if (i < (n + 1) / 2) return lf_partner((n + 1) / 2, 1, t, i);
      if (t == lf_ready(n, 0, i)) return (n + 1) / 2 - 1;
      p = lf_partner(n / 2, 0, t, i - (n + 1) / 2);
      return (p < 0) ? -1 : p + (n + 1) / 2;
    end
    if (i == 0) return -1;
    if (i % 2 == 1) begin
      if (t == 1) return i - 1;
      p = lf_partner(n / 2, k - 1, t - 1, (i - 1) / 2);
      return (p < 0) ? -1 : 2 * p + 1;
    end
    return (t == lf_ready(n, k, i)) ? i - 1 : -1;
  endfunction

  // Number of levels of P_k(n).
  function automatic int lf_depth(int n, int k);
    int d = 0;
    for (int i = 0; i < n; i++)
      if (lf_ready(n, k, i) > d) d = lf_ready(n, k, i);
    return d;
  endfunction

  // Number of nodes of P_k(n), from the recursion itself.
  function automatic int lf_nodes(int n, int k);
    if (n <= 1) return 0;
    if (n == 2) return 1;
    if (k == 0) return lf_nodes((n + 1) / 2, 1) + lf_nodes(n / 2, 0) + n / 2;
    return (n / 2) + lf_nodes(n / 2, k - 1) + (n - 1) / 2;
  endfunction

endpackage
