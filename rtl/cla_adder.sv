// cla_adder: parallel-prefix carry look-ahead adder, s = a + b.
//
// Generate g_i = a_i b_i and propagate p_i = a_i + b_i feed the same
// lf_prefix network the recoder uses; the carry into bit i+1 is the
// generate half of R_i, with carry in c_0 = 0, and s_i = a_i ^ b_i ^ c_i.
// The OR form of propagate is enough because the carries only need
// g + p c. The structure is this design's choice; an adder of this kind
// is what lets a recoder be built from existing adder hardware.
//
// Interface: a, b in (W bits); s out (W+1 bits, s[W] = carry out) and the
// carry vector c[W:0]. Purely combinational.
module cla_adder
  import csd_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s,
  output logic [W:0]   c
);

  gp_t [W-1:0] q;
  gp_t [W-1:0] r;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      q[i].g = a[i] & b[i];
      q[i].p = a[i] | b[i];
    end
  end

  lf_prefix #(.N(W)) u_prefix (.q(q), .r(r));

  always_comb begin
    c[0] = 1'b0;
    for (int i = 0; i < W; i++) c[i+1] = r[i].g;
    for (int i = 0; i < W; i++) s[i] = a[i] ^ b[i] ^ c[i];
    s[W] = c[W];
  end

endmodule
