// gp_cell: generate/propagate cell of the canonical recoder (the first row
// of the recoding circuit).
//
// The recoding carry obeys c_{i+1} = x_i x_{i+1} + c_i (x_i + x_{i+1}), i.e.
// c_{i+1} = g_i + c_i p_i with g_i = x_i AND x_{i+1} and p_i = x_i OR x_{i+1}.
// Unlike an adder, both terms come from two neighbouring bits of the same
// operand. One AND and one OR gate, purely combinational, one gate delay.
module gp_cell
  import csd_pkg::*;
(
  input  logic x_i,    // bit i of x
  input  logic x_ip1,  // bit i+1 of x
  output gp_t  q       // Q_i = (g_i, p_i)
);

  always_comb begin
    q.g = x_i & x_ip1;
    q.p = x_i | x_ip1;
  end

endmodule
