// digit_encoder: 3-input, 2-output cell that produces one canonical digit.
//
// From Reitwiesner's recoding table, with t = x_i XOR c_i:
//   y_i = +1 when NOT x_{i+1} AND t   (v_i = 1)
//   y_i = -1 when     x_{i+1} AND t   (u_i = 1)
//   y_i =  0 otherwise.
// The output is {u_i, v_i}: 00 = 0, 01 = +1, 10 = -1. One XOR and two AND
// gates, constant depth. Combinational.
module digit_encoder
  import csd_pkg::*;
(
  input  logic       x_ip1,  // x_{i+1}
  input  logic       x_i,    // x_i
  input  logic       c_i,    // recoding carry into position i
  output csd_digit_e y       // digit y_i
);

  logic t;

  always_comb begin
    t = x_i ^ c_i;
    y = csd_digit_e'({x_ip1 & t, ~x_ip1 & t});
  end

endmodule
