// csd_top: the two canonical signed-digit recoders side by side.
//
// Port group "a" is the parallel-prefix recoder (csd_recoder): g/p cells,
// a log-depth prefix network for the recoding carries and a row of digit
// encoders. Port group "b" is the adder-based form (cla_recoder): a carry
// look-ahead adder forms x + floor(x/2), from which the digits follow in
// constant depth. Both give the unique canonical form of their input, with
// N+2 digits for an (N+1)-bit unsigned number (default N = 8: 9-bit input,
// 10 digits). Digits use the 2-bit code 00 = 0, 01 = +1, 10 = -1.
//
// Both paths are purely combinational; there is no clock or reset.
module csd_top
  import csd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       [N:0]   x_a,
  output csd_digit_e [N+1:0] y_a,
  output logic       [N+1:0] c_a,
  input  logic       [N:0]   x_b,
  output logic       [N+1:0] s_b,
  output csd_digit_e [N+1:0] y_b
);

  csd_recoder #(.N(N)) u_prefix_recoder (.x(x_a), .y(y_a), .c(c_a));

  cla_recoder #(.N(N)) u_adder_recoder (.x(x_b), .s(s_b), .y(y_b));

endmodule
