// csd_from_sum: constant-depth canonical recoding from s = x + floor(x/2).
//
// Adding a = x and b = floor(x/2) (so b_i = x_{i+1}) has generate
// a_i b_i = x_i x_{i+1} and propagate a_i + b_i = x_i + x_{i+1}: the same
// carries as the canonical recoding. Once the sum is known, each carry is
// recovered from one sum bit, c_i = s_i ^ x_i ^ x_{i+1}, and the digit
// encoders finish the job: two XOR levels plus the encoder, independent
// of N. The carry recovery formula is this design's own derivation of the
// constant-time claim.
//
// Interface: x (N+1 bits) and s (N+2 bits) in; digits y_{N+1}..y_0 and the
// recovered carries c out. Purely combinational. For a consistent s,
// c[0] is always 0, c[N+1] equals s[N+1], and y_N, y_{N+1} are never -1.
module csd_from_sum
  import csd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       [N:0]   x,
  input  logic       [N+1:0] s,
  output csd_digit_e [N+1:0] y,
  output logic       [N+1:0] c
);

  logic [N+2:0] xe;
  assign xe = {2'b00, x};

  always_comb begin
    for (int i = 0; i <= N + 1; i++) c[i] = s[i] ^ xe[i] ^ xe[i+1];
  end

  for (genvar i = 0; i <= N + 1; i++) begin : g_digit
    digit_encoder u_dig (.x_ip1(xe[i+1]), .x_i(xe[i]), .c_i(c[i]), .y(y[i]));
  end

endmodule
