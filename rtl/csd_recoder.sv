// csd_recoder: parallel canonical signed-digit recoder.
//
// Recodes the unsigned number x = x_N..x_0 into canonical signed digits
// y_{N+1}..y_0 (digits -1/0/+1, no two adjacent nonzero), the unique
// minimum-weight signed-digit form of x. Reitwiesner's serial method scans
// x from the LSB with a carry c_i (c_0 = 0); its carry obeys
// c_{i+1} = g_i + c_i p_i with g_i = x_i x_{i+1}, p_i = x_i + x_{i+1}, which
// is carry look-ahead with different g and p. So the circuit is three rows:
//   1. gp_cell:        Q_i = (g_i, p_i) for i = 0..N-1     (1 gate delay)
//   2. lf_prefix:      R_i = Q_i . ... . Q_0, c_{i+1} = g(R_i) (2 log2 N)
//   3. digit_encoder:  y_i from x_{i+1}, x_i, c_i for i = 0..N  (constant)
// For the default N = 8 this is the 9-bit recoder with an 8-input, 12-node,
// 3-level prefix network.
//
// This design's own addition: when x_N = 1 and c_N = 1 the recoding
// continues into position N+1 (carry c_{N+1} = x_N c_N), so one more digit,
// y_{N+1} = +1 exactly when c_{N+1} = 1, is produced. With it the output
// equals x for every input; without it x_N would have to be the padding 0.
// Bits above x_N are taken as 0.
//
// Interface: x in, y (packed array of 2-bit digits, y[i] = y_i) and the
// carry vector c (c[i] = c_i) out. Purely combinational, no clock.
// Some output bits are constant by construction and kept only so that all
// positions share one format: c[0] is 0, and y_N and y_{N+1} can never be
// -1 because the bits above x_N are 0.
module csd_recoder
  import csd_pkg::*;
#(
  parameter int unsigned N = 8   // prefix inputs; x has N+1 bits
) (
  input  logic       [N:0]   x,
  output csd_digit_e [N+1:0] y,
  output logic       [N+1:0] c
);

  logic [N+2:0] xe;               // x padded with zeros above the MSB
  gp_t  [N-1:0] q;
  gp_t  [N-1:0] r;

  assign xe = {2'b00, x};

  for (genvar i = 0; i < N; i++) begin : g_gp
    gp_cell u_gp (.x_i(xe[i]), .x_ip1(xe[i+1]), .q(q[i]));
  end

  lf_prefix #(.N(N)) u_prefix (.q(q), .r(r));

  assign c[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_carry
    assign c[i+1] = r[i].g;
  end
  assign c[N+1] = xe[N] & c[N];

  for (genvar i = 0; i <= N + 1; i++) begin : g_digit
    digit_encoder u_dig (.x_ip1(xe[i+1]), .x_i(xe[i]), .c_i(c[i]), .y(y[i]));
  end

endmodule
