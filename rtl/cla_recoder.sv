// cla_recoder: canonical recoder built from a carry look-ahead adder.
//
// The adder forms s = x + floor(x/2); its carries are exactly the
// recoding carries, and csd_from_sum turns x and s into the digits. The
// digits match those of csd_recoder for every x; the point of this form is
// that an existing adder can be reused. The sum is brought out as well.
//
// Interface: x (N+1 bits) in; s (N+2 bits) and y_{N+1}..y_0 out.
// Purely combinational.
module cla_recoder
  import csd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       [N:0]   x,
  output logic       [N+1:0] s,
  output csd_digit_e [N+1:0] y
);

  logic [N+1:0] c_add;   // adder carries (checked against c_rec)
  logic [N+1:0] c_rec;   // carries recovered from the sum

  cla_adder #(.W(N + 1)) u_add (
    .a (x),
    .b ({1'b0, x[N:1]}),
    .s (s),
    .c (c_add)
  );

  csd_from_sum #(.N(N)) u_rec (.x(x), .s(s), .y(y), .c(c_rec));

  // The carries recovered from the sum must be the adder's own carries.
  always_comb begin
    assert (c_rec == c_add)
      else $error("cla_recoder: recovered carries %b differ from adder carries %b", c_rec, c_add);
  end

endmodule
