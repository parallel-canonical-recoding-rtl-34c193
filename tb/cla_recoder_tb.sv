// cla_recoder_tb: checks the adder-based recoder for every 9-bit input:
// the sum output against x + floor(x/2), the digits against the serial
// table model, and the value and canonical form of the digits.
module cla_recoder_tb;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int N = 8;

  logic       [N:0]   x;
  logic       [N+1:0] s;
  csd_digit_e [N+1:0] y;
  int checks = 0, failures = 0;
  logic clk;

  cla_recoder dut (.x(x), .s(s), .y(y));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (N + 1)); v++) begin
      dvec_t ry;
      logic [MAXD:0] rc;
      x = (N + 1)'(v);
      @(posedge clk);
      ref_recode(longint'(v), N + 2, ry, rc);
      checks++;
      if (s != (N + 2)'(v + v / 2)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d sum %0d", v, s);
      end
      checks++;
      if (dvec_t'(y) != ry || digits_value(dvec_t'(y), N + 2) != longint'(v) ||
          !is_canonical(dvec_t'(y), N + 2)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d digits %b", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
