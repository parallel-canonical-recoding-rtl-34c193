// csd_recoder_tb: checks the parallel recoder against the serial table
// model (digits and carries), and checks independently that the digits
// sum to x, that no two adjacent digits are nonzero and that the digit
// count is no larger than the number of ones in x. The default 9-bit
// recoder is checked exhaustively, including x = 478, whose canonical
// form is 1000(-1)000(-1)0; a 16-bit instance (N = 15) is also checked
// exhaustively.
module csd_recoder_tb;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int NA = 8, NB = 15;

  logic       [NA:0]   xa;
  csd_digit_e [NA+1:0] ya;
  logic       [NA+1:0] ca;
  logic       [NB:0]   xb;
  csd_digit_e [NB+1:0] yb;
  logic       [NB+1:0] cb;
  int checks = 0, failures = 0;
  logic clk;

  csd_recoder dut_a (.x(xa), .y(ya), .c(ca));
  csd_recoder #(.N(NB)) dut_b (.x(xb), .y(yb), .c(cb));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned x, input int ndig,
                       input dvec_t y, input logic [MAXD:0] c);
    dvec_t ry;
    logic [MAXD:0] rc;
    ref_recode(x, ndig, ry, rc);
    checks++;
    if (y != ry) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d digits %h expected %h", x, y, ry);
    end
    checks++;
    if (!carries_equal(c, rc, ndig)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d carries %b expected %b", x, c, rc);
    end
    checks++;
    if (digits_value(y, ndig) != longint'(x) || !is_canonical(y, ndig) ||
        weight(y, ndig) > $countones(x)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d value/canonical/weight", x);
    end
  endtask

  initial begin
    // Worked example: 478 -> 1000(-1)000(-1)0, 3 nonzero digits.
    xa = 9'd478;
    @(posedge clk);
    checks++;
    if (ya != {2'b01, 2'b00, 2'b00, 2'b00, 2'b10, 2'b00, 2'b00, 2'b00, 2'b10, 2'b00}) begin
      failures++;
      $display("FAIL 478 -> %b", ya);
    end
    for (int v = 0; v < (1 << (NA + 1)); v++) begin
      xa = (NA + 1)'(v);
      @(posedge clk);
      check(longint'(v), NA + 2, dvec_t'(ya), (MAXD + 1)'(ca));
    end
    for (int v = 0; v < (1 << (NB + 1)); v++) begin
      xb = (NB + 1)'(v);
      @(posedge clk);
      check(longint'(v), NB + 2, dvec_t'(yb), (MAXD + 1)'(cb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
