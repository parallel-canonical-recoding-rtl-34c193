// csd_from_sum_tb: drives x together with s = x + floor(x/2) computed in
// the testbench and checks the digits and recovered carries against the
// serial table model, for every 9-bit x and every 14-bit x (N = 13).
module csd_from_sum_tb;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int NA = 8, NB = 13;

  logic       [NA:0]   xa;
  logic       [NA+1:0] sa;
  csd_digit_e [NA+1:0] ya;
  logic       [NA+1:0] ca;
  logic       [NB:0]   xb;
  logic       [NB+1:0] sb;
  csd_digit_e [NB+1:0] yb;
  logic       [NB+1:0] cb;
  int checks = 0, failures = 0;
  logic clk;

  csd_from_sum dut_a (.x(xa), .s(sa), .y(ya), .c(ca));
  csd_from_sum #(.N(NB)) dut_b (.x(xb), .s(sb), .y(yb), .c(cb));

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
    if (y != ry || !carries_equal(c, rc, ndig)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d digits %h expected %h", x, y, ry);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (NA + 1)); v++) begin
      xa = (NA + 1)'(v);
      sa = (NA + 2)'(v + v / 2);
      @(posedge clk);
      check(longint'(v), NA + 2, dvec_t'(ya), (MAXD + 1)'(ca));
    end
    for (int v = 0; v < (1 << (NB + 1)); v++) begin
      xb = (NB + 1)'(v);
      sb = (NB + 2)'(v + v / 2);
      @(posedge clk);
      check(longint'(v), NB + 2, dvec_t'(yb), (MAXD + 1)'(cb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
