// gp_cell_tb: exhaustive check of the generate/propagate cell against the
// recoding carry rule: g = both bits set, p = at least one set.
module gp_cell_tb;
  import csd_pkg::*;

  logic x_i, x_ip1;
  gp_t  q;
  int checks = 0, failures = 0;
  logic clk;

  gp_cell dut (.x_i(x_i), .x_ip1(x_ip1), .q(q));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x_ip1, x_i} = 2'(v);
      @(posedge clk);
      checks++;
      if (q.g !== (v == 3) || q.p !== (v != 0)) begin
        failures++;
        $display("FAIL x_ip1=%b x_i=%b g=%b p=%b", x_ip1, x_i, q.g, q.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
