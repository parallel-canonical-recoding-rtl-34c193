// digit_encoder_tb: checks the digit cell against all eight rows of the
// recoding table (reference in csd_ref_pkg).
module digit_encoder_tb;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  logic x_ip1, x_i, c_i;
  csd_digit_e y;
  int checks = 0, failures = 0;
  logic clk;

  digit_encoder dut (.x_ip1(x_ip1), .x_i(x_i), .c_i(c_i), .y(y));

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
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_y;
      logic cn;
      {x_ip1, x_i, c_i} = 3'(v);
      table_row(3'(v), exp_y, cn);
      @(posedge clk);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL row %b: y=%b expected %b", 3'(v), y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
