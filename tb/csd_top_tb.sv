// csd_top_tb: end-to-end test of both recoders at the default size
// (9-bit inputs, 10 digits), with no parameter overrides.
//
// Every 9-bit value is driven into the prefix recoder (port group a) and,
// in a different order (x_b = v XOR 9'h0A5), into the adder-based recoder
// (port group b). Each output is compared with the serial table model, the
// digit value with x, and both paths with each other on the same number.
// The test also counts, over all positions, how often each of the eight
// rows of the recoding table was exercised, how often the extra top digit
// y_{N+1} was produced, how often a carry travelled from position 0 all
// the way to the top of the prefix network, and how often recoding reduced
// the number of nonzero digits; each of these must occur at least once.
module csd_top_tb;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int N = 8;          // csd_top default
  localparam int ND = N + 2;     // digits

  logic       [N:0]   x_a, x_b;
  csd_digit_e [N+1:0] y_a, y_b;
  logic       [N+1:0] c_a, s_b;
  int checks = 0, failures = 0;
  int row_seen [8];
  int top_digit = 0, full_chain = 0, reduced = 0;
  logic clk;

  csd_top dut (.x_a(x_a), .y_a(y_a), .c_a(c_a), .x_b(x_b), .s_b(s_b), .y_b(y_b));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_digits(input string name, input int unsigned x, input dvec_t y);
    dvec_t ry;
    logic [MAXD:0] rc;
    ref_recode(longint'(x), ND, ry, rc);
    checks++;
    if (y != ry || digits_value(y, ND) != longint'(x) || !is_canonical(y, ND)) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d digits %h expected %h", name, x, y, ry);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) row_seen[i] = 0;
    for (int v = 0; v < (1 << (N + 1)); v++) begin
      logic [N+2:0] xe;
      x_a = (N + 1)'(v);
      x_b = (N + 1)'(v) ^ 9'h0A5;
      @(posedge clk);
      check_digits("a", v, dvec_t'(y_a));
      check_digits("b", int'(x_b), dvec_t'(y_b));
      checks++;
      if (s_b != (N + 2)'(int'(x_b) + int'(x_b) / 2)) begin
        failures++;
        if (failures < 10) $display("FAIL b sum x=%0d s=%0d", x_b, s_b);
      end
      #1;
      // same number on both paths must give the same digits
      x_b = x_a;
      #1;
      checks++;
      if (y_a != y_b) begin
        failures++;
        if (failures < 10) $display("FAIL paths differ for x=%0d", x_a);
      end
      // mechanism coverage on path a
      xe = {2'b00, x_a};
      for (int i = 0; i <= N + 1; i++) row_seen[{xe[i+1], xe[i], c_a[i]}]++;
      if (y_a[N+1] != CSD_ZERO) top_digit++;
      if (x_a[0] && x_a[1] && c_a[N]) begin
        automatic bit all = 1'b1;
        for (int i = 1; i <= N; i++) all &= c_a[i];
        if (all) full_chain++;
      end
      if (weight(dvec_t'(y_a), ND) < $countones(x_a)) reduced++;
    end
    for (int i = 0; i < 8; i++) begin
      $display("table row %b exercised %0d times", 3'(i), row_seen[i]);
      checks++;
      if (row_seen[i] == 0) failures++;
    end
    $display("extra top digit %0d, full-length carry chain %0d, weight reduced %0d",
             top_digit, full_chain, reduced);
    checks++;
    if (top_digit == 0 || full_chain == 0 || reduced == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
