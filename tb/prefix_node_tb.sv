// prefix_node_tb: exhaustive check of the prefix operator
// (g1,p1).(g2,p2) = (g1 + p1 g2, p1 p2), plus associativity of the node
// over all triples, built from three instances.
module prefix_node_tb;
  import csd_pkg::*;

  gp_t a, b, c3, ab, abc, bc, a_bc;
  int checks = 0, failures = 0;
  logic clk;

  prefix_node u_ab   (.hi(a),  .lo(b),  .q(ab));
  prefix_node u_ab_c (.hi(ab), .lo(c3), .q(abc));
  prefix_node u_bc   (.hi(b),  .lo(c3), .q(bc));
  prefix_node u_a_bc (.hi(a),  .lo(bc), .q(a_bc));

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
    for (int v = 0; v < 64; v++) begin
      {a, b, c3} = 6'(v);
      @(posedge clk);
      checks++;
      // truth table of the operator, written out
      if (ab.g !== (a.g || (a.p && b.g)) || ab.p !== (a.p && b.p)) begin
        failures++;
        $display("FAIL a=%b b=%b -> %b", a, b, ab);
      end
      checks++;
      if (abc !== a_bc) begin
        failures++;
        $display("FAIL associativity a=%b b=%b c=%b", a, b, c3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
