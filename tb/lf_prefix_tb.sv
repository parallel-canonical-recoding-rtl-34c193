// lf_prefix_tb: checks the prefix network against a serial fold of the
// operator. The 8-input network (the default) is checked for all 2^16
// input vectors; 13-, 16-, 37- and 64-input instances get random vectors.
// The node count and depth of the network for n = 2^d inputs, d = 1..10,
// are checked against the Ladner-Fischer figures 4n - F(5+d) + 1 and d
// (12 nodes and 3 levels for n = 8).
module lf_prefix_tb;
  import csd_pkg::*;

  localparam int N1 = 8, N2 = 13, N3 = 16, N4 = 37, N5 = 64;

  gp_t [N1-1:0] q1, r1;
  gp_t [N2-1:0] q2, r2;
  gp_t [N3-1:0] q3, r3;
  gp_t [N4-1:0] q4, r4;
  gp_t [N5-1:0] q5, r5;
  int checks = 0, failures = 0;
  logic clk;

  lf_prefix dut8 (.q(q1), .r(r1));
  lf_prefix #(.N(N2)) dut13 (.q(q2), .r(r2));
  lf_prefix #(.N(N3)) dut16 (.q(q3), .r(r3));
  lf_prefix #(.N(N4)) dut37 (.q(q4), .r(r4));
  lf_prefix #(.N(N5)) dut64 (.q(q5), .r(r5));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fib(int i);
    int a = 0, b = 1;
    for (int k = 0; k < i; k++) begin
      int t = a + b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Nodes in the level table the network is built from.
  function automatic int table_nodes(int n);
    int cnt = 0;
    for (int t = 1; t <= lf_depth(n, 0); t++)
      for (int i = 0; i < n; i++)
        if (lf_partner(n, 0, t, i) >= 0) cnt++;
    return cnt;
  endfunction

  // Serial reference: running product from position 0 upward.
  task automatic check_vec(input int n, input gp_t [N5-1:0] q, input gp_t [N5-1:0] r);
    logic g_run, p_run;
    g_run = 1'b0;
    p_run = 1'b1;
    for (int i = 0; i < n; i++) begin
      g_run = q[i].g | (q[i].p & g_run);
      p_run = q[i].p & p_run;
      checks++;
      if (r[i].g !== g_run || r[i].p !== p_run) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pos %0d: got %b expected %b%b", n, i, r[i], g_run, p_run);
      end
    end
  endtask

  initial begin
    checks++;
    if (lf_nodes(N1, 0) != 12 || table_nodes(N1) != 12 || lf_depth(N1, 0) != 3) begin
      failures++;
      $display("FAIL 8-input network: %0d nodes, %0d levels", lf_nodes(N1, 0), lf_depth(N1, 0));
    end
    for (int d = 1; d <= 10; d++) begin
      automatic int n = 1 << d;
      checks++;
      if (lf_nodes(n, 0) != 4 * n - fib(5 + d) + 1 || lf_depth(n, 0) != d ||
          table_nodes(n) != lf_nodes(n, 0)) begin
        failures++;
        $display("FAIL n=%0d: %0d nodes (expected %0d), %0d levels", n, lf_nodes(n, 0),
                 4 * n - fib(5 + d) + 1, lf_depth(n, 0));
      end
    end
    for (int v = 0; v < (1 << (2 * N1)); v++) begin
      q1 = (2 * N1)'(v);
      @(posedge clk);
      check_vec(N1, (2 * N5)'(q1), (2 * N5)'(r1));
    end
    for (int t = 0; t < 20000; t++) begin
      q2 = (2 * N2)'({$urandom, $urandom});
      q3 = (2 * N3)'({$urandom, $urandom});
      q4 = (2 * N4)'({$urandom, $urandom, $urandom});
      q5 = (2 * N5)'({$urandom, $urandom, $urandom, $urandom});
      // bias toward long runs of propagate so long carries occur
      if (t % 2 == 1) begin
        for (int i = 0; i < N5; i++) q5[i].p |= ($urandom % 8 != 0);
        for (int i = 0; i < N4; i++) q4[i].p |= ($urandom % 8 != 0);
      end
      @(posedge clk);
      check_vec(N2, (2 * N5)'(q2), (2 * N5)'(r2));
      check_vec(N3, (2 * N5)'(q3), (2 * N5)'(r3));
      check_vec(N4, (2 * N5)'(q4), (2 * N5)'(r4));
      check_vec(N5, q5, r5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
