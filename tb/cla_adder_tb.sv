// cla_adder_tb: checks the prefix carry look-ahead adder against plain
// integer addition: exhaustively for the default 9-bit width and with
// random operands for a 24-bit instance. Carries are checked against
// c_i = (a + b) bit i XOR a_i XOR b_i of the reference sum.
module cla_adder_tb;
  localparam int WA = 9, WB = 24;

  logic [WA-1:0] aa, ba;
  logic [WA:0]   sa, ca;
  logic [WB-1:0] ab, bb;
  logic [WB:0]   sb, cb;
  int checks = 0, failures = 0;
  logic clk;

  cla_adder dut_a (.a(aa), .b(ba), .s(sa), .c(ca));
  cla_adder #(.W(WB)) dut_b (.a(ab), .b(bb), .s(sb), .c(cb));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << WA); i++) begin
      for (int j = 0; j < (1 << WA); j++) begin
        logic [WA:0] sum;
        aa = WA'(i);
        ba = WA'(j);
        sum = (WA + 1)'(i) + (WA + 1)'(j);
        #1;
        checks++;
        if (sa != sum || ca != (sum ^ {1'b0, aa} ^ {1'b0, ba})) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d c=%b", i, j, sa, ca);
        end
      end
      @(posedge clk);
    end
    for (int t = 0; t < 20000; t++) begin
      logic [WB:0] sum;
      ab = WB'($urandom);
      bb = WB'($urandom);
      sum = {1'b0, ab} + {1'b0, bb};
      @(posedge clk);
      checks++;
      if (sb != sum || cb != (sum ^ {1'b0, ab} ^ {1'b0, bb})) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d = %0d", ab, bb, sb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
