// cla_recursive_tb: exhaustive check of the 8-bit lookahead adder (all a, b
// and carry in) and a random check at 13 bits: the sum, and the carry out
// g | (p & c), against integer addition; also checks that p is set exactly
// when a ^ b is all ones and g exactly when a + b alone carries out.
module cla_recursive_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] a, b, s; logic c, g, p;
  logic [12:0] a13, b13, s13; logic c13, g13, p13;
  logic co, co13;
  assign co   = g | (p & c);      // carry out of the 8-bit adder
  assign co13 = g13 | (p13 & c13);
  cla_recursive dut (.a(a), .b(b), .c(c), .s(s), .g(g), .p(p));
  cla_recursive #(.SIZE(13)) dut13 (.a(a13), .b(b13), .c(c13), .s(s13), .g(g13), .p(p13));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a = 8'(i); b = 8'(j); c = 1'(k); #1;
          sum = i + j + k;
          checks++;
          if (int'(s) != sum % 256 || int'(co) != sum / 256 ||
              p != ((a ^ b) == 8'hFF) || g != ((i + j) > 255)) begin
            failures++; $display("FAIL %0d+%0d+%0d: s=%0d g=%0d p=%0d", i, j, k, s, g, p);
          end
        end
    for (int n = 0; n < 5000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom); #1;
      sum = int'(a13) + int'(b13) + int'(c13);
      checks++;
      if (int'(s13) != sum % 8192 || int'(co13) != sum / 8192) begin
        failures++; $display("FAIL13 %0d+%0d+%0d", a13, b13, c13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
