// adder_tb: exhaustive check of the unsigned adder at SIZE = 1 and SIZE = 3,
// and a random check at SIZE = 6; each sum is compared with the integer sum
// of the operands.
module adder_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [0:0] a1, b1; logic [1:0] s1;
  logic [2:0] a3, b3; logic [3:0] s3;
  logic [5:0] a6, b6; logic [6:0] s6;

  adder #(.SIZE(1)) u1 (.input1(a1), .input2(b1), .sum(s1));
  adder #(.SIZE(3)) u3 (.input1(a3), .input2(b3), .sum(s3));
  adder #(.SIZE(6)) u6 (.input1(a6), .input2(b6), .sum(s6));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        a1 = 1'(i); b1 = 1'(j); #1;
        checks++; if (int'(s1) != i + j) begin failures++; $display("FAIL 1: %0d+%0d=%0d", i, j, s1); end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        checks++; if (int'(s3) != i + j) begin failures++; $display("FAIL 3: %0d+%0d=%0d", i, j, s3); end
      end
    for (int n = 0; n < 200; n++) begin
      int x, y;
      x = $urandom_range(63); y = $urandom_range(63);
      a6 = 6'(x); b6 = 6'(y); #1;
      checks++; if (int'(s6) != x + y) begin failures++; $display("FAIL 6: %0d+%0d=%0d", x, y, s6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
