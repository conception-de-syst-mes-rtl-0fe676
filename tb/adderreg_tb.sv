// adderreg_tb: checks the registered adder at SIZE = 4: the sum of the
// operands present at one rising edge appears after that edge, rst clears the
// register, and operands changed between edges do not show before the next.
module adderreg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [3:0] a, b; logic [4:0] s;
  adderreg #(.SIZE(4)) dut (.clk(clk), .rst(rst), .input1(a), .input2(b), .sum(s));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    rst = 1; a = 4'd15; b = 4'd15;
    @(posedge clk); #1;
    checks++; if (s != 0) begin failures++; $display("FAIL reset: %0d", s); end
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      a = 4'($urandom); b = 4'($urandom);
      exp = int'(a) + int'(b);
      @(posedge clk); #1;
      checks++; if (int'(s) != exp) begin failures++; $display("FAIL %0d: %0d != %0d", n, s, exp); end
      // change the operands mid-cycle: the register must hold
      a = ~a; #1;
      checks++; if (int'(s) != exp) begin failures++; $display("FAIL hold %0d", n); end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (s != 0) begin failures++; $display("FAIL reset2: %0d", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
