// onectr_alu_tb: random operands for every operation code, results computed
// here from the operation's definition (ADD modulo 256, SHR by one with a zero
// in, AND, EQ setting F), plus equal operands so that EQ is seen true.
module onectr_alu_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] a, b, y; op_e op; logic f;
  onectr_alu dut (.a(a), .b(b), .op(op), .y(y), .f(f));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ef, eqs;
    eqs = 0;
    for (int n = 0; n < 4000; n++) begin
      a = 8'($urandom); b = (n % 5 == 0) ? a : 8'($urandom);
      op = op_e'(3'(n % 8));
      #1;
      ef = 0;
      case (n % 8)
        0: ey = (int'(a) + int'(b)) % 256;
        1: ey = int'(a) / 2;
        2: ey = int'(a) & int'(b);
        3: begin ef = (a == b) ? 1 : 0; ey = ef; end
        default: ey = 0;
      endcase
      if (ef == 1) eqs++;
      checks++;
      if (int'(y) != ey || int'(f) != ef) begin
        failures++; $display("FAIL op=%0d a=%0d b=%0d y=%0d f=%0d exp %0d %0d", n % 8, a, b, y, f, ey, ef);
      end
    end
    checks++; if (eqs == 0) begin failures++; $display("FAIL EQ never true"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
