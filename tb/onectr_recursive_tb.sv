// onectr_recursive_tb: the recursive counter at its default 64 bits and at
// 5 and 13 bits (sizes that split unevenly), against $countones on corner
// cases and random words; also checks the output widths.
module onectr_recursive_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] x; logic [6:0] y;
  logic [4:0] x5; logic [2:0] y5;
  logic [12:0] x13; logic [3:0] y13;
  onectr_recursive dut (.InPort(x), .OutPort(y));
  onectr_recursive #(.SIZE(5)) dut5 (.InPort(x5), .OutPort(y5));
  onectr_recursive #(.SIZE(13)) dut13 (.InPort(x13), .OutPort(y13));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] v);
    x = v; x5 = v[4:0]; x13 = v[12:0]; #1;
    checks++;
    if (int'(y) != $countones(v) || int'(y5) != $countones(v[4:0]) || int'(y13) != $countones(v[12:0])) begin
      failures++; $display("FAIL %h: %0d %0d %0d", v, y, y5, y13);
    end
  endtask

  initial begin
    checks++;
    if ($bits(dut.OutPort) != 7 || $bits(dut5.OutPort) != 3 || $bits(dut13.OutPort) != 4) begin
      failures++; $display("FAIL widths");
    end
    check('0);
    check('1);
    for (int i = 0; i < 64; i++) check(64'd1 << i);
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom} | {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
