// onectr_direct_tb: combinational ones counter against $countones on corner
// cases (no ones, all ones, one bit set at each position) and random words.
module onectr_direct_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] x; logic [6:0] y;
  onectr_direct dut (.InPort(x), .OutPort(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] v);
    x = v; #1;
    checks++;
    if (int'(y) != $countones(v)) begin failures++; $display("FAIL %h: %0d", v, y); end
  endtask

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < 64; i++) check(64'd1 << i);
    for (int i = 0; i < 64; i++) check(~(64'd1 << i));
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom} & {$urandom, $urandom} | {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
