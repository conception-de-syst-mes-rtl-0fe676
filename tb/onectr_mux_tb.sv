// onectr_mux_tb: for corner-case and random words, pulses start and checks
// that OutPort after 63 further edges holds the ones of bits 0 to 62 only,
// after exactly 64 the ones of the whole word, and that it then holds.
module onectr_mux_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start; logic [63:0] x; logic [6:0] y;
  onectr_mux dut (.clk(clk), .start(start), .InPort(x), .OutPort(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_one(input logic [63:0] v);
    x = v; start = 1;
    @(posedge clk); #1;
    checks++;
    if (y != 0) begin failures++; $display("FAIL clear"); end
    start = 0;
    repeat (63) @(posedge clk);
    #1 checks++;
    if (int'(y) != $countones(v[62:0])) begin failures++; $display("FAIL early %h: %0d", v, y); end
    @(posedge clk); #1;
    checks++;
    if (int'(y) != $countones(v)) begin failures++; $display("FAIL %h: %0d exp %0d", v, y, $countones(v)); end
    repeat (100) @(posedge clk);
    #1 checks++;
    if (int'(y) != $countones(v)) begin failures++; $display("FAIL hold %h: %0d", v, y); end
  endtask

  initial begin
    count_one('0);
    count_one('1);
    count_one(64'h8000_0000_0000_0000);
    count_one(64'h0000_0000_0000_0001);
    for (int n = 0; n < 40; n++) count_one({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
