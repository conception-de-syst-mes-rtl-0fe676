// onectr_pipeline_tb: streams a new word into the pipelined tree on every
// rising edge and checks that the count of each word comes out exactly six
// edges later (and not five). Also checks that rst clears the output.
module onectr_pipeline_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [63:0] x; logic [6:0] y;
  int hist [$];
  onectr_pipeline dut (.clk(clk), .rst(rst), .InPort(x), .OutPort(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; x = '1;
    repeat (7) @(posedge clk);
    #1 checks++;
    if (y != 0) begin failures++; $display("FAIL reset %0d", y); end
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: x = '1;
        1: x = '0;
        default: x = {$urandom, $urandom};
      endcase
      hist.push_back($countones(x));
      @(posedge clk); #1;
      if (hist.size() == 6) begin
        checks++;
        if (int'(y) != hist[0]) begin failures++; $display("FAIL %0d: %0d exp %0d", n, y, hist[0]); end
        void'(hist.pop_front());
      end
    end
    rst = 1; @(posedge clk); #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
