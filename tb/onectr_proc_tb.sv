// onectr_proc_tb: runs the ones-counting processor on corner-case and random
// words. For each word: start high for two edges, then start low; the count
// is expected on OutPort exactly when the program reaches its hold word, 237
// cycles after start falls, and must stay there. Also restarts the processor
// in the middle of a count.
module onectr_proc_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start; logic [63:0] x; logic [6:0] outp;
  onectr_proc dut (.clk(clk), .start(start), .InPort(x), .OutPort(outp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_one(input logic [63:0] v, input int abort_after);
    int cyc;
    x = v; start = 1;
    repeat (2) @(posedge clk);
    #1 start = 0;
    if (abort_after > 0) begin
      repeat (abort_after) @(posedge clk);
      #1 x = ~v; start = 1;
      repeat (1) @(posedge clk);
      #1 start = 0;
      v = ~v;
    end
    cyc = 0;
    while (dut.u_ctr.pc != 8'd42 && cyc < 1000) begin
      @(posedge clk); #1; cyc++;
    end
    checks++;
    if (cyc != 237) begin failures++; $display("FAIL cycles %0d", cyc); end
    checks++;
    if (int'(outp) != $countones(v)) begin failures++; $display("FAIL %h: %0d exp %0d", v, outp, $countones(v)); end
    repeat (20) @(posedge clk);
    #1 checks++;
    if (int'(outp) != $countones(v)) begin failures++; $display("FAIL hold %h", v); end
  endtask

  initial begin
    count_one('0, 0);
    count_one('1, 0);
    count_one(64'h0000_0000_0000_0001, 0);
    count_one(64'h8000_0000_0000_0000, 0);
    count_one(64'h0101_0101_0101_0101, 0);
    count_one(64'h5555_AAAA_F0F0_0F0F, 100);
    for (int n = 0; n < 30; n++) count_one({$urandom, $urandom}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
