// onectr_control_tb: drives start and Flag by hand and follows the program
// counter: start clears it, it counts up one per cycle through the straight
// code, the conditional jump at 40 is taken only with Flag high, the jump at
// 41 always goes back to 14, and the hold word at 42 jumps to itself. The
// datapath fields are checked for a few known words.
module onectr_control_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start, flag; logic [7:0] ctrl, pc; sel_e sel; logic wen; reg_e wa, raa, rab; op_e op;
  onectr_control dut (.clk(clk), .start(start), .Flag(flag), .Ctrl(ctrl), .Sel(sel), .Wen(wen),
                      .WA(wa), .RAA(raa), .RAB(rab), .Op(op), .pc(pc));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_expect(input int exp_pc);
    @(posedge clk); #1;
    checks++;
    if (int'(pc) != exp_pc) begin failures++; $display("FAIL pc=%0d exp %0d", pc, exp_pc); end
  endtask

  initial begin
    start = 1; flag = 0;
    step_expect(0);
    step_expect(0);
    checks++;
    if (sel != SEL_CTRL || !wen || wa != R_RESULT || ctrl != 0) begin failures++; $display("FAIL word 0"); end
    start = 0;
    for (int i = 1; i <= 40; i++) begin
      step_expect(i);
      if (i == 2) begin
        checks++;
        if (sel != SEL_IN0 || !wen || wa != R_DATA0) begin failures++; $display("FAIL word 2"); end
      end
      if (i == 13) begin
        checks++;
        if (sel != SEL_CTRL || ctrl != 8'd8 || wa != R_EIGHT) begin failures++; $display("FAIL word 13"); end
      end
    end
    // at 40 with Flag low: no jump
    flag = 0; step_expect(41);
    // 41 always jumps back to the loop start
    flag = 1; step_expect(14);
    flag = 0;
    for (int i = 15; i <= 40; i++) step_expect(i);
    checks++;
    if (op != OP_ADD || wen) begin failures++; $display("FAIL word 40 fields"); end
    // at 40 with Flag high: jump out to 42
    flag = 1; step_expect(42);
    flag = 0;
    repeat (5) step_expect(42);
    checks++;
    if (wen || raa != R_RESULT || rab != R_ZERO || op != OP_ADD) begin failures++; $display("FAIL hold word"); end
    // start mid-program clears again
    start = 1; step_expect(0);
    start = 0; step_expect(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
