// onectr_rom_tb: checks the program ROM in two ways. First, selected words
// against their expected fields. Second, it runs the program on an
// instruction-level model of the processor written here (registers, ALU,
// flag, jumps) for random and corner-case words, and checks that it ends at
// the hold loop with the number of ones in Result after 237 instructions.
module onectr_rom_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] addr; instr_t data;
  onectr_rom dut (.addr(addr), .data(data));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_load(input int ad, input int sel, input int k, input int wa);
    addr = 8'(ad); #1;
    checks++;
    if (int'(data.sel) != sel || data.wen != 1 || int'(data.wa) != wa || data.jp || data.jf ||
        (sel == 0 && int'(data.ctrl) != k)) begin
      failures++; $display("FAIL word %0d: %p", ad, data);
    end
  endtask

  // instruction-level run of the program; returns Result and the step count
  task automatic run(input logic [63:0] x, output int res, output int steps);
    logic [7:0] r [16]; logic [7:0] w, y, a, b; logic f, flag;
    int pc;
    pc = 0; steps = 0; flag = 0;
    for (int i = 0; i < 16; i++) r[i] = 8'($urandom);
    while (pc != 42 && steps < 2000) begin
      addr = 8'(pc); #1;
      a = r[data.raa]; b = r[data.rab]; f = 0;
      case (int'(data.op))
        0: y = a + b;
        1: y = a >> 1;
        2: y = a & b;
        3: begin f = (a == b); y = {7'd0, f}; end
        default: y = 0;
      endcase
      case (int'(data.sel))
        0: w = data.ctrl;
        1, 2, 3, 4, 5, 6, 7, 8: w = x[8*(int'(data.sel)-1) +: 8];
        9: w = y;
        default: w = 0;
      endcase
      if (data.jp || (data.jf && flag)) pc = int'(data.addr); else pc = pc + 1;
      if (data.wen) r[data.wa] = w;
      flag = f;
      steps++;
    end
    res = int'(r[0]);
  endtask

  initial begin
    int res, steps;
    logic [63:0] x;
    expect_load(0, 0, 0, 0);
    expect_load(1, 0, 1, 1);
    for (int i = 0; i < 8; i++) expect_load(2 + i, 1 + i, 0, 2 + i);
    expect_load(13, 0, 8, 14);
    // loop body of byte 3: AND, ADD, SHR
    addr = 8'd23; #1; checks++;
    if (data.op != OP_AND || data.raa != R_DATA3 || data.rab != R_MASK || data.wa != R_TMP || !data.wen || data.sel != SEL_ALU)
      begin failures++; $display("FAIL word 23 %p", data); end
    addr = 8'd24; #1; checks++;
    if (data.op != OP_ADD || data.raa != R_RESULT || data.rab != R_TMP || data.wa != R_RESULT || !data.wen)
      begin failures++; $display("FAIL word 24 %p", data); end
    addr = 8'd39; #1; checks++;
    if (data.op != OP_EQ || data.raa != R_COUNT || data.rab != R_EIGHT || data.wen)
      begin failures++; $display("FAIL word 39 %p", data); end
    addr = 8'd40; #1; checks++;
    if (!data.jf || data.jp || data.addr != 8'd42 || data.wen) begin failures++; $display("FAIL word 40 %p", data); end
    addr = 8'd41; #1; checks++;
    if (!data.jp || data.addr != 8'd14 || data.wen) begin failures++; $display("FAIL word 41 %p", data); end
    addr = 8'd200; #1; checks++;
    if (!data.jp || data.addr != 8'd42 || data.wen) begin failures++; $display("FAIL word 200 %p", data); end
    for (int n = 0; n < 60; n++) begin
      case (n)
        0: x = '0;
        1: x = '1;
        2: x = 64'h8000_0000_0000_0001;
        3: x = 64'hFF00_0000_0000_0080;
        default: x = {$urandom, $urandom};
      endcase
      run(x, res, steps);
      checks++;
      if (res != $countones(x) || steps != 237) begin
        failures++; $display("FAIL run %0d: %0d (exp %0d) in %0d steps", n, res, $countones(x), steps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
