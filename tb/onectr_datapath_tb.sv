// onectr_datapath_tb: drives the processing unit with a random instruction
// stream (every source, operation, address, write enable) and compares it
// with a register-level model kept here: the written byte chosen by SEL, the
// ALU result on OutPort before each edge and Flag after each edge.
module onectr_datapath_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] inport; logic [7:0] ctrl; sel_e sel; logic wen;
  reg_e wa, raa, rab; op_e op; logic flag; logic [6:0] outp;
  logic [7:0] model [16];
  int flags_seen = 0;

  onectr_datapath dut (.clk(clk), .InPort(inport), .Ctrl(ctrl), .Sel(sel), .Wen(wen),
                       .WA(wa), .RAA(raa), .RAB(rab), .Op(op), .Flag(flag), .OutPort(outp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void alu_model(input int o, input logic [7:0] x, input logic [7:0] z,
                                    output logic [7:0] yy, output logic ff);
    ff = 0;
    case (o)
      0: yy = x + z;
      1: yy = x >> 1;
      2: yy = x & z;
      3: begin ff = (x == z); yy = {7'd0, ff}; end
      default: yy = 0;
    endcase
  endfunction

  initial begin
    logic [7:0] ey, wv; logic ef;
    // initialise every register from the constant input
    op = OP_ADD; raa = R_RESULT; rab = R_RESULT; inport = '0;
    for (int i = 0; i < 16; i++) begin
      sel = SEL_CTRL; wen = 1; wa = reg_e'(i); ctrl = 8'($urandom); model[i] = ctrl;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      int s;
      inport = {$urandom, $urandom}; ctrl = 8'($urandom);
      s = $urandom_range(15); sel = sel_e'(4'(s));
      wen = 1'($urandom); wa = reg_e'(4'($urandom));
      raa = reg_e'(4'($urandom)); rab = (n % 3 == 0) ? raa : reg_e'(4'($urandom));
      op = op_e'(3'($urandom_range(7)));
      #1;
      alu_model(int'(op), model[raa], model[rab], ey, ef);
      if (s == 0) wv = ctrl;
      else if (s <= 8) wv = inport[8*(s-1) +: 8];
      else if (s == 9) wv = ey;
      else wv = 8'd0;
      checks++;
      if (outp != ey[6:0]) begin failures++; $display("FAIL out %0d: %h exp %h", n, outp, ey[6:0]); end
      @(posedge clk);
      if (wen) model[wa] = wv;
      #1;
      checks++;
      if (flag != ef) begin failures++; $display("FAIL flag %0d", n); end
      if (ef) flags_seen++;
    end
    // read every register back through A with op = ADD with B = a known register
    for (int i = 0; i < 16; i++) begin
      wen = 0; raa = reg_e'(i); rab = reg_e'(i); op = OP_AND; #1;
      checks++;
      if (outp != model[i][6:0]) begin failures++; $display("FAIL final reg %0d", i); end
    end
    checks++; if (flags_seen == 0) begin failures++; $display("FAIL no flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
