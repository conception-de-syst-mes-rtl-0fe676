// onectr_regfile_tb: random writes and reads against a 16-entry model. Checks
// that reads are combinational (a new address shows at once), that a write
// shows only after the clock edge, and that WEN low leaves the registers alone.
module onectr_regfile_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wen; logic [3:0] wa, raa, rab; logic [7:0] w, a, b;
  logic [7:0] model [16];
  onectr_regfile dut (.clk(clk), .wen(wen), .wa(wa), .w(w), .raa(raa), .rab(rab), .a(a), .b(b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register
    wen = 1;
    for (int i = 0; i < 16; i++) begin
      wa = 4'(i); w = 8'($urandom); model[i] = w;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      wen = 1'($urandom); wa = 4'($urandom); w = 8'($urandom);
      raa = 4'($urandom); rab = (n % 4 == 0) ? wa : 4'($urandom);
      #1;
      checks++;
      if (a != model[raa] || b != model[rab]) begin
        failures++; $display("FAIL read %0d: a=%h(%h) b=%h(%h)", n, a, model[raa], b, model[rab]);
      end
      @(posedge clk);
      if (wen) model[wa] = w;
      #1;
      checks++;
      if (a != model[raa] || b != model[rab]) begin
        failures++; $display("FAIL after edge %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
