// onectr_top_tb: end-to-end test of every ones-counter architecture at its
// default size (64-bit words, 7-bit counts), all running at once.
//
// Each round loads one random word into the three start-driven designs
// (shift register, multiplexer, processor) and, while they count, feeds a new
// random word on every clock to the three combinational trees and the
// pipeline. Checked against $countones: the trees at once, the pipeline six
// edges later, the shift register and multiplexer after 64 edges, the
// processor after 237. The mechanisms of each design are counted, and one
// that never happened is a failure: pipeline words in flight back to back,
// pipeline reset, processor conditional jump taken and not taken, loop-back
// jump, hold loop reached, restart in mid-count, multiplexer stopping after
// 64 bits, shift register emptied. The side-by-side carry-lookahead adder gets
// a random sum every cycle; a group generate and a carry propagated through
// all eight bits must both occur.
module onectr_top_tb;
  import onectr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [63:0] tree_in, rec_in, dir_in, pipe_in, piso_in, mux_in, proc_in;
  logic [6:0]  tree_out, rec_out, dir_out, pipe_out, piso_out, mux_out, proc_out;
  logic        piso_start, mux_start, proc_start;
  logic [7:0]  cla_a, cla_b, cla_s;
  logic        cla_c, cla_g, cla_p;

  onectr_top dut (
    .clk(clk), .rst(rst),
    .tree_InPort(tree_in), .tree_OutPort(tree_out),
    .rec_InPort(rec_in), .rec_OutPort(rec_out),
    .dir_InPort(dir_in), .dir_OutPort(dir_out),
    .pipe_InPort(pipe_in), .pipe_OutPort(pipe_out),
    .piso_start(piso_start), .piso_InPort(piso_in), .piso_OutPort(piso_out),
    .mux_start(mux_start), .mux_InPort(mux_in), .mux_OutPort(mux_out),
    .proc_start(proc_start), .proc_InPort(proc_in), .proc_OutPort(proc_out),
    .cla_a(cla_a), .cla_b(cla_b), .cla_c(cla_c), .cla_s(cla_s), .cla_g(cla_g), .cla_p(cla_p)
  );

  // mechanism counters
  int n_pipe_full = 0, n_pipe_reset = 0, n_jf_taken = 0, n_jf_not = 0, n_jp_back = 0;
  int n_hold = 0, n_restart = 0, n_mux_stop = 0, n_piso_empty = 0;
  int n_cla_gen = 0, n_cla_prop = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor control-flow events, sampled at each edge
  always @(posedge clk) begin
    if (!proc_start) begin
      if (dut.u_proc.u_ctr.pc == 8'd40 && dut.u_proc.flag)  n_jf_taken++;
      if (dut.u_proc.u_ctr.pc == 8'd40 && !dut.u_proc.flag) n_jf_not++;
      if (dut.u_proc.u_ctr.pc == 8'd41)                      n_jp_back++;
    end
  end

  // combinational trees and pipeline: a new word every cycle
  int hist [$];
  logic streaming = 0;
  always @(posedge clk) begin
    if (streaming) begin
      logic [63:0] v;
      // outputs for the words applied before this edge
      checks++;
      if (int'(tree_out) != $countones(tree_in) || int'(rec_out) != $countones(rec_in) ||
          int'(dir_out) != $countones(dir_in)) begin
        failures++; $display("FAIL comb %h: %0d %0d %0d", tree_in, tree_out, rec_out, dir_out);
      end
      checks++;
      if (int'({cla_g | (cla_p & cla_c), cla_s}) != int'(cla_a) + int'(cla_b) + int'(cla_c)) begin
        failures++; $display("FAIL cla %0d+%0d+%0d", cla_a, cla_b, cla_c);
      end
      if (cla_g) n_cla_gen++;
      if (cla_p && cla_c) n_cla_prop++;
      cla_a <= 8'($urandom); cla_b <= 8'($urandom); cla_c <= 1'($urandom);
      hist.push_back($countones(pipe_in));
      v = {$urandom, $urandom};
      tree_in <= v; rec_in <= ~v; dir_in <= v ^ {v[31:0], v[63:32]};
      pipe_in <= {$urandom, $urandom} | {$urandom, $urandom};
    end
  end
  always @(negedge clk) begin
    if (streaming && hist.size() > 6) begin
      // pipe_out now shows the word applied six edges ago
      void'(hist.pop_front());
      checks++;
      if (int'(pipe_out) != hist[0]) begin failures++; $display("FAIL pipe %0d exp %0d", pipe_out, hist[0]); end
      n_pipe_full++;
    end
  end

  task automatic round(input logic [63:0] v, input bit restart);
    int cyc, pre;
    logic [63:0] w;
    w = restart ? ~v : v;
    @(negedge clk);
    piso_in = v; mux_in = v; proc_in = v;
    piso_start = 1; mux_start = 1; proc_start = 1;
    @(negedge clk);
    piso_start = 0; mux_start = 0; proc_start = 0;
    if (restart) begin
      repeat (50) @(negedge clk);
      proc_in = w; proc_start = 1;
      @(negedge clk);
      proc_start = 0;
      n_restart++;
    end
    // shift register and multiplexer: 64 edges after start fell; the
    // processor restarted 51 edges in and has run pre cycles of its count
    pre = restart ? 13 : 64;
    repeat (pre) @(negedge clk);
    checks++;
    if (int'(piso_out) != $countones(v) || int'(mux_out) != $countones(v)) begin
      failures++; $display("FAIL piso/mux %h: %0d %0d", v, piso_out, mux_out);
    end
    if (dut.u_piso.shreg == '0) n_piso_empty++;
    if (dut.u_mux.counter[6]) n_mux_stop++;
    // processor: wait for the hold word
    cyc = 0;
    while (dut.u_proc.u_ctr.pc != 8'd42 && cyc < 400) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(proc_out) != $countones(w)) begin failures++; $display("FAIL proc %h: %0d", w, proc_out); end
    checks++;
    if (cyc + pre != 237) begin failures++; $display("FAIL proc cycles %0d", cyc); end
    n_hold++;
    // outputs still held a while later
    repeat (10) @(negedge clk);
    checks++;
    if (int'(piso_out) != $countones(v) || int'(mux_out) != $countones(v) || int'(proc_out) != $countones(w)) begin
      failures++; $display("FAIL hold");
    end
  endtask

  initial begin
    rst = 1; piso_start = 1; mux_start = 1; proc_start = 1;
    tree_in = '0; rec_in = '0; dir_in = '0; pipe_in = '1;
    piso_in = '0; mux_in = '0; proc_in = '0;
    cla_a = 8'hFF; cla_b = 8'h00; cla_c = 1'b1;
    repeat (8) @(posedge clk);
    #1 checks++;
    if (pipe_out != 0) begin failures++; $display("FAIL pipe reset"); end
    else n_pipe_reset++;
    rst = 0;
    @(negedge clk);
    streaming = 1;
    round('1, 0);
    round('0, 0);
    round(64'h0123_4567_89AB_CDEF, 1);
    for (int n = 0; n < 10; n++) round({$urandom, $urandom}, 0);
    streaming = 0;
    $display("mechanisms: pipe_full=%0d pipe_reset=%0d jf_taken=%0d jf_not=%0d jp_back=%0d hold=%0d restart=%0d mux_stop=%0d piso_empty=%0d",
             n_pipe_full, n_pipe_reset, n_jf_taken, n_jf_not, n_jp_back, n_hold, n_restart, n_mux_stop, n_piso_empty);
    if (n_pipe_full == 0)  begin failures++; $display("FAIL never: pipeline full"); end
    if (n_pipe_reset == 0) begin failures++; $display("FAIL never: pipeline reset"); end
    if (n_jf_taken == 0)   begin failures++; $display("FAIL never: JF taken"); end
    if (n_jf_not == 0)     begin failures++; $display("FAIL never: JF not taken"); end
    if (n_jp_back == 0)    begin failures++; $display("FAIL never: JP loop back"); end
    if (n_hold == 0)       begin failures++; $display("FAIL never: hold loop"); end
    if (n_restart == 0)    begin failures++; $display("FAIL never: restart"); end
    if (n_mux_stop == 0)   begin failures++; $display("FAIL never: mux stop"); end
    if (n_piso_empty == 0) begin failures++; $display("FAIL never: piso empty"); end
    if (n_cla_gen == 0)    begin failures++; $display("FAIL never: adder group generate"); end
    if (n_cla_prop == 0)   begin failures++; $display("FAIL never: carry through all 8 bits"); end
    $display("adder: group generate=%0d carry through=%0d", n_cla_gen, n_cla_prop);
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
