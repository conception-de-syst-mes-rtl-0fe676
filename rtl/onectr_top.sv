// onectr_top: every architecture of the 64-bit ones counter, side by side.
//
// The designs are alternatives for the same job (count the ones of a 64-bit
// word into a 7-bit result) that trade area against speed; each keeps its own
// InPort, start and OutPort here so they can be driven and compared
// independently. clk and rst are shared.
//
//   tree_*   combinational adder tree                      result at once
//   rec_*    recursive adder tree                          result at once
//   dir_*    single behavioural sum                        result at once
//   pipe_*   pipelined adder tree, one word per cycle      6 cycles latency
//   piso_*   shift register and one adder (start to load)  64 cycles
//   mux_*    64:1 multiplexer and one adder (start)        64 cycles
//   proc_*   ROM-programmed 8-bit processor (start)        237 cycles
//
// rst is used only by the pipeline; the sequential designs restart on start.
// Beside them stands cla_*, an 8-bit carry-lookahead adder built with the
// same recursive construction as the recursive counter (two half-size blocks
// and one combining cell per level); it is a separate example of the method,
// not part of any counter.
module onectr_top
  import onectr_pkg::*;
(
  input  logic             clk,
  input  logic             rst,

  input  logic [IN_W-1:0]  tree_InPort,
  output logic [OUT_W-1:0] tree_OutPort,

  input  logic [IN_W-1:0]  rec_InPort,
  output logic [OUT_W-1:0] rec_OutPort,

  input  logic [IN_W-1:0]  dir_InPort,
  output logic [OUT_W-1:0] dir_OutPort,

  input  logic [IN_W-1:0]  pipe_InPort,
  output logic [OUT_W-1:0] pipe_OutPort,

  input  logic             piso_start,
  input  logic [IN_W-1:0]  piso_InPort,
  output logic [OUT_W-1:0] piso_OutPort,

  input  logic             mux_start,
  input  logic [IN_W-1:0]  mux_InPort,
  output logic [OUT_W-1:0] mux_OutPort,

  input  logic             proc_start,
  input  logic [IN_W-1:0]  proc_InPort,
  output logic [OUT_W-1:0] proc_OutPort,

  input  logic [7:0]       cla_a,
  input  logic [7:0]       cla_b,
  input  logic             cla_c,
  output logic [7:0]       cla_s,
  output logic             cla_g,
  output logic             cla_p
);

  onectr_tree #(.N(IN_W)) u_tree (
    .InPort  (tree_InPort),
    .OutPort (tree_OutPort)
  );

  onectr_recursive #(.SIZE(IN_W)) u_rec (
    .InPort  (rec_InPort),
    .OutPort (rec_OutPort)
  );

  onectr_direct u_dir (
    .InPort  (dir_InPort),
    .OutPort (dir_OutPort)
  );

  onectr_pipeline #(.N(IN_W)) u_pipe (
    .clk     (clk),
    .rst     (rst),
    .InPort  (pipe_InPort),
    .OutPort (pipe_OutPort)
  );

  onectr_piso u_piso (
    .clk     (clk),
    .start   (piso_start),
    .InPort  (piso_InPort),
    .OutPort (piso_OutPort)
  );

  onectr_mux u_mux (
    .clk     (clk),
    .start   (mux_start),
    .InPort  (mux_InPort),
    .OutPort (mux_OutPort)
  );

  onectr_proc u_proc (
    .clk     (clk),
    .start   (proc_start),
    .InPort  (proc_InPort),
    .OutPort (proc_OutPort)
  );

  cla_recursive #(.SIZE(8)) u_cla (
    .a (cla_a),
    .b (cla_b),
    .c (cla_c),
    .s (cla_s),
    .g (cla_g),
    .p (cla_p)
  );

endmodule
