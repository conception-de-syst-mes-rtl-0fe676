// onectr_proc: ones counter built as a small special-purpose processor.
//
// The control unit (program counter and program ROM) drives the datapath
// (input multiplexer, 16 x 8-bit register file, ALU, Flag flip-flop). The
// program splits the 64-bit InPort into eight bytes and, eight times over,
// adds bit 0 of every byte to Result and shifts every byte right by one.
//
// Interface: hold start high for at least one clock edge, with InPort valid;
// InPort must stay stable until the eight bytes have been loaded (8 cycles
// after start falls; holding it to the end is simplest). After start falls,
// OutPort shows the ALU result of every instruction and settles to the
// number of ones 237 cycles later, holding it until the next start. The
// top-level structure and port names are the document's (clk, start,
// InPort, OutPort); the processor does not use a reset, start restarts it.
module onectr_proc
  import onectr_pkg::*;
(
  input  logic             clk,
  input  logic             start,
  input  logic [IN_W-1:0]  InPort,
  output logic [OUT_W-1:0] OutPort
);

  logic [D_W-1:0]  ctrl;
  sel_e            sel;
  logic            wen, flag;
  reg_e            wa, raa, rab;
  op_e             op;
  logic [PC_W-1:0] pc;

  onectr_control u_ctr (
    .clk   (clk),
    .start (start),
    .Flag  (flag),
    .Ctrl  (ctrl),
    .Sel   (sel),
    .Wen   (wen),
    .WA    (wa),
    .RAA   (raa),
    .RAB   (rab),
    .Op    (op),
    .pc    (pc)
  );

  onectr_datapath u_data (
    .clk     (clk),
    .InPort  (InPort),
    .Ctrl    (ctrl),
    .Sel     (sel),
    .Wen     (wen),
    .WA      (wa),
    .RAA     (raa),
    .RAB     (rab),
    .Op      (op),
    .Flag    (flag),
    .OutPort (OutPort)
  );

endmodule
