// onectr_datapath: processing unit of the ones-counting processor.
//
// An input multiplexer chooses the byte written into the register file:
// the instruction's constant (CTRL), one of the eight bytes of InPort
// (IN0 = InPort[7:0] ... IN7 = InPort[63:56]) or the ALU result. The two
// register-file read ports feed the ALU; the ALU result is both the write-back
// value and the output. The ALU's F output is captured by the Flag flip-flop
// on every rising clock edge, so Flag holds F of the previous instruction.
// One instruction completes per cycle: read registers, compute, write back at
// the edge. This structure and the widths are the document's; SEL codes 10
// to 15 writing zero is this design's choice. OutPort is bits [6:0] of the
// ALU result (combinational), as the seven-bit output of the entity.
module onectr_datapath
  import onectr_pkg::*;
(
  input  logic             clk,
  input  logic [IN_W-1:0]  InPort,
  input  logic [D_W-1:0]   Ctrl,
  input  sel_e             Sel,
  input  logic             Wen,
  input  reg_e             WA,
  input  reg_e             RAA,
  input  reg_e             RAB,
  input  op_e              Op,
  output logic             Flag,
  output logic [OUT_W-1:0] OutPort
);

  logic [D_W-1:0] w, a, b, y;
  logic           f;

  always_comb begin
    unique case (Sel)
      SEL_CTRL: w = Ctrl;
      SEL_IN0, SEL_IN1, SEL_IN2, SEL_IN3,
      SEL_IN4, SEL_IN5, SEL_IN6, SEL_IN7:
        w = InPort[(int'(Sel) - 1) * D_W +: D_W];
      SEL_ALU:  w = y;
      default:  w = '0;
    endcase
  end

  onectr_regfile u_reg (
    .clk (clk),
    .wen (Wen),
    .wa  (WA),
    .w   (w),
    .raa (RAA),
    .rab (RAB),
    .a   (a),
    .b   (b)
  );

  onectr_alu u_alu (
    .a  (a),
    .b  (b),
    .op (Op),
    .y  (y),
    .f  (f)
  );

  always_ff @(posedge clk) Flag <= f;

  assign OutPort = y[OUT_W-1:0];

endmodule
