// onectr_alu: combinational 8-bit ALU of the ones-counting processor.
//
// Operations (op_e in onectr_pkg):
//   OP_ADD  Y = A + B (modulo 256)
//   OP_SHR  Y = A >> 1, a zero enters at bit 7
//   OP_AND  Y = A and B
//   OP_EQ   F = (A == B), Y = F in bit 0
// F is low for every operation but OP_EQ; the unused codes 4 to 7 give Y = 0.
// The four operations and the purely combinational behaviour follow the
// document; the operation codes, Y for OP_EQ and the unused codes are this
// design's own choice. No clock: Y and F settle a gate delay after A, B, OP.
module onectr_alu
  import onectr_pkg::*;
(
  input  logic [D_W-1:0] a,
  input  logic [D_W-1:0] b,
  input  op_e            op,
  output logic [D_W-1:0] y,
  output logic           f
);

  always_comb begin
    y = '0;
    f = 1'b0;
    unique case (op)
      OP_ADD: y = a + b;
      OP_SHR: y = {1'b0, a[D_W-1:1]};
      OP_AND: y = a & b;
      OP_EQ: begin
        f = (a == b);
        y = {{(D_W-1){1'b0}}, f};
      end
      default: ;
    endcase
  end

endmodule
