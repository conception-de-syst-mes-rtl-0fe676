// adder: unsigned adder of two SIZE-bit operands giving a SIZE+1-bit sum.
//
// Purely combinational; the carry out becomes the sum's top bit, so the sum
// never overflows. It is the node of the ones-counting adder tree, whose
// level k adds two k-bit counts. Ports and parameter follow the document's
// adder component; the body is a plain '+'.
module adder #(
  parameter int unsigned SIZE = 2
) (
  input  logic [SIZE-1:0] input1,
  input  logic [SIZE-1:0] input2,
  output logic [SIZE:0]   sum
);

  assign sum = {1'b0, input1} + {1'b0, input2};

endmodule
