// adderreg: unsigned SIZE-bit adder whose SIZE+1-bit sum is registered.
//
// sum is {0,input1} + {0,input2} of the inputs present at the previous rising
// edge of clk (one cycle of latency). rst, active high and synchronous,
// clears the register. It is the node of the pipelined adder tree. Ports and
// parameter follow the document's adderreg component; the reset polarity and
// its synchronous timing are this design's choice.
module adderreg #(
  parameter int unsigned SIZE = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [SIZE-1:0] input1,
  input  logic [SIZE-1:0] input2,
  output logic [SIZE:0]   sum
);

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else     sum <= {1'b0, input1} + {1'b0, input2};
  end

endmodule
