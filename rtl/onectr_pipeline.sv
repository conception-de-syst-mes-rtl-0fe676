// onectr_pipeline: pipelined ones counter, an adder tree with a register
// after every adder.
//
// Same tree as onectr_tree (log2(N) levels, N-1 adders, adder k of a level
// fed by adders 2k and 2k+1 of the level before), built from adderreg, so
// every level is one pipeline stage. With N = 64: 6 stages and 183 flip-flops
// (32x2 + 16x3 + 8x4 + 4x5 + 2x6 + 1x7). A new word can enter on every clock
// edge; OutPort gives the count of the word present at InPort six rising
// edges earlier. rst (synchronous, active high) clears every stage. The
// structure is the document's; N must be a power of two.
module onectr_pipeline #(
  parameter int unsigned N = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N-1:0]          InPort,
  output logic [$clog2(N):0]    OutPort
);

  localparam int unsigned LEVELS = $clog2(N);

  for (genvar l = 0; l < LEVELS; l++) begin : lvl
    localparam int unsigned W = l + 1;
    localparam int unsigned M = N >> (l + 1);
    logic [W:0] s [M];
    for (genvar k = 0; k < M; k++) begin : node
      if (l == 0) begin : leaf
        adderreg #(.SIZE(1)) u_add (
          .clk    (clk),
          .rst    (rst),
          .input1 (InPort[2*k]),
          .input2 (InPort[2*k+1]),
          .sum    (s[k])
        );
      end else begin : inner
        adderreg #(.SIZE(W)) u_add (
          .clk    (clk),
          .rst    (rst),
          .input1 (lvl[l-1].s[2*k]),
          .input2 (lvl[l-1].s[2*k+1]),
          .sum    (s[k])
        );
      end
    end
  end

  assign OutPort = lvl[LEVELS-1].s[0];

endmodule
