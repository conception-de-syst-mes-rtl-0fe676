// onectr_tree: combinational ones counter built as a binary adder tree.
//
// Level 1 adds the input bits in pairs (32 one-bit adders giving 2-bit
// counts), level 2 adds those counts in pairs (16 two-bit adders) and so on:
// with N = 64 inputs there are log2(N) = 6 levels and 63 adders, the last one
// giving the 7-bit count. Adder k of a level takes the outputs of adders 2k
// and 2k+1 of the level before, so level 1 adder k counts InPort[2k] and
// InPort[2k+1]. No clock: OutPort settles after six adder delays. The
// structure is the document's; N must be a power of two.
module onectr_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]          InPort,
  output logic [$clog2(N):0]    OutPort
);

  localparam int unsigned LEVELS = $clog2(N);

  for (genvar l = 0; l < LEVELS; l++) begin : lvl
    // Level l+1: N >> (l+1) adders of (l+1)-bit operands.
    localparam int unsigned W = l + 1;
    localparam int unsigned M = N >> (l + 1);
    logic [W:0] s [M];
    for (genvar k = 0; k < M; k++) begin : node
      if (l == 0) begin : leaf
        adder #(.SIZE(1)) u_add (
          .input1 (InPort[2*k]),
          .input2 (InPort[2*k+1]),
          .sum    (s[k])
        );
      end else begin : inner
        adder #(.SIZE(W)) u_add (
          .input1 (lvl[l-1].s[2*k]),
          .input2 (lvl[l-1].s[2*k+1]),
          .sum    (s[k])
        );
      end
    end
  end

  assign OutPort = lvl[LEVELS-1].s[0];

endmodule
