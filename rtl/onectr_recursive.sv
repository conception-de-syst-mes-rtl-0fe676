// onectr_recursive: ones counter described recursively.
//
// A counter of SIZE bits is two counters, of SIZE/2 and SIZE-SIZE/2 bits, on
// the low and high parts of InPort, plus one adder on their zero-extended
// counts. A 1-bit counter is the bit itself. The output has
// floor(log2(SIZE+1))+1 bits, 7 for SIZE = 64. Any SIZE >= 1 works, powers
// of two or not. Purely combinational. The recursion and the output width are
// the document's; its component declaration defaults SIZE to 8, the default
// here is the 64 bits of the case study.
//
// When this module alone is linted as the top, Verilator reports the
// top instance's ports and half-block signals as unused or undriven: it does
// not expand the recursion of a recursive top for lint. Inside a parent
// (onectr_top, the testbenches) the module elaborates completely, those
// warnings do not appear, and it simulates correctly.
module onectr_recursive #(
  parameter int unsigned SIZE = 64
) (
  input  logic [SIZE-1:0]            InPort,
  output logic [$clog2(SIZE+2)-1:0]  OutPort
);

  localparam int unsigned OW = $clog2(SIZE + 2);

  if (SIZE == 1) begin : g_leaf
    assign OutPort = {1'b0, InPort[0]};
  end else begin : g_split
    localparam int unsigned S0 = SIZE / 2;
    localparam int unsigned S1 = SIZE - SIZE / 2;
    localparam int unsigned W0 = $clog2(S0 + 2);
    localparam int unsigned W1 = $clog2(S1 + 2);

    logic [W0-1:0] cnt0;
    logic [W1-1:0] cnt1;
    logic [OW-1:0] op1, op2;

    onectr_recursive #(.SIZE(S0)) c0 (
      .InPort  (InPort[S0-1:0]),
      .OutPort (cnt0)
    );
    onectr_recursive #(.SIZE(S1)) c1 (
      .InPort  (InPort[SIZE-1:S0]),
      .OutPort (cnt1)
    );

    assign op1     = OW'(cnt0);
    assign op2     = OW'(cnt1);
    assign OutPort = op1 + op2;
  end

endmodule
