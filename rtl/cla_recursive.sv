// cla_recursive: carry-lookahead adder described recursively.
//
// An adder of SIZE bits is two adders on the low SIZE/2 bits and the high
// SIZE-SIZE/2 bits, joined by one lookahead cell. Each half reports a group
// generate g (the half makes a carry by itself) and a group propagate p (a
// carry entering the half leaves it). The lookahead cell gives the high half
// its carry in, c_hi = g_lo | (p_lo & c), and combines the two halves into
// g = g_hi | (p_hi & g_lo) and p = p_hi & p_lo. A 1-bit adder is a full-adder
// cell: s = a ^ b ^ c, g = a & b, p = a ^ b. The carry out of the whole adder
// is g | (p & c). With SIZE = 8 this gives the three levels of lookahead cells
// (1+2+4 = 7 cells) over eight bit cells of the document's example. Purely
// combinational. The recursive decomposition, port names (a, b, c, s, G, P)
// and the 8-bit size are the document's; the cell equations are the standard
// lookahead equations, as the gates themselves are only drawn there.
//
// When this module alone is linted as the top, Verilator reports the
// top instance's ports and half-block signals as unused or undriven: it does
// not expand the recursion of a recursive top for lint. Inside a parent
// (onectr_top, the testbenches) the module elaborates completely, those
// warnings do not appear, and it simulates correctly.
module cla_recursive #(
  parameter int unsigned SIZE = 8
) (
  input  logic [SIZE-1:0] a,
  input  logic [SIZE-1:0] b,
  input  logic            c,     // carry in (c0)
  output logic [SIZE-1:0] s,
  output logic            g,     // group generate  G(0,SIZE-1)
  output logic            p      // group propagate P(0,SIZE-1)
);

  if (SIZE == 1) begin : g_bit
    assign s = a ^ b ^ c;
    assign g = a & b;
    assign p = a ^ b;
  end else begin : g_split
    localparam int unsigned S0 = SIZE / 2;
    localparam int unsigned S1 = SIZE - SIZE / 2;

    logic g_lo, p_lo, g_hi, p_hi, c_hi;

    cla_recursive #(.SIZE(S0)) lo (
      .a (a[S0-1:0]),
      .b (b[S0-1:0]),
      .c (c),
      .s (s[S0-1:0]),
      .g (g_lo),
      .p (p_lo)
    );

    cla_recursive #(.SIZE(S1)) hi (
      .a (a[SIZE-1:S0]),
      .b (b[SIZE-1:S0]),
      .c (c_hi),
      .s (s[SIZE-1:S0]),
      .g (g_hi),
      .p (p_hi)
    );

    // lookahead cell
    assign c_hi = g_lo | (p_lo & c);
    assign g    = g_hi | (p_hi & g_lo);
    assign p    = p_hi & p_lo;
  end

endmodule
