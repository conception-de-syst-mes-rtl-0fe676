// onectr_regfile: 16 x 8-bit register file of the ones-counting processor.
//
// Two read ports, A = reg[RAA] and B = reg[RAB], are combinational: they
// follow the addresses after a delay and show a write only after the clock
// edge that makes it. One write port stores W into reg[WA] on the rising
// edge of clk when WEN is high. There is no reset: the program writes every
// register it reads before reading it. Port names, widths and the timing of
// reads and writes follow the document; the lack of reset is this design's.
module onectr_regfile
  import onectr_pkg::*;
(
  input  logic            clk,
  input  logic            wen,
  input  logic [RA_W-1:0] wa,
  input  logic [D_W-1:0]  w,
  input  logic [RA_W-1:0] raa,
  input  logic [RA_W-1:0] rab,
  output logic [D_W-1:0]  a,
  output logic [D_W-1:0]  b
);

  logic [D_W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (wen) regs[wa] <= w;
  end

  assign a = regs[raa];
  assign b = regs[rab];

endmodule
