// onectr_mux: ones counter with an input multiplexer.
//
// A counter selects one bit of InPort per cycle through a 64-to-1
// multiplexer and the selected bit is added to the 7-bit result. While start
// is high, each rising edge clears the counter and the result. While start is
// low, each edge adds InPort[counter] and increments the counter; after 64
// edges the count is complete and the circuit stops, holding OutPort until
// the next start. InPort must stay stable for those 64 cycles. The selection
// by counter and multiplexer is the document's; the seventh counter bit,
// which stops the circuit after 64 bits instead of letting the count wrap
// around and add the word again, is this design's own.
module onectr_mux
  import onectr_pkg::*;
(
  input  logic             clk,
  input  logic             start,
  input  logic [IN_W-1:0]  InPort,
  output logic [OUT_W-1:0] OutPort
);

  localparam int unsigned CW = $clog2(IN_W);

  logic [CW:0] counter;  // bit CW set: all bits added

  always_ff @(posedge clk) begin
    if (start) begin
      counter <= '0;
      OutPort <= '0;
    end else if (!counter[CW]) begin
      counter <= counter + 1'b1;
      OutPort <= OutPort + OUT_W'(InPort[counter[CW-1:0]]);
    end
  end

  // Once in range (after a start), the counter stops at IN_W and never wraps.
  a_counter_bound: assert property (@(posedge clk)
    counter <= (CW+1)'(IN_W) |=> counter <= (CW+1)'(IN_W));

endmodule
