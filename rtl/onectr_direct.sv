// onectr_direct: ones counter written as a single behavioural sum.
//
// A loop adds the 64 input bits one after the other into a 7-bit total and
// leaves the adder structure to synthesis (which, in the document's
// comparison, gave the same size and speed as the explicit tree). Purely
// combinational. The description is the document's.
module onectr_direct
  import onectr_pkg::*;
(
  input  logic [IN_W-1:0]  InPort,
  output logic [OUT_W-1:0] OutPort
);

  always_comb begin
    OutPort = '0;
    for (int i = 0; i < IN_W; i++) OutPort = OutPort + OUT_W'(InPort[i]);
  end

endmodule
