// onectr_piso: ones counter with a parallel-in serial-out shift register.
//
// While start is high, each rising edge loads InPort into a 64-bit shift
// register and clears the 7-bit result. While start is low, each edge shifts
// the register right by one (a zero enters at the top) and adds the bit
// leaving at the bottom to the result. 64 edges after start falls the
// register is empty and OutPort (the result register) holds the count, which
// then stays. InPort need only be valid while start is high. 71 flip-flops.
// The behaviour is the document's.
module onectr_piso
  import onectr_pkg::*;
(
  input  logic             clk,
  input  logic             start,
  input  logic [IN_W-1:0]  InPort,
  output logic [OUT_W-1:0] OutPort
);

  logic [IN_W-1:0] shreg;

  always_ff @(posedge clk) begin
    if (start) begin
      shreg   <= InPort;
      OutPort <= '0;
    end else begin
      shreg   <= {1'b0, shreg[IN_W-1:1]};
      OutPort <= OutPort + OUT_W'(shreg[0]);
    end
  end

endmodule
