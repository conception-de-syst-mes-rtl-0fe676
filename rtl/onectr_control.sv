// onectr_control: control unit of the ones-counting processor.
//
// An 8-bit program counter addresses the program ROM; the ROM word drives
// the datapath directly. Next PC:
//   start high                 -> 0 (the program waits at its first word)
//   JP, or JF with Flag high   -> the word's ADDR field
//   otherwise                  -> PC + 1
// The PC is loaded on every rising edge of clk, so one instruction executes
// per cycle; start acts as a synchronous clear. Flag comes from the datapath
// flip-flop holding the ALU's F of the previous instruction. The 8-bit PC,
// the 38-bit word, the two jump kinds (always, or when Flag is set), the
// increment/jump multiplexer and start clearing the PC follow the document;
// the synchronous clear and the pc output, for observing the program, are
// this design's.
module onectr_control
  import onectr_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  logic            Flag,
  output logic [D_W-1:0]  Ctrl,
  output sel_e            Sel,
  output logic            Wen,
  output reg_e            WA,
  output reg_e            RAA,
  output reg_e            RAB,
  output op_e             Op,
  output logic [PC_W-1:0] pc
);

  instr_t          word;
  logic            take_jump;
  logic [PC_W-1:0] pc_next;

  onectr_rom u_rom (
    .addr (pc),
    .data (word)
  );

  assign take_jump = word.jp | (word.jf & Flag);
  assign pc_next   = take_jump ? word.addr : pc + 1'b1;

  always_ff @(posedge clk) begin
    if (start) pc <= '0;
    else       pc <= pc_next;
  end

  // start always brings the program back to its first word.
  a_start_clears: assert property (@(posedge clk) start |=> pc == '0);

  assign Ctrl = word.ctrl;
  assign Sel  = word.sel;
  assign Wen  = word.wen;
  assign WA   = word.wa;
  assign RAA  = word.raa;
  assign RAB  = word.rab;
  assign Op   = word.op;

endmodule
