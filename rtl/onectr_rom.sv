// onectr_rom: program ROM of the ones-counting processor.
//
// 256 words of 38 bits (instr_t in onectr_pkg), read combinationally: data
// follows addr after a delay. Each word drives the datapath for one cycle
// (CTRL, SEL, WEN, WA, RAA, RAB, OP) and the program counter (ADDR, JP, JF).
// The program, one instruction per cycle:
//
//   0        Result <- 0                      CTRL constant
//   1        Mask   <- 1
//   2..9     Data<i> <- InPort[8i+7:8i]       i = 0..7
//   10       Count  <- 0
//   11       Zero   <- 0
//   12       One    <- 1
//   13       Eight  <- 8
//   14..37   LoopBegin: for i = 0..7 (three words each, at 14+3i)
//              Tmp     <- Data<i> and Mask
//              Result  <- Result + Tmp
//              Data<i> <- Data<i> >> 1
//   38       Count  <- Count + One
//   39       Flag   <- Count EQ Eight          (no register write)
//   40       if Flag, jump to 42 (LoopOut)
//   41       jump to 14 (LoopBegin)
//   42       LoopOut: Y = Result + Zero, jump to 42 (holds OutPort = Result)
//   43..255  jump to 42
//
// After start is released at address 0 the program reaches address 42 in
// 14 + 7*28 + 27 = 237 cycles. The instruction set, the register and source
// codes, the use of registers holding the constants the ALU needs (Eight) and
// the flag-then-jump loop exit are the document's; the order of the program,
// the One and Zero registers, the final hold loop and the bit order of the
// word are this design's own. The contents are computed from the address by
// the function prog_word below rather than listed.
module onectr_rom
  import onectr_pkg::*;
(
  input  logic [PC_W-1:0] addr,
  output instr_t          data
);

  localparam logic [PC_W-1:0] LOOP_BEGIN = 8'd14;
  localparam logic [PC_W-1:0] LOOP_OUT   = 8'd42;

  // Register write of a constant or an InPort byte.
  function automatic instr_t load(input sel_e sel, input logic [D_W-1:0] k,
                                  input reg_e wa);
    instr_t i;
    i      = '0;
    i.sel  = sel;
    i.ctrl = k;
    i.wen  = 1'b1;
    i.wa   = wa;
    return i;
  endfunction

  // ALU operation A op B, written back to wa when wen is set.
  function automatic instr_t alu(input op_e op, input reg_e raa,
                                 input reg_e rab, input logic wen,
                                 input reg_e wa);
    instr_t i;
    i      = '0;
    i.sel  = SEL_ALU;
    i.op   = op;
    i.raa  = raa;
    i.rab  = rab;
    i.wen  = wen;
    i.wa   = wa;
    return i;
  endfunction

  function automatic instr_t prog_word(input logic [PC_W-1:0] a);
    instr_t i;
    int unsigned k, n;
    unique case (a) inside
      8'd0:        i = load(SEL_CTRL, 8'd0, R_RESULT);
      8'd1:        i = load(SEL_CTRL, 8'd1, R_MASK);
      [8'd2:8'd9]: begin
        n = int'(a) - 2;
        i = load(sel_e'(int'(SEL_IN0) + n), 8'd0, reg_e'(int'(R_DATA0) + n));
      end
      8'd10:       i = load(SEL_CTRL, 8'd0, R_COUNT);
      8'd11:       i = load(SEL_CTRL, 8'd0, R_ZERO);
      8'd12:       i = load(SEL_CTRL, 8'd1, R_ONE);
      8'd13:       i = load(SEL_CTRL, 8'd8, R_EIGHT);
      [8'd14:8'd37]: begin
        n = (int'(a) - 14) / 3;  // which data byte
        k = (int'(a) - 14) % 3;  // which step for that byte
        case (k)
          0:       i = alu(OP_AND, reg_e'(int'(R_DATA0) + n), R_MASK, 1'b1, R_TMP);
          1:       i = alu(OP_ADD, R_RESULT, R_TMP, 1'b1, R_RESULT);
          default: i = alu(OP_SHR, reg_e'(int'(R_DATA0) + n), R_ZERO, 1'b1,
                           reg_e'(int'(R_DATA0) + n));
        endcase
      end
      8'd38:       i = alu(OP_ADD, R_COUNT, R_ONE, 1'b1, R_COUNT);
      8'd39:       i = alu(OP_EQ, R_COUNT, R_EIGHT, 1'b0, R_RESULT);
      8'd40: begin
        i      = alu(OP_ADD, R_RESULT, R_ZERO, 1'b0, R_RESULT);
        i.jf   = 1'b1;
        i.addr = LOOP_OUT;
      end
      8'd41: begin
        i      = alu(OP_ADD, R_RESULT, R_ZERO, 1'b0, R_RESULT);
        i.jp   = 1'b1;
        i.addr = LOOP_BEGIN;
      end
      default: begin  // LoopOut and the unused words
        i      = alu(OP_ADD, R_RESULT, R_ZERO, 1'b0, R_RESULT);
        i.jp   = 1'b1;
        i.addr = LOOP_OUT;
      end
    endcase
    return i;
  endfunction

  always_comb data = prog_word(addr);

endmodule
