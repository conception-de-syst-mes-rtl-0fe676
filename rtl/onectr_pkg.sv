// onectr_pkg: types and constants shared by the ones-counter designs.
//
// The word whose ones are counted is 64 bits wide and the count is 7 bits
// wide, as in the OneCtr entity. The processor version works on 8-bit data:
// its register file holds 16 bytes, its input multiplexer has ten sources and
// its ALU has a 3-bit operation code. The register and multiplexer codes
// below are the binary codes of the control-signal table of the processor;
// the ALU operation codes and the bit order of the ROM word are this design's
// own choice, the names of the operations are the document's.
package onectr_pkg;

  localparam int unsigned IN_W  = 64;  // width of InPort
  localparam int unsigned OUT_W = 7;   // width of OutPort
  localparam int unsigned D_W   = 8;   // processor data width
  localparam int unsigned PC_W  = 8;   // program counter / ROM address width
  localparam int unsigned RA_W  = 4;   // register address width
  localparam int unsigned NREG  = 16;  // registers in the register file

  // Sources of the register-file write data (SEL field).
  typedef enum logic [3:0] {
    SEL_CTRL = 4'd0,  // constant from the instruction (CTRL field)
    SEL_IN0  = 4'd1,  // InPort[7:0]
    SEL_IN1  = 4'd2,
    SEL_IN2  = 4'd3,
    SEL_IN3  = 4'd4,
    SEL_IN4  = 4'd5,
    SEL_IN5  = 4'd6,
    SEL_IN6  = 4'd7,
    SEL_IN7  = 4'd8,  // InPort[63:56]
    SEL_ALU  = 4'd9   // ALU result Y
  } sel_e;

  // Register-file addresses (WA, RAA, RAB fields).
  typedef enum logic [RA_W-1:0] {
    R_RESULT = 4'd0,
    R_MASK   = 4'd1,
    R_DATA0  = 4'd2,
    R_DATA1  = 4'd3,
    R_DATA2  = 4'd4,
    R_DATA3  = 4'd5,
    R_DATA4  = 4'd6,
    R_DATA5  = 4'd7,
    R_DATA6  = 4'd8,
    R_DATA7  = 4'd9,
    R_COUNT  = 4'd10,
    R_TMP    = 4'd11,
    R_ZERO   = 4'd12,
    R_ONE    = 4'd13,
    R_EIGHT  = 4'd14,
    R_SPARE  = 4'd15  // unused by the program
  } reg_e;

  // ALU operations (OP field).
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,  // Y = A + B
    OP_SHR = 3'd1,  // Y = A >> 1
    OP_AND = 3'd2,  // Y = A and B
    OP_EQ  = 3'd3   // F = (A == B), Y = F zero-extended
  } op_e;

  // One 38-bit word of the program ROM, most significant field first.
  typedef struct packed {
    logic [PC_W-1:0] addr;  // jump target
    logic            jp;    // unconditional jump
    logic            jf;    // jump if Flag is set
    logic [D_W-1:0]  ctrl;  // constant for SEL_CTRL
    sel_e            sel;   // write-data source
    logic            wen;   // register-file write enable
    reg_e            wa;    // write address
    reg_e            raa;   // read address A
    reg_e            rab;   // read address B
    op_e             op;    // ALU operation
  } instr_t;


endpackage
