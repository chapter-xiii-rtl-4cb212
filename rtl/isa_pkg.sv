// isa_pkg: types and constants shared by the single-cycle ISA microprocessor.
//
// A 32-bit instruction carries a 6-bit opcode in bits 31..26, a destination
// register Z in 25..21, a first source X in 20..16 and either a second source
// Y in 15..11 (R-format) or a 16-bit immediate in 15..0 (I-format). The
// opcode addresses a ROM whose word, ctrl_t, holds the DPU control signals in
// the order rwe, imm en, au en, a/s, lu en, lf(4), su en, st(2), st en,
// ld en, r/w, msel.
//
// The opcode values of add, sub, and, or, lw, sw, addi and nop follow the
// MIPS values; the remaining opcodes, the logic-function code (a 4-bit truth
// table) and the shift-type code are choices of this design.
package isa_pkg;

  localparam int unsigned XLEN      = 32;  // data path and instruction width
  localparam int unsigned OPCODE_W  = 6;   // opcode field width
  localparam int unsigned RADDR_W   = 5;   // register address width
  localparam int unsigned NREGS     = 32;  // registers in the register file
  localparam int unsigned IMM_W     = 16;  // immediate field width

  // Opcodes. First eight: MIPS values; the rest: this design's assignment.
  typedef enum logic [OPCODE_W-1:0] {
    OP_NOP  = 6'b000000,
    OP_ADD  = 6'b100000,
    OP_SUB  = 6'b100010,
    OP_AND  = 6'b100100,
    OP_OR   = 6'b100101,
    OP_LW   = 6'b100011,
    OP_SW   = 6'b101011,
    OP_ADDI = 6'b001000,
    OP_XOR  = 6'b100110,
    OP_SL   = 6'b000100,
    OP_SA   = 6'b000111,
    OP_ROT  = 6'b000110,
    OP_SUBI = 6'b001001,
    OP_ANDI = 6'b001100,
    OP_ORI  = 6'b001101,
    OP_XORI = 6'b001110,
    OP_SLI  = 6'b000001,
    OP_SAI  = 6'b000011,
    OP_ROTI = 6'b000010
  } opcode_e;

  // Logic-unit function: result bit = lf[{x_bit, y_bit}].
  localparam logic [3:0] LF_AND  = 4'b1000;
  localparam logic [3:0] LF_OR   = 4'b1110;
  localparam logic [3:0] LF_XOR  = 4'b0110;

  // Shift-unit type.
  typedef enum logic [1:0] {
    ST_SLL  = 2'b00,   // logical shift left
    ST_SRA  = 2'b01,   // arithmetic shift right
    ST_ROR  = 2'b10,   // rotate right
    ST_PASS = 2'b11    // X unshifted
  } shift_e;

  // One ROM word: the DPU control signals.
  typedef struct packed {
    logic       rwe;     // register file write enable
    logic       imm_en;  // immediate onto the Y bus
    logic       au_en;   // arithmetic unit drives Z
    logic       a_s;     // 0 add, 1 subtract
    logic       lu_en;   // logic unit drives Z
    logic [3:0] lf;      // logic function
    logic       su_en;   // shift unit drives Z
    shift_e     st;      // shift type
    logic       st_en;   // store path enable (register data to memory)
    logic       ld_en;   // load path enable (memory data to DPU)
    logic       rw;      // memory direction: 1 read, 0 write
    logic       msel;    // Z bus source: 0 functional units, 1 memory
  } ctrl_t;


  localparam ctrl_t CTRL_NOP = '{rwe: 1'b0, imm_en: 1'b0, au_en: 1'b0, a_s: 1'b0,
                                 lu_en: 1'b0, lf: 4'b0000, su_en: 1'b0, st: ST_SLL,
                                 st_en: 1'b0, ld_en: 1'b0, rw: 1'b1, msel: 1'b0};

  // Instruction field extraction.
  function automatic logic [OPCODE_W-1:0] f_opcode(input logic [XLEN-1:0] i);
    return i[31:26];
  endfunction
  function automatic logic [RADDR_W-1:0] f_z(input logic [XLEN-1:0] i);
    return i[25:21];
  endfunction
  function automatic logic [RADDR_W-1:0] f_x(input logic [XLEN-1:0] i);
    return i[20:16];
  endfunction
  function automatic logic [RADDR_W-1:0] f_y(input logic [XLEN-1:0] i);
    return i[15:11];
  endfunction
  function automatic logic [IMM_W-1:0] f_imm(input logic [XLEN-1:0] i);
    return i[15:0];
  endfunction

endpackage
