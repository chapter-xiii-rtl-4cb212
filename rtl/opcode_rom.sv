// opcode_rom: the instruction decoder, a ROM from opcode to DPU control word.
//
// The 6-bit opcode addresses a 64-word ROM; each word (isa_pkg::ctrl_t) holds
// rwe, imm en, au en, a/s, lu en, lf, su en, st, st en, ld en, r/w and msel.
// The ROM contents are computed at elaboration by rom_word() from the opcode
// list in isa_pkg; unassigned opcodes hold the nop word (nothing enabled, no
// register or memory write). Purely combinational: ctrl follows opcode in the
// same cycle.
//
// The add row (au en=1, a/s=0, rwe=1, every other unit and the memory path
// off) is as specified for the design. The other rows are derived from what
// each instruction does; lw and sw also enable the AU with the immediate so
// that it forms the base+offset address.
module opcode_rom
  import isa_pkg::*;
(
  input  logic [OPCODE_W-1:0] opcode,
  output ctrl_t               ctrl
);

  localparam int unsigned ROM_WORDS = 2 ** OPCODE_W;

  function automatic ctrl_t rom_word(input logic [OPCODE_W-1:0] op);
    ctrl_t c;
    c = CTRL_NOP;
    case (op)
      OP_ADD:  begin c.rwe = 1'b1; c.au_en = 1'b1; end
      OP_SUB:  begin c.rwe = 1'b1; c.au_en = 1'b1; c.a_s = 1'b1; end
      OP_AND:  begin c.rwe = 1'b1; c.lu_en = 1'b1; c.lf = LF_AND; end
      OP_OR:   begin c.rwe = 1'b1; c.lu_en = 1'b1; c.lf = LF_OR;  end
      OP_XOR:  begin c.rwe = 1'b1; c.lu_en = 1'b1; c.lf = LF_XOR; end
      OP_SL:   begin c.rwe = 1'b1; c.su_en = 1'b1; c.st = ST_SLL; end
      OP_SA:   begin c.rwe = 1'b1; c.su_en = 1'b1; c.st = ST_SRA; end
      OP_ROT:  begin c.rwe = 1'b1; c.su_en = 1'b1; c.st = ST_ROR; end
      OP_ADDI: begin c.rwe = 1'b1; c.imm_en = 1'b1; c.au_en = 1'b1; end
      OP_SUBI: begin c.rwe = 1'b1; c.imm_en = 1'b1; c.au_en = 1'b1; c.a_s = 1'b1; end
      OP_ANDI: begin c.rwe = 1'b1; c.imm_en = 1'b1; c.lu_en = 1'b1; c.lf = LF_AND; end
      OP_ORI:  begin c.rwe = 1'b1; c.imm_en = 1'b1; c.lu_en = 1'b1; c.lf = LF_OR;  end
      OP_XORI: begin c.rwe = 1'b1; c.imm_en = 1'b1; c.lu_en = 1'b1; c.lf = LF_XOR; end
      OP_SLI:  begin c.rwe = 1'b1; c.imm_en = 1'b1; c.su_en = 1'b1; c.st = ST_SLL; end
      OP_SAI:  begin c.rwe = 1'b1; c.imm_en = 1'b1; c.su_en = 1'b1; c.st = ST_SRA; end
      OP_ROTI: begin c.rwe = 1'b1; c.imm_en = 1'b1; c.su_en = 1'b1; c.st = ST_ROR; end
      OP_LW:   begin c.rwe = 1'b1; c.imm_en = 1'b1; c.au_en = 1'b1;
                     c.ld_en = 1'b1; c.rw = 1'b1; c.msel = 1'b1; end
      OP_SW:   begin c.imm_en = 1'b1; c.au_en = 1'b1;
                     c.st_en = 1'b1; c.rw = 1'b0; end
      default: c = CTRL_NOP;
    endcase
    return c;
  endfunction

  function automatic ctrl_t [ROM_WORDS-1:0] build_rom();
    ctrl_t [ROM_WORDS-1:0] r;
    for (int a = 0; a < ROM_WORDS; a++) r[a] = rom_word(OPCODE_W'(a));
    return r;
  endfunction

  localparam ctrl_t [ROM_WORDS-1:0] ROM = build_rom();

  assign ctrl = ROM[opcode];

endmodule
