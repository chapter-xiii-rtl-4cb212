// tb_opcode_rom: self-checking test of the opcode ROM.
// The expected control word of every one of the 64 opcodes is written out
// here as a table, field by field, independently of the ROM's function.
module tb_opcode_rom;
  import isa_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  opcode_rom dut (.opcode(opcode), .ctrl(ctrl));

  // fields: rwe imm au a_s lu lf su st st_en ld_en rw msel
  function automatic logic [15:0] expected(input logic [5:0] op);
    case (op)
      6'b100000: return {1'b1,1'b0,1'b1,1'b0,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // add
      6'b100010: return {1'b1,1'b0,1'b1,1'b1,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // sub
      6'b100100: return {1'b1,1'b0,1'b0,1'b0,1'b1,4'b1000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // and
      6'b100101: return {1'b1,1'b0,1'b0,1'b0,1'b1,4'b1110,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // or
      6'b100110: return {1'b1,1'b0,1'b0,1'b0,1'b1,4'b0110,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // xor
      6'b000100: return {1'b1,1'b0,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b00,1'b0,1'b0,1'b1,1'b0}; // sl
      6'b000111: return {1'b1,1'b0,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b01,1'b0,1'b0,1'b1,1'b0}; // sa
      6'b000110: return {1'b1,1'b0,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b10,1'b0,1'b0,1'b1,1'b0}; // rot
      6'b001000: return {1'b1,1'b1,1'b1,1'b0,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // addi
      6'b001001: return {1'b1,1'b1,1'b1,1'b1,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // subi
      6'b001100: return {1'b1,1'b1,1'b0,1'b0,1'b1,4'b1000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // andi
      6'b001101: return {1'b1,1'b1,1'b0,1'b0,1'b1,4'b1110,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // ori
      6'b001110: return {1'b1,1'b1,1'b0,1'b0,1'b1,4'b0110,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // xori
      6'b000001: return {1'b1,1'b1,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b00,1'b0,1'b0,1'b1,1'b0}; // sli
      6'b000011: return {1'b1,1'b1,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b01,1'b0,1'b0,1'b1,1'b0}; // sai
      6'b000010: return {1'b1,1'b1,1'b0,1'b0,1'b0,4'b0000,1'b1,2'b10,1'b0,1'b0,1'b1,1'b0}; // roti
      6'b100011: return {1'b1,1'b1,1'b1,1'b0,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b1,1'b1,1'b1}; // lw
      6'b101011: return {1'b0,1'b1,1'b1,1'b0,1'b0,4'b0000,1'b0,2'b00,1'b1,1'b0,1'b0,1'b0}; // sw
      default:   return {1'b0,1'b0,1'b0,1'b0,1'b0,4'b0000,1'b0,2'b00,1'b0,1'b0,1'b1,1'b0}; // nop
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op);
      #1;
      checks++;
      if (16'(ctrl) !== expected(6'(op))) begin
        failures++;
        $display("FAIL opcode %b ctrl=%b exp=%b", 6'(op), 16'(ctrl), expected(6'(op)));
      end
    end
    // the control signals listed for R10 = R8 + R9
    opcode = 6'b100000;
    #1;
    checks++;
    if (!(ctrl.a_s == 0 && ctrl.au_en == 1 && ctrl.lu_en == 0 && ctrl.su_en == 0 &&
          ctrl.st_en == 0 && ctrl.ld_en == 0 && ctrl.msel == 0 && ctrl.rwe == 1)) begin
      failures++;
      $display("FAIL add control signals");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
