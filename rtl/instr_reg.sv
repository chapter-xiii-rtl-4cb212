// instr_reg: general instruction register, read as either R- or I-format.
//
// On a rising clock edge with ld high the register captures instr_in; with ld
// low it captures a nop (all zeros), so every loaded instruction is presented
// to the decoder for exactly one clock cycle. Reset (synchronous, active low)
// also leaves a nop. The held word is split into both formats at once:
// opcode[31:26], Z[25:21], X[20:16], Y[15:11] (R-format) and imm[15:0]
// (I-format); which fields matter is up to the decoder. The field positions
// follow the instruction formats of the design; the nop-on-idle behaviour is
// this design's choice.
module instr_reg
  import isa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic [XLEN-1:0]     instr_in,
  output logic [XLEN-1:0]     instr,
  output logic [OPCODE_W-1:0] opcode,
  output logic [RADDR_W-1:0]  z,
  output logic [RADDR_W-1:0]  x,
  output logic [RADDR_W-1:0]  y,
  output logic [IMM_W-1:0]    imm
);

  always_ff @(posedge clk) begin
    if (!rst_n)  instr <= '0;
    else if (ld) instr <= instr_in;
    else         instr <= '0;
  end

  assign opcode = f_opcode(instr);
  assign z      = f_z(instr);
  assign x      = f_x(instr);
  assign y      = f_y(instr);
  assign imm    = f_imm(instr);

endmodule
