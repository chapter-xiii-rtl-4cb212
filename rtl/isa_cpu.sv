// isa_cpu: a single-cycle microprocessor for a MIPS-like 32-bit ISA.
//
// Machine instructions arrive on instr_in and are captured by the
// instruction register when instr_ld is high. During the following clock
// cycle the opcode ROM turns the 6-bit opcode into DPU control signals, the
// register fields drive the register file addresses, and the DPU computes the
// result, which is written back at the end of that cycle. One instruction is
// accepted per clock; a cycle without instr_ld executes a nop. The data memory
// serves lw and sw in the same cycle.
//
// Field wiring: opcode[31:26] to the ROM, Z[25:21] to the write address,
// X[20:16] to the X read address, Y[15:11] to the Y read address and
// imm[15:0] to the sign extension. For sw the register to store is named in
// the Z field, so the Y read address is taken from Z when st_en is set.
//
// Observation ports: wb_en/wb_addr/wb_data show the write-back of the
// instruction now executing; mem_addr/mem_wdata/mem_we show its memory access.
// The instruction register, ROM decoder and DPU follow the design; the
// instruction interface, the nop-on-idle register and the data memory size
// are this design's choices.
module isa_cpu
  import isa_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [XLEN-1:0]    instr_in,
  input  logic               instr_ld,
  output logic               wb_en,
  output logic [RADDR_W-1:0] wb_addr,
  output logic [XLEN-1:0]    wb_data,
  output logic [XLEN-1:0]    mem_addr,
  output logic [XLEN-1:0]    mem_wdata,
  output logic               mem_we
);

  logic [XLEN-1:0]     instr;
  logic [OPCODE_W-1:0] opcode;
  logic [RADDR_W-1:0]  f_zf, f_xf, f_yf, y_ra;
  logic [IMM_W-1:0]    imm;
  ctrl_t               ctrl;
  logic [XLEN-1:0]     mem_rdata, z_bus;

  instr_reg u_ir (
    .clk     (clk),
    .rst_n   (rst_n),
    .ld      (instr_ld),
    .instr_in(instr_in),
    .instr   (instr),
    .opcode  (opcode),
    .z       (f_zf),
    .x       (f_xf),
    .y       (f_yf),
    .imm     (imm)
  );

  opcode_rom u_rom (
    .opcode(opcode),
    .ctrl  (ctrl)
  );

  assign y_ra = ctrl.st_en ? f_zf : f_yf;

  dpu u_dpu (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (ctrl),
    .z_wa     (f_zf),
    .x_ra     (f_xf),
    .y_ra     (y_ra),
    .imm      (imm),
    .mem_rdata(mem_rdata),
    .mem_addr (mem_addr),
    .mem_wdata(mem_wdata),
    .mem_we   (mem_we),
    .z_bus    (z_bus)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk  (clk),
    .we   (mem_we),
    .addr (mem_addr),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  assign wb_en   = ctrl.rwe;
  assign wb_addr = f_zf;
  assign wb_data = z_bus;

endmodule
