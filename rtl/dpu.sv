// dpu: the single-cycle datapath unit.
//
// The register file drives the X bus from x_ra and, through imm_sext, the Y
// bus from y_ra or from the sign-extended immediate when imm_en is set. The
// arithmetic, logic and shift units all see X and Y; the one enabled by the
// control word drives the Z bus, which the register file writes to z_wa at
// the next rising clock edge when rwe is set. For a load (ld_en and msel) the
// memory read data replaces the unit result on the Z bus. Every instruction
// takes one clock cycle.
//
// Memory side: the address is the AU result, so "lw $z, off($x)" reads
// M[x + off] (with offset 0 this is the X bus itself); store data is the
// register file's Y output, read from y_ra; mem_we is st_en with r/w = 0.
// The units, buses, control signals and 32 x 32 register file follow the
// design; the OR-combined Z bus (in place of enabled bus drivers), the
// address taken from the AU and the store data taken ahead of the immediate
// multiplexer are this design's choices.
module dpu
  import isa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_t              ctrl,
  input  logic [RADDR_W-1:0] z_wa,
  input  logic [RADDR_W-1:0] x_ra,
  input  logic [RADDR_W-1:0] y_ra,
  input  logic [IMM_W-1:0]   imm,
  input  logic [XLEN-1:0]    mem_rdata,
  output logic [XLEN-1:0]    mem_addr,
  output logic [XLEN-1:0]    mem_wdata,
  output logic               mem_we,
  output logic [XLEN-1:0]    z_bus
);

  logic [XLEN-1:0] x_bus, y_do, y_bus, imm_ext;
  logic [XLEN-1:0] au_z, lu_z, su_z, unit_z;

  reg_file #(.WIDTH(XLEN), .DEPTH(NREGS)) u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .rwe  (ctrl.rwe),
    .z_wa (z_wa),
    .z_di (z_bus),
    .x_ra (x_ra),
    .y_ra (y_ra),
    .x_do (x_bus),
    .y_do (y_do)
  );

  imm_sext u_imm (
    .imm    (imm),
    .im_en  (ctrl.imm_en),
    .y_do   (y_do),
    .imm_ext(imm_ext),
    .y_bus  (y_bus)
  );

  arith_unit #(.WIDTH(XLEN)) u_au (
    .x(x_bus), .y(y_bus), .a_s(ctrl.a_s), .en(ctrl.au_en), .z(au_z)
  );

  logic_unit #(.WIDTH(XLEN)) u_lu (
    .x(x_bus), .y(y_bus), .lf(ctrl.lf), .en(ctrl.lu_en), .z(lu_z)
  );

  shift_unit #(.WIDTH(XLEN)) u_su (
    .x(x_bus), .y(y_bus), .st(ctrl.st), .en(ctrl.su_en), .z(su_z)
  );

  assign unit_z    = au_z | lu_z | su_z;
  assign z_bus     = (ctrl.msel && ctrl.ld_en) ? mem_rdata : unit_z;

  assign mem_addr  = au_z;
  assign mem_wdata = y_do;
  assign mem_we    = ctrl.st_en && !ctrl.rw;

  // At most one functional unit drives the Z bus.
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.au_en, ctrl.lu_en, ctrl.su_en}));

endmodule
