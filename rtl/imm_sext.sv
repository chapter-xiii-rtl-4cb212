// imm_sext: immediate sign extension and Y-bus source selection.
//
// The 16-bit immediate of an I-format instruction is sign-extended to 32 bits
// (bit 15 copied into bits 31..16). When im_en is high the extended value
// replaces the register file's Y output on the Y bus, so an I-format
// instruction computes X op immediate with the same units as the R-format
// X op Y. Combinational. Sign extension follows the design; using it for the
// logic immediates as well is this design's reading.
module imm_sext
  import isa_pkg::*;
(
  input  logic [IMM_W-1:0] imm,
  input  logic             im_en,
  input  logic [XLEN-1:0]  y_do,
  output logic [XLEN-1:0]  imm_ext,
  output logic [XLEN-1:0]  y_bus
);

  assign imm_ext = {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  assign y_bus   = im_en ? imm_ext : y_do;

endmodule
