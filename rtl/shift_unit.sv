// shift_unit: the SU, shifts or rotates x by the amount in y.
//
// The amount is y modulo the width (the low log2(WIDTH) bits of y). The
// 2-bit type st selects: 00 logical shift left, 01 arithmetic shift right,
// 10 rotate right, 11 x unshifted. When en is low the output is 0 (see
// arith_unit). Combinational. Arithmetic shift, logical shift and rotate are
// the design's operations with a 2-bit type code; the directions, the codes
// and the amount taken modulo the width are this design's choices.
module shift_unit
  import isa_pkg::shift_e, isa_pkg::ST_SLL, isa_pkg::ST_SRA, isa_pkg::ST_ROR;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  shift_e           st,
  input  logic             en,
  output logic [WIDTH-1:0] z
);

  logic [SW-1:0]    amt;
  logic [WIDTH-1:0] r;

  always_comb begin
    amt = y[SW-1:0];
    unique case (st)
      ST_SLL:  r = x << amt;
      ST_SRA:  r = WIDTH'($signed(x) >>> amt);
      ST_ROR:  r = (x >> amt) | (x << (WIDTH - int'(amt)));
      default: r = x;
    endcase
    z = en ? r : '0;
  end

endmodule
