// arith_unit: the AU, a 32-bit adder/subtractor.
//
// With a_s = 0 the result is x + y, with a_s = 1 it is x - y, formed by one
// adder as x + ~y + 1. When en is low the output is 0 so that the DPU can
// OR the outputs of all units onto the Z bus (the stand-in for a bus driver
// enabled by en). Combinational. The add/subtract control and the enable
// follow the design; the single-adder structure and the absence of carry and
// overflow outputs are this design's choice.
module arith_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             a_s,
  input  logic             en,
  output logic [WIDTH-1:0] z
);

  logic [WIDTH-1:0] y_op;
  logic [WIDTH-1:0] sum;

  always_comb begin
    y_op = a_s ? ~y : y;
    sum  = x + y_op + WIDTH'(a_s);
    z    = en ? sum : '0;
  end

endmodule
