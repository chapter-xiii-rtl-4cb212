// logic_unit: the LU, a bitwise two-input function of x and y.
//
// The 4-bit code lf is the truth table of the function: each result bit is
// lf[{x_bit, y_bit}], so AND = 1000, OR = 1110, XOR = 0110 and NOT x = 0011;
// any of the 16 two-input functions can be selected. When en is low the
// output is 0 (see arith_unit for why). Combinational. The 4-bit lf code and
// the enable come from the design; its truth-table meaning is this design's
// choice.
module logic_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [3:0]       lf,
  input  logic             en,
  output logic [WIDTH-1:0] z
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      z[i] = en & lf[{x[i], y[i]}];
    end
  end

endmodule
