// reg_file: 32 x 32-bit register file with two read ports and one write port.
//
// X_do and Y_do are read asynchronously from addresses x_ra and y_ra. On the
// rising clock edge, when rwe is high, z_di is written to register z_wa.
// Register 0 is the constant zero of the ISA: writes to it are dropped and it
// always reads 0. A synchronous active-low reset clears every register (this
// design's choice). A write and a read of the same register in one cycle
// return the old value; the new one is visible after the edge.
module reg_file #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rwe,
  input  logic [AW-1:0]    z_wa,
  input  logic [WIDTH-1:0] z_di,
  input  logic [AW-1:0]    x_ra,
  input  logic [AW-1:0]    y_ra,
  output logic [WIDTH-1:0] x_do,
  output logic [WIDTH-1:0] y_do
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (rwe && z_wa != '0) begin
      regs[z_wa] <= z_di;
    end
  end

  assign x_do = (x_ra == '0) ? '0 : regs[x_ra];
  assign y_do = (y_ra == '0) ? '0 : regs[y_ra];

endmodule
