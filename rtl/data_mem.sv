// data_mem: the data memory M[] reached by lw and sw.
//
// A WORDS x 32-bit RAM addressed by a byte address: bits 1..0 are ignored
// (word accesses only) and the next log2(WORDS) bits select the word, so
// higher addresses wrap. Reading is asynchronous, so a load completes in the
// same cycle as its address; a write happens on the rising clock edge when we
// is high. There is no reset. The memory is only named by the design; its
// size, addressing and timing here are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[widx];

endmodule
