// tb_instr_reg: self-checking test of the instruction register.
// Loads random words and checks that each field comes from the right bits,
// that the word appears only after the clock edge, and that a cycle without
// load leaves a nop.
module tb_instr_reg;
  logic clk = 0, rst_n, ld;
  logic [31:0] instr_in, instr;
  logic [5:0] opcode;
  logic [4:0] z, x, y;
  logic [15:0] imm;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

  always #5 clk = ~clk;

  task automatic expect_word(input logic [31:0] w);
    checks++;
    if (instr !== w || opcode !== w[31:26] || z !== w[25:21] || x !== w[20:16] ||
        y !== w[15:11] || imm !== w[15:0]) begin
      failures++;
      $display("FAIL held %h exp %h op=%b z=%0d x=%0d y=%0d imm=%h", instr, w, opcode, z, x, y, imm);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, prev;
    rst_n = 0; ld = 1; instr_in = 32'hFFFF_FFFF;
    @(negedge clk);
    expect_word(32'h0);
    rst_n = 1;
    // add $10, $8, $9 : opcode 100000, Z=10, X=8, Y=9
    instr_in = {6'b100000, 5'd10, 5'd8, 5'd9, 11'd0};
    @(negedge clk);
    checks++;
    if (opcode !== 6'b100000 || z !== 5'd10 || x !== 5'd8 || y !== 5'd9) begin
      failures++; $display("FAIL add fields");
    end
    prev = instr;
    for (int i = 0; i < 200; i++) begin
      w = $urandom;
      ld = 1'($urandom);
      instr_in = w;
      #1 expect_word(prev);               // unchanged before the edge
      @(negedge clk);
      expect_word(ld ? w : 32'h0);
      prev = instr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
