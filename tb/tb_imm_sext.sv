// tb_imm_sext: self-checking test of the immediate sign extension and the
// Y-bus multiplexer. Expected values come from a signed 16-to-32 cast.
module tb_imm_sext;
  logic [15:0] imm;
  logic im_en;
  logic [31:0] y_do, imm_ext, y_bus;
  int checks = 0, failures = 0;

  imm_sext dut (.imm(imm), .im_en(im_en), .y_do(y_do), .imm_ext(imm_ext), .y_bus(y_bus));

  task automatic check(input logic [15:0] i, input logic e, input logic [31:0] yd);
    logic [31:0] ext;
    imm = i; im_en = e; y_do = yd;
    #1;
    ext = 32'(signed'(i));
    checks++;
    if (imm_ext !== ext || y_bus !== (e ? ext : yd)) begin
      failures++;
      $display("FAIL imm=%h en=%b y_do=%h ext=%h y_bus=%h", i, e, yd, imm_ext, y_bus);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd4, 1'b1, 32'hDEAD_BEEF);
    check(16'hFFFC, 1'b1, 32'hDEAD_BEEF);
    check(16'h8000, 1'b1, 32'h0);
    check(16'h7FFF, 1'b0, 32'h1234_5678);
    for (int i = 0; i < 300; i++) check(16'($urandom), 1'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
