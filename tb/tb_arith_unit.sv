// tb_arith_unit: self-checking test of the adder/subtractor.
// Random and corner operands, both a_s settings and en low; the expected
// value is computed with the simulator's own + and - operators.
module tb_arith_unit;
  logic [31:0] x, y, z, exp_z;
  logic a_s, en;
  int checks = 0, failures = 0;

  arith_unit #(.WIDTH(32)) dut (.x(x), .y(y), .a_s(a_s), .en(en), .z(z));

  task automatic check(input logic [31:0] xi, yi, input logic asi, eni);
    x = xi; y = yi; a_s = asi; en = eni;
    #1;
    exp_z = !eni ? 32'd0 : (asi ? xi - yi : xi + yi);
    checks++;
    if (z !== exp_z) begin
      failures++;
      $display("FAIL x=%h y=%h a_s=%b en=%b z=%h exp=%h", xi, yi, asi, eni, z, exp_z);
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
    check(32'd8, 32'd9, 1'b0, 1'b1);
    check(32'd8, 32'd9, 1'b1, 1'b1);
    check(32'hFFFF_FFFF, 32'd1, 1'b0, 1'b1);
    check(32'd0, 32'd1, 1'b1, 1'b1);
    check(32'h8000_0000, 32'h8000_0000, 1'b0, 1'b1);
    check(32'h1234_5678, 32'h1234_5678, 1'b1, 1'b1);
    check(32'h1234_5678, 32'h1, 1'b0, 1'b0);
    for (int i = 0; i < 500; i++)
      check($urandom, $urandom, 1'($urandom), 1'($urandom % 4 != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
