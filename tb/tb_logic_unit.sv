// tb_logic_unit: self-checking test of the truth-table logic unit.
// Checks AND, OR, XOR and NOT x against the operators, then all sixteen
// function codes bit by bit from their truth tables, and en low.
module tb_logic_unit;
  logic [31:0] x, y, z, exp_z;
  logic [3:0] lf;
  logic en;
  int checks = 0, failures = 0;

  logic_unit #(.WIDTH(32)) dut (.x(x), .y(y), .lf(lf), .en(en), .z(z));

  task automatic check(input logic [31:0] xi, yi, input logic [3:0] lfi, input logic eni,
                       input logic [31:0] e);
    x = xi; y = yi; lf = lfi; en = eni;
    #1;
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL x=%h y=%h lf=%b en=%b z=%h exp=%h", xi, yi, lfi, eni, z, e);
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
    logic [31:0] a, b;
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom;
      check(a, b, 4'b1000, 1'b1, a & b);
      check(a, b, 4'b1110, 1'b1, a | b);
      check(a, b, 4'b0110, 1'b1, a ^ b);
      check(a, b, 4'b0011, 1'b1, ~a);
      check(a, b, 4'b0101, 1'b1, ~b);
      check(a, b, 4'b0001, 1'b1, ~(a | b));
      check(a, b, 4'b1110, 1'b0, 32'd0);
    end
    for (int f = 0; f < 16; f++) begin
      a = 32'hFFFF_0000; b = 32'hFF00_FF00;
      // bit groups: (1,1) (1,0) (0,1) (0,0) in bytes 3..0
      exp_z = {{8{f[3]}}, {8{f[2]}}, {8{f[1]}}, {8{f[0]}}};
      check(a, b, 4'(f), 1'b1, exp_z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
