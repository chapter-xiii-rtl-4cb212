// tb_shift_unit: self-checking test of the shift unit.
// Reference: logical left shift, arithmetic right shift built from a 64-bit
// sign-extended value, and rotate right built by moving one bit at a time.
module tb_shift_unit;
  import isa_pkg::*;
  logic [31:0] x, y, z;
  shift_e st;
  logic en;
  int checks = 0, failures = 0;

  shift_unit #(.WIDTH(32)) dut (.x(x), .y(y), .st(st), .en(en), .z(z));

  function automatic logic [31:0] ref_shift(logic [31:0] a, logic [31:0] b, shift_e t);
    logic [63:0] w;
    logic [31:0] r;
    int n;
    n = int'(b[4:0]);
    case (t)
      ST_SLL: return a << n;
      ST_SRA: begin w = {{32{a[31]}}, a}; return w[n +: 32]; end
      ST_ROR: begin r = a; repeat (n) r = {r[0], r[31:1]}; return r; end
      default: return a;
    endcase
  endfunction

  task automatic check(input logic [31:0] a, b, input shift_e t, input logic e);
    logic [31:0] exp_z;
    x = a; y = b; st = t; en = e;
    #1;
    exp_z = e ? ref_shift(a, b, t) : 32'd0;
    checks++;
    if (z !== exp_z) begin
      failures++;
      $display("FAIL x=%h y=%h st=%0d en=%b z=%h exp=%h", a, b, t, e, z, exp_z);
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
    check(32'h8000_0001, 32'd4, ST_SLL, 1'b1);
    check(32'h8000_0000, 32'd4, ST_SRA, 1'b1);
    check(32'h0000_00F1, 32'd4, ST_ROR, 1'b1);
    check(32'h1234_5678, 32'd0, ST_ROR, 1'b1);
    check(32'h1234_5678, 32'd33, ST_SLL, 1'b1);
    check(32'h1234_5678, 32'd3, ST_PASS, 1'b1);
    for (int i = 0; i < 400; i++)
      check($urandom, $urandom, shift_e'($urandom % 4), 1'($urandom % 5 != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
