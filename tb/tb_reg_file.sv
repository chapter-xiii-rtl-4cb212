// tb_reg_file: self-checking test of the 32 x 32 register file.
// A shadow array models the registers; random writes and reads on both
// ports are compared with it, register 0 must stay zero, and a write must
// only become visible after the clock edge.
module tb_reg_file;
  logic clk = 0, rst_n, rwe;
  logic [4:0] z_wa, x_ra, y_ra;
  logic [31:0] z_di, x_do, y_do;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  reg_file #(.WIDTH(32), .DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_read(input logic [4:0] xa, ya);
    x_ra = xa; y_ra = ya;
    #1;
    checks++;
    if (x_do !== shadow[xa] || y_do !== shadow[ya]) begin
      failures++;
      $display("FAIL read x[%0d]=%h exp %h  y[%0d]=%h exp %h", xa, x_do, shadow[xa], ya, y_do, shadow[ya]);
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
    rst_n = 0; rwe = 0; z_wa = 0; z_di = 0; x_ra = 0; y_ra = 0;
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'(31 - i));
    // fill every register, including an attempt on register 0
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      rwe = 1; z_wa = 5'(i); z_di = $urandom;
      check_read(5'(i), 5'(i));            // old value before the edge
      if (i != 0) shadow[i] = z_di;
    end
    @(negedge clk); rwe = 0;
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'($urandom));
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      rwe = 1'($urandom); z_wa = 5'($urandom); z_di = $urandom;
      check_read(5'($urandom), 5'($urandom));
      if (rwe && z_wa != 0) shadow[z_wa] = z_di;
    end
    @(negedge clk); rwe = 0;
    for (int i = 0; i < 32; i++) check_read(5'(i), 5'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
