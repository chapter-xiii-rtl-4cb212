// tb_data_mem: self-checking test of the data memory.
// Random word writes against a shadow array, reads checked combinationally,
// byte-offset bits ignored, and a write that is not enabled changes nothing.
module tb_data_mem;
  logic clk = 0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      int w;
      w = int'($urandom % 64);
      @(negedge clk);
      we = 1'($urandom); wdata = $urandom;
      addr = 32'(w * 4) + 32'($urandom % 4);
      #1;
      checks++;
      if (rdata !== shadow[w]) begin
        failures++;
        $display("FAIL read word %0d = %h exp %h", w, rdata, shadow[w]);
      end
      if (we) shadow[w] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
