// tb_dpu: self-checking test of the datapath unit driven by raw control words.
// First the example R10 = R8 + R9 with the listed control signals
// (X_ra = 01000, Y_ra = 01001, Z_wa = 01010, rwe = 1). Then random control
// words (one unit, immediate on or off, loads and stores) are compared with a
// reference model of the register file, units and memory kept in this file.
// The memory is a behavioural array here.
module tb_dpu;
  import isa_pkg::*;
  logic clk = 0, rst_n;
  ctrl_t ctrl;
  logic [4:0] z_wa, x_ra, y_ra;
  logic [15:0] imm;
  logic [31:0] mem_rdata, mem_addr, mem_wdata, z_bus;
  logic mem_we;
  logic [31:0] mem [64];
  logic [31:0] rf [32];
  int checks = 0, failures = 0;

  dpu dut (.*);

  assign mem_rdata = mem[mem_addr[7:2]];
  always_ff @(posedge clk) if (mem_we) mem[mem_addr[7:2]] <= mem_wdata;

  always #5 clk = ~clk;

  function automatic ctrl_t mk(input logic rwe_i, imm_i, au_i, as_i, lu_i,
                               input logic [3:0] lf_i, input logic su_i,
                               input logic [1:0] st_i, input logic ste_i, lde_i, rw_i, msel_i);
    ctrl_t c;
    c.rwe = rwe_i; c.imm_en = imm_i; c.au_en = au_i; c.a_s = as_i; c.lu_en = lu_i;
    c.lf = lf_i; c.su_en = su_i; c.st = shift_e'(st_i); c.st_en = ste_i; c.ld_en = lde_i;
    c.rw = rw_i; c.msel = msel_i;
    return c;
  endfunction

  // drive one cycle and compare the Z bus / memory side with the model
  task automatic step(input ctrl_t c, input logic [4:0] zw, xr, yr, input logic [15:0] im);
    logic [31:0] xv, yv, yb, r, e_addr;
    int n;
    ctrl = c; z_wa = zw; x_ra = xr; y_ra = yr; imm = im;
    #1;
    xv = rf[xr]; yv = rf[yr];
    yb = c.imm_en ? {{16{im[15]}}, im} : yv;
    e_addr = c.au_en ? (c.a_s ? xv - yb : xv + yb) : 32'd0;
    r = 32'd0;
    if (c.au_en) r = e_addr;
    if (c.lu_en) for (int i = 0; i < 32; i++) r[i] = c.lf[{xv[i], yb[i]}];
    if (c.su_en) begin
      n = int'(yb[4:0]);
      case (c.st)
        ST_SLL:  r = xv << n;
        ST_SRA:  r = 32'($signed(xv) >>> n);
        ST_ROR:  r = (n == 0) ? xv : ((xv >> n) | (xv << (32 - n)));
        default: r = xv;
      endcase
    end
    if (c.msel && c.ld_en) r = mem[e_addr[7:2]];
    checks++;
    if (z_bus !== r || mem_addr !== e_addr || mem_we !== (c.st_en && !c.rw) ||
        (c.st_en && mem_wdata !== yv)) begin
      failures++;
      $display("FAIL ctrl=%b z=%0d x=%0d y=%0d imm=%h : z_bus=%h exp %h addr=%h exp %h we=%b wdata=%h",
               c, zw, xr, yr, im, z_bus, r, mem_addr, e_addr, mem_we, mem_wdata);
    end
    @(negedge clk);
    if (c.rwe && zw != 0) rf[zw] = r;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t c;
    for (int i = 0; i < 32; i++) rf[i] = 0;
    for (int i = 0; i < 64; i++) mem[i] = 32'(i) * 32'h0101_0101;
    rst_n = 0; ctrl = CTRL_NOP; z_wa = 0; x_ra = 0; y_ra = 0; imm = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    // addi-style loads of R8 and R9 (immediate through the AU)
    step(mk(1,1,1,0,0,4'b0,0,2'b0,0,0,1,0), 5'd8, 5'd0, 5'd0, 16'd1234);
    step(mk(1,1,1,0,0,4'b0,0,2'b0,0,0,1,0), 5'd9, 5'd0, 5'd0, 16'hFFF0);
    // R10 = R8 + R9 with the listed control signals
    step(mk(1,0,1,0,0,4'b0,0,2'b0,0,0,1,0), 5'b01010, 5'b01000, 5'b01001, 16'd0);
    x_ra = 5'd10; ctrl = CTRL_NOP; #1;
    checks++;
    if (z_bus !== 32'd0 || rf[10] !== 32'd1218) begin
      failures++; $display("FAIL R10 model=%0d", rf[10]);
    end
    // random control words
    for (int n = 0; n < 2000; n++) begin
      int kind;
      logic [4:0] xr;
      kind = int'($urandom % 6);
      xr = 5'($urandom);
      case (kind)
        0: c = mk(1, 1'($urandom), 1, 1'($urandom), 0, 4'b0, 0, 2'b0, 0, 0, 1, 0);
        1: c = mk(1, 1'($urandom), 0, 0, 1, 4'($urandom), 0, 2'b0, 0, 0, 1, 0);
        2: c = mk(1, 1'($urandom), 0, 0, 0, 4'b0, 1, 2'($urandom), 0, 0, 1, 0);
        3: begin c = mk(1, 1, 1, 0, 0, 4'b0, 0, 2'b0, 0, 1, 1, 1); xr = 5'd0; end
        4: begin c = mk(0, 1, 1, 0, 0, 4'b0, 0, 2'b0, 1, 0, 0, 0); xr = 5'd0; end
        default: c = CTRL_NOP;
      endcase
      step(c, 5'($urandom), xr, 5'($urandom),
           (kind >= 3) ? 16'(($urandom % 64) * 4) : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
