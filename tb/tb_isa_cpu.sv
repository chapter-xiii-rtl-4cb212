// tb_isa_cpu: end-to-end test of the microprocessor at its default size.
//
// The testbench assembles instructions itself (R-format: opcode, Z, X, Y;
// I-format: opcode, Z, X, 16-bit immediate) and runs them through an
// instruction-level reference model: 32 registers with register 0 fixed at
// zero and a word memory of the same size as the design's. Programs:
//   1. the example sequence add $10,$8,$9 / xor $13,$11,$12 / lw $15,0($16),
//      after loading registers with addi;
//   2. addi $10,$8,4 / sw $10,4($0) / lw $10,4($0);
//   3. a long random mix of every opcode, idle cycles and unassigned opcodes;
//   4. a store of every register, each checked on the store data port.
// Every cycle the write-back (wb_en, wb_addr, wb_data) and memory ports of
// the executing instruction are compared with the model; the result of an
// instruction loaded at one edge must be on wb_data in the next cycle and
// usable by the instruction loaded at the following edge. Each mechanism
// (every opcode, write to register 0, negative immediate, store then load of
// one address, back-to-back dependence, idle nop, unassigned opcode, shift
// amount of 32 or more) is counted and must occur at least once.
module tb_isa_cpu;
  logic clk = 0, rst_n, instr_ld;
  logic [31:0] instr_in;
  logic wb_en, mem_we;
  logic [4:0] wb_addr;
  logic [31:0] wb_data, mem_addr, mem_wdata;
  int checks = 0, failures = 0;

  isa_cpu dut (.*);

  always #5 clk = ~clk;

  localparam int MW = 256;   // data memory words of the default design

  // opcode values of the instruction set
  localparam logic [5:0] ADD = 6'b100000, SUB = 6'b100010, AND = 6'b100100,
    OR = 6'b100101, XOR = 6'b100110, SL = 6'b000100, SA = 6'b000111, ROT = 6'b000110,
    ADDI = 6'b001000, SUBI = 6'b001001, ANDI = 6'b001100, ORI = 6'b001101,
    XORI = 6'b001110, SLI = 6'b000001, SAI = 6'b000011, ROTI = 6'b000010,
    LW = 6'b100011, SW = 6'b101011, NOP = 6'b000000;
  localparam logic [5:0] OPS [19] = '{ADD, SUB, AND, OR, XOR, SL, SA, ROT, ADDI, SUBI,
                                     ANDI, ORI, XORI, SLI, SAI, ROTI, LW, SW, NOP};

  // coverage counters
  int n_op [19];
  int n_r0 = 0, n_negimm = 0, n_st_ld = 0, n_dep = 0, n_idle = 0, n_undef = 0, n_bigshift = 0;

  logic [31:0] R [32];
  logic [31:0] M [MW];
  logic        Mvalid [MW];
  logic [4:0]  last_wr;
  logic        last_wr_v;
  logic [31:0] last_st_addr;

  function automatic logic [31:0] rfmt(input logic [5:0] op, input logic [4:0] z, x, y);
    return {op, z, x, y, 11'd0};
  endfunction
  function automatic logic [31:0] ifmt(input logic [5:0] op, input logic [4:0] z, x,
                                       input logic [15:0] im);
    return {op, z, x, im};
  endfunction

  function automatic logic [31:0] ror(input logic [31:0] v, input int n);
    logic [31:0] r = v;
    repeat (n % 32) r = {r[0], r[31:1]};
    return r;
  endfunction

  // Model one instruction; returns expected write-back and memory behaviour.
  task automatic model(input logic [31:0] w, output logic e_wen, output logic [31:0] e_wd,
                       output logic e_mwe, output logic [31:0] e_maddr, output logic [31:0] e_mwd,
                       output logic e_mchk);
    logic [5:0] op; logic [4:0] z, x, y; logic [31:0] a, b, si;
    logic [63:0] ext;
    int k;
    op = w[31:26]; z = w[25:21]; x = w[20:16]; y = w[15:11];
    si = {{16{w[15]}}, w[15:0]};
    a = R[x]; b = R[y];
    e_wen = 1; e_wd = 0; e_mwe = 0; e_maddr = 0; e_mwd = 0; e_mchk = 0;
    k = -1;
    for (int i = 0; i < 19; i++) if (OPS[i] == op) k = i;
    if (k >= 0) n_op[k]++; else n_undef++;
    if (op inside {ADDI, SUBI, ANDI, ORI, XORI, SLI, SAI, ROTI, LW, SW} && w[15]) n_negimm++;
    if (op inside {SL, SA, ROT} && b >= 32) n_bigshift++;
    if (op inside {SLI, SAI, ROTI} && si >= 32) n_bigshift++;
    case (op)
      ADD:  e_wd = a + b;
      SUB:  e_wd = a - b;
      AND:  e_wd = a & b;
      OR:   e_wd = a | b;
      XOR:  e_wd = a ^ b;
      SL:   e_wd = a << b[4:0];
      SA:   begin ext = {{32{a[31]}}, a}; e_wd = ext[b[4:0] +: 32]; end
      ROT:  e_wd = ror(a, int'(b[4:0]));
      ADDI: e_wd = a + si;
      SUBI: e_wd = a - si;
      ANDI: e_wd = a & si;
      ORI:  e_wd = a | si;
      XORI: e_wd = a ^ si;
      SLI:  e_wd = a << si[4:0];
      SAI:  begin ext = {{32{a[31]}}, a}; e_wd = ext[si[4:0] +: 32]; end
      ROTI: e_wd = ror(a, int'(si[4:0]));
      LW: begin
        e_maddr = a + si;
        e_mchk = 1;
        e_wd = M[e_maddr[9:2]];
        if (e_maddr == last_st_addr) n_st_ld++;
      end
      SW: begin
        e_wen = 0;
        e_maddr = a + si;
        e_mwe = 1; e_mwd = R[z]; e_mchk = 1;
        last_st_addr = e_maddr;
      end
      default: e_wen = 0;
    endcase
    if (e_wen && z == 0) n_r0++;
    if (last_wr_v && k >= 0 && op != NOP &&
        (x == last_wr || (y == last_wr && !(op inside {ADDI, SUBI, ANDI, ORI, XORI, SLI, SAI, ROTI, LW, SW})))) n_dep++;
  endtask

  // Load one instruction (or idle when ld = 0), then check its execution.
  task automatic issue(input logic [31:0] w, input logic ld = 1'b1);
    logic e_wen, e_mwe, e_mchk;
    logic [31:0] e_wd, e_maddr, e_mwd, ww;
    ww = ld ? w : 32'd0;
    if (!ld) n_idle++;
    instr_in = w; instr_ld = ld;
    @(posedge clk);
    #1;
    instr_ld = 0;
    model(ww, e_wen, e_wd, e_mwe, e_maddr, e_mwd, e_mchk);
    checks++;
    if (wb_en !== e_wen || (e_wen && (wb_addr !== ww[25:21] || wb_data !== e_wd)) ||
        mem_we !== e_mwe || (e_mchk && mem_addr !== e_maddr) ||
        (e_mwe && mem_wdata !== e_mwd)) begin
      failures++;
      $display("FAIL instr %h: wb_en=%b addr=%0d data=%h (exp %b %h) mem_we=%b addr=%h wdata=%h (exp %b %h %h)",
               ww, wb_en, wb_addr, wb_data, e_wen, e_wd, mem_we, mem_addr, mem_wdata,
               e_mwe, e_maddr, e_mwd);
    end
    // retire into the model: register and memory write at the coming edge
    if (e_wen && ww[25:21] != 0) R[ww[25:21]] = e_wd;
    if (e_mwe) begin M[e_maddr[9:2]] = e_mwd; Mvalid[e_maddr[9:2]] = 1; end
    last_wr = ww[25:21]; last_wr_v = e_wen && ww[25:21] != 0;
    @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) R[i] = 0;
    for (int i = 0; i < MW; i++) begin M[i] = 0; Mvalid[i] = 0; end
    for (int i = 0; i < 19; i++) n_op[i] = 0;
    last_wr = 0; last_wr_v = 0; last_st_addr = 32'hFFFF_FFFF;
    rst_n = 0; instr_ld = 0; instr_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise the data memory so every load has a known word
    for (int i = 0; i < MW; i++) issue(ifmt(SW, 5'd0, 5'd0, 16'(i * 4)));

    // 1. example sequence
    issue(ifmt(ADDI, 5'd8,  5'd0, 16'd100));
    issue(ifmt(ADDI, 5'd9,  5'd0, 16'hFFFD));          // -3
    issue(ifmt(ADDI, 5'd11, 5'd0, 16'h0F0F));
    issue(ifmt(ADDI, 5'd12, 5'd0, 16'h00FF));
    issue(ifmt(ADDI, 5'd16, 5'd0, 16'd8));
    issue(ifmt(ADDI, 5'd1,  5'd0, 16'h7ABC));
    issue(ifmt(SW,   5'd1,  5'd16, 16'd0));
    issue(rfmt(ADD,  5'd10, 5'd8, 5'd9));
    issue(rfmt(XOR,  5'd13, 5'd11, 5'd12));
    issue(ifmt(LW,   5'd15, 5'd16, 16'd0));
    checks++;
    if (R[10] !== 32'd97 || R[13] !== 32'h0FF0 || R[15] !== 32'h7ABC) begin
      failures++; $display("FAIL example sequence model");
    end
    // 2. addi / sw / lw with offset 4 from register 0
    issue(ifmt(ADDI, 5'd10, 5'd8, 16'd4));
    issue(ifmt(SW,   5'd10, 5'd0, 16'd4));
    issue(ifmt(ADDI, 5'd10, 5'd0, 16'd0));
    issue(ifmt(LW,   5'd10, 5'd0, 16'd4));
    checks++;
    if (R[10] !== 32'd104) begin failures++; $display("FAIL lw/sw round trip model"); end

    // 3. random program
    for (int n = 0; n < 20000; n++) begin
      logic [5:0] op;
      logic [15:0] im;
      int r;
      r = int'($urandom % 100);
      if (r < 3) begin issue(32'd0, 1'b0); continue; end
      if (r < 5) begin issue({6'b111111 - 6'($urandom % 8), 26'($urandom)}); continue; end
      op = OPS[$urandom % 19];
      case ($urandom % 3)
        0: im = 16'($urandom % 64);
        1: im = 16'($urandom);
        default: im = 16'(($urandom % MW) * 4);
      endcase
      if (op == LW || op == SW)
        issue(ifmt(op, 5'($urandom), ($urandom % 2) ? 5'd0 : 5'($urandom), im));
      else if (op inside {ADD, SUB, AND, OR, XOR, SL, SA, ROT, NOP})
        issue(rfmt(op, 5'($urandom), 5'($urandom), 5'($urandom)));
      else
        issue(ifmt(op, 5'($urandom), 5'($urandom), im));
    end

    // 4. store every register
    for (int i = 0; i < 32; i++) issue(ifmt(SW, 5'(i), 5'd0, 16'(i * 4)));

    // every mechanism must have happened
    for (int i = 0; i < 19; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %b never executed", OPS[i]); end
    end
    checks++; if (n_r0 == 0)       begin failures++; $display("FAIL no write to register 0"); end
    checks++; if (n_negimm == 0)   begin failures++; $display("FAIL no negative immediate"); end
    checks++; if (n_st_ld == 0)    begin failures++; $display("FAIL no store-then-load"); end
    checks++; if (n_dep == 0)      begin failures++; $display("FAIL no back-to-back dependence"); end
    checks++; if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_undef == 0)    begin failures++; $display("FAIL no unassigned opcode"); end
    checks++; if (n_bigshift == 0) begin failures++; $display("FAIL no shift amount >= 32"); end
    $display("coverage: r0=%0d negimm=%0d st_ld=%0d dep=%0d idle=%0d undef=%0d bigshift=%0d",
             n_r0, n_negimm, n_st_ld, n_dep, n_idle, n_undef, n_bigshift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
