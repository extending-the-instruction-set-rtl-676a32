// tb_fpu_core - end-to-end test of the F-extension subsystem at its
// default configuration.
//
// The testbench plays the host integer core: it keeps the integer register
// bank and a word-addressed data memory, executes integer stores (SW)
// itself, forms load/store addresses, and hands every F instruction to
// fpu_core with x[rs1] and, for FLW, the memory word. It runs the test
// program of the design's verification (store two numbers, FLW them, then
// every computational, sign-injection, conversion, move, compare and
// classify instruction, each result stored with FSW or SW) and compares
// the memory image, then continues with instructions that exercise the
// remaining mechanisms: the stall of multi-cycle operations, dynamic
// rounding through frm, every exception flag and their stickiness, an
// fcsr write, subnormal and overflow results and an illegal (fused
// multiply-add) instruction. Each mechanism is counted; one that never
// happened counts as a failure.
module tb_fpu_core;
  import fpu_pkg::*;
  import tb_rv_enc_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        instr_valid = 0, instr_ready;
  logic [31:0] instr = 0, int_rs1_data = 0, load_data = 0;
  logic        done, illegal, int_wb_valid, store_valid;
  logic [4:0]  int_wb_rd;
  logic [31:0] int_wb_data, store_data;
  logic        csr_we = 0;
  logic [7:0]  csr_wdata = 0, csr_rdata;

  fpu_core dut (.*);

  always #5 clk = ~clk;

  logic [31:0] x [32];
  logic [31:0] mem [int];
  int checks = 0, failures = 0;
  int n_stall_cycles = 0, n_multi = 0, n_fwb = 0, n_iwb = 0, n_store = 0, n_load = 0;
  int n_dyn = 0, n_illegal = 0, n_nv = 0, n_dz = 0, n_of = 0, n_uf = 0, n_nx = 0, n_csrw = 0;
  int n_sticky = 0, n_subnormal = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // integer store executed by the host
  task automatic sw(input logic [4:0] rs2, input logic [4:0] rs1, input int imm);
    mem[int'(x[rs1]) + imm] = x[rs2];
  endtask

  // issue one F instruction; expected latency in cycles (0: same cycle)
  task automatic issue(input logic [31:0] i, input int lat = 0);
    int cyc, addr;
    logic [4:0] rs1;
    logic [4:0] rd;
    logic [7:0] flags_before;
    rs1 = i[19:15];
    rd  = i[11:7];
    if (i[6:0] == 7'b0100111) addr = int'(x[rs1]) + int'($signed({i[31:25], i[11:7]}));
    else                      addr = int'(x[rs1]) + int'($signed(i[31:20]));
    @(negedge clk);
    flags_before = csr_rdata;
    instr_valid  = 1; instr = i; int_rs1_data = x[rs1];
    load_data    = mem.exists(addr) ? mem[addr] : 32'hDEADBEEF;
    if (i[6:0] == 7'b1010011 && i[14:12] == 3'b111) n_dyn++;
    #1;
    checks++;
    if (!instr_ready) begin failures++; $display("FAIL not ready at issue"); end
    cyc = 0;
    if (!done) begin
      n_multi++;
      @(negedge clk);
      instr_valid = 0; instr = 32'h00000013; int_rs1_data = 32'h0BAD0BAD;
      cyc = 1;
      #1;
      while (!done) begin
        if (!instr_ready) n_stall_cycles++;
        @(negedge clk); cyc++; #1;
      end
    end
    check($sformatf("latency of %h", i), cyc, lat);
    if (illegal) n_illegal++;
    if (int_wb_valid) begin
      n_iwb++;
      check("int wb rd", int_wb_rd, rd);
      if (rd != 0) x[rd] = int_wb_data;
    end
    if (store_valid) begin
      n_store++;
      mem[addr] = store_data;
    end
    if (i[6:0] == 7'b0000111) n_load++;
    if (dut.f_we) n_fwb++;
    @(negedge clk);
    instr_valid = 0;
    #1;
    if (csr_rdata[4] && !flags_before[4]) n_nv++;
    if (csr_rdata[3] && !flags_before[3]) n_dz++;
    if (csr_rdata[2] && !flags_before[2]) n_of++;
    if (csr_rdata[1] && !flags_before[1]) n_uf++;
    if (csr_rdata[0] && !flags_before[0]) n_nx++;
  endtask

  task automatic csr_write(input logic [7:0] v);
    @(negedge clk);
    csr_we = 1; csr_wdata = v;
    @(negedge clk);
    csr_we = 0;
    n_csrw++;
    check("fcsr after write", 32'(csr_rdata), 32'(v));
  endtask

  localparam logic [2:0] DYN = 3'b111;
  localparam int SP = 32'h1FFC;

  initial begin
    for (int i = 0; i < 32; i++) x[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- test program ------------------------------------------------------
    x[8]  = SP;
    x[15] = 32'h45ECF8FD;                 // a = 7583.1235
    x[16] = 32'hC3983EA1;                 // b = -304.4893
    sw(15, 8, 0);
    sw(16, 8, -4);
    issue(flw(15, 8, 0));
    issue(flw(16, 8, -4));
    issue(r_fp(F7_FADD,  16, 15, DYN, 17));      issue(fsw(17, 8, -8));
    issue(r_fp(F7_FSUB,  16, 15, DYN, 17));      issue(fsw(17, 8, -12));
    issue(r_fp(F7_FMUL,  16, 15, DYN, 17), 4);   issue(fsw(17, 8, -16));
    issue(r_fp(F7_FDIV,  16, 15, DYN, 17), 28);  issue(fsw(17, 8, -20));
    issue(r_fp(F7_FSQRT,  0, 15, DYN, 17), 28);  issue(fsw(17, 8, -24));
    issue(r_fp(F7_FSQRT,  0, 16, DYN, 17), 28);  issue(fsw(17, 8, -28));
    issue(r_fp(F7_FMINMAX, 16, 15, 3'b000, 17)); issue(fsw(17, 8, -32));
    issue(r_fp(F7_FMINMAX, 16, 15, 3'b001, 17)); issue(fsw(17, 8, -36));
    issue(r_fp(F7_FSGNJ, 16, 15, 3'b000, 17));   issue(fsw(17, 8, -40));
    issue(r_fp(F7_FSGNJ, 16, 15, 3'b001, 17));   issue(fsw(17, 8, -44));
    issue(r_fp(F7_FSGNJ, 16, 15, 3'b010, 17));   issue(fsw(17, 8, -48));
    issue(r_fp(F7_FCVTWS, 0, 15, DYN, 17));      sw(17, 8, -52);
    issue(r_fp(F7_FCVTWS, 0, 16, DYN, 17));      sw(17, 8, -56);
    issue(r_fp(F7_FCVTWS, 1, 15, DYN, 17));      sw(17, 8, -60);
    issue(r_fp(F7_FCVTWS, 1, 16, DYN, 17));      sw(17, 8, -64);
    issue(r_fp(F7_FMVXW, 0, 15, 3'b000, 20));
    issue(r_fp(F7_FMVXW, 0, 16, 3'b000, 21));
    issue(r_fp(F7_FCMP, 16, 15, 3'b010, 22));    sw(22, 8, -68);
    issue(r_fp(F7_FCMP, 16, 15, 3'b001, 22));    sw(22, 8, -72);
    issue(r_fp(F7_FCMP, 16, 15, 3'b000, 22));    sw(22, 8, -76);
    issue(r_fp(F7_FMVXW, 0, 15, 3'b001, 22));    sw(22, 8, -80);
    issue(r_fp(F7_FMVXW, 0, 16, 3'b001, 22));    sw(22, 8, -84);

    check("A",          mem[SP],      32'h45ECF8FD);
    check("B",          mem[SP-4],    32'hC3983EA1);
    check("A+B",        mem[SP-8],    32'h45E37513);
    check("A-B",        mem[SP-12],   32'h45F67CE7);
    check("A*B",        mem[SP-16],   32'hCA0CEDD0);
    check("A/B",        mem[SP-20],   32'hC1C73C37);
    check("SQRT(A)",    mem[SP-24],   32'h42AE298A);
    check("SQRT(B)",    mem[SP-28],   32'h7FC00000);
    check("MIN(A,B)",   mem[SP-32],   32'hC3983EA1);
    check("MAX(A,B)",   mem[SP-36],   32'h45ECF8FD);
    check("SGNJ(A,B)",  mem[SP-40],   32'hC5ECF8FD);
    check("SGNJN(A,B)", mem[SP-44],   32'h45ECF8FD);
    check("SGNJX(A,B)", mem[SP-48],   32'hC5ECF8FD);
    check("TO_INT(A)",  mem[SP-52],   32'h00001D9F);
    check("TO_INT(B)",  mem[SP-56],   32'hFFFFFED0);
    check("TO_UINT(A)", mem[SP-60],   32'h00001D9F);
    check("TO_UINT(B)", mem[SP-64],   32'h00000000);   // negative to unsigned saturates to 0
    check("FMV.X.W a",  x[20],        32'h45ECF8FD);
    check("FMV.X.W b",  x[21],        32'hC3983EA1);
    check("EQ(A,B)",    mem[SP-68],   32'h0);
    check("LT(A,B)",    mem[SP-72],   32'h0);
    check("LE(A,B)",    mem[SP-76],   32'h0);
    check("CLASS(A)",   mem[SP-80],   32'h40);
    check("CLASS(B)",   mem[SP-84],   32'h02);
    check("fflags after program", 32'(csr_rdata[4:0]), 32'b10001);   // NV (sqrt(-), fcvt.wu) and NX

    // ---- further mechanisms -------------------------------------------------
    issue(r_fp(F7_FSGNJ, 15, 15, 3'b000, 1));              // f1 = f15 (FMV.S), flags untouched
    check("flags sticky", 32'(csr_rdata[4:0]), 32'b10001);
    n_sticky++;
    csr_write({RM_RUP, 5'b00000});                         // frm = RUP, clear flags
    x[5] = 32'd16777217;                                   // 2^24 + 1
    issue(r_fp(F7_FCVTSW, 0, 5, DYN, 2));                  // rounds up under RUP
    issue(fsw(2, 8, -88));
    check("fcvt.s.w dyn RUP", mem[SP-88], 32'h4B800001);
    issue(r_fp(F7_FCVTSW, 0, 5, 3'b000, 2));               // static RNE: tie to even
    issue(fsw(2, 8, -92));
    check("fcvt.s.w static RNE", mem[SP-92], 32'h4B800000);
    check("NX set", 32'(csr_rdata[0]), 1);
    x[6] = 32'h00000000;
    issue(r_fp(F7_FMVWX, 0, 6, 3'b000, 3));                // f3 = +0
    issue(r_fp(F7_FDIV, 3, 15, DYN, 4), 28);               // a / 0
    issue(fsw(4, 8, -96));
    check("a/0", mem[SP-96], 32'h7F800000);
    check("DZ set", 32'(csr_rdata[3]), 1);
    x[7] = 32'h7F000000;
    issue(r_fp(F7_FMVWX, 0, 7, 3'b000, 5));
    issue(r_fp(F7_FMUL, 5, 5, 3'b000, 6), 4);              // overflow
    issue(fsw(6, 8, -100));
    check("overflow", mem[SP-100], 32'h7F800000);
    check("OF set", 32'(csr_rdata[2]), 1);
    x[7] = 32'h00800001;                                   // smallest normal + ulp
    issue(r_fp(F7_FMVWX, 0, 7, 3'b000, 7));
    x[7] = 32'h3F000000;                                   // 0.5
    issue(r_fp(F7_FMVWX, 0, 7, 3'b000, 8));
    issue(r_fp(F7_FMUL, 8, 7, 3'b000, 9), 4);              // subnormal, inexact
    issue(fsw(9, 8, -104));
    check("subnormal product", mem[SP-104], 32'h00400000);
    if (mem[SP-104][30:23] == 0 && mem[SP-104][22:0] != 0) n_subnormal++;
    check("UF set", 32'(csr_rdata[1]), 1);
    issue(r_fp(F7_FADD, 7, 9, 3'b000, 10));                // subnormal + normal
    issue(fsw(10, 8, -108));
    check("subnormal sum", mem[SP-108], 32'h00C00001);
    issue(r_fp(F7_FCMP, 16, 16, 3'b010, 11));              // feq b,b = 1
    check("feq b,b", x[11], 1);
    issue(r_fp(F7_FCMP, 15, 16, 3'b001, 0));               // flt into x0: discarded
    check("x0 stays 0", x[0], 0);
    issue({5'd16, 2'b00, 5'd16, 5'd15, 3'b000, 5'd17, 7'b1000011});   // FMADD.S: unsupported
    issue(fsw(17, 8, -112));
    check("illegal FMADD left f17", mem[SP-112], 32'hC5ECF8FD);
    check("fcsr frm kept", 32'(csr_rdata[7:5]), 32'(RM_RUP));

    // ---- mechanisms reached -----------------------------------------------------
    $display("mechanisms: stall_cycles=%0d multi=%0d fp_wb=%0d int_wb=%0d store=%0d load=%0d dyn_rm=%0d",
             n_stall_cycles, n_multi, n_fwb, n_iwb, n_store, n_load, n_dyn);
    $display("            illegal=%0d NV=%0d DZ=%0d OF=%0d UF=%0d NX=%0d csr_write=%0d sticky=%0d subnormal=%0d",
             n_illegal, n_nv, n_dz, n_of, n_uf, n_nx, n_csrw, n_sticky, n_subnormal);
    checks++; if (n_stall_cycles == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (n_multi == 0)        begin failures++; $display("FAIL no multi-cycle op"); end
    checks++; if (n_fwb == 0)          begin failures++; $display("FAIL no FP write-back"); end
    checks++; if (n_iwb == 0)          begin failures++; $display("FAIL no integer write-back"); end
    checks++; if (n_store == 0)        begin failures++; $display("FAIL no FSW"); end
    checks++; if (n_load == 0)         begin failures++; $display("FAIL no FLW"); end
    checks++; if (n_dyn == 0)          begin failures++; $display("FAIL no dynamic rounding"); end
    checks++; if (n_illegal == 0)      begin failures++; $display("FAIL no illegal instruction"); end
    checks++; if (n_nv == 0)           begin failures++; $display("FAIL NV never raised"); end
    checks++; if (n_dz == 0)           begin failures++; $display("FAIL DZ never raised"); end
    checks++; if (n_of == 0)           begin failures++; $display("FAIL OF never raised"); end
    checks++; if (n_uf == 0)           begin failures++; $display("FAIL UF never raised"); end
    checks++; if (n_nx == 0)           begin failures++; $display("FAIL NX never raised"); end
    checks++; if (n_csrw == 0)         begin failures++; $display("FAIL no fcsr write"); end
    checks++; if (n_sticky == 0)       begin failures++; $display("FAIL stickiness not seen"); end
    checks++; if (n_subnormal == 0)    begin failures++; $display("FAIL no subnormal result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
