// fpu_core - F-extension subsystem of an RV32IM core: instruction decode,
// floating-point register bank, FPU and fcsr.
//
// The host integer core hands over every F-extension instruction together
// with the value of its integer source x[rs1] and, for FLW, the word it read
// from data memory (the host's ALU forms the base+offset address and its
// memory stage performs the access, exactly as for integer loads and
// stores). This block decodes the instruction, reads the FP bank, applies
// the two operand-select multiplexers (data1 from the FP or the integer
// bank, data2 from the FP bank), executes it and writes the result back to
// the FP bank or - for compares, FCLASS, FCVT.W[U].S and FMV.X.W - hands it
// back for the integer bank (int_wb_*). FSW delivers f[rs2] on store_data.
// Exception flags of each completed instruction accrue into fcsr.
//
// Handshake: an instruction is taken when instr_valid and instr_ready are
// both high. Single-cycle instructions complete in that cycle (done high,
// results valid, FP bank written at the next edge). FMUL, FDIV and FSQRT
// drop instr_ready until they complete: this is the stall the host's hazard
// unit must honour. Multiply completes 4 cycles after issue, divide and
// square root 28 cycles after issue. An unsupported encoding in an
// F-extension opcode completes at once with illegal set and no effect.
// Instructions outside the F opcodes are ignored (done stays low).
module fpu_core
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction issue from the host core
  input  logic        instr_valid,
  output logic        instr_ready,
  input  logic [31:0] instr,
  input  logic [31:0] int_rs1_data,  // x[rs1] from the integer bank
  input  logic [31:0] load_data,     // memory word for FLW
  // completion
  output logic        done,
  output logic        illegal,
  output logic        int_wb_valid,  // write x[int_wb_rd] = int_wb_data
  output logic [4:0]  int_wb_rd,
  output logic [31:0] int_wb_data,
  output logic        store_valid,   // FSW: write store_data to memory
  output logic [31:0] store_data,
  // fcsr access from the host's CSR instructions
  input  logic        csr_we,
  input  logic [7:0]  csr_wdata,
  output logic [7:0]  csr_rdata
);
  fp_ctrl_t ctrl, ctrl_q, cur;
  rm_t      frm;
  fflags_t  fflags, fpu_flags;
  logic     wait_q;

  fp_ctrl_decode u_decode (.instr(instr), .frm(frm), .ctrl(ctrl));

  // the instruction being executed: the new one, or the held multi-cycle one
  assign cur = wait_q ? ctrl_q : ctrl;

  logic [31:0] f_rdata1, f_rdata2, data1, data2, fpu_result;
  logic        fpu_busy, fpu_done, fpu_start, issue;
  logic        f_we;
  logic [31:0] f_wdata;

  fp_regfile u_fregs (
    .clk(clk), .rst_n(rst_n),
    .raddr1(ctrl.rs1), .raddr2(ctrl.rs2), .rdata1(f_rdata1), .rdata2(f_rdata2),
    .we(f_we), .waddr(cur.rd), .wdata(f_wdata)
  );

  // operand-select multiplexers
  assign data1 = ctrl.data1_sel ? f_rdata1 : int_rs1_data;
  assign data2 = ctrl.data2_sel ? f_rdata2 : 32'd0;

  assign instr_ready = !wait_q;
  assign issue       = instr_valid && instr_ready && ctrl.is_fp;
  assign fpu_start   = issue && !ctrl.illegal && ctrl.int_or_float;

  fpu u_fpu (
    .clk(clk), .rst_n(rst_n), .start(fpu_start), .op(ctrl.op),
    .a(data1), .b(data2), .rm(ctrl.rm),
    .busy(fpu_busy), .done(fpu_done), .result(fpu_result), .flags(fpu_flags)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q <= 1'b0;
      ctrl_q <= '0;
    end else if (!wait_q) begin
      if (fpu_start && ctrl.multi_cycle) begin
        wait_q <= 1'b1;
        ctrl_q <= ctrl;
      end
    end else if (fpu_done) begin
      wait_q <= 1'b0;
    end
  end

  always_comb begin
    done         = 1'b0;
    illegal      = 1'b0;
    f_we         = 1'b0;
    f_wdata      = fpu_result;
    int_wb_valid = 1'b0;
    int_wb_rd    = cur.rd;
    int_wb_data  = fpu_result;
    store_valid  = 1'b0;
    store_data   = f_rdata2;
    if (wait_q) begin
      if (fpu_done) begin
        done = 1'b1;
        f_we = 1'b1;
      end
    end else if (issue) begin
      if (ctrl.illegal) begin
        done    = 1'b1;
        illegal = 1'b1;
      end else if (ctrl.is_load) begin
        done    = 1'b1;
        f_we    = 1'b1;
        f_wdata = load_data;
      end else if (ctrl.is_store) begin
        done        = 1'b1;
        store_valid = 1'b1;
      end else if (fpu_done) begin
        done         = 1'b1;
        f_we         = ctrl.regbank_sel;
        int_wb_valid = !ctrl.regbank_sel;
      end
    end
  end

  fp_csr u_csr (
    .clk(clk), .rst_n(rst_n), .csr_we(csr_we), .csr_wdata(csr_wdata), .csr_rdata(csr_rdata),
    .accrue(fpu_done), .accrue_flags(fpu_flags), .frm(frm), .fflags(fflags)
  );

  // a multi-cycle operation is running exactly while the core waits for it
  assert property (@(posedge clk) disable iff (!rst_n) wait_q == fpu_busy || (wait_q && fpu_done))
    else $error("fpu_core: stall state and FPU busy disagree");
endmodule
