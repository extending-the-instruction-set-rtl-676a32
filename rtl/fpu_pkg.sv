// fpu_pkg - shared types and constants of the single-precision (RISC-V "F")
// floating-point unit.
//
// Holds the rounding-mode encodings of the RISC-V rm field, the exception
// flag record in fflags bit order, the unpacked-operand record produced by
// fp_decoder, the internal FPU operation code produced by fp_ctrl_decode and
// the instruction opcodes/funct7 values of the F extension. Everything here
// follows the RISC-V F extension and IEEE 754 binary32; the internal
// operation enumeration is this design's own.
package fpu_pkg;

  // Rounding modes (rm field / frm register)
  typedef logic [2:0] rm_t;
  localparam rm_t RM_RNE = 3'b000;  // nearest, ties to even
  localparam rm_t RM_RTZ = 3'b001;  // toward zero
  localparam rm_t RM_RDN = 3'b010;  // toward -infinity
  localparam rm_t RM_RUP = 3'b011;  // toward +infinity
  localparam rm_t RM_RMM = 3'b100;  // nearest, ties to max magnitude
  localparam rm_t RM_DYN = 3'b111;  // instruction field only: use frm

  // Exception flags, packed in fflags order {NV, DZ, OF, UF, NX}
  typedef struct packed {
    logic nv;  // invalid operation
    logic dz;  // divide by zero
    logic of;  // overflow
    logic uf;  // underflow
    logic nx;  // inexact
  } fflags_t;

  localparam fflags_t FLAGS_NONE = '0;

  // Canonical quiet NaN of RISC-V
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Operand after unpacking (fp_decoder)
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;      // effective exponent: 1 for subnormals and zero
    logic [23:0] sig;      // significand with hidden bit at [23]
    logic        is_zero;
    logic        is_sub;
    logic        is_inf;
    logic        is_nan;
    logic        is_snan;
  } fp_unpacked_t;

  // Internal operation of the FPU
  typedef enum logic [4:0] {
    FOP_ADD, FOP_SUB, FOP_MUL, FOP_DIV, FOP_SQRT,
    FOP_MIN, FOP_MAX,
    FOP_SGNJ, FOP_SGNJN, FOP_SGNJX,
    FOP_EQ, FOP_LT, FOP_LE,
    FOP_CLASS,
    FOP_CVT_WS, FOP_CVT_WUS, FOP_CVT_SW, FOP_CVT_SWU,
    FOP_MV_XW, FOP_MV_WX,
    FOP_NONE
  } fpu_op_e;

  // Operation of the multiply/divide/square-root unit
  typedef enum logic [1:0] {MDS_MUL = 2'd0, MDS_DIV = 2'd1, MDS_SQRT = 2'd2} mds_op_e;

  // Major opcodes
  localparam logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  localparam logic [6:0] OPC_STORE_FP = 7'b0100111;
  localparam logic [6:0] OPC_OP_FP    = 7'b1010011;

  // funct7 of OP-FP (funct5 followed by fmt = 00 for single precision)
  localparam logic [6:0] F7_FADD   = 7'b0000000;
  localparam logic [6:0] F7_FSUB   = 7'b0000100;
  localparam logic [6:0] F7_FMUL   = 7'b0001000;
  localparam logic [6:0] F7_FDIV   = 7'b0001100;
  localparam logic [6:0] F7_FSQRT  = 7'b0101100;
  localparam logic [6:0] F7_FSGNJ  = 7'b0010000;
  localparam logic [6:0] F7_FMINMAX= 7'b0010100;
  localparam logic [6:0] F7_FCVTWS = 7'b1100000;
  localparam logic [6:0] F7_FMVXW  = 7'b1110000;  // also FCLASS (funct3 001)
  localparam logic [6:0] F7_FCMP   = 7'b1010000;
  localparam logic [6:0] F7_FCVTSW = 7'b1101000;
  localparam logic [6:0] F7_FMVWX  = 7'b1111000;

  // Control signals produced by fp_ctrl_decode for one instruction
  typedef struct packed {
    logic       is_fp;         // instruction belongs to the F extension
    logic       illegal;       // F-extension opcode but unsupported encoding or rm
    fpu_op_e    op;            // FPU operation (FOP_NONE for FLW/FSW)
    logic       multi_cycle;   // executed by the multiply/divide/sqrt unit
    logic       is_load;       // FLW
    logic       is_store;      // FSW
    logic       data1_sel;     // operand 1 from FP bank (1) or integer bank (0)
    logic       data2_sel;     // operand 2 from FP bank (1) or integer bank (0)
    logic       regbank_sel;   // write back to FP bank (1) or integer bank (0)
    logic       int_or_float;  // result comes from the FPU (1) or the ALU/memory (0)
    rm_t        rm;            // resolved rounding mode (never DYN)
    logic [4:0] rs1;
    logic [4:0] rs2;
    logic [4:0] rd;
  } fp_ctrl_t;

  // Leading-zero count of a 24-bit significand (24 for zero)
  function automatic logic [4:0] clz24(input logic [23:0] v);
    logic [4:0] n;
    n = 5'd24;
    for (int i = 0; i < 24; i++)
      if (v[i]) n = 5'(23 - i);
    return n;
  endfunction

endpackage
