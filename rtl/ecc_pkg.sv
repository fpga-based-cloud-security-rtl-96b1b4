// ecc_pkg: shared types and constants of the ECC scalar-multiplication IP.
//
// The microcoded CPU (ecc_curve) and its ALU (ecc_fp) exchange 32-bit
// instructions. The mnemonics NNADD, NNSUB, NNIADD, NNXOR, NNSLL, NNSRL,
// NNRND, FPREDC, TESTPAR, BARRIER, J, JZ, JODD and JL follow the
// instruction set of the architecture this IP implements; the binary
// encoding, the extra control instructions (JNZ, JN, RET, PATCH, STOP) and
// the allocation of the 32 large-number slots are this design's own.
//
// Instruction word (instr_t), most significant field first:
//   op[4:0] dst[4:0] sa[4:0] sb[4:0] ext[11:0]
// For arithmetic instructions ext = {cond[1:0], pd, pa, pb, 7'b0}:
//   cond = C_ALWAYS   write the result
//          C_GE0      write it only if the result is >= 0 (reduction step)
//          C_IFN      write it only if the N flag of the previous
//                     flag-setting instruction is 1 (correction step)
//   pd/pa/pb          XOR bit 0 of dst with the write patch, and bit 0 of
//                     sa/sb with the read patch
// For NNIADD ext is a signed 12-bit immediate; for jumps ext[8:0] is the
// target address.
package ecc_pkg;

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_NNADD   = 5'd1,   // dst = sa + sb
    OP_NNSUB   = 5'd2,   // dst = sa - sb
    OP_NNIADD  = 5'd3,   // dst = sa + sext(imm)
    OP_NNXOR   = 5'd4,   // dst = sa ^ sb
    OP_NNSLL   = 5'd5,   // dst = sa << 1
    OP_NNSRL   = 5'd6,   // dst = sa >> 1 (logical)
    OP_TESTPAR = 5'd7,   // flags from sa, nothing written
    OP_NNRND   = 5'd8,   // dst = random number of NN-1 bits
    OP_FPREDC  = 5'd9,   // dst = sa * sb * R^-1 mod p, asynchronous
    OP_BARRIER = 5'd10,  // wait until no FPREDC is outstanding
    OP_NNDIV2  = 5'd11,  // dst = (sa + (sa odd ? sb : 0)) / 2, sb = p: halving mod p
    OP_J       = 5'd16,
    OP_JZ      = 5'd17,
    OP_JNZ     = 5'd18,
    OP_JN      = 5'd19,
    OP_JODD    = 5'd20,
    OP_JL      = 5'd21,  // jump and save return address in the link register
    OP_RET     = 5'd22,
    OP_PATCH   = 5'd23,  // read/write patch from N, mask and a random bit
    OP_STOP    = 5'd24   // end of routine
  } opcode_e;

  typedef enum logic [1:0] {
    C_ALWAYS = 2'd0,
    C_GE0    = 2'd1,
    C_IFN    = 2'd2
  } cond_e;

  typedef struct packed {
    opcode_e     op;
    logic [4:0]  dst;
    logic [4:0]  sa;
    logic [4:0]  sb;
    logic [11:0] ext;
  } instr_t;

  // Flags produced by every synchronous ALU instruction.
  typedef struct packed {
    logic z;    // result == 0
    logic n;    // result < 0 (sign bit)
    logic odd;  // result bit 0
  } flags_t;

  localparam int unsigned NWORDS   = 32;  // large numbers in ecc_fp_dram
  localparam int unsigned IRAM_AW  = 9;   // microcode address width

  // Large-number slot map.
  localparam logic [4:0] S_P  = 5'd0,  S_A  = 5'd1,  S_B  = 5'd2,
                         S_PX = 5'd3,  S_PY = 5'd4,  S_K  = 5'd5,
                         S_QX = 5'd6,  S_QY = 5'd7,
                         S_X0 = 5'd8,  S_X1 = 5'd9,  S_Y0 = 5'd10,
                         S_Y1 = 5'd11, S_Z0 = 5'd12, S_Z1 = 5'd13,
                         S_AX = 5'd14, S_AY = 5'd15, S_AZ = 5'd16,
                         S_BX = 5'd17, S_BY = 5'd18, S_BZ = 5'd19,
                         S_T0 = 5'd20, S_T1 = 5'd21, S_T2 = 5'd22,
                         S_T3 = 5'd23, S_T4 = 5'd24, S_T5 = 5'd25,
                         S_AM = 5'd26, S_B3 = 5'd27, S_R2 = 5'd28,
                         S_CNT = 5'd29, S_ONE = 5'd30, S_ZERO = 5'd31;

  // Microcode entry points.
  localparam logic [IRAM_AW-1:0] ENTRY_CST  = 9'h000;
  localparam logic [IRAM_AW-1:0] ENTRY_KP   = 9'h020;
  localparam logic [IRAM_AW-1:0] ENTRY_PADD = 9'h100;

  // Number of random-number clients of the TRNG.
  localparam int unsigned NCLIENT  = 4;
  localparam int unsigned CL_AXI   = 0;  // scalar blinding (not built)
  localparam int unsigned CL_CURVE = 1;  // coordinate shuffling (ecc_curve)
  localparam int unsigned CL_DRAM  = 2;  // memory shuffling (not built)
  localparam int unsigned CL_FP    = 3;  // NNRND

  function automatic instr_t mk(opcode_e op, logic [4:0] d, logic [4:0] a,
                                logic [4:0] b, logic [11:0] ext);
    instr_t i;
    i.op = op; i.dst = d; i.sa = a; i.sb = b; i.ext = ext;
    return i;
  endfunction

  function automatic logic [11:0] arx(cond_e c, bit pd, bit pa, bit pb);
    return {c, pd, pa, pb, 7'b0};
  endfunction

endpackage
