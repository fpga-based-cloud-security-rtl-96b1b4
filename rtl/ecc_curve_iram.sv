// ecc_curve_iram: microcode memory of the ecc_curve CPU.
//
// DEPTH x 32-bit instruction memory, synchronous read (instruction one cycle
// after the address). Its contents are fixed at synthesis time: they are
// computed by the constant function build_prog() below, which plays the part
// of the assembler and linker. A debug write port allows a word to be
// patched at run time, as the architecture provides in debug mode.
//
// The routines (their algorithms are this design's choice; the architecture
// only states that [k]P is computed in microcode):
//   ENTRY_CST  curve constants: slot 31 = 0, slot 30 = 1,
//              R2 = R^2 mod p (by 2*RBITS modular doublings, R = 2^RBITS),
//              a_m = a*R mod p, b3_m = 3b*R mod p.
//   ENTRY_KP   [k]P: random projective Z for P (NNRND), Montgomery ladder
//              over all NN bits of k with R0 = O and R1 = P, where the bit
//              of k selects the operands through the PATCH mechanism (no
//              branch depends on k; each step first reads both points,
//              then writes them back through the write patch, so the
//              random order chosen by PATCH takes effect), then
//              inversion of Z by Fermat (Z^(p-2)), conversion to affine and out of the Montgomery
//              domain. Ends with the Z flag set when the result is the
//              point at infinity.
//   ENTRY_PADD complete projective point addition (the Renes-Costello-Batina
//              formula for short Weierstrass curves with any a), in place
//              on slots AX,AY,AZ += BX,BY,BZ; it also doubles when both
//              inputs are the same point.
// Modular addition is NNADD followed by NNSUB p with cond C_GE0; modular
// subtraction is NNSUB followed by NNADD p with cond C_IFN.
module ecc_curve_iram
  import ecc_pkg::*;
#(
  parameter int unsigned NN    = 256,
  parameter int unsigned RBITS = 256,   // log2(R) of the Montgomery multiplier
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output instr_t                     rdata,
  input  logic                       dbg_we,
  input  logic [$clog2(DEPTH)-1:0]   dbg_waddr,
  input  instr_t                     dbg_wdata
);
  typedef logic [31:0] prog_t [DEPTH];

  localparam logic [11:0] AL  = 12'h000;                  // cond always, no patch
  localparam logic [11:0] GE  = {C_GE0, 10'b0};
  localparam logic [11:0] IFN = {C_IFN, 10'b0};

  function automatic prog_t build_prog();
    prog_t m;
    int pc, l;
    for (int i = 0; i < DEPTH; i++) m[i] = mk(OP_NOP, 0, 0, 0, 0);

    // ---------------- curve constants ----------------
    pc = int'(ENTRY_CST);
    m[pc] = mk(OP_NNXOR,  S_ZERO, S_ZERO, S_ZERO, AL);           pc++;
    m[pc] = mk(OP_NNIADD, S_ONE,  S_ZERO, 0, 12'd1);             pc++;
    m[pc] = mk(OP_NNIADD, S_R2,   S_ZERO, 0, 12'd1);             pc++;
    m[pc] = mk(OP_NNIADD, S_CNT,  S_ZERO, 0, 12'(2*RBITS));      pc++;
    l = pc;
    m[pc] = mk(OP_NNADD,  S_R2,   S_R2, S_R2, AL);               pc++;
    m[pc] = mk(OP_NNSUB,  S_R2,   S_R2, S_P,  GE);               pc++;
    m[pc] = mk(OP_NNIADD, S_CNT,  S_CNT, 0, 12'hFFF);            pc++;
    m[pc] = mk(OP_JNZ,    0, 0, 0, 12'(l));                      pc++;
    m[pc] = mk(OP_FPREDC, S_AM,   S_A,  S_R2, AL);               pc++;
    m[pc] = mk(OP_NNADD,  S_B3,   S_B,  S_B,  AL);               pc++;
    m[pc] = mk(OP_NNSUB,  S_B3,   S_B3, S_P,  GE);               pc++;
    m[pc] = mk(OP_NNADD,  S_B3,   S_B3, S_B,  AL);               pc++;
    m[pc] = mk(OP_NNSUB,  S_B3,   S_B3, S_P,  GE);               pc++;
    m[pc] = mk(OP_FPREDC, S_B3,   S_B3, S_R2, AL);               pc++;
    m[pc] = mk(OP_BARRIER, 0, 0, 0, AL);                         pc++;
    m[pc] = mk(OP_STOP,   0, 0, 0, AL);                          pc++;

    // ---------------- [k]P ----------------
    pc = int'(ENTRY_KP);
    // lambda = rnd + 1, in Montgomery form
    m[pc] = mk(OP_NNRND,  S_T0, 0, 0, AL);                       pc++;
    m[pc] = mk(OP_NNIADD, S_T0, S_T0, 0, 12'd1);                 pc++;
    m[pc] = mk(OP_FPREDC, S_T0, S_T0, S_R2, AL);                 pc++;
    m[pc] = mk(OP_FPREDC, S_T1, S_PX, S_R2, AL);                 pc++;
    m[pc] = mk(OP_FPREDC, S_T2, S_PY, S_R2, AL);                 pc++;
    // R1 = (Px*l : Py*l : l), R0 = (0 : 1 : 0)
    m[pc] = mk(OP_FPREDC, S_X1, S_T1, S_T0, AL);                 pc++;
    m[pc] = mk(OP_FPREDC, S_Y1, S_T2, S_T0, AL);                 pc++;
    m[pc] = mk(OP_NNADD,  S_Z1, S_T0, S_ZERO, AL);               pc++;
    m[pc] = mk(OP_FPREDC, S_Y0, S_ONE, S_R2, AL);                pc++;
    m[pc] = mk(OP_NNADD,  S_X0, S_ZERO, S_ZERO, AL);             pc++;
    m[pc] = mk(OP_NNADD,  S_Z0, S_ZERO, S_ZERO, AL);             pc++;
    // scalar register: bit NN-1 of k aligned on bit NN
    m[pc] = mk(OP_NNADD,  S_QY, S_K, S_ZERO, AL);                pc++;
    m[pc] = mk(OP_NNSLL,  S_QY, S_QY, 0, AL);                    pc++;
    m[pc] = mk(OP_NNIADD, S_CNT, S_ZERO, 0, 12'(NN));            pc++;
    l = pc;
    m[pc] = mk(OP_NNSLL,  S_QY, S_QY, 0, AL);                    pc++;  // N = bit
    m[pc] = mk(OP_PATCH,  0, 0, 0, AL);                          pc++;
    // A = R_b, B = R_(1-b); A <- R_b + R_(1-b)
    m[pc] = mk(OP_NNADD, S_AX, S_X0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_AY, S_Y0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_AZ, S_Z0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_BX, S_X1, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_BY, S_Y1, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_BZ, S_Z1, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_JL,    0, 0, 0, 12'(ENTRY_PADD));              pc++;
    // B = R_b: both points are now read, the slots are free
    m[pc] = mk(OP_NNADD, S_BX, S_X0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_BY, S_Y0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_BZ, S_Z0, S_ZERO, arx(C_ALWAYS, 0, 1, 0)); pc++;
    // R_(1-b) <- A, written in the new random order
    m[pc] = mk(OP_NNADD, S_X1, S_AX, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_Y1, S_AY, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_Z1, S_AZ, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    // A = B = R_b; R_b <- 2 R_b
    m[pc] = mk(OP_NNADD, S_AX, S_BX, S_ZERO, AL);                 pc++;
    m[pc] = mk(OP_NNADD, S_AY, S_BY, S_ZERO, AL);                 pc++;
    m[pc] = mk(OP_NNADD, S_AZ, S_BZ, S_ZERO, AL);                 pc++;
    m[pc] = mk(OP_JL,    0, 0, 0, 12'(ENTRY_PADD));              pc++;
    m[pc] = mk(OP_NNADD, S_X0, S_AX, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_Y0, S_AY, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    m[pc] = mk(OP_NNADD, S_Z0, S_AZ, S_ZERO, arx(C_ALWAYS, 1, 0, 0)); pc++;
    m[pc] = mk(OP_NNIADD, S_CNT, S_CNT, 0, 12'hFFF);             pc++;
    m[pc] = mk(OP_JNZ,   0, 0, 0, 12'(l));                       pc++;
    // N = 0 here (CNT reached 0): PATCH sets the read patch to the mask, so
    // R0 is read from wherever the last step left it
    m[pc] = mk(OP_PATCH, 0, 0, 0, AL);                           pc++;
    // Z^-1 = Z^(p-2): square and multiply, the multiply kept only when the
    // exponent bit is 1 (conditional write, constant time)
    m[pc] = mk(OP_NNIADD, S_T0, S_P, 0, 12'hFFE);                pc++;
    m[pc] = mk(OP_NNSLL,  S_T0, S_T0, 0, AL);                    pc++;
    m[pc] = mk(OP_FPREDC, S_QX, S_ONE, S_R2, AL);                pc++;
    m[pc] = mk(OP_NNIADD, S_CNT, S_ZERO, 0, 12'(NN));            pc++;
    l = pc;
    m[pc] = mk(OP_NNSLL,  S_T0, S_T0, 0, AL);                    pc++;  // N = bit
    m[pc] = mk(OP_FPREDC, S_QX, S_QX, S_QX, AL);                 pc++;
    m[pc] = mk(OP_FPREDC, S_QY, S_QX, S_Z0, arx(C_ALWAYS, 0, 0, 1));                 pc++;
    m[pc] = mk(OP_NNADD,  S_QX, S_QY, S_ZERO, IFN);              pc++;
    m[pc] = mk(OP_NNIADD, S_CNT, S_CNT, 0, 12'hFFF);             pc++;
    m[pc] = mk(OP_JNZ,    0, 0, 0, 12'(l));                      pc++;
    // affine coordinates, out of the Montgomery domain
    m[pc] = mk(OP_FPREDC, S_T1, S_X0, S_QX, arx(C_ALWAYS, 0, 1, 0));                 pc++;
    m[pc] = mk(OP_FPREDC, S_T2, S_Y0, S_QX, arx(C_ALWAYS, 0, 1, 0));                 pc++;
    m[pc] = mk(OP_FPREDC, S_QX, S_T1, S_ONE, AL);                pc++;
    m[pc] = mk(OP_FPREDC, S_QY, S_T2, S_ONE, AL);                pc++;
    m[pc] = mk(OP_BARRIER, 0, 0, 0, AL);                         pc++;
    m[pc] = mk(OP_NNSUB,  S_T1, S_Z0, S_ZERO, arx(C_ALWAYS, 0, 1, 0));               pc++;  // Z flag: infinity
    m[pc] = mk(OP_STOP,   0, 0, 0, AL);                          pc++;

    // ---------------- complete point addition ----------------
    pc = int'(ENTRY_PADD);
    // (X1,Y1,Z1) = (AX,AY,AZ), (X2,Y2,Z2) = (BX,BY,BZ),
    // result (X3,Y3,Z3) back into (AX,AY,AZ)
`define MUL(d, x, y)  m[pc] = mk(OP_FPREDC, d, x, y, AL); pc++;
`define ADD(d, x, y)  m[pc] = mk(OP_NNADD, d, x, y, AL); pc++; \
                      m[pc] = mk(OP_NNSUB, d, d, S_P, GE); pc++;
`define SUB(d, x, y)  m[pc] = mk(OP_NNSUB, d, x, y, AL); pc++; \
                      m[pc] = mk(OP_NNADD, d, d, S_P, IFN); pc++;
    `MUL(S_T0, S_AX, S_BX)
    `MUL(S_T1, S_AY, S_BY)
    `MUL(S_T2, S_AZ, S_BZ)
    `ADD(S_T3, S_AX, S_AY)
    `ADD(S_T4, S_BX, S_BY)
    `MUL(S_T3, S_T3, S_T4)
    `ADD(S_T4, S_T0, S_T1)
    `SUB(S_T3, S_T3, S_T4)
    `ADD(S_T4, S_AX, S_AZ)
    `ADD(S_T5, S_BX, S_BZ)
    `MUL(S_T4, S_T4, S_T5)
    `ADD(S_T5, S_T0, S_T2)
    `SUB(S_T4, S_T4, S_T5)
    `ADD(S_T5, S_AY, S_AZ)
    `ADD(S_AX, S_BY, S_BZ)      // X3
    `MUL(S_T5, S_T5, S_AX)
    `ADD(S_AX, S_T1, S_T2)
    `SUB(S_T5, S_T5, S_AX)
    `MUL(S_AZ, S_AM, S_T4)      // Z3
    `MUL(S_AX, S_B3, S_T2)
    `ADD(S_AZ, S_AX, S_AZ)
    `SUB(S_AX, S_T1, S_AZ)
    `ADD(S_AZ, S_T1, S_AZ)
    `MUL(S_AY, S_AX, S_AZ)      // Y3
    `ADD(S_T1, S_T0, S_T0)
    `ADD(S_T1, S_T1, S_T0)
    `MUL(S_T2, S_AM, S_T2)
    `MUL(S_T4, S_B3, S_T4)
    `ADD(S_T1, S_T1, S_T2)
    `SUB(S_T2, S_T0, S_T2)
    `MUL(S_T2, S_AM, S_T2)
    `ADD(S_T4, S_T4, S_T2)
    `MUL(S_T0, S_T1, S_T4)
    `ADD(S_AY, S_AY, S_T0)
    `MUL(S_T0, S_T5, S_T4)
    `MUL(S_AX, S_T3, S_AX)
    `SUB(S_AX, S_AX, S_T0)
    `MUL(S_T0, S_T3, S_T1)
    `MUL(S_AZ, S_T5, S_AZ)
    `ADD(S_AZ, S_AZ, S_T0)
`undef MUL
`undef ADD
`undef SUB
    m[pc] = mk(OP_BARRIER, 0, 0, 0, AL);                         pc++;
    m[pc] = mk(OP_RET,     0, 0, 0, AL);                         pc++;
    return m;
  endfunction

  localparam prog_t PROG = build_prog();

  instr_t mem [DEPTH];
  initial for (int i = 0; i < DEPTH; i++) mem[i] = instr_t'(PROG[i]);

  always_ff @(posedge clk) begin
    if (dbg_we) mem[dbg_waddr] <= dbg_wdata;
    rdata <= mem[raddr];
  end
endmodule
