// ecc_curve: the microcoded CPU that sequences the [k]P computation.
//
// A minimal processor in the spirit of the architecture: no stack, no
// general-purpose registers, no interrupts; its only state is the program
// counter, one link register (JL/RET), the ladder patch and mask bits and the flags
// returned by ecc_fp. Each instruction passes through three stages: fetch
// (the address is sent to ecc_curve_iram), decode (branches and control
// instructions are executed here, patched operand addresses are formed)
// and execute (arithmetic is handed to ecc_fp and the CPU waits for its
// ins_done, state WAITARITH). Fetch overlaps execute: while an arithmetic
// instruction runs, the memory already reads the next address, so on
// ins_done the next instruction goes straight to decode. Decode does not
// overlap execute, so every branch sees the flags of the instruction
// before it (this design's choice). An arithmetic instruction thus costs
// decode plus its time in ecc_fp, and a control instruction costs fetch
// plus decode, since the instruction after it is fetched from the new pc.
// Branches: J, JZ, JNZ, JN, JODD test the flags of the last synchronous ALU
// instruction; JL saves pc+1 in the link register, RET returns to it.
// Ladder patching and coordinate shuffling: the two ladder points R0 and R1
// live in slot pairs (2i, 2i+1), and their physical order is a random mask
// bit m. PATCH pops one random bit s (the coordinate-shuffling client of
// the TRNG, waiting in decode while none is available) and sets a read
// patch N^m and a write patch N^s, then m <= s. An operand whose patch bit
// is set in the instruction has its address bit 0 XORed with the read patch
// (sources) or the write patch (destination). With N = the scalar bit this
// swaps the roles of R0 and R1 without a branch, and the points written
// back land in a freshly randomised order each ladder step. The microcode
// must have read both points before it writes either (it does). With
// SHUFFLE = 0 the random bit is taken as 0 and nothing is popped.
// Interface: start with entry starts a routine at that address; done pulses
// when STOP is reached, with zflag holding the Z flag at that moment.
module ecc_curve
  import ecc_pkg::*;
#(
  parameter bit SHUFFLE = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IRAM_AW-1:0] entry,
  output logic               done,
  output logic               zflag,
  output logic               running,
  // microcode memory
  output logic [IRAM_AW-1:0] iram_addr,
  input  instr_t             iram_data,
  // ecc_fp
  output logic               ins_valid,
  output instr_t             ins,
  input  logic               ins_done,
  input  flags_t             flags,
  // random bits for coordinate shuffling
  input  logic               rnd_valid,
  input  logic               rnd_bit,
  output logic               rnd_pop,
  // observation
  output logic [IRAM_AW-1:0] pc,
  output logic               ev_patch_swap,   // PATCH executed with N = 1
  output logic               ev_patch_keep,   // PATCH executed with N = 0
  output logic               ev_remap         // PATCH changed the mask bit
);
  typedef enum logic [1:0] {IDLE, FETCH, DECODE, WAITARITH} state_e;
  state_e state;

  logic [IRAM_AW-1:0] link;
  logic               patch_r, patch_w, mask;
  logic               shuf_ok, shuf_bit;
  instr_t             ir;

  assign iram_addr = (state == WAITARITH) ? pc + 1'b1 : pc;   // prefetch
  assign running   = (state != IDLE);

  // patched instruction for ecc_fp
  always_comb begin
    ins = ir;
    if (ir.op != OP_NNIADD) begin
      if (ir.ext[9]) ins.dst[0] = ir.dst[0] ^ patch_w;
      if (ir.ext[8]) ins.sa[0]  = ir.sa[0]  ^ patch_r;
      if (ir.ext[7]) ins.sb[0]  = ir.sb[0]  ^ patch_r;
    end
  end
  assign ins_valid = (state == WAITARITH);

  logic [IRAM_AW-1:0] tgt;
  assign tgt = iram_data.ext[IRAM_AW-1:0];

  // a PATCH in decode takes one random bit
  assign shuf_ok  = !SHUFFLE || rnd_valid;
  assign shuf_bit = SHUFFLE && rnd_bit;
  assign rnd_pop  = SHUFFLE && state == DECODE && iram_data.op == OP_PATCH && rnd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; pc <= '0; link <= '0; ir <= '0;
      patch_r <= 1'b0; patch_w <= 1'b0; mask <= 1'b0;
      done <= 1'b0; zflag <= 1'b0; ev_patch_swap <= 1'b0; ev_patch_keep <= 1'b0;
      ev_remap <= 1'b0;
    end else begin
      done <= 1'b0;
      ev_patch_swap <= 1'b0;
      ev_patch_keep <= 1'b0;
      ev_remap <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          pc <= entry; patch_r <= 1'b0; patch_w <= 1'b0; mask <= 1'b0; state <= FETCH;
        end
        FETCH: state <= DECODE;             // iram read in flight
        DECODE: begin
          ir <= iram_data;
          state <= FETCH;
          pc <= pc + 1'b1;
          unique case (iram_data.op)
            OP_NOP: ;
            OP_J:    pc <= tgt;
            OP_JZ:   if (flags.z)   pc <= tgt;
            OP_JNZ:  if (!flags.z)  pc <= tgt;
            OP_JN:   if (flags.n)   pc <= tgt;
            OP_JODD: if (flags.odd) pc <= tgt;
            OP_JL:   begin link <= pc + 1'b1; pc <= tgt; end
            OP_RET:  pc <= link;
            OP_PATCH:
              if (shuf_ok) begin
                patch_r <= flags.n ^ mask;
                patch_w <= flags.n ^ shuf_bit;
                mask    <= shuf_bit;
                ev_patch_swap <= flags.n; ev_patch_keep <= !flags.n;
                ev_remap <= shuf_bit != mask;
              end else begin
                pc <= pc; state <= DECODE;      // wait for a random bit
              end
            OP_STOP: begin done <= 1'b1; zflag <= flags.z; state <= IDLE; end
            default: begin pc <= pc; state <= WAITARITH; end
          endcase
        end
        WAITARITH: if (ins_done) begin pc <= pc + 1'b1; state <= DECODE; end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
