// ecc_fp: the ALU of the microcoded CPU, with its large-number memory and
// Montgomery multipliers.
//
// Every instruction received from ecc_curve is executed on ecc_fp_dram.
// Synchronous instructions (NNADD, NNSUB, NNIADD, NNXOR, NNSLL, NNSRL,
// NNDIV2, TESTPAR, NNRND) take two cycles: operand read, then compute and write,
// and the destination is written before ins_done. FPREDC is asynchronous:
// its operands are read, handed to a free mm_ndsp unit (NBMM of them) and
// ins_done is given at once; the product is written back later. A
// scoreboard of busy slots holds back any instruction that reads or writes
// the destination of an outstanding product, and BARRIER waits until none
// is outstanding. These rules follow the architecture; the scoreboard is
// how this design enforces them.
// On-the-fly correction: an arithmetic instruction with cond = C_GE0 writes
// only when its own result is >= 0, one with cond = C_IFN only when the N
// flag of the previous flag-setting instruction is 1. Both take the same
// time whether or not they write, so a modular reduction runs in constant
// time.
// NNRND takes one word from the TRNG's NNRND client FIFO, keeps its low
// NN-1 bits (this design's choice, so the value stays below a prime of NN
// bits) and waits while that FIFO is empty.
// When the CPU is idle (ext_en), the external port reads (1-cycle latency)
// and writes the memory on behalf of the AXI interface.
// Words are WW = NN+2 bits, two's complement.
module ecc_fp
  import ecc_pkg::*;
#(
  parameter int unsigned NN   = 256,
  parameter int unsigned W    = 16,
  parameter int unsigned NBMM = 2,
  localparam int unsigned WW  = NN + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction from ecc_curve (addresses already patched)
  input  logic          ins_valid,
  input  instr_t        ins,
  output logic          ins_done,
  output flags_t        flags,
  output logic          idle,        // nothing outstanding, no instruction running
  // NNRND source
  input  logic          rnd_valid,
  input  logic [NN-1:0] rnd_data,
  output logic          rnd_pop,
  // external access (AXI side)
  input  logic          ext_en,
  input  logic          ext_we,
  input  logic [4:0]    ext_addr,
  input  logic [WW-1:0] ext_wdata,
  output logic [WW-1:0] ext_rdata,
  // event counters for observation
  output logic          ev_stall,    // an instruction waited on the scoreboard
  output logic [NBMM-1:0] ev_mm_start,
  output logic          ev_corr_taken, // conditional write performed
  output logic          ev_corr_skip   // conditional write suppressed
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_DONE} state_e;
  state_e state;

  logic [4:0]    ra, rb, wa;
  logic [WW-1:0] rda, rdb, wd;
  logic          we;

  ecc_fp_dram #(.NN(NN), .NWORDS(NWORDS)) u_dram (
    .clk, .ra_addr(ra), .ra_data(rda), .rb_addr(rb), .rb_data(rdb),
    .we, .waddr(wa), .wdata(wd));
  assign ext_rdata = rda;

  // shadow copy of p for the multipliers
  logic [NN-1:0] p_r;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p_r <= '0;
    else if (we && wa == S_P) p_r <= wd[NN-1:0];

  // multipliers
  logic [NBMM-1:0]         mm_start, mm_busy, mm_valid, mm_ack;
  logic [NN-1:0]           mm_res [NBMM];
  logic [4:0]              mm_tag [NBMM];
  for (genvar g = 0; g < NBMM; g++) begin : g_mm
    mm_ndsp #(.NN(NN), .W(W)) u_mm (
      .clk, .rst_n, .start(mm_start[g]), .a(rda[NN-1:0]), .b(rdb[NN-1:0]),
      .p(p_r), .busy(mm_busy[g]), .res_valid(mm_valid[g]), .res(mm_res[g]),
      .res_ack(mm_ack[g]));
  end
  assign ev_mm_start = mm_start;

  // scoreboard
  logic [NWORDS-1:0] sb_busy;

  // decode of the presented instruction
  cond_e cond;
  assign cond = (ins.op == OP_NNIADD) ? C_ALWAYS : cond_e'(ins.ext[11:10]);
  logic uses_b, hazard;
  always_comb begin
    uses_b = ins.op inside {OP_NNADD, OP_NNSUB, OP_NNXOR, OP_NNDIV2, OP_FPREDC};
    hazard = sb_busy[ins.sa] || (uses_b && sb_busy[ins.sb]) || sb_busy[ins.dst];
  end

  // pending write-back: lowest-numbered multiplier with a result
  logic          wb_req;
  int unsigned   wb_sel;
  always_comb begin
    wb_req = 1'b0; wb_sel = 0;
    for (int i = NBMM-1; i >= 0; i--)
      if (mm_valid[i]) begin wb_req = 1'b1; wb_sel = i; end
  end

  // free multiplier
  logic          mm_free;
  int unsigned   free_sel;
  always_comb begin
    mm_free = 1'b0; free_sel = 0;
    for (int i = NBMM-1; i >= 0; i--)
      if (!mm_busy[i]) begin mm_free = 1'b1; free_sel = i; end
  end

  // synchronous result
  // NNDIV2: halving modulo sb (= p) without a branch: an odd operand gets p
  // added first, then an arithmetic shift right by one
  logic [WW-1:0] res, hsum, half;
  assign hsum = rda + (rda[0] ? rdb : '0);
  assign half = {hsum[WW-1], hsum[WW-1:1]};
  always_comb begin
    unique case (ins.op)
      OP_NNADD:   res = rda + rdb;
      OP_NNSUB:   res = rda - rdb;
      OP_NNIADD:  res = rda + {{(WW-12){ins.ext[11]}}, ins.ext};
      OP_NNXOR:   res = rda ^ rdb;
      OP_NNSLL:   res = rda << 1;
      OP_NNSRL:   res = rda >> 1;
      OP_NNDIV2:  res = half;
      OP_NNRND:   res = WW'(rnd_data[NN-2:0]);
      default:    res = rda;
    endcase
  end

  logic accept;   // in S_IDLE: start the presented instruction this cycle
  always_comb begin
    accept = (state == S_IDLE) && !wb_req && ins_valid && !ext_en;
    if (ins.op == OP_BARRIER) accept = accept && (sb_busy == '0) && (mm_busy == '0);
    else accept = accept && !hazard && (ins.op != OP_FPREDC || mm_free);
  end

  always_comb begin
    ra = ins.sa; rb = ins.sb; we = 1'b0; wa = ins.dst; wd = res;
    mm_start = '0; mm_ack = '0; rnd_pop = 1'b0;
    if (ext_en) begin
      ra = ext_addr; we = ext_we; wa = ext_addr; wd = ext_wdata;
    end else if (state == S_IDLE && wb_req) begin
      we = 1'b1; wa = mm_tag[wb_sel]; wd = WW'(mm_res[wb_sel]);
      mm_ack[wb_sel] = 1'b1;
    end else if (state == S_EXEC) begin
      unique case (ins.op)
        OP_FPREDC: mm_start[free_sel] = 1'b1;
        OP_NNRND: if (rnd_valid) begin we = 1'b1; rnd_pop = 1'b1; end
        OP_TESTPAR, OP_BARRIER: ;
        default: begin
          unique case (cond)
            C_GE0:   we = !res[WW-1];
            C_IFN:   we = flags.n;
            default: we = 1'b1;
          endcase
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sb_busy <= '0; flags <= '0; ins_done <= 1'b0;
      ev_stall <= 1'b0;
      for (int i = 0; i < NBMM; i++) mm_tag[i] <= '0;
    end else begin
      ins_done <= 1'b0;
      ev_stall <= (state == S_IDLE) && ins_valid && !ext_en && !wb_req &&
                  (ins.op != OP_BARRIER) && hazard;
      if (!ext_en && state == S_IDLE && wb_req) sb_busy[mm_tag[wb_sel]] <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          if (ins.op == OP_BARRIER) begin
            ins_done <= 1'b1; state <= S_DONE;
          end else state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (ins.op)
            OP_FPREDC: begin
              mm_tag[free_sel] <= ins.dst;
              sb_busy[ins.dst] <= 1'b1;
              ins_done <= 1'b1; state <= S_DONE;
            end
            OP_NNRND: if (rnd_valid) begin ins_done <= 1'b1; state <= S_DONE; end
            default: begin
              flags.z   <= (res == '0);
              flags.n   <= res[WW-1];
              flags.odd <= res[0];
              ins_done  <= 1'b1; state <= S_DONE;
            end
          endcase
        end
        // one cycle for ecc_curve to drop ins_valid before the next accept
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ev_corr_taken = !ext_en && state == S_EXEC && cond != C_ALWAYS && we &&
                         !(ins.op inside {OP_FPREDC, OP_NNRND, OP_TESTPAR, OP_BARRIER});
  assign ev_corr_skip  = !ext_en && state == S_EXEC && cond != C_ALWAYS && !we &&
                         !(ins.op inside {OP_FPREDC, OP_NNRND, OP_TESTPAR, OP_BARRIER});

  assign idle = (state == S_IDLE) && (sb_busy == '0) && (mm_busy == '0);
endmodule
