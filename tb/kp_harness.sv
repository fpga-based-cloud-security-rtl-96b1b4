// kp_harness: test harness (not part of the design) that runs [k]P on the
// CPU core (ecc_scalar, ecc_curve, ecc_curve_iram, ecc_fp with NBMM
// multipliers of W-bit digits) at NN = 16 on p = 65521, y^2 = x^3 + 2x + 3, and compares
// each result with the affine reference model. It drives the core the way
// ecc_axi does: the memory port loads p, a, b, P and k, start runs the
// curve constants on the first run and [k]P. Random numbers come from
// $urandom. When the NRUNS runs are over, finished rises and checks and
// failures hold the counts; kp_cycles is the cycle count of the last run.
module kp_harness
  import ecc_pkg::*;
  import ec_ref_pkg::*;
#(
  parameter int unsigned NBMM  = 2,
  parameter int unsigned W     = 8,
  parameter int unsigned NRUNS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   kp_cycles,
  output int   mm_used       // number of multipliers that ever started
);
  localparam int NN = 16;
  localparam longint P = 65521, A = 2, B = 3;

  logic start, curve_changed, busy, done, inf, ev_cst;
  logic crv_start, crv_done, crv_z, crv_run;
  logic [IRAM_AW-1:0] crv_entry, iaddr, pc;
  instr_t idata, ins;
  logic ins_valid, ins_done, fidle, rnd_pop, ev_stall;
  logic [NBMM-1:0] ev_mm, mm_seen;
  flags_t flags;
  logic ext_en, ext_we;
  logic [4:0] ext_addr;
  logic [NN+1:0] ext_wdata, ext_rdata;
  logic [NN-1:0] rnd;
  logic shuf;

  ecc_scalar u_scalar (.clk, .rst_n, .start, .curve_changed, .busy, .done, .inf,
    .ev_cst_run(ev_cst), .crv_start, .crv_entry, .crv_done, .crv_zflag(crv_z));
  ecc_curve u_cpu (.clk, .rst_n, .start(crv_start), .entry(crv_entry), .done(crv_done),
    .zflag(crv_z), .running(crv_run), .iram_addr(iaddr), .iram_data(idata),
    .ins_valid, .ins, .ins_done, .flags, .pc, .rnd_valid(1'b1), .rnd_bit(shuf), .rnd_pop(),
    .ev_patch_swap(), .ev_patch_keep(), .ev_remap());
  ecc_curve_iram #(.NN(NN), .RBITS(W*((NN+W-1)/W))) u_iram (.clk, .raddr(iaddr), .rdata(idata),
    .dbg_we(1'b0), .dbg_waddr('0), .dbg_wdata('0));
  ecc_fp #(.NN(NN), .W(W), .NBMM(NBMM)) u_fp (.clk, .rst_n, .ins_valid, .ins, .ins_done,
    .flags, .idle(fidle), .rnd_valid(1'b1), .rnd_data(rnd), .rnd_pop, .ext_en, .ext_we,
    .ext_addr, .ext_wdata, .ext_rdata, .ev_stall, .ev_mm_start(ev_mm), .ev_corr_taken(),
    .ev_corr_skip());

  always_ff @(posedge clk) begin
    shuf <= 1'($urandom);
    if (rnd_pop) rnd <= NN'($urandom);
  end
  always_ff @(posedge clk)
    if (!rst_n) mm_seen <= '0; else mm_seen <= mm_seen | ev_mm;
  assign mm_used = $countones(mm_seen);

  task automatic wr(input logic [4:0] a, input longint v);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = (NN+2)'(v);
    @(negedge clk); ext_we = 0; ext_en = 0;
  endtask
  task automatic rd(input logic [4:0] a, output longint v);
    @(negedge clk); ext_en = 1; ext_we = 0; ext_addr = a;
    @(negedge clk); v = longint'(ext_rdata); ext_en = 0;
  endtask

  initial begin
    pt_t G, Rf;
    longint qx, qy, k;
    finished = 0; checks = 0; failures = 0; kp_cycles = 0;
    start = 0; curve_changed = 0; ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    rnd = 16'h4321;
    @(posedge rst_n);
    wr(S_P, P); wr(S_A, A); wr(S_B, B);
    G = find_point(7, A, B, P);
    for (int t = 0; t < int'(NRUNS); t++) begin
      k = longint'($urandom_range(1, 65535));
      wr(S_K, k); wr(S_PX, G.x); wr(S_PY, G.y);
      @(negedge clk); start = 1; curve_changed = (t == 0);
      @(negedge clk); start = 0; curve_changed = 0;
      kp_cycles = 1;
      while (!done) begin @(negedge clk); kp_cycles++; end
      Rf = smul(k, G, A, P);
      rd(S_QX, qx); rd(S_QY, qy);
      checks++;
      if (inf !== Rf.inf || (!Rf.inf && (qx != Rf.x || qy != Rf.y))) begin
        failures++;
        $display("FAIL NBMM=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", NBMM, k, qx, qy, Rf.x, Rf.y);
      end
    end
    finished = 1;
  end
endmodule
