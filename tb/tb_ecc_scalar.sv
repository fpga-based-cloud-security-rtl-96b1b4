// tb_ecc_scalar: runs ecc_scalar with the real CPU, microcode, ALU and
// multipliers on a 16-bit curve (p = 65521, y^2 = x^3 + 2x + 3) and
// compares [k]P with an affine reference model. Checks the skip of the
// curve-constant routine on a second run and the infinity flag for k = 0.
module tb_ecc_scalar;
  import ecc_pkg::*;
  import ec_ref_pkg::*;
  localparam int NN = 16, W = 8;
  localparam longint P = 65521, A = 2, B = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, curve_changed, busy, done, inf, ev_cst;
  logic crv_start, crv_done, crv_z, crv_run;
  logic [IRAM_AW-1:0] crv_entry, iaddr, pc;
  instr_t idata, ins;
  logic ins_valid, ins_done, fidle, rnd_pop, ev_stall, ev_swap;
  logic [1:0] ev_mm;
  flags_t flags;
  logic ext_en, ext_we;
  logic [4:0] ext_addr;
  logic [NN+1:0] ext_wdata, ext_rdata;
  logic [NN-1:0] rnd;
  logic shuf;      // random shuffle bits for the ladder
  always_ff @(posedge clk) shuf <= 1'($urandom);

  ecc_scalar dut (.clk, .rst_n, .start, .curve_changed, .busy, .done, .inf,
    .ev_cst_run(ev_cst), .crv_start, .crv_entry, .crv_done, .crv_zflag(crv_z));
  ecc_curve u_cpu (.clk, .rst_n, .start(crv_start), .entry(crv_entry), .done(crv_done),
    .zflag(crv_z), .running(crv_run), .iram_addr(iaddr), .iram_data(idata),
    .ins_valid, .ins, .ins_done, .flags, .pc, .rnd_valid(1'b1), .rnd_bit(shuf), .rnd_pop(),
    .ev_patch_swap(ev_swap), .ev_patch_keep(), .ev_remap());
  ecc_curve_iram #(.NN(NN), .RBITS(W*((NN+W-1)/W))) u_iram (.clk, .raddr(iaddr), .rdata(idata),
    .dbg_we(1'b0), .dbg_waddr('0), .dbg_wdata('0));
  ecc_fp #(.NN(NN), .W(W)) u_fp (.clk, .rst_n, .ins_valid, .ins, .ins_done, .flags,
    .idle(fidle), .rnd_valid(1'b1), .rnd_data(rnd), .rnd_pop, .ext_en, .ext_we,
    .ext_addr, .ext_wdata, .ext_rdata, .ev_stall, .ev_mm_start(ev_mm), .ev_corr_taken(), .ev_corr_skip());

  always_ff @(posedge clk) if (rnd_pop) rnd <= NN'($urandom);

  int checks = 0, failures = 0, cst_runs = 0;
  always_ff @(posedge clk) if (rst_n && ev_cst) cst_runs <= cst_runs + 1;

  task automatic wr(input logic [4:0] a, input longint v);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = (NN+2)'(v);
    @(negedge clk); ext_we = 0; ext_en = 0;
  endtask
  task automatic rd(input logic [4:0] a, output longint v);
    @(negedge clk); ext_en = 1; ext_we = 0; ext_addr = a;
    @(negedge clk); v = longint'(ext_rdata); ext_en = 0;
  endtask

  task automatic run_kp(input longint k, input pt_t Pt, input bit chg, output int cycles);
    wr(S_K, k); wr(S_PX, Pt.x); wr(S_PY, Pt.y);
    @(negedge clk); start = 1; curve_changed = chg;
    @(negedge clk); start = 0; curve_changed = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    pt_t G, Rf;
    longint qx, qy, k;
    int cyc, cst_before;
    start = 0; curve_changed = 0; ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    rnd = 16'h1234;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(S_P, P); wr(S_A, A); wr(S_B, B);
    G = find_point(5, A, B, P);
    for (int t = 0; t < 6; t++) begin
      k = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 2 : longint'($urandom_range(3, 65535));
      cst_before = cst_runs;
      run_kp(k, G, t == 0, cyc);
      Rf = smul(k, G, A, P);
      rd(S_QX, qx); rd(S_QY, qy);
      checks++;
      if (inf !== Rf.inf) begin failures++; $display("FAIL inf k=%0d got %0b exp %0b", k, inf, Rf.inf); end
      if (!Rf.inf) begin
        checks++;
        if (qx != Rf.x || qy != Rf.y) begin
          failures++; $display("FAIL k=%0d got (%0d,%0d) exp (%0d,%0d)", k, qx, qy, Rf.x, Rf.y);
        end
      end
      checks++;
      if ((cst_runs - cst_before) != (t == 0 ? 1 : 0)) begin
        failures++; $display("FAIL constant routine runs %0d at t=%0d", cst_runs - cst_before, t);
      end
      $display("k=%0d cycles=%0d", k, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
