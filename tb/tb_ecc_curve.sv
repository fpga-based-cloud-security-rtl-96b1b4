// tb_ecc_curve: loads a test program into the microcode memory through its
// debug port and runs it on ecc_curve with the real ALU. The program uses
// every control instruction (J, JZ, JNZ, JN, JODD, JL, RET, PATCH, STOP)
// and patched operands, including a shuffled write and a PATCH that waits
// for its random bit; the testbench checks the memory contents it
// leaves, that skipped instructions had no effect, the Z flag at STOP and
// the number of cycles. It then runs the built-in curve-constant routine on
// p = 65521 and checks R^2 mod p, a*R mod p and 3b*R mod p (R = 2^16).
module tb_ecc_curve;
  import ecc_pkg::*;
  localparam int NN = 16, W = 8, WW = NN + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, zflag, running, ins_valid, ins_done, fidle, rnd_pop, ev_stall, ev_swap;
  logic [8:0] entry, iaddr, pc;
  instr_t idata, ins, dbg_wdata;
  flags_t flags;
  logic dbg_we;
  logic [8:0] dbg_waddr;
  logic ext_en, ext_we;
  logic [4:0] ext_addr;
  logic [WW-1:0] ext_wdata, ext_rdata;
  logic [1:0] ev_mm;
  logic rvalid, rbit, rpop, remap;
  int npop = 0, nremap = 0;
  always_ff @(posedge clk) if (rst_n) begin
    npop   <= npop + int'(rpop);
    nremap <= nremap + int'(remap);
  end

  ecc_curve dut (.clk, .rst_n, .start, .entry, .done, .zflag, .running,
    .iram_addr(iaddr), .iram_data(idata), .ins_valid, .ins, .ins_done, .flags,
    .pc, .rnd_valid(rvalid), .rnd_bit(rbit), .rnd_pop(rpop),
    .ev_patch_swap(ev_swap), .ev_patch_keep(), .ev_remap(remap));
  ecc_curve_iram #(.NN(NN), .RBITS(16)) u_iram (.clk, .raddr(iaddr), .rdata(idata),
    .dbg_we, .dbg_waddr, .dbg_wdata);
  ecc_fp #(.NN(NN), .W(W)) u_fp (.clk, .rst_n, .ins_valid, .ins, .ins_done, .flags,
    .idle(fidle), .rnd_valid(1'b1), .rnd_data(16'h0), .rnd_pop, .ext_en, .ext_we,
    .ext_addr, .ext_wdata, .ext_rdata, .ev_stall, .ev_mm_start(ev_mm), .ev_corr_taken(), .ev_corr_skip());

  int checks = 0, failures = 0;
  task automatic chk(input string what, input longint got, input longint e);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, e); end
  endtask
  task automatic wr(input logic [4:0] a, input logic [WW-1:0] v);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = v;
    @(negedge clk); ext_en = 0; ext_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, output longint v);
    @(negedge clk); ext_en = 1; ext_addr = a;
    @(negedge clk); v = longint'($signed(ext_rdata)); ext_en = 0;
  endtask
  task automatic ld(input int a, input instr_t i);
    @(negedge clk); dbg_we = 1; dbg_waddr = 9'(a); dbg_wdata = i;
    @(negedge clk); dbg_we = 0;
  endtask
  task automatic run(input int a, output int cyc);
    @(negedge clk); entry = 9'(a); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  localparam logic [11:0] AL = 12'h0;
  localparam int B0 = 'h1C0;

  initial begin
    longint v;
    int cyc;
    rvalid = 1; rbit = 0;
    start = 0; entry = 0; dbg_we = 0; dbg_waddr = 0; dbg_wdata = '0;
    ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    wr(31, 0); wr(30, 1); wr(4, 0); wr(8, 111); wr(11, 1234); wr(7, 0);
    ld(B0 + 0,  mk(OP_NNIADD, 1, 31, 0, 12'd5));
    ld(B0 + 1,  mk(OP_NNIADD, 2, 31, 0, 12'd0));
    ld(B0 + 2,  mk(OP_NNIADD, 2, 2, 0, 12'd3));            // loop: slot2 += 3
    ld(B0 + 3,  mk(OP_NNIADD, 1, 1, 0, 12'hFFF));
    ld(B0 + 4,  mk(OP_JNZ, 0, 0, 0, 12'(B0 + 2)));
    ld(B0 + 5,  mk(OP_NNSUB, 3, 31, 30, AL));                // -1: N
    ld(B0 + 6,  mk(OP_JN, 0, 0, 0, 12'(B0 + 8)));
    ld(B0 + 7,  mk(OP_NNIADD, 4, 31, 0, 12'd99));           // skipped
    ld(B0 + 8,  mk(OP_JL, 0, 0, 0, 12'(B0 + 24)));
    ld(B0 + 9,  mk(OP_TESTPAR, 0, 2, 0, AL));                // 15 is odd
    ld(B0 + 10, mk(OP_JODD, 0, 0, 0, 12'(B0 + 12)));
    ld(B0 + 11, mk(OP_NNIADD, 4, 31, 0, 12'd77));           // skipped
    ld(B0 + 12, mk(OP_NNSUB, 3, 31, 30, AL));                // N = 1
    ld(B0 + 13, mk(OP_PATCH, 0, 0, 0, AL));                  // patch = 1
    ld(B0 + 14, mk(OP_NNADD, 8, 10, 31, arx(C_ALWAYS, 1, 1, 0)));  // slot9 <- slot11
    ld(B0 + 15, mk(OP_NNSUB, 5, 30, 30, AL));                // Z
    ld(B0 + 16, mk(OP_JZ, 0, 0, 0, 12'(B0 + 18)));
    ld(B0 + 17, mk(OP_NNIADD, 4, 31, 0, 12'd55));           // skipped
    ld(B0 + 18, mk(OP_J, 0, 0, 0, 12'(B0 + 20)));
    ld(B0 + 19, mk(OP_NNIADD, 4, 31, 0, 12'd44));           // skipped
    ld(B0 + 20, mk(OP_STOP, 0, 0, 0, AL));
    ld(B0 + 24, mk(OP_NNIADD, 6, 31, 0, 12'd42));           // subroutine
    ld(B0 + 25, mk(OP_RET, 0, 0, 0, AL));
    run(B0, cyc);
    rd(1, v); chk("loop counter", v, 0);
    rd(2, v); chk("loop sum", v, 15);
    rd(4, v); chk("skipped instructions", v, 0);
    rd(6, v); chk("subroutine", v, 42);
    rd(9, v); chk("patched move", v, 1234);
    rd(8, v); chk("unpatched slot", v, 111);
    chk("zflag at STOP", zflag, 1);
    // 18 ALU instructions executed (decode, 3 cycles waiting for ecc_fp;
    // the next instruction is fetched meanwhile) and 13 control
    // instructions (fetch, decode), plus the start
    chk("cycles", cyc, 18 * 4 + 13 * 2 + 1);
    chk("random bits taken", npop, 1);
    // coordinate shuffle: mask starts at 0; PATCH with N = 1 and random bit
    // 1 gives read patch 1 and write patch 0, so slot8 <- slot11. The
    // random bit is held off for 20 cycles: PATCH must wait for it.
    ld(B0 + 30, mk(OP_NNSUB, 3, 31, 30, AL));                // N = 1
    ld(B0 + 31, mk(OP_PATCH, 0, 0, 0, AL));
    ld(B0 + 32, mk(OP_NNADD, 8, 10, 31, arx(C_ALWAYS, 1, 1, 0)));
    ld(B0 + 33, mk(OP_STOP, 0, 0, 0, AL));
    rvalid = 0; rbit = 1;
    fork
      run(B0 + 30, cyc);
      begin repeat (20) @(negedge clk); rvalid = 1; end
    join
    rd(8, v); chk("shuffled write", v, 1234);
    chk("random bits taken", npop, 2);
    chk("mask changed", nremap, 1);
    // the random bit arrives when cyc = 19; then PATCH decode (1), NNADD
    // (fetch, decode, 3 waiting) and STOP (decode only, it was prefetched)
    chk("cycles with PATCH waiting", cyc, 19 + 1 + 5 + 1);
    rvalid = 1; rbit = 0;
    // built-in curve-constant routine
    wr(0, 65521); wr(1, 2); wr(2, 3);
    run(ENTRY_CST, cyc);
    rd(28, v); chk("R2", v, (15 * 15) % 65521);
    rd(26, v); chk("a*R", v, (2 * 15) % 65521);
    rd(27, v); chk("3b*R", v, (9 * 15) % 65521);
    rd(30, v); chk("one", v, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
