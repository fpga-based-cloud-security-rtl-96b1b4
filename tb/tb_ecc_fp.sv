// tb_ecc_fp: drives ecc_fp instruction by instruction (NN = 32, 8-bit
// digits) and checks every instruction's result and flags against values
// computed here: integer arithmetic, modular halving (NNDIV2), conditional
// write-back (on-the-fly correction), NNRND waiting for an empty random FIFO, asynchronous FPREDC
// on both multipliers, a scoreboard stall on a dependent instruction and
// BARRIER.
module tb_ecc_fp;
  import ecc_pkg::*;
  localparam int NN = 32, W = 8, WW = NN + 2;
  localparam logic [NN-1:0] P = 32'hFFFFFFFB;   // 2^32 - 5, prime
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ins_valid, ins_done, idle, rnd_valid, rnd_pop, ext_en, ext_we, ev_stall;
  instr_t ins;
  flags_t flags;
  logic [NN-1:0] rnd_data;
  logic [4:0] ext_addr;
  logic [WW-1:0] ext_wdata, ext_rdata;
  logic [1:0] ev_mm_start;

  logic ev_corr_taken, ev_corr_skip;
  ecc_fp #(.NN(NN), .W(W)) dut (.*);

  int checks = 0, failures = 0, stalls = 0;
  logic [1:0] mm_used = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (ev_stall) stalls <= stalls + 1;
    mm_used <= mm_used | ev_mm_start;
  end

  task automatic chk(input string what, input logic [WW-1:0] got, input logic [WW-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp_v); end
  endtask
  task automatic wr(input logic [4:0] a, input logic [WW-1:0] v);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = v;
    @(negedge clk); ext_en = 0; ext_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, output logic [WW-1:0] v);
    @(negedge clk); ext_en = 1; ext_addr = a;
    @(negedge clk); v = ext_rdata; ext_en = 0;
  endtask
  task automatic exec(input instr_t i);
    @(negedge clk); ins = i; ins_valid = 1;
    while (!ins_done) @(negedge clk);
    ins_valid = 0;
  endtask

  function automatic logic [NN-1:0] redc(logic [NN-1:0] a, logic [NN-1:0] b);
    // a*b*2^-32 mod p: multiply by the inverse of 2^32 mod p
    logic [2*NN-1:0] t;
    logic [NN-1:0] r, e, rinv;
    r = NN'((33'd1 << 32) % 33'(P));
    rinv = 1; e = P - 2;
    for (int i = NN-1; i >= 0; i--) begin
      rinv = NN'(((2*NN)'(rinv) * (2*NN)'(rinv)) % (2*NN)'(P));
      if (e[i]) rinv = NN'(((2*NN)'(rinv) * (2*NN)'(r)) % (2*NN)'(P));
    end
    t = ((2*NN)'(a) * (2*NN)'(b)) % (2*NN)'(P);
    return NN'(((2*NN)'(t) * (2*NN)'(rinv)) % (2*NN)'(P));
  endfunction

  localparam logic [11:0] AL = 12'h0, GE = {C_GE0, 10'b0}, IFN = {C_IFN, 10'b0};

  initial begin
    logic [WW-1:0] v;
    logic [NN-1:0] x, y, r0, r1;
    ins_valid = 0; ins = '0; rnd_valid = 0; rnd_data = 0; ext_en = 0; ext_we = 0;
    ext_addr = 0; ext_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    x = 32'h9abc1234 % P; y = 32'h7654fedc % P;
    wr(0, WW'(P)); wr(1, WW'(x)); wr(2, WW'(y)); wr(31, 0);

    exec(mk(OP_NNADD, 3, 1, 2, AL)); rd(3, v); chk("NNADD", v, WW'(x) + WW'(y));
    exec(mk(OP_NNSUB, 4, 2, 1, AL)); rd(4, v); chk("NNSUB", v, WW'(y) - WW'(x));
    checks++; if (!flags.n || flags.z) begin failures++; $display("FAIL flags after negative sub"); end
    exec(mk(OP_NNIADD, 5, 1, 0, 12'hFF0)); rd(5, v); chk("NNIADD", v, WW'(x) - 16);
    exec(mk(OP_NNXOR, 6, 1, 2, AL)); rd(6, v); chk("NNXOR", v, WW'(x ^ y));
    exec(mk(OP_NNSLL, 7, 1, 0, AL)); rd(7, v); chk("NNSLL", v, WW'(x) << 1);
    exec(mk(OP_NNSRL, 8, 1, 0, AL)); rd(8, v); chk("NNSRL", v, WW'(x >> 1));
    // NNDIV2 (halving mod p) on an odd and an even operand, and on x
    wr(13, 7); exec(mk(OP_NNDIV2, 14, 13, 0, AL)); rd(14, v); chk("NNDIV2 odd", v, WW'((64'(P) + 7) / 2));
    wr(13, 10); exec(mk(OP_NNDIV2, 14, 13, 0, AL)); rd(14, v); chk("NNDIV2 even", v, 5);
    exec(mk(OP_NNDIV2, 14, 1, 0, AL)); rd(14, v);
    chk("NNDIV2 x", v, WW'((64'(x) + (x[0] ? 64'(P) : 64'd0)) / 2));
    chk("NNDIV2 doubles back", WW'((2 * 64'(v)) % 64'(P)), WW'(x));
    exec(mk(OP_TESTPAR, 0, 1, 0, AL));
    checks++; if (flags.odd !== x[0]) begin failures++; $display("FAIL TESTPAR"); end
    // on-the-fly correction: modular add with and without reduction
    exec(mk(OP_NNSUB, 3, 3, 0, GE)); rd(3, v);
    chk("mod add", v, WW'((64'(x) + 64'(y)) % 64'(P)));
    wr(9, 5); exec(mk(OP_NNSUB, 9, 9, 0, GE)); rd(9, v); chk("no reduction", v, 5);
    // modular sub: correction applied (negative) and not applied
    exec(mk(OP_NNSUB, 10, 2, 1, AL)); exec(mk(OP_NNADD, 10, 10, 0, IFN)); rd(10, v);
    chk("mod sub", v, WW'((64'(y) + 64'(P) - 64'(x)) % 64'(P)));
    exec(mk(OP_NNSUB, 11, 1, 2, AL)); exec(mk(OP_NNADD, 11, 11, 0, IFN)); rd(11, v);
    chk("mod sub no corr", v, WW'(x - y));
    // NNRND: waits for random data, keeps NN-1 bits
    fork
      exec(mk(OP_NNRND, 12, 0, 0, AL));
      begin repeat (6) @(negedge clk); rnd_data = 32'hDEADBEEF; rnd_valid = 1; end
    join
    rnd_valid = 0;
    rd(12, v); chk("NNRND", v, WW'(32'h5EADBEEF));
    // FPREDC on two multipliers, then a dependent add that must stall
    exec(mk(OP_FPREDC, 13, 1, 2, AL));
    exec(mk(OP_FPREDC, 14, 2, 2, AL));
    exec(mk(OP_NNADD, 15, 13, 14, AL));
    exec(mk(OP_BARRIER, 0, 0, 0, AL));
    r0 = redc(x, y); r1 = redc(y, y);
    rd(13, v); chk("FPREDC 0", v, WW'(r0));
    rd(14, v); chk("FPREDC 1", v, WW'(r1));
    rd(15, v); chk("dependent add", v, WW'(r0) + WW'(r1));
    checks++; if (stalls == 0) begin failures++; $display("FAIL no scoreboard stall"); end
    checks++; if (mm_used != 2'b11) begin failures++; $display("FAIL multipliers used %b", mm_used); end
    checks++; if (!idle) begin failures++; $display("FAIL not idle after barrier"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
