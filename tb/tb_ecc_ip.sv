// tb_ecc_ip: end-to-end test of the whole IP through its AXI4-lite port on
// a 32-bit curve (p = 2^32 - 5, a = -3), with 8-bit multiplier digits.
// Software's view: load p, a, b, P and k, start, wait for irq, read Q.
// Each result is compared with an affine reference model. The test also
// makes every mechanism of the design happen and counts it: the
// curve-constant routine run and skipped, both multipliers, scoreboard
// stalls, ladder patch with either bit value, ladder coordinates moved and
// left in place by the random shuffle, on-the-fly correction taken
// and skipped, NNRND, irq, the infinity flag, SLVERR while busy, the debug
// read of raw random bits, a microcode patch over AXI and a curve change.
// The runs marked as timed (different k on one curve) must take the same
// number of cycles (constant-time ladder). The others may take a few
// cycles more when a random-number FIFO is empty at the moment of a request.
module tb_ecc_ip;
  import ecc_pkg::*;
  import ec_ref_pkg::*;
  localparam int NN = 32;
  localparam int W = 8, NL = (NN + 31) / 32;
  localparam longint P = 64'hFFFFFFFB, A = P - 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic irq, busy;
  logic [1:0] irn_valid, irn_pop;
  logic [NN-1:0] irn_data [2];

  ecc_ip #(.NN(NN), .W(W)) dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .*);

  // mechanism counters
  int n_cst = 0, n_mm0 = 0, n_mm1 = 0, n_stall = 0, n_swap = 0, n_keep = 0, n_remap = 0;
  int n_corr_t = 0, n_corr_s = 0, n_rnd = 0, n_irq = 0, n_inf = 0, n_slverr = 0;
  int n_raw = 0, n_curve_change = 0;
  logic irq_q = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_cst    <= n_cst + int'(dut.ev_cst_run);
    n_mm0    <= n_mm0 + int'(dut.ev_mm_start[0]);
    n_mm1    <= n_mm1 + int'(dut.ev_mm_start[1]);
    n_stall  <= n_stall + int'(dut.ev_stall);
    n_swap   <= n_swap + int'(dut.ev_patch_swap);
    n_keep   <= n_keep + int'(dut.ev_patch_keep);
    n_remap  <= n_remap + int'(dut.ev_remap);
    n_corr_t <= n_corr_t + int'(dut.ev_corr_taken);
    n_corr_s <= n_corr_s + int'(dut.ev_corr_skip);
    n_rnd    <= n_rnd + int'(dut.rnd_pop);
    irq_q    <= irq;
    if (irq && !irq_q) n_irq <= n_irq + 1;
  end
  assign irn_pop = irn_valid;   // drain the unused clients

  int checks = 0, failures = 0;
  task automatic chk(input string what, input longint got, input longint e);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, e); end
  endtask

  task automatic axw(input logic [7:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk); s_axi_awaddr = a; s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    resp = s_axi_bresp;
    @(posedge clk); #1 s_axi_bready = 0;
  endtask
  task automatic axr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_axi_araddr = a; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk); s_axi_arvalid = 0; s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    @(posedge clk); #1 s_axi_rready = 0;
  endtask
  task automatic put_num(input int slot, input longint v);
    logic [1:0] r;
    axw(8'h04, 32'(slot), r);
    for (int i = 0; i < NL; i++) axw(8'h08, 32'(v >> (32 * i)), r);
  endtask
  task automatic get_num(input int slot, output longint v);
    logic [31:0] d;
    logic [1:0] r;
    axw(8'h0C, 32'(slot), r);
    v = 0;
    for (int i = 0; i < NL; i++) begin axr(8'h10, d); v = v | (longint'(d) << (32 * i)); end
  endtask

  int kp_cycles [$];
  task automatic kp(input longint k, input pt_t G, input longint b, input bit try_busy_write, input bit timed);
    logic [1:0] r;
    logic [31:0] st;
    longint qx, qy;
    int cyc;
    pt_t Rf;
    put_num(S_K, k); put_num(S_PX, G.x); put_num(S_PY, G.y);
    axw(8'h00, 1, r);
    cyc = 0;
    if (try_busy_write) begin
      axw(8'h04, 3, r);
      chk("SLVERR while busy", r, 2'b10);
      if (r == 2'b10) n_slverr++;
      cyc += 8;
    end
    while (!irq) begin @(negedge clk); cyc++; end
    axr(8'h00, st);
    axw(8'h14, 1, r);
    Rf = smul(k, G, A, P);
    chk("infinity flag", st[2], Rf.inf);
    if (st[2]) n_inf++;
    if (!Rf.inf) begin
      get_num(S_QX, qx); get_num(S_QY, qy);
      chk("Qx", qx, Rf.x); chk("Qy", qy, Rf.y);
    end
    if (timed) kp_cycles.push_back(cyc);
    $display("k=%0h cycles~%0d", k, cyc);
  endtask

  initial begin
    pt_t G;
    longint b;
    logic [31:0] d;
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_awvalid = 0; s_axi_wvalid = 0;
    s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0; s_axi_wdata = 0; s_axi_wstrb = 4'hF;
    repeat (3) @(negedge clk); rst_n = 1;
    b = 64'h2D3A1B7;
    put_num(S_P, P); put_num(S_A, A); put_num(S_B, b);
    G = find_point(2, A, b, P);
    kp(64'h9E3779B9, G, b, 0, 0);
    kp(1, G, b, 0, 1);
    kp(64'hFFFFFFFF & longint'({$urandom}), G, b, 1, 0);
    kp(0, G, b, 0, 1);
    kp(64'hC0000001, G, b, 0, 1);
    // new curve: constants recomputed
    b = 64'h7;
    put_num(S_B, b); n_curve_change++;
    G = find_point(11, A, b, P);
    kp(64'h12345678, G, b, 0, 0);
    // raw random bits through the debug register
    for (int i = 0; i < 400 && n_raw < 8; i++) begin
      axr(8'h18, d);
      if (d[31]) n_raw++;
    end
    // microcode patch over AXI (debug mode): the instruction before the
    // final STOP of [k]P, which sets Z when the result is the point at
    // infinity, is replaced by 1 - 1 (Z always set). A run with k = 3 must
    // then report infinity. The original word is written back and the next
    // run must be right again.
    begin
      int ap;
      logic [1:0] r;
      logic [31:0] st;
      instr_t orig;
      ap = int'(ENTRY_KP);
      while (dut.u_iram.mem[ap].op != OP_STOP) ap++;
      ap--;
      orig = dut.u_iram.mem[ap];
      axw(8'h1C, 32'(ap), r);
      axw(8'h20, mk(OP_NNSUB, S_T1, S_ONE, S_ONE, 12'h0), r);
      chk("microcode patch write", r, 2'b00);
      put_num(S_K, 3); axw(8'h00, 1, r);
      while (!irq) @(negedge clk);
      axr(8'h00, st); axw(8'h14, 1, r);
      chk("patched microcode reports infinity", st[2], 1);
      axw(8'h1C, 32'(ap), r); axw(8'h20, orig, r);
      kp(64'h0BADCAFE, G, b, 0, 0);
    end
    // constant time
    foreach (kp_cycles[i]) chk("constant-time run", kp_cycles[i], kp_cycles[0]);
    $display("mechanisms: cst=%0d mm0=%0d mm1=%0d stall=%0d swap=%0d keep=%0d remap=%0d corr_taken=%0d corr_skip=%0d rnd=%0d irq=%0d inf=%0d slverr=%0d raw=%0d",
             n_cst, n_mm0, n_mm1, n_stall, n_swap, n_keep, n_remap, n_corr_t, n_corr_s, n_rnd, n_irq, n_inf, n_slverr, n_raw);
    chk("curve-constant runs (2 curves, 6 runs)", n_cst, 2);
    checks++; if (n_mm0 == 0 || n_mm1 == 0) begin failures++; $display("FAIL a multiplier unused"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (n_swap == 0 || n_keep == 0) begin failures++; $display("FAIL patch"); end
    checks++; if (n_remap == 0 || n_remap >= n_swap + n_keep) begin failures++; $display("FAIL shuffle"); end
    checks++; if (n_corr_t == 0 || n_corr_s == 0) begin failures++; $display("FAIL correction"); end
    chk("NNRND per run", n_rnd, 8);
    chk("irq per run", n_irq, 8);
    chk("infinity results", n_inf, 1);
    chk("raw bits read", n_raw, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
