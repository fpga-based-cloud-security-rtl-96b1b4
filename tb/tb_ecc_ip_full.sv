// tb_ecc_ip_full: the IP at its default parameters (NN = 256, 16-bit
// multiplier digits, two multipliers) computes [k]P on the NIST P-256 curve
// through the AXI4-lite port: once for a random 256-bit k, compared with an
// affine reference model written here with 512-bit arithmetic, and once for
// k = n, the group order, which must give the point at infinity. The same
// two runs are then repeated on secp256k1 (a = 0) after loading new curve
// constants, so that the IP is shown to be curve-agnostic. For each curve
// the testbench first checks that the base point lies on the curve.
module tb_ecc_ip_full;
  import ecc_pkg::*;
  localparam int NN = 256, NL = 8;
  typedef logic [255:0] u256;
  // NIST P-256
  localparam u256 P1  = 256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF;
  localparam u256 A1  = P1 - 3;
  localparam u256 B1  = 256'h5AC635D8AA3A93E7B3EBBD55769886BC651D06B0CC53B0F63BCE3C3E27D2604B;
  localparam u256 GX1 = 256'h6B17D1F2E12C4247F8BCE6E563A440F277037D812DEB33A0F4A13945D898C296;
  localparam u256 GY1 = 256'h4FE342E2FE1A7F9B8EE7EB4A7C0F9E162BCE33576B315ECECBB6406837BF51F5;
  localparam u256 N1  = 256'hFFFFFFFF00000000FFFFFFFFFFFFFFFFBCE6FAADA7179E84F3B9CAC2FC632551;
  // secp256k1
  localparam u256 P2  = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEFFFFFC2F;
  localparam u256 A2  = 256'd0;
  localparam u256 B2  = 256'd7;
  localparam u256 GX2 = 256'h79BE667EF9DCBBAC55A06295CE870B07029BFCDB2DCE28D959F2815B16F81798;
  localparam u256 GY2 = 256'h483ADA7726A3C4655DA4FBFC0E1108A8FD17B448A68554199C47D08FFB10D4B8;
  localparam u256 N2  = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEBAAEDCE6AF48A03BBFD25E8CD0364141;

  // curve currently loaded (used by the reference model)
  u256 P, A, B;

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

  ecc_ip dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .*);
  assign irn_pop = irn_valid;

  int checks = 0, failures = 0;

  // ---- reference arithmetic ----
  function automatic u256 mulm(u256 a, u256 b);
    logic [511:0] t;
    t = 512'(a) * 512'(b);
    return u256'(t % 512'(P));
  endfunction
  function automatic u256 addm(u256 a, u256 b);
    logic [256:0] t;
    t = 257'(a) + 257'(b);
    if (t >= 257'(P)) t = t - 257'(P);
    return u256'(t);
  endfunction
  function automatic u256 subm(u256 a, u256 b);
    return (a >= b) ? a - b : u256'(257'(a) + 257'(P) - 257'(b));
  endfunction
  function automatic u256 invm(u256 a);
    u256 r = 1, e = P - 2;
    for (int i = 255; i >= 0; i--) begin
      r = mulm(r, r);
      if (e[i]) r = mulm(r, a);
    end
    return r;
  endfunction
  typedef struct { u256 x; u256 y; bit inf; } pt_t;
  function automatic pt_t padd(pt_t p1, pt_t p2);
    pt_t r; u256 l;
    if (p1.inf) return p2;
    if (p2.inf) return p1;
    if (p1.x == p2.x) begin
      if (addm(p1.y, p2.y) == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
      l = mulm(addm(mulm(3, mulm(p1.x, p1.x)), A), invm(addm(p1.y, p1.y)));
    end else
      l = mulm(subm(p2.y, p1.y), invm(subm(p2.x, p1.x)));
    r.inf = 0;
    r.x = subm(subm(mulm(l, l), p1.x), p2.x);
    r.y = subm(mulm(l, subm(p1.x, r.x)), p1.y);
    return r;
  endfunction
  function automatic pt_t smul(u256 k, pt_t p1);
    pt_t r;
    r.inf = 1; r.x = 0; r.y = 0;
    for (int i = 255; i >= 0; i--) begin
      r = padd(r, r);
      if (k[i]) r = padd(r, p1);
    end
    return r;
  endfunction

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
  task automatic put_num(input int slot, input u256 v);
    logic [1:0] r;
    axw(8'h04, 32'(slot), r);
    for (int i = 0; i < NL; i++) axw(8'h08, v[32*i +: 32], r);
  endtask
  task automatic get_num(input int slot, output u256 v);
    logic [31:0] d;
    logic [1:0] r;
    axw(8'h0C, 32'(slot), r);
    for (int i = 0; i < NL; i++) begin axr(8'h10, d); v[32*i +: 32] = d; end
  endtask

  task automatic kp(input u256 k, input pt_t G);
    logic [1:0] r;
    logic [31:0] st;
    u256 qx, qy;
    int cyc;
    pt_t Rf;
    put_num(S_K, k); put_num(S_PX, G.x); put_num(S_PY, G.y);
    axw(8'h00, 1, r);
    cyc = 0;
    while (!irq) begin @(negedge clk); cyc++; end
    axr(8'h00, st);
    axw(8'h14, 1, r);
    Rf = smul(k, G);
    checks++;
    if (st[2] !== Rf.inf) begin failures++; $display("FAIL infinity flag %0b", st[2]); end
    if (!Rf.inf) begin
      get_num(S_QX, qx); get_num(S_QY, qy);
      checks++;
      if (qx !== Rf.x || qy !== Rf.y) begin
        failures++; $display("FAIL Q = (%h, %h) expected (%h, %h)", qx, qy, Rf.x, Rf.y);
      end
    end
    $display("k=%h cycles=%0d", k, cyc);
  endtask

  // Load a curve, check its base point, then run a random k and k = n.
  task automatic curve_runs(input string name, input u256 p, input u256 a, input u256 b,
                            input u256 gx, input u256 gy, input u256 n);
    pt_t G;
    u256 k;
    P = p; A = a; B = b;
    G.x = gx; G.y = gy; G.inf = 0;
    $display("curve %s", name);
    checks++;
    if (mulm(gy, gy) != addm(addm(mulm(mulm(gx, gx), gx), mulm(a, gx)), b)) begin
      failures++; $display("FAIL %s base point not on the curve", name);
    end
    put_num(S_P, p); put_num(S_A, a); put_num(S_B, b);
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    kp(k, G);
    kp(n, G);
  endtask

  initial begin
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_awvalid = 0; s_axi_wvalid = 0;
    s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0; s_axi_wdata = 0; s_axi_wstrb = 4'hF;
    repeat (3) @(negedge clk); rst_n = 1;
    curve_runs("P-256", P1, A1, B1, GX1, GY1, N1);
    curve_runs("secp256k1", P2, A2, B2, GX2, GY2, N2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
