// tb_mm_ndsp: random Montgomery products checked against
// a*b*R^-1 mod p computed with the testbench's own modular arithmetic,
// for a 64-bit modulus with 16-bit digits (R = 2^64) and for edge operands
// (0, 1, p-1). Also checks the latency of S+2 cycles from start to result.
module tb_mm_ndsp;
  localparam int NN = 64, W = 16, S = NN / W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, res_valid, res_ack;
  logic [NN-1:0] a, b, p, res;

  mm_ndsp #(.NN(NN), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  // R^-1 mod p by Fermat: p is prime here
  function automatic logic [NN-1:0] mulmod(logic [NN-1:0] x, logic [NN-1:0] y, logic [NN-1:0] m);
    logic [2*NN-1:0] t;
    t = (2*NN)'(x) * (2*NN)'(y);
    return NN'(t % (2*NN)'(m));
  endfunction
  function automatic logic [NN-1:0] powmod(logic [NN-1:0] x, logic [NN-1:0] e, logic [NN-1:0] m);
    logic [NN-1:0] r = 1;
    for (int i = NN-1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  task automatic one(input logic [NN-1:0] x, input logic [NN-1:0] y, input logic [NN-1:0] rinv);
    int cyc;
    logic [NN-1:0] expv;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    expv = mulmod(mulmod(x, y, p), rinv, p);
    checks++;
    if (res !== expv) begin failures++; $display("FAIL %h*%h got %h exp %h", x, y, res, expv); end
    checks++;
    if (cyc != S + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    res_ack = 1; @(negedge clk); res_ack = 0;
  endtask

  initial begin
    logic [NN-1:0] r, rinv;
    start = 0; res_ack = 0; a = 0; b = 0;
    p = 64'hFFFFFFFFFFFFFFC5;        // largest 64-bit prime
    repeat (2) @(negedge clk); rst_n = 1;
    r = NN'((65'd1 << 64) % 65'(p));
    rinv = powmod(r, p - 2, p);
    one(0, 5, rinv); one(1, 1, rinv); one(p - 1, p - 1, rinv);
    for (int i = 0; i < 40; i++)
      one({$urandom, $urandom} % p, {$urandom, $urandom} % p, rinv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
