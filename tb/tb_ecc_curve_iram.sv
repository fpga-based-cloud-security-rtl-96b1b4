// tb_ecc_curve_iram: reads the microcode memory and checks selected words
// against their encodings written out by hand from the instruction format,
// counts the Montgomery products of the point-addition routine (17: 12
// general, 3 by a, 2 by 3b), checks the one-cycle read latency and a debug
// patch of one word.
module tb_ecc_curve_iram;
  import ecc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0] raddr, dbg_waddr;
  instr_t rdata, dbg_wdata;
  logic dbg_we;
  ecc_curve_iram #(.NN(256), .RBITS(256)) dut (.*);

  int checks = 0, failures = 0;
  task automatic rd(input logic [8:0] a, output logic [31:0] v);
    @(negedge clk); raddr = a;
    @(negedge clk); v = rdata;
  endtask
  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h exp %h", what, got, e); end
  endtask

  initial begin
    logic [31:0] v;
    int nmul, nbar;
    dbg_we = 0; dbg_waddr = 0; dbg_wdata = '0; raddr = 0;
    // op(5) dst(5) sa(5) sb(5) ext(12)
    rd(9'h000, v); chk("cst[0] NNXOR 31,31,31", v, {5'd4, 5'd31, 5'd31, 5'd31, 12'h000});
    rd(9'h001, v); chk("cst[1] NNIADD 30,31,+1", v, {5'd3, 5'd30, 5'd31, 5'd0, 12'd1});
    rd(9'h003, v); chk("cst[3] NNIADD 29,31,+512", v, {5'd3, 5'd29, 5'd31, 5'd0, 12'd512});
    rd(9'h005, v); chk("cst[5] NNSUB 28,28,0 ge", v, {5'd2, 5'd28, 5'd28, 5'd0, 2'b01, 10'b0});
    rd(9'h007, v); chk("cst[7] JNZ 4", v, {5'd18, 15'd0, 12'd4});
    rd(9'h020, v); chk("kp[0] NNRND 20", v, {5'd8, 5'd20, 10'd0, 12'd0});
    rd(9'h100, v); chk("padd[0] FPREDC 20,14,17", v, {5'd9, 5'd20, 5'd14, 5'd17, 12'd0});
    nmul = 0; nbar = 0;
    for (int a = 'h100; a < 'h180; a++) begin
      rd(9'(a), v);
      if (v[31:27] == 5'd9) nmul++;
      if (v[31:27] == 5'd10) nbar++;
      if (v[31:27] == 5'd22) break;
    end
    checks++; if (nmul != 17) begin failures++; $display("FAIL padd products %0d", nmul); end
    checks++; if (nbar != 1) begin failures++; $display("FAIL padd barriers %0d", nbar); end
    // latency: the word appears one cycle after the address
    @(negedge clk); raddr = 9'h000;
    @(negedge clk); raddr = 9'h020;
    #1 chk("latency: old word", rdata, {5'd4, 5'd31, 5'd31, 5'd31, 12'h000});
    @(negedge clk); chk("latency: new word", rdata, {5'd8, 5'd20, 10'd0, 12'd0});
    // debug patch
    @(negedge clk); dbg_we = 1; dbg_waddr = 9'h1F0; dbg_wdata = instr_t'(32'hC0FFEE01);
    @(negedge clk); dbg_we = 0;
    rd(9'h1F0, v); chk("patched word", v, 32'hC0FFEE01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
