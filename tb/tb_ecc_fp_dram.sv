// tb_ecc_fp_dram: random writes and reads on both read ports compared with
// a testbench copy of the memory; checks the one-cycle read latency and
// that a read of the word being written returns the old value.
module tb_ecc_fp_dram;
  localparam int NN = 30, WW = NN + 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ra_addr, rb_addr, waddr;
  logic [WW-1:0] ra_data, rb_data, wdata;
  logic we;
  ecc_fp_dram #(.NN(NN)) dut (.*);

  logic [WW-1:0] model [32];
  int checks = 0, failures = 0;

  initial begin
    logic [WW-1:0] ea, eb;
    we = 0; ra_addr = 0; rb_addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = WW'({$urandom, $urandom}); model[i] = wdata;
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      ra_addr = 5'($urandom); rb_addr = 5'($urandom);
      we = 1'($urandom); waddr = (t % 4 == 0) ? ra_addr : 5'($urandom);
      wdata = WW'({$urandom, $urandom});
      ea = model[ra_addr]; eb = model[rb_addr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks += 2;
      if (ra_data !== ea) begin failures++; $display("FAIL port a @%0d", ra_addr); end
      if (rb_data !== eb) begin failures++; $display("FAIL port b @%0d", rb_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
