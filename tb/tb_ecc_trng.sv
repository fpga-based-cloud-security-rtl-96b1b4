// tb_ecc_trng: feeds a known bit sequence alternately through two sources
// and checks that the raw FIFO keeps the order, that the assembler builds
// numbers of each client's width from consecutive raw bits (first bit most
// significant) in round-robin client order, that it stops when all client
// FIFOs are full, that a debug read pops raw bits in order, and that the
// pooling tree alternates between two sources that deliver at once.
module tb_ecc_trng;
  localparam int MAXW = 8, DEPTH = 2, RAWD = 16;
  localparam int unsigned WID [4] = '{8, 2, 5, 8};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] src_valid, src_bit;
  logic [3:0] irn_valid, irn_pop, ev_irn_push;
  logic [MAXW-1:0] irn_data [4];
  logic dbg_pop, dbg_valid, dbg_bit;

  ecc_trng #(.NTRNG(2), .RAW_DEPTH(RAWD), .IRN_DEPTH(DEPTH), .IRN_MAXW(MAXW),
             .IRN_W(WID), .DEBUG(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  bit seq [$];
  int rp = 0;

  // expected number for the next word of client c
  function automatic logic [MAXW-1:0] take_bits(int n);
    logic [MAXW-1:0] v = 0;
    for (int i = 0; i < n; i++) begin v = {v[MAXW-2:0], 1'(seq[rp])}; rp++; end
    return v;
  endfunction

  initial begin
    logic [MAXW-1:0] expv [4][DEPTH];
    int total;
    src_valid = 0; src_bit = 0; irn_pop = 0; dbg_pop = 0;
    total = DEPTH * (8 + 2 + 5 + 8);
    repeat (2) @(negedge clk); rst_n = 1;
    // push total + 6 bits, one per cycle, alternating sources
    for (int i = 0; i < total + 6; i++) begin
      bit b;
      b = 1'($urandom);
      seq.push_back(b);
      @(negedge clk);
      src_valid = (i % 2 == 0) ? 2'b01 : 2'b10;
      src_bit = {b, b};
      @(posedge clk); #1 src_valid = 0;
    end
    repeat (40) @(negedge clk);
    // all client FIFOs are full: the last 6 bits wait in the raw FIFO
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (!dbg_valid || dbg_bit !== seq[total + i]) begin
        failures++; $display("FAIL raw bit %0d", i);
      end
      @(negedge clk); dbg_pop = 1; @(negedge clk); dbg_pop = 0;
    end
    checks++;
    if (dbg_valid) begin failures++; $display("FAIL raw FIFO not empty"); end
    // both sources at once (source 0 gives 0, source 1 gives 1): the pooling
    // node alternates, starting with source 0, and drops the loser's bit
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); src_valid = 2'b11; src_bit = 2'b10;
      @(posedge clk); #1 src_valid = 0;
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (!dbg_valid || dbg_bit !== 1'(i % 2)) begin
        failures++; $display("FAIL contended pool bit %0d", i);
      end
      @(negedge clk); dbg_pop = 1; @(negedge clk); dbg_pop = 0;
    end
    checks++;
    if (dbg_valid) begin failures++; $display("FAIL contended bits not dropped"); end
    for (int d = 0; d < DEPTH; d++)
      for (int c = 0; c < 4; c++) expv[c][d] = take_bits(int'(WID[c]));
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < DEPTH; d++) begin
        checks++;
        if (!irn_valid[c] || irn_data[c] !== expv[c][d]) begin
          failures++; $display("FAIL client %0d word %0d got %h exp %h", c, d, irn_data[c], expv[c][d]);
        end
        @(negedge clk); irn_pop[c] = 1; @(negedge clk); irn_pop[c] = 0;
      end
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
