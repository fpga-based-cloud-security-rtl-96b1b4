// tb_ecc_nbmm: runs [k]P on the CPU core with 1, 2 and 4 Montgomery
// multipliers (the supported range) through kp_harness, at NN = 16 with
// 1-bit digits, so a product (18 cycles) outlasts several instruction
// issues (4 cycles each) and several products are in flight. Checks
// every result against the reference model, how many multipliers were
// used, and that a [k]P gets faster from 1 to 2 units and no slower from 2
// to 4. With 1 and 2 units every unit must be used. With 4 units at least
// 3 must be: a fourth would need four independent products issued within
// one product time, which the point-addition microcode never has.
module tb_ecc_nbmm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 3;
  localparam int NB [NCFG] = '{1, 2, 4};
  logic fin [NCFG];
  int c [NCFG], f [NCFG], cyc [NCFG], used [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    kp_harness #(.NBMM(NB[g]), .W(1), .NRUNS(3)) u_h (.clk, .rst_n, .finished(fin[g]),
      .checks(c[g]), .failures(f[g]), .kp_cycles(cyc[g]), .mm_used(used[g]));
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i]; failures += f[i];
      $display("NBMM=%0d cycles=%0d multipliers used=%0d", NB[i], cyc[i], used[i]);
      checks++;
      if (used[i] != (NB[i] < 3 ? NB[i] : 3) && used[i] != NB[i]) begin failures++; $display("FAIL NBMM=%0d used %0d", NB[i], used[i]); end
    end
    checks++;
    if (!(cyc[0] > cyc[1] && cyc[1] >= cyc[2])) begin
      failures++; $display("FAIL cycles do not fall with more multipliers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
