// tb_es_trng: checks the entropy-source model's sample rate (one bit every
// PERIOD cycles while enabled, none while disabled) and that both bit
// values occur.
module tb_es_trng;
  localparam int PERIOD = 5;
  logic clk = 0, rst_n = 0, en, valid, bit_o;
  always #5 clk = ~clk;
  es_trng #(.PERIOD(PERIOD)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    int n, ones, last, gap_bad;
    en = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    checks++; if (valid) begin failures++; $display("FAIL valid while disabled"); end
    en = 1; n = 0; ones = 0; last = -1; gap_bad = 0;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      if (valid) begin
        if (last >= 0 && c - last != PERIOD) gap_bad++;
        last = c; n++; ones += int'(bit_o);
      end
    end
    checks++; if (n != 1000 / PERIOD) begin failures++; $display("FAIL %0d samples", n); end
    checks++; if (gap_bad != 0) begin failures++; $display("FAIL sample spacing"); end
    checks++; if (ones < 50 || ones > 150) begin failures++; $display("FAIL ones=%0d of %0d", ones, n); end
    en = 0; repeat (PERIOD + 1) @(negedge clk);
    n = 0;
    repeat (50) begin @(negedge clk); n += int'(valid); end
    checks++; if (n != 0) begin failures++; $display("FAIL samples after disable"); end
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
