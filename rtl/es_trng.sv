// es_trng: stand-in for one ES-TRNG entropy source. The real source is a
// pair of free-running ring oscillators whose relative jitter is sampled;
// that cannot be described as portable RTL. This model keeps the interface
// (one raw bit per sample, as a one-cycle valid pulse) and produces the bits
// from a 32-bit xorshift generator seeded by SEED, so the surrounding logic
// can be simulated and synthesized. Statistically it is a PRNG, not a TRNG.
// The sample period PERIOD is this model's choice.
module es_trng #(
  parameter int unsigned PERIOD = 4,
  parameter logic [31:0] SEED   = 32'h2545_F491
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic valid,
  output logic bit_o
);
  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  logic [31:0] st;
  logic [$clog2(PERIOD+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; valid <= 1'b0; bit_o <= 1'b0;
      st  <= (SEED == 32'd0) ? 32'd1 : SEED;
    end else begin
      valid <= 1'b0;
      if (en) begin
        if (int'(cnt) == int'(PERIOD) - 1) begin
          cnt   <= '0;
          valid <= 1'b1;
          st    <= xs32(st);
          bit_o <= ^(xs32(st) & 32'h8000_0421);
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
