// mm_ndsp: Montgomery multiplier, REDC(a*b) = a * b * R^-1 mod p.
//
// Digit-serial (radix 2^W) Montgomery multiplication with R = 2^(W*S),
// S = ceil(NN/W) digits. One digit of a is consumed per cycle:
//   u = T + a_i*b ;  m = (u * p') mod 2^W ;  T = (u + m*p) / 2^W
// with p' = -p^-1 mod 2^W, computed from p by Newton iteration when the
// operation starts. T stays below 2p, so one conditional subtraction at the
// end gives a fully reduced result for a, b < p.
// The architecture names this unit after its configurable number of DSP
// multiplier-accumulators; here the digit width W plays that role (one
// W x NN and one W x NN product per cycle), which is this design's choice.
// Timing: start is accepted when !busy; res_valid is seen S+2 cycles after the start cycle
// and holds the result until res_ack.
module mm_ndsp #(
  parameter int unsigned NN = 256,
  parameter int unsigned W  = 16,
  localparam int unsigned S = (NN + W - 1) / W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NN-1:0] a,
  input  logic [NN-1:0] b,
  input  logic [NN-1:0] p,
  output logic          busy,      // operation or unacknowledged result
  output logic          res_valid,
  output logic [NN-1:0] res,
  input  logic          res_ack
);
  typedef enum logic [1:0] {IDLE, RUN, FIN, HOLD} state_e;
  state_e state;

  localparam int unsigned TW = NN + W + 2;

  logic [W*S-1:0]   a_sh;
  logic [NN-1:0]    b_r, p_r;
  logic [W-1:0]     pinv_r;
  logic [TW-1:0]    t_r;
  logic [$clog2(S+1)-1:0] cnt;

  // -p^-1 mod 2^W by Newton iteration (x <- x*(2 - p*x)); p odd.
  function automatic logic [W-1:0] neg_inv(logic [W-1:0] p0);
    logic [W-1:0] x;
    x = p0;                      // correct to 3 bits for odd p0
    for (int i = 0; i < 6; i++) x = x * (W'(2) - p0 * x);
    return -x;
  endfunction

  logic [TW-1:0] u, v;
  logic [W-1:0]  m;
  always_comb begin
    u = t_r + TW'(a_sh[W-1:0]) * TW'(b_r);
    m = u[W-1:0] * pinv_r;
    v = (u + TW'(m) * TW'(p_r)) >> W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cnt <= '0; t_r <= '0; a_sh <= '0; b_r <= '0; p_r <= '0;
      pinv_r <= '0; res <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          a_sh   <= (W*S)'(a);
          b_r    <= b;
          p_r    <= p;
          pinv_r <= neg_inv(p[W-1:0]);
          t_r    <= '0;
          cnt    <= '0;
          state  <= RUN;
        end
        RUN: begin
          t_r  <= v;
          a_sh <= a_sh >> W;
          cnt  <= cnt + 1'b1;
          if (cnt == ($clog2(S+1))'(S - 1)) state <= FIN;
        end
        FIN: begin
          res   <= (t_r >= TW'(p_r)) ? NN'(t_r - TW'(p_r)) : NN'(t_r);
          state <= HOLD;
        end
        HOLD: if (res_ack) state <= IDLE;
      endcase
    end
  end

  assign busy      = (state != IDLE);
  assign res_valid = (state == HOLD);
endmodule
