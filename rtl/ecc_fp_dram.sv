// ecc_fp_dram: the large-number memory of the ALU.
//
// Holds NWORDS signed numbers of WW = NN+2 bits each (NN bits of value, one
// bit of headroom for an unreduced sum and a sign bit). 32 words is the
// architecture's default capacity; the two extra bits are this design's
// choice so that a sum of two reduced field elements and a negative
// difference can be stored before correction.
// Two synchronous read ports (data one cycle after the address) and one
// synchronous write port. A read of the word being written returns the old
// value. No reset: the microcode initialises every word it reads.
module ecc_fp_dram #(
  parameter int unsigned NN     = 256,
  parameter int unsigned NWORDS = 32,
  localparam int unsigned WW    = NN + 2,
  localparam int unsigned AW    = $clog2(NWORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra_addr,
  output logic [WW-1:0] ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [WW-1:0] rb_data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WW-1:0] wdata
);
  logic [WW-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
