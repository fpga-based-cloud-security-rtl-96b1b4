// ecc_ip: elliptic-curve scalar multiplication accelerator, [k]P on any
// short-Weierstrass curve y^2 = x^3 + ax + b over a prime field of NN bits.
//
// Hierarchy (as in the architecture): ecc_axi (AXI4-lite register bank) ->
// ecc_scalar (main state machine) -> ecc_curve (microcoded CPU, with its
// ecc_curve_iram) -> ecc_fp (ALU, with ecc_fp_dram and NBMM mm_ndsp
// Montgomery multipliers); ecc_trng feeds random numbers from NTRNG entropy
// sources (es_trng models) to four client FIFOs, of which the NNRND client
// is used by ecc_fp, the coordinate-shuffling client by ecc_curve and the
// debug read of raw bits by ecc_axi. The streams of the two other clients
// (scalar blinding, memory shuffling) are brought out as ports irn_*[0] and
// irn_*[1], since those countermeasures are not part of this design.
// Ports follow the IP's block-design symbol: s_axi*, s_axi_aclk,
// s_axi_aresetn, irq and busy. The whole IP runs on s_axi_aclk; the
// separate multiplier clock and the debug ports of the symbol are left out.
// Timing: busy rises two cycles after the CTRL start write is taken and
// falls when the result is in memory; irq stays high until IRQ_ACK.
module ecc_ip
  import ecc_pkg::*;
#(
  parameter int unsigned NN    = 256,
  parameter int unsigned W     = 16,
  parameter int unsigned NBMM  = 2,
  parameter int unsigned NTRNG = 2,
  parameter bit          DEBUG = 1'b1
) (
  input  logic          s_axi_aclk,
  input  logic          s_axi_aresetn,
  input  logic [7:0]    s_axi_awaddr,
  input  logic          s_axi_awvalid,
  output logic          s_axi_awready,
  input  logic [31:0]   s_axi_wdata,
  input  logic [3:0]    s_axi_wstrb,
  input  logic          s_axi_wvalid,
  output logic          s_axi_wready,
  output logic [1:0]    s_axi_bresp,
  output logic          s_axi_bvalid,
  input  logic          s_axi_bready,
  input  logic [7:0]    s_axi_araddr,
  input  logic          s_axi_arvalid,
  output logic          s_axi_arready,
  output logic [31:0]   s_axi_rdata,
  output logic [1:0]    s_axi_rresp,
  output logic          s_axi_rvalid,
  input  logic          s_axi_rready,
  output logic          irq,
  output logic          busy,
  // random numbers for the countermeasure clients outside this design
  output logic [1:0]    irn_valid,
  output logic [NN-1:0] irn_data [2],
  input  logic [1:0]    irn_pop
);
  localparam int unsigned WW = NN + 2;
  localparam int unsigned S  = (NN + W - 1) / W;

  logic clk, rst_n;
  assign clk   = s_axi_aclk;
  assign rst_n = s_axi_aresetn;

  // ecc_axi <-> ecc_scalar / memory / microcode / TRNG
  logic kp_start, curve_changed, kp_done, kp_inf, ev_cst_run;
  logic ext_en, ext_we;
  logic [4:0] ext_addr;
  logic [WW-1:0] ext_wdata, ext_rdata;
  logic iram_we;
  logic [IRAM_AW-1:0] iram_waddr;
  instr_t iram_wdata;
  logic raw_valid, raw_bit, raw_pop;

  ecc_axi #(.NN(NN), .DEBUG(DEBUG)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready, .irq,
    .kp_start, .curve_changed, .busy, .kp_done, .kp_inf,
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .iram_we, .iram_waddr, .iram_wdata,
    .raw_valid, .raw_bit, .raw_pop);

  // ecc_scalar <-> ecc_curve
  logic crv_start, crv_done, crv_zflag, crv_running;
  logic [IRAM_AW-1:0] crv_entry, iram_addr, pc;
  instr_t iram_data, ins;
  logic ins_valid, ins_done, fp_idle, ev_patch_swap, ev_patch_keep, ev_stall;
  logic ev_corr_taken, ev_corr_skip, ev_remap, shuf_pop;
  logic [3:0] irn_v, irn_p, ev_irn_push;
  logic [NN-1:0] irn_d [4];
  logic [NBMM-1:0] ev_mm_start;
  flags_t flags;

  ecc_scalar u_scalar (
    .clk, .rst_n, .start(kp_start), .curve_changed, .busy, .done(kp_done),
    .inf(kp_inf), .ev_cst_run, .crv_start, .crv_entry, .crv_done,
    .crv_zflag);

  ecc_curve u_curve (
    .clk, .rst_n, .start(crv_start), .entry(crv_entry), .done(crv_done),
    .zflag(crv_zflag), .running(crv_running), .iram_addr, .iram_data,
    .ins_valid, .ins, .ins_done, .flags, .pc,
    .rnd_valid(irn_v[CL_CURVE]), .rnd_bit(irn_d[CL_CURVE][0]), .rnd_pop(shuf_pop),
    .ev_patch_swap, .ev_patch_keep, .ev_remap);

  ecc_curve_iram #(.NN(NN), .RBITS(W * S)) u_iram (
    .clk, .raddr(iram_addr), .rdata(iram_data),
    .dbg_we(iram_we), .dbg_waddr(iram_waddr), .dbg_wdata(iram_wdata));

  // TRNG
  logic [NTRNG-1:0] src_valid, src_bit;
  logic rnd_pop;

  for (genvar g = 0; g < NTRNG; g++) begin : g_src
    es_trng #(.PERIOD(3 + g), .SEED(32'h9E37_79B9 * (g + 1))) u_src (
      .clk, .rst_n, .en(1'b1), .valid(src_valid[g]), .bit_o(src_bit[g]));
  end

  ecc_trng #(.NTRNG(NTRNG), .IRN_MAXW(NN), .IRN_W('{NN, 2, 5, NN}), .DEBUG(DEBUG)) u_trng (
    .clk, .rst_n, .src_valid, .src_bit, .irn_valid(irn_v), .irn_data(irn_d),
    .irn_pop(irn_p), .dbg_pop(raw_pop), .dbg_valid(raw_valid), .dbg_bit(raw_bit),
    .ev_irn_push);

  assign irn_p = {rnd_pop, irn_pop[1], shuf_pop, irn_pop[0]};
  assign irn_valid = {irn_v[CL_DRAM], irn_v[CL_AXI]};
  assign irn_data[0] = irn_d[CL_AXI];
  assign irn_data[1] = irn_d[CL_DRAM];

  ecc_fp #(.NN(NN), .W(W), .NBMM(NBMM)) u_fp (
    .clk, .rst_n, .ins_valid, .ins, .ins_done, .flags, .idle(fp_idle),
    .rnd_valid(irn_v[CL_FP]), .rnd_data(irn_d[CL_FP]), .rnd_pop,
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .ev_stall, .ev_mm_start, .ev_corr_taken, .ev_corr_skip);
endmodule
