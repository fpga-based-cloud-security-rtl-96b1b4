// ecc_trng: random-number path from the entropy sources to the four
// client FIFOs.
//   1. NTRNG raw sources are pooled by a binary tree of 2:1 nodes, as in
//      the architecture, into
//   2. the raw random FIFO, one bit per entry (RAW_DEPTH entries).
//   3. An assembler pulls raw bits one per cycle and builds an internal
//      random number (IRN) of IRN_W[c] bits for client c; clients are served
//      in round-robin order, skipping those whose FIFO is full (the
//      arbitration schedule). No post-processing is applied, as in the
//      architecture; a post-processing stage would sit between the raw FIFO
//      and the assembler.
//   4. Four IRN FIFOs (IRN_DEPTH entries, right-aligned in IRN_MAXW bits)
//      serve the clients: 0 scalar blinding, 1 coordinate shuffling,
//      2 memory shuffling, 3 NNRND.
// In debug mode (DEBUG = 1) software may pop the raw FIFO through dbg_pop;
// a debug pop has priority over the assembler.
// The structure (raw FIFO, assembler, four IRN FIFOs, debug read of raw
// bits) follows the architecture; depths, widths and the arbitration order
// are this design's choices.
module ecc_trng #(
  parameter int unsigned NTRNG     = 2,
  parameter int unsigned RAW_DEPTH = 64,
  parameter int unsigned IRN_DEPTH = 4,
  parameter int unsigned IRN_MAXW  = 256,
  parameter int unsigned IRN_W [4] = '{256, 2, 5, 256},
  parameter bit          DEBUG     = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // raw sources
  input  logic [NTRNG-1:0]    src_valid,
  input  logic [NTRNG-1:0]    src_bit,
  // clients
  output logic [3:0]          irn_valid,
  output logic [IRN_MAXW-1:0] irn_data [4],
  input  logic [3:0]          irn_pop,
  // debug read of raw bits
  input  logic                dbg_pop,
  output logic                dbg_valid,
  output logic                dbg_bit,
  // observation
  output logic [3:0]          ev_irn_push
);
  // ---- pooling: binary tree of 2:1 nodes over the sources ----
  // Heap layout: node i has children 2i+1 and 2i+2; the NP leaves sit at
  // NP-1 .. 2NP-2 (leaves beyond NTRNG never have a bit). A node passes on
  // whichever child has a bit; when both have one, its priority bit picks
  // and then flips, so contending sources take turns. A bit that loses
  // arbitration is dropped (the sources keep sampling).
  localparam int LV = (NTRNG > 1) ? $clog2(NTRNG) : 1;
  localparam int NP = 1 << LV;
  logic [2*NP-2:0] nv, nb;
  logic [NP-2:0]   pri, pick_r;
  logic pool_valid, pool_bit;
  always_comb begin
    nv = '0; nb = '0; pick_r = '0;
    for (int j = 0; j < NP; j++)
      if (j < int'(NTRNG)) begin nv[NP-1+j] = src_valid[j]; nb[NP-1+j] = src_bit[j]; end
    for (int i = NP-2; i >= 0; i--) begin
      pick_r[i] = nv[2*i+2] && (!nv[2*i+1] || pri[i]);
      nv[i]     = nv[2*i+1] | nv[2*i+2];
      nb[i]     = pick_r[i] ? nb[2*i+2] : nb[2*i+1];
    end
  end
  assign pool_valid = nv[0];
  assign pool_bit   = nb[0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pri <= '0;
    else for (int i = 0; i < NP-1; i++)
      if (nv[2*i+1] && nv[2*i+2]) pri[i] <= !pri[i];

  // ---- raw FIFO ----
  logic raw_pop, raw_bit, raw_full, raw_empty;
  logic [$clog2(RAW_DEPTH):0] raw_count;
  sync_fifo #(.WIDTH(1), .DEPTH(RAW_DEPTH)) u_raw (
    .clk, .rst_n, .push(pool_valid), .wdata(pool_bit), .pop(raw_pop),
    .rdata(raw_bit), .full(raw_full), .empty(raw_empty), .count(raw_count));

  logic dbg_take;
  assign dbg_take  = DEBUG && dbg_pop && !raw_empty;
  assign dbg_valid = DEBUG && !raw_empty;
  assign dbg_bit   = raw_bit;

  // ---- assembler and arbitration ----
  logic [1:0]          client;
  logic [IRN_MAXW-1:0] acc;
  logic [$clog2(IRN_MAXW+1)-1:0] nbits;
  logic [3:0]          irn_full, irn_empty, push;
  logic                take;

  assign take    = !dbg_take && !raw_empty && !irn_full[client];
  assign raw_pop = dbg_take || take;

  always_comb begin
    push = '0;
    if (take && (32'(nbits) + 1 == IRN_W[client])) push[client] = 1'b1;
  end
  assign ev_irn_push = push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      client <= '0; acc <= '0; nbits <= '0;
    end else if (!dbg_take) begin
      if (irn_full[client] && nbits == '0) client <= client + 1'b1;
      else if (take) begin
        acc <= {acc[IRN_MAXW-2:0], raw_bit};
        if (push[client]) begin
          nbits <= '0; acc <= '0; client <= client + 1'b1;
        end else nbits <= nbits + 1'b1;
      end
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_irn
    logic [$clog2(IRN_DEPTH):0] cnt_c;
    sync_fifo #(.WIDTH(IRN_MAXW), .DEPTH(IRN_DEPTH)) u_irn (
      .clk, .rst_n, .push(push[c]), .wdata({acc[IRN_MAXW-2:0], raw_bit}),
      .pop(irn_pop[c]), .rdata(irn_data[c]), .full(irn_full[c]),
      .empty(irn_empty[c]), .count(cnt_c));
    assign irn_valid[c] = !irn_empty[c];
  end
endmodule
