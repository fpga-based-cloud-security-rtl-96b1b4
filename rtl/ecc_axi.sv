// ecc_axi: AXI4-lite slave and register bank of the ECC IP.
//
// Software loads the curve (p, a, b), the point P and the scalar k as large
// numbers, starts [k]P, waits for busy to fall or for irq, and reads the
// result Q back. Large numbers move in 32-bit limbs, least significant limb
// first, through a shadow register: NL = ceil(NN/32) limbs are written to
// NUM_DATA after the slot number is set in NUM_ADDR, and the last limb
// writes the slot into ecc_fp_dram; reading works the same way through
// RD_ADDR / NUM_RDATA. Writing slot 0, 1 or 2 (p, a, b) tells ecc_scalar
// that the curve constants must be recomputed.
// Register map (byte offsets; this design's own, the architecture only
// says that the block holds the register bank and serves software):
//   0x00 W CTRL      bit0: start [k]P
//   0x00 R STATUS    bit0 busy, bit1 done (irq pending), bit2 result is
//                    the point at infinity, bit3 raw random bit available
//   0x04 W NUM_ADDR  slot to write (0 p, 1 a, 2 b, 3 Px, 4 Py, 5 k)
//   0x08 W NUM_DATA  next limb of the number being written
//   0x0C W RD_ADDR   slot to read (6 Qx, 7 Qy, or any other)
//   0x10 R NUM_RDATA next limb of the number being read
//   0x14 W IRQ_ACK   clears done and irq
//   0x18 R RAW       debug only: pops one raw random bit {valid, 30'b0, bit}
//   0x1C W IRAM_ADDR debug only: microcode word address
//   0x20 W IRAM_DATA debug only: writes a microcode word, address + 1
//   0x24 R CAPS      NN
// Number and microcode writes while busy are refused with SLVERR.
// AXI4-lite timing: a write is taken when AWVALID and WVALID are both high
// and no response is pending; BVALID follows one cycle later. A read is
// taken when ARVALID is high and no data is pending; RVALID follows one
// cycle later, or three cycles later for RD_ADDR-triggered loads (the read
// of a slot is started by the RD_ADDR write itself and ends before any
// following read can be served).
module ecc_axi
  import ecc_pkg::*;
#(
  parameter int unsigned NN    = 256,
  parameter bit          DEBUG = 1'b1,
  localparam int unsigned WW   = NN + 2,
  localparam int unsigned NL   = (NN + 31) / 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-lite slave
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
  // ecc_scalar
  output logic          kp_start,
  output logic          curve_changed,
  input  logic          busy,
  input  logic          kp_done,
  input  logic          kp_inf,
  // large-number memory
  output logic          ext_en,
  output logic          ext_we,
  output logic [4:0]    ext_addr,
  output logic [WW-1:0] ext_wdata,
  input  logic [WW-1:0] ext_rdata,
  // microcode patching
  output logic          iram_we,
  output logic [IRAM_AW-1:0] iram_waddr,
  output instr_t        iram_wdata,
  // raw random bits
  input  logic          raw_valid,
  input  logic          raw_bit,
  output logic          raw_pop
);
  localparam logic [7:0] A_CTRL = 8'h00, A_NADDR = 8'h04, A_NDATA = 8'h08,
                         A_RADDR = 8'h0C, A_RDATA = 8'h10, A_IACK = 8'h14,
                         A_RAW = 8'h18, A_IADDR = 8'h1C, A_IDATA = 8'h20,
                         A_CAPS = 8'h24;

  logic [4:0]           wslot;
  logic [NL*32-1:0]     wshadow, rshadow;
  logic [$clog2(NL+1)-1:0] wlimb;
  logic                 done_r, inf_r;
  logic [1:0]           rd_pend;     // slot load in progress
  logic [NL*32+31:0]    wcat;        // shadow with the incoming limb on top
  assign wcat = {s_axi_wdata, wshadow};

  // ---- write channel ----
  logic wr_take, wr_ok;
  assign wr_take       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && rd_pend == '0;
  assign s_axi_awready = wr_take;
  assign s_axi_wready  = wr_take;
  always_comb begin
    wr_ok = 1'b1;
    if (busy && s_axi_awaddr inside {A_CTRL, A_NADDR, A_NDATA, A_RADDR, A_IADDR, A_IDATA}) wr_ok = 1'b0;
    if (!DEBUG && s_axi_awaddr inside {A_IADDR, A_IDATA}) wr_ok = 1'b0;
  end

  // ---- read channel ----
  logic rd_take;
  assign rd_take       = s_axi_arvalid && !s_axi_rvalid && rd_pend == '0 && !wr_take;
  assign s_axi_arready = rd_take;
  assign raw_pop       = rd_take && s_axi_araddr == A_RAW && DEBUG && raw_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0; s_axi_bresp <= 2'b00; s_axi_rvalid <= 1'b0;
      s_axi_rdata <= '0; s_axi_rresp <= 2'b00;
      wslot <= '0; wshadow <= '0; wlimb <= '0; rshadow <= '0;
      done_r <= 1'b0; inf_r <= 1'b0; rd_pend <= '0;
      kp_start <= 1'b0; curve_changed <= 1'b0;
      ext_en <= 1'b0; ext_we <= 1'b0; ext_addr <= '0; ext_wdata <= '0;
      iram_we <= 1'b0; iram_waddr <= '0; iram_wdata <= '0;
    end else begin
      kp_start <= 1'b0; curve_changed <= 1'b0;
      ext_en <= 1'b0; ext_we <= 1'b0; iram_we <= 1'b0;
      if (kp_done) begin done_r <= 1'b1; inf_r <= kp_inf; end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;

      // slot load: ext read issued, data one cycle later
      if (rd_pend == 2'd1) rd_pend <= 2'd2;
      else if (rd_pend == 2'd2) begin
        rshadow <= (NL*32)'(ext_rdata[NN-1:0]); rd_pend <= '0;
      end

      if (wr_take) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= wr_ok ? 2'b00 : 2'b10;
        if (wr_ok) unique case (s_axi_awaddr)
          A_CTRL: if (s_axi_wdata[0]) begin kp_start <= 1'b1; done_r <= 1'b0; end
          A_NADDR: begin wslot <= s_axi_wdata[4:0]; wlimb <= '0; wshadow <= '0; end
          A_NDATA: begin
            wshadow <= wcat[NL*32+31:32];
            if (wlimb == ($clog2(NL+1))'(NL - 1)) begin
              ext_en <= 1'b1; ext_we <= 1'b1; ext_addr <= wslot;
              ext_wdata <= WW'(wcat[NN+31:32]);
              wlimb <= '0;
              if (wslot <= S_B) curve_changed <= 1'b1;
            end else wlimb <= wlimb + 1'b1;
          end
          A_RADDR: begin
            ext_en <= 1'b1; ext_addr <= s_axi_wdata[4:0]; rd_pend <= 2'd1;
          end
          A_IACK: done_r <= 1'b0;
          A_IADDR: iram_waddr <= s_axi_wdata[IRAM_AW-1:0];
          A_IDATA: begin
            iram_we <= 1'b1; iram_wdata <= instr_t'(s_axi_wdata);
          end
          default: ;
        endcase
      end
      if (iram_we) iram_waddr <= iram_waddr + 1'b1;

      if (rd_take) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= 2'b00;
        unique case (s_axi_araddr)
          A_CTRL:  s_axi_rdata <= {28'b0, DEBUG && raw_valid, inf_r, done_r, busy};
          A_RDATA: begin
            s_axi_rdata <= rshadow[31:0];
            rshadow     <= (NL*32)'({32'b0, rshadow} >> 32);
          end
          A_RAW:   s_axi_rdata <= {DEBUG && raw_valid, 30'b0, raw_bit};
          A_CAPS:  s_axi_rdata <= 32'(NN);
          default: begin s_axi_rdata <= '0; s_axi_rresp <= 2'b10; end
        endcase
      end
    end
  end

  assign irq = done_r;

  // AXI4-lite handshake rules: a response, once valid, holds until taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
