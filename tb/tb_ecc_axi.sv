// tb_ecc_axi: AXI4-lite master driving ecc_axi (NN = 64, two limbs per
// number) against testbench models of the large-number memory and of the
// main state machine. Checks limb assembly into memory writes, the
// curve-changed pulse for slots 0..2 only, reading a slot back, the start
// pulse, STATUS, SLVERR on writes while busy, irq and its acknowledge, the
// debug read of raw random bits and the microcode patch port.
module tb_ecc_axi;
  import ecc_pkg::*;
  localparam int NN = 64, WW = NN + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic irq, kp_start, curve_changed, busy, kp_done, kp_inf;
  logic ext_en, ext_we;
  logic [4:0] ext_addr;
  logic [WW-1:0] ext_wdata, ext_rdata;
  logic iram_we;
  logic [8:0] iram_waddr;
  instr_t iram_wdata;
  logic raw_valid, raw_bit, raw_pop;

  ecc_axi #(.NN(NN), .DEBUG(1'b1)) dut (.*);

  // memory model
  logic [WW-1:0] mem [32];
  always_ff @(posedge clk) begin
    if (ext_en && ext_we) mem[ext_addr] <= ext_wdata;
    ext_rdata <= mem[ext_addr];
  end
  // main state machine model: busy for 20 cycles
  int bcnt = 0, starts = 0, changes = 0, raw_pops = 0;
  always_ff @(posedge clk) if (!rst_n) kp_done <= 1'b0; else begin
    kp_done <= 1'b0;
    if (kp_start) begin bcnt <= 20; starts <= starts + 1; end
    else if (bcnt > 1) bcnt <= bcnt - 1;
    else if (bcnt == 1) begin bcnt <= 0; kp_done <= 1'b1; end
    if (curve_changed) changes <= changes + 1;
    if (raw_pop) raw_pops <= raw_pops + 1;
  end
  assign busy = bcnt != 0;
  assign kp_inf = 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input longint got, input longint e);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s got %h exp %h", what, got, e); end
  endtask

  task automatic axw(input logic [7:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk); s_axi_awaddr = a; s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    resp = s_axi_bresp;
    @(posedge clk); #1 s_axi_bready = 0;
  endtask
  task automatic axr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_axi_araddr = a; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk); s_axi_arvalid = 0; s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    @(posedge clk); #1 s_axi_rready = 0;
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d, lo;
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_awvalid = 0; s_axi_wvalid = 0;
    s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0; s_axi_wdata = 0; s_axi_wstrb = 4'hF;
    raw_valid = 1; raw_bit = 1;
    for (int i = 0; i < 32; i++) mem[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // number to slot 3
    axw(8'h04, 3, resp); axw(8'h08, 32'h89ABCDEF, resp); axw(8'h08, 32'h01234567, resp);
    repeat (2) @(negedge clk);
    chk("slot 3", longint'(mem[3]), 64'h0123456789ABCDEF);
    chk("no curve change for slot 3", changes, 0);
    axw(8'h04, 0, resp); axw(8'h08, 32'hFFFFFFC5, resp); axw(8'h08, 32'hFFFFFFFF, resp);
    repeat (2) @(negedge clk);
    chk("slot 0", longint'(mem[0]), 64'hFFFFFFFFFFFFFFC5);
    chk("curve change for slot 0", changes, 1);
    // read slot 3 back
    mem[7] = 66'h0_5555AAAA_12345678;
    axw(8'h0C, 7, resp);
    axr(8'h10, lo); axr(8'h10, d);
    chk("read limb 0", lo, 32'h12345678);
    chk("read limb 1", d, 32'h5555AAAA);
    axr(8'h24, d); chk("CAPS", d, 64);
    // start
    axw(8'h00, 1, resp); chk("start resp", resp, 0);
    chk("start pulses", starts, 1);
    axr(8'h00, d); chk("STATUS busy", d[0], 1);
    axw(8'h04, 2, resp); chk("SLVERR while busy", resp, 2'b10);
    while (!irq) @(negedge clk);
    axr(8'h00, d); chk("STATUS done, inf", d[2:0], 3'b110);
    axw(8'h14, 1, resp); @(negedge clk);
    chk("irq cleared", irq, 0);
    // raw random bits (debug)
    axr(8'h18, d); chk("raw bit", {d[31], d[0]}, 2'b11);
    raw_bit = 0;
    axr(8'h18, d); chk("raw bit 2", {d[31], d[0]}, 2'b10);
    chk("raw pops", raw_pops, 2);
    // microcode patch
    fork
      begin axw(8'h1C, 32'h1F0, resp); axw(8'h20, 32'hA5A5A5A5, resp); axw(8'h20, 32'h5A5A5A5A, resp); end
      begin
        int seen = 0;
        repeat (40) begin
          @(posedge clk);
          if (iram_we) begin
            chk("iram addr", iram_waddr, 9'h1F0 + seen);
            chk("iram data", iram_wdata, seen == 0 ? 32'hA5A5A5A5 : 32'h5A5A5A5A);
            seen++;
          end
        end
        chk("iram writes", seen, 2);
      end
    join
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
