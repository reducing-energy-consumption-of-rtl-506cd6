// mote_top: data-side memory subsystem of a low-power sensor-node processor.
//
// The processor's loads and stores go to a MoteCache (motecache) of single-
// byte lines that filters most SRAM accesses and every silent store; behind
// it sits the on-chip data SRAM (cadma_sram). The register file
// (cadma_regfile) sits beside them. All three store their bytes with a
// common-data bit, so the values 0..3 cost three bitcells per access
// instead of eight. The processor itself is not part of this design: its
// data-memory port and its register-file ports are the ports of this module.
//
// Data port timing: a request is accepted when req_valid & req_ready (the
// address cycle T1); the response comes one cycle later (T2) on a hit or a
// miss, two cycles later on a miss that writes back a victim (see motecache).
// Register-file reads are combinational, writes take effect at the clock.
// Defaults: 4 KB SRAM, 8-set x 4-way (32-byte) cache, 32 registers.
// Reset is synchronous, active low.
//
// The arrangement (cache in front of the SRAM, CD in all three structures)
// and the default sizes follow the source; the port set is this design's.
module mote_top
  import mote_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = SRAM_DEPTH,
  parameter int unsigned ADDR_W     = $clog2(SRAM_WORDS),
  parameter int unsigned SETS       = MC_SETS,
  parameter int unsigned WAYS       = MC_WAYS,
  parameter bit          EARLY_READ = 1'b0,
  parameter int unsigned REGS       = RF_REGS,
  parameter int unsigned REG_W      = $clog2(REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // data-memory port of the processor
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_rdata,
  // register-file ports of the processor
  input  logic              rf_we,
  input  logic [REG_W-1:0]  rf_waddr,
  input  logic [DATA_W-1:0] rf_wdata,
  input  logic [REG_W-1:0]  rf_raddr_a,
  output logic [DATA_W-1:0] rf_rdata_a,
  input  logic [REG_W-1:0]  rf_raddr_b,
  output logic [DATA_W-1:0] rf_rdata_b,
  // activity, for energy accounting
  output mc_event_t         mc_events,
  output logic              sram_access,
  output logic              sram_msb_rd,
  output logic              sram_msb_wr,
  output logic              rf_msb_rd_a,
  output logic              rf_msb_rd_b,
  output logic              rf_msb_wr
);
  logic              sram_en;
  logic              sram_we;
  logic [ADDR_W-1:0] sram_addr;
  logic [DATA_W-1:0] sram_wdata;
  logic [DATA_W-1:0] sram_rdata;
  logic              sram_rd_q;
  logic              sram_rd_msb;

  motecache #(
    .ADDR_W(ADDR_W), .SETS(SETS), .WAYS(WAYS), .EARLY_READ(EARLY_READ)
  ) u_mc (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .events(mc_events)
  );

  cadma_sram #(.DEPTH(SRAM_WORDS), .ADDR_W(ADDR_W)) u_sram (
    .clk,
    .en       (sram_en),
    .we       (sram_we),
    .addr     (sram_addr),
    .wdata    (sram_wdata),
    .rdata    (sram_rdata),
    .rd_msb_en(sram_rd_msb),
    .wr_msb_en(sram_msb_wr)
  );

  // The SRAM's read-side activity belongs to the cycle its data is used.
  always_ff @(posedge clk) begin
    if (!rst_n) sram_rd_q <= 1'b0;
    else        sram_rd_q <= sram_en && !sram_we;
  end
  assign sram_msb_rd = sram_rd_q && sram_rd_msb;
  assign sram_access = sram_en;

  cadma_regfile #(.REGS(REGS), .REG_W(REG_W)) u_rf (
    .clk, .rst_n,
    .we         (rf_we),
    .waddr      (rf_waddr),
    .wdata      (rf_wdata),
    .raddr_a    (rf_raddr_a),
    .rdata_a    (rf_rdata_a),
    .rd_msb_en_a(rf_msb_rd_a),
    .raddr_b    (rf_raddr_b),
    .rdata_b    (rf_rdata_b),
    .rd_msb_en_b(rf_msb_rd_b),
    .wr_msb_en  (rf_msb_wr)
  );
endmodule
