// cadma_sram: on-chip data SRAM (4K x 8 by default) with a common-data bit.
//
// Every row holds a CD bit, two low bitcells and six high bitcells. A write
// derives CD from the byte (cd_encoder); for a common value (0..3) only the
// CD bit and the two low bits are written, otherwise all nine. A read probes
// CD and activates the six high cells only when CD is 1; for a common value
// the high bits of the result are zero (cd_read_gate). wr_msb_en / rd_msb_en
// tell whether the high cells took part in an access.
//
// Timing: one access per cycle, synchronous. en/we/addr/wdata are sampled at
// a rising edge; read data, and rd_msb_en, are valid during the following
// cycle (the access cycle T2 of the processor's two-cycle load/store, whose
// address is computed in T1). Read data holds until the next read.
// The array has no reset, like an SRAM; rows not yet written read back
// whatever they hold.
//
// The 4K x 8 size, the two-cycle access and the CD scheme follow the source;
// the single synchronous port and the activity outputs are own choices.
module cadma_sram
  import mote_pkg::*;
#(
  parameter int unsigned DEPTH  = SRAM_DEPTH,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              rd_msb_en,
  output logic              wr_msb_en
);
  logic                cd_mem  [DEPTH];
  logic [CD_LSB_W-1:0] lsb_mem [DEPTH];
  logic [CD_MSB_W-1:0] msb_mem [DEPTH];

  logic                wr_msb_we;
  cadma_byte_t         wr_row;
  logic                cd_q;
  logic [CD_LSB_W-1:0] lsb_q;
  logic [CD_MSB_W-1:0] msb_q;

  cd_encoder u_enc (.data(wdata), .msb_we(wr_msb_we), .row(wr_row));

  assign wr_msb_en = en & we & wr_msb_we;

  // Write port: the high cells are written only for uncommon values.
  always_ff @(posedge clk) begin
    if (en && we) begin
      cd_mem[addr]  <= wr_row.cd;
      lsb_mem[addr] <= wr_row.lsb;
    end
    if (wr_msb_en) msb_mem[addr] <= wr_row.msb;
  end

  // Read port: CD and the low cells always, the high cells only when the
  // row's CD bit is set.
  always_ff @(posedge clk) begin
    if (en && !we) begin
      cd_q  <= cd_mem[addr];
      lsb_q <= lsb_mem[addr];
      if (cd_mem[addr]) msb_q <= msb_mem[addr];
    end
  end

  cd_read_gate u_gate (
    .rd_en    (1'b1),
    .cd       (cd_q),
    .lsb_cells(lsb_q),
    .msb_cells(msb_q),
    .data     (rdata),
    .msb_rd_en(rd_msb_en)
  );
endmodule
