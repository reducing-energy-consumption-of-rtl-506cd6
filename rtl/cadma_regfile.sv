// cadma_regfile: processor register file (32 x 8 by default) with a
// common-data bit per register.
//
// Two read ports and one write port, as an 8-bit AVR core reads both source
// registers of an ALU instruction in one cycle and writes one result.
// Each register is stored as CD bit + two low bits + six high bits. A write
// of a common value (0..3) updates only CD and the two low bits; a read
// activates the six high bits only when the register's CD bit is 1
// (rd_msb_en_a/b), otherwise they read as zero.
//
// Timing: reads are combinational from raddr; the write takes effect at the
// rising edge when we is high. A read of the register being written returns
// the old value. Reset (active low, synchronous) clears every register to 0,
// which is a common value, so the high cells need no reset.
//
// Storing the register file with a CD bit follows the source; its size,
// ports and reset come from the AVR core it serves and are own choices.
module cadma_regfile
  import mote_pkg::*;
#(
  parameter int unsigned REGS  = RF_REGS,
  parameter int unsigned REG_W = $clog2(REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [REG_W-1:0]  waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [REG_W-1:0]  raddr_a,
  output logic [DATA_W-1:0] rdata_a,
  output logic              rd_msb_en_a,
  input  logic [REG_W-1:0]  raddr_b,
  output logic [DATA_W-1:0] rdata_b,
  output logic              rd_msb_en_b,
  output logic              wr_msb_en
);
  logic                cd_r  [REGS];
  logic [CD_LSB_W-1:0] lsb_r [REGS];
  logic [CD_MSB_W-1:0] msb_r [REGS];

  logic        wr_msb_we;
  cadma_byte_t wr_row;

  cd_encoder u_enc (.data(wdata), .msb_we(wr_msb_we), .row(wr_row));

  assign wr_msb_en = we & wr_msb_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(REGS); i++) begin
        cd_r[i]  <= 1'b0;
        lsb_r[i] <= '0;
      end
    end else if (we) begin
      cd_r[waddr]  <= wr_row.cd;
      lsb_r[waddr] <= wr_row.lsb;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_msb_en) msb_r[waddr] <= wr_row.msb;
  end

  cd_read_gate u_gate_a (
    .rd_en(1'b1), .cd(cd_r[raddr_a]), .lsb_cells(lsb_r[raddr_a]),
    .msb_cells(msb_r[raddr_a]), .data(rdata_a), .msb_rd_en(rd_msb_en_a)
  );
  cd_read_gate u_gate_b (
    .rd_en(1'b1), .cd(cd_r[raddr_b]), .lsb_cells(lsb_r[raddr_b]),
    .msb_cells(msb_r[raddr_b]), .data(rdata_b), .msb_rd_en(rd_msb_en_b)
  );
endmodule
