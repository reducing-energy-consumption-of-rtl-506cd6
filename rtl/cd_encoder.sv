// cd_encoder: derives the common-data (CD) bit of a byte and the form in
// which a CADMA storage row holds it.
//
// The values 0, 1, 2 and 3 are frequent in sensor-node data. They fit in the
// two low bits, so a storage row need not write or read the six high bits
// for them. CD is 0 for such a "common" byte and 1 for every other byte, that
// is, CD is the OR of bits 7..2 (a six-input NOR gives its complement). No
// encoding of the value is needed: the two low bits are stored as they are.
//
// Interface: data in; row is the byte split into the CD bit, the six high
// cells and the two low cells (the high cells only meaningful when CD is 1);
// msb_we is the write enable of the six high bitcells, equal to row.cd.
// Purely combinational.
//
// The rule (CD 0 exactly for 0..3, two low bits stored unencoded) follows the
// published scheme; the row struct is this design's packaging of it.
module cd_encoder
  import mote_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  output logic              msb_we,
  output cadma_byte_t       row
);
  always_comb begin
    row.cd  = |data[DATA_W-1:CD_LSB_W];
    msb_we  = row.cd;
    row.msb = data[DATA_W-1:CD_LSB_W];
    row.lsb = data[CD_LSB_W-1:0];
  end
endmodule
