// cd_read_gate: the read side of a CADMA storage row.
//
// A read first probes the CD bit of the row. When CD is 0 only the two low
// bitlines are read and the six high bits of the result are forced to zero;
// when CD is 1 all eight bits are read. In the bitcell array this is a local
// read line for the six high cells that is tied to the word select line only
// while CD is 1, and grounded otherwise. Here that local read line is the
// output msb_rd_en, and the data path is the gate it controls.
//
// Interface: rd_en (word select), the row's stored CD bit, its low and high
// cell values; data is the reconstructed byte and msb_rd_en says whether the
// high cells were activated. Purely combinational.
//
// The behaviour follows the published two-transistor gating of the local
// read line; expressing it as logic gates is this design's modelling.
module cd_read_gate
  import mote_pkg::*;
(
  input  logic                rd_en,
  input  logic                cd,
  input  logic [CD_LSB_W-1:0] lsb_cells,
  input  logic [CD_MSB_W-1:0] msb_cells,
  output logic [DATA_W-1:0]   data,
  output logic                msb_rd_en
);
  always_comb begin
    msb_rd_en = rd_en & cd;
    data      = {(msb_rd_en ? msb_cells : '0), lsb_cells};
  end
endmodule
