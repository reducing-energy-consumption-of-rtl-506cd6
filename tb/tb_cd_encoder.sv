// tb_cd_encoder: exhaustive check of the common-data bit for all 256 bytes.
// A byte is common exactly when its value is 0, 1, 2 or 3; cd must then be 0
// and the six high bitcells must not be written (msb_we 0). The row form
// must carry the CD bit and the byte split into its high and low cells.
module tb_cd_encoder;
  import mote_pkg::*;
  logic [7:0] data;
  logic       cd;
  logic       msb_we;
  cadma_byte_t row;
  int         checks = 0;
  int         failures = 0;

  cd_encoder dut (.data(data), .msb_we(msb_we), .row(row));
  assign cd = row.cd;

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic exp_cd;
      data = 8'(v);
      #1;
      exp_cd = (v > 3);
      checks++;
      if (cd !== exp_cd || msb_we !== exp_cd || row.cd !== exp_cd ||
          {row.msb, row.lsb} !== data) begin
        failures++;
        $display("FAIL data=%0d cd=%0b msb_we=%0b expected %0b", v, cd, msb_we, exp_cd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
