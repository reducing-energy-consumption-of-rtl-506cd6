// tb_cd_read_gate: exhaustive check of the CD-controlled readout of a byte.
// For every word-select value, CD bit and stored cell contents, the high
// cells must be activated only when both word select and CD are 1, and the
// byte read must then be the stored byte, otherwise the low bits with zeros
// above them.
module tb_cd_read_gate;
  logic       rd_en;
  logic       cd;
  logic [1:0] lsb_cells;
  logic [5:0] msb_cells;
  logic [7:0] data;
  logic       msb_rd_en;
  int         checks = 0;
  int         failures = 0;

  cd_read_gate dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 2; c++)
        for (int l = 0; l < 4; l++)
          for (int m = 0; m < 64; m++) begin
            logic [7:0] exp_data;
            logic       exp_en;
            rd_en     = 1'(e);
            cd        = 1'(c);
            lsb_cells = 2'(l);
            msb_cells = 6'(m);
            #1;
            exp_en   = (e == 1) && (c == 1);
            exp_data = exp_en ? 8'(m * 4 + l) : 8'(l);
            checks++;
            if (data !== exp_data || msb_rd_en !== exp_en) begin
              failures++;
              $display("FAIL en=%0d cd=%0d lsb=%0d msb=%0d -> %0d/%0b, expected %0d/%0b",
                       e, c, l, m, data, msb_rd_en, exp_data, exp_en);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
