// tb_cadma_regfile: self-checking test of the 32 x 8 CADMA register file.
// Random writes (half of them common values 0..3) and random reads on both
// ports are compared with a reference array; the high-cell read and write
// enables must be active only for values above 3. Also checks reset to 0 and
// that a read in the write cycle returns the old value.
module tb_cadma_regfile;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       we = 1'b0;
  logic [4:0] waddr = '0;
  logic [7:0] wdata = '0;
  logic [4:0] raddr_a = '0;
  logic [7:0] rdata_a;
  logic       rd_msb_en_a;
  logic [4:0] raddr_b = '0;
  logic [7:0] rdata_b;
  logic       rd_msb_en_b;
  logic       wr_msb_en;
  logic [7:0] model [32];
  int         checks = 0;
  int         failures = 0;

  cadma_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 32; r++) model[r] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 32; r++) begin
      raddr_a = 5'(r);
      #1 check("reset value", 32'(rdata_a), 0);
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we      = ($urandom_range(1, 0) == 1);
      waddr   = 5'($urandom_range(31, 0));
      wdata   = ($urandom_range(1, 0) == 1) ? 8'($urandom_range(3, 0))
                                            : 8'($urandom_range(255, 0));
      raddr_a = 5'($urandom_range(31, 0));
      raddr_b = ($urandom_range(3, 0) == 0) ? waddr : 5'($urandom_range(31, 0));
      #1;
      check("rdata_a", 32'(rdata_a), 32'(model[raddr_a]));
      check("rdata_b", 32'(rdata_b), 32'(model[raddr_b]));
      check("rd_msb_en_a", 32'(rd_msb_en_a), 32'(model[raddr_a] > 3));
      check("rd_msb_en_b", 32'(rd_msb_en_b), 32'(model[raddr_b] > 3));
      check("wr_msb_en", 32'(wr_msb_en), 32'(we && wdata > 3));
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
