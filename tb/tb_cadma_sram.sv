// tb_cadma_sram: self-checking test of the 4K x 8 CADMA data SRAM.
// Writes every row once (values biased towards the common values 0..3),
// then reads rows back in random order and checks the data, its one-cycle
// read latency, and whether the six high bitcells were activated (only for
// values above 3). A directed sequence checks that a common value written
// over an uncommon one reads back with zero high bits and no high-cell read.
module tb_cadma_sram;
  localparam int unsigned DEPTH = 4096;
  localparam int unsigned AW    = 12;

  logic          clk = 1'b0;
  logic          en = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0]    wdata = '0;
  logic [7:0]    rdata;
  logic          rd_msb_en;
  logic          wr_msb_en;
  logic [7:0]    model [DEPTH];
  int            checks = 0;
  int            failures = 0;
  int            common_reads = 0;
  int            uncommon_reads = 0;

  cadma_sram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pick_value();
    // about half of the bytes common, as in sensor-node data
    if ($urandom_range(1, 0) == 0) return 8'($urandom_range(3, 0));
    return 8'($urandom_range(255, 0));
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write_row(int a, logic [7:0] v);
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = AW'(a); wdata = v;
    #1 check("wr_msb_en", 32'(wr_msb_en), 32'(v > 3));
    model[a] = v;
    @(negedge clk);
    en = 1'b0; we = 1'b0;
  endtask

  task automatic read_row(int a);
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk);               // data valid in the cycle after the edge
    en = 1'b0;
    check("rdata", 32'(rdata), 32'(model[a]));
    check("rd_msb_en", 32'(rd_msb_en), 32'(model[a] > 3));
    if (model[a] > 3) uncommon_reads++; else common_reads++;
    @(negedge clk);               // read data holds while idle
    check("rdata hold", 32'(rdata), 32'(model[a]));
  endtask

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) write_row(a, pick_value());
    for (int i = 0; i < 3000; i++) read_row($urandom_range(DEPTH - 1, 0));
    // directed: a common value over an uncommon one
    write_row(100, 8'hFC);
    write_row(100, 8'h02);
    read_row(100);
    write_row(101, 8'h07);
    read_row(101);
    check("common reads seen", 32'(common_reads > 0), 1);
    check("uncommon reads seen", 32'(uncommon_reads > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
