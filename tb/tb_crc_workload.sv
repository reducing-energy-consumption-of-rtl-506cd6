// tb_crc_workload: the CRC sensor benchmark as a load/store trace on the
// default-size subsystem.
//
// The testbench plays the processor running a table-driven CRC-32 over a
// 448-byte buffer, again and again, as a node that checks the same sensor
// data between radio transfers would. The 1 KB lookup table, the buffer,
// the running CRC and a loop counter live in the data SRAM; the CRC is also
// kept in four registers of the register file between bytes. Per byte the
// trace is: load the data byte, load the four table bytes it selects, store
// the loop counter. After each pass the CRC is stored to memory. Every
// value used comes back through the design, and the final CRC must equal
// one computed directly by the testbench. It reports the cache hit rate, the
// share of silent stores and of SRAM traffic the cache removed, and checks
// that later passes store the same CRC silently.
module tb_crc_workload;
  import mote_pkg::*;

  localparam int TABLE_BASE = 'h100;   // 1024 bytes of CRC table
  localparam int DATA_BASE  = 'h500;   // 448 bytes of sensor data
  localparam int CRC_VAR    = 'h6C0;   // 4-byte CRC result
  localparam int CNT_VAR    = 'h6C4;   // 2-byte loop counter
  localparam int NBYTES     = 448;
  localparam int PASSES     = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        req_valid = 1'b0;
  logic        req_ready;
  logic        req_we = 1'b0;
  logic [11:0] req_addr = '0;
  logic [7:0]  req_wdata = '0;
  logic        resp_valid;
  logic [7:0]  resp_rdata;
  logic        rf_we = 1'b0;
  logic [4:0]  rf_waddr = '0;
  logic [7:0]  rf_wdata = '0;
  logic [4:0]  rf_raddr_a = '0;
  logic [7:0]  rf_rdata_a;
  logic [4:0]  rf_raddr_b = '0;
  logic [7:0]  rf_rdata_b;
  mc_event_t   mc_events;
  logic        sram_access;
  logic        sram_msb_rd;
  logic        sram_msb_wr;
  logic        rf_msb_rd_a;
  logic        rf_msb_rd_b;
  logic        rf_msb_wr;

  mote_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_loads = 0, n_stores = 0;
  int c_hit = 0, c_miss = 0, c_silent = 0, c_noisy = 0, c_sram = 0, c_wb = 0;
  int cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles   <= cycles + 1;
      c_hit    <= c_hit + int'(mc_events.hit);
      c_miss   <= c_miss + int'(mc_events.miss);
      c_silent <= c_silent + int'(mc_events.silent_store);
      c_noisy  <= c_noisy + int'(mc_events.noisy_store);
      c_sram   <= c_sram + int'(sram_access);
      c_wb     <= c_wb + int'(mc_events.writeback);
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic store(int a, logic [7:0] v);
    @(negedge clk);
    req_valid = 1'b1; req_we = 1'b1; req_addr = 12'(a); req_wdata = v;
    @(negedge clk);
    req_valid = 1'b0;
    #1;
    while (!resp_valid) begin @(negedge clk); #1; end
    n_stores++;
  endtask

  task automatic load(int a, output logic [7:0] v);
    @(negedge clk);
    req_valid = 1'b1; req_we = 1'b0; req_addr = 12'(a);
    @(negedge clk);
    req_valid = 1'b0;
    #1;
    while (!resp_valid) begin @(negedge clk); #1; end
    v = resp_rdata;
    n_loads++;
  endtask

  task automatic rf_write(int r, logic [7:0] v);
    @(negedge clk);
    rf_we = 1'b1; rf_waddr = 5'(r); rf_wdata = v;
    @(negedge clk);
    rf_we = 1'b0;
  endtask

  // reads the CRC from registers r16..r19, two per cycle on ports A and B
  task automatic rf_crc(output logic [31:0] c);
    rf_raddr_a = 5'd16; rf_raddr_b = 5'd17;
    #1;
    c[15:0] = {rf_rdata_b, rf_rdata_a};
    rf_raddr_a = 5'd18; rf_raddr_b = 5'd19;
    #1;
    c[31:16] = {rf_rdata_b, rf_rdata_a};
  endtask

  logic [31:0] crc_table [256];
  logic [7:0]  sensor [NBYTES];

  initial begin : run
    logic [31:0] ref_crc;
    logic [31:0] crc;
    logic [7:0]  b;
    logic [7:0]  t [4];
    int          pass_silent;

    // CRC-32 (reflected polynomial EDB88320) table and the reference CRC
    for (int i = 0; i < 256; i++) begin
      automatic logic [31:0] c = 32'(i);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : (c >> 1);
      crc_table[i] = c;
    end
    // slowly varying sensor readings: small deltas, many small values
    for (int i = 0; i < NBYTES; i++)
      sensor[i] = (i % 4 == 0) ? 8'($urandom_range(40, 20)) : 8'($urandom_range(3, 0));
    ref_crc = 32'hFFFFFFFF;
    for (int i = 0; i < NBYTES; i++)
      ref_crc = crc_table[(ref_crc ^ 32'(sensor[i])) & 32'hFF] ^ (ref_crc >> 8);
    ref_crc = ~ref_crc;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 4; k++) store(TABLE_BASE + 4 * i + k, crc_table[i][8*k +: 8]);
    for (int i = 0; i < NBYTES; i++) store(DATA_BASE + i, sensor[i]);

    for (int p = 0; p < PASSES; p++) begin
      for (int k = 0; k < 4; k++) rf_write(16 + k, 8'hFF);
      for (int i = 0; i < NBYTES; i++) begin
        load(DATA_BASE + i, b);
        rf_crc(crc);
        for (int k = 0; k < 4; k++)
          load(TABLE_BASE + 4 * int'((crc ^ 32'(b)) & 32'hFF) + k, t[k]);
        crc = {t[3], t[2], t[1], t[0]} ^ (crc >> 8);
        for (int k = 0; k < 4; k++) rf_write(16 + k, crc[8*k +: 8]);
        store(CNT_VAR, 8'(i));
        store(CNT_VAR + 1, 8'(i >> 8));
      end
      rf_crc(crc);
      crc = ~crc;
      check("CRC in registers", crc, ref_crc);
      pass_silent = c_silent;
      for (int k = 0; k < 4; k++) store(CRC_VAR + k, crc[8*k +: 8]);
      @(negedge clk);
      if (p > 0) check("repeated CRC stored silently", c_silent - pass_silent, 4);
      for (int k = 0; k < 4; k++) load(CRC_VAR + k, t[k]);
      check("CRC in memory", {t[3], t[2], t[1], t[0]}, ref_crc);
    end

    $display("CRC-32 over %0d bytes, %0d passes: %0d loads, %0d stores, %0d cycles",
             NBYTES, PASSES, n_loads, n_stores, cycles);
    $display("cache hits %0d misses %0d (hit rate %0d%%), silent stores %0d of %0d",
             c_hit, c_miss, (100 * c_hit) / (c_hit + c_miss), c_silent, c_silent + c_noisy);
    $display("SRAM accesses %0d for %0d loads and stores (%0d write-backs)",
             c_sram, n_loads + n_stores, c_wb);
    check("accesses counted", c_hit + c_miss, n_loads + n_stores);
    check("silent stores seen", int'(c_silent > 0), 1);
    check("cache removed SRAM traffic", int'(c_sram < n_loads + n_stores), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
