// tb_mote_top: end-to-end test of the data-memory subsystem at its default
// size (4 KB SRAM, 8 x 4 MoteCache, 32 registers).
//
// Acts as the processor: fills the register file and checks both read ports,
// then stores to and loads from a working set of data addresses larger than
// the cache, checking every load against a reference copy of memory and
// every response latency (one cycle, two when the miss writes a dirty victim
// back). Finally it reads the whole working set back. It counts each
// mechanism of the design and fails if one never happened: cache hits,
// misses, write-backs, filtered write-backs, silent and noisy stores, stall
// cycles, and reads/writes of common and uncommon bytes in the cache, the
// SRAM and the register file.
module tb_mote_top;
  import mote_pkg::*;

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

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // mechanism counters
  int c_hit = 0, c_miss = 0, c_wb = 0, c_cancel = 0, c_silent = 0, c_noisy = 0;
  int c_stall = 0, c_mc_msb_rd = 0, c_mc_msb_wr = 0, c_sram_acc = 0;
  int c_sram_msb_rd = 0, c_sram_msb_wr = 0, c_rf_msb_rd = 0, c_rf_msb_wr = 0;
  int c_rf_common_rd = 0, c_rf_common_wr = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      c_hit         <= c_hit + int'(mc_events.hit);
      c_miss        <= c_miss + int'(mc_events.miss);
      c_wb          <= c_wb + int'(mc_events.writeback);
      c_cancel      <= c_cancel + int'(mc_events.wb_cancel);
      c_silent      <= c_silent + int'(mc_events.silent_store);
      c_noisy       <= c_noisy + int'(mc_events.noisy_store);
      c_stall       <= c_stall + int'(mc_events.stall);
      c_mc_msb_rd   <= c_mc_msb_rd + int'(mc_events.msb_read);
      c_mc_msb_wr   <= c_mc_msb_wr + int'(mc_events.msb_write);
      c_sram_acc    <= c_sram_acc + int'(sram_access);
      c_sram_msb_rd <= c_sram_msb_rd + int'(sram_msb_rd);
      c_sram_msb_wr <= c_sram_msb_wr + int'(sram_msb_wr);
      c_rf_msb_wr   <= c_rf_msb_wr + int'(rf_msb_wr);
      c_rf_common_wr <= c_rf_common_wr + int'(rf_we && !rf_msb_wr);
    end
  end

  logic [7:0] golden [4096];
  bit         known  [4096];
  logic [7:0] rf_model [32];

  // One load or store through the data port; checks data and latency.
  task automatic mem_op(bit wr, int a, logic [7:0] v);
    int lat;
    int exp_lat;
    @(negedge clk);
    req_valid = 1'b1; req_we = wr; req_addr = 12'(a); req_wdata = v;
    #1;
    check("ready", int'(req_ready), 1);
    exp_lat = mc_events.writeback ? 2 : 1;
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    #1;
    while (!resp_valid && lat < 8) begin
      @(negedge clk);
      lat++;
      #1;
    end
    check("latency", lat, exp_lat);
    if (!wr && known[a]) check("load data", int'(resp_rdata), int'(golden[a]));
    if (wr) begin
      golden[a] = v;
      known[a]  = 1'b1;
    end
  endtask

  function automatic logic [7:0] pick_value(int a);
    int r = $urandom_range(9, 0);
    if (r < 4 && known[a]) return golden[a];
    if (r < 7) return 8'($urandom_range(3, 0));
    return 8'($urandom_range(255, 0));
  endfunction

  int wset [64];

  initial begin
    for (int i = 0; i < 4096; i++) known[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // register file: write every register, then read all pairs of ports
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      rf_we = 1'b1; rf_waddr = 5'(r);
      rf_wdata = (r % 2 == 0) ? 8'($urandom_range(3, 0)) : 8'($urandom_range(255, 4));
      rf_model[r] = rf_wdata;
    end
    @(negedge clk);
    rf_we = 1'b0;
    for (int i = 0; i < 200; i++) begin
      rf_raddr_a = 5'($urandom_range(31, 0));
      rf_raddr_b = 5'($urandom_range(31, 0));
      #1;
      check("rf port a", int'(rf_rdata_a), int'(rf_model[rf_raddr_a]));
      check("rf port b", int'(rf_rdata_b), int'(rf_model[rf_raddr_b]));
      check("rf msb a", int'(rf_msb_rd_a), int'(rf_model[rf_raddr_a] > 3));
      c_rf_msb_rd    += int'(rf_msb_rd_a) + int'(rf_msb_rd_b);
      c_rf_common_rd += int'(!rf_msb_rd_a) + int'(!rf_msb_rd_b);
      @(negedge clk);
    end

    // data memory: 64 addresses spread over the SRAM, more than 32 lines
    for (int i = 0; i < 64; i++) begin
      wset[i] = $urandom_range(4095, 0);
      mem_op(1'b1, wset[i], pick_value(wset[i]));
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int a = wset[($urandom_range(3, 0) == 0) ? $urandom_range(63, 0) : $urandom_range(23, 0)];
      automatic bit wr = ($urandom_range(2, 0) == 0);
      mem_op(wr, a, wr ? pick_value(a) : 8'h00);
    end
    for (int i = 0; i < 64; i++) mem_op(1'b0, wset[i], 8'h00);
    repeat (2) @(negedge clk);

    $display("hits=%0d misses=%0d write-backs=%0d filtered=%0d silent=%0d noisy=%0d stalls=%0d",
             c_hit, c_miss, c_wb, c_cancel, c_silent, c_noisy, c_stall);
    $display("cache high-bit reads=%0d writes=%0d; SRAM accesses=%0d high-bit reads=%0d writes=%0d",
             c_mc_msb_rd, c_mc_msb_wr, c_sram_acc, c_sram_msb_rd, c_sram_msb_wr);
    $display("register file high-bit reads=%0d common reads=%0d high-bit writes=%0d common writes=%0d",
             c_rf_msb_rd, c_rf_common_rd, c_rf_msb_wr, c_rf_common_wr);
    check("cache hit happened", int'(c_hit > 0), 1);
    check("cache miss happened", int'(c_miss > 0), 1);
    check("write-back happened", int'(c_wb > 0), 1);
    check("filtered write-back happened", int'(c_cancel > 0), 1);
    check("silent store happened", int'(c_silent > 0), 1);
    check("noisy store happened", int'(c_noisy > 0), 1);
    check("stall happened", int'(c_stall == c_wb && c_stall > 0), 1);
    check("cache high-bit read happened", int'(c_mc_msb_rd > 0), 1);
    check("cache high-bit write happened", int'(c_mc_msb_wr > 0), 1);
    check("SRAM high-bit read happened", int'(c_sram_msb_rd > 0), 1);
    check("SRAM common read happened", int'(c_sram_acc - c_wb > c_sram_msb_rd), 1);
    check("SRAM high-bit write happened", int'(c_sram_msb_wr > 0), 1);
    check("SRAM common write happened", int'(c_wb > c_sram_msb_wr), 1);
    check("RF high-bit read happened", int'(c_rf_msb_rd > 0), 1);
    check("RF common read happened", int'(c_rf_common_rd > 0), 1);
    check("RF high-bit write happened", int'(c_rf_msb_wr > 0), 1);
    check("RF common write happened", int'(c_rf_common_wr > 0), 1);
    check("SRAM accesses = misses + write-backs", c_sram_acc, c_miss + c_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
