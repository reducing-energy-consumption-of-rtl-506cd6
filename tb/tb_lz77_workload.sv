// tb_lz77_workload: the LZ77 compression and decompression sensor benchmarks
// as a load/store trace on the default-size subsystem.
//
// The testbench plays the processor. Compression reads a 448-byte buffer of
// file-header-like data from the data SRAM, searches the previous 64 bytes
// for the longest match (up to 15 bytes) by loading and comparing bytes, and
// stores (offset, length, next byte) tokens to an output buffer.
// Decompression then loads the tokens, copies matched bytes by loads and
// stores within the output, and appends the literals. The token stream must
// equal the one computed directly by the testbench, and the decompressed
// buffer, read back through the design, must equal the input. Both steps run
// twice, as the benchmarks loop; the second pass rewrites the same tokens
// and bytes, so its stores are silent.
module tb_lz77_workload;
  import mote_pkg::*;

  localparam int IN_BASE  = 'h200;
  localparam int TOK_BASE = 'h400;
  localparam int OUT_BASE = 'h800;
  localparam int NBYTES   = 448;
  localparam int WINDOW   = 64;
  localparam int MAXLEN   = 15;
  localparam int PASSES   = 2;

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
  int n_ops = 0;
  int c_hit = 0, c_miss = 0, c_silent = 0, c_noisy = 0, c_sram = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      c_hit    <= c_hit + int'(mc_events.hit);
      c_miss   <= c_miss + int'(mc_events.miss);
      c_silent <= c_silent + int'(mc_events.silent_store);
      c_noisy  <= c_noisy + int'(mc_events.noisy_store);
      c_sram   <= c_sram + int'(sram_access);
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic access(bit wr, int a, logic [7:0] v, output logic [7:0] rd);
    @(negedge clk);
    req_valid = 1'b1; req_we = wr; req_addr = 12'(a); req_wdata = v;
    @(negedge clk);
    req_valid = 1'b0;
    #1;
    while (!resp_valid) begin @(negedge clk); #1; end
    rd = resp_rdata;
    n_ops++;
  endtask

  task automatic store(int a, logic [7:0] v);
    logic [7:0] unused;
    access(1'b1, a, v, unused);
  endtask

  task automatic load(int a, output logic [7:0] v);
    access(1'b0, a, 8'h00, v);
  endtask

  logic [7:0] src [NBYTES];
  logic [7:0] ref_tok [3 * NBYTES];
  int         ref_ntok;

  // the same compressor on a local array: the reference token stream
  task automatic ref_compress();
    int i = 0;
    ref_ntok = 0;
    while (i < NBYTES) begin
      int best_len = 0;
      int best_off = 0;
      for (int off = 1; off <= WINDOW && off <= i; off++) begin
        int len = 0;
        while (len < MAXLEN && i + len < NBYTES - 1 && src[i + len - off] == src[i + len]) len++;
        if (len > best_len) begin best_len = len; best_off = off; end
      end
      ref_tok[3 * ref_ntok]     = 8'(best_off);
      ref_tok[3 * ref_ntok + 1] = 8'(best_len);
      ref_tok[3 * ref_ntok + 2] = src[i + best_len];
      ref_ntok++;
      i += best_len + 1;
    end
  endtask

  initial begin : run
    int ntok;
    // header-like data: repeated record headers, zero runs, a few strings
    for (int i = 0; i < NBYTES; i++) begin
      automatic int r = i % 32;
      if (r < 4)       src[i] = 8'({8'h09, 8'h08, 8'h10, 8'h00} >> (8 * (3 - r)));
      else if (r < 12) src[i] = 8'h00;
      else if (r < 16) src[i] = 8'(i / 32);
      else if (r < 22) src[i] = 8'("Sheet1" >> (8 * (21 - r)));
      else             src[i] = ($urandom_range(3, 0) == 0) ? 8'($urandom_range(255, 0)) : 8'h00;
    end
    ref_compress();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NBYTES; i++) store(IN_BASE + i, src[i]);

    for (int p = 0; p < PASSES; p++) begin
      automatic int pass_silent = c_silent;
      automatic int pass_noisy = c_noisy;
      // compression
      automatic int i = 0;
      ntok = 0;
      while (i < NBYTES) begin
        automatic int best_len = 0;
        automatic int best_off = 0;
        logic [7:0] a;
        logic [7:0] b;
        for (int off = 1; off <= WINDOW && off <= i; off++) begin
          automatic int len = 0;
          while (len < MAXLEN && i + len < NBYTES - 1) begin
            load(IN_BASE + i + len - off, a);
            load(IN_BASE + i + len, b);
            if (a != b) break;
            len++;
          end
          if (len > best_len) begin best_len = len; best_off = off; end
        end
        load(IN_BASE + i + best_len, b);
        store(TOK_BASE + 3 * ntok, 8'(best_off));
        store(TOK_BASE + 3 * ntok + 1, 8'(best_len));
        store(TOK_BASE + 3 * ntok + 2, b);
        ntok++;
        i += best_len + 1;
      end
      check("token count", ntok, ref_ntok);

      // decompression
      i = 0;
      for (int t = 0; t < ntok; t++) begin
        logic [7:0] off;
        logic [7:0] len;
        logic [7:0] lit;
        logic [7:0] c;
        load(TOK_BASE + 3 * t, off);
        load(TOK_BASE + 3 * t + 1, len);
        load(TOK_BASE + 3 * t + 2, lit);
        check("token offset", int'(off), int'(ref_tok[3 * t]));
        check("token length", int'(len), int'(ref_tok[3 * t + 1]));
        check("token literal", int'(lit), int'(ref_tok[3 * t + 2]));
        for (int k = 0; k < int'(len); k++) begin
          load(OUT_BASE + i - int'(off), c);
          store(OUT_BASE + i, c);
          i++;
        end
        store(OUT_BASE + i, lit);
        i++;
      end
      check("decompressed length", i, NBYTES);
      for (int k = 0; k < NBYTES; k++) begin
        logic [7:0] c;
        load(OUT_BASE + k, c);
        check("decompressed byte", int'(c), int'(src[k]));
      end
      if (p > 0) check("second pass stores all silent", c_noisy - pass_noisy, 0);
      $display("pass %0d: %0d tokens for %0d bytes, silent stores %0d, noisy %0d",
               p, ntok, NBYTES, c_silent - pass_silent, c_noisy - pass_noisy);
    end
    $display("LZ77: %0d loads and stores, cache hits %0d misses %0d (hit rate %0d%%), SRAM accesses %0d",
             n_ops, c_hit, c_miss, (100 * c_hit) / (c_hit + c_miss), c_sram);
    check("accesses counted", c_hit + c_miss, n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
