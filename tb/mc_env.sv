// mc_env: self-checking environment for one MoteCache configuration.
//
// Holds a motecache instance, a synchronous single-port SRAM model with
// random initial contents, and an independent reference model of the cache
// (timestamp LRU, valid/dirty-noisy bits per line). It issues N_OPS random
// loads and stores over a working set larger than the cache, and checks for
// each one the load data and the response latency (hit 1 cycle, or 0 with
// EARLY_READ; miss 1, as the SRAM data arrives in the same
// access cycle; miss with victim write-back 2). At the end it checks
// the event counts (hits, misses, write-backs, filtered write-backs, silent
// and noisy stores, stall cycles) and that the SRAM holds exactly what the
// model expects, so that no silent store or clean line ever reached it.
module mc_env #(
  parameter int unsigned SETS       = 8,
  parameter int unsigned WAYS       = 4,
  parameter bit          EARLY_READ = 1'b0,
  parameter int unsigned N_OPS      = 3000,
  parameter int unsigned WSET       = 48
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_hit,
  output int   n_miss,
  output int   n_wb,
  output int   n_cancel,
  output int   n_silent,
  output int   n_noisy,
  output int   n_stall
);
  import mote_pkg::*;
  localparam int unsigned DEPTH = 4096;

  logic        req_valid = 1'b0;
  logic        req_ready;
  logic        req_we = 1'b0;
  logic [11:0] req_addr = '0;
  logic [7:0]  req_wdata = '0;
  logic        resp_valid;
  logic [7:0]  resp_rdata;
  logic        sram_en;
  logic        sram_we;
  logic [11:0] sram_addr;
  logic [7:0]  sram_wdata;
  logic [7:0]  sram_rdata = '0;
  mc_event_t   events;

  motecache #(.SETS(SETS), .WAYS(WAYS), .EARLY_READ(EARLY_READ)) dut (.*);

  // SRAM model
  logic [7:0] smem [DEPTH];
  always @(posedge clk) begin
    if (sram_en) begin
      if (sram_we) smem[sram_addr] <= sram_wdata;
      else         sram_rdata <= smem[sram_addr];
    end
  end

  // DUT event counters
  int d_hit = 0, d_miss = 0, d_wb = 0, d_cancel = 0, d_silent = 0, d_noisy = 0, d_stall = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      d_hit    <= d_hit + int'(events.hit);
      d_miss   <= d_miss + int'(events.miss);
      d_wb     <= d_wb + int'(events.writeback);
      d_cancel <= d_cancel + int'(events.wb_cancel);
      d_silent <= d_silent + int'(events.silent_store);
      d_noisy  <= d_noisy + int'(events.noisy_store);
      d_stall  <= d_stall + int'(events.stall);
    end
  end

  // reference model
  logic [7:0]  golden [DEPTH];   // what the processor must see
  logic [7:0]  sexp   [DEPTH];   // what the SRAM must hold
  bit          mval   [SETS][WAYS];
  bit          mdn    [SETS][WAYS];
  int          mtag   [SETS][WAYS];
  logic [7:0]  mdata  [SETS][WAYS];
  longint      muse   [SETS][WAYS];
  longint      tick = 0;
  int          wset   [WSET];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_hit = 0; n_miss = 0; n_wb = 0; n_cancel = 0; n_silent = 0; n_noisy = 0; n_stall = 0;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL [%0dx%0d%s] %s: got %0d expected %0d", SETS, WAYS,
               EARLY_READ ? " early" : "", what, got, exp);
    end
  endtask

  task automatic do_op(bit wr, int a, logic [7:0] v);
    int s = a % int'(SETS);
    int t = a / int'(SETS);
    int w = -1;
    int exp_lat;
    int lat;
    logic [7:0] exp_rd;
    logic [7:0] got;
    for (int i = 0; i < int'(WAYS); i++) if (mval[s][i] && mtag[s][i] == t) w = i;
    tick++;
    if (w >= 0) begin
      n_hit++;
      exp_lat = EARLY_READ ? 0 : 1;
      exp_rd  = golden[a];
      if (wr) begin
        if (v == mdata[s][w]) n_silent++;
        else begin
          n_noisy++;
          mdata[s][w] = v;
          mdn[s][w]   = 1'b1;
        end
        golden[a] = v;
      end
      muse[s][w] = tick;
    end else begin
      logic [7:0] old;
      n_miss++;
      for (int i = int'(WAYS) - 1; i >= 0; i--) if (!mval[s][i]) w = i;
      if (w < 0) begin
        w = 0;
        for (int i = 1; i < int'(WAYS); i++) if (muse[s][i] < muse[s][w]) w = i;
      end
      if (mval[s][w] && mdn[s][w]) begin
        n_wb++;
        n_stall++;
        sexp[mtag[s][w] * int'(SETS) + s] = mdata[s][w];
        exp_lat = 2;
      end else begin
        if (mval[s][w]) n_cancel++;
        exp_lat = 1;
      end
      old    = sexp[a];
      exp_rd = golden[a];
      mval[s][w] = 1'b1;
      mtag[s][w] = t;
      mdata[s][w] = wr ? v : old;
      mdn[s][w]  = wr && (v != old);
      if (wr) begin
        if (v == old) n_silent++; else n_noisy++;
        golden[a] = v;
      end
      muse[s][w] = tick;
    end

    @(negedge clk);
    req_valid = 1'b1; req_we = wr; req_addr = 12'(a); req_wdata = v;
    #1;
    check("ready", int'(req_ready), 1);
    lat = 0;
    if (!resp_valid) begin
      @(negedge clk);
      req_valid = 1'b0;
      lat = 1;
      #1;
      while (!resp_valid && lat < 8) begin
        @(negedge clk);
        lat++;
        #1;
      end
      got = resp_rdata;
    end else begin
      got = resp_rdata;
      @(negedge clk);
      req_valid = 1'b0;
    end
    check("latency", lat, exp_lat);
    if (!wr) check("load data", int'(got), int'(exp_rd));
  endtask

  function automatic logic [7:0] pick_value(int a);
    int r = $urandom_range(9, 0);
    if (r < 4) return golden[a];                 // silent store
    if (r < 7) return 8'($urandom_range(3, 0));  // common value
    return 8'($urandom_range(255, 0));
  endfunction

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      smem[i]   = 8'($urandom_range(255, 0));
      golden[i] = smem[i];
      sexp[i]   = smem[i];
    end
    for (int s = 0; s < int'(SETS); s++)
      for (int i = 0; i < int'(WAYS); i++) begin
        mval[s][i] = 1'b0; mdn[s][i] = 1'b0; muse[s][i] = 0;
      end
    for (int i = 0; i < int'(WSET); i++) wset[i] = $urandom_range(DEPTH - 1, 0);
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int n = 0; n < int'(N_OPS); n++) begin
      int a;
      bit wr;
      // mostly a hot working set, sometimes a far address
      if ($urandom_range(15, 0) == 0) a = $urandom_range(DEPTH - 1, 0);
      else a = wset[$urandom_range(WSET - 1, 0)];
      wr = ($urandom_range(1, 0) == 1);
      do_op(wr, a, wr ? pick_value(a) : 8'h00);
    end
    // every working-set address reads back what was last stored
    for (int i = 0; i < int'(WSET); i++) do_op(1'b0, wset[i], 8'h00);
    repeat (2) @(posedge clk);
    check("hits", d_hit, n_hit);
    check("misses", d_miss, n_miss);
    check("write-backs", d_wb, n_wb);
    check("filtered write-backs", d_cancel, n_cancel);
    check("silent stores", d_silent, n_silent);
    check("noisy stores", d_noisy, n_noisy);
    check("stall cycles", d_stall, n_stall);
    for (int i = 0; i < int'(DEPTH); i++) check("SRAM contents", int'(smem[i]), int'(sexp[i]));
    done = 1'b1;
  end
endmodule
