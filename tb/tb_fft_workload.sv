// tb_fft_workload: the FFT sensor benchmark as a load/store trace on the
// default-size subsystem.
//
// The testbench plays the processor running an in-place radix-2 FFT on 256
// bytes of data: 64 complex points of 16-bit real and imaginary parts,
// stored little-endian in the data SRAM. Bit-reversal reordering and every
// butterfly go through the design as byte loads and stores; twiddle factors
// (Q14) are constants, as they would sit in program memory. Each butterfly
// scales by 1/2 to avoid overflow. The spectrum read back at the end must
// equal the same integer FFT computed directly by the testbench, and the
// input, a sampled tone plus small noise, must show its peak in the right bin.
module tb_fft_workload;
  import mote_pkg::*;

  localparam int N         = 64;
  localparam int LOG2N     = 6;
  localparam int DATA_BASE = 'h300;
  localparam int TONE_BIN  = 5;

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

  task automatic store16(int a, logic signed [15:0] v);
    logic [7:0] unused;
    access(1'b1, a, v[7:0], unused);
    access(1'b1, a + 1, v[15:8], unused);
  endtask

  task automatic load16(int a, output logic signed [15:0] v);
    logic [7:0] lo;
    logic [7:0] hi;
    access(1'b0, a, 8'h00, lo);
    access(1'b0, a + 1, 8'h00, hi);
    v = {hi, lo};
  endtask

  // Q14 twiddles, w_k = exp(-2 pi i k / N)
  logic signed [15:0] wr_tab [N/2];
  logic signed [15:0] wi_tab [N/2];
  // reference data
  logic signed [15:0] xr [N];
  logic signed [15:0] xi [N];

  function automatic int bitrev(int k);
    int r = 0;
    for (int b = 0; b < LOG2N; b++) if ((k & (1 << b)) != 0) r |= 1 << (LOG2N - 1 - b);
    return r;
  endfunction

  // one scaled butterfly on (ar,ai),(br,bi) with twiddle k
  function automatic void butterfly(int k,
      inout logic signed [15:0] ar, inout logic signed [15:0] ai,
      inout logic signed [15:0] br, inout logic signed [15:0] bi);
    int tr = (int'(br) * int'(wr_tab[k]) - int'(bi) * int'(wi_tab[k])) >>> 14;
    int ti = (int'(br) * int'(wi_tab[k]) + int'(bi) * int'(wr_tab[k])) >>> 14;
    int a_r = int'(ar);
    int a_i = int'(ai);
    ar = 16'((a_r + tr) >>> 1);
    ai = 16'((a_i + ti) >>> 1);
    br = 16'((a_r - tr) >>> 1);
    bi = 16'((a_i - ti) >>> 1);
  endfunction

  initial begin : run
    const real PI = 3.14159265358979;
    int peak;
    int peak_mag;
    for (int k = 0; k < N / 2; k++) begin
      wr_tab[k] = 16'($rtoi($floor(16384.0 * $cos(2.0 * PI * k / N) + 0.5)));
      wi_tab[k] = 16'($rtoi($floor(-16384.0 * $sin(2.0 * PI * k / N) + 0.5)));
    end
    for (int n = 0; n < N; n++) begin
      xr[n] = 16'($rtoi(2000.0 * $cos(2.0 * PI * TONE_BIN * n / N)) + $urandom_range(8, 0) - 4);
      xi[n] = '0;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      store16(DATA_BASE + 4 * n, xr[n]);
      store16(DATA_BASE + 4 * n + 2, xi[n]);
    end

    // bit reversal, through the memory and on the reference
    for (int n = 0; n < N; n++) begin
      automatic int m = bitrev(n);
      if (m > n) begin
        logic signed [15:0] ar, ai, br, bi;
        load16(DATA_BASE + 4 * n, ar);
        load16(DATA_BASE + 4 * n + 2, ai);
        load16(DATA_BASE + 4 * m, br);
        load16(DATA_BASE + 4 * m + 2, bi);
        store16(DATA_BASE + 4 * n, br);
        store16(DATA_BASE + 4 * n + 2, bi);
        store16(DATA_BASE + 4 * m, ar);
        store16(DATA_BASE + 4 * m + 2, ai);
        {xr[n], xr[m]} = {xr[m], xr[n]};
        {xi[n], xi[m]} = {xi[m], xi[n]};
      end
    end

    // butterflies
    for (int s = 1; s <= LOG2N; s++) begin
      automatic int half = 1 << (s - 1);
      automatic int span = 1 << s;
      for (int g = 0; g < N; g += span)
        for (int j = 0; j < half; j++) begin
          automatic int p = g + j;
          automatic int q = p + half;
          automatic int k = j * (N / span);
          logic signed [15:0] ar, ai, br, bi;
          load16(DATA_BASE + 4 * p, ar);
          load16(DATA_BASE + 4 * p + 2, ai);
          load16(DATA_BASE + 4 * q, br);
          load16(DATA_BASE + 4 * q + 2, bi);
          butterfly(k, ar, ai, br, bi);
          store16(DATA_BASE + 4 * p, ar);
          store16(DATA_BASE + 4 * p + 2, ai);
          store16(DATA_BASE + 4 * q, br);
          store16(DATA_BASE + 4 * q + 2, bi);
          butterfly(k, xr[p], xi[p], xr[q], xi[q]);
        end
    end

    // read the spectrum back
    peak = 0;
    peak_mag = -1;
    for (int n = 0; n < N; n++) begin
      logic signed [15:0] vr, vi;
      load16(DATA_BASE + 4 * n, vr);
      load16(DATA_BASE + 4 * n + 2, vi);
      check("real part", int'(vr), int'(xr[n]));
      check("imaginary part", int'(vi), int'(xi[n]));
      if (n < N / 2 && int'(vr) * int'(vr) + int'(vi) * int'(vi) > peak_mag) begin
        peak_mag = int'(vr) * int'(vr) + int'(vi) * int'(vi);
        peak = n;
      end
    end
    check("peak bin", peak, TONE_BIN);
    $display("FFT of %0d points: %0d loads and stores, cache hits %0d misses %0d (hit rate %0d%%), silent stores %0d of %0d, SRAM accesses %0d",
             N, n_ops, c_hit, c_miss, (100 * c_hit) / (c_hit + c_miss), c_silent, c_silent + c_noisy, c_sram);
    check("accesses counted", c_hit + c_miss, n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
