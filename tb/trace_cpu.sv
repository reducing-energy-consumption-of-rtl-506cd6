// trace_cpu: a simple in-order processor model that runs a fixed load/store
// trace on one mote_top instance and measures the cycles it takes.
//
// The trace is the same for every instance (a fixed LFSR seed): 3/4 of the
// accesses go to 24 hot addresses, the rest anywhere in the SRAM; a third
// are stores, often of the value already stored. Like a two-cycle AVR load,
// the model issues its next access in the cycle after the one in which the
// response arrived. Every load is checked against a reference copy of the
// memory. cycles counts clock cycles from the first request to the last
// response; hits counts cache hits and wbs victim write-backs, each of
// which costs one cycle. The SRAM starts with unknown contents, so whether
// a store miss is silent, and so the number of write-backs, can differ
// between instances.
module trace_cpu #(
  parameter int unsigned SETS       = 4,
  parameter int unsigned WAYS       = 1,
  parameter bit          EARLY_READ = 1'b0,
  parameter int unsigned N_OPS      = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   hits,
  output int   wbs
);
  import mote_pkg::*;

  logic        req_valid = 1'b0;
  logic        req_ready;
  logic        req_we = 1'b0;
  logic [11:0] req_addr = '0;
  logic [7:0]  req_wdata = '0;
  logic        resp_valid;
  logic [7:0]  resp_rdata;
  logic [7:0]  rf_rdata_a;
  logic [7:0]  rf_rdata_b;
  mc_event_t   mc_events;
  logic        sram_access;
  logic        sram_msb_rd;
  logic        sram_msb_wr;
  logic        rf_msb_rd_a;
  logic        rf_msb_rd_b;
  logic        rf_msb_wr;

  mote_top #(.SETS(SETS), .WAYS(WAYS), .EARLY_READ(EARLY_READ)) dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .rf_we(1'b0), .rf_waddr(5'd0), .rf_wdata(8'd0),
    .rf_raddr_a(5'd0), .rf_rdata_a, .rf_raddr_b(5'd1), .rf_rdata_b,
    .mc_events, .sram_access, .sram_msb_rd, .sram_msb_wr,
    .rf_msb_rd_a, .rf_msb_rd_b, .rf_msb_wr
  );

  logic [31:0] lfsr = 32'h1234_5678;
  logic [7:0]  golden [4096];
  bit          known  [4096];
  int          hot    [24];

  function automatic logic [31:0] next_rand(logic [31:0] s);
    // xorshift32
    s ^= s << 13;
    s ^= s >> 17;
    s ^= s << 5;
    return s;
  endfunction

  task automatic rnd(output int unsigned r);
    lfsr = next_rand(lfsr);
    r = lfsr;
  endtask

  bit running = 1'b0;
  always @(posedge clk) begin
    if (rst_n && mc_events.hit) hits <= hits + 1;
    if (rst_n && mc_events.writeback) wbs <= wbs + 1;
    if (running) cycles <= cycles + 1;
  end

  initial begin : run
    int unsigned r;
    checks = 0; failures = 0; cycles = 0; hits = 0; wbs = 0; done = 1'b0;
    for (int i = 0; i < 4096; i++) known[i] = 1'b0;
    for (int i = 0; i < 24; i++) begin
      rnd(r);
      hot[i] = int'(r % 4096);
    end
    @(posedge rst_n);
    @(negedge clk);
    running = 1'b1;
    for (int n = 0; n < int'(N_OPS); n++) begin
      int  a;
      bit  wr;
      logic [7:0] v;
      rnd(r);
      a = (r % 4 != 0) ? hot[(r >> 4) % 24] : int'((r >> 4) % 4096);
      rnd(r);
      wr = (r % 3 == 0);
      v  = (known[a] && ((r >> 4) % 2 == 0)) ? golden[a] : 8'((r >> 8) % (((r >> 16) % 2 == 0) ? 4 : 256));
      req_valid = 1'b1; req_we = wr; req_addr = 12'(a); req_wdata = v;
      // wait for the response; the request is taken at the first edge
      #1;
      while (!resp_valid) begin
        @(negedge clk);
        req_valid = 1'b0;
        #1;
      end
      if (!wr && known[a]) begin
        checks++;
        if (resp_rdata != golden[a]) begin
          failures++;
          $display("FAIL [%0dx%0d early=%0b] load %0h: got %0h expected %0h",
                   SETS, WAYS, EARLY_READ, a, resp_rdata, golden[a]);
        end
      end
      if (wr) begin
        golden[a] = v;
        known[a]  = 1'b1;
      end
      // the next access starts in the following cycle
      @(negedge clk);
      req_valid = 1'b0;
    end
    running = 1'b0;
    done = 1'b1;
  end
endmodule
