// motecache: silent-store filtering MoteCache with common-data lines.
//
// A very small write-back cache between the processor and its data SRAM.
// Each line holds one byte (the SRAM is byte wide), its tag, a valid bit, a
// dirty&noisy (DN) bit and a common-data (CD) bit. SETS x WAYS selects the
// organisation: WAYS = 1 is direct mapped, SETS = 1 is fully associative,
// anything else set associative. The default, 8 sets x 4 ways (32 bytes),
// is the configuration found best for energy; 4 x 1 is the smallest one.
//
// Access (T1 = address cycle, T2 = access cycle of the processor):
//   T1  the request's tag is compared with every way of its set. On a hit
//       the SRAM access that would have followed is not issued. On a miss
//       the SRAM read is issued at the end of T1, so its data arrives in T2.
//   T2  hit: the line is read (or written). miss: the byte from the SRAM is
//       placed in the victim line, chosen by true LRU among the set's ways
//       (an invalid way first).
// Stores: a store hit compares the new byte with the line. A different
// value sets DN (noisy store); the same value leaves the line untouched
// (silent store) and is never written to the SRAM. A store miss first
// fetches the old byte like a load, then installs the new byte with DN set
// only if it differs from the fetched one. An evicted victim is written to
// the SRAM only if its DN bit is set; a victim with DN clear is dropped,
// because the SRAM already holds its value.
// A victim write-back uses the single SRAM port at the end of T1, so the
// fetch moves one cycle later: such a miss takes one extra cycle (stall).
// Lines store their byte in CADMA form: for the values 0..3 only CD and the
// two low bits are written and read (cd_encoder / cd_read_gate).
//
// Interface: req_* is accepted when req_valid and req_ready are both high
// (ready is low while a miss is being served). Exactly one response
// (resp_valid, with resp_rdata for loads) follows each request: one cycle
// after acceptance (in T2) for a hit and for a miss, so a miss costs no more
// than the original SRAM access; in the same cycle for a hit when EARLY_READ
// is set (the variant that reads the cache within T1 to gain speed); two
// cycles after acceptance for a miss with a victim write-back. A miss also
// keeps req_ready low in T2 (and in the extra cycle). sram_* is a
// synchronous single-port SRAM with read data valid the cycle after sram_en.
// events gives one-cycle pulses for hits, misses, write-backs and so on.
// Reset (active low, synchronous) invalidates every line.
//
// From the source description: single-byte lines, tag comparison in T1 with
// the SRAM access cancelled on a hit, LRU victims, write-back with the DN
// bit, the silent-store checks, the CD bit per line, the early-read variant.
// Own choices: flip-flop storage, true LRU by per-way age counters, the
// store-miss fetch, the extra cycle for a write-back, the handshake.
module motecache
  import mote_pkg::*;
#(
  parameter int unsigned ADDR_W     = SRAM_ADDR_W,
  parameter int unsigned SETS       = MC_SETS,
  parameter int unsigned WAYS       = MC_WAYS,
  parameter bit          EARLY_READ = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_rdata,
  // SRAM side
  output logic              sram_en,
  output logic              sram_we,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_wdata,
  input  logic [DATA_W-1:0] sram_rdata,
  // activity
  output mc_event_t         events
);
  localparam int unsigned IDX_BITS = $clog2(SETS);
  localparam int unsigned IDX_W    = (SETS > 1) ? IDX_BITS : 1;
  localparam int unsigned TAG_W    = ADDR_W - IDX_BITS;
  localparam int unsigned WAY_W    = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef enum logic [1:0] {S_IDLE, S_WB, S_FILL} state_t;

  function automatic idx_t idx_of(logic [ADDR_W-1:0] a);
    return idx_t'(a % ADDR_W'(SETS));
  endfunction
  function automatic tag_t tag_of(logic [ADDR_W-1:0] a);
    return tag_t'(a >> IDX_BITS);
  endfunction
  function automatic logic [ADDR_W-1:0] addr_of(tag_t t, idx_t i);
    return (ADDR_W'(t) << IDX_BITS) | ADDR_W'(i);
  endfunction

  // ---------------------------------------------------------------- lines
  logic                valid_r [SETS][WAYS];
  logic                dn_r    [SETS][WAYS];
  tag_t                tag_r   [SETS][WAYS];
  logic                cd_r    [SETS][WAYS];
  logic [CD_LSB_W-1:0] lsb_r   [SETS][WAYS];
  logic [CD_MSB_W-1:0] msb_r   [SETS][WAYS];
  way_t                age_r   [SETS][WAYS];  // 0 = most recently used

  // ------------------------------------------------------ request register
  state_t            state;
  logic [ADDR_W-1:0] q_addr;
  logic              q_we;
  logic [DATA_W-1:0] q_wdata;
  way_t              q_way;
  logic              resp_q;
  logic [DATA_W-1:0] rdata_q;

  // ------------------------------------------------------------ T1 lookup
  idx_t              l_idx;
  tag_t              l_tag;
  logic [WAYS-1:0]   match;
  logic              hit;
  way_t              hit_way;
  way_t              vic_way;
  logic              vic_found;
  logic              accept;
  logic [DATA_W-1:0] hit_data;
  logic              hit_msb_rd;
  logic [DATA_W-1:0] vic_data;
  logic              vic_msb_rd;
  logic              vic_valid;
  logic              vic_dn;
  logic              evict_dirty;

  assign req_ready = (state == S_IDLE);
  assign accept    = req_valid && req_ready;

  always_comb begin
    l_idx     = idx_of(req_addr);
    l_tag     = tag_of(req_addr);
    hit_way   = '0;
    vic_way   = '0;
    vic_found = 1'b0;
    for (int w = 0; w < int'(WAYS); w++) begin
      match[w] = valid_r[l_idx][w] && (tag_r[l_idx][w] == l_tag);
      if (match[w]) hit_way = way_t'(w);
    end
    hit = |match;
    // victim: lowest invalid way, else the least recently used one
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!valid_r[l_idx][w]) begin
        vic_way   = way_t'(w);
        vic_found = 1'b1;
      end
    end
    if (!vic_found) begin
      for (int w = 0; w < int'(WAYS); w++)
        if (age_r[l_idx][w] == way_t'(WAYS - 1)) vic_way = way_t'(w);
    end
    vic_valid   = valid_r[l_idx][vic_way];
    vic_dn      = dn_r[l_idx][vic_way];
    evict_dirty = accept && !hit && vic_valid && vic_dn;
  end

  cd_read_gate u_hit_gate (
    .rd_en    (accept && hit),
    .cd       (cd_r[l_idx][hit_way]),
    .lsb_cells(lsb_r[l_idx][hit_way]),
    .msb_cells(msb_r[l_idx][hit_way]),
    .data     (hit_data),
    .msb_rd_en(hit_msb_rd)
  );

  cd_read_gate u_vic_gate (
    .rd_en    (evict_dirty),
    .cd       (cd_r[l_idx][vic_way]),
    .lsb_cells(lsb_r[l_idx][vic_way]),
    .msb_cells(msb_r[l_idx][vic_way]),
    .data     (vic_data),
    .msb_rd_en(vic_msb_rd)
  );

  // ------------------------------------------------- line update (T2 side)
  logic              ins_en;       // write a line's data
  logic              ins_fill;     // ... as a newly filled line
  idx_t              ins_idx;
  way_t              ins_way;
  logic [DATA_W-1:0] ins_data;
  logic              ins_dn;
  logic              ins_msb_we;
  cadma_byte_t       ins_row;
  logic              st_equal;     // store byte equals the held byte
  logic              st_check;     // a store is being checked this cycle
  logic              touch_en;
  idx_t              touch_idx;
  way_t              touch_way;

  always_comb begin
    ins_en    = 1'b0;
    ins_fill  = 1'b0;
    ins_idx   = l_idx;
    ins_way   = hit_way;
    ins_data  = req_wdata;
    ins_dn    = 1'b0;
    st_equal  = 1'b0;
    st_check  = 1'b0;
    touch_en  = 1'b0;
    touch_idx = l_idx;
    touch_way = hit_way;
    if (state == S_FILL) begin
      st_check  = q_we;
      st_equal  = (q_wdata == sram_rdata);
      ins_en    = 1'b1;
      ins_fill  = 1'b1;
      ins_idx   = idx_of(q_addr);
      ins_way   = q_way;
      ins_data  = q_we ? q_wdata : sram_rdata;
      ins_dn    = q_we && !st_equal;
      touch_en  = 1'b1;
      touch_idx = idx_of(q_addr);
      touch_way = q_way;
    end else if (accept && hit) begin
      touch_en = 1'b1;
      if (req_we) begin
        st_check = 1'b1;
        st_equal = (req_wdata == hit_data);
        // a silent store leaves the line (and its DN bit) as it is
        ins_en   = !st_equal;
        ins_dn   = 1'b1;
      end
    end
  end

  cd_encoder u_enc (.data(ins_data), .msb_we(ins_msb_we), .row(ins_row));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++)
        for (int w = 0; w < int'(WAYS); w++) begin
          valid_r[s][w] <= 1'b0;
          dn_r[s][w]    <= 1'b0;
          age_r[s][w]   <= way_t'(w);
        end
    end else begin
      if (ins_en) begin
        dn_r[ins_idx][ins_way]  <= ins_dn;
        cd_r[ins_idx][ins_way]  <= ins_row.cd;
        lsb_r[ins_idx][ins_way] <= ins_row.lsb;
        if (ins_msb_we) msb_r[ins_idx][ins_way] <= ins_row.msb;
        if (ins_fill) begin
          valid_r[ins_idx][ins_way] <= 1'b1;
          tag_r[ins_idx][ins_way]   <= tag_of(q_addr);
        end
      end
      if (touch_en) begin
        for (int w = 0; w < int'(WAYS); w++) begin
          if (way_t'(w) == touch_way)
            age_r[touch_idx][w] <= '0;
          else if (age_r[touch_idx][w] < age_r[touch_idx][touch_way])
            age_r[touch_idx][w] <= age_r[touch_idx][w] + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      resp_q  <= 1'b0;
      rdata_q <= '0;
      q_addr  <= '0;
      q_we    <= 1'b0;
      q_wdata <= '0;
      q_way   <= '0;
    end else begin
      resp_q <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          q_addr  <= req_addr;
          q_we    <= req_we;
          q_wdata <= req_wdata;
          q_way   <= vic_way;
          if (hit) begin
            resp_q  <= !EARLY_READ;
            rdata_q <= hit_data;
          end else begin
            state <= evict_dirty ? S_WB : S_FILL;
          end
        end
        S_WB:   state <= S_FILL;
        S_FILL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // SRAM port: a write-back or a fetch at the end of T1, a delayed fetch
  // after a write-back.
  always_comb begin
    sram_en    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = req_addr;
    sram_wdata = vic_data;
    if (state == S_WB) begin
      sram_en   = 1'b1;
      sram_addr = q_addr;
    end else if (accept && !hit) begin
      sram_en = 1'b1;
      if (evict_dirty) begin
        sram_we   = 1'b1;
        sram_addr = addr_of(tag_r[l_idx][vic_way], l_idx);
      end
    end
  end

  // Responses
  logic early;
  assign early = EARLY_READ && accept && hit;

  always_comb begin
    resp_valid = resp_q || early || (state == S_FILL);
    if (state == S_FILL) resp_rdata = sram_rdata;
    else if (early)      resp_rdata = hit_data;
    else                 resp_rdata = rdata_q;
  end

  // Activity
  always_comb begin
    events              = '0;
    events.hit          = accept && hit;
    events.miss         = accept && !hit;
    events.writeback    = evict_dirty;
    events.wb_cancel    = accept && !hit && vic_valid && !vic_dn;
    events.silent_store = st_check && st_equal;
    events.noisy_store  = st_check && !st_equal;
    events.stall        = (state == S_WB);
    events.msb_read     = hit_msb_rd || vic_msb_rd;
    events.msb_write    = ins_en && ins_msb_we;
  end

  // A set never holds the same address twice; one response per cycle.
  a_one_match : assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> $onehot0(match));
  a_one_resp : assert property (@(posedge clk) disable iff (!rst_n)
    !(resp_q && (state == S_FILL)));
endmodule
