// mote_pkg: sizes and types shared by the sensor-node data-memory subsystem.
//
// The subsystem puts a tiny cache of single-byte lines (the MoteCache) in
// front of the processor's 4K x 8 on-chip data SRAM, and stores every byte in
// the cache, the SRAM and the register file together with a common-data (CD)
// bit. The sizes below are those of the node the design targets (an 8-bit AVR
// with 4 KB of data SRAM and 32 registers) and of the cache configuration
// chosen as optimal (8 sets x 4 ways = 32 bytes). The event record is this
// design's own way of making the energy-relevant activity observable.
package mote_pkg;

  localparam int unsigned DATA_W      = 8;    // bytes throughout
  localparam int unsigned CD_LSB_W    = 2;    // bits always stored/read
  localparam int unsigned CD_MSB_W    = 6;    // bits gated by the CD bit
  localparam int unsigned SRAM_DEPTH  = 4096; // 4K x 8 data SRAM
  localparam int unsigned SRAM_ADDR_W = 12;
  localparam int unsigned MC_SETS     = 8;    // optimal MoteCache: 8 x 4
  localparam int unsigned MC_WAYS     = 4;
  localparam int unsigned RF_REGS     = 32;   // AVR general purpose registers

  // One byte as held by a CADMA storage row: the CD bit, the two low bits
  // and the six high bits, which are only meaningful when cd is 1.
  typedef struct packed {
    logic                cd;
    logic [CD_MSB_W-1:0] msb;
    logic [CD_LSB_W-1:0] lsb;
  } cadma_byte_t;

  // Single-cycle pulses from the MoteCache controller, one per event.
  typedef struct packed {
    logic hit;          // tag match: scheduled SRAM access cancelled
    logic miss;         // no match: SRAM accessed
    logic writeback;    // victim had its dirty&noisy bit set: written back
    logic wb_cancel;    // valid victim with DN clear: write-back filtered
    logic silent_store; // store of the value already held
    logic noisy_store;  // store of a different value: DN set
    logic stall;        // extra cycle spent on a victim write-back
    logic msb_read;     // a line's six high bits were read (CD = 1)
    logic msb_write;    // a line's six high bits were written (CD = 1)
  } mc_event_t;

endpackage
