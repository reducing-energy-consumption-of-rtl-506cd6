# Silent-store filtering MoteCache with common-data storage

Sensor-node processors spend much of their energy on the on-chip data SRAM,
and sensor programs touch the same few addresses over and over, very often
storing a value that is already there and very often handling the small
values 0, 1, 2 and 3. This RTL turns those habits into energy savings with two
independent mechanisms:

* **MoteCache** – a cache of a few single-byte lines between the processor
  and its 4 KB data SRAM. A hit cancels the SRAM access that would have
  followed. The cache is write-back, and its dirty bit only becomes set when a
  store really changes the byte (the *dirty & noisy* bit, DN). A store of the
  value already held (a *silent store*) therefore never reaches the SRAM.
* **Common-data (CD) storage** – every byte in the cache, the SRAM and the
  register file carries one extra bit that says whether the byte is one of
  0..3. For such a byte only 3 bitcells are written or read (the CD bit and
  the two low bits) instead of 8; the six high bits are neither written nor
  sensed and read as zero.

The processor itself (an 8-bit AVR-class core with a two-cycle load/store) is
not part of this RTL. Its data-memory port and its register-file ports are the
ports of the top module, `mote_top`.

The design follows a published proposal for MICA2-class sensor nodes. The
insides of the cache controller, the interfaces, the timing in clock cycles
and all widths not tied to the AVR are this implementation's own; the list at
the end says which.

## Block diagram

```
              processor data port (req/resp)          processor register ports
                        |                                       |
               +--------v---------+                    +--------v---------+
               |    motecache     |                    |  cadma_regfile   |
               | SETS x WAYS lines|                    |  32 x (1+2+6)    |
               | tag,V,DN,CD,data |                    +------------------+
               +--------+---------+
                        | single-port SRAM interface
               +--------v---------+
               |    cadma_sram    |
               | 4096 x (1+2+6)   |
               +------------------+
  shared leaf logic: cd_encoder (CD bit of a byte being written)
                     cd_read_gate (CD-gated readout of the six high bits)
```

| File | Contents |
|---|---|
| `rtl/mote_pkg.sv` | sizes, the stored-byte struct, the cache event record |
| `rtl/cd_encoder.sv` | CD bit = OR of bits 7..2; it is also the high-bit write enable |
| `rtl/cd_read_gate.sv` | high-bit local read line = word select AND CD; high bits forced to 0 otherwise |
| `rtl/cadma_sram.sv` | 4K x 8 data SRAM with CD, synchronous single port |
| `rtl/cadma_regfile.sv` | 32 x 8 register file with CD, 2 read ports, 1 write port |
| `rtl/motecache.sv` | the cache and its controller |
| `rtl/mote_top.sv` | cache + SRAM + register file |

## The MoteCache

### Organisation

Lines are one byte wide because the SRAM is one byte wide, so there is no
notion of a block: a line is one address. `SETS` and `WAYS` choose the
organisation, and the published configurations map onto them as
"sets x ways":

| Name | SETS | WAYS | Bytes |
|---|---|---|---|
| minimum, direct mapped | 4 | 1 | 4 |
| direct mapped | 8 / 16 | 1 | 8 / 16 |
| **optimal, 4-way set associative (default)** | **8** | **4** | **32** |
| maximum | 8 | 8 | 64 |
| fully associative | 1 | N | N |

The set index is the low `log2(SETS)` address bits, the tag the rest. Each
line holds valid, DN, the tag, and its byte in CD form. Replacement is true
LRU, kept as an age per way (0 = most recent); an invalid way is always
filled first.

### One access, cycle by cycle

The processor's load/store already takes two cycles: T1 computes the address,
T2 accesses the SRAM. The cache fits inside that:

```
          T1 (request accepted)                 T2                      T2' (only if write-back)
hit       tags compared, no SRAM access         resp_valid, data        -
miss      tags compared, SRAM read issued       SRAM data -> resp and   -
          at the end of T1                      into the victim line
miss,     SRAM write of the victim byte         SRAM read issued        SRAM data -> resp and
DN victim at the end of T1                      (stall)                 into the victim line
```

So a hit and an ordinary miss both answer one cycle after the request, as the
cacheless SRAM did; only a miss that must write back a changed victim costs
one extra cycle, because the SRAM has one port. `req_ready` is low in T2 of a
miss (and in the extra cycle), so a request can follow a hit back to back
but not a miss.

With `EARLY_READ = 1` a hit answers in T1 itself (combinationally from the
request); this is the faster variant where the cache is read within the
address cycle. It lengthens the T1 path by a tag comparison and a way
multiplexer.

### Silent stores and the DN bit

* **Store hit** – the new byte is compared with the line. Equal: nothing is
  written, DN is unchanged (silent store). Different: the byte is written and
  DN is set (noisy store).
* **Store miss** – handled like a load miss first: the old byte is fetched
  from the SRAM into the victim line. The new byte is then installed, with DN
  set only if it differs from the fetched byte. A store of the value already
  in memory thus stays silent even when it misses.
* **Eviction** – a victim with DN set is written to the SRAM; a victim with
  DN clear (clean, or only ever silently stored to) is simply overwritten,
  because the SRAM already holds its value.

DN is sticky: once a line has been changed, storing the original value back
does not clear it. There is no flush port; dirty bytes reach the SRAM only by
eviction, and all processor loads see the cache first, so the processor view
is always coherent.

### Handshake

```
req_valid, req_we, req_addr, req_wdata  ->  accepted when req_valid && req_ready
resp_valid, resp_rdata                  <-  exactly one response per request
sram_en, sram_we, sram_addr, sram_wdata ->  synchronous SRAM, read data the cycle after sram_en
sram_rdata                              <-
events (mc_event_t)                     ->  one-cycle pulses, see below
```

`events` makes the energy-relevant activity countable: `hit`, `miss`,
`writeback`, `wb_cancel` (a valid victim dropped without write-back),
`silent_store`, `noisy_store`, `stall` (the extra write-back cycle),
`msb_read` / `msb_write` (a line's six high bits were sensed / written).
Two assertions guard the controller: a set never holds the same tag twice,
and a fill response never collides with a hit response.

## Common-data storage

The scheme is known as content-aware data management (CADMA), hence the
`cadma_` module names.

Every storage row is split into the CD bit, two low bitcells and six high
bitcells (`cadma_byte_t` in the package).

* **Write**: `cd = |data[7:2]`. CD 0 means "the byte is 0..3"; then only CD
  and the two low cells are written. The two low bits need no encoding, the
  byte is its own low bits. For other bytes all nine cells are written, one
  more than without CD.
* **Read**: CD is sensed with the row. The local read line of the six high
  cells is connected to the word line only when CD is 1; when CD is 0 the six
  high bits of the result are zeros. Stale high cells left by an earlier
  uncommon value therefore never show.

In the SRAM the read is synchronous: `cd`, the low cells, and (only if the
row's CD is 1) the high cells are captured at the clock edge, and
`cd_read_gate` forms the byte during the next cycle. The register file reads
combinationally through two `cd_read_gate`s, one per port. The outputs
`rd_msb_en*` / `wr_msb_en` of each structure, and `sram_msb_rd`,
`sram_msb_wr`, `rf_msb_*` on the top, say whether the high cells took part in
an access, which is what an energy model needs.

## Top-level ports (`mote_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (invalidates the cache, clears the registers) |
| `req_valid/req_ready/req_we/req_addr/req_wdata` | in/out | 1/1/1/12/8 | data-memory request |
| `resp_valid/resp_rdata` | out | 1/8 | data-memory response |
| `rf_we/rf_waddr/rf_wdata` | in | 1/5/8 | register write |
| `rf_raddr_a/rf_rdata_a`, `rf_raddr_b/rf_rdata_b` | in/out | 5/8 | two register reads |
| `mc_events` | out | `mc_event_t` | cache activity |
| `sram_access`, `sram_msb_rd`, `sram_msb_wr` | out | 1 | SRAM activity (high-bit reads are flagged in the cycle the data is used) |
| `rf_msb_rd_a`, `rf_msb_rd_b`, `rf_msb_wr` | out | 1 | register-file high-bit activity |

Parameters: `SRAM_WORDS` (4096), `SETS` (8), `WAYS` (4), `EARLY_READ` (0),
`REGS` (32). `SETS` must be a power of two. The SRAM address is the byte
index inside the SRAM; the processor's mapping of registers and I/O below the
SRAM is outside this design.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/mote_pkg.sv tb/tb_mote_top.sv --top-module tb_mote_top
./obj_dir/Vtb_mote_top
```

| Testbench | What it checks |
|---|---|
| `tb_cd_encoder` | all 256 bytes |
| `tb_cd_read_gate` | all 1024 combinations of word select, CD and cell contents |
| `tb_cadma_sram` | every row written and randomly read back; one-cycle read latency; high-cell activity only for values above 3 |
| `tb_cadma_regfile` | random traffic on both read ports against a model; reset; high-cell activity |
| `tb_motecache` | four caches (8x4; 4x1 with early read; fully associative 1x8; 8x8) against an independent reference model (`tb/mc_env.sv`): load data, latency of every access, counts of hits, misses, write-backs, dropped victims, silent and noisy stores, stall cycles, and the full SRAM contents at the end (no silent store or clean line may have reached it) |
| `tb_mote_top` | the whole subsystem at default size: register file, 3000+ random loads/stores, latency per access, and that every mechanism above occurred in the cache, the SRAM and the register file |
| `tb_crc_workload` | table-driven CRC-32 over 448 bytes, 3 passes, as a processor load/store trace; CRC must match |
| `tb_fft_workload` | in-place 64-point fixed-point FFT on 256 bytes; spectrum must match a direct computation |
| `tb_early_read` | the same fixed trace on 4x1, 8x1 and 16x1 direct-mapped caches, each with and without `EARLY_READ`; every load checked; the early build must save exactly one cycle per hit |
| `tb_lz77_workload` | LZ77 compression of 448 bytes and decompression, twice; tokens and output must match; the second pass must be entirely silent stores |

The workload testbenches are traces written to behave like the sensor
benchmarks (CRC, FFT, LZ77); they are not the original programs, so their hit
rates are indicative only. The SRAM powers up with random contents, so
the first store to each address is silent only by chance; the counts below
come from one such power-up. In the default 8 x 4 configuration:

| Trace | Hit rate | Silent stores | SRAM accesses / processor accesses |
|---|---|---|---|
| CRC-32, 3 passes | 25 % | 33 % | 9614 / 10904 |
| FFT, 64 points | 43 % | 44 % | 3410 / 4032 |
| LZ77, 2 passes | 59 % | first pass 0 %, second pass 100 % | 13808 / 30960 |

With an in-order processor model that issues its next access in the cycle
after a response, `tb_early_read` measures the early-read variant:

| Direct-mapped cache | Hits (of 3000) | Cycles, normal | Cycles, early read | Speed-up |
|---|---|---|---|---|
| 4 x 1 | 278 | 6563 | 6285 | 4.4 % |
| 8 x 1 | 504 | 6580 | 6075 | 8.3 % |
| 16 x 1 | 992 | 6520 | 5528 | 17.9 % |

Each hit saves exactly one cycle; misses cost the same in both builds. The
cycle counts move by a few tens with the SRAM's power-up contents, which
decide how many store misses are silent and so how many write-backs follow.

The CRC trace misses often because its 1 KB lookup table is indexed by data;
a real program would add stack and variable traffic that hits well.

## Where this implementation makes its own choices

* Cache lines are flip-flops; the published design speaks of latches.
* True LRU with per-way age counters (the replacement policy is LRU; the
  mechanism is not specified).
* Store misses allocate and fetch the old byte, so the silent check also
  covers them.
* A write-back and the fetch share the one SRAM port: one stall cycle.
* Request/response handshake, `req_ready`, and the event outputs.
* With `EARLY_READ`, store hits also complete in T1.
* The register file is 32 x 8 with two read and one write port (the AVR
  register file); 16-bit register-pair writes are not modelled. It resets
  to zero.
* No flush port; no program memory, EEPROM or processor.
* Energy is not computed in hardware; the activity outputs give the events an
  energy model would weight.
