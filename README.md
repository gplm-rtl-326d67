# GPLM Low-MAC: 802.11ac A-MPDU datapath for FPGA software radios

802.11n/ac gets its throughput from **A-MPDU aggregation**: several MPDUs, each with its
own FCS, are packed into one PHY frame behind 4-octet delimiters, and the receiver
acknowledges them together with a **Block Ack** that reports each subframe. Aggregation
happens *after* all other MAC processing and must be undone per subframe on reception, in
real time, so it cannot live in host software. At the same time a research radio must stay
programmable: Block Ack and other control frames vary too much for fixed-function frame
generators.

This Low-MAC splits the work between a microprocessor and a few accelerators:

* frames live in **dual-port RAMs** (one for Tx, one for Rx). The host DMA and the processor
  see them as ordinary memory, so software builds a Block Ack by writing bytes;
* the processor talks to the aggregation hardware only through **descriptor queues**: one
  descriptor per legacy frame or per A-MPDU subframe;
* a **Tx A-MPDU generator** turns a run of descriptors into the PSDU stream for the PHY
  (delimiters, FCS, padding, empty delimiters), and an **Rx A-MPDU deaggregator** does the
  reverse, checking each subframe and posting one descriptor per received MPDU;
* a **carrier-sense / backoff** block handles the microsecond-scale channel access timing.

The SystemVerilog here implements the programmable-logic part: both memory subsystems,
both A-MPDU engines and the backoff block, wired together in `gplm_low_mac`. The
processor, its software, the host link, the DMA engine, the bus fabric and the PHY are not
included; their connections are ports of the top.

```
              bus side (host DMA / processor)                       PHY
                 |                    ^                              ^ |
  txram_* ------>| port A             | txq_*                        | |
            +----v-------+     +------+------+     +-------------+   | |
            | Tx frame   |---->| Tx desc     |---->| Tx A-MPDU   |---+ |  phy_tx_*
            | RAM        |port | queue (FIFO)|     | generator   |     |
            +------------+ B   +-------------+     +-------------+     |
                 ^ reads by the generator                              |
                                                                       |  phy_rx_*
            +------------+     +-------------+     +-------------+     |
  rxram_* <>| Rx frame   |<----| Rx A-MPDU   |<----------------------- +
            | RAM        |portB| deaggregator|---->| Rx desc     |----> rxq_*
            +------------+     +-------------+     | queue (FIFO)|
                                                   +-------------+
  cca_busy, bo_* <--> carrier-sense / backoff
```

All blocks share one clock (100 MHz in the reference system) and an active-low
asynchronous reset.

## Data on the wire and in memory

Everything moves as 32-bit words in little-endian byte order: byte 0 of a word (bits 7:0)
is the first byte on air and the lowest byte address in RAM. Frames in the Tx RAM start on
a word boundary.

### A-MPDU layout

An A-MPDU as produced by the generator and expected by the deaggregator:

```
| delimiter | MPDU bytes ... | FCS (4) | zero pad to 4 octets | [empty delimiters] | delimiter | ...
```

Delimiter word (this is the IEEE 802.11 VHT format):

| bits  | field |
|-------|-------|
| 0     | EOF (set for a VHT single-MPDU A-MPDU) |
| 1     | reserved, 0 |
| 3:2   | MPDU length bits 13:12 |
| 15:4  | MPDU length bits 11:0 |
| 23:16 | CRC-8 (x^8+x^2+x+1, preset ones, over bits 0..15 in order, complemented, first CRC bit in bit 16) |
| 31:24 | signature 0x4E |

The length counts the MPDU including its 4-byte FCS. An *empty delimiter* has length 0.
The FCS is the 802.11 CRC-32 (reflected 0x04C11DB7, preset ones, sent complemented, low
byte first).

The subtle part is that an MPDU's length is rarely a multiple of four, while the datapath
moves whole words. With `r = flen mod 4`:

* `r = 0`: the MPDU fills whole words and the FCS is one extra word;
* `r != 0`: the last data word carries `r` MPDU bytes followed by the first `4 - r` FCS bytes,
  and one more word carries the remaining `r` FCS bytes followed by `4 - r` zero pad bytes.

Either way the next delimiter starts on a word boundary. A legacy (non-aggregated) frame
has no delimiter and no padding: its last word has a partial `tkeep`.

### Tx descriptor (`tx_desc_t`, 64 bits)

| bits  | field  | meaning |
|-------|--------|---------|
| 15:0  | addr   | word address of the MPDU in Tx RAM |
| 29:16 | flen   | MPDU length in bytes **without** FCS (the generator appends it); 1 .. 16379 |
| 30    | ampdu  | 1: A-MPDU subframe (delimiter + padding), 0: legacy frame |
| 31    | eof    | EOF bit for this subframe's delimiter |
| 39:32 | padcnt | empty delimiters after this subframe (A-MPDU only) |
| 40    | last   | last descriptor of the PPDU: its final word carries `tlast` |

A PPDU is therefore a run of descriptors ending with `last = 1`. A legacy frame is a single
descriptor with `ampdu = 0, last = 1`.

### Rx descriptor (`rx_desc_t`, 64 bits)

| bits  | field     | meaning |
|-------|-----------|---------|
| 15:0  | addr      | word address of the MPDU in Rx RAM |
| 29:16 | len       | MPDU length in bytes, FCS included |
| 30    | fcs_ok    | FCS correct |
| 31    | ampdu     | came from an A-MPDU |
| 32    | eof       | EOF bit of its delimiter |
| 33    | ppdu_end  | this MPDU ended the PPDU |
| 34    | truncated | the PPDU ended before the delimiter's length was reached (fcs_ok is then 0) |

MPDUs with a bad FCS are still reported, so software can fill a Block Ack bitmap from the
descriptors of one A-MPDU.

## Tx A-MPDU generator (`gplm_tx_ampdu_gen`)

Per descriptor it emits the delimiter (A-MPDU only), the data words read from Tx RAM, the
FCS words and the empty delimiters, and it sets `tlast` on the final word of the
descriptor marked `last`.

It is a two-stage pipeline:

1. **Issue stage.** A state machine (`IDLE -> DELIM -> DATA -> FCS -> PAD`) issues one
   operation per cycle: a RAM read of the next data word, or a word it generates itself.
2. **Assembly stage.** One cycle later the RAM word arrives. This stage runs the CRC-32
   over the valid bytes and forms the output word, merging FCS bytes into a partial last
   word as described above. The word is written into a 4-entry output FIFO.

The issue stage only issues while the FIFO has room for everything in flight, so PHY
back-pressure (`phy_tready` low) stalls the engine cleanly. An assertion flags an overflow
if that rule is ever broken.

**Rate.** While data flows it sends one word per cycle. Each descriptor adds one cycle,
spent fetching it. A 5 x 4000-byte A-MPDU (5010 words) leaves in 5014 cycles, about
3.2 Gbit/s at 100 MHz. The reference HLS implementation reached 1.6 Gbit/s.

## Rx A-MPDU deaggregator (`gplm_rx_ampdu_deagg`)

The PHY delivers words with `tvalid`, `tkeep`, `tlast`, plus `tuser_ampdu`, which tells
whether the PPDU is an A-MPDU (the PHY knows this from its signal field). The PHY is never
stalled. Each word is registered, then handled in one cycle:

* **Legacy PPDU**: everything up to `tlast` is one MPDU.
* **A-MPDU**: at every subframe boundary the engine expects a delimiter.
  * A good delimiter (signature plus CRC-8) with length 0 is skipped.
  * A good delimiter with length L starts an MPDU of L bytes. The pad bytes in its last
    word are ignored.
  * A word that is not a good delimiter is counted in `delim_err_cnt` and skipped. The
    engine tries again 4 octets later, so it resynchronises on the next intact subframe
    after a corrupted delimiter.
* **FCS check.** The CRC-32 runs over MPDU and FCS; the result is compared with the
  residue 0xDEBB20E3.
* **Truncation.** If `tlast` comes inside an MPDU, that MPDU is reported `truncated`.

MPDU words go into the Rx RAM in the same cycle, at consecutive word addresses, with each
MPDU starting on a word boundary. The RAM is used as a ring that wraps at its end. The
descriptor follows a cycle later, so an MPDU is complete in RAM before its descriptor can
be read.

If the Rx queue is full when an MPDU ends, the MPDU is dropped and its RAM space reused;
`drop_cnt` counts these. Software must take descriptors (and copy or use the data) before
the ring comes round again: nothing tracks free space in the ring.

Counters: `mpdu_cnt`, `fcs_err_cnt`, `delim_err_cnt`, `drop_cnt` (16 bits, wrapping).

## Frame RAMs (`gplm_frame_ram`) and descriptor queues (`gplm_desc_fifo`)

The frame RAM is a true dual-port RAM, 32 bits wide, with byte write enables.

* Reads have one cycle of latency and are read-first.
* Port A is the bus side. In a full system it sits behind a bus-to-RAM adaptor shared by
  the DMA engine and the processor.
* Port B belongs to the A-MPDU engine: the generator reads it, the deaggregator writes it.
* If both ports write the same byte in the same cycle, port B wins.

The queue is a first-word-fall-through FIFO with valid/ready handshakes on both sides and
an occupancy count. A word pushed in one cycle can be popped in the next. The same module
serves as the generator's output buffer.

## Carrier sense and backoff (`gplm_backoff`)

Software pulses `bo_start` with a contention-window mask `bo_cw` (2^k - 1) and an AIFS
number `bo_aifsn`. The block draws `LFSR & cw` slots. It then waits for AIFS
(SIFS + aifsn x slot) of idle medium (`cca_busy` low) and counts the slots down. A busy
cycle freezes the count and sends the block back to the AIFS wait. At zero it raises
`bo_grant`, which stays high until `bo_grant_ack`. The processor then queues the Tx
descriptors of the PPDU.

On an idle medium the grant comes exactly `SIFS + aifsn*SLOT + n*SLOT` cycles after the
start.

## Top-level ports (`gplm_low_mac`)

| group | signals |
|-------|---------|
| Tx RAM bus port | `txram_en, txram_we[3:0], txram_addr, txram_wdata, txram_rdata` |
| Tx queue | `txq_valid, txq_ready, txq_desc (tx_desc_t), txq_count` |
| to PHY | `phy_tx_tvalid, phy_tx_tready, phy_tx_tdata, phy_tx_tkeep, phy_tx_tlast`, `tx_busy` |
| from PHY | `phy_rx_tvalid, phy_rx_tdata, phy_rx_tkeep, phy_rx_tlast, phy_rx_tuser_ampdu` |
| Rx RAM bus port | `rxram_en, rxram_we[3:0], rxram_addr, rxram_wdata, rxram_rdata` |
| Rx queue | `rxq_valid, rxq_ready, rxq_desc (rx_desc_t), rxq_count` |
| Rx statistics | `rx_mpdu_cnt, rx_fcs_err_cnt, rx_delim_err_cnt, rx_drop_cnt` |
| channel access | `cca_busy, bo_start, bo_cw, bo_aifsn, bo_grant_ack, bo_grant, bo_active, bo_slots_left, bo_freeze_cnt` |

| parameter | default | meaning |
|-----------|---------|---------|
| `TX_ADDR_W`, `RX_ADDR_W` | 14 | frame RAM size, 2^N words (64 KiB) |
| `TXQ_DEPTH`, `RXQ_DEPTH` | 64 | descriptor queue entries (power of two) |
| `SLOT_CYCLES` | 900 | backoff slot, 9 us at 100 MHz |
| `SIFS_CYCLES` | 1600 | SIFS, 16 us at 100 MHz |

The default 64 KiB RAMs hold the largest aggregate used in the throughput evaluation,
5 x 4000 bytes, with room to spare.

## What is taken from the architecture and what is chosen here

Taken from the architecture:

* the processor-plus-accelerator split;
* dual-port frame RAMs with one bus port and one port reserved for the A-MPDU engine;
* descriptor queues with one descriptor per legacy frame or A-MPDU subframe;
* the generator's loop: delimiter, data words with CRC, CRC tail, empty delimiters, until
  the last descriptor;
* the deaggregator's job: split, check each subframe, write MPDUs to RAM and descriptors to
  the queue;
* the 1.6 Gbit/s target at 100 MHz.

Chosen here:

* **Formats.** The descriptor layouts and all widths. The delimiter and FCS formats follow
  IEEE 802.11.
* **Sizes.** RAM sizes and queue depths.
* **Tx framing.** Every A-MPDU subframe, the last included, is padded to 4 octets. The Tx
  pipeline structure.
* **Rx behaviour.** The `tuser_ampdu` sideband, the ring buffer, the resynchronisation
  step, reporting bad-FCS MPDUs, and dropping on a full queue.
* **Backoff.** The block is only named as a hardware function. It is built here as the
  standard EDCA countdown with 802.11 OFDM slot and SIFS values.
* **Bus side.** The bus adaptor and the stream-FIFO bus interface are replaced by native
  ports. The backoff block is not wired to the generator; the processor sequences them.

Limits to keep in mind:

* `flen` must be at least 1 and at most 16379.
* The Rx ring does not protect unread data.
* The Rx side accepts one word per cycle and never back-pressures the PHY.
* The reference generator was written in HLS. This is a hand-written RTL equivalent, so
  resource figures will differ.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_gplm_tx_ampdu_gen` | byte-exact PSDUs against an independent byte-level model, under random back-pressure; one word per cycle on a 5 x 4000-byte A-MPDU |
| `tb_gplm_rx_ampdu_deagg` | legacy and A-MPDU reception, empty and corrupted delimiters, bad FCS, truncation, queue-full drops, ring wrap, RAM contents |
| `tb_gplm_desc_fifo` | order, count, full/empty against a queue model |
| `tb_gplm_frame_ram` | both ports, byte enables, read-first, write collisions |
| `tb_gplm_backoff` | exact grant timing, freeze on busy, zero window |
| `tb_gplm_low_mac` | end to end at default parameters, Tx looped back into Rx; every mechanism (legacy, A-MPDU, empty delimiters, back-pressure, backoff freeze, FCS error, delimiter resync, queue overflow) must occur |
| `tb_gplm_workloads` | legacy 1000-4000 bytes and A-MPDUs of 3/4/5 x 1000/2000/4000 bytes through the whole design, with rate checks |

The models in the testbenches compute CRC-32 and CRC-8 bit by bit, independently of the
RTL; the CRC-32 model is itself checked against the standard vector ("123456789" ->
0xCBF43926).

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/gplm_pkg.sv rtl/gplm_desc_fifo.sv rtl/gplm_frame_ram.sv rtl/gplm_tx_ampdu_gen.sv \
  rtl/gplm_rx_ampdu_deagg.sv rtl/gplm_backoff.sv rtl/gplm_low_mac.sv \
  tb/tb_gplm_low_mac.sv --top-module tb_gplm_low_mac
./obj_dir/Vtb_gplm_low_mac
```

For a single block, list `rtl/gplm_pkg.sv`, the block's file, the files it instantiates
(the generator uses `gplm_desc_fifo`) and its testbench. Every testbench finishes in well
under a second of CPU time. All RTL is synthesizable; the RAMs and FIFOs are plain arrays
that FPGA tools map to block or distributed RAM.
