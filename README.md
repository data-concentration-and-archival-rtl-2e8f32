# SD card data concentrator

A data concentrator sits between many sampling units (for example smart
meters) and the network that eventually collects their readings. This design
lets an FPGA do that job alone: an incoming byte stream is collected in an
on-chip buffer and written block by block to a removable SD card over the
card's native bus, without any processor or software. The card can also be
read back, and a region of an external SRAM can be archived instead of the
live stream, optionally as a wav file.

Everything is plain synthesizable SystemVerilog in `rtl/`, one module or
package per file. The testbenches in `tb/` include a behavioural SD card and
a behavioural SRAM.

## How the pieces fit

```
 acq_valid/acq_data ─┐                        ┌─ sd_clk_gen ── sd_clk (100 kHz / 25 MHz)
                     ├─► sd_block_fifo ──► sd_dat_tx ──► DAT0 ◄── sd_dat_rx ──► rd_valid/rd_data
 sram_reader ────────┤   (commit/rewind)        ▲                   ▲
 wav_header_gen ─────┘                          │                   │
                                         sd_write_ctrl        sd_read_ctrl
                                                │                   │
                              sd_init_fsm ──────┴──► sd_cmd_engine ◄┘──► CMD
```

| module | job |
|---|---|
| `sd_concentrator_top` | wiring, card detect, operation dispatch, source selection, counters |
| `sd_pkg` | command numbers, CRC status tokens, request/response structs, CRC7 function |
| `sd_clk_gen` | one SD clock divider with two rates and edge strobes |
| `sd_cmd_engine` | 48-bit command frames out, 48/136-bit responses in, CRC7 |
| `sd_init_fsm` | card identification and selection |
| `sd_crc16` | bit-serial CRC16 used by both data directions |
| `sd_dat_tx` | one 512-byte block out on DAT0, CRC status, busy wait |
| `sd_dat_rx` | one 512-byte block in from DAT0, CRC16 and end-bit check |
| `sd_write_ctrl` | single (CMD24) and multiple (CMD25 … CMD12) block writes with resend |
| `sd_read_ctrl` | single (CMD17) and multiple (CMD18 … CMD12) block reads |
| `sd_block_fifo` | the on-chip buffer, a register array with commit and rewind |
| `sram_reader` | streams 16-bit words of a synchronous SRAM as bytes |
| `wav_header_gen` | the 44-byte RIFF/WAVE header in front of an SRAM archive |

## One clock, two SD rates

The whole design runs on a single system clock (50 MHz by default). The SD
card wants 100–400 kHz while it is being identified and up to 25 MHz after.
`sd_clk_gen` toggles `sd_clk` every `HALF` system cycles, with `HALF` =
`INIT_HALF` (250 → 100 kHz) until the card is selected and `FAST_HALF`
(1 → 25 MHz) from then on. A rate change ends the running half period at the
next system cycle; no phase of `sd_clk` is ever shorter than a fast half
period.

No logic is clocked by `sd_clk`. Instead the divider gives two one-cycle
strobes, `fall_stb` and `rise_stb`, in the system cycle in which `sd_clk`
falls or rises. Every SD-facing block changes its outputs on `fall_stb` and
samples the card on `rise_stb`, which is what the card expects (it samples
on the rising edge and drives after the falling edge). At 25 MHz the two
strobes alternate every system cycle, so all the bit-level state machines
must be able to act on consecutive cycles; they do.

The SD lines are split into value, output enable and input
(`sd_cmd_o/oe/i`, `sd_dat0_o/oe/i`) for an external tri-state pad with a
pull-up. Only DAT0 is used (1-bit bus mode); DAT1–DAT3 are left alone.

## Bringing a card up

`card_detect_n` is the socket's switch. It is synchronised, and while no card
is present every controller is held in reset and the buffer read pointer is
rewound. Inserting a card releases them, and `sd_init_fsm` starts at once:

1. 80 clocks with CMD high (the card needs at least 74 after power-up);
2. CMD0 (go idle), no response;
3. CMD55 then ACMD41 with the voltage window 2.7–3.6 V, answered by the OCR
   (R3). While OCR bit 31 ("power-up done") is 0 the card is still busy and
   the pair is sent again, up to `MAX_ACMD41` times;
4. CMD2 → CID (136-bit R2);
5. CMD3 → the card publishes its relative card address, RCA (R6);
6. CMD7 with the RCA selects the card, which enters the transfer state.

Then `init_done` rises, the clock switches to the fast rate, and `op_ready`
goes high. A command without a valid answer (no start bit within
`RSP_TIMEOUT` clocks, wrong index, bad CRC7 where the response has one) ends
identification with `init_err`; removing and reinserting the card retries.

`sd_cmd_engine` is shared: the identification FSM owns it until `init_done`,
then the write controller while it is busy, else the read controller. It
takes a `cmd_req_t` (index, argument, response kind) on a valid/ready
handshake, sends start bit, transmission bit, index, argument, CRC7 and end
bit, then waits for the response and returns a `cmd_rsp_t` with the raw bits,
a timeout flag and a CRC flag. After each command it keeps the line idle for
8 clocks before accepting the next. An assertion checks that a requester
holds its request until it is taken.

## Writing: when does a byte leave the buffer?

This is the heart of the design. `sd_block_fifo` has an ordinary write
pointer and **two** read pointers:

- the *read* pointer, which `sd_dat_tx` advances as it sends bytes, and
- the *commit* pointer, which marks the first byte the card has not yet
  accepted.

Space is freed only up to the commit pointer. When the card answers a block
with CRC status `010` the write controller pulses `commit` and the block's
512 bytes are gone. For any other status (`101` transmission error, `111`
programming error) it pulses `rewind`, the read pointer jumps back to the
commit pointer, and the very same bytes are sent again. So a rejected block
needs no second copy anywhere: the buffer is its own retransmit store.

`sd_dat_tx` sends one block: start bit, 512 bytes MSB first, the CRC16
(x^16+x^12+x^5+1, computed on the fly by `sd_crc16`) and an end bit. It then
releases DAT0, lets two clocks pass, reads the three status bits and their
end bit, and finally waits while the card holds DAT0 low (busy, the card
programming its flash). `ok` is set only for `010`. Time-outs exist for the
status (`STAT_TIMEOUT`) and for the busy phase (`BUSY_TIMEOUT`, 250 ms at
25 MHz).

`sd_write_ctrl` starts a block only when the buffer holds all of it, so a
block is never stalled half-way on a slow source. It has two modes:

- **single** (`op = OP_SINGLE_WRITE`): CMD24 + block for every block. A
  rejected block is resent behind a fresh CMD24 at the same address.
- **multiple** (`OP_MULTI_WRITE`): one CMD25, the blocks back to back, and
  CMD12 (stop transmission) after the last, followed by a busy wait. This
  saves a command, its response and the 8-clock gap per block. A rejected
  block ends the open transfer with CMD12; a new CMD25 at the failed block's
  address then resends it and carries on.

After `MAX_RETRY` rejections of one block, or a command that does not get a
valid R1, the operation ends with `op_err`. Card addresses are block numbers
at the interface; for standard-capacity cards (up to 2 GB) the command
argument is the byte address, `op_addr*512` (`BYTE_ADDR=1`).

Throughput: a block in a multiple write takes 4096 data clocks plus CRC,
start/end bits, status and busy. With the model card (8 clocks of busy) that
is 4130 SD clocks, 165 µs at 25 MHz: about 6050 blocks/s, or 24.8 Mb/s of
payload on a 25 Mb/s line. A real card's programming time lowers this.

## Reading

`sd_read_ctrl` arms `sd_dat_rx` as soon as its command is accepted (the
block may start before the response has finished), then sends CMD17 per
block (single) or one CMD18 (multiple). `sd_dat_rx` waits for the start bit
(up to `START_TIMEOUT`), passes each byte on as soon as it is complete, and
at the end compares the CRC16 and the end bit. Bytes therefore leave on
`rd_valid/rd_data` before the CRC is known: `rd_block_done` marks the end of
every block, and `rd_block_bad` is raised with it if the block was corrupt.
A bad block is counted (`blocks_bad`) and reported, not read again. In
multiple mode the receiver is re-armed after each block and CMD12 is sent
after the last one; the receiver is cancelled at that point, because the
card may already be pushing the next block.

## Where the bytes come from

By default the buffer is filled from `acq_valid/acq_data`, at most one byte
per system cycle, with no back-pressure: the acquisition side runs at a
fixed rate and cannot wait. A byte that finds the buffer full is dropped and
counted in `dropped_bytes`. The buffer (`FIFO_DEPTH`, 1024 bytes) holds two
blocks, so one can be refilled while the other is on the card.

A write request with `op_src_sram = 1` takes its data from the external
SRAM instead, starting at word `op_sram_base`. `sram_reader` drives a
synchronous 16-bit SRAM (one cycle of read latency by default, `we_n` held
high) and hands out each word low byte first, only when the buffer has room.
While the SRAM is the source the live stream is dropped (and counted), and
any stream bytes already in the buffer are written first.

With `op_wav_header = 1` as well, `wav_header_gen` first puts a 44-byte
RIFF/WAVE header into the buffer and the SRAM fills the rest of the
`op_nblk` blocks: the archive on the card is then a wav file readable by
ordinary tools. The header describes PCM, `CHANNELS` = 1, `SAMPLE_RATE` =
8000 Hz, `BITS` = 16, and a data size of `op_nblk*512 - 44` bytes. Each header
byte is computed from its position, so no table is stored.

## Card removal

If the card is pulled during a transfer, the controllers drop into reset
immediately, the bus is released, the operation ends without `op_done`, and
the buffer's read pointer is rewound to the commit pointer. Bytes that were
accepted but not yet committed are kept and go to the next card; a block the
card had not acknowledged is written again in full. The stream keeps
filling the buffer meanwhile (and overflows, counted, if the card stays out
long).

## Top-level interface

| port | meaning |
|---|---|
| `clk`, `rst_n` | system clock, asynchronous active-low reset |
| `card_detect_n` | low while a card is in the socket |
| `sd_clk`, `sd_cmd_o/oe/i`, `sd_dat0_o/oe/i` | SD bus, 1-bit mode |
| `acq_valid`, `acq_data` | acquisition byte stream |
| `op_start`, `op`, `op_addr`, `op_nblk` | start an operation (`op_e`: single/multiple write/read) on `op_nblk` blocks from card block `op_addr`; accepted when `op_ready` |
| `op_src_sram`, `op_sram_base`, `op_wav_header` | write from SRAM, from this word, with a wav header |
| `op_ready`, `op_done`, `op_err` | idle and card selected; end pulse; failure |
| `rd_valid`, `rd_data`, `rd_block_done`, `rd_block_bad` | read data and per-block status |
| `sram_*` | synchronous SRAM (address, data in, chip/output/write/byte enables) |
| `card_present`, `init_done`, `init_err`, `card_rca` | card state |
| `blocks_written`, `blocks_resent`, `blocks_read`, `blocks_bad`, `dropped_bytes`, `buf_level` | statistics |

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `INIT_HALF` | 250 | half period of the identification clock in system cycles (100 kHz at 50 MHz) |
| `FAST_HALF` | 1 | half period of the transfer clock (25 MHz at 50 MHz) |
| `BLOCK_LEN` | 512 | bytes per block |
| `FIFO_DEPTH` | 1024 | buffer size in bytes (a power of two, at least one block) |
| `POWERUP_CLKS` | 80 | clocks before CMD0 |
| `MAX_ACMD41` | 500 | ACMD41 attempts before giving up (about 1 s at 100 kHz) |
| `MAX_RETRY` | 3 | sends of one block before a write fails |
| `BUSY_TIMEOUT` | 6 250 000 | SD clocks of busy tolerated (250 ms at 25 MHz) |
| `START_TIMEOUT` | 2 500 000 | SD clocks to wait for a read block (100 ms) |
| `SRAM_AW` | 18 | SRAM word address width (256K × 16) |

A different system clock only needs `INIT_HALF` and `FAST_HALF` changed; if
`FAST_HALF` grows, the transfer rate falls accordingly.

## What follows the original description and what does not

The design follows a published description of an FPGA data concentrator
that archives to a 1 GB SD card: the four transfer modes, the SRAM as a
second data source with single and multiple block writes, archives as wav
files, a buffer of registers on chip, 512-byte blocks with CRC16, the CRC
status tokens 010/101/111 two clocks after the data, resending a rejected
block, CMD12 to stop a transfer, the identification sequence up to the RCA
(0x8000 on the card used there), 100 kHz during identification and 25 MHz
after. The following are this design's own choices or departures:

- **No PLL.** The description mentions a phase-locked loop and dividers to
  match clocks; here one system clock is divided, and the acquisition side
  is assumed to be in the same clock domain.
- **1-bit bus.** The bus width is not stated; one data line at 25 MHz gives
  exactly the 25 Mb/s the description quotes as its maximum rate.
- **CMD7.** The identification sequence described ends once the RCA is
  published; selecting the card with CMD7 is added because the card accepts
  no data command otherwise.
- **CMD12 only for multiple transfers.** The description names CMD12 right
  after the single-block write; a single-block write needs no stop command,
  so CMD12 ends only the multiple modes.
- **Resend in multiple mode** (CMD12, then a new CMD25 at the failed block)
  and the retry limit are not described.
- **The 111 status** (programming error) is handled like 101: the block is
  sent again.
- **Byte addressing.** A standard-capacity card is assumed (the 1 GB card
  is one); high-capacity cards, which take block addresses, would need
  `BYTE_ADDR=0` and the ACMD41 HCS bit, which is not sent.
- **Status bits of R1 are not inspected**, only index and CRC7. The CID's
  CRC is not checked. CMD8 (needed by version-2 cards before ACMD41) is not
  sent.
- **Wav format.** Only the fact that archives are wav files is given; the
  header layout is the standard one, and channel count, rate and sample
  width are parameters chosen here. Only SRAM archives carry a header, on
  request.
- **Card detection** by a socket switch, and the behaviour on removal, are
  this design's.
- **The SRAM is only read.** How samples get into it is outside the design.
- The description reports 5000 blocks written in 1 s, read in 1.051 s, and
  a 91.65 % write bandwidth use on a real card. The model card used here
  answers faster than a real one, so the simulated rates (about 6050 blocks/s
  for writing and reading alike when the bus is the limit) are upper bounds
  set by the bus, not predictions for a particular card. Measured at the
  defaults: 5000 blocks of a 2.63 MB/s stream archived in 0.973 s, and read
  back in 0.824 s.

## How far it has been checked

Every module has its own self-checking testbench in `tb/` (`tb_<module>`),
comparing against values computed independently in the testbench: CRC16 of
known patterns (512 × 0xFF gives 0x7FA1), CRC7 of CMD0/CMD17 frames, bit
timing of frames and blocks against the strobes, status tokens 010/101/111
and time-outs, end-bit and CRC errors on receive, commit/rewind in the
buffer, SRAM byte order, every byte of the wav header, and full sequences of
the controllers against `sd_card_model`.

`tb_sd_concentrator_top` runs the whole design at a fast identification
clock against the card model and checks every byte written to the model's
memory and every byte read back. It inserts the card, writes single and
multiple blocks from the live stream, forces a rejected block (resend),
reads with both modes including a corrupt block, archives SRAM regions by
multiple-block write (with and without a wav header) and by single-block
write, measures the multiple-write rate (4130 SD clocks
per block), overflows the buffer, and pulls the card mid-transfer and
reinserts it. It counts each of these mechanisms and fails if one never
happened. `tb_sd_concentrator_full` uses every default (50 MHz, 100 kHz,
25 MHz): it checks the 100 kHz clock period, identifies the card, writes one
block and reads it back.

`tb_sd_workload_5000`, also at the defaults, archives a live stream of one
byte every 19 system cycles (2.63 MB/s, a little above 5000 blocks per
second) with a single 5000-block multiple write, then reads the 5000 blocks
back with a single multiple read. Measured: the write ends after 0.973 s
(paced by the stream) with no byte dropped, the read after 0.824 s (4119 SD
clocks per block), every byte correct. The model card keeps 16 blocks, so
addresses wrap and the data checks use the last block written to each
slot.

`sd_card_model` and `sram_model` are behavioural, written from the SD and
SRAM conventions, not from a real card: nothing here has been tried on
hardware, and timing against a real card (its busy and access times, its
response spacing) is only as good as the model. The design has been linted
and simulated with Verilator and parsed by slang; it has not been
synthesised for a particular FPGA.

## Simulating

With Verilator 5 (timing support needed for the testbenches):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sd_concentrator_top rtl/sd_pkg.sv tb/tb_sd_concentrator_top.sv
./obj_dir/Vtb_sd_concentrator_top
```

Any other testbench runs the same way; the package must come first. Each
prints `PASS`/`FAIL` lines and ends with
`TB_RESULT checks=<n> failures=<m>`. The top testbench takes under a minute,
the full-size one a few seconds, the 5000-block workload about a minute.
The card model has knobs, set from the
testbench by hierarchical assignment: `acmd41_busy` (ACMD41 rounds answered
busy), `reject_next` (blocks to answer with 101), `corrupt_next` (read
blocks sent with a bad CRC), `stop_req`.

To change the design: the SD rates are in `sd_clk_gen`'s two parameters;
buffer depth is `FIFO_DEPTH` (keep it a power of two and at least one
block); a 4-bit bus would need `sd_dat_tx`/`sd_dat_rx` widened, four CRC16
instances and ACMD6 after CMD7.
