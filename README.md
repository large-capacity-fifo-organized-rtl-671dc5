# SDRAM-backed FIFO memory for two independent byte streams

This design turns 128 MB of ordinary SDR SDRAM into one very large buffer
that sits between two unrelated data streams. Bytes go in on one side with
their own strobe and handshake. Bytes come out on the other side with their
own clock and handshake. In between, an SDRAM controller keeps the two small
on-chip FIFOs balanced. It empties the input FIFO into the SDRAM and fills the
output FIFO from the SDRAM.

SDRAM controllers for FPGAs usually assume one processor-style data bus that
both reads and writes. Here the two directions are separate streams, each
with its own clock. They can run at the same time at about 30 MB/s each.
Typical uses are long digital delay lines, large sample buffers for
correlation or prediction, video frame synchronisation, and pattern playback
for test generators.

The memory is "FIFO-organised" because the host does not address individual
words. It writes a start address for the write stream and a start address for
the read stream. After that, each pointer advances by one 32-bit word for
every word that passes. Where the two pointers sit relative to each other
decides what the block does:

* **Read pointer following the write pointer at a distance D:** a delay line of D words.
* **Read pointer set after a block has been written:** a plain large FIFO, or a replay buffer.
* **Read stream only, over preloaded memory:** a pattern generator.

The block does not compare the two pointers. It is up to the host to keep the
read pointer behind the write pointer when that matters.

## Block structure

```
            wr, data_in[7:0]                          out_clk, rd
                  |                                        ^ data_out[7:0], rd_ready
        +---------v----------+                  +----------+---------+
        | input_block        |                  | output_block       |
        |  byte regs + word  |                  |  2 word regs + mux |
        |  reg (wr domain)   |                  |  (out_clk domain)  |
        |  FSM + 16x32 FIFO  |                  |  FSM + 16x32 FIFO  |
        +---------+----------+                  +----------^---------+
          head word| empty                  almost_full    | word, write
        +---------v---------------------------------------+--------+
        | data_ctrl: write register, read capture, CL-delay select |
        +---------+-----------------------------------------^------+
                  |  sd_dq_out/oe                 sd_dq_in |
   host regs ---> addr_ctrl (pointers, CS/BA/row/col mux, mode reg) ---> CS0..3, BA, A
                  sd_fsm + sd_timers (command sequencing)       ---> RAS, CAS, WE, CKE
```

The design has three clock domains:

* **`wr`:** the input strobe itself clocks the byte registers.
* **`out_clk`:** clocks the output byte counter.
* **`clk`:** clocks everything else, including the SDRAM. It is 100 MHz in the reference implementation.

| Module | Role |
|---|---|
| `sdram_fifo_top` | Wires the blocks together. It is the design's top. |
| `input_block` | Packs four bytes into one word. Writes the word into the input FIFO. Generates `wr_ready`. |
| `output_block` | Takes words from the output FIFO. Hands them out as bytes. Generates `rd_ready`. |
| `sync_fifo` | 16 x 32 single-clock FIFO with a show-ahead read port. Used twice. |
| `addr_ctrl` | Start-address registers and the two pointer counters. Chip-select decoder, bank/row/column multiplexing, mode register. |
| `sd_fsm` | SDRAM command state machine. |
| `sd_timers` | Start-up, refresh, tRC and command-spacing counters used by `sd_fsm`. |
| `data_ctrl` | Write-data register and read capture. Delays the FIFO write by the CAS latency. |
| `cdc_sync` | Two-flop synchroniser. |
| `sdfifo_pkg` | SDRAM command encoding, address field widths, mode register default. |

## Crossing into and out of the stream clocks

This is the subtle part of the design.

### Input side

The writer presents `data_in` and pulses `wr`. Each rising edge of `wr` with
`wr_ready` high stores one byte. A 2-bit counter, clocked by `wr`, picks the
byte register. After reset the counter always starts at the least significant
byte.

The fourth byte does not go into a byte register. It is loaded, together with
the three earlier bytes, straight into a 32-bit word register. Loading it
flips a toggle flag, `data_ready`. In the `clk` domain, a two-flop synchroniser
sees the toggle change. A two-state FSM then writes the word register into
the input FIFO as soon as the FIFO is not full, and flips an acknowledge
toggle.

`wr_ready` is computed directly from the two toggles and the byte counter. It
is low only when both of these are true:

* the next byte would complete a new word;
* the previous word has not yet been acknowledged.

The word register frees the byte registers immediately. So the writer
normally never sees `wr_ready` drop. The word crossing takes about 4 `clk`
cycles, far less than the three byte times before the next word completes.
`wr_ready` drops only when the input FIFO is full, which makes it a true
back-pressure signal. A byte strobed while `wr_ready` is low is ignored.

Because `wr` is a clock, the reset `rst` must be asserted asynchronously: its
rising edge resets the `wr`-domain flops. The word register is stable
whenever the `clk` domain reads it. It changes only on the fourth byte, and
the fourth byte is held off while the previous word is pending.

### Output side

The output FIFO feeds two 32-bit word registers that are used in turn
(ping-pong). Each register has a pair of toggles:

* a *load* toggle, flipped in `clk` when the FSM fills the register;
* a *new_data* toggle, flipped in `out_clk` when the reader has taken the
  register's fourth byte.

A register is free when its two toggles are equal. It holds a word when they
differ. The `clk` FSM fills the next register in turn as soon as that register
is free and the FIFO is not empty.

In the `out_clk` domain, a 2-bit counter selects the byte of the current
register on `data_out`, least significant byte first. `rd_ready` is high
while the current register holds a word. A rising `out_clk` edge with `rd`
and `rd_ready` both high consumes the byte. After the fourth byte, the
counter moves to the other register. Because the second register is
normally already full, a reader running at 30 MHz sees `rd_ready` stay high
from word to word.

Read handshake, as seen by the reader: look at `rd_ready`. If it is high,
`data_out` is valid now. Assert `rd` for the next `out_clk` edge to move on.

## Pointers and the SDRAM address map

Each pointer is a 25-bit word address, split as follows:

| Bits | Field | Drives |
|---|---|---|
| 24:23 | chip select | `sd_cs_n[3:0]`, one-hot, active low |
| 22:21 | bank | `sd_ba` |
| 20:9 | row (4096) | `sd_a[11:0]` during ACTIVATE |
| 8:0 | column (512) | `sd_a[8:0]` during READ/WRITE, with A10 low |

That gives 2^25 words x 4 bytes = 128 MB. Each pointer is a 9-bit column
counter plus a 16-bit counter for chip, bank and row. The upper counter steps
when the column wraps, which keeps the carry chain short. Together they
simply count through this space. After the last column of a row it carries into the next row, then
the next bank, then the next chip select. At the top of memory it wraps
around to zero.

Host programming is synchronous to `clk`:

* Hold `wrc` high for one clock, with one of `cs_write_reg`, `cs_read_reg` or
  `cs_mode_reg` high and the value on `data_bus`.
* A start-address write puts that pointer in a *load pending* state. The
  stream stops being served.
* The register is copied into the counter the next time `sd_fsm` is idle. The
  stream is then enabled.
* Before its first start-address write, a stream is not served at all. Input
  bytes simply pile up in the input FIFO, and `wr_ready` then drops.
* Reloading a pointer does not flush words already in the FIFOs. Only set a
  start address when the stream is quiet.

The mode register resets to `0x020`: burst length 1, sequential, CAS latency
2. Writing `0x030` selects CAS latency 3. The mode register is loaded into the
SDRAM only during the start-up sequence, so write it during the 200 µs
start-up pause, which begins at reset.

## SDRAM controller

### Start-up

After reset, `sd_cke` goes high and `sd_fsm` waits `INIT_CYCLES` (200 µs).
It then issues:

1. PRECHARGE all banks on all chips;
2. `AR_INIT_COUNT` (8) AUTO REFRESH commands;
3. LOAD MODE REGISTER with the contents of the mode register.

### Scheduling

In the idle state all banks are precharged. Each decision in that state is
taken in this order:

1. **Refresh.** If the refresh interval counter has expired, issue AUTO
   REFRESH to all chips and reload the counter.
2. **Choose a stream.** Otherwise, the write stream wants service if it is
   enabled and the input FIFO is not empty. The read stream wants service if
   it is enabled and the output FIFO is not *almost* full (fewer than 8 of 16
   words). If both want service, the one not served last goes first, so the
   rows alternate.
3. **Burst.** ACTIVATE the row under that stream's pointer. Three clocks
   later, issue one WRITE or READ per clock. Each command carries one 32-bit
   word (burst length 1) and advances the pointer.
4. **End of burst.** The burst stops when the FIFO condition fails, when the
   pointer reaches column 511, or when a refresh falls due. Refresh
   pre-empts long bursts, so the refresh interval holds.
5. **Close the row.** Wait three clocks, which covers tWR and tRAS. Then
   PRECHARGE all banks, wait three more clocks, and return to idle.

The almost-full threshold is what makes the read pipeline safe. A READ takes
up to six clocks to turn into a FIFO write: command register, CAS latency,
capture register. Those reads are already in flight when the flag rises.
Stopping at 8 leaves room for all of them.

### Command and data timing

Commands, address and write data are all registered. They appear on the pins
one clock after the FSM decides them, and the SDRAM samples them on the edge
after that.

For a WRITE, the head of the input FIFO is loaded into the write-data
register in the same clock as the command. The FIFO pops at that edge, so
data and command arrive together.

For a READ decided in clock `t`:

* the SDRAM samples the command at edge `t+2`;
* it returns data in the clock `t+1+CL`;
* the capture register holds the data in clock `t+2+CL`.

`data_ctrl` carries a one-bit tag for each READ through a short shift
register. The CAS latency picks tap 4 or tap 5 as the output FIFO write
strobe.

Default timing, for a 100 MHz clock and -75 speed grade parts:

| Item | Cycles | Covers |
|---|---|---|
| start-up pause | 20000 | 200 µs power-up |
| ACTIVATE to READ/WRITE | 3 | tRCD 20 ns |
| last WRITE/READ to PRECHARGE | 3–4 | tWR, tRAS 45 ns |
| PRECHARGE to next command | 3 | tRP 20 ns |
| AUTO REFRESH to next command | 7 | tRC 65 ns |
| refresh interval | 780 | 7.8 µs, which fits a 10-bit counter |

Bandwidth: a 30 MB/s stream in each direction needs 15 M words/s. A row
burst costs about 11 clocks of overhead plus one clock per word. Even with
short bursts the SDRAM side has several times that capacity at 100 MHz.

## Top-level interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | System and SDRAM clock |
| `rst` | in | 1 | Asynchronous reset, active high |
| `wr`, `data_in` | in | 1, 8 | Input byte strobe and byte |
| `wr_ready` | out | 1 | A byte may be strobed |
| `out_clk`, `rd` | in | 1, 1 | Output clock; consume the current byte |
| `data_out`, `rd_ready` | out | 8, 1 | Current output byte and its valid flag |
| `wrc`, `cs_read_reg`, `cs_write_reg`, `cs_mode_reg`, `data_bus` | in | 1,1,1,1,25 | Host register write |
| `sd_cke`, `sd_cs_n`, `sd_ras_n`, `sd_cas_n`, `sd_we_n` | out | 1,4,1,1,1 | SDRAM control |
| `sd_ba`, `sd_a` | out | 2, 12 | SDRAM bank and address |
| `sd_dqm` | out | 1 | Data mask, always low |
| `sd_dq_out`, `sd_dq_oe`, `sd_dq_in` | out, out, in | 32, 1, 32 | Split 32-bit data bus for an external tri-state pad |

Parameters of `sdram_fifo_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_DEPTH` | 16 | Depth of each on-chip FIFO |
| `OUT_AF_LEVEL` | 8 | Output FIFO level at which reads stop |
| `INIT_CYCLES` | 20000 | Start-up pause |
| `REFRESH_CYCLES` | 780 | Refresh interval |
| `AR_WAIT` | 5 | Wait after AUTO REFRESH; next command `AR_WAIT+2` clocks later |
| `RAS_WAIT` | 1 | Command spacing for ACT, end of burst and PRE; `RAS_WAIT+2` clocks |
| `AR_INIT_COUNT` | 8 | Refreshes in the start-up sequence |

Scale the cycle counts with the clock if `clk` is not 100 MHz.

## Where this RTL comes from and where it departs

These parts follow the original design:

* the partition into input block, output block, data control, address
  control and SDRAM state machine, with two internal FIFOs of 16 x 32 bits;
* three clock domains;
* the 8-bit stream / 32-bit memory widths and four bytes per word, least
  significant first;
* the `wr_ready` / `rd_ready` handshakes, and an output counter clocked by
  its own clock;
* the 25-bit pointers with the 2/2/12/9 chip/bank/row/column split and four
  chip selects;
* the start-address registers, and the rule that a stream runs only after
  its start address is written;
* a mode register that supplies the CAS latency, and a data path that
  chooses between two and three clocks of delay;
* the signal names of the SDRAM state machine and its timing counters;
* the goal of keeping the input FIFO from filling and the output FIFO from
  emptying.

These are this implementation's own choices:

* **SDRAM command sequencing:** the state machine, single-word bursts, one
  open row at a time, alternating service of the two streams, refresh that
  pre-empts bursts, the almost-full threshold, and all timing values.
* **Clock-domain crossings:** the toggle handshakes.
* **Input word register:** the fourth byte goes straight into a word
  register that takes the place of the fourth byte register.
* **Output registers:** a second word register on the output side. The
  original draws one. The extra registers exist so that both streams
  actually sustain 30 MHz despite the clock crossing.
* **FIFO read port:** the FIFOs read combinationally (show-ahead), where a
  block-RAM FIFO would have a registered read.
* **Host register interface:** its timing, the mode-register write, the
  precharge-all and all-chips selects, and the split data bus.
* **Not modelled:** the clock manager (DLL/DCM). `clk` is an input.

Things to be aware of:

* The memory parts named for the original board are 16-bit, 128 Mbit
  devices. Four of them do not add up to a 32-bit, 128 MB array. The RTL
  follows the 25-bit word address, which implies four 32-bit ranks, each 4
  banks x 4096 rows x 512 columns. A board with a different organisation
  needs a different address split in `addr_ctrl`.
* Only one row is open at a time, and the design always precharges all
  banks. That is simple and safe, but it is not the most efficient use of
  the SDRAM.
* Nothing stops the read pointer from overtaking the write pointer. It then
  reads old memory contents.
* `wr_ready`, `rd_ready` and the cross-domain data are produced with
  standard two-flop synchronisers. The `wr` strobe must be clean enough to
  serve as a clock.

## Simulation

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. Run any of them with Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/sdfifo_pkg.sv tb/tb_sdram_fifo_top.sv \
  --top-module tb_sdram_fifo_top -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_sdram_fifo_top` | The whole design at its default parameters, with the SDRAM model. See below. |
| `tb_sync_fifo` | Random traffic against a queue model: data, count, full/empty/almost-full. |
| `tb_input_block` | Byte order. At most 50 ns from fourth byte to FIFO. No back-pressure at 30 MHz while drained. Exact stall point (16 + 1 words + 3 bytes). Dropped byte. Recovery. |
| `tb_output_block` | Byte order. No wait states for a 30 MHz reader. Capacity of 16 + 2 words. Almost-full level. |
| `tb_addr_ctrl` | Start-address protocol. Counters across a row end and a chip boundary. Pin values for row, column, mode and precharge. Chip-select decode. CAS latency. |
| `tb_sd_timers` | Every counter's length in cycles at the default settings. |
| `tb_sd_fsm` | Start-up order and spacing. Burst shapes. Row-end split. Read stop on a full FIFO. Alternation. Refresh rate and pre-emption. |
| `tb_data_ctrl` | Write register timing. Read strobe and data alignment for CAS latency 2 and 3. |

`tb_sdram_fifo_top` runs three phases, each after a reset:

* **Phase 1:** CAS latency 2, 1500 words, starting 12 words before a row end.
* **Phase 2:** CAS latency 3, 1000 words, starting 40 words below chip
  select 1.
* **Phase 3:** CAS latency 2, 400 words, starting 256 words below the top of
  memory, so both pointers wrap from chip select 3 to address 0.

In each phase, the write stream starts during the start-up pause, so the
input FIFO fills and the writer stalls. In phases 1 and 2 the reader is
started 64 words behind the writer, as a delay line. In phase 3 the whole
block is written first and then read back. Every byte is compared with what
was written. Two rate checks apply:

* the writer, strobing at 30 MHz, must not fall behind by more than 10%;
* the reader, at 25 MHz and then 29.4 MHz, must not fall behind its clock by
  more than 10%.

The test also requires each of these to happen at least once: input FIFO
full, output FIFO almost full, refresh, a burst cut by refresh, write and
read row ends, arbitration between the streams, CAS latency 2 and 3 reads,
writes on chip selects 0, 1 and 3, and the pointer wrap. The full run takes well under a second.

`tb/sdram_model.sv` is a behavioural SDRAM used only in simulation. It stores
written words sparsely and returns read data after the programmed CAS
latency. It counts protocol violations:

* commands before the mode register is set;
* ACT to an open bank; READ or WRITE to a closed bank;
* tRCD, tRP, tRC, tRAS, tWR or tMRD too short;
* REF or MRS while a bank is open;
* data-bus contention;
* refresh gaps longer than 820 clocks.
