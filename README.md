# USB 3.0 digital data pattern generator and data formatter (FPGA side)

This is the FPGA logic for a test instrument that moves digital data between a USB 3.0 host PC and
hardware under test, at rates of several hundred megabytes per second. The USB 3.0 protocol is
handled by a Cypress EZ-USB FX3 controller. The FPGA only has to keep the FX3's synchronous
**Slave FIFO** bus busy. The data goes both ways:

* **Data formatter (FPGA to host).** Several parallel data chains are buffered and packed into
  32-bit words, then written into an FX3 endpoint buffer. The host stores the stream and unpacks
  it. For testing, the chains come from a built-in data simulator.
* **Pattern generator (host to FPGA).** The host sends a pattern. The FPGA reads it from the FX3
  into a buffer memory and plays it out in a loop on 32 output channels, at a programmable
  sampling rate. Each channel carries its own waveform, one bit per pattern word.

```
 data_simulator ──► data_formatter ──► sync_fifo (tx) ──►┐
   4 chains x 16 b    per-chain FIFOs,    512 x 33 b      │  slave_fifo_master ◄══ Slave FIFO bus ══► FX3 ◄══ USB 3.0 ══► host
                      pack to 32 b                        │   (write thread 0,        DQ[31:0], A[1:0],
 pattern_generator ◄──────────────────────────────────────┘    read thread 3)         SLCS#/SLWR#/SLRD#/SLOE#/PKTEND#,
   1024 x 32 b buffer, looped playback → ch_out[31:0]                                  FLAGA..D, PCLK
```

The top module is `usb3_dpg_top`. Everything runs on one clock, `clk`, which is also the Slave
FIFO clock PCLK; the board forwards it to the FX3. Reset is synchronous and active low in every
module.

## The Slave FIFO bus and its lagging flags

This is the hardest part of the design and the one most likely to need adapting to a real board.

The FX3 shows its USB endpoint buffers to the FPGA as FIFOs ("threads"). The 2-bit address
`A[1:0]` selects a thread. The FPGA is the bus master:

* **Write.** Set the address and pull SLCS# low. Put a word on DQ and pull SLWR# low. The FX3
  stores the word at the next rising edge. If PKTEND# is low together with SLWR#, the packet is
  committed to the host even when it is short. Here that happens on the last word of every line.
* **Read.** Set the address and pull SLCS# and SLOE# low. SLOE# only turns on the FX3's DQ
  drivers. Each cycle with SLRD# low pops one word. The word is on DQ 2 cycles after the edge
  that sampled SLRD#. After an address change, the new thread's data is valid 3 cycles later.

The flags lag the data. A flag changes 3 edges after the write that changed the fill level, or 2
edges after the read that did. A master that keeps writing until FLAGA says "full" has by then
sent up to 4 more words. Those words are lost. A master that reads until "empty" likewise pops
words that do not exist.

`slave_fifo_master` deals with this through two flags per thread:

| flag  | thread         | meaning (1 =)                                   |
|-------|----------------|-------------------------------------------------|
| FLAGA | write (A = 0)  | not full                                        |
| FLAGB | write (A = 0)  | more than the write watermark of words free     |
| FLAGC | read (A = 3)   | not empty                                       |
| FLAGD | read (A = 3)   | more than the read watermark of words stored    |

* **Burst.** While the watermark flag (FLAGB or FLAGD) is high, the master moves one word per
  cycle. It does not look at the other flag.
* **Single words.** When the watermark flag is low but the dedicated flag (FLAGA or FLAGC) is
  high, the master moves one word. It then waits latency + 1 cycles until that flag reflects the
  transfer, and checks again. This drains the last few words of a read thread and fills the
  last free words of a write thread, without over- or underrunning.

**FX3 configuration this relies on.** The flag assignment and the thread numbers are this
design's choice, and the FX3 firmware (GPIF II configuration) must match them. The write
watermark flag must drop while at least 4 words (`WR_FLAG_LAT + 1`) are still free. The read
watermark flag must drop while at least 3 words (`RD_FLAG_LAT + 1`) are still stored. A smaller
watermark makes the bursts unsafe. A larger one only makes more transfers single-word.

**Sessions.** The master runs one session at a time:

* A write session goes IDLE → WR_SETUP (1 cycle) → WRITE.
* A read session goes IDLE → RD_SETUP (3 cycles, for the address latency) → READ → RD_DRAIN →
  IDLE. RD_DRAIN holds SLOE# low until the words already requested have arrived.
* Data waiting from the host (`rd_enable` and FLAGC) goes first. A write session ends as soon as
  a read is pending.
* The FPGA drives DQ only in write sessions and SLOE# is low only in read sessions, so the two
  never drive the bus at the same time.

All bus outputs come from flip-flops. DQ is split into `dq_out`, `dq_oe` and `dq_in`; the
tri-state buffer goes in the FPGA's pad ring. Concurrent assertions in the module check the bus
rules:

* SLWR# and SLRD# are never low together.
* The FPGA never drives DQ while SLOE# is low.
* Each strobe is only used with its own thread addressed.
* PKTEND# is only low together with SLWR#.

## Data path to the host

* **`data_simulator`** stands in for the instrument's data chains. Every `interval+1` cycles, each
  enabled chain emits a 16-bit sample made of its 4-bit chain number and a 12-bit running count.
  The host can use the count to find lost samples.
* **`data_formatter`** keeps a 16-deep FIFO per chain. It takes the chains in groups of two.
  Word *k* carries a sample of chain 2g in bits [15:0] and of chain 2g+1 in bits [31:16], with
  g = k mod 2. So the word order is fixed and the stream needs no headers. A word is built in
  any cycle in which both chains of the current group have a sample, so it can sustain one word
  per cycle. `out_last` marks every `line_words`-th word, and the bus master turns it into
  PKTEND#.
* **Overflow.** If the host stops reading, the FX3 thread fills first, then the 512-word transmit
  FIFO, then the chain FIFOs. After that, new samples are dropped. Each drop sets that chain's
  bit in `fmt_overflow`, which stays set until reset, and increments `fmt_drop_count`. The
  running counts in the samples show the host where the gaps are.
* **Rates.** With four 16-bit chains, `sim_interval = 1` produces exactly one word per cycle,
  the bus's full rate. `sim_interval = 0` produces twice that and will overflow.

## Pattern path from the host

* **Loading.** Pulse `pg_load_start`, then let the host send the pattern. Every word the master
  reads from the read thread is stored at the next buffer address. `pg_pat_len` counts the
  stored words. Words beyond 1024 are dropped and set `pg_load_overflow`.
* **Playback.** While `pg_run` is high, the buffer plays in a loop, one word every
  `pg_rate_div+1` cycles. Each word appears on `pg_ch_out` with a one-cycle `pg_sample_strobe`.
  The first word comes out two cycles after `pg_run` rises. When `pg_run` drops, the outputs go
  to 0 and the next run restarts at word 0.

## Parameters (defaults)

| module | parameter | default | origin |
|---|---|---|---|
| bus | DATA_W, ADDR_W | 32, 2 | FX3 32-bit Slave FIFO mode |
| bus | WR_FLAG_LAT, RD_FLAG_LAT, RD_DATA_LAT, ADDR_LAT | 3, 2, 2, 3 | FX3 Slave FIFO timing |
| top | NUM_CHAINS, CHAIN_W | 4, 16 | design choice |
| top | CHAIN_FIFO_DEPTH, TX_FIFO_DEPTH | 16, 512 | design choice |
| top | PG_DEPTH, CHANNELS | 1024, 32 | design choice |

The bus constants live in `rtl/dpg_pkg.sv`. The sizes are parameters of `usb3_dpg_top`.

## How far to trust it, and where it departs from the system it models

* **The bus timing comes from the FX3 Slave FIFO description.** This covers the bus signals, the
  order of the write and read sequences, and the four latencies. The following are this design's
  own choices: the use of the four flags, the thread numbers, the watermark and single-word
  policy, when PKTEND# is used, and the read-first arbitration.
* **A latency of L cycles is read as** "visible after the L-th rising edge after the edge that
  sampled the strobe". If your FX3 datasheet counts one edge differently, adjust the `*_LAT`
  constants and the watermarks.
* **Only the existence and purpose of the simulator, formatter and pattern generator are given.**
  That is: multiple data chains, a formatter feeding the USB controller, and a multi-channel
  pattern in a buffer memory played at a user-set rate. The sample format, the packing, the
  line marking, the buffer sizes and the overflow policy are this design's own.
* **Not included:**
  * the FX3 itself: ARM9 firmware, GPIF II, DMA, USB PHY;
  * the host software;
  * the PCI Express link that some setups use to return data to the PC.
  Control values such as `sim_interval`, `line_words`, `pg_rate_div` and the enables are plain
  ports. A register block or a serial link from the FX3 would drive them on a real board.
* **Only the 32-bit bus mode is built.** The FX3 also offers a 16-bit mode (DQ[15:0]).
* **The system was run on an Altera Cyclone II.** Nothing here is device-specific: the memories
  are plain arrays that synthesize to block RAM.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. `tb/fx3_slave_fifo_model.sv` is a behavioural model of the FX3
side of the bus. It has a write thread drained by a "host" input, a read thread filled by host
inputs, flags and read data with the latencies above, and programmable watermarks. It counts
overflows, underflows and protocol violations: wrong thread, read too soon after an address
change, and strobes together.

| testbench | what it shows |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue, including full and empty corners |
| `tb_data_simulator` | sample values, tags, periods, disabled chains, count wrap |
| `tb_data_formatter` | packing order, line marks, one word per cycle, exact drop accounting |
| `tb_pattern_generator` | playback at several rates, start latency, idle level, over-long pattern |
| `tb_slave_fifo_master` | back-to-back writes (200 words in 200 cycles); watermark stops and single-word writes with a slow host; burst and single-word reads; both directions at once; no over/underrun or protocol error |
| `tb_usb3_dpg_top` | full design at default sizes: pattern load and playback; formatted stream checked word by word at the host; host stall with reported drops; pattern reload while streaming. It counts every mechanism and fails if one never occurs. |
| `tb_stream_workload` | a 1 MiB transfer (262144 words), then 64 transfers of 16 x 16 KiB (4194304 words), streamed to the host in 16 KiB lines; every word checked, one word per cycle |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpg_pkg.sv tb/tb_usb3_dpg_top.sv --top-module tb_usb3_dpg_top -o sim
./obj_dir/sim
```

The testbenches use only two-state values. Everything read after reset is initialised.
