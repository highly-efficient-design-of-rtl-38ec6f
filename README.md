# SDRAM corner turning memory for real-time SAR processing

A SAR (synthetic aperture radar) processor works on a frame of echo samples
first along range lines (the rows, as the samples arrive) and then along
azimuth lines (the columns). Between the two passes the frame has to be
transposed. A 4096 × 4096 frame of 64-bit complex samples is 1 Gbit, which only
fits in external SDRAM. A plain SDRAM transpose is slow. Walking down a column
opens a new DRAM row for almost every sample, and each ACTIVE/PRECHARGE pair
leaves the data bus idle for several clocks.

This corner turning memory (CTM) keeps the data bus busy on every clock, in both
directions. It does this with two tricks:

* **Writes alternate between two chip groups.** Each group takes four samples
  per row opening: ACTIVE, four WRITEs, PRECHARGE. While one group opens or
  closes its row, the other group uses the shared data bus.
* **Reads rotate over the four banks of a chip.** The data is laid out so that
  four consecutive samples of a column are one BL=4 burst. Consecutive bursts
  come from consecutive banks. Each bank's ACTIVE and PRECHARGE overlap the
  other banks' bursts.

Two such memories work as a ping-pong pair. One is written with the incoming
frame while the other returns the previous frame transposed. Everything runs in
a single clock domain at one 64-bit sample per clock in and one out (800 MB/s
each way at 100 MHz). No FIFOs are needed.

The RTL is the memory management unit (MMU) that sits between the SAR
processor and eight 32-bit SDRAMs (MT48LC8M32B2 class: 4 banks of
4096 rows × 512 columns × 32 bit). The top module is `ctm_mmu`.

## Memory organisation

```
                 Din[63:0]                       Dout[63:0]
                     |                               ^
   Group1 ----+      v                               |      +---- Group3
  (SDRAM1,2)  |  +-------------------------------------+    |   (SDRAM5,6)
              +--| D_O[63:0]        ctm_mmu   D_E[63:0] |--+
   Group2 ----+  |  Addr1/Addr2            Addr3/Addr4 |  +---- Group4
  (SDRAM3,4)     +-------------------------------------+       (SDRAM7,8)
        side 0                                               side 1
```

* A **group** is two 32-bit chips that share address, bank and command pins.
  One chip holds the real part `[63:32]` and the other the imaginary part
  `[31:0]`. So a group stores 64-bit words: 4 banks × 4096 rows × 512 columns.
* A **side** is two groups on one 64-bit data bus. It holds exactly one
  4096 × 4096 frame (16,777,216 words).
* Each group has its own command, bank and address pins, indexed 0..3 for
  Group1..Group4 (`sdram_cmd`, `sdram_ba`, `sdram_addr`). This matters because
  the two groups of a side issue different commands in the same clock.

## The interleaving (`ctm_addr_map`)

This is the core of the design. Sample `d(x, y)` has row index `x`, the order
in which rows arrive, and column index `y`. Let `N = 4096`. Its place is:

| quantity | formula | meaning |
|---|---|---|
| block `n` | `x / 4` | four input rows form one block |
| group | `(y / 4) mod 2` | columns 0-3, 8-11, … are set S_n in the first group; 4-7, 12-15, … are set S'_n in the second |
| bank | `n mod 4` | neighbouring blocks go to neighbouring banks |
| row block `r` | `(n / 4) mod 8` | each bank is split into 8 × 32 regions |
| column block `c` | `n / 32` | of 512 rows × 16 columns each |
| SDRAM row | `512·r + y/8` | one row of a region per 8 input columns |
| SDRAM column | `16·c + 4·(y mod 4) + (x mod 4)` | `d(4n..4n+3, y)` are four adjacent columns |

In bit form: row = `{x[6:4], y[11:3]}`, column = `{x[11:7], y[1:0], x[1:0]}`,
bank = `x[3:2]`, group = `y[2]`.

So region (bank 0, row block 0) holds S_0, S_32, …, S_992 side by side.
Row block 1 of bank 0 holds S_4, S_36, …, S_996, and so on. Inside S_0, SDRAM
row 0 holds `d(0:3,0)`, `d(0:3,1)`, `d(0:3,2)`, `d(0:3,3)`, one four-word
burst each. SDRAM row 1 holds `d(0:3,8..11)`, and so on.

What this gives the two engines:

* **Writing row `x`:** consecutive groups of four samples, `y = 4k..4k+3`,
  alternate between the two groups. Within a group they go to one SDRAM row,
  at columns `k0, k0+4, k0+8, k0+12`. The next four samples for that group
  go to the next SDRAM row.
* **Reading column `y`:** the four samples `d(4n..4n+3, y)` are one BL=4
  burst. Block `n+1` lives in the next bank. A column therefore cycles
  BANK0 → BANK1 → BANK2 → BANK3 → BANK0 … in one group. Every four columns
  the reader moves to the other group.

The module is parameterised by `N_LOG2` (frame size `2**N_LOG2`, default 12)
and `COL_BITS` (SDRAM column address bits, default 9). At other sizes the
block index `n/4` is split into `N_LOG2-COL_BITS` row-block bits and
`COL_BITS-4` column-block bits. The row address needs
`2·N_LOG2 − COL_BITS − 3 ≤ 12` bits.

## Write operation (`ctm_write_engine`)

Samples arrive row-major. For each chunk of four samples, the engine drives
the chunk's group as follows. Each cell is the command on the pins in that
clock. Clock 0 is the clock after the first sample of the chunk is accepted.

```
clock     0       1     2      3      4      5      6     7    | 8 ...
group A   ACTIVE  NOP   WRITE  WRITE  WRITE  WRITE  PRE   NOP  | ACTIVE (next row)
group B   WRITE   WRITE PRE    NOP    ACTIVE NOP    WRITE WRITE| WRITE ...
data bus  A/B ... continuous: 4 words of A, 4 words of B, ...
```

* The samples go through a two-stage delay. That way the ACTIVE can be issued
  two clocks before the first WRITE (tRCD = 2 at 100 MHz).
* Each WRITE is to a column four higher than the last. It cuts the previous
  burst to a single word.
* The PRECHARGE follows one clock after the fourth WRITE.
* Chunks may be separated by idle clocks. Inside a chunk, `din_valid` must stay
  high (an assertion checks this).

## Read operation (`ctm_read_engine`)

The reader outputs column-major: `d(0,0), d(1,0), …, d(4095,0), d(0,1), …`.
When `rd_enable` allows it, the engine starts one chunk every four clocks.
A chunk is ACTIVE, then READ two clocks later, then PRECHARGE three clocks
after the READ:

```
clock     0      1      2      3      4      5      6      7      8
BANK k    ACTIVE        READ                 PRE
BANK k+1                              ACTIVE        READ                 PRE
on pins   ACT k  PRE k-1 READ k NOP   ACT k+1 PRE k  READ k+1 NOP ...
data                           (CL=2) Q0..Q3 of k at the SDRAM pins, clocks 5..8 at the MMU
```

* On one command bus, the pattern repeats every four clocks: ACTIVE, PRE,
  READ, NOP.
* With CAS latency 2, the bursts follow each other without a gap.
* A paused reader restarts on the same four-clock grid. A new ACTIVE then never
  lands in the same clock as an older chunk's PRECHARGE.
* The first word of a chunk is on `dout` five clocks after its ACTIVE.

## Ping-pong and frame switching (`ctm_stream_switch`)

Each side has a full/empty flag. The writer and the reader each have a side
pointer.

* The writer starts on its side when that side is empty. When the frame's last
  PRECHARGE has left the pins, the side becomes full and the writer moves to the
  other side.
* The reader starts when its side is full. After the last word has been
  captured, the side becomes empty and the reader moves on.

The two engines therefore never own the same side, and a frame is read only
after it has been completely written. At power-up both sides are empty.
Frame 0 goes to side 0, and the reader waits for it.

The switch routes each side's pins and data bus to whichever engine owns that
side. Before power-up ends, it sends the power-up command to all four groups.

Switching frames costs a few clocks: the engine drains, then the flag and the
pointer update. In a full-size run, three frame periods of 16,777,216 clocks
took 21 extra clocks.

## Power-up (`ctm_sdram_init`)

The power-up sequence is:

1. NOP for `INIT_WAIT` clocks (10000, i.e. 100 µs at 100 MHz).
2. PRECHARGE ALL.
3. AUTO REFRESH twice.
4. LOAD MODE REGISTER with burst length 4, sequential bursts and CAS
   latency 2.

The waits in between are tRP = 2, tRFC = 7 and tMRD = 2 clocks.
`init_done` enables the engines.

## Refresh: a caution

After power-up the design issues **no refresh commands**. The reasoning is that
every access opens and closes a row, which refreshes it. During writing this is
true: each row is reopened about every 5 ms. During reading it is not. A
column-order read reaches SDRAM row `y/8` of every region only when it gets to
column `y`. The rows with large `y/8` are therefore touched first near the end
of the write and then next near the end of the read, about a frame time later.

The full-size simulation measured up to 17.27 M clocks (172.7 ms at 100 MHz)
between two activations of a row that holds data. That is well beyond the
64 ms retention of this class of SDRAM. Before using the design in hardware,
either show that the chips hold data that long at your temperature, or add
refresh:

* auto refresh in the frame-switch gap, or
* periodic refresh with a small stall of the reader, which would cost a little
  bandwidth.

## Other points to check against a datasheet

The command spacing follows the published timing diagrams, which are tighter
than some datasheet rules:

* **Write recovery.** PRECHARGE comes one clock after the last WRITE
  (tWR = 1 clock). Many parts need 2 clocks, or DQM masking.
* **Read precharge.** PRECHARGE comes three clocks after READ. Under one
  reading of the common rule, "precharge no earlier than CL − 1 clocks before
  the last data", that is one clock too early for CL = 2 and would cut the
  burst's last word. Check this against the exact part.

Neither can be moved without changing the four-clock bank rotation. The SDRAM
model in the testbenches does not model these two effects. If your part
enforces them, use auto-precharge commands instead of explicit PRECHARGE, or
lower the clock rate.

## Interface of `ctm_mmu`

| port | dir | width | function |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `din`, `din_valid`, `din_ready` | in/in/out | 64/1/1 | row-major input; real part in `[63:32]`; transfer when valid & ready; chunks of 4 must be unbroken |
| `rd_enable` | in | 1 | lets the reader start a 4-sample chunk |
| `dout`, `dout_valid` | out | 64/1 | column-major output |
| `sdram_cmd[4]` | out | 4 each | `{CS#,RAS#,CAS#,WE#}` of Group1..Group4 (`ctm_pkg::sdram_cmd_e`) |
| `sdram_ba[4]`, `sdram_addr[4]` | out | 2/12 each | bank and address (Addr1..Addr4) |
| `dq_o[2]`, `dq_oe[2]`, `dq_i[2]` | out/out/in | 64/1/64 | side buses D_O (0) and D_E (1), split for a pad tristate |
| `init_done`, `wr_frame_done`, `rd_frame_done` | out | 1 | power-up finished; one-clock pulses per frame written and read |
| `side_full`, `wr_side`, `rd_side` | out | 2/1/1 | ping-pong state |

CKE is not driven by the MMU. Tie it high, or drive it from reset.

Parameters: `N_LOG2` (12), `COL_BITS` (9) and `INIT_WAIT` (10000).

## Files

| file | content |
|---|---|
| `rtl/ctm_pkg.sv` | SDRAM command encoding, burst and latency constants, mode word, pin struct |
| `rtl/ctm_addr_map.sv` | the interleaving, combinational |
| `rtl/ctm_write_engine.sv` | write command scheduling |
| `rtl/ctm_read_engine.sv` | read command scheduling and data capture |
| `rtl/ctm_stream_switch.sv` | ping-pong flags and routing |
| `rtl/ctm_sdram_init.sv` | power-up sequence |
| `rtl/ctm_mmu.sv` | top level |
| `tb/sdram_model.sv`, `tb/sdram_array.sv` | behavioural SDRAM (protocol and timing checker) and the eight-chip array |
| `tb/ctm_tb_pkg.sv` | reference address map (integer arithmetic) and sample generator |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_ctm_addr_map` | exhaustive 64 × 64 check against an arithmetic reference, including that no two samples share a word; 20,000 random full-size points; table entries |
| `tb_ctm_write_engine` | every command at its exact clock, write data, frame with idle gaps, back-to-back frame with a busy data bus on every clock |
| `tb_ctm_read_engine` | bank-state and spacing checks, output order, gap-free streaming, random pauses |
| `tb_ctm_stream_switch` | routing and flags against a reference model with random frame-done events |
| `tb_ctm_sdram_init` | command sequence, timing and mode word |
| `tb_ctm_mmu` | six 64 × 64 frames end to end through eight SDRAM models; checks each mechanism happens (group alternation, bank rotation, side swaps, writer stall, reader pause, write and read at once) and > 99 % bus efficiency while streaming |
| `tb_ctm_sar_workload` | all defaults, producer and consumer paced like a 4096-point FFT with 4206 clocks per line; three frames pass in sequence, each starting when the previous one starts to come out; stage times checked |
| `tb_ctm_full` | all defaults: two 4096 × 4096 frames in and out, every sample checked, efficiency, protocol, longest refresh gap (about 30 s, 270 MB) |

Running one testbench with Verilator 5 (the packages are named first; `-y` finds the modules):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/ctm_pkg.sv tb/ctm_tb_pkg.sv tb/tb_ctm_mmu.sv --top-module tb_ctm_mmu
./obj_dir/Vtb_ctm_mmu
```

Results:

* All testbenches pass.
* The full-size run shows 16,777,207 samples moved each way in 16,777,208
  clocks while both streams run. That is one sample per clock minus a
  few-clock frame switch.
* There are no protocol or timing violations by the model's rules.
* There are no refresh commands after power-up.
* The measured refresh gap is the figure quoted above.
* With FFT pacing of 4206 clocks per 4096-sample line, one corner turn takes
  344.6 ms at 100 MHz: 172.3 ms to write the frame and 172.3 ms to read it
  out. That is the whole memory cost of a Range-Doppler frame. The three
  turns of a Chirp Scaling frame take 516.9 ms. Both figures are set by the
  FFT rate, not by the memory.

## What this RTL does not contain

* The SDRAM chips themselves.
* The pad tristates.
* The SAR processing chain that feeds and drains the memory: range/azimuth
  FFTs and the matched-filter multiplies of the Range-Doppler and Chirp
  Scaling algorithms.

The memory must see each frame as row-major in and column-major out. For the
Chirp Scaling algorithm, which needs three transposes, the same memory is used
once per transpose.
