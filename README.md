# Sweep-averaging front end for a MEMS-scanned LiDAR

A MEMS-mirror LiDAR fires one light pulse per grid column. For each pulse, a
row of photodetector ADCs records the whole return waveform: 1500 to 3200
samples per pixel, 8 to 12 bits each. The mirror sweeps over a set of 20
columns several times. Averaging the waveforms of the same pixel over 2, 4 or 8
sweeps raises the signal-to-noise ratio enough for a later stage to find the
echo peak and build a point cloud.

This RTL does that averaging at the full interface rate, with no gaps. It is
the block between the serial ADC links and the on-chip SRAM of a
microcontroller:

- Four identical **averagers**, one per serial interface. Each interface
  delivers one 32-bit word (two 16-bit sample slots) per clock.
- Each averager owns four **SRAM banks** of 32000 × 64 bits (256 kB). That is
  16 banks and 4 MB in all.
- On every sweep, each new sample is added to the running sum for its pixel,
  which sits in the banks. On the last sweep the sum is shifted right by
  log2(averaging), so the banks end up holding the averaged waveforms. A
  following stage can read them directly.
- During that last sweep, a **CA-CFAR peak detector** beside each averager
  marks every sample that stands out from its surroundings. It emits one
  result bit per sample as a stream, ready for range extraction.

At 1 Gbps per serial lane with 8-bit samples, each interface delivers 500
Msample/s. That is one word every 4 ns, so the system clock is 250 MHz. A
32 × 120 × 2000-sample grid averaged 8 times takes 30.72 ms, or 32.55 frames
per second. The full-size testbench reproduces this clock for clock.

## Sensor arrangement and modes

The four serial lanes of one interface connect either to 4 ADCs or to 8 ADCs.

- **Connection mode 1** (4 ADCs, one per lane): one set of 20 columns with N
  samples per pixel occupies 2 banks.
- **Connection mode 2** (8 ADCs, two per lane): the same set occupies all 4
  banks.

In connection mode 2, the ADCs are labelled a…h. Lane 1 carries a/b, lane 2
c/d, lane 3 e/f and lane 4 g/h. The interface packs the lanes into 32-bit
words. Which samples travel together depends on the **data transfer mode**.
Below, `(a0,c0)` means sample 0 of ADC a in bits 15:0 and sample 0 of ADC c
in bits 31:16.

| transfer mode | connection | word sequence for one column |
|---|---|---|
| 1   | 1 | (a0,b0) (c0,d0) (a1,b1) (c1,d1) … |
| 2.1 | 2 | (a0,c0) (e0,g0) (b0,d0) (f0,h0) (a1,c1) … |
| 2.2 | 2 | (a0,c0) (e0,g0) (a1,c1) … (e[N-1],g[N-1]), then (b0,d0) (f0,h0) … |

The next column follows without a break.

The other run-time settings are:

- bits per sample: 8, 10 or 12;
- samples per pixel: even, 2 to 3200;
- averaging: by 2, 4 or 8.

They sit in five configuration registers, written through `cfg_we`,
`cfg_addr` and `cfg_wdata`. The same write goes to all four averagers.

| addr | register | encoding | reset value |
|---|---|---|---|
| 0 | connection mode  | 0 = mode 1, 1 = mode 2 | 1 |
| 1 | transfer mode    | 0 = 1, 1 = 2.1, 2 = 2.2 | 1 |
| 2 | bits per sample  | 0 = 8, 1 = 10, 2 = 12 | 0 |
| 3 | samples per pixel | N | 2000 |
| 4 | averaging        | log2: 1 = ×2, 2 = ×4, 3 = ×8 | 3 |

The reset values are the reference operating point, so a plain reset is
enough to run it. The `mode.valid` output is low for an illegal combination:

- transfer mode 1 with connection mode 2, or either 2.x mode with connection
  mode 1;
- an odd N, or N above 3200;
- a reserved code.

Change the configuration only between runs, then reset.

Bits per sample only matter for the headroom of the sums. The largest sum is
12 bits + 3 bits for averaging by 8, which is 15 bits, so every sum fits its
16-bit slot.

## Inside an averager

```
 rif_valid/rif_data ─► assembler ─► AVG (+, >>) ─► memory manager ─► 4 SRAM banks
                        │ lag L       ▲ previous sum   │   ▲
                        ▼             └────────────────┘   │ clear, read, write
                     running     controller: config registers, reset sync,
                                 sweep counter ─► last_sweep / first_sweep
```

### Assembler: from link order to pixel order

The adder wants two consecutive samples of *one* ADC per clock. The order it
expects is fixed in every mode: (a0,a1) (b0,b1) … (h0,h1) (a2,a3) …, column
after column. The interface delivers the samples grouped by lane, not by ADC.
This is the hardest part of the design.

The assembler writes every incoming word into a circular buffer in arrival
order. For each output position (pixel pair p, ADC n) it computes where the
two needed words sit, counting from the column's first word, and takes the
correct 16-bit half of each. The offset depends on the transfer mode:

- **Mode 1:** sample pair p of ADC a/b is in words 4p and 4p+2. The ADC picks
  the half. ADCs c/d use the same words + 1.
- **Mode 2.1:** sample pair p of ADCs a/c is in words 8p and 8p+4. ADCs e/g
  use the words one after those, b/d two after and f/h three after. The lane
  (first or second of the pair) picks the half.
- **Mode 2.2:** sample pair p of ADCs a/c is in words 4p and 4p+2, and e/g in
  the words one after those. ADCs b, d, f and h use the same offsets from
  word 2N, the start of the column's second half.

Output can only start once every word the first output needs has arrived. The
start-up lag L is:

- 4 words in mode 1;
- 8 words in mode 2.1;
- 2N+4 words in mode 2.2 (4004 words for N = 2000, 16 µs at 250 MHz).

From then on, the assembler emits one word for each word accepted. It
therefore keeps the interface rate with a constant lag, and pauses in
`rif_valid` simply pause the output. At the end of a run, hold `drain` high
until `running` drops. This flushes the last L words, one per clock.

The arrival-order buffer is simple, but in mode 2.2 the oldest word still
needed is up to 4N words old. That is 12800 words at N = 3200, so the buffer
is 16384 words (64 kB) per averager. A buffer that kept only the words still
waiting (about 2N+4) would be four times smaller, at the cost of a more
complex address scheme.

Output timing: output word j is registered and appears one clock after input
word j+L is accepted.

### AVG unit

AVG is combinational and works on both 16-bit lanes of the word. It adds the
new pair to the previous sums for the same pixels. When `last_sweep` is high,
it shifts the 17-bit sum right by 1, 2 or 3 and keeps 16 bits.

### Memory manager: one bank word = two samples of two ADCs

Bank b holds ADCs 2b and 2b+1. Bank 0 holds a/b and bank 3 holds g/h; in
connection mode 1 only banks 0 and 1 are used. Sample pair p of column c is
at address c·N/2 + p. The 64-bit word is `{y[2p+1], y[2p], x[2p+1], x[2p]}`,
where x is the even ADC and y the odd one.

A 20-column set at N samples uses 10·N addresses: 20000 of 32000 at
N = 2000, and all of them at N = 3200.

The AVG output arrives in the order a, b, c, d, … for one p. So every bank
needs exactly one read and one write per group of 4 words (connection mode 1)
or 8 words (connection mode 2). Each bank is therefore accessed at f/2 or
f/4, and reads and writes never collide:

- Even ADC of bank b (word 2b of the group): its AVG result is parked in a
  32-bit write buffer. The read of bank b+1 for this group is issued now.
  For the second-to-last ADC, the read instead goes to bank 0 at the *next*
  group's address, because the next group starts with ADCs a/b.
- Odd ADC of bank b: the parked result and the new one are written together
  as one 64-bit word.
- Read data is captured into a 64-bit read buffer one clock after the
  request. The two previous sums for ADC 2b and 2b+1 are taken from it.

The banks follow the two-edge access of a synchronous SRAM: request at one
edge, data usable at the next. After reset, the manager writes zeros to all
32000 addresses of its four banks, one address per clock. `ready` rises when
it finishes, and the interface stream must not start before that.

### Controller and sweep tracking

The controller holds the configuration registers. It synchronises the
asynchronous `rst_n`: the internal reset asserts at once and releases two
clocks after `rst_n` rises. It also counts laser and mirror sync pulses into
a sensor-side column and sweep index (`sensor_column`, `sensor_sweep`).

The signals that steer the averaging are not taken from the mirror:

- `last_sweep` makes AVG divide.
- `first_sweep` makes the previous sum read as zero.

Because of the assembler lag, the data reaching AVG can be up to 2N+4 words
behind the sensor. These two signals therefore come from a data-side sweep
counter (`data_sweep`). It advances when the memory manager accepts the last
word of a sweep. As a result they switch exactly on the first word of the
corresponding sweep's data.

## Peak detection (`cfar`)

Each averager's AVG output also feeds a cell-averaging CFAR detector. It
uses only the words flagged `last_sweep`, which are the finished averages. A
sample x[k] (the *cell under test*) is a peak when both of these hold:

- x[k] > 1.5 × the mean of T training cells. The training cells are T/2 on
  each side, beyond the guard cells.
- x[k] > every one of the G guard cells directly next to it (G/2 on each
  side).

The defaults are G = 10, about one pulse width at 1 GS/s, and T = 50. The
first comparison is done exactly in integers, as 2·T·x[k] > 3·Σ.

Samples arrive as pairs of one ADC, with the ADCs taking turns. So the
detector keeps a shift window of T+G+2 samples for each ADC. The window moves
by two whenever that ADC's pair arrives, and each arrival completes the
windows of two cells under test, x[2p−30] and x[2p+1−30]. Only samples 30 to
N−32 are judged; nearer the ends the window would run past the pixel.
Because of that limit, windows never need clearing between pixels.

The result for each pair appears one clock later on these outputs:

- `cfar_valid` and `cfar_adc`;
- `cfar_cut`, the index of the first of the two cells;
- `cfar_mask`, which of the two cells are in range;
- `cfar_peak`, which of them are peaks.

The detector is held in reset while its averager is not `ready`. The results
are *not* written back into SRAM. There is room for them in the 8 banks that
connection mode 1 leaves free, at 64 results per word, but a bank assignment
and access schedule for that has not been designed. Any consumer of the
stream has to store it.

## Departures from the reference design

These are this design's own choices, in places where the reference
description is silent or where a different choice was made on purpose:

- **Assembler buffer:** 16384 words in arrival order, rather than a
  4004-word (16.016 kB) buffer sized for N = 2000. See the assembler section.
- **`first_sweep`:** the previous sum is forced to zero on the first sweep of
  every run. In the reference, the banks are cleared only at reset, so a
  second run would add onto the first run's averages.
- **Data-aligned `last_sweep`:** it comes from the data stream, not from the
  mirror sync. The mirror sync only drives the `sensor_*` status counters.
- **`drain` input:** added to empty the assembler at the end of a run. The
  real sensor never stops streaming.
- **Write buffer:** 32 bits per bank instead of a full 64-bit gathering
  buffer. The second half of each bank word comes straight from the AVG
  output in the clock it is written.
- **Bank access schedule:** one read and one write per bank per group. This
  matches the reference access rates of f/2 and f/4, but not its exact
  cycle-by-cycle timing diagram.
- **SRAM model:** a synthesizable array with separate read and write data
  and an access enable. The reference uses the microcontroller's SRAM macros
  with a per-bank clock and a bidirectional data bus.
- **Bank assignment:** averager k uses banks 4k…4k+3. The configuration bus,
  register encodings and status outputs are also this design's own.
- **`avg_valid` / `avg_data`:** these outputs expose every pair leaving the
  AVG units, so a following stage can also work on the stream. In the last
  sweep, that stream is the final averages.
- **Peak detector:** the thresholds and window come from the reference's
  model. Its hardware organisation (per-ADC windows, two cells per clock,
  results as a stream) is this design's own.

These parts are not included:

- The serial links and interface macros, and the sensor itself. The
  testbenches model the word stream instead.
- Storing the peak-detection results in SRAM, and anything after peak
  detection (range extraction, point-cloud assembly).

## Files

| file | contents |
|---|---|
| `rtl/lidar_pkg.sv` | constants, mode and register enums, `mode_t`, `bank_req_t` |
| `rtl/lidar_system.sv` | top: 4 averagers, 4 `cfar` detectors and 16 `sram_bank`s |
| `rtl/averager.sv` | controller + assembler + AVG + memory manager |
| `rtl/assembler.sv`, `rtl/avg.sv`, `rtl/mem_manager.sv`, `rtl/controller.sv`, `rtl/sram_bank.sv`, `rtl/cfar.sv` | the blocks above |
| `tb/tb_pkg.sv` | sensor/interface model: a hash gives every sample, `rif_word` builds the word stream for any mode, `expected` computes the reference average |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_lidar_system.sv` | end-to-end test at reduced sizes (3 columns, 128-word banks, short pixels) |
| `tb/tb_lidar_system_full.sv` | the full-size system at its defaults |
| `tb/tb_lidar_system_workloads.sv` | the full-size system at the quoted operating limits (mode 1 with 1500 samples, 12-bit with 2500, the 3200-sample maximum) |

Top-level parameters are `NUM_AVG`, `BUF_WORDS`, `BANK_DEPTH_P` and `COLS`,
with defaults 4, 16384, 32000 and 20. Smaller values give faster simulation.
The testbenches use them that way.

## Simulating

Every testbench checks itself. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/lidar_pkg.sv tb/tb_pkg.sv tb/tb_lidar_system.sv --top-module tb_lidar_system
./obj_dir/Vtb_lidar_system
```

Replace `tb_lidar_system` with any other testbench name.

What each testbench shows:

- **`tb_lidar_system`** runs six scenarios on all four averagers:
  - transfer modes 1, 2.1 and 2.2;
  - averaging by 2, 4 and 8;
  - 8, 10 and 12-bit samples;
  - random pauses in the interface strobe;
  - back-to-back runs;
  - the final drain.

  After each run it compares every used address of all 16 banks with the
  model, and checks that unused addresses are still zero. It also counts that
  each of these mechanisms actually occurred.
- **`tb_lidar_system_full`** runs at the default sizes with the reset
  configuration (32 lines, 2000 samples, 8-bit, ×8): 8 sweeps of one 20-column
  set on all four interfaces.
  - It checks all 16 × 32000 bank words.
  - It checks 160000 clocks per sweep and 1.28 M clocks per set. It prints the
    resulting 32.552 frames/s for six sets at 250 MHz.
  - It compares averager 0's whole peak-detection stream (155200 results)
    with a CA-CFAR computed from the averages stored in its banks.
  - It takes a few seconds in Verilator.
- **`tb_lidar_system_workloads`** runs three more full-size operating
  points, each from reset and with the bank contents checked:
  - 16 lines × 1500 samples, 8-bit, ×8 in connection mode 1: 480000 clocks
    per set, or 86.8 frames/s at 250 MHz;
  - 32 lines × 2500 samples, 12-bit, ×8 in transfer mode 2.1: 1.6 M clocks,
    or 17.4 frames/s at the 166.67 MHz clock of 12-bit samples;
  - the 3200-sample maximum in transfer mode 2.2, which uses every bank
    address and 12800 words of the assembler buffer.
- **`tb_cfar`** feeds the detector with noise and pulses of random width and
  height, some placed at the edges of the judged range. It compares every
  result with a direct evaluation of both thresholds.
- **`tb_averager`** runs one averager at full size in the slowest-starting
  mode (2.2, N = 2000). It checks:
  - the 32000-clock clear;
  - the 4004-word start-up lag;
  - 160000 words per sweep;
  - the final bank contents.

## How far it has been verified

All testbenches pass. Each was also run against a deliberately broken copy
of its block (wrong shift, crossed bank data, swapped word halves, wrong
mode-2.1 offset, early `last_sweep`, a lower CFAR threshold), and each
reported failures. The
testbenches also pass when every register and memory starts at a random
value (Verilator `+verilator+rand+reset+2`), so nothing depends on power-up
state.

Timing closure at 250 MHz has not been studied. The bank-address arithmetic
(`c·N/2 + p`) is kept incremental, and the assembler read addresses are a
few adds, but both are unverified on a real target.
