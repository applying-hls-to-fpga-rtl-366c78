# Event preprocessing kernel for the APT / ADAPT gamma-ray telescope

The Advanced Particle-astrophysics Telescope (APT) and its balloon demonstrator
ADAPT detect gamma-ray and cosmic-ray events in scintillating fibres. Each
fibre plane is read by ALPHA ASICs: every ASIC samples 16 channels every 10 ns
into a 256-slot analog buffer, digitises the window around a trigger to 12-bit
ADC values, and sends it to an FPGA as a packet. Before the localization
software can use the data, the FPGA has to do two things to every packet:

1. **Pedestal subtraction.** Every buffer slot adds its own fixed offset (the
   pedestal) to whatever is stored in it, different per channel and per buffer
   bank. The offsets are known from calibration and must be removed sample by
   sample.
2. **Trigger-relative integrals.** Each channel is reduced to four sums over
   time, placed relative to the sample at which the trigger arrived:
   pre-signal noise, main signal, tail, and the whole window.

This RTL is that kernel for one ASIC: it takes the packet as a stream of
16-bit words, keeps a pedestal table on chip, and produces 4 x 16 signed
32-bit integrals and the decoded packet header.

## The slot ring and the two index conversions

This is the part that needs care. The ASIC's buffer is a ring of 256 slots.
A packet carries `N+1` consecutive sample rows, starting at slot
`starting_sample_number` (call it `S`) and wrapping past 255 when needed. The
trigger arrived at slot `fine_time` (call it `F`).

**Pedestal index.** Packet row `i` was stored in slot `(S + i) mod 256`, so

    result[i][c] = sample[i][c] - ped[bank][(S + i) mod 256][c]

The row index starts at 0; the pedestal slot starts at `S` and wraps from 255
to 0.

**Integral bounds.** An integral is given as trigger-relative offsets
`rel_start`, `rel_end`, inclusive at both ends. Offset `t` means slot `F + t`,
and that slot is held in row `(F + t - S) mod 256`. So

    first = (F + rel_start - S) mod 256
    last  = (F + rel_end   - S) mod 256

If `last >= first` the integral is *linear* and sums rows `first..last`. If
`last < first` it *wraps around* and sums rows `first..255` and `0..last`.
With the usual bounds, inside one window, only the linear case occurs.
Wraparound occurs when one integral is meant to cover the tail and the
pre-signal region together. Both cases are built and tested.

The row conversion is plain modulo-256 arithmetic on the slot ring. Earlier
versions of the reference software wrapped a negative row by adding
`samples_to_be_read` or `NUM_SAMPLES - 1`. Neither of those maps every slot
onto the row that holds it, so this design does not copy them.

Rows past the end of a short packet (`i > N`) are filled with zeros in the
result buffer. An integral that reaches into them adds nothing for those rows.

## Packet format

| word | contents |
|---|---|
| 1 | `0xA1FA` start word |
| 2 | `[15:13]` I2C address, `[12:9]` configuration address, `[8]` bank (0 = A, 1 = B), `[7:0]` fine time |
| 3, 4 | 32-bit coarse time, high half first |
| 5 | trigger number |
| 6 | `[15:8]` samples after trigger, `[7:0]` look-back samples |
| 7 | `[15:8]` samples to be read `N`, `[7:0]` starting sample number `S` |
| 8 | `[15:8]` missed triggers, `[7:0]` state-machine status |
| 9 ... | `(N+1) x 16` sample words, row by row, channels 0..15: `[15:12]` channel, `[11:0]` ADC value |
| last | `0x0E6A` stop word |

`N = 255` is a full 256-sample window. The two banks exist so the ASIC can
fill one while the other is read out. The kernel only uses the bank bit to
choose the pedestal set.

## Kernel structure and timing

```
 words ──► packet_parser ──► sample buffer (4096 x 12) ──► ped_subtract ──► result buffer (4096 x 16) ──► integral ──► integrals[4][16]
                │                                            ▲                                           ▲
                └── header ──────────────────────────────────┴────── ped_mem (2 x 256 x 16 x 12) ────────┘ (bank, S, F)
```

`apt_preprocess` runs the phases one after the other for each packet:

| phase | module | work | cycles |
|---|---|---|---|
| receive | `packet_parser` | one word per clock while `in_valid` | `8 + 16(N+1) + 1` words |
| subtract | `ped_subtract` | all 256 x 16 (row, channel) pairs, one per clock | 4098 |
| integrate | `integral` | 4 integrals x 256 rows x 16 channels, one per clock | 16387 |

The loops have fixed trip counts. Every row of the buffer is visited, and a
row is added to an integral only when it lies inside that integral's bounds.
The latency therefore does not depend on the packet or the bounds. From the
cycle the stop word is accepted to `out_valid` there are **20489 cycles**:
about 68 us at 300 MHz.

The integral unit accumulates into a private 64-entry array. It copies all 64
sums to its output in one cycle when the last row is done, so `integrals`
never shows a partly computed set.

While a packet is being processed, `in_ready` is low. The next packet waits at
the input, so the two buffers are never overwritten while in use. An assertion
in `apt_preprocess` checks this.

## Interface of `apt_preprocess`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `in_valid`, `in_ready`, `in_word[15:0]` | in/out/in | packet words, transferred when both valid and ready are high |
| `ped_wr_en`, `ped_wr_bank`, `ped_wr_slot[7:0]`, `ped_wr_chan[3:0]`, `ped_wr_data[11:0]` | in | loads one pedestal per clock; load all 8192 before sending packets |
| `bounds[4]` (`rel_start`, `rel_end`, 16-bit signed each) | in | integral bounds, sampled when a packet's stop word has been decoded |
| `busy` | out | a packet is being processed |
| `out_valid` | out | one-cycle pulse per packet; the outputs below then hold until the next pulse |
| `out_hdr` | out | decoded header (`apt_pkg::pkt_header_t`) |
| `out_err` | out | a sample word had the wrong channel tag, or the stop word was wrong; the packet is still processed |
| `integrals[4][16]` | out | signed 32-bit sums, `integrals[k][c]` = integral `k` of channel `c` |

The integral order 0..3 = pre-signal, main, tail, whole window is a convention.
The hardware computes whatever bounds it is given.

## Files

| file | content |
|---|---|
| `rtl/apt_pkg.sv` | sizes, start/stop words, header struct, bounds type |
| `rtl/packet_parser.sv` | word stream to header and sample-buffer writes |
| `rtl/sdp_ram.sv` | one-write, one-registered-read RAM; used for the sample and result buffers |
| `rtl/ped_mem.sv` | pedestal table, addressed `{bank, slot, channel}` |
| `rtl/ped_subtract.sv` | pedestal subtraction loop |
| `rtl/integral.sv` | four masked integrals per channel |
| `rtl/apt_preprocess.sv` | top: the above wired together and sequenced |
| `tb/apt_tb_pkg.sv` | packet builder and reference sums used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## How far to trust it

Every module has a self-checking testbench. Each compares the module's outputs
with values computed independently in the testbench, checks the cycle counts
given above, and ends with a `TB_RESULT checks=... failures=...` line.

- `tb_packet_parser` sends 12 random packets: full and one-row windows, idle
  gaps in `in_valid`, junk before the start word, a bad channel tag and a bad
  stop word.
- `tb_ped_subtract` and `tb_integral` model the memories as arrays. They cover
  pedestal-slot wrap, both banks, short windows, one-row integrals,
  whole-window integrals, and linear and wraparound bounds.
- `tb_apt_preprocess` runs the complete kernel at full size: 10 packets back
  to back, checking header, error flag, all 64 integrals and the 20489-cycle
  latency of each packet. It counts each situation: input held off, bank A,
  bank B, pedestal wrap, short window, linear integral, wraparound integral,
  format error, junk words. It fails if any of them never happened.

Each testbench has also been run against a copy of its module with one
deliberate bug. The testbench caught every one.

What is not verified: timing closure and resource use on a real FPGA, and
behaviour with real detector data (the tests use random samples and
pedestals).

## Where this departs from the reference implementation

The reference kernel was written in C for a high-level synthesis tool. That
kernel is fed from the host by a bus interface, with packets and pedestals in
external memory. This RTL keeps the reference kernel's algorithm and loop
structure, including the fixed 256-row loops and the separate accumulator
buffer. It differs in these places:

- The packet is decoded in hardware from the ASIC's word stream. In the
  reference flow a host program decodes it into a C struct first.
- The pedestals sit in an on-chip RAM with a load port instead of external
  memory. This placement had been considered for the reference design, since
  the pedestals rarely change.
- A plain valid/ready stream and plain ports replace the host bus.
- Rows past a short packet are zero-filled. The reference loop instead assumes
  every packet is a full 256-sample window.
- The bound-to-row conversion is the modulo-256 form above.
- The channel-tag and stop-word check (`out_err`) is an addition.

**Performance against the project's goals.** The goal is one window in
2.56 us: the time the ASIC takes to collect 256 samples, or 768 cycles at
300 MHz. The kernel needs 20489 cycles, about 27 times longer. The reference
HLS kernel is in the same range (about 21400 cycles in emulation). The
structure is deep rather than wide; reaching the goal would mean processing
several channels or rows per cycle.

On area, one kernel synthesises to about 550 flip-flops and 215 kbit of RAM
(roughly 7 block RAMs). Twelve kernels, one per ASIC for a full detector axis
of one layer, would use about 84 of the 445 36-kbit block RAMs of a Kintex-7
XC7K325T.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/apt_pkg.sv tb/apt_tb_pkg.sv tb/tb_apt_preprocess.sv --top-module tb_apt_preprocess
./obj_dir/Vtb_apt_preprocess
```

For a block test, substitute its testbench, for example `tb/tb_integral.sv`
with `--top-module tb_integral`. The full-size end-to-end test simulates about
210,000 cycles and finishes in well under a second.

## Changing it

- Sizes (`NUM_SAMPLES`, `NUM_CHANNELS`, widths) live in `apt_pkg`. The 256
  samples and 16 channels are fixed by the packet format: 8-bit slot fields and
  a 4-bit channel tag. Change those together.
- To trade area for latency, widen `ped_subtract` and `integral` to several
  channels per cycle. The result buffer would then need a matching width. The
  sequencing in `apt_preprocess` would not change.
- Fixed bounds could be made parameters. Summing only the rows inside the
  bounds, instead of all 256, would cut the integral phase.
