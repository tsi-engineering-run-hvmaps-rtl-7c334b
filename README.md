# HVMAPS digital readout in SystemVerilog

HVMAPS is a high-voltage monolithic active pixel sensor. The sensor matrix
has 29 columns with 124 pixel places each. Every pixel place has a small
digital *hit buffer* below the matrix, and the hit buffer stores the time of
its pixel's hits. The job of the digital part is to move those hits, one at
a time, out of the matrix, and to send them off the chip as an 8b/10b-coded
serial stream at 1.6 Gbit/s. The chip has no FIFO and no frame memory. Each
hit waits in its own cell until a periodic state machine fetches it, in
three steps:

1. hit buffer → column bus → end-of-column (EoC) buffer (one per column);
2. EoC buffer → readout control unit (RCU);
3. RCU → serializer → output pair.

This repository holds synthesizable RTL for that digital part:
- hit buffers, columns and EoC buffers;
- the RCU: configuration register, time stamp counters, readout state
  machine and 8b/10b serializer;
- the bias-DAC configuration register;
- the single configuration shift chain that runs through all of them.

The analog parts sit at the edge of the RTL as ports:
- pixel amplifiers and comparators;
- tune DACs and bias DACs;
- the ramp TDC;
- the PLL and the pads.

The 2:1 output stage is full-custom current-mode logic on the chip. Here it is
a small behavioural model.

## Hit path

### Hit buffer (`hit_buffer`)

Each cell sees the digital comparator output of one pixel. `comp_in` is
assumed to be synchronous to `clk_800p`.
- **Leading edge:** sets the first hit flag **h1**. It stores the 20-bit time
  stamp TS in m1 and the 7-bit TDC stamp TS3 in m3.
- **Trailing edge:** stores the 10-bit stamp TS2 in m2.
- **Busy:** while h1 is set, the cell ignores new pulses.
- **Ld pixel:** while the state machine's *Ld pixel* (`ld_pix`) is high,
  the second flag **h2** takes h1. Only h2 hits take part in the readout.
  Hits that arrive during a readout cycle therefore wait for the next
  Ld pixel.

Each cell also holds a 4-bit RAM `{enB, tune[2:0]}`:
- it is written through the configuration register (see below);
- `enB = 1` masks the comparator;
- the tune bits go out as `hb_tdac`.

### Priority inside a column (`hv_column`)

The cells form a priority chain from the top row (123) down to row 0. A
cell with h2 set passes "busy" down the chain, so **the highest row with a
pending hit is granted**.

The column data bus is modelled as a register, which behaves like the
chip's precharged wired-OR bus:
- *PullDN* (`pd`) clears it;
- while *Ld column* (`ld_col`) is high, the granted cell ORs its word onto it.

The word is `{TS, TS2, TS3, row[9:0]}`, and the row comes from a per-cell
constant.

At the falling edge of Ld column:
- the EoC buffer takes the bus, but only if it is empty and a cell asked;
- the same event clears both flags of the granted cell.

If the EoC buffer was still full, the cell keeps its hit and tries again in
the next cycle. Nothing is lost.

### EoC chain (`eoc_buffer`)

Each column has one EoC buffer with room for a single word. The full flags
form a second priority chain across the columns, with column 0 first. Its
end is *PrioFromDet*, which tells the state machine that some EoC buffer
holds a hit.

During *Rd column* (`rd_col`):
- the first full buffer drives `{col[4:0], word}` onto the read bus;
- the falling edge of `rd_col` empties that buffer.

Both priority chains are combinational ripple chains. At 124 rows they are
the longest paths of the design.

## Readout state machine (`readout_fsm`)

The RCU divides `clk_800p` by ten. This one-in-ten enable is the state
machine's step, `clk_8ns`. A timer counts steps from 0 to `timerend`, so every
state lasts `timerend+1` steps. Two states are longer:
- Sync lasts `resetckdivend+1` times that;
- Ld column 1 lasts `slowdownend+1` times that (7 is the recommended value).

The cycle:

```
Sync -> PD1 -> PD2 -> LdCol1 -> LdCol2 -> LdPix1 -> LdPix2
LdPix2 : hits in EoC? -> RdCol1, else (sendcounter ? SendCnt1 -> SendCnt2 :) -> PD1
RdCol1 -> RdCol2 -> RdCol3 -> RdCol4 -> RdCol1 while hits remain and fewer
          than maxcycend were read (at least one is always read), else PD1
```

- States with index 1 drive the control lines: PD1 → `pd`, LdCol1 →
  `ld_col`, LdPix1 → `ld_pix`, RdCol1 → `rd_col`.
- States with index 2 are gaps between them.
- **Counting mode** (`countsheeps`): LdCol2 jumps straight to RdCol1 while
  the EoC buffers still hold hits. New hits are then only latched (LdPix)
  once every old hit has left.

In the last `clk_800p` cycle of some states, the state machine hands the
serializer one 32-bit word with four comma flags (1 = K code):

| state              | DataOut                                   | K flags |
|--------------------|-------------------------------------------|---------|
| LdCol2             | `1C AA 1C AA` (K28.0 D10.5 K28.0 D10.5)   | 1010    |
| LdPix2 (with hits) | `C0, TSbin[15:8], TSbin[7:0], TSgray[7:0]` | 0000    |
| RdCol2             | `C1, 00, col[4:0], row[9:0], TS3[6:0]`    | 0000    |
| RdCol4             | `00, TS[19:0], TS2[9:0]`                  | 0000    |
| SendCnt1           | `K28.1, TSbin[7:0], TSbin[15:8], 00`      | 1000    |
| anything else      | `BC BC BC BC` (K28.5 idle)                | 1111    |

A hit is therefore 64 bits in two frames, and every readout cycle begins
with a `1C AA 1C AA` marker.

Frames are pushed at least two states apart, which is 20 `clk_800p` cycles.
That is exactly the time the serializer needs for one 40-bit frame, so no
FIFO is required. In a burst of RdCol1..4 loops, the two frames of
consecutive hits are 40 cycles apart.

## Serializer (`serializer_top`, `enc_8b10b`, `dcl_serializer`)

Every 20 cycles the serializer takes either the frame pushed since its last
frame or, if none was pushed, the idle frame:
- four chained 8b/10b encoders code it, carrying the running disparity from
  byte to byte and from frame to frame;
- the most significant byte goes first, and within each symbol bit *a*
  goes first;
- it leaves two bits per cycle on `bit_data_out[1:0]`, with `[1]` first.

`dcl_serializer` puts `bit_data_out[1]` on the line while `clk_800p` is high
and `[0]` while it is low. This gives 1.6 Gbit/s at 800 MHz. `frame_start`
marks the first bit pair of a frame.

The encoder is the standard 8b/10b code, written from its tables:
- K28.y codes are supported;
- so are K23.7, K27.7, K29.7 and K30.7.

## Time stamps (`ts_counters`)

The counters run on the time stamp clock TSCk. `SRExtraBits[4]` selects the
source: `clk_800p` or `clk_4n` = `clk_800p`/5.

| stamp | clock and divider | width and coding | stored by the hit buffer at |
|---|---|---|---|
| TS | rising TSCk edge, divider `ckdivend` | 16-bit binary; low 10 bits Gray-coded onto `TS[9:0]` | leading edge |
| TS2 | divider `ckdivend2` | 10 bits, Gray | trailing edge |
| TS3 | divider `ckdivend3` | 7 bits, Gray | leading edge (the chip's ramp TDC stores it a little later) |

The falling TSCk edge copies the code of `TS[9:0]` to `TS[19:10]`. The two
halves of the 20-bit TS therefore carry the same code, half a clock apart.

A divider value *d* means one count per *d+1* TSCk periods. `sync_res`,
synchronous to TSCk, clears all three counters. Gray coding lets a hit
buffer latch a stamp at an arbitrary moment without catching a
half-switched value.

## Configuration chain

All configuration is one shift register of 57 + 210 + 29·25 = **992 bits**:

```
cfg_sin -> RCU QConfig[0..56] -> DAC register (210) -> column 0 (25) -> ... -> column 28 -> cfg_sout
```

### Register bit (`config_bit`)

Every bit has two shift stages, clocked by non-overlapping `ck1` and `ck2`,
and an output register `q`:
- a pulse on `ld` copies the chain into `q`;
- `rb` low clears `q`.

Shifting does not disturb the running configuration.

### RCU register (QConfig)

| bits | field |
|---|---|
| [5:0] | `ckdivend` |
| [11:6] | `ckdivend2` |
| [15:12] | `timerend` |
| [19:16] | `slowdownend` |
| [27:20] | `maxcycend` |
| [31:28] | `resetckdivend` |
| [32] | `sendcounter` |
| [38:33] | `ckdivend3` |
| [39] | unused 6-bit TS mode |
| [40] | `countsheeps` |
| [56:41] | `SRExtraBits` |

`SRExtraBits[3:0]` are the PLL controls (`pll_ctrl`) and `SRExtraBits[4]`
selects the time stamp clock.

### DAC register

The DAC register holds:
- 6 control bits (q00, q01, qon0..qon3), which go out as `dac_ctrl`;
- 34 six-bit codes, each entered MSB first, in the order anadac0..13,
  digdac0..12, anadac14..20.

### Pixel register of a column

Bit 0 is the bit nearest the chain input.

| bits | function |
|------|----------|
| 0–3  | data for the hit-buffer RAM `{enB, tune}` (bit 3 = enB) |
| 4    | data for the in-pixel tune RAM |
| 5–9  | hit-buffer RAM write lines for rows 5c … 5c+4 |
| 10–16| in-pixel RAM write lines 7c … 7c+6 |
| 17–21| injection enables for rows 5c … 5c+4 |
| 22   | hit bus enable, active low |
| 23   | amp-out enable of the column |
| 24   | injection enable of the column |

Write and injection lines run across the whole matrix. Column *c*'s register
drives lines for rows 5c…5c+4, but every column receives all 124 of them.
To write the tune RAM of one cell, put data in its column's bits 0–3 and
raise its row's write line.

Only rows 62–123 have in-pixel RAM. Line 3·(r−62)+k writes bit k of row r,
which makes 186 lines in total. In odd columns, the line numbers of bits
5–21 run downwards. This design chooses that so the row order stays regular
along the snaking register.

## Top level (`hvmaps_top`)

`hvmaps_top #(NCOLS=29, ROWS=124)` instantiates the RCU, the DAC register,
the output stage and the columns. It wires the three chains:
- the configuration chain;
- the EoC priority chain;
- the OR of the EoC read buses.

It also gathers the row-wide RAM-write and injection lines from the column
registers.

| group | ports |
|---|---|
| inputs | `clk_800p`, asynchronous `res_n`, `sync_res`, the six configuration pads, one comparator vector per column |
| data outputs | `bit_data_out`, `data_out_p`/`data_out_n`, `clk_4n` |
| analog controls | `pll_ctrl`, `dac_ctrl`, `dac[34]`, `hb_tdac`, `pix_tdac`, `inj_en`, `ampout_en` |
| other | `hitbus` (the fast OR of all enabled receivers) |

Everything runs on `clk_800p` except the configuration registers (`ck1`,
`ck2`, `ld`) and the time stamp counters (TSCk). The time stamp values
crossing into the hit buffers are Gray-coded.

The TSCk multiplexer is a plain clock mux. Switch it only while `sync_res`
is held.

## Where this design makes its own choices

These points are not fixed by the chip's specification, so treat them with
care:

- **Cells and grant:** the grant goes to the highest row. Comparator
  outputs are treated as synchronous digital inputs. TS3 is stored at the
  leading edge instead of by an analog ramp.
- **EoC buffer:** it holds one word and refuses a load while full. The EoC
  chain starts at column 0.
- **Timing:** the exact scaling of the Sync and Ld column 1 lengths is this
  design's choice. So are the 2-of-5 duty cycle of `clk_4n` and the 16-bit
  width of the binary time stamp counter.
- **maxcycend:** it counts the hits read since the last LdPix, and at
  least one hit is always read.
- **Send-counter states:** they sit between LdPix2 (when no hits are
  present) and PD1.
- **Line order:** bit order on the line is MSB byte first, bit *a* first,
  and `bit_data_out[1]` leads. Running disparity starts negative after
  reset.
- **Configuration register bits:** they are edge-triggered flip-flops,
  not latches. The hit-buffer RAM and the in-pixel RAM are written
  synchronously to `clk_800p` while a write line is high.
- **Not built:**
  - the SPI interface and its FIFO, which are not specified;
  - the analog blocks;
  - the only-on-other-chips bits (`QConfig[39]`, `SRExtraBits[5:9]`),
    which are decoded but drive nothing.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/hvmaps_pkg.sv tb/tb_readout_fsm.sv --top-module tb_readout_fsm
./obj_dir/Vtb_readout_fsm
```

| testbench | what it checks |
|---|---|
| `tb_enc_8b10b` | known codes, disparity and run-length rules, commas, and that all codes are distinct |
| `tb_serializer_top` | 40-bit frames, idle fill, bit order, 20-cycle frame rate |
| `tb_readout_fsm` | Sync and state lengths for `timerend` 0 and 1; frame contents; `maxcycend`; counting mode; send counter. Uses a behavioural EoC queue. |
| `tb_ts_counters` | divider rates, Gray codes, falling-edge copy, `sync_res` |
| `tb_hit_buffer`, `tb_eoc_buffer`, `tb_hv_column` | flags, priority, refusal by a full EoC buffer, masking, RAM writes, register layout. `tb_hv_column` uses a full 124-row column. |
| `tb_config_bit`, `tb_config_chain`, `tb_dac_register` | shifting, load, reset, bit mapping |
| `tb_rcu` | the RCU through its configuration chain, decoding its serial output |
| `tb_hvmaps_top` | the whole chip end to end (see below) |

`tb_hvmaps_top` runs the whole chip end to end:
- it shifts in and reads back all 992 configuration bits;
- it masks one cell through its RAM;
- it fires hits in normal mode, then in counting mode with the send
  counter and TSCk = `clk_4n`;
- it decodes the serial line and requires every hit exactly once, with
  the right column, row and time stamps;
- it counts that every mechanism happened at least once: PullDN, LdCol,
  LdPix, RdCol, two requests in one column, a refused load, a cycle cut by
  `maxcycend`, a masked cell, the hit bus, counting mode, the send counter
  frame and the clock switch.

It runs with all 29 columns but 16 rows per column. **The largest size
simulated end to end is 29 × 16.** A full 124-row column is simulated on its
own in `tb_hv_column`. The default top (29 × 124, about 3,600 hit buffers)
is synthesizable, but compiling it with Verilator takes longer than ten
minutes. No full-size end-to-end simulation is included.
