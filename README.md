# Station Board Filter FPGA

A radio-telescope correlator receives, from each antenna, a wideband stream of
samples: 2 GHz of bandwidth, carried as 64 parallel wires at 128 MHz and
re-clocked inside the FPGA at 256 MHz. Astronomers rarely want the whole band
at once. They want a handful of narrow sub-bands, each placed anywhere in the
band, with a width anywhere from 128 MHz down to about 31 kHz.

On each station board a chain of identical Filter FPGAs shares the wideband
stream. Each FPGA cuts out one sub-band and follows the geometric delay of its
antenna. It requantizes the result to 4 or 8 bits and sends it to the next
stages of the correlator. This repository is synthesizable SystemVerilog for
one such Filter FPGA.

The design was written from the functional specification of the EVLA WIDAR
correlator's Filter FPGA. Where the specification leaves a detail open, the
design makes its own choice. Those choices are listed in the header comment of
each file and summarised under "Departures and open points" below.

## Signal path

```
 wideband in A/B ─► INOUT ─► DELAY1 ─► STAGE1 ─► STAGE2 ─► STAGE3 ─► STAGE4
        │              │                 │          │          │         │
        ▼              │                 └──────────┴────┬─────┴─────────┘
 wideband out A/B      │                                 ▼
 (to next FPGA)        │                              FORMAT ─► DELAY2 ─► A, B, C outputs
                       │
 MCB bus ◄──────────► MCBI (all registers, status, errors)
```

| Block | File | What it does |
|---|---|---|
| INOUT | `inout_io.sv` | Picks input port A or B, captures it on the rising or falling clock edge and re-times it. Drives the enabled output ports to the next FPGA. Computes a CRC of one selected wire, handles the system tick and runs a time-interval counter. |
| DELAY1 | `delay1.sv` | Delays the wideband stream by a delay model (delay plus delay rate, reloaded at each tick). The delay has whole-sample resolution; the fractional part leaves as a phase error and fraction bits. Decodes the serial delay-error frame. |
| STAGE1 | `stage1.sv`, `fir32.sv` | 512-tap polyphase FIR, built from sixteen 32-tap blocks that use product look-up tables instead of multipliers. It takes the 2 GHz band down to 128 MHz. |
| STAGE2 | `stage2.sv`, `stage2_mixer.sv`, `stage_fir.sv` | Optional single-sideband mixer (cos/sin tables and a phase accumulator), then a 32-multiplier decimating FIR of up to 512 taps. |
| STAGE3 | `stage3.sv`, `stage_fir.sv` | The same FIR engine with 2 multipliers. |
| STAGE4 | `stage4.sv`, `stage_fir.sv` | The same FIR engine with 1 multiplier. |
| (all stages) | `stage_post.sv` | Common stage output: scale, round, clip to 16 bits, stretch invalid intervals and delay the side signals. |
| FORMAT | `format.sv`, `tone_extractor.sv` | Selects one stage output. Applies RFI blanking and the sideband flipper, measures power, requantizes, and correlates with a model calibration tone. |
| DELAY2 | `delay2.sv` | Serializes the samples into 4-bit nibbles and adds a CRC per output. Delays each of the three output bundles so that the sub-bands line up downstream. Contains a pseudo-random test source. |
| MCBI | `mcbi.sv` | Register file behind the Monitor and Control Bus. Also holds the status, error and identifier registers. |
| clocking | `ce_gen.sv` | Clock-enable generator. The whole design runs on one 256 MHz clock; lower sample rates are enables. |
| top | `sbf_top.sv` | Wires the blocks together and adds the reset, the clock-manager handshake and the test port. |
| shared | `sbf_pkg.sv` | Types (`nb_t` sample bundle, `cfg_t`/`wstb_t`/`mon_t` register structures), register addresses, bit positions, CRC step. |

### The sample bundle

Everything after STAGE1 passes one structure, `nb_t`:

- `stb`: the sample strobe;
- `d`: a signed 16-bit sample;
- `v`: the valid flag;
- `tk`: the tick that marks the start of each model interval (10 ms in the telescope);
- `nd`: the noise-diode state;
- `pe`: a signed 12-bit phase error, as a fraction of a cycle.

Each stage delays its side signals by its own pipeline depth and filter group
delay. A tick therefore stays attached to the sample it belongs to.

## One clock, many rates

There is a single 256 MHz clock. A stage output rate of 256/2^n Ms/s comes from
`ce_gen`, which pulses once every 2^min(n,12) clocks. Its count restarts at
every tick, so decimated samples keep a fixed phase to the tick. The `DDEC`
register of each stage holds n.

Every later stage has a strobe qualifier, so a stage never stalls. It simply
sees fewer strobes.

## How the filters work

**STAGE1** must handle 16 new 4-bit samples per clock. It does not use
multipliers. Each tap has a 16-entry table of precomputed products, one entry
per possible input value, held as `NBIT` = 12 bits. A 32-tap `fir32` block looks
up 32 products and adds them in a pipelined tree. Sixteen of these blocks,
fed through the `S1_XBAR` crossbar, form the 512-tap polyphase filter.

The tables are loaded over the bus. Set the STAGE1 load bit in `CM_CTL`, choose
a table entry with `S1_CADD`, then write `S1_CVAL` 512 times. Each write shifts
the chain by one.

How the sixteen sums are combined depends on the mode:

- **4-bit input:** all sixteen are added. The result is one 512-tap polyphase filter that decimates by 16.
- **8-bit input:** the MS nibbles go to filters 8..15 and the LS nibbles to filters 0..7. The result is (upper sum << 4) + lower sum, a 256-tap filter that decimates by 8.
- **VLBI mode** (`CM_CFG` bit 7): the blocks are sixteen independent 32-tap filters, each loaded for a different fractional-sample delay. The 4-bit fraction from DELAY1, or `S1_FBIT`, picks one of them.

The sum is then left-justified to 32 bits and the `S1_IDC` DC offset is added.
Its mean per tick interval is measured in `S1_ODC` and `S1_VDC`.

**STAGE2 to STAGE4** share `stage_fir`, a time-multiplexed FIR:

- `NMUL` multipliers (32, 2 or 1) each own a slice of the coefficient memory. A filter with `NTAP+1` taps (64 to 512) needs `(NTAP+1)/NMUL` clock steps per output.
- Sums are 40 bits wide. The top 32 bits go to `stage_post`.
- `CDEC` slows the steps by 2^CDEC, for reduced-rate coefficient access.
- The output rate must leave enough clocks for the steps. For example, STAGE2 with 512 taps needs 16 clocks per output.

STAGE2 can first shift the band with a single-sideband mixer. `stage2_mixer`
advances a 32-bit phase by `S2_MFAZR` per sample and reloads it from `S2_MFAZ`
at each tick. It can optionally add the phase error. It multiplies each sample
by cos and sin from 1024-entry tables.

The FIR then works on alternate taps: cosine products on even taps, sine
products on odd taps. The coefficient file holds interleaved cosine and sine
coefficients, so the two quadrature halves add into the single-sideband
result. The tap count per quadrature is half.

**stage_post** ends every stage. It computes round(x · SCALE / 2^16) and clips
to ±32767. A clipped sample stays valid, but its clip flag is raised and
FORMAT counts it. `VLEN` stretches an invalid interval over the length of the
filter. `FDLY` delays valid, tick, noise and phase error to match the group
delay.

## Delay model (DELAY1)

The delay is a 48-bit number:

- bits 47:31 are whole samples;
- bits 30:0 are a fraction.

At each tick the delay is reloaded from `D1_DLY` and the rate from `D1_DLYR`.
On every data enable the rate is added to the delay.

Whole words come from a 2^13 × 64-bit memory. A barrel shift across two
adjacent words then picks out the exact sample. The sample size is set by
`D1_DMUX` (4- or 8-bit samples). The most significant sample of a word is the
oldest.

The top 12 bits of the fraction become the phase error carried with each
sample. `CM_CFG` bit 0 can negate it. The serial delay-error frame on
`IDERR`/`IDFRM` is decoded into `D1_DERR`:

- 20 bits of two clocks each, LS bit first;
- a check pattern of `0xA` in bits 19:16.

A wrong pattern, or a frame pulse at the wrong spacing, raises a status bit.

## Output formatting (FORMAT)

The stages run in order:

1. **Select** a stage with `FM_DSEL[1:0]`. `FM_DSEL[3:2]` picks a second stage whose clipped samples are counted.
2. **RFI blanking.** A sample with |d| > `FM_BLEV` marks itself and the next `FM_BLEN − 1` samples invalid. A new detection inside that window extends it by `FM_BLEN`. `FM_BLEN = 0` turns blanking off.
3. **Sideband flipper** (`CM_CFG` bit 10). It negates every other sample, which mirrors the spectrum. The alternation restarts on every second tick, or on the next tick after `CM_CTL` bit 11.
4. **Power meters.** Sums of squares and counts of valid samples, kept apart for noise diode on and off (52-bit sums, 22-bit counts).
5. **Requantizer.** q = (d · `FM_QSCL` + 2^14) >> 15, clipped to ±(2^`FM_QBIT` − 1). Clips are counted. A state counter counts samples equal to `FM_QST`, and the squares of the quantized samples are summed.
6. **Tone extractor.** It correlates the quantized samples with a model tone. A 32-bit phase is reloaded at the tick and the phase error is added at bits 31:20. The phase addresses a 256-entry cos/sin table, and two 36-bit sums are formed.

Every counter and sum restarts at the tick. The value for the finished
interval is latched for reading. From sample in to sample out, FORMAT takes
4 clocks.

## Output coding (DELAY2)

Three 6-wire bundles leave the FPGA. Each has 4 data wires, a tick and SIND
(sample indicator):

| Output | Carries | Coding |
|---|---|---|
| A | samples | 4-bit mode: one nibble with SIND = 1, invalid = `0x8`. 8-bit mode: LS nibble (with the tick), then MS nibble, SIND on both. Bit 7 is the valid flag, or, with `CM_CFG` bit 14, the sample is sign-extended and `0x80` means invalid. Between samples the wires alternate `0x5`/`0xA` for AC balance (`0x8` with `CM_CFG` bit 13). |
| B | samples | Same coding as A; the filler between samples is always `0x8`. |
| C | phase error | 8 bits as LS then MS nibble, SIND on both. |

Each bundle goes through its own delay line of 0 to 8190 clocks, set by
`D2_ADLY`, `D2_BDLY` and `D2_CDLY`. A delay of 0 bypasses the memory. The
bundle leaves its delay value plus one clock after it was serialized.

A 4-bit CRC (x^4 + x + 1) is taken after each delay line. It covers one wire
chosen by `D2_DSEL`, per tick interval. `D2_ESEL` can invert that wire to
force CRC errors. `CM_CFG` bit 12 replaces the samples by a 16-bit LFSR
(x^16+x^14+x^13+x^11+1) seeded from `D2_SEED`.

## Registers and the MCB bus

The bus has:

- an 8-bit address and 16-bit data;
- `mcb_cs_n` and `mcb_rd_wr_n` (1 = read);
- its own clock, `mcb_clk`, unrelated to the 256 MHz clock.

A write is taken at the first rising `mcb_clk` with `mcb_cs_n` low. It crosses
into the 256 MHz domain through a toggle synchronizer and reaches the
registers 3–4 fast clocks later. Consecutive writes must therefore be at
least four 256 MHz clocks apart, which holds for any bus clock below 64 MHz.
Read data is a combinational multiplexer on `mcb_addr`. The bus must hold the
address for one bus clock.

Register names and addresses follow the specification's register map (see the
`A_*` constants in `sbf_pkg.sv`). Reads return zero in unused upper bits; the
phase error is sign-extended. Special behaviour:

- `CM_STS`: status events collect during the interval. They are saved and cleared at each tick. A write XORs into the saved value, so software can fake errors.
- `CM_ERR`: bit 0 means a write to a read-only register, bit 1 a write to a missing register, bit 2 a read of a missing register. Writing 0 clears it.
- `CM_DEF`: holds the data of the last bad write. It is returned for reads of missing registers.
- `CM_CTL` bit 0 is a software reset. It clears itself and resets the datapath but not the registers. Bit 1 holds the datapath in reset.
- Coefficient and table writes (`S1_CVAL`, `S2_CVAL`, `S3_CVAL`, `S4_CVAL`, `S2_MCOS`, `S2_MSIN`, `FM_TVAL`) produce one-clock strobes. `S1_CVAL` and `S2_CVAL` are accepted only while their `CM_CTL` load bit is set.
- Reset values are zero except for these:
  - `S1_XBAR`: identity;
  - `D2_SEED`: `0x1357`;
  - the stage `SCALE` registers: `0x0001` (bits 31:16 of the sum, rounded, which cannot overflow);
  - `FM_QSCL`: `0x7FFF` (a unity fraction);
  - `FM_QBIT`: 3.

### Top-level extras

- `rst_n` is synchronized to the 256 MHz clock.
- The clock manager that makes the 256 MHz clock is vendor clocking IP and is not included. Its handshake is on ports:
  - inputs `dcm_locked`, `dcm_ps_done` and `dcm_ps_ovf`, which feed `CM_STS` bits 0, 6 and 7;
  - outputs `dcm_ps_inc`, `dcm_ps_en` and `dcm_rst`, driven by `CM_CTL` bits 12, 13 and 15.
- The four `tst` wires each show one of 256 internal probe signals, chosen by `CM_TST0..3`. The probe numbering is listed in `sbf_top.sv`.

## Departures and open points

- **Not included:**
  - the clock manager (DLL/DCM);
  - the I/O buffers with their electrical standards and per-pin tapped delays.
- **Own choices where the specification is silent:**
  - the CRC polynomial;
  - the LFSR polynomial;
  - the exact bus cycle timing;
  - rounding in the stages and the requantizer;
  - the position of the phase error in the mixer and tone phases;
  - the table pointer behaviour of the tone table;
  - the STICK width limit (more than two clocks raises status bit 1);
  - saturating counters;
  - the test-port probe list.
- **Conflicts in the specification:**
  - *Output filler.* One passage says the filler between samples is the invalid code. Another offers an "AC balance" switch. Both are followed: A balances unless `CM_CFG` bit 13 is set; B always uses `0x8`.
  - *STAGE3 coefficient memory size.* Two sizes are given. 512 taps over 2 multipliers (256 × 16 each) is used.
  - *Product width of the STAGE1 tables.* 12 bits was the original plan, but 13 or more is recommended for full stop-band rejection. The default `NBIT` is 12; raise the parameter of `stage1`/`fir32` for 13.
  - *Width of the STAGE1 valid count.* It is given as 21 and as 22 bits. The 22-bit count is used, which holds the 2,560,000 samples of a 10 ms interval.
- **Status bits 3 and 5** (data clock phase, input clock toggling) come from the clock circuits and are held at zero. Bits 8 and 9 compare the STICK samples of the two clock edges in INOUT.
- **Latencies** are this design's own: 6 clocks in STAGE1 to the output block, 2 in `stage_post`, 4 in FORMAT, and 3 in DELAY1 from input enable to output enable. Tick alignment is kept inside each stage.

## Simulating

All files are plain SystemVerilog. `rtl/sbf_pkg.sv` must be compiled first.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal rtl/sbf_pkg.sv rtl/*.sv \
    tb/tb_sbf_top.sv --top-module tb_sbf_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
They assume a two-state simulator that starts uninitialised variables at
random, so everything that is read is reset or initialised.

| Testbench | Checks |
|---|---|
| `tb_ce_gen` | enable period for each divider code, restart at the tick |
| `tb_stage_post` | scaling, rounding, clipping, invalid stretch, side-signal delay, latency |
| `tb_fir32` | product-table loading and the 32-tap sum against a model |
| `tb_stage1` | full STAGE1 against a model: crossbar, decimation, DC offset, latency |
| `tb_stage_fir` | time-multiplexed FIR: tap counts, CDEC, complex mode, address restart, latency |
| `tb_stage2_mixer` | phase accumulator, tables, products |
| `tb_stage2`, `tb_stage3`, `tb_stage4` | each stage end to end against a model |
| `tb_delay1` | integer and fractional delay, delay rate, sample sizes, phase error, delay-error frame |
| `tb_inout_io` | port select, edge select, output enables, wire CRC with injection, interval counter, STICK width |
| `tb_tone_extractor` | table load and readback, sums and count per interval |
| `tb_format` | blanking, flipper, power meters, requantizer, counters, latched values |
| `tb_delay2` | 4/8-bit coding, fillers, phase-error nibbles, LFSR, delays, CRCs with injection |
| `tb_mcbi` | reset values, read/write, monitor reads, errors, status XOR, software reset, strobes |
| `tb_sbf_top` | the whole FPGA with short delay lines; counts 16 mechanisms (pass-through, decimation with the exact sample count of every decimation 2 to 2048 through STAGE2 to STAGE4, 8-bit output, test source, delay difference, CRC injection, status, errors, test port, interval counter, power meters, RFI blanking, software reset, clock-manager handshake) and fails any that never occurs |
| `tb_sbf_full` | the whole FPGA at default sizes: a 5000-clock DELAY2 delay, checked on ticks and on every sample; the narrowest bandwidth (31.25 kHz, two samples per 8192-clock tick interval) |

The end-to-end test uses zero filter coefficients, plus a STAGE1 DC offset
to make a constant level for the blanking check. It therefore checks control,
timing and rates through the full chain, not filter responses. Filter
responses are covered by the stage testbenches.
