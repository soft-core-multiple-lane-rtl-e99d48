# Soft-core multi-lane TDC ADC built from FPGA I/O tiles

This is a converter for FPGAs that must sit next to cryogenic hardware, at
about 4 K. It needs no ADC chip and, per channel, only one resistor outside
the FPGA. Each channel compares its analog input with a reference ramp in an
ordinary differential input buffer of the FPGA. That turns the voltage into
the time at which the comparator switches. A time-to-digital converter (TDC)
then measures that time. It uses no carry-chain delay line: the serial-to-parallel
converters (ISERDES) of the I/O tile sample the comparator at eight clock phases.
Clock phases from one PLL hold their spacing better over temperature and supply
than carry-chain delays do. The I/O tile samples every phase on the same path.
The converter needs little logic, so the number of channels is limited mainly
by the I/O pins. This RTL implements 24 lanes at 100 MSa/s with a 6-bit time
code per edge.

## How a conversion works

```
            Rref
 Vout ----/\/\/---+---- Vref (RC ramp, Cint = buffer input capacitance)
 (100 MHz)        |
                 [+] differential   hit_p = (Vref > Vin) ---> P-side ISERDES (CLK, CLK_90)
 Vin ------------[-] input buffer   hit_n = ~hit_p      ---> N-side ISERDES (CLK_45, CLK_135)
                                                                  |
                                                         8-BIN code per 1.25 ns
                                                          /                 \
                                              TDC_1: rising edges     TDC_2: falling edges
                                                          \                 /
                                                  sync to 100 MHz (per TDC)
                                                                  |
                                                     data_out (all lanes)
```

* The clock manager drives `Vout`, a 100 MHz square wave, into an external
  resistor. Together with the input capacitance of the buffer, the resistor
  forms an RC network. The reference `Vref` therefore charges while `Vout` is
  high (first half of the 10 ns frame) and discharges while it is low.
* The comparator output `hit` is 1 while `Vref > Vin`. Its rising edge comes
  later the higher `Vin` is. Its falling edge comes earlier the higher `Vin` is.
* Each edge time is measured in units of 1/8 of the 800 MHz sampling period,
  156 ps. A frame is 8 sampling periods long, so a timestamp is
  `{coarse[2:0], fine[2:0]}`, from 0 to 63.
* A frame without an edge is flagged. This happens when the input lies above
  the ramp's peak or below its minimum, leaving the comparator stuck.

The ramp is exponential, not linear, so the timestamp does not map linearly to
voltage. The converter outputs the raw timestamps. Any mapping to volts, and
any combining of the rising and falling measurements, is left to the consumer
of the data. The testbenches use the inverse of the modelled ramp,
`v = VH - (VH - V0) * exp(-t/tau)`, with `t` taken at the bin centre.

## The 8-phase sampling unit (`iserdes_os`, `tdc_sampling_unit`)

This is the part that takes most care to read.

`iserdes_os` models one ISERDES in oversample mode as three ranks of flip-flops:

| rank | row 1 (Q1)   | row 2 (Q2)    | row 3 (Q3)     | row 4 (Q4)      |
|------|--------------|---------------|----------------|-----------------|
| 1    | CLK rise, 0° | CLK fall, 180°| CLK_90 rise, 90° | CLK_90 fall, 270° |
| 2    | CLK rise     | CLK_90 rise   | CLK rise       | CLK_90 rise     |
| 3    | CLK rise     | CLK rise      | CLK rise       | CLK rise        |

Samples taken in the period that starts at CLK edge `n` appear together on
`q` after CLK edge `n+2`. Each sample has at least half a period to move
from one rank to the next.

`tdc_sampling_unit` places two of these on the two outputs of one input
buffer:

* The P side samples `hit` with CLK and CLK_90, giving phases 0°, 90°, 180° and 270°.
* The N side samples `~hit` with CLK_45 and CLK_135, giving phases 45°, 135°, 225° and 315°.

The N-side bits are inverted back, and all eight are registered on CLK into:

```
code[k] = hit sampled at k * 45 degrees after CLK rising edge n     (k = 0..7)
```

`code` is valid from CLK edge `n+3` (`adc_pkg::SAMPLER_LATENCY`). The N side's
outputs change 45° after a CLK edge, and the same CLK edge picks up both sides.

In an FPGA build, `iserdes_os` would be replaced by the vendor's ISERDES
primitive in oversample mode, placed in the lane's I/O pair. The flip-flop
model here describes the behaviour.

## The TDC decoder (`tdc_decoder`)

Each lane has two decoders, and both read the same 8-BIN code:

* **TDC_1** reads `code`. It times the first 0→1 transition of `hit` in the frame.
* **TDC_2** reads `~code`. It times the first 1→0 transition.

The search takes the last sample of the previous period as the predecessor
of sample 0. An edge between two periods, or at the very start of a frame, is
therefore found. A coarse counter counts sampling periods since the frame
began. The frame start comes from the stop clock, which is the 100 MHz ramp
clock. It is sampled on the falling edge of CLK: it is phase-locked to CLK, so
this edge is half a period from either of its edges. The sample is then delayed
by the sampling unit's latency. At each frame start the decoder publishes the
previous frame's `{coarse, fine}`, its `found` flag and a one-period `strobe`.
Later edges in the same frame are ignored.

An assertion checks that the stop clock is exactly `RATIO` sampling periods
long.

## Crossing to the data clock (`tdc_sync`) and output (`data_out`)

The sampling clock and the data clock come from one PLL, so their phase
relation is fixed. The decoder's strobe always lands in period 4 of a frame.
`tdc_sync` copies the result into a holding register, which then stays
unchanged for a whole frame, and toggles a sequence bit. On each data-clock
edge the data clock reads both. It raises `out_valid` for one cycle whenever
the bit has changed. An assertion checks that the holding register is not
rewritten within a frame.

`data_out` collects both results of every lane. When all `2*LANES` results of
a frame have arrived, it registers them as one sample, with
`out_of_range[l] = !(rise found && fall found)`, and pulses `sample_valid`.
Results that arrive in different cycles are gathered first. A lane that
reports twice before the others sets the sticky `misaligned` flag.

## Timing summary (defaults)

| event | when |
|---|---|
| frame `f` | data-clock period starting at `clk_slow` edge `f` (8 sampling periods, 64 bins) |
| 8-BIN code of a sampling period | 3 sampling periods later |
| decoder result of frame `f` | period 4 of frame `f+1` |
| lane outputs (`rise_valid`/`fall_valid`) | data-clock period `f+2` |
| `soft_adc_top` sample (`sample_valid`) | data-clock period `f+3` |

Throughput is one sample per lane per data-clock period: 100 MSa/s.

## Top level and parameters

`soft_adc_top #(LANES = 24, RATIO = 8)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk45`, `clk90`, `clk135` | in | 1 | 800 MHz sampling clocks at 0/45/90/135° |
| `clk_slow` | in | 1 | 100 MHz data clock; the same clock drives the ramp and stops the TDCs. Rises with `clk`. |
| `rst` | in | 1 | synchronous, active high; hold for 2 or more `clk_slow` cycles |
| `hit_p`, `hit_n` | in | LANES | P and N outputs of each lane's input buffer |
| `rise_code`, `fall_code` | out | LANES × (clog2(RATIO)+3) | edge timestamps of the frame |
| `out_of_range` | out | LANES | an edge was not found |
| `sample_valid` | out | 1 | one pulse per frame |
| `misaligned` | out | 1 | sticky error flag |

`RATIO = 16` gives frames of 16 sampling periods, so `clk_slow` must run at
1/16 of the sampling clock: 50 MSa/s with 7-bit timestamps. `RATIO = 1` runs
the ramp at the sampling clock itself (`clk_slow` = `clk`). Every period is
then a frame, giving 800 MSa/s with only the 3-bit fine time. The number of
phases (8) is fixed by the two ISERDES per lane. The source mentions more
ISERDES per lane for finer phases but does not describe them, and this design
does not support them.

The clock manager, the input buffers and the RC networks are analog or vendor
parts and are not in the RTL. `Vout` leaves the FPGA straight from the clock
manager, on a clock output pin.

## What the source describes, and what this RTL chose

Taken from the published design:

* 24 lanes.
* An 800 MHz sampling clock, 8 times the data clock.
* Eight phases from two oversampling ISERDES, one clocked at 0°/90° and the other at 45°/135°, on the P and N outputs of a complementary-output input buffer.
* 156 ps bins.
* Two TDCs per lane, with start = `hit` and start = `~hit`.
* Decoding at 800 MHz, then a hand-over to the slow clock.
* A 6-bit code at 100 MSa/s, and one more bit at 50 MSa/s.

This design's own choices:

* **One sampling unit shared by the two TDCs of a lane.** The utilization
  figures quoted for 24 channels (48 I/O pins) leave room for only one pin
  pair, and so two ISERDES, per lane. In this design each TDC is therefore a
  decoder on the shared code.
* **Which ISERDES edges are used.** The flip-flop diagram of the ISERDES does
  not say which edge its second and third ranks use. Rising edges are used here.
* **Code format.** The bit order of the 8-BIN code, the `{coarse, fine}`
  timestamp, and "first edge in the frame wins" are this design's choices. So
  are the `found`/`out_of_range` flags and frames measured from the stop clock's
  rising edge.
* **Where decoding happens.** The source says in one place that the decoder
  runs at 800 MHz, and in another that the encoder is in the slow domain. This
  design decodes at 800 MHz.
* **Clock crossing and output format.** The crossing method and the output word
  are not described. `data_out` is a minimal gather-and-register stage. It does
  not convert time to voltage; the source does that off-chip.
* **Reset.** Reset is synchronous and active high. The ISERDES flip-flops have
  no reset, because they are refilled every period.
* **Register count.** Generic synthesis gives about 3.4k flip-flop bits for 24
  lanes. The published utilization table lists 185 slice registers. The source
  does not say what its decoders hold, so the difference is not resolved here.

Known limitations:

* **Each timestamp uses about half of its codes.** The rising edge can only
  fall in the charging half of the frame, and the falling edge only in the
  discharging half. In simulation they take codes 1–32 and 33–63. Each
  timestamp therefore resolves the input range with about 5 bits of the 6.
* **A falling edge in the last 156 ps of a frame is reported in the next frame,
  as code 0.** This happens for inputs just above the ramp minimum.
* **The stop clock must span exactly `RATIO` sampling periods, phase-locked to
  `clk`.** An assertion checks this.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_iserdes_os` | Q1..Q4 against random bits held around each sampling instant |
| `tb_tdc_sampling_unit` | the 8-BIN code against random bits around each of the 8 phases, 3-period latency |
| `tb_tdc_decoder` | First edge per frame against a bin-by-bin reference scan. Covers single pulses, empty frames, random edges, and edges at frame and period starts. Also checks the exact strobe cycle. |
| `tb_tdc_sync` | one `out_valid` per strobed frame, in the right data-clock period, with the right data; none for idle frames |
| `tb_data_out` | 24 lanes, results aligned and staggered by 0–2 cycles, `out_of_range`, `misaligned` |
| `tb_adc_lane` | A lane with modelled RC ramp and comparator. A slow input sweep checks that no code is missing, followed by random inputs that include out-of-range ones. |
| `tb_soft_adc_top` | The full 24-lane design at default parameters: a different sine on every lane, all codes checked each frame. Counts in-range and out-of-range conversions and edges at period boundaries. |
| `tb_workload_adc` | TDC density test (DNL) and a sine SNR/ENOB test, at 800, 100 and 50 MSa/s |

With ideal clocks the characterisation gives:

| rate | max DNL | SNR | ENOB |
|---|---|---|---|
| 800 MSa/s (`RATIO = 1`) | 0.02 LSB | 7.7 dB | 1.0 bits |
| 100 MSa/s | 0.13 LSB | 26.0 dB | 4.0 bits |
| 50 MSa/s | 0.21 LSB | 31.2 dB | 4.9 bits |

The published converter reports 24.3 dB and 3.8 bits at 100 MSa/s.

The testbench models (`tb/mmcm_model.sv`, `tb/lvds_ramp_model.sv`,
`tb/ramp_pkg.sv`) use a 1248 ps sampling period: 8 × 156 ps, about 801 MHz,
chosen so every phase falls on a whole picosecond. They use a 3.3 V ramp drive
with τ = 1/6 of a frame, which gives an input range of about 0.16–3.14 V. A
comparator edge that would land exactly on a sampling instant is moved by 1 ps.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/adc_pkg.sv tb/tb_soft_adc_top.sv --top-module tb_soft_adc_top -o sim
./obj_dir/sim
```

Replace `tb_soft_adc_top` with any testbench name above. All runs finish in
seconds. `-Wno-fatal` is needed only because Verilator warns about the
analog model's computed delays (`ZERODLY`); the RTL itself lints clean with
`-Wall`.
