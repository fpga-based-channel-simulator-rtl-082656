# FPGA channel simulator for a 15-node wireless network emulator

A wireless network emulator wires the antenna ports of real radios into a test
bed and replays, in real time, what the air between them would do. Each radio's
signal is brought down from 2.4 GHz, sampled, passed through a simulated
channel to every other radio, converted back to analog and brought up to RF
again. With point-to-point emulators one or two channels are enough. A network
of N radios needs N(N-1) independent channels: 210 for 15 nodes. This RTL is
the digital core that computes them, which is the channel simulator.

Every output is a tapped-delay-line sum over the other nodes' inputs:

    y_k(t) = sum over sources i != k, over paths j of  a_ijk * x_i(t - tau_j)

Each term is built in hardware as a **path**. A path is a programmable delay
(one block RAM per path), followed by a gain made of an 8-bit multiplier and a
0–14-bit right shift, and then truncation to the 14-bit DAC width. One adder
per destination node sums its paths. Phase is not modelled: the samples are
real-valued IF samples, not complex baseband. Single-antenna radios do not see
the channel phase, and fading is produced by changing the path gains over time.

## Configuration

| quantity | value |
|---|---|
| nodes | 15 (`N_NODES`) |
| sample clock | 180 MHz; one sample per node per clock |
| input / output samples | 12-bit / 14-bit two's complement |
| channels | 210, all one-directional |
| single-path channels | 202, with no delay memory |
| multipath channels | 8 (`N_MULTI`), with 3 delayed paths each (`TAPS_MULTI`) |
| paths (multipliers) | 226 |
| delay memories | 24 × 1536 × 12 bit (one 18-kbit block RAM each) |
| delay range | 0–1535 samples, in steps of 5.56 ns, up to 8.53 µs |
| gain per path | n · 2^-S, with n = 0–255 (8 bits, so 256 is not reachable) and S = 0–14 |

Single-path channels save their block RAM. In this design their delay field is
ignored and they have zero delay. That is why the path count (226) is close to
the multiplier count of a Virtex-II Pro XC2VP50 (232), while only 24 block RAMs
are used. Synthesis of this RTL gives 15,754 flip-flops.

### Which channels are multipath

Multipath channel m (m = 0 … N_MULTI-1) carries node (m+1) mod 15 to node m.
Destinations 0–7 therefore sum 16 paths and destinations 8–14 sum 14. To pick
other channels, change the mapping functions in `rtl/chsim_pkg.sv`
(`multi_channel`, `path_src`, `dst_path`). They are the only place the mapping
is defined.

### Path numbers (the update port's address)

- Path `k*14 + (i<k ? i : i-1)` is the first or only path of channel i → k (0–209).
- Path `210 + 2m` and path `211 + 2m` are the second and third taps of
  multipath channel m.

## The path gain: multiply, shift, truncate

This part is the easiest to misuse. The multiplier gives the fine steps and the
shift gives the coarse range:

    out = low 14 bits of floor( x · n / 2^S )

Here x is the 12-bit input, n is the 8-bit unsigned scale value and S is the
4-bit shift value. Shift values of 15 act as 14. The product is 30 bits wide.

- **Unity gain** is n = 1, S = 0. The largest gain that cannot overflow is
  **4** (n = 4, S = 0): a full-scale 12-bit input then fills the 14-bit
  output exactly.
- **Resolution.** One step of n changes the gain by 20·log10((n+1)/n) dB. Steps
  are finer than 0.1 dB for n ≥ 87.
- **Dynamic range.** With gains kept at or below 4 and 0.1 dB resolution, the
  usable range runs from 87·2^-14 (–45.5 dB) to 4 (+12 dB): about **57 dB**.
  This matches 20·log10(2^14 · 4 · (10^(0.1/20) – 1)) = 57.6 dB. Gains down to
  2^-14 (–84 dB) are possible with coarser steps.
- **No overflow protection.** The path output, the adder's partial sums and the
  adder's output are all 14 bits wide, and all of them wrap around on overflow.
  Whoever programs the paths must keep each path gain at or below 4 and the
  **sum** of the path gains into a node at or below 4. The hardware does not
  saturate.

Rounding is floor, from an arithmetic right shift. The shift comes before the
truncation, so attenuated paths lose their low bits before the sum is formed.
This keeps the adders 14 bits wide and the latency short. The cost is dynamic
range when several weak paths are added together.

## The delay memory

`delay_line` is a circular buffer of 1536 samples. It is written every clock
and read `delay` samples behind the write pointer. A delay of 0 returns the
sample being written, so the memory behaves like a single register. The read
behaves like a write-first block RAM. Delays above 1535 are clamped. The memory
starts cleared, as block RAM does after FPGA configuration. Reset only restarts
the write pointer.

## Timing

The table shows the clock edges from the edge that captures `adc_in` to the
edge that updates `dac_out`.

| stage | clocks |
|---|---|
| input register | 1 |
| delay memory read, or the matching register on memory-less paths | 1 + delay |
| multiplier | 1 |
| shift and truncate | 1 |
| adder tree | ceil(log2(paths into the node)), 4 at the defaults |

An undelayed path therefore takes **8 clocks (44 ns)**. Every path into a node
shares the same base latency, so the programmed delays are exact relative
delays. For comparison, the whole emulator must stay under the 1 µs
propagation limit of 802.11b/g. A measured budget for the central FPGA stage of
such a system is about 90 ns.

## Path updates

The emulator controller computes the losses and delays of every path. It
updates them often enough to play back fading: about every millisecond, which
is fast enough for speeds up to about 60 m/s. An Ethernet-side interface turns
those messages into writes on the update port:

| port | width | meaning |
|---|---|---|
| `cfg_wr_en` | 1 | write this clock |
| `cfg_wr_path` | 8 | path number, 0–225 |
| `cfg_wr_data` | 23 | `{delay[10:0], scale[7:0], shift[3:0]}` (`chsim_pkg::path_cfg_t`) |

A write takes effect on the next clock. Writing all 226 paths takes 226 clocks.
Records are not double-buffered, so a multi-path change is applied one path at
a time. After reset all scales are 0 and every output is silent. Writes to
path numbers above 225 change nothing, and an assertion flags them.

## Files

| file | contents |
|---|---|
| `rtl/chsim_pkg.sv` | widths, `path_cfg_t`, the path-numbering functions |
| `rtl/channel_simulator.sv` | top: input registers, 226 paths, 15 adders, settings |
| `rtl/channel_path.sv` | one path: optional delay memory + scaler |
| `rtl/delay_line.sv` | block-RAM delay |
| `rtl/path_scaler.sv` | multiplier, shift, truncation |
| `rtl/path_adder.sv` | pipelined 14-bit adder tree |
| `rtl/path_config_regs.sv` | path settings, written by the update port |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_multipath_spectrum.sv` | frequency response of a three-tap channel |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, the whole design at its default
size:

    verilator --binary --timing --assert -y rtl rtl/chsim_pkg.sv \
        tb/tb_channel_simulator.sv --top-module tb_channel_simulator
    ./obj_dir/Vtb_channel_simulator

`tb_channel_simulator` runs all 15 nodes with random traffic. An independent
reference model predicts every output on every clock. The test goes through
these phases:

1. Silence after reset.
2. All channels at unity gain.
3. A three-tap channel on each multipath channel: taps at 0, 50 and 82 samples
   (0, 278 and 456 ns) at 0, –6 and –3 dB.
4. The longest delay.
5. Settings streamed while traffic flows.
6. A path gain above 4 (the path output wraps).
7. Summed gains above 4 (the sum wraps).
8. A clamped shift value.
9. An impulse that measures the 8-clock latency.

The test counts each of these events and fails if one never happens. It takes
well under a minute to build and a fraction of a second to run. The module
testbenches use the same pattern with smaller memories where that keeps them
short.

`tb_multipath_spectrum` checks the same three-tap channel in the frequency
domain. It sends tones from node 1 to node 0 and measures each output's
amplitude with a 512-point single-bin DFT. The amplitudes must follow
|1 + 0.5·e^(-j2πf·50) + 0.707·e^(-j2πf·82)| (f in cycles per sample) to within
2 % + 4 LSB. With the extra taps switched off, the response must be flat. It
runs 18 multipath tones and 6 single-path tones.

## Where this RTL goes beyond, or departs from, the source design

- **Delay value width.** A published block diagram of this path gives the delay
  value as 8 bits. That reaches only 256 samples (1.4 µs). The stated 8.53 µs
  range needs 1536 samples. The RTL uses 11 bits and the full 1536-sample memory.
- **Tap structure.** Conceptually the taps of one source share a delay line
  with several outputs. Here every delayed path has its own memory, as in the
  hardware build that the block-RAM count shows.
- **Own choices.** These are not given by the source design:
  - which channels are multipath;
  - the path numbering and the update-port format;
  - the input register and the pipeline registers;
  - the write-first memory read and delay clamping;
  - clamping of shift 15;
  - the reset values.
- **Not included:**
  - the ADC/DAC boards and their synchronising FPGAs;
  - the RF front ends;
  - the controller PC;
  - the Ethernet-to-message converter (the update port is where it connects).
- **Not implemented here, and not in the source design either:** running the
  multipliers and memories at 360 MHz to give each one two paths. That would
  double the number of paths per channel.
