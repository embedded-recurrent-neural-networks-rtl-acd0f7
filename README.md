# Time-multiplexed recurrent neural networks for calorimeter energy reconstruction

Each channel of a sampling calorimeter delivers one ADC sample every bunch crossing
(25 ns, 40 MHz). From that stream an energy has to be computed for every channel and
every bunch crossing, within about 125 ns, and at high pileup the signal pulses of
neighbouring crossings overlap. This design computes the energy with a small recurrent
neural network (a vanilla RNN) that looks at a sliding window of the last five samples of
a channel. One FPGA has to serve 384 channels. 384 separate networks would not fit, so
each network is shared: it runs at 14 times the bunch-crossing rate (about 561 MHz) and
serves 14 channels in turn. 28 such networks give 392 time slots for the 384 channels.

The RTL is synthesizable SystemVerilog with no vendor primitives. It is bit-exact against
the integer reference model used by its testbenches.

## The network

For one channel and the window of samples x(t-4) ... x(t):

    u(s)   = Wx * x(s) + b                         input term, 8 values per sample
    h1     = tanh(u(t-4))                          first cell, starts from h = 0
    hk+1   = tanh(u(t-5+k+1) + Wh * hk)            cells 2..5
    E(t)   = Wd . h5 + bd                          dense output layer

There are 8 hidden units. The parameters are Wx (8), b (8), Wh (8x8), Wd (8) and bd (1),
which makes 89 words. Evaluated naively, a window costs 5 x (8 + 64) + 8 = 368
multiply-accumulates. The hardware saves two of those terms:

* **The input term is shared.** u(s) depends only on the sample. Every sample enters five
  consecutive windows, at a different position each time, so u is computed once when the
  sample arrives (`input_layer`) and kept per channel (`window_buffer`). No cell multiplies
  by Wx.
* **The first cell has no recurrent product**, because its incoming state is zero.

So a network has 8 + 4 x 64 + 8 = 272 multipliers. With two 18x18 multipliers per DSP
block, that is 136 DSP blocks per network.

## Sliding windows on a shared, unrolled network (`rnn_network`)

The network is unrolled along the window: there is one physical cell per window position,
and every cell is fully pipelined. Each clock, one (channel, sample) pair enters. Its
complete window then flows through the five cells, one position per cell, so a new
channel's window can start on the very next clock. A window needs no state from the
previous window's states, because every energy is computed from scratch over its five
samples. The only state carried between bunch crossings is the per-channel history of
input terms. This is what makes plain time-multiplexing possible: any order of channels
works, including the same channel on back-to-back clocks.

    x ─► input_layer ─► window_buffer ─► cell0 ─► cell1 ─► cell2 ─► cell3 ─► cell4 ─► dense_layer ─► E
         (u = Wx x + b)  per-channel       tanh     tanh(u+Wh h) ...                     Wd.h + bd
                         history of u      (u0)

The window (u of the five samples, oldest first) travels beside the data in each cell's
side channel, together with the channel number. Cell k takes entry k from it. Synthesis
removes the entries that are no longer needed.

After reset every history entry is u = 0. Note that this is *not* the input term of a zero
sample, which would be b. So the first four energies of each channel come from partly
filled windows.

## Timing

| stage | clocks |
|---|---|
| `input_layer` (multiply, bias + truncate) | 2 |
| `window_buffer` | 1 |
| first cell (tanh table) | 1 |
| each further cell: multipliers, 3 adder levels, add u + truncate, tanh | 6 (x4) |
| `dense_layer`: multipliers, 3 adder levels, bias + truncate | 5 |
| **network, sample in to energy out** | **33** |

At the top level, a bunch-crossing strobe latches the 14 samples of each network. The
serializer issues them on the next 14 clocks. The deserializer raises its completion
pulse one clock after the last channel's energy arrives. So the time from the strobe to
all 384 energies being valid is 14 + 33 + 1 = **48 clocks**, which is 86 ns at 561 MHz
and inside the 125 ns budget. Throughput is one window per network per clock. Strobes
must be at least 14 clocks apart. An earlier strobe restarts the serializer and raises
`overrun_o`.

Whether 561 MHz is actually reached is a matter of placement and timing closure on the
target FPGA. That needs pinned placement of the cells and incremental compilation of
networks that already meet timing, and the RTL does not capture it. The dot products are
built for high clock rates: each multiplier is followed by a pipelined adder tree in
general logic, instead of chaining the DSP blocks' internal accumulators. At high
frequency, the chained accumulators cost more routing logic than they save.

## Number formats

All words are 18 bits wide, to match the FPGA's 18x18 multipliers. There are three
types, with binary points chosen for this implementation (`rnn_pkg`):

| type | used for | fraction bits | range |
|---|---|---|---|
| IO | ADC samples in, energies out | 10 | +-128 |
| internal | u and h | 12 | +-32 |
| weight | all 89 parameters, biases included | 14 | +-8 |

Products and sums are kept at full precision up to the point where a value returns to
18 bits. There it is **truncated**: the low bits are dropped, which rounds towards minus
infinity. It is then **saturated** to the 18-bit range. Weights should be rounded to the
weight type in software before they are loaded. To change a format, edit the fraction
widths in `rnn_pkg`; every shift is derived from them. The testbench reference model in
`tb/rnn_ref_pkg.sv` has the same widths written out as constants, so update it as well.

The activation (`tanh_act`) is a 1024-entry table over |x| in [0, 4), with a step of
1/256. It holds floor(tanh(i/256) x 2^12). The input's magnitude is truncated to the step
and clamped to the last entry, and the sign is applied afterwards (tanh is odd). The
table is computed at elaboration with `$tanh`, so there is no data file.

## Loading weights

Each network has its own `weight_regs` (89 words in flip-flops), written one word per
clock. The address map is:

| address | parameter |
|---|---|
| 0-7 | Wx[j] |
| 8-15 | b[j] |
| 16-79 | Wh[j][k] at 16 + 8j + k (unit j, from h[k]) |
| 80-87 | Wd[k] |
| 88 | bd |

At the top level, `wr_net` selects the network, and `wr_bcast` writes the word to all
networks at once. Weights should be changed only while no data is in flight: a window
that is being computed during a load may see a mix of old and new weights.

## Modules

| file | role |
|---|---|
| `rtl/rnn_pkg.sv` | types, default sizes, `trunc_sat` |
| `rtl/dot_product.sv` | N multipliers + pipelined adder tree; latency 1 + log2 N |
| `rtl/tanh_act.sv` | activation table, 1 clock |
| `rtl/input_layer.sv` | u = Wx x + b per sample, 2 clocks |
| `rtl/window_buffer.sv` | per-channel history of u, emits the window, 1 clock |
| `rtl/rnn_cell.sv` | h' = tanh(u + Wh h); `FIRST=1` gives tanh(u) |
| `rtl/dense_layer.sv` | E = Wd . h + bd |
| `rtl/rnn_network.sv` | one time-multiplexed network |
| `rtl/weight_regs.sv` | loadable parameters |
| `rtl/channel_serializer.sv` | 14 parallel samples to one per clock, on the strobe |
| `rtl/channel_deserializer.sv` | serial energies back to one register per channel |
| `rtl/lasp_rnn_fpga.sv` | top: 28 x (serializer, network, deserializer, weights) |

The top has these default parameters: `N_CH=384`, `N_NET=28`, `MUX=14`, `N=8`, `SEQ_LEN=5`.
Channel c is handled by network c/14, in slot c%14. The 8 unused slots receive zeros.
`N` and `SEQ_LEN` are parameters throughout, but only the defaults have been tested at
the network level.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The testbenches share the bit-exact reference model
`tb/rnn_ref_pkg.sv`. Verilator 5 example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/rnn_pkg.sv tb/rnn_ref_pkg.sv tb/tb_rnn_network.sv --top-module tb_rnn_network
    ./obj_dir/Vtb_rnn_network

* `tb_dot_product`, `tb_tanh_act` (whole input range), `tb_input_layer`, `tb_rnn_cell`,
  `tb_dense_layer`, `tb_window_buffer`, `tb_weight_regs`, `tb_channel_serializer`,
  `tb_channel_deserializer`: unit tests with random data, saturation cases and latency
  checks.
* `tb_rnn_network`: one network with three channels in random order. Every energy is
  compared with the reference, and the latency must be 33 clocks.
* `tb_lasp_rnn_fpga`: the top at a reduced size (10 channels, 3 networks x 4 slots). It
  covers per-network and broadcast weight loads, nominal and longer strobe periods,
  partly filled windows and an overrun, and counts each of them.
* `tb_lasp_rnn_fpga_full`: the top at full size (384 channels, 28 x 14), with six bunch
  crossings at the nominal 14-clock period. All channels are checked bit-exactly, and the
  48-clock latency is checked too. The Verilator build takes under a minute.

The simulator has no X state. Every register that the checks read is reset, or is
qualified by a reset valid bit.

## Departures and limits

* The activation function, the three binary points, saturation, the weight-load
  interface, the reset state of the window history and the strobe/serial interface are
  this implementation's own choices. The published design fixes only the 18-bit width
  and truncation.
* The network evaluates 272 multiplications per window rather than 368 multiply-
  accumulates. It gives the same result, because it only removes products by zero and
  repeated computation of the input term.
* Larger networks are not built. That includes the variant where a dense layer replaces
  the RNN cells for the older samples (30 units, 20 samples), as well as LSTM and GRU
  cells.
* The RTL does not cover the FPGA itself: its clocking (PLL), the board links that
  deliver the ADC samples, and the pinned placement that reaches the target frequency.
  A single clock and a strobe stand in for them.
* The classic optimal-filter energy reconstruction is not included.
