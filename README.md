# One-hot CNN datapaths: DaDianNao and Laconic tiles without multipliers

In a one-hot network every weight and every activation is either zero or
a signed power of two. That changes what an inner-product engine has to do.
The product of two such values is another power of two. Its exponent is the
sum of the two exponents and its sign is the XOR of the two signs. So the
multiplier becomes a 4- or 5-bit adder. A sum of many powers of two does not
need an adder tree over wide products either. You count how many terms fall on
each exponent (a histogram), shift each count by its exponent, and add the
shifted counts.

This RTL applies that idea to two accelerator tiles:

* **One-hot DaDianNao tile** (`dadn_oh_tile`). This is a bit-parallel tile. 16
  input activations go to all of 16 output lanes, and each lane has its own 16
  weights. That makes 256 products per cycle. Values are 16-bit one-hot numbers
  (4-bit exponent).
* **One-hot Laconic tile** (`lac_oh_tile`). This is a 4 x 4 PE array in which
  each PE handles 16 pairs per cycle. It has a weight scratchpad (WSpad), an
  activation scratchpad (ASpad) and a partial-sum scratchpad (PSpad). Values
  are 8-bit one-hot numbers (3-bit exponent). In the original bit-serial tile,
  each value is Booth-encoded into a variable-length list of terms, so each
  PE needs a variable number of cycles. A one-hot value is always exactly one
  term. The encoders are therefore gone, and all PEs finish every step in one
  cycle, in lock step.

The top level, `ohn_accel_top`, puts the two tiles side by side. They share
only the clock and the reset.

## Number format

Every value is a code of `EW+2` bits (`ohn_pkg`):

| bits     | field    | meaning                                   |
|----------|----------|-------------------------------------------|
| `EW+1`   | sign     | 1 = negative (most significant bit)       |
| `EW:1`   | exponent | magnitude is `2**exponent`                |
| `0`      | nz       | 1 = non-zero; the all-zero code is zero   |

`EW` is 4 for the DaDianNao tile, which gives 6-bit codes for 16-bit one-hot
values. `EW` is 3 for the Laconic tile, which gives 5-bit codes for 8-bit
values. The sign-plus-exponent layout is the usual one for power-of-two
formats.

The `nz` flag is a choice of this implementation. The set
{0, ±1, …, ±2^(N-1)} has 2N+1 members, one more than sign plus exponent can
encode, so zero needs its own bit. The cost is one bit per value. Stored
Laconic values are therefore 5 bits wide instead of 4. Activations (after
ReLU) are unsigned and simply keep the sign bit at 0.

Weights and activations are quantized offline. Each layer's scaling factors
fold into the following batch-normalization step. Nothing here re-quantizes
results: the tiles output exact integer inner products of the codes they are
given, in units of the product of the two scaling factors.

## The datapath, bottom up

**`oh_exp_add`** is the multiplier. It adds the two exponents (`EW+1`-bit
result), XORs the signs and ANDs the `nz` flags. It is purely combinational.

**`hist_reduce`** is the histogram reduction unit. It has N inputs and
`NBINS = 2**(EW+1)` bins: 32 for the DaDianNao tile and 16 for the Laconic
tile. This covers exponent sums up to `2*(2**EW-1)`, and the top bin stays
empty. Each bin k holds a *signed* count: +1 for each positive term with
exponent k, and −1 for each negative one. Zero terms are not counted. The
output is `Σ count_k << k`. Only the final addition is wide. The per-bin
logic is N equality compares and a small counter. The bin counts are also
brought out (`hist`) so they can be observed. The unit is purely
combinational.

**`oh_pe`** is N exponent adders, one `hist_reduce` and a signed accumulator:

* `en` adds this cycle's reduced sum to `acc`.
* `clr` restarts the accumulator. With `en` high it restarts from this
  cycle's sum. With `en` low it clears to zero.
* `acc` reflects a set of pairs one clock edge after the set was presented.

The same element is used as a DaDianNao lane (N=16, EW=4, 48-bit
accumulator) and as a Laconic PE (N=16, EW=3, 32-bit accumulator).

**`lac_pe_array`** is 4 x 4 `oh_pe`s:

* Row r receives the 16 weights of output channel r.
* Column c receives the 16 activations of output neuron c. These are four
  adjacent output pixels.
* PE (r, c) accumulates the output of channel r at pixel c. A row of weights
  is reused four times, and so is a column of activations.

**`oh_buffer`** is a row-wide memory with one write port and one read port.
Read data is registered and appears one cycle after `re`. A read of a row
that is being written returns the old contents. It is used for:

* the DaDianNao weight buffer: 4096 rows x 256 codes;
* the DaDianNao activation buffer: 131072 rows x 16 codes;
* WSpad and ASpad: 1024 rows x 64 codes each.

**`lac_pspad`** holds 64 entries of 16 partial sums, one per PE. A write
either replaces an entry or adds to it (`wacc`). This lets an inner product
that is longer than the scratchpads be computed in several passes. All
entries are cleared at reset.

## Running a tile

Both tiles take the same kind of command: a start pulse with `w_base`,
`a_base` and `len`. The tile then streams rows `w_base…w_base+len-1` and
`a_base…a_base+len-1`, one pair of rows per cycle. This gives an inner product
of `16*len` terms per output.

* **DaDianNao tile.** The tile clears the lanes at start. `done` pulses
  `len+2` clock edges after the edge that sampled `start`. `psum[l]` then
  holds lane l's result until the next start. The activation buffer lives
  outside the tile, in the top level. The tile reads it through
  `act_re/act_raddr/act_rdata` and expects the data one cycle after the
  request.
* **Laconic tile.** After streaming, the tile writes the 16 accumulators to
  PSpad entry `ps_addr`. It adds them to the entry if `ps_acc` is set.
  `done` pulses `len+3` edges after start. Element `r*4+c` of a PSpad entry
  is PE (r, c). Read entries through `ps_re/ps_raddr/ps_rdata` (data one
  cycle later).

For both tiles, `busy` is high during a run, and a `start` during a run is
ignored. A new `start` is accepted in the cycle in which `done` is high, so
runs can follow each other with no idle cycle. `len = 0` is treated as 1.
The reset is synchronous and active low. Both tiles carry assertions: buffer
reads happen only during a run, and `done` is raised only as the tile
returns to idle.

Throughput is one row per cycle, every cycle:

* DaDianNao tile: 256 products per cycle.
* Laconic tile: 16 PEs x 16 = 256 products per cycle.

Example: a 3 x 3 x 256 kernel, shaped like AlexNet's conv3, is 144 rows. The
DaDianNao tile finishes 16 filters at one pixel in 146 cycles. The Laconic
tile finishes 4 filters x 4 pixels in 147 cycles.

### Laying out a convolution

A convolution becomes inner products (im2col). The testbench
`tb_alexnet_conv3` uses this order: row `j = (ky*3+kx)*16 + c/16`, with
channel `c%16` in lane `c%16` of the row. Positions outside the image (the
padding) are the zero code.

* For the DaDianNao tile, a weight-buffer row holds the same 16 channels for
  16 filters, and an activation row holds the 16 input values at one output
  pixel.
* For the Laconic tile, a WSpad row holds the row for 4 filters, and an ASpad
  row holds it for 4 output pixels.

## Sizes and how far they go

| parameter | value | origin |
|---|---|---|
| DaDianNao lanes x inputs | 16 x 16 | as the architecture defines it |
| DaDianNao exponent width | 4 (16-bit values) | as the architecture defines it |
| DaDianNao weight buffer | 4096 rows x 256 weights (1 M weights) | a 32 MB, 16-tile chip's share for one tile, counted in values |
| DaDianNao activation buffer | 131072 rows x 16 (2 M values) | 4 MB of 16-bit activations, counted in values |
| Laconic PE array | 4 x 4, 16 pairs per PE | as the architecture defines it |
| Laconic exponent width | 3 (8-bit values) | as the architecture defines it |
| WSpad / ASpad / PSpad depth | 1024 / 1024 / 64 | this implementation's choice |
| accumulators | 48 bit (DaDianNao), 32 bit (Laconic) | this implementation's choice |

The buffer capacities count values. The one-hot codes are narrower than the
16- or 8-bit words the capacities were first given for, so the same number of
bytes could hold more values.

What fits:

* One DaDianNao tile holds the weights of any single AlexNet convolution
  layer. The largest, conv3, has 884,736 weights.
* The activation buffer holds any AlexNet layer's input and output.
* VGG-16's largest layers do not fit one tile: 2.36 M weights in
  512x512x3x3, and 3.2 M activations after conv1_2. The 16-tile chip would
  hold the weights, but the chip is not built here.
* The Laconic scratchpads hold 1024 rows. Larger layers run as several passes,
  with refills from outside between them and PSpad accumulation joining the
  pieces.

What is not here:

* The 16-tile DaDianNao chip, and how its activations are spread over the
  tiles and results gathered from them.
* Any host or off-chip memory interface. The buffers have plain write ports.
* Hardware for batch normalization, activation functions or re-encoding of
  results into one-hot codes.
* The Booth-encoded baseline Laconic tile and the multiplier-based baseline
  DaDianNao tile. These are the designs this one is measured against, so
  their speed and size are not reproduced here.

## Simulation

Each module is in `rtl/<module>.sv`, the shared package is `rtl/ohn_pkg.sv`,
and each testbench is `tb/tb_<module>.sv`. `tb/tb_ohn_util.sv` holds the
integer reference arithmetic: it decodes codes and generates random codes.
Every testbench checks results against plain integer multiply-and-add,
counts checks and failures, and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each has a cycle watchdog.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ohn_pkg.sv tb/tb_ohn_util.sv tb/tb_ohn_accel_top.sv \
    --top-module tb_ohn_accel_top -Mdir obj && obj/Vtb_ohn_accel_top
```

Verilator finds the other modules in `rtl/` through `-Irtl`.

| testbench | what it covers |
|---|---|
| `tb_oh_exp_add` | all 64 x 64 code pairs |
| `tb_hist_reduce` | random sums, each bin count, one full bin, cancelling terms |
| `tb_oh_pe` | 3000 random cycles with random enable and clear |
| `tb_oh_buffer`, `tb_lac_pspad` | read latency, hold, read-during-write, replace and accumulate writes |
| `tb_dadn_oh_tile`, `tb_lac_oh_tile` | runs of several lengths, cycle counts, start while busy, split inner products accumulated in PSpad |
| `tb_lac_pe_array` | row/column sharing of operands |
| `tb_ohn_accel_top` | both tiles at full default size, running at the same time, back-to-back runs; counts that every mechanism occurred |
| `tb_alexnet_conv3` | conv3-shaped layer slice on both tiles at full size, against a direct convolution, padding included |

The two top-level testbenches use the full default sizes. Compiling them
takes about half a minute, and running them takes well under a second.
