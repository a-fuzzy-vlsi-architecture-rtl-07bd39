# Fuzzy rule-based pixel classifier for multispectral images

This is a small, fully parallel circuit that assigns each pixel of a
multispectral image to a class. It uses fuzzy rules with trapezoidal
membership functions, not a statistical method such as maximum likelihood.
The classifier needs only comparisons, subtractions and one scaled
division per band, with no floating point and no lookup tables. Every band
of every class is evaluated at the same time.

The default configuration handles:

- eight spectral bands per pixel
- four classes of interest plus one rejection class
- 8-bit data throughout

A host loads the rule parameters and then streams pixels through a byte-wide
write port. Each classification ends with a result word and an interrupt.
Pixels are handled one at a time and no image is stored, so the image can be
any size.

## The classification rule

For a pixel with band values x1..x8, class k gets a membership degree in
each band j from a trapezoid with corners `a <= b <= c <= d`:

```
u(x) = 0                    x < a  or  x > d
u(x) = (x - a) / (b - a)    a <= x <  b      rising side
u(x) = 1                    b <= x <= c      plateau
u(x) = (d - x) / (d - c)    c <  x <= d      falling side
```

Each band's condition is one *sub rule*. A class's rule is the AND of its
eight sub rules. In fuzzy logic an AND is a minimum, so the *discriminant
value* of class k is

```
g_k = min_j u_kj(x_j)
```

The pixel goes to the class with the largest g_k. The rejection class is the
complement of the union of the four classes, so its degree is `1 - max_k g_k`.
It wins exactly when `max_k g_k < 0.5`. The hardware therefore takes the
maximum, and rejects the pixel when that maximum is below half scale.

Trapezoids let each band's membership be asymmetric, to fit skewed
histograms. The corners are computed offline from training data and loaded
into the design. This RTL does not compute them.

### Fixed-point form

Degrees are bytes, and 1.0 is coded as 255. A ramp is computed as

```
u = floor(255 * distance / width)
```

where `distance` is `x - a` on the rising side and `d - x` on the falling
side, and `width` is `b - a` or `d - c`. The result never exceeds 255,
because distance <= width inside a ramp.

Only one ramp can be active for a given x, so `trap_mf` shares one 8x8
multiplier and one 16/8 divider between both sides. The divisor is never
zero when a ramp is selected: if `a == b`, no x satisfies `a <= x < b`.
Equal corners therefore give vertical sides, which is how a crisp interval
is written. The four cases are tested in the order shown above, so corners
loaded out of order still give a defined degree.

The rejection threshold is 127.5 on this scale. The integer test is
`max < 128`, so values 0..127 are rejected and 128..255 are accepted.

## Datapath

```
           pixel bytes / corners (byte writes)
                         |
      +---------+---------+---------+---------+
      |  DFU 0  |  DFU 1  |  DFU 2  |  DFU 3  |   one per class
      | MBFU    | MBFU    | MBFU    | MBFU    |   8 x trap_mf, degrees registered
      | MIN8    | MIN8    | MIN8    | MIN8    |   tree of 7 min2, g registered
      +----+----+----+----+----+----+----+----+
           g0        g1        g2        g3
            \        |         |        /
             +--------- SELECTOR --------+
             |  MAX4: 3 x max2 -> max, Wn |
             |  class_dec: Wn -> index    |
             |  rej: max < 128 -> reject  |
             +-------------+--------------+
                           |
                 result registers, int_o
```

- **`trap_mf`**: one sub rule, which is one trapezoid evaluated on one band
  value. It is combinational.
- **`mbfu`** (Membership Functional Unit): holds one class's 8 x 4 corner
  bytes and a copy of the current pixel. Both are loaded one byte at a time.
  It runs eight `trap_mf` in parallel and registers the eight degrees.
- **`min8`**: a balanced tree of seven `min2` cells (4 + 2 + 1). It computes
  the fuzzy AND of the eight degrees.
- **`dfu`** (Discriminant Functional Unit): an `mbfu` followed by `min8`,
  with `g_k` registered.
- **`max2` / `max4`**: two leaf comparators (classes 0/1 and 2/3) and a
  root comparator. Each one also outputs a winner bit. The bits are
  `wn = {root, pair 2/3, pair 0/1}`, where 0 means the first input won. On a
  tie the first input wins, so the lower-numbered class wins ties.
- **`class_dec`**: turns the winner bits into a class index:
  `idx = {wn[2], wn[2] ? wn[1] : wn[0]}`.
- **`rej`**: replaces the index with the rejection code when the maximum is
  under half scale.
- **`selector`**: contains `max4`, `class_dec` and `rej`. It is
  combinational.
- **`fuzzy_classifier`**: the top level. It decodes host writes, holds the
  four DFUs and the selector, and runs a two-state controller (idle, run).

Shared constants and types are in `fuzzy_pkg`: sizes, the address map, the
`class_t` result code (0..3 for classes, 4 for rejection) and the pipeline
depth.

## Host interface and timing

The top has a plain synchronous write port. A bus bridge, for example a PCI
target, is expected to drive it. The bridge is not part of this RTL.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `we`, `addr`, `data_in` | in | 1, 8, 8 | one byte write per cycle with `we` high |
| `busy` | out | 1 | a classification is running; writes are ignored |
| `result_class` | out | 3 | `class_t`: 0..3 for a class, 4 for rejected |
| `result_degree` | out | 8 | winning discriminant value (max g_k) |
| `result_rejected` | out | 1 | the pixel was rejected |
| `int_o` | out | 1 | result ready; held high until acknowledged |

Address map:

| Address | Write effect |
|---|---|
| `0x00`-`0x7F` | corner register. `addr[6:5]` = class, `addr[4:2]` = band, `addr[1:0]` = corner (0=a, 1=b, 2=c, 3=d) |
| `0x80`-`0x87` | pixel byte of band `addr[2:0]`, sent to all four DFUs. Writing band 7 starts a classification |
| `0x88` | clears `int_o` |

To classify one pixel, write bands 0..7 with band 7 last. The write of
band 7 is taken at clock edge t, and then:

- at edge t+1, the 32 degrees are registered
- at edge t+2, the four g_k are registered
- at edge t+3, the selector output is captured into `result_*` and `int_o`
  rises

`busy` is high from edge t to edge t+3. A pixel therefore takes 8 writes
plus 3 cycles, or 11 cycles. At a 33 MHz bus clock that is about 3 Mpixel/s.
Corners may be changed between pixels, even a single byte at a time.

Host writes made while `busy` is high are dropped. They include pixel bytes,
corners and acknowledges. Without this, a result could mix two pixels or two
parameter sets.

`int_o` is a level signal. It is cleared by a write to `0x88`, or by the
start of the next classification. A host that polls can skip the
acknowledge. `result_*` hold their values until the next result is ready.

After reset all corners and pixel bytes are zero, `result_class` is 4
(rejection) and `int_o` is low.

## Choices beyond the original architecture

The unit structure is taken from the original architecture: a MBFU per
class, a MIN8 tree, DFUs, a MAX4 with winner bits, a class decoder, a
rejection unit and a selector. So are the 8-bit data path, the threshold of
half of 255, and the Addr/Data_in configuration port with an interrupt.

The following are this implementation's own choices:

- the fixed-point ramp with its shared divider (the architecture only says
  the ramps are simple linear operations)
- the address map, the start on the last pixel byte, `busy`, dropping writes
  while busy, and the interrupt acknowledge
- the two pipeline registers (degrees and g_k), which set the latency to
  three cycles
- lower-index-wins tie breaking and the class result code
- seven `min2` cells in `min8`, the number a tree over eight inputs needs
  (the architecture counts eight)
- the asynchronous reset

## Limits

- **Fixed sizes.** The band and class counts are set in `fuzzy_pkg`, but
  `min8`, `max4`, `class_dec` and the address map are written for exactly
  8 bands and 4 classes. Hyperspectral data with many more bands would need a
  wider minimum tree and a wider address. The width `W` is a parameter.
- **Area.** Each sub rule has its own divider: 32 dividers in total. This
  follows the one-hardware-unit-per-sub-rule organisation. A small FPGA would
  need a cheaper ramp, such as a slope precomputed by the host and a
  multiplier.
- **Timing.** The divider in `trap_mf` is the longest path. No timing
  closure has been done.
- **Not included.** There is no PCI or other bus logic, and no software to
  derive the corners.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
model is in `tb/fuzzy_ref_pkg.sv`. It evaluates the trapezoid in real
arithmetic and maps it to `floor(255 * fraction)`, then applies the
minimum, the first-maximum rule and the 127.5 threshold.

| Testbench | What it covers |
|---|---|
| `tb_trap_mf` | all 256 inputs for 47 trapezoids, including degenerate ones (equal corners, full range) |
| `tb_min2`, `tb_max2` | corners and random pairs; winner bit and ties |
| `tb_min8`, `tb_max4` | extreme value at every position; random vectors; ties |
| `tb_class_dec` | all 8 winner patterns |
| `tb_rej` | every maximum 0..255 with every class index |
| `tb_selector` | values around the threshold at every position; random sets |
| `tb_mbfu` | byte loading, reset state, 1000 pixels over 20 parameter sets, one-cycle latency |
| `tb_dfu` | 1000 pixels over 20 parameter sets, exact two-cycle latency |
| `tb_fuzzy_classifier` | the whole design at its default size |

`tb_fuzzy_classifier` programs random trapezoids for all classes and
streams a 32 x 32 synthetic image. Pixels are drawn inside one class, as a
mixture of two classes, or at random. Each result is compared with the
model, and the testbench checks the three-cycle latency and `busy` for every
pixel. It counts these events and fails if any of them never occurs:

- each class wins
- a pixel is rejected
- two classes tie
- a write is made while busy and is dropped
- the interrupt is acknowledged
- a new start clears the interrupt
- a corner is reprogrammed

An assertion checks that `int_o` only rises at the end of a classification.

Each testbench was also run against a deliberately broken copy of its
module, and each one reported failures.

### Running a testbench

Verilator 5 with timing support is needed. From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fuzzy_pkg.sv tb/fuzzy_ref_pkg.sv tb/tb_fuzzy_classifier.sv \
  --top-module tb_fuzzy_classifier -o sim
./obj_dir/sim
```

For another testbench, change the file and top names. The package files
must come first on the command line. The end-to-end run takes well under a
second.
