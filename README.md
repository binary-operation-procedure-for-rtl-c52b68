# Pixel-array circuit for parallel binary thinning

Thinning reduces every ridge of a binary image (1 = ridge, 0 = background) to
a one-pixel-wide skeleton that keeps the ridge's connectedness. Fingerprint
minutiae detection is the typical use. This design places a tiny processor
in every pixel of an image-sensor array. All pixels decide at the same time
whether they are an edge pixel that does not belong to the skeleton, and if
so they delete themselves. Three constraints shape the design:

* **Four links per pixel.** A pixel is wired only to its N, E, S and W
  neighbours. The four diagonal neighbours of the 3x3 window reach it
  indirectly.
* **Only two-input logic.** There is no counting and no arithmetic. The
  deletion rule uses XORs of adjacent pixels and two-input AND/NOR/OR terms.
* **Shared partial results.** Each pixel computes 2 of the 12 XORs its window
  needs and a few two-input terms, and passes them to its neighbours. One
  sub-iteration takes 8 clock cycles, whatever the image size.

## The deletion rule

Name the window around centre pixel P like this (P1 is north):

    P8 P1 P2
    P7 P  P3
    P6 P5 P4

Define the neighbour differences `X1 = P1^P2, X2 = P2^P3, ..., X8 = P8^P1` and
the centre differences `X9 = P^P1, X10 = P^P3, X11 = P^P5, X12 = P^P7`.

* `Fa = X1.X2 + X2.X3 + ... + X8.X1` is true when two *consecutive
  discontinuities* lie around the centre. It marks the centre as part of a
  skeleton line or line end, so the pixel is kept.
* `Fb = (X9^X11) + (X10^X12)` is false for a pixel inside a region, for an
  isolated pixel and for some skeleton shapes. Only pixels with Fb = 1 may
  be deleted.
* `Fc1 = X10 + X11 + X9.X12` and `Fc2 = X9 + X12 + X10.X11` choose the side
  of the region. Fc1 allows deletion on the lower-right edges and Fc2 on the
  upper-left edges.

One iteration has two sub-iterations. The first deletes every pixel with
`~Fa . Fb . Fc1`, the second every pixel with `~Fa . Fb . Fc2`, and each
sub-iteration decides from the image the previous one left. Taking the two
sides in turn stops a two-pixel-wide ridge from being erased from both sides
at once. A ridge loses about two pixels of width per iteration. A
500 dpi fingerprint typically needs about ten iterations (twenty
sub-iterations).

`Fa` needs eight pairs of inputs. The circuit uses an equivalent form with
only four pairs, `~Fa . Fb = ~Fd . ~Fe . Fb`, where

    Fd = X2.X3 + X4.X5 + X6.X7 + X8.X1
    Fe = (X2+X3) . (X4+X5) . (X6+X7) . (X8+X1)

This is not the same as `Fa = Fd + Fe` for every window. The equivalence
holds only together with `Fb`. It was confirmed over all 512 windows. The
testbenches' reference model uses the original `Fa` form, so the circuit's
decomposition is checked against an independent formulation.

## How a pixel gets its twelve differences over four links

Every pixel holds the following latches:

| latch | holds | written in |
|---|---|---|
| m  | the pixel value, loaded from the sensor, reset on deletion | load unit; end unit |
| m1 | X10 = P ^ east neighbour (local XOR) | s1 |
| m2 | X11 = P ^ south neighbour (local XOR) | s1 |
| m3 | X12, the west neighbour's own m1 | s2 |
| m4 | X9, the north neighbour's own m2 | s2 |
| m5 | preset 1, cleared by any AND term received, so it ends as ~Fd | s3..s6 |
| m6 | preset 1, cleared by any NOR term received, so it ends as Fe | s3..s6 |

Every latch except m is preset to 1 at the start of each sub-iteration.
After that a latch can only be pulled down. The sub-iteration then runs as
follows:

| unit | control | pixel drives | pixel reads |
|---|---|---|---|
| 0 | `preset_o` (+`load_m` first time) | — | — |
| 1 | `s[1]` | m on N and W | E and S neighbours' m into the two XORs |
| 2 | `s[2]` | m1 (X10) on E, m2 (X11) on S | W into m3, N into m4 |
| 3 | `s[3]` | ~(X10+X12) on N, X9.X11 on W | E into m5, S into m6 |
| 4 | `s[4]` | X10.X12 on S, ~(X9+X11) on E | N into m5, W into m6 |
| 5 | `s[5]` | X10.X12 on N, ~(X9+X11) on W | S into m5, E into m6 |
| 6 | `s[6]` | ~(X10+X12) on S, X9.X11 on E | W into m5, N into m6 |
| 7 | `end_sub1` / `end_sub2` | — | m cleared if m5 & ~m6 & Fb & Fc1/Fc2 |

The shared terms work because of a change of frame. The east neighbour's
(X9, X11) pair is the centre's (X2, X3). The north neighbour's (X10, X12) pair
is the centre's (X1, X8). The south neighbour's (X10, X12) pair is (X4, X5),
and the west neighbour's (X9, X11) pair is (X7, X6). In units 3 to 6 every
neighbour therefore delivers exactly one Fd term and one Fe factor. Fb, Fc1
and Fc2 need only m1 to m4, which are local after unit 2.

In every unit, each pixel drives two of its links and reads the other two.
Each link is driven from only one end, which an assertion in `pixel_array`
checks. A physical link is one bidirectional wire. In this RTL it is two
one-way wires, each with a drive enable, because the RTL has no tri-state
nets. A link nobody drives reads 0.

## Control sequence and timing

`iter_sequencer` broadcasts one control word (`thin_pkg::ctl_t`) to every
pixel. One clock cycle is one time unit.

* `start` (while idle) begins a run of `n_iter` iterations. `n_iter = 0` runs
  one iteration.
* The image on `acq` is loaded in the first cycle after `start`.
* `busy` lasts exactly `16 * n_iter` cycles. `done` pulses for one cycle after
  it, and `pix` then holds the result. The image stays unchanged while the
  sequencer is idle.
* With a 10 ns time unit, ten iterations take 160 cycles, or 1.6 µs.

The number of iterations is an input because it depends on the thickest
ridge. There is no automatic end-of-thinning detection.

## Modules

| file | what it is |
|---|---|
| `rtl/thin_pkg.sv` | control-word struct, link-direction enum, constants |
| `rtl/cr_latch.sv` | memory cell: load, preset to 1, conditional pull-down reset |
| `rtl/switch_unit.sv` | per-pixel link crossbar, following the table above |
| `rtl/pixel.sv` | one pixel: XORs, latches m and m1..m6, AND/NOR/XOR gates, deletion condition |
| `rtl/pixel_row.sv` | a row of pixels with their east/west links joined |
| `rtl/pixel_array.sv` | ROWS x COLS rows stacked, plus the background ring |
| `rtl/iter_sequencer.sv` | control sequence generator |
| `rtl/thinning_top.sv` | sequencer + array |

Each cell is modelled as an edge-triggered flip-flop. The actual cell is a
cross-coupled inverter pair with an NMOS pull-down network. The NMOS
pass-transistor gates are modelled as ordinary logic.

## Where this RTL departs from, or adds to, the circuit it implements

* **Array size.** The circuit is evaluated at 256 x 256 pixels. The default
  here is `ROWS = COLS = 96`. Elaborating the flattened array costs about
  0.5 MB per pixel in lint (8.4 GB at 128 x 128) and at least as much again in
  synthesis. A full 256 x 256 array would therefore need well over 32 GB per
  tool run. The RTL supports `ROWS = COLS = 256`.
* **Border.** The circuit does not say what lies beyond the array. Here the
  array is ringed by extra pixels whose sensor input is tied to 0. Each real
  pixel therefore sees background outside the image, exactly as if the image
  were padded with zeros.
* **Sensor and read-out.** The photodiode and current comparator are analog
  and are not modelled. `acq` carries their binary outputs. No read-out
  scheme is defined for the array, so every latch m appears in parallel on
  `pix`.
* **Pull-down network of m.** The gate-level form of m's reset network is not
  given. It is written directly from the deletion condition
  `m5 & ~m6 & Fb & Fc`.
* **Latch numbering.** In this RTL, m1/m2 are the local XORs with the east
  and south neighbours, and m3/m4 are the values received from the west and
  north. A numbering that lists X9..X12 in order would give other latch
  numbers for the same wiring.
* **Reset and handshake.** `rst_n` (asynchronous clear), `start`/`busy`/`done`
  and the iteration counter are additions of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_cr_latch` checks directed and random load/preset/reset patterns
  against a model of the cell.
* `tb_switch_unit` checks every select against the routing table.
* `tb_pixel` acts as the four neighbours. It runs all 512 windows in both
  sub-iterations, checks every value driven on the links, and compares the
  new pixel value with the single-window rule.
* `tb_iter_sequencer` checks the control word cycle by cycle for runs of 1,
  3, 0 (treated as 1) and 10 iterations, plus the busy/done timing, and that
  `start` is ignored during a run.
* `tb_pixel_array` uses a 10 x 12 array with random, solid and striped
  images. After every sub-iteration it compares the image with the
  reference.
* `tb_thinning_top` uses a 24 x 24 array. It runs an H shape with 4- and
  5-pixel-wide strokes, which ends as a one-pixel skeleton after 4
  iterations, then slanted ridges, random blobs, and a run with
  `n_iter = 0`. It checks the image after every sub-iteration and the
  16-cycles-per-iteration timing. It also counts deletions in each
  sub-iteration, pixels kept by Fc, by Fa and by Fb, and requires each to
  occur.

`tb/thin_ref_pkg.sv` is the reference model used by the last three
testbenches.

The largest simulated size is 24 x 24. A full-size (96 x 96) simulation
was not run: building the flattened array for simulation costs far more
time and memory than linting it.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/thin_pkg.sv tb/thin_ref_pkg.sv rtl/cr_latch.sv rtl/switch_unit.sv \
      rtl/pixel.sv rtl/pixel_row.sv rtl/pixel_array.sv rtl/iter_sequencer.sv \
      rtl/thinning_top.sv tb/tb_thinning_top.sv --top-module tb_thinning_top
    ./obj_dir/Vtb_thinning_top
