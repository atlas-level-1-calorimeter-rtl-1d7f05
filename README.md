# Jet/Energy-sum Processor crate for a Level-1 calorimeter trigger

This is synthesizable SystemVerilog for the Jet/Energy-sum Processor (JEP) of the ATLAS Level-1
calorimeter trigger, modelled on the published description of its prototype Jet/Energy Module
(JEM). Each bunch crossing (25 ns, 40 MHz), calorimeter trigger data arrive on serial links.
Each JEM adds them into *jet elements* on a 0.2 x 0.2 grid in eta-phi and computes two things
from them:

* **energy sums**: the module's total transverse energy ET and its projections Ex and Ey,
  each coded to 8 bits for an energy merger module;
* **jet multiplicities**: the number of jets above each of eight programmable thresholds, where
  each threshold has its own window size (2x2, 3x3 or 4x4 jet elements).

Sixteen JEMs form a crate. Two merger modules (CMMs) add the sixteen results into crate energy
sums and crate jet multiplicities. Around this real-time path the modules carry test hardware:
playback memories that replace the link data with loaded patterns, spy memories that record
results, a link-phase synchronisation stage, a backplane loopback mode, and a readout controller
that sends event packets to the data acquisition (DAQ) and the Level-2 RoI (region of interest)
readout.

The block structure, channel counts, data widths, memory depth, the window sizes, the eight
thresholds and the eight-bunch-crossing energy latency come from the source description. That
description says *what* most blocks do but seldom *how*. Every detail it leaves open is a
choice of this design: the 8-bit energy code, the coefficient precision, the tie rule of the jet
algorithm, the register map, the packet formats and the synchronisation pattern. Each is listed
under "Design choices" below and in the header comment of its file.

## The jet-element grid: why modules share data

This is the part that is hardest to follow. It shapes the whole module.

A JEM *owns* a core of 4 (eta) x 8 (phi) jet elements, which is 64 input channels (EM and hadronic
for each element). A jet window up to 4x4 wide must be able to sit on a cluster at the edge of
the core, so the jet algorithm needs a border around it. It works on a **7 x 11** grid:

```
 phi row  10  Z   . . . . . . .      eta column:  0    1 2 3 4    5 6
           9  W   . . . . . . .                   ^    core       ^ ^
           8  H   . # # # # . .                   |               |
           ...    . # # # # . .         from lower-eta JEM   from higher-eta JEM
           1  A   . # # # # . .         (its column 4)       (its columns 1, 2)
           0  V   . . . . . . .
                      # = core (energy sums use only these)
```

* **Phi border (rows 0, 9, 10):** these arrive on the module's own links, because the upstream
  electronics send the towers near a quadrant boundary twice. So each JEM receives 4 x 11 = 44 jet
  elements, which is 88 links. One Input FPGA serves each phi row: 11 FPGAs with 8 links each.
* **Eta border (columns 0, 5, 6):** these come over the backplane from the two eta neighbours.
  Each JEM sends its highest core column (11 elements) to the higher-eta neighbour. It sends its
  two lowest core columns (22 elements) to the lower-eta neighbour. It receives 11 + 22 = 33
  elements back.

In grid indices, core cell (eta c, phi r) is `grid[r+1][c+1]`. The packed type is
`je_t [PHI_ALL-1:0][ETA_ALL-1:0]`, indexed `[phi][eta]`. The JEMs at the two ends of a quadrant
get zeros from the missing side.

A **backplane loopback device** (`loopback_fit` in the crate) connects a module's own outgoing
backplane data to its incoming ports: out-to-higher goes to in-from-lower (11 elements), and
out-to-lower goes to in-from-higher (22). The energy summation can then be switched (control
register bit `loopback`) to sum the duplicated columns 0, 5 and 6 instead of the core. This tests
the backplane paths.

## Clocking and latency

Everything runs on one **80 MHz clock** `clk`. The signal `bc` is high on every second clock and
marks a bunch crossing. All 40 MHz registers advance only when `bc` is high. Jet elements travel
between FPGAs, and between modules, as **two 5-bit halves at 80 Mb/s**: the low half first, then
the high half (`je_link_tx`, `je_link_rx`). The crate top makes `bc` itself; a bare `jem` takes
it as an input.

The energy path is eight bunch crossings long, from the link word at the Input FPGA to the
energy code at the JEM output. The latency matches the published measurement.

| BC | stage | block |
|----|-------|-------|
| 1 | sampling at the selected input phase | `input_sync` |
| 2 | EM + HAD sum (or playback word) | `input_fpga` |
| 3 | 80 Mb/s transmit register | `je_link_tx` |
| 4 | receive, grid assembled | `je_link_rx` in `main_processor` |
| 5 | row sums | `energy_sum` |
| 6 | cos/sin products, ET total | `energy_sum` |
| 7 | Ex, Ey totals | `energy_sum` |
| 8 | 8-bit coding, JEM output | `energy_encoder` |
| 9 | crate sums | `cmm_energy` |

These counts hold with the input phase at 0. Input phases 1 to 3 add up to one more bunch
crossing. The jet path has the same total latency: 2x2 sums, then maxima and windows, then
thresholds, then counts.

## Input FPGA

`input_fpga` handles one phi row: EM links 0 to 3 and hadronic links 4 to 7 for eta columns 0 to 3.

* **Input synchronisation** (`input_sync`). Cable and track delays differ from channel to channel.
  Each channel can sample its link through one of four taps of a delay line, 0 to 3 clocks late.
  While `sync_mode` is high, the upstream sends the synchronisation pattern: word `9'h1A5` in one
  bunch crossing out of four, zero in the others. The stage locks on the lowest tap that shows the
  word when its local bunch counter reads 0. The taps stand in for the four DLL clock phases of
  the original FPGA.
* **Playback** (`playback_mem`, 256 x 9 bits per channel). During a playback cycle the memory
  words replace the link words, one per bunch crossing.
* **Sum**: EM + HAD (9 + 9 bits) gives a 10-bit jet element. This sum cannot overflow.

## Main Processor

`main_processor` receives the 44 own and 33 neighbour elements and builds the grid. It feeds
`energy_sum`, `energy_encoder` and `jet_finder`, and records every bunch crossing's results in a
256-word spy memory.

**Energy sums.** The processor adds each core phi row r (0 to 7). Row r has the phi centre
`(8*quadrant + r + 0.5) * 2*pi/32`. The row sum is multiplied by that angle's cosine and sine,
stored as 8-bit fractions: `jem_pkg::cos_q0(r) = round(256*cos((r+0.5)*pi/16))`. The other
quadrants use the same table rotated by 90 degrees. The processor sums the products over the
rows and shifts them right by 8 (rounding toward minus infinity). The quadrant is a register,
so the same module works anywhere in the crate.

**Energy code** (8 bits, quad-linear). A 2-bit range r and a mantissa m stand for the value
`m << (3*r)`.
ET uses `{r, m[5:0]}` and saturates above 63*512. Ex and Ey use `{sign, r, |v| mantissa[4:0]}`
and saturate above 31*512. Low bits inside a range are dropped. `cmm_energy` decodes the same
code.

**Jet algorithm.**
1. The processor sums every 2x2 group of the grid, which gives 6 x 10 clusters.
2. The 32 clusters whose lower corner lies in the core are jet candidates. A candidate counts
   when it is a local maximum among its 8 overlapping neighbours. It must be *strictly greater*
   than the neighbours above or to the right, and *greater or equal* to those below or to the
   left. This asymmetric rule stops one flat deposit from being counted twice.
3. Each candidate gets three window energies: the 2x2 sum, the largest of the four 3x3 windows
   that contain the cluster, and the 4x4 window centred on it.
4. Threshold t passes when `window(win[t]) > thr[t]`. The number of passing candidates per
   threshold goes out as a 3-bit count that saturates at 7. The per-candidate bits
   (`roi_hits`) go to the RoI readout.

## Control, VME and the playback/spy cycle

`jem_control` holds the registers. The VME bus is modelled as a plain register bus: 16-bit
address, 16-bit data, `vme_we` and `vme_re` strobes. Read data appears on the clock after
`vme_re`. In the crate, `vme_slot` selects the JEM.

| address | contents |
|---------|----------|
| 0x0000 | bit0 playback enable, bit1 spy enable, bit2 loopback mode, bits5:4 quadrant |
| 0x0001 | write bit0: start a playback/spy cycle; bit1: start the readout spy memory |
| 0x0002 | read: bit0 playback running, bit1 spy running, bit2 readout spy running, bit3 all 88 channels locked |
| 0x0010+t | threshold t (14 bits; reset value all ones) |
| 0x0018+t | window size of threshold t: 0 = 2x2, 1 = 3x3, 2 = 4x4 |
| 0x1000-0x13FF | Main Processor spy: `addr[9:8]` selects the 16-bit slice of `{mult[7:0], Ey, Ex, ET}`, `addr[7:0]` the word |
| 0x2000-0x20FF | readout spy (DAQ words) |
| 0x8000-0xDFFF | playback: `addr[14:11]` phi row (FPGA), `addr[10:8]` channel, `addr[7:0]` word (read/write) |

A cycle starts from a VME command or from the TTC broadcast `ttc_start`. With playback enabled,
all memories play words 0 to 255 once. With spy enabled as well, the spy memory starts
`SPY_DELAY = 8` bunch crossings later, so spy word k holds the results of playback word k. With
spy alone, the spy records whatever the links deliver; this is how a live external data source
is checked.

## Readout

On `ttc_l1a`, `readout_controller` takes a snapshot of the event and sends one 16-bit word per
clock on each of two links. The jet elements in the snapshot are delayed by `JE_DELAY = 6` so
that they belong to the same bunch crossing as the results.

* **DAQ** (57 words):
  * header `{4'hA, bcid}`;
  * 44 words `{index[5:0], je[9:0]}`, with index = 4*phi row + eta column;
  * 3 words `{6'b111000, k[1:0], code}` for ET, Ex and Ey;
  * 8 words `{5'b11010, t, 5'b0, mult}`;
  * trailer `{4'hF, 12'd57}`.
* **RoI**: header `{4'hA, bcid}`, then one word `{3'b010, candidate[4:0], hits[7:0]}` for each
  candidate that passed any threshold, then the trailer `{4'hF, word count}`.

A readout signal that arrives while a packet is still being sent is dropped and counted in
`ro_lost`. There is no Level-1 latency buffer: the event read out is the one at the outputs when
the signal arrives. `bcid` counts bunch crossings from reset and wraps at 4096.

## Crate and mergers

`jep_crate` (the top) holds `N_QUAD = 2` quadrants of `JEMS_PER_QUAD = 8` modules. JEM j
belongs to quadrant j/8 and sits at eta position j%8. The crate includes the backplane wiring,
the loopback devices, `cmm_energy` (decodes and adds the 16 x 3 codes into 20-bit crate sums) and
`cmm_jet` (adds the 16 multiplicities per threshold and saturates at 7). The mergers only form
crate sums. The sums across crates and the final trigger decisions are outside this RTL.

## Design choices where the source is silent

* The 8-bit quad-linear energy code, the 8-bit trigonometric coefficients, and the sum widths
  (ET 15 bits, Ex/Ey 16 bits signed, crate sums 20 bits).
* The local-maximum tie rule, the choice of the 3x3 window, the strict `>` threshold compare and
  the 3-bit saturating multiplicities.
* The mapping of one Input FPGA to one phi row, and the order of the 5-bit halves.
* The synchronisation pattern and the delay-line model of the clock phases.
* The register map, the spy memory depth (256) and word layout, and the readout packet formats.
* The link words carry 9 data bits. The tenth bit of the 10-bit deserialiser word is not
  modelled.
* Zero neighbour data at the eta ends of a quadrant.
* The outputs and `vme_rdata` are registered or decoded as described in each file's header.

## Not included

* Commercial or external parts: the LVDS deserialisers, the TTC receiver chip, the G-Link
  serialisers, the FPGA configuration logic (SelectMAP, flash), the CANbus slow control and the
  upstream Preprocessor.
* Other modules: the Readout Driver, the test data source/sink, and the later redesigned module
  generation.
* Cross-crate merging and the Central Trigger Processor interface.
* The physics test patterns (simulated top-quark-pair events). The testbenches use random,
  counter and ramp patterns instead.

## Files

* `rtl/jem_pkg.sv`: sizes, types, the cos table and the code functions.
* `rtl/`: one module per file.
  * `jep_crate`: the crate top.
  * `jem`: one module.
  * `input_fpga`, `input_sync`, `playback_mem`: the Input FPGA and its parts.
  * `je_link_tx`, `je_link_rx`: the 80 Mb/s links.
  * `main_processor`, `energy_sum`, `energy_encoder`, `jet_finder`: the Main Processor and its
    algorithms.
  * `spy_mem`, `jem_control`, `readout_controller`: test memories, control and readout.
  * `cmm_energy`, `cmm_jet`: the mergers.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_ref_pkg.sv`: reference models written apart from the RTL. They use `$cos`/`$sin` for
  the coefficients, search for the code range, and run the jet algorithm by direct loops.
* `tb/tb_jep_crate.sv`: runs the whole crate at its default size (16 JEMs, 1408 links). It checks
  link synchronisation, the 8+1 BC latency, the per-module and crate results for random events
  (including data shared across module boundaries and a saturating crate multiplicity), the
  loopback device, a TTC-started playback/spy cycle read back over VME, and a readout of all
  modules with one readout signal dropped.
* `tb/tb_jem_workloads.sv`: the module-level test runs on one JEM. First, four playback/spy
  cycles of 256 events each, with every channel filled from a falling exponential over 0..511.
  Each spy word is compared with a floating-point sum that uses exact cos/sin: ET must match
  exactly, and Ex/Ey must lie within one code step plus the coefficient rounding. Second, a
  16-channel live feed into each of the four pairs of core Input FPGAs, captured by the spy
  memory alone.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/jem_pkg.sv tb/tb_ref_pkg.sv tb/tb_jep_crate.sv --top-module tb_jep_crate
./obj_dir/Vtb_jep_crate
```

Testbenches that do not use the reference models do not need `tb/tb_ref_pkg.sv`, but it does
no harm to include it. Building the crate model takes about half a minute; it then runs in a few
seconds.

## How far to trust it

Every block's testbench passes. Each one was also run against a copy of its block with one
deliberate fault, and each failed there.
The reference models share the source's description, not the RTL code. They agree with the
RTL on the choices listed above because both implement the same choices: those choices are
plausible, not confirmed. The real module's Main Processor firmware for the jet algorithm was
still being reworked when the prototype was described, so the jet algorithm here is a
reconstruction from its functional description.
