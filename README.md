# Reconfigurable combinational linear decompressor

A test-data decompressor sits between a few tester channels and the many scan
chains of a chip. In a *combinational linear* decompressor an XOR network
expands the B bits the tester sends in each shift cycle into one bit for each
of the N scan chains. Every scan cell then holds a fixed XOR (a linear
function over GF(2)) of the tester's bits, the *free variables*. A test cube
(a scan pattern with most bits left as don't-care) can be delivered only if
the linear equations of its specified bits have a solution. The set of
patterns the network can produce, its *output space*, is fixed by its wiring.

This design makes that output space selectable. A stage of small multiplexers
between the XOR network and the scan chains decides which network output feeds
which chain. Eight configuration bits, sent to the chip before each test cube,
drive the multiplexer selects. A cube that the original network cannot produce
can often be produced under one of the 256 configurations. The extra hardware
is one 4:1 multiplexer per chain, an 8-bit register and one more tester
channel. The design follows the method published as *Reconfigurable Linear
Decompressors Using Symbolic Gaussian Elimination*. The configuration for each
cube is found off-chip by *symbolic Gaussian elimination*, which the
testbenches implement.

There are two ways to use the gain:

* Keep the 32 data channels and accept denser test cubes. This allows more
  test compaction and fewer patterns.
* Keep the test cubes and use fewer data channels.

## Structure

```
            chan_i[B-1:0]                       cfg_si, cfg_shift, cfg_update
                 |                                          |
          +-------------+  net_o[N-1:0]  +-------------+    |   +-----------------+
 tester ->| xor_network |--------------->| reconfig_   |<---+---| config_register |
          | (B -> N,    |                | mux_stage   |  cfg_o | shadow + active |
          |  7 taps)    |                | N x 4:1 mux |        +-----------------+
          +-------------+                +-------------+
                                                |
                                          chain_o[N-1:0] -> scan-in of the N chains
```

| module                  | what it is                                                                 |
|-------------------------|----------------------------------------------------------------------------|
| `rdc_pkg`               | default sizes, and the formula that wires the XOR network                  |
| `xor_network`           | combinational B-to-N XOR expansion, one row of the matrix A per output      |
| `reconfig_mux_stage`    | one MUX_IN-input multiplexer per chain, selects taken from the configuration |
| `config_register`       | serial shadow register on the configuration channel, plus the active register |
| `reconfig_decompressor` | top level: the three blocks wired together                                 |

The scan chains belong to the circuit under test, so they are not part of the
RTL. `chain_o` is the scan-in value of every chain for the current shift cycle.

### Default parameters

| parameter | default | meaning                                   | origin |
|-----------|---------|-------------------------------------------|--------|
| `B`       | 32      | data channels from the tester             | evaluated configuration |
| `N`       | 1024    | scan chains (512 was evaluated as well)   | evaluated configuration |
| `MUX_IN`  | 4       | inputs of each reconfiguration multiplexer | evaluated configuration |
| `NCFG`    | 8       | configuration bits per cube               | evaluated configuration |
| `TAPS`    | 7       | network inputs XORed into each output     | this design's choice |

## The XOR network

Output `j` is the XOR of `TAPS` distinct inputs. The inputs are picked by a
fixed pseudo-random formula (`rdc_pkg::tap_mask`):

```
s(0)   = j * 2654435761 + 1              (mod 2^32)
s(k+1) = s(k) * 1664525 + 1013904223     (mod 2^32)
input  = (s(k+1) >> 16) mod B            repeats skipped, until TAPS inputs are chosen
```

The method puts no condition on the network: any combinational linear
expansion can be made reconfigurable. Seven taps were chosen because very
sparse networks produce identical rows. With three taps, 81 of the 1024 rows
repeat, and two chains with the same row cannot receive opposite specified
bits in the same cycle. To use another network, replace `tap_mask` or the
body of `xor_network`.

## How the configuration rewires the chains

This is the part of the design that needs the most care when it is changed.
With four inputs per multiplexer each select is 2 bits wide, and eight
configuration bits give four select fields. The chains are therefore split
into four groups, and each group shares one field:

```
group of chain i       g = i mod 4
select of chain i      k = cfg[2g+1 : 2g]
chain i receives       net_o[(i + k * N/4) mod N]
```

* `k = 0` is the chain's own network output, so configuration `8'h00` (the
  reset value) is the original, unreconfigured decompressor.
* `N/4` is a multiple of 4, so every source of a chain lies in the chain's own
  group. Each configuration is therefore a *permutation* of the network
  outputs over the chains. Reconfiguring exchanges which equation (row of A)
  belongs to which scan cell. The method's basic example does the same: a
  cube becomes solvable after the equations of two scan cells are swapped.
* The method specifies the multiplexers, their four inputs and the eight
  bits. The grouping and the choice of inputs are this design's own.
  `reconfig_mux_stage` checks at elaboration that the sizes keep the
  permutation property: `MUX_IN` a power of two, `NCFG` a multiple of
  log2(`MUX_IN`), and `N/MUX_IN` a multiple of the group count.

## Applying a test cube

The decompressor is *continuous-flow*. Each clock cycle of scan shifting,
the tester drives one word of free variables on `chan_i`, and `chain_o`
follows combinationally in the same cycle. There is no latency and no idle
cycle, so a cube of scan length L takes exactly L cycles.

The configuration travels on its own channel:

1. `cfg_si` with `cfg_shift = 1` for 8 cycles. Bits are sent least
   significant first: after 8 shifts the first bit sent is `cfg[0]`.
2. `cfg_update = 1` for one cycle. The shadow register is copied to the
   active register on that clock edge, and the next cycle uses the new
   configuration. If `cfg_shift` and `cfg_update` are high together, the
   active register gets the value from before that shift.

Because the shadow register is separate from the active one, the next cube's
configuration can be shifted in during the first 8 cycles of the current
cube. The update is then given in the cube's last cycle, so consecutive cubes
follow each other with no gap. The method only says that the bits are loaded
before each cube. The shadow register, the strobes and the bit order are this
design's choices. `rst_n` is asynchronous and active low, and clears both
registers.

## Finding a configuration: symbolic Gaussian elimination

For a fixed configuration, a cube is solvable when the equations `A x = b`
of its specified cells have a solution. Symbolic elimination handles all 256
configurations at once. Each matrix entry is a Boolean function of the
configuration bits, stored as a 256-bit vector with one bit per minterm. A row
operation becomes bitwise logic:

```
for every row r other than the pivot row p (pivot column j):
    F[r][*] ^= F[r][j] & F[p][*]        y[r] ^= F[r][j] & y[p]
```

The pivot of the first column is the entry with the most minterms. Each later
pivot is the entry with the most minterms in common with the pivots already
chosen. The cube can be produced under exactly those configurations for which
no all-zero row keeps a 1 on its right-hand side.

The testbench package `tb/rdc_tb_pkg.sv` implements this, with three
refinements:

* **One system per shift cycle.** The network is combinational, so the
  variables of one shift cycle only reach the cells loaded in that cycle. The
  elimination runs cycle by cycle (about 32 columns each), and the per-cycle
  sets of configurations are ANDed.
* **Complete elimination.** A pivot that is 0 under some configurations
  leaves the column uneliminated for those configurations. The package then
  takes further pivots in the same column for exactly those minterms, and
  tracks for every row the configurations under which it is pivoted. The
  result is the exact set of configurations that work. For cubes of up to 32
  cycles the end-to-end test checks this against an exhaustive search of all
  256 configurations, and it has always matched.
* **Free variables.** Ordinary elimination under the chosen configuration
  gives the free variables for the tester. Unconstrained variables are random.

## Behaviour on random test cubes

`tb_table1_sweep` repeats the random-cube experiments on this RTL, on the
default 1024-chain build and on a 512-chain build.

* **Increasing specified bits.** All 32 data channels are used. The share of
  specified bits is raised in 0.1 % steps, with one random cube per step,
  until the original network fails and then until every configuration fails.
* **Reducing channels.** Four cubes at the original network's limit are
  solved with fewer and fewer data channels, the dropped channels held at 0.
  The count stops at the smallest number for which every cube still has a
  configuration. The configuration channel counts as one more tester channel.

One seed gave these figures:

| chains x length | specified bits, original → reconfigured | encoding efficiency | tester channels (incl. configuration) | compression ratio |
|-----------------|-----------------------------------------|---------------------|---------------------------------------|-------------------|
| 1024 x 24       | 2.1 % → 2.5 %                           | 0.67 → 0.79         | 32 → 29                               | 32.0 → 35.3       |
| 1024 x 32       | 2.1 % → 2.5 %                           | 0.67 → 0.79         | 32 → 30                               | 32.0 → 34.1       |
| 1024 x 64       | 2.0 % → 2.3 %                           | 0.64 → 0.73         | 32 → 30                               | 32.0 → 34.1       |
| 1024 x 128      | 1.8 % → 2.1 %                           | 0.58 → 0.67         | 32 → 29                               | 32.0 → 35.3       |
| 512 x 24        | 4.2 % → 4.9 %                           | 0.67 → 0.78         | 32 → 30                               | 16.0 → 17.0       |
| 512 x 32        | 3.3 % → 4.7 %                           | 0.53 → 0.75         | 32 → 26                               | 16.0 → 19.6       |
| 512 x 64        | 2.2 % → 4.7 %                           | 0.35 → 0.75         | 32 → 21                               | 16.0 → 24.3       |
| 512 x 128       | 3.5 % → 4.4 %                           | 0.56 → 0.70         | 32 → 29                               | 16.0 → 17.6       |

The encoding efficiency is specified bits divided by the bits stored on the
tester, with the 8 configuration bits per cube counted. Each limit comes from
a single random cube, so it varies by a few tenths of a percent from seed to
seed. The 512 x 64 starting point, for example, is an unlucky low sample.

The published evaluation used a different XOR network and its own random cubes.
It reports about the same gain in specified bits: 1.5 % to 1.7 % rising to
2.2 % to 2.3 % for 1024 chains, with efficiencies near 0.7 after
reconfiguration. Its channel reduction is larger, to 22 to 24 tester channels
(compression ratio up about 33 % to 45 %). With this network and these
four-cube test sets the channel reduction is smaller. The hardware itself does
not limit this: the result depends on the test set and on the network.

## Where this design departs from, or adds to, the method

* XOR network wiring (7 pseudo-random taps per output): the method allows any
  combinational linear network.
* Multiplexer input choice, select grouping and configuration bit layout: see
  above.
* Shadow/active configuration register, strobes, bit order and reset.
* The option of storing configurations in an on-chip ROM instead of sending
  them from the tester is not implemented.
* When one configuration suits a whole test set, the method hard-wires it,
  which means redesigning the network. This RTL instead loads that
  configuration once and keeps it. The end-to-end test exercises this.
* The extra pivots per column in the elimination (testbench only), which make
  the computed set of configurations exact.

## Simulating

All files are SystemVerilog-2017. Packages must come first. With Verilator 5:

```
# one block, e.g. the network
verilator --binary --timing --assert -Irtl -Itb rtl/rdc_pkg.sv rtl/xor_network.sv \
          tb/tb_xor_network.sv --top-module tb_xor_network -o sim && ./obj_dir/sim

# end to end, default sizes (about one second of simulation after the build)
verilator --binary --timing --assert -Irtl -Itb rtl/rdc_pkg.sv rtl/xor_network.sv \
          rtl/reconfig_mux_stage.sv rtl/config_register.sv rtl/reconfig_decompressor.sv \
          tb/rdc_tb_pkg.sv tb/tb_reconfig_decompressor.sv \
          --top-module tb_reconfig_decompressor -o sim && ./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_xor_network`           | every output against an independently rebuilt matrix, one-hot and random inputs |
| `tb_reconfig_mux_stage`    | all 256 configurations: chain i gets output (i + k·N/4) mod N, ones preserved |
| `tb_config_register`       | reset, bit order, update timing, 2000 random strobe cycles against a model |
| `tb_reconfig_decompressor` | 16 random cubes (L = 24 to 128, 1.0 % to 2.4 % specified), solved and loaded back to back at full size. Every chain input of every cycle is compared with the model. It also checks the cycle count and that configuration loads overlap data, configurations change, all four select values are used, and some cubes are produced only thanks to reconfiguration. Finally a four-cube test set is run under one common configuration, loaded once |
| `tb_table1_sweep`          | the random-cube experiments above on 1024- and 512-chain builds, with every solved cube loaded and checked |

Building the end-to-end testbench takes one to two minutes, because of the
1024-output network. Running it takes about a second.
