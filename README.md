# SONOS analog inference tile

Neural-network inference is dominated by matrix-vector multiplications
(MVMs) against weights that never change. This design keeps the weights
inside analog non-volatile SONOS memory arrays and computes each MVM in
place: inputs drive the array rows, every bit line sums the cell currents,
and a per-column integrator and ADC turn the summed charge into an 8-bit
result. Everything around the arrays is digital: buffers, an activation
SRAM, an arithmetic unit for bias/ReLU/pooling, and a sequencer that runs a
layer as a pipeline of fixed-length machine cycles.

The RTL models one **tile**, the unit a full accelerator replicates many
times and connects with a mesh network:

```
 32 byte lanes ──► 32 receive FIFOs ──► 64 kB activation SRAM (32 banks)
                                             │ 8 bytes/clock per core
                         ┌───────────────────┼───────────────────┐
                    MVMin buffer x4     (non-MVM layers skip the cores)
                         │
             4 analog MVM cores, 1152 x 256 signed 8-bit weights each
             (shared ramp generator, one ramp ADC per column)
                         │ 8 bytes/clock per core
                 ALUin buffers (2 x 1 kB per core, double-buffered)
                         │ 16 lanes x 4 cores per ALU set
           ALU: core sums, bias (1024 x 12 bit), ReLU, rescale, max/avg pool
                         │
                 TileOut buffer (2 x 2 kB) ──► 256-bit output words
```

Every `rtl/` file starts with a comment giving its interface, timing, and
which parts follow the original design and which are this implementation's
own.

## Computing an MVM in an analog array (`mvm_core`)

**Weights.** Each signed 8-bit weight uses two cells on neighbouring bit
lines (BL+ and BL−). The magnitude (7 bits, 128 levels) goes into one cell;
the other cell stays at the lowest level. So a core of 1152 × 256 weights is
an array of 1152 × 512 cells. −128 is stored as −127. `sonos_array` models
the array as integer cell levels and is a behavioural model. Programming
writes one row per clock and is exact: there is no programming error, noise
or drift.

**Inputs, one bit at a time.** `row_periph` turns bit *k* of each row's
8-bit input into a select-gate enable. A selected row adds its cell levels
to both bit lines of every column. Rows at or above `n_rows` are gated off.

**Signed inputs.** These are sign-magnitude values placed on even rows, with
zero on the odd rows. The weight pair is programmed as `W` on the even row
and `−W` on the odd row. A positive input drives the even row and a negative
input drives the odd row, so the sign is applied without a second MVM. The
sign bit itself is never integrated.

**Successive integration and rescaling (SIR).** Bits are applied LSB first,
one bit per `core_ctrl` step:

1. RESET empties the integrator once, at the start.
2. For each bit, INT integrates the current difference `I+ − I−` for 10
   clocks (after one settle clock).
3. DIV halves the stored charge between bits.

After the eighth bit, the charge is proportional to
`Σ_k 2^k · Σ_r bit_k(x_r) · W_r = Σ_r x_r · W_r`. One conversion then
serves all eight bits. In integer terms:

```
acc  = 20 · S,            S = Σ_r x_r · W_r        (10 clocks × 2^8 fraction / 2^7 halvings)
vout = sat24( floor(acc · 2^8 · gain / 2^(16+8)) ) = floor(20 · S · gain / 2^24)
code = clamp(vout + 128, 0, 255)                   (ADC result; code − 128 is the signed value)
```

`gain` is a 16-bit per-column code. It stands for the amplifier whose
feedback resistor is a programmable SONOS device, and it is where
calibration would set each column's range. The whole sequence takes 97
clocks, and `done` follows one clock later.

**Analog double buffer.** The OUT step writes the scaled value into one of
two holding capacitors, selected by `pp`. The ADC always reads the other
one. This lets MVM *n+1* integrate while MVM *n* is being converted.

**Ramp ADC (`ramp_generator`, `adc_column`).** One generator per tile drives
all 1024 columns:

1. A 2-clock MIDPT phase latches in each column whether its voltage is above
   mid-scale. Only one of the two ramp comparators (NMOS for the upper half,
   PMOS for the lower) is then powered.
2. A 256-step ramp follows. Each column captures the counter value the first
   time the ramp reaches its voltage.

The register is preset to 255, so a voltage above the ramp clips to 255.
Values below the ramp start give 0. A conversion takes 258 clocks.

## The machine cycle (`tile_ctrl`)

A layer runs as a pipeline of machine cycles of **295 clocks** (HALF = 147).
`pp` toggles at every boundary and selects the halves of all double
buffers.

| clock in cycle | what happens |
|---|---|
| 0 … 146 | receive FIFOs drain into their SRAM banks, one byte per bank per clock |
| 147 | launch check: if every bank holds `ceil(n_rows/8)` inputs, the next operation is launched, otherwise a **stall** is counted |
| 148 … | the launched operation's inputs are read, 8 bytes per core per clock, into MVMin (MVM layer) or ALUin (non-MVM layer) |

An operation then moves one stage per machine cycle:

| layer type | stages |
|---|---|
| MVM | Data in/Mem → **MVM** (cores start at clock 0) → **ADC** (ramp at clock 0, results copied to ALUin from clock 259, 8 per core per clock) → **ALU** (one 64-byte set every 4 clocks from clock 0) → **Out** (one 256-bit word per clock from clock 0) |
| non-MVM | Data in/Mem → **ALU** → **Out** (element-wise addition, pooling) |

Up to five operations are in flight. Timing from the launch to the first
output word is `(295 − 148) + 3 · 295` clocks for an MVM layer and
`(295 − 148) + 295` for a non-MVM layer. The end-to-end test checks these
numbers exactly.

**Back-pressure.** Each receive FIFO (256 bytes) raises `rx_ready` low when
full. The SRAM banks are circular queues of 2048 bytes: a bank stops
accepting data when full, and an input is removed once read.

## Routing inside the tile

- Receive FIFO *b* feeds SRAM bank *b*.
- Bank *b* feeds core *b/8*.
- Row *r* of core *c* comes from bank `8c + r mod 8`, in order.

A sender that needs an input at several rows, or in overlapping convolution
windows, sends it several times. The original design leaves the tile's
control unit unspecified, so this routing, the launch rule and the stage
timing above are this implementation's.

## The ALU (`tile_alu`)

A set is 16 lanes from each of the four cores. In clock *j* = 0 … 3 of a
set, the adder group that starts at core *j* does its work:

- `ALU_SUM4`: adds all four cores. This is for a layer whose rows span four
  cores (e.g. 4 × 1152 = 4608 inputs).
- `ALU_SUM2`: adds cores 0+1 and 2+3. This is also the element-wise addition
  of two tensors in a non-MVM layer.
- `ALU_NONE`: passes each core through.

The bias `bias[256·core + 16·set + lane]` (12-bit signed) is added next,
then ReLU. Rescaling gives `floor(x · scale / 2^shift)`, saturated to
0 … 255 after ReLU or to −128 … 127 otherwise. Optional 2×2 pooling takes the
max or the floored mean of lane *l* across the four cores, so the four
window positions must be mapped to the four cores. Results are packed into
TileOut: 64, 32 or 16 bytes per set.

## Configuration and ports (`sonos_tile`)

A layer is described by `tile_cfg_t` (see `sonos_pkg`):

- `mode` (MVM or non-MVM) and `signed_in`
- `n_rows` (≤ 1152) and `n_cols` (≤ 256)
- `n_mvm`: the number of operations
- `alu_mode`, `bias_en`, `relu_en`, `adc_operands` (operands are ADC codes)
- `pool`, `scale`, `shift`

The layer is loaded with `cfg_we` and started with a `run` pulse. `done`
rises when all `n_mvm` operations have left the Out stage. Other ports:

- Weights: `prog_*` writes one weight row per clock.
- Gains: `gain_*` writes one column's gain code per clock.
- Biases: `bias_*` writes one bias per clock.
- Status: `stall_cnt` and `launched`.

The network side is a plain valid/ready byte lane per FIFO and a 256-bit
`tx_valid/tx_data` output. The output has no back-pressure.

## What is not modelled, and other departures

- **Analog non-idealities.** Programming error, read noise, retention drift,
  parasitic resistance, offset calibration rows and ADC non-linearity are
  all absent. The analog parts are exact integer models, so the RTL shows
  the data flow and the arithmetic, not the accuracy of the real circuit.
- **Weight programming.** Programming is a one-clock write per row, without
  a write-verify loop.
- **Scope.** There is no mesh router, no multi-tile system and no mapping of
  networks onto tiles. A whole network (ResNet-34/50, VGG-16) needs from
  about a hundred to several hundred tiles. This RTL gives one tile, which
  holds a slice of a layer.
- **Core use.** Every operation uses all four cores with the same
  `n_rows`/`n_cols`.
- **ALU_NONE output limit.** With `ALU_NONE` and no pooling, an operation
  produces 64 bytes per set. The 2 kB TileOut half therefore limits such an
  operation to 32 sets.
- **Timing of RESET, DIV and OUT.** These take one clock each. One settle
  clock per bit absorbs the array model's one-clock lag.

## Files

| file | role |
|---|---|
| `rtl/sonos_pkg.sv` | sizes, timing constants, enums, `tile_cfg_t` |
| `rtl/sonos_tile.sv` | the tile (top) |
| `rtl/tile_ctrl.sv` | machine-cycle sequencer |
| `rtl/mvm_core.sv` | one analog core: `row_periph`, `sonos_array`, `core_ctrl`, per column `bl_integrator` + `adc_column` |
| `rtl/ramp_generator.sv` | shared ADC ramp |
| `rtl/rx_fifo.sv`, `rtl/act_sram.sv`, `rtl/sram_bank.sv` | receive path and activation memory |
| `rtl/mvmin_buf.sv`, `rtl/aluin_buf.sv`, `rtl/bias_mem.sv`, `rtl/tileout_buf.sv` | buffers |
| `rtl/tile_alu.sv` | ALU |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_sonos_tile.sv` | end-to-end test at 64 rows × 32 columns |
| `tb/tb_sonos_tile_full.sv` | one full-size SUM4 layer at the default sizes: three windows of a 3×3×512 convolution as found in ResNet-style networks (4608 inputs over the four cores, 256 output channels) |

The end-to-end test runs a series of layers, listed below. It compares every
output byte with an integer reference and checks the latencies. It also
counts each mechanism and fails if any of them never happens: stalls,
back-pressure, ADC clipping at both ends, gated rows, each ALU mode, each
pooling mode, and MVM/non-MVM mode switches. The layers are:

- SUM4 layers with ReLU
- a signed-input layer on 48 rows
- SUM2 layers
- max pooling
- a non-MVM element-wise addition
- non-MVM average pooling
- a long MVM layer that fills the FIFOs

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sonos_pkg.sv tb/tb_sonos_tile.sv \
          --top-module tb_sonos_tile -Mdir obj_tile -o sim
./obj_tile/sim
```

The same command works for any `tb/tb_<block>.sv`. The block tests and the
reduced tile test take seconds. The full-size test takes about a minute to
build and a second to run.

To change sizes, override the top's `ROWS`, `COLS` and `T_INT` parameters.
All other sizes and timing constants live in `sonos_pkg`.
