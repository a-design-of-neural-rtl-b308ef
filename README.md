# Mixed-signal neural-network PE array

This design computes the matrix-vector products of neural-network layers
with a 16 × 16 array of processing elements. Each product is split between
digital logic and analog charge. Every activation is a signed 9-bit number.
Its upper 4 bits are multiplied digitally: one AND gate per bit plus a short
adder per PE. Its lower 5 bits become a word-line pulse width. That pulse
switches a small current source onto a column bit line. Each column has a
cyclic converter that reads the analog sum two bits per cycle. The
conversion residue stays in the analog domain from one weight bit to the
next. Only the column ends therefore need an ADC, and it is a 2-bit one.
Weights are stored in SRAM inside every PE and are processed one bit per
cycle. Any precision from binary to signed 9 bits is possible, and weights
are never moved during a MAC.

An on-chip test logic runs a small instruction set. It sequences MACs, weight
loading and read-back, ReLU, max-pooling, multi-pass accumulation of large
layers, loops, and an in-array gradient calibration of the analog current
sources.

The digital parts are synthesizable RTL. The analog parts are behavioural
SystemVerilog models with real-valued signals. They are:

- the per-PE current source;
- the DPWM integrate-and-fire cells;
- the switched-capacitor part of the cyclic MAC unit.

## Block overview

```
              bus_in[15:0] / instructions            bus_out[15:0]
                        |                                 ^
                 +------v---------------------------------+------+
                 | test_logic (inst_sram, decoder, registers)    |
                 +------+------------------------------+---------+
                        | ctrl (core_ctrl_t), x_out    | dout/psum/rdata
  compute_core          v                              |
  +------------------------------------------------------------------+
  | row r: input_driver -> ML[3:0] (x_hi) ---------> MPE row r        |
  |                   \-> x_lo -> dpwm -> dpwm_if -> WL pulse width   |
  |                                                                   |
  |        16 x 16 mpe + mpe_isrc     (mpe_array)                     |
  |          DL chain (digital, per column) | BLp/BLn (analog)        |
  |                                         v                         |
  | column c:        lm  <-- DANA --  cmu_acc <-- cmu_analog          |
  +------------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/mpe_pkg.sv` | Widths, core modes, the `core_ctrl_t` control struct, the saturation helper |
| `rtl/tl_pkg.sv` | Opcodes and the instruction layout |
| `rtl/nn_accel.sv` | Top: test logic plus computation core |
| `rtl/test_logic.sv`, `rtl/inst_sram.sv` | Instruction memory, fetch, decode, registers, control generation |
| `rtl/compute_core.sv` | Input drivers, DPWMs, the array, CMUs and LMs per column |
| `rtl/mpe_array.sv`, `rtl/mpe.sv`, `rtl/mpe_isrc.sv` | The PE array, the digital PE, the PE current source (model) |
| `rtl/input_driver.sv` | Splits the activation; drives the MSB-lines |
| `rtl/dpwm.sv`, `rtl/dpwm_if.sv` | DPWM control logic with firing calibration; the I&F pair (model) |
| `rtl/cmu_analog.sv`, `rtl/cmu_acc.sv` | Cyclic MAC unit: analog part (model) and digital accumulation |
| `rtl/lm.sv` | Logic module: digital accumulation, combination, partial sums, weight I/O |

## Number formats

| Quantity | Format |
|---|---|
| Activation `x` | Signed 9 bit. `x = 32·x_hi + x_lo`, where `x_hi = x[8:5]` is signed 4 bit and `x_lo = x[4:0]` is unsigned 5 bit. |
| Weight word | 9 bits: `[8]` is the sign and `[7:0]` the magnitude. A weight of `n` bits (1 ≤ n ≤ 9) uses the sign bit and the `n-1` magnitude bits just below it. Its magnitude is therefore MSB-aligned: a 4-bit weight `s,abc` represents `±abc00000`. |
| Binary weight (`n = 1`) | The stored bit is the sign, and the value is ±1 at the magnitude MSB position (±128). |
| DL sum per column | Signed 9 bit: `Σ_r x_hi · sign · w_bit`, which can reach ±128. |
| DANA | Signed 10 bit: the cyclic converter's result. |
| DDIG | Signed 16 bit: `Σ_k 2^(7-k) · DLsum_k` over the 8 magnitude bits. |
| DMAC | Signed 17 bit: `DDIG + 8·DANA`. |
| DOUT | Signed 14 bit: `DMAC >>> 3 ≈ Σ_r x_r·w_r / 256`. |
| Partial sum | Signed 16 bit, saturating. |
| Layer output | Signed 9 bit after ATV. |

Where the factors come from: `Σ x·w = 32·Σ x_hi·w + Σ x_lo·w`.

- The digital part is exactly `Σ x_hi·w = DDIG`.
- In the analog part one cycle's bit-line sum is `Σ x_lo·w_bit`. It is at most 16 × 31 = 496 units. That full scale is mapped to just under half the converter range.
- One DANA LSB is 256 units, so `Σ x_lo·w ≈ 256·DANA`.
- Together, `MAC = 32·(DDIG + 8·DANA)`.

## One MAC, cycle by cycle

All PEs share the SRAM address and the bit select. A `MUL` takes 9 cycles:

1. **Eight magnitude cycles**, `k = 0..7`. Each PE reads weight bit `sign_pos-1-k`. In the first of these cycles the PE also takes the sign bit at `sign_pos` from the same SRAM word. It uses that bit at once and latches it into the sign register for the other seven cycles. The CMU and LM accumulators restart from this cycle's value.
   - **Digital part.** The PE multiplies the bit by `±x_hi` from its row's MSB-line and adds the result to the DL sum coming from the PE above. The bottom of the column is the DL sum. The LM computes `DDIG = 2·DDIG + DLsum`.
   - **Analog part.** The row's DPWM makes a pulse `x_lo` time units wide. In every PE whose weight bit is 1, the current source is on for that pulse. Depending on the weight sign it discharges BLp or BLn. The CMU samples the bit-line difference and adds twice the residue kept from the previous cycle. A 2-bit flash ADC gives `q ∈ {-3,-1,+1,+3}`. The residue becomes `V - q·V_M/4`, and the accumulation logic computes `DANA = 2·DANA + q`.
   - Weights with fewer bits stop enabling the PEs after their last bit. All accumulators still shift, so the output scale does not depend on the precision.
2. **Ninth cycle.** The LM forms `DMAC` and `DOUT`. It either loads the partial sum (first sub-matrix of a layer) or adds to it.

The converter recurrence, in units where `V_M = 1024`:

```
V_0 = BL_0                 V_k = BL_k + 2·R_(k-1)
q_k = +3 if V_k >= 512, +1 if 0 <= V_k < 512, -1 if -512 <= V_k < 0, else -3
R_k = V_k - 256·q_k        DANA = Σ_k q_k · 2^(7-k)
```

This is a redundant signed-digit conversion. The final residue stays within
±256, so DANA is within about one LSB of the ideal sum.

## Processing element (`mpe`, `mpe_isrc`)

Each PE holds:

- a 128 × 9 SRAM, with a combinational read;
- the bit multiplexer;
- the sign register;
- the DL adder;
- the word-line logic (enable and polarity of the current source);
- an 8-bit calibration register.

The calibration register resets to `8'h80`. Its upper 5 bits set the current
source, which runs from 300 nA (code 0) to 900 nA (code 31) in 31 steps. In
the model, charge is normalised so that code 16 gives 1.0 per time unit.

Other modes use the same wires:

- **Write.** The column's DL bus carries the data and `ML[0]` selects the row.
- **Read.** The selected row drives its word down the DL chain.
- **Erase.** All words are cleared.
- **Calibration write.** The column bus is loaded into the selected row's calibration register.
- **Gradient step.** The MSB-line carries the row's input clipped to 2 bits. The column bus carries the sign of the column error and its magnitude clipped to 2 bits. Each PE computes `min(x·|e|, 7)`, then moves its register by that amount against the sign of the error, saturating at 0 and 255.

## DPWM (`dpwm`, `dpwm_if`)

The control logic turns `x_lo` into a 31-bit thermometer code that selects
unit capacitors of an integrate-and-fire pair. The pulse lies between the
two firing edges and is `x_lo` units wide.

The I&F current has a 3-bit trim. On `CFD` the control logic runs a
calibration: it arms the maximum-capacitance case, waits two cycles to see
whether it fired, and raises the trim until it does. If no trim fires, it
reports failure. The model's firing time is `1.9 · ratio · 8/(8+trim)`
cycles. Here `ratio` is a per-row process factor, 1.0 in the ideal model.
A cell that cannot fire in time clips its pulse.

## Cyclic MAC unit and logic module (`cmu_analog`, `cmu_acc`, `lm`)

`cmu_analog` models the following:

- bit-line precharge;
- a 6-bit capacitor bank, whose nominal code is 32;
- the doubling accumulator;
- the flash ADC.

`CFC` sets the bank code, which scales the bit-line swing. `cmu_acc` is the
digital shift-and-add of the ADC codes, and it saturates at 10 bits.

`lm` does the following:

- accumulates the DL sums into DDIG;
- combines DDIG with DANA;
- holds the 16-bit partial sum;
- drives write data up the column and captures read data.

## Test logic and instruction set

Instructions are 16 bits: `[15:11]` is the opcode and `[10:0]` the operand.
The test logic holds:

- four 9-bit registers per row (activations);
- four 9-bit registers per column (results, weights for writing);
- eight hardware loops;
- a 512-word instruction SRAM.

Instructions come from one of two sources:

- **Programming phase.** While `prg_en` is high, words are written through `prg_*`. With `run` high they are then executed from the SRAM (`inst_src=0`). A fetch takes two cycles because the SRAM read is synchronous.
- **Running phase.** Instructions are fed through `bus_inst` with a valid/ready handshake (`inst_src=1`).

| Op | Code | Operand | Action | Cycles (execute) |
|---|---|---|---|---|
| NOP | 0 | - | nothing | 1 |
| SSA | 1 | [6:0] | set the PE SRAM address | 1 |
| ERA | 2 | - | erase all PE SRAMs | 128 |
| CFD | 3 | [0] | DPWM firing calibration, wait for done | variable |
| CFC | 4 | [5:0] | CMU capacitor-bank code | 1 |
| UPD | 5 | [10], [1:0] | write calibration registers of the selected row from a column register, or ([10]=1) run one gradient step with a row register as input | 1 |
| SFT | 6 | [3:0] | select the PE row for SRAM / calibration access | 1 |
| SSB | 7 | [3:0] sign position, [7:4] width | set the weight format | 1 |
| SRR | 8 | [1:0] | read the selected row's word into a column register | 2 |
| SRW | 9 | [1:0] | write a column register into the selected row | 1 |
| RCV | 10 | [1:0], [2] | shift 9 bits per line from `bus_in` into a row register, or ([2]=1) a column register | 9 |
| SND | 11 | [1:0] | shift a column register out on `bus_out` | 9 |
| MUL | 12 | [1:0], [2] new psum | MAC with a row register as input | 9 |
| ADD | 13 | [1:0] ← [3:2] + [5:4] | saturating add of column registers | 1 |
| ATV | 14 | [1:0], [5:2] shift | `sat9(ReLU(psum) >>> shift)` into a column register | 1 |
| LDA | 15 | [1:0] → [3:2] | copy a column register into a row register | 1 |
| MXP | 16 | [1:0], [3:2] | element-wise maximum of two column registers | 1 |
| LPS | 17 | [2:0] loop, [10:3] count | start a loop | 1 |
| LPE | 18 | [2:0] loop; [3] addr+1, [4] sign position−width, [5] register offset+1 | end of loop body, with increments | 1 |
| CNT | 19 | [7:0] | hold for N cycles | N |
| JMP | 20 | [8:0] | jump | 1 |
| SFS | 21 | [2:0] | choose what `bus_out` shows outside SND: 1 MAC flags, 2 address/bit/row, 3 PC and state counter | 1 |

Each instruction also spends its fetch cycles: two from the SRAM, one from
the bus port. Back-to-back `MUL`s from the SRAM therefore take 11 cycles
each. That is 512 operations (256 multiply-adds) per 11 cycles, about
1.9 GOPS at a 40 MHz clock. Moving data in and out with `RCV`/`SND` lowers
the sustained rate.

Layers larger than 16 × 16 are handled as follows:

1. Run one `MUL` with [2]=1 for the first 16-input slice.
2. Run further `MUL`s for the remaining slices, which add to the partial sum.
3. Finish with `ATV`.
4. `LDA` moves the results into a row register for the next layer.
5. `MXP` provides 2:1 max-pooling between column registers.

The sub-matrices of a layer sit at successive SRAM addresses. An `LPS`/`LPE`
loop around the accumulating `MUL` steps the address and the register offset
on every pass. The register offset renames all register operands. Output
slices land in different column registers. A layer with `N` inputs and `M`
outputs needs `ceil(N/16)·ceil(M/16)` of the 128 addresses. 128 addresses of
16 × 16 × 9 bits make the 288 kb of weight storage. Larger networks reload
weights between layers.

## Gradient calibration of the current sources

Mismatch makes each PE's current source differ from nominal. The array
trains its own calibration registers, as follows.

1. All weights are set to 255.
2. A random unsigned input vector `x` is applied, and a MAC is run. Each column's ideal output is then `Σ x`.
3. `UPD` with [10]=1 computes the column error `e = DOUT − Σ x`.
4. Each PE updates its register by `−min(clip2(x_r)·clip2|e_c|, 7)·sign(e_c)`.

A loop of `MUL`/`UPD` pairs repeats this. With `VAR_SEED ≠ 0`, the models give
every current source a fixed gain error of up to ±20 %, and every DPWM a speed
ratio from 70 % to 140 %.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `nn_accel` | `ROWS`, `COLS` | 16, 16 | array size |
| `nn_accel` | `IMEM_DEPTH` | 512 | instruction SRAM depth |
| `nn_accel` | `VAR_SEED` | 0 | 0 means ideal analog models; otherwise the seed of the per-instance mismatch |

The widths are in `mpe_pkg`: weight SRAM of 128 × 9, DL of 9 bits, calibration
register of 8 bits, DANA of 10 bits and partial sum of 16 bits.

## Simulating

Verilator 5 runs everything, including the real-valued models:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/mpe_pkg.sv rtl/tl_pkg.sv \
  tb/tb_nn_accel.sv --top-module tb_nn_accel
./obj_dir/Vtb_nn_accel
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it covers |
|---|---|
| `tb_nn_accel` | The full design at default size. It loads weights, reads them back, runs two-slice layers, ATV, MXP, LDA into a second layer, 4-bit and binary weights, loops, JMP, CNT, the monitor, DPWM calibration, a gradient step, and the bus instruction port. Every result is checked against a reference model, and each mechanism must occur at least once. About 20 s. |
| `tb_nn_accel_cal` | Calibration with mismatch enabled: 300 epochs in two nested hardware loops (2 × 150). The mean column error must fall to below 60 % of its start value (about 3.3 to about 1.7 LSB). |
| `tb_nn_accel_fc` | A two-layer fully connected network at default size: 48 → 32 (six sub-matrices) and 32 → 16. It loads all weights over the bus and runs loops that step the SRAM address and register offset. Partial sums accumulate across input slices, output slices go to separate column registers, and `LDA` chains the layers. All outputs are checked. |
| `tb_compute_core`, `tb_mpe_array`, `tb_test_logic` | Subsystem tests with random data. |
| `tb_mpe`, `tb_mpe_isrc`, `tb_input_driver`, `tb_dpwm`, `tb_dpwm_if`, `tb_cmu_analog`, `tb_cmu_acc`, `tb_lm`, `tb_inst_sram` | Unit tests. |

The analog models use `real` ports. Yosys therefore cannot synthesize the
top, but the digital modules are synthesizable on their own.

## Departures and open points

- **Instruction encoding.** The instruction names and purposes are the original's. The binary encoding, the operand fields and the cycle counts of all instructions except `MUL` are this design's own. `MUL` keeps the original's 9 control cycles.
- **Instruction meanings interpreted here.** `LDA` copies a column register into a row register; the original gives it as choosing the accumulation point, which `MUL`[2] does here. `CNT` is read as a hold. `RCV` can also fill column registers.
- **DL width.** The DL chain is 9 bits wide, which is enough for 16 rows of ±8. The original describes the PE adder once as taking 7-bit data from the PE above and elsewhere as a 9-bit bus. The 9-bit reading was followed. The bidirectional DL bus is modelled as a downward sum/read chain plus a separate upward write bus per column.
- **Control distribution.** Control is broadcast. The silicon uses daisy-chained control lines, which add physical delay only.
- **Partial-sum register.** It sits in the LM. The original places it with the CMU.
- **Analog scale.** The analog result is `Σ x_lo·w / 256`, which the factor 8 in `DDIG + 8·DANA` and the 10-bit width of DANA require. One passage of the original instead suggests dropping only 7 LSBs, that is `/128`.
- **Saturation.** Saturation of DANA and of the partial sum is this design's choice.
- **Analog models.** They are charge-domain and ideal unless `VAR_SEED` is set. Only gain and timing errors are modelled, with no offsets, noise, kT/C or settling. The capacitor-bank scaling and the I&F trim law are simple linear models.
- **Not modelled.** The bias current-mirror network, pads and level shifters, and the PRBS source for calibration inputs; inputs come in through `RCV`. The board-level test setup is not modelled either: the testbenches drive the chip's ports directly.
- **Calibration inputs.** The calibration inputs are 4-bit values supplied from outside through `RCV`. The original generates them on chip from a PRBS source. Their sum is not limited to 64, as it is in the original's measurement. The loop counter is 8 bits, so runs of more than 255 epochs nest two loops.
