# Fault-tolerant AES-128 core with byte parity and spare cells

A fault injected into an AES circuit (a laser pulse, a glitch) makes it return a
wrong ciphertext, and a handful of correct/wrong pairs is enough to recover the
key. This core guards against that and also keeps working. It is an AES-128
encryption/decryption core built as a 4x4 array of *data cells*, one per state
byte. Every byte carries a parity bit that is predicted through every AES
operation. A cell whose stored parity disagrees with its data raises an error
bit. Each row of the array has a fifth, spare cell. When a cell fails, the
faulty cell is located from the error bits, its row is rewired around it onto
the spare, and the block is computed again from the start. One fault per row,
so up to four in all, can be tolerated. A second fault in a row stops the core
with `fatal`.

Without faults a block takes 36 clock cycles: 4 to load, 1 for the initial
AddRoundKey, 10 rounds of 3 cycles and 1 final check. Apart from that final
check cycle, parity checking and row rerouting add no cycles.

## The array and its three-cycle round

Every data cell stores one state byte plus its parity bit. It also has its own
two-stage pipelined SBox, and it can compute its own row of MixColumns or
InvMixColumns. All cells in a row use the same MixColumns coefficients, so any
cell of a row, the spare included, can take any position in that row. A round
is three cycles:

| cycle | cells do | key unit does |
|-------|----------|---------------|
| RA | SBox stage 1 on the own state byte (SubBytes or InvSubBytes) | takes the SubWord results and steps to the round key of this round |
| RB | SBox stage 2; each cell stores its neighbour's result, which is ShiftRows (encrypt) or InvShiftRows (decrypt) done by wiring | - |
| RC | encrypt: `MixColumns(col) ^ key`; decrypt: `InvMixColumns(col ^ key)`; round 10 only `^ key`. Checkpoint. | sends the next SubWord operands to the SBoxes of state row 3 |

The key unit has no SBox of its own. In RC the row-3 SBoxes would be idle, so
the key unit lends them the four rotated bytes of the key's last word. It
gets the substituted bytes back in the next RA, through the pipeline register
that the data does not need in that cycle. The key therefore moves one step
per round with no extra cycles. Decryption runs the schedule backwards from
the last round key:

- `w3' = w3^w2`
- `w2' = w2^w1`
- `w1' = w1^w0`
- `w0' = w0 ^ SubWord(RotWord(w3')) ^ Rcon`

Rcon counts down from 0x36.

Loading works from the side. Each cycle one column of four bytes enters at
column 0, and the earlier columns move one step along the rows (last column
first). The key register loads the same way and in the same cycles.

## Parity prediction

Each operation predicts its output parity from its inputs. This never uses
the result it is meant to check:

- **AddRoundKey**: `p = p_state ^ p_key`.
- **ShiftRows**: the parity bit moves with its byte.
- **MixColumns**: multiplying by 2 is a shift plus a conditional XOR with 0x1B,
  which has even weight. Therefore `par(2a) = p(a) ^ a7` and `par(3a) = a7`. For
  the InvMixColumns coefficients the same reasoning gives
  `par(9a) = a7^a6^a5`, `par(Ba) = p(a)^a6^a5`, `par(Da) = p(a)^a5` and
  `par(Ea) = p(a)^a7^a5`. A cell XORs these terms for its row's coefficients.
- **SubBytes**: the SBox has no simple parity rule. Its predicted output parity
  is `T(x) ^ ^x ^ p_in`, where `T` is a 256-entry table of the parity of S(x)
  (or S^-1(x)). For a correct input, `^x ^ p_in` is 0 and the table gives the
  right parity. For a wrong input it is 1, so the output is wrong in parity
  too, and the error is carried forward instead of being hidden. The tables are
  computed at elaboration from the textbook SBox definition (inverse modulo
  x^8+x^4+x^3+x+1, then the affine map). The SBox value itself comes from a
  separate composite-field datapath:
  - GF(2^4) with x^4+x+1, extended by Y^2+Y+0xC;
  - stage 1: inverse affine map (decrypt only), basis change, and
    `d = 0xC*h^2 ^ h*l ^ l^2`;
  - stage 2: `d^-1`, the two GF(2^4) products, the basis change back, and the
    affine map (encrypt only).

  The table and the datapath share no logic.

Parity is even: the parity bit equals the XOR of the data bits. A single-bit
error, or any odd number of flipped bits in a byte, is detected. An even
number of flipped bits in one byte is not.

## Locating the fault and rewiring a row

A cell's error bit is `^data ^ parity` of its state register, ORed with the
same check on its SBox output while that output is valid. Both come straight
from registers. `aes_reconfig_unit` watches the 16 error bits and the key
register's check from the initial AddRoundKey to the final check:

1. **Capture.** A wrong value can only reach another cell one clock later.
   So the first cycle in which any error bit rises shows only the cell that
   failed. The unit keeps that set of cells and ignores the later,
   propagated errors. Error bits are in logical positions. They are turned into
   physical cells through the current fault map: in a row where cell `f` is
   bypassed, logical position `j >= f` is physical cell `j+1`.
2. **Checkpoint.** The unit acts only in the last cycle of a round (RC) and in
   the final check cycle. Then, for every row with exactly one newly located
   cell, it records the cell in the fault map, and `restart` sends the
   sequencer back to the load phase. The block and key are reloaded from the
   input buffer, so the result is still correct, only later.
3. **Fatal.** `fatal` is set, the block is dropped (`aborted`) and no new
   start is taken until reset, when:
   - the row already has a bypassed cell;
   - two cells of one row fail in the same cycle;
   - only the key register is in error, because the key unit has no spare.

Inside a row (`aes_reconf_row`) the four logical positions are served by five
physical cells. The upper multiplexer layer routes the complete input bundle
of each position: operation, operands, SBox control. With cell `f` bypassed,
the bundles of positions `f..3` go one cell to the right, the last one into the
spare, and cell `f` gets a "hold". The lower layer puts the five outputs back
in logical order. All wiring between cells (load shift, ShiftRows, the column
buses for MixColumns, the key path into row 3) is made on the logical outputs.
It therefore stays correct however the rows are configured.

The fault map lives until reset, so later blocks run at full speed on the
repaired array.

## Interface (`aes_ft_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse. It is taken when the core is idle or done and `fatal` is low, and it captures `block_in`, `key_in` and `decrypt`. |
| `decrypt` | in | 1 | 0 = encrypt, 1 = decrypt |
| `block_in` | in | 128 | plaintext or ciphertext. Bits [127:120] are byte 0; byte i is row i%4, column i/4 (FIPS-197 order). |
| `key_in` | in | 128 | encrypt: cipher key. Decrypt: the **last round key** (round key 10 of the cipher key). |
| `busy` | out | 1 | a block is being processed |
| `done` | out | 1 | pulse 36 cycles after `start` if nothing went wrong |
| `block_out`, `par_out` | out | 128, 16 | result and its predicted parity bits. They stay valid until the next start. |
| `err_out` | out | 1 | OR of the live error bits |
| `err_seen` | out | 1 | an error was detected during this block |
| `restarted` | out | 1 | pulse: the block was restarted after a reconfiguration |
| `fatal`, `aborted` | out | 1 | the core cannot continue; the block was dropped (pulse) |
| `fault_vld`, `fault_idx` | out | 4, 4x2 | per row: a cell is bypassed, and which physical cell (0-3) |
| `fi` | in | 4x5x16 | fault emulation, per `[row][physical cell]` (cell 4 is the spare): an 8-bit mask XORed into the SBox output and an 8-bit mask XORed into each result the cell computes. Tie it to 0 in use. |

A block hit by one fault takes 36 cycles, plus the cycles up to the
checkpoint that caught the fault, plus a fresh 36-cycle run.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | byte-with-parity type, cell input/output bundles, GF helpers, SBox parity tables, MixColumns parity rules |
| `rtl/aes_sbox.sv` | composite-field SBox/InvSBox, 2 stages, parity predictor and error propagation |
| `rtl/aes_data_cell.sv` | one state byte: SBox, MixColumns row, AddRoundKey, parity, error bit |
| `rtl/aes_reconf_row.sv` | 4 + 1 cells with the two multiplexer layers |
| `rtl/aes_data_unit.sv` | four rows and the wiring between cells |
| `rtl/aes_key_unit.sv` | round-key register, schedule forwards and backwards, parity |
| `rtl/aes_reconfig_unit.sv` | error capture, fault location, fault map, restart/fatal |
| `rtl/aes_control_unit.sv` | the 36-cycle sequence, restart and abort |
| `rtl/aes_ft_top.sv` | top level with the input buffer |
| `tb/aes_ref_pkg.sv` | plain AES-128 reference (brute-force SBox) for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the random fault campaign `tb_aes_ft_fault_campaign` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_aes_ft_top -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ft_top.sv
./obj_dir/Vtb_aes_ft_top
```

Replace the names to run the others (`tb_aes_sbox`, `tb_aes_data_cell`,
`tb_aes_reconf_row`, `tb_aes_data_unit`, `tb_aes_key_unit`,
`tb_aes_reconfig_unit`, `tb_aes_control_unit`). Each runs in about a second.

`tb_aes_ft_top` runs the core exactly as it is configured in `rtl/`. It checks:

- the FIPS-197 example vectors in both directions, plus random blocks against
  the reference, with the 36-cycle latency and the output parity;
- four permanent faults, one per row, in SBoxes (one of them a row-3 SBox that
  the key schedule uses) and in results: each is detected, its row is rewired,
  and the result is still correct;
- a fifth fault, in an already used spare, which must raise `fatal`.

It counts every mechanism it exercises and fails if one never happened.

`tb_aes_ft_fault_campaign` runs 120 random single-bit fault trials. Each trial
picks a random cell, target (SBox output or computed result) and direction.
The fault is either transient (one random cycle) or permanent. After every
trial the result must be correct. When the fault had an effect, exactly the
injected cell must have been mapped out.

The control and reconfiguration units also carry SVA assertions:

- `done` only with the core idle;
- `start` accepted means busy next cycle;
- no start taken while `fatal`;
- a repaired row stays repaired;
- `restart` and `fatal` never together.

Simulate with `--assert` to check them.

## How far it can be trusted, and where it is this design's own

All nine testbenches pass. The eight module testbenches were also each run
against a deliberately broken copy of their module, and each caught the break.
Both directions are checked against an independent reference model. No timing or area figures are given
here, because those depend on a cell library.

These points are choices made for this implementation:

- The SBox has two pipeline stages. That is what a three-cycle round needs.
- The composite field is GF(2^4) over x^4+x+1 with Y^2+Y+0xC.
- The MixColumns parity rules above were derived for this design.
- Decryption computes `InvMixColumns(state ^ key)` in the third cycle.
- Decryption takes the last round key as its key input. The core does not
  expand the cipher key first.
- The side load is one column per cycle, which gives a 4-cycle load. One extra
  check cycle after round 10 catches a fault in the final AddRoundKey.
- The interface has 128-bit parallel ports, an input buffer and
  start/busy/done. The reset values are parity-consistent zeros.
- Faults are located by capturing the first erroneous cycle. A checkpoint
  acts at the end of every round.
- A key-register error is fatal, because the key unit has no spare.
- The `fi` fault-emulation port exists only for testing.

Known limits:

- Parity cannot see an even number of flipped bits in one byte.
- Error bits are not watched during the 4-cycle load, because the cells then
  still hold the previous block. A fault in the load shift path moves along
  the row with the data. Unless the faulty cell is the last one in its row, it
  then shows up in several cells of that row at once, and it is treated as
  fatal: detected, but not repaired. The `fi` result mask
  therefore acts only on computed results.
- Only one spare per row is provided. A spare shared by the whole array and
  a spare column are other ways to do it; they are not built here.
