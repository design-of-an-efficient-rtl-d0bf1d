# Systolic AES-128 engine

An AES-128 encryption and decryption engine that works on one 32-bit state column per clock
cycle. Four shared S-boxes, a triangle of six byte registers and a 4x4 systolic array of
GF(2^8) multiply-accumulate cells carry out SubBytes, ShiftRows and MixColumns. The round keys
are computed on the fly by a key unit that has no S-boxes of its own: it borrows the data
path's four S-boxes in the cycles when the state is not using them. A microprogrammed control
unit drives every control signal from a ROM.

The architecture follows the published design "Design of an Efficient Architecture for
Advanced Encryption Standard Algorithm Using Systolic Structures" (S. Sharma, T. S. B.
Sudarshan). That description gives the block structure, the S-box, the systolic MixColumns
scheme and the register counts. The cycle schedule, the bus protocol and several small units
are choices made here. They are listed in "Departures and own choices" below.

## Datapath

```
            +--------------------------- DEMUX2 ----------------------------> result words
            |                                ^
            v                                |
   S0..S3 (Res + S-box) --> R0..R5 --> DEMUX1 --> 4x4 array P0..P15 --> align --+
      ^                                  |                                      |
      |  key unit RotWord                +--> bypass -----------------> align --+--> MUX --> XOR key --> X0..X3
      |                                                                          ^             ^
 key unit <---- SubWord ----                                        I/O words ---+     key unit word
```

One round streams the four columns of the state through the datapath in four consecutive
cycles:

1. **S0..S3.** Each S-box has an input register (Res) that holds one byte and its direction.
   The result is valid in the next cycle. S-box *k* handles state row *k*.
2. **R0..R5 (ShiftRows).** The rows are rotated by timing alone, with no rotation logic
   (next section).
3. **Systolic array.** MixColumns (or InvMixColumns) runs as a matrix product. The final
   round skips the array through the bypass.
4. **Alignment.** The array and the bypass both produce a column with its rows one cycle
   apart. Six byte registers (3+2+1) per path line the bytes up again.
5. **MUX, AddRoundKey, X0..X3.** The MUX selects the I/O word (initial round), the array
   (rounds 1..9) or the bypass (round 10). The result is XORed with the 32-bit round key word
   and stored in X. From X the column either starts the next round or leaves as a result.

Words are state columns. Row 0 is in bits 31:24. FIPS-197 byte 0 of a block is bits 31:24 of
word 0.

## ShiftRows by timing: the R0..R5 triangle

This is the least obvious part of the design.

The array needs its inputs skewed: row *k* of a column must enter *k* cycles after row 0, so
that the partial sums moving down the array meet the right bytes. The S-boxes deliver
unskewed columns, in order 0, 1, 2, 3. Combining the skew with ShiftRows gives this entry
order per array row (state byte `Dn` is byte *n* in column-major order, D1..D4 being column 0;
`-` is an idle cycle):

| array row | entry order (first entry on the left) |
|-----------|---------------------------------------|
| 0 | D1  D5  D9  D13 |
| 1 | -  D6  D10 D14 D2 |
| 2 | -  -  D11 D15 D3  D7 |
| 3 | -  -  -  D16 D4  D8  D12 |

Row *k* needs the byte of column (*i+k*) mod 4 at entry step *i*, at cycle 1+*i*+*k* of the
round. When *i+k* ≤ 3, that byte leaves the S-box in exactly that cycle, so row *k* passes it
straight through. The *k* bytes that wrap around (columns 0..*k*-1) are needed exactly four
cycles after the S-box produced them. Row *k* therefore has a *k*-deep shift register:

- row 1: R0
- row 2: R1, R2
- row 3: R3, R4, R5

The register captures the first *k* bytes and releases them, one per cycle, after the live
bytes. Six registers and three 2:1 multiplexers are all that ShiftRows costs. The
`r_shift` / `r_held` fields of the control word drive them.

**Decryption uses the same triangle.** InvShiftRows rotates to the right. If the columns are
streamed in reverse order (3, 2, 1, 0) instead, a left rotation in stream order is a right
rotation in column order. Decryption therefore runs the whole column stream reversed:

- the I/O interface reads the buffered block backwards;
- the key unit hands out key words 3..0;
- result words leave with `dout_idx` counting down.

Nothing else in the datapath knows the direction, apart from the S-box mode and the array
coefficients. Swapping the order of InvSubBytes and InvShiftRows is allowed because both
act on single bytes.

## The systolic MixColumns array

Processing element PE(*k*,*j*) (P0..P15, row-major) has:

- a coefficient register holding M[*j*][*k*];
- a result register;
- a data register that passes the input byte to the right.

M is the circulant matrix {02,03,01,01} for MixColumns or {0E,0B,0D,09} for InvMixColumns.
The coefficients load in one cycle at the start of every block.

Each cycle a PE computes `result <= result_from_above ^ coef * data_from_left`. State row *k*
enters at the left of PE row *k*. Output row *j* leaves the bottom of PE column *j*, *N*+*j*
cycles after row 0 of its column entered. Idle rows are fed zero, which adds nothing to the
sums. The array accepts a new column every cycle. Each array row carries data in 4 of the 9
cycles of a round.

## S-box

`aes_sbox` computes `Aff(inv(x))` for encryption and `inv(Aff^-1(x))` for decryption. Two
multiplexers decide whether each affine stage is used. The inverse (`gf256_inv`) is computed
in the composite field GF((2^4)^2):

- The byte is mapped to `a_h*x + a_l`, with n(x) = x^2 + x + {e} and GF(2^4) built on
  x^4+x+1.
- Then `d = {e}*a_h^2 + a_l^2 + a_h*a_l` and `a^-1 = (a_h*d^-1) x + (a_h+a_l)*d^-1`.
- The result is mapped back.

Only one GF(2^4) inversion is needed. The mapping matrices are those of the usual
composite-field S-box and were checked against plain GF(2^8) inversion for all 256 inputs.

The direction bit is stored in Res together with the byte. This lets the key unit use an
S-box in forward mode between decryption loads.

## Round schedule

Let *u* = 0 be the cycle in which X holds column 0 of a round's input. A round with
MixColumns repeats every 9 cycles:

| u | event |
|---|-------|
| 0..3 | S0..S3 load columns 0..3 from X; X meanwhile loads columns 1..3 of the previous round |
| 1..4+k | row *k* of R0..R5 captures (u 1..k), feeds the array (u 1+k..4+k), releases held bytes (u 5..4+k) |
| 3 | key unit steps to this round's key (X loads after this use it) |
| 6, 7 | key unit sends RotWord through S0..S3 and captures SubWord for the next step |
| 8 | X loads column 0 of this round from the array (columns 1..3 follow at u 0..2 of the next round) |

The final round routes the rows to the bypass instead. X loads its columns at u = 4..7, and
the four result words leave at u = 5..8.

The micro-program ROM holds five routines:

- START: load column 0 from the I/O interface;
- R1: round 1, whose X loads still come from the I/O interface;
- RN: rounds 2..9;
- RL: round 10;
- KS: one key-setup step.

Each ROM word is an `aes_pkg::ctrl_t`, one field per datapath control signal. An
elaboration-time function computes the ROM contents from the rules in the table above. To
change the schedule, edit `ucode()` in `aes_control_unit.sv`.

## Key unit

The key unit holds three sets of four words:

- the cipher key;
- round key 10, for decryption;
- a working round key.

**Encryption** steps the AES-128 schedule forward: rk*j*+1 from rk*j*.

**Decryption** steps it backward: w3' = w3^w2, w2' = w2^w1, w1' = w1^w0, then
w0' = w0 ^ SubWord(RotWord(w3')) ^ rcon.

Either step needs one SubWord. The key unit gets it from S0..S3 in cycle *u* = 6 of the
previous round (START for the first step), keeps it in a register and applies the step at
*u* = 3.

**Key setup.** After each key load, key setup runs ten forward steps (3 cycles each, 33
cycles in all) and stores round key 10.

**Decryption round keys.** Decryption uses the equivalent inverse cipher, so the datapath order
(S-box, ShiftRows, MixColumns, AddRoundKey) is the same in both directions. The key words of
decryption rounds 1..9 must then pass through InvMixColumns. The key unit does this on the
outgoing 32-bit word with constant GF multipliers.

## Interface and timing

`aes_systolic_top` ports: `clk`, `rst_n` (asynchronous, active low), `bus_wr`, `bus_key`,
`bus_dec`, `bus_din[31:0]`, `ready`, `dout[31:0]`, `dout_valid`, `dout_idx[1:0]`.

1. **Key.** While `ready` is high, write four words with `bus_key=1`, word 0 first. `ready`
   then drops for key setup (33 cycles).
2. **Block.** While `ready` is high, write four words with `bus_key=0`. `bus_dec` on the
   first word selects decryption.
3. **Result.** The four result columns appear on `dout`, one per cycle, with `dout_valid`.
   `dout_idx` gives each word's column: 0..3 for encryption, 3..0 for decryption.
4. **Next block.** Wait for `ready` again.

Writes while `ready` is low are ignored.

**Latency.** The last result word comes 92 cycles after the last block word. That is:

- 1 cycle to start the key unit and load the array coefficients;
- 1 cycle START;
- 10 rounds of 9 cycles.

Only one block is in flight. The control unit returns to idle one cycle after the last
result word. A writer that sends blocks back to back therefore gets one block per 97 cycles:
4 bus cycles, 92 cycles of processing and that 1 cycle.

### Compared with the published figures

The original description counts 4 cycles per round and 40 cycles per block (3.2 bit/cycle).
In this implementation the S-boxes take the state in exactly 4 cycles per round, 40 per
block, and the testbenches check that. But the loop through the S-box register, the R
triangle, the 4-cycle-deep array and the alignment registers takes 9 cycles. With one block
in flight, this design reaches 128/97 ≈ 1.3 bit/cycle on a stream of blocks.

Reaching 40 cycles per block would need three blocks interleaved in the round loop. The
original description does not describe interleaving. Its key unit also relies on S-box cycles
that the state leaves idle, and three interleaved blocks would leave none. So one block at a
time was kept. `tb_aes_block_stream` measures the stream rate.

## Departures and own choices

- **Cycle schedule.** The schedule and the micro-program contents are this design's own,
  as is the bus protocol (strobe, key flag, direction flag, four words, result index).
- **Alignment registers.** The array output and the bypass each get six alignment registers.
  The original block diagram shows none.
- **PE data register.** The horizontal data register in each PE is this design's choice.
- **Decryption.** Decryption streams columns in reverse and uses the equivalent inverse
  cipher, with InvMixColumns applied to the middle round keys inside the key unit.
- **SubWord timing.** The key unit keeps the borrowed SubWord in a register, and key setup
  runs after every key load.
- **Key size.** Only AES-128 is built. 192- and 256-bit keys are described as possible with
  small changes, but those changes are not specified.
- **Checks in the RTL.** An assertion in the data unit flags any cycle in which the state
  and the key unit ask for the S-boxes together.
- **Reset.** Only control state, counters and the key round index are reset. Datapath
  registers are always written before they are read.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | shared types (`ctrl_t`, `xsrc_e`), GF(2^8)/GF(2^4) functions, affine maps |
| `rtl/gf256_inv.sv` | composite-field GF(2^8) inverter |
| `rtl/aes_sbox.sv` | pipelined S-box with Res register, both directions |
| `rtl/shift_rows_regs.sv` | R0..R5 triangle |
| `rtl/mixcol_pe.sv`, `rtl/mixcol_systolic_array.sv` | processing element and 4x4 array |
| `rtl/align_skew.sv` | removes the row skew from a column stream |
| `rtl/add_round_key.sv` | MUX, AddRoundKey XOR, X0..X3 |
| `rtl/aes_data_unit.sv` | the datapath above |
| `rtl/aes_key_unit.sv` | key storage and on-the-fly schedule |
| `rtl/aes_io_interface.sv` | 32-bit bus side, block buffer, result index |
| `rtl/aes_control_unit.sv` | micro-program ROM and sequencer |
| `rtl/aes_systolic_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | independent FIPS-197 reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_aes_block_stream.sv` | throughput workload: a stream of blocks through the top |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It also has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
          tb/tb_aes_systolic_top.sv --top-module tb_aes_systolic_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

`tb_aes_systolic_top` runs the default configuration end to end:

- FIPS-197 C.1 encryption and its decryption;
- random keys with mixed encrypt/decrypt blocks against the reference model;
- block latency and S-box occupancy;
- a count of each mechanism (key setup, MixColumns rounds, bypass rounds, key-unit S-box use,
  released ShiftRows bytes), failing if one never happened.

The unit testbenches check:

- the inverter and the S-box exhaustively;
- the ShiftRows entry order;
- the array in both directions, cycle-exact;
- the data unit on full blocks, with a model of the key unit;
- the key schedule words at every X load;
- the I/O ordering;
- the micro-program's counts and cycle totals.
