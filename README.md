# AES-128 with Random Power Fixed Logic (RPFL) key injection

A differential power analysis (DPA) attack on AES works because the supply
current at the moment the round key is XORed into the data depends on the
key. This design hardens exactly that step. Every AddRoundKey bit is computed
by an **RPFL cell**: an exclusive gate built so that a random select bit `r`
switches its transistor networks between two arrangements. One is
AND-OR-Invert (AOI), the other OR-AND-Invert (OAI). Both compute the same
logic value, but the current drawn when an input switches differs between
them. A fresh random `r` for each gate on each use adds key-independent
variation to the power trace. The logic, the other AES steps and the
throughput stay as they were. The protection costs two transistors per XOR
gate and one small random generator per 32-bit word.

The RTL is a complete AES-128 encryption and decryption engine built around
that idea. It computes one round per clock. All 128 bits of its single
AddRoundKey unit are RPFL cells, and that unit is used for every key
injection: the initial one, the nine middle ones and the final one.

## The RPFL cell (`rpfl_cell`)

A static CMOS exclusive gate has a pull-down network of NMOS transistors and
the dual pull-up network of PMOS transistors. Two extra transistors, M1 and
M2, rewire the series and parallel groups of the gate:

| `r` | M1  | M2  | topology | logic                          |
|-----|-----|-----|----------|--------------------------------|
| 0   | off | on  | AOI      | `y = ~((a & b) \| (~a & ~b))`   |
| 1   | on  | off | OAI      | `y = ~((a \| ~b) & (~a \| b))`  |

Both rows give `y = a ^ b`. What changes is the resistance between VDD and
GND while an input is switching. In the switchable cell this is about
`2 Rn,on + 2 Rtr` with `r = 0` and `2.5 Rn,on + 2 Rtr` with `r = 1`. A plain
gate shows about `3 Rn,on + 2 Rtr` in every case. This estimate assumes a PMOS
has twice the on-resistance of an NMOS, and it treats a switching transistor
of either kind as the same resistance `Rtr`. So the same data transition draws
a different current depending on `r`. In the intended 90 nm implementation the
cell has 5 NMOS and 5 PMOS transistors, against 4 + 4 for the plain gate. Its
power is about 0.130 mW against 0.120–0.124 mW, and its maximum clock is
99.5 MHz against 100 MHz.

In this repository `rpfl_cell` is a **behavioural model**. It evaluates the
AOI form when `r = 0` and the OAI form when `r = 1`, so the logic is exact,
but it has no power behaviour. In a physical flow it has to be replaced by the
custom transistor cell, and that cell has to be kept from being optimised. A
synthesis tool given this model would merge both forms into one ordinary XOR,
which removes the protection without changing any simulation result.

The gate is built as XOR rather than XNOR, because AddRoundKey needs XOR. The
same cell with one input inverted gives XNOR.

## Where the random bits come from (`rpfl_rand_gen`, `rpfl_ark_word`)

An `rpfl_ark_word` is 32 RPFL cells plus one `rpfl_rand_gen` that drives their
32 select bits. The generator is a 32-bit Galois LFSR with polynomial
x^32 + x^22 + x^2 + x + 1. It takes one step per cycle in which AddRoundKey is
used, and the data word entering AddRoundKey is XORed into the next state. The
select bits therefore depend on a free-running sequence and on the data that
went through the unit before.

`aes_add_round_key` puts four word units side by side, one per state column.
Each has its own seed so that the columns do not switch in step.

Points to weigh before trusting it:

* The select bits are registered, so they change only at the clock edge and
  are stable while the data settles. A real implementation must also make sure
  the select transistors do not switch during a data transition. This design
  handles that only through this registered timing.
* An LFSR is not a true random source. Anyone who knows the seed, the
  polynomial and the earlier data can predict `r`. For real protection the
  seeds should come from an entropy source at reset. That is not included
  here.
* Only AddRoundKey is protected. SubBytes, ShiftRows, MixColumns and the key
  schedule use ordinary logic.

## The AES-128 engine (`aes_core`, `aes_key_expand`, `aes_rpfl_top`)

State byte `n` (FIPS-197 order, row `n % 4`, column `n / 4`) is held in bits
`[127-8n -: 8]`. One combinational round datapath is shared by both
directions:

```
encrypt:  s = ARK(in, k0)
          i = 1..9 : s = ARK(MixColumns(ShiftRows(SubBytes(s))), k_i)
          i = 10   : s = ARK(ShiftRows(SubBytes(s)), k10)
decrypt:  s = ARK(in, k10)
          i = 1..9 : s = InvMixColumns(ARK(InvShiftRows(InvSubBytes(s)), k_(10-i)))
          i = 10   : s = ARK(InvShiftRows(InvSubBytes(s)), k0)
```

SubBytes and ShiftRows commute, so one S-box bank (`aes_sub_bytes`, forward
or inverse) feeds one row shifter (`aes_shift_rows`). The forward and inverse
column mixers are two separate `aes_mix_columns` instances. The encryption
path runs through the mixer before ARK and the decryption path after it. With
two instances, the two directions never share a multiplexed path, which would
otherwise look like a combinational loop. The S-box tables are not typed in:
`aes_pkg` computes them at elaboration from the GF(2^8) inverse
(x^8 + x^4 + x^3 + x + 1) and the affine map with constant 0x63, and each
lookup becomes a 256-entry ROM.

`aes_key_expand` runs the standard AES-128 key schedule, one round key per
clock, into an 11-entry register store with a combinational read port.
Decryption needs the round keys in reverse order, which is why they are
stored.

### Interface and timing (`aes_rpfl_top`)

| port        | dir | width | use |
|-------------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load`  | in  | 1   | pulse: capture `key_in`, start the key schedule |
| `key_in`    | in  | 128 | cipher key |
| `key_ready` | out | 1   | high 10 cycles after `key_load`, until the next `key_load` |
| `start`     | in  | 1   | pulse: process `block_in`. Ignored while `busy`, while the key is not ready, and in the cycle of a `key_load` |
| `decrypt`   | in  | 1   | 0 = encrypt, 1 = decrypt; sampled with `start` |
| `block_in`  | in  | 128 | plaintext or ciphertext |
| `block_out` | out | 128 | result. Valid when `done` pulses, held until the next result |
| `busy`      | out | 1   | a block is in flight |
| `done`      | out | 1   | one-cycle pulse, 11 cycles after `start` |

The initial AddRoundKey happens in the cycle that accepts `start`, and the ten
rounds follow, one per cycle. The engine is idle again in the cycle in which
`done` is high and accepts a new `start` there, so back-to-back blocks take
11 cycles each.

The random select bits (`ark_r` inside the core) are deliberately not brought
to a pin.

## How closely this follows the RPFL proposal

Taken from the proposal:

* the RPFL cell itself: two equivalent topologies selected by two added
  transistors;
* replacing the AddRoundKey XOR array with RPFL cells;
* the 32-cell word unit;
* select bits generated at random with the help of the input data;
* the four AES steps.

Choices made in this design, where the proposal is silent:

* AES-128 as the key length;
* an iterative engine with one round per cycle;
* a stored key schedule;
* the LFSR generator, its polynomial and its seeds;
* a registered select bit;
* the handshake and reset behaviour;
* four parallel word units to cover the 128-bit state.

Departures:

* The cell is XOR, not the XNOR it is usually described as. The function is
  the same up to an inverter.
* The proposal's DPA experiment placed the protected XOR right after the
  S-box. Here every key injection follows standard AES order, so the S-box
  output meets the key directly only in the final round.
* The proposal mentions 256 bits of intermediate data split into sixteen
  32-bit groups. That cannot be an AES state. The RTL uses the 128-bit state as
  four 32-bit groups.
* Power is not modelled. The DPA results (no key recovered after 40000 and
  70000 traces, where the unprotected version falls within 40000) and the
  overhead figures (about 1 % area and power for the whole system) cannot be
  reproduced from RTL.

## Verification

Every module has a self-checking testbench in `tb/`. The reference model
`tb/tb_aes_ref_pkg.sv` is written independently of the RTL: its S-box comes
from a search for the inverse, and its MixColumns from a general GF(2^8)
matrix product.

* `tb_rpfl_cell`: all inputs in both topologies. Toggling `r` alone must not
  change `y`.
* `tb_rpfl_rand_gen`: matches a software model of the data-mixed LFSR, and
  each bit is 1 between 45 % and 55 % of the time.
* `tb_rpfl_ark_word`, `tb_aes_add_round_key`: the output always equals
  data ^ key, every cell is seen in both topologies, and columns do not switch
  in step.
* `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`: exhaustive
  or random checks against the reference, plus FIPS-197 Appendix B values.
* `tb_aes_key_expand`: the FIPS-197 A.1 key and random keys, the 10-cycle
  latency, and a restart in mid-expansion.
* `tb_aes_core`: the FIPS-197 C.1 vector both ways, random blocks both ways,
  the 11-cycle latency, and a `start` while busy being ignored.
* `tb_aes_rpfl_top`: end to end at the default configuration. It counts each
  mechanism and fails if one never happens: key expansion, key change,
  encryption, decryption, `start` ignored while busy, `start` ignored without
  a key, and every cell in both AOI and OAI.
* `tb_dpa_workload`: replays the acquisition run of a DPA campaign, 70000
  encryptions under one key (under 10^6 cycles). It checks results against
  the reference and round trips. It also measures the correlation between the
  number of OAI cells at the initial key injection and a DPA target bit, the
  S-box output for each of the 16 guesses of a 4-bit key nibble. That
  correlation comes out below 0.01, and the test fails above 0.02. This checks that the mask bits are balanced
  and independent of the attacked value. It says nothing about the real
  current.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl \
    rtl/aes_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_aes_rpfl_top.sv \
    --top-module tb_aes_rpfl_top -o sim
./obj_dir/sim
```

Replace `tb_aes_rpfl_top` with any other testbench name. All state that is
read is reset, so the tests also pass with `+verilator+rand+reset+2`
(random initial values). Each test runs in a few seconds at most.

## Files

`rtl/aes_pkg.sv` (types, GF helpers, S-box generation), `rtl/rpfl_cell.sv`,
`rtl/rpfl_rand_gen.sv`, `rtl/rpfl_ark_word.sv`, `rtl/aes_add_round_key.sv`,
`rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`,
`rtl/aes_key_expand.sv`, `rtl/aes_core.sv`, `rtl/aes_rpfl_top.sv` (top).
Testbenches are `tb/tb_<module>.sv`, plus `tb/tb_dpa_workload.sv` and the
reference package `tb/tb_aes_ref_pkg.sv`.
