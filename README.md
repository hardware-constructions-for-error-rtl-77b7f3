# Concurrent error detection for the ASCON S-box layer

ASCON's only nonlinear part is a 5-bit S-box. It is applied 64 times in
parallel in every round of the 320-bit permutation. Fault attacks on ASCON
(statistical ineffective, subset and fault-intensity-map analyses) all work
by disturbing these S-boxes and watching how the output changes. This RTL
guards every S-box instance with a small *signature check*. A predictor
computes one, two or three signature bits of the correct S-box output from
the S-box **input** alone. The same signature bits are then recomputed from
the output the S-box **actually produced**. Any mismatch raises an error
flag. Each round therefore yields 64 x 1, 2 or 3 flags, and the round-
iterative permutation core ORs them into a sticky `error` output.

```
            +---------------------+    gamma (observed)
  mu ---+-->|  S-box (5 -> 5)     |--&--+------------------> to linear layer
        |   +---------------------+  |  |
        |                fault_mask -+  |  +-----------------+
        |                               +->| signature of    |--+
        |   +---------------------+        | observed output |  |  XOR -> ef
        +-->| signature predictor |------------------------------+
            +---------------------+
```

The check covers the substitution layer only. A fault that corrupts an S-box
*input* (the state register, the constant addition or the linear layer)
produces a consistent wrong input and output pair and is not detected.

## Three ways to build the S-box and its predictor

Parameter `IMPL` (type `ascon_ed_pkg::sbox_impl_e`) selects the style.
It applies to both the S-box and the signature predictor:

| `IMPL`          | S-box                                         | predictor                                   |
|-----------------|-----------------------------------------------|---------------------------------------------|
| `IMPL_LOGIC_I`  | the original ASCON gate network: input XORs, chi step (`x_i ^= ~x_{i+1} & x_{i+2}`), output XORs, inversion of bit 2 | XOR/OR of the same five output expressions |
| `IMPL_LOGIC_II` | a compact sum of products per output bit      | a sum of products for each signature bit    |
| `IMPL_LUT`      | a 32-entry table (case statement)             | 32-entry tables (32-bit constants indexed by `mu`) |

All three compute identical functions and differ only in the logic they
synthesize to. On an FPGA the LUT style maps onto LUT memory.

Bit order matters when reading the tables. An S-box input is written
`{mu0,mu1,mu2,mu3,mu4}`, so `mu0` is the most significant bit of the table
index. In the state, S-box `j` reads bit `j` of words `x0..x4`, with `x0` as
`mu0`. The outputs `{gamma0..gamma4}` go back to bit `j` of `x0..x4`. For
example, `SB[0x00] = 0x04`: an all-zero slice becomes a slice with only
`x2` set.

## Three signatures

Parameter `SCHEME` (type `ascon_ed_pkg::ed_scheme_e`) selects the signature.
The flag width `EFW` per S-box follows from it.

| `SCHEME`             | EFW | signature of output `g = {g0..g4}`                 | flag bits |
|----------------------|-----|----------------------------------------------------|-----------|
| `SCHEME_ONE_BIT`     | 1   | `p0 = g0^g1^g2^g3^g4`                              | `ef = p0 mismatch` |
| `SCHEME_INTERLEAVED` | 2   | `p1 = g0^g2^g4` (even bits), `p2 = g1^g3` (odd bits) | `ef = {p2, p1}` |
| `SCHEME_CRC3`        | 3   | `p3 = g1\|g4`, `p4 = g0\|g1\|g3`, `p5 = g0\|g2`     | `ef = {p5, p4, p3}` |

**The CRC-3 signature is not a true CRC.** The scheme starts from the
output polynomial `f(x) = g0 x^4 + g3 x^3 + g2 x^2 + g1 x + g4` and reduces
it modulo `x^3 + x + 1`. That gives the groups `{g1,g4}`, `{g0,g1,g3}` and
`{g0,g2}` for the coefficients of `x^0`, `x^1` and `x^2`. A CRC adds the bits
of each group modulo 2. The published signature equations and table for
this scheme combine them with OR instead. This RTL implements the OR form,
so that its predictor matches those equations and table bit for bit. The
consequence shows up in the coverage figures below. A stuck-at-0 on one
output bit is missed whenever another bit of the same group is 1. The CRC-3
check then catches only about half of the single-bit faults that have an
effect, where the two parity schemes catch all of them. To get the
modulo-2 version, change the OR into XOR in `p_act` and in the three
predictor styles of `rtl/ascon_ed_crc3.sv`. The LUT constants would then
have to be recomputed.

The constants in the LUT predictors hold the value for input `i` in bit `i`.
They are the signature of the S-box table entry:
`P0_TABLE[i] = ^SB[i]`, `P1_TABLE[i] = SB[i][4]^SB[i][2]^SB[i][0]`, and so on.

### Measured detection

`tb/tb_ascon_fault_coverage.sv` injects 640,000 stuck-at-0 faults per
scheme at the S-box outputs, once as single-bit faults and once as
multi-bit faults. The multi-bit faults hold two to five bits low. Each of
the 64 S-boxes gets one fault per layer evaluation. A stuck-at-0 on a bit
that is already 0 changes nothing, so coverage is given over the faults
that changed the output (one run, seed 1):

| scheme      | single-bit faults detected | multi-bit faults detected |
|-------------|----------------------------|---------------------------|
| one-bit     | 100 %                      | 59 %                      |
| interleaved | 100 %                      | 83 %                      |
| CRC-3 (OR)  | 50 %                       | 82 %                      |

These figures are per S-box and per fault. An attack that needs many
faulty runs is detected with probability approaching 1 as the number of
faulted S-box evaluations grows: each miss multiplies the escape
probability.

## Module hierarchy

```
ascon_perm_ed            round-iterative permutation, flags, handshake   (top)
└─ ascon_round_ed        constant addition, S-box layer, linear layer
   ├─ ascon_slayer_ed    64 x ascon_sbox_ed on the bit slices, OR of flags
   │  └─ ascon_sbox_ed   S-box + fault mask + check, chosen by IMPL/SCHEME
   │     ├─ ascon_sbox_logic1 | ascon_sbox_logic2 | ascon_sbox_lut
   │     └─ ascon_ed_onebit   | ascon_ed_interleaved | ascon_ed_crc3
   └─ ascon_linear_layer x_i ^= (x_i >>> a_i) ^ (x_i >>> b_i)
ascon_ed_pkg             state type, enums, round constants, rotations
```

Everything below `ascon_perm_ed` is combinational.

## The permutation core `ascon_perm_ed`

Parameters: `IMPL` (default `IMPL_LOGIC_I`) and `SCHEME` (default
`SCHEME_CRC3`). Neither default is singled out by the scheme itself; any of
the nine combinations is a valid build.

| port         | dir | width       | meaning |
|--------------|-----|-------------|---------|
| `clk`        | in  | 1           | clock, rising edge |
| `rst_n`      | in  | 1           | synchronous, active-low reset of control and flags (not of the state) |
| `start`      | in  | 1           | start a permutation, taken only when `busy` is low |
| `rounds`     | in  | 4           | number of rounds, 1..12 (12 = p^a, 6 = p^b of ASCON-128) |
| `state_in`   | in  | `state_t`   | input state, `state_in[0]` = x0 |
| `fault_mask` | in  | `state_t`   | fault injection, see below; all ones in normal use |
| `busy`       | out | 1           | rounds in progress |
| `done`       | out | 1           | one-cycle pulse, result valid |
| `state_out`  | out | `state_t`   | the state register |
| `ef_q`       | out | 64 x EFW    | flags of the round computed last; `ef_q[j]` belongs to S-box `j` |
| `error`      | out | 1           | OR of every flag of the current permutation, cleared by `start` |

Timing: `start` is sampled at a rising edge. A run of `n` rounds applies
one round per following edge, using round constants `12-n .. 11`. `done`
is high for one cycle after the `n`-th of those edges, `n` cycles after
`start` was sampled. `state_out`, `ef_q` and `error` are valid then and
stay valid until the next `start`. A `start` pulse while `busy` is ignored.
An assertion reports a start with `rounds` outside 1..12; such a run
executes all 12 rounds.

`fault_mask` exists to evaluate the checks. It has the layout of the
state: a 0 in bit `j` of word `i` holds output bit `gamma_i` of S-box `j`
at 0 in whichever round is computed during that cycle. The faulty value
propagates into the state exactly as a real stuck-at fault would.

The round constants (`{4'hF - r, r}` XORed into the low byte of x2) and the
rotation distances (19/28, 61/39, 1/6, 10/17, 7/41) are those of the ASCON
v1.2 specification. The core reproduces the published Ascon-Hash initial
state, i.e. p^12 of `x0 = 00400c0000000100`.

## What is not here

- The ASCON-128 AEAD mode around the permutation (initialization, associated
  data, encryption and finalization, with key, nonce and tag handling) is
  not included. The error detection lives entirely in the S-box layer, and
  `ascon_perm_ed` is the block such a mode would drive.
- No error correction or reaction logic: `error` is only raised and
  reported.
- Area, power and delay figures on Spartan-7 and Kintex-7 devices come
  from a vendor flow and are not reproduced here. The default core has 519
  flip-flops: 320 of state, 192 of flags and 7 of control.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The reference
model `tb/ascon_ref_pkg.sv` implements the S-box both as the specification
table and as the bitwise reference-software sequence. It builds the
signatures, rounds and permutations from plain loops.

| testbench | what it covers |
|-----------|----------------|
| `tb_ascon_sbox_logic1/_logic2/_lut` | all 32 inputs against table and reference |
| `tb_ascon_ed_onebit/_interleaved/_crc3` | every input x every observed output, all three predictor styles |
| `tb_ascon_sbox_ed` | all 9 variants, every input x every stuck-at-0 mask |
| `tb_ascon_linear_layer` | all 320 unit vectors and random states |
| `tb_ascon_slayer_ed`, `tb_ascon_round_ed` | random states with and without random faults; every flag |
| `tb_ascon_perm_ed` | default core: known answer, p^12/p^6/other counts, exact latency, faults in a random round, sticky error cleared on restart, start ignored while busy |
| `tb_ascon_perm_ed_variants` | all nine cores on the same stimulus, including the known answer |
| `tb_ascon_fault_coverage` | 640,000 single-bit and 640,000 multi-bit faults per scheme; prints coverage |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ascon_perm_ed rtl/ascon_ed_pkg.sv tb/ascon_ref_pkg.sv tb/tb_ascon_perm_ed.sv
./obj_dir/Vtb_ascon_perm_ed
```

Replace the top module and file to run the others. All run in well under a
minute; the nine-core variant test spends most of that compiling.
