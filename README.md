# Three-share threshold implementations as targets for fault sensitivity analysis

Fault sensitivity analysis (FSA) attacks a circuit by overclocking it: the
attacker shortens the clock period step by step until the output turns
wrong. The period at which that happens is the critical propagation delay
of the transition just applied, and that delay depends on the data, because
an AND gate settles early when a 0 arrives and late when it has to wait for
all its inputs to be 1. Correlating delays with a key guess recovers the
key, even from masked circuits whose masking lets glitches combine shares.

The circuits here are the countermeasure: first-order **threshold
implementations (TI)** with three shares. Every secret bit is split into
three random bits whose XOR is the secret, and every nonlinear function is
split into three *component functions*, each of which never sees one of the
three shares (**non-completeness**). Registers separate one shared
nonlinear layer from the next. Each combinational cloud then depends on two
shares only, and two shares are independent of the secret. So its
propagation delay, which is all the clock-glitch attacker can measure, is
independent of the secret too. The same property that defeats
glitch-based power analysis also defeats FSA. Output uniformity is not
needed for this argument.

This RTL follows the paper "Glitch-Resistant Masking Schemes as
Countermeasure Against Fault Sensitivity Analysis". It provides the three
shared circuits that paper reasons about and attacks:

| circuit | module | function | latency |
|---|---|---|---|
| shared AND gate | `ti_and3` | z = x AND y, 1-bit, 3 shares | 2 clock edges |
| protected PRESENT round | `present_ti_round` | ct = S(s_in) ^ K, 4-bit | 3 clock edges |
| protected KECCAK chi round | `keccak_ti_round` | ct = chi(s_in) ^ K, 5-bit | 2 clock edges |

`fsa_ti_top` places all three side by side with separate ports. All of them
take one new input per cycle.

## Share conventions

A shared w-bit word is a packed array `logic [2:0][w-1:0]`. Index 0 is
share 1, index 2 is share 3. The package `ti_pkg` holds the widths
(3 shares, 4-bit PRESENT, 5-bit chi, 4 re-masking bits), the share types
`present_sh_t` and `keccak_sh_t`, and two helpers:

* `next_share(j)` = (j+1) mod 3;
* `mul_share(ua, ub, va, vb)` = ua·va ⊕ ua·vb ⊕ ub·va, the part of a
  product u·v that output share j gets from shares a = j and b = j+1.

Every component function in this design follows one pattern: **output
share j is computed from input shares j and j+1 only.** Summed over the
pairs (1,2), (2,3), (3,1), the `mul_share` terms cover all nine cross
products u_a·v_b, so the XOR of the output shares is u·v. Linear terms are
taken from share j, so they also add up correctly. Constants go into
share 1 only. Share j never sees input share j+2; that is the
non-completeness.

## The shared AND gate (`ti_and_component`, `ti_and3`)

The smallest example of the idea:

```
z1 = x1·y1 ⊕ x1·y2 ⊕ x2·y1      (sees shares 1,2)
z2 = x2·y2 ⊕ x2·y3 ⊕ x3·y2      (sees shares 2,3)
z3 = x3·y3 ⊕ x3·y1 ⊕ x1·y3      (sees shares 3,1)
```

`ti_and_component` is one line of this: three 2-input AND gates
(A = xa·ya, B = xa·yb, C = xb·ya) into a 3-input XOR. The delay of A, B
and C depends on the values of x1, x2, y1, y2, but these two shares of each
input say nothing about x or y. `ti_and3` wraps three instances between an
input share register and an output share register. An input is captured
on the edge where `in_valid` is high, and `z_sh` and `out_valid` follow
one edge later. This output sharing is not uniform. That is harmless
for FSA. It would matter if z fed another nonlinear gate without
re-masking.

## The shared PRESENT S-box (`present_ti_f`, `present_ti_g`, `present_sbox_ti`)

The 4-bit PRESENT S-box, `C56B90AD3EF84712` (input 0 first), is cubic. A
three-share TI of a cubic function is not possible in one layer, so the
S-box is split into two quadratic permutations with a register between
them. With the input nibble (x, y, z, w), x the MSB:

```
F(x,y,z,w) = ( y+z+w,      1+y+z,   1+x+z+yw+zw,  1+w+xy+xz+yz )
G(x,y,z,w) = ( y+z+w+xw,   x+zw,    y+z+xw,       z+yw         )
S(v)       = G(F(v))                      (bits listed MSB first)
```

F is the first stage, G the second. As 16-entry tables (input 0 first),
F = `7E92B04D5CA1836F` and G = `08B7A31C46F9ED52`. Each stage is shared
directly with the pattern above; for example, bit 0 of output share j of F is

```
c_j ⊕ w_j ⊕ mul_share(x,y) ⊕ mul_share(x,z) ⊕ mul_share(y,z),   c_1 = 1, c_2 = c_3 = 0
```

Both shared stages are bijections on their 12 share bits. So a uniformly
shared input gives a uniformly shared output, and the second stage gets
the properly distributed input it needs against first-order power
analysis.

`present_sbox_ti` is F → register → G → register. A fault-sensitivity
attacker targets the longest path, so the paper profiles the first stage
alone. Its input is the share register in front of F.

## The shared KECCAK chi row (`keccak_chi_ti`)

chi on a 5-bit row is a_i ⊕ (¬a_(i+1))·a_(i+2), indices mod 5. Its
three-share sharing is

```
y_j,i = x_j,i ⊕ (¬x_j,(i+1))·x_j,(i+2) ⊕ x_j,(i+1)·x_(j+1),(i+2) ⊕ x_(j+1),(i+1)·x_j,(i+2)
```

It is correct and non-complete, but **not uniform**. Four fresh random
bits repair that. Each bit is added to one bit position of two shares, so
the unshared value does not change:

| random bit | added to |
|---|---|
| r0 | bit 0 of shares 1 and 2 |
| r1 | bit 0 of shares 2 and 3 |
| r2 | bit 1 of shares 1 and 2 |
| r3 | bit 1 of shares 2 and 3 |

With uniform input shares and uniform `rnd`, every one of the 1024
sharings of chi(a) appears equally often, for all 32 rows (checked
exhaustively). With `rnd = 0` the block is the plain non-uniform sharing.
That is the configuration in which the paper shows non-completeness alone
is enough against FSA. The output is registered: latency 1 edge.

## The attacked round (`share_split`, `key_add_combine`, `*_ti_round`)

Both S-boxes are wrapped in the same dummy cipher round:

```
s_in ─ share_split ─▶ [share register] ─▶ shared S-box ─▶ ⊕K1,⊕K2,⊕K3 ─▶ XOR ─▶ ct
          ▲ rnd                                 (s_out_sh)   key_add_combine
```

* `share_split` masks s_in. Share 1 is `rnd[w-1:0]`, share 2 is
  `rnd[2w-1:w]`, and share 3 is s_in ⊕ share1 ⊕ share2. Because of this,
  any share triple can be loaded exactly through `s_in` and `rnd`, which
  the profiling testbenches use.
* The **share register** is the starting point of every transition. The
  paper calls its previous content the *reset value*. It shows that an
  attacker who chooses that value well gets far better correlation than
  with the customary all-zero reset, and that the attack on the shared
  circuits fails even then. The register holds its content while
  `in_valid` is low.
* `key_add_combine` adds key share Ki to data share i and XORs the three
  keyed shares into `ct`. So ct = S(s_in) ⊕ K1 ⊕ K2 ⊕ K3. It is
  combinational after the S-box output register. `s_out_sh` brings the
  shared S-box output out as well.

Timing, counted from the clock edge that captures `s_in`:

| round | edge 1 | edge 2 | edge 3 | `ct` valid |
|---|---|---|---|---|
| PRESENT | share register | F register | G register | with `out_valid`, after edge 3 |
| chi | share register | chi register | – | with `out_valid`, after edge 2 |

In the chi round, `rnd_chi` is used in the cycle after `s_in` is
captured, while that row is leaving the share register.

Key shares and randomness are plain inputs. The key shares must be stable
while results are read. The randomness must be fresh and uniform for the
security argument to hold, but this design does not generate it.

## Using the RTL

Everything is plain SystemVerilog-2017. Valid flags have an asynchronous
active-low reset (`rst_n`). Data registers have no reset; they load only
with a valid flag. To simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ti_pkg.sv tb/tb_fsa_ti_top.sv \
          --top-module tb_fsa_ti_top -Mdir obj -o sim && obj/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog).

| testbench | what it shows |
|---|---|
| `tb_ti_and_component` | all 64 share combinations: XOR of three instances = AND; each instance ignores its missing share |
| `tb_ti_and3` | random shares, with and without gaps: result and 2-edge latency; output holds when idle |
| `tb_share_split`, `tb_key_add_combine` | random values, 4- and 5-bit instances |
| `tb_present_ti_f`, `tb_present_ti_g` | all 4096 share triples: correctness against the F/G tables; non-completeness by randomising the excluded share |
| `tb_present_sbox_ti` | all 16 nibbles with random masks, back to back and with gaps: S-box table and 2-edge latency |
| `tb_keccak_chi_ti` | 2000 rows: chi, 1-edge latency, exact effect of each re-masking bit, non-completeness of every output share |
| `tb_present_ti_round`, `tb_keccak_ti_round` | random streams with changing keys: ct, shared output, latency |
| `tb_fsa_ti_top` | all three circuits at once. It counts each mechanism (back-to-back inputs, resume after idle, reset-value pairs, chi re-masking on and off, a repeated input under a fresh mask, key change, reset with results in flight) and fails if one never happens |
| `tb_present_profiling` | all 4096 × 4096 reset-value → input transitions of the PRESENT share register (2^25 inputs, ~20 s), then all 16 plaintexts under one key; `+reset_values=N` shortens it |
| `tb_keccak_profiling` | 2^24 random transitions of the chi share register with `rnd_chi = 0` (~10 s), then all 32 rows under one key; `+transitions=N` shortens it |

The two profiling testbenches run the transition sets of the paper's
experiments. Everything is at full size; there is nothing to scale.

## What RTL simulation can and cannot show

The testbenches prove the functional properties: correctness, the exact
non-completeness of every component function, uniformity where it is
claimed, and latency. The FSA resistance itself is a timing property of
the gate-level netlist after place and route. A zero-delay RTL model
cannot show it, and neither can these testbenches. To keep it when
implementing the design:

* keep the component functions of one stage from being merged. Synthesis
  must not share logic between output shares (for example, keep
  `ti_and_component`, or the per-share logic, as separate hierarchy);
* keep every register shown here. Above all, keep the one between F and G
  in `present_sbox_ti` and the share register in front of each S-box.
  Removing one lets glitches combine all three shares;
* `key_add_combine` is the only place where shares meet. It is linear and
  sits after the S-box registers, where the paper also leaves it out of
  the profiling.

## Where this design makes its own choices

The paper gives the shared AND gate and the structure of the attacked
round in detail. It cites the PRESENT and KECCAK threshold implementations
without printing them. So the following are this design's:

* the component functions of F, G and chi. The F/G split is the standard
  quadratic decomposition of the PRESENT S-box, and the shares follow the
  pattern of the AND gate. A different published sharing would compute
  the same unshared values;
* where the four chi re-masking bits go. The paper fixes only their
  number and that all-zero disables uniformity;
* the register placement of the rounds (one share register in front of
  the S-box), the valid flags, the reset, and all latencies;
* randomness and key shares come in as ports. No random number generator
  is included.

The unshared baseline S-boxes that the paper attacks for comparison are
not part of this design.
