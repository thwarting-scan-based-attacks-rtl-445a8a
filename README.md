# Secure Comparator: scan testing without exposing scan contents

Scan chains make a chip testable. They also give an attacker a way to read the
internal state of a crypto core, bit by bit, from the Scan-Out pin. The usual fix
is to blow fuses after production test. That also ends any later testing or
diagnosis.

This design keeps the scan chains but never lets their contents leave the chip.
The tester shifts the stimulus in as usual. It also shifts in the **expected**
response, on a pin called Sexp that replaces Scan-Out. The response leaving each
scan chain is compared with that stream on chip, one bit per clock. Only one
pass/fail bit per chain and per test vector leaves the chip, and only after all
bits of the vector have been compared. An attacker who wants the captured state
must guess the whole response of a chain: 2^N_SFF attempts for a chain of N_SFF
flip-flops.

The comparator sits between the scan outputs of an unchanged, already
scan-inserted circuit and the chip pins. It has no link to the circuit's logic.
It therefore works after normal DfT insertion, and also after a response
compactor.

## Structure

```
                  sen ───────────────────────────────┬─────────────────────┐
                                                     │                     │
 sout[i] ──┐   sticky_comparator (one per chain)     │   output_enabler    │
 sexp[i] ──┴─► XOR ─► OR ─► flag[i] ──────────────────┼──► test_res[i] ──┐  │ (shared counter)
                      ▲      │  (cleared while sen=0) │                 │  │
                      └──────┘                       ▼                 ▼  ▼
                                            count: N_SFF ... 0    io_buffer[i]  ◄──► sin_testres_pad[i]
                                                 tc = (count==0)       │
                                                                       └──► sin_dut[i] (scan input of chain i)
```

| Module | Role |
|---|---|
| `secure_comparator` | Top. One comparator and one pad per chain, one shared output enabler. |
| `sticky_comparator` | Per chain: `flag <= flag OR (sout XOR sexp)` while shifting, cleared while `sen = 0`. |
| `sticky_comparator_masked` | Variant for chains with unpredictable bits. `mask` skips a bit, at most `P` times per vector. |
| `output_enabler` | One down counter for all chains. It loads `N_SFF` while `sen = 0` and counts to zero while shifting. `test_res[i] = tc AND NOT flag[i]`. |
| `io_buffer` | A tristate buffer on one pin, used as Sin while shifting and as TestRes while `sen = 0`. |

The pin count is the same as for plain scan. Sin and TestRes share a pin, Sexp
takes the place of Scan-Out, and Sen is unchanged. The masked variant adds one
Mask pin per chain.

Parameters of `secure_comparator`:

| Parameter | Default | Meaning |
|---|---|---|
| `N_CHAINS` | 32 | protected scan chains |
| `N_SFF` | 10000 | flip-flops in the longest chain. The counter width is ceil(log2(N_SFF+1)), which is 14 bits here. |
| `MASKING` | 0 | 1 selects `sticky_comparator_masked` for every chain |
| `P` | 32 | most bits that can be masked per chain and vector (used only with `MASKING = 1`) |

At the defaults the comparator has 32 flag flip-flops, a 14-bit counter, 32
XOR/OR pairs, 32 result gates and 32 bidirectional pads.

## The test protocol and its timing

All registers use the rising edge of `clk`, which is the scan clock of the chains.

1. **Shift** (`sen = 1`, for N_SFF clocks). The pad is an input and feeds the next
   stimulus to `sin_dut[i]`. On `sexp[i]` the tester presents the expected value
   of the bit now on `sout[i]`. The last flip-flop of the chain comes first. Each
   clock ORs one comparison into the flag, and the counter steps down by one.
2. **Read** (`sen` low, before the next rising edge). The pads switch to output
   and show `test_res[i]`. A 1 means that the counter reached zero and that no
   bit differed. A 0 means a mismatch, or that fewer than N_SFF bits were
   compared.
3. **Capture** (one or more rising edges with `sen = 0`). The circuit captures its
   response. The first of these edges also clears every flag and reloads the
   counter, so the result of step 2 can be read only before that edge.

Because the clear happens on a clock edge, the result of the previous vector
stays on the pads from the fall of `sen` to the first capture edge. It is not
visible at any other time. The timing works out as follows. The counter loads
N_SFF on the capture edge. The first shift edge makes the first comparison. After
the N_SFF-th shift edge the counter is at zero and every bit has been compared.
Shifting past N_SFF keeps comparing, and the flag stays set, while the counter
holds at zero. Lowering `sen` early always gives 0 on the pads. A partly shifted
vector therefore never releases a result.

Expected responses go in together with the next stimulus, so a test takes as many
clocks as plain scan.

All chains share one counter set to the length of the longest chain. A shorter
chain keeps comparing while the longer ones finish. Its last N_SFF minus length
output bits are then the first bits of the new stimulus, which the tester knows,
so the tester appends them to that chain's expected stream.

## Why one bit per vector is what protects the data

If the pass/fail bit came out every clock, an attacker could shift in all-zero
expected values and read the chain directly, one bit per clock. Three things stop
this:

- the flag is sticky, so one mismatch hides where it happened;
- the output enabler holds the result back until the counter reaches zero;
- the pad drives only while `sen = 0`.

The comparator itself has no scan access of its own. Any DfT added to it would
reopen the hole. It is tested only through its pins (see below). Side-channel
and fault-injection attacks on the comparator are outside what this RTL
addresses.

## Masking unknown bits

Some scan cells capture values that cannot be predicted, so no expected value
exists for them. In `sticky_comparator_masked`, `mask = 1` makes a bit count as
matching. Unlimited masking would let an attacker mask every bit but one, so a
P-counter limits it:

```
mask_ok  = mask AND NOT (p_count == P)
flag    <= flag OR ((sout XOR sexp) AND NOT mask_ok)
p_count <= p_count + mask_ok          -- cleared while sen = 0
```

After P bits have been masked in one vector, further mask requests are refused
and those bits are compared normally. The search space of a brute-force attack
is then at least 2^(N_SFF-P). Pick `P` so that this number stays out of reach.
The default of 32 is a placeholder, not a recommended value.

## Testing the comparator itself

The comparator can be fully tested through its own pins (Sen, Sexp,
Sin/TestRes) with a fixed sequence of 6·(N_SFF+1) clocks:

1. a partly matching expected response;
2. a fully mismatching expected response;
3. the correct expected response;
4. two mismatching responses shifted back to back with no capture between them,
   then two capture clocks;
5. the correct expected response again.

The steps end with these results on the pads: 0, 0, 1, 0, 1.
`tb_secure_comparator` runs this sequence and checks its length.

## Diagnosis

A pass/fail bit does not show which flip-flops failed, but fault-dictionary
diagnosis still works. For each test vector the tester also supplies each faulty
response predicted by fault simulation as the expected stream. The one that gets
a pass names the fault. `tb_secure_comparator` does this with three stuck-at
faults and two vectors. Each fault has its own pass/fail pattern:

| circuit | va/ra | vb/rb | va/ra(f1) | vb/rb(f2) | vb/rb(f3) |
|---|---|---|---|---|---|
| fault-free | 1 | 1 | 0 | 0 | 0 |
| f1 | 0 | 1 | 1 | 0 | 0 |
| f2 | 1 | 0 | 0 | 1 | 0 |
| f3 | 1 | 0 | 0 | 0 | 1 |

In this table, f1 is exercised only by vector va, and f2 and f3 only by vb. The
matching against the dictionary happens on the tester, one response at a time.
It costs test time but needs no extra hardware.

## Design choices not fixed by the scheme

- **Clear and load are synchronous on `sen = 0`.** An asynchronous clear would
  erase the result as soon as `sen` fell, so the synchronous form is what makes
  "read during capture" possible.
- **`test_res = tc AND NOT flag`, with 1 meaning pass.** Before the terminal count
  the output is 0.
- **The counter holds at zero.** It does not wrap.
- **No power-on reset.** The first clock with `sen = 0` puts the comparator in a
  defined state. The protocol always applies one before any read.
- **One Mask pin per chain** in the masked configuration. The counter counts up
  from 0 to P. `P` defaults to 32.
- **`io_buffer` is a generic tristate.** In silicon it becomes the library's
  bidirectional pad cell.
- With `MASKING = 0` the `mask` inputs are unused, and lint tools report them.
  `tc` of the output enabler is not used by the top.

## Files

`rtl/`: `secure_comparator.sv` (top), `sticky_comparator.sv`,
`sticky_comparator_masked.sv`, `output_enabler.sv`, `io_buffer.sv`.

`tb/`:

| File | What it checks |
|---|---|
| `tb_sticky_comparator.sv` | random streams against a reference flag |
| `tb_output_enabler.sv` | exact terminal-count timing, hold at zero, reload, gating |
| `tb_io_buffer.sv` | the pad in input and output mode |
| `tb_sticky_comparator_masked.sv` | mask budget P = 4: P masked mismatches pass, P+1 fail, random traffic |
| `tb_secure_comparator.sv` | end to end. Both configurations (4 chains × 40 flip-flops, P = 3) run against a per-clock reference: pass, fail, early read, two vectors with no capture between them, double capture, the self-test with its clock count, the diagnosis table and masking. It counts each mechanism and fails if one never happened. |
| `tb_scan_attack.sv` | the attacks, on one chain of 8 flip-flops: reading after 1 to 7 shift clocks always gives 0, exactly one of all 256 guessed responses passes, and masking all bits but one is refused beyond P = 2 |
| `tb_secure_comparator_full.sv` | the default size, 32 × 10000. Four vectors, about 40000 clocks, a few seconds. |
| `scan_dut_model.sv`, `scan_tb_pkg.sv` | a behavioural scan circuit for simulation only. It captures rotate-left(state) XOR a fixed per-chain key, with an optional stuck-at fault. |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

## Simulating

Verilator 5 (two-state; uninitialised state is random, and the testbenches do
not depend on it):

```
verilator --binary --timing --assert -Irtl -Itb \
  tb/scan_tb_pkg.sv tb/tb_secure_comparator.sv tb/scan_dut_model.sv \
  rtl/secure_comparator.sv rtl/sticky_comparator.sv rtl/sticky_comparator_masked.sv \
  rtl/output_enabler.sv rtl/io_buffer.sv \
  --top-module tb_secure_comparator -Mdir obj_tb
./obj_tb/Vtb_secure_comparator
```

For another testbench, change the testbench file and `--top-module`. The unit
testbenches need only their own module from `rtl/`. The RTL also contains
concurrent assertions: counter load and count-down, and clearing and exhaustion of
the mask budget. `--assert` turns them on.

## Limits

- The circuit under test and the tester are outside this RTL. The scan model in
  `tb/` stands in for the circuit only in simulation.
- Only the secure comparator is given here. Scan chains that hold no secrets can
  keep ordinary Scan-Out.
- The RTL does not model the tristate pad's electrical behaviour, or any
  protection of the comparator against side-channel or fault attacks.
