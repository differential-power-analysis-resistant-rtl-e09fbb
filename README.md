# RSA exponentiation engine with a randomized-window countermeasure

This design computes the RSA operation R = M^E mod N in hardware. It is
built to resist differential power analysis (DPA). DPA recovers a secret
exponent by averaging many power traces and correlating them with guesses
about the key bits. The design has two parts:

* **The arithmetic.** One bit-serial Montgomery multiplier does every
  squaring and multiplication. It keeps all numbers in carry-save form
  (two vectors whose sum is the value), so no long carry chain ever sits
  in the critical path. Only the final result goes through a slow
  word-serial adder.
* **The countermeasure.** The exponent is recoded with a fresh random
  number r for every operation. This is the *randomized table window
  method* (RT-WM). The multiplications the core performs, and the table
  values it uses, change from run to run even when M and E stay the same.
  The time taken depends only on the number of windows, not on the bit
  pattern of E.

A parameter, `PROTECTED = 0`, replaces the countermeasure with plain
left-to-right square-and-multiply on the same datapath. That is the
unprotected baseline it was derived from.

All defaults follow the original implementation: key length K = 512, adder
word W = 16, random number width B = 3 and window width T = 2.

## Block map

```
rsa                      top: parallel-port host interface + core
├── pc2fpga              host protocol, operand assembly, result read-back
└── rsa_main             controller, operand registers, schedules
    ├── monpro           carry-save Montgomery multiplier (K+2 cycles)
    │   └── csa ×3       carry-save adders, built from full_adder
    ├── crpa             word-serial carry-ripple adder (K/W cycles)
    │   └── cra          W-bit ripple adder, built from full_adder
    └── rtwm_table       2^T-entry table of carry-save values (PROTECTED=1 only)
rsa_pkg                  shared enums: controller states, host commands
```

The design does not generate the random number r. It enters at the top
as `rand_in[B-1:0]` and must come from a true random source outside this
RTL.

## Carry-save Montgomery multiplication (`monpro`)

`monpro` returns a pair (RC, RS) with RC + RS ≡ X·Y·2^-(K+2) (mod N).
Both X and Y arrive as carry/save pairs (XC, XS) and (YC, YS) of K+2 bits.
The variant has *no final subtraction*:

* Montgomery's radix is R = 2^(K+2), two more iterations than the usual 2^K.
* With that radix, inputs below 2N give a result below 2N. Results can
  therefore go straight back in as operands, with no compare or subtract
  between multiplications.
* The cost is two extra cycles per product.

Each clock does one iteration, taking multiplier bits least significant
first:

1. T ← T + x_i·YC (first CSA level)
2. T ← T + x_i·YS (second level)
3. If the sum vector of step 2 is odd, T ← T + N (third level). The
   parity bit is all the quotient logic needed.
4. T ← T / 2. This is wiring only: the sum vector moves down one bit and
   the carry vector keeps its indices.

The multiplier X is also carry-save, so its plain bits x_i do not exist
yet. A one-bit serial adder (a full adder plus a carry flip-flop) adds
XC and XS as they shift out, which produces the true bits of X one per
cycle.

Arithmetic is modulo 2^(K+2). Every true value stays below that, so the
pair is exact. The adders are one bit wider than the operands, and the
carry out of their top bit is dropped on purpose.

Interface: a one-cycle `start` with operands valid. The first iteration
happens at that clock edge, and `done` pulses exactly K+2 cycles later.
N must stay stable while `busy` is high.

## The exponentiation core (`rsa_main`)

### Operands

The core has four K-bit registers: M, E, N and Const = 2^(2K+4) mod N.

* `load_shift` pushes `din` through the chain M → E → N → Const. A full
  load therefore sends Const, N, E and M, in that order.
* `load_m` replaces M alone. This is the common case of a new message
  under the same key.
* Loads and `start` are accepted whenever `busy` is low.
* `rdy` rises with a valid `result` and stays high until the next `start`.

Caller obligations:

* N must be odd with its top bit set.
* M < N and E ≥ 1.
* Const must be computed by the host.

### Entering and leaving the Montgomery domain

* M' = MonPro(M, Const) = M·2^(K+2) mod N moves M into the Montgomery
  domain.
* At the end, MonPro(R', 1) moves the result out again. That product is
  already fully reduced below N.
* The crpa then adds RC and RS to give the binary result.

### Schedule with `PROTECTED = 0` (square-and-multiply)

1. While M' is being computed, E is shifted up to its leading one, one
   bit per cycle.
2. The core starts from R' = M'.
3. For every further bit it squares R'. For a one bit it also multiplies
   by M'.
4. It exits the Montgomery domain and adds the final pair.

Multiplications and squarings use the same unit. The sequence of
operations still reveals E to a single power trace, though, through the
timing and the Hamming weight.

### Schedule with `PROTECTED = 1`: the randomized table window method

This is the least obvious part of the design, and the testbenches check
it most heavily.

**Recoding.** Take a random r in 1 … 2^B−1. A `rand_in` of 0 is replaced
by 1. Let CNT = ceil((K−B)/T). Phase 1 rewrites E as

```
E = Σ_{j=0}^{S-1} (w_j·2^B + r)·2^(jT)  +  dm,      0 ≤ w_j < 2^T,  0 ≤ dm < 2^B
```

using this loop:

```
dw = E; S = 0
for j = 0 .. CNT-1:
    if dw >= r·2^(jT):  dw = dw − r·2^(jT);  S = S + 1
dm  = dw[B-1:0]
w_j = dw[B + jT +: T]
```

* The subtrahend is shifted T places further at each step.
* Every window j that received a subtraction carries the digit w_j·2^B + r.
  That is a value from a table of only 2^T entries, but shifted by a
  random offset r.
* S counts the subtractions. For a full-length exponent S = CNT.

**The randomized table.** V_i = M^(i·2^B + r) for i = 0 … 2^T−1. It is
built in two phases after entering the Montgomery domain:

* **Phase 2** multiplies up M'^2, M'^3, … M'^(2^B). On the way it
  captures:
  * Q = M'^dm;
  * V_0 = M'^r;
  * U = M'^(2^B).
* **Phase 3** forms V_i = V_(i−1)·U for i = 1 … 2^T−1.

The table (`rtwm_table`) holds carry and save halves in two separate
memories of 2^T × (K+2) bits. Both halves of an entry are read in one
cycle, with one cycle of read latency, like an FPGA block RAM.

**Window loop.**

1. Start with R' = V(w_(S−1)).
2. For each lower window j = S−2 … 0, do T squarings, then R' = R'·V(w_j).
3. One final *normalizing* multiplication R' = R'·Q adds the remainder dm.
4. Exit and add, as in the unprotected schedule.

Windows above S hold no r. They are zero and are skipped: squaring
Montgomery one would only waste time. Every other window costs exactly
T squarings and one table multiplication, whatever its digit, even a
zero digit.

**A small example** with K = 12, B = 3, T = 2, r = 5 and E = 1234.
Here CNT = 5.

* Phase 1 subtracts 5, 20, 80 and 320. 1280 does not fit, so S = 4 and
  dw = 809 = 0b1100101001.
* Then dm = 1 and (w_0, w_1, w_2, w_3) = (1, 1, 2, 1). The table is
  V = (M^5, M^13, M^21, M^29).
* The window loop runs:
  * start: M^13;
  * j = 2: square twice to M^52, multiply by M^21 to M^73;
  * j = 1: M^292, then M^305;
  * j = 0: M^1220, then M^1233.
* Normalizing with Q = M^1 gives M^1234.

**Corner cases.**

| Case | What the core does |
|---|---|
| dm = 0 | There is no Q. The normalizing multiplication is still done, so the time does not depend on dm, and its result is discarded. |
| E < r | S = 0 and there are no windows. The result is Q = M^E itself. |
| r = 0 | Treated as r = 1, because V_0 = M^0 would need a Montgomery one in the table. |

**Phase 1 on the adder.** Phase 1 runs on the crpa in subtract mode.
Compare and subtract are one pass: the final carry (no borrow) decides
whether the difference replaces dw. A window therefore costs K/W + 1
cycles.

## Word-serial adder (`crpa`)

`crpa` adds two K-bit operands W bits per clock.

* It uses one W-bit ripple adder (`cra`) and a registered carry.
* The first word is added in the `start` cycle, so `done` comes K/W
  cycles after `start`.
* With `sub = 1`, b is inverted and the carry-in is 1. `cout` then means
  a ≥ b.

The core uses the crpa for two jobs:

* the final RC + RS;
* the phase-1 subtractions.

## Host interface (`pc2fpga`, `rsa` ports)

The top has the ports of a PC parallel-port link:

| Port | Width | Use |
|---|---|---|
| `ControlPort` | 4 | bit 3 reset; bit 0 command strobe; bits 2:1 command |
| `DataPort` | 8 | data byte |
| `StatusPort` | 4 | bit 0 read-shift strobe; bit 1 capture result; bit 2 show flags; bit 3 unused |
| `Status` | 4 | result nibble, or {rdy, busy, 0, 0} while StatusPort[2] is high |
| `rand_in` | B | random r, sampled with start |
| `START_OUT`, `DONE_OUT` | 1 each | start pulse and ready flag, for triggering power measurements |

All inputs pass through two-flop synchronizers. `ControlPort[3]` becomes
the chip's synchronous reset.

**Commands.** Each rising edge of `ControlPort[0]` executes the command
on `ControlPort[2:1]` once. Set the data and the command before raising
the strobe.

| Code | Command | Action |
|---|---|---|
| 00 | WRITE_BYTE | shift `DataPort` into the top of the K-bit word |
| 01 | LOAD_SHIFT | push the word into the operand chain |
| 10 | LOAD_M | write the word into M only |
| 11 | START | begin an exponentiation |

**Sending operands.** Each K-bit operand goes least significant byte
first, K/8 bytes per word.

**A full operation:**

1. Send Const with WRITE_BYTE, then LOAD_SHIFT it.
2. Do the same for N, E and M, in that order.
3. Issue START.
4. Poll the flags (StatusPort[2] = 1) until rdy = 1.
5. Raise StatusPort[1] to capture the result.
6. Read `Status` K/4 times, least significant nibble first. Each rising
   edge of StatusPort[0] moves on to the next nibble.

## Timing

A Montgomery product costs K+3 cycles in this controller: K+2 in the
multiplier plus one issue cycle. A crpa pass costs K/W + 1 cycles.
Counted from the `start` cycle to `rdy`:

* **Square-and-multiply.** p is the index of the leading one of E. The
  p + 1 term counts one decision cycle per exponent bit after the
  leading one, plus the final one.

  ```
  1 + (K+3)·(2 + p + (popcount(E) − 1)) + (p + 1) + K/W + 1
  ```

* **RT-WM, S > 0:**

  ```
  1 + CNT·(K/W+1) + (K+3)·(2^B + 2^T − 1) + (2 + S) + (S−1)·(T+1)·(K+3) + 2·(K+3) + K/W + 1
  ```

  The terms are:
  * the phase-1 passes;
  * entry plus phases 2 and 3;
  * two cycles to fetch the first table entry and one decision cycle
    per window;
  * window products;
  * normalize and exit;
  * the final addition.

* **RT-WM, S = 0:**

  ```
  1 + CNT·(K/W+1) + (K+3)·(2^B + 2^T − 1) + 1 + 2·(K+3) + K/W + 1
  ```

The testbenches check these formulas exactly. The original FPGA
implementation reports slightly different counts:

| Case (defaults) | This RTL (simulated) | Published |
|---|---|---|
| K=512, square-and-multiply, E = 2^511 | 264 741 | 263 712 |
| K=512, square-and-multiply, random E | 390 916 (weight 246) | 395 812 average |
| K=1024, square-and-multiply, E = 2^1023 | 1 053 765 | 1 051 712 |
| K=1024, square-and-multiply, random E | 1 567 265 (weight 501) | 1 578 020 average |
| K=512, RT-WM, B=3, T=2, full-length E | 407 831 | 404 276 |

The differences come from two sources:

* the issue cycle per product;
* phase 1 costing K/W + 1 cycles per window.

## Where this RTL departs from or adds to the original design

* **Product time.** Every Montgomery product takes one extra cycle to
  issue: K+3 instead of K+2 from one start to the next.
* **Phase-1 cost.** The original cost model charges W+1 cycles per
  window. Here one compare-and-subtract crpa pass costs K/W+1, which is
  33 instead of 17 at the defaults.
* **RT-WM recoding details.** The original description of the phase-1
  loop and of the phase-2 captures is ambiguous in places. The recoding
  above is this design's reading, chosen so that the result is correct
  for every E ≥ 1. Q and V_0 are captured independently, so dm = r
  works.
* **Corner cases.** The dm = 0, r = 0 and E < r cases are handled as
  described above. The time is independent of dm.
* **Table width.** Entries are K+2 = 514 bits wide, matching the
  carry-save registers. The original lists 513-bit block RAMs.
* **Squarings per window.** Each window takes T squarings; an earlier
  flowchart of the original shows 2^T. Only T gives the right exponent.
* **Host protocol.** The original names only the ports. The command set,
  bit assignments, byte order and synchronizers are this design's own.
* **Trigger outputs.** What `START_OUT` and `DONE_OUT` carry is this
  design's choice.
* **Operand order.** The order of the operand shift chain is this
  design's choice.
* **Gate-level cells.** The CSA and full adder are written behaviourally
  per bit. They are not copied gate by gate from the original drawings.
  The Montgomery cell's edge columns are handled with one extra adder
  bit instead.

The core does not protect against every side channel:

* Phase 1 runs on E in the clear.
* S, and with it the run time, depends on r and on the leading bits of E.
  S is constant for full-length exponents.
* The square-and-multiply mode is unprotected by design.

## Simulating

The SystemVerilog needs no vendor libraries. With Verilator 5, build a
testbench like this, giving the packages first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rsa_pkg.sv tb/tb_rsa_ref_pkg.sv tb/tb_rsa.sv --top-module tb_rsa
./obj_dir/Vtb_rsa
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_full_adder`, `tb_csa`, `tb_cra` | Exhaustive or random checks against integer addition. |
| `tb_crpa` | 512/16 additions and subtractions, carries across every word boundary, `cout` as a ≥ b, latency K/W. |
| `tb_monpro` | K = 512. Congruence with X·Y·2^-(K+2) mod N, result below 2N, latency K+2. |
| `tb_rtwm_table` | Writes, reads, read latency and independence of the two halves. |
| `tb_pc2fpga` | The host protocol at K = 64. |
| `tb_rsa_main` | Four core configurations: K=64 and K=128 protected, B=4/T=3/W=8 protected, K=64 unprotected. Random and extreme exponents, dm = 0, E < r, r = 0, short exponents and M-only reloads. Results are checked against a wide-integer reference, and cycles against the formulas above. Each case must occur at least once. |
| `tb_rsa` | The whole chip at the default parameters, driven only through the parallel-port pins. Three 512-bit RT-WM exponentiations, including dm = 0, an M-only reload with r = 0, and E = 65537. It counts the mechanisms exercised: kept and rejected phase-1 subtractions, table writes, squarings, the discarded normalization, both load kinds. About 400 000 cycles per operation, a few seconds of simulation. |
| `tb_rsa_workloads` | The published cases in the timing table above, at K = 512 and K = 1024. Results and cycle counts are checked. |

`tb_rsa_ref_pkg` holds the reference arithmetic: plain wide integers up
to 1024-bit keys, independent of the Montgomery hardware.

## Changing it

* **Key length.** Change `K` (a multiple of W and of 8). Const must then
  be 2^(2K+4) mod N.
* **Window and random width.** Change `T` and `B`. The table has 2^T
  entries. Phase 2 costs 2^B − 1 products, so B trades randomness
  against time.
* **Adder word size.** `W` sets the crpa word. W = 32 halves the adder
  passes at the cost of a longer ripple chain.
* **Schedule.** `PROTECTED` picks the schedule. The table memory exists
  only when it is 1.
