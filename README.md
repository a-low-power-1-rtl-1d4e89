# Reconfigurable layered-BP LDPC decoder for 802.16e / 802.11n codes

This decoder handles the block-structured LDPC codes of IEEE 802.16e (WiMax)
and IEEE 802.11n (WLAN). Their parity-check matrix H is a grid of z×z
sub-matrices. Each sub-matrix is either zero or a cyclically shifted identity.
Within one block row (a *layer*) no two check rows share a variable, so all z
check rows of a layer can be decoded at the same time.

The decoder has z_max = 96 identical check-node lanes. It processes H one
layer after another, using *layered belief propagation*: every updated
a-posteriori value is used at once by the next layer. Inside a layer it walks
through the non-zero sub-matrices two at a time. For each pair it:

1. reads two words of z a-posteriori LLRs (L) from a central memory;
2. rotates each word with a circular shifter so that lane i gets the value
   belonging to check row i;
3. lets every lane combine them with its own stored check messages (Λ).

The check-node update is full belief propagation, not min-sum. It uses the
boxplus/boxminus form: a forward boxplus sum over the row, then each outgoing
message as that sum "minus" the incoming one. A one-level look-ahead lets each
lane take two messages per clock (radix-4).

Everything that depends on the code is held in small run-time tables:
- the list of non-zero sub-matrices with their shifts;
- z, the number of layers and the iteration limit.

So the code can change between frames. Lanes at or above the current z are
switched off, and their memory banks are not accessed. An early-termination
test stops iterating once the information bits have settled.

## Block diagram

```
          llr_* (host)                                  hd_* (host)
              |                                              ^
              v                                              |
      +---------------+  2 read ports   +--------------+     |
      |   L-memory    |---------------->| 2x circular  |-----+
      | 24 words x    |                 |   shifter    |
      | 96 lanes x 9b |<--+             +--------------+
      +---------------+   |                     | L (rotated), 2 per cycle
              ^           |                     v
              |           |   +------------------------------------+
   early_term +-- writes -+---|  96 x siso_r4 lanes                |
   (watches   |   (2 per      |  each with its own lambda_bank     |
    writes)   |    cycle)     |  (56 x 2 x 8b Lambda messages)     |
              |               +------------------------------------+
              |                                 ^
      +---------------+  pair table, layer table, rotation bookkeeping,
      |   ldpc_ctrl   |  scoreboard, stall, iteration overlap, early-termination decision
      +---------------+
```

| File | Role |
|---|---|
| `rtl/ldpc_pkg.sv` | constants, message types, saturation, 3-bit correction tables |
| `rtl/boxplus_f.sv` | f(a,b) = a ⊞ b, combinational |
| `rtl/boxminus_g.sv` | g(a,b) = a ⊟ b, combinational |
| `rtl/siso_r4.sv` | one radix-4 check-node lane |
| `rtl/lambda_bank.sv` | per-lane Λ memory, gated by lane enable |
| `rtl/circ_shifter.sv` | rotation by r modulo the run-time z |
| `rtl/l_memory.sv` | central L memory, 2 read and 2 write ports, per-lane write mask |
| `rtl/early_term.sv` | early-termination test |
| `rtl/ldpc_ctrl.sv` | schedule, code tables, hazards, frame sequencing |
| `rtl/ldpc_decoder.sv` | top level |

## The check-node lane (radix-4 SISO)

The lane is the hardest part to follow. It runs two phases, and the phases of
two consecutive layers overlap.

**Forward phase** (one pair (a, b) of incoming messages per clock):

```
lam_a = L_a - Λ_a,   lam_b = L_b - Λ_b          (remove the lane's old message)
ab    = f(lam_a, lam_b)                         (outside the loop)
S     = first ? ab : f(S, ab)                   (the only recursive step)
```

Boxplus is associative, so f(f(S,a),b) = f(S,f(a,b)). This is the look-ahead:
the loop still holds only one f unit, but it absorbs two messages per cycle.
The cost is one extra f unit in front of the loop.

When a row has odd degree, the second slot of its last pair is empty (`v1 = 0`)
and the lane leaves it out of the sum.

**Backward phase** (one pair per clock, in the same order):

```
Λ_new = g(S, lam)          (boxminus: the row sum with this message taken out)
L_new = lam + Λ_new
```

The lam values wait in a FIFO between the two phases. The completed row sums
wait in an NQ-entry queue (NQ = 3). So while one row is in its backward phase,
the next layer's forward phase can already run.

**Arithmetic.** f and g work on magnitudes and signs:

```
f(a,b) = sgn(a)·sgn(b)·( min(|a|,|b|) + c_f(|a|+|b|) − c_f(||a|−|b||) )
g(a,b) = sgn(a)·sgn(b)·( min(|a|,|b|) − c_g(|a|+|b|) + c_g(||a|−|b||) )
```

The two correction terms are 3-bit lookup tables, in LSBs of 0.25:
- `c_f(x) = round(4·ln(1+e^(−x/4)))`
- `c_g(x) = min(7, round(−4·ln(1−e^(−x/4))))`

`ldpc_pkg.sv` gives the breakpoints.

The sign of g follows from the identity: for |S| < |lam|, g(S, lam) has the
sign of S·lam.

**Number formats** (two's complement, 2 fraction bits):

| Quantity | Width | Range |
|---|---|---|
| Λ, and lam as seen by f/g | 8 bit | ±127 LSB = ±31.75 |
| L | 9 bit | ±255 LSB |
| lam in the FIFO | 10 bit, full precision | |

Every adder saturates to a symmetric range.

Two details are needed for decoding to work at this width. Both were found by
simulation:

* *No zero messages.* If a Λ or lam of exactly 0 enters g, the boxminus
  result is 0, and that lane's row stays silent for good. So f never outputs a
  magnitude below 1 LSB, and a lam of 0 enters f/g as +1 LSB.
* *No clipping of the variable's own evidence.* L is one bit wider than Λ. The
  FIFO keeps lam unsaturated, so `L_new = lam + Λ_new` does not lose what the
  8-bit saturation cut off. Without this the decoder converged and then
  drifted away again.

## Storing L in rotated form

The central memory holds one 96-lane word per block column (24 words).

A block column is not put back into natural order after each layer. Instead it
stays in the rotation of the last layer that wrote it. The controller keeps
this *stored rotation* `off[c]` for every column, so each read needs only one
shifter:

```
read rotation  r = (shift − off[c]) mod z      lane i gets word[(i + r) mod z]
after write    off[c] = shift of the writing sub-matrix
```

The shifter rotates modulo the run-time z, not modulo 96. Lanes at or above z
read 0, and their writes are masked.

Channel LLRs are loaded in natural order (`off = 0`). At the end of a frame,
the hard-decision output reads each column and rotates it by
`(z − off[c]) mod z` back to natural order.

## Schedule, pipeline, stalls and drain

The controller issues one pair entry per cycle.

```
cycle t      L-memory read (2 ports) + Λ-bank read, tag pushed to a FIFO
cycle t+1    memory data -> circular shifters -> register
cycle t+2    pair enters the lanes (forward phase)
...          backward phase: Λ_new to the banks, L_new to the L-memory
             (the tag FIFO supplies column and Λ address of each write)
```

The following layer may start reading while the previous layer is still in
its backward phase (*layer overlap*). Two rules keep the result bit-exact with
strictly sequential layered decoding:

* **Dependency stall.** A scoreboard holds one pending bit per block column.
  It is set at issue and cleared at write-back. A read of a pending column
  waits, and `stall` is high in that cycle. Consecutive layers that share
  columns therefore stall. How long depends on the column order inside each
  layer: columns the next layer needs should be early in the row, and columns
  the previous layer writes should be late.
* **Row credit.** At most NQ = 3 rows may be in the lanes at once.

**Iteration boundary.** When no decision is due, the first layer of the next
iteration follows the last layer at once. The stall rule covers this boundary
like any other layer change. A decision is due when early termination is on,
or at the iteration limit. Then the pipeline drains fully first. This costs
about one row's backward phase plus the pipeline depth. After that the
early-termination test is evaluated, and either the next iteration starts or
the output phase begins.

The Λ banks need no hazard check of their own. A pair's read in the next
iteration also reads its block columns, so it waits for the pair's own
write-back.

With no shared columns between consecutive layers, one pair issues per cycle.
A measured 24-entry code took 24.7 cycles per iteration over 10 iterations,
with early termination off. With the drain it took 31.9.

Codes with the real 802.16e/802.11n shapes need 40–48 entries, and their
layers share columns. With column ordering inside the layers, and early
termination on (so with a drain per iteration), they took 76–95 cycles per
iteration. With a random order they took 90–114. The throughput formula for
this class of decoder is `2·k·z·R·fclk / (E·I)`, which assumes one pair per
cycle with no stalls. For a rate-1/2 802.16e code with z = 96 at 450 MHz and
10 iterations it gives about 1.4 Gbps. This RTL reaches about half of that,
because:
- it stalls on shared columns;
- it drains before each early-termination test.

A better layer order, or a bypass from write-back to read, would close much
of the gap. Neither is built.

## Reconfiguration: the code tables

A code is described by:

| Input | Meaning |
|---|---|
| pair table (`cfg_pair_we/addr`, `pair_t cfg_pair`) | up to 56 entries `{col0, sh0, col1, sh1, v1}`: the non-zero sub-matrices, layer by layer, two per entry. `v1 = 0` marks an empty second slot. The entry index is also the Λ address. |
| layer table (`cfg_layer_we/addr/np`) | number of pair entries in each layer, at most 12 |
| `z` | sub-matrix size, 1..96 |
| `nlayers` | 1..12 |
| `kinfo` | number of information block columns, used by early termination |
| `max_iter` | 1..15 |
| `et_en`, `et_thr` | early termination on/off, and its threshold on min \|L\| (9-bit magnitude) |

All of these may change only while `busy` is low.

No base matrices are built in. The host (or a ROM added around the decoder)
writes the table of the code in use.

## Interface and frame sequence

1. While idle, write the code tables if the code changes.
2. Write the channel LLRs: `llr_we`, `llr_col`, and `llr_data` (96 × 8 bit,
   positive means bit 0, 0.25 per LSB), one block column per cycle.
3. Pulse `start`. `busy` rises.
4. The decoder iterates until early termination or `max_iter`.
5. It then puts out the 24 block columns of hard decisions in natural order:
   `hd_valid`, `hd_col`, `hd_bits` (1 = bit one), one column per cycle.
6. `done` pulses with the last column, and `iters` gives the iterations used.
   `busy` falls in the following cycle.

`lane_en` shows the active lanes (i < z). `stall` shows dependency stalls.

## Early termination

Decoding stops when both of these hold:
1. the hard decisions of the information bits are the same as at the end of
   the previous iteration;
2. the smallest |L| over the information bits exceeds `et_thr`.

How it works:
- `early_term` watches the two L-memory write ports.
- For each block column it keeps the sign bits of the latest write, and the
  smallest magnitude of that write.
- At each iteration end the controller takes a snapshot of the signs and
  evaluates the test.

Comparing sign bits directly only works when both words are stored in the
same rotation. Rotations are consistent from the second iteration on, because
each column is then last written by the same layer. So the test is accepted
only from the second iteration on. Lanes at or above z are ignored.

## Sizes

| Parameter | Default | Reason |
|---|---|---|
| Z_MAX | 96 | largest 802.16e z; 802.11n needs 81 |
| KB | 24 | block columns of both standards |
| JB_MAX | 12 | most layers (rate 1/2) |
| PMAX | 12 | pairs per layer; row degree up to 24 (802.11n rate 5/6 has 22) |
| EP_MAX | 56 | pair entries; E ≤ 88 plus padding for odd degrees |
| W, WL | 8, 9 | message and L widths |
| NQ | 3 | rows in flight per lane |

DMB-T codes (z = 127, 60 block columns, up to 48 layers) do not fit these
defaults. The package constants are the place to grow them. The pair-table
and address widths follow from them.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_boxplus_f` and `tb_boxminus_g` check all 65,536 input pairs against a
  reference. The reference computes the correction tables with real-valued
  `ln`/`exp` in `ldpc_ref_pkg.sv`.
* `tb_circ_shifter`, `tb_l_memory`, `tb_lambda_bank` and `tb_early_term` use
  random stimulus against simple models.
* `tb_siso_r4` checks lane results against the reference recursion,
  including:
  - odd degrees;
  - back-to-back rows;
  - back-pressure;
  - the 2-cycle latency and one-pair-per-cycle throughput.
* `tb_ldpc_ctrl` drives the controller against a behavioural datapath model.
* `tb_ldpc_decoder` is the end-to-end test, at full size with default
  parameters. It uses `ldpc_harness.sv`, which:
  - generates random block-structured codes and noisy frames;
  - runs a layered-BP reference model with the same pair-wise arithmetic;
  - after each frame, compares the entire L-memory (undoing the stored
    rotation), the hard decisions, the iteration count, the number of issued
    pairs and a cycle bound.

  It runs five frames, including a code switch, a small z (unused lanes), odd
  degrees, a stall-free layer order, iterations without a drain between
  them (checked against a one-pair-per-cycle bound), early stops and
  iteration-limit stops. It counts each of these mechanisms and fails if one
  never occurs.
* `tb_ldpc_workloads` runs one code per rate of each standard with the
  standard's shape:
  - 802.16e: 12/8/6/4 layers, z = 96/72/48/24;
  - 802.11n: z = 27/54/81.

  The block-column positions and shifts are random. Each frame must match the
  reference and decode the sent codeword.

Every testbench was also run against a copy of its module broken in one way
that matters, and each one failed.

**Trust.** The decoder is bit-exact with its own reference model. It decodes
noisy frames of the target sizes. The model has the same fixed-point choices,
so it checks the implementation, not the choices. The error-rate performance
against floating-point BP was not measured. Nothing was synthesised to gates
for a technology, so neither the 450 MHz clock nor the area is verified here.

### Simulating with verilator

From the repository root, for example the full-size decoder test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ldpc_decoder \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

For another test, replace `tb_ldpc_decoder` with its name. The block tests
need only `rtl/ldpc_pkg.sv` (and `tb/ldpc_ref_pkg.sv` where they use the
reference functions) before the testbench file. The decoder tests take about
a minute each.

## Departures and limits

* **Radix-2 lane.** The single-message-per-cycle lane is the baseline the
  radix-4 lane improves on. It is not built.
* **Iteration boundary and stalls.** The pipeline drains before every
  early-termination test, and there is no write-to-read bypass. So throughput
  is below the ideal formula (see above). Layer order and in-row column order are left to whoever writes
  the code table.
* **Memories.** The L-memory has two read and two write ports, and there are
  two shifters, one per pair slot. It and the Λ banks are written as arrays,
  not as SRAM macros.
* **Power saving.** This is done by holding unused lanes frozen and not
  accessing their banks. There are no clock-gating cells or power switches.
* **Arithmetic choices.** These are all specific to this design:
  - word lengths and fraction bits;
  - the correction-table breakpoints;
  - the zero-message floor;
  - the wider L and full-precision FIFO.
* **Interface and hard-decision output.** These are also this design's own:
  - the table format and configuration ports;
  - the "only while idle" rule;
  - natural-order hard-decision output of all 24 columns, not only the
    information part.
* **Code descriptions.** Base matrices of the standards are not included.
