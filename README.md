# Vertical-shuffle LDPC decoder with serial node processors

This is an LDPC decoder that runs belief propagation in the **vertical shuffle
schedule** (VSS). In a flooding decoder every check-to-variable message of
iteration *i* is built only from variable-to-check messages of iteration
*i-1*. In a shuffled decoder the variables are visited one after another. The
check messages a variable receives already use the new messages of the
variables visited before it in the same iteration. Information spreads
faster, so fewer iterations are needed.

The hardware keeps, for each parity check *m*, one running sum in the
**f domain**:

    f(x) = -ln(tanh(|x|/2))
    Q_nm = f(|T_nm|)              (variable-to-check magnitude, kept per edge)
    R_m  = sum over n of Q_nm     (kept per check)

The magnitude of the check-to-variable message is then
`|E_mn| = f^-1(R_m - Q_nm)`, because the check function adds in the f domain.
When variable *n* produces a new `Q_nm`, the check sum is patched right away:
`R_m <- R_m - Q_old + Q_new`. This in-place patch is the *straight spread
update*. Every later read of check *m* sees the new value, which is exactly
what the shuffled schedule needs. Storage is one value per edge (Q), one per
check (R) and one per variable (the intrinsic LLR I_n).

The design follows the architecture of "Generic description and synthesis of
LDPC decoders". From that method it takes:

- serial variable and check processors;
- a total-sum variable processor with grouped update;
- the straight spread update on the check side;
- f and f^-1 placed on the variable side of the interconnection network.

The following are choices of this implementation, and are marked as such
below: the concrete code, the word widths, the sign datapath, the control
and the interfaces.

## The code and the lanes

The decoder is built for a quasi-cyclic, regular code. The parity-check
matrix has `MB x NB` blocks. Each block is a `Z x Z` identity matrix rotated
by

    shift(r, c) = (r * c) mod Z          (ldpc_pkg::qc_shift)

No block is zero, so the variable degree is `d_v = MB` and the check degree is
`d_c = NB`. The defaults `Z = 12, MB = 3, NB = 6` give a (3,6) code with
N = 72 and M = 36, so the rate is 1/2 or a little more. This array-code
construction has no 4-cycles when Z has no factor in common with the
differences between row indices and between column indices.

Variable `n = c*Z + p` belongs to *variable lane* p. Check `m = r*Z + q`
belongs to *check lane* q. The two are connected when
`p = (q + shift(r,c)) mod Z`. There are Z variable lanes and Z check lanes,
and each lane handles one edge per clock. All Z lanes always work on the same
block (r, c). Z edges are therefore processed per cycle, and the routing
between lanes is a cyclic rotation:

- check to variable (`pi^-1`): `barrel_shifter`, rotated by `(Z - shift) mod Z`
- variable to check (`pi`): `barrel_shifter`, rotated by `shift`

With the defaults there are 12 lanes, so 12 edges are processed per cycle. That
is the processing power needed for a (3,6), rate-1/2 code at 10 Mbit/s with
20 iterations and a 100 MHz clock (`3 * 20 * 10e6 / (100e6 * 1/2) = 12`).

## Life of one edge

A pass visits block columns 0..NB-1 in order. For each column it visits rows
0..MB-1 on consecutive cycles. For the edge of block (r, c), in every lane:

1. **Read (cycle t), check lane** (`check_processor`). The lane forms
   `R_mn = R_m - Q_nm` and `sign(E_mn) = S_m xor sign_nm`. Both are
   combinational reads of the lane's memories.
2. **Rotate** through `pi^-1` into the variable lane.
3. **Variable lane, input half** (`variable_processor`). The lane computes
   `E_mn = sign * f^-1(min(R_mn, 31))`. The serial total-sum processor
   (`gnp_total_sum_serial`) adds the MB messages of the variable over cycles
   t .. t+MB-1.
4. **Variable lane, output half (cycle t+MB).** Once all MB messages are in
   (grouped update), the processor sends out `sum - E_mn`, one edge per
   cycle, in arrival order. The lane adds `I_n` to get `T_nm`. It sends
   `Q_nm = f(min(|T_nm|, 31))`, `sign(T_nm)` and the decision
   `sign(I_n + sum E)` back through `pi`.
5. **Write (cycle t+MB), check lane.** The lane does
   `R_m += Q_new - Q_old` and `S_m ^= sign_old ^ sign_new`, stores the edge's
   new Q and sign, and XORs the decision into the check's syndrome bit.

The write-back of an edge therefore comes exactly MB cycles after its read.
The controller produces the write address by delaying the read address
through an MB-stage shift register (`vss_controller`). An assertion in the
top checks that every variable lane's output strobe matches that delayed
write strobe.

### Why reads and writes may interleave

The check-side update is an *increment* formed at write time: the old Q is
read in the same cycle as the write. R_m therefore always equals the sum of
the Q values its edges currently hold, whatever the order of reads and writes
to other edges of the same check. An assertion checks `R_m >= Q_nm` on every
write. Two writes can never hit the same check in one cycle: in one cycle
each check lane writes one row, and a circulant block joins each check to
exactly one variable.

### The two column modes (`mode_exact`)

- **mode 0, overlapped (full rate).** Columns follow back to back, one every
  MB cycles. The read of (r, c+1) happens in the same cycle as the write of
  (r, c). For that one check, a column therefore reads R_m just before the
  previous column's update lands. Every update from two or more columns back
  has already landed. A pass takes `NB*MB` read cycles.
- **mode 1, exact.** Each column waits until the previous column has been
  written back, so a pass takes `2*NB*MB - MB` read cycles. The order of
  operations is then exactly the vertical shuffle schedule.

The reference model in `tb/tb_vss_decoder.sv` reproduces both modes bit for
bit. In mode 0 it holds back one column's write-back until after the next
column's reads.

## Sign datapath

The source architecture draws only the magnitude path. The sign path here is
the same straight-spread scheme with XOR as the operator. S_m is the XOR of
the signs of all `T_nm` of check *m*. The sign of `E_mn` is `S_m` with the
edge's own stored sign removed. It is updated in place like R_m. (Sign
convention: a negative LLR means bit 1.)

## Where the per-edge Q memory sits (`QVAR`)

The Q and sign of each edge can live on either side of the network. Both
placements are built and decode bit for bit alike.

- **`QVAR = 0` (default): check side.** The check lane holds per-edge Q and
  sign and hands out `R_m - Q_nm` directly, as described above.
- **`QVAR = 1`: variable side.** Each variable lane holds the Q and sign of
  its own NB*MB edges, at address `col*MB + k` for the k-th edge of a
  variable. The check lane hands out the whole `R_m` and `S_m`, and the
  variable lane removes its own edge before f^-1. On write-back the variable
  lane sends both the new and the replaced Q and sign through `pi`, so the
  check lane can still do `R_m += Q_new - Q_old`. `pi` grows from 7 to 13
  bits per lane; the total storage stays the same, it only moves.


- **Messages** are 6-bit two's-complement LLRs with 2 fractional bits
  (LSB 0.25, magnitude 0..31 = 0..7.75), set in `ldpc_pkg` (`W = 6`).
- **Input LLRs** should stay within -31..31.
- **The f table** (`ldpc_pkg::f_phi`, wrapped by `f_lut`) maps the 5-bit
  magnitude k to `min(31, round(4 * f(k/4)))`, with f(0) = 31. It gives
  31, 8, 6, 4, 3, 2, 2, then 1 for k = 7..11 and 0 above. f is its own
  inverse, so the same table serves as f^-1.
- **The table is tied to W = 6.** Changing W means recomputing the table
  from this formula.
- **R_m** is `clog2(31*NB + 1)` bits wide (8 for NB = 6). R_mn saturates at
  31 before f^-1, and `|T_nm|` saturates at 31 before f.
- **A decision** is bit 1 when `I_n + sum E < 0`.

## Control (`vss_controller`)

1. **LOAD.** The decoder takes NB input beats of Z LLRs (block column 0
   first). The first beat clears all check-side memories.
2. **Initialization pass.** This is a normal pass with every `E_mn` forced
   to 0. Each edge then writes `Q_nm = f(|I_n|)` and `sign(I_n)`, which
   builds `R_m = sum f(|I_n|)` and S_m. It is the initialization step of the
   hardware algorithm, done by the normal datapath.
3. **Iterations.** Each iteration is one pass, followed by a drain of MB+1
   cycles so that all write-backs land. The decoder stops after the first
   iteration whose decisions satisfy every check (all syndrome bits zero), or
   after IMAX iterations (default 20). It always runs at least one iteration.
4. **OUT.** The decoder returns NB beats of Z decisions, with back-pressure,
   together with `out_iters` and `out_converged`.

## Interface and timing (`vss_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `mode_exact` | in | column mode, sampled with the last input beat |
| `in_valid`, `in_ready`, `in_llr[Z]` | in/out/in | LLR beats, one block column each |
| `out_valid`, `out_ready`, `out_bits[Z]`, `out_last` | out/in/out/out | decision beats |
| `out_iters`, `out_converged` | out | iterations run; syndrome was zero |
| `np_*`, `sp_*` | | the generic node processors beside the decoder (below) |

The last input beat is accepted at cycle L. The first output beat is then
valid at cycle `L + passes * period + 1`, where `passes = iterations + 1`
(this counts the initialization pass) and:

- `period = NB*MB + MB + 1` in mode 0 (22 cycles for the defaults);
- `period = 2*NB*MB + 1` in mode 1 (37 cycles for the defaults).

The testbench checks this formula for every codeword. Input and output are
single-buffered: a new codeword can be loaded once the last decision beat
has left.

Throughput at 100 MHz with the defaults: 6 + 21 * 22 + 1 + 6 = 475 cycles
for a codeword that needs all 20 iterations. That is about 7.6 Mbit/s of
information (K = 36). A codeword that converges in 2 iterations takes 79
cycles, about 45 Mbit/s. Within a pass 12 edges are processed per cycle. The
fixed cost per pass (drain and decision) and the non-overlapped I/O bring the
worst case below the 12 edges per cycle of a pure count. For longer codes
(larger Z) that overhead shrinks relative to the pass.

Storage for the defaults is 2160 bits:

| store | size | bits |
|---|---|---|
| per-edge Q and sign | 216 x 6 | 1296 |
| I_n | 72 x 6 | 432 |
| R_m | 36 x 8 | 288 |
| S_m | 36 x 1 | 36 |
| decisions | 72 x 1 | 72 |
| syndrome | 36 x 1 | 36 |

For comparison, the usual VSS estimate is `E*w + (2-R)*N*w` = 1944 bits. The
difference comes from the wider R_m and the decision and syndrome bits. All
memories are flip-flop arrays with asynchronous reset. For large codes they
would become RAMs with two read ports and one write port per lane.

## Generic node processors

The decoder belongs to a family described by one *generic node processor*:
`d` ports, each output being an associative operator applied to all inputs
but its own. These modules implement that processor in its main forms:

- **`gnp_total_sum`** (parallel, total sum first). It forms the total once
  and removes each input with the inverse operator. The operator is sum or
  XOR, with an optional output register.
- **`gnp_total_sum_serial`** (serial, total sum, grouped update). This is the
  core of each variable lane.
- **`gnp_trellis`** (parallel, forward/backward chains). It needs no inverse,
  so it also supports the *star* operator, the check function F on two LLRs,
  computed here as `sign(a)sign(b) f(f|a| + f|b|)` (`ldpc_pkg::star`). The
  chain ends take only one side instead of combining with a constant.
- **`gnp_spread`** (serial, spread/on-demand update). Each cycle it can take
  one new input for any port and answer one output request.
  - *Straight* mode: one memory, and new inputs take effect at once.
  - *Delayed* mode: an input memory and a compute memory. They swap when all
    D ports have been written once.

The straight spread update of the decoder is the `gnp_spread` straight mode,
applied to many checks that share one memory. The top `vss_decoder` also
instantiates a 4-port total-sum processor (sum), a 4-port trellis processor
(star) and a 4-port delayed spread processor on their own `np_*` / `sp_*`
ports. They share only clock and reset with the decoder, and make the
library available in the same netlist.

## Where this departs from, or adds to, the source architecture

- The parity-check matrix, the word widths and the f table are this design's.
  The source gives only the (3,6) rate-1/2 example and "w bits".
- The sign datapath, the syndrome bits, the initialization pass, the
  per-iteration drain, the early-stop rule, the two column modes and all
  handshakes are additions.
- Only regular quasi-cyclic codes with no zero blocks are supported.
  Irregular codes (zero blocks, varying degrees) would need a per-column
  table of (row, shift) pairs and a variable-length serial group.
- The per-edge Q memory can sit on either side (`QVAR`). Sending the
  replaced Q through `pi` when it sits on the variable side is this design's
  choice.
- A summary table of the source lists the check-side update of this
  architecture as "straight delayed". Its text describes straight spread
  update, which is what is built.
- Not built: the earlier decoders the source classifies (only their
  parameters are given), the Fourier-domain network locations, and the
  flooding and horizontal-shuffle decoders that the same framework could
  generate.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Reference values are computed in the
testbench: `tb_ref_pkg` evaluates f in floating point and rounds it, rather
than reusing the RTL table.

| testbench | what it checks |
|---|---|
| `tb_f_lut` | all 32 table entries |
| `tb_barrel_shifter` | every shift of a 12-lane and a 7-lane rotator |
| `tb_gnp_total_sum`, `tb_gnp_trellis` | random inputs; sum, XOR and star operators |
| `tb_gnp_total_sum_serial` | back-to-back and gapped groups, exact output timing |
| `tb_gnp_spread` | straight and delayed modes, swap pulses |
| `tb_variable_processor` | outputs against a model of f^-1, sum, + I_n, f; timing; a `QVAR = 1` lane must match and return the replaced Q |
| `tb_check_processor` | random interleaved reads and writes against a model that recomputes every sum from scratch; syndrome; clear; a `QVAR = 1` lane must return whole R_m and S_m |
| `tb_vss_controller` | read order, gaps, write-back delay, passes, stop rules, output beats |
| `tb_vss_decoder` | full size, 40 codewords (see below) |
| `tb_vss_rates` | two other rates side by side: a (4,6) code with Z = 11 (rate 1/3) and a (3,30) code with Z = 31 (rate 9/10, N = 930), each bit-exact against the reference model (`vss_rate_harness`); a third instance runs the default code with `QVAR = 1` against the same model |

`tb_vss_decoder` runs 40 codewords at the default parameters. They are
all-zero codewords with light or heavy noise, in both column modes, with
random output back-pressure. For each codeword it compares against a
bit-exact reference model of the schedule:

- every decision;
- the iteration count and the converged flag;
- the latency formula.

With light noise it also checks that the decoder corrects back to the sent
codeword. It counts, and requires at least once each:

- both modes;
- an early stop;
- a stop at IMAX;
- an output stall;
- a corrected codeword;
- a delayed-spread swap.

It also checks the side-by-side node processors.

Run any of them with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ldpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_vss_decoder.sv \
        --top-module tb_vss_decoder
    ./obj_dir/Vtb_vss_decoder

What is not verified:

- codewords other than all-zero. The update is symmetric in sign except for
  the tie rule (T = 0 decides bit 0), so other codewords behave alike, but
  no encoder is included;
- error-rate performance over a channel;
- timing closure. The read path is combinational from the check memories,
  through `pi^-1`, f^-1 and the accumulator. Registers would be needed there
  at high clock rates, and the write-back delay MB would grow to match.

## Files

- `rtl/ldpc_pkg.sv`: widths, f table, star operator, circulant shifts
- `rtl/vss_decoder.sv`: top
- `rtl/vss_controller.sv`: control
- `rtl/variable_processor.sv`, `rtl/check_processor.sv`: the two kinds of lane
- `rtl/barrel_shifter.sv`: `pi` and `pi^-1`
- `rtl/f_lut.sv`: f and f^-1
- `rtl/gnp_*.sv`: generic node processors
- `tb/`: testbenches and `tb_ref_pkg`
