# Parallel canonical signed-digit recoding

A binary number can be rewritten with digits {-1, 0, +1}. Among all such
forms there is exactly one, the *canonical* signed-digit (CSD) form, in which
no two neighbouring digits are both nonzero; it also has the fewest nonzero
digits. Fewer nonzero digits means fewer additions in a shift-and-add
multiplier or fewer multiplications in square-and-multiply exponentiation.
For example

    478 = 0111011110 (7 ones)  ->  1 0 0 0 -1 0 0 0 -1 0 (3 nonzero digits)
                                   = 512 - 32 - 2

The classic way to obtain the CSD form (Reitwiesner's method) scans the
number from the least significant bit and carries one bit of state from
position to position, so it takes time proportional to the word length. This
RTL computes the same digits in logarithmic depth, with no clock, by
treating that state bit as the carry of a carry look-ahead adder.

## The recoding rule

With x padded by zeros above its most significant bit and c_0 = 0, each
position i looks at x_{i+1}, x_i and the carry c_i:

| x_{i+1} | x_i | c_i | y_i | c_{i+1} | meaning            |
|---------|-----|-----|-----|---------|--------------------|
| 0       | 0   | 0   | 0   | 0       | run of 0s          |
| 0       | 0   | 1   | +1  | 0       | end of a run of 1s |
| 0       | 1   | 0   | +1  | 0       | isolated 1         |
| 0       | 1   | 1   | 0   | 1       | inside a run of 1s |
| 1       | 0   | 0   | 0   | 0       | run of 0s          |
| 1       | 0   | 1   | -1  | 1       | isolated 0 in 1s   |
| 1       | 1   | 0   | -1  | 1       | start of a run     |
| 1       | 1   | 1   | 0   | 1       | inside a run of 1s |

Two facts make it parallel:

* **Digits are local once the carries are known.** With t_i = x_i XOR c_i,
  y_i = +1 when t_i AND NOT x_{i+1}, and y_i = -1 when t_i AND x_{i+1}.
* **The carry is a look-ahead carry.** The table's carry column is the
  majority of x_{i+1}, x_i, c_i, i.e. c_{i+1} = g_i + p_i c_i with
  g_i = x_i x_{i+1} and p_i = x_i + x_{i+1}. This is exactly the carry of
  the sum x + floor(x/2), whose i-th operand bits are x_i and x_{i+1}.

Each digit is carried on two wires {u, v}: `00` = 0, `01` = +1, `10` = -1
(`11` never occurs). `csd_pkg::csd_digit_e` names these codes.

## The prefix recoder (`csd_recoder`)

Three rows of logic, for an (N+1)-bit input (default N = 8, a 9-bit input):

1. `gp_cell` (one per position 0..N-1): forms Q_i = (g_i, p_i).
2. `lf_prefix`: a parallel prefix network over the operator

       (g1, p1) . (g2, p2) = (g1 + p1 g2, p1 p2)        (prefix_node)

   which is associative. It returns R_i = Q_i . Q_{i-1} . ... . Q_0, and the
   generate half of R_i is c_{i+1}.
3. `digit_encoder` (one per position 0..N+1): the three-input, two-output
   cell above.

### The prefix network

`lf_prefix` is the Ladner-Fischer minimum-depth prefix network. It is
defined by a recursion over a family of networks P_k(n):

* **P_0(n)** (minimum depth): P_1 on the low half, P_0 on the high half,
  then one node per high-half output that joins it with the top output of
  the low half.
* **P_k(n), k >= 1**: a row of nodes joins neighbouring inputs in pairs,
  P_{k-1} runs on the n/2 pairs and delivers every odd-indexed output, and
  a last row forms each even-indexed output from its own input and the odd
  output just below it.

P_1 is one level deeper than P_0 overall, but its top output is ready as
early as P_0's. That is what the join row of P_0 waits for, so P_0(n) keeps
depth log2 n while using fewer nodes than recursive doubling. For
n = 2^d it has 4n - F(5+d) + 1 nodes, where F is the Fibonacci sequence
with F(0) = 0 and F(1) = 1:

| n     | 4   | 8   | 16  | 32  | 64  |
|-------|-----|-----|-----|-----|-----|
| nodes | 4   | 12  | 31  | 74  | 168 |
| depth | 2   | 3   | 4   | 5   | 6   |

The RTL does not instantiate itself. Constant functions in `csd_pkg` unroll
the recursion into a table: `lf_ready(n, k, i)` is the level at which
position i becomes final, and `lf_partner(n, k, t, i)` is the position that
node (t, i) combines with, or -1 where the signal passes straight through.
Every node updates its position in place, R_i <= R_i . R_j, and is placed
at the first level at which both operands are final. `lf_prefix` then
generates one row of `prefix_node`s or wires per level.

Each node is two gate levels (AND then OR), so the carries settle after
about 2 log2 n gate delays. `lf_prefix_tb` checks the node count and depth
for n = 2 to 1024, using the functions in `csd_pkg` that follow the same
recursion. At n = 8, 16, 32 and 64 the count was also confirmed by
counting the OR gates of the synthesized network. When n is not a power of
two, the low half takes the extra input, and an odd last input is handled
by the final row. The network is checked exhaustively at n = 8 and with
random inputs at n = 13, 16, 37 and 64.

### The extra top digit

An (N+1)-bit number can need N+2 canonical digits: 384 = 110000000 becomes
+1 0 -1 0 0 0 0 0 0 0. When x_N = 1 and c_N = 1 the recoding carries out
of the top bit, so `csd_recoder` adds c_{N+1} = x_N AND c_N and one more
digit encoder. The output is exact for every input. If the top input bit is
always 0, that digit is always 0.

Some output bits are constant by construction: c_0 is 0, and the top two
digits can never be -1 because the bits above x_N are 0.

## The adder-based recoder (`cla_recoder`)

Because the recoding carries are the carries of x + floor(x/2), an ordinary
carry look-ahead adder can do the hard part:

* `cla_adder` is a prefix adder: generate a_i b_i, propagate a_i + b_i, the
  same `lf_prefix` network, carry in 0, s_i = a_i XOR b_i XOR c_i.
* `csd_from_sum` takes x and s = x + floor(x/2) and recovers every carry
  from one sum bit, c_i = s_i XOR x_i XOR x_{i+1}. Then it runs the same
  digit encoders. Given the sum, this is constant depth whatever N is.
* `cla_recoder` feeds x and x >> 1 to the adder and the sum to
  `csd_from_sum`. An immediate assertion checks, on every evaluation, that
  the recovered carries equal the adder's own carries.

## Top level (`csd_top`)

`csd_top` places the two recoders side by side with separate ports; they are
two constructions of the same function, not one pipeline.

| port  | dir | width       | meaning                                           |
|-------|-----|-------------|---------------------------------------------------|
| `x_a` | in  | N+1         | number for the prefix recoder                     |
| `y_a` | out | N+2 digits  | its CSD digits, `y_a[i]` = y_i, 2 bits each       |
| `c_a` | out | N+2         | its recoding carries c_{N+1}..c_0                  |
| `x_b` | in  | N+1         | number for the adder-based recoder                |
| `s_b` | out | N+2         | x_b + floor(x_b / 2)                              |
| `y_b` | out | N+2 digits  | its CSD digits                                    |

Everything is combinational: no clock, no reset, no handshake. If it is
used inside a clocked design, register its inputs or outputs as timing
requires.

## Files

`rtl/`: `csd_pkg` (digit codes, the (g, p) struct, the operator, and the
node-count and depth functions of the prefix network), `gp_cell`, `prefix_node`, `lf_prefix`, `digit_encoder`,
`csd_recoder`, `cla_adder`, `csd_from_sum`, `cla_recoder`, `csd_top`. The only
parameter is the width: `N` (default 8) for the recoders and the top, and
`W` (default 9) for the adder.

`tb/`: one self-checking testbench per module (`<module>_tb`) and
`csd_ref_pkg`, which holds a serial model written straight from the table
above, plus independent checks (the digits add up to x, no two neighbours
are nonzero, no more nonzero digits than x has ones).

| testbench          | what it covers                                                   |
|--------------------|------------------------------------------------------------------|
| `gp_cell_tb`       | all 4 inputs                                                     |
| `prefix_node_tb`   | all pairs, and associativity over all triples                    |
| `digit_encoder_tb` | all 8 table rows                                                 |
| `lf_prefix_tb`     | all 2^16 inputs at N = 8, random at N = 13, 16, 37, 64; node counts and depths |
| `csd_recoder_tb`   | every 9-bit input (including 478) and every 16-bit input         |
| `cla_adder_tb`     | all 9-bit operand pairs, random 24-bit pairs                     |
| `csd_from_sum_tb`  | every 9-bit and 14-bit input                                     |
| `cla_recoder_tb`   | every 9-bit input                                                |
| `csd_top_tb`       | default size, every input on both paths, the two paths compared  |

`csd_top_tb` also counts how often each table row, the extra top digit, a
carry chain running the full width and a reduction in nonzero digits
occurred, and fails if any of them never did. Every testbench prints one
line `TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

At the default width both recoders are checked for all 512 inputs, so
their function there is verified completely. Timing is not modelled: the
gate-delay figures above come from the structure, not from a timing run.

To run one with Verilator (all are quick):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/csd_pkg.sv tb/csd_ref_pkg.sv tb/csd_top_tb.sv --top-module csd_top_tb
    ./obj_dir/Vcsd_top_tb

## How closely this follows the method, and where it departs

* Followed as described: the recoding table; the (g, p) definitions; the
  prefix operator; the three-row structure with an 8-input, 12-node,
  3-level prefix network for a 9-bit input; the {u, v} digit code; using a
  carry look-ahead adder on x + floor(x/2).
* The digit cell uses u_i = x_{i+1}(x_i XOR c_i) for -1 and
  v_i = NOT x_{i+1}(x_i XOR c_i) for +1, as the table requires.
* Added here: the digit y_{N+1} and carry c_{N+1} (see above). The method
  as usually stated stops at y_N, which is complete only when x_N = 0.
* This design's own choices: the prefix network's level-by-level
  placement and its handling of widths that are not a power of two; the
  internals of the carry look-ahead adder; the carry recovery formula c_i = s_i XOR x_i XOR x_{i+1} that makes the recoding
  constant-depth from a given sum.
* Gate count: the method counts 2n XOR and 2n AND gates for the digit row.
  Here u_i and v_i share one XOR, so the row is n XOR, 2n AND and n
  inverters.
* Not built: the serial recoder (it exists only as the testbench model) and
  Booth recoding, which serve only as comparisons.
