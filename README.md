# Accumulative parallel counters

An ordinary parallel counter is combinational. It takes n single-bit
inputs and outputs how many of them are 1. A sequential counter remembers
a count, but it can only add 1 per clock. An **accumulative parallel
counter (APC)** combines the two. It keeps a q-bit count and, every clock,
adds the number of 1s among its n inputs:

    count <- (count + x[0] + x[1] + ... + x[n-1]) mod p      (p = 2^q, or any 2^(q-1) < p <= 2^q)

The obvious way to build one is a parallel counter, then a fast q-bit
adder, then (for an arbitrary p) a modulo reduction. This RTL instead
merges the operations, so that accumulating costs almost nothing on top
of counting:

- The count output of the full-adder tree feeds a ripple-carry adder. So
  do the bits of the stored count, and a spare carry-in takes one of the
  inputs.
- For long words, the count is kept in **carry-save form**. The loop then
  holds one full-adder delay whatever q is. The count is turned into an
  ordinary binary number only when it is read out.
- For large n, the counter is **pipelined at the level of single full
  adders**. The carry-save loop still holds only one full adder, so the
  clock period is about one FA delay.

Everything is parameterised. The defaults are the example sizes used in the
original design: 16 inputs, and a 6-bit count for the pipelined counter.

## Files

| module | what it is |
|---|---|
| `apc_pkg` | width and latency functions shared by all modules |
| `full_adder`, `half_adder`, `rca`, `csa`, `delay_line` | cells: FA, HA, ripple-carry adder, carry-save adder, shift register |
| `cpc` | combinational parallel counter (full-adder tree) |
| `parallel_incrementer` | z = y + popcount(x) mod 2^q, ripple-carry |
| `parallel_incrementer_csel` | the same, with carry-select for the high bits |
| `mod_parallel_incrementer` | z = (y + popcount(x)) mod p |
| `apc` | register + incrementer: the basic APC, mod 2^q or mod p |
| `apc_delayed` | carry-save APC, count assimilated only at readout |
| `apc_delayed_split` | carry-save low bits, plain counter for the high bits |
| `apc_delayed_mod` | carry-save APC modulo p |
| `cpc_pipe` | parallel counter with a register after every FA |
| `apc_pipe` | bit-level pipelined carry-save APC (16 inputs, 6 bits) |
| `mod_reduce` | chain of conditional subtractions of p |
| `apc_two_level` | pipelined APC + buffers + reduction into an external mod-p register |
| `threshold_gate` | threshold logic unit built from an incrementer |
| `ap_count_array` | systolic responder count across a linear array of modules |
| `apc_top` | all of the above side by side on one input vector |

Each file begins with a comment on its function, interface and timing.

## The parallel counter tree (`cpc`)

The counter is built by divide and conquer. Take two counters of l inputs
each, plus one more input bit. Add the two counts with a ripple-carry
adder of floor(log2 l)+1 full adders, with the extra bit on its carry-in.
The result counts 2l+1 inputs.

- 1 FA counts 3 inputs.
- Two of those plus a bit, through a 2-FA adder, count 7 inputs.
- Two 7-input counters plus a bit, through a 3-FA adder, count 15 inputs.

For any other N the module splits N = a + b + 1 with a = floor((N-1)/2). N = 2
is a half adder. The output width is `apc_pkg::cpc_width(N)`, which is
floor(log2 N)+1 for N = 2^k - 1.

An n-input incrementer needs only an (n-1)-input counter. The last input
enters the carry-in of the adder that adds the count to y. So a 16-input
design uses the 15-input tree (4 output bits).

The module instantiates itself recursively. Verilator's lint reports the
sub-count signals of `cpc` and `cpc_pipe` as undriven. That is an artefact
of how it checks recursive modules before elaborating them: every size
is simulated exhaustively or at random and is correct.

## Parallel incrementers

**Ripple (`parallel_incrementer`).** The (N-1)-input tree feeds a Q-bit
ripple-carry adder. Its other operand is y and its carry-in is x[0]. The
carry-out is `overflow`. The delay is about floor(log2(N-1)) + Q FA levels.
For Q close to log2 N this is barely more than the counter alone.

**Carry-select (`parallel_incrementer_csel`).** Only the low L = cpc_width(N-1)
bits go through the counter and the adder. The high Q-L bits of y go, at
the same time, through a ripple incrementer made of half adders. The carry
out of the low adder then selects, for the high part, either y_hi or
y_hi + 1 (whose carry becomes `overflow`). The incrementer has the whole
counter delay to finish. So a plain ripple incrementer is enough up to
about Q = 3*floor(log2(N-1)) + 2, which is 11 for N = 16 (the default) and
32 for N = 2048.

**Modulo p (`mod_parallel_incrementer`).** This needs 2^(Q-1) < p <= 2^Q. The
circuit has three parts:

1. A first adder forms s1 = y + count + x[0], one bit wider than y.
2. A second adder forms s2 = s1 + (2^Q - p).
3. s2 reaches 2^Q exactly when s1 >= p. Its bit Q drives a multiplexer that
   outputs s2 mod 2^Q (that is, s1 - p) or s1. `wrap` reports which.

The input y must be below p, and N <= p, so that one subtraction is always
enough. A modulus of 2^Q - 1 (end-around-carry arithmetic) is just
P = 2^Q - 1 here.

**Basic APC (`apc`).** The basic APC is a Q-bit register fed back into the
y input. It uses the ripple incrementer when P = 2^Q and the modular one
otherwise. Its controls are `en` (count this cycle), `clr` (synchronous
clear, wins over `en`) and `rst_n` (asynchronous reset). `wrap` is
registered with the count.

## Delayed readout: carry-save counting

The carry-save APCs are the core idea of this design. `apc_delayed` keeps
two Q-bit registers, a sum s and a carry c. Their integer sum is the
count. Every clock, one row of full adders (a CSA) adds three numbers: s,
c and the tree's count.

- Each FA's sum bit goes back into s.
- Each carry goes into c one position higher.
- The carry leaving bit Q-1 is dropped, because counting is mod 2^Q.
- Bit 0 of c would always be 0. Input x[0] is written into it instead,
  which counts the n-th input with no extra adder level.

The loop is therefore one FA deep whatever Q is. The readable count
`count = s + c mod 2^Q` comes from a ripple-carry adder outside the loop.
It is combinational from the registers, so reading it costs an adder delay
but never slows the counting.

**Split words (`apc_delayed_split`).** Only the low QL bits (default 6) are
in carry-save form. The carry leaving bit QL-1 has weight 2^QL. It is at
most one per clock, so it simply increments an ordinary counter that
holds the high Q-QL bits (default 10). At readout, the low s and c are
added. That addition's carry is again at most 1, and it selects either the
high counter or the high counter + 1. This is carry-select once more, and
it avoids carry-save registers for the high bits. The split point is a
free design choice.

**Modulo p (`apc_delayed_mod`).** A carry leaving the word is worth 2^Q, and
2^Q = 2^Q - p (mod p). So the dropped carry is replaced by adding the
constant K = 2^Q - p through a second CSA level, with a multiplexer
choosing 0 or K. That second level can drop a carry of its own. The
design keeps such a carry in a one-bit register w and adds it as K in the
next clock. The multiplexer therefore chooses 0, K or 2K. Because
p > 2^(Q-1), 2K is still below 2^Q.

2K is only ever needed when the count is as wide as the word. With
N = 16, Q = 4, p = 9 it is used; with Q = 6 it never occurs. At readout,
v = s + c + w*K is below 3*2^Q. `mod_reduce` then applies floor(max/p)
conditional subtractions of p. For Q = 6, p = 61 that is two.

## Bit-level pipelined counter (`cpc_pipe`, `apc_pipe`)

This is the fastest design, and its timing needs the closest attention.

**Registers everywhere.** `cpc_pipe` is the same FA tree with a register on
every FA output. In a ripple-carry adder, the FA at position j cannot
start before position j-1 has produced its carry. So the adders work on a
diagonal:

- Bit j of each sub-count arrives one clock after bit j-1.
- Position j adds its operand bits to the carry registered by position j-1
  in the previous clock.
- Its sum is registered as output bit j.

The carry out of the top position gets a second register, so the output
keeps exactly one clock of skew per bit. Inputs that skip tree levels,
and the shallower of two sub-counts, pass through delay registers so that
everything meets on time. Bit j of the output of `cpc_pipe` passes
BASE + j registers, with BASE = `apc_pkg::cpc_pipe_base(N)` (3 for N = 15).

**Deskew, then one CSA row.** `apc_pipe` delays bit j of the skewed count by
another W-1-j registers, so all W bits of one count reach the last row
together. x[0] is delayed to match and enters bit 0 of the carry register,
as in `apc_delayed`. The last row is the carry-save accumulator: full
adders where there are count bits, half adders above them. For N = 16 and
Q = 6 that is four FAs and two HAs. The carry out of the top HA is
registered as `overflow`.

For N = 16 the latency is LAT = 3 + 3 = 6 clocks. A pattern sampled at edge
t is part of s_q + c_q after edge t + 6, and a new pattern is accepted
every clock.

**Restart and reset.** `restart` zeroes the operands fed back from s_q and
c_q, but the count arriving in that clock is still added. So in a restart
cycle, s_q and c_q hold the complete old count and can be copied out, and
no input is lost. `rst_n` resets only the two last register rows. The tree
and deskew registers have no reset, so hold x at 0 for at least 6 clocks
while `rst_n` is low.

## Two-level counter (`apc_two_level`)

A 6-bit internal counter fills up in four clocks of 16 inputs, so the
pipelined counter is used as the first level of a wider count:

- **Transfer.** Every PERIOD = floor((2^QI - 1)/N) clocks (3 for the
  defaults), and whenever `flush` is 1, the internal s_q and c_q are copied
  into two QI-bit buffers. In the same clock the internal counter is
  restarted. Transferring this often means the internal count can never
  exceed QI bits; an assertion checks that its overflow never fires.
- **Reduce.** In the next clock, `mod_reduce` computes
  count + s_buf + c_buf mod P and writes it into the Q-bit external
  register `count`. With QI = 6, Q = 16 and P = 65521 one subtraction
  suffices, which makes two adders in all.

Counting never stops for a transfer. A pattern is in `count` at most
LAT + PERIOD + 1 = 10 clocks after it was sampled.

## Applications

**`threshold_gate`.** This is an incrementer whose additive input is
-thresh in two's complement. The sign of y + popcount(x) says directly
whether at least `thresh` inputs are 1; no comparator is needed. It
requires N < 2^(Q-1). All inputs have equal weight.

**`ap_count_array`.** This counts responders in a linear array of M
associative-processor modules with R responder flags each. A count
instruction enters module 0 with a partial count of 0 and moves one module
per clock. Each module adds its own responders with a parallel
incrementer, whose y input is the partial count. The total arrives M
clocks after `start`, and an instruction may start every clock.

## Top level (`apc_top`)

All counters receive the same x, so their outputs can be compared:

- `cnt_bin` / `wrap_bin`: `apc`, mod 64
- `cnt_mod` / `wrap_mod`: `apc`, mod 61
- `cnt_delayed` / `wrap_delayed`: `apc_delayed`, mod 64
- `cnt_split`: `apc_delayed_split`, mod 65536
- `cnt_delayed_mod`: `apc_delayed_mod`, mod 61
- `cnt_two_level`: `apc_two_level`, mod 65521, with `flush`

The combinational units and the systolic array have their own ports:

- `y_csel` → `z_csel` / `ovf_csel`: the 11-bit carry-select incrementer
  on x
- `thresh` → `fire`: the threshold gate on x
- `ap_start`, `ap_resp` → `ap_done`, `ap_total`: the systolic array,
  4 modules × 16 responders

`clr` and `en` act on the non-pipelined counters (`en` only on `apc`). The
only parameter is N.

## Simulating

Every testbench in `tb/` checks itself against a reference computed
independently in the testbench. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, with a watchdog in case it
hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/apc_pkg.sv tb/tb_apc_top.sv --top-module tb_apc_top
    ./obj_dir/Vtb_apc_top

Substitute any other testbench name. `apc_pkg.sv` must come first because
the modules call its functions when they elaborate.

| testbench | what it shows |
|---|---|
| `tb_cpc` | all 32768 patterns of the 15-input tree; random 7- and 31-input trees |
| `tb_parallel_incrementer` | (16,6) and (12,5), sum and carry-out |
| `tb_parallel_incrementer_csel` | (16,11), both selections and overflow |
| `tb_csel_wide` | (2048,13) and (2048,32) carry-select incrementers |
| `tb_mod_parallel_incrementer` | p = 61, 63, 33 for every y < p |
| `tb_apc` | mod-64 and mod-61 APCs with enable and clear, every clock |
| `tb_apc_delayed` | carry-save APC, every clock, including dropped carries |
| `tb_apc_delayed_split` | 16-bit split counter over a wraparound; a (16,10) instance |
| `tb_apc_delayed_mod` | p = 61, 33, and 9 with Q = 4 (the 2K case) |
| `tb_mod_reduce` | exhaustive 8-bit input for p = 37; random for p = 65521 |
| `tb_cpc_pipe` | the skewed timing of every output bit, every clock |
| `tb_apc_pipe` | (16,6) and (12,6) pipelined APCs with random restarts, latency 6 |
| `tb_apc_two_level` | defaults and an 8-bit mod-251 instance; exact latency bound |
| `tb_threshold_gate` | every threshold 0..31 |
| `tb_ap_count_array` | changing responders, `done` exactly 4 clocks after `start` |
| `tb_apc_top` | the whole top at its defaults, ~26000 clocks |

`tb_apc_top` counts every mechanism and fails if one never happens:

- wraparound of each counter
- disabled cycles and clears
- carries into the high counter, and carry-select at readout
- the 2^q - p correction
- timer and flush transfers
- reduction by p
- carry-select and overflow in the incrementer
- both threshold outcomes
- responder counts

Each block's testbench was also run against a deliberately broken copy of
the block, and every one of them failed.

## Design choices and departures

These are this implementation's choices where the original design is
silent or leaves options open:

- **Default sizes.** Q = 6, P = 61 for the small modular counters;
  Q = 16, P = 65521 for the two-level counter; QL = 6 for the split
  counter; M = 4 and R = 16 for the systolic array. These values are this
  design's own. The 16 inputs, the 6-bit pipelined count and the 11-bit
  carry-select range come from the original examples.
- **Pipelined size.** The original example of the pipelined counter is
  described both as (12, 6) and as (16, 6). The 16-input version is built;
  the 12-input one is a parameter setting and is tested too.
- **Pipeline registers.** The original says sum outputs get one register
  and carry outputs two, except in the last level. Here every FA output is
  registered once, and only the top carry of each ripple adder gets a
  second register. This yields the same one-clock-per-bit skew the
  deskew stage needs.
- **High section of the split counter.** The high section is a plain
  binary counter with an incrementer. A constant-time counter design was
  suggested for it, but is not used.
- **Pending carry in the modular carry-save counter.** The register w
  and the 2K multiplexer choice are additions. Without them, a carry
  dropped by the correction level would be lost.
- **Two-level control.** The transfer timer, the flush input, and a
  reduction that takes one clock after the transfer are this
  implementation's own.
- **Control signals.** Reset, clear and enable on the non-pipelined
  counters are additions.
- **Threshold gate.** `fire` means "at least thresh inputs are 1".

Not built:

- merging the bits of y into unused FA inputs of the tree (a cost
  saving when n is a power of 2)
- carry-skip and two-level carry-select incrementers for very long words
- weighted-input threshold units
- mesh and tree arrangements of the responder count
- using the counters inside column-compression multipliers and
  multi-operand adders (no structure is given for these)
