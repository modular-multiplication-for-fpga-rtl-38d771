# IDEA block cipher processors built around modulo 2^16+1 multipliers

IDEA encrypts a 64-bit block, seen as four 16-bit words, in eight identical
rounds and a final output transformation. It mixes three operations on
16-bit words:

* addition modulo 2^16 (written ⊞ here),
* bitwise XOR (⊕),
* multiplication modulo 2^16+1 (⊙). The word 0 stands for 2^16, and a result
  of 2^16 is written as 0.

Addition and XOR are cheap. The ⊙ operator dominates the area and the speed
of any IDEA circuit, and this design is built around it. It provides three
hardware ⊙ operators and pipelined versions of ⊞ and ⊕ with an adjustable
number of registers in each. An IDEA round keeps itself in step whatever
those register counts are. From these parts, fully unrolled or iterative
processors can be built by choosing parameters. The top level, `idea_top`,
instantiates five such processors side by side:

| instance | architecture | ⊙ operator | pipeline (m1,m2,m3[,m4] / β / γ) | rate | latency (cycles) |
|---|---|---|---|---|---|
| `fast` | 8+1 rounds, fully unrolled | (n+1)×(n+1) multiplier | 1,1,1 / 1 / 1 | 1 block per cycle | 109 |
| `csa`  | 8+1 rounds, fully unrolled | carry-save (no multiplier) | 1,1,1,1 / 1 / 1 | 1 block per cycle | 134 |
| `ve`   | 8+1 rounds, fully unrolled | Low-High on an adder-tree multiplier | 2,1,1 / 1 / 1 | 1 block per cycle | 134 |
| `fb`   | 1+1 rounds, iterative | Low-High | 0,0,0 / 0 / 0 | 1 block per 8 cycles | 10 |
| `it4`  | 4+1 rounds, iterative, pipelined | (n+1)×(n+1) | 1,1,1 / 1 / 1 | 1 block per 2 cycles | 109 |

`fast` is the high-throughput configuration: 64 bits per clock through 107
pipeline stages. `fb` is the one for feedback chaining modes such as CBC,
where each block needs the previous ciphertext and so a deep pipeline cannot
be kept full.

## The ⊙ operators

The three operators all compute the same function: `p = x ⊙ y`, with 16-bit
inputs and output and the 0 ↔ 2^16 encoding. Each has optional pipeline
registers at fixed points, and its latency α is the sum of those register
counts. Parameters M1..M3 (and M4) set the counts.

### Low-High (`mul_lowhigh`)

For non-zero operands, take the 32-bit product and split it into
`c_L = xy mod 2^16` and `c_H = xy div 2^16`. Because 2^16 ≡ −1 (mod
2^16+1), the result is

    x ⊙ y = (c_L − c_H + [c_H > c_L]) mod 2^16

A zero operand stands for 2^16, so 2^16·y ≡ −y ≡ (1 − y) mod 2^16 in the
encoded form. Two 16-bit subtracters next to the multiplier compute 1−x and
1−y. A multiplexer then replaces (c_L, c_H) with (1−y, 0) when x = 0, or with
(1−x, 0) when y = 0. The case y = 0 also covers 0 ⊙ 0 = 1.

After the multiplexer come a subtracter and a comparator, then an adder that
adds the comparator bit. Register points:

* M1 after the multiplier and the two subtracters (0..3).
* M2 after the subtracter and comparator.
* M3 after the final adder.

With `TREE_MULT = 1` the 16×16 product comes from `umul_tree` (described
below), and the M1 registers sit between the levels of its adder tree.

### (n+1)×(n+1) multiplier (`mul_np1`)

This operator needs no special-case multiplexer. Each operand is widened to
17 bits as `{x == 0, x}`, which turns 0 into 2^16. Their 33-bit product is
split into `M` (bits 15:0), `D` (bits 31:16) and `d16` (bit 32). Since 2^16 ≡
−1 and 2^32 ≡ 1, one 16-bit adder and one XNOR finish the job:

    {c, s} = M + ~D + 1          (16-bit sum s, carry out c)
    cin    = ~(c ^ d16)
    x ⊙ y  = (s + cin) mod 2^16

The cases 0·1, 1·0, 0·0 and a result of 2^16 all fall out of this carry
rule. Using an OR instead of the XNOR is a known wrong variant: it gives
1 ⊙ 1 = 2. The testbench fault copy uses exactly that variant. Register
points: M1 after the multiplier, M2 after the first adder, M3 after the final
adder.

On a device with 18×18 embedded multipliers this is the smallest of the
three operators. It is the one used by the fastest processor.

### Carry-save, modulo-reduced partial products (`mul_csa`)

This operator is for devices without embedded multipliers. Multiplying y by
2^i modulo 2^16+1 is a rotation in which the wrapped bits are inverted, minus
a constant. So each partial product is either that rotation or, when x_i = 0,
the constant 2^i − 1:

    PP_i = x_i ? {y[15-i:0], ~y[15:16-i]} : (2^i − 1)
    x·y ≡ 16 + 2 + Σ PP_i   (mod 2^16+1)

The 16 partial products and the constant 2 are reduced to two words by 15
modulo carry-save adders. Each is a 3:2 counter whose carry out of bit 15 is
inverted and fed back into bit 0, which adds exactly 1 to the sum. The final
modulo adder computes `(a + b + 1) mod 2^16+1` as `a + b` when `a + b`
carries out, and `a + b + 1` otherwise. Two adders and a multiplexer do
this. Together these add the 16 of the formula.

A zero operand is handled by the 2^16 correction unit. It supplies the pair
(~y, 1) when x = 0, (~x, 1) when y = 0, or (0, 0) when both are zero, and
this pair replaces the carry-save result in front of the final adder.
Register points:

* M1 after the partial product generator.
* M2 after the carry-save adders.
* M3 after the multiplexers.
* M4 after the final adder.

### Adder-tree multiplier (`umul_tree`)

`umul_tree` is an unsigned N×N multiplier built as a binary tree of
carry-propagate adders. The adder widths are set by hand so that the
synthesis tool cannot choose a worse structure. Level l adds pairs of level
l−1 terms, shifted by 2^(l−1). A level-l term needs N + 2^l bits: two
16-bit partial products give an 18-bit sum, four give 20 bits, and so on.
STAGES registers are spread over the levels.

## One round, and how it stays in step

`idea_round` computes the standard round:

    Y1 = X1 ⊙ K1   Y2 = X2 ⊞ K2   Y3 = X3 ⊞ K3   Y4 = X4 ⊙ K4
    G  = (Y1 ⊕ Y3) ⊙ K5
    t1 = (G ⊞ (Y2 ⊕ Y4)) ⊙ K6
    t2 = t1 ⊞ G
    out = (Y1 ⊕ t1, Y3 ⊕ t1, Y2 ⊕ t2, Y4 ⊕ t2)     (middle words swapped)

The latencies are α for ⊙ (the operator's), β for ⊞ (`mod_add`) and γ for ⊕
(`mod_xor`). Delay lines (`delay_line`) line up every operand:

* The key-layer adders are followed by α−β registers when α > β; otherwise
  the multipliers are followed by β−α registers.
* `Y2 ⊕ Y4` waits α cycles for G.
* G waits α+β cycles for t1.
* t1 waits β cycles for t2.
* Y1..Y4 wait 2α+2β+γ cycles.

A round therefore takes

    L = max(α, β) + 2α + 2β + 2γ   cycles

and accepts a new block every cycle. With α = 3 and β = γ = 1 this is 13.
Eight rounds plus the output transformation (latency max(α, β) = 3) give the
107 stages of `fast`.

`idea_out` is the output transformation:
`C1 = Z1 ⊙ K1, C2 = Z3 ⊞ K2, C3 = Z2 ⊞ K3, C4 = Z4 ⊙ K4`. The second word
coming out of round 8 is added to K3 and the third to K2, which undoes the
swap of the last round.

Subkey timing: with `KEY_ALIGN = 0` K5 and K6 are read when they are used,
and the subkeys must be constant while blocks pass. This is right for an
unrolled processor. With `KEY_ALIGN = 1` all six subkeys are presented
together with the block, and the round delays K5 and K6 along with the data.
An iterative processor needs this, because blocks on different passes share
the same round hardware.

## Processors

### Fully unrolled (`idea_unrolled`)

This processor chains eight rounds and the output transformation. All
subkeys come from `subkey_mem`. `BOUNDARY` registers can be placed between
rounds; the reference settings have none. Control is a single valid bit
that moves through a shift register as long as the datapath. One register
on every input and output stands for the FPGA's I/O flip-flops
(`IO_REGS`).

Timing:

* A block every cycle, with no back-pressure.
* Latency = `2·IO_REGS + 8·L + 7·BOUNDARY + max(α, β)` cycles.

Used directly, this is ECB or counter mode. A feedback mode can use it only
by interleaving as many independent messages as there are pipeline stages.

### Iterative (`idea_iterative`)

This processor has R = 1, 2 or 4 hardware rounds in a loop:

1. An entry multiplexer takes either a new block or the block coming back
   from the loop end.
2. The block passes the R rounds, with `BOUNDARY` registers between them.
3. It then passes a loop register. The loop register is present only when
   γ = 0, since otherwise the round already ends in a register.
4. The block circulates 8/R times. On its last pass it goes to the output
   transformation instead of back to the multiplexer.

The loop has `DEPTH = R·L + (R−1)·BOUNDARY + [γ = 0]` registers. Each of
them can hold a different block.

Control (`token_ctrl`): each block carries a token, a valid flag and its
pass number, through a shift register that runs beside the data. At each
round entry the token selects the subkeys of round `pass·R + j`. At the loop
end, a token on its last pass raises `finish`. A new block is accepted
(`accept`, `in_ready`) when the slot arriving at the multiplexer is empty or
finishing. Blocks already in the loop always take precedence.

Timing of `fb` (1+1 rounds, combinational round):

* A block that enters the loop at cycle t is in the loop register after each
  of 8 cycles.
* It leaves on the eighth, so independent blocks can enter every 8 cycles.
* Its result is registered at t+9. This is the rate of a feedback mode that
  must wait for each ciphertext.
* The input register adds one cycle from the handshake: 10 in total.

In `it4` (4+1 rounds, 13-cycle rounds) the loop holds 52 blocks. Each makes
two passes, so the sustained rate is one block per two cycles. The
testbench overfills it and checks the back-pressure.

### Subkey memory (`subkey_mem`)

The subkey memory holds 52 words in flip-flops, all readable at once. The
write port takes `addr = 6(r−1) + (i−1)` for K_i of round r, and 48..51 for
the output round. Writes to addresses above 51 are ignored. Encryption and
decryption differ only in the subkeys loaded. Deriving them from the 128-bit
key is not part of this hardware: the key schedule runs elsewhere, in
software or in a separate circuit.

## Interfaces and conventions

* One clock, rising edge. `rst_n` is a synchronous, active-low reset. It
  clears only valid and token state; datapath registers and subkeys are not
  reset.
* A block is `block_t`, four 16-bit words packed as `[3:0]`. Element 0 is
  the first word X1. The published test block 0000 0001 0002 0003 is
  `{16'h0003, 16'h0002, 16'h0001, 16'h0000}`.
* `idea_pkg` holds the shared types (`word_t`, `block_t`, `token_t`), the
  operator selection `mul_algo_e` (`ALGO_LOW_HIGH`, `ALGO_NP1`, `ALGO_CSA`)
  and the latency functions `mul_latency`, `round_latency` and
  `out_latency`.
* Load the subkeys while no block is in flight.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
`idea_ref_pkg`. This package is an independent integer model of ⊙ (modulo
65537 arithmetic), the round, the output transformation, the key schedule
and the decryption subkeys.

* Operator testbenches apply corner operands and then random ones, at
  several pipeline settings. Each output is checked in the exact cycle its
  latency predicts. Corner operands include 0·0, 0·1, 10·9, 16384·8,
  65535·65535 and frequent zeros.
* Round and output-transformation testbenches compare with the textbook
  formulas, including a key-aligned round whose subkeys change every cycle.
* `tb_token_ctrl` derives the expected accept and finish cycles from arrival
  times alone.
* The processor testbenches share a driver and scoreboard,
  `tb_proc_agent`. It loads the subkeys of key 0001 0002 … 0008 and checks
  the published ciphertext 11FB ED2B 0198 6DE5. It then streams random
  blocks with idle cycles, runs CBC chaining and decrypts with the inverse
  subkeys. It checks every result, every latency and, for `fb`, the
  8-cycle spacing.
* `tb_idea_top` runs all five processors at the top's default parameters.
  It counts back-pressure, recirculation, CBC chaining and decryption, and
  fails if any of them never happened. It takes about half a minute.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/idea_pkg.sv tb/idea_ref_pkg.sv tb/tb_idea_top.sv --top-module tb_idea_top
    ./obj_dir/Vtb_idea_top

Each testbench ends with `TB_RESULT checks=N failures=M`.

## Where this design departs from its reference, and what is left out

* A fourth operator, an "improved" Low-High variant, belongs to the same
  family and performs between Low-High and the (n+1)×(n+1) operator. It is
  not provided: its internal structure was not available.
* The key schedule and the chaining modes (CBC, CTR) are outside the
  processors. The testbench does the CBC chaining itself.
* Carry-save operator: the final modulo adder follows
  `(a+b+1) mod (2^16+1) = (a + b + ~carry) mod 2^16`. The way the carry-save
  adders end-around their carries, and the order of the adder tree, are
  this design's choice.
* The evaluated carry-save processor is listed with two registers after the
  partial-product generator. The operator description allows 0 or 1 at each
  point, and `csa` uses 1. `M1 = 2` is accepted.
* The `ve` processor combines the adder-tree multiplier with the Low-High
  operator. The reference paired the tree with the improved variant, which
  is not provided here.
* Where a multiplier register goes within the M1 group, the valid/ready
  handshake of the iterative processor, the token encoding, the subkey
  memory organisation and the reset behaviour are all this design's own
  choices.
* Throughput figures quoted for FPGAs (up to 8.5 Gb/s at 133 MHz for `fast`)
  depend on place and route. They have not been reproduced. What the RTL
  guarantees is the cycle-level rate and latency above.

## Changing it

To build another configuration, instantiate `idea_unrolled` or
`idea_iterative` with different parameters:

* `ALGO`: the ⊙ operator.
* `M1..M4`: its pipeline registers.
* `TREE_MULT`: for Low-High, use the adder-tree multiplier.
* `BETA`, `GAMMA`: registers in ⊞ and ⊕.
* `BOUNDARY`: registers between rounds.
* `R`: rounds per pass, iterative only.
* `IO_REGS`: input and output registers.

Every delay inside a round follows from these parameters through the
`idea_pkg` latency functions. If you change a processor's latency, update
the expected latency in its testbench, which is written there as a number.
