# Espresso: a Galois-NLFSR stream cipher in SystemVerilog

Espresso is a binary additive stream cipher with a 128-bit key and a 96-bit
IV, aimed at high-rate links such as 5G. Its whole state is one 256-bit
nonlinear feedback shift register. Most filter generators (Grain, for one)
use the Fibonacci form, where every feedback term piles onto the input
stage. Espresso's register is in the *Galois* form instead: the feedback is
spread over fourteen stages, each with a small function. The longest path
from one flip-flop to the next is then an AND (or a NAND/NOR pair) and two
XORs. A 20-input filter function, split by two register stages, produces one
keystream bit per clock.

This repository holds synthesizable RTL for the one-bit-per-clock version:

| block | flip-flops | role |
|---|---|---|
| `nlfsr_g` | 256 | the Galois NLFSR G, with serial load and two feedback injection points |
| `z_pipe` | 8 | the output function z(x), in two register stages |
| `init_switch` (x2) | 1 each | gates z into stages 255 and 217 during initialization |
| `espresso_ctrl` | 12 | phase sequencer (load, init, warm-up, keystream) |
| `espresso` | - | top level |

The datapath's 266 flip-flops are the count the cipher's own cost estimate
uses (about 1500 gate equivalents in 90 nm). The sequencer's 12 come on top.

## The state register G

Stage i holds x_i and takes the value g_i(x) each clock. All stages shift
downward (x_i <= x_{i+1}) except these fourteen:

| stage | next value |
|---|---|
| 255 | x0 ^ x41 x70 (^ fb255 during initialization) |
| 251 | x252 ^ x42 x83 ^ x8 |
| 247 | x248 ^ x44 x102 ^ x40 |
| 243 | x244 ^ x43 x118 ^ x103 |
| 239 | x240 ^ x46 x141 ^ x117 |
| 235 | x236 ^ x67 x90 x110 x137 |
| 231 | x232 ^ x50 x159 ^ x189 |
| 217 | x218 ^ x3 x32 (^ fb217 during initialization) |
| 213 | x214 ^ x4 x45 |
| 209 | x210 ^ x6 x64 |
| 205 | x206 ^ x5 x80 |
| 201 | x202 ^ x8 x103 |
| 197 | x198 ^ x29 x52 x72 x99 |
| 193 | x194 ^ x12 x121 |

The two 4-input products are written as the NOR of two NANDs,
`~(~(a&b) | ~(c&d))`. That form is faster and smaller in CMOS than a 4-input
AND. Logically it is the same function.

### Why G can be trusted: the equivalent register F

G was derived from a Fibonacci-like register F, which is the form the cipher
is analysed in. F has only two non-trivial feedbacks:

    f255 = x0^x12^x48^x115^x133^x213 ^ x41x70^x46x87^x52x110^x55x130^x62x157^x74x183 ^ x87x110x130x157
    f217 = x218 ^ x3x32^x8x49^x14x72^x17x92^x24x119^x36x145 ^ x49x72x92x119

f217 cancels the nonlinear part of f255. As a result, stages 217..0 of F
run a linear recurrence, 1 + x^12 + x^48 + x^115 + x^133 + x^213 + x^256,
and the register has period 2^256 - 1. Each G function is an F term moved
down the chain, with its indices shifted by the distance moved. Stage 231 of
G produces the same sequences as stage 255 of F, and stage 193 of G the same
as stage 217 of F.

F is not built in hardware. The testbench `tb_nlfsr_g` uses it as an
independent check: it runs G, records stages 231 and 193, and builds an F
state from the recorded bits. It then runs F and requires F to reproduce
both sequences bit for bit. One wrong index in any of G's fourteen functions
breaks the check.

## The output function and its pipeline

    z = x80^x99^x137^x227^x222^x187 ^ x243x217^x247x231^x213x235^x255x251
        ^ x181x239^x174x44^x164x29 ^ x255x247x243x213x181x174

z is a linear function of 6 variables plus a bent function of 14, so it is
balanced. `z_pipe` registers six partial sums:

    z1 = x80^x99^x137^x227        z4 = x255x251 ^ x181x239
    z2 = x222^x187^x243x217       z5 = x174x44 ^ x164x29
    z3 = x247x231 ^ x213x235      z6 = x255x247x243x213x181x174

It then registers z7 = z1^z2^z3^z4 and z8 = z5^z6, and outputs
z = z7 ^ z8 without a further register. So `z` at clock t is z of the state
at clock t-2.

## Initialization, and what the pipeline does to it

This is the part that needs the most care. During initialization the
cipher's output bit is XORed into stages 255 and 217:

    g255 = x0 ^ x41x70 ^ z,   g217 = x218 ^ x3x32 ^ z

Feeding the combinational z straight back would put the whole filter
function on the register's critical path. Instead, `init_switch` ANDs z with
the `init` phase signal, a multiplexer whose other input is zero, and
registers the result. The XOR into g255/g217 sees only a flip-flop output.
The price is latency: the fed-back bit is three clocks old, two clocks from
`z_pipe` and one from `init_switch`.

This RTL therefore *defines* the cipher as the pipelined circuit computes
it. Number the initialization clocks n = 0..255 (clock 0 is the first clock
after load), and let S(n) be the state before clock n:

| clock n | fed back into stages 255 and 217 |
|---|---|
| 0, 1, 2 | 0 (pipeline cleared during load) |
| 3 .. 255 | z(S(n-3)) |
| 256 (first warm-up clock) | z(S(253)), the last bit captured while `init` was high |
| 257 and later | 0 |

Keystream bit k is z(S(257+k)). It appears at clock 259+k, after three
warm-up clocks, the "three more cycles" the cipher asks for. A model that
XORs the *current* z into the state at every one of 256 clocks gives a
different keystream. To match such a model, change the pipeline, not the
sequencer.

## Interface and timing (`espresso`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | rising-edge clock; asynchronous active-low reset (all registers to zero) |
| `start` | in | one-clock pulse, accepted at any time, begins a new key/IV setup |
| `kiv_bit` | in | serial key/IV bit, taken on each clock where `kiv_req` is high |
| `kiv_req` | out | high for the first 224 load clocks |
| `ks_bit` | out | keystream bit |
| `ks_valid` | out | `ks_bit` is a keystream bit; stays high until the next `start` |
| `busy` | out | load, initialization or warm-up in progress |

Sequence after `start`:

1. **Load, 256 clocks.** The bits enter stage 255 and shift down. Order:
   k0..k127, then IV0..IV95, from `kiv_bit` (224 clocks with `kiv_req`
   high). Then the sequencer adds 31 ones and one zero itself. After the
   load, x0..x127 hold the key, x128..x223 the IV, x224..x254 ones and x255
   zero. All feedback terms are suppressed during the load, so the chain
   is a plain shift register.
2. **Initialization, `INIT_ROUNDS` = 256 clocks,** with `init` high.
3. **Warm-up, 3 clocks.**
4. **Keystream:** one bit per clock.

The first keystream bit comes 256 + 256 + 3 = 515 clocks after the first
load clock. That is 232 ns at the 451 ps clock the cipher's 90 nm estimate
assumes.

## Choices made here, not by the cipher

- **Serial load.** The cipher's latency figure counts 256 load clocks and
  notes that parallel load would cost a multiplexer per flip-flop. This RTL
  loads serially. How G's feedback behaves during a serial load is not
  specified. Here it is gated off, which costs a gate per feedback stage.
- **Pipeline clear** during load, so initialization starts from a known,
  key-only state of the pipeline.
- **Sequencer**: a phase register and a 9-bit counter. The handshake
  (`start`, `kiv_req`, `ks_valid`, `busy`) is this design's own.
- **One bit per clock only.** The cipher can be widened to 2 or 4 bits per
  clock in principle, because no feedback stage output is read within three
  stages of it. But no timing is given for the three-clock initialization
  feedback at those widths. A wider datapath built from this RTL would
  produce a different keystream, so it is not offered.
- **No published test vectors** were available. The keystream is checked
  against an untimed reference model written from the equations, with the
  timing of the table above.

## Files

- `rtl/espresso_pkg.sv`: sizes, padding function, phase enum.
- `rtl/nlfsr_g.sv`, `rtl/z_pipe.sv`, `rtl/init_switch.sv`,
  `rtl/espresso_ctrl.sv`, `rtl/espresso.sv`: the design.
- `tb/espresso_ref_pkg.sv`: reference `g_step`, `z_ref` and `f_step` (F).
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
  - `tb_nlfsr_g`: serial load order, 2400 steps against `g_step`, and
    the G/F equivalence.
  - `tb_z_pipe`: z against `z_ref` at two clocks of latency, and the clear.
  - `tb_init_switch`: one-clock AND-and-register behaviour.
  - `tb_espresso_ctrl`: phase lengths, padding pattern, the 515-clock
    latency, restart.
  - `tb_espresso`: the full cipher at default parameters. It runs six
    key/IV setups (all-zero, all-one, random, one aborted mid-initialization)
    and checks the loaded state, the state trajectory and 300 keystream bits
    per setup against the reference. It fails if any mechanism (key/IV
    bits, padding, feedback ones, warm-up, keystream, restart) never
    happened.
- `tb_espresso_monomial`: the chosen-IV maximum-degree monomial test,
  run on the RTL (see below).

## How well the initialization mixes

Take a set of d key/IV bits, set all other bits to zero, and XOR an output
bit over all 2^d setups. The result is the coefficient of the degree-d
monomial of those bits. While it is zero, the bits are not yet fully mixed.
`tb_espresso_monomial` builds the bit set greedily. It tries every single
bit first, then adds one bit at a time, each time the bit that keeps the
monomial absent longest. It reads the output bit `ks_bit` during
initialization, where z(S(m)) appears at clock m+2. Results of this RTL:

| d | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| leading outputs with the monomial absent | 49 | 82 | 82 | 83 | 86 | 85 | 85 | 87 |

The cipher's own analysis uses the unpipelined equations and a different
search. It finds about 45 rounds at d = 1, and at most 159 rounds for
sets of up to 28 bits. Both leave a wide margin below the 256
initialization clocks. The testbench fails if the monomial is still absent
at the first keystream bit. It takes about 25 s.

## Simulating

With Verilator 5:

    verilator --binary --timing --top-module tb_espresso \
      rtl/espresso_pkg.sv tb/espresso_ref_pkg.sv \
      rtl/nlfsr_g.sv rtl/z_pipe.sv rtl/init_switch.sv rtl/espresso_ctrl.sv \
      rtl/espresso.sv tb/tb_espresso.sv
    ./obj_dir/Vtb_espresso

The other testbenches build the same way with their own top module and
files. Every run takes well under a second.

## Changing it

`INIT_ROUNDS` (on `espresso` and `espresso_ctrl`, default 256) sets the
number of initialization clocks, for example to study reduced-round
versions. According to the cipher's own chosen-IV analysis, up to about 159
rounds show non-randomness. The tap positions are fixed in `nlfsr_g` and
`z_pipe`. If you edit them, re-run `tb_nlfsr_g`: the G/F equivalence check
will tell you whether G still matches F.
