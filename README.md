# Serial encoders for the (15,k) binary BCH codes

A binary BCH code of length 15 protects a block of k information bits with
15-k parity bits, so that up to t bit errors per 15-bit block can later be
corrected. This RTL contains three encoders, one for each of the three
length-15 BCH codes over GF(2^4), all built on the primitive polynomial
1 + x + x^4:

| code      | t (errors corrected) | information bits k | parity bits n-k | generator g(x)                        | d_min |
|-----------|----------------------|--------------------|-----------------|---------------------------------------|-------|
| (15,11,1) | 1                    | 11                 | 4               | 1 + x + x^4                           | 3     |
| (15,7,2)  | 2                    | 7                  | 8               | 1 + x^4 + x^6 + x^7 + x^8             | ≥ 5   |
| (15,5,3)  | 3                    | 5                  | 10              | 1 + x + x^2 + x^4 + x^5 + x^8 + x^10  | ≥ 7   |

g(x) is the least common multiple of the minimal polynomials of
α, α^3, …, α^(2t-1), where α is a root of 1 + x + x^4. The minimal polynomials
are φ1 = 1 + x + x^4, φ3 = 1 + x + x^2 + x^3 + x^4 and φ5 = 1 + x + x^2.

All three encoders are **systematic** and **bit-serial**. A codeword takes 15
clock cycles. In the first k cycles the information bits go out unchanged.
In the last 15-k cycles the parity bits go out. The only arithmetic is an
(n-k)-stage linear feedback shift register (LFSR). It divides by g(x) while
the information bits stream past.

## The encoding circuit

In polynomial form, with i(x) the information polynomial and b(x) the parity
polynomial:

    c(x) = x^(n-k) · i(x) + b(x),      b(x) = x^(n-k) · i(x)  mod  g(x)

So c(x) is a multiple of g(x). Its k high-order coefficients are the
information bits and its n-k low-order coefficients are the parity.

The circuit that computes b(x) on the fly has these parts:

```
      +<--------------------------------------- S1 ---------------------+
      |          |                    |                                  |
      |         g1                 g(n-k-1)                              |
      v          v                    v                                  |
  f ->[b0]-->(+)->[b1]--> ... -->(+)->[b(n-k-1)]---+-->(+)--> f ---------+
                                                   |    ^
                                                   |    din
                                                   |    |
                                   S2 position 1 <-+    +-> S2 position 2
                                                   \    /
                                                   S2 mux --> [FF] --> dout
```

- **LFSR (`bch_lfsr`).** Stage b0 takes the feedback f. Every other stage b_i
  takes b_(i-1), XORed with f where the generator coefficient g_i is 1. The
  feedback is `f = din XOR b(n-k-1)`.
- **Switch S1.** S1 opens and closes the feedback. While it is open, f is
  forced to 0 and the LFSR is a plain shift register.
- **Switch S2.** S2 chooses what goes to the line: the information bit
  (position 2) or the last LFSR stage (position 1).
- **Output flip-flop.** It registers the S2 output onto `dout`.

The two switches follow a fixed schedule:

| cycle of the frame | S1                     | S2                     | line carries            |
|--------------------|------------------------|------------------------|-------------------------|
| 1 … k              | closed (LFSR divides)  | position 2             | i(k-1), i(k-2), …, i(0) |
| k+1 … 15           | open (LFSR shifts)     | position 1             | b(n-k-1), …, b(0)       |

After cycle k the LFSR holds b(x). The next n-k cycles shift it out with the
highest-degree coefficient first. Those shifts also fill the LFSR with zeros,
so it is empty when the next frame starts. No clear pulse is needed between
codewords. Frames follow each other with no idle cycle, so the throughput is
k information bits per 15 clocks.

The generator polynomial is a parameter, held as an (n-k+1)-bit vector whose
bit i is the coefficient of x^i. Only the taps g1 … g(n-k-1) cost XOR gates.

## Frame timing and the five ports

Every encoder has the same five ports:

| port    | dir | meaning |
|---------|-----|---------|
| `clk`   | in  | one code bit per clock |
| `reset` | in  | synchronous, active high; restarts the frame and clears the LFSR |
| `din`   | in  | information bit; used only in cycles where `vdin` is 1 |
| `vdin`  | out | 1 in the k information cycles of each frame, 0 in the parity cycles |
| `dout`  | out | codeword bit, registered |

The encoder controls the pace itself. A modulo-15 counter (`bch_ctrl`) runs
freely from reset, and `vdin` tells the data source when the encoder takes a
bit. The source presents an information bit in every cycle in which `vdin`
is 1. What it drives while `vdin` is 0 is ignored: that value is masked
before it reaches both the LFSR and S2.

`dout` comes one register after the S2 switch, so the bit of frame cycle j
appears on `dout` during cycle j+1. Below, frames are counted from 0, so
frame cycle j is cycle j+1 of the schedule above. Frame cycle 0 is the first cycle after the last clock edge at which `reset`
was high:

```
frame cycle:  0       1       ...  k-1      k        ...  14       0 (next frame)
counter:      0       1       ...  k-1      k        ...  14       0
vdin:         1       1       ...  1        0        ...  0        1
din taken:    i(k-1)  i(k-2)  ...  i(0)     ignored  ...  ignored  next i(k-1)
dout:         0       c14     ...  c(16-k)  c(15-k)  ...  c1       c0
```

Here `c14 … c0` is the codeword with c14 = i(k-1) sent first. While `reset` is
high, `dout` is forced to 0 on the next edge.

### Worked example

For the (15,11) code, the information bits 0 1 0 1 1 0 0 1 0 0 1 (in the
order sent) are followed by the parity bits 1 1 0 0. The codeword is
`01011001001 1100`. For the (15,5) code, the information 0 1 1 0 0 gives
parity 1 0 0 0 1 1 1 1 0 1. Both are checked by `tb_bch15_top`.

## Module hierarchy

```
bch15_top                      three encoders side by side, shared clk/reset
├── bch15_11_encoder  (t=1)    bch_encoder with K=11, G=1+x+x^4
├── bch15_7_encoder   (t=2)    bch_encoder with K=7,  G=1+x^4+x^6+x^7+x^8
└── bch15_5_encoder   (t=3)    bch_encoder with K=5,  G=1+x+x^2+x^4+x^5+x^8+x^10
      └── bch_encoder          generic serial (N,K) encoder: S1/S2, output flip-flop
            ├── bch_ctrl       modulo-N frame counter -> information/parity phase
            └── bch_lfsr       (N-K)-stage division LFSR with switch S1
bch_pkg                        n, k and g(x) of the three codes; phase enum
```

`bch15_top` ports are `clk`, `reset`, and `din_tX` / `vdin_tX` / `dout_tX`
for X = 1, 2, 3 (the t of the code). The three encoders do not interact.
Because they share the reset, their frames start on the same cycle.

Per encoder, the hardware is a 4-bit counter, n-k LFSR flip-flops, one output
flip-flop and one XOR per non-zero inner tap. That makes 9, 13 and 15
flip-flops for t = 1, 2 and 3.

## Using another code

`bch_encoder #(.N(n), .K(k), .G(g))` encodes any binary cyclic code. `G` must
be a divisor of x^n + 1 of degree n-k, with bit i the coefficient of x^i.
Bits 0 and n-k must both be 1; an elaboration-time assertion checks this. For
example, the (7,4) Hamming code is `N=7, K=4, G=4'b1011`.

## Choices made in this implementation

The LFSR structure, the switch schedule, the registered output and the five
ports follow the published design of these encoders. The following points
were not specified there and are choices of this RTL:

- **Bit order.** Information is sent highest degree first and parity is sent
  b(n-k-1) first. This is the order in which the (15,11) example above comes
  out right.
- **Meaning of `vdin`.** It is the information-phase flag of the frame
  counter, high for cycles 1…k. Frames free-run from reset. There is no
  start or valid input, so the source must supply a bit in every
  information cycle.
- **Reset.** The counter and LFSR have a synchronous, active-high reset. The
  output flip-flop has none of its own. Its input is gated to 0 while reset
  is high.
- **Control circuit.** A binary modulo-15 counter is the simplest circuit
  that produces the switch schedule.
- **Flip-flop count.** The (15,7) encoder here has 13 flip-flops. The original
  FPGA implementation reported 12 for that code, so its control logic was built
  somewhat differently. The (15,11) and (15,5) counts (9
  and 15) match.

The original implementation reported FPGA resource use and path delays.
This RTL does not reproduce them, because they depend on the FPGA tool flow.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/bch_ref_pkg.sv`) computes codewords by explicit polynomial long
division, independently of the LFSR formulation. It also checks that every
received word is divisible by g(x).

| testbench              | what it covers |
|------------------------|----------------|
| `tb_bch_lfsr`          | remainder of 40 words per code, shifted out bit by bit, back to back without clearing |
| `tb_bch_ctrl`          | information phase and frame start over 20 frames for K = 11, 7, 5; reset inside a frame |
| `tb_bch_encoder`       | generic encoder at its defaults (the (15,11) code) |
| `tb_bch15_*_encoder`   | each code: 60 back-to-back frames (all-zero, all-one, random) |
| `tb_bch15_top`         | all three codes at once, 200 frames each, both worked examples |

The encoder testbenches use a shared driver/checker, `tb/bch_enc_harness.sv`.
On every cycle it compares `vdin` with the frame position and `dout` with the
reference bit of the previous cycle. This checks the 15-cycle period and the
one-cycle output latency on every bit. The harness drives random values on
`din` during the parity phase, and these must not reach the output. It also
resets the encoder in the middle of one frame. It counts how often each of
these events happened, and a count of zero is reported as a failure.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch15_top.sv --top-module tb_bch15_top
./obj_dir/Vtb_bch15_top
```

Replace `tb_bch15_top` with any other testbench name. All of them finish in
well under a second.
