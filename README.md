# Micro-programmed vector processor for MDCT/IMDCT

This is a small floating-point vector processor for the MDCT and IMDCT of
MPEG-2 AAC audio. The transforms need long runs of multiply-accumulate work
at about 96 dB of precision. The processor has one pipelined floating-point
multiplier and one pipelined floating-point adder. It has no vector register
file. An external synchronous RAM streams operands into four tiny
double-banked buffers and takes results from one of them.

Control is a horizontal micro-program. Every cycle, one 38-bit *pipeline
command* sets every control pin of the datapath. The command chooses each
unit's operands, writes the buffers, selects the delay taps and routes the
results. Pipeline hazards are not detected in hardware. The program avoids
them by timing: a result that is ready too early is parked in a four-stage
*programmable delay*. The adder also accumulates at full precision by feeding
back its own result. A *vector instruction* names a loop body of up to eight
commands and a repeat count. The controller replays the body from a ring
buffer with no overhead between iterations.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with one module per
file in `rtl/` and self-checking testbenches in `tb/`.

## Number formats

All mantissas are two's complement. All exponents are 6 bits wide, biased by
32. A value is normalised when the two top mantissa bits differ, so
|mantissa| lies in [1, 2). Zero is an all-zero word.

| type     | width | fields                     | value                      | where                               |
|----------|-------|----------------------------|----------------------------|-------------------------------------|
| `fp30_t` | 30    | exp[5:0], man[23:0]        | man/2^22 · 2^(exp−32)      | buses, buffers, delay line, pins    |
| `prod_t` | 54    | exp[5:0], man[47:0]        | man/2^46 · 2^(exp−32)      | multiplier result                   |
| `acc_t`  | 62    | exp[5:0], man[55:0]        | man/2^54 · 2^(exp−32)      | adder operands and result           |

The multiplier returns its full 48-bit product. The adder has a 56-bit
mantissa, so sums of products keep their precision. Results are cut back to
30 bits only where they enter the delay line or the output buffer. Every
narrowing truncates: there is no rounding. An exponent above 63 saturates and
raises the unit's exception flag. An exponent below 0 flushes the result to
zero and also raises the flag. The flags are `testout` for the multiplier and
`sum_min_inf` for the adder. Negation is exact. It renormalises the two
corner cases +1.0 → −2.0·2^−1 and −2.0 → +1.0·2^1.

The original design states its exponent width twice, once as 6 bits and once
as 8 bits. 6 bits is used here, because it matches the 30-bit pins and buses.

## Datapath (`vmdct_core`)

```
 din ──► A buffer ─┐                        ┌──► MController ─► fp_mul (3 stages) ─┐
 din ──► B buffer ─┼─ bus A/B/C ────────────┤                                     │ 54
coeff ─► C buffer ─┘                        └──► AController ─► fp_add (3 stages) ─┤ 62
                     ▲ delay taps 1,2 ◄── 4-stage prog. delay ◄── M_A_Delay mux ◄──┤
                     ▲ multiplier / adder results (feedback) ◄─────────────────────┤
 dout ◄── O buffer ◄──────────────── M_A_OUT mux (2:1) ◄──────────────────────────┘
```

- **Buffers** (`io_buffer`, four of them). Each holds two banks, even and
  odd, of one complex word (real and imaginary). A write goes to bank
  `eve_odd`, part `we_r_i`. The read port shows part `oe_r_i` of the *other*
  bank. The external RAM can therefore fill one bank while the datapath reads
  the other. A and B are written from `din`, C from `coeff_in`, and O from
  the result mux. `dout` is O's read port.
- **Operand controllers** (`operand_ctrl`). There is one in front of each
  unit. For each of the two operands, a 3-bit select picks one of eight
  sources, and an INV bit negates it:

  | code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
  |---|---|---|---|---|---|---|---|---|
  | source | A | B | C | delay tap 1 | delay tap 2 | multiplier | adder | zero |

  The multiplier's controller truncates its choice to 30 bits. The adder's
  controller passes the 54-bit product or the 62-bit sum at full width.
- **fp_mul**. MR1 recodes the B operand with radix-4 Booth coding into 12
  partial products of 26 bits. MR2 adds them into three groups. MR3 does the
  final addition and a normalising shift of 0–2 bits.
- **fp_add**. AR1 compares the exponents and shifts the smaller operand right
  (the pre-normalising barrel shifter). AR2 adds 57 bits. AR3 counts the
  leading sign bits and shifts left (the post-normaliser).
- **prog_delay**. A four-word shift register that shifts every cycle. Its
  input is the multiplier result or the adder result, chosen by `m_a_delay`.
  Tap *i* gives that input from `delay_sel_i + 1` cycles earlier.

**Timing.** A command acts in the cycle it is presented. Buffer writes happen
at the rising edge that ends the cycle. Operands selected in cycle *t* leave
either unit in cycle *t+3*. A unit result is visible on the feedback paths,
the delay input and the O-buffer input for exactly one cycle. Both units
accept new operands every cycle. Everything runs on the rising edge. The
original design launches on the rising edge and captures on the falling
edge; that is not reproduced here.

## The pipeline command

`vmdct_pkg::cmd_t` has one field per control pin of the datapath chip. The
fields keep the chip's pin names in lower case:

| field | bits | meaning |
|---|---|---|
| `a`, `b`, `c`, `o` | 4 each | `eve_odd`, `oe_r_i`, `we`, `we_r_i` of each buffer |
| `delay_sel1`, `delay_sel2` | 2 each | delay taps (delay = value + 1) |
| `m_a_delay` | 1 | delay-line input: 0 multiplier, 1 adder |
| `m_a_out` | 1 | O-buffer input: 0 multiplier, 1 adder |
| `multi_ainv`, `multi_asel`, `multi_binv`, `multi_bsel` | 1+3+1+3 | multiplier operands |
| `sum_ainv`, `sum_asel`, `sum_binv`, `sum_bsel` | 1+3+1+3 | adder operands |

The all-zero command writes nothing. The controller sends it whenever no
program is running.

## Scheduling a complex butterfly

Every stage of the fast MDCT/IMDCT flow graph (and of an FFT) reduces to the
complex operation Z = X + Y·C, with X = a+jb, Y = c+jd and C = e+jf:

Re Z = ce − df + a, Im Z = de + cf + b.

It takes four real products and four additions. With one multiplier, one
element can start every four cycles. `tb/tb_vmdct_pkg.sv` (`cx_cmd`) holds a
program that reaches that rate. The cycles below are relative to the start of
element *k*, at cycle 4k:

| cycle | multiplier issues | adder issues | note |
|---|---|---|---|
| +0 | c·e | | |
| +1 | d·f | | |
| +2 | d·e | | |
| +3 | c·f | | ce is ready and enters the delay line |
| +4 | | tap1 (ce) + (−mul) (df) | the INV bit makes it a subtraction |
| +5 | | | de is ready and enters the delay line |
| +6 | | tap1 (de) + mul (cf) | |
| +7 | | adder (ce−df) + A (a) | adder feedback |
| +9 | | adder (de+cf) + A (b) | |
| +10 / +12 | | | Re Z / Im Z written to O |

Each product that finishes one cycle before its partner waits one cycle in
the delay line (tap 1). Successive elements interleave, and the adder is busy
in every slot: +4, +6, +7 and +9 are distinct modulo 4. The buffers swap
banks with every element, so the loop body covers two elements: 8 commands,
which is exactly the ring size.

The external RAM streams one `din` word per cycle. In window *w* (cycles 4w
to 4w+3) the order is a(w), c(w+1), b(w), d(w+1). `coeff_in` carries e(w+1)
and f(w+1) in slots 0 and 2. `dout` gives Re Z(w) in cycle 4w+13 and Im Z(w)
in cycle 4w+15. Element 0 finds zeros in B and C from reset, so Z(0) = X(0).

## Multiply-accumulate with a pipelined adder

A dot product cannot feed the adder's result straight back each cycle,
because the sum takes three cycles. The `mac_cmd` program computes three
outputs at once instead. Cycle *t* multiplies the sample held in A by the
coefficient for output *t* mod 3. The adder adds each product to the sum it
started three cycles earlier, so three independent sums circulate through
the adder pipeline.

A group of three outputs over N samples takes 3N cycles. It is two vector
instructions: a 6-command *head*, then a 6-command body repeated (N−2)/2
times. In the head's last three slots, the adder takes zero instead of its
feedback, which starts the new sums. In the same slots the previous group's
three finished sums leave the adder and go into O. They appear on `dout` in
cycles 4, 5 and 6 of the head. A is written once per three cycles and C
every cycle, each swapping banks. The three sums share each streamed sample,
so any job where three outputs read the same input sequence with different
weights fits. Three such jobs are tested:

- the MDCT from its definition,
  X(k) = Σ_n x(n) · 2cos(2π/N (n + n0)(k + ½)), with n0 = (N/2 + 1)/2,
  for k = 0 .. N/2−1;
- the IMDCT, x(n) = (2/N) Σ_k X(k) cos(2π/N (n + n0)(k + ½)), for
  n = 0 .. N−1 (dot products of length N/2);
- a 38-tap FIR filter y(k) = Σ_j a(j) x(k−j). Outputs k0..k0+2 read the 40
  samples x(k0+2) down to x(k0−37). Output k0+r takes tap a(n−2+r) at stream
  position n, and zero outside the filter.

The factors 2 and 2/N are folded into the coefficients. So are the analysis
and synthesis windows, where they are wanted. The window tables for the four
AAC block types (long, long-to-short, short, short-to-long) are held in the
external memory. Choosing one is a matter of which table the external RAM
streams. The 50 % overlap-add between frames is also outside the processor.
In the testbench, the model of the external memory stores the half-frames
and adds them.
With the sine window w(n) = sin(π/N (n + ½)) folded into both coefficient
sets, the factors 2 and 2/N make the overlap-add return the input: the time
aliasing of the two halves cancels.

## Running the fast transform

The fast MDCT writes the cosine as the real part of a complex exponential.
Let C_M = exp(j2π/M). Then X(k) = 2·Re[C_N^(n0(k+½)) · S(k)], where

S(k) = Σ_n x(n) · C_N^(n(k+½)).

Split S over even and odd samples: S_M(k) = E(k) + C_M^(k+½) · O(k). Here E
and O are the same sum of half the length, over the even and the odd
samples. Both repeat with period M/2 in k, so S_M(k + M/2) = E(k) −
C_M^(k+½) · O(k). That is a radix-2 decimation-in-time butterfly. Its twiddle
is C_M^(m+½), a half step off the FFT's C_M^m. Applied recursively down to
single samples, it gives a flow graph of log2 N stages:

1. Stage s (span h = 2^s, M = 2h) combines the elements i and i+h of each
   group into X + W·Y and X − W·Y, with W = C_M^(m+½). The input is in
   bit-reversed order. Each butterfly is two elements of the complex program
   above, the second with −W. One vector instruction runs a whole stage.
2. Only k < N/2 is needed, so the last stage forms only the X + W·Y half.
3. A final run forms Z = 0 + S(k)·2C_N^(n0(k+½)). Its real part is X(k).

For N = 2048 this is 12 vector runs and 90,424 cycles.

The IMDCT goes the same way: y(n) = (2/N)·Re[C_N^((n+n0)/2) · U(n)], with
U(n) = Σ_k u(k) · C_N^(nk) and u(k) = X(k) · C_N^(n0·k). u is zero for
k ≥ N/2. That is a pre-twiddle run, 11 full FFT stages and a post-twiddle
run, 13 vector runs and 102,738 cycles for N = 2048. A plain complex FFT
uses the same runs with twiddles C_M^(−m) and takes 90,398 cycles for 2048
points. Between stages the external RAM stores each result and reorders the
operands. The processor itself has no address generator.

## Vector controller (`vector_controller`)

- **Load mode** (`mode`=1). Each `load_we` cycle writes `in_data` to the
  64-word instruction RAM and advances the load pointer. The pointer returns
  to 0 whenever `mode` is 0.
- **Run mode**. `start` takes a vector instruction `vinstr`:

  | field | bits | meaning |
  |---|---|---|
  | `vaddr` | 6 | address of the first command |
  | `init_delay` | 8 | idle cycles before the first command |
  | `stage_num` | 4 | commands in the body, 1..8 |
  | `loop_num` | 16 | number of iterations |

  The first iteration reads the body from the RAM and copies it into the
  8-entry ring buffer. The later iterations replay it from the ring buffer
  with no gap. While one instruction runs, a second one can be queued
  (`vi_ready`). It starts right after the last command of the first one,
  after its own `init_delay`. With `init_delay` = 0 there is no gap at all.
- **Timing**. If `start` is high in cycle 0, the first command is on `cmd` in
  cycle `init_delay`+2. Then `stage_num`·`loop_num` commands follow, one per
  cycle. `cmd` is registered.

The original controller also has a "shifter" whose function is not described.
It is not built.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vmdct_pkg.sv tb/tb_vmdct_pkg.sv tb/vector_mdct_tb.sv \
    --top-module vector_mdct_tb -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `fp_mul_tb` | about 400 random products plus corner cases. Checks exact value, normalisation, `exc`, 3-cycle latency |
| `fp_add_tb` | about 600 random sums plus cancellation, zeros, −1.0, overflow, underflow. Checks error ≤ 2^−50 of the larger operand and the 3-cycle latency |
| `operand_ctrl_tb` | all sources, with and without negation |
| `io_buffer_tb` | random writes and reads against a model |
| `prog_delay_tb` | both taps at all delays against a history |
| `vector_controller_tb` | cycle-exact command stream: latency, ring replay, queueing, wrap-around |
| `vmdct_core_tb` | the butterfly stream over 24 elements with directly driven commands, and both exception flags |
| `vector_mdct_tb` | the whole processor at its default configuration: micro-program loading, 32-element butterfly stream, 16-point MDCT and 16-point IMDCT against a reference, reconstruction of the shared half of two sine-windowed frames after MDCT, IMDCT and overlap-add, and exponent overflow |
| `mdct_fast_tb` | 2048-point MDCT by the fast flow graph, then the IMDCT of its result the same way. Checks every butterfly output, all 1024 coefficients and all 2048 samples against the definitions. About 1 s |
| `mdct2048_tb` | 2048-point MDCT from the definition, then the 2048-point IMDCT of its result, 2.1 million cycles each, all outputs. About 5 s |
| `fft2048_tb` | 2048-point complex FFT. Checks every butterfly output and all bins against a DFT |
| `tns_fir_tb` | 38-tap FIR filter over 1024 spectral lines, all outputs |

The last four report their cycle counts. `vector_mdct_tb` also counts how often each mechanism occurs and fails if
one never does. The mechanisms are the initial delay, ring replay, queued
instructions, the programmable delay, negation, adder feedback, buffer bank
swaps and both exception flags. `tb/tb_vmdct_pkg.sv` holds the reference
conversions and the two micro-programs. It is the place to start when
writing new programs.

## How far to trust it, and where it departs

Built directly from the original description: the split into
micro-programmed controller and vector datapath; buffers instead of vector
registers; the 30-bit word with 6-bit exponent and 24-bit mantissa; the
48-bit product; the 56-bit adder mantissa; the radix-4 Booth multiplier with
26-bit partial products; the pre- and post-normalising barrel shifters; the
three-stage multiplier and adder pipelines; the four-stage programmable
delay; the 8-entry ring buffer; the instruction fields; and the datapath pin
set.

Choices made in this RTL:

- the exponent bias and two's complement mantissas;
- truncation everywhere;
- exponent saturation and flush to zero, and using the two flag pins for
  exponent exceptions;
- the meaning of each operand-select code;
- ping-pong reading of the buffers;
- 64 words of instruction RAM, the field widths, and the one-entry
  instruction queue;
- single-edge clocking and an asynchronous active-low reset;
- the two micro-programs.

The original adder uses carry-save adders and 46-bit shifters. This one uses
a plain 57-bit adder and 57-bit shifters. The original multiplier sums its
partial products in a tree of 26-bit adders with a 31-bit adder at the last
node. This one writes the tree as word-level additions over 48 bits. The
values are the same; the gate counts and critical paths are not.

Throughput against the quoted cycle counts. The original design quotes a
2048-point MDCT/IMDCT in 5000 cycles, a 38-tap AAC TNS filter in 10,000
cycles and a 2048-point FFT in 12,000 cycles. This datapath issues one real
multiplication per cycle. A complex multiply-add takes four cycles. The
measured counts, all at full size, are:

| job | cycles |
|---|---|
| 2048-point MDCT, fast flow graph | 90,424 |
| 2048-point IMDCT, fast flow graph | 102,738 |
| 2048-point MDCT, from the definition | 2,101,266 |
| 2048-point IMDCT, from the definition | 2,098,194 |
| 38-tap filter over 1024 lines | 41,058 |
| 2048-point complex FFT, radix 2 | 90,398 |

The quoted figures are not reached. 38 × 1024 multiplications cannot be done
in 10,000 cycles at one per cycle. The quoted counts imply more multipliers
or a cheaper algorithm than this datapath and these programs. No storage
limits the transform size, because data are streamed. The programs run the
2048-point jobs as one vector instruction per stage. They do not overlap
successive stages, and each stage pays about 25 cycles to fill and drain the
pipeline.
