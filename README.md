# PUF-based fault detection for a cryptographic state machine

Fault-injection attacks (laser, clock or voltage glitches, memory overwrites)
flip bits inside a chip to bypass security. This design protects three weak
spots of a small cryptographic controller. It does this with an arbiter
physically unclonable function (PUF) rather than with plain redundancy.

1. **The state sequence of the controller.** A skipped or repeated state is
   caught by fingerprinting every state with the PUF.
2. **The secret key in on-chip memory.** An overwritten or stuck key bit is
   caught through a PUF checksum of each key row.
3. **The error detection network (EDN) of a concurrent-error-detection
   pair.** The comparator between a main computation and its predictor is
   itself made of a PUF, so silencing it by tampering changes its answers.

A PUF protects twice. Logically, a wrong input gives a wrong check bit about
half the time. Physically, probing or disturbing the PUF's wires changes its
delays, and with them its answers. The checksums are recorded on the chip
itself at enrolment and must be kept secret. An attacker may inject faults
but cannot read the PUF outputs.

The protected controller is an exponentiation unit, y = x^e, using the
always-multiply right-to-left binary method. Its secret exponent e is the
content of the protected key memory.

## Block structure

```
                       puf_fsm_protect
 start ──►┌─────────┐ state ┌───────────────── fsm_puf_checker ─────────────────┐
          │ exp_fsm ├──────►│ state_encoder ─► puf_arbiter ─► x ─┐              │
          └────┬────┘       │                                    ▼              │
               │ i          │ path_control ─sel─► checksum_store ─w─► mismatch_edn ├─► fsm_error
          ┌────▼────────┐   └────────────────────────────────────────────────────┘
 x ──────►│ exp_datapath├──► y
          └────▲────────┘
               │ e_i (bit i)
          ┌────┴───────┐ row  ┌──────── key_integrity ────────┐
 key_w ──►│ key_memory ├─────►│ permute_block ─► puf_arbiter  ├─► key_error
          └────────────┘      │  ─► compare with K x T checksum│
                              └───────────────────────────────┘
 edn_main ─┐   ┌─────────── puf_edn ───────────┐
           XOR─► permute_block ─► puf_arbiter  ├─► edn_error
 edn_pred ─┘   │  ─► compare with zero record  │
               └───────────────────────────────┘
 alarm = fsm_error | key_error | edn_error  ──► halts exp_fsm, flushes exp_datapath
```

Every `.sv` file in `rtl/` holds one module or package. `puf_pkg` holds the
state type and the functions that generate constants at elaboration: the PUF
delay values, the secret permutations and the Hadamard entries.

## The arbiter PUF model (`puf_arbiter`)

A real arbiter PUF sends one pulse down two paths through N switch stages.
Challenge bit c_i decides whether stage i passes the paths straight or
crosses them. A flip-flop at the end (the arbiter) records which edge came
first. The accepted model of this race is additive:

    R = 1  if  sum_{i=1..N} (-1)^{p_i} * y_i + y_{N+1} > 0,  else 0
    p_i = c_i xor c_{i+1} xor ... xor c_N        (P = U*C, U upper triangular)

The y_i are the chip's delay differences, and y_{N+1} is the arbiter's
offset. The RTL evaluates this formula combinationally. The y values are
integers of about -510..510, roughly normal, drawn at elaboration from the
`SEED` parameter. One seed stands for one manufactured die. The model is a
stand-in for an analog part: it is deterministic, and it does not model
arbiter metastability or tamper sensitivity. Replace it with the real delay
chain in silicon.

Two challenges whose parity vectors P differ in d of N positions give the
same answer with probability 1 - (2/π)·atan(√(d/(N+1-d))). That is about 0.5
at d = N/2 and close to 1 at d = 1. Everything below is built so that a fault
moves the parity vector far.

## Fingerprinting a known-path state machine

### Why it works

A *known-path* FSM walks through the same state sequence in every operation,
whatever its data. `exp_fsm` is one:

    Idle(S0) -start-> Init(S1) -> Load(S2) -> [Square(S3) -> Mult(S4)] x T -> Result(S5) -> Idle

The loop count T (here the exponent length, 256) is fixed, and the exponent
bits only steer the datapath. The sequence is therefore known in advance:
k = 2T + 3 states. Every cycle the checker feeds the current state, encoded
by f, to a PUF. It compares the answer with the bit recorded for this
position during a fault-free enrolment run. A fault that diverts the
machine, for example jumping from Mult straight to Result, changes every
later state. Each wrong state gives a wrong check bit with probability about
½, so t wrong states escape with probability about 2^-(t-L).

### The encoding f (`state_encoder`)

For that ½ to hold, any two states must have parity vectors N/2 apart.
`state_encoder` assigns state s the challenge whose parity vector is row
(s+1) mod N of the N×N Sylvester-Hadamard matrix, in 0/1 form. Distinct rows
differ in exactly N/2 places. The challenge is the inverse parity transform
of the row: code[i] = h[i] xor h[i+1]. N = 8 covers all eight 3-bit state
values, including the two illegal ones.

### Storing the fingerprint compactly (`checksum_store`, `path_control`)

The raw fingerprint is k bits, which is 515 for T = 256. The sequence is
repetitive, though. It is Q sub-sequences, where sub-sequence g has P[g]
states and repeats CNT[g] times. The controller's sequence is

| g | states        | P[g] | CNT[g] |
|---|---------------|------|--------|
| 0 | Init, Load    | 2    | 1      |
| 1 | Square, Mult  | 2    | T      |
| 2 | Result        | 1    | 1      |

Only P[g] bits are kept per sub-sequence, 5 bits in all. Each is a circular
shift register whose MSB feeds its LSB. `path_control` holds the position
counter C. A start pulse sets C to 1 in the first cycle after Idle. C then
counts to k and returns to 0. Register g is selected while
CNT[0]P[0] + … + CNT[g-1]P[g-1] < C ≤ CNT[0]P[0] + … + CNT[g]P[g].

The decoder lets only the selected register shift, and the multiplexer
outputs its MSB: the bit expected for the current state. A register walked
through CNT[g] whole times ends where it started. The counter follows the
start pulse, not the state register, so a fault in the state register cannot
move the checking window.

Enrolment: a run started with `fsm_enroll` = 1 shifts the fresh PUF bit in
instead of the recirculated MSB. After one fault-free run each register holds
its sub-sequence, first state at the MSB. That run must be fault-free.

### Tolerance and levels (`mismatch_edn`, `fsm_puf_checker`)

A real PUF occasionally answers at random. For this reason `mismatch_edn`
counts disagreements per run and raises the sticky error only when the count
exceeds `L_THR` (default 1). With `LEVELS` = d > 1 the checker adds d
check bits per state, each level with its own registers, and sums the
disagreements of all levels. A fault that changes only a few states is then
still caught (escape about 2^-(t·d-L)). There are two ways to get the extra
levels:

- `SHARED_PUF` = 0: d independent PUFs.
- `SHARED_PUF` = 1: a single PUF. Level j > 0 sees the state code through a
  secret permutation, which is a different encoding of the states. In
  silicon this is one PUF evaluated d times per state. The model
  instantiates it once per level with the same delays.

Timing: the check bit of position C comes from the state register during
that cycle. The violation count and the flag update on the following edge.
On alarm, the top returns the FSM to Idle, stops the counter and clears the
datapath registers.

## Key integrity (`key_memory`, `key_integrity`, `permute_block`)

The key is K rows of N bits (default 4 × 64). Feeding a row straight into the
PUF would let an attacker choose bit flips that barely move the parity
vector. Each row r_i is therefore first passed through T secret permutations
ρ_j (default 8, with T < N). The checksum bit is then S(i,j) = PUF(ρ_j(r_i)),
and the whole checksum is K × T bits.

- `key_enroll` scans all rows and stores S.
- `key_check` recomputes S. It counts the disagreements of each row and
  raises `key_error` if a row has more than `L_THR`. `key_bad_row` reports
  the first such row.

There is one PUF and one permutation network, so a scan evaluates one bit
per clock and takes K·T cycles (32 by default). `key_done` pulses one cycle
after the last evaluation. The permutations are fixed wiring. They come from
a Fisher-Yates shuffle seeded at elaboration. The key array and the checksum
are not reset.

## PUF-based error detection network (`puf_edn`)

A concurrent-error-detection pair computes a result twice: in the main
branch and in a predictor. In this design both are outside the unit, on the
ports `edn_main` and `edn_pred`. `puf_edn` XORs the two results, which gives
all zeros when they agree. It then sends the XOR through T permutations into
a PUF. A permutation of zero is zero, so a fault-free comparison always
reproduces the PUF's answer to the all-zero challenge, which was recorded at
enrolment (`edn_enroll`). A non-zero XOR produces challenges whose answers
differ from that record about half the time. A comparison is accepted when
`edn_ready` is high and takes T cycles. `edn_done` then pulses with
`edn_mismatch`, and `edn_error` is sticky. The record holds T copies of the
zero-challenge answer, one per permutation.

## Using the top level (`puf_fsm_protect`)

Ports (see the header of `rtl/puf_fsm_protect.sv`):

- Exponentiation: `start`, `fsm_enroll`, `x`, `y`, `y_valid`, `busy`,
  `fsm_state`.
- Key: `key_we`, `key_waddr`, `key_wdata`, `key_enroll`, `key_check`,
  `key_busy`, `key_done`, `key_bad_row`.
- EDN: `edn_enroll`, `edn_valid`, `edn_main`, `edn_pred`, `edn_ready`,
  `edn_done`, `edn_mismatch`.
- Alarms: `fsm_violations`, `fsm_error`, `key_error`, `edn_error`, `alarm`.

Bring-up sequence:

1. Write the key rows.
2. Pulse `key_enroll` and wait for `key_done`.
3. Run one exponentiation with `start` and `fsm_enroll` high together.
4. Pulse `edn_enroll`.

After that, every run is checked. `key_check` can be pulsed whenever the key
should be re-verified.

An exponentiation returns `y_valid` 2T + 4 clocks after the start edge, which
is 516 cycles at the defaults. Exponent bit i is key row i / 64, column
i mod 64. Arithmetic is modulo 2^32. Reset is asynchronous and active low. It
clears the alarms but keeps the key and all fingerprints. Any alarm halts
the unit until reset.

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W` | 32 | datapath width (x, y) |
| `KEY_ROWS`, `KEY_COLS` | 4, 64 | key size K × N; exponent length T = K·N |
| `KEY_PERMS` | 8 | permutations per key row (must be < `KEY_COLS`) |
| `ENC_W` | 8 | state code width = PUF width of the FSM checker (power of 2, > 7) |
| `LEVELS` | 1 | check-bit levels in the FSM checker |
| `SHARED_PUF` | 0 | 1: the levels share one PUF through permuted encodings |
| `L_THR` | 1 | tolerated PUF disagreements before an error |
| `EDN_W`, `EDN_PERMS` | 32, 8 | EDN operand width and permutations |

Cost at the defaults, after generic synthesis: about 220 flip-flops plus 352
bits of memory arrays (256 key bits, 32 key-checksum bits, 64 encoder table
bits).

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/puf_pkg.sv \
        tb/tb_puf_fsm_protect.sv --top-module tb_puf_fsm_protect
    ./obj_dir/Vtb_puf_fsm_protect

- `tb_puf_fsm_protect` runs the whole unit at its default size. It covers
  enrolment of all three fingerprints, six checked exponentiations (results
  and 2T+4 latency against a reference power), clean key and EDN checks, and
  three attacks, each followed by reset. The attacks are the state register
  forced from Mult to Result, a key row overwritten, and differing
  main/predictor results. It counts every mechanism (enrolments, clean
  checks, detections, halt, flush) and fails if one never occurs.
- `tb_example_sequence` runs the unit with a 2-bit exponent. The controller
  then walks the 7-state sequence 1,2,3,4,3,4,5. The testbench checks that
  sequence, all four exponents, and a Mult-to-Result attack against the
  violation count predicted from the PUF model.
- `tb_fsm_puf_checker` checks the exact violation count of 22 faulty
  sequences against an independent model of encoder plus PUF. It covers one
  level, two independent PUFs and two levels sharing one PUF. Two levels
  catch noticeably more of the short glitches.
- `tb_key_integrity` and `tb_puf_edn` compare the detection decisions with
  the same model for bit flips, one-way (1→0) corruption and whole-row
  overwrites.
- The other testbenches cover the PUF formula and the collision statistics
  at parity distances 1 and N/2, the Hadamard distances, the shift-register
  recirculation, the window and select sequence of the counter, the
  threshold, the controller path and halt, the exponentiation arithmetic,
  the permutations being bijections, and the key memory ports.

## Departures and limits

- **The PUF is a model.** It is deterministic. There is no metastability, so
  the `L_THR` tolerance is exercised only by faults, and the physical,
  tamper-sensitive half of the protection is absent. The delay scale and the
  seeding are this design's own.
- **Clock enables instead of gated clocks.** The fingerprint registers use
  enables on one clock where a gated-clock decoder could be used.
- **Choices not fixed by the method.** The sizes are this design's own: key
  4 × 64, 8 permutations, 8-bit state code, 32-bit data and EDN. So are the
  Hadamard encoding in the parity domain, the start-pulse-driven position
  counter, the 8-bit saturating violation counter, one PUF evaluation per
  clock in the key checker and the EDN, the halt-and-flush reaction to an
  alarm, and the use of the key memory as the exponent.
- **Further limits.**
  - The datapath works modulo 2^DATA_W.
  - The state sequence is checked only between start and the end of the run.
    Idle is not checked.
  - Enrolment is trusted: it must run on a fault-free chip.
  - The main and predictor branches feeding the EDN are not part of the
    design.
