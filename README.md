# AB + C for binary Ring-LWE: a serial-in, ring-accumulating multiplier

Binary Ring-LWE (BRLWE) is a lightweight lattice encryption scheme over
R_q = Z_q[x]/(x^n + 1). Key generation, encryption and decryption all
reduce to one operation:

    W = A*B mod (x^n + 1) + C

Here A and C have integer coefficients mod q and B has binary coefficients.
This RTL computes that operation with n small processing blocks (PBs) arranged
in a ring. B is held in a shift register. C is shifted into the ring. The
coefficients of A are broadcast u at a time. After n/u cycles the ring holds W,
which is then shifted out one coefficient per cycle.

Main configuration (parameter defaults): n = 512, u = 1, q = 128 (7-bit
coefficients). The same RTL also covers n = 256 and u = 2 through its
parameters.

## Number format

Coefficients are 7-bit two's complement values in the centred range
[-q/2, q/2 - 1]. q is a power of two, so modular addition is plain
wrap-around addition, with no reduction logic anywhere. Every product a*b
with b in {0, 1} is either 0 or ±a. A subtracted product enters an adder as
its one's complement (XOR with the sign flag) with the adder's carry-in set.

## How the ring schedule works

This is the part that needs the most care.

Write n = u*v. The product is split into n shifted copies of A:
A_j = A*b_j*x^j mod (x^n + 1). It is accumulated over v cycles. In cycle k
(k = 0..v-1), group l (l = 0..u-1) handles a_{l*v+k}.

**Ring.** PB p (p = 0 is PB-1, the leftmost) owns one 7-bit D cell. In every
computation cycle it loads:

    D_p <= D_{p-1} + sum over l of (±) a_{l*v+k} * bit_{l,p}

PB-1 takes D_{n-1} through the ctr-1 multiplexer, which closes the ring.
Each partial sum therefore moves one PB to the right per cycle and collects
one product per group on the way.

**Fixed B taps.** The B shift register is loaded with b_0 first. Cell r then
holds b_{n-1-r}. PB p reads bit_{l,p} = cell (p + l*v) mod n, which is
b_{(n-1-p-l*v) mod n}. For u = 2 this gives group 0 = b_{n-1}..b_0 and
group 1 = b_{v-1}..b_0, b_{n-1}..b_v across the PBs. During the computation
every PB sees the same B bits. Only A changes.

**Where C goes.** The partial sum for w_i must meet exactly the products
a_{l*v+k} * b_j with l*v + k + j ≡ i (mod n). With the taps above, this fixes
its position: before cycle 0, c_i has to sit in PB (n-2-i) mod n. C enters
serially at PB-1, so it is supplied in the order c_{n-1}, c_0, c_1, ..,
c_{n-2}. After v cycles, w_i sits in PB (n+v-2-i) mod n. The far-right PB
therefore delivers w_{v-1}, w_v, .., w_{n-1}, w_0, .., w_{v-2}.

**Signs.** A product changes sign when its exponent passes x^n, because
x^n = -1:

- *Group 0.* In cycle k, PB p needs a negative product exactly when p < k.
  The sign shift register provides this. It has n one-bit cells, is cleared
  before the computation, and shifts in a '1' every cycle. PB p reads cell p
  (called s_{n-1-p}).
- *Groups l >= 1.* PBs with p >= n - l*v always subtract, because their
  exponent always lands in [n, 2n). The other PBs follow s, like group 0.
  This split is fixed by the PB's position (`FORCE_NEG`, elaborated at
  compile time).

The carry/sign cell (CC) ANDs each sign with its B bit. The result is both
the XOR mask and the adder carry-in, so a zero product stays zero.

Worked case, n = 4, u = 2. After loading, PB-1..PB-4 hold c2, c1, c0, c3.
After cycle 1 they hold
a0b3 + a2b1 + c3 | a0b2 + a2b0 + c2 | a0b1 - a2b3 + c1 | a0b0 - a2b2 + c0.
After cycle 2 they hold w0 | w3 | w2 | w1. `tb_brlwe_pb` checks exactly
these values.

## Blocks

| module | role |
|---|---|
| `brlwe_abc` | Top level: the ring of PBs, the ctr-1 MUX, the shift registers, the controller, and the output path (HD, ctr-2 buffer, decoder). |
| `brlwe_pb` | One processing block: AND gates, XOR mask, CC, ADT and the D cell. |
| `brlwe_cc` | Sign/carry cell: `neg[l] = (s OR FORCE_NEG[l]) AND b[l]`. |
| `brlwe_adt` | Adder tree: u+1 operands, u adders, each adder with one carry-in. The operands form a complete binary tree (a single adder for u = 1, a chain of two for u = 2). |
| `brlwe_sign_sr` | Sign shift register, s_{n-1}..s_0. |
| `brlwe_b_sr` | B shift register with u rotated tap groups. |
| `brlwe_hd` | Half-adder chain on the output. Its carry-in adds the e3 coefficient in encryption. |
| `brlwe_decoder` | Threshold decoder: XOR of the two top bits, giving '1' for w in [q/4, 3q/4 - 1]. |
| `brlwe_ctrl` | Phase sequencer (IDLE / LOAD / COMP / DRAIN). |
| `brlwe_pkg` | Default sizes and the controller state type. |

Hardware cost at the defaults:

- 512 PBs, each with one 7-bit adder per group, one 7-bit register, 7 AND
  gates and 7 XOR gates per group.
- 1024 one-bit shift-register cells (B and sign).
- A single 7-bit multiplexer.

Coarse synthesis counts about 4.6k flip-flops. One product takes n/u
computation cycles: 512 for u = 1, 256 for u = 2. Decryption is one product.
Encryption is two (c_t1, then c_t2), so it takes 2n/u cycles, not counting
the shift-in of the operands.

## Interface and timing (`brlwe_abc`)

Parameters: `N` (n, default 512), `U` (u, default 1, must divide N) and
`LOGQ` (log2 q, default 7).

All inputs are sampled on the rising clock edge. `rst_n` is an asynchronous,
active-low reset that clears every register.

1. **Start.** Pulse `start` while `busy` is low.
2. **LOAD (N cycles).** `load` = 1 and `idx` = 0..N-1. In each cycle, drive:
   - `b_in` = b_idx;
   - `c_in` = c_{N-1} when idx = 0, else c_{idx-1}.
3. **COMP (N/U cycles).** `comp` = 1 and `idx` = k. Drive
   `a_in[l]` = a_{l*V+k}. `a_in` is ignored outside this phase.
4. **Done.** `done` pulses for one cycle, and the result stays in the ring.
5. **Read-out.** The result leaves during the LOAD phase of the next
   operation, so unloading costs no extra cycles. To read it without starting
   a new operation, pulse `drain` for a DRAIN phase of N cycles. During
   read-out:
   - `w_valid` = 1 (this is ctr-2);
   - `w_out` = w_{(V-1+idx) mod N} + `e3_in`;
   - `m_out` = decode(`w_out`).

   Drive `e3_in` with the e3 coefficient of that output when producing c_t2.
   Otherwise hold it at 0.

The scheme maps onto the operation as follows:

| step | A | B | C | e3_in | output |
|---|---|---|---|---|---|
| key generation p = r1 - a_p*r2 | -a_p | r2 | r1 | 0 | p |
| c_t1 = a_p*e1 + e2 | a_p | e1 | e2 | 0 | c_t1 |
| c_t2 = p*e1 + e3 + m~ (m~ = m*q/2) | p | e1 | m~ | e3 | c_t2 |
| decryption | c_t1 | r2 | c_t2 | 0 | `m_out` |

## What is this design's own

The underlying structure defines the ring of PBs, the two shift registers,
ctr-1 and ctr-2, the HD carry-in for e3 and the XOR decoder. The following
details are this design's own choices:

- **Insides not given by the structure.** The PB negation is done with an
  XOR mask plus carry-in. The per-PB 2-input sign multiplexers of the
  original structure are not reproduced, because their inputs are not
  specified. The operand order inside the adder tree is also a choice.
- **Controller and handshake.** The controller FSM, `start`/`drain`/`done`,
  the clock enables on the D cells and the B register, and the clear/shift
  enables of the sign register are all this design's own.
- **Operand timing.** Unloading overlaps with the next load. A is gated to
  zero outside the computation.
- **Orders and placement.** The serial orders of C and W follow from the
  placement derived above. The HD sits between the far-right PB and the
  output buffer.
- **Coefficient width.** Coefficients and adders are log2 q = 7 bits wide.
  Reference FPGA implementations of this structure used 8-bit ripple-carry
  adders. `LOGQ` sets q and the adder width together.
- **Register count.** Published flip-flop counts for this structure at u = 1
  are 10n + 8. This RTL has 9n + 13: 7n D cells, n B cells, n sign cells
  and 13 controller bits. What the extra n one-bit register holds in the
  original is not documented, so it is not reproduced.
- **Decoder boundary.** The decoder includes the boundary value q/4. The
  threshold as stated excludes it.

## Verification

Each module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_brlwe_adt`, `tb_brlwe_cc`, `tb_brlwe_hd`, `tb_brlwe_decoder` | Random or exhaustive comparison against integer arithmetic. |
| `tb_brlwe_sign_sr`, `tb_brlwe_b_sr`, `tb_brlwe_ctrl` | Register contents and phase lengths. |
| `tb_brlwe_pb` | The n = 4, u = 2 worked case above, cycle by cycle. |
| `tb_brlwe_abc` | N = 16 with U = 1 and 2, and N = 12 with U = 3, end to end. |
| `tb_brlwe_workloads` | n = 256 with u = 1 and 2, and n = 512 with u = 2. |
| `tb_brlwe_abc_full` | The default build (n = 512, u = 1), unmodified. |

The end-to-end benches use `abc_driver`. It runs a real BRLWE key
generation → encryption → decryption chain, feeding each result back into
the structure, followed by back-to-back random products. Every output
coefficient is compared with a schoolbook negacyclic reference, and the
computation must take exactly n/u cycles.

The benches also count how often each mechanism occurred and fail if one
never did:

- negation through the sign register;
- position-fixed negation for u > 1;
- unloading under a LOAD;
- DRAIN;
- the HD carry-in;
- a decoder '1'.

Simulate with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/brlwe_pkg.sv \
        tb/tb_brlwe_abc_full.sv --top-module tb_brlwe_abc_full
    ./obj_dir/Vtb_brlwe_abc_full

The full-size bench takes a few seconds of simulation.

**Decryption rate at large n.** With uniformly random binary r1, r2, e1, e2,
e3 and q = 128, the decryption noise at n = 256 or 512 often exceeds q/4. The
benches then recover only about half the message bits (for example 269 of
512). This is a property of those scheme parameters, not of the hardware:
every coefficient, including each decoded bit, still matches the reference.
At n = 16 all message bits are recovered.
