# McEliece decoding coprocessor: Goppa polynomial arithmetic over GF(2^13)

Decrypting with a McEliece key that uses a binary Goppa code (n = 8192,
m = 13, t = 315) means running Patterson's decoder on every ciphertext. In
software three steps take almost all the time:

- inverting the syndrome polynomial modulo the Goppa polynomial Gp;
- solving the key equation a(Z) = b(Z)·R(Z);
- finding the roots of the error-locator polynomial σ(Z) over all 8192 field
  elements.

The first two are extended-Euclid loops. The third is a brute-force
evaluation.

This RTL is a coprocessor for those three steps. It does not run whole
algorithms. It is a polynomial arithmetic unit with a small set of operations
on polynomials of up to 316 coefficients of 13 bits:

- multiply;
- multiply and XOR;
- reduce modulo Gp;
- divide, returning quotient and remainder;
- evaluate σ at every point of the support.

A host processor sequences these operations to build the Euclid loops. The
host does the rest of decryption: permutation, syndrome, square root, σ,
correction and the S⁻¹ product.

All widths follow from two numbers:
- `M = 13`, the field degree.
- `NCOEF = t + 1 = 316`, the number of coefficients in an operand.

A result holds `2·NCOEF = 632` coefficients. That is enough for a full
product (631 coefficients), for a quotient and remainder pair, or for the
8192-bit error vector packed 13 bits per word.

## Block diagram

```
             AXI4-Lite (host registers)
                      │
              ┌───────┴────────┐   control (opcode, START)   status, cycles
              │  axi_slave_if  │──────────────────┐    ┌─────────────────┐
              └──▲─────────▲───┘                  ▼    │                 │
     input degree│         │output degree   ┌─────────────────────────┐  │
 AXI4-Stream  ┌──┴─────────┐ ┌───────────┐  │ goppa_au (316 × 13 bit) │  │
 ────────────▶│goppa_reader│▶│ in_buffer │─▶│  ├─ goppa_xmd            │──┘
 operands in  └────────────┘ └───────────┘  │  │   ├─ goppa_mult       │
                                            │  │   │   └─ 316 × gf_mult│
                                            │  │   └─ gf_div           │
 AXI4-Stream  ┌────────────┐ ┌───────────┐  │  └─ error_loc           │
 ◀────────────│goppa_writer│◀│out_buffer │◀─│      └─ gf_mult         │
 results out  └────────────┘ └───────────┘  └─────────────────────────┘
```

`mce_ip` is the top level. Its ports are plain AXI4-Lite and AXI4-Stream
signals. Everything shares one clock `clk` and one active-low asynchronous
reset `rst_n`.

## Operations

The host writes a 4-bit code together with START.

| Code | Result | Result packet length |
|------|--------|----------------------|
| 0000 | op1·op2 | 631 |
| 0001 | (op1·op2) mod Gp | 315 |
| 0010 | (op1·op2) ⊕ op3 | 631 |
| 0011 | ((op1·op2) ⊕ op3) mod Gp | 315 |
| 0100 | op1 / op2: quotient in words 0–315, remainder in words 316–631 | 632 |
| 1000 | error location of σ = op1: bit i of the packet is εᵢ | 631 |
| 1110 | Gp := op1 (no result packet) | — |
| other, incl. 1001 | rejected: STATUS.error is set | — |

In characteristic 2, subtraction is XOR. One extended-Euclid iteration therefore maps onto two operations:

- `(q, r_{i+1}) = DIV(r_{i-1}, r_i)`
- `λ_{i+1} = MULXOR(q, λ_i, λ_{i-1})`, or `MULXORMOD` to keep λ below degree 315.

The host streams the operands for the next operation while the current one
runs.

## Host interface

### Streams

Each polynomial is one AXI4-Stream packet:
- coefficient 0 comes first;
- each 32-bit beat carries one coefficient in bits 12:0;
- TLAST marks the last coefficient.

On the input side, successive packets fill op1, op2 and op3. The first beat of
a packet clears its slot, so a short packet leaves zeros above its last
coefficient. Once three packets have arrived, TREADY stays low until an
operation starts or the host writes CLEAR. Either event rewinds the reader to
op1. A packet longer than 316 beats is truncated and sets STATUS.overflow.

The result leaves on the master stream as one packet of the length given in
the table above. Polynomials are sent at their full width, so the host uses
OUT_DEG to know where the significant coefficients end. OUT_DEG is the index
of the highest non-zero coefficient sent. The reader reports the same thing
for each input operand in IN_DEG0–2.

### Registers (AXI4-Lite, 32-bit, byte addresses)

| Addr | Name | Access | Contents |
|------|------|--------|----------|
| 0x00 | CTRL | W | [3:0] opcode, [8] START, [9] CLEAR |
| 0x00 | CTRL | R | [3:0] opcode, [8] start still pending |
| 0x04 | STATUS | R | [0] busy, [1] done, [2] error, [3] result waiting in the unit, [4] writer sending, [6:5] operand slots filled, [7] overflow |
| 0x08–0x10 | IN_DEG0–2 | R | degree of op1, op2, op3 as received |
| 0x14 | OUT_DEG | R | degree of the last result packet |
| 0x18 | CYCLES | R | clock cycles of the last operation |

- START is held as a request until the arithmetic unit takes it.
- `done` is sticky and is cleared by the next START.
- Write strobes are ignored.
- Every response is OKAY.

### Typical sequence

1. Stream Gp, then write `CTRL = 0x10E`.
2. Stream op1, op2 and op3 as the operation needs.
3. Write `CTRL = 0x100 | code`.
4. Optionally stream the next operation's operands right away.
5. Poll STATUS.done, then take the result packet from the master stream.

## Flow control between the stages

Two buffers decouple the streams from the arithmetic unit.

**Input buffer.** The arithmetic unit copies all three operands into its own
registers in the cycle it accepts START. From then on the input buffer is
free to receive the next operands.

**Output buffer.** A finished result stays in the arithmetic unit
(STATUS[3]) until the output buffer is empty. The output buffer then copies
all 632 coefficients in one cycle, and the writer streams them out.

If the host starts another operation while a result is still waiting in the
unit, the START request stalls until the result has moved on. No result is
ever overwritten. With a slow result consumer, the coprocessor holds one
result in the output buffer and one in the unit, and then stops accepting
work.

## Inside the arithmetic unit

### Goppa multiplier (`goppa_mult`)

The multiplier has 316 combinational GF(2^13) multipliers (`gf_mult`). Each
multiplier takes the same coefficient p1[i] and its own coefficient p2[j], so
a whole row p1[i]·p2(Z) is formed in one cycle. The rows are accumulated
Horner-style, starting from the top coefficient of p1:

`acc ← acc·Z ⊕ p1[i]·p2(Z)`

This needs only a fixed one-coefficient shift, not a barrel shifter. A
separate XOR adds p3, and a multiplexer selects the plain or the XORed
product.

The number of p1 coefficients used, `n1`, is an input, and the multiplication
takes n1 cycles:
- a full product takes 316 cycles;
- a scalar times a polynomial takes one cycle.

The divider relies on the one-cycle scalar case.

### Reduction and division (`goppa_xmd`)

MOD and DIV share one long-division engine. The engine is built from the
Goppa multiplier, one GF divider and a state machine. It is the least obvious
part of the design.

1. **Normalise.** Shift the divisor D up one coefficient per cycle until its
   leading coefficient is at index 315. This takes sh = 315 − deg D cycles
   and no cycles for a degree-315 Gp.
2. **Invert.** `gf_div` computes 1/lead(D) in 13 cycles.
3. **Make monic.** One scalar multiplication gives D' = D·lead(D)⁻¹·Z^sh.
4. **Eliminate.** The dividend sits in a rotating register W of
   631 coefficients. Each of the 316 + sh steps does the following:
   - takes c = W[630];
   - cancels it with `W[315..630] ⊕= c·D'`, using the multiplier with n1 = 1
     and its XOR input;
   - rotates W left by one coefficient;
   - shifts c into the quotient register.

   The cancellation always happens at the same position, so there is no
   variable shift. A step with c = 0 takes 1 cycle. Any other step takes 3.

   When sh > 0, the last elimination steps would wrap part of D' around the
   rotating register. Those wrapped coefficients are exactly the sh low zeros
   of D', so nothing is corrupted.
5. **Realign.** deg D further rotations bring W back to its original
   alignment, which leaves the remainder in W[0 .. deg D − 1].
6. **Scale the quotient (DIV only).** The quotient was formed against the
   monic D', so one more scalar multiplication by lead(D)⁻¹ gives the true
   quotient.

Gp does not have to be monic. Dividing by the zero polynomial sets the error
flag.

### GF divider (`gf_div`)

The divider computes op1/op2 by Fermat inversion:
`op2⁻¹ = op2^(2^13−2) = Π_{i=1..12} op2^(2^i)`. Each cycle does one squaring
and one multiplication, and a final multiplication by op1 finishes the
division. It has a fixed latency of 13 cycles.

### Error location (`error_loc`)

The error-location unit has one `gf_mult` and a counter. For each support
point αᵢ it evaluates σ(αᵢ) by Horner's rule, one multiplication per cycle,
and sets εᵢ = 1 when the value is zero.

- The support order is the natural one: αᵢ is the field element whose
  polynomial-basis bit pattern equals i, for i = 0 … 8191.
- The host must use the same order when it places columns of the parity
  check matrix.
- εᵢ is bit i of the flattened result, that is bit i mod 13 of word i / 13.

### The field

The field is GF(2^13) in polynomial basis, with reduction polynomial
z^13 + z^4 + z^3 + z + 1 (`mce_pkg::GF_POLY`). The host's key generation must
use the same polynomial.

## Performance at full size

These counts come from simulation at t = 315 and n = 8192. They include the
arithmetic unit's own 2–3 cycles of handshake overhead.

| Operation | Cycles |
|-----------|--------|
| MUL, MULXOR | ≈ 320 |
| MULMOD with a degree-315 Gp | 1921 |
| DIV | ≈ 1300–2000, depending on the operands |
| Error location, deg σ = 315 | 8192 × 316 + 3 = 2,588,675 |
| Set Gp | a few |

Streaming an operand takes one cycle per coefficient. Streaming a result
takes one cycle per coefficient while TREADY is high.

The published implementation this design follows reported a 250 MHz clock
and about 1.3 M cycles for the error-vector step. This design's single
Horner unit needs twice that.

The inverse syndrome and the key equation are host-driven loops. Each
Euclid step is one DIV and one MULXORMOD, plus streaming about 1,600
operand beats and about 950 result beats. At t = 315 that comes to roughly
t × 7,000 ≈ 2.2 M cycles for the inverse, before any host time. This is an
estimate, not a simulation. It is in the same range as the published
15.67 ms (3.9 M cycles at 250 MHz), which included the host's share.

It also uses about twice the flip-flops of the published figure (about 41 k):

| Storage | Words of 13 bits |
|---------|------------------|
| Input buffer | 3 × 316 |
| Arithmetic-unit operand registers | 3 × 316 |
| Gp | 316 |
| Long-division engine | about 4 × 316 |
| Multiplier accumulator | 632 |
| Error vector | 632 |
| Result register | 632 |
| Output buffer | 632 |

## Where this design makes its own choices

The architecture follows the published description:
- the reader → buffer → arithmetic unit → buffer → writer data path;
- the register slave and the degree reports;
- a Goppa multiplier of 316 parallel coefficient multipliers with an XOR and
  an output multiplexer;
- a multiplier/divisor made of that multiplier plus a GF divider under a
  control unit;
- an error-location unit with a single GF multiplier;
- the operation codes;
- t = 315, m = 13 and n = 8192.

The following are this design's own:
- the field polynomial and the support order;
- the register map, the stream beat format, the slot order and the
  back-pressure rules;
- the Horner accumulation in the multiplier;
- the long-division algorithm and the DIV result layout;
- Fermat inversion in the GF divider;
- the stall/hand-off protocol between the unit and the output buffer;
- the CYCLES register;
- the handling of unknown codes.

## Files

| File | Role |
|------|------|
| `rtl/mce_pkg.sv` | field and size constants, opcode enum |
| `rtl/gf_mult.sv`, `rtl/gf_div.sv` | GF(2^13) multiply (combinational), divide (13 cycles) |
| `rtl/goppa_mult.sv` | 316-lane polynomial multiplier with XOR |
| `rtl/goppa_xmd.sv` | XOR-Mod Multiplier/Divisor |
| `rtl/error_loc.sv` | root search of σ over the support |
| `rtl/goppa_au.sv` | opcode decode, Gp register, result hand-off |
| `rtl/in_buffer.sv`, `rtl/out_buffer.sv` | operand and result buffers |
| `rtl/goppa_reader.sv`, `rtl/goppa_writer.sv` | AXI4-Stream slave and master |
| `rtl/axi_slave_if.sv` | AXI4-Lite registers |
| `rtl/mce_ip.sv` | top level |
| `tb/mce_ref_pkg.sv` | reference GF and polynomial arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mce_ip_full` and `tb_mce_decode` |

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=F`
and has a cycle watchdog. Build one with Verilator 5 from the repository
root:

```
verilator --binary --timing --assert --top-module tb_mce_ip \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mce_pkg.sv tb/mce_ref_pkg.sv tb/tb_mce_ip.sv
./obj_dir/Vtb_mce_ip
```

The module-level testbenches and `tb_mce_ip` override `NCOEF` (8) and `NSUP`
(64) so they finish in seconds. `tb_mce_ip` runs every operation code through
the AXI ports. It also forces and counts each flow-control case:
- operands streamed while the unit is busy;
- a START stalled behind a waiting result;
- back-pressure on the result stream;
- division by zero;
- an illegal code;
- an over-long operand.

`tb_mce_ip_full` uses the default parameters and runs in under a minute. It
runs two operations:
1. A degree-315 modular product, checked coefficient by coefficient.
2. An error location over all 8192 points with a σ of 315 known roots,
   checked bit by bit and for its exact cycle count.

`tb_mce_decode` runs a whole Patterson decoding on a small code. The code has
m = 13, t = 7 and 64 support points (`NCOEF` 8, `NSUP` 64). The testbench
drives `mce_ip` only through its AXI ports. It does the following:
1. Picks an irreducible Goppa polynomial and loads it with SET GP.
2. Builds the syndrome of a random weight-7 error.
3. Computes T(Z) = S(Z)^-1 mod G(Z). This uses an extended Euclid loop of
   DIV and MULXORMOD on the coprocessor, then one MULMOD to make it monic.
4. Takes the square root of T(Z) + Z on the host.
5. Solves the key equation with the same Euclid loop, stopped at degree t/2.
6. Forms σ = a² + Z·b² on the host.
7. Runs ERROR LOCATION and compares the result with the injected error.

It decodes three error patterns.

To change the code size, set `NCOEF` (t + 1) and `NSUP` on `mce_ip`. The
result register must hold the error vector, so `NSUP ≤ 2·NCOEF·13`, and
elaboration stops with an error otherwise. Changing `M` also needs a matching
`POLY`.
