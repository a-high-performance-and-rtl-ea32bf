# SIDH field-arithmetic core: a statically scheduled Montgomery engine

Supersingular isogeny Diffie-Hellman (SIDH) spends almost all of its time on
multiplications in GF(p^2), with p a prime of the form 2^a·3^b·f − 1 and
500 to 1,500 bits long. This core is built around that fact. It has:

- one dual-port register file of 256 field elements,
- one pipelined modular adder/subtractor,
- a bank of replicated systolic Montgomery multipliers.

Every cycle, one instruction word from a program ROM gives all controls at
once: two register addresses, the write enables, an adder operation and a
multiplier operation. Nothing is decided at run time. The program is a set of
subroutines (GF(p^2) multiply, 3-isogeny, ...). A list scheduler produced them
offline, knowing the exact latency of every unit. The hardware therefore has
no hazard detection, no reservation logic and no result tags. Its results are
right only because the schedule honours the latencies below.

The default build targets p751 = 2^372·3^239 − 1 (751 bits) with 12
multipliers. It is the configuration the design was published with as its
fastest. Values are 768-bit words (48 radix-2^16 digits) kept in Montgomery
form modulo 2p.

## Datapath

```
             +-------------------- register file 256 x W ------------------+
 host 64b -->| port B in (mux: host / multiplier)    port A in (adder)     |
             | port A out                            port B out            |
             +-----+----------------------------------------+--------------+
                   |                                        |
                   +---> adder/subtractor (op1: port A or own result,
                   |                       op2: port B, 2p or 0) ---> port A
                   +---> NMULT Montgomery multipliers (A = port A, B = port B)
                                                             ---> port B
```

| Unit | Latency at p751 | Formula |
|---|---|---|
| register read | 2 cycles | address register + data register |
| register write | 1 cycle | |
| add/sub pass | 3 cycles | ceil(W/256): one 256-bit slice per stage, carry between stages |
| multiplication | 148 cycles | 3·NW + 4 |
| restart of the same multiplier | 100 cycles | 2·NW + 4 |

### Modular addition in two passes

An addition or subtraction is two trips through the same pipeline, one after
the other:

1. **Memory add / memory sub** computes A + B or A − B from the two read
   ports. For a subtraction, it also records whether the result went
   negative.
2. **Reduction** feeds the unit's own result back in as operand 1.
   - After an add, *reduction sub* computes r − 2p and keeps r if that goes
     negative.
   - After a sub, *reduction add* adds 2p only if the first pass was
     negative.

So every value stays in [0, 2p). Each pass takes ceil(W/256) cycles. The
scheduler reserves the adder at t + 2 and t + 2 + 3, and the port-A write at
t + 2 + 6, for a read issued at t.

### Systolic Montgomery multiplier (`mont_mult_dual`, `mont_pe`)

This is the hardest part to follow. The radix is 2^16. SIDH primes satisfy
p ≡ −1 mod 2^16, so −p^−1 ≡ 1 mod 2^16. The quotient digit of each round is
therefore just the low digit of the running sum: q_i = S_i mod 2^16. No
multiplication by a precomputed constant is needed.

There are NW + 2 processing elements (PEs). Element j holds:

- modulus digit m_j,
- digit b_{j−1} of B,
- the digit S_j of the running sum.

Each cycle an element forms U = S_j + q_i·m_j + a_i·b_{j−1} + carry (34 bits).
It sends the low 16 bits down to element j − 1 as the new S_{j−1}, and sends
the carry up to element j + 1. Element 0 produces q_i and discards its low
digit, which is zero by construction: that is the division by 2^16.

One round i consumes digit a_i. It enters element 0 at cycle 2i and reaches
element j at cycle 2i + j, carrying a_i and q_i with it. A round moves up one
element per cycle while the partial sum moves down, so consecutive rounds
must be two cycles apart. The array would be idle every other cycle. Instead,
a **second product runs in the gaps**. Each element stores a B digit for two
products, called *even* and *odd* after the cycle parity at which they
started, and every token carries a slot bit.

The numbers for NW digits:

- NW + 2 rounds are run (A padded with two zero digits), so R = 2^(16·(NW+1)).
  For A, B < 2p and 4p < 2^(16·NW), the result is below 2p and can be fed
  straight back.
- Round i leaves its result digit j − 1 at element j in cycle 2i + j.
- The last round (i = NW + 1) finishes the top digit at element NW in cycle
  3·NW + 2. Including operand capture and the result register, the latency is
  **3·NW + 4 cycles**.
- A slot's B digits are captured by each element when the first round of a
  new product passes it. Its result register is written digit by digit as
  the last round passes.
- A slot can therefore be restarted **2·NW + 4 cycles** after its previous
  start, long before its previous result is complete.

The top element keeps its carry for each slot as the most significant digit
of S.

### Replicated multipliers and the result FIFO (`mult_unit`)

NMULT/2 dual arrays give NMULT logical multipliers. Logical multiplier k is
slot k mod 2 of array k/2. Products are started in circular order, which
alternates even and odd. A read index, also circular, picks the result that
the next port-B write stores. The schedule stores products in the order they
were started, so this pair of counters is the whole "FIFO".

An even/odd phase bit toggles every cycle. A multiplier instruction on the
last cycle of a block resets both indices and the phase bit. The controller
starts each block on an even phase. An assertion reports a start on the wrong
phase, which would mean the program does not match the hardware it runs on.

## Instruction word (26 bits)

| Bits | Field |
|---|---|
| 7:0 | port-A address |
| 15:8 | port-B address |
| 16 | write port A (adder result) |
| 17 | write port B (multiplier result) |
| 18 | read both ports |
| 21:19 | adder: 0 none, 1 add, 2 sub, 3 reduction add, 4 reduction sub |
| 23:22 | multiplier: 0 none, 1 start, 2 reset indices and phase |
| 24 | port-A address is taken from the point queue |
| 25 | stall word: bits 24:0 = N idle cycles |

A single idle cycle is an all-zero word. Longer waits, such as waiting for a
148-cycle product, are one stall word. The controller holds the ROM output
while it counts the stall down.

Bit 24 is for the point queue. The isogeny walk keeps up to 12 points in
registers 160..255, 8 registers per point. With bit 24 set, the port-A
address becomes 160 + 8·(queue_size − 1) + (addr_a mod 8). One subroutine can
then work on "the last point in the queue" wherever it is. `queue_size` is
moved by `q_push` / `q_pop` from outside the core.

## Running a subroutine

Follow these steps:

1. With `host_mode = 1`, load registers through the 64-bit port:
   - `wr_en`/`wr_addr`/`din` take W/64 beats, least significant first. The
     word is stored after the last beat.
   - `rd_en`/`rd_addr` returns W/64 beats on `dout`, qualified by
     `dout_valid`.
   - By convention, registers 0-4 hold 0, 1, 2, 6 and R² in Montgomery form.
2. Drop `host_mode`.
3. Pulse `start` with `start_pc` and `end_pc` (exclusive).
4. Wait for `done`.

`busy` is the select of the port-B write mux. It is 0 while the host owns the
RAM (interface data is written) and 1 while the core computes (products are
written). It is simply the inverse of `host_mode`.

From `start` to `done` takes the block's schedule length plus 2 to 4 cycles.
This covers the wait for an even phase and the ROM fetch.

GF(p^2) elements sit in register pairs: the imaginary part at the even
address r and the real part at r + 1.

The shipped program (`rtl/sidh_program.hex`, p751, 12 multipliers) holds five
blocks:

| Block | PC range | Cycles | Content |
|---|---|---|---|
| 0 | 0-43 | 179 | C = A·B (A in 16/17, B in 18/19 → 20/21) and D = A² (→ 22/23) |
| 1 | 44-202 | 413 | 3-isogeny from the kernel point (X:Z) in 24-27: A = Z⁴ + 18X²Z² − 27X⁴ (→ 28/29) and C = 4XZ³ (→ 30/31) |
| 2 | 203-216 | 15 | copies words 0-3 of the last queued point to 32-35 |
| 3 | 217-412 | 562 | 3-isogeny evaluation at the point in queue slot 0 (X at 160/161, Z at 162/163): X' = X(X3·X − Z3·Z)² (→ 36/37), Z' = Z(Z3·X − X3·Z)² (→ 38/39) |
| 4 | 413-804 | 1016 | the same for the points in slots 1 and 2 at once (→ 36-39 and 40-43) |

The GF(p^2) formulas are the usual Karatsuba-like ones:

- Product, with 3 multiplications:
  - c1 = a1·b0 + a0·b1
  - c0 = (a0 + a1)(b0 − b1) − a1·b0 + a0·b1
- Square, with 2 multiplications:
  - c0 = (a0 + a1)(a0 − a1)
  - c1 = 2·a0·a1

Block 1 has two dependent groups of multiplications, 7 and then 8. With 12
multipliers, its length is set by two multiplier latencies plus the additions
between them.

Blocks 3 and 4 show why points are evaluated several at a time. One
evaluation is three dependent levels of multiplications: 12 products, then 4,
then 6. That leaves most multipliers idle in the later levels. Two points
evaluated together take 1016 cycles rather than 2 × 562.

### Writing programs

Each word is the full control set for one cycle. A program for other sizes
or multiplier counts must be rescheduled with these rules:

- Read at t.
- Adder passes at t + 2 and t + 2 + L_add.
- Port-A write at t + 2 + 2·L_add.
- Multiplier start at t + 2, on the parity of its circular index, at most one
  per cycle.
- The result is stored with a port-B write at or after start + 3·NW + 4,
  in start order.
- The same logical multiplier is not restarted within 2·NW + 4 cycles.
- The last word of a block carries the multiplier reset.

A result register is overwritten when its slot's next product finishes. The
program must store a product before that.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NMULT` | 12 | logical multipliers (even; NMULT/2 dual arrays) |
| `NW` | 48 | radix-2^16 digits; needs 4p < 2^(16·NW) |
| `W` | 16·NW | word width |
| `P` | p751 | modulus; any p with p ≡ −1 mod 2^16 |
| `PROG_DEPTH`, `PROG_FILE` | 1024, `rtl/sidh_program.hex` | program ROM |

The register count (256), the queue layout and the 256-bit adder slice are
package constants in `rtl/sidh_pkg.sv`.

## Simulating

Run everything from the directory that holds `rtl/` and `tb/`, because the
program ROM is loaded by a relative path. For example:

```
verilator --binary --timing -Wno-fatal rtl/sidh_pkg.sv rtl/*.sv tb/tb_sidh_core.sv \
          --top tb_sidh_core -Mdir obj && obj/Vtb_sidh_core
```

(The duplicate package file on that line is harmless. Listing the package
first is all that matters.)

Each testbench prints `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_sidh_core` | The whole core at the default size (p751, 12 multipliers, nothing overridden): all five blocks, results checked against wide-integer arithmetic, block cycle counts, and that stalls, alignment, FIFO wrap, both phases, both outcomes of both reduction passes, the queue address and host traffic all occurred. |
| `tb_sidh_primes` | All five blocks, through the helper `tb/sidh_prime_run.sv`, for p503 (NW = 32), p1019 = 2^508·3^319·35 − 1 (NW = 64) and p1533 = 2^776·3^477 − 1 (NW = 96). Each uses programs scheduled for that size (`tb/sidh_program_nw*.hex`). This test needs `tb/sidh_prime_run.sv` on the command line. |
| `tb_sidh_mults` | The first three blocks at p751 with 6, 8 and 10 multipliers (`NMULT` overridden). 8 and 10 use the default program. 6 uses `tb/sidh_program_m6.hex`, where the 3-isogeny takes 482 cycles; that instance also runs the two evaluation blocks. This test also needs `tb/sidh_prime_run.sv`. |
| one per unit | `tb_mont_pe`, `tb_mont_mult_dual` (includes latency and restart distance), `tb_mult_unit`, `tb_fp_addsub`, `tb_register_ram`, `tb_fpga_interface`, `tb_field_arith_unit`, `tb_program_rom` (uses `tb/tb_program_rom.hex`), `tb_controller`. |

The largest size simulated is p1533 with 12 multipliers.

## What is and is not here

**Built**
- The register file, the adder/subtractor, the systolic multiplier and its
  replication, the 64-bit host port, the program ROM and the controller with
  stall words and the point-queue address.
- Demonstration subroutines for GF(p^2) arithmetic and the 3-isogeny.

**Not built**
- The isogeny sequencer that walks the optimal strategy (a 2048-entry table
  of pivot choices), runs the Montgomery ladder over the secret key and
  pushes/pops queue points. Its connections are the `start`, `start_pc`,
  `end_pc`, `done`, `q_push` and `q_pop` ports.
- The rest of the SIDH program: ladders, 4-isogenies, point evaluation and
  Fermat inversion.
- A random number generator.

**Choices made in this design where the published description gives only the
function**
- The encoding of the adder and multiplier fields.
- The queue slot layout: 8 registers per point at 160.
- Block start/stop handshake and the wait for an even phase.
- The host port protocol.
- Port B winning a same-address write collision.
- The 18-bit inter-element carry.

**Differences from the published design**
- The published interleave distance is 101 cycles; this array allows a
  restart after 100. Programs scheduled for 101 still run.
- The GF(p^2) product's last step adds the a0·b1 term (c0 = t1 + t3). A
  subtraction there would not give a0·b0 − a1·b1.
- The 3-isogeny block takes 413 cycles here with 8 to 12 multipliers. The
  published schedule for those counts is 424.
- The 3-isogeny evaluation takes 562 cycles here for one point against a
  published 750 (12 multipliers). The evaluation formula is the standard
  projective one, with the published cost of 2 additions, 2 squarings and 6
  multiplications in GF(p^2). The published cycle count may include work
  this block does not do.
- With 6 multipliers, this scheduler gives 482 cycles against the published
  455. This design's greedy in-order issue is weaker than the published
  rescheduling when multipliers are scarce.

## Known lint notes

Verilator warns about parameters that share a name with package constants
they default to (`NW`, `W`, `NMULT`). It also warns that the reset is used in
an assertion's `disable iff`. Both are intended.
