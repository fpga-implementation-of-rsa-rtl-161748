# A 1024-bit RSA coprocessor built from one 32-bit multiply-adder

This RTL is an RSA coprocessor for very small systems, such as a smart card.
It computes `x^e mod m` and `x*y mod m` for 1024-bit operands. The design
aims for small area, not for speed. All the arithmetic of a 1024-bit modular
multiplication is done one 32-bit word at a time, on a single multiply-adder
that computes

    {hi, lo} = a*b + c + d        (all four inputs 32 bits, result 64 bits)

That multiply-adder is itself a 32x8 array of full adders used four times in
a row. Besides it, the core has a few 32-bit registers, a 1024-bit shift
register for the running sum, a small RAM and a controller. A host CPU loads
the operands into the RAM, sets a control register and reads back the result.

The architecture follows a published FPGA coprocessor design. Its block
structure and algorithms are kept: the 32x8 additive array, the 4-cycle
additive multiplier, the word-serial Montgomery multiplication with its
state diagram, the accumulator shift register, and the five-bit control
register. The bus protocol, memory map, handshakes and several details of
the arithmetic are choices made for this RTL. The section *Departures and
open points* lists them.

## The arithmetic, bottom up

### 32x8 additive array (`aam_32x8`)

This block is combinational. It computes `P[39:0] = A*B + C + D`, where `A`
and `C` are 32 bits wide and `B` and `D` are 8 bits wide. It has eight rows
of 32 full adders:

* Row `k` adds the partial product `A & B[k]` to the 32 upper sum bits of the
  row above. Row 0 adds it to `C` instead.
* `D[k]` enters row `k` as the carry into its rightmost adder.
* The lowest sum bit of row `k` is the product bit `P[k]`.
* The last row supplies `P[39:8]`.

The result cannot overflow: `(2^32-1)(2^8-1) + (2^32-1) + (2^8-1) = 2^40-1`.
Each row is written as a ripple chain, so the critical path runs through
roughly 8 + 32 full adders.

### 4-cycle additive multiplier (`additive_multiplier`)

This block computes the full `A*B + C + D` by feeding one byte of `B` per
clock through the array, lowest byte first. A multiplexer picks the matching
byte of `D` at the same time.

    pass k:  t_k = A*B[k] + (k == 0 ? C : t_(k-1) >> 8) + D[k]

After each pass, the upper 32 bits of `t_k` are fed back into the `C`
register, and the low byte is shifted into the 64-bit output register. After
four passes, the output holds `A*B + C + D` exactly.

The addend `D` takes a whole 32-bit word. The Montgomery loop uses this to
fold its carry word into the same operation.

Timing: `start` is sampled with the operands on one clock edge. The result is
valid, and `done` is high for one cycle, four edges later. A new `start` may
be given in the cycle where `done` is high.

### Montgomery product (`mont_mult`)

This block computes `Mont(x, y) = x*y*R^-1 mod m`, with `R = 2^(32*NW)` and
`NW = 32` words. It reads `x`, `y` and `m` from the RAM word by word and
writes the result back to the RAM. The running sum `a` (NW words, plus a top
word `a_n`) lives in `acc_shift_reg`.

Each row handles one word `x_i`, for `i = 0 .. NW-1`. Every line below is one
pass through the multiply-adder:

    (C1, S) = x_i*y_0 + a_0
    u_i     = m'*S mod 2^32                  m' = -m^-1 mod 2^32
    (C2, -) = m_0*u_i + S                    low word is zero by construction
    for j = 1 .. NW-1:
        (C1, S) = x_i*y_j + a_j + C1
        (C2, S) = m_j*u_i + S   + C2 ;  a_(j-1) = S
    (a_n, a_(NW-1)) = C1*1 + C2 + a_n

The shift register is what makes the inner loop cheap:

* `a_j` is read from tap `q1`.
* The new `a_(j-1)` is shifted in at the top.
* One row turns the register over exactly once, so the running sum never goes
  back to RAM inside the loop.

After the last row, `t = a_n*R + a` is below `2m`. It then needs at most one
subtraction:

* **S8** computes `t - m` word by word on the multiply-adder, using
  `(~m_j)*1 + t_j + carry`. It writes the result to the destination region
  and rotates the shift register once, which leaves `t` unchanged.
* **S9.** If `a_n` is non-zero, then `t >= R > m`, and the value already
  written is the result.
* **S10.** If the subtraction ended without a borrow, then `t >= m`, and again
  the value already written is the result.
* **S11.** Otherwise `t < m`, and `t` itself is copied from the shift register
  to the destination region.

The state names S1 to S11 follow the state diagram of the original design.
S1 is initialisation. S2 computes `u_i`. S3 to S4 form the inner loop. S5 and
S6 fold in the top words. S7 is the row count.

The product is fully reduced (below `m`) provided that:

* `x` and `y` are below `m`,
* `m` is odd,
* `m'` is correct.

The destination may be the same region as `x` or `y`. This works because all
results are written only after the last read of `x` and `y`.

Timing: the product takes `14*NW^2 + 23*NW + 5` cycles, plus `NW` more when
the S11 copy runs. That is 15 077 to 15 109 cycles for 1024 bits.

The cycles break down as follows:

* Each multiply-add costs 6 cycles: start, four passes, then the capture of
  the result.
* Each inner step needs two multiply-adds, a RAM read and a loop test, for
  14 cycles.

## Exponentiation and the Montgomery domain (`rsa_controller`)

The controller turns one control-register command into a sequence of
Montgomery products. Each product names a source region for `x`, a source
region for `y` (or the constant 1) and a destination region.

| operation | sequence of products |
|---|---|
| multiply, `x*y mod m` | `A = Mont(x, R2)`, then `RES = Mont(A, y)` |
| exponentiate, `x^e mod m` | `XP = Mont(x, R2)` (x in Montgomery form)<br>`A = Mont(R2, 1)` (R mod m, the Montgomery form of 1)<br>for each exponent bit, most significant first: `A = Mont(A, A)`, and if the bit is 1, `A = Mont(A, XP)`<br>`RES = Mont(A, 1)` (back to normal form) |

`R2` is `R^2 mod m`, supplied by the host.

The exponent length depends on control bit 2:

* **Encryption** (bit 2 = 0): 16 bits, bits 15..0 of the exponent region.
* **Decryption** (bit 2 = 1): all 1024 bits.

Leading zero bits cost a squaring each but do not change the result, because
`A` starts as the Montgomery form of 1.

The controller reads exponent words itself, one per 32 bits, while the
multiplier is idle.

## Using the coprocessor (`rsa_processor`)

### Host bus

Each access is a one-cycle strobe on `arm_con[0]`. `arm_con[1] = 1` makes the
access a write.

* `arm_addr[AW]` selects the control register (1) or the RAM (0). For the RAM,
  `arm_addr[AW-1:0]` is the word address.
* Read data appears on `arm_rdata` in the cycle after the strobe.
* While an operation runs, the RAM belongs to the core. Host RAM writes are
  then ignored, and host RAM reads return 0.
* The control register can be accessed at any time.

### Memory map

Each region is `NW` words, least significant word first. The word address is
`region*NW + index`.

| region | content |
|---|---|
| 0 `X` | message `x` (below `m`) |
| 1 `Y` | second factor `y` for the multiply mode (below `m`) |
| 2 `M` | modulus `m`; must be odd |
| 3 `E` | exponent |
| 4 `R2` | `R^2 mod m`, with `R = 2^(32*NW)` |
| 5 `XP` | internal: `x*R mod m` |
| 6 `A` | internal: running result |
| 7 `RES` | result |
| 8 `MPRIME` | word 0 holds `m' = -m^-1 mod 2^32` |

The host must compute `R^2 mod m` and `m'` once per modulus. `m'` can be
computed with the Newton step `inv = inv*(2 - m0*inv)`, repeated 5 times from
`inv = 1`, with `m' = -inv`.

### Control register

| bit | meaning |
|---|---|
| 0 | start. Cleared by the core when it takes the command. |
| 1 | 0: `x*y mod m`, 1: `x^e mod m` |
| 2 | 0: encryption, 16-bit key. 1: decryption, full-length key. |
| 3 | initialise: aborts any running operation and returns the core to idle. Cleared by the core. |
| 4 | end of operation. Set by the core. Cleared when the host writes start or initialise. Also driven on `irq`. |

A typical exponentiation runs as follows:

1. Write `X`, `E`, `M`, `R2` and `MPRIME`.
2. Write `0b00011` (encryption) or `0b00111` (decryption) to the control
   register.
3. Wait for `irq`, or poll bit 4.
4. Read `RES`.

## Performance

The cycle counts below are measured in simulation. The times assume the
40 MHz clock of the original FPGA implementation.

| operation (1024-bit) | cycles | at 40 MHz | original design |
|---|---|---|---|
| one Montgomery product | 15 077 | 377 us | 356 us ("modular multiplication") |
| `x*y mod m` (two products) | 30 094 | 752 us | - |
| `x^e mod m`, 16-bit key with 7 ones (26 products) | 391 024 | 9.8 ms | 6.4 ms |
| `x^d mod m`, random 1024-bit key with 519 ones (1546 products) | 23 251 223 | 581 ms | 510 ms |

* **Storage.** The core has 1547 flip-flop bits. 1024 of them are in the
  accumulator shift register. The RAM holds 9216 bits.
* **Encryption time.** The 16-bit-key figure depends on the key. Every bit
  from 15 down is squared, including leading zeros, which accounts for most
  of the gap to 6.4 ms.

## Files

| file | content |
|---|---|
| `rtl/rsa_pkg.sv` | word width, memory regions, control-register bits |
| `rtl/aam_32x8.sv` | 32x8 additive array |
| `rtl/additive_multiplier.sv` | 4-cycle 32x32 multiply-add |
| `rtl/acc_shift_reg.sv` | accumulator shift register |
| `rtl/mont_mult.sv` | Montgomery product, state machine S1..S11 |
| `rtl/rsa_memory.sv` | single-port RAM |
| `rtl/rsa_ctrl_reg.sv` | control register |
| `rtl/rsa_interface.sv` | host bus slave |
| `rtl/rsa_controller.sv` | multiply / exponentiate sequencer |
| `rtl/rsa_processor.sv` | top level |
| `tb/rsa_ref_pkg.sv` | wide-integer reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the tests below |

Every testbench ends with a line `TB_RESULT checks=N failures=F`. Three of
them go beyond a single module:

* `tb_rsa_processor` runs the whole design at `NW = 4` (128-bit). It covers:
  * the multiply mode, and exponentiation with both key lengths;
  * initialise aborting a running operation;
  * host writes ignored while the core is busy;
  * all three endings of the final subtraction;
  * exponent bits that are 0 and bits that are 1.

  It counts each of these events and fails if any of them never happens.
* `tb_rsa_processor_full` runs the default 1024-bit design for one
  multiplication and one 16-bit-key exponentiation, and checks the results
  and cycle counts. It takes under a second.
* `tb_rsa_decrypt_1024` runs one full 1024-bit decryption, about 23 million
  cycles. It takes about 20 s with Verilator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rsa_pkg.sv tb/rsa_ref_pkg.sv tb/tb_rsa_processor.sv \
        --top-module tb_rsa_processor -o sim
    ./obj_dir/sim

Replace `tb_rsa_processor` with any other testbench name. The operand length
is the top-level parameter `NW`, in 32-bit words. The RAM depth and address
width follow from it. The unit testbenches use small `NW` values to keep runs
short.

## Departures and open points

* **Where the data registers sit.** The original block diagram draws the data
  registers, the operand selector and the output shift register outside the
  modular multiplier. Here they sit inside `mont_mult`, together with the
  state machine that drives them.
* **The RAM port.** The RAM-port multiplexers of the diagram are in the top
  level, selected by the controller's busy signal.
* **End-of-row additions.** The original row ends with a chain of 32-bit
  additions through two temporary carries. Here one multiply-add `C1*1 + C2 + a_n`
  replaces that chain. This is equivalent because the running sum stays below `2m`.
* **Additions and subtraction on the multiply-adder.** The final subtraction
  and all additions run on the multiply-adder. This keeps the claim that the
  modular multiplier is "only the additive multiplier, registers and
  control", at the price of 6 cycles per word.
* **Subtraction condition.** The original algorithm subtracts when `A > m`.
  This RTL subtracts when `A >= m`, so results are always below `m`.
* **Montgomery conversion.** How `x*R mod m` and `R mod m` are obtained was
  not specified. Here they come from products with `R^2 mod m`. The host
  supplies that value and `m'`.
* **Multiply mode.** It returns the true `x*y mod m`, not the Montgomery
  product. That costs two products.
* **Exponent storage.** The original control register is said to hold
  "sequential information" about the exponent. Here the exponent is in RAM,
  and its bit index is kept in the controller.
* **Invented interfaces.** The host bus, the memory map, reset (asynchronous,
  active low), and all handshakes are this design's own choices.
* **Not built.** The ARM7 host, the smart-card interface and the board around
  the coprocessor are not part of this RTL.
* **Timing not checked.** No timing closure was attempted. The ripple-carry
  rows of the 32x8 array are the critical path.
