# GF(2^n) elliptic-curve point-multiplication coprocessor

This is the programmable-logic half of a hardware/software split for
elliptic-curve cryptography over binary fields GF(2^n). The expensive operation
is the point multiplication k·P on a curve y² + xy = x³ + ax² + b. It is broken
into three levels:

| level | operations | done by |
|---|---|---|
| point multiplication | walk the digits of k: double, add P or subtract P | firmware on an 8-bit micro-controller (not part of this RTL) |
| group operation | one projective point double / add / subtract | **hardware controller** (`ecc_hw_ctrl`) |
| field operation | GF(2^n) add, multiply, square | **data-path** (`ecc_datapath`) |

The micro-controller sends one instruction at a time and waits for an
interrupt. The hardware does all the field arithmetic. Points are kept in
projective coordinates, so no field inversion is ever needed. The multiplier
and squarer are bit-serial: they are small, and their cost grows linearly with n.

The design follows the co-design described in *Hardware/Software Co-Design of
an Elliptic Curve Public-Key Cryptosystem*. That design was built on an Atmel
FPSLIC, which has an AVR core and an FPGA on one chip. The block structure, the
busses, the operators and their latencies, the memory size and the
control-signal counts come from that design. The instruction set, the memory
map, the micro-program, the handshakes and the reset behaviour were not
published, so they are this implementation's own. They are marked as such
below.

## Block structure

```
           8-bit bus (avr_din / avr_dout), instr_wr, data_wr, data_rd      irq[1:0]
                 |                          |                                 ^
          +------v------+            +------v------+                          |
          | instr. reg  |            |  data reg   |<--- byte handshake ------+
          | op | loc    |            |   8 bit     |                          |
          +--+------+---+            +--+-------^--+                          |
     opcode  |      | loc        serial |       | serial                      |
          +--v------v-------------+     |       |                             |
          |  hardware controller  |     |       |                             |
          |  FSM double/add/sub   |-----+-------+------ done ----------------+
          |  + address controller |     |       |
          +--+--------+--------^--+     |       |
   15 address|  7 logic|       | 4 status       |
          [reg]     [reg]    [reg]              |
          +--v--------v--------+----------------+-----------------------+
          | data-path          v                |                       |
          |  RAM1 (13 x n) --bus1--+--> mux2 --> IOregister --bus3 (field polynomial)
          |  RAM2 (13 x n) --bus2--|                                    |
          |        ^               +--> adder  -----+                   |
          |        |               +--> multiplier -+--> mux1 --bus4----+
          |        |               +--> squarer ----+    ^ bus3
          |        +--------------------------------------+ (both RAMs written)
          +-----------------------------------------------------------------+
```

* **RAM1 / RAM2** (`ecc_ram`). Two 13-word blocks that are always written
  together from bus4 and read independently onto bus1 and bus2. Together they
  act as one memory with one write port and two read ports. Reads are
  asynchronous. A block whose output enable is low puts zero on its bus.
* **IOregister** (`ecc_ioreg`). Field elements enter and leave through this
  n-bit shift register, one bit per clock, via the data register. During a
  group operation it holds the field polynomial, which bus3 carries to the
  multiplier and squarer. `IOreg_set2one` loads the constant 1, and mux1 can
  write bus3 back to the RAMs. That gives the micro-program its only constant
  and its only register-to-register move.
* **Operators**. The adder is a plain XOR. The multiplier and squarer are
  described below. Each has a start input and a ready output.
* **Zero detectors**. `zero1` flags bus1 = 0. `zero2or3` flags bus2 = 0 while
  RAM2 drives bus2, and bus3 = 0 otherwise. The micro-program uses them to
  branch to the special cases.
* **Register stages**. The hardware controller's outputs (15 address-control
  lines, 7 logic-control lines and a byte request) each pass through one
  register on the way to the data-path. The 4 status lines and the interrupt
  lines are registered on the way back.

The design is written at the word level. The original data-path was laid out
as a row of six kinds of bit slice: least significant bit, second least
significant bit, and even or odd bits in the lower or upper half. That is a
layout concern: every bit column of this netlist is one such slice.

## Field arithmetic

Elements are in a standard (polynomial) basis. The field polynomial
f = xⁿ + f_{n-1}xⁿ⁻¹ + … + f_0 can be changed at run time. It is stored as its
low n coefficients, and the xⁿ term is implicit.

**Multiplier** (`gf2m_mul_serial`, n cycles). Interleaved multiply and reduce,
taking the bits of b most significant first:

    c ← c·x mod f  ⊕  b_i·a        for i = n-1 … 0

`c·x mod f` is a one-place shift whose carry-out, ANDed with the
field-polynomial coefficients, is fed back into every position. The AND array
is what makes the polynomial programmable. The start edge already does the
first step, so the product is ready n clock edges after the start.

**Squarer** (`gf2m_sqr_serial`, ⌊n/2⌋ cycles). It uses Horner's rule in x²,
with a² = Σ a_i x²ⁱ:

    c ← c·x² mod f  ⊕  a_i          for i = L-1 … 0,   L = ⌊n/2⌋

For the upper ⌈n/2⌉ bits of a, the product never reaches degree n. So those
bits are preloaded in one step into the even positions: a_L goes to c_0,
a_{L+1} to c_2, and so on. Only the lower L bits then take one cycle each. The
x² step is two chained shift-and-reduce steps, one for the even row of
coefficients and one for the odd row. As in the multiplier, the start edge does
the preload and the first step.

Both operators hold their result until the next start. `ready` is low from the
start cycle until the result is valid. The field polynomial must stay in the
IOregister for the whole operation.

## Group operations: the micro-program

The accumulator Q = (X, Y, Z) is projective, with x = X/Z² and y = Y/Z³. The
base point P = (x₁, y₁) stays affine (Z = 1). The micro-program is a ROM in
`ecc_pkg::uprog`. It uses the 13 RAM locations like this:

| loc | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9–12 |
|---|---|---|---|---|---|---|---|---|---|---|
| contents | f (low n coeffs) | a | c = b^(2^(n-2)) | k | Px | Py | QX | QY | QZ | scratch T0–T3 |

Location 3 holds k for the firmware; the hardware never reads it. The
doubling formula needs c, the fourth root of b, rather than b itself. The
firmware computes c once per curve.

**Doubling** Q ← 2Q takes 5 multiplications, 5 squarings and 4 additions:

    Z2 = X1·Z1²          X2 = (X1 + c·Z1²)⁴
    U  = Z2 + X1² + Y1·Z1   Y2 = X1⁴·Z2 + U·X2

**Addition** Q ← Q + P (Z1 = 1) takes 11 multiplications, 4 squarings and
7 additions:

    W = X0 + x1·Z0²      R = Y0 + y1·Z0³      Z2 = Z0·W
    V = R·x1 + Z2·y1     T = R + Z2
    X2 = a·Z2² + T·R + W³    Y2 = T·X2 + V·Z2²

**Subtraction** is addition of −P = (x₁, x₁ + y₁). Its first micro-op writes
x₁ + y₁ to T3. The address controller then sends every read of "y of the added
point" to T3 instead of Py, so addition and subtraction share one program. The
term a·Z2² is always computed. That is correct also for a = 0, at the cost of
one multiplication and one squaring.

**Special cases**. Zero tests read two locations and look at the registered
zero flags:

| test | condition | result |
|---|---|---|
| start of doubling | X1 = 0 or Z1 = 0 | Q ← O = (1, 1, 0) |
| start of add / sub | Z0 = 0 (Q is O) | Q ← (x₁, ±y₁, 1), copied through the IOregister |
| after W and R | W = 0, R = 0 (Q = ±P, same point) | continue with the doubling program |
| after W and R | W = 0, R ≠ 0 (Q = −(±P)) | Q ← O |

O is written with the set-to-one constant (X = Y = 1) and Z + Z = 0.

## Host interface

The micro-controller side has an 8-bit input bus `avr_din`, an 8-bit output
bus `avr_dout`, three one-cycle strobes and two interrupt lines:

* `instr_wr` writes `avr_din` to the instruction register. The upper nibble is
  the opcode and the lower nibble a location. The instruction stays there until
  it finishes, and then the FSM clears it.
* `irq[0]` is set when an instruction finishes. The next `instr_wr` clears it.
* `irq[1]` is set while the data register waits for the micro-controller:
  either a byte must be written (`data_wr`) or the byte on `avr_dout` must be
  read (`data_rd`). Either strobe clears it.

| opcode | instruction | action |
|---|---|---|
| `1` | LOAD loc | take ⌈n/8⌉ bytes, most significant first, and write them to RAM location loc |
| `2` | READ loc | deliver location loc as ⌈n/8⌉ bytes, most significant first |
| `3` | DOUBLE | Q ← 2Q |
| `4` | ADD | Q ← Q + P |
| `5` | SUB | Q ← Q − P |
| other | — | finishes at once |

A byte moves between the data register and the IOregister bit-serially: 8
clocks per byte. In a LOAD, surplus top bits of the first byte are dropped. In
a READ, the first byte carries the top n − 8(⌈n/8⌉−1) bits, padded with zeros.

A point multiplication, as the firmware does it:

1. LOAD f, a, c, k, Px, Py into locations 0–5.
2. LOAD QX = Px, QY = Py, QZ = 1.
3. Let h = 3k. For each bit i from just below the top bit of h down to bit 1:
   DOUBLE; then ADD if h_i = 1 and k_i = 0, or SUB if h_i = 0 and k_i = 1.
4. READ QX, QY, QZ. The affine result is x = X/Z², y = Y/Z³. That conversion
   needs an inversion, which is left to software.

## Timing

There is one clock and a synchronous, active-high reset `global_reset`. The
RAM contents are not reset. The FSM's control outputs are combinational and
take effect one cycle later, after the register stage. The status it reacts to
is also one cycle old. So every operator start and every zero test is followed
by one idle cycle before its status is read.

Measured from the instruction write to `irq[0]`, for even n:

| operation | cycles |
|---|---|
| DOUBLE | 5n + 5·n/2 + 41 |
| ADD / SUB | 11n + 4·n/2 + 63 (SUB: the same plus one cycle) |
| LOAD / READ | about 8·⌈n/8⌉ plus the micro-controller's response time per byte |

The original design estimated about 12n² hardware cycles per point
multiplication. Measured here, with random k:

| n | cycles for k·P (hardware part only) | 12n² |
|---|---|---|
| 8 | 1,476 | 768 |
| 16 | 3,931 | 3,072 |
| 72 | 63,810 – 67,806 | 62,208 |
| 192 | 459,442 | 442,368 |

The fixed overhead of about 41 and 63 cycles per operation dominates at small
n. It falls to a few percent at n ≥ 72. The original work published no RTL
timing, so these are this implementation's numbers.

## Parameters

`N` (field size n) is the only parameter. It is set when the design is built,
and it is the same in every module. The default is 72, the largest size that
fit the original FPGA. The memory depth (13 words) and the 8-bit host interface
are fixed. The field polynomial, the curve and the point are data, loaded at
run time. Any n ≥ 4 should work; whole point multiplications were simulated at n = 8, 16, 72 and 192, and the operators also at n = 4 and n = 7.

## What is not here

* The firmware: the point-multiplication loop over the digits of k, the serial
  link to a PC, and the affine conversion. The testbenches contain a model of
  the firmware (`tb/ecc_avr_model.svh`) that shows the protocol.
* The explicit six-kind bit-slice partition of the data-path. The logic is the
  same; only the module boundaries differ.
* A single bidirectional data bus. It is split into `avr_din` and `avr_dout`.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_fpga_top.sv \
    --top-module tb_ecc_fpga_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ecc_fpga_top` | the whole design at n = 72. Load and read-back of all 13 locations; double, add and subtract against an affine reference; every special case; two full k·P; the cycle counts above. It also counts each mechanism (each branch, operator waits, byte waits) and fails if one never happened. |
| `tb_ecc_workloads` | complete k·P at n = 8, 16 and 192, with exact cycle checks for double and add |
| `tb_ecc_datapath` | the data-path at n = 8 under direct control: random add/mul/sqr between locations, zero flags, serial in/out, set-to-one |
| `tb_ecc_hw_ctrl`, `tb_ecc_fsm_das` | the controller against a cycle-accurate model of its surroundings (`tb/ecc_ctrl_env.svh`): operation and write counts per instruction and branch, address aliasing for subtract, load/read addressing |
| `tb_gf2m_mul_serial`, `tb_gf2m_sqr_serial`, `tb_gf2m_adder` | the operators against reference arithmetic, exhaustively for GF(2⁴), GF(2⁷) and GF(2⁸), randomly at n = 72, and exact latencies |
| `tb_ecc_ram`, `tb_ecc_ioreg`, `tb_ecc_data_reg`, `tb_ecc_instr_reg`, `tb_ecc_addr_ctrl` | the small blocks |

The reference model (`tb/ecc_ref_pkg.sv`) uses schoolbook field arithmetic,
Fermat inversion and affine curve formulas. It shares no code with the RTL.
The test curves are made by picking a and a point at random and solving the
curve equation for b. So no curve tables are needed, and any irreducible field
polynomial works. The ones used are x⁴+x+1, x⁷+x+1, x⁸+x⁴+x³+x+1,
x¹⁶+x⁶+x²+x+1, x⁷²+x⁶⁰+x³+x+1 and x¹⁹²+x⁷+x²+x+1.

## Files

* `rtl/ecc_pkg.sv`: shared types, memory map, opcodes, the micro-program ROM
* `rtl/ecc_fpga_top.sv`: top level
* `rtl/ecc_hw_ctrl.sv`, `rtl/ecc_fsm_das.sv`, `rtl/ecc_addr_ctrl.sv`: the hardware controller
* `rtl/ecc_instr_reg.sv`, `rtl/ecc_data_reg.sv`: the micro-controller interface
* `rtl/ecc_datapath.sv`, `rtl/ecc_ram.sv`, `rtl/ecc_ioreg.sv`: the data-path and its storage
* `rtl/gf2m_adder.sv`, `rtl/gf2m_mul_serial.sv`, `rtl/gf2m_sqr_serial.sv`: the field operators
