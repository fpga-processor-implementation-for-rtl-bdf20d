# Forward Kinematic Processor for a robotic thumb

This is a small special-purpose processor. It computes the forward
kinematics of one finger of a dextrous robot hand: the thumb, a chain of four
revolute joints. The host loads four joint angles and gets back the 4x4
homogeneous transform of the fingertip. That is twelve numbers: the normal,
sliding and approach unit vectors N, S and A, and the position P.

General-purpose CPUs spend most of this work on trigonometry and multiplies.
This processor does it with one cosine/sine lookup unit, one bit-serial
adder/subtractor and one shift-and-add multiplier, all sharing a register
file. A fixed 29-instruction program in a microstore sequences them. The
closed-form equations reuse many subterms, and the program computes each one
once. Everything is aimed at low gate count, since the original target was an
XC4000-class FPGA.

## The equations

With joint angles θ1..θ4, link lengths a0..a3 and offset d1, and writing
c1 = cos θ1, s1 = sin θ1, c23 = cos(θ2+θ3), c234 = cos(θ2+θ3+θ4) and so on:

```
N = ( c1·c234,   s1·c234,   s234 )
S = (-c1·s234,  -s1·s234,   c234 )
A = ( s1,       -c1,        0    )
P = ( a0 + c1·(a1 + a2·c2 + a3·c23),
            s1·(a1 + a2·c2 + a3·c23),
      d1 + a2·s2 + a3·s23 )
```

Only three trigonometric arguments are needed besides θ1 and θ2: θ2+θ3 and
θ2+θ3+θ4. The bracket in Px and Py is computed once.

## Number format

Every word is 16-bit two's complement with 8 fractional bits (8.8). The
resolution is 1/256 and the range is −128 to +127.996. Angles are in
**radians**. The cosine/sine unit uses only the sign bit and the low 11 bits of
an angle, which is 3 integer and 8 fractional bits. So any angle, or sum of
angles, must stay within ±8 rad. For the thumb, the largest argument is
θ2+θ3+θ4 ≤ 240° = 4.19 rad, and every output lies between about −2.4 and +5.7
in link-length units.

The hardware has no overflow detection. The multiplier truncates: it keeps
product bits 23..8 and drops the rest. The largest error is therefore one LSB
per product, plus the ±½ LSB of the table values.

## Register map

A 32 × 16 register file with one write port (C) and two read ports (A and B).
Both read ports are registered, so data appears one clock after the address.

| register | contents |
|---|---|
| r0, r1 | constants 0.0 and 1.0; writes are ignored |
| r2..r6 | a0, a1, a2, a3, d1: load once after reset |
| r7..r10 | θ1, θ2, θ3, θ4: load before each run |
| r11..r19 | temporaries of the program |
| r20..r22 | Nx, Ny, Nz |
| r23..r25 | Sx, Sy, Sz |
| r26..r28 | Ax, Ay, Az |
| r29..r31 | Px, Py, Pz |

Reset clears r2..r31.

The `NWORDS` parameter of `reg_file` (default 32) can shrink the file. At
`NWORDS = 16` it becomes the half-size file that was the first piece of this
design put into an FPGA, on its own. Addresses from 16 up then read 0.0 and
ignore writes. `tb/reg_file_half_tb.sv` runs that size through the same
pattern as its hardware test, at a 97 ns clock:

1. Reset.
2. Read all words, counting up on port A and down on port B.
3. Write a different single bit into each word.
4. Read them all back the same way.

## Host interface (`fkp`)

The host sees a control port (`strobe`, `ready`, `data_get_valid`,
`data_get_ack`), a 7-bit command `cmd = {op[1:0], addr[4:0]}`, 16-bit
`data_in` and `data_out`, and the ROM port described below.

| op | command | action |
|---|---|---|
| 00 | set | write `data_in` into register `addr` |
| 01 | get | put register `addr` on `data_out` |
| 10 | run | execute the program |
| 11 | — | ignored |

How a command works:

1. Wait until `ready` is high.
2. Drive `cmd` (and `data_in` for a set) and raise `strobe`. Keep them stable while `strobe` is high.
3. The processor drops `ready` and carries out the command.
4. For a get, it raises `data_get_valid` once `data_out` holds the word, and waits.
5. The host raises `data_get_ack`; the processor then drops `data_get_valid`.
6. When the work is done and `strobe` is low again, `ready` returns high.

A full evaluation is 4 sets, one run and 12 gets. The 5 link constants are
loaded once after reset.

Command timing in clocks, from the edge that samples `strobe`:

- A set writes its register after 3 clocks.
- A get raises `data_get_valid` after 2 clocks.
- A run takes 6114 clocks with 3 ROM wait states. Each extra wait state adds 8 clocks, one per cosine/sine instruction. At 25 MHz, one run takes about 245 µs.

## Inside: datapath (`fkp_core`)

The register file's A and B read buses feed all three arithmetic units. Their
results, plus the input latch, go to a clocked 4:1 mux, which drives the C
write bus back into the register file. The output latch takes its word from
the B bus.

- The **mux** (`mux4`) is clocked. It selects 00 cosine/sine, 01 adder,
  10 multiplier or 11 input latch, and feeds the C write bus.
- **`data_latch`** is a 16-bit register with load enable. It is used for the
  input and output latches.

### Cosine/sine unit (`cos_sin_unit`)

The unit looks up cos or sin in an external 8K × 16 ROM. It has no internal
table. The address is `{sel, a[15], a[10:0]}`, where `sel` = 0 for cosine and 1
for sine. Each half of the ROM holds round(256·f(x)) for x = the 12-bit
two's-complement field `{a[15], a[10:0]}` / 256.

A small state machine does the lookup:

1. Drive the address.
2. Wait `wait_states` clocks (0..7) for a slow ROM.
3. Latch the data.
4. Pulse `ready` for one clock.

From the edge that samples `go`, `ready` follows `wait_states + 2` clocks
later.

The wait-state count is a top-level input, `rom_wait`. Choose it so that
(`rom_wait` + 1) clock periods cover the ROM access time. Example: a 150 ns
ROM at 40 ns needs 3. The testbench model has a 4-clock access time, so
`rom_wait` below 3 returns garbage. The end-to-end test checks this.

### Bit-serial adder/subtractor (`add_sub_unit`)

The unit captures A, and B XOR `sel`, into shift registers. It computes one
sum bit per clock through a single full adder, with the carry held in a
flip-flop. For subtraction (`sel` = 1) the carry starts at 1, which gives
A − B = A + ~B + 1.

`done` rises WIDTH + 2 clocks after `go` is seen, and stays high until the
controller drops `go`. The width is a parameter: 16 in the datapath, 32 inside
the multiplier.

### Multiplier (`mult_unit`) — the part that needs care

The multiplier is a shift-and-add design that reuses a 32-bit copy of the
serial adder as its accumulator. For each bit i of B, it forms the partial
product A·2^i, with A sign-extended to 32 bits, or zero when B[i] = 0. It
passes that partial product through the serial adder into the accumulator.

The sign bit B[15] carries weight −2^15 in two's complement, so partial product
15 is **subtracted**. This makes the unit a correct signed 16 × 16 multiplier.
The original scheme zero-filled the partial products and added all of them,
which gives wrong results for negative operands. Negative operands are common
here: cosines of angles past 90°, negative sines, and negative link offsets.

The result is accumulator bits 23..8, which is the 8.8 product truncated. Each
partial product costs 36 clocks:

- 2 clocks to set it up
- 34 clocks for the 32-bit serial add

A multiply therefore takes 16·36 + 2 = 578 clocks from `go` to `done`. It
dominates the run time: the 10 multiplies take about 5800 of the 6114 clocks.

## Inside: control (`fkp_control`, `fkp_microstore`)

`fkp_microstore` is a combinational table of 29 instructions
`{op, rd, rs1, rs2}`. The ops are ADD, SUB, MULT, COS and SIN. For COS and
SIN, only rs1 is used.

`fkp_control` runs the host protocol. For a run, it steps through the table.
Each instruction goes through three phases:

- **SETUP** (1 clock): drive the A, B and C register addresses and the unit
  and mux selects. This gives the registered read ports their clock.
- **GO**: hold the unit's `go` until it reports `done` (or `ready` for
  cosine/sine).
- **LATCH** (1 clock): drop `go` and write the mux output to register rd.

At most one `go` is active at a time; an assertion checks this, and another
checks the data_get_valid/ack handshake.

The program, with its steps numbered from 1:

| steps | work |
|---|---|
| 1–4 | s1, c1, s2, c2 |
| 5–10 | θ2+θ3, s23, c23; θ2+θ3+θ4, s234 → Nz, c234 → Sz |
| 11–16 | Nx, Ny = c1·c234, s1·c234; Sx, Sy = −c1·s234, −s1·s234 (multiply, then 0 − x) |
| 17–18 | Ay = 0 − c1; Az = 0 + 0 (Ax = s1 is written directly in step 1) |
| 19–23 | a2·c2, a3·c23, their sum, + a1 → r17 |
| 24–25 | Px = c1·r17 + a0 |
| 26 | Py = s1·r17 |
| 27–29 | Pz = a3·s23 + a2·s2 + d1 |

## Where this RTL departs from the original design

- **Signed multiplication**, as described above. The original procedure also
  summed only 14 of the 16 partial products. Here all 16 are summed, as the
  original prose describes.
- **Program corrections.** The original instruction sequence disagrees with
  itself in a few places. This design resolves them as follows:
  - Step 3 takes sin θ2, not sin θ1.
  - Step 21 adds r18 (the a3·c23 term).
  - Steps 18, 21, 22, 24 and 28 are additions.
  - Px uses cos θ1.

  The resulting outputs match the closed-form equations above.
- **Edge-triggered latches.** The data latches are registers with enable, not
  level-sensitive latches. This suits FPGA timing. A set costs one extra
  clock as a result.
- **Full register file.** The complete 32-word register file is the default.
  The 16-word hardware trial size is only a parameter setting.
- **Synchronous resets.** All resets are synchronous and active high.
- **ROM wait states.** The count is a port, not an internal constant.
- **Command 11.** It is defined here as "ignored".
- **Not included.** The cosine/sine ROM is an external part. Only a
  behavioural model of it is included, in `tb/cos_sin_rom_model.sv`.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fkp_pkg.sv` | word and address types, opcodes, instruction struct, command encoding, register map |
| `fkp.sv` | top: control plus datapath |
| `fkp_core.sv` | datapath |
| `fkp_control.sv` | host protocol and instruction sequencer |
| `fkp_microstore.sv` | the program |
| `cos_sin_unit.sv` | cosine/sine lookup |
| `add_sub_unit.sv` | bit-serial adder/subtractor |
| `mult_unit.sv` | multiplier |
| `reg_file.sv` | register file |
| `mux4.sv` | result mux |
| `data_latch.sv` | input and output latches |

`tb/`: each block has its own self-checking testbench, `<block>_tb.sv`. In
addition:

| file | contents |
|---|---|
| `fkp_tb_pkg.sv` | fixed-point helpers, the ROM contents formula, and a bit-exact 8.8 reference of the program |
| `cos_sin_rom_model.sv` | the external ROM, with an access-time model |
| `reg_file_half_tb.sv` | the register file at 16 words |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each has a
watchdog. For example, the end-to-end test with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module fkp_tb rtl/fkp_pkg.sv tb/fkp_tb_pkg.sv tb/fkp_tb.sv
./obj_dir/Vfkp_tb
```

For another block, swap `fkp_tb` for its testbench; `-y` finds the rest. For
lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/fkp_pkg.sv rtl/fkp.sv`.

`fkp_tb` runs the top with its default parameters at a 40 ns clock. It sets
example link constants (a0 = −0.75, a1 = 0.375, a2 = 1.7, a3 = 1.3, d1 = 3.125)
and then runs:

- the 16 corners of the thumb's joint ranges (θ1 −45..135°, θ2 −15..60°,
  θ3 6.5..90°, θ4 0..90°);
- 8 random configurations;
- one run with 7 wait states;
- one run with 1 wait state, which must not match;
- a reset in the middle of a run, after which every register must read 0.0
  and a reloaded configuration must compute correctly.

It compares every output bit-exactly against the 8.8 reference model, and
within 0.04 against the real-valued equations. It checks the cycle count of
each run. It also counts each mechanism it exercised (sets, gets, runs,
delayed acks, subtractions, negative multiplies, writes to hard-wired
registers, the ignored command, wait-state settings, the mid-run reset).
It fails if any count is zero. It finishes in well under a second.

Results:

| testbench | checks |
|---|---|
| fkp | 1289 |
| fkp_core | 58 |
| fkp_control | 488 |
| fkp_microstore | 713 |
| cos_sin_unit | 512 |
| add_sub_unit | 334 |
| mult_unit | 156 |
| reg_file | 194 |
| reg_file at 16 words (`reg_file_half_tb`) | 112 |
| data_latch | 401 |
| mux4 | 400 |

All pass with 0 failures. The microstore test runs the program in real
arithmetic and checks it against the closed form. The control test replaces
the units with behavioural responders that have random latencies.

## Changing it

- **Word format.** The 8.8 format runs through the package, the mux, the
  multiplier's result slice (bits 23..8) and the ROM address. Widening the
  fraction means changing all four.
- **New program.** A different kinematic chain needs a new table in
  `fkp_microstore.sv` and new `PROG_LEN`/register-map constants in
  `fkp_pkg.sv`. The controller needs no change.
- **Faster multiplier.** `mult_unit` is the obvious place to trade area for
  speed. Its `go`/`done` handshake keeps the controller independent of its
  latency.
