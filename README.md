# Unified-field crypto processor

A small processor whose ALU carries cryptographic arithmetic in two kinds
of finite field as well as the usual general-purpose arithmetic. The prime
field GF(P) gets modular add, subtract and multiply, and a high-radix
Montgomery product (AB + CD)·R⁻¹. The binary extension field GF(2^m) gets
a look-up-table multiply. Having both fields in one unit is what "unified
field" means here. You write operands into a 16 × 53-bit data memory, pick
an operation with a 5-bit opcode, and read the result on `data_out`.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It has no
vendor primitives and no memory macros.

## Block structure and data flow

```
 opcode(5) ──► program_counter ──► instr_mem ──20──► instr_decoder ──8──► alu ──53──► temp_regs
                                                       │ 4-bit addresses     ▲  ┌ general_alu          │
 in_data(53), in_addr, in_we ──────────────────► data_mem ──53 (×2 ports)────┘  └ secure_unit          │
                                                       ▲  │ ──► data_out(53)      ├ mod_addsub ─ mod_reduce ×2
                                                       └──┼──────────────53─────◄─┤ mod_mul ─── mod_reduce
                                                          │                       ├ hr_montgomery
                                                          │                       └ gf2m_mul
```

| File | Role |
|---|---|
| `crypto_pkg.sv` | widths, the instruction format `instr_t`, operation codes `alu_op_e`, operation classes |
| `crypto_processor.sv` | top level: wiring and the instruction sequencer (a state machine) |
| `program_counter.sv` | 5-bit register that holds the opcode of the running instruction |
| `instr_mem.sv` | 20-entry ROM of 20-bit instruction words |
| `instr_decoder.sv` | splits a word into the operation and its addresses, and classifies the operation |
| `data_mem.sv` | 16 × 53-bit register file: two read ports and one write port |
| `alu.sv` | general-purpose unit plus secure unit, with a start/done handshake |
| `general_alu.sv` | `+ - * / & \| ^ >> <<`, rotates, LOAD pass-through (combinational) |
| `secure_unit.sv` | sends prime-field and binary-field operations to their engines |
| `mod_addsub.sv` | A ± B mod P |
| `mod_mul.sv` | A · B mod P |
| `mod_reduce.sv` | bit-serial remainder x mod p, used by the two blocks above |
| `hr_montgomery.sv` | digit-serial Montgomery product (AB + CD)·2⁻⁴⁸ |
| `gf2m_mul.sv` | GF(2⁴) multiply by a table built at elaboration |
| `temp_regs.sv` | holds the ALU result on its way to the data memory |

Each file's opening comment gives its interface and timing. It also says
which parts follow the original description and which are this
implementation's own choices.

## Instructions and where their operands live

An opcode does not carry addresses. It selects one of 20 fixed instruction
words in `instr_mem`. Each word is `{op[7:0], dst[3:0], src2[3:0], src1[3:0]}`,
so every opcode works on fixed memory words:

| opcode | operation | reads | writes |
|---|---|---|---|
| 0–10 | ADD, SUB, MUL (low 53 bits), DIV (all ones if B = 0), AND, OR, XOR, SHR, SHL, ROR, ROL | A = w0, B = w1 | w8 |
| 11 | LOAD: temporary register ← w0 | w0 | – (data_out = w0) |
| 12 | STORE: w10 ← temporary register | – | w10 |
| 13, 14 | no-operation | – | – |
| 15 | A + B mod P | A = w0, B = w1, P = w4 | w9 |
| 16 | A − B mod P | same | w9 |
| 17 | A · B mod P | same | w9 |
| 18 | Montgomery (AB + CD)·R⁻¹ | A..D = w0..w3, P1 = w4, P2 = w5 | w9 |
| 19 | GF(2⁴) A · B on the low 4 bits | A = w0, B = w1 | w9 |

Shifts move by the whole value of B, so any B of 53 or more gives 0. Rotates
move by B mod 53. Opcodes 0, 18 and 19 keep their original numbers. The rest
of the numbering and the memory layout are this implementation's own. To use
other addresses, edit the `entry()` function in `instr_mem.sv`.

Secure instructions read their operands in pairs from consecutive words:
A,B at `src1`, `src1+1`; C,D at `src1+2`, `src1+3`; P1,P2 at `src2`, `src2+1`.

## Top-level interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous, active-high reset (clears every register and memory word) |
| `in_we`, `in_addr`, `in_data` | in | 1, 4, 53 | write one data-memory word; honoured only while idle |
| `start`, `opcode` | in | 1, 5 | start the instruction `opcode`; ignored while busy |
| `busy` | out | 1 | an instruction is running |
| `done` | out | 1 | one-cycle pulse; `data_out` is valid from then on |
| `data_out` | out | 53 | the word the last instruction wrote (for LOAD, the loaded word) |

The sequencer runs IDLE → FETCH0 → [FETCH1 → [FETCH2]] → EXEC → WAIT →
WRITE → FINISH. It reads two operands per fetch cycle. The ALU result goes
first to the temporary register and then to the data memory. The table gives
latency as the number of clock edges from the edge that samples `start` to
the edge that raises `done`:

| instruction | edges |
|---|---|
| general purpose | 5 |
| LOAD / STORE / no-op | 4 / 3 / 2 |
| GF(2⁴) multiply | 6 |
| Montgomery | 17 |
| modular add or subtract | 62 |
| modular multiply | 114 |

## The high-radix Montgomery product

This is the least obvious part. `hr_montgomery` uses radix 2⁸ and handles one
8-bit digit of A and of C per clock. Seven digits cover the 53-bit operands.
It starts with S₀ = 0 and runs seven iterations, count = 0..6:

```
Q[count]   = S[count] mod 2^8
S[count+1] = (S[count] >> 8) + Q[count]·P2 + A[count]·B + C[count]·D
```

Then one last cycle computes `S[8] = S[7] + Q[6]·P1`, and `S[8]` is the
result.

To see why this computes (AB + CD)·R⁻¹, take P1 as the (odd) modulus and
**P2 = 2⁻⁸ mod P1**. Write S = (S >> 8)·2⁸ + Q. Then
(S >> 8) + Q·P2 ≡ S·2⁻⁸ (mod P1). Each iteration therefore multiplies the
running sum by 2⁻⁸ before it adds the next digit products. After seven
digits:

  S[7] ≡ 2⁻⁴⁸ · Σ (A_i·B + C_i·D)·2^(8i) = (AB + CD)·2⁻⁴⁸ (mod P1)

So R = 2⁴⁸. The final step adds a multiple of P1, which does not change the
residue. Points to know when using it:

* The result is congruent to (AB + CD)·2⁻⁴⁸ but **not fully reduced**.
* Inside the unit the accumulator is 64 bits wide, enough for any operands.
  The processor keeps the low 53 bits. That is exact when B, D, P1 and P2 are
  all below 2⁴³ (in practice: P1 < 2⁴³ and operands reduced mod P1).
* The caller must supply P2. One way: start from 1 and halve it 8 times
  modulo P1 (add P1 before halving an odd value). The testbenches do this.
* Calling P1 and P2 "prime" in the original description is read here as: P1
  is the modulus and P2 the digit constant.

## Modular add, subtract and multiply

`mod_addsub` reduces A and B at the same time in two bit-serial reducers
(C1 = A mod P, C2 = B mod P, 53 cycles). It then adds or subtracts them. A
final correction brings the result into [0, P): subtract P from a sum that
reaches P, add P to a negative difference. Operands may exceed P. `mod_mul`
forms the full 106-bit product with one multiplier and reduces it bit by bit
(106 cycles). P must be non-zero: `mod_reduce` asserts this.

## GF(2^m) multiply

`gf2m_mul` returns `LUT[A][B]`. A constant function builds the 256-entry
table during elaboration: shift-and-add carry-less multiplication, reduced
by x⁴ + x + 1 after each shift. The table is not stored as data. `M` and
`POLY` are parameters, so a larger field works by overriding them. The table
grows as 2^(2M)·M bits.

## How this departs from the original description

* **Field size and polynomial.** The original gives neither m nor the
  polynomial. GF(2⁴) with x⁴ + x + 1 is a choice. It agrees with the
  published example, 1 · 8 = 8.
* **Final correction in modular add/subtract.** The add/subtract flow ends
  at C1 ± C2, which can be ≥ P or negative. This design adds one correction
  step so the result matches the instruction table's "A ± B mod P".
* **Montgomery result.** This design reads P2 as 2⁻⁸ mod P1, starts S at 0,
  and cuts the result to 53 bits (see above). The original gives one
  Montgomery result (721344) without its operands, so that value cannot be
  checked.
* **Digit width R = 8.** The original does not give it. 8 is the smallest
  digit width for which the seven iterations of the flow cover 53 bits.
* **Control interface.** `start`, `busy`, `done` and the user write port
  (`in_we`, `in_addr`) are additions. They let operands be placed and
  multi-cycle instructions sequenced. The program counter holds the opcode
  and does not step through a stored program.
* **Opcode map, memory layout, instruction field order, divide-by-zero,
  shift and rotate amounts, reset behaviour.** None of these is given; the
  choices are listed above.
* **Not built.** The original mentions modular exponentiation, modular
  inversion and deeper pipelining only as future work. They are not built.
  Nothing here reproduces the FPGA area and timing figures, which came from
  a Virtex-5 synthesis.

## Verification

Every module in `rtl/` except `crypto_pkg` and `mod_reduce` has a
self-checking testbench, `tb/tb_<module>.sv`. `mod_reduce` is tested through
`tb_mod_addsub` and `tb_mod_mul`. Each testbench compares the module with
results computed independently in the testbench: wide-integer `%`
arithmetic, a separate GF(2⁴) reference, a step-by-step evaluation of the
Montgomery recurrence, and the congruence y·2⁴⁸ ≡ AB + CD (mod P1). Each also
checks the latency of every operation it runs. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_crypto_processor` runs the whole processor at its default sizes. It runs
the two published examples (opcode 0: 1 + 1000 = 1001; opcode 19: 1 · 8 = 8)
and every opcode on random operands over 12 rounds. It also issues a start
and a user write while busy and checks that both are ignored. It counts how
often each mechanism happened and fails if one never did.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/crypto_pkg.sv tb/tb_crypto_processor.sv --top-module tb_crypto_processor
./obj_dir/Vtb_crypto_processor
```

Verilator simulates with two states. Every register is reset, and every
memory word is cleared, so results do not depend on initial values.

For any other block, change the testbench name. Each simulation finishes in
well under a second.
