# Self-checking register file with Berger code

A processor register file that detects its own errors while it runs. It does
not need a separate test mode. Every register holds a **Berger code word**:
a 32-bit data word plus a 6-bit check symbol, which is the number of zeros in
the word. Each operand read onto bus A or bus B is re-encoded and compared
with its stored check symbol. The comparison runs in parallel with the ALU,
so checking adds no delay to the operand path. A result computed from a
faulty operand is blocked before anything can use it.

The main idea is the storage arrangement. The data words and the check
symbols sit in **two physically separate register files**:

* the data register file (DRF), 32 × 32 bits;
* the check symbol register file (CSRF), 32 × 6 bits.

Each file has its own three address decoders and its own controller. With a
single 32 × 38 file, a faulty decoder would select the wrong register and
return a perfectly consistent code word. With two files, the same fault
returns one register's data with another register's check symbol, which the
checkers can see. Both files' decoders would have to fail in the same way at
the same time to hide it.

## Berger code as used here

For I information bits a Berger code adds k = ⌈log2(I+1)⌉ check bits. For
I = 32 that is k = 6. This design's check symbol is the **binary count of
zeros** in the data word:

| data word    | zeros | check symbol |
|--------------|-------|--------------|
| `0000_0000`  | 32    | `100000`     |
| `FFFF_FFFF`  | 0     | `000000`     |
| `8000_0001`  | 30    | `011110`     |

A **unidirectional error** flips any number of bits, all in the same
direction, anywhere in the 38-bit code word. The code detects every such
error:

* 1→0 flips add zeros to the data, so the recomputed count goes up.
* 1→0 flips in the check symbol make the stored count go down.

The two can never meet again. The same argument holds for 0→1 flips.
Errors that flip bits both ways can cancel out: for example, one bit 0→1 and
another 1→0 in the data word. Such errors are not guaranteed to be caught.

Berger codes can also be formed as the bit-by-bit complement of the count of
ones. The two forms agree only for "maximal length" words (I = 2^k − 1, such
as 7 bits with 3 check bits). For 32-bit words they differ. Here the zero
count is used everywhere: in the stored symbols, in the checkers, and in the
value a cleared register takes (see below).

## Storage: cells, registers, files

**Bit cell** (`rf_bit_cell`). This is one stored bit with three ports:

* ports A and B only read;
* port C reads or writes.

Each cell gets five control lines: RDA, RDB, RDC (read onto bus A, B or C),
WRC (write from bus C) and CLR (clear). A read port outputs the stored bit
ANDed with its read line. Each bus is the OR of all cells on it, the logical
form of a wired bus with one active driver. Writes and clears happen at the
rising clock edge, and CLR has priority over WRC.

**Register** (`rf_register`). A data register is eight 4-bit groups of bit
cells. Each control line from a decoder reaches the groups through an
inverter tree:

```
decoder line ─┬─▷o─┬─▷o─ group 0 (bits 3:0)
              │    ├─▷o─ group 1
              │    ├─▷o─ group 2
              │    └─▷o─ group 3
              └─▷o─┬─▷o─ group 4
                   ├─▷o─ group 5
                   ├─▷o─ group 6
                   └─▷o─ group 7 (bits 31:28)
```

Each group therefore sees two inversions and gets the line in its true
polarity. In silicon the tree makes sure the most and least significant bits
get equally strong drive. Logically it is the identity; it is kept so each
group has its own copy of the line, as in the physical register. A 6-bit
check-symbol register is one group driven through two inverters in series
(`GROUPS = 1`).

**Register file** (`register_file`, wrapped as `drf` and `csrf`). Each file
has:

* NREGS registers;
* three `address_decoder`s:
  * bus A decoder: select RSA with RDA;
  * bus B decoder: select RSB with RDB;
  * bus C decoder: select RSC with RDC, WRC and CLR.

The decoders gate each operation line to the selected register. Reads are
combinational. Both read buses may select the same register. Only one
register is written per cycle. Reading and writing one register in the same
cycle is illegal (see the controller).

**Clearing.** CLR clears a data register to zero. It cannot clear the check
symbol to zero too: the zero word has 32 zeros, so its check symbol is
`100000`, and a zeroed check symbol would make every cleared register read
back as an error. The CSRF therefore clears to `100000`. A register cleared
in both files then holds a valid code word.

## Controllers

`rf_controller` turns a command into the five operation lines and forwards
the three register selects. There are two instances:

* the **information block controller** drives the DRF;
* the **checker block controller** drives the CSRF.

Normally both get the same command. If one of them misbehaves, the two files
do different things: one reads the wrong register, or only one writes. The
next read of the affected register then fails its check.

Commands (`berger_pkg::rf_op_e`):

| op              | lines           | meaning                                       |
|-----------------|-----------------|-----------------------------------------------|
| `OP_NOP`        | –               | nothing                                       |
| `OP_READ_A`     | RDA             | register RSA onto bus A                       |
| `OP_READ_B`     | RDB             | register RSB onto bus B                       |
| `OP_READ_AB`    | RDA, RDB        | two operands at once                          |
| `OP_READ_C`     | RDC             | register RSC onto bus C (read-out, unchecked) |
| `OP_WRITE`      | WRC             | bus C into register RSC                       |
| `OP_CLEAR`      | CLR             | clear register RSC                            |
| `OP_READ_AB_WR` | RDA, RDB, WRC   | read two operands and write a third register  |

If `OP_READ_AB_WR` names the written register as one of the read registers,
the controller drops the write and raises `conflict`. The register file also
carries an assertion for this rule.

## Checkers in parallel with the ALU

Each read bus has a `bus_checker`. It is a zero counter (`berger_check_gen`)
that recomputes the check symbol of the word on the data bus, plus a
two-rail checker that compares the result with the symbol arriving on the
matching check-symbol bus. The checkers do not sit between the register
file and the ALU. The operands go straight into the ALU input latches, and
the checkers work on the same bus values at the same time. Only the ALU
result is held back:

```
cycle n    : READ_AB command; DRF drives buses A/B, CSRF drives check buses A/B;
             checkers A/B evaluate (combinational)
edge n→n+1 : ALU input latches capture the operands;
             checker results captured beside them
cycle n+1  : ALU computes from the latches (outside this design);
             GO/STOP looks at the captured checker results:
               both used operands valid → result_go=1, result_out = alu_result
               otherwise                → result_stop=1, result_out = 0,
                                          err_a / err_b tell the control unit which bus
```

A faulty result cannot escape, because GO/STOP blocks it. The ALU is
combinational, so a bad operand leaves nothing behind for the next
operation. The operand path carries only the register-file read delay. The
checker delay runs alongside the ALU delay.

A bus that carried no operand in that cycle (for example, bus B during
`OP_READ_A`) gives GO/STOP a fixed valid pair, so it cannot stop the result.
Bus C read-outs are not checked: the design has one checker per operand bus
and no more.

### Two-rail checker

A two-rail signal is a pair of wires that should always be complementary
(01 or 10); 00 and 11 mean an error. `two_rail_checker` takes N input pairs
and merges them with the standard cell:

```
z0 = a0·b0 + a1·b1        z1 = a0·b1 + a1·b0
```

The output pair is complementary exactly when every input pair is. The
checker compares the generated symbol with the complement of the stored
symbol, one pair per check bit. Built this way, a fault inside the checker
itself shows up as a non-complementary output for some valid input, instead
of hiding. `go_stop` merges the two bus checkers' pairs with one more such
cell, so the path to the GO decision stays two-rail.

## Top level: `sc_regfile_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the operand/checker latches only |
| `info_cmd`, `chk_cmd` | in | `rf_cmd_t` | commands for the two controllers (tie together in normal use) |
| `wr_data`, `wr_chk` | in | 32, 6 | code word on bus C to be written |
| `rd_c_data`, `rd_c_chk` | out | 32, 6 | code word read out on bus C |
| `alu_opa`, `alu_opb` | out | 32 | ALU input latches |
| `op_valid` | out | 1 | the latches were loaded in the previous cycle |
| `alu_result` | in | 32 | result of the external ALU |
| `result_out` | out | 32 | result passed by GO/STOP (0 when stopped) |
| `result_go`, `result_stop` | out | 1 | GO/STOP verdict for the operands in the latches |
| `err_a`, `err_b` | out | 1 | operand on bus A / B failed its check |
| `ctrl_conflict` | out | 1 | a command asked to read and write one register |

Parameters: `NREGS = 32`, `DATA_W = 32`, `CHK_W = $clog2(DATA_W+1) = 6`.

The code word to write is supplied whole, data and check symbol, by whatever
drives bus C. In a self-checking processor this is a unit that already
produces Berger-coded results. A plain producer can compute the check symbol
with a `berger_check_gen` instance.

The register cells have no reset. After power-up, issue `OP_CLEAR` (or a
write) to every register before reading it. Otherwise the checkers will
rightly flag the random contents.

## Choices made in this RTL

The source design gives the architecture, the sizes, the cell and register
structure, the control lines, and the placement of the checkers. The
following points are this implementation's own choices:

* Synchronous behaviour. Writes and clears happen at the clock edge, and
  reads are combinational. Operands and checker results are captured at the
  same edge.
* The CSRF clears to the check symbol of the zero word, not to zero.
* The zero count is used as the check symbol throughout.
* Buses are AND-OR logic instead of tri-state wires, and bus C is split
  into a write input and a read output.
* RDC, read via port C, is implemented. The decoder drawings of the source
  show only WRC and CLR on the bus C decoder, but its description of the
  register lines includes RDC.
* The command encoding, the combined read-and-write command, and dropping a
  conflicting write.
* Inside GO/STOP: a two-rail merge, a fixed valid pair for an idle bus, and
  zeroing a blocked result.
* The two-rail checker is a linear cascade of cells; a tree would have less
  delay and the same function.
* The zero counter is a behavioural sum that synthesis builds into an adder
  tree.

The following parts are not included:

* **The ALU and the control unit.** They belong to the surrounding
  processor. The ALU inputs and result are ports.
* **Checking of the ALU result itself.** The source requires it but does not
  describe how.
* **The checker-before-ALU placement.** Here the checkers sit between the
  register file and the ALU latches, and an operand is latched only if it is
  clean. This is the slower alternative that the parallel placement
  replaces.
* **Electrical behaviour.** Drive strength of the inverter tree and other
  circuit-level properties are not modelled.

## How far to trust it

* **Detection limits.** Single, multiple and burst unidirectional errors in
  a stored code word are always detected. An addressing or controller fault
  is detected only if the two registers involved hold words with different
  zero counts. If the register read by mistake happens to have the same
  count, the error passes. This is inherent to the scheme, not to this RTL.
* **Self-checking property.** The self-checking property of the checkers is
  argued from their structure and exercised only functionally. No
  stuck-at fault simulation at gate level was done.
* **Testbenches.** Every module has a self-checking testbench. Each has also
  been run against a deliberately broken copy of its module and caught the
  break.

## Simulation

Every testbench is in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. To run
one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/berger_pkg.sv \
          tb/tb_sc_regfile_top.sv --top-module tb_sc_regfile_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_sc_regfile_top` | Full-size end to end, about 4,600 cycles. The testbench plays the control unit and an adding ALU, and keeps a model of both files. It injects unidirectional code-word errors, wrong check-file addressing, one-sided writes, and illegal read/write commands. It checks every latch, verdict and result, and counts each mechanism: it fails if one of them never occurred. |
| `tb_drf`, `tb_csrf`, `tb_register_file` | Random reads on all three buses, writes, clears and read+write against a reference array; the `tb_register_file` run uses a small 8×8 file |
| `tb_rf_register`, `tb_rf_bit_cell` | Per-group control distribution, clear value, read gating |
| `tb_address_decoder` | Exhaustive over select and operation lines |
| `tb_berger_check_gen` | Corner words, random words, and the 7-bit word `1100101` → `011` |
| `tb_two_rail_checker` | Exhaustive over all 4^6 input pairs |
| `tb_bus_checker` | Valid words, plus random unidirectional errors in data and/or check bits |
| `tb_go_stop` | Exhaustive over both pairs and both bus-in-use flags |
| `tb_rf_controller` | Every command, including the read/write conflict |

To change the size, set `NREGS` and `DATA_W` on `sc_regfile_top`; `CHK_W`
follows from `DATA_W`. `NREGS` may be at most 32, because the register
selects in `berger_pkg` are 5 bits. Raise `RF_NREGS` in the package for
more registers.

## Files

| file | contents |
|------|----------|
| `rtl/berger_pkg.sv` | sizes, command and control types |
| `rtl/rf_bit_cell.sv` | three-port one-bit cell |
| `rtl/rf_register.sv` | register of grouped cells with the control inverter tree |
| `rtl/address_decoder.sv` | per-bus decoder gating the operation lines |
| `rtl/register_file.sv` | generic three-bus file |
| `rtl/drf.sv`, `rtl/csrf.sv` | data file (32 × 32) and check symbol file (32 × 6) |
| `rtl/rf_controller.sv` | command decoder / control signal generator |
| `rtl/berger_check_gen.sv` | zero counter |
| `rtl/two_rail_checker.sv` | two-rail checker |
| `rtl/bus_checker.sv` | checker A / B |
| `rtl/go_stop.sv` | GO/STOP result gate |
| `rtl/sc_regfile_top.sv` | everything wired together |
