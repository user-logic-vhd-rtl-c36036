# DFT peripheral bus slave

A hardware DFT (discrete Fourier transform) engine that hangs off an embedded
processor's bus does not get its own memory port here. It talks to the
processor through three 32-bit software registers. The core *asks* for each
input element. The processor *answers* by writing it into a register. The core
then *offers* each result element, which the processor reads back. This RTL is
the bus slave that makes that conversation possible. It holds the three
registers, decides who may write the command register at any moment, and
gives the DFT core the strobes it needs to know when the processor has
written or read something.

The DFT engine itself is not part of this RTL. Its signals are brought out as
ports of the top module, `user_logic`.

## Register map

| Offset | Chip enable | Register | Host access | Written by the core |
|-------:|------------:|----------|-------------|---------------------|
| 0x0 | bit 0 | command | read; write only while the host owns it | whenever it posts get, put or done |
| 0x4 | bit 1 | index | read only (writes are acknowledged, then ignored) | on get and put |
| 0x8 | bit 2 | value | read / write | on put (a host write in the same cycle wins) |

The command word carries four flags. Their positions are counted from the MSB,
as the processor bus numbers its bits. On the 32-bit bus they are the four
least significant bits:

| Bit (LSB = 0) | Flag | Set by | Meaning |
|---:|------|------|---------|
| 0 | go | host, then core | transform running; while 1, the core owns the command register |
| 1 | get | core | the core wants input element `index`; write it to the value register |
| 2 | put | core | result element `index` is in the value register; read it |
| 3 | done | core | the transform is finished |

The other command bits are stored and read back unchanged. The core may use
them as it likes.

## Who owns the command register

This is the part that needs the most care.

A direction flag decides who may write the command register. The flag is
simply the register's own go bit, delayed by one clock:

* **Host owns it** (flag = 0). A bus write to offset 0x0 loads the register.
* **Core owns it** (flag = 1). Host writes are acknowledged but dropped. The
  register changes only when the core's command output has get, put or done
  set. Then the whole core word is copied in.

In both modes a core posting is taken whenever the host is not writing the
register in the same cycle. When both happen in the same cycle, the host
wins. That can only happen while the host owns the register.

A normal session goes like this:

```
host   : write CMD = go                      (cycle t)
slave  : CMD = go at t+1; direction -> core at t+2
core   : pulse go|get, index i  (one clock)  -> CMD, INDEX updated
host   : poll CMD, see get; read INDEX; write VALUE = x[i]
core   : sees write strobe for VALUE, takes value_reg one clock later
         ... repeat for every input ...
core   : pulse go|put, index k, value y[k]    -> CMD, INDEX, VALUE updated
host   : poll CMD, see put; read INDEX; read VALUE
core   : sees read strobe for VALUE, moves on
         ... repeat for every result ...
core   : pulse done with go = 0               -> CMD = done
slave  : direction -> host one clock later
```

Points that follow from this logic:

* The hand-over takes one clock. A host write to the command register in the
  clock right after the go write still lands. The first write that is refused
  is the one in the second clock.
* The core's flags only need to be high for one clock. The registers hold the
  posted word until the next posting, so the host can poll at its own pace.
  For the same reason, the value register must not be gated by get. The host
  answers long after the get pulse is gone.
* Two get postings in a row leave the same word in the command register. The
  host tells them apart by the index register. If the core needs another way,
  it can put a sequence count in the free command bits.
* The command register goes back to the host whenever a posted word has go = 0.
  That normally happens with the final done. A done with go still 1 leaves
  the core in charge.

## Bus side

The slave uses the chip-enable side of a processor-bus interface, like the one
a peripheral generator produces. Each register has one read and one write
chip enable. A transfer is one clock with one enable bit set. The slave
behaves as follows:

* It acknowledges in the same clock (`IP2Bus_WrAck`, `IP2Bus_RdAck` are the OR
  of the enable bits 0..2).
* It drives `IP2Bus_Data` only during an acknowledged read, and zero
  otherwise.
* It never raises `IP2Bus_Error`.
* It returns zero when the read enable is not exactly one-hot.
* It writes nothing when the write enable is not exactly one-hot.
* It ignores enable bits above 2 when `C_NUM_REG` > 3, and does not
  acknowledge them.
* It accepts byte enables (`Bus2IP_BE`) but does not use them. Every write
  stores the whole word.

Reset (`Bus2IP_Reset`) is synchronous and active high. It clears all three
registers and the direction flag. A concurrent assertion checks the bus rule
that at most one chip enable is active at a time.

## DFT core side

The core's ports, as seen from `user_logic`:

| Port | Dir | To / from the core |
|------|-----|--------------------|
| `Dft_DataWritten[2:0]` | out | write chip enables (bit k = register k) |
| `Dft_DataRead[2:0]` | out | read chip enables |
| `Dft_CommandBit` | out | go bit of the command register |
| `Dft_ValueReg` | out | value register contents |
| `Dft_Command` | in | command word (get/put/done flags as above) |
| `Dft_Index` | in | index to latch on get/put |
| `Dft_Value` | in | result to latch on put |

The core is expected to run on `Bus2IP_Clk` and `Bus2IP_Reset`. The
transform itself is unspecified here. That covers its size, number format,
arithmetic and the order in which it asks and offers. Any core that follows
the posting rules above will work.

## Files

| File | Contents |
|------|----------|
| `rtl/user_logic_pkg.sv` | register count, chip-enable patterns, flag positions, `cmd_flags_t` |
| `rtl/slave_reg_bank.sv` | the three registers and the direction flag |
| `rtl/slave_read_mux.sv` | read multiplexer |
| `rtl/user_logic.sv` | top: bus acknowledges, read-data gating, core ports |
| `tb/tb_slave_reg_bank.sv` | directed cases plus 5000 random cycles against a reference model |
| `tb/tb_slave_read_mux.sv` | all select patterns with random data |
| `tb/dft_core_model.sv` | simulation-only DFT core: 4-point integer DFT using the get/put/done protocol |
| `tb/tb_user_logic.sv` | end-to-end test at default parameters |

Parameters of `user_logic` are `C_SLV_DWIDTH` (default 32) and `C_NUM_REG`
(default 3). The data width must be a multiple of 8 and at least 32. Above
32 bits, the flags keep their MSB-relative positions (31..28 from the MSB).

## Simulating

Every testbench checks its own results. Each one ends with a line
`TB_RESULT checks=N failures=M`, and a watchdog stops a run that hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_user_logic \
  rtl/user_logic_pkg.sv rtl/slave_reg_bank.sv rtl/slave_read_mux.sv \
  rtl/user_logic.sv tb/dft_core_model.sv tb/tb_user_logic.sv
./obj_dir/Vtb_user_logic
```

The same pattern works for `tb_slave_reg_bank` and `tb_slave_read_mux`. Both
of those need only the package and their own module.

`tb_user_logic` runs three complete 4-point transforms with random inputs
through the core model. It compares the results against a floating-point DFT
computed in the testbench. It also checks that the host cannot overwrite the
command register during a run. It then drives the core side directly to reach
these corner cases:

* the one-clock hand-over
* a refused command write
* host-over-put priority on the value register
* the read-only index register
* a transfer with no chip enable
* done with and without go
* ignored byte enables

It counts how often each mechanism happened, and fails if any never did.

## How far to trust it, and where it departs from the original

* The register behaviour, flag positions, priorities and acknowledge logic
  follow the original peripheral exactly. All testbenches pass.
* Bit numbering is LSB-first (`[31:0]`), not MSB-first. Register values are
  numerically the same. Chip-enable vectors use bit k for register k, so an
  MSB-first pattern "100" (register 0) is `3'b001` here.
* The DFT core is brought out as ports rather than instantiated, because its
  design is not available. The core model in `tb/` is only a stand-in. Its
  transform size and posting order are this testbench's choice.
* The bus-rule assertion and the parameter-range checks were added in this
  design.
* The write and read chip enables reach the `Dft_DataWritten`/`Dft_DataRead`
  outputs without passing through logic, and `IP2Bus_Error` is constant 0.
  Synthesis reports these as idle outputs. This is intended.
