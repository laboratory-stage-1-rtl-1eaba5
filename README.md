# TSK80 Stage-1 bus system: 8K RAM and an LED latch on an ORed data bus

This is the first stage of a microprocessor-based stop watch built inside one
FPGA around the TSK80, a Z80-compatible soft CPU. Stage 1 gives the CPU
somewhere to run: 8 KB of RAM for its code and data, plus a byte-wide latch
that drives the board LEDs for debugging. Later stages put an LCD interface, a
keypad interface and a timer on the same bus. None of them are part of this
RTL.

The main idea is how several devices share the CPU data bus without
tri-state lines. Inside an FPGA every device has separate data-in and data-out
lines. The CPU write data goes to every device's input. Each device holds its
output at zero unless it is selected *and* being read. The CPU read data is
then simply the bitwise OR of all device outputs. This does the same job as a
multiplexer steered by the address decoder, and costs the same logic. Adding
a device, though, only widens the OR; the select logic stays as it is.

## Block structure

```
                     cpu_addr, cpu_mreq
                           |
                    address_decoder
                     cs_ram    cs_latch
                       |          |
cpu_dout ---+--> ram_interface    |            (di)
            |      ram_8x8k       |
            |      WE = WR & CS   |
            |      DO = RD & CS ? q : 0
            |          | ram_do   |
            +------------------> led_latch --> leds
                       |          | latch_do
                       v          v
                       data_bus_or ----------> cpu_din
```

| File | What it is |
|------|------------|
| `rtl/tsk80_bus_pkg.sv` | Bus widths (16-bit address, 8-bit data), `addr_t`/`data_t`, memory-map constants |
| `rtl/address_decoder.sv` | Chip selects for the RAM and the latch, qualified by the memory request |
| `rtl/ram_8x8k.sv` | 8K x 8 RAM: clocked write, combinational read |
| `rtl/ram_interface.sv` | RAM plus glue: write-enable AND gate, read-select AND gate, zeroing 2:1 mux |
| `rtl/led_latch.sv` | 8-bit LED register, writable and readable by the CPU |
| `rtl/data_bus_or.sv` | N-input OR of the device read data (N = 2 here) |
| `rtl/tsk80_stage1_top.sv` | Top level; the CPU bus signals are its ports |

The CPU, its reset circuit and the JTAG download/debug connector are outside
this RTL. The CPU's bus arrives on the `cpu_*` ports of the top, and the
reset arrives on `rst`.

## Memory map

Everything is in the memory space. The I/O space is not used, and an I/O cycle
(`cpu_mreq` low) selects nothing.

| Range | Device | Notes |
|-------|--------|-------|
| `0x0000`-`0x1FFF` | RAM, 8 KB | selected when `addr[15:13] == 0` |
| `0x0000`-`0x13FF` | (code section) | placed here by the C tool chain |
| `0x1400`-`0x1FFF` | (data section, stack, heap) | 3 KB; 1 KB stack + 1 KB heap fit |
| `0xFF00` | LED latch | fully decoded, single address |
| everything else | nothing | reads return 0, writes are ignored |

The RAM at address 0 and its 8K x 8 size are fixed requirements. The code and
data sections together (0x1400 + 0x0C00 bytes) fill the RAM exactly. The
latch address is free to choose. `0xFF00` leaves 0x2000-0xFEFF and the rest
of the 0xFFxx page for the peripherals of later stages. To move the latch,
change `LATCH_ADDR` in the package or the `LATCH_ADDR_P` parameter of the
top.

## Bus timing and the clocked RAM

This part is the least obvious. A discrete static RAM stores its data on the
rising (trailing) edge of an active-low write strobe. Inside the FPGA that
does not work. The CPU changes the write strobe, the address and the data all
in response to the same clock edge, so the strobe's trailing edge comes no
earlier than the change of address and data, and there is no hold time.

So the write strobe is used only as an *enable*, and the RAM stores on the
system clock:

```
clk      __/‾‾‾‾\____/‾‾‾‾\____
addr/di  ==X=== A, D ====X=====
wr & cs  __/‾‾‾‾‾‾‾‾‾‾‾‾‾\_____
                      ^ word stored here (next rising edge)
```

- **Write:** address, data, `cpu_wr` and the decoded select are set up after
  one rising edge. The word (or latch value) is stored at the next rising
  edge. It is visible on the read path and on `leds` right after that edge.
- **Read:** there is no read strobe on the RAM itself. Its output always
  shows the word at the current address. `cpu_rd & cs` only opens the
  zeroing multiplexer, so read data reaches `cpu_din` combinationally in the
  same cycle.
- All strobes (`cpu_mreq`, `cpu_rd`, `cpu_wr`) are **active high**, as the
  RAM glue ANDs RD, WR and CS directly. If your CPU core has active-low
  strobes, invert them at the top.
- The design makes no assumption about how many clocks a TSK80 bus cycle
  lasts. A write held for several cycles simply writes the same word several
  times.

## The LED latch

`led_latch` is an 8-bit register. It loads `cpu_dout` at the clock edge that
ends a cycle with `cs_latch & cpu_wr`. It drives `leds` at all times. While
`cs_latch & cpu_rd` it returns its value on the bus, and at all other times it
returns zero. A synchronous, active-high `rst` clears it, so the LEDs start
dark. That reset is a choice of this implementation. The RAM is not reset;
its contents are whatever was downloaded.

## Checks built into the RTL

- `address_decoder` asserts that the RAM and the latch are never selected
  together.
- The top asserts, at every clock edge, that no bus cycle both reads and
  writes, and that at most one device puts non-zero data on the OR bus. This
  is the rule the OR scheme depends on.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example, to run
the end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/tsk80_bus_pkg.sv tb/tsk80_stage1_top_tb.sv --top-module tsk80_stage1_top_tb
./obj_dir/Vtsk80_stage1_top_tb
```

Replace the testbench name to run another one (`address_decoder_tb`,
`data_bus_or_tb`, `ram_8x8k_tb`, `ram_interface_tb`, `led_latch_tb`). Each
testbench has a watchdog that reports a failure if the run stalls. Variables
that nothing initialises start random under Verilator. The testbenches reset
or set everything they read.

`tsk80_stage1_top_tb` acts as the CPU and runs the memory test that a
bring-up program would. It uses one-clock bus cycles and the top's default
parameters. The test:

- fills the code and data sections (all 8192 bytes) and reads them back;
- writes and reads the LED latch and checks `leds` after each write;
- checks that latch traffic leaves the RAM alone, and RAM traffic leaves the
  latch alone;
- checks that I/O cycles and unmapped addresses select nothing and read as
  zero.

It counts each kind of bus cycle and reports a failure for any kind that never
happened. It runs in well under a second.

## Where this departs from, or goes beyond, the specification

- **Top-level wiring** follows the block descriptions: CPU write data to
  every device, device outputs ORed back to the CPU, one chip select per
  device from the decoder.
- **Decoder details are this implementation's choices:** the 16-bit address,
  the `mreq` qualifier, full decoding of the latch, and its address.
- **Latch reset** to zero is added. So are the bus assertions.
- **RAM primitive.** The RAM is a plain array with a clocked write and an
  asynchronous read. An FPGA tool maps that to distributed (LUT) RAM. Block
  RAM needs a registered read, which would add a cycle of read latency that
  this bus does not allow for.
- **Not built:** the TSK80 CPU, the reset circuit, the JTAG connector, and the
  later-stage timer, LCD and keypad interfaces.
