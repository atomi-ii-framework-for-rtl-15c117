# AtomiBus II in SystemVerilog

AtomiBus II joins small "embedded objects" into one system. An object is a small board carrying one function, such as a motor driver, an AD converter, a USB port or a GPS receiver. Objects plug together like building blocks, and they all share one 12-line bus. Two ideas keep the bus cheap enough for the smallest microcontroller, or for no microcontroller at all:

* **Shared lines.** 9 IO lines carry the address, then anything at all: parallel data, serial data, or analog levels. Three control lines manage the bus: ADDR, SET and ACK. Only ADDR is mandatory for an object.
* **Arbitration without an arbiter.** Each object that can start a transaction has two gates and three analog switches. These turn the ACK line into a daisy chain, so objects nearer the start of the chain win the bus. The scheme scales to any number of objects.

This RTL models the digital behaviour of those parts and of the objects' bus logic. It also includes an example bus that puts five objects together: `atomi_system`.

## The lines

| line | role |
|---|---|
| IO[8:0] | address during addressing (8-bit number on IO[7:0], or one select line per object); afterwards free: data bytes on IO[7:0], or raw pin access to a passive object |
| ADDR | low for the whole transaction; its falling edge marks "address is on IO" |
| SET | strobe of the byte handshake; also pulled low by an object that has just won arbitration |
| ACK | acknowledge of the byte handshake; cut into segments by the arbitration switches |

All lines are open-drain with pull-ups. Any object can pull a line low, and no object drives one high. The bus is **free** when ADDR, SET and ACK are all high, and **reserved** when any of them is low. In the RTL, each object produces a `drive_t` of pull-low requests, and `atomibus` resolves them into a `bus_t` of line levels, plus one ACK level per object (`atomi_pkg.sv`).

## Reserving the bus: the daisy-chain arbiter

This is the least obvious part of the design (`atomi_arbiter.sv`, `atomibus.sv`).

An active object's microcontroller has one extra pin, BUS_REQ. Driving the pin low means "not interested". Releasing it (input mode) lets a gate raise the BUS_REQUEST node, but only while the bus is free. That node is the grant, and the microcontroller can read it on the same pin. The node controls three 2:1 switches:

1. **SET pulled low.** Every other object now sees the bus reserved.
2. **The gate's own SET input is replaced by a constant high.** The object's own SET pull therefore does not knock out its grant, so the grant holds itself.
3. **ACK towards the next object is cut, and the next object's side is grounded.** Every object further down the chain now sees ACK low, so none of them can be granted.

Suppose two objects release BUS_REQ at the same instant on a free bus. Both nodes rise. The upstream object then grounds the downstream object's ACK, and the downstream node falls again. The upstream object keeps the bus: priority is by position in the chain.

A granted object starts its transaction by lowering ADDR. That ends its own grant, because the gate sees ADDR low. SET is released and the ACK chain closes again. ADDR low now holds the bus until the transaction ends. The object should drive BUS_REQ low before it releases ADDR; otherwise it is granted again at once.

How the RTL models this:

* In the real circuit the node and the gate form an asynchronous loop. Here the node is a flip-flop on the object's clock (`grant <= req & ADDR & ACK & (SET | grant)`), which breaks the loop.
* The cost is that two simultaneous requesters can both show a grant for one clock before the downstream one loses. `atomi_bus_master` therefore acts on a grant only after two clocks in a row. Both the unit test and the system test check that a double grant never lasts two clocks.
* `atomibus` models the ACK line as segments. Segment *i* lies on the upstream side of object *i*. Object *i*'s switch joins segment *i* to segment *i+1*, or grounds segment *i+1* while that object holds the grant. Each group of joined segments resolves as one wired-AND net.
* Object 0 is the start of the chain and has the highest priority.

## Addressing

After winning the bus, the master puts an address pattern on IO and lowers ADDR. Objects recognise their address in one of three ways:

* **One-line select** (`atomi_line_select.sv`). One latch does it. Its D input is one IO line, and ADDR drives both its enable and its active-low output enable. The chip select is high for the whole transaction if that line was high when ADDR fell. One pattern can select several such objects at once. The latch is kept level-sensitive, as the real part is: it follows the line while ADDR is high, so the chip select cannot glitch with the value from the previous transaction.
* **8-bit number** (`atomi_byte_select.sv`). The same latch, eight bits wide, on IO[7:0], plus an equality comparator. This allows 256 objects per bus. A master drives IO[8] low during a byte address.
* **In software** (`atomi_var_table_slave.sv`). A microcontroller takes an interrupt on ADDR and reads IO some time later. So the master must keep the address on IO long enough for the slowest object on the bus. The reference figures are:
  * the slowest object runs at 4 MHz and answers in 8 to 12 clocks;
  * the address must therefore be held for 3 µs;
  * for an 8 MHz master, 3 µs is 24 clocks: `ADDR_HOLD = 24`.

  The table object synchronises ADDR, then reads IO `RESP_CYCLES - 4` clocks later. That is 10 to 11 clocks after the edge (2.5 to 2.75 µs at 4 MHz), inside the 3 µs window.

Idle lines are high. A one-line select pattern therefore means driving every other line low, and the command carries the complete 9-bit pattern (`cmd.sel`). The helpers `byte_sel()` and `line_sel()` in `atomi_pkg` build these patterns.

## Moving bytes: SET/ACK handshake and GET/SET

The data transfer is a flow-controlled 8-bit parallel transfer on IO[7:0], with SET as the strobe and ACK as the acknowledge. Each step waits for the other side, so objects with unrelated clocks can exchange data. Each side passes the other side's control line through a two-flop synchroniser (`atomi_sync2.sv`).

One byte moves in four phases:

| phase | write (master to object) | read (object to master) |
|---|---|---|
| 1 | master puts the byte on IO[7:0] and lowers SET | master lowers SET |
| 2 | object takes the byte and lowers ACK | object puts the byte on IO[7:0] and lowers ACK |
| 3 | master releases IO and raises SET | master takes the byte and raises SET |
| 4 | object raises ACK | object releases IO and raises ACK |

On top of this sits the shared-variable model. Every active object publishes a table of variables, and others reach a variable by object number and index, as in `Object[2].Variable[1] = 10`. After addressing, the master sends a **command byte** `{op, idx[6:0]}`, where op = 1 for SET (write) and 0 for GET (read), followed by one **data byte**. The bus has no read/write line, so the direction of the data byte is carried by the command byte. One addressing can hold several command/data pairs.

`atomi_var_table_slave` keeps the table:

* 16 variables of 8 bits;
* a local port for the object's own function; a local write wins over a bus SET to the same variable in the same clock;
* a one-clock `bus_wr` pulse for every bus write;
* reads outside the table return 0, and writes outside it are ignored.

## Active objects: `atomi_bus_master`

The bus master does what the software of an active object does on the bus. It runs one command (`cmd_t`) per transaction:

1. REQ: release BUS_REQ and wait for two clocks of grant.
2. SETUP: put the address pattern on IO for one clock.
3. HOLD: lower ADDR and keep the pattern for `ADDR_HOLD` clocks. BUS_REQ is driven low again here.
4. Then one of:
   * `OP_SET`: command byte, then data byte;
   * `OP_GET`: command byte, then read one byte;
   * `OP_PIO`: drive `cmd.wdata` on the IO lines (1 = released) for `cmd.pio_len` clocks, then sample all nine lines. This is how a passive object is used: its pins are simply connected to the bus lines while it is selected.
5. Release ADDR and return `rsp_t` with a one-clock `rsp_valid`.

If ACK does not change within `ACK_TIMEOUT` clocks (default 1024), the transaction ends with `rsp.err` set. This happens, for example, when no object answers to the address.

## Passive objects: `atomi_passive_object`

A passive object never starts a transaction. Its board carries only address recognition (the one-line latch or the 8-bit decoder) and a quad analog switch of the 4066 type. The switch joins four IO lines, IO[7:4] by default (`CH_BASE`), to the pins of a module while the chip select is high. A closed switch is modelled as joining two open-drain nets:

* a module pin pulling low pulls the bus line low;
* the module pin sees the bus line's level.

With the switch open, the module pins read high.

## The example system: `atomi_system`

Five objects sit on one bus, in chain order:

| # | object | clock | address |
|---|---|---|---|
| 0 | active object (arbiter + bus master) | `clk_a` (8 MHz) | - |
| 1 | active object (arbiter + bus master) | `clk_a` | - |
| 2 | variable-table object, software-style recognition | `clk_p` (4 MHz) | `SLAVE_ADDR` = 0x21 |
| 3 | passive object, one-line | - | IO[`PASSIVE_LINE`] = IO[2] |
| 4 | passive object, 8-bit | - | `PASSIVE_BYTE_ADDR` = 0x42 |

The command ports stand in for the software of the two active objects. `bus_o`, `ack_o` and `grant_o` bring out the line levels for observation.

Lint reports a combinational loop through the bus lines. It runs through the passive objects: the address latch reads IO, and the switch pulls IO. This loop exists in the real circuit too, and it is never active, because the latch is transparent only while ADDR is high and the switch conducts only while ADDR is low.

## How far to trust it

Each block has a self-checking testbench. The numbers below are from one run of each.

| testbench | what it shows |
|---|---|
| `tb_atomi_arbiter` | grant rules; SET/ADDR/ACK each block a grant; self-hold; upstream wins a simultaneous request; 3000 random clocks against a reference model |
| `tb_atomi_line_select`, `tb_atomi_byte_select` | select follows the value at the ADDR edge and ignores later IO traffic |
| `tb_atomibus` | wired-AND lines; ACK segment groups checked against an independent walk of the chain |
| `tb_atomi_bus_master` | GET/SET/PIO against a behavioural responder on an unrelated clock; address held 24 clocks; stray one-clock grant ignored; timeout |
| `tb_atomi_var_table_slave` | GET/SET, bursts, local port; answers when the address is held 3 µs, and does not answer at 2 µs |
| `tb_atomi_passive_object` | selection by line and by number; two one-line objects selected at once; switch connects only when selected |
| `tb_atomi_system` | the whole bus at default parameters, 8 MHz and 4 MHz clocks: 85 SETs, 32 GETs, 28 passive accesses, 8 simultaneous requests (upstream always first), a timeout, a local write; every mechanism is counted and must occur |
| `tb_atomi_poll_workload` | mixed traffic at default parameters: one active object polls the one-line IO object every 20 µs (keys in, LEDs out) while the other reads an 8-byte name from the table object without pause; all 120 polls end inside their slot (worst about 17 µs, most of them after waiting for a read to end), key samples, LED pins and every name read are checked |
| `tb_atomi_chain_workload` | a six-object chain (`N_ACTIVE = 6`): random subsets of the active objects, all six in two rounds, ask for the bus in the same clock; every SET lands and they finish in chain order |

Every testbench was also run against a copy of its module with one deliberate bug, and each one failed that run.

The bus logic follows the framework closely: line set, free/reserved rule, switch arrangement, latch addressing, 8-bit addressing and the hold time. The following choices are this design's own, because the framework names these things without defining them:

* **Handshake cycle.** The framework calls the transfer the Motorola 68K 8-bit parallel protocol but does not draw its cycle. The four-phase order above is an assumption.
* **Command-byte format** (`{op, idx}`) and the PIO command.
* **Timeout**, table size and local-port priority.
* **Registered arbitration node** and the two-clock grant confirmation.
* **Which lines are switched** by a passive object (IO[7:4]), and which 8 IO lines carry the 8-bit address (IO[7:0]).
* **One reading of the arbitration schematic.** Its right-hand switch, read with the usual select polarity, would hold SET low whenever the object is idle. It is read instead as pulling SET low while the grant is held, which is the only reading consistent with the free-bus rule.

Known differences from the framework:

* **Select lines.** The framework counts 11 possible one-line select lines (the IO lines plus SET and ACK). Here only the 9 IO lines can be select lines, because SET and ACK carry the handshake.
* **Analog signalling is not modelled.** The real lines can carry analog levels, such as a key matrix read through the bus.
* **The mixed-traffic test uses two keys and two LEDs.** The framework's test setup had four key inputs and four LED outputs on its IO object. Here the IO object sits behind a four-channel switch, so `tb_atomi_poll_workload` splits those four lines into two keys and two LEDs. A pressed key is modelled as a line pulled low.
* **Serial protocols are not built.** The framework allows SPI or UART over the IO lines; these live in the objects' microcontrollers and are not part of this RTL. They can be driven through `OP_PIO` one level at a time.
* **No class objects.** An object that bridges two buses does so in software; this RTL has one bus.

## Simulating and changing it

Any testbench runs with plain Verilator 5, for example the system test:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb \
    rtl/atomi_pkg.sv tb/tb_atomi_system.sv --top-module tb_atomi_system
./obj_dir/Vtb_atomi_system
```

`-Wno-fatal` keeps the warning about the bus loop described above from stopping the build. Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog. The system test simulates about 1 ms of bus time in well under a second.

Parameters worth changing:

| parameter | where | what it changes |
|---|---|---|
| `ADDR_HOLD` | `atomi_bus_master`, `atomi_system` | address hold time |
| `RESP_CYCLES` | `atomi_var_table_slave`, `atomi_system` | response time of the software-style recognition |
| `N_VARS` | `atomi_var_table_slave` | table size |
| `NOBJ` | `atomibus` | number of objects on the bus |
| `N_ACTIVE` | `atomi_system` | number of active objects |
| `BYTE_MODE`, `SEL_LINE`, `MY_ADDR`, `CH_BASE` | `atomi_passive_object` | how a passive object is addressed and which lines it switches |

Rules for changing the timing:

* Keep `ADDR_HOLD` × (master clock period) no shorter than the time the slowest software-addressed object needs to read its address.
* Put objects in `atomi_system` in priority order.
