# A message-passing fabric for an FPGA array of soft processors

This RTL is the fabric of a many-core system on an FPGA. Small soft processors sit on a grid, and a
controller processor oversees them. The processors do not share memory. Each one has its own
local data memory, and they cooperate only by passing 32-bit words. Two networks carry those
words:

- a **neighbourhood network** that links every processing element (PE) to the eight PEs around it;
- a **global router** that connects any PE, the controller and an I/O peripheral. It works in one
  of four *communication modes* at a time, and the controller chooses the mode.

Software reaches both networks through loads and stores at one small address window, the
**network interface**. No special instructions are needed, so any processor with a plain memory
bus can be used. The grid size (`ROWS` x `COLS`) is a parameter, fixed before synthesis.

The processors themselves are not included. They are vendor soft cores, and each one is
represented by its data-master bus port. Everything between those ports is here: the
peripherals of each processor, the two networks and the top-level wiring.

## Contents

```
rtl/mc_pkg.sv             shared types: bus structs, router requests, modes, directions
rtl/multicore_top.sv      the whole array: ROWS*COLS PE tiles, controller tile, both networks
rtl/pe_tile.sv            one processor's peripherals; includes the system-ID register
rtl/pe_bus.sv             address decoder of a processor's data bus
rtl/local_mem.sv          local data memory
rtl/pe_timer.sv           interval timer (periodic tick, interrupt)
rtl/net_if.sv             network interface: maps loads/stores to network operations
rtl/global_router.sv      mode-controlled router between PEs, controller and I/O
rtl/neighbour_network.sv  eight-neighbour links with one-word buffers
tb/avmm_bfm.sv            behavioural bus master standing in for a processor
tb/tb_*.sv                one self-checking testbench per module
```

## The processor bus

Every slave uses an Avalon-MM-style handshake (structs `avmm_req_t` / `avmm_rsp_t`). The master
raises `read` or `write` and holds `address` and `writedata` steady while `waitrequest` is high.
The transfer completes at the first rising edge where `waitrequest` is low. For a read,
`readdata` is valid in that same cycle. Addresses are 16-bit **word** addresses.

| word address    | slave                                                    | timing |
|-----------------|----------------------------------------------------------|--------|
| `0x0000-0x3FFF` | local memory (`MEM_DEPTH` words, default 4096)           | write 1 cycle, read 2 cycles |
| `0x4000-0x4FFF` | timer: +0 status, +1 control, +2 period, +3 count        | 1 cycle |
| `0x5000-0x5FFF` | system ID: +0 identity, +1 is 1 on the controller        | 1 cycle |
| `0x8000-0x8FFF` | network interface (12-bit offset, below)                 | waits on the network |
| elsewhere       | reads 0, writes ignored                                  | 1 cycle |

## Network interface: the programming model

The network interface decodes a 12-bit offset inside its window. Bit 11 selects the network. The
low 11 bits are the *field*.

| offset        | write (SEND)                                   | read (RECEIVE)                                   |
|---------------|------------------------------------------------|--------------------------------------------------|
| `0x000+dir`   | send a word to the neighbour in `dir`          | take the word sent by the neighbour in `dir`     |
| `0x800+id`    | send a word to identity `id` via the router    | `id` = own identity: take the next word from the mailbox |
| `0x800+addr`  | write I/O peripheral register `addr`           | read I/O peripheral register `addr`              |
| `0x800` (controller only) | MODE: select the router mode (data 0..3) | -                                       |

Directions: 0 N, 1 E, 2 W, 3 S, 4 NE, 5 NW, 6 SE, 7 SW. Row 0 is the northern edge.

Identities: the controller is 0. PE `i` (row-major, `i = row*COLS + col`) has identity `i+1`. A
PE can read its own identity from the system-ID register.

**Every network access blocks.** The processor stays stalled by `waitrequest` until the access
can complete:

- a SEND waits while the receiving buffer or mailbox is full;
- a RECEIVE waits while it is empty;
- a global transfer that the current mode does not allow waits until the controller switches
  to a mode that allows it.

Software therefore synchronises through the networks themselves. The flip side is that
software can deadlock the array. Every buffer holds a single word. If every PE first sends a
second word into a mailbox that is already full, and only then reads, no PE ever reads, and
all of them wait forever. The end-to-end testbench shows an ordering that is safe.

## Global router and its modes

The router grants one transfer per cycle. Among the requests that can complete, a round-robin
pointer picks the next one after the last source served. The sources are the controller, the PEs
and the I/O peripheral's input `io_in`. The mode decides which transfers are legal:

| mode (code)   | allowed transfers                                                                   |
|---------------|-------------------------------------------------------------------------------------|
| `PE_PE` (0)   | PE -> PE mailbox                                                                    |
| `PE_CTRL` (1) | PE -> controller mailbox (field 0), controller -> PE mailbox                        |
| `PE_IO` (2)   | PE write/read of a peripheral register; peripheral (`io_in`) -> PE mailbox          |
| `CTRL_IO` (3) | controller write/read of a peripheral register (field != 0); peripheral -> controller mailbox |

The controller's write to field 0 is always accepted and sets the mode. The mode after reset is
`PE_PE`. A transfer the mode does not allow waits; it is not rejected. A send to an identity
above the number of PEs has no receiver: it is acknowledged and discarded.

A mailbox transfer completes in the cycle it is granted, provided the destination mailbox is
empty. The word goes out on a broadcast bus (`dlv`), and only the interface whose identity
matches `dlv.dest` stores it. An I/O transfer drives `io_req` and keeps its grant until the
peripheral drops `waitrequest`. The router returns read data to the requesting interface with
the acknowledge. The processor-facing path is combinational: router arbitration feeds
`waitrequest`. The only state is the mode, the round-robin pointer, the I/O lock and the
one-word mailboxes in the interfaces.

Because the controller uses field 0 for MODE, it cannot address peripheral register 0.

## Neighbourhood network

Each PE has eight one-word receive buffers, one per direction. A SEND from PE `p` towards
direction `d` fills the buffer that `p`'s neighbour keeps for the opposite direction: a word
sent north arrives "from the south". Each buffer has exactly one writer and one reader, so all
PEs can exchange words at the same time without arbitration.

The grid does not wrap around. A SEND towards a missing neighbour completes at once and the
word is dropped. A RECEIVE from a missing neighbour completes at once and returns 0. The
controller has no neighbours, so its neighbourhood accesses behave in the same way.

## Timer and system ID

Every processor, the controller included, has a timer and a system-ID register. The timer
counts down from its period register and runs from reset. By default a tick comes every 50000
cycles, which is 1 ms at 50 MHz. On each tick, `tick` pulses and the status bit TO is set.
`irq` is TO and-ed with the control bit ITO. Writing the status register clears TO. Control bit
2 starts the timer and bit 3 stops it. Writing the period register restarts the count.

## What follows the source description and what is chosen here

These parts follow the description:

- a grid of soft processors and a controller, with the size fixed before synthesis;
- each processor has a timer, a system ID, a local data memory and a network interface on its
  bus;
- 32-bit data and a 12-bit interface address, where bit 11 selects the global router (1) or the
  neighbourhood network (0);
- MODE at 0x800, written by the controller;
- the four communication modes;
- the three kinds of address field: PE identity, 0 for the controller, or peripheral address;
- the eight direction numbers;
- an interface that accepts incoming words by its identity number.

These are this design's own choices, because the description leaves them open:

- the mode codes and the reset mode;
- PE identities start at 1, so that 0 can mean the controller;
- blocking accesses, one-word buffers and round-robin arbitration;
- waiting, not rejecting, transfers the mode does not allow, and dropping sends to missing
  identities or neighbours;
- the grid orientation and edge behaviour;
- the bus handshake, the memory map, the memory size and latency, and the timer register map
  and period;
- the default 3 x 3 grid, the smallest grid with a PE that has all eight neighbours;
- an active-low asynchronous reset.

The description gives no interconnect protocol inside the router and no I/O peripheral. Here
the peripheral is reached through a plain bus port.

Not included are the soft processors, their debug/JTAG link and any accelerators. These are
vendor components or undescribed parts.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mc_pkg.sv tb/tb_multicore_top.sv --top-module tb_multicore_top
./obj_dir/Vtb_multicore_top
```

Replace `tb_multicore_top` with any other `tb_<module>`. `tb_multicore_top` runs the full array
at its default parameters. It runs one program per processor through behavioural bus masters,
covering:

- system ID and memory;
- a neighbourhood exchange in all directions, including waits on full and empty buffers and
  drops at the edges;
- ring and gather traffic through the global router, including mailbox back-pressure,
  concurrent requests and dropped sends;
- sends that wait for the controller's mode switch;
- controller <-> PE traffic;
- PE and controller access to a modelled I/O peripheral with wait states;
- two timer ticks.

It counts how often each of these happened, and counts a failure for any that never did. It
takes about 100k cycles, well under a second.

## How far to trust it

All modules lint cleanly under Verilator's `-Wall` apart from style notes, and elaborate under
a second SystemVerilog front end. Each unit test was also shown to fail against a deliberately
broken copy of its module.

Nothing has been run on an FPGA. Nothing has been run with real processors or real software.
The protocol choices listed above are plausible, not authoritative. Anyone matching a particular
software library should check the mode codes, the identity numbering and the blocking
behaviour first.
