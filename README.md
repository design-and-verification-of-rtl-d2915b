# APB subsystem: bridge and two memory slaves

The AMBA Advanced Peripheral Bus (APB) connects slow, simple peripherals
to a system. Its protocol has no pipelining and no bursts. Each transfer
first announces itself in a SETUP cycle. It then stays in ACCESS cycles
until the peripheral says it is ready. This RTL implements both ends of
that bus:

- an **APB bridge**, the only master on the bus. It accepts read and
  write requests from the system side and runs each one as an APB
  transfer.
- two **APB slaves**. Each is a small state machine in front of a
  1K x 32 memory. The second slave inserts a wait state, so both forms of
  the transfer occur on the same bus.

All signals change on the rising edge of `PCLK`. `PRESETn` is active low.
The address and data buses are 32 bits wide.

```
 system side                 APB                              
 req/write/addr/wdata  +------------+  PSEL[0] ---> +-----------+---------+
 ------------------->  |            |  PSEL[1] -+   | apb_slave | apb_mem |
 gnt/done/rdata        | apb_bridge |  PENABLE, |   | WAIT=0    | 1K x 32 |
 <-------------------  |            |  PWRITE,  |   +-----------+---------+
                       |            |  PADDR,   +-> +-----------+---------+
                       |            |  PWDATA       | apb_slave | apb_mem |
                       |            | <- PRDATA[i], | WAIT=1    | 1K x 32 |
                       +------------+    PREADY[i]  +-----------+---------+
```

## The transfer: IDLE, SETUP, ACCESS

The bridge's state register holds one of three phases. Two bus signals
show which phase the bus is in:

| phase  | PSELx | PENABLE | what happens                                   |
|--------|-------|---------|------------------------------------------------|
| IDLE   | 0     | 0       | no transfer                                    |
| SETUP  | 1     | 0       | address, direction and write data are on the bus |
| ACCESS | 1     | 1       | the slave completes the transfer when PREADY = 1 |

The phases move as follows:

- IDLE goes to SETUP when a request is waiting.
- SETUP always lasts exactly one cycle and goes to ACCESS.
- ACCESS repeats while the selected slave holds `PREADY` low. Each
  repeated cycle is a *wait state*.
- The ACCESS cycle with `PREADY` high ends the transfer. A write is
  stored at the end of that cycle. For a read, `PRDATA` is valid in that
  cycle.
- After that cycle the bridge goes straight to SETUP if another request
  is waiting (a back-to-back transfer: `PSEL` stays high). If no request
  is waiting, it returns to IDLE.

A transfer therefore takes `2 + wait states` cycles. Back-to-back transfers
to a slave with no wait states finish every second cycle. Waveform of a
read from slave 2 (one wait state) followed at once by a write to slave 1:

```
cycle      0     1      2       3       4      5      6
state    IDLE  SETUP  ACCESS  ACCESS  SETUP  ACCESS  IDLE
req/gnt   1/1   0/0    0/0     1/1     0/0    0/1    0/1
PSEL     00    10     10      10      01     01     00
PENABLE   0     0      1       1       0      1      0
PREADY2   -     0      0       1       -      -      -
PREADY1   -     -      -       -       0      1      -
done      0     0      0       1       0      1      0
```

`PADDR`, `PWRITE` and `PWDATA` are registered when a request is accepted.
They stay unchanged until the transfer ends, even while the system side
presents its next request.

## apb_bridge (`rtl/apb_bridge.sv`)

**System-side handshake.** The system side uses a plain single-request
port:

- It holds `req` high with `write`, `addr` and `wdata` until `gnt` is
  high at a rising edge.
- `gnt` is high in IDLE, and in the ACCESS cycle that completes a
  transfer. So a waiting request is accepted at the same edge as the
  previous transfer ends.
- `done` pulses in the completing ACCESS cycle. For a read, `rdata`
  carries the slave's `PRDATA` in that cycle; at all other times it is
  zero.

**Slave decoding.** The word address inside a slave is
`PADDR[SEL_LSB-1:0]`, 10 bits by default. The field just above it,
`PADDR[SEL_LSB +: clog2(NUM_SLAVES)]`, picks the `PSEL` line. Address bits
above that field are ignored, so the slaves repeat throughout the address
space. If `NUM_SLAVES` is not a power of two, some field values name no
slave. Such a transfer runs through SETUP and one ACCESS cycle with no
`PSEL` raised. It then completes, and a read returns zero. The bridge
takes `PREADY` and `PRDATA` only from the selected slave.

**Assertions.** The bridge checks its own side of the bus:

- at most one `PSEL` line is high;
- `PENABLE` is high only with a `PSEL` line high;
- the address, direction and write data hold still during a transfer.

## apb_slave and apb_mem (`rtl/apb_slave.sv`, `rtl/apb_mem.sv`)

The slave decodes the phase from its `PSEL` and `PENABLE` inputs. A wait
counter, cleared outside ACCESS, counts ACCESS cycles. `PREADY` is high
when the counter reaches `WAIT_STATES`. That makes exactly `WAIT_STATES`
wait states per transfer. `PREADY` is low in IDLE and SETUP.

The memory (`apb_mem`) is a single-port RAM with a registered read. It
reads the word at `PADDR[9:0]` on every edge that is not a write. This
timing is what lets a slave with no wait states answer in its first ACCESS
cycle: the read starts during SETUP, and the word is ready by the first
ACCESS cycle. The memory is written at the end of the ACCESS cycle with
`PREADY` high. A read right after a write to the same word returns the new
value. The memory contents have no reset.

`PRDATA` carries the memory word in the completing ACCESS cycle of a
read. It then keeps that word, held in a register, until the next read
completes. After reset it is zero. Because each slave holds its own last
word, the bridge takes `PRDATA` only from the selected slave.

The slave also checks the bus rules it relies on. SETUP must be followed
by ACCESS. While it holds `PREADY` low, the transfer must not change. An
ACCESS cycle may only follow a SETUP cycle or a wait state.

## apb_top (`rtl/apb_top.sv`)

`apb_top` holds the bridge and two slaves:

- `SLV1_WAIT = 0` for the first slave and `SLV2_WAIT = 1` for the second;
- `DEPTH = 1024` words each;
- `PADDR[10]` selects the slave, and `PADDR[9:0]` the word.

The ports are the system-side handshake plus the whole APB bus, brought
out for observation.

## What follows the APB description and what is chosen here

These parts follow the APB description:

- the three phases and their `PSEL`/`PENABLE` values;
- waiting in ACCESS until `PREADY`;
- back-to-back SETUP after a completing ACCESS;
- latched address and control;
- active-low `PRESETn` and single-edge clocking;
- two select lines;
- a slave with a 10-bit address and a 1K x 32 memory;
- 32-bit `PWDATA`/`PRDATA`, with `PRDATA` holding the last word read.

These are choices made in this design:

- **Wait-state counts.** The source shows transfers with and without wait
  states, but does not give the number. The slaves use a fixed count per
  slave (a parameter): 0 for slave 1 and 1 for slave 2. A real peripheral
  would decide `PREADY` from its own state.
- **System-side port.** The source places the bridge behind an AHB or ASB
  system bus. That bus is not implemented. `req/gnt/done` stands in for
  it.
- **Address map.** The split of the address into select field and word
  address is chosen. The select field sits just above the word address.
  Addresses are word addresses, with no byte offset.
- **Reset.** It is synchronous. It clears the bridge's state and its
  registered bus outputs, and each slave's wait counter.
- **Error response.** There is no `PSLVERR` and no error response. An
  unmapped address completes silently.
- **State-machine drawing.** The state diagram available for this design
  labels the ACCESS self-loop `PREADY=1` and the ACCESS-to-IDLE arc
  `PREADY=0`. The prose description and the standard APB protocol say
  the opposite (wait while `PREADY` is low). The RTL follows the prose.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `apb_mem_tb`           | random writes, then read-back against a shadow copy; one-cycle read latency; `rdata` unchanged during a write to another word; both ends of the array |
| `apb_slave_tb`         | a 0-wait and a 3-wait slave on one bus, driven by a task-based master; the exact wait-state count per transfer; read data against a shadow memory; `PREADY` low outside ACCESS; `PRDATA` holding the last read word; a deselected slave ignores the bus |
| `apb_bridge_tb`        | two behavioural slaves with random 0 to 3 wait states per transfer, and random `PREADY`/`PRDATA` from the unselected one; a cycle model checks `PSEL`, `PENABLE`, `PADDR`, `PWRITE`, `PWDATA`, `gnt`, `done`, the latency and the read data every cycle; it requires that back-to-back transfers, returns to IDLE, waited and unwaited transfers, reads and writes all occur |
| `apb_bridge_decode_tb` | three slaves, with select values 0 to 3: the right `PSEL` for each value, none for the unmapped value, two-cycle latency, and zero read data from the unmapped value |
| `apb_top_tb`           | the whole subsystem at its default parameters |

`apb_top_tb` first runs a fixed sequence in both slaves. It writes 0x60,
0x24, 0x4e and 0x28 to words 7, 1, 0 and 3, then reads words 7, 7 and 1
back. It then runs about 4000 random transfers, back to back or with idle
gaps, and checks each read against a shadow copy of both memories. It
checks the latency of every transfer (2 cycles for slave 1, 3 for
slave 2). It counts wait-state cycles, zero-wait transfers, back-to-back
transfers, returns to IDLE, reads, writes and each select line. It fails
if any of these never occurs.

To run a testbench with Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module apb_top_tb -y rtl -y tb +libext+.sv \
  rtl/apb_pkg.sv tb/apb_top_tb.sv -o sim
./obj_dir/sim
```

Replace `apb_top_tb` with any other testbench name. The package must be
named first; `-y` finds the other modules by file name. The simulator is
two-state, so anything read before it is written is given a value by
reset or by the testbench.

## Changing the design

- **More slaves.** Raise `NUM_SLAVES` on `apb_bridge`. The select field
  widens automatically. In `apb_top`, add `apb_slave` instances and widen
  `psel`/`pready`/`prdata`.
- **Memory depth.** Change `DEPTH` on `apb_top` or `apb_slave`. The word
  address width and the position of the select field follow it.
- **Wait states.** Change `SLV1_WAIT`/`SLV2_WAIT`, or `WAIT_STATES` on a
  slave. To make them data-dependent, replace the comparison that drives
  `pready` in `apb_slave`.
- **Types and phase encoding.** These are in `rtl/apb_pkg.sv`.
