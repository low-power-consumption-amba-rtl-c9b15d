# Low-power AMBA APB subsystem

An APB (Advanced Peripheral Bus) is the slow, simple side of an AMBA system:
a bridge on the high-speed system bus (AHB or ASB) is the only master, and
low-bandwidth peripherals such as timers, UARTs and GPIO hang off it. This
RTL implements that APB side: a bridge, an address decoder, a read-data
multiplexer and a parameterised number of register-bank peripherals.

The design aims at low power through simplicity rather than through extra
machinery:

* the bridge is a three-state machine (IDLE, SETUP, ENABLE) with a two-bit
  state register whose upper bit *is* PENABLE;
* every transfer is two phases, with no pipelining and no bursts;
* nothing on the APB toggles between transfers: address, direction and
  protection stay at the values of the last transfer, write data is only
  reloaded by a write, and byte strobes are zero on reads;
* select lines are registered, so PSELx and PENABLE change once per transfer
  and never glitch.

Everything is SystemVerilog-2017, synthesizable, with assertions for the bus
rules.

## Structure

```
            system-bus side                       APB
          sys_write / sys_read   +------------+  PSEL[0] -> apb_slave #0 (0 wait)
          addresses, data,  ---> | apb_bridge |  PSEL[1] -> apb_slave #1 (1 wait)
          strobes, prot          |  FSM       |  PSEL[2] -> apb_slave #2 (2 waits)
          sys_ready <---         |  latches   |  PSEL[3] -> apb_slave #3 (3 waits)
          sys_done, read data <- |  decoder   |  PADDR PPROT PWRITE PWDATA PSTRB PENABLE -> all slaves
                                 +------------+
                                       ^  PRDATA, PREADY
                                       +---- apb_rdata_mux <---- each slave's PRDATA, PREADY
```

| File | Contents |
|---|---|
| `rtl/apb_pkg.sv` | widths (32-bit address and data, 4 strobes, 3 protection bits), state enum, `apb_req_t` / `apb_rsp_t` bus structs |
| `rtl/apb_bridge.sv` | the APB master: state machine, request latches, read-data capture, bus assertions |
| `rtl/apb_decoder.sv` | address to one-hot select (used inside the bridge) |
| `rtl/apb_rdata_mux.sv` | returns the selected slave's PRDATA/PREADY |
| `rtl/apb_slave.sv` | register-bank peripheral with byte strobes and optional wait states |
| `rtl/apb_top.sv` | bridge, `NUM_SLAVES` slaves and the multiplexer wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

The request bundle `apb_req_t` carries PADDR, PPROT, PWRITE, PWDATA, PSTRB
and PENABLE, which the bridge broadcasts to every slave. PSELx is a separate
vector, one bit per slave. `apb_rsp_t` carries one slave's PRDATA and PREADY.

## Anatomy of a transfer

A transfer always has a one-cycle SETUP phase followed by an ENABLE phase of
one cycle plus one cycle per wait state. Below, a zero-wait write to slave 0
is followed directly by a read from slave 1, which inserts one wait state.
Each row is one PCLK cycle, i.e. the values between two rising edges.

| cycle | state  | PSEL    | PENABLE | PADDR / PWRITE | PREADY | what happens at the end of the cycle |
|------:|--------|---------|:-------:|----------------|:------:|--------------------------------------|
| 0     | IDLE   | 0000    | 0 | previous values held | - | write request accepted (`sys_ready` = 1) |
| 1     | SETUP  | 0001    | 0 | A0 / 1 | - | - |
| 2     | ENABLE | 0001    | 1 | A0 / 1 | 1 | slave 0 stores PWDATA; read request accepted |
| 3     | SETUP  | 0010    | 0 | A1 / 0 | - | `sys_done` pulses during this cycle |
| 4     | ENABLE | 0010    | 1 | A1 / 0 | 0 | slave 1 extends the transfer |
| 5     | ENABLE | 0010    | 1 | A1 / 0 | 1 | bridge captures PRDATA |
| 6     | IDLE   | 0000    | 0 | A1 / 0 (held) | - | `sys_done`, `sys_read_valid` pulse; `sys_read_data` valid |

State transitions:

* IDLE -> SETUP when a request is accepted, otherwise stay in IDLE.
* SETUP -> ENABLE always, after exactly one cycle.
* ENABLE -> ENABLE while PREADY is low.
* ENABLE -> SETUP when PREADY is high and another request is waiting
  (back-to-back transfer; the bus does not pass through IDLE).
* ENABLE -> IDLE when PREADY is high and nothing is waiting.

State codes are IDLE = `00`, SETUP = `01`, ENABLE = `10`, so PENABLE is
`state[1]`.

Latency, from the rising edge that accepts a request to the `sys_done` pulse,
is 3 cycles plus the number of wait states. The bus throughput for
back-to-back zero-wait transfers is one transfer every two cycles.

## System-side handshake

The bridge's system-side port is a simple request/accept interface, standing
in for the AHB/ASB slave port of a real bridge (which is not part of this
design):

* Write: raise `sys_write` with `sys_write_addr`, `sys_write_data`,
  `sys_write_strb` (one bit per byte lane) and `sys_prot`.
* Read: raise `sys_read` with `sys_read_addr` and `sys_prot`.
* Hold the request until a rising edge at which `sys_ready` is high; that
  edge accepts it. `sys_ready` is high in IDLE and in the last ENABLE cycle
  of a transfer (PREADY high), so a waiting request starts immediately.
* If `sys_write` and `sys_read` are both high, the write is taken first and
  the read stays pending until the next accepting edge.
* `sys_done` pulses for one cycle after every completed transfer.
  `sys_read_valid` pulses at the same time for reads, and `sys_read_data`
  then holds the read word until the next read completes.

`sys_ready` is combinational from the state register and PREADY.

## Address map

Slave *k* owns the byte-address window `[k * 2^SLAVE_LSB, (k+1) * 2^SLAVE_LSB)`,
4 KiB per slave by default, starting at address 0. Any address outside the
`NUM_SLAVES` windows, including any address with a bit set above the slave
index field, selects no slave. Such a transfer still runs SETUP and ENABLE
with all selects low. The multiplexer then answers PREADY = 1 and
PRDATA = 0, so the transfer completes in the minimum time, a write has no
effect and a read returns zero. There is no error response: PSLVERR is not
implemented.

Inside a slave, register *i* sits at byte offset `4*i`. The bits above
`log2(DEPTH)` word address bits are ignored, so the bank repeats through the
window.

## The register slave

`apb_slave` is a bank of `DEPTH` 32-bit registers, cleared by reset:

* Write: the data is stored at the rising edge that ends the ENABLE phase
  (PSELx, PENABLE, PWRITE and PREADY all high). Only the byte lanes whose
  PSTRB bit is set change; PSTRB[n] covers PWDATA[8n+7:8n].
* Read: while PSELx and PENABLE are high and PWRITE is low, the addressed
  register drives PRDATA. At all other times PRDATA is zero, so an idle slave
  puts no activity on the read multiplexer.
* Wait states: PREADY is held low for the first `WAIT_STATES` cycles of every
  ENABLE phase. A small counter does this, and it is removed when
  `WAIT_STATES` = 0.

PPROT reaches the slaves but the register bank does not use it.

## Power-related behaviour in detail

| Signal | Behaviour |
|---|---|
| PADDR, PWRITE, PPROT | loaded only when a request is accepted; held through IDLE |
| PWDATA | loaded only when a write is accepted; a read leaves it unchanged |
| PSTRB | the write's strobes on writes, zero on reads |
| PSELx | registered decode of the accepted address; cleared on return to IDLE; stays high across back-to-back transfers to the same slave |
| PENABLE | the upper state bit, so it is a plain flop output |
| PRDATA (per slave) | zero unless that slave is in the ENABLE phase of a read |
| `sys_read_data` | loaded only when a read completes |

## Assertions

The bridge checks that at most one PSELx is high, that SETUP lasts exactly one
cycle, and that all selects are low in IDLE. It also checks that address,
direction, data, strobes and select do not change during SETUP or a wait
state, that PSTRB is zero on reads, and that an unmapped address decodes to
no select.

Each slave checks, from its own side, that a selected SETUP cycle is always
followed by ENABLE, and that ENABLE is only entered from SETUP. It also checks
that the request stays stable while it holds PREADY low, and that PSTRB is
zero on reads.

They are concurrent assertions, disabled during reset. Simulate with
assertions enabled (`--assert` in Verilator) to use them.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `apb_pkg` | `ADDR_W`, `DATA_W` | 32, 32 | PADDR and data bus widths |
| `apb_pkg` | `STRB_W`, `PROT_W` | 4, 3 | byte strobes, protection bits |
| `apb_top`, `apb_bridge`, `apb_decoder`, `apb_rdata_mux` | `NUM_SLAVES` | 4 | number of PSELx lines and slaves |
| `apb_top`, `apb_bridge`, `apb_decoder` | `SLAVE_LSB` | 12 | log2 of the window size per slave |
| `apb_top`, `apb_slave` | `DEPTH` | 16 | registers per slave |
| `apb_slave` | `WAIT_STATES` | 0 | wait states per transfer |
| `apb_top` | `WAIT_STEP` | 1 | slave *k* gets `k * WAIT_STEP` wait states; 0 makes all slaves zero-wait |

Only the 32-bit data width, the 32-bit address, the byte strobes and the
three-state transfer sequence come from the source description. The slave
count, window size, register depth and wait-state counts are choices of this
implementation.

## How this relates to the source description

The implementation follows a master's thesis on a low-power AMBA APB, which
describes the bridge and a generic slave in the AMBA 2 / APB4 style. The
following come from that description:

* the state machine and its transitions;
* the two-phase write and read transfers;
* the bridge's duties: latch the address for the whole transfer, decode one
  select per slave, drive write data and PENABLE, return read data;
* the slave's latching and read-drive conditions;
* the PREADY, PSTRB and PPROT signals;
* the rule that address and control do not change between transfers.

The state codes and the names of the system-side signals come from its
reference simulation.

Choices made here where the description is silent:

* **PREADY in the state machine.** The description's state diagram has no
  ENABLE self-loop, but its signal table gives PREADY the job of extending a
  transfer. Here ENABLE repeats while PREADY is low.
* **System-side interface.** The request/accept handshake, write-before-read
  priority and the done/valid pulses are this implementation's own. The
  description only shows a generic "system bus slave interface".
* **Registered selects.** The description allows PSELx to glitch between
  back-to-back transfers. Here it is registered and does not glitch.
* **Address map, unmapped addresses, register-bank slaves, reset values**
  (all zero, asynchronous active-low reset) and **slave wait states** are
  not specified by the description.
* **Not implemented:** PSLVERR (named only as an APB3 addition), the AHB/ASB
  side of the bridge and the real peripherals (UART, timer, keypad, PIO) that
  an APB would serve. The setup/hold timing parameters in the description are
  named without values and concern physical implementation only.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one
has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/apb_pkg.sv rtl/apb_decoder.sv rtl/apb_bridge.sv rtl/apb_slave.sv \
    rtl/apb_rdata_mux.sv rtl/apb_top.sv tb/tb_apb_top.sv \
    --top-module tb_apb_top -Mdir obj_top
./obj_top/Vtb_apb_top
```

For the other testbenches, list `rtl/apb_pkg.sv`, the module under test and
what it instantiates: `apb_bridge` needs `apb_decoder`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/apb_pkg.sv rtl/<module>.sv`.

| Testbench | What it establishes |
|---|---|
| `tb_apb_decoder` | select and mapped flag against the address map for corner and random addresses, for 4 and 3 slaves |
| `tb_apb_rdata_mux` | the selected response is returned, and the idle response is PRDATA = 0, PREADY = 1 |
| `tb_apb_slave` | see below |
| `tb_apb_bridge` | see below |
| `tb_apb_top` | see below |
| `tb_apb_transfer_timing` | cycle-by-cycle bus values of one isolated write, one read and one read with two wait states on the full subsystem, as in the transfer table above |

`tb_apb_slave` runs two slaves, with 0 and 2 wait states, on one bus. It
checks byte-lane writes and read data against a reference copy, and that the
ENABLE phase lasts wait states + 1 cycles. It also checks that the slave not
selected stays silent, that PRDATA is zero outside reads, and that reset
clears the registers.

`tb_apb_bridge` drives 400 random requests against a slave model that adds
random wait states and puts junk on PRDATA during them. It checks every
transfer's bus values, selects and phase lengths, and the read data returned.
It also checks the held-bus behaviour and that back-to-back transfers skip
IDLE.

`tb_apb_top` runs the whole subsystem at its default parameters. First it
writes 0x0a, 0x0f, 0x14, 0x19 and 0x1e to registers 2 to 6 and reads them
back, which is the reference sequence. Then it runs 2000 random transfers
over all slaves and an unmapped window. It checks every read value and every
transfer's latency (3 + wait states). It also counts that each of these
happened at least once:

* writes and reads;
* back-to-back transfers and returns to IDLE;
* wait states and partial-strobe writes;
* unmapped accesses;
* write-before-read arbitration;
* a quiet bus during IDLE.
