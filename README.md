# AXI4-Lite to APB bridge with clock-domain crossing

This bridge lets a processor on a fast AXI4-Lite bus reach slow, low-power
peripherals on an APB (AMBA 4) bus that runs on its own, slower clock. In the
reference system the AXI4-Lite bus runs at 100 MHz and the APB at 10 MHz, and
up to eight peripherals (ADC, DAC, GPIO, SPI slave and so on) sit behind the
bridge. To the processor the bridge is an ordinary AXI4-Lite slave. To the
peripherals it is an APB master that carries single 32-bit reads and writes
with byte strobes, wait states and error responses.

The bridge has three parts:

* a six-state **transaction FSM** on the APB clock;
* an APB **data-path**: address, data and strobe registers, an 8-way slave
  decoder and a return multiplexer;
* a **synchronizer bus** that carries every signal between the two clocks.
  Two small circuits do the crossing: one for fast-to-slow and one for
  slow-to-fast.

A thin **AXI4-Lite slave port** on the AXI clock turns the FSM's slow levels
back into correct single-cycle AXI handshakes.

```
          ACLK domain                |  both  |              PCLK domain
 AXI4-Lite  +----------------+ req_a +--------+ req_p +-----------+   +--------------+  APB
 master <-->| axi_slave_port |------>|  apb_  |------>|  apb_fsm  |<->| apb_datapath |<--> 8 slaves
            |                |<------| sync_  |<------|           |   |              |
            +----------------+ rsp_a |  bus   | rsp_p +-----------+   +--------------+
```

## How a transfer crosses the clock boundary

This is the hardest part of the design. The FSM makes all decisions on PCLK,
but the AXI master lives on ACLK. Nothing crosses as a pulse. Each crossing
signal is a **level** that is held until the other side has answered with
another level: a four-phase exchange.

Two packed words carry all crossing signals. Each word goes through one
synchronizer as a unit:

| word        | direction   | contents |
|-------------|-------------|----------|
| `axi_req_t` | ACLK → PCLK | AWVALID, AWADDR, WVALID, WDATA, WSTRB, ARVALID, ARADDR, `bdone`, `rdone` |
| `apb_rsp_t` | PCLK → ACLK | `wr_accept`, `rd_accept`, `bvalid`, `rvalid`, response code, read data |

Every bit of a word passes through the same registers with the same enable.
A valid bit and its address or data therefore always arrive in the same
destination cycle. A change made earlier never arrives after a change made
later.

A write goes like this:

1. The master raises AWVALID/WVALID with address and data, and holds them as
   AXI requires. They reach the FSM as levels.
2. The FSM runs IDLE → IDLE_WRITE → SETUP_WRITE → ACCESS_WRITE. On entering
   ACCESS_WRITE it raises `wr_accept`.
3. The AXI port sees `wr_accept` rise and pulses AWREADY and WREADY for
   exactly one ACLK cycle. The master completes its handshakes and is free to
   present the next request.
4. On PREADY the APB access ends. The FSM drops PSEL/PENABLE and raises
   `bvalid`.
5. The AXI port presents BVALID/BRESP until BREADY. It then raises `bdone`.
6. The FSM sees `bdone` and returns to IDLE, dropping `wr_accept` and
   `bvalid`. The AXI port sees `bvalid` fall and clears `bdone`.

A read follows the same path through SETUP_READ and ACCESS_READ, with
`rd_accept`, `rvalid` and `rdone`, and returns RDATA/RRESP.

Three rules make this exchange safe for any clock ratio the synchronizers
allow:

* **Levels must fall where the other side can see it.** A new accept or
  response level is raised only after the previous transfer's done level has
  fallen. The done level falls only after the AXI side has seen the old
  levels low, so each new level gives it a fresh rising edge. Without this
  rule, with a slow ACLK, the FSM can raise the next `wr_accept` before the
  AXI side ever saw the old one fall. The next write then never gets AWREADY.
* **The APB access always ends on PREADY.** A leftover done level can delay
  the response level, but it never holds PENABLE high once PREADY is high.
* **AXI ordering.** BVALID (RVALID) is raised only after the AW/W (AR)
  handshake of the same transfer has completed. This holds even when both
  levels cross in the same destination cycle.

## The transaction FSM (`apb_fsm`)

| from         | to           | condition |
|--------------|--------------|-----------|
| IDLE         | IDLE_WRITE   | AWVALID (checked first) |
| IDLE         | SETUP_READ   | ARVALID |
| IDLE_WRITE   | SETUP_WRITE  | AWVALID \|\| WVALID |
| SETUP_WRITE  | ACCESS_WRITE | AWVALID & WVALID & PREADY |
| ACCESS_WRITE | IDLE         | BREADY |
| SETUP_READ   | ACCESS_READ  | ARVALID & PREADY |
| ACCESS_READ  | IDLE         | RREADY |

A state whose condition is false holds. What the conditions mean in this
implementation:

* In IDLE and IDLE_WRITE the valids are the synchronized AXI levels.
* In the SETUP states the valids are the copies that the data-path
  registered together with the address and data. The access phase therefore
  never starts with data that arrived after the register was loaded.
* BREADY and RREADY are the `bdone`/`rdone` levels: "the AXI response
  handshake has happened". They are not the raw AXI signals.

Outputs of each state:

* **SETUP states.** The address registers load on every edge into or within
  the state. PSEL goes high (PENABLE low) once the registers hold a complete
  request. A write whose data arrives after its address waits here with PSEL
  still low.
* **ACCESS states.** First the APB access phase (PSEL, PENABLE) until PREADY.
  Then a response phase (PSEL and PENABLE low, response level high) until the
  done level returns.

The SETUP→ACCESS condition includes PREADY. With slaves that hold PREADY
high outside the access phase, as the testbench slaves do, the setup phase
lasts exactly one cycle, as APB requires. A slave that pulls PREADY low while
it is in setup stretches the setup phase.

## Synchronizers (`sync_fast_to_slow`, `sync_slow_to_fast`)

Both are three data registers plus a two-flop "window" chain. The window
chain samples the **other** clock as data on the falling edge of a clock, and
the window enables the middle register.

* **Fast to slow** (source CLK1 faster than destination CLK2).
  Stage 1 and stage 2 are on CLK1. Stage 3 is on CLK2. The window is CLK2
  sampled twice on the falling edge of CLK1. Stage 2 loads while CLK2 is
  (delayed) high. It is frozen for the last part of CLK2's low phase, so
  it never changes near the CLK2 rising edge that stage 3 samples on.
* **Slow to fast** (source CLK1 slower than destination CLK2).
  Stage 1 is on CLK1. Stages 2 and 3 are on CLK2. The window is CLK1 sampled
  twice on the falling edge of CLK2. Stage 2 copies stage 1 only during the
  later part of CLK1's high phase, long after stage 1 changed. It is closed
  around CLK1's rising edge.

`apb_sync_bus` picks the circuit for each direction with `ACLK_FASTER`
(default 1: ACLK faster, so requests use fast-to-slow and responses use
slow-to-fast). Set it to 0 when PCLK is the faster clock.

Neither circuit has metastability margin unless the fast clock is several
times faster than the slow one: about four times or more, ten times in the
reference system. Also keep the slow clock's edges away from the fast clock's
falling edges. The circuits are not meant for clocks of similar frequency.
Latency is about two slow-clock periods fast-to-slow. Slow-to-fast it is
about one slow period plus a few fast periods.

## Data-path and address map (`apb_datapath`)

* `PADDR[SEL_LSB +: 3]` selects the slave. The default `SEL_LSB = 10` gives
  each slave a 1 KiB window, repeating every 8 KiB. For example, 0x400 and
  0x408 go to slave 1.
* `psel[n]` is one-hot and high only during a transfer.
* PRDATA, PREADY and PSLVERR of the addressed slave are chosen by a
  multiplexer. The original description uses tristate buffers that are
  enabled only during a transfer; a multiplexer does the same job inside a
  chip.
* PADDR, PWDATA and PSTRB return to zero between transfers.
* Read data and the error flag are captured when the access phase ends.
* PSLVERR becomes SLVERR (`2'b10`) on BRESP/RRESP. Otherwise the response is
  OKAY.
* WSTRB is carried to PSTRB. AWPROT/ARPROT and PPROT are not implemented.

## Timing

| quantity | value |
|----------|-------|
| APB transfer | 2 PCLK cycles (setup, access) plus one per wait state |
| Write, AXI VALID to BVALID handshake, zero-wait-state slave, 100/10 MHz | about 7 PCLK cycles (0.7 µs) |
| Read, ARVALID to RVALID handshake, same conditions | about 6 PCLK cycles |
| AWREADY/WREADY/ARREADY | one ACLK cycle wide |

With a slave that inserts one wait state, `tb_axi_apb_bridge_diagrams`
prints this trace of the example write (one line per PCLK cycle, counted
from the cycle in which AWVALID and WVALID rise; trimmed):

```
 1  ST_IDLE          PSEL=0 PENABLE=0 PREADY=1
 2  ST_IDLE_WRITE    PSEL=0 PENABLE=0 PREADY=1
 3  ST_SETUP_WRITE   PADDR=408 PWRITE=1 PSEL=10 PENABLE=0 PWDATA=1f4
 4  ST_ACCESS_WRITE  PSEL=10 PENABLE=1 PREADY=0      (wait state)
 5  ST_ACCESS_WRITE  PSEL=10 PENABLE=1 PREADY=1
 6  ST_ACCESS_WRITE  PSEL=0  PENABLE=0               AWREADY+WREADY
 9  ST_ACCESS_WRITE                                  BVALID, BREADY handshake
```

The read of 0x400 follows the same pattern one cycle sooner, because it
skips IDLE_WRITE: setup in cycle 2, access in cycles 3 and 4, ARREADY in
cycle 5, and RVALID with 0xFFFFFFFF in cycle 8. The FSM returns to IDLE a
few cycles after the AXI response handshake, once that handshake has been
passed back across the clock boundary.

Only one transfer is in flight at a time. When both are requested together,
writes go first, so a constant stream of writes can hold reads back.

## Parameters (`axi_apb_bridge`)

| parameter     | default | meaning |
|---------------|---------|---------|
| `NSLV`        | 8       | number of APB slaves (PSEL lines) |
| `SEL_LSB`     | 10      | lowest PADDR bit of the slave number |
| `ACLK_FASTER` | 1       | 1 if ACLK is faster than PCLK |

Bus widths (32-bit address and data, 4 strobes) are set in `axi_apb_pkg`.

## Where this implementation departs from the original description

* **When READY rises.** The original timing diagrams show ARREADY rising at
  the start of the read setup phase. Here ARREADY, AWREADY and WREADY are
  raised when the ACCESS state is entered, and only as one-cycle pulses.
* **PSEL after the access.** The original waveforms keep PSEL high after the
  access until the AXI response completes. Here PSEL and PENABLE fall
  together when PREADY ends the access, so a slave never sees what looks
  like a new setup phase.
* **Meaning of BREADY/RREADY in the FSM.** These conditions and the AXI
  valids are synchronized handshake levels, as described above. They are not
  the raw AXI signals.
* **Setup waits with PSEL low.** PSEL is held low in SETUP_WRITE until
  address and data are both present.
* **Return signals.** A multiplexer replaces the tristate buffers.
* **Additions.** Asynchronous active-low resets on every flip-flop,
  including the synchronizers, PSLVERR-to-SLVERR mapping, and the AXI-side
  handshake logic. None of these is specified in the original.
* **Not built.** The AXI masters (a RISC-V core and an SPI master, with
  whatever shares the bus between them) and the APB peripherals are not part
  of the bridge. The testbenches use an AXI master written as tasks and a
  generic APB memory slave (`tb/apb_slave_model.sv`).

## Files

| file | contents |
|------|----------|
| `rtl/axi_apb_pkg.sv` | widths, FSM state enum, response codes, crossing structs |
| `rtl/axi_apb_bridge.sv` | top level |
| `rtl/axi_slave_port.sv` | AXI4-Lite handshakes on ACLK |
| `rtl/apb_sync_bus.sv` | choice and instances of the synchronizers |
| `rtl/sync_fast_to_slow.sv`, `rtl/sync_slow_to_fast.sv` | the two crossing circuits |
| `rtl/apb_fsm.sv` | transaction FSM |
| `rtl/apb_datapath.sv` | APB registers, decoder, return multiplexer |
| `tb/tb_*.sv` | one self-checking testbench per module, plus three end-to-end ones |
| `tb/apb_slave_model.sv` | behavioural APB slave: memory, random wait states, error window, protocol checks |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
The simulator used has two logic states, so the testbenches reset or
initialise everything they read.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb rtl/axi_apb_pkg.sv tb/tb_axi_apb_bridge.sv \
    --top-module tb_axi_apb_bridge -Mdir obj
./obj/Vtb_axi_apb_bridge
```

Replace the testbench name to run another one. Each runs in well under a
second.

* **`tb_axi_apb_bridge`** runs the default bridge at 100 MHz / 10 MHz.
  First come the two example transfers of the original timing diagrams:
  0x000001F4 written to 0x408, and 0xFFFFFFFF written to and read back from
  0x400. Then 600 random transfers against a reference memory, then a
  read-back sweep.
  - It drives address before data, data before address and both together;
    delayed BREADY/RREADY; APB wait states; slave errors; all eight slaves;
    and writes waiting in SETUP_WRITE. It counts each of these and fails if
    one never happens.
  - It checks that every APB transfer lasts two cycles plus its wait states.
  - The slave models check the APB phase and stability rules.
* **`tb_axi_apb_bridge_diagrams`** replays the two example transfers with
  slaves that always insert one wait state. It prints a trace per PCLK cycle
  and checks the phase lengths, bus values and the order of the AXI and APB
  events.
* **`tb_axi_apb_bridge_slow_aclk`** runs the same traffic with the clocks
  reversed: ACLK 10 MHz, PCLK 100 MHz, `ACLK_FASTER = 0`.
* **The synchronizer testbenches** check the timing property itself. For
  fast-to-slow, stage 2 is stable for at least 20 ns before each
  slow-clock edge. For slow-to-fast, stage 2 copies only a settled stage 1.
  Both also check whole-word delivery and latency.
* **`tb_apb_fsm`** compares the FSM with an independent model of the
  transition table, using random inputs, and requires every transition to
  be taken.

Each module's testbench was also run against a deliberately broken copy of
the module, and each one caught it.

**What simulation cannot show.** It does not model metastability. The
synchronizer testbenches check the timing windows that keep the circuits
safe, not the electrical behaviour. No timing analysis or gate-level
simulation has been done.
