# Plug-and-play modules handler

An embedded processor usually knows at build time which peripheral sits on
which pins. This design removes that binding. Sensors and actuators are built
as *modules*, each with a small driver chip and a type ID. A module can be
plugged into any of several identical *host connectors*, at any time, while
the system runs. The processor does not care where a module is plugged. It
programs a *general purpose register* with the ID of the module type it
wants to talk to, and then reads and writes that register. Hardware between
the two finds the module, wires its connector to the matching register and
keeps both sides' copies of the register contents equal.

The RTL implements the architecture described in "Architecture For
Plug-And-Play Modular Technology" (an FPGA peripheral on an Avalon-MM bus
with three registers and three connectors). Where that description stops,
this RTL makes its own choices. They are listed in
[Where the RTL makes its own choices](#where-the-rtl-makes-its-own-choices).

```
            Avalon-MM                                       6-pin host connectors
 processor ─────────── in/out header ── R0 ──┐          ┌── HC0 ── ATT, DATA in, DATA out, CLK
                                     ── R1 ──┤  switch  ├── HC1 ── ...
                                     ── R2 ──┘          └── HC2 ── ...
                         clock divider 50 MHz → 5 MHz bit clock
```

## What happens when a module is plugged in

1. The module pulls the active-low attention line ATT to ground. The line is
   open drain, with a pull-up on the host side.
2. The host connector starts a 5 MHz bit clock on CLK. It sends an
   *identification request* (packet 0) and receives the module's ID
   (packet 1).
3. The host connector stops the clock and raises a connection request with
   the ID to the switch.
4. The switch's state machine for that connector checks each register in
   turn: R0, then R1, then R2. It takes the first register whose ID field
   (location 0) equals the module's ID and that no other connector holds.
5. If a register is found, the connector and that register are wired
   together. The connector's `conn_pending` output goes low and the clock
   restarts with the synchronisation stream.
6. If no register is found, the connector tries again with the *alternate*
   identification request. It keeps trying until a register becomes free or
   is programmed, or until the module is unplugged.
7. Releasing ATT (unplugging) stops the clock at once. The connection is
   dropped, the register is freed and `conn_pending` goes high again.

## The serial link

The link is synchronous and full duplex. Both sides shift 36-bit packets at
the same time, least significant bit first.

| packet | host → module | module → host |
|---|---|---|
| 0 (identify) | `0x0_0000_00AA`, or `0x8_0000_00AA` on every retry | zeros |
| 1 (identify) | zeros | module ID in bits [31:0] |
| 2 (header) | `0xCC` if the next packet holds data, else `0x00` | same |
| 3 (data) | `{offset[3:0], data[31:0]}` or zeros | same |

Packets 0 and 1 are sent only while connecting. After that, packets 2 and 3
alternate until the module is unplugged. Any 36-bit header value other than
`0xCC` means "no data follows".

Timing, in the system clock domain (50 MHz, one bit = 10 cycles):

```
 CLK       ____/‾‾‾‾\____/‾‾‾‾\____/‾‾‾‾\____ ... (paused between packets 1 and 2)
 DATA out  X=b0=======X=b1=======X=b2======     host changes it on falling edges
 DATA in   ===X=b0=======X=b1=======X=b2===     module changes it 3 cycles after each rising edge
                 ^         ^         ^          both sides sample on rising edges
```

- **Framing.** There is no start marker. CLK runs only while a packet stream
  runs. The first edge after ATT goes low is bit 0 of packet 0. The module
  counts rising edges from the moment it is powered (plugged in).
- **Clock pause.** The host stops CLK between packet 1 and the next packet
  while the switch scans. This takes a few system cycles, plus the
  synchronisers. Because of the pause, the module never sees a partial scan.
- **Sampling.** The host passes ATT and DATA in through two-flop
  synchronisers. The module samples CLK and DATA out the same way, with its
  own clock. That clock must be at least 8 times the bit clock.

## Synchronisation between register and module

Synchronisation is event driven: a location moves only when one side has
changed it.

- **Processor to module.** Every processor write sets that location's
  *updated* flag in the register. This includes the write to the ID field.
  The register offers its lowest flagged location to the connected host
  connector. At each packet-3 boundary the host connector latches that
  location and acknowledges it, which clears the flag. It then sends `0xCC`,
  followed by `{offset, data}`. A location written again before it is sent
  keeps its flag and goes out once, with its latest value.
- **Module to processor.** The module sends `0xCC`, followed by
  `{offset, data}`. The host connector writes the data into the register.
  That write does not set the flag, so the value is not echoed back.
  Writes to location 0 (the ID field) from the module side are ignored.
- **Order of writes.** If the processor and the module write the same
  location in the same cycle, the processor's write wins.
- **Flags while unconnected.** Flags set while no module is connected stay
  set. Say the processor writes ID `0x1` and `0x10C00` at offset 1, and a
  type-1 module is plugged in afterwards. The host then sends `CC`,
  `{0,0x1}`, `CC`, `{1,0x10C00}`, `00`, ...
- **Reconnection.** A module plugged in later receives only locations
  written after the last synchronisation. Flags are not raised again when a
  module connects.

## The switch

The switch has one state machine per host connector:

```
 IDLE --req--> CHECK_R0 --> CHECK_R1 --> ... --> CHECK_R(N-1) --no match--> IDLE (rejected pulse)
                  |            |                     |
                match        match                 match
                  v            v                     v
               CONN_R0      CONN_R1      ...      CONN_R(N-1)   (held while req stays high)
```

- **Matching.** A register matches when its ID field equals the module ID,
  the ID is not 0, and no machine is in that register's CONN state. ID 0
  means "unprogrammed / no answer". Because of this, a module that never
  answers never lands on an empty register.
- **Ties.** If two machines check the same free register in the same cycle,
  the lower-numbered connector gets it. The other machine moves on to the
  next register.
- **Scan timing.** `accepted` goes high k+2 clock edges after `req` rises,
  where k is the index of the matching register. `rejected` pulses N_REG+1
  edges after `req` rises.
- **Wiring.** The connection is a crossbar of two bundles (`pnp_pkg::reg2hc_t`
  and `hc2reg_t`). A side that is not connected sees zeros. An assertion
  checks that no register is ever wired to two connectors.

## Processor view

The Avalon-MM slave uses word addresses. Location `l` of register `r` is at
word address `r*16 + l`, which is byte offset `4*(r*16 + l)` from the
processor. A read returns data one cycle after the read strobe (fixed
latency 1). Writes take one cycle. The ID field is location 0. The reference
test program does just this:

| byte offset | value | effect |
|---|---|---|
| `0x00` | `0x2` | register 0 serves modules of type 2 (the LED module) |
| `0x08` | `0x6B` | location 2 of register 0: the LED pattern |

## Files

| file | contents |
|---|---|
| `rtl/pnp_pkg.sv` | sizes (16 × 32-bit locations, 36-bit packets), protocol codes, bundle structs |
| `rtl/pnp_clk_div.sv` | bit clock enables: system clock ÷ `DIV` (10) |
| `rtl/pnp_gp_register.sv` | one register set: 16 locations, updated flags, two ports |
| `rtl/pnp_switch.sv` | per-connector scan FSMs, availability, crossbar |
| `rtl/pnp_host_connector.sv` | ATT detection, identification, retry, packet engine |
| `rtl/pnp_avalon_in_header.sv`, `rtl/pnp_avalon_out_header.sv` | Avalon-MM decode and read-back |
| `rtl/pnp_handler.sv` | the peripheral: headers, divider, `N_REG` registers, switch, `N_HC` connectors |
| `rtl/pnp_module_driver.sv` | module side of the protocol: what a module's driver chip must implement |
| `rtl/pnp_led_module.sv` | test module (ID 2) showing location 2 on 10 green LEDs |
| `rtl/pnp_de0_system.sv` | top: handler and LED module side by side, as on the reference board |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/pnp_tb_link_monitor.sv` | testbench helper that cuts a serial line into packets |

Parameters with their defaults: `pnp_handler #(N_HC=3, N_REG=3, CLK_DIV=10)`,
`pnp_led_module #(MODULE_ID=2, LED_OFS=2, LED_W=10)` and
`pnp_module_driver #(MODULE_ID)`. Location count and width are package
constants. The top `pnp_de0_system` has fixed port widths for the default
configuration.

The processor, its bus fabric and the connector's power pins are not part of
the RTL. The top brings the handler's Avalon-MM slave out as ports. It also
brings out both sides of the link: the handler's connector pins and the LED
module's pins. On a board these are joined by cables. The LED module's
open-drain ATT is an output `mod_att_pull` (1 = pull low). The pull-up is
outside: `att_n = !(plugged && att_pull)`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. The system test runs all parameters at their defaults and
finishes in well under a second of wall time:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pnp_de0_system \
          -y rtl -y tb rtl/pnp_pkg.sv tb/tb_pnp_de0_system.sv
./obj_dir/Vtb_pnp_de0_system
```

Replace the testbench name to run another one, for example `tb_pnp_switch`
or `tb_pnp_host_connector`.

`tb_pnp_de0_system` replays four scenarios:

1. A type-1 module connects on HC0 and receives the ID echo and `0x10C00`.
2. A second type-1 module on HC1 is refused and keeps sending `0x8000000AA`.
3. A silent module on HC2 is refused until it is unplugged.
4. The LED module is programmed as in the reference test program and shows
   `0x6B`.

It also checks three further behaviours:

- module-to-register writes;
- takeover of a freed register;
- the 200 ns bit period.

Each mechanism must occur at least once: identification, retry, acceptance,
sync in each direction, unplug and clock pause.

## Where the RTL makes its own choices

These points are not fixed by the architecture description. They are
reasonable choices, but a real module built to a different reading would not
interoperate.

- **Bit timing.** The edges used for driving and sampling, as shown above.
  Also, CLK is gated: it runs only during packets and pauses for the switch.
- **Retry signalling.** The `rejected` pulse from the switch tells the host
  connector that a scan has ended. The description names only the
  acceptance signal.
- **Host filler.** The host sends zeros during packet 1.
- **ID 0.** It is reserved and never matches.
- **Ties.** Lowest connector index wins.
- **Flags.** Processor writes and writes of module origin are treated
  differently, as described above. Flags are not re-raised when a module
  (re)connects.
- **Module start.** The module sends nothing (`0x00` headers) until it has
  seen one header slot that was not an identification request.
- **Avalon-MM.** The address layout (`r*16 + l`) and the one-cycle read
  latency.
- **Reset.** All state has an asynchronous active-low reset to zero.
- **LED module.** The LED location (2) and the LED count (10). The location
  follows the byte address 8 used by the reference test program.
- **`conn_pending`.** The pending flags are separate outputs. On the
  reference board they were also shown on LEDs.

## Limits

- **Packet order.** Nothing checks that a module answers with a well-formed
  packet sequence. Headers and data are told apart only by their position
  in the stream, so a module that falls out of step is misread until it is
  unplugged.
- **Retransmission.** There is no acknowledgement and no retransmission at
  the protocol level. A bit error in a data packet goes through unnoticed.
- **Reprogramming.** Rewriting a register's ID field while a module is
  connected to it does not drop the connection. The new value is sent to
  the module like any other update. The connection ends only when the
  module is unplugged.
- **Sizes.** `N_HC` and `N_REG` can be changed on `pnp_handler`. The address
  width grows with `N_REG`. The location count (16) and the packet format
  are tied together through the 4-bit offset field.
