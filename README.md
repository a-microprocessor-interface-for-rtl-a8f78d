# Parallel-bus interface for the NM24CF04 serial ferroelectric memory

The NM24CF04 is a 512-byte non-volatile ferroelectric memory. It has a
two-wire serial bus: SCL is the clock and SDA is the open-drain data line. It
runs at no more than 100 kHz. An 8086 in minimum mode at 5 MHz expects memory
it can read and write with ordinary `MOV` instructions. This design sits
between the two and makes a bank of eight NM24CF04s look like 4 KB of ordinary
byte- and word-addressable memory at 1000H–1FFFH.

When the CPU touches that range, the interface holds the 8086's READY input
low, which adds wait states. It then runs the serial protocol, which is made of
these pieces:

- START, a device-select byte and ACK;
- a word-address byte and ACK;
- for a write, the data byte, ACK and STOP;
- for a read, a repeated START, a device-select byte with R/W = 1, ACK, eight
  data bits in, and STOP.

When the transfer is done, it releases READY. The software needs no drivers and
no polling. The price is time:

| Access | Bit periods | Time at 100 kHz | Wait states at 5 MHz |
|---|---|---|---|
| write | 29 | 290 µs | about 1450 |
| read | 38 | 380 µs | about 1900 |

The 8086 data bus is 16 bits wide, so there are two copies of the serial
datapath:

- the **low lane** holds D7..D0 (four devices, selected when A0 = 0);
- the **high lane** holds D15..D8 (four devices, selected when BHE = 0).

One state machine drives both lanes in lockstep. A word access therefore
transfers both bytes at once, in the same time as a single byte.

The design also decodes the chip selects for the board's two pairs of static
RAM and its EPROM. Those devices answer without wait states.

## Block structure

```
ferro_interface (top)
 ├─ addr_latch        address/BHE latch loaded while ALE is high
 ├─ chip_select       A14..A11 decode, RDY1 request
 ├─ bit_clock_gen     5 MHz / CLK_DIV -> 100 kHz bit period, phase strobes
 ├─ ferro_controller  sequencing and all per-lane strobes
 │   ├─ main_fsm      15-state transfer sequencer (states A..O)
 │   └─ shift_counter 0..7 bit counter, CNTR7
 ├─ ferro_datapath    low lane  ─┬─ byte_mux  (selects one of four bytes)
 └─ ferro_datapath    high lane ─┴─ shift_reg (8-bit load / shift-right)
```

`ferro_pkg` holds the shared types:

- the state enum;
- the shift-register mode encoding `{s1,s0}`;
- the byte-select encoding `{muxb,muxa}`;
- the struct of per-lane control strobes;
- the chip-select struct.

## The bit period and its two strobes

Everything in the serial part moves at the pace of one 10 µs bit period.
`bit_clock_gen` divides the 5 MHz system clock by `CLK_DIV` (default 50). It
produces three signals:

| Signal | Meaning |
|---|---|
| `phase_high` | true in the first half of the period, when SCL, if enabled, is released high |
| `fall_tick` | one clock wide, at the last clock of the high half; SCL falls right after it |
| `rise_tick` | one clock wide, at the last clock of the low half; SCL rises and a new period begins |

Each period therefore starts with SCL high. The two rules of the serial
protocol map directly onto the two strobes:

- **Data on SDA may change only while SCL is low.** Parallel loads and right
  shifts of the transmit shift register happen on `fall_tick`. The new bit
  appears on SDA at the start of the low half and stays stable through the next
  high half, when the device samples it.
- **The state machine, the bit counter and the ACK flip-flop update on
  `rise_tick`.** These events happen at the boundary between periods. Received
  bits are also shifted in on `rise_tick`: the device drives them after SCL
  falls, so they are sampled at the end of the low half.

SCL is not a free-running clock. Each lane's SCL driver pulls the line low in
the low half of every period in which SCL is enabled. Otherwise it leaves the
line floating high. Stopping SCL for a period keeps the line high. This is how
the design sets up START and STOP: while SCL stays high, SDA changes on
purpose.

- A START is SDA falling while SCL is high.
- A STOP is SDA rising while SCL is high.

Both come from a single START/STOP flip-flop shared by the two lanes. The
flip-flop is cleared in state A, set in state I and in the low half of state O,
and switched onto SDA only when it is needed.

All of this is synchronous to the one 5 MHz clock. The strobes are clock
enables, and no clock is gated.

## The transfer sequencer (states A–O)

`main_fsm` is a Moore machine. Its transitions all take effect on `rise_tick`.
Its outputs are the shift-register mode `{s1,s0}` (11 = load, 01 = shift right,
00 = hold) and the byte select `{muxb,muxa}`. The four bytes are:

| Select | Byte | Contents |
|---|---|---|
| 00 | 0: device select, write | `1010 c1 c0 p 0` |
| 01 | 1: word address | A8..A1 |
| 10 | 2: write data | the lane's byte of the CPU data bus |
| 11 | 3: device select, read | `1010 c1 c0 p 1` |

In these bytes, `c1 c0` is the device number (A11..A10) and `p` is the page
bit (A9). A0 and BHE pick the lane, so each lane sees a word address built from
A8..A1.

The states below are listed with how long each lasts, in bit periods.

| State | Periods | Next state | What the lane does |
|---|---|---|---|
| A | – | B when a request arrives | idle; SCL off, SDA released |
| B | 1 | C | START flip-flop (still clear) on SDA in the high half → START; load byte 0 on `fall_tick`; shift register drives SDA in the low half |
| C | 8 | D on CNTR7 | shift byte 0 out, one bit per `fall_tick`; SDA released in the low half of the 8th period so the device can acknowledge |
| D | 1 or more | E on ACK | ACK bit clocked; load byte 1 |
| E | 8 | on CNTR7: F to write, J to read | shift byte 1 out |
| F | 1 or more | G on ACK | load byte 2 |
| G | 8 | H on CNTR7 | shift byte 2 out |
| H | 1 | I | ACK slot of the data byte; SCL stopped in the low half, START/STOP flip-flop on SDA (low) |
| I | 1 | A | SCL off; flip-flop set → SDA rises with SCL high: **STOP**; READY granted |
| J | 1 or more | K on ACK | SCL stopped in the low half; load byte 3 |
| K | 1 | L | flip-flop (clear) on SDA in the high half → repeated **START**; SCL back on in the low half; byte 3 driven |
| L | 8 | M on CNTR7 | shift byte 3 out |
| M | 1 or more | N on ACK | device acknowledges, then drives data bit 7; it is shifted in at the end of the period |
| N | 8 | O on CNTR7 | bits 6..0 shifted in; in the 8th period, SCL is stopped in the low half and nothing is shifted |
| O | 1 | A | flip-flop on SDA in the high half, set in the low half → **STOP**; received byte put on the data bus; READY granted |

Adding these up gives 29 periods for a write (B through I) and 38 for a read
(B through O). The test bench measures both counts.

The ACK waits are in D, F, J and M. In each of them the machine stays put until
the registered ACK is true. The ACK flip-flop is sampled on the `rise_tick` at
the end of the last (CNTR7) period of C, E, G and L. At that point SDA belongs
to the device. If no device answers, the machine waits in that state, and so
does the CPU. For a word access, ACK means that both lanes acknowledged.

`shift_counter` counts bit periods within a byte:

- it is cleared in B, D, F, K and M;
- it counts in C, E, G, L and N;
- CNTR7 marks the eighth period.

## Per-lane strobes

`ferro_controller` decodes the state, the clock half and CNTR7 into the
per-lane control struct:

| Strobe | When it is active |
|---|---|
| `sr_ce` | `fall_tick` in B, D, F and K (loads), and in C, E, G and L (shifts out); `rise_tick` in M and in N1..N7 (shifts in) |
| `sr_bus_en` (shift-register output on SDA) | the low half of B, D, F and K; all of C, E, G and L except the low half of their 8th period |
| `ss_en` (START/STOP flip-flop on SDA) | the high half of B, K and O; the low half of H; all of I |
| `scl_en` | every state except A, I and O, the low half of H and J, and the low half of N's 8th period |
| `sr_in_en` | M and N |
| `rd_oe` | O |

A lane that is not selected receives an all-zero strobe struct. Its SCL and
SDA stay released, and its devices see no traffic.

## Handshake with the CPU

`chip_select` decodes the latched A14..A11:

| Range | Select | Notes |
|---|---|---|
| 1000H–1FFFH | FERRO | A11..A10 pick the device and A9 the page |
| 2000H–27FFH | LOWRAM1 / HIRAM1 | qualified by A0 and BHE |
| 2800H–2FFFH | LOWRAM2 / HIRAM2 | qualified by A0 and BHE |
| 3000H and up | ROMCS | |
| below 1000H | none | |

Only A14..A11 are decoded, so the map repeats every 32 KB.

RDY1 (to the 8284) is `FERRO_n | I | O`. It is high, meaning ready, for any
access outside the ferroelectric range. While the state machine works, it is
low. In I and O it goes high again. The 8086 then finishes its bus cycle
(T3, T4), and RD or WR goes back high.

A request is `FERRO selected AND (RD low OR WR low)`. R/W is simply the level
of WR_n. When the request drops, the machine returns to A, except in I and O,
which always run to the end so that the STOP is always sent. The CPU often ends
its cycle a few clocks after READY, well before O is over.

A flag remembers that the current cycle has been released. Because of it, a
second access that starts while the machine is still finishing O does not see
READY early. For writes, the data is taken straight from the multiplexed bus,
where the 8086 holds it through the wait states.

## How far this follows the original design

The structure comes from the original board:

- the fifteen states, their transitions and their outputs;
- the byte formats and the four-way byte multiplexer;
- the 74198-style shift register with `{s1,s0}` modes;
- the counter;
- the decode equations for the strobes;
- the shared START/STOP flip-flop;
- the two lanes;
- the RAM/ROM map.

These parts are this design's own:

- **One clock with enables.** The original ran the state machines from a
  separate 100 kHz clock and gated the shift-register clocks. Here everything
  runs on the 5 MHz clock, and the 100 kHz is a divided strobe.
- **Request qualification.** In the original, the chip select alone started
  the machine and reset it. The chip select comes from latched address bits,
  so it can stay asserted after the bus cycle and restart a transfer. Here RD
  or WR must also be low.
- **I and O always complete**, and READY is given only to the cycle that
  started the transfer. This is described in the handshake section above.
- **Ferroelectric range.** The original's decode equation and memory-map table
  give 1000H–17FFH, and its text mentions 18FFH. Both are smaller than the
  4 KB that eight 512-byte devices provide. Here FERRO covers 1000H–1FFFH.
  A11 is decoded, which the split of the RAM pairs requires in any case.
- **Address-bit mapping.** Which CPU address lines feed the device and page
  bits is this design's choice: A11..A10 are the device and A9 the page.
- **Byte 1 select.** The prose description of state D names `muxb`. The state
  machine's own equations select byte 1 with `muxa`. The equations are
  followed, giving `{muxb,muxa}` = 01.
- **State H.** One description has H wait for the data byte's ACK. The state
  table goes from H to I unconditionally. The table is followed, so a write
  does not check the final ACK.
- **Unselected lane.** The original's clock-disable equation for the low lane
  appears to leave SCL running on the lane that is not selected. Here an
  unselected lane keeps SCL idle.
- **Word ACK.** For a word access, ACK is the AND of both lanes' acknowledges.
- **Separate data ports.** The 8286 transceivers and the CPU's tri-state bus
  are replaced by a separate data input (`ad_in`) and data output with byte
  enables (`d_out`, `d_oe`). SCL and SDA appear as pull-low outputs plus a
  sensed SDA input, one set per lane. Outside the chip they need open-drain
  drivers and pull-ups.

Not built, and outside the interface proper:

- the 8086;
- the 8284 clock generator, which synchronises RDY1 into READY;
- the address latches' and transceivers' electrical parts;
- the RAM and EPROM chips;
- the NM24CF04s themselves, for which only a simulation model exists.

## The device model and its one liberty

`tb/nm24cf04_model.sv` is a behavioural NM24CF04. It has these features:

- it decodes START and STOP;
- it takes the device-select byte (matched against its A2 A1 pins), the word
  address and the data;
- it acknowledges each byte;
- it commits a write at STOP;
- it returns data for a read, with the address auto-incrementing.

The interface stops SCL right after some ACK clocks and after the last data
bit. A real device would keep driving SDA until the next SCL falling edge,
which never comes. The model therefore releases SDA once SCL has been high for
38 system clocks, three quarters of a bit period. The START or STOP that
follows can then be seen. This release rule is an assumption of the model. On
a real board, it is the point to check first.

## Verification

Every module has its own self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end bench `ferro_interface_tb` runs the top at its default
parameters (5 MHz, 100 kHz). It connects four model devices to each lane.

It first repeats the original board's bring-up test: writing 7EH to 1E0EH
(device 3, page 1, location 7). It checks:

- the three bytes seen on SDA (`10101110`, `00000111`, `01111110`);
- the stored byte;
- the cycle lengths, B to I = 28 and B to O = 37 periods.

It then runs random byte, odd-byte and word reads and writes against a
reference copy of the memory. It checks that RAM and ROM accesses see no wait
states. It also checks that an absent device stalls the machine in D.

It also measures serial-bus timing on both lanes. The device requires SCL to
be high for at least 4.7 µs before a START; the bench sees at least 10 µs.
START hold and STOP setup are checked against the usual 4.0 µs for parts of
this class; the bench sees 4.8 µs and 7.8 µs. These margins come from stopping
SCL a half-period before every START and STOP.

Finally, it counts each mechanism it exercised and fails if any count is zero:

- waits;
- START, repeated START and both kinds of STOP;
- SCL stops;
- the ACK stall;
- word and odd-byte accesses.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ferro_pkg.sv tb/ferro_interface_tb.sv --top-module ferro_interface_tb
./obj_dir/Vferro_interface_tb
```

Substitute any other `*_tb` for the top module to run a unit bench. The
full-size end-to-end run takes a few seconds. `CLK_DIV` (an even number of at
least 4) sets the system-clock-to-SCL ratio. For a CPU clock other than 5 MHz,
set it to the CPU clock divided by 100 kHz or more.
