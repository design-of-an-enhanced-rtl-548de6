# Enhanced FDDI-II dual attached station

FDDI is a 100 Mbit/s token ring on a dual fibre ring. FDDI-II adds circuit switched
(isochronous) traffic on top of the packet traffic. A cycle master sends one cycle every 125 µs.
The cycle is split into 16 wide band channels (WBCs) of 6.144 Mbit/s each, plus a small dedicated
packet data group. A programming template in every cycle header says, channel by channel,
whether a WBC carries packets or circuit switched bytes. A station has to split the incoming
byte stream by that template: packet bytes go to the packet MAC, isochronous bytes go to the
isochronous MAC. On the way out it merges the two streams again. The block that does this is the
**hybrid multiplexer (H-MUX)**, and it is the heart of this RTL.

This station adds these features to the basic FDDI-II node:

* **Both rings carry traffic.** Each ring has its own H-MUX, I-MAC and CS-MUX, and each ring runs
  in its own mode (basic FDDI or hybrid FDDI-II). A configuration switch can still fold the two
  rings into one after a failure.
* **An electrical by-pass.** It bridges the station with exactly the station's own delay, so the
  ring length does not change when a station is inserted or removed. It switches only while the
  station holds no token.
* **Hybrid mode can be turned off in hardware.** The H-MUX can suppress the cycle control
  symbols, which drops the ring back to basic mode.
* **Consistency checks.** Isochronous access requests are compared with the channel allocation
  actually in use on the ring.
* **Management counters and a comparator**, which the node processor reads.
* **A monitor add-on.** It lets any station act as cycle master: cycle generation, latency
  adjustment buffer, management voice channel, and supervision of the current master.

The packet MAC (an AMD FORMAC), the physical layer chips (ENDEC, EDS), the optical parts, the
packet buffer controllers and the node processor are existing parts. They are not in this RTL.
Their interfaces are ports of the top module.

## The byte stream

Everything runs on one clock per ring byte: 12.5 MHz, or 80 ns per byte. Every ring-side bus is
11 bits wide and carries one byte as two 4B/5B symbols (`fddi2_pkg::spair_t`):

| bit 10 | bit 9 | bits 8..5 | bit 4 | bits 3..0 |
|---|---|---|---|---|
| odd parity over bits 9..0 | first symbol is control | first code / high nibble | second symbol is control | second code / low nibble |

These are the control symbol codes (flag set):

| Symbol | Code |
|---|---|
| Q | 0 |
| I (idle) | 1 |
| H | 2 |
| J | 3 |
| K | 4 |
| T | 5 |
| R | 6 |
| S | 7 |
| L | 8 |

A J K pair is a starting delimiter. It is a cycle header if the next byte is a C1 C2 pair made of
R or S symbols. Otherwise it starts a frame, which is the basic-mode case.

Layout of one cycle, counted in bytes from its J K:

| bytes | content |
|---|---|
| 0 | J K |
| 1 | C1 C2 (R/S symbols) |
| 2 | CS, the cycle sequence number, one more every cycle |
| 3..10 | template P0..P15, two symbols per byte; S = WBC is isochronous, R = WBC belongs to the packet channel |
| 11 | reserved byte, used as the 64 kbit/s management voice channel (MVC) |
| 12..23 | dedicated packet data group (PDG) |
| 24..1559 | 96 cycle groups of 16 bytes. Byte *w* of a group belongs to WBC *w* |
| 1560.. | idle preamble until the next cycle |

A cycle is therefore 1560 bytes plus about 2.5 bytes of preamble, which is 125 µs at 12.5 MB/s.
The **packet channel** is the PDG followed by every packet WBC byte, in stream order. The packet
MAC sees it as one continuous, slower byte stream.

## Inside the H-MUX (`hmux`)

```
 e_rx ──► RCU ──► byte + tag ──┬──► HCU (template, route, registers)
   │                           ├──► ICU ◄──► I-MAC       (isochronous slots)
   │                           ├──► PCU ◄──► FORMAC      (packet slots)
   └──────── by-pass delay ───►TCU ◄───────┘
                                │
                           monitor (optional) ──► e_tx
```

* **RCU** (`hmux_rcu`) registers the byte twice. The first register is a look-ahead: it lets the
  unit see C1 C2 behind a J K. The RCU tags each byte with its place in the cycle: header index,
  PDG, or cycle group and WBC numbers. It also checks:
  * **Parity.**
  * **Cycle sequence.** Each CS must be the previous one plus one.
  * **Cycle timing.** A header that comes before the previous body is complete is an error. So
    is a header that has not come `PA_MAX` = 8 bytes after the end of a body.

  The first recognised header switches the ring to hybrid mode. A missing header switches it back
  to basic mode.
* **HCU** (`hmux_hcu`) decodes P0..P15 into a 16-bit template. A symbol that is neither S nor R
  does not change its channel: the last valid value is kept. A damaged header therefore cannot
  reassign a channel. From the template and the tag, the HCU routes each byte:
  * in hybrid mode, PDG bytes and packet WBC bytes go to the FORMAC, isochronous WBC bytes go to
    the I-MAC, and header and preamble bytes are repeated;
  * in basic mode, every byte goes to the FORMAC.

  The HCU also holds the node processor registers (see below).
* **ICU** (`hmux_icu`) shows every byte to the I-MAC, with ISO-IND, CS-No, CG-No, WBC-No, C-SYNC
  and H-Mode. When the I-MAC raises ISO-REQ, its I-RX byte replaces the ring byte. This only
  happens in a slot the template marks isochronous. A request anywhere else is refused and
  counted as an access violation.
* **PCU** (`hmux_pcu`) passes packet slots to and from the FORMAC. During every other byte it
  holds the FORMAC (HOLD1 for receive, HOLD2 for transmit), so the FORMAC's state is frozen, not
  lost. In hybrid mode a frame inside the packet channel starts with an *in-cycle* delimiter,
  because J K is reserved for cycles. The FORMAC only knows J K. The PCU therefore converts in
  both directions: the in-cycle delimiter on the ring becomes J K towards the FORMAC, and the
  FORMAC's J K becomes the in-cycle delimiter on the ring. The in-cycle delimiter is a register
  with reset value I T. I R, I S or the standard's I L can also be programmed; which one works
  depends on which symbols the ENDEC lets through. A PS-stop bit holds the FORMAC permanently.

  The PCU also detects token capture, because the by-pass rule depends on it. It watches both
  directions of the packet channel for a starting delimiter followed by a token frame control
  byte (`1L000000`). A token that comes in and is not repeated by the FORMAC has been captured.
  A token the FORMAC sends ends the capture. The FORMAC's own TokISD pin is honoured as well.
* **TCU** (`hmux_tcu`) picks the FORMAC byte, the ICU byte or the repeated byte, regenerates
  parity, and registers the result. With *hyb_disable* set it replaces J K and C1 C2 of every
  header with idle, so the stations downstream fall back to basic mode. With the by-pass active
  it sends the raw input through a shift register instead. The shift register has the same
  three-stage latency as the normal path.

**Latency.** A byte sampled from `e_rx` at clock edge *n* leaves on `e_tx` after edge *n*+2.
That is three register stages, in the normal path and in the by-pass alike. The FORMAC and the
I-MAC must answer combinationally, in the clock in which their byte is offered.

## Monitor add-on (`hmux_monitor`)

The monitor sits between the TCU and the ENDEC transmit bus. When the station is not master, it
passes the slave stream through without a register. It only writes the MVC byte when one is
pending. The by-pass latency therefore stays exact.

When the station is master, its output is a freshly generated cycle:

* Each tick of the cycle clock starts a cycle. `sel_cl` picks the source:
  * high: the external 8 kHz clock (`cycle_tick`);
  * low: an internal divider of the byte clock. A cycle is 1562.5 byte clocks, so the divider
    alternates periods of 1562 and 1563 clocks. Every pair of cycles is then exactly 250 µs.
* The header is J K, S R, an incrementing sequence number, the master template written by the
  node processor, and the MVC byte.
* Then come 1548 body bytes, then idle until the next pulse.

The body bytes come from the **latency adjustment buffer**. This is the part that needs the most
care. The ring must be a whole number of cycles long, but the physical fibre is not. The buffer
has one entry per body position (1560 entries of 11 bits):

* **Writes.** Every byte that comes back around the ring and through the slave units is written
  at its *received* position, from the RCU tag.
* **Reads.** The generated cycle reads the buffer at its *generated* position.

So whatever the ring latency is, a byte at position *p* goes out again at position *p* of the next
generated cycle. The ring then looks like a whole number of cycles. One condition applies: reads
and writes of the same position must alternate. In steady state this holds for any ring latency,
because both sides advance one position per clock and the cycle period is fixed. After reset the
buffer clears itself to zero bytes, one entry per clock, for 1560 clocks.

**Changing the template.** Only the master may change the template. A new template from the
node processor waits until the next cycle starts, so no cycle carries a half-changed template.

**Checking the template.** The monitor remembers the template it sent with each of the last 16
cycles, indexed by sequence number. When a cycle comes back round the ring, its template is
compared with the one sent under the same sequence number. A difference sets `tmpl_mismatch`.
This stays correct across template changes and on rings longer than one cycle: 100 km of fibre
alone is about four cycles.

**Watching the master.** A monitor that is not master raises `bid_req` on any sequence or
synchronisation error in the received cycles. That is the trigger for a new bidding process.
The bidding protocol itself is not part of this RTL.

## Isochronous path: I-MAC and CS-MUX

**Steering map.** The I-MAC (`imac`) has one 8-bit entry for each of the 1536 isochronous byte
positions of a cycle, at index = cycle group × 16 + WBC:

| bit 7 | bit 6 | bits 5..4 | bits 3..0 |
|---|---|---|---|
| receive | send | sub-rate *r* | CS channel |

**Channel rates.**
* Several entries with the same channel concatenate into an n × 64 kbit/s channel.
* With *r* > 0, the byte is used only in cycles whose sequence number is a multiple of 2^r.
  This gives channels below 64 kbit/s.

**Data flow.** A received own byte goes to the CS-MUX with its channel number. In an own send
slot, the byte waiting in the CS-MUX for that channel goes out with ISO-REQ.

**Map access.** The node processor writes the map. After reset the map clears itself for 1536
clocks; `init_busy` is high during this time.

**Channel allocation.** The I-MAC counts the send entries of each channel. The result is
`chan_alloc`, which tells which channels own at least one send slot.

The CS-MUX (`csmux`) gives each of its `NUM_CH` = 16 users a one-byte send register and a receive
strobe. A user write is refused and counted as a violation when the channel has no send slot in
the steering map, or when the register is still full. This is the second consistency check; the
first one is in the ICU.

## Dual ring and configuration switch

`fddi2_station` instantiates two complete ring paths: each has an H-MUX with monitor, an I-MAC
and a CS-MUX. Between the ENDEC buses and the H-MUXes sits the `config_switch`. Its register
holds:

* `tx_cross_k` (bits 0, 1): transmitter *k* sends the *other* H-MUX's output. This is how the
  dual ring is folded at a failure.
* `rx_cross_k` (bits 2, 3): H-MUX *k* listens to the other ring's receiver.

Reset gives the normal configuration.

## Register maps

**Slave H-MUX**, 8-bit bus. Writes use `np_we`; reads are combinational.

| addr | register |
|---|---|
| 0 | CTRL: bit0 by-pass request, bit1 suppress cycle control symbols, bit2 PS stop, bit3 alarm enable |
| 1 | in-cycle delimiter {first code, second code}, reset {I, T} |
| 2 | status: bit0 hybrid, bit1 by-pass active, bit2 token held (TokISD or detected capture), bits 3..7 sticky flags: template, sequence, sync, parity, access. Any write clears the sticky flags |
| 3..7 | saturating 8-bit counters: template, sequence, sync, parity, access errors. A write clears the counter |
| 8, 9 | received template, bits 7..0 and 15..8 |
| 10 | received cycle count |
| 11 | alarm threshold: `alarm` rises when any counter reaches it (reset 255) |
| 12 | token captures detected in the packet channel, saturating; a write clears it |

**Monitor**, 32-bit bus.
* Write: bits 15..0 master template, bit 16 master enable, bit 17 clears the flags.
* Read: bits 15..0 template, bit 16 master, bit 18 template mismatch, bit 19 bid request.

## How far to trust it, and where it departs

The functions and how they are split up follow the design:
* the slave units RCU, HCU, ICU, PCU and TCU, and the monitor add-on;
* the interface signal names and bus widths;
* the cycle structure;
* the template fallback, the by-pass rule and the suppression mechanism;
* the programmable in-cycle delimiter;
* the 1536-entry steering map and the two consistency checks.

The design describes these blocks by function only. The following are therefore this RTL's own
choices:
* the symbol encoding and parity, and the grouping of the header into bytes;
* the PDG as 12 contiguous bytes after the header;
* the MVC in the reserved header byte, and C1 C2 = S R;
* the error and mode-detection rules;
* the token capture rule (frame control byte in against out), and the polarity of `sel_cl`;
* the register maps and the steering map entry format;
* the by-pass as a delay line;
* the latency adjustment buffer organisation and the holding registers of the CS-MUX.

The design does not give the meaning of the FORMAC S0-S2 pins, nor of the monitor signals
REC-Tok, M/Sl, M-H1 and M-H2. They are not modelled.

Not included: the FORMAC with its timed-token timers, the ENDEC/EDS, the packet buffer chips, and
the node processor software. This also covers the ring initialisation, the bidding protocol and
the choice between the two reconfiguration strategies. An interface to ATM public networks is only a planned extension
of this design and is not included either. The RTL has not been checked against real
FDDI-II equipment. The test stimuli follow the cycle layout above.

## Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself. Build one with plain Verilator; the package goes first:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fddi2_pkg.sv tb/tb_fddi2_station.sv \
          --top-module tb_fddi2_station -o sim && ./obj_dir/sim
```

| testbench | what it exercises |
|---|---|
| `tb_fddi2_station` | the whole station at default parameters: ring 1 closed through a 7750-byte delay (100 km of fibre and 500 stations, about five cycles) with the station as cycle master on its internal cycle clock, a template change while running, CS bytes carried round the ring between users at 128 kbit/s and at half rate, MVC round trip, a refused CS write, basic-mode frames on ring 2 checked byte for byte, the by-pass, and the wrapped configuration |
| `tb_hmux` | one H-MUX as a ring station: basic frames, hybrid cycles, in-cycle delimiter conversion both ways, I-MAC insertion, refused access, a damaged template, token capture and release, by-pass with equal latency, suppression of cycle control symbols |
| `tb_hmux_rcu`, `tb_hmux_hcu`, `tb_hmux_icu`, `tb_hmux_pcu`, `tb_hmux_tcu`, `tb_hmux_monitor` | the units of the H-MUX |
| `tb_imac`, `tb_csmux`, `tb_config_switch` | the isochronous path and the switch |

The whole station test runs in a few seconds.

To change the design:
* Cycle dimensions live in `fddi2_pkg`.
* `NUM_CH` (CS channels per ring, at most 16) and `PA_MAX` are parameters of `fddi2_station`.
* `MONITOR` selects whether an `hmux` has the monitor add-on.
