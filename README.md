# Polling MAC for power-line communication

This is a data-link (MAC) layer for a power-line network. A master grants
the medium to one slave at a time, so nobody contends for the shared line. Every
frame is protected by two CRCs and every data frame is acknowledged. Lost or
damaged frames are retransmitted under the control of sequence numbers, an
error counter and wait timers. The RTL is a complete network:

- one master;
- three slaves, each with the rings that connect it to the network layer;
- a simple physical layer that carries the frames between them.

A built-in test loads the slaves with traffic for each other and checks
what arrives. Beside the network stands the small two-device set-up used to
bring up the frame path on its own.

The protocol follows L. Lax Cortina, *Implementation and Verification of a
Polling-based MAC Layer Protocol for PLC* (Karlsruhe, 2010). The
SystemVerilog here is a new implementation of that description. Where the
description leaves a choice open, the choice made is stated below and in the
opening comment of each file.

## The frame

Every frame is exactly 64 bytes. It is sent as bytes 0..63, MSB first.

| bits / bytes | field |
|---|---|
| bits 0-11 | source address |
| bits 12-23 | destination address |
| bits 24-27 | frame type |
| bits 28-29 | mode: `00` uplink (slave sends data), `01` downlink (master sends data) |
| bits 30-33 | sequence id |
| bits 34-47 | header CRC, 14 bits, over bits 0-33 |
| bytes 6-7 | payload CRC, 16 bits, over bytes 8-63 |
| bytes 8-63 | payload, 56 bytes |

The frame types are:

| code | type |
|---|---|
| `0000` | POLL |
| `0001` | ACK |
| `0010` | NAK |
| `0011` | RTS |
| `0100` | CTS |
| `0101` | CNE_NAK |
| `0110` | CNE_ACK |
| `0111` | DATA |
| `1110` | TNE ("transfer node end": the slave ends the connection) |

CNE is the coordinator (master) ending the connection: CNE_ACK says the last
data frame was good, CNE_NAK that it was not. Management frames carry zeros
in bytes 6..63.

The generator polynomials are usually quoted as 0x372B (header) and 0xBAAD
(payload). Those numbers are in the notation that leaves out the final +1.
The full polynomials are:

- header: x^14 + ... + 1 = `15'h6E57`;
- payload: x^16 + ... + 1 = `17'h1755B`.

A CRC is the remainder of the message with W zero bits appended. The
receiver divides the message with the received CRC appended instead, and an
intact block leaves a zero remainder. `mac_pkg.sv` holds the field widths,
type and mode codes, polynomials and header struct. Its packed `mac_hdr_t`
is, MSB first, exactly bits 0-33 of the frame.

### Where the final destination goes

Uplink data travels slave → master → slave. The master has to know which
slave a payload is for. The header has no field for this, so this design
carries the 12-bit final address in the low 12 bits of payload bytes 0-1. The
network layer writes it there, and the MAC treats the rest of the payload as
opaque.

## The CRC engine (`crc_serial`)

The CRC unit is deliberately serial and small. It has three registers:

- an auxiliary register that holds the current message byte;
- a (W+1)-bit main register;
- a bit counter.

Its state machine has five states:

1. FETCH asks for a byte whenever the auxiliary register is empty.
2. LOAD takes that byte one clock later, the read latency of a RAM.
3. SHIFT moves the byte's MSB into the LSB of the main register.
4. XOR runs as a separate cycle whenever the main register's MSB became 1, and
   XORs in the polynomial.
5. IDLE.

After the message come W tail bits: zeros to generate a CRC, the received
CRC to check one. The tail can also be left off. The receiver uses that to
check the whole 48-bit header, whose CRC is already in place.

A run takes 1 + 2×bytes + bits + tail + (number of XORs) cycles. For a DATA
payload that is roughly 112 + 448 + 16 + ~230 ≈ 800 cycles. Merging SHIFT
and XOR into one step would about halve this. That is the faster variant the
protocol mentions but does not use, and it is not implemented.

## Transmitter and receiver (`frame_tx`, `frame_rx`)

Master and slaves use the same two blocks. The control block decides which
memory they read or write. It does this by handing them a base address.

**frame_tx** builds the frame directly in the 64-byte output memory:

1. Header bytes 0-3 are written as the header CRC engine fetches them.
2. The 14-bit CRC is written into byte 4 (after the last two sequence bits)
   and byte 5.
3. For DATA, bytes 6-7 are skipped at first. The payload streams from the
   data memory through the payload CRC engine into bytes 8-63, and the CRC
   is then written into 6-7. Because the output memory is random-access, no
   second pass is needed.
4. Management frames get zeros in 6-63.

Building takes about 150 cycles for a management frame and about 900 for a
DATA frame.

**frame_rx** checks a frame in the input memory:

1. It divides the 48 header bits and decodes the header.
2. It checks the payload only if the header is good, the frame is DATA and
   it is addressed to this device.
3. It reads the route field (bytes 8-9) first. The control block then
   answers with `wr_base`, the ring slot to use.
4. It streams the payload straight into that slot while the CRC runs.

The slot only counts as filled when the control block advances its ring
pointer. That happens after a good CRC, so a bad frame is overwritten later
and never seen by anyone.

## Devices and memories

```
             +--------------------- plc_network ---------------------+
             |  phy_bus: copies 64 bytes from the sender's output    |
             |  memory into every other device's input memory        |
             |     |              |               |             |    |
             |  mac_master    mac_slave[0]    mac_slave[1]  mac_slave[2]
             |  ctrl+tx+rx    ctrl+tx+rx      ...                    |
             |  in/out 64 B   in/out 64 B                            |
             |  store: 3 rings tx ring, rx ring  <- network layer ports
             |                                      (or result_checker) |
             +--------------------------------------------------------+
             |  arq_pair (separate): button -> A -> B -> A -> LEDs   |
             +--------------------------------------------------------+
```

**Master** (`mac_master`): one ring per slave holds payloads waiting for that
slave. Each ring has RING_FRAMES slots of 56 bytes, and all rings share one
RAM.

**Slave** (`mac_slave`): two rings face the network layer.

- The transmit ring: the network layer writes a payload at `nl_tx_base` and
  pulses `nl_tx_commit`.
- The receive ring: the network layer reads at `nl_rx_base` and pulses
  `nl_rx_release`.

`nl_tx_count` and `nl_rx_count` tell it how full they are.

Every ring keeps one slot free. This lets a payload being received go
straight into the next slot without touching unread data. A ring therefore
holds RING_FRAMES−1 payloads. A DATA frame that arrives for a full ring is
refused as a wrong frame. The sender retries it later.

RING_FRAMES = 24 is derived from the reported memory use of the reference
FPGA build. 114,688 bits is 224 frames of 64 bytes. That is the eight 64-byte
input and output memories of four devices plus nine rings of 24 frames.

**Physical layer** (`phy_bus`): a shared medium without line coding.

- When a device raises `tx_req`, the bus copies the 64 bytes, one per clock,
  into the input memories of all other devices.
- It then pulses `rx_valid` to each receiver and `tx_done` to the sender.
- A transfer takes 66 cycles from request to `tx_done`.
- Devices read every frame and discard those not addressed to them.
- Three test inputs can lose a frame or flip one bit of it: `inj_drop`,
  `inj_flip` and `inj_byte`. Tie them low in normal use.

## The polling cycle (`master_ctrl`)

The master works through all slaves in uplink mode, then all slaves in
downlink mode, and repeats. A downlink slot is skipped when the master holds
nothing for that slave.

In each connection:

1. **Open.** The master sends POLL, with the mode in the header, and waits
   for an answer:
   - CTS: downlink, the slave is ready.
   - RTS: uplink, the slave has data.
   - TNE: the slave has nothing to send or cannot talk.
2. **Uplink.** The master answers RTS with CTS. Each good DATA frame is
   stored in the ring of the slave named in its route field and answered
   with ACK.
3. **Downlink.** The master sends DATA from the slave's ring and waits for
   ACK. After each ACK, "increment data" retires the slot and sends the next
   frame. When the ring is empty, the master closes with CNE_ACK.
4. **Close.** A TNE from the slave is answered with CNE_NAK, and the next
   connection follows at once. When the master closes on its own
   initiative, it sends CNE and enters *long wait*. Long wait ends when the
   slave's TNE arrives or after LONG_WAIT cycles. Without it, a lost closing
   frame would leave the slave still talking while the master polls someone
   else.

A frame is accepted only if all of these hold:

- the header CRC is good;
- the destination is the master;
- the source is the polled slave;
- the mode is the connection's mode;
- for DATA, the payload CRC is good.

A frame with a good header for some other device is ignored.

### Error recovery: the part that needs care

The same rules run in master and slave.

- **Error counter.** A wrong frame or an expired wait timer counts one
  error, and a correct frame clears the count. The first error triggers a
  repair and the second closes the connection:
  - the master sends CNE_NAK;
  - the slave sends TNE.
- **Repair.** The repair depends on how far the connection got.
  - If nothing has been received yet, the last frame is sent again: POLL,
    CTS, RTS or DATA.
  - The resent frame is **not rebuilt**. It is still in the output memory,
    so only the physical layer is asked again.
  - If data has already been received, the receiver sends NAK instead.
  - A NAK or timeout on the sending side makes the sender repeat the same
    DATA frame, again from the output memory.
- **Two wait timers.** HDR_TIMEOUT = 2048 cycles applies while a header-only
  frame is expected, and FULL_TIMEOUT = 4096 while a DATA frame is expected.
  - They stop counting while the receiver is still checking a frame, so a
    slow CRC check is never mistaken for silence.
  - Both are far above the longest legitimate gap of about 1,100 cycles.
- **Time per connection.** CONN_TIME = 40,000 cycles in the master, about 35
  data frames.
  - When it runs out during an uplink, the next DATA frame decides how the
    connection closes: CNE_ACK if that frame is good and stored, CNE_NAK
    otherwise.
  - During a downlink, the next answer does. After an ACK the slot is still
    retired, and the master closes with CNE_NAK either way.
- **Sequence ids** (4 bits).
  - DATA frames are numbered from 0 in every connection.
  - ACK, NAK and CNE carry the number of the next DATA frame the receiver
    expects.
  - A DATA frame carrying the *previous* number means the receiver's ACK was
    lost. The frame is acknowledged again but not stored a second time.
  - An ACK with the wrong number counts as a wrong frame.
- **CNE_ACK vs CNE_NAK at the slave.** A slave that is waiting for an ACK and
  receives CNE_ACK retires its outstanding frame. CNE_NAK keeps the frame,
  and it is sent first in the next connection.

**Delivery is at-least-once, not exactly-once.** Suppose an uplink ACK is
lost and the connection then closes. The slave never learned that its frame
arrived, so it sends the frame again in the next connection, where sequence
numbers restart. The payload is then delivered twice. The protocol takes
this deliberately: a lost ACK must never lose data. A network layer that
needs exactly-once delivery must number its payloads itself. In the
end-to-end test, 44 disturbed frames caused 3 such repeats among 90
payloads.

## Slave control (`slave_ctrl`)

The slave waits for a POLL addressed to it and then answers by mode:

- downlink: CTS;
- uplink with data queued: RTS;
- uplink with nothing queued: TNE.

From there it mirrors the master:

- **Downlink.** The slave stores DATA in the receive ring and answers ACK.
  A repeat is re-ACKed, an error is answered with NAK, and before any data
  the CTS is resent.
- **Uplink.** After CTS, the slave sends DATA from the transmit ring. An ACK
  retires the slot through "increment data". After the last frame it sends
  TNE.
- **Master closes.** A CNE from the master is answered with TNE, and the
  slave returns to listening at once.
- **Slave closes.** When the slave itself ends the connection, it waits in
  *close wait* for the master's CNE, or for LONG_WAIT cycles.

## Two-device frame test (`arq_pair`)

This set-up predates the control blocks. Two devices with only transmitter,
receiver and memories are linked by a `phy_bus`, and one button drives the
test.

1. A push makes A send a header-only frame with random fields, from a 64-bit
   LFSR.
2. B checks only the header CRC and answers ACK or NAK.
3. A lights `led_a` on an ACK or `led_b` on a NAK.

On the first push after reset, A overwrites the CRC field with random bits,
so the answer must be NAK. Later pushes send a correctly calculated CRC and
must get ACK. A push takes about 1,080 cycles, and the LEDs hold until the
next push. At the top it appears as `arq_button`, `arq_led_a`, `arq_led_b`
and `arq_busy`.

## Built-in network test (`result_checker`)

The top also contains a self-test that needs nothing but a button and two
LEDs. A push on `test_button` hands the slaves' network-layer ports, and the
master's `enable`, to the checker until the next reset. The test then runs in
four steps.

1. **Load.** The checker writes two payloads from every slave to every other
   slave into the transmit rings. Each payload carries its destination in
   bytes 0-1, its source in byte 2 and its copy number in byte 3. The
   remaining bytes follow a formula of all three.
2. **Run.** The checker lets the master poll. The uplink round collects the
   payloads, and the downlink round delivers them.
3. **Wait.** The checker waits until every receive ring holds the four
   payloads meant for it.
4. **Check.** The checker reads each payload back, byte by byte, and
   compares it with the formula. Bytes 2-3 identify the payload, so the
   arrival order does not matter. A bitmap catches a payload that arrives
   twice or never.

`test_led_a` lights for a pass. `test_led_b` lights for any difference, or
when the rings have not filled within 1,000,000 cycles. On a clean line the
verdict comes about 58,000 cycles after the push.

The check assumes a clean line. Under line errors the protocol may repeat a
payload (see above), and the checker counts a repeat as a failure.

## Parameters

| parameter | default | meaning |
|---|---|---|
| N_SLAVES | 3 | slaves on the network (addresses 0x001..N) |
| RING_FRAMES | 24 | slots per ring; one stays free |
| HDR_TIMEOUT | 2048 | cycles to wait for a header-only frame |
| FULL_TIMEOUT | 4096 | cycles to wait for a DATA frame |
| CONN_TIME | 40000 | cycles per connection (master) |
| LONG_WAIT | 2048 | closing wait, master and slave |

The master's address is 0x000 and slave *i*'s is 0x001+*i*. The two
arq_pair devices use 0x001 and 0x002 on their own link. The timer values are
this design's choices; the protocol gives none. The clock is a single
clock, and `rst_n` is an asynchronous active-low reset.

## Departures from the protocol description

- **Payload size.** The ring pointer step is once quoted as 54 bytes. The
  frame format leaves 56 payload bytes, and 56 is used.
- **Appended zeros.** The CRC description once speaks of appending W−1
  zeros. Standard division with W zeros is used, which makes the CRC the
  usual remainder.
- **Header CRC width.** The header CRC is once described as filling 12 bits.
  It is 14 bits everywhere else, and 14 is used.
- **End of uplink data.** When a slave's uplink data runs out, the
  description has it send "a CNE". CNE is the master's frame, so the slave
  sends TNE, as it does in every other case where it ends a connection.
- **Own choices.** The route field in the payload, the sequence-number rule,
  the one-free-slot rings, refusing frames for a full ring, timer values and
  pausing timers during a check are all this design's choices. The
  description does not settle them.
- **Result check.** The result checker compares every byte of every payload.
  The original test block compared a sample of addresses only.
- **Not implemented.**
  - The improvements the description proposes only as future work:
    - per-slave failure counters;
    - a connection time that adapts per slave;
    - changing the mode inside a connection;
    - variable-length frames;
    - faster CRC variants, either the merged shift/XOR step or a table
      lookup.
  - The starter-kit board itself (buttons, LEDs and pin assignment).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, ends with `$finish`, and has a watchdog.
`tb_mac_ref.sv` is an independent reference:

- a textbook LFSR CRC;
- a frame assembler that builds the expected 64 bytes.

| testbench | what it shows |
|---|---|
| tb_crc_serial | generation and checking for both polynomials against the reference, for random lengths and data; corrupted blocks are detected; exact cycle count |
| tb_byte_ram | one-cycle read latency, hold, read-before-write |
| tb_frame_tx | byte-exact frames of every type, with random headers and payloads |
| tb_frame_rx | header decode and both CRC verdicts on good and corrupted frames; route field; payload written at `wr_base` |
| tb_phy_bus | copies to every other device, signalling, priority, drop and flip, 66-cycle transfer |
| tb_mac_master | the testbench plays three slaves. It runs a scripted set of uplinks, downlinks, NAKs, timeouts (gap checked), duplicates, full rings, bad routes, frames from the wrong slave, error closes, long waits and the connection time limit. Every frame is compared byte for byte and every master event must occur. |
| tb_mac_slave | the testbench plays the master and the network layer: empty uplink, retransmission, error close, close wait, CNE_ACK retiring a frame, downlink with duplicate, NAK, full ring and timeouts; received payloads are read back |
| tb_arq_pair | first push gives NAK and a random CRC; later pushes give ACK and a correct CRC; answer frames are byte-exact |
| tb_result_checker | the built-in test inside the full network. A clean run must pass, with every payload read back. A run with one payload byte flipped during read-back must fail. A run with every frame dropped must fail after the timeout. |
| tb_plc_network | the whole network at default parameters. Each slave queues 30 payloads for other slaves, and one slave holds its receive ring full for a while. A fixed schedule drops or corrupts 44 frames of all kinds. Every payload must arrive intact at its destination, repeats may not outnumber disturbed frames, all 14 master and 12 slave mechanisms must occur, the frame-test LEDs must answer 4 pushes, and the built-in result checker must pass once and then fail once with corrupted read data. About 610,000 cycles. |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_mac_ref.sv tb/tb_plc_network.sv --top-module tb_plc_network
./obj_dir/Vtb_plc_network
```

Replace `tb_plc_network` with any other testbench name. The RTL uses
`always_ff`/`always_comb`, packed structs and enums, and a few concurrent
assertions. One assertion checks that a transmit request is held until it is
served.

Lint warnings that remain are intentional:

- **Unconnected `busy` outputs.** The control blocks use `done` pulses
  instead.
- **`rst_n` used in assertion `disable iff`.** This shows up as a mixed
  synchronous/asynchronous net.
- **An unused high bit of the master's route index.**
