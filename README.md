# CRC-32 error detection and stop-and-wait ARQ over a virtual socket (IEEE 802.16 MAC)

This RTL models a WiMAX base station (BS) and a subscriber station (MS)
exchanging MAC PDUs over a noisy channel. It keeps the data intact with two
mechanisms:

* **Error detection.** Every downlink PDU carries a CRC-32 after its payload.
  The receiver recomputes the CRC and compares it with the received field.
* **Error correction by repetition.** The receiver answers every PDU with an
  ARQ feedback PDU, either an ACK or a NACK. The transmitter retransmits the
  same packet until it is acknowledged (stop and wait).

There is no physical layer and no network socket. The stations talk through a
**shared memory**, the "virtual socket". A **channel** agent sits between
them and does two jobs: it corrupts downlink PDUs at random, and it schedules
whose turn it is by means of control flags in the same memory. Each station
computes its CRCs with a **memory-mapped CRC hardware module**. The station
loads the bytes into the module over AHB, starts it, and is interrupted when
the result is ready.

The design this follows was an electronic-system-level model: C programs on
three ARM cores, with the CRC module as the only hardware. Here the three
programs are also hardware state machines, so the whole exchange runs as
synthesizable RTL.

## Structure

```
                        wimax_edc_top
  +-----------------+        +--------------------+        +-----------------+
  | bs_station      |  port0 | vsock_mem          |  port2 | ms_station      |
  |  builds PDU,    |<------>|  System Ctrl Flags |<------>|  checks CRC,    |
  |  decodes ARQ    |        |  Socket Ctrl Flags |        |  builds ARQ PDU |
  +--------+--------+        |  TX_Buffer (UL)    |        +--------+--------+
     AHB   |  ^ irq          |  RX_Buffer (DL)    |           AHB   |  ^ irq
  +--------v--+--+           |  TX_RX_Buffer      |        +--------v--+--+
  | crc_accel    |           |  round-robin arb.  |        | crc_accel    |
  +--------------+           +---------^----------+        +--------------+
                                       | port1
                              +--------+--------+
                              | channel_model   |
                              |  error model +  |
                              |  scheduler      |
                              +-----------------+
```

| file | role |
|---|---|
| `rtl/wimax_pkg.sv` | address map, register offsets, system states, bus structs, CRC/HCS byte steps, ARQ PDU builder |
| `rtl/crc32_engine.sv` | CRC-32 register that folds 1 to 4 bytes per clock |
| `rtl/crc_accel.sv` | the CRC hardware module: AHB-Lite slave, registers, Input_Buffer, sequencer, interrupt |
| `rtl/vsock_mem.sv` | shared memory with five regions and a round-robin port arbiter (`rtl/rr_arbiter.sv`) |
| `rtl/bs_station.sv` | base station controller |
| `rtl/ms_station.sv` | subscriber station controller |
| `rtl/channel_model.sv` | error model and scheduler |
| `rtl/mem_port_master.sv`, `rtl/ahb_lite_master.sv` | small helpers that turn a controller's held command into one memory-port or AHB transfer |
| `rtl/wimax_edc_top.sv` | the system |

## Address map

The shared memory and the CRC module use the design's memory map:

| base | region | use here |
|---|---|---|
| `0x7000_0000` | System Ctrl Flags | word 0: system state (written only by the channel) |
| `0x7001_0000` | Socket Ctrl Flags | word 0 DL-ready (PDU length), word 1 UL-ready (ARQ PDU length), word 2 BS-done (bit0 decoded, bit1 last packet acknowledged) |
| `0x7002_0000` | TX_Buffer | uplink: ARQ feedback PDU from MS to BS |
| `0x7003_0000` | RX_Buffer | downlink: data PDU from BS to MS; the channel corrupts it here |
| `0x7004_0000` | TX_RX_Buffer | mapped, unused |
| `0x7006_0000` | Hardware Module | the CRC module (one per station, on its own AHB link) |

Every region is 64 KB. The flag regions hold 4 registers each and read 0
elsewhere. Memory words are little-endian: byte *k* of a PDU sits in lane *k* mod 4
of word *k*/4.

## The CRC module (`crc_accel`)

This is the hardware part that the design specifies most closely. It is an
AHB slave with a register table and an interrupt output:

| offset | register | access | meaning |
|---|---|---|---|
| `0x0400` | CRC_enable | RW | write 1 to start; reads 1 while busy; clears itself at the end |
| `0x0500` | CRC_done | RW | set when the result is ready; drives `INTRP`; write 0 to clear |
| `0x0600` | CRC_length | RW | number of bytes to process |
| `0x1000` | Input_Buffer | RW | 1024 words (`INBUF_WORDS`), filling the 4 KB up to the next register |
| `0x2000` | Output_Buffer | RO | CRC result |

The software protocol works as follows:

1. Write the data words into Input_Buffer.
2. Write the byte count to CRC_length.
3. Write 1 to CRC_enable.
4. Wait for `INTRP`.
5. Read Output_Buffer.
6. Write 0 to CRC_done.

Inside, a sequencer reads one buffer word per clock into `crc32_engine`. A
last partial word passes only its valid bytes. A CRC over *L* bytes
takes ceil(*L*/4)+2 clocks from the CRC_enable write to CRC_done. The bus
side has zero wait states and always answers OKAY. It supports only word
transfers, and an assertion enforces that.

**Which CRC-32.** The variant has generator `0x04C11DB7`, a register preset to
all ones, and bits taken LSB first (the reflected form, `0xEDB88320`). The
output is **not** inverted at the end. This variant reproduces a reference
frame published with the design: the 15 bytes
`10 00 06 00 00 00 00 00 00 FF FF 9F FC 80 00` give `0x807533C7`. The
standard IEEE 802.16 / Ethernet CRC-32 is the one's complement of that value
(`0x7F8ACC38`). To get the standard CRC, set the `FINAL_XOR` parameter to
`32'hFFFFFFFF`. The stations append the CRC most significant byte first, as in
that frame. The standard itself appends the inverted value LSB first.
Transmitter and receiver only have to agree on this choice, and here they do.

## PDU formats

**Downlink data PDU** (`PAYLOAD_BYTES` + 10 bytes):

| bytes | content |
|---|---|
| 0-5 | generic MAC header: HT=0, EC=0, Type=0, CI=1 (CRC present), EKS=0, LEN (11 bits, whole PDU), CID, HCS |
| 6-7 | sequence number, big-endian |
| 8.. | payload pattern `((seq*37 + j*11) mod 256) ^ 0xA5` for payload byte *j* |
| last 4 | CRC-32 over everything before it, MSB first |

HCS is the 802.16 header check: a CRC-8 with generator x^8+x^2+x+1 and preset 0,
taken over header bytes 0-4.

**Uplink ARQ feedback PDU** (17 bytes):

| bytes | content |
|---|---|
| 0-5 | generic MAC header, LEN=17 |
| 6 | management message type 33 (ARQ-Feedback) |
| 7-8 | CID |
| 9-10 | LAST=1, ACK type=0, BSN (11 bits) = sequence number, 2 zero bits |
| 11-12 | `0x8000` ACK, `0x0000` NACK |
| 13-16 | CRC-32, MSB first |

An ACK for CID `FFFF` and BSN `7FF` therefore reads `FF FF 9F FC 80 00`, which
matches the reference frame's feedback element. The NACK encoding is this
design's own choice.

## One packet, step by step

The channel owns the system state:
`IDLE -> BS_TX -> MS -> BS_RX -> BS_TX ... -> DONE`. The stations poll the
state word through the shared memory. When a station finishes its phase, it
raises a socket flag. The channel clears that flag and moves the state on.

1. **BS_TX.** The base station copies header and payload into its CRC module
   and waits for the interrupt. It then writes the complete PDU, with the
   CRC, into RX_Buffer and writes its length to DL-ready.
2. **Channel.** The channel draws a number from 0 to 99 from a xorshift32
   generator. If the number is below `ERR_PERCENT`, the channel flips one
   random bit inside the PDU in RX_Buffer. It then sets the state to MS.
   One flipped bit is always caught by CRC-32. The uplink is never corrupted.
3. **MS.** The subscriber station reads the length from the header, then
   copies the PDU word by word through its CRC module. It compares the
   computed CRC with the received one. On a match it sets `rx_array[seq]`.
   Either way it builds an ACK or NACK PDU, has its CRC computed by the same
   module, writes it to TX_Buffer, and raises UL-ready. It then waits for the
   state to leave MS, so that it answers only once.
4. **BS_RX.** The base station reads the ARQ PDU. An ACK whose BSN equals the
   current sequence number advances to the next packet; anything else
   retransmits the same packet. The BS then writes BS-done. Bit1 of BS-done
   marks the last packet, and on it the channel ends in DONE.

## Top-level interface and parameters

`wimax_edc_top` has `clk`, an active-low asynchronous `rst_n`, and `start`, a
one-clock pulse. `done` rises after the last acknowledgement. The counters
`tx_count`, `retx_count`, `acked_count`, `dl_count`, `err_count`,
`crc_ok_count` and `crc_err_count` report the session. `rx_array` shows which
packets arrived intact. `sys_state` is the state word. `bus_contention`,
`bs_crc_irq` and `ms_crc_irq` expose the arbiter and the interrupts.

| parameter | default | meaning |
|---|---|---|
| `NUM_PACKETS` | 10 | packets in a session |
| `PAYLOAD_BYTES` | 125 | payload size (1000 bits; must be at least 2) |
| `ERR_PERCENT` | 40 | probability that a downlink PDU is corrupted |
| `SEED` | `32'h2545F491` | error-model seed (nonzero) |
| `BUF_WORDS` | 16384 | words per shared-memory buffer (64 KB) |
| `INBUF_WORDS` | 1024 | words in each CRC module's Input_Buffer |

A PDU must fit both the CRC module's Input_Buffer (4 KB) and the 11-bit LEN
field. So `PAYLOAD_BYTES` can be at most 2037.

At the defaults, a 10-packet session with 3 corrupted PDUs takes about 6,700
clocks. With payloads of 10, 100 and 1000 bits (2, 13 and 125 bytes), sessions
took about 1,900, 2,700 and 10,400 clocks in simulation. Those sessions used
different seeds and so had different numbers of retransmissions. These
numbers measure this hardware only. They cannot be compared with cycle counts
of the processor-based model.

## Departures from the original system and open points

* **Processors and software.** In the original system the BS, MS and channel
  were C programs on three ARM cores, on an AMBA bus with an interrupt
  controller. Here they are hardware controllers. Each station reaches its own
  CRC module over a point-to-point AHB-Lite link, and the interrupt line
  goes straight to the controller. No processor, bus matrix or interrupt
  controller is included.
* **Hardware CRC only.** The original system also had "no CRC" and "software
  CRC" configurations for comparing simulation time. Only the
  hardware-module configuration exists here.
* **Protocol details.** The control flags, the state encoding, the flag
  handshake, the payload contents and the NACK encoding are not specified by
  the original. So are the error generator, the single-bit error and the
  default error rate. All of these are this design's own choices.
* **CRC variant.** The CRC omits the final inversion so that it matches the
  published example; see "Which CRC-32" above.
* **ARQ frame length.** The reference ARQ frame is 19 bytes, with an
  unexplained 9-byte prefix. Here the frame is 17 bytes: the standard 6-byte
  header plus a type byte.
* **Not modelled.** The rest of the 802.16 MAC is not modelled: fragmentation,
  packing, subheaders, the scheduler, bandwidth requests and handover.
* **Robustness limits.** The BS does not check the CRC of the uplink frame,
  because the uplink has no error model. The MS trusts the LEN field,
  clamped to at least 12 bytes, so a corrupted LEN makes it read a longer or
  shorter PDU. The CRC still catches that.

## Simulation

Each testbench in `tb/` checks its unit against independent reference models
in `tb/tb_ref_pkg.sv`. The reference CRC-32 is MSB-first, working on
bit-reversed bytes. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/wimax_pkg.sv tb/tb_ref_pkg.sv tb/tb_wimax_edc_top.sv \
  --top-module tb_wimax_edc_top -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_crc32_engine` | published example, 200 random messages in random 1-4 byte chunks |
| `tb_crc_accel` | full register protocol, read-back, exact latency, busy flag, interrupt clear |
| `tb_vsock_mem` | three concurrent random masters, read latency, grant fairness (at most 2 clocks), unmapped reads |
| `tb_bs_station` | PDUs compared byte for byte; NACK and wrong-BSN ACK both cause retransmission |
| `tb_ms_station` | intact PDUs and PDUs with payload, CRC or LEN bit errors; the ARQ PDU compared byte for byte; one answer per phase |
| `tb_channel_model` | 200 rounds: at most one flipped bit, inside the PDU; flags cleared; error rate near 40 % |
| `tb_wimax_edc_top` | full system at default parameters; every corruption detected and retransmitted; legal state sequence; each mechanism (corruption, CRC mismatch, retransmission, both interrupts, memory contention) seen at least once |
| `tb_workloads` | 10-, 100- and 1000-bit payload sessions side by side |
