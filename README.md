# Cycle-by-cycle FPGA emulation over Ethernet

This RTL puts a design under verification (DUV) on an FPGA so that a host computer can
step it one clock cycle at a time and read back any signal after every cycle. It is
meant to give the observability of a simulation to a design running in hardware. Each
DUV input is fed through a scan cell. Each DUV output, and each internal signal you
want to watch, goes through a second kind of scan cell. The DUV clock is not free-running:
the emulator makes one clock pulse per stimulus. The host sends a stimulus in a UDP
packet. The FPGA loads it into the DUV inputs, gives one DUV clock pulse, captures the
observed signals, and sends them back in a UDP packet. The host turns the stream of replies
into waveforms.

The DUV is not modified. Internal signals become observable because they are promoted
to extra top-level outputs, named `annotated_<instance>_<signal>`. No logic is inserted
into its paths. The price is speed: one network round trip per DUV clock cycle. The
design supports one DUV clock domain.

The architecture follows a published generic FPGA emulation framework:

- the three layers;
- scan cells in sets of 32;
- master-slave output cells;
- the per-stimulus clock sequence;
- UDP with a sequence number and a CRC.

Where that description stops (packet formats, command encoding, handshakes, reset
values), the choices are this design's own. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Layers

```
  MAC byte streams
        |                 ^
   comm_rx            comm_tx          communication layer: UDP/IPv4/Ethernet,
        |                 ^                                 sequence number + CRC-32
   adapt_rx  ------>  adapt_tx         adaptation layer: bytes <-> 32-bit words,
        |   (reply header) ^                              commands, configuration
        v                  |
   +---------------- duv_layer -----------------+
   | scan_in_chain -> [ DUV ] -> scan_out_chain |   DUV layer
   |        duv_ctrl (sequencer, DUV clock)     |
   +--------------------------------------------+
```

| module | role |
|---|---|
| `emu_top` | Wires the layers around the example DUV `dpth`. |
| `comm_rx` | Filters frames for this board's MAC, IP and UDP port. Checks the CRC. Buffers the data bytes (1472-byte buffer). Keeps the sequence number and the sender's address. Counts good, CRC-failed and otherwise dropped frames. |
| `comm_tx` | Buffers the reply. Builds the Ethernet/IPv4/UDP headers, including the IPv4 checksum. Echoes the sequence number and appends the CRC-32. |
| `crc32` | Byte-serial Ethernet CRC-32 (reflected polynomial 0xEDB88320, preset to all ones, result inverted). |
| `adapt_rx` | Reads the payload, packs 4 bytes per word (first byte in bits 31:24) and decodes the command. Holds the run-time configuration. Feeds stimulus words to the DUV layer. |
| `adapt_tx` | Buffers the header and result words in a FIFO (`sync_fifo`). Serializes them to bytes. Signals `done` and waits for `ack`. |
| `duv_layer` | Holds the scan chains and the sequencer. Contains the DUV clock multiplexer. |
| `duv_ctrl` | Sequencer for one stimulus: load, clock pulse, capture, unload. |
| `scan_in_chain`, `scan_in_cell` | Input scan chains. |
| `scan_out_chain`, `scan_out_cell` | Master-slave output scan chains. |
| `dpth` | Example DUV. |
| `emu_pkg` | Shared constants, opcodes and the CRC byte step. |

## The scan chains

**Input cell.** Each input cell has one flip-flop on the system clock `ckT`. When `ce` is
high, the flip-flop takes `sin`, so a chain of cells shifts one position per cycle. A
multiplexer drives the DUV input: the flip-flop when `test_mode` is high, the FPGA pin
when it is low.

**Sets.** Cells are grouped in sets of 32, so the adaptation layer stores one 32-bit word
per cycle. Bit *b* of every set belongs to chain *b*. A DUV with 420 inputs therefore
needs 14 sets and 14 cycles to load. Input `32*s + b` is set *s*, bit *b*.

**Loading order.** The host sends the word for set 0 first. Each new word enters set
`n_in-1` while the older words move one set towards set 0. After `n_in` words, word *k*
sits in set *k*. The entry set depends on the configured length, so a chain configured
shorter than its built size still lines up at set 0.

**Output cell.** Each output cell has a master flip-flop (`ce_m`), which samples the
observed signal at the end of a DUV cycle. A multiplexer (`ctrl`) feeds the slave
flip-flop (`ce_s`) with either the master (parallel load) or the previous cell (shift).
The slaves of set 0 are the word the adaptation layer reads. The words come out in set
order 0, 1, 2, …

Because the word being shifted lives in the slaves, the masters are free to capture
again. This design does not overlap the two, however: it unloads completely after every
DUV cycle.

## One stimulus, cycle by cycle

`duv_ctrl` runs this sequence for every `OP_STIM` request:

| step | ckT cycles | what happens |
|---|---|---|
| load | `n_in` | `data_av_i` and `data_i` shift one word per cycle into the input chains |
| clock high | `clk_high` (default 8) | `ckDUV` is high; the DUV registers switch on its rising edge |
| clock low | 1 | `ckDUV` falls |
| capture | 1 | every output master samples its signal |
| slave load | 1 | every slave takes its master |
| unload | `n_out` | `data_o` shows one set per cycle; `data_av_o` is high and `data_last_o` marks the final word |

The first result word appears `clk_high + 4` cycles after the cycle of the last
stimulus word. `ckDUV` is a register output, so its edges follow `ckT` rising edges.

`ckDUV` leaves `duv_layer` through a multiplexer. With `test_mode` high it is the
generated pulse. With `test_mode` low it is `ckT` itself, and the DUV inputs come from
the pins: the DUV then runs free, as in a plain prototype.

## Host protocol

Every UDP payload, in either direction, has this layout (big-endian):

```
  sequence number (32) | command word (32) | data words (32 each) | CRC-32 of everything before it (32)
```

The board accepts any sequence number and copies it into the reply. The host matches
replies to requests by sequence number and checks the CRC. A frame is dropped without a
reply, and counted, in any of these cases:

- its CRC is wrong;
- it is not addressed to this board's MAC address, IP address or UDP port;
- it is not IPv4 (or has IPv4 options) or not UDP;
- the MAC flags it;
- it arrives while the previous request is still in the buffer.

The UDP length field marks the end of the payload, so Ethernet padding is ignored.

Command word, bits 31:24 select the command:

| opcode | fields | effect | reply |
|---|---|---|---|
| `0x01` CFG | `[23:16]` input sets, `[15:8]` output sets, `[7:0]` clock-high cycles | set the run-time lengths (clamped to 1..built size) and the `ckDUV` width (0 becomes 1) | the command word |
| `0x02` STIM | one word per input set, set 0 first | one DUV clock cycle; a short stimulus is zero-filled and extra words are ignored | the command word, then `n_out` result words, set 0 first |
| `0x03` MODE | `[0]` test_mode | 1 = emulation, 0 = free-running on `ckT` with pin inputs | the command word |
| other | — | nothing | the command word |

After reset the configuration is all built sets, a clock-high width of 8 and emulation
mode.

The host must wait for each reply before it sends the next request. The receive
buffer holds one request, and the reply goes to the address of the request most recently
accepted.

## The example DUV and how to replace it

`dpth` has the port list of the classic signal-promotion example: operands `input1` and
`input2` (64 bits each), a 64-bit result, and three promoted internal signals. Those are
`annotated_dpth_x1`, `annotated_dpth_x2` (the operand registers) and
`annotated_dpth_control_enable`. The result port is called `result` because `output` is
a keyword.

It is a two-phase adder:

- while `enable` is low, it loads the operand registers;
- while `enable` is high, it adds them into the result;
- `enable` toggles on every clock.

In `emu_top` the DUV inputs (129 bits, 5 sets) and the observed signals (193 bits,
7 sets) are mapped as follows:

| bits | DUV inputs | observed signals |
|---|---|---|
| 63:0 | `input1` | result |
| 127:64 | `input2` | x1 |
| 128 | `reset` | — |
| 191:128 | — | x2 |
| 192 | — | enable |

The result also drives the `result_pins` outputs.

To emulate another design:

1. Promote its internal signals to outputs.
2. Set `N_IN` and `N_OUT` in `emu_top`.
3. Connect its inputs to `duv_in`, its outputs to `duv_out`, and its clock to `ckDUV`.

Nothing else in the layers depends on the DUV.

## Resources and sizes

| parameter | default | where |
|---|---|---|
| `N_IN` of `duv_layer` / `scan_in_chain` | 420 (14 sets) | standalone blocks |
| `N_OUT` of `duv_layer` / `scan_out_chain` | 193 (7 sets) | standalone blocks |
| DUV inputs / observed bits in `emu_top` | 129 / 193 | set by the example DUV |
| `BUF_BYTES` (`comm_rx`, `comm_tx`) | 1472 | largest UDP payload in a 1500-byte Ethernet frame |
| `clk_high` | run-time, 1..255, default 8 | — |

The payload buffer limits a stimulus to (1472 − 12) / 4 = 365 input sets.

## Departures and own choices

These parts of the architecture follow the published framework:

- the three layers;
- scan cells in sets of 32 with a pin/scan multiplexer under `test_mode`;
- master-slave output cells with `ceM`, `ctrl` and `ceS`;
- the event order load → clock rises → clock high for a configurable number of cycles → clock falls;
- the 8-cycle default;
- 32-bit words built from four bytes;
- UDP with a sequence number and a CRC;
- configurable chain lengths and clock width;
- the trace signal names `data_i`, `data_av_i`, `data_o`, `data_av_o`, `en_in`, `rden_out`, `rx_data`, `wr_en`, `done`, `ack` and `data_comet`.

The following are this design's own choices:

- the payload layout;
- the CRC-32 flavour;
- the command opcodes and field widths;
- the MODE command;
- zero-filling of short stimuli;
- the length-dependent entry set of the input chain;
- the separate capture and slave-load cycles;
- the handshakes between the layers;
- the FIFO depth;
- all reset values;
- the header values of transmitted frames (identification 0, don't-fragment, TTL 64, UDP checksum 0);
- the behaviour of the example DUV.

The following are not included:

- **Ethernet MAC and MII interface.** These are the FPGA's hard IP. The MAC's receive
  and transmit byte streams are ports of `emu_top`. The MAC is expected to strip or add
  the preamble and FCS and to pad short frames.
- **DHCP client.** The board's MAC address, IP address and port are parameters of
  `emu_top`.
- **Sending several stimuli per packet.** Only one stimulus per packet is supported.
- **Overlapping the unload with the next load.**
- **Several DUV clock domains.**
- **The host software.** This covers signal promotion, bitstream generation, the
  stimulus file and the conversion of replies to VCD.

The IPv4 header checksum of received frames is not checked. The MAC's frame check covers
the frame.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

Packages must come first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/emu_pkg.sv tb/tb_emu_top.sv --top-module tb_emu_top -o sim
./obj_dir/sim
```

`tb_emu_top` runs the whole design at its default parameters, using a host model written
in SystemVerilog. The model builds frames and parses replies, checking the addresses, the
IPv4 checksum, the lengths, the sequence number and the CRC. A cycle model of `dpth`
predicts every observed word. The test covers:

- configuration;
- a bad CRC and a foreign port (dropped and counted);
- padded frames;
- short stimuli;
- a shortened output chain;
- MAC back-pressure;
- a switch to free-running mode and back.

The test also checks that every `ckDUV` pulse has the configured width and that each
stimulus gives exactly one pulse. It simulates about 6,000 system-clock cycles in well
under a second.

The block testbenches check:

- the cells against reference registers;
- the chains at their full default sizes;
- the sequencer's event order and its `clk_high + 4` latency;
- the CRC against the standard check value 0xCBF43926 for "123456789";
- frame acceptance and every drop rule.

Assertions guard the handshakes:

- no stimulus word arrives while the sequencer is busy;
- no FIFO overflow or underflow;
- no reply header and result word arrive in the same cycle;
- no payload write arrives while a frame is being sent.
