# Energy-managed wireless sensor node logic

This is the digital part of a low-power wireless sensor node built in an FPGA. The node reads a
serial sensor, sends each reading through a serial radio transceiver, acknowledges the readings
of other nodes, and then sleeps until the next communication cycle. It saves dynamic power in
two ways:

* **Divided operating frequencies.** No module runs at the full logical clock rate unless it has
  to. A frequency splitter derives a slow *A* frequency for the modules that talk to external
  devices and a slow *B* frequency (100 kHz to 1 MHz) for the internal modules. Only the
  transmitter counts on the 10 MHz logical clock itself, because it needs a fine bit time.
* **A sleep/wake scheduler.** Between cycles every module except the scheduler is stopped. The
  radio and the sensor are switched off as well.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in one clock domain.

## Block structure

```
                     +---------------- external pins ----------------+
                     | radio_din   radio_dout   sensor_rxd  sensor_pwr|
                     |     ^           |    radio_sleep_rq     |      |
                +----+-----+--+  +-----v-----+  +-----v---------+     |
 clk (10 MHz)-->|  uart_tx    |  |  uart_rx  |  | sensor_reader |     |
   |            +------^------+  +-----+-----+  +-------+-------+     |
   |                   | tx pkt        | rx pkt         | sample
   |            +------+---------------v----------------v-------+
   |            |                  data_proc                    |<-- cycle_done / schedule -->+
   |            +-----------------------------------------------+                              |
   |      tick_a -> uart_rx, sensor_reader          tick_b -> data_proc, sync_ctrl            |
   +--> freq_splitter ------------------------------------------------------------> sync_ctrl -+
                         awake (from sync_ctrl) enables every other block and the A divider
```

| Module | Runs on | Role |
|---|---|---|
| `freq_splitter` | clk | Makes the A and B strobes from two run-time divisors. A stops while the node sleeps. |
| `sync_ctrl` | B | Sleep/wake scheduler. Its `awake` output is the enable of everything else. |
| `data_proc` | B | Builds DATA packets from sensor lines, answers DATA with ACK, and ends the cycle on its own ACK. |
| `uart_tx` | clk | Sends a packet as 8N1 bytes, length byte first, and wakes the radio only while it sends. |
| `uart_rx` | A | Receives 8N1 bytes with 16x oversampling and assembles a packet of the announced length. |
| `sensor_reader` | A | Reads one CR-terminated serial line per wake-up, then powers the sensor down. |
| `uart_rx_byte` | A | Byte receiver shared by `uart_rx` and `sensor_reader`. |
| `wsn_top` | | Wires the blocks together and brings the configuration and device lines out. |
| `wsn_pkg` | | Shared constants: packet limit, header layout, packet types, timer width. |

### Frequencies as enables, not clocks

Every flip-flop is clocked by `clk`, the 10 MHz logical clock. A "frequency" is a strobe that is
high for one `clk` cycle at the divided rate. A module does its work only on cycles where its
strobe is high. This keeps the design in one clock domain, so timing closure and
clock-domain crossings are no concern. On an FPGA, the enables map onto the flip-flops' clock
enables, which is what saves switching power. To gate real clocks instead, replace the strobes
with gated clock buffers in `wsn_top`; the module interfaces do not change.

## One communication cycle

1. **Wake-up.** `sync_ctrl` raises `awake`. The A divider starts, and the radio receiver and the
   sensor reader are enabled. The node is also awake right after reset, so it can join the
   network at once.
2. **Sensor read.** `sensor_reader` powers the sensor (`sensor_pwr`), collects one line up to the
   carriage return, and offers it to `data_proc`. It then switches the sensor off for the rest
   of the wake-up.
3. **DATA out.** `data_proc` wraps the line into a DATA packet with type, node id, sequence number
   and the line. `uart_tx` sends it and holds `radio_sleep_rq` low for the transfer.
4. **Peer traffic.** A DATA packet from another node is answered at once with an ACK. Received
   packets are served before a waiting sensor line, so an ACK is never delayed by the node's
   own DATA.
5. **ACK in.** An ACK whose sequence number matches this node's DATA ends the cycle.
   `data_proc` raises `cycle_done`, and `sync_ctrl` puts the node to sleep on the next B tick.
6. **Sleep.** Only `sync_ctrl` and the B divider run. After `sleep_len` B ticks the node wakes
   again. If no ACK arrives, the wake-up ends after `cfg_wake_ticks` B ticks and counts as a
   failed cycle: `cycles` advances but `ok_cycles` does not.

Only one DATA packet is sent per wake-up. The sequence number advances after each wake-up in
which one was sent. There is no retransmission within a wake-up.

## Packets on the radio link

```
wire order:  LEN | TYPE | SRC | SEQ | payload ...
             LEN = number of bytes after it, 1 .. 24
DATA:        TYPE = 0x01, payload = the sensor line (up to 21 bytes)
ACK:         TYPE = 0x02, SEQ = sequence of the DATA being acknowledged,
             payload = 3 bytes: sender's sleep time in B ticks, MSB first
```

Every byte is framed 8N1: one start bit (0), eight data bits LSB first, one stop bit (1). The
line idles high. The packet limit of 24 bytes (192 bits) holds the largest packet class the node
is meant for, 190 bits. With the 3-byte header, that is a sensor line of 20 bytes.

The receiver needs no size setting. It reads the length byte, collects that many bytes, and
offers the packet to `data_proc`. It rejects some input and reports it with a one-cycle pulse:

* A length of 0, or more than 24, gives `rx_len_err`. The receiver then drops as many bytes as
  were announced, so it stays aligned to the next packet.
* A bad stop bit gives `rx_frame_err` and drops the packet being assembled.
* A byte that arrives while a finished packet has not yet been taken gives `rx_overrun`.

### Handshake between modules

Packets move between modules over a level-based four-phase handshake:

```
producer: req=1 (len/data stable)  ->  consumer: ack=1  ->  producer: req=0  ->  consumer: ack=0
```

The producer may not raise `req` again until `ack` has fallen. A four-phase handshake is used
because the two sides advance on different strobes. `uart_rx` moves on A ticks, `data_proc` on
B ticks, and `uart_tx` on every clock. A level handshake cannot lose an event whatever the
ratio of the rates. `uart_tx`, `uart_rx` and `sensor_reader` hold assertions on the
producer-side rules.

## Sleep schedule and alignment between nodes

`sync_ctrl` first sleeps for `cfg_sleep_ticks`. Each ACK carries the sleep time of the node
that sent it. A node adopts that value (`sched_valid`) when the ACK comes from a node with a
**lower** id. The lowest id in range is therefore the time reference, and two nodes never keep
swapping their values. A node falls asleep on the B tick at which it processes its ACK. Two
nodes that finish on the same exchange therefore start their sleep within a few B ticks and a
byte time of each other. With the same sleep time they then wake together. This is a small
take on receiver-to-receiver (reference broadcast) synchronisation. It does not estimate clock
skew or offset, and nodes that never hear each other do not align.

## Configuration and timing

All rates and times are run-time inputs of `wsn_top`. Hold them stable while the node runs.
They are sampled continuously, so a divisor change takes effect at the next wrap of its
counter.

| Input | Meaning | 4800 bps, B = 100 kHz | B = 1 MHz |
|---|---|---|---|
| `cfg_div_a` | clk cycles per A tick = 10 MHz / (OVERSAMPLE x bit rate) | 130 | 130 |
| `cfg_baud_div` | clk cycles per transmitted bit | 2080 (= 16 x 130) or 2083 | same |
| `cfg_div_b` | clk cycles per B tick | 100 | 10 |
| `cfg_sleep_ticks` | first sleep time, B ticks (24 bits) | application | application |
| `cfg_wake_ticks` | longest wake-up, B ticks (24 bits) | > one cycle | > one cycle |

`cfg_sleep_ticks` and `cfg_wake_ticks` count B ticks. When you change `cfg_div_b`, scale them
by the same factor to keep the same time in seconds.

Timing figures at 4800 bps, measured in simulation with 12-byte and 20-byte sensor lines:

* A byte takes 10 bit times: 20,800 clocks, or 2.08 ms.
* A cycle in which both nodes read a 12-byte line and exchange 15-byte DATA packets and 6-byte
  ACK packets lasts about 36 byte times after the slower sensor starts: about 0.78 M clocks,
  or 78 ms. With 20-byte lines (23-byte packets) it lasts about 1.11 M clocks.
* Between a received stop bit and the handshake to `data_proc` there are a few B ticks.
* `uart_tx` starts its first start bit one clock after it accepts `req`. It raises `ack` when
  the last stop bit ends, (len+1) x 10 x `cfg_baud_div` clocks after the start.

Serial rate limits at the 10 MHz logical clock:

* The transmitter reaches 230,400 bps (43 clocks per bit, +0.9 % rate error).
* The receivers oversample 16x by default. They are reliable up to about 57,600 bps.
* For higher rates, lower the `OVERSAMPLE` parameter of `wsn_top`. A value of 8 reaches
  115,200 bps and 4 reaches 230,400 bps, both with a -1.4 % rate error.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `wsn_top` | `NODE_ID` | 1 | Node id in SRC; a lower id is the time reference |
| `wsn_top` | `OVERSAMPLE` | 16 | A ticks per received bit |
| `wsn_pkg` | `PKT_MAX_BYTES` | 24 | Packet limit (bytes after LEN) |
| `wsn_pkg` | `TIME_W` | 24 | Width of sleep/wake times; ACK payload = TIME_W/8 bytes |
| `freq_splitter`, `uart_tx` | `DIV_W` | 16 | Divisor width |

## Simulation

The testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`, and each has a cycle-count watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wsn_pkg.sv tb/tb_wsn_top.sv \
          --top-module tb_wsn_top -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_freq_splitter` | Strobe periods for several divisors; A stops with `en_a`, B does not |
| `tb_uart_tx` | Serial decode of 1-, 16-, 24- and 30-byte packets (the last cut to 24); transfer time; radio control; abort |
| `tb_uart_rx` | Packets of 1..24 bytes; length error and resynchronisation; frame error; overrun; disabled; 8x oversampling |
| `tb_sensor_reader` | Line capture, one line per wake-up, cut at 21 bytes, sensor power |
| `tb_sync_ctrl` | Wake window, sleep length, early end on `cycle_done`, adoption of an ACK's sleep time |
| `tb_data_proc` | DATA and ACK contents, priority, sequence handling, time reference rule |
| `tb_wsn_top` | Two nodes, five cycles, every mechanism counted; runs at 104 kbps for speed |
| `tb_wsn_top_full` | Two nodes at default parameters, 4800 bps, one full cycle and the next wake-up |
| `tb_wsn_modes` | The five operating modes (sleep; 127- and 190-bit packets at B = 100 kHz and 1 MHz) |

The cycle-level tests use two behavioural models in `tb/`. These are not part of the node:

* `radio_link_model` joins two nodes' serial lines while both radios are awake.
* `serial_sensor_model` sends a numbered text line each time it is powered.

## Choices this design makes

The node's structure comes from the published design. This covers the six modules and their
roles, the A and B frequencies and which module uses which, and the transmitter running on the
logical clock. It also covers byte-wise 8N1 transfer, a receiver that finds the packet size
itself, a packet size limit, the sleep and wake-up phases with only the scheduler running in
sleep, the schedule refresh on every acknowledgment, and the operating points used for testing.
The published design does not give these details, so this RTL chooses them:

* the packet layout, including the length byte, the header fields, and the sleep time carried
  in ACKs;
* the four-phase handshake between modules;
* frequencies carried as clock-enable strobes rather than divided clocks;
* 16x receiver oversampling;
* the one-line-per-wake-up sensor policy and the carriage-return terminator;
* the lower-id-wins rule for the reference sleep time, and the wake window that ends a failed
  cycle;
* no retransmission;
* timer and divisor widths, and waking right after reset.

These parts are not included:

* One wake window enables reception, sensor reading and processing together. Separate times
  for each activity are not kept.
* Received DATA is acknowledged but not forwarded to another node.
* There is no logic to decide at run time which operating mode to use; the divisors are inputs.
* The 100 MHz to 10 MHz clock generation is not part of the RTL; `clk` is the 10 MHz clock.
* The radio module, the sensors, the FPGA board and the power supply are outside the logic. The
  radio's own wake-up delay and air time are not modelled.
* Power figures cannot be obtained from this RTL simulation. Measure them on the target
  device.
