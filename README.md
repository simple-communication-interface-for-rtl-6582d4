# Serial sample link for a moments-space radar detector (FPGA side)

A radar detector that classifies resolution cells by the statistical moments
of their echo amplitudes needs, for every antenna revolution, a block of raw
samples moved from the FPGA that acquires them to a PC that does the
statistics. For a small searching window (at most 512 cells: 64 range rings x
8 angular sectors) the worst case is 13824 samples of 14 bits, 27648 bytes per
revolution. A revolution of the reference radar lasts 2.73 s, and a plain
UART at 115200 bit/s moves those bytes in 2.40 s. So the simplest link is fast
enough, provided a small protocol keeps the two sides in step.

This RTL is the FPGA end of that link. It takes a configuration frame from
the PC, stores the searching window, the operating mode and the sample count
for the acquisition logic, and echoes the frame. From then on it loops once
per revolution: it waits out the acquisition time, announces the samples, and
streams them from a 16k x 14 sample RAM when the PC says it is ready. A stop
byte from the PC returns everything to the initial state at any moment.

## The protocol

Serial format: 1 start bit, 8 data bits (LSB first), 1 stop bit, no parity,
115200 bit/s. Five byte values have a fixed meaning:

| Byte | Meaning                                                                |
|------|------------------------------------------------------------------------|
| 0xAA | start of the searching window (first byte of the frame)                |
| 0xBB | start of the mode field                                                |
| 0xCC | start of the total-samples field                                       |
| 0xDD | FPGA to PC: samples are ready. PC to FPGA: send them ("ACK DD")        |
| 0xEE | PC to FPGA: stop everything. FPGA to PC: stop done ("ACK EE")          |

The configuration frame has 11 bytes:

```
 0    1      2      3      4      5    6    7     8    9         10
 AA   Ri lo  Ri hi  Rf lo  Rf hi  Ai   BB   mode  CC   Total lo  Total hi
```

- `Ri`, `Rf`: first and last range-ring index, 0..499.
- `Ai`: first angular-sector index, 0..199.
- `mode`: the radar operating mode, 0x00..0x03.
- `Total`: the number of sample words the FPGA sends per revolution. The PC
  works it out as `(Rf - Ri + 1) * (Af - Ai + 1) * pulses_per_cell`. The
  FPGA never needs the last sector index `Af`.

A normal session runs like this:

```
PC    -> FPGA   configuration frame (11 bytes)
FPGA  -> PC     the same 11 bytes (ACK)
                ... 2.73 s acquisition ...
FPGA  -> PC     0xDD
PC    -> FPGA   0xDD
FPGA  -> PC     Total samples, 2 bytes each
                ... 2.73 s acquisition ... 0xDD ... 0xDD ... samples ... (repeats)
PC    -> FPGA   0xEE       (at any time)
FPGA  -> PC     0xEE
```

The interface checks the frame only through its delimiters. If byte 6 is not
0xBB, or byte 8 is not 0xCC, the frame is dropped without any answer. The PC
notices the missing ACK and gives up by sending 0xEE.

## Block structure

```
            +---------+     +-----------+      +------------+
 rxd ------>| uart_rx |---->| ctrl_fsm  |----->| param_regs |-----> params, params_valid
            +---------+  |  | (CONTROL) |      +------------+          |
                         |  +-----------+        |        |            |
                         |   | sel  |  |     +---------+ +------------+   +------------+
                         +-->|end_fsm|  +--->| ack_gen | | samples_tx |<->| sample_ram |<-- acq_we/waddr/wdata
                             +------+        +---------+ +------------+   +------------+
                                |                 |            |  acq_enable
                                v                 v            v
                            +-----------------------------------+     +---------+
                            |          tx_mux  (sel)            |---->| uart_tx |----> txd
                            +-----------------------------------+     +---------+
```

| Module       | Role |
|--------------|------|
| `sci_pkg`    | Command bytes, frame positions, the `sci_params_t` record (Ri, Rf, Ai, mode, Total), the `tx_req_t` byte request, the `tx_sel_e` select, and `frame_byte()`, which maps a record to frame byte *n*. |
| `uart_rx`    | 8N1 receiver with a two-flop synchronizer and mid-bit sampling. It checks the start bit at mid-bit and flags a low stop bit. |
| `uart_tx`    | 8N1 transmitter with a valid/ready input. |
| `ctrl_fsm`   | CONTROL. It collects and checks the frame, loads PARAMETERS, starts ACK, then hands the transmitter to SAMPLES_TX. It drives the MUX select and END's enable. |
| `param_regs` | PARAMETERS. Holds the 8 specification bytes for the acquisition logic. |
| `ack_gen`    | ACK. Replays the frame, rebuilt from PARAMETERS. |
| `samples_tx` | SAMPLES_TX. Runs the delay, sends 0xDD, waits for the PC's 0xDD, then reads and sends the samples. |
| `sample_ram` | 16384 x 14 simple dual-port RAM. It starts with a test saw-tooth. |
| `end_fsm`    | END. Watches for 0xEE, restarts the system and answers 0xEE. |
| `tx_mux`     | MUX. Connects one of ACK, SAMPLES_TX and END to the transmitter. |
| `sci_top`    | Wires all of the above together. |

All byte producers use the same handshake. The producer holds
`tx_req_t {valid, data}` until `ready` is high at a clock edge. `tx_mux`
returns `ready` only to the selected producer. The producers `ack_gen`, `samples_tx` and `end_fsm`
carry a concurrent assertion of this rule: an offered byte is neither
withdrawn nor changed before it is accepted. Verilator checks it when run
with `--assert`.

## How a session moves through the hardware

**Frame reception (CONTROL).** In `C_IDLE` every byte except 0xAA is
ignored. After 0xAA the machine moves to `C_FRAME`. It stores bytes 1..10 in
a holding register and checks the delimiters on the way. Only a complete,
well-delimited frame is copied into `param_regs`, all eight bytes in one
clock. So the acquisition logic never sees a half-written configuration, and
`params_valid` rises only for a good frame. In the same clock `ack_gen`
starts.

**ACK.** `ack_gen` does not keep a copy of the received bytes. It rebuilds
each byte from the parameter registers and the three delimiter constants. The
echo therefore shows what the FPGA actually stored, which is what the PC
wants to verify.

**Acquisition and samples (SAMPLES_TX).** When the echo is done, CONTROL
moves to `C_RUN` and starts `samples_tx`, which loops through these states:

1. `S_DELAY`. `acq_enable` is high for `DELAY_CYCLES` clocks (2.73 s at
   50 MHz). The real acquisition logic lives outside this design. It can use
   `params` and `acq_enable`, and write through the RAM write port. Without
   it, the delay still mimics the revolution time.
2. `S_DD`. Offers 0xDD.
3. `S_WAIT`. Waits, with no time limit, until CONTROL reports a received
   0xDD.
4. `S_READ`, `S_LOW`, `S_HIGH`, repeated for addresses 0..Total-1. It reads
   one RAM word, then sends the low byte, then `{2'b00, word[13:8]}`.
5. `xfer_done` pulses, and the loop goes back to `S_DELAY`.

**Stop (END).** `end_fsm` sees every received byte. When it is enabled and
the byte is 0xEE, it:

- pulses `restart` for one clock, which clears CONTROL, PARAMETERS, ACK and
  SAMPLES_TX;
- raises `busy`, which makes CONTROL point the MUX at END whatever the
  state;
- offers 0xEE until the transmitter takes it.

If a sample byte is on the line at that moment, it finishes first and the
0xEE follows it. This is the one place where both directions of the link are
active at once.

The subtle point is that a frame field may itself be 0xEE. For example,
`Ai = 238`, or a Total whose low byte is 0xEE. So CONTROL disables END from
the 0xAA that opens a frame until the frame is complete or dropped. In every
other state 0xEE takes effect immediately.

## Timing

| Item | Clocks (defaults: 50 MHz, 434 clocks/bit) |
|------|-------------------------------------------|
| One byte on the line | 10 x 434 = 4340 |
| Back-to-back bytes from `uart_tx` | 4341 per byte (ready returns one clock after the stop bit) |
| Byte received to `rx_valid` | about 9.5 bit times after the start edge, plus 2 clocks of synchronizer |
| Last frame byte to PARAMETERS updated | 2 clocks after `rx_valid` |
| Acquisition delay | `DELAY_CYCLES` = 136 500 000 (2.73 s) |
| Sample block of *N* words | 2N x 4341 clocks (2650 words: 0.46 s; 13824 words: 2.40 s) |

Every supported configuration fits in one revolution. The largest, 512 cells
in mode 1, is 13824 words in 16384 RAM words and 2.40 s of 2.73 s. Modes 2,
3 and 4 with 512 cells need 6656, 5120 and 3072 words.

## Parameters

| Parameter | Default | Where | Notes |
|-----------|---------|-------|-------|
| `CLK_HZ` | 50 000 000 | `sci_top` | Clock frequency. This design's choice. |
| `BAUD` | 115 200 | `sci_top` | `CLKS_PER_BIT = CLK_HZ / BAUD` (434). |
| `DELAY_CYCLES` | 136 500 000 | `sci_top`, `samples_tx` | 2.73 s at `CLK_HZ`. Set it again if you change the clock. |
| `ADDR_W`, `DATA_W` | 14, 14 | `sci_top`, `samples_tx`, `sample_ram` | 16384 x 14 RAM. |
| `INIT_SAWTOOTH` | 1 | `sci_top`, `sample_ram` | RAM starts with the test pattern. |
| `SAW_PERIOD`, `SAW_REPEAT` | 1728, 8 | `sample_ram` | Pattern: word *a* = (*a* mod 1728) + 1 for *a* < 13824, else 0. This is 27 pulses x 64 rings, once per sector. |

## What is specified and what is this design's own

These points follow the interface description:

- the block set and its connections;
- the five command bytes and the frame layout;
- the serial format and rate;
- the 2.73 s simulated acquisition;
- the 16k x 14 RAM and its saw-tooth contents;
- END being disabled during frame reception;
- 0xEE working from any state, and the 0xEE answer.

These points are this design's own choices:

- The 50 MHz clock, and so the 434 clocks/bit divider and the delay count.
- The UARTs. The description only names them.
- The valid/ready handshake between the producers, the MUX and the
  transmitter.
- Low byte first for samples, matching the byte order of the frame fields.
  The two unused high bits are sent as zero.
- Samples read from RAM address 0 upward. The RAM is taken to hold only the
  acquired set. A Total above 16384 wraps the address.
- The frame held in a buffer and committed to PARAMETERS all at once.
- A bad frame dropped silently. The bytes after a bad delimiter are ignored
  until the next 0xAA.
- The restart is a one-clock synchronous clear. It leaves the UARTs and END
  running and zeroes PARAMETERS. The power-on reset `rst_n` is asynchronous,
  active low.
- No check on the ranges of `mode`, `Ri`, `Rf` or `Ai`.
- The status pulses `xfer_done`, `frame_drop` and `rx_frame_err`.

## Limitations

- There is no time limit on frame reception. If the PC loses bytes in the
  middle of a frame, CONTROL waits, with END disabled, for the missing bytes.
  A 0xEE sent then is taken as frame data. Usually it produces a bad delimiter
  and the frame is dropped. If it lands in the last bytes, it produces an ACK
  with wrong contents, which the PC rejects. Either way a further 0xEE from
  the PC then stops the interface.
- The acquisition logic is not part of this design. Only its interface is
  here: `params`, `params_valid`, `acq_enable` and the RAM write port.
- The RAM contents come from an `initial` loop. That suits FPGA synthesis, but
  an ASIC memory would need another way to load the test pattern.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          -Irtl -Itb --top-module tb_sci_top rtl/sci_pkg.sv tb/tb_sci_top.sv
./obj_dir/Vtb_sci_top
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_uart_rx`, `tb_uart_tx` | Random bytes, bit timing, latency, framing error, glitch rejection. 16 clocks per bit. |
| `tb_param_regs`, `tb_tx_mux`, `tb_end_fsm`, `tb_ack_gen`, `tb_ctrl_fsm` | Each block's rules, against values worked out in the testbench. |
| `tb_sample_ram` | Full 16k readback of the initial pattern, read latency, random writes. |
| `tb_samples_tx` | Delay length, 0xDD first, nothing before the PC's 0xDD, sample order, blocks of 0, 1, 7 and 150 words, clear in mid-block. `DELAY_CYCLES` = 100. |
| `tb_sci_top` | End to end at 16 clocks per bit and a delay of 3000 clocks, with a behavioural serial host (`uart_host`). It covers: 0xEE in idle; a bad frame; 0xEE as frame data; the ACK; the delay; waiting for the PC's 0xDD; two consecutive blocks; RAM writes through the acquisition port; 0xEE during a block; and a 2650-sample worked example. It counts each mechanism, and one that never happens counts as a failure. |
| `tb_sci_top_workloads` | The 512-cell window in each of the four operating modes (13824, 6656, 5120 and 3072 samples), at 16 clocks per bit. It checks every sample and the exact clock count of each block, and it scales that count to 115200 bit/s to show each block fits in a revolution. |
| `tb_sci_top_full` | Every parameter at its default. Two complete sessions, each a frame, its ACK, the full 2.73 s delay, 0xDD, the samples with their exact bit-rate timing, then 0xEE and its answer. The first is the worked example (rings 139..191, sectors from 14, mode 0x02, 2650 samples). The second is the critical window (64 rings x 8 sectors, mode 0x00, 13824 samples, 2.40 s). About three minutes of Verilator time. |

The simulator used is two-state, so the testbenches reset the design before
they check anything. `uart_host.sv` is a behavioural model and is not meant
for synthesis.
