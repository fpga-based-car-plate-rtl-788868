# Plate-character OCR engine: eight 784-128-36 fixed-point networks on one weight ROM

This is the FPGA half of a licence-plate reader. A PC finds the plate in a
camera frame and cuts it into eight character tiles. Each tile is 28x28
pixels at one bit per pixel. The PC sends all eight tiles to the FPGA in a
single 784-byte packet. The FPGA classifies each tile with a small
feed-forward neural network: 784 inputs, 128 hidden neurons and 36 outputs
(digits 0-9, letters A-Z). It sends back eight ASCII characters, for
example `491ADH01`.

The engine has eight identical inference cores, one per character. They
run in lockstep and read the same weight ROM. Each core has 64
multiply-add lanes, so one classification takes exactly **1640 clock
cycles**. At 50 MHz that is 32.8 µs, or about 30,400 plates per second for
the engine alone. In a real system the host link limits the rate long
before that.

## The 1640-step schedule

This schedule is the part that takes the most explaining. Everything else
follows from it.

The network has 784·128 + 128·36 = 104,960 weights. With 64 lanes that is
104,960 / 64 = 1640 lane-steps. The two layers use the lanes in different
ways:

| steps | layer | what one step does | lanes hold |
|---|---|---|---|
| 0 – 783 | 1, group 0 | pixel *i* = step is broadcast to all lanes; lane *k* adds W1[k][i] if the pixel is set | 64 hidden neurons 0–63, one per lane |
| 784 – 1567 | 1, group 1 | same, pixel *i* = step − 784 | hidden neurons 64–127 |
| 1568 – 1639 | 2 | output *j* = (step − 1568)/2, chunk *c* = (step − 1568) mod 2; lane *k* multiplies hidden[64c+k] by W2[j][64c+k]; a 64-input adder tree sums the 64 products | 64 of the 128 hidden values |

- **Layer 1 is neuron-parallel.** Each lane accumulates one hidden neuron
  while the 784 pixels stream past. A pixel is one bit, so the "multiply"
  only chooses between adding the weight and adding nothing. After the
  last pixel of a group, the 64 sums go through ReLU. They are then
  saturated to Q8.8 and written into the hidden registers. The first
  pixel of the next group restarts the accumulators in the same clock, so
  no cycle is lost.
- **Layer 2 is input-parallel.** There are only 36 outputs, so
  neuron-parallel use would leave 28 lanes idle. Instead the lanes take 64
  hidden values at a time and the fused adder tree sums them. Each output
  therefore takes two steps. At its second step the score is saturated to
  Q8.8 and stored. A running arg-max is updated at the same time, so the
  class is ready one clock after the last step.

Step *n* needs ROM word *n* and no other word, so the ROM is 1640 words of
64 × 16 bits:

```
word n,      0 <= n < 1568 : lane k = W1[hidden (n/784)*64 + k][pixel n%784]
word 1568+2j+c             : lane k = W2[output j][hidden 64c + k]
lane k occupies bits [16k+15 : 16k]
```

A central sequencer (`inference_sequencer`) sends out ROM address *n*. One
clock later, when the ROM data arrives, it gives the cores a step
descriptor (`ocr_pkg::step_t`): layer, pixel, group, output and chunk. The
cores have no counters of their own.

## Numbers

- Weights are signed 16-bit, read as Q8.8. Activations are Q8.8.
- An input pixel counts as 1.0 (`0x0100`) or 0.
- Products are Q16.16. Sums are kept in 40-bit accumulators, so nothing
  can overflow before the end of a neuron.
- A finished sum is shifted right by 8 (floor, no rounding) and saturated
  to the 16-bit range. Hidden neurons also go through ReLU first. Output
  scores get no activation.
- Arg-max picks the largest score. On a tie, the lower class wins.
- Class *c* becomes ASCII `'0'+c` for *c* < 10 and `'A'+c−10` otherwise.
- There are no bias terms.

## Host link

The PC reaches the FPGA through the board's USB-Blaster: an Intel JTAG
UART core (vendor IP, not part of this RTL) appears on the FPGA side as a
small Avalon-MM slave with two registers. `ocr_system`, the top level,
brings that slave's signals out as its `av_*` ports.

`jtag_uart_bridge` is the Avalon-MM master in front of it. It polls the
core in the same clock domain, so no synchronizer is needed:

| word | register | bits used |
|---|---|---|
| 0 | data | read: `[7:0]` character, `[15]` RVALID (character present); read pops it. Write `[7:0]` sends a character |
| 1 | control | read: `[31:16]` WSPACE (free transmit FIFO places) |

- **Receive.** While the engine can take a byte, the bridge reads the data
  register. A character with RVALID set is handed to the engine; an
  empty read is simply repeated.
- **Transmit.** For each reply byte, the bridge reads the control
  register until WSPACE is non-zero, then writes the byte.
- **Scheduling.** Transmit has priority. Only one bus access is
  outstanding.
- **Bus timing.** Requests are held while `av_waitrequest` is high.
  Read data is taken in the cycle it goes low.

Between the bridge and the engine, bytes travel as valid/ready streams
(`rx_*`, `tx_*`). `ocr_engine` can be used on its own with any other byte
source.

## Host protocol

1. **Packet (784 bytes).** Tile 0 comes first, 98 bytes per tile. Pixels
   of a tile are numbered row by row. Byte *b* of a tile carries pixels
   8b … 8b+7, with the first one in bit 7.
2. **Inference.** While a plate is in progress, `rx_ready` is low, so a
   host that sends early is simply held off.
3. **Reply (8 bytes).** The characters of cores 0 … 7, in ASCII. `plate[]`
   and a `plate_valid` pulse show the same string in parallel. After the
   eighth byte the engine accepts the next packet.

There is no header, command or checksum. The engine counts bytes, so a
host that loses a byte loses framing until reset.

## Timing

These counts are measured from the clock edge that accepts the last packet
byte:

| clocks | what happens |
|---|---|
| 1 | `io_handler` pulses `infer_start` |
| 1 | first weight-ROM read |
| 1640 | the multiply-add steps |
| 1 | class registers are latched into the reply string |
| **1643** | first reply byte valid |

At one byte per clock, a whole exchange takes 784 + 1643 + 8 = 2435 clocks.
Receiving a packet does not overlap with classifying the previous one.
Through the JTAG UART bridge, each byte costs at least two clocks of
polling. The USB link itself is far slower than that.

`busy` is high from the first byte of a packet until the last reply
byte. Routed to a pin, it lets a logic analyser time the FPGA's part of
each plate.

## Module map

| file | role |
|---|---|
| `rtl/ocr_pkg.sv` | sizes, fixed-point types, step descriptor, Q8.8 helpers, class-to-ASCII, stand-in weight function |
| `rtl/ocr_system.sv` | top level: `jtag_uart_bridge` + `ocr_engine`; Avalon-MM master ports toward the JTAG UART core |
| `rtl/jtag_uart_bridge.sv` | polls the JTAG UART core's registers, turns them into byte streams |
| `rtl/ocr_engine.sv` | the engine: wires everything below, byte-stream ports |
| `rtl/io_handler.sv` | state machine RECV → START → INFER → SEND; routes packet bytes to the cores' tile registers; builds the string |
| `rtl/inference_sequencer.sv` | the 1640-step schedule, ROM addresses, step descriptors, `done` |
| `rtl/weights_rom.sv` | 1640 × 1024-bit synchronous ROM shared by all cores |
| `rtl/inference_core.sv` | one character: 784-bit tile register, operand mux, 128 hidden and 36 output registers, arg-max |
| `rtl/mad_unit.sv` | 64 multipliers with per-lane accumulators and a fused 64-input adder tree |

All logic runs on one clock, with a synchronous active-low reset.

## Weights

The trained weights are not included. Instead, the ROM is filled by
default with a fixed stand-in, so the hardware can be simulated and
checked:

```
h = 64*n + k + 1
h = h * 0x9E3779B1;  h ^= h >> 15
h = h * 0x85EBCA6B;  h ^= h >> 13      (all 32-bit unsigned)
W[n][k] = signed(h[31:24])             (a Q8.8 weight in [-0.5, 0.5))
```

With these weights the engine gives deterministic but meaningless
characters. To load a trained network, set the `WEIGHTS_FILE`
parameter of `ocr_system` (or `ocr_engine`) to a `$readmemh` file with 1640 lines. Line *n* holds word *n*
as 256 hex digits, lane 63 first and lane 0 last, laid out as in the table
above. Quantise the trained floats to round(w·256), saturated to 16 bits.
Train the network without biases and with a ReLU hidden layer, or change
`inference_core` to match your network.

## Where this design makes its own choices

The published system gives the network shape, the number formats, 64
multiply-adds per clock, eight cores, one shared weight ROM, a 784-byte
packet with an 8-byte reply, and a latency of 1,640 cycles at 50 MHz. The
following points are choices made here:

- **The lane schedule.** It is inferred from the numbers. Splitting the
  steps as 2·784 + 36·2 keeps all 64 lanes busy in every step. That gives
  exactly the published 1,640 cycles.
- **Arithmetic details.** The ROM word layout, the ReLU activation, the
  absence of biases, floor rounding, saturation and 40-bit accumulators
  are all this design's.
- **Packet and reply format.** Pixel and byte order in the packet, the
  class order (digits, then letters) and the lack of any framing.
- **Interfaces and control.** The valid/ready byte streams between the
  bridge and the engine are this design's. So are the four states of the
  control state machine.
- **No overlap.** The original is described as fully pipelined, but
  nothing says how reception and inference would overlap. Here they do
  not.
- **No pipelining in the arithmetic.** The adder tree and the multipliers
  are one combinational stage. At 50 MHz on a Cyclone V, this path may
  need a pipeline register, which would add one clock to the latency.
- **No DSP mapping.** The multipliers are written as plain `*`. The
  original maps them onto a mix of DSP blocks and LUTs. Eight cores need
  512 16×16 multipliers, far more than the device's DSP blocks, so most
  would be built from LUTs. Layer 1 uses the multipliers only to select a
  weight, and a hand-tuned version could bypass them there.
- **The bridge.** The polling scheme in `jtag_uart_bridge` is this
  design's. The register layout it uses is the JTAG UART core's own.

Not included:
- the host software (detection, segmentation, logging);
- the JTAG UART core and its USB link (simulated by
  `tb/jtag_uart_model.sv`).

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_weights_rom` | all 1640 words against the weight formula, 1-clock latency, hold when disabled |
| `tb_mad_unit` | 3000 random cycles of both accumulation modes against a software model |
| `tb_inference_sequencer` | every step descriptor against its ROM address, 1640 steps, `done` 1641 clocks after `start`, restart ignored while busy |
| `tb_inference_core` | 8 random tiles of 10–94 % ink: all 36 scores and the class against the reference network |
| `tb_io_handler` | byte routing to cores, single start per packet, host held off while busy, ASCII reply under a stalling receiver |
| `tb_jtag_uart_bridge` | 600 bytes each way through the bridge and a model of the JTAG UART core, in order and unchanged, with empty polls, full-FIFO polls, wait states and an often-unready engine side |
| `tb_ocr_system` | the complete top at its default size with the JTAG UART model: 6 plates queued by the host back to back, every character against the reference, the next packet held in the FIFO while the engine is busy |
| `tb_ocr_engine` | the engine at its default size: 46 plates (368 glyphs) with random input gaps and output stalls, every character against the reference, 1643-clock latency and 1640 ROM reads per plate; also counts the hold-offs, stalls and layer switches it sees |

`tb/ocr_ref_pkg.sv` is the reference model. It recomputes the weights from
the formula and evaluates the network with plain integer loops. It shares
no code with the RTL.

`tb/jtag_uart_model.sv` is a behavioural model of the JTAG UART core. It
has the core's register interface, byte FIFOs on the host side and random
wait states.

Example with plain Verilator (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/ocr_pkg.sv tb/ocr_ref_pkg.sv tb/tb_ocr_system.sv \
    --top-module tb_ocr_system -o sim
./obj_dir/sim
```

For the other testbenches, replace `tb_ocr_system` with the testbench
name. The full-size tests build in about 20 s and run in about a second.

What the tests do not cover:
- recognition accuracy, which depends on the trained weights;
- timing closure at 50 MHz;
- the behaviour of the real JTAG UART.
