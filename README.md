# I2S master transceiver

An I2S (Inter-IC Sound) link carries two-channel audio over three wires: a bit
clock SCK, a word select WS that tells which channel the current word belongs
to, and a serial data line SD that carries two's-complement words MSB first.
This block is the clock master of such a link. It generates SCK and WS itself
and moves audio in one of two directions, chosen by a configuration input:

* **transmit** (`cfg_tx_nrx = 1`): a host writes left/right samples into two
  small FIFOs; the block serialises them onto SD.
* **receive** (`cfg_tx_nrx = 0`): the block clocks a remote transmitter (for
  example a microphone or codec), assembles the bits on SD into words, and
  sorts them by WS into the two FIFOs, from which the host reads them.

The default configuration uses 16-bit words and eight-word FIFOs per channel.

```
              host side                                    line side
   ch0_data_tx/put_en ──►┌──────────────┐
   ch0_data_rx/get_en ◄──┤ FIFO_TRX_I0  │◄──┐
   ch0_fifo_over/underrun┤ (channel 0)  ├──►│   ┌─────────────┐       ┌─────────┐
                         └──────────────┘   ├──►│ PROTOCOL_I1 │──────►│ PADS_I1 │──► SCK
                         ┌──────────────┐   │   │  six-state  │◄──────│         │──► WS
   ch1_data_tx/put_en ──►│ FIFO_TRX_I1  │◄──┤   │     FSM     │       │         │◄─► SD
   ch1_data_rx/get_en ◄──┤ (channel 1)  ├──►┘   └─────────────┘       └─────────┘
   ch1_fifo_over/underrun└──────────────┘           ▲
                               cfg_i2s_en, cfg_tx_nrx ┘
```

| file | contents |
|---|---|
| `rtl/i2s_master_pkg.sv` | default sizes, FSM state type, channel type |
| `rtl/i2s_dp_fifo.sv` | channel FIFO, accessible from the host side and the protocol side |
| `rtl/i2s_protocol.sv` | framing FSM: serialiser, deserialiser, WS and clock enable |
| `rtl/i2s_pads.sv` | SD tri-state pad, gated SCK, WS buffer |
| `rtl/i2s_master_trx.sv` | top level: two FIFOs, protocol and pads wired together |

## Line format and timing

Everything runs on one clock, `clk`. The line clock is `SCK = ~clk & SCK_en`,
so one serial bit is moved per `clk` cycle. All line outputs are registers of
the rising `clk` edge, which is the falling SCK edge; a receiver on the line
samples on the rising SCK edge, half a cycle later.

WS is **low for channel 0** and **high for channel 1**. It holds each level for
one *slot* of `WORD_LEN` (16) SCK cycles, so a stereo frame is 32 cycles. As in
the Philips I2S format, WS changes one bit clock before the MSB of the word it
announces: the first cycle of a slot still carries the LSB of the previous
word.

```
clk cycle   …  T0   T0+1  T0+2  …  T0+15 | T1=T0+16  T1+1 …
WS          1 |  0     0     0    …   0   |   1        1
SD            | b0'  b15   b14   …   b1   |   b0     b15''
                 ▲ LSB of previous ch1 word         ▲ MSB of next ch1 word
                       └────── channel 0 word b15..b0 ──────┘
```

## The protocol FSM

`i2s_protocol` has six states. Every state except IDLE lasts one slot; a 4-bit
counter marks the slot boundary.

| state | WS | what happens |
|---|---|---|
| IDLE | 0 | after reset and whenever `cfg_i2s_en` is low. WS, SD, SD output enable and SCK enable are all low; SCK does not toggle. |
| STARTUP | 1 | first slot after `cfg_i2s_en` rises. SCK starts and one word of zeros is shifted out, so the far end sees a WS falling edge before real data. |
| TX_CH0 / TX_CH1 | 0 / 1 | the head word of that channel's FIFO is shifted out MSB first |
| RX_CH0 / RX_CH1 | 0 / 1 | SD is shifted in and the word goes to that channel's FIFO |

After STARTUP the FSM always continues with channel 0, then alternates
channels. At each slot boundary it picks TX or RX from `cfg_tx_nrx`, so a mode
change takes effect at the next slot. When `cfg_i2s_en` falls, the FSM goes to
IDLE at the next clock edge from any state. A word that is only partly sent or
received is abandoned. The FIFOs keep their contents, and a word the
transmitter had already taken out of its FIFO is lost.

**Transmit path.** In the cycle before a channel-X TX slot begins, the FSM
raises `chX_tx_pop`. The FIFO's head word is loaded into the shift register at
that edge, and the register shifts once per cycle. An empty FIFO supplies 0,
so a transmit underrun puts zero words (silence) on the line rather than
repeating old data.

**Receive path.** This is the least obvious part. The remote transmitter
launches each bit on a falling SCK edge, which is a rising `clk` edge. The FSM
samples SD at the *next* rising `clk` edge, one full cycle later, so the
design has no negative-edge flip-flops. As a result, a channel-X word is
complete only at the second clock edge of the following slot. The FSM
remembers, for one slot, that the previous slot was a receive slot of channel
X. At that second edge it writes `{15 shifted bits, current SD}` into FIFO X.
The STARTUP slot is never stored. In receive mode SD is released for STARTUP
too; in transmit mode STARTUP drives its zero word.

**SD direction.** The output enable follows the slot, with one exception: it
stays high for the first cycle of a slot that follows a TX slot, so the LSB of
the last transmitted word still goes out. After an RX slot, a TX slot turns
the driver on one cycle late, so the master never drives over the remote
transmitter's LSB.

Two assertions run in simulation. WS must hold a level for `WORD_LEN` cycles
before it falls, unless the fall comes from disabling the link. At most one
FIFO strobe may be active per cycle.

## Channel FIFOs

`i2s_dp_fifo` is a circular buffer of `2**FIFO_ADDR_LEN_LOG2` words. It has a
read pointer and a write pointer, each with an extra wrap bit, so full and
empty are told apart without a counter. It has two sides. With `tx_nrx = 1`
the host side writes and the protocol side reads; with `tx_nrx = 0` the
protocol side writes and the host side reads. The strobes of the side that is
not selected are ignored, and its read-data port shows 0.

* `fifo_overrun` is high while the FIFO is **full**. A write in that state is
  dropped.
* `fifo_underrun` is high while the FIFO is **empty**. A read in that state
  returns 0 and does not move the pointer.

Both flags are levels, not sticky error bits. The head word is shown
combinationally (first-word fall-through) and is removed at the clock edge
where the read strobe is high.

## Host interface

All host signals are sampled on the rising edge of `clk`.

* **Write** (transmit mode only): present `chX_data_tx` and hold
  `chX_data_tx_put_en` high for one cycle per word. Writes made while
  `cfg_tx_nrx = 0` are ignored, so load the FIFOs after selecting transmit.
* **Read** (receive mode only): `chX_data_rx` already shows the oldest word.
  Take it, then hold `chX_data_rx_get_en` high for one cycle to remove it.
* **Run**: set `cfg_tx_nrx`, raise `cfg_i2s_en`. The first data word
  (channel 0) starts 1 + 16 cycles later, after the STARTUP slot. The link
  consumes or produces one word per channel every 32 cycles. Lower
  `cfg_i2s_en` to stop.
* **Reset**: `rst_b` is asynchronous and active low. It empties both FIFOs,
  puts the FSM in IDLE, drives WS and SCK low, and releases SD.

## Pads

`i2s_pads` has three pads:

* SD is a tri-state output driver controlled by `SD_oe`, plus an input buffer
  that is always on, so the master reads the line whenever it is not driving
  it.
* SCK is `clk` inverted and ANDed with `SCK_en`. `SCK_en` changes only on
  rising `clk` edges, while the inverted clock is low, so the gated clock
  cannot glitch.
* WS is a plain output buffer.

The buffers are ideal, zero-delay logic.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WORD_LEN_LOG2` | 4 | log2 of the word length (16 bits); sets the slot length |
| `FIFO_ADDR_LEN_LOG2` | 3 | log2 of the FIFO depth (8 words per channel) |

Both defaults are those of the original design. `WORD_LEN` and the FIFO depth
are derived localparams. The whole design is small: two 8×16-bit memories and
a few dozen flip-flops.

## Where this RTL follows the original description, and where it chooses

Taken from the original description of the block:

* the split into two FIFOs, a protocol block and a pad block, with the
  instance names
* the top-level port list and the parameter names and defaults
* the six FSM states, the STARTUP zero word with WS high, and channel 0 first
  after STARTUP
* the immediate stop when enable falls, with all signals low in IDLE
* MSB-first data, with WS changing one clock before the MSB
* a write to a full FIFO is lost, and a read of an empty FIFO returns 0
* the pad structure: SD tri-state with enable and an always-on input,
  `SCK = ~clk AND SCK_en`, and a WS buffer
* SD at high impedance after reset

Chosen here, because the description is silent or contradicts itself:

* **WS polarity.** The description contradicts itself on which WS level
  selects channel 0. This RTL uses WS low for channel 0. That choice agrees
  with its STARTUP sequence (WS high, then channel 0 after the WS falling
  edge). The opposite reading needs only the `ws_out` assignment in
  `i2s_protocol` inverted.
* **Flag meaning.** The ports are called `fifo_overrun` and `fifo_underrun`,
  but they are described as full and empty indications. They are built as
  level full/empty flags, not as sticky error flags.
* **Slot timing details.** These are this design's own:
  * the receive sampling point, one cycle after launch
  * the SD enable during STARTUP in receive mode
  * sampling `cfg_tx_nrx` only at slot boundaries
  * which host strobes are honoured in which mode
* **Reset style.** The reset is asynchronous and active low. The FIFO storage
  array is not reset; the empty flag masks it.
* **Behaviour without reset.** The description only says this case was
  tested, not what should happen. Here, one clock edge with `cfg_i2s_en` low
  puts the FSM in IDLE and the line at rest. The FIFO pointers start
  anywhere, so the flags and contents mean nothing until the FIFOs are reset
  or read empty. In receive mode, `2 × depth` reads always empty them.
* **Clock frequency.** No clock frequency is given. One bit per `clk` cycle
  means `clk` must run at the bit rate, 32 × the sample rate for 16-bit
  stereo.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends it with a
failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb/tb_i2s_dp_fifo.sv` | overrun and underrun in both directions, simultaneous read and write at full and empty, 2000 random cycles with stray strobes of the unselected side against a queue model, reset |
| `tb/tb_i2s_protocol.sv` | reset values; STARTUP word and its length; exact cycle of the first channel-0 fetch; slot length; transmit with underrun zeros; receive with routing by WS; disable in the middle of a word and restart; on-the-fly switch TX→RX→TX with the SD driver hand-over |
| `tb/tb_i2s_pads.sv` | SCK gating, WS, SD drive and release, input path |
| `tb/tb_i2s_master_trx.sv` | whole block at default sizes, run as the verification plan: reset, simple TX (3 words), TX with overwrite (24 words), simple RX, RX overflow with 24 reads (underread), mid-word disable; counts that each mechanism happened and that SCK runs at one cycle per `clk` |
| `tb/tb_i2s_not_rst.sv` | whole block with `rst_b` never pulsed: line at rest after one edge with enable low, FIFOs flushed by host reads, then a transmit session checked on the line |

Two helper models in `tb/` are independent of the RTL:

* `i2s_line_monitor.sv` is a generic I2S receiver clocked by rising SCK.
* `i2s_line_source.sv` is a generic I2S slave transmitter.

Example, for the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/i2s_master_pkg.sv rtl/i2s_dp_fifo.sv rtl/i2s_protocol.sv rtl/i2s_pads.sv \
  rtl/i2s_master_trx.sv tb/i2s_line_monitor.sv tb/i2s_line_source.sv \
  tb/tb_i2s_master_trx.sv --top-module tb_i2s_master_trx -Mdir obj
./obj/Vtb_i2s_master_trx
```

The other testbenches need the package, their module and, for the protocol
test, the two line models. Each run takes well under a second.

The top-level testbench leaves SD as an open bus with a weak pull-up, so the
simulator must support tri-state resolution; recent Verilator versions do.
Synthesis of the top level needs a flow that keeps the `SD` inout port through
the hierarchy, or flattens the pad cell into a pad library instance.
