# Clockless three-wire serial link

A serial link whose power follows its traffic. Ordinary SERDES links keep a PLL
and a clock-and-data-recovery loop running all the time, because restarting
them takes hundreds of nanoseconds. This link has no clock at all. On each
side a single token circulates in a ring of cells, one cell per bit of the
parallel word, and each arrival of the token marks a bit boundary. When there
is no data, the token waits in a cell and nothing switches. When data arrives,
the token moves on at once, and the first bit leaves a few gate delays later.

To keep clock recovery out of the receiver, the link uses three wires instead
of a differential pair. Every bit is one pulse on one wire, and two
consecutive bits never use the same wire. The receiver therefore knows that a
new bit has arrived as soon as a wire other than the last one pulses. Which of
the two wires pulsed gives the bit's value.

The RTL here models this design at gate-delay resolution in synthesizable
SystemVerilog. It covers the transmitter ring, the receiver ring, the pulse
drivers, a 4-tap continuous-time feed-forward equalizer, the sense
amplifiers, and the parallel word interfaces. The architecture it models was
reported to reach 20 Gb/s per lane in 65 nm CMOS, with idle power about 1/50
of the power at full rate.

## The three-wire protocol

The link state is the wire that carried the previous bit (0, 1 or 2). The
next bit goes out on one of the other two wires:

    next = (state + 1 + bit) mod 3

| state | bit 0 goes on | bit 1 goes on |
|-------|---------------|---------------|
| 0     | wire 1        | wire 2        |
| 1     | wire 2        | wire 0        |
| 2     | wire 0        | wire 1        |

The receiver applies the inverse: a pulse on wire `w` after state `s` means
`bit = (w - s - 1) mod 3`. Both rings start in state 0. The functions
`fs_next` and `fs_bit` in `rtl/tw_pkg.sv` implement the mapping.

The only property the protocol requires is that no wire is used twice in a
row. The particular mapping above is a choice of this design. Because of that
property, each wire toggles at most once every two bits. Its bandwidth is
half the bit rate, and a pulse may be up to about two bit times long without
overlapping the next pulse on that wire.

## How time is modelled: one clock edge per gate delay

The real circuit has no clock. To let it run in an ordinary RTL simulator,
every module uses `clk` as a time base: **one clock edge stands for one gate
delay**, and every gate that the token passes through is one register. The
four-phase handshakes and pre-charge logic of the asynchronous circuit are
kept signal for signal:

* Tokens are 1-of-3 codes (`tok_t`): one rail high for a value, all low for
  the neutral spacer between values. Data bits are dual-rail (`dr_t`):
  `01` = 0, `10` = 1, `00` = neutral.
* Every channel runs a return-to-zero handshake with an active-high
  acknowledge, where high means "ready for data". Data appears, the receiver
  drops its acknowledge, the data returns to neutral, and the acknowledge
  rises again.
* Completion detectors are Muller C-elements: the output rises when all
  inputs are high, falls when all are low, and otherwise holds.

Two consequences for a user:

* The cycle counts in this README are gate delays. At the reported peak of
  20 Gb/s, one bit takes 50 ps. That corresponds to 25 ps per gate delay,
  since the token path is two gates per bit.
* Synthesizing the RTL gives a clocked circuit that behaves the same way, at
  one bit per two clock cycles. It is not a netlist of the clockless circuit.
  The idle behaviour carries over: with no data, no register changes value.

All resets are synchronous and active low (`rst_n`), and hold for at least
one clock edge.

## Transmitter (`serdes_tx`)

The ring has N + 1 stages: an Init State stage (`token_init`) followed by
N = 16 transmitter cells (`tx_cell`). The last cell feeds back to the Init
State stage. Cell i sends bit i of every word.

### Transmitter process (`tx_process`)

This is a pre-charge half-buffer stage with the following gates:

| register | gate it stands for | behaviour |
|----------|--------------------|-----------|
| `x`  | pre-charged f_s network | cleared while `en` = 0. While `en` = 1 it evaluates `f_s(U, L)` once token and data are valid, then holds |
| `t`  | output inverters | `t <= x`; T.0..T.2 |
| `c`  | validity + completion | C-element of "L valid", "U valid" and "output valid", with output validity taken from `x`, ahead of the inverters; `U.e = L.e = ~c` |
| `en` | second completion | C-element of `~c` and `T.e` |

The token takes **2 gate delays** from input to output: the f_s network, then
the output inverter. The output token goes to the next stage and, in
parallel, to the cell's driver. The driver does not acknowledge. So the
driver adds nothing to the token path. The price is a timing assumption: the
driver's pulse must be shorter than two bit times.

Reset phase: the next stage drops `T.e`, which drops `en`. `x`, and then `t`,
return to neutral. Once the inputs have also gone neutral, `c` falls, `U.e`
rises, and `en` rises again when the next stage has reset. With a single token
in a 17-stage ring, the reset always finishes long before the token returns.

### Init State (`token_init`)

The Init State stage is the same half buffer without a data input. It passes
the token unchanged. After reset it is "full": it holds state `INIT_STATE`
(0) with its acknowledge low, which is how a real ring gets its one token. It
costs one hop (2 gate delays) per revolution.

### Driver (`tx_driver`) and shared bus

When a rail of the cell's token rises, the driver produces a pulse of
`PULSE_W` = 2 gate delays on that wire. The pulse starts 1 gate delay after
the rail rises. The three bus wires are the OR of all 16 drivers. The
protocol keeps two cells from pulsing the same wire at once, and an assertion
in `serdes_tx` checks this.

### Equalizer (`ct_ffe`)

In a clocked link, an FFE's taps are spaced by the bit period. Here there is
no bit period. The taps are spaced by the token's hop time of 2 gate delays,
so the filter follows the data rate without retuning. For each wire:

    level(n) = sum_k TAP_MV[k] * pulse(n - 1 - 2k),   k = 0..3
    TAP_MV   = {-200, +40, +20, +10} mV

Levels are signed millivolts relative to the 0.6 V line bias. A pulse pulls
its wire down by the 200 mV driver swing. The three post-taps push the wire
back up afterwards to cancel the channel's trailing intersymbol interference.
The 4 taps and the 200 mV swing come from the published design. The weights are
placeholders to tune against a real channel.

### Word input (`tx_word_if`)

The word input takes a 16-bit word with valid/ready. It holds one word and
hands bit i to cell i over that cell's dual-rail channel as soon as the cell
has re-armed. The next word is accepted once every bit of the held word has
been handed out, which happens while the ring is still sending. Back-to-back
words therefore run without a bubble.

## Receiver (`serdes_rx`)

This ring has the same shape: an Init State stage and 16 receiver cells
(`rx_cell`). Each cell is a sense amplifier followed by a receiver process.

### Sense amplifier (`rx_sense_amp`)

The amplifier is a 3-input differential comparator with a latch. The cell's
incoming token names the previous state. That wire may still be carrying the
tail of the previous pulse, so it is ignored. Of the other two wires, the one
that drops at least `THRESH_MV` = 100 mV below the other is latched as the
bit, in one gate delay.

There is no sampling instant: the amplifier waits for the wires to separate.
This is what makes the link tolerant of jitter and of any data rate.

The clear is the key receiver optimization. The latch is cleared when the
token from the neighbouring cell goes back to neutral. So the previous cell
computes the clear in advance, and the cell's own process never sits in the
clear path.

### Receiver process (`rx_process`)

One gate, with no output inverter: `t = f_s(U, D)`, which equals the wire
that was just received. In the same gate delay, `bit_o` takes the bit and
`bit_stb` pulses once. The handshake is the same as in the transmitter. The
receiver's token path is therefore also **2 gate delays** per bit: capture,
then next state.

### Word output (`rx_word_if`)

The word output collects the 16 strobed bits. When the last cell strobes, it
presents the word with a one-cycle `valid`. Nothing can stall the incoming
link, so there is no ready, and the word must be taken within one revolution
(34 gate delays).

## Timing summary

All figures are in gate delays (clock edges).

| path | delay |
|------|-------|
| token hop, transmitter cell or Init State | 2 |
| token hop, receiver cell (once the pulse is there) | 2 |
| word accepted to first pulse on the bus (idle link) | 5 |
| token input of a cell to its pulse on the bus / on the line | 3 / 4 |
| bits within a word at peak rate | 1 every 2 |
| word period at peak rate, N = 16 | 2 (N + 1) = 34 |
| last receiver cell fires to `rx_valid` | 1 |

Token-rail switching is exactly 4 (N + 1) transitions per word, in both
rings together, at any rate. While idle it is zero.

## Top level (`serdes_top`)

The channel (PCB traces, package, termination) sits outside the RTL. The top
brings out what the transmitter drives and takes in what reaches the
receiver. For a loopback, connect `tx_line` to `rx_line` directly or through
a channel model.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | time base, one edge per gate delay |
| `rst_n` | in | 1 | synchronous active-low reset |
| `tx_word`, `tx_valid`, `tx_ready` | in, in, out | N, 1, 1 | words to send; taken when valid and ready are both high |
| `tx_bus` | out | 3 | pulses on the three wires before equalization |
| `tx_line` | out | 3 x 10 | equalized drive level per wire, signed mV from bias |
| `rx_line` | in | 3 x 10 | level per wire at the receiver, signed mV from bias |
| `rx_word`, `rx_valid` | out | N, 1 | received word and its one-cycle valid |

| parameter | default | where | note |
|-----------|---------|-------|------|
| `N` | 16 | top, `serdes_tx`, `serdes_rx`, word interfaces | bits per word = cells per ring |
| `PULSE_W` | 2 | `tx_driver` | must stay below 2 bit times |
| `TAPS`, `TAP_DELAY`, `TAP_MV` | 4, 2, {-200, 40, 20, 10} | `ct_ffe` | delay is one token hop |
| `THRESH_MV` | 100 | `rx_sense_amp` | half the swing |
| `INIT_STATE` | 0 | `token_init` | must match on both sides |

## Where this RTL departs from the reported design

* **Init State in the ring.** The Init State stage sits inside both rings and
  costs one extra hop per word. A word therefore takes 34 gate delays instead
  of 32: 20 Gb/s within a word, about 18.8 Gb/s averaged over words at
  25 ps per gate. If the real circuit injects its token without a ring stage,
  the rings can be closed from cell N-1 to cell 0 instead.
* **Choices of this design:**
  * the f_s mapping;
  * completion elements modelled as C-elements, with the validity gates
    folded into the first one;
  * the pulse width;
  * the equalizer tap weights;
  * the sense-amplifier threshold, and the rule of comparing the two
    candidate wires;
  * the word-level handshakes.
* **Analog parts are numbers.** The current-mode output stage, the
  termination and the transmission line are not modelled. The equalizer's
  output and the receiver's input are integer millivolts at gate-delay steps.
  That is enough to exercise the protocol and the equalizer arithmetic, but
  it cannot show whether an eye opens on a real channel.
* **Timing robustness.** In the real circuit, the driver pulse width and the
  sense amplifier's speed are analog timing assumptions. Here they are exact
  cycle counts. The receiver keeps pace at peak rate with one gate delay of
  slack: a pulse is 2 gate delays long, and the receiver needs 1 of them to
  latch. This slack is exactly the T/2 jitter tolerance that the protocol is
  meant to give at peak rate. With a full bit time of random jitter, words
  are corrupted. At lower rates the margin grows with the gap between bits.
  The receiver's own Init State hop also needs the 2-gate pause that the
  transmitter's Init State stage leaves between words. A sender that
  packed words closer than 34 gate delays would overrun the receiver ring.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/tw_pkg.sv \
        tb/tb_serdes_top.sv --top-module tb_serdes_top
    ./obj_dir/Vtb_serdes_top

| testbench | what it shows |
|-----------|---------------|
| `tb_serdes_top` | full link at default size through a channel model (3 gate delays of flight, 1/4 of each level smeared into the next gate delay). PRBS31 (x^31 + x^28 + 1) words back-to-back, with random gaps, and in bursts between idle gaps. Checks: every word; peak word spacing of 34; restart latency of 5; all six state transitions; de-emphasis; zero activity while idle; exactly 68 token transitions per word |
| `tb_link_workloads` | default-size link. Rate sweep from 200 Mb/s to 20 Gb/s (word periods of 3400 down to 34 gate delays): every word costs exactly 68 token transitions, so activity per unit time grows linearly with the rate. Then 40 words at peak rate with every pulse given a random extra 0 or 1 gate delay of flight time (T/2 jitter): all words intact |
| `tb_serdes_tx` | bus decoded independently into words; bit spacing 2 and word spacing 34 at peak; line levels equal the 4-tap sum; bus quiet when idle |
| `tb_serdes_rx` | bench-side encoder at peak timing and at slow random timing; every word; word spacing 34 |
| `tb_tx_process`, `tb_rx_process` | all (state, bit) pairs; 2 and 1 gate delays forward; handshake ordering |
| `tb_token_init` | initial token, pass-through, 2-gate latency |
| `tb_tx_driver` | pulse position and width for `PULSE_W` = 2 and 3 |
| `tb_tx_word_if`, `tb_rx_word_if` | bit-to-cell order with random cell timing; word valid timing |
| `tb_ct_ffe` | every cycle against a reference sum |
| `tb_rx_sense_amp` | threshold, ignored state wire, latch hold, neighbour clear |

Each testbench runs in well under a second.

## Files

* `rtl/tw_pkg.sv`: types and the protocol functions.
* `rtl/serdes_top.sv`: the link.
* Transmitter: `serdes_tx`, `tx_word_if`, `token_init`, `tx_cell`,
  `tx_process`, `tx_driver`, `ct_ffe`.
* Receiver: `serdes_rx`, `rx_cell`, `rx_sense_amp`, `rx_process`,
  `rx_word_if`.
* `tb/`: one self-checking testbench per module, named `tb_<module>.sv`.
