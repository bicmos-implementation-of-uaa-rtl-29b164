# UAA 4802 PLL frequency synthesizer: digital core in SystemVerilog

A TV or FM tuner has to put its local oscillator on a frequency chosen from a
grid, and keep it there. The UAA 4802 does this with a phase-locked loop.
The oscillator (VCO) signal is divided down by a fixed divide-by-8 prescaler
and then by a programmable ratio N. A 4 MHz crystal is divided down by a
selectable ratio R. A phase/frequency detector compares the two divided
signals and steers the VCO through a charge pump and a loop filter until both
run at the same frequency and in phase:

    f_vco = 8 * N * (4 MHz / R)     N = 8 .. 32767,  R = 2048, 1024, 512, 256

With R = 512 the grid step is 62.5 kHz, and N = 20800 puts the VCO at
1.3 GHz. For signals below about 165 MHz, control bit P switches the
prescaler off. The divider then counts the second input directly, and
f_vco = N * f_ref. N, R, P and eight band-switch outputs are written over
a two-wire serial bus (M-Bus, compatible with I2C).

The chip mixes technologies. Its front end runs at 1.3 GHz and its outputs
at 32 V, so those parts stay bipolar. Everything else is slow enough for
CMOS, except the first stages of the programmable divider. The one hard
part of the design is that divider. Its first three stages must be fast,
while the other twelve are slow and cheap. Reloading those slow stages in
a single 6 ns input period is not possible. The divider solves this by
preloading in stages, described below. This repository holds synthesizable
RTL for the whole digital core: the bus receiver, shift register and
latches, prescaler, programmable divider, reference divider, phase
detector and test multiplexer. The analog parts appear only as ports.

## Signal path

```
 rf_clk ──► prescaler ÷8 ──┐
                           ├─(P)─► div_clk ─► prog_divider ÷N ─► fdiv ─┐
 rf2_clk ──────────────────┘                      ▲ n                 ├─► phase_detector ─► out1_n / out2_n
                                                  │                   │        ▲ tes, tri
 osc_clk ─► ref_divider ÷R ─► fref ─(sync)────────┼───────────────────┘        │
                 ▲ R0,R1                           │                           │
 scl,sda ─► mbus_receiver ─► shift_latches ─► latch_b (at preload)             │
                 │ ack          │ control, band                                │
                 ▼              └──────────► test_control ─► bb[7:0] ──────────┘
              sda_pull
```

| File | Contents |
|---|---|
| `rtl/uaa4802_pkg.sv` | chip address, word width, power-on values, `ctrl_t` control/band record |
| `rtl/prog_divider.sv` | 15-bit divider with staged preload |
| `rtl/prescaler.sv` | fixed divide-by-8 |
| `rtl/ref_divider.sv` | 11-stage reference divider with three bypassable stages and the 62.5 kHz tap |
| `rtl/phase_detector.sv` | type-4 phase/frequency detector, alive-zone pulse, test states |
| `rtl/mbus_receiver.sv` | bus slave: START/STOP, address check, acknowledge, byte pairing |
| `rtl/shift_latches.sv` | 15-bit shift register, latches A (ratio), control and band latches |
| `rtl/latch_b.sv` | latches B: second rank of the ratio register, written only at preload |
| `rtl/test_control.sv` | test multiplexer for pins 10/11, TES/TRI decode, FBY2 |
| `rtl/sync2.sv` | two-flop synchronizer |
| `rtl/uaa4802_top.sv` | the core, wired together |

## The programmable divider and its staged preload

The divider is a down counter. Whenever it reaches zero it reloads N, so it
produces one output pulse every N input clocks. The reload pulse itself is
the output, so no extra decoding of the count is needed.

The difficulty is the reload. At 165 MHz one input period is 6 ns. A
naive design would have to decode "all zero", load fifteen flip-flops and
let them recover within that time. The fast front section can do this:
stages D1-D3 were bipolar in the original. The twelve slow CMOS stages
D4-D15 cannot. The answer is to let the slow stages preload *early*, while
the fast section is still counting. The slow stages are split into four
subsections. Each subsection has its own set-dominant preload flag:

| Subsection | Flag | Flag is set when | Flag is cleared by |
|---|---|---|---|
| D11-D15 | PL_D11-15 | D11-D15 = 0 | PL_D5-6 |
| D7-D10 | PL_D7-10 | D7-D10 = 0 and PL_D11-15 | DECODE |
| D5-D6 | PL_D5-6 | D5-D6 = 0 and PL_D7-10 | PL_D4 |
| D4 | PL_D4 | DECODE = PL_D5-6 and D4 = 0 | PL_ECL |
| D1-D3 | PL_ECL (one clock) | D1-D3 = 0 and PL_D4 | itself, next clock |

A subsection holds its preload bits, and ignores borrows from below, for as
long as its flag is up. The flags rise from the top of the counter down:

1. The upper subsections reach zero and raise their flags one after the
   other. The subsection above is already frozen, so no borrow can leak
   upward into a stage that has just been loaded.
2. Each flag is cleared from below, one step later than it was needed.
   This gives the upper sections a long settling time: D11-D15 gets many
   clocks, D4 gets seven.
3. PL_D4 rises while D1-D3 still count 7 → 0. When D1-D3 reach zero,
   PL_ECL fires for one clock. In that clock D1-D3 take their preload
   bits, D4 is released, and the count restarts from N.

One division cycle is therefore exactly N clocks. `fdiv` (= PL_D4) is high
for 7 clocks of every N. `pl_ecl` is a one-clock strobe per cycle.

There is one awkward case: the low three preload bits are 000. The first
clock after PL_ECL then wraps D1-D3 to 111 and must borrow from D4 at
once. In the original this is why D4 is built differently from the other
slow stages. Here D4 is allowed to take that borrow in the very cycle it
is released. The testbench covers every ratio whose low bits are zero for
this reason.

The smallest ratio is 8. With D4-D15 all zero, PL_D4 never rises. The
original all-bipolar chip was limited to 17 for a different reason, its
output pulse width. Ratios below 8 give no defined output.

The original is a ripple counter with analog settling windows. This RTL is
a single synchronous circuit clocked by the divider input, so each
"window" is a number of clocks of a flag. The preload order, the set and
clear rules, and the output taken from PL_D4 are those of the original.

## Getting a ratio into the divider: bus, latches A, latches B

**Bus format.** A transfer is START, the address byte `1100_0010`, two or
four data bytes, then STOP. Each byte is acknowledged by pulling SDA low
(`sda_pull`). Data bytes come in pairs. The first bit of a pair's first
byte is the function bit:

| Pair | Byte 1 | Byte 2 |
|---|---|---|
| control/band | `1 R6 T P R3 R2 R1 R0` (CO) | `P7 … P0` (BA) |
| frequency | `0 Q15 … Q9` (FM) | `Q8 … Q1` (FL) |

The two pairs may come in either order.

- A lone third data byte is discarded.
- A fifth or later byte is not acknowledged and is ignored.
- A foreign address is neither acknowledged nor stored.

**Receiver.** The receiver samples SCL and SDA with the 4 MHz oscillator.
That gives 20 samples per SCL half period at the 100 kHz bus limit. The
receiver passes each data bit to the 15-bit shift register (`dat`,
`clo`). After the second byte of a pair it pulses `dtf` (frequency) or
`dtb` (control/band). The function bit is shifted out of the 15-bit
window, so the register holds exactly Q15..Q1 or R6..R0,P7..P0.

**Double latch.** Latches A take the ratio whenever the bus delivers it,
which is asynchronous to the divider. Latches B feed the divider and
change only in the clock that ends a PL_ECL cycle. The divider therefore
never sees a half-written ratio. A ratio written at that moment runs one
more full period at the old value, then switches cleanly. A write to
latches A flips `a_toggle`. The toggle is synchronized into the divider
clock domain, and latches B copy latches A at the next preload after the
change arrives.

**Power-on.** Reset sets N = 256 in both ranks and clears all control and
band bits. The result is reference ratio 2048, prescaler on, normal
detector, band buffers off.

## Reference divider

The reference divider is eleven divide-by-two stages. Stages 9-11 (FF18,
FF19, FF20 in the original numbering) can each be bypassed, so the input
passes straight through:

| R0 | R1 | Bypassed | Ratio |
|---|---|---|---|
| 0 | 0 | none | 2048 |
| 1 | 0 | FF20 | 1024 |
| 0 | 1 | FF18, FF19 | 512 |
| 1 | 1 | FF18, FF19, FF20 | 256 |

The stages are enabled toggle flip-flops on the one oscillator clock; a
bypassed stage is held at zero and passes its enable on. Stage 6 gives the
62.5 kHz test signal (4 MHz / 64).

## Phase detector

The phase detector is a type-4 (tri-state) phase/frequency detector. It
has two remembered states:

- A rising edge of `fref` sets UP.
- A rising edge of `fdiv` sets DOWN.
- When both are set, both clear.

Both outputs are active low. `out1_n` (OUT1) is low while UP is set, so it
pulses when the reference leads. `out2_n` (OUT2) is low while DOWN is set,
so it pulses when the divider leads. When the frequencies differ, only one
output is ever active. This makes the detector frequency-sensitive and
independent of duty cycle. The divider output's 7-clock pulse relies on
that independence.

**Alive zone.** Each time the pair clears, OUT2 stays low for
`ALIVE_CYCLES` more clocks. In lock there is therefore still a small pulse
on OUT2 every cycle, balanced by a matching pulse on OUT1. The charge pump
never sits completely idle near zero phase error, which removes the dead
zone. The original generates this pulse with a chain of twelve inverters,
about 10 ns. Here it is two divider clocks, which at 165 MHz is about the
same.

**Charge pump.** OUT2 low makes the pump source current. OUT1 low makes it
sink current. Both high is high impedance.

**Test states.** The test inputs TES = !R2 & R6 and TRI = T override the
outputs:

| TES | TRI | OUT1 | OUT2 |
|---|---|---|---|
| 0 | 0 | normal | normal |
| 0 | 1 | off | off |
| 1 | 0 | off | low (upper source only) |
| 1 | 1 | low | off (lower source only) |

**Clocking.** The detector runs on the divider clock. `fref`, TES and TRI
are brought into that domain by two-flop synchronizers. Phase resolution is
therefore one divider clock, 8 VCO periods with the prescaler on.

## Test pins and band outputs

Band bits P0..P7 drive `bb[0..7]` (1 = buffer on, pin pulled low). Two of
these outputs, BB5 and BB6 (`bb[4]`, `bb[5]`, pins 10 and 11), can show
internal signals instead:

| R2 | R3 | pin 10 (`bb[4]`) | pin 11 (`bb[5]`) |
|---|---|---|---|
| 0 | 1 | 62.5 kHz | band bit |
| 1 | 0 | FREF | FBY2 (fdiv / 2) |
| otherwise | | band bit | band bit |

## Clocks and reset

| Clock | Logic it runs |
|---|---|
| `osc_clk` (4 MHz) | bus receiver, shift register, latches A, control/band latches, reference divider |
| `div_clk` (prescaler output, or `rf2_clk` when P = 1) | divider, latches B, phase detector, FBY2 |

The divider clock is the OR of the two sources, with the unused one held
off. The prescaler is held in reset while bypassed. P should only change
while the loop is not required to hold lock.

`rst_n` is the power-on reset. It is asynchronous, active low, and must
have a falling edge. Flops in the divider domain see it even when their
clock is stopped.

`uaa4802_top` brings out `prescaler_on` (the preamplifier current switch),
`fdiv` and `fref` for observation.

## What lies outside the RTL

These parts are analog or high-voltage and are not modelled:

- the two RF preamplifiers;
- the 4 MHz crystal oscillator circuit;
- the charge pump and the 32 V loop-filter op-amp;
- the open-collector band-buffer transistors;
- the power-on reset circuit.

The ports they would connect to are the top-level ports listed above.

## Where this core differs from the silicon

- **Synchronous logic.** The chip's ripple counters (divider, reference
  divider, bus bit counter) and its asynchronous gate-level phase detector
  are written as synchronous logic, one clock per domain. Ratios, preload
  order, bus behaviour and detector behaviour are the same. Absolute delays
  become clock counts.
- **Ratio transfer.** Latches B are written only at a preload with a new
  value pending. There is no extra transfer at a bus START condition.
- **Bus acknowledge.** Bytes after the fourth are not acknowledged.
- **Test pins.** Pins 10/11 are taken to be BB5/BB6. In test modes that
  leave a pin unused, the pin carries its band bit.
- **Ratio range.** N = 8 is the minimum, as in the mixed bipolar/CMOS
  divider. The all-bipolar chip's minimum was 17.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uaa4802_pkg.sv \
    tb/tb_prog_divider.sv --top-module tb_prog_divider
./obj_dir/Vtb_prog_divider
```

| Testbench | What it checks |
|---|---|
| `tb_prog_divider` | period N, 7-clock output pulse and PL_ECL timing for the ends of the range, every subsection boundary, ratios with low bits zero, random ratios |
| `tb_prescaler` | divide-by-8 period and duty cycle |
| `tb_ref_divider` | all four ratios and the 62.5 kHz tap |
| `tb_phase_detector` | lead, lag, frequency error both ways, alive pulse, all test states |
| `tb_mbus_receiver` | address match and mismatch, acknowledges, both pair orders, 3- and 5-byte transfers |
| `tb_shift_latches` | shift order, latch A/control writes, power-on values |
| `tb_latch_b` | transfer only at preload and only with a new value |
| `tb_test_control` | all R2/R3 pin selections, TES/TRI decode, FBY2 |
| `tb_uaa4802_top` | the whole core at its real sizes (below) |

`tb/mbus_master.sv` is the bus master model that the bus tests use.

`tb_uaa4802_top` runs the whole core. The oscillator runs 250 times slower
than the VCO input, and the bus runs at the 100 kHz/4 MHz ratio. The test:

1. checks the power-on ratios;
2. writes control, band and frequency words in all four bus orders;
3. measures the divider and reference periods;
4. checks that N = 7000 and N = 9000 give only DOWN and only UP
   corrections;
5. runs the prescaler bypass;
6. sends a foreign address;
7. exercises all test pins and detector test states.

For the lock check it closes the loop: a behavioural VCO is retarded by
OUT2 pulses and advanced by OUT1 pulses. The testbench then checks that
only the short alive-zone pulses remain. It counts each of these
mechanisms and fails any that never happened. It runs in about 15 s.
