# HSCC: a three-level digital cross-correlator for microwave polarimetry

A passive microwave polarimeter measures ocean wind from the correlation
between the horizontally and vertically polarised components of the received
signal. After quadrature demodulation each polarisation gives an in-phase (I)
and a quadrature (Q) signal, and each is digitised to three levels
(-1, 0, +1) at up to 500 Msample/s. The correlator counts, over an
integration time of up to 2^24 sample clocks, how often each product of
interest is +1 or -1. It then hands the counts to a microprocessor through a
small RAM-like bus.

This RTL models that correlator as a chip: sixteen identical *correlation
slices*, a clock divider, an integration timer, interrupt logic and a host
interface. The architecture is the published one for a radiation-tolerant,
0.5 V correlator. It splits the work so that only a handful of flip-flops
run at 500 MHz. This SystemVerilog keeps that partition: one always_ff per
drawn flip-flop in the fast stages. It also adds what the original
description leaves open: the address map, register layout, reset, bus
timing and interrupt clearing. Those additions are listed below.

## Signals and the sixteen products

Each of the four signals (stream A or B, component I or Q) arrives as two
bits: P is high for +1, M is high for -1, and both are low for 0. The eight
inputs are `aip aim aqp aqm bip bim bqp bqm`.

Every slice has the same front end, an AND-OR gate
`z = (AX & BX) | (AY & BY)`. What a slice measures depends only on how its
four gate inputs are wired (`hscc_pkg::SLICE_WIRING`):

| slice | name | AX | BX | AY | BY | counts cycles where |
|---|---|---|---|---|---|---|
| 0 | II+ | AIP | BIP | AIM | BIM | A_I * B_I = +1 |
| 1 | II- | AIP | BIM | AIM | BIP | A_I * B_I = -1 |
| 2 | IQ+ | AIP | BQP | AIM | BQM | A_I * B_Q = +1 |
| 3 | IQ- | AIP | BQM | AIM | BQP | A_I * B_Q = -1 |
| 4 | QI+ | AQP | BIP | AQM | BIM | A_Q * B_I = +1 |
| 5 | QI- | AQP | BIM | AQM | BIP | A_Q * B_I = -1 |
| 6 | QQ+ | AQP | BQP | AQM | BQM | A_Q * B_Q = +1 |
| 7 | QQ- | AQP | BQM | AQM | BQP | A_Q * B_Q = -1 |
| 8..15 | pin counts | pin | 1 | 0 | 0 | AIP, AIM, AQP, AQM, BIP, BIM, BQP, BQM high |

The direct/inverse wiring of the cross slices is the original one. The
slice order and tying the pin-count gates to constants are this design's.
Subtracting the inverse from the direct count gives the correlation. The
pin counts give the signal statistics needed to normalise it.

## Inside a slice: one divide-by-256 at three clock rates

A slice reports the number of cycles with `z` high, divided by 256, per
integration. A single 24-bit counter clocked at 500 MHz would have to be large,
fast and still hard to harden. Instead, the count goes through three stages. Each stage
runs at a lower clock and has its own protection against radiation upsets:

```
 z @CK500 --> [stage 1: toggle FF + 3-bit ripple, /16] --BIT3-> resync @CK63
          --> [stage 2: edge detect + 4-bit counter, /16] --MSB-->
          --> [stage 3 @CK2: edge detect + 16-bit accumulator] --LOAD--> 16-bit buffer
```

**Stage 1 (`corr_stage1`, CK500).** BIT0 toggles in each cycle with `z`
high. BIT1 to BIT3 form a ripple counter: each flip-flop is clocked by the
previous bit. A ripple counter keeps up with a 500 MHz toggle rate, which a
synchronous counter would not. Its settling time can exceed a 2 ns period,
so a fifth flip-flop samples BIT3 with CK63. Each ripple stage triggers on
the rising edge of the previous bit, so the four bits count *down*. From
reset, BIT3 first falls after the 9th event and then after every 16th.
BIT3 keeps each level for at least 8 events, that is 8 CK500 cycles, which
is exactly one CK63 period, so no level is missed.

**Stage 2 (`corr_stage2`, CK63 = CK500/8).** CORRIN is registered twice
(OLD_CORRIN, then OLDER_CORRIN gated by RUN). The 4-bit counter advances
when OLDER is high and OLD is low, that is once per falling edge of the
stage-1 output. Its MSB is the stage output and falls once per 256 events.
While RUN is low the counter is held at zero.

**Stage 3 (`corr_stage3`, CK2 = CK500/256).** The same two-register
detector counts falling edges of the stage-2 MSB into a 16-bit accumulator.
At the end of an integration (`load`, one CK2 cycle) the accumulator is
copied into the buffer and cleared in the same cycle. A count arriving in
that cycle goes into the buffer. The buffer keeps its value for the host
during the whole next integration. The accumulator saturates at 0xFFFF and
is cleared while RUN is low.

Two consequences are easy to miss:

* **Nothing is lost at integration boundaries.** Stages 1 and 2 are not
  cleared by `load`, so their residue (up to 255 events) carries into the
  next integration. Over a run with RUN held high, the buffers add up to
  exactly `floor((events + 7) / 256)`. The `+7` comes from the
  down-counting ripple counter. The end-to-end testbench checks this sum
  exactly.
* **Rate limit.** The stage-2 MSB keeps a level for 128 events, and CK2
  samples it only every 256 CK500 cycles. Counts are therefore exact only
  while a slice's product is true in at most about half the cycles. For
  three-level samples of noise-like signals a product is true far less
  often (typically 10 to 30 %). A pin stuck high, however, would be
  under-counted. This limit follows from the clock plan; the original
  description does not discuss it.

## Clocks

`clock_pad` is a behavioural model (with delays) of the custom clock pad.
From the pad it drives CKP/CKPN, a matched true/inverted pair that goes to
the data pads. It also drives CKI/CKIN, the same pair delayed a little
further, for the slices. The extra delay covers the data pad flip-flop's
clock-to-output time, so the correlation gate gets the whole cycle.
`data_input_pads` is the flip-flop in each data pad.

Simulation differs from silicon here in one way. The pad flip-flop has no
clock-to-output delay in simulation, so the slices, clocked by the later
CKI, take a sample in the same cycle in which the pad captured it. In
silicon the sample arrives one cycle later. Counts are unaffected. The
models of the real flip-flops use only the true clocks.

`clock_divider` counts CKI on its falling edge and provides
CK63 = CK500/8 (62.5 MHz) and CK2 = CK500/256 (1.95 MHz). Counting on the
falling edge is this design's choice. It puts every derived clock edge half
a CK500 period away from the edges that update stage 1. Rising edges of CK2
also coincide with falling edges of CK63. So every crossing between the
three clocks is free of races, in simulation and in timing.

## Integration, INTR and ERR

`clock_counter` counts CK2 ticks while RUN is high. When the count reaches
`itime - 1` it raises `load` and restarts. An integration therefore lasts
`itime x 256` CK500 cycles, and `itime = 0` selects the maximum,
65536 x 256 = 2^24 cycles.

`interrupt_logic` sets INTR at each `load`. INTR clears when the host
finishes a read of buffer word 15, the last of the sequential buffer block.
If a `load` comes while INTR is still set, the previous results have been
overwritten and ERR rises. ERR stays set until the host writes the status
word. The clearing rules are this design's choices.

## Host interface (`io_control`)

The chip answers like an asynchronous RAM of 32 16-bit words:

| address | access | content |
|---|---|---|
| 0x00-0x0F | read | buffer of slice 0-15 (word 15 last; reading it acknowledges INTR) |
| 0x10 | read/write | configuration; bit 0 = RUN |
| 0x11 | read/write | integration time, units of 256 CK500 cycles, 0 = 65536 |
| 0x12 | read: bit 0 INTR, bit 1 ERR; write: clear ERR | status |
| 0x13-0x1F | read as 0 | unused |

The port names (CS active high, RDN, WRN, ADDR[4:0], DATA[15:0], RSTN,
INTR, ERR) are the chip's. In this RTL the bidirectional DATA bus is split
into `data_in`, `data_out` and `data_oe`.

* **Read:** while CS is high and RDN is low, `data_oe` is high and
  `data_out` shows the addressed word. This path is combinational.
* **Write:** the register is written when WRN rises while CS is high.
* **Timing:** the control logic runs on CK2 and synchronises RDN and WRN
  through three registers. Each strobe must stay low for at least three
  CK2 periods (about 1.5 us) and then high for three. Address and data
  must be stable while the strobe is low.
* **Reading the buffers:** they are read directly while the next
  integration runs. A read that straddles a `load` can return the new
  value.
* **Changing the integration time:** change it with RUN low. Lowering it
  below the current count makes that integration run on to the counter's
  wrap.

The control state is **dual-rail**, as in the original design. The
next-state logic (`io_next_state`) is instantiated twice. Every state bit is
an `rt_dual_reg` bit, which takes a new value only when both copies agree.
A transient in one copy is therefore ignored. Synthesis flows that merge
identical logic must be told to keep the two instances.

## Where this RTL goes beyond or departs from the original description

The original description gives the block structure, the sizes, the clock
plan, the slice wiring and the stage 1 and stage 2 circuits. The following
are this design's own choices or findings:

* an asynchronous active-low reset (RSTN) on every counter and register,
  including the stage-1 ripple flip-flops;
* the falling-edge clock divider, and the exact taps CK500/8 and CK500/256;
* the stage-3 edge detector, accumulator saturation and clearing while RUN
  is low, and the resulting rate limit described above;
* the comparator encoding (`itime - 1`, with 0 meaning the maximum);
* INTR and ERR clearing, the address map, the register layout, the
  CK2-synchronised bus protocol and the split DATA bus;
* the clock pad delay values, and the one-cycle latency difference between
  simulation and silicon at the pads.

Host bus cycles are slow: each access takes at least six CK2 periods,
about 3 us. Reading all sixteen buffers therefore takes about 100 CK2
ticks. With integration times shorter than that, the host cannot read
every integration, and ERR will rise.

## What is not modelled

* The 3.3 V to 0.5 V level shifters of the bus and the back-bias tuning of
  the 0.5 V process: these are analog.
* The SEU-tolerant, temporally separated flip-flops of the 2 MHz sections:
  the fault-free logic behaviour of these storage cells is that of an
  ordinary flip-flop, which is what the RTL uses.
* The full-custom layout matching of stage 1.
* The off-chip sensors, IF stages and ADCs, and the host processor: the
  testbenches generate three-level samples and bus cycles directly.

## Files

`rtl/` holds one module or package per file:

* `hscc_pkg` (sizes, pin enum, slice wiring, address map, control state)
* `hscc_top`
* `clock_pad`, `data_input_pads`, `clock_divider`
* `corr_slice`, `corr_stage1`, `corr_stage2`, `corr_stage3`
* `clock_counter`, `interrupt_logic`
* `io_control`, `io_next_state`, `rt_dual_reg`

Every `tb/tb_<module>.sv` is self-checking and prints
`TB_RESULT checks=N failures=M`. Two testbenches cover the whole chip:

* **`tb_hscc_top`** runs the chip at its default sizes. It feeds correlated
  random three-level data and reads every integration through the bus. Per
  buffer, it checks window counts within ±2 and the exact sum over a run.
  It also checks the interrupt period, a skipped read raising ERR and
  clearing it, RUN stop, a change of integration time, and an upset
  injected into one rail of the dual-rail control, which must be ignored.
  It counts each of these mechanisms.
* **`tb_hscc_max_integration`** runs one integration of 2^24 cycles. It
  checks that INTR rises exactly 2^24 CK500 cycles after RUN takes effect,
  and that no buffer overflows. It takes about two minutes.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/hscc_pkg.sv tb/tb_hscc_top.sv --top-module tb_hscc_top -o sim
./obj_dir/sim
```

Lint with
`verilator --lint-only -Wall --timing -Irtl -y rtl rtl/hscc_pkg.sv rtl/hscc_top.sv`.
The block testbenches use reduced widths where that makes saturation or
counter wrap reachable: `tb_corr_stage3` (ACC_W = 6), `tb_clock_counter`
(CNT_W = 5) and `tb_rt_dual_reg`.
