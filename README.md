# 16-PSK Alamouti transmitter for a two-antenna FPGA testbed

This is the baseband transmitter of a 2x1 MIMO link. It uses Alamouti space-time
block coding (STBC), and the RTL runs inside the FPGA of a software-radio testbed.
Every byte is cut into two 16-PSK symbols. Both symbols go out from both antennas
over two time slots, and the second antenna sends a rearranged, conjugated copy.
A receiver can then combine the two paths linearly and get transmit diversity
without losing data rate. The FPGA drives the digital I/Q samples straight to
the DAC of each antenna's RF module. The DAC converts them to analog and mixes
them onto the RF carrier.

The data source is an 8-bit counter inside the FPGA. The transmitter sends
0x00, 0x01, ... 0xFF, 0x00, ... without end, which is what a bench test of the
RF chain needs.

## The Alamouti code

For a symbol pair (s1, s2) the two antennas send:

|           | slot 1 | slot 2 |
|-----------|--------|--------|
| antenna 1 | s1     | -s2*   |
| antenna 2 | s2     | s1*    |

`*` is the complex conjugate. Each slot is 32 clocks, so one byte takes two
slots. `alamouti_encoder` turns (s1, s2, slot, channel) into a command: the
symbol to send plus two flags, `conj` and `neg`. The sample generator applies
those flags to every sample in the slot:

* `conj` negates Q;
* `neg` negates I and Q;
* -s2* therefore sends (-I, +Q), and s1* sends (+I, -Q).

## From a symbol to DAC samples

A slot is not one constellation point held for a while. It is a short stretch
of carrier. For every clock of the slot, each antenna sends one complex sample:

    theta(n) = 2*pi * (2k + n) / 32        k = symbol (0..15), n = 0..31
    I = A*cos(theta),  Q = A*sin(theta),   A = 2^(DAC_W-1) - 1

* Each slot holds exactly one carrier period, at 1/32 of the clock rate.
* The carrier starts at the phase of the symbol, k x 22.5 degrees.
* The mapping is natural binary: 0000 is at 0 degrees and 1111 is at 337.5 degrees.
* The amplitude uses the DAC's full range.
* Because of the factor 2k, every symbol phase lies on the 32-step sample grid.
  This lets a single 32-point sine table serve both the symbol mapping and the
  carrier.

`psk16_wavegen` holds a quarter-wave table with 9 entries,
`round(A*sin(k*pi/16))` for k = 0..8. The values are computed at elaboration
from `DAC_W`, so changing the DAC width needs no table edit. The other three
quarters come from symmetry. Cosine is the sine read 8 steps (90 degrees) ahead.
With the default `DAC_W = 12` the amplitude A is 2047. Two examples:

* symbol 0001 starts at (1891, 783);
* symbol 1001 starts at (-1891, -783), which is 202.5 degrees.

Conjugation is applied to the whole waveform. A conjugated slot therefore
starts at -theta and its carrier turns the other way. This matches the code
above, applied sample by sample.

## Controller, channels and frame timing

The design has one controller and two channel processors. All three share one
clock and one reset.

**`broadcast_cont` (controller)** owns the byte counter. It has two states:

* `WAIT_PREPARE`: stays here while any channel is still busy. It moves on only
  when every channel raises `ready`.
* `WAIT_ACTIVE`: drives one `allow` line to all channels and holds the byte
  steady. When every channel reports `active`, it pulses `frame_start`,
  advances the counter and returns to `WAIT_PREPARE`.

**`broadcast_core` (one per antenna)** has the states `RESET` -> `INITIALIZE` ->
`PREPARE` -> `ACTIVE`:

* `RESET` and `INITIALIZE` last one clock each after reset.
* `PREPARE` raises `ready`. When `allow` arrives, the core latches the byte with
  s1 = `data[7:4]` and s2 = `data[3:0]`.
* `ACTIVE` lasts 64 clocks: slot 1, then slot 2. After that the core returns to
  `PREPARE`.

The channel's role in the code is set by the `CHANNEL` parameter (1 or 2).

Both cores see the same `allow` on the same clock edge. Their slots are
therefore aligned sample for sample. The Alamouti code relies on this, because
the receiver treats the two slots of both antennas as one block.

Cycle by cycle, from the clock where both cores are in `PREPARE`:

| clock  | controller   | cores                    | outputs                          |
|--------|--------------|--------------------------|----------------------------------|
| t      | WAIT_PREPARE | PREPARE, `ready`         | idle (0)                         |
| t+1    | WAIT_ACTIVE  | PREPARE, `allow` seen    | idle                             |
| t+2    | WAIT_ACTIVE  | ACTIVE, `frame_start`    | idle                             |
| t+3    | WAIT_PREPARE | ACTIVE                   | sample 0 of slot 1, `valid`      |
| ...    |              |                          |                                  |
| t+66   |              | PREPARE (= next t)       | sample 31 of slot 2              |

* Each output sample is registered one clock after the core state that makes it.
* A frame is 64 valid samples, followed by 2 idle clocks in which the outputs
  are 0.
* The result is one byte every 66 clocks.
* After reset, the first valid sample appears on the fifth rising edge with
  `rst_n` high.

## Ports of `stbc_tx_top`

| port                         | dir | width | meaning                                         |
|------------------------------|-----|-------|-------------------------------------------------|
| `clk`, `rst_n`               | in  | 1     | clock; synchronous active-low reset             |
| `ch1_i`, `ch1_q`             | out | DAC_W | antenna 1 samples, signed two's complement      |
| `ch1_valid`                  | out | 1     | antenna 1 sample belongs to a frame             |
| `ch2_i`, `ch2_q`, `ch2_valid`| out |       | the same for antenna 2                          |
| `tx_data`                    | out | 8     | byte currently offered by the controller        |
| `frame_start`                | out | 1     | one-clock pulse: both channels took `tx_data`   |
| `tx_slot`, `tx_idx`          | out | 1, 5  | slot and sample index of the current outputs    |

`tx_data`, `frame_start`, `tx_slot` and `tx_idx` are there for a logic
analyser or a testbench. They do not feed the DACs.

Parameter: `DAC_W` (default 12), the signed sample width. The amplitude always
follows it.

## Files

| file                        | contents                                                        |
|-----------------------------|-----------------------------------------------------------------|
| `rtl/stbc_pkg.sv`           | constants (8-bit byte, 4-bit symbol, 32 samples/slot), state and slot enums, `tx_cmd_t` |
| `rtl/alamouti_encoder.sv`   | code matrix: symbol + conj/neg per channel and slot             |
| `rtl/psk16_wavegen.sv`      | 16-PSK mapping and I/Q sample generation, one-clock register    |
| `rtl/broadcast_core.sv`     | per-antenna state machine, byte split, slot/sample counters     |
| `rtl/broadcast_cont.sv`     | byte counter and the ready/allow/active handshake               |
| `rtl/stbc_tx_top.sv`        | one controller and two cores                                    |
| `tb/stbc_ref_pkg.sv`        | floating-point reference model used by the testbenches          |
| `tb/tb_*.sv`                | self-checking testbenches, one per module, plus `tb_figure_waveforms` |

## Choices made in this implementation

The code matrix, the two-state controller, the core's states, the byte split
into two 4-bit symbols, the 8-bit counter and the 32 samples per slot are the
design as specified. The following were left open and were decided here:

* **DAC format.** The samples are 12-bit signed (`DAC_W`) at full scale,
  A = 2^(DAC_W-1) - 1. Set `DAC_W` for the real converter. If the converter
  expects offset binary, invert the MSB at the port.
* **Carrier.** One carrier period per slot, at 1/32 of the clock rate, with
  I = cos and Q = sin. This follows from the 32 samples per slot and from a
  waveform that starts at the symbol's phase.
* **One slot = 32 clocks.** There is also a simpler reading, with one clock per
  symbol and a two-clock code block. That reading has no room for the 32
  samples, so it was not used.
* **Nibble order.** s1 is the high nibble and s2 the low nibble.
  Byte 0x01 therefore gives the pair 0000, 0001.
* **Handshake details.**
  * `allow` is a Moore output of `WAIT_ACTIVE`.
  * The counter advances when both channels are active.
  * `RESET` and `INITIALIZE` last one clock each.
  * Outputs are 0 between frames.
  * These choices cause the 2 idle clocks between frames. A Mealy `allow`
    would shorten the gap, but the specified states would then no longer map
    one-to-one onto hardware states.
* **Two channels.** The testbed has four RF modules. This transmitter drives
  two of them. `broadcast_cont` takes `NUM_CH` and ANDs the flags of all
  channels, but `stbc_tx_top` instantiates exactly two cores, as the Alamouti
  code for two antennas needs.
* **Not included.** The RF modules (DAC and mixer) are outside the FPGA. The
  on-chip logic analyser used for the bench captures is not part of this RTL.
  There is no receiver or decoder.

## Verification

Every testbench checks its module against values worked out independently.
Each one prints `TB_RESULT checks=N failures=M`. The RTL also carries
concurrent assertions, which Verilator enforces with `--assert`:

* in `broadcast_cont`, the byte holds while it is offered, and `allow` rises
  only after every channel was ready;
* in `stbc_tx_top`, both channels are ready, active and valid on the same
  clocks.

* `tb_alamouti_encoder`: every (s1, s2, slot) for both channels. It turns
  symbol and flags into a phase and compares that with the code matrix.
* `tb_psk16_wavegen`: every symbol, flag combination and sample index against
  `$cos`/`$sin`. It also checks the one-clock latency, the idle zeros and the
  full-scale values.
* `tb_broadcast_cont`: channels with random ready/active delays. It checks that
  the controller waits for both channels and holds `allow` and the byte steady.
  It also checks that the counter steps by one and wraps from 255 to 0.
* `tb_broadcast_core`: both channel variants. The test waits in `PREPARE`, then
  sends 40 frames, checking all 64 samples of each against the reference. It
  also checks the return to `PREPARE`.
* `tb_stbc_tx_top`: the full design at its default parameters for 330 frames,
  covering every byte value and the counter wrap. The test resets the design
  in the middle of a frame. It checks each sample of both antennas against the
  reference, the same `valid` timing on both antennas, and the 66-clock frame
  period. It counts each mechanism (handshake, waiting, slot 1 and slot 2,
  conjugated and negated samples, all 16 symbols, wrap, reset) and fails if one
  never happens.
* `tb_figure_waveforms`: hand-computed samples for the reference cases:
  * data 0000/0001 on both antennas and both slots;
  * antenna 1 I starting at 202.5 degrees;
  * antenna 2 I starting at 180 degrees;
  * antenna 1 Q starting at 90 degrees.

## Simulating

With Verilator 5, from the project directory:

    verilator --binary --timing --assert -Wno-fatal rtl/stbc_pkg.sv tb/stbc_ref_pkg.sv \
        rtl/alamouti_encoder.sv rtl/psk16_wavegen.sv rtl/broadcast_core.sv \
        rtl/broadcast_cont.sv rtl/stbc_tx_top.sv tb/tb_stbc_tx_top.sv \
        --top-module tb_stbc_tx_top -Mdir obj
    ./obj/Vtb_stbc_tx_top

Swap in another `tb/tb_*.sv` and its `--top-module` to run the others. Each
runs in well under a second.

The RTL is plain synthesizable SystemVerilog. The only non-integer arithmetic
is the `$sin` in `psk16_wavegen`, and it is evaluated at elaboration to build
the constant table.
