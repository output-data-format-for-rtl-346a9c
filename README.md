# FEB readout: event fragments from 128 calorimeter channels to one serial link

A Front End Board (FEB) of the ATLAS liquid-argon calorimeter reads 128
channels. For each Level-1 Accept it digitizes a few samples (typically 5) of
every channel and must send them off the detector over a single 1.6 Gbps
optical link. This RTL models the digital part of that chain, from the ADC
values to the 16-bit, 80 MHz word stream that feeds the GLink serializer:

```
 16 ADCs (8 channels each)
   │ one sample record per ADC and sample
   ▼
 8 x gsel ─ 2 x gsel_formatter  build one event fragment per ADC (16-bit words)
          └ 2 x gsel_serializer send each word as 8 bit pairs on 2 lines, 40 MHz
   │ 32 lines at 40 MHz                       ▲ status byte
   ▼                                 2 x scac_status (one per half-FEB)
 smux  2:1 time multiplexing → 16 lines at 80 MHz + FLAG + DAV
   │
   ▼ dout[15:0], flag, dav_n  (to the GLink serializer, not modelled)
```

The central idea is that every ADC gets its own self-describing fragment,
and all 16 fragments travel side by side, two bits per ADC per 40 MHz cycle.
A receiver rebuilds each fragment independently from its bit pairs.

## The event fragment

Each ADC's fragment is a sequence of 16-bit words. All words except the
first and the last carry bit 15 = 0 and an odd-parity bit in bit 14 (the
number of ones in the whole word is odd).

```
bit:            15 14 13 12 | 11 10  9  8 |  7  6  5  4  3  2  1  0
frame start      1  1  1  1 |  1  1  1  1 |  1  1  1  1  1  1  1  1   (0xFFFF)
event header 1   0  P  0  0 |  ADC ID     | RCLK phase |  event number
event header 2   0  P  0  0 |  BCID[11:0]
sample header    0  P  0  0 |  F  L  B  A |  SCA cell number
ADC word         0  P  gain |  ADC value[11:0]
trailer          0  P  0  0 |  1 Ed Es S8 | S7 S6 S5 S4 S3 S2 S1  1
frame end/idle   0  0  0  0 |  0  0  0  0 |  0  0  0  0  0  0  0  0   (0x0000)
```

Ed and Es are the GSEL's EDC double and single bit error flags, S1..S8 the
SCA Controller status bits (see below).

The order is: frame start, header 1, header 2, then for every sample a sample
header followed by `n_gains x 8` ADC words, then the trailer and one frame
end word. The ADC words of one sample come gain slot by gain slot, and within
a slot channel 0 to 7. Gain codes: `01` low, `10` medium, `11` high.

Sample header flags: **F** first sample, **L** last sample (both set when
one sample is read), **B** the event's Backporch flag, **A** test mode (a
configured test value replaces the ADC data).

A fragment is therefore `4 + n_samples x (1 + 8 x n_gains)` words plus the
frame end. The usual readout (5 samples, one gain chosen per channel) is 49
words + 1 = 50 words, i.e. 10 µs at 200 ns per word; reading all three gains
gives 130 words, 26 µs. An error-free trailer is `0x4801`; the first event
after a BCID reset on a SCAC with chip ID 0 gives `0x0805`.

### Gain readout modes

The configuration (`gsel_cfg_t` in `feb_pkg`) chooses:

* **auto-gain** (`auto_gain = 1`): one gain slot per sample; each channel
  uses the gain named in the sample record (`sel_gain[ch]`), which an
  external gain selection decides. The gain selection algorithm itself is
  not part of this RTL.
* **fixed gains** (`auto_gain = 0`): `n_gains` slots (1 to 3), slot *s*
  reading gain `gain_order[s]` for all channels, so the readout order of the
  gains is configurable.
* **test mode** (`test_mode = 1`): every ADC value is replaced by
  `test_pattern`, and the A bit of each sample header is set.

The configuration and the event data are captured when an event is
accepted; changing `cfg` during an event has no effect until the next one.

## From words to the link

**Two lines per ADC.** `gsel_serializer` sends each word as eight bit
pairs, one per 40 MHz cycle, most significant pair first: in cycle *k* of a
word, `line[1]` carries bit `15-2k` and `line[0]` bit `14-2k`. When the
formatter has no word to offer, zeros are sent. A word therefore takes
200 ns, which is one period of the 5 MHz readout clock. All serializers are
reset together and share the same word boundaries.

**SMUX.** The 32 lines (ADC *k* on lines `2(k-1)+1 : 2(k-1)`) are sampled
once per 40 MHz cycle. In the first 80 MHz cycle after sampling, `dout`
carries ADCs 1-8 (channels 0-63) with `flag = 1`; in the second, ADCs 9-16
(channels 64-127) with `flag = 0`. To recover ADC *a*, a receiver takes bit
pair `dout[2j+1:2j]` with `j = (a-1) mod 8` in the cycles where `flag` is 1
(ADCs 1-8) or 0 (ADCs 9-16).

**Word alignment at the receiver.** Between events all lines are zero. The
first non-zero pair is the start of the all-ones frame start word, which
fixes the word boundary; from there every eight pairs form a word, and an
all-zero word closes the frame. This is what `tb/frag_decoder.sv` does.

**Rates.** 32 lines x 40 Mb/s = 16 lines x 80 Mb/s = 1.28 Gb/s of payload.
The GLink adds its own framing to reach the 1.6 Gbps line rate (20 bits per
80 MHz frame); that part is outside this RTL.

## DataValid

Each GSEL has a DataValid output `dav_n`, active low, which is low during
every word of the data block, frame start to trailer, and high for the frame
end word and while idle. It is registered together with the word and stays
valid for all eight bit-pair cycles. One GSEL per half-FEB feeds the SMUX:
GSEL 1 (ADCs 1-2) for channels 0-63 and GSEL 5 (ADCs 9-10) for channels
64-127. The SMUX puts the matching one on its `dav_n` output in the same
cycle as `flag`, so `dav_n` always describes the half currently on `dout`.
On the real board this connection depends on solder jumpers; this RTL
models the connected setting, the one the boards were built with.

## Status and error flags in the trailer

**SCAC status (trailer bits 8..1).** The SCA Controller reports conditions
that are not tied to a particular event: bit 1 init, 2 BCID reset, 3 double
bit cell address error, 4 single bit cell address error, 5 cell sequence
error, 6 free FIFO underrun, 7 done FIFO overflow, 8 chip ID.
`scac_status` keeps bits 1-7 sticky from the condition pulse until the next
event is accepted for readout: that event's trailer carries them and the
bits clear. A pulse in the very cycle of acceptance is reported with that
event; one that arrives later waits for the next. Two instances serve the
two halves of the board (ADCs 1-8 and 9-16), each with its own chip ID.

**GSEL EDC flags (trailer bits 9 and 10).** The Gain Selector protects its
configuration with error detection and correction. A single bit error
(corrected) sets the flag in bit 9, a double bit error (configuration must be
reloaded) the flag in bit 10. The flags stay set, and appear in every
trailer, until the slow-control command `spac_clear_flags` clears them. The
EDC logic itself is outside this RTL; its error pulses are inputs.

## Using the top level

`feb_readout` runs on one 80 MHz clock (`clk`) with an asynchronous
active-low reset. It derives the 40 MHz clock enable internally.

| port | dir | meaning |
|---|---|---|
| `cfg` | in | `gsel_cfg_t`: `n_samples` (1-31), `n_gains` (1-3), `auto_gain`, `gain_order[2:0]`, `test_mode`, `test_pattern` |
| `ev_valid`, `ev_ready`, `ev` | in/out/in | one L1Accept: `event_t` with RCLK `phase`, `evtn`, `bcid`, `backporch`. Accepted in a cycle with both high; `ev_ready` is high only when all 16 formatters are idle, and only every other cycle |
| `smp_valid[a]`, `smp_ready[a]`, `smp[a]` | in/out/in | sample records of ADC *a+1*: `sample_t` with `celln`, `adc[gain-1][ch]`, `sel_gain[ch]`. One record per sample, taken when its sample header goes out |
| `scac_cond[h]`, `scac_chip_id[h]` | in | SCAC condition pulses (bit *i* = status bit *i+1*) and chip ID, half *h* |
| `edc_single_err[g]`, `edc_double_err[g]`, `spac_clear_flags[g]` | in | EDC error pulses and flag clear for GSEL *g+1* |
| `dout`, `flag`, `dav_n` | out | 16 data lines, FLAG and DataValid towards the GLink |

ADC IDs in header word 1 are 0 to 15 for ADCs 1 to 16.

Sample records must be available by the time their sample header is due.
The link has no way to pause: if a record is late, the serializer sends zero
words, which a receiver reads as a frame end. The simplest way to stay safe
is to present all of an event's records (queued per ADC) as soon as the
event is accepted, as the testbenches do.

## Files

| file | content |
|---|---|
| `rtl/feb_pkg.sv` | word constants, gain codes, SCAC bit names, configuration / event / sample structs, word builders with parity |
| `rtl/gsel_formatter.sv` | fragment builder, a state machine stepping through the word sequence |
| `rtl/gsel_serializer.sv` | word to two-line serializer |
| `rtl/gsel.sv` | one Gain Selector: two formatter/serializer pairs, EDC flags, DAV |
| `rtl/scac_status.sv` | sticky SCAC status byte |
| `rtl/smux.sv` | 2:1 multiplexer with FLAG and DAV |
| `rtl/feb_readout.sv` | the board: 8 GSELs, 2 status registers, SMUX |
| `tb/feb_tb_pkg.sv` | reference fragment model and random stimulus, written independently of the RTL |
| `tb/frag_decoder.sv` | receiver model: bit pairs back to words |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
the full board at its real size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/feb_pkg.sv tb/feb_tb_pkg.sv rtl/gsel_formatter.sv rtl/gsel_serializer.sv \
  rtl/gsel.sv rtl/scac_status.sv rtl/smux.sv rtl/feb_readout.sv \
  tb/frag_decoder.sv tb/tb_feb_readout.sv --top-module tb_feb_readout
./obj_dir/Vtb_feb_readout
```

The same pattern works for `tb_gsel`, `tb_gsel_formatter`,
`tb_gsel_serializer`, `tb_smux` and `tb_scac_status`: the two packages
first, then the modules the testbench needs.

What the tests cover:

* `tb_gsel_formatter`: 40 random events (1-6 samples, 1-3 gains in random
  order, auto-gain, test mode, Backporch, random status and EDC flags), with
  random word request timing and gaps in the sample records; every word,
  its DAV and the word count per event are checked.
* `tb_gsel_serializer`: request every 8 enabled cycles, bit pair order, zeros
  when no word is offered, DAV per word.
* `tb_smux`: low half first with FLAG = 1, high half with FLAG = 0, DAV per half.
* `tb_scac_status`: sticky bits, reporting in the first readout after a
  condition, chip ID.
* `tb_gsel`: both fragments decoded from the lines, DAV, EDC flags set,
  reported and cleared, 8 cycles per word.
* `tb_feb_readout`: all 16 fragments rebuilt from the SMUX output for 10
  events at full size; covers auto-gain, three gains in a configured order,
  test mode, Backporch, SCAC conditions per half, EDC flags set and cleared,
  back-to-back events with a single frame end, the fixed trailers `0x4801`
  and `0x0805`, and the event duration (8 x 40 MHz cycles per word). Each
  case is counted and the test fails if one never occurred.

The simulator used has two-state logic; all state is reset.

## Choices this RTL makes where the FEB description is silent

* One 80 MHz clock with a 40 MHz enable, instead of two clock domains.
* Bit pair order on the GSEL lines (most significant pair first, higher bit
  on line 1) and the SMUX phase order (channels 0-63 first).
* DAV of the GSEL: active while either of its fragments sends a data block
  word; GSELs 1 and 5 feed the SMUX; the SMUX multiplexes the two DAVs in
  step with FLAG.
* ADC ID = ADC number - 1 (the ID field has 4 bits for 16 ADCs).
* SCAC 0 serves ADCs 1-8, SCAC 1 ADCs 9-16. Status is captured, and the
  sticky bits cleared, when an event is accepted.
* Sample count 1 to 31 (5-bit field); auto-gain reads a single gain slot;
  test mode sends one configured 12-bit value for every channel; a gain code
  of `00` reads the low gain value.
* Exactly one frame end word after each trailer (at least one is required);
  idle zeros after that.
* EDC flags are sampled when the trailer is sent.
* In the trailer, bit 9 is the single bit EDC flag and bit 10 the double bit
  flag, as the format's written definition gives them. Its layout chart
  marks bit 10 "S" and bit 9 "E", which could be read the other way round;
  swap the two arguments of `trailer_word` in `feb_pkg` if a receiver
  expects that.
* Event number, RCLK phase, BCID, Backporch and the SCA cell numbers are
  inputs; the counters and logic that produce them on the board (SCA
  Controller, timing receiver) are not modelled.

## Not modelled

The analog chain (preamplifiers, shapers, SCAs, ADC drivers), the ADCs
themselves, the gain selection algorithm, the GSEL's configuration EDC, the
SCA Controller apart from its status byte, the slow-control (SPAC) slave and
configuration download, the timing receiver and clock PLL, the GLink
serializer and optical transmitter, and everything at the receiving end
beyond the decoder used in the tests.
