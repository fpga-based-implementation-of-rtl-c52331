# Run-time switchable IEEE 802.15.4 baseband: BPSK and O-QPSK in one IP

IEEE 802.15.4 defines three physical layers:

- **Options 1 and 2** (868/915 MHz): BPSK with 15-chip spreading and differential encoding. Bit rates are 20 or 40 kbit/s.
- **Option 3** (2.4 GHz): O-QPSK with 16 orthogonal 32-chip sequences. Bit rate is 250 kbit/s.

This design puts all of them in one baseband IP for a software-defined radio. The main idea is **reuse**. Options 1 and 2 differ only in chip rate, so they are the same hardware run from a different clock. On the receive side, the parts that deal with the radio channel are built once and shared by both modulations: matched filtering, carrier-phase tracking and chip timing. Only the decoders that turn chips into bytes exist twice.

A small controller enables one option at a time and steers two hardware switches. One switch selects which transmitter drives the DAC. The other selects which decoder delivers bytes to the host. The host can therefore change the PHY while the system runs.

```
             cfg word ──► hw_reconf ──► enables, option select
                                   │
 tx words ─┬─► tx_opt12 (BPSK) ────┤
           └─► tx_opt3  (O-QPSK) ──┴► hw_switch ──► DAC bus (12-bit I/Q interleaved)

 ADC bus ──► rx_frontend ──chips──┬─► decoder_opt12 ──┐
             (demux, matched      └─► decoder_opt3  ──┴► hw_switch ──► rx bytes
              filters, DPLL, timing)
```

The RTL is SystemVerilog-2017 and synthesizable. It has no vendor primitives and no memories: every table is a constant function in `rtl/ieee802154_pkg.sv`.

## One clock, many rates

The whole IP runs from one clock, and every stage is paced by clock enables. The clock is twice the sample rate, because the LMS6002D-style converter bus carries I and Q on alternate clock cycles. The rates below are in clocks per unit:

| Path | Sample | Chip | Symbol / bit |
|---|---|---|---|
| TX option 1/2 | 2 | 8 (4 samples/chip) | 120 per bit (15 chips) |
| TX option 3 | 2 | 4 (2 samples/chip) | 128 per 4-bit symbol (32 chips) |
| RX option 1/2 | 2 | 16 (8 samples/chip) | 240 per bit |
| RX option 3 | 2 | 16 per chip pair (8 samples per I-branch symbol) | 256 per symbol |

To reach the standard's chip rates:

- Option 1 (300 kchip/s) needs a 2.4 MHz transmit clock.
- Option 2 (600 kchip/s) needs 4.8 MHz.
- Option 3 (2 Mchip/s) needs 8 MHz.

**The receiver samples twice as densely as the transmitter.** The receiver works at 8 samples per I-branch symbol, so its 8-tap matched filter spans exactly one half-sine pulse. The transmitter makes 4. With a shared clock, a receiver therefore serves half the chip rate of the transmitter next to it. To receive a peer at the same chip rate, the receiving node's converter clock must be twice the sending node's. This is a choice of this design; see *Limits*.

## Transmitters

Both transmitters take 32-bit words from a FIFO-style `valid/ready` port. The host sends the whole frame (PPDU):

1. Four bytes of preamble: `0x00`.
2. The start-of-frame delimiter (SFD): `0xA7`.
3. The PHY header (PHR), whose low 7 bits give the length.
4. The payload (PSDU).

Byte 0 sits in bits 7:0 and bits leave LSB first, so option 3 sends the low nibble of each byte first, as the standard requires. When the FIFO runs dry the transmitter sends zeros.

**Option 1/2** (`tx_opt12`): the chain is

1. `tx_serializer`: 32 to 1 bit.
2. `diff_encoder`: e(n) = d(n) xor e(n-1).
3. `bit_to_chip`: the 15-chip sequence `111101011001000`, inverted for e = 1.
4. `bpsk_map`: chip 0 gives +1.
5. `upsampler`: zero insertion, 4 samples per chip.
6. `fir_filter`: raised-cosine taps 331, 973, 1651, 1946, 1651, 973, 331.

Q is zero.

**Option 3** (`tx_opt3`): the chain is

1. `tx_serializer`: 32 to 4 bits.
2. `symbol_to_chip`: the standard's 16 sequences. Sequences 1–7 are sequence 0 rotated right by 4 chips per step. Sequences 8–15 are sequences 0–7 with the odd chips inverted.
3. `oqpsk_map`: even chips go to I and odd chips to Q, with 1 giving +1.
4. Zero insertion, then the half-sine taps 0, 1448, 2047, 1448 on each branch.

A Q impulse comes one chip (2 samples) after its I impulse. That delay is the O-QPSK offset, and it keeps the envelope constant.

`tx_clock_gen` makes the sample, chip and symbol enables. `iq_mux` puts I (with `iqsel = 1`) and then Q on the 12-bit DAC bus.

## The shared receive front end

`rx_frontend` turns the interleaved ADC bus into hard chip decisions. It has four stages, each described below.

### Matched filter

`iq_demux` pairs each I word with the Q word that follows it. Each branch then goes through an 8-tap half-sine FIR: taps 399, 1137, 1702, 2008, 2008, 1702, 1137, 399, shifted right by 14 and saturated to 12 bits.

### Carrier recovery: a DPLL around a CORDIC

`carrier_recovery` is a second-order digital PLL with three parts.

1. **Phase rotator.** `cordic_rotate` is a 16-stage pipelined CORDIC in rotation mode. It turns each sample by −θ, the current phase estimate. A first stage folds angles in [90°, 270°) by negating the vector, so any angle works. Angles are 16-bit, with a full circle = 2^16. The CORDIC gain (about 1.647) is not removed, so the outputs are 18 bits. Latency is 17 sample enables.
2. **Phase error** (`dpll_error_gen`). For BPSK the error is the product I·Q >>> 10 of the derotated sample. That product is zero when the constellation lies on the I axis. For O-QPSK, I·Q carries no steady information: the two branches change at different instants. The error is therefore taken only at the chip instants reported by the timing recovery: sign(I)·Q at an I chip and −sign(Q)·I at a Q chip, times 8. This decision-directed form is this design's own; with the plain product the loop drifted by tens of degrees within a frame.
3. **Loop filter** (`dpll_loop_filter`). A PI filter feeds a phase accumulator: `integ += KI·e`, `acc += KP·e + integ`, θ = `acc[31:16]`. The defaults are KP = 512 and KI = 1. The 32-bit accumulator wraps, which is exactly phase wrap-around.

The loop is closed around the whole 17-stage CORDIC pipeline. The loop gains are small enough for that delay not to matter: in simulation a fixed 40° offset settles to within 2°, and a frequency offset of 0.005° per sample is tracked to within 5°.

The loop locks modulo the symmetry of the constellation: 180° for BPSK and 90° for O-QPSK. The decoders are built to be blind to that ambiguity (see below).

A second CORDIC (`cordic_vectoring`) measures the corrected signal's magnitude and residual phase. Its outputs `ed_mag` and `ed_phase` serve as an energy detector and a lock indicator.

### Timing recovery: early-late gate

`timing_recovery` works on |Re y|. It keeps three consecutive values: early, on-time and late. A down-counter selects one instant per symbol period (SPS = 8 samples), and at that instant it compares early and late:

- If early is larger, the peak lies before the on-time sample, so the next period is one sample shorter (`ret`).
- If late is larger, the next period is one sample longer (`adv`).
- Otherwise the period stays at 8 samples.

The gate walks onto the pulse peak and then dithers around it by one sample.

At each instant the sign of the on-time I sample is the chip (1 for positive). In O-QPSK mode the Q chip is the sign of Q taken SPS/2 samples later, and the pair leaves then. These instants are also fed back to the DPLL's O-QPSK phase detector.

In BPSK the gate can slip a chip while the carrier loop is still converging (in simulation, with the preamble sent first, the last slip came before chip 480). Those slips fall inside the 480-chip preamble, where they are harmless: the preamble is periodic and the correlators slide.

## Finding frames: correlators, symbol bank, frame FSM

Both decoders share one structure:

1. A sliding **preamble correlator**.
2. A sliding **SFD correlator**.
3. A **symbol bank** that decides each symbol once frame timing is known.
4. **`decoder_fsm`**, which runs the search and assembles bytes.

### Correlators

The chips are 1-bit NRZ (1 = +1). `chip_correlator` keeps a window of the most recent chips, one byte's worth, and computes

```
C = Σ conj(r_k) · y_k,   output |C|² = Re² + Im²
```

against a constant reference byte. Using |C|² makes detection independent of the carrier phase:

- For O-QPSK (32 I/Q pairs), any quarter-turn leaves |C|² unchanged.
- For BPSK (120 real chips), a sign flip leaves Re² unchanged.

The thresholds are 2500 of a full scale of 4096 for O-QPSK, and 8000 of 14400 for BPSK. The correlator also outputs the sign of Re and its chip window.

### Symbol decision

**O-QPSK** (`symbol_bank`): the 16 chip pairs that the SFD correlator has just shifted in form the block. Sixteen `symbol_correlator`s compute |C|² (12 bits) against the 16 sequences. A tree of 15 `max_comparator`s in four registered stages (8, 4, 2, 1) keeps the largest value and its 4-bit index. Latency is 4 clocks. Ties go to the lower index. Because |C|² is used, the decision survives the 90° ambiguity of the carrier loop.

**BPSK** (`decoder_opt12`): two correlators compare the last 15 chips with the bit-0 sequence and its inverse. Their outputs are signed: Re + 15, not squared, because here the sign carries the encoded bit.

A differential decoder then forms bit = e(n) xor e(n−1). Its state is loaded when the SFD is found: it gets the encoder state that the SFD implies, inverted if the SFD correlation came out negative. This makes the data come out right whether the carrier loop locked at 0° or at 180°.

### Frame FSM

`decoder_fsm` has four states:

1. **Preamble search.**
2. **SFD search.** It gives up after a timeout: 256 chip periods for O-QPSK, 1024 for BPSK.
3. **PHR.**
4. **Data.**

After the SFD it raises `blk_start` every 16 chip pairs (O-QPSK) or 15 chips (BPSK). Decoded symbols are packed LSB first into bytes. The PHR's low 7 bits set how many payload bytes follow. Those bytes leave on `byte_valid` with `sof` on the first and `eof` on the last. A zero length returns to the search at once. The PHR itself is not delivered.

Output bytes are evenly spaced: one every 512 clocks for O-QPSK and one every 1920 clocks for BPSK.

## Switching options at run time

`hw_reconf` takes a configuration word, in which bit 0 selects option 3. If the word differs from the current option, the FSM enters a flush state. For 16 clocks it disables both transmitters, both receive paths and both switches. This lets the old option's pipelines drain and restarts the loops from zero. It then enables the new pair and pulses `switched`.

The six enables carry the names of the reference block diagram: `tx_opt12_ce`, `tx_opt3_ce`, `tx_switch_ce`, `rx_opt12_ce`, `rx_opt3_ce` and `rx_switch_ce`.

`hw_switch` is a registered 2:1 multiplexer that outputs zero while it is disabled. It is used twice:

- on the DAC bus, as `{iqsel, iq}`;
- on the byte stream, as `{valid, sof, eof, data}`.

## Top-level interface (`ieee802154_phy_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (2× sample rate), synchronous active-low reset |
| `cfg_valid`, `cfg_data` | in | 1, 32 | option select word (bit 0: 1 = option 3) |
| `tx_valid`, `tx_ready`, `tx_data` | in/out/in | 1, 1, 32 | PPDU words to send |
| `tx_busy` | out | 1 | selected transmitter is sending |
| `dac_iq`, `dac_iqsel` | out | 12, 1 | interleaved DAC bus, `iqsel = 1` marks I |
| `adc_iq`, `adc_iqsel` | in | 12, 1 | interleaved ADC bus, same framing |
| `rx_valid`, `rx_data`, `rx_sof`, `rx_eof` | out | 1, 8, 1, 1 | received payload bytes |
| `opt3_sel`, `rx_state` | out | 1, 2 | current option, decoder FSM state |
| `ed_mag` | out | 17 | magnitude of the carrier-corrected signal |

Top parameters are `TX_CLK_PER_SAMPLE` (2) and `RX_SPS` (8).

The host link, its FIFOs, the soft processor that configures the radio, and the RF transceiver itself lie outside this RTL. Their signals are the ports above.

## What follows the reference design and what is this design's own

**Taken from the reference FPGA implementation and the standard:**

- The block structure of the transmitters and receivers.
- The HW-RECONF controller with two HW switches.
- The clock at twice the sample rate.
- 4× upsampling with 12-bit samples.
- The 16-stage CORDIC in rotation mode inside a second-order DPLL with PI filter.
- The early-late gate on |Re| with a timing decision unit.
- Correlation of preamble and SFD over one byte of chips, with |C|².
- The bank of 16 symbol correlators (12-bit outputs) with a 4-level tree of 15 comparators.
- Hard 1-bit chips.
- All spreading sequences, the frame format and the bit order.

**This design's own choices:**

- All filter taps.
- All word widths other than the 12-bit samples.
- The loop gains KP and KI.
- The early-late decision rule details.
- The receive rate of 8 samples per I-branch symbol.
- The decision-directed O-QPSK phase detector.
- The use of the vectoring CORDIC as an energy/phase monitor.
- Building the receive front end once for both options. The reference draws two complete receivers but reports that many receive modules are shared; here the sharing is carried through to everything in front of the decoders.
- The correlation thresholds and the SFD timeout.
- The signed BPSK symbol bank and how the differential decoder's state is set from the SFD.
- The command encoding and the 16-clock flush.
- The valid/ready word interface in place of the vendor FIFO bus.

## Limits

- **Receive rate.** The receiver needs twice the transmitter's sample rate for the same chip rate (see *One clock, many rates*).
- **Impairments tested.** Carrier phase offsets, a small frequency offset, a 0.25 % sampling-rate offset and chip errors are covered. Gaussian noise is tested on one frame only: σ = 300 LSB, about 13.7 dB SNR per sample, against a peak near 2047. In a separate run the same frame still decoded at σ = 700 and lost the SFD at σ = 1200. No bit-error-rate curve was measured, and the thresholds have not been tuned for a noisy channel.
- **Acquisition.** The BPSK timing loop may need most of the preamble to settle.
- **Timing closure.** No timing analysis has been done. The widest combinational paths are the 120-chip BPSK correlator sums and the 32-bit loop-filter adders.
- **Options 1 and 2** are the same hardware; choosing between them means choosing the clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog. The reference values are computed independently in the testbench, mostly with real arithmetic or ±1 integer correlation. `tb/tb_ref_pkg.sv` holds the 16 O-QPSK sequences written out as literals, independent of the generator in the RTL package.

Highlights:

- **`tb_ieee802154_phy_top`** (default parameters) runs a complete session:
  1. an option 1/2 frame at +30° carrier offset;
  2. a switch to option 3 and a frame at +15°;
  3. a switch back and a frame at −20°;
  4. a switch to option 3 and a 127-byte PSDU (the largest the 7-bit length field allows) at +40°, with Gaussian noise of σ = 300 LSB added.

  Frames are recorded from the DAC and replayed into the ADC with the phase rotation, each sample twice. The testbench counts switches, preamble and SFD detections, timing corrections in both directions, decoded symbols and frames. It fails if any of these never happens, and it checks every byte with `sof`/`eof`.
- **`tb_tx_opt12`, `tb_tx_opt3`**: the transmitted waveform is checked sample for sample against a reference modulator, together with the per-word cycle count.
- **`tb_rx_frontend`**: both transmitters generate the signal and phase rotation is added. The front end's chips must match the transmitted chips exactly after the preamble. θ must settle on the offset.
- **`tb_carrier_recovery`, `tb_timing_recovery`**: synthetic signals with phase, frequency and sampling-rate offsets.
- **`tb_decoder_opt3`, `tb_decoder_opt12`**: whole frames at chip level, also rotated, inverted and with chip errors. They also check the byte spacing.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_ieee802154_phy_top \
    -y rtl -y tb rtl/ieee802154_pkg.sv tb/tb_ieee802154_phy_top.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run any other; the full system test finishes in about a second.

## Files

- `rtl/ieee802154_pkg.sv`: sample width, spreading sequences, sequence generators, the CORDIC arctangent table as a function.
- `rtl/ieee802154_phy_top.sv`: the top.
- Transmit: `tx_opt12`, `tx_opt3`, `tx_clock_gen`, `tx_serializer`, `diff_encoder`, `bit_to_chip`, `bpsk_map`, `symbol_to_chip`, `oqpsk_map`, `upsampler`, `fir_filter`, `iq_mux`.
- Receive front end: `rx_frontend`, `iq_demux`, `fir_filter`, `carrier_recovery`, `cordic_rotate`, `dpll_error_gen`, `dpll_loop_filter`, `cordic_vectoring`, `timing_recovery`.
- Decoders: `decoder_opt3`, `decoder_opt12`, `chip_correlator`, `symbol_correlator`, `symbol_bank`, `max_comparator`, `decoder_fsm`.
- Control: `hw_reconf`, `hw_switch`.
- `tb/`: one `tb_<module>.sv` per module, plus `tb_ref_pkg.sv`.
