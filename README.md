# UMTS TDD software-radio front end in SystemVerilog

This design is the digital front end of one terminal of a UMTS TDD (3GPP time-division duplex) link. It transmits and receives at an intermediate frequency (IF) without analog I/Q mixers. The transmitter outputs one real sample stream for a single D/A converter. The receiver processes the real samples of a single A/D converter directly.

The key is the choice of sampling rate. With

    f_s = f_IF / (l + 1/4),   here f_s = 4 f_c = 14.7456 MHz, f_IF = 70 MHz, l = 5 (minus sign)

a replica of the sampled spectrum sits exactly at f_s/4. That has two consequences:

- **Transmit.** Up-conversion becomes `x'[n] = Re{ j^n x[n] }`. This just cycles through `+Re, -Im, -Re, +Im` of the base-band samples. No multiplier or oscillator is needed.
- **Receive.** The channel is estimated directly on the real pass-band samples. The matched filter built from that estimate is itself a pass-band filter. Sampling its output once per symbol (every 64 samples) brings the symbol to base band, because `(-j)^64 = 1`.

Between these two ends sit the usual pieces of a TD-CDMA burst receiver:

- slot-timing acquisition with the primary synchronisation code (PSC);
- joint least-squares (LS) estimation of all users' channels from the midamble;
- a channel analyzer;
- per-user matched-filter synthesis;
- a decision-directed carrier loop.

## Slot format

All constants are in `rtl/sdr_pkg.sv`. A slot has 2560 chips at `f_c = 3.6864 Mchip/s`, so 10240 samples at 4 samples per chip:

| chips       | content                                                         |
|-------------|-----------------------------------------------------------------|
| 0 .. 1103   | data field 1: 69 QPSK symbols per user, spreading factor 16     |
| 1104 .. 1359| midamble: 64-chip cyclic prefix + 192-chip base period          |
| 1360 .. 2463| data field 2: 69 symbols per user                               |
| 2464 .. 2559| guard period                                                    |

The 256-chip PSC is added on top of chips 0..255. Each slot carries 138 symbols (276 bits) per user. At 1440 slots/s that is 397.44 kbit/s peak per user.

The link is symmetric TDD: the terminal transmits in one slot of every two. The receiver therefore thinks in 2-slot periods of 5120 chips (20480 samples).

**Midamble.** All users share one 192-chip base sequence. User `u` sends it cyclically delayed by `u*64` chips, and each copy is preceded by its own last 64 chips. The channel length plus timing error may not exceed 64 chips. Under that condition, the received 768-sample base period is a cyclic convolution of the base sequence with the users' channels placed side by side. This works for up to `192/64 = 3` users.

**Codes.** The codes are this design's own:
- Spreading codes are the 16 Walsh–Hadamard codes of length 16 (`ovsf_chip`).
- All users share one fixed 16-chip scrambling code (`scr_chip`).
- The base midamble comes from a 9-bit LFSR, x^9+x^5+1 with seed 17 (`MID_BITS`).
- The PSC is a hierarchical 16×16 ±1 code (`psc_chip`): an inner 16-chip code multiplied by an outer 16-chip code.

The 3GPP tables can be dropped into the package without touching the datapaths. The only exception is that the PSC correlator relies on the hierarchical structure.

## Transmit path

`tx_burst_gen` produces one complex chip per `chip_en`:

- For each active user it takes a QPSK symbol (`bit0` → sign of I, `bit1` → sign of Q) and multiplies it by the user's code chip and the scrambling chip.
- It scales by the user's 8-bit gain and adds the users together.
- In the midamble field it sends each user's shifted midamble with amplitude `A_MID`, real-valued.
- On chips 0..255 it adds the PSC with amplitude `A_PSC`.
- It sends zeros in the guard period.
- `tx_enable` is sampled at chip 0. A disabled slot is all zeros: that is the receive slot.

`tx_pulse_shaper` is a 4-phase polyphase root-raised-cosine interpolator: roll-off 0.22, 12-chip span, 49 taps. It runs at `f_s` on `sample_en`:

- Phase `p` of chip group `m` is `sum_i RRC[p + 4i] * chip[m - i]`.
- The fs/4 modulation is applied by choosing, per phase, which part of the complex result to output and with which sign: `+Re, -Im, -Re, +Im`.
- Chips are requested with `chip_req` and are used two groups later. That pipeline delay is the same for every chip.

`dac_interp_fir` feeds a D/A converter clocked at `f_d = 8 f_s`:

- It inserts seven zeros after each IF sample and filters with a 32-tap band-pass centred at `13/32 f_d`.
- With l = 5 and the minus sign, that frequency is the 70 MHz replica of the signal.
- The filter restores the energy lost to zero-stuffing and suppresses the other replicas. Without it, the sinc response of the converter would attenuate the IF.
- It is computed in polyphase form: 4 multiply-accumulates per output sample.
- The coefficients are a Hann-windowed cosine at the replica frequency with a gain of about 8. They are this design's own.

## Receive path

### Slot-timing acquisition

`psc_correlator` correlates the real A/D samples with the PSC at 4 samples per chip. It uses the hierarchical structure, so there are no multipliers, only adders:

1. A 16-tap add/subtract stage with taps 4 samples apart forms the inner-code correlation.
2. A second 16-tap add/subtract stage with taps 64 samples apart applies the outer code.
3. The squares of the four sample-rate outputs of each chip are summed into one power value per chip.

`slot_timing_acq` keeps one exponentially averaged power per chip position of the 2-slot period (`A += (P - A) >> FF_SHIFT`, i.e. a forgetting factor of 7/8). At the end of each period it reports the arg-max position `T` as the slot timing.

### Capture

The top-level sequencer derives the slot start from the PSC peak, `4*(T - 255)` samples. It moves that `ADV_CHIPS = 8` chips earlier so that paths arriving before the strongest one still fall inside the channel window. It then stores one slot of samples in `rx_slot_buffer`.

### Joint LS channel estimation (`channel_estimator`)

Let `r[k]` be the 768 received samples of the midamble base period. They start right after the cyclic prefix, at sample `4*(1104+64)` of the captured slot. Let `B` be the 768-point DFT of the base midamble up-sampled by 4 with the pulse-shaping filter left in the channel.

The LS estimate of all users' channels at once is

    H[k] = R[k] * mask[k] / B[k]
    mask[k] = 1 for k = 0 and 384, 2 for 0 < k < 384, 0 for k > 384

The mask keeps only the positive-frequency half of the real input's spectrum, where the fs/4 replica lives. It doubles that half and zeroes the image. The inverse DFT `h[n]` is therefore the complex (analytic) pass-band impulse response. User `u`'s channel, including the transmit pulse, occupies `h[256u .. 256u+255]`, 64 chips × 4 samples.

The same linear operator is applied in the time domain:

    h[n] = sum_{k=0}^{767} r[k] * w[(n - k) mod 768],    w = IDFT(mask / B)

- `w` is 768 complex numbers, 16-bit each part with a scale of 2^20, held in `rtl/chest_coef.hex` as one `RRRRIIII` word per line.
- The hardware is one complex-by-real multiply-accumulate per clock. An output tap takes 768 cycles, so two users (512 taps) take 393,216 cycles.
- The result is the same as an FFT / multiply / inverse-FFT implementation, up to rounding. What changes is only cost: a radix-4/radix-3 FFT pair would need far fewer cycles. With a different midamble, `w` must be regenerated from its formula.

`channel_analyzer` stores the taps as they stream in and tracks each user's peak `max|h|^2`. It then scans each user once:

- A tap is significant if `|h|^2 >= max|h|^2 / 2^TH_SHIFT` (−18 dB by default).
- `first` and `last - first + 1` are the channel position and length.
- `energy` is the summed power of the significant taps.
- Its read port returns the cleaned response: taps outside `[first, last]`, or below the threshold, read as zero.

### Matched filter and detection

`mf_synth` convolves a user's cleaned pass-band channel `g` with the user's 16-chip spreading sequence, up-sampled by 4:

    f[k] = sum_{n=0}^{15} s[n] * g[k - 4n],   k = 0 .. 315

`mf_detector` then forms, for each symbol `s`,

    b[s] = sum_{j=0}^{315} r[base(s) + j] * conj(f[j])
    base(s) = 64 s (field 1),  4*1360 + 64 (s - 69) (field 2)

This works without a mixer because the filter is analytic and the output is taken every 64 samples. The fs/4 phase `(-j)^(64 s)` is then always 1, so `b[s]` is already at base band. Any residual carrier phase is left to the next stage. The channel delay and any offset of the capture window are absorbed by the estimated `g`, so no separate fine timing is needed.

`carrier_sync` is a first-order decision-directed phase loop for QPSK, run at symbol rate:

- A 14-stage CORDIC, plus a 90° pre-rotation, rotates each symbol by the current phase estimate.
- The loop decides the quadrant and forms `e = sign(I)*Q - sign(Q)*I`.
- It updates `phase += e >>> KP_SHIFT`.
- The top uses one instance per user and clears it at the start of each slot.

## Sequencing and throughput

| stage                    | cycles per received slot (two users) |
|--------------------------|--------------------------------------|
| capture                  | 10240 samples (real time)            |
| channel estimation       | 768 × 512 = 393,216                  |
| channel analysis         | 256 per user                         |
| matched-filter synthesis | 5,058 per user                       |
| detection                | 316 × 138 = 43,608 per user          |

Every block is serial, with one multiply-accumulate per cycle. Processing one received slot therefore takes about 0.49 M cycles. Real time, one receive slot every 1.389 ms, would need a clock of about 354 MHz. At 8 × f_s = 118 MHz (the rate used in the end-to-end test) the receiver decodes one 2-slot period out of four and skips the slots that arrive while it is busy.

The transmit path does run in real time at any clock that provides `sample_en` at f_s and `dac_en` at 8 f_s.

## Interfaces and parameters

The top, `sdr_testbed_top`, has:
- **Transmit inputs:** per-user symbol/take handshake, gain and code.
- **Transmit outputs:** the `f_s` IF stream `if_sample` and the `8 f_s` D/A stream `dac_sample`.
- **Receive input:** `adc_valid/adc_sample`, 12-bit real IF samples at `f_s`.
- **Receive outputs:** `rx_valid`, `rx_user`, `rx_sym_idx`, `rx_bits` and `rx_sym`.
- **Monitors:** slot timing and lock, carrier phase, channel energy/position/length, capture and slot-done strobes.

Parameters worth changing:

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `ADV_CHIPS` | top | 8 | capture-window advance before the PSC-derived slot start |
| `FF_SHIFT` | top, `slot_timing_acq` | 3 | forgetting factor `1 - 2^-FF_SHIFT` |
| `MF_SHIFT` | top → `mf_detector.OUT_SHIFT` | 10 | detector output scaling; sets the carrier-loop gain |
| `TH_SHIFT` | `channel_analyzer` | 6 | noise-cleaning threshold |
| `KP_SHIFT` | `carrier_sync` | 3 | loop gain |
| `OUT_SHIFT` | shaper, interpolator, estimator | 14, 12, 20 | fixed-point scaling |

All blocks use an active-low asynchronous reset `rst_n`. Complex values travel as `cplx16_t` (16-bit I and Q).

## Where this design departs from the original testbed

The source design ran on a DSP. Its chain, rates, code lengths, filter specifications and slot arithmetic are followed here. These parts are different:

- **Channel estimation.** It is the time-domain equivalent of the FFT-based estimate: same result, many more cycles.
- **Throughput.** The receiver is not real-time at a modest clock (see above).
- **Codes.** The spreading, scrambling, midamble and PSC sequences are self-made stand-ins with the right lengths and structure, not the 3GPP tables.
- **D/A filter.** The band-pass coefficients are this design's own design for the stated purpose.
- **Timing tracking.** The analyzer's channel position is reported but not fed back into the slot timing. The timing comes from the PSC acquisition alone, and `ADV_CHIPS` plus the 64-chip window cover the remaining error.
- **Fixed point.** Word widths, scaling and saturation are this design's choices.
- **Outside the scope of this RTL:** the radio card, the converters and the host computer. Channel decoding above QPSK decisions is not included either.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints `TB_RESULT checks=N failures=M`. Run from the repository root, because the estimator reads `rtl/chest_coef.hex` by that relative path:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/sdr_pkg.sv tb/tb_channel_estimator.sv --top-module tb_channel_estimator -o sim
    ./obj_dir/sim

`tb/tb_sdr_testbed_top.sv` is the end-to-end test with every parameter at its default. It:

- loops the transmitter's IF output back into the receiver through a two-path channel, `r[n] = x[n-37] + x[n-59]/2` plus uniform noise of ±8;
- uses two users (codes 3 and 10);
- requires two received slots to match consecutive transmitted slots with no symbol errors;
- checks that timing lock, capture, idle TDD slots, two-user detection, a multipath channel, carrier correction and D/A output each occurred.

It runs in a few seconds.

## How far it has been checked

Each unit testbench compares its block against an independent model written in the testbench: direct convolution, direct correlation, direct LS formula, and so on. Where a cycle count is fixed, the testbench checks it too. Each testbench was also shown to fail against a deliberately broken copy of its block.

The end-to-end test decodes both users error-free over a noisy two-path channel. The receiver has not been exercised with:
- carrier frequency offsets beyond what the loop tracks within a slot;
- more than three users;
- channels longer than 64 chips.
