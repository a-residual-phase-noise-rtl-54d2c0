# Dual-mode IEEE 802.15.4 baseband receiver with residual phase noise compensation

An IEEE 802.15.4 transmitter at 2.4 GHz sends half-sine O-QPSK. That signal is
also MSK, so a receiver can demodulate it in two ways:

- **Coherently, as O-QPSK.** The receiver estimates and removes the carrier
  frequency and phase offset, then decides every chip by its quadrant. This
  works down to low SNR, but it needs an FFT estimator and a tracking loop.
- **Non-coherently, as MSK.** The receiver decides every chip from the sign of
  the phase change over one chip. This is cheap and fast, but about 3 dB worse.

This receiver has both chains behind one sample memory and one pair of shared
CORDICs. A controller picks the chain for each frame, either under manual
control or automatically from how well the preamble correlates. The transmitter
never changes.

The hardest part of the coherent chain is what is left after the coarse
frequency estimate. Even a residual offset of 1/3000 turn per chip rotates the
constellation by more than a quarter turn over a long frame. The **residual
phase noise compensator** therefore never refers a chip to the start of the
frame. It re-estimates each chip from its N_RCFO predecessors, whose ideal
phases are known once they have been decided and despread, and takes a
majority vote. The section on the residual phase noise compensator below
explains how.

## Signal conventions

| Quantity | Representation |
|---|---|
| Clock | 16 MHz; 2 Mchip/s; **8 samples per chip** (`SPS`) |
| Samples | signed 16-bit I and Q (`sample_t`) |
| Phases, frequencies | unsigned 32-bit fraction of a turn (`phase_t`); 2^32 = one turn. Frequencies are in turns per chip |
| Chip `n` of a symbol | even `n` on I: 1 ↔ phase 0, 0 ↔ 1/2 turn. Odd `n` on Q: 1 ↔ +1/4, 0 ↔ −1/4 turn |
| Chip decision (coherent) | even chip = sign of cos, odd chip = sign of sin |
| Symbol 0 chips | 0xD9C3522E, with chip c0 in bit 31. Symbols 1–7 are symbol 0 rotated by 4·s chips; symbols 8–15 are symbols 0–7 with the odd chips inverted |
| MSK-equivalent bit of chip `n` | c_n xor c_(n−1) for odd `n`, and its inverse for even `n` |

`rx_pkg.sv` holds these tables and rules as functions (`chip_seq`, `msk_seq`,
`chip_phase`, `chip_decide`, and the two 128-bit preamble references).

## Data flow

```
 ADC write port ──> sample_mem (I, Q) ──> mem_ctrl ──> cordic_vector (shared, tagged)
                                            │              │ phase
                                            │              ├─> str_est                 timing offset tau
                                            │              ├─> [x2] cordic_rotation ─> cfo_est   v_hat, theta_hat
 O-QPSK chain                               │              ├─> ioc_pd ─> preamble_det  start of payload, score
                                            │              ├─> rpnc ──────────────┐
 MSK chain                                  │              └─> dpd ─> cordic_rotation (sin) ─> bits
                                            │                        └─> preamble_det (MSK ref)
                                            │                                     │
                                            └── chooses chain ──> despreader <────┘ ──> sym_decoder ──> data bits
```

Only one chain runs at a time. The controller reads the memory once per step at
one sample per clock. Every sample goes through the shared vectoring CORDIC with
a 4-bit tag: three bits name the block that gets the phase and one bit marks the
chip-peak sample. The tag travels down the 16-stage pipeline with the sample,
and the controller routes the output phase by that tag. No second arbiter is
needed. The rotation CORDIC is shared the same way, between the coarse
estimator and the differential detector.

## Processing a frame (`mem_ctrl`)

Raise `frame_start` for one cycle with `frame_base` (the first sample address)
and `frame_len` (in samples). The controller then works through these steps:

1. **Timing recovery (`str_est`).** It streams (128+1)·8 consecutive samples.
   For each of the 8 sample offsets it adds up |φ_n − φ_(n−8)|. In half-sine
   MSK the phase turns a full quarter turn per chip only between pulse peaks,
   so the offset with the largest sum is the peak offset `tau`. Every later
   step reads only the samples it needs, at `base + tau + 8k`.
2. **Chain choice.** In manual mode the controller takes `manual_chain`. In
   automatic mode it starts in MSK after reset and keeps the last chain it
   used.
3. **MSK chain.**
   - `dpd` takes φ_n − φ_(n−8) from an 8-sample delay line and gets its sine
     from the rotation CORDIC. The bit is `sin < 0`, taken on the chip-peak
     samples.
   - `preamble_det` correlates the bits with the 128-bit MSK-equivalent
     preamble.
   - In automatic mode, a peak score below **110** moves the same frame to the
     O-QPSK chain (`mode_switch`). In manual mode, no peak of at least **80**
     loses the frame.
   - Otherwise the samples from the payload on go through `dpd` to the
     despreader. The despreader compares 31 chips here, because the first
     differential bit of a symbol depends on the previous symbol.
4. **O-QPSK chain.**
   - *Coarse estimate.* This step runs only when no estimate is held or
     `cfo_req` was raised. The controller takes 128 chip samples. Their phase
     is doubled, which removes the modulation: O-QPSK chip phases are
     multiples of a quarter turn, so e^{j2φ} is ±1. The rotation CORDIC turns
     the doubled phase into e^{j2φ}, and `cfo_est` runs a 1024-point FFT over
     it, zero-padded. The peak bin `m` gives v̂ = (m − 512)/2048 turns per
     chip. The peak itself goes back through the vectoring CORDIC, and
     θ̂ = arg/2. The estimate is kept for later frames (`cfo_run` pulses when a
     new one is taken).
   - *Initial compensation and detection (`ioc_pd`).* Each chip phase is
     corrected to φ_k − k·v̂ − θ̂ and decided by quadrant. The chips are then
     correlated against the 128-chip preamble, which is four symbol-0
     sequences. θ̂ from the squared signal is ambiguous by half a turn, so the
     correlator also accepts the inverted preamble and then adds half a turn
     to θ̂. No peak of at least 80 within 320 chips means the frame is lost.
     In automatic mode, a peak of 110 or more sends the *next* frame back to
     MSK.
   - *Residual compensation (`rpnc`).* This step starts one symbol before the
     payload. It uses the last preamble symbol as training, and its decisions
     go to the despreader (see below).
5. **Done.** `frame_done` pulses, together with `frame_lost`. The other outputs
   also report the frame: `chain_used`, `pd_score`, `tau`, `v_hat`,
   `theta_hat`, and `payload_addr`, the sample address of the first symbol
   sent out.

`payload_addr` is the first symbol after the four preamble symbols that the
correlator matched. In a standard frame that is the fifth preamble symbol in
the O-QPSK chain and the sixth in the MSK chain. The MSK correlator's bit `b`
is chip `b+1`, so its match ends one symbol later. From there on every symbol
is sent out, including the SFD and the length byte. There is no SFD search:
framing is left to the MAC.

## Residual phase noise compensator (`rpnc`)

After coarse compensation, chip k still carries a phase error of e·k. Here e is
the residual frequency error and k counts from the start of the frame. Deciding
chip k coherently needs |e·k| below 1/8 turn, which fails on long frames.
Instead, chip k is compared with each of its N = 16 predecessors k−i:

    φ̂(k,i) = φ_z(k) + [φ_x̂(k−i) − φ_z(k−i)] − i·v̂

- φ_z is the received phase.
- φ_x̂ is the ideal phase of the chip already decided at k−i.
- The bracket cancels the unknown phase offset and the drift up to k−i.
- i·v̂ removes the coarse part of the drift over the i chips in between.

Only e·i is left, which is small for i ≤ 16 whatever k is. Each of the 16
estimates is decided by quadrant. The chip is the majority of the 16
decisions; a tie takes the decision of the nearest chip.

The hardware keeps the brackets in *register bank 0* and the i·v̂ terms in
*register bank 1*. Bank 1 is loaded once per estimate. It computes all 16 sums
in parallel: 3 × 16 adders, one chip per clock. The new chip's bracket enters
bank 0 at once.

When the despreader has matched the 32 chips of a symbol, the clean chip
sequence of the symbol it chose is written back over that symbol's decisions
in bank 0, using the raw phases kept for the last two symbols. Later chips are
then referred to corrected chips. The rewrite is made only when the match
reaches the despreader's threshold of 27 of 32. A weak match is often wrong, and
writing a wrong sequence back would corrupt the reference for the next 16
chips.

The first 32 chips are training: the last preamble symbol, whose chips are
known. They fill bank 0 before any decision is made.

Measured in `tb_rpnc`:
- A 60-byte frame (4224 chips) is given a residual of ±1/3000 turn per chip, a
  drift of more than one turn over the frame.
- The compensator makes no symbol error.
- Coarse compensation alone gets about 120 of the 132 symbols wrong.

## Parameters of the top (`dual_mode_rx`)

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 16 | sample memory of 2^16 I/Q pairs; holds a 100-byte payload frame (54272 samples) but not a 127-byte one (68096) |
| `SPS` | 8 | samples per chip |
| `N_RCFO` | 16 | predecessors per chip in the residual compensator (4 and 8 pass `tb_rpnc` too, with its `N_RCFO` changed) |
| `NFFT` | 1024 | FFT length of the coarse estimator |
| `NQ` | 128 | chip samples used by the coarse estimator |
| `STR_CHIPS` | 128 | chips observed by timing recovery |
| `SEARCH_CHIPS` | 320 | chips searched for the preamble |

`mem_ctrl` also has `THR_DETECT` = 80 and `THR_MODE` = 110. The despreader's
`SYM_THR` is 27.

## Timing

| Step | Cycles |
|---|---|
| CORDIC latency | 16 each |
| Timing recovery | (STR_CHIPS+1)·8 + pipeline ≈ 1100 |
| Coarse estimate | ≈ 7100. One radix-2 butterfly per cycle: 5120 butterflies plus load and peak search. Taken only once per burst |
| Preamble search (O-QPSK) | one chip per cycle, ≤ 320 |
| O-QPSK data | one chip per cycle, 32 per symbol. Each chip decision leaves 1 cycle after its chip; each symbol 2 cycles after its last chip |
| MSK data | one sample per cycle, 256 per symbol. The detector runs on every sample so that its 8-sample delay line spans one chip; a bit leaves 18 cycles after its sample |

`tb_dual_mode_rx_100B` measured a 100-byte frame in:
- O-QPSK, with a fresh estimate: about 8000 cycles, 0.5 ms at 16 MHz.
- MSK: about 55800 cycles, 3.5 ms.

## Where this design departs from the method it implements, or fills gaps

- **Preamble correlator length.** The correlator is 128 bits long: four
  preamble symbols, in both chains. A 256-bit correlation over the whole
  8-symbol preamble would also be possible; 128 bits leaves room for the
  timing search and the training symbol.
- **Timing recovery metric.** The timing recovery metric (phase step per chip,
  argmax over offsets) is a simple non-linear estimator chosen for this
  design. It is not a specific published algorithm.
- **Coarse estimator speed.** The coarse estimator does one butterfly per
  cycle with no parallel memory ports. A cycle budget that counts separate
  additions, multiplications and memory accesses per stage would be about
  eight times higher.
- **O-QPSK chain speed.** The O-QPSK chain takes one chip per cycle in both
  the preamble search and the residual compensator. A budget of 2 cycles per
  chip for the search and about 114 cycles per symbol for the compensator
  would be far slower.
- **MSK chain speed.** The MSK chain runs at the sample rate: 256 cycles per
  symbol rather than 32.
- **Gated write-back.** The despreader write-back into the residual
  compensator is gated by the symbol threshold (see above).
- **Automatic switch-back.** A good coherent preamble (score ≥ 110) sends the
  *next* frame back to MSK. Switching back on the same frame would waste the
  estimate just made.
- **No SFD or length parsing.** The receiver delivers symbols from the payload
  address to the frame end.
- **Shared back end.** One despreader and one decoder serve both chains.
- **ADC not modelled.** The analog front end and ADC are not modelled. Samples
  are written through the top's `adc_*` port (`sample_mem` write port, one
  pair per cycle).

## Files

`rtl/`:

| File | Contents |
|---|---|
| `rx_pkg.sv` | widths, types, chip tables, preamble references, chip phase and decision rules |
| `sample_mem.sv` | I/Q sample memory, registered read |
| `cordic_vector.sv`, `cordic_rotation.sv` | 16-stage pipelined CORDICs with tags |
| `str_est.sv` | symbol timing recovery |
| `cfo_est.sv` | 1024-point FFT coarse frequency and phase estimator |
| `preamble_det.sv` | 128-bit sliding correlator with peak search |
| `ioc_pd.sv` | initial offset compensation, chip decision, O-QPSK preamble detection |
| `rpnc.sv` | residual phase noise compensator |
| `despreader.sv` | 16-way chip sequence matcher |
| `dpd.sv` | MSK differential phase detection |
| `sym_decoder.sv` | symbol to serial bits, LSB first |
| `mem_ctrl.sv` | controller and mode logic |
| `dual_mode_rx.sv` | top |

`tb/`:
- Each block has a self-checking testbench, `tb_<module>.sv`.
- `tb_sig_pkg.sv` is an independent stimulus model. It builds frames (preamble,
  SFD, length, payload), spreads them with its own chip table, and makes
  half-sine O-QPSK samples with a timing offset, carrier frequency and phase
  offset and Gaussian noise.

Top-level tests:
- **`tb_dual_mode_rx`** runs the top at its default parameters and takes it
  through every mechanism:
  - timing recovery
  - a new and a reused coarse estimate
  - both chains in manual mode
  - an automatic switch to O-QPSK on a noisy frame and the switch back
  - despreader corrections of compensator chips
  - a lost frame
- It counts each mechanism and fails if one never happens.
- Its noisy frame sits near the limit of the coherent chain. Sigma is 6500
  against an amplitude of 8000 per component; `+sigma4=` changes it. That
  frame is allowed up to 3 symbol errors. At this noise the decision-directed
  compensator occasionally loses lock: that happened for about one random seed
  in sixteen.
- **`tb_dual_mode_rx_100B`** receives an 80-byte and a 100-byte frame in both
  chains.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
including on its watchdog. With Verilator 5, run from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rx_pkg.sv tb/tb_sig_pkg.sv \
    tb/tb_dual_mode_rx.sv --top-module tb_dual_mode_rx -Mdir obj
./obj/Vtb_dual_mode_rx +verilator+rand+reset+2
```

- Replace the testbench name to run another test.
- The block testbenches that do not use the stimulus package can leave out
  `tb/tb_sig_pkg.sv`.
- `tb_dual_mode_rx` takes `+trace` to print every despread symbol with its
  score, and `+sigma4=<noise>` for its noisy frame.

The simulator used has two-state logic. All registers that are read have a
reset, apart from the sample memory arrays.
