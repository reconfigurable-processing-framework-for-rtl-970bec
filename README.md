# Time-reversal space-time block code link: transmitter, receiver front end and serial-input matrix multiplier

A two-antenna time-reversal space-time block code (TR-STBC) link sends every
data block from both antennas. The second half of each packet holds
time-reversed, conjugated copies, so that a receiver with one antenna can
separate the two signals again. The receiver has to know both channel impulse
responses to do this. It gets them from a least-squares fit over a known
training sequence:

    H = [H1; H2] = (S^H S)^-1 S^H Y = pinv(S) * Y

`S` is the convolution (Toeplitz) matrix of the training sequence and `Y` holds
the received training samples. `pinv(S)` depends only on the training
sequence, so it is a constant matrix and the estimate is a plain product
`y = A x`.

The core of this RTL is a matrix multiplier built for that case. The input
vector comes from the receive chain one sample at a time. So the product is
not computed row by row after all of `x` has been buffered. It is computed
column by column while `x` arrives:

    y = A(:,1) x1 + A(:,2) x2 + ... + A(:,n) xn

When sample `x_l` arrives, each of the `m` lanes multiplies it by its own
`A(i,l)` and adds the product into its accumulator `y_i`. There is no input
buffer. All `m` outputs are ready two clocks after the last sample, and the
hardware is `m` multipliers, `m` adders and `m` accumulators. Around this core
sit:
- a transmitter that builds TR-STBC packets from a pattern memory;
- a receiver front end that finds frames, runs the estimator and
  matched-filters the payload;
- a CPU memory interface on each side for control, status and debug capture.

## The serial-input matrix multiplier (`matmul_serial`)

Parameters: `M` outputs (lanes), `N` input elements, 16-bit complex inputs and
coefficients, 32-bit complex accumulators. Defaults are `M = 40` and `N = 160`.

**Coefficient store.** Each lane `i` has a column store of `N` complex
coefficients, `A(i,0..N-1)`. Together the stores form one `M x N` array. The
array is written one element at a time through `coef_we/coef_row/coef_col`,
and all lanes read it at the same column index. A new training sequence
therefore means new coefficients, not new logic.

**Column counter.** The counter `col` names the element expected next. It
advances on every accepted `x_valid` and wraps after `N-1`. The `restart` input
sets it back to 0, which drops a partly received vector. `col_idx` shows the
counter so that a controller can check its alignment.

**Pipeline.** There are two stages.

| stage | clock edge after `x_l` is accepted | what happens |
|---|---|---|
| 1 | same edge | Column `l` of every lane's store and `x_l` are registered. The flags `first` (`l == 0`) and `last` (`l == N-1`) are registered too. |
| 2 | next edge | Each lane multiplies, then accumulates: `y_i <= (first ? 0 : y_i) + A(i,l) * x_l`. When `last` is set, `y_valid` rises. |

Because the accumulator is loaded rather than cleared on `first`, vectors can
follow each other with no gap. The first product of vector `k+1` replaces the
result of vector `k` on the same edge that it would otherwise be added to it.
Downstream logic has to take `y_re/y_im` when `y_valid` rises (see the
estimator below).

**Arithmetic.** Each product is a full complex product of two 16-bit values,
which needs 4 real multipliers per lane. The sum is kept to 32 bits and wraps
on overflow. Scale the `pinv(S)` coefficients so that, for every row, the sum
over `l` of `|A(i,l)| * max|x|` stays below 2^31.

**Timing.** The result is ready 2 clocks after the last element. That is
within one symbol period (5 samples) at one sample per clock. The lane count
decides the output width, not the speed: every lane runs at the input sample
rate.

**Cost against the alternatives.**

| structure | multipliers | adders | registers | latency after last `x` |
|---|---|---|---|---|
| fully parallel | m·n | m(n−1) | n+m | 1 step |
| fully serial | 1 | 1 | n+m | m·n steps |
| serial input, parallel output (this) | m | m | m | pipeline depth (2 clocks) |

## Channel estimation (`channel_estimator`)

`channel_estimator` wraps `matmul_serial` with `A = pinv(S)`, which is loaded
by the CPU. It feeds the multiplier only while the frame controller holds the
training window open. Outside the window it holds `restart`, so each window
starts at column 0.

When `y_valid` rises, all `M` results are copied into the channel store. The
store is the estimate the rest of the receiver uses:
- taps `0 .. M/2-1` are channel 1 (antenna 1 to the receiver);
- taps `M/2 .. M-1` are channel 2.

`est_valid` pulses 3 clocks after the last training sample, and `est_count`
counts the estimates. The CPU reads the store at tap granularity, with the real
and imaginary parts at adjacent addresses.

`pinv(S)` must be computed offline from the training sequence. Row `i` of
`pinv(S)` goes to lane `i`, column `l` to coefficient index `l`, and the values
are scaled to 16-bit signed. The estimate comes out in the same scale.

## Receiver framing (`sync_detector`, `rx_fsm`)

The receiver input is the demodulated, pulse-filtered and decimated complex
stream at 5 samples per symbol: 10 Msample/s for 2 Mbit/s.

**Sync detector.** `sync_detector` keeps the sign of the real part of the last
`SYNC_LEN * 5` samples. For each candidate frame start it compares one sample
per symbol with the programmed sync word. It then counts the agreeing symbols.
A hit is one clock wide. It fires on the first sample of the last sync symbol,
when the count reaches the programmed threshold and was below it on the
previous sample. Because of that second condition, a run of good alignments
gives one hit, not several.

**Frame controller.** `rx_fsm` runs IDLE → SEARCH → SKIP → TRAIN → PAYLOAD →
SEARCH.
- SKIP lasts `sync_offset` samples. This covers the rest of the sync word and
  any guard.
- TRAIN lasts `N` samples. It is the estimator's window.
- PAYLOAD lasts `payload_len` samples.
- A zero length skips that state.
- Clearing `enable` returns the controller to IDLE at once.

With the packet format below, the offset is 4. That is the remaining samples
of the last sync symbol.

## Matched filters (`matched_filter`)

The payload is filtered with each channel's time-reversed conjugate. The result
gives the two "forward" outputs, FWD 1 and FWD 2, that a TR-STBC linear
combiner would take next:

    fwd_k[n] = sum_j conj(h_k[j]) * r[n - (L-1-j)],   L = M/2 taps

The filter uses bits `[23:8]` of each 32-bit tap (`H_SHIFT = 8`). Its output is
registered one clock after its input. The delay line is cleared during the
training window. In `stbc_rx`, the payload is delayed by 4 clocks before it
reaches the filters. Without the delay, the first payload samples would meet
the previous frame's estimate, because the new one is stored 3 clocks after
training.

## Forward-output buffers (`fwd_buffer`)

A time-reversal decoder combines the forward matched-filter output with the
same output read backwards, so it needs a whole frame of it first. Two buffers,
FWD 1 and FWD 2, keep the current frame's outputs of the two filters. Each
holds `2 x DATA_SYMS x 5 = 2560` samples at the default sizes.

- **Write.** A buffer is emptied while the training window is open. From the
  first payload output on, it is filled in order. Its fill level saturates
  at the depth, and extra samples are dropped.
- **Read.** There are two registered read ports, each with one clock of
  latency. The CPU reads real and imaginary parts at adjacent addresses. The
  decoder port (`rx_fwd_rd_addr` in, `rx_fwd1_rd_*`/`rx_fwd2_rd_*` out) takes
  any address order, so the combiner can step backwards for the reversed
  stream.

## Transmitter (`tx_pattern_ram`, `tx_sequencer`, `neg_conj`)

The pattern memory holds the sync word, one training sequence per antenna and
two data blocks `D1` and `D2` of `DATA_SYMS` symbols each. One packet on the
two antennas is:

| segment | antenna 1 | antenna 2 |
|---|---|---|
| sync | sync word | silent (0) |
| training | training 1 | training 2 |
| block 1 | D1 | D2 |
| block 2 | −conj(D2 time-reversed) | conj(D1 time-reversed) |

Each symbol is held for 5 samples, one per `tick`, so the samples come out at
the sample rate. The sequencer computes the memory addresses from its segment,
symbol and phase counters. In block 2 the addresses run backwards. `neg_conj`
forms `−conj(a) = (−re, im)` or `conj(a) = (re, −im)`. Negating −32768
saturates to 32767.

The sequencer's `done` output pulses with the last sample, and `packet_count`
counts packets. A start command while a packet is being sent is ignored.

## CPU interface, registers and debug capture

Each side has the same kind of word-addressed bus (`cpu_req_t`: `we`, `re`,
20-bit address, 32-bit data). Read data returns one clock after `re`, with
`rvalid`.
- `mem_if_decode` splits the address into a region (bits 19:16) and an
  offset, and returns the chosen region's registered read data.
- `csr_bank` holds the control registers. A write to one also raises a
  one-clock strobe for that register, so registers can act as commands (start,
  arm). It also holds the read-only status registers.
- `debug_capture` records `DEPTH` samples of one selected stream. It starts
  when armed, or at a trigger: the sync hit on the receiver, or the start
  command on the transmitter. The CPU then reads the samples back.

Receiver map (region: use):
- 0: registers.
  - Control registers:
    - 0: enable (bit 0), debug waits for sync (bit 1)
    - 1: sync word
    - 2: threshold
    - 3: offset
    - 4: payload length
    - 5: debug source (0 input, 1 training, 2 payload)
    - 6: arm
  - Status registers:
    - 0: state
    - 1: frames
    - 2: estimates
    - 3: debug `{done, capturing, count}`
    - 4: last match count
    - 5: live match count
    - 6: FWD buffer fill `{FWD 2, FWD 1}`
    - 7: `N`
- 1: `pinv(S)`, write only. The offset is `{row[7:0], col[7:0]}`; the data is `{re, im}`.
- 2: channel store. Offset `{tap, 0}` is the real part, `{tap, 1}` the imaginary part.
- 3: debug buffer.
- 4: FWD 1 buffer. Offset `{index, 0}` is the real part, `{index, 1}` the imaginary part.
- 5: FWD 2 buffer, with the same layout.

Transmitter map:
- 0: registers.
  - Control registers:
    - 0: a write with bit 0 set starts a packet
    - 1: debug source (bit 0), wait for start (bit 8)
    - 2: arm
  - Status registers:
    - 0: busy
    - 1: packets
    - 2: debug status
    - 3: segment
- 1: pattern memory. It is packed: sync at 0, training 1 at 32, training 2 at 64, D1 at 96, D2 at 352 (default sizes).
- 2: debug buffer.

## Top level (`stbc_top`)

`stbc_top` places the transmitter (`stbc_tx`) and the receiver (`stbc_rx`) side
by side on one clock and reset. Each keeps its own CPU port. The ports are
where the stages that are not in this RTL would connect:
- transmit samples `tx_ant1/tx_ant2` go to pulse shaping, the IQ modulator
  and the DACs;
- decimated receive samples `rx_valid/rx_sample` come from the demodulator
  and decimator;
- `rx_fwd1_*`, `rx_fwd2_*`, the FWD buffer read port `rx_fwd_rd_addr` /
  `rx_fwd*_rd_*`, `rx_payload_*` and the estimate `rx_h_*` go on to the linear
  combiner and the Viterbi equalisers.

Defaults:

| parameter | default | meaning |
|---|---|---|
| `M` | 40 | channel taps, 20 per channel |
| `SYNC_LEN` | 32 | sync word symbols |
| `TRAIN_SYMS` | 32 | training symbols; `N = 5 * TRAIN_SYMS = 160` estimator inputs |
| `DATA_SYMS` | 256 | symbols per data block |
| `TX_DEPTH` | 1024 | pattern memory words |
| `DBG_DEPTH` | 1024 | debug buffer samples per side |

The shared constants and types (`cplx_t`, `cpu_req_t`, region numbers) are in
`stbc_pkg`.

## Where this RTL departs from the original system, and what is not here

- Built to the original: 40 channel taps, 32-bit results, 16-bit samples and
  coefficients, 5 samples per symbol, and a multiplier with one lane per
  output.
- Choices made here, not taken from the original:
  - the training length (`N = 160`);
  - the sync word length and the detection rule;
  - the packet layout;
  - the register maps, the bus and the debug trigger;
  - the single clock;
  - the matched-filter scaling;
  - the 4-clock payload delay;
  - the FWD buffer depth and clearing rule.
- The time-reversed encoding (−conj on antenna 1, conj on antenna 2, both
  time-reversed) is the standard TR-STBC form. The original does not spell it
  out.
- The transmitter holds each symbol for 5 samples. A real pulse-shaping filter
  would replace this zero-order hold.
- The original loads `pinv(S)` from a memory image made offline. Here the CPU
  writes it.
- The original's reported size (about 2800 logic elements for 40 lanes of 32
  bits) counts a real-valued lane. Here each lane is complex, with four
  multipliers and two accumulators, so the logic is larger.
- Not implemented:
  - the linear combiner and the reversed matched-filter path of the decoder;
  - the Viterbi equalisers;
  - the receiver's demodulation, pulse filter and decimation;
  - the transmit pulse shaping and IQ modulation;
  - the analogue RF, DAC and ADC stages;
  - the CPU itself.

  Their connection points are top-level ports.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=<n> failures=<n>` and ends itself with a
watchdog.
- Most unit benches use small parameters.
- `tb_stbc_top` runs the whole design at the default sizes. It loads a packet
  with a random training sequence and payload. It fills the estimator's
  coefficient memories with random 16-bit values. The estimator's arithmetic
  does not depend on the values being a true `pinv(S)`, and the bench works
  out the expected product itself. It sends two packets through a two-path
  channel, `r = x1 + x1[n-1]/4 + x2/2`, and checks:
  - every transmit sample;
  - the sync position;
  - the training window;
  - every estimate tap against a reference product;
  - the estimate latency (at most one symbol);
  - the CPU read-back;
  - the matched-filter outputs;
  - the FWD buffers, by CPU reads and by reversed decoder reads;
  - both debug buffers;
  - the status registers.

  It also counts how often each mechanism was exercised.
- `tb_ls_estimate_workload` runs the estimator at its full size (40 taps,
  160 samples) on a real least-squares problem. It draws random QPSK training
  sequences for both antennas and builds their convolution matrix. It solves
  `pinv(S)` in double precision and scales it to 16 bits. Two random decaying
  20-tap channels are estimated, once without noise and once with noise. Every
  tap must match the exact integer product. Scaled back, it must match the
  floating-point least-squares estimate within 0.01; the observed error is
  below 1e-4. This is the check to repeat when the coefficient format or the
  accumulator width changes.

With plain Verilator, from the project root:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/stbc_pkg.sv tb/tb_stbc_top.sv --top-module tb_stbc_top -o sim
    ./obj_dir/sim

Replace `tb_stbc_top` with any other testbench name to run that unit test.
