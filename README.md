# Polar-coded VLC beacon transceiver and centralized beacon transmitter

Visible-light beacons send a short, fixed ID frame from an LED again and
again. A receiver finds its position from the ID. The light must not
flicker, so the share of on-bits in the stream has to stay near 50 %.
Usually a run-length-limiting (RLL) code such as Manchester or 4B6B does
this, which halves or two-thirds the code rate.

This design drops the RLL code. The beacon frame is first whitened by a
4-bit additive scrambler and then encoded with a non-systematic
(256,158) polar code. Each output bit of a non-systematic polar code is
the XOR of many input bits, so the codeword is close to balanced whatever
the ID. The same code also corrects errors, at rate 158/256 = 0.62.

The receiver is built to be cheap:
- Instead of estimating channel mean and variance, it puts each photodiode
  sample into one of 8 amplitude regions. The region edges come from the
  running peak levels of the signal.
- Each region has a fixed log-likelihood ratio (LLR) from a table.
- A successive-cancellation (SC) decoder made of combinational layers
  decides two bits per clock.

A second part of the design serves many lamps from one encoder: a
centralized transmitter. The host writes a 128-bit message per LED
front-end. One shared polar + RLL encoder turns each written message into
a codeword. Per-lamp loop shift registers then repeat that codeword on
each lamp's output.

All RTL is in `rtl/`, one module per file. Each file's opening comment
gives its function, timing, and which parts are fixed by the underlying
scheme and which are this design's choices.

## Beacon frame and scrambler (`frame_encap`, `prescrambler`, `descrambler`, `frame_decap`)

The frame is 158 bits, sent MSB first:

| field    | bits | value |
|----------|------|-------|
| preamble | 6    | `101010` (`vlc_pkg::PREAMBLE_DEFAULT`, a choice) |
| type     | 8    | input |
| ID       | 128  | input |
| CRC      | 16   | CRC-16-CCITT over type and ID |

The CRC uses polynomial 0x1021, initial value 0xFFFF, MSB first. The
polynomial is a choice: only the 16-bit field is fixed.

The scrambler is additive, with polynomial x^4+x^3+1:
- Cipher bit: `c = s[3]^s[2]`.
- State update: `s <= {s[2:0], c}`.
- Seed: `0001`.
- It is reseeded at the start of every 158-bit frame, so the descrambler
  needs no synchronisation beyond the frame boundary.

## Polar code (`vlc_pkg::frozen_mask`, `polar_enc_core`)

**Construction.** `frozen_mask(n,k)` is evaluated at elaboration and is
shared by the transmitter, the decoder and the receiver's P2S stage.
- It computes the Bhattacharyya parameter of each of the n bit channels
  for a binary erasure channel with erasure probability 0.5. The index is
  read MSB first: a 0 bit applies z→2z−z², a 1 bit applies z→z².
- It keeps the k smallest values. Ties go to the higher index.
- For (256,158), 98 bits are frozen. For the centralized (256,128) code,
  128 bits are frozen.
- The exact construction is a choice; any fixed frozen set works as long
  as both ends agree.

**Encoder.** `polar_enc_core #(N)` is recursive:
`x = {enc(u_hi), enc(u_lo) ^ enc(u_hi)}`, with no bit reversal. This gives
`x = u·F^{⊗n}`, `F = [[1,0],[1,1]]`. It is purely combinational and
costs N/2·log2 N XOR gates. The decoder reuses it as its partial-sum
generator.

## Beacon transmitter (`vlc_tx` = `prescrambler` → `tx_s2p` → `frozen_inserter` → `polar_enc_core` → `tx_p2s_ook`)

The transmitter takes one serial frame bit per clock with a valid/ready
handshake, and sends one coded bit per clock on `led`. When idle, `led`
stays at 1: the lamp stays on.

Timing:
- The first frame bit accepted in cycle 0 leaves as the first coded bit
  in cycle 160 (K+2).
- Frames are not overlapped: `in_ready` returns after the last coded bit.
- A frame therefore takes 416 cycles. At 25 MHz that is
  256 b / 416 × 25 MHz = 15.38 Mb/s.
- `frame_encap` feeds it from a parallel type/ID interface.

## Beacon receiver (`vlc_rx`)

The receiver pipeline is:
`soft_decision_filter` → `llr_transformer` → `sc_polar_decoder` → `rx_p2s` → `descrambler` → `frame_decap`.

### Soft-decision filter

The filter keeps the largest (P+) and smallest (P−) samples seen since
`peak_clear`. From them it forms seven thresholds,
Vt + k·(P+ − Vt)/4 for k = −3..3, where Vt = (P+ + P−)/2.

To stay exact in integers, it compares `8·s` against
`4·(P+ + P−) + k·(P+ − P−)`. The number of thresholds above the sample is
the region r (0..7).

A fixed table maps regions to signed 9-bit LLRs:
154, 46, 28, 8, −9, −27, −45, −153. These are the LLRs
1.2017 … −1.1943 scaled by 128. A positive LLR means bit 0.

Region 0 is the bright end, so a high sample decodes as bit 0. This
assumes an **inverting receive front-end**: LED on gives a low ADC code.
The testbenches model the channel this way. A non-inverting front-end
needs its ADC code complemented first, for example `255 - adc`.

The peaks are updated after the current sample is judged. Before the
first sample every threshold equals the sample, giving region 0. Each
receiver test therefore sends a few samples of idle light first. Outputs
are registered one clock after the input.

### Transformer

The transformer shifts the 9-bit LLR right arithmetically by 3 and
saturates it to ±15, which is 5 bits. It collects the 256 LLRs of a frame
from `frame_start`. `frame_valid` pulses the clock after the last one.

### SC decoder

The decoder holds the 256 channel LLRs in registers. Every clock, a
combinational tree of min-sum processing elements recomputes the LLRs of
the next bit pair. The tree has 128, 64, …, 2 elements, then one last
element.
- Each element computes f = sign·sign·min or g = b ± a. The choice is
  made by the bit of the pair index that belongs to its layer.
- The partial sums for a layer come from re-encoding the already decided
  bits of the left sub-tree, `u[base +: M]`, with an M-bit `polar_enc_core`.
- The last element decides u[2k] and u[2k+1] together. Frozen positions
  are forced to 0.
- Internal width is LLR_W + log2 N, so nothing saturates.

Decoding takes 128 clocks. `dec_done` comes 386 clocks after a frame's
first sample: 256 samples, 2 pipeline clocks, 128 decoding clocks.
`id_valid` follows 160 clocks later.

This is a long combinational path: log2 N layers of adders and
comparators, plus the partial-sum XOR trees. It limits the receiver's
clock more than anything else.

`rx_p2s` picks the 158 information positions in ascending order. These
bits are descrambled, and `frame_decap` checks the preamble and the CRC.

## Centralized transmitter (`centralized_tx`)

```
host ─┬─► message_memory (2-port, 100 × 128 b) ◄── port B ──┐
      └─► request_fifo (8 × {we, addr, msg}) ──► address_pointer ──► ct_controller
                                                                    │ start/done
                                 ct_vlc_transmitter (frozen insert → polar (256,128) → RLL)
                                                                    │ codeword
                                 fe_demux_regs: fe_reg[addr] <= cw, fe_tgl[addr] ^= 1
                         ════ sr_clk domain ═══════════════════════════════════════
                                 piso_loop_sr: per front-end loop register, fe_out[i]
```

- **Request flow.** Every host write goes into memory port A and is
  queued as a 136-bit request.
  - When the encoder is free, the address pointer pops a request, reads
    that front-end's message through port B and hands it on.
  - The controller starts the three-stage transmitter: frozen insertion,
    polar encoding, RLL.
  - It then writes the codeword to the addressed front-end's buffer
    register and flips that front-end's toggle flag.
- **Requests that are dropped.** Requests with an address of 100 or more
  are popped and dropped. A write into a full FIFO with no pop in the same
  clock is lost and sets the sticky `fifo_overflow` flag.
- **RLL.** Manchester gives a 512-bit codeword: bit i → `cw[2i]=x`,
  `cw[2i+1]=~x`. The 4B6B variant gives 384 bits using the IEEE 802.15.7
  table; every code word has weight 3. The RLL is chosen by the parameter
  `RLL`.
- **Clock crossing.** Each toggle flag passes a two-flop synchronizer into
  `sr_clk`. Every edge of the synchronized flag sets a pending bit. At the
  end of the current repetition, the loop register reloads from the buffer
  register. So a frame is never cut, and two updates in one frame are not
  lost.
  - All front-ends share one bit counter, so their frames are aligned.
  - The buffer must stay stable for 3 `sr_clk` cycles after its toggle.
    This holds when `sr_clk` is much slower than `clk`: 100 kHz against
    50 MHz in the intended system.
- **Timing.** In an idle system, a write in cycle 0 reaches the front-end
  register in cycle 8. Back-to-back requests are served one every 7
  clocks, so 128 message bits per 7 clocks.

## Top (`vlc_system_top`)

The top places the three systems side by side with separate ports:
- the beacon transmitter (`tx_*`, `led`);
- the beacon receiver (`rx_*`);
- the centralized transmitter (`host_*`, `sr_clk`, `fe_out`).

They share only `clk`/`rst_n`. The optical channel is outside the top. In
the tests, `led` drives the receiver's ADC input through a noisy, inverting
channel model. `rx_frame_start` is taken from the rising edge of
`tx_frame_valid`, because frame synchronisation is not part of the
receiver.

Parameters: `N_FE` (default 100) and `CT_RLL` (default Manchester).

## Departures and own choices

- **Write latency.** The write-to-front-end latency is 8 clocks, and one
  request is served every 7 clocks. The reference FPGA figure is 14 clocks
  and is not broken down per block. The pipeline here is shorter.
- **Choices where the scheme gives no value:**
  - preamble value and CRC polynomial;
  - frozen-set construction;
  - the quantizer shift and width;
  - FIFO depth (8) and full behaviour;
  - the peak detector's reset behaviour;
  - the inverting receive front-end;
  - one ADC sample per bit;
  - frame boundaries given to the receiver from outside.
- **Register and FIFO sizes against the reference FPGA build.** The
  reference resource table lists 76,800 front-end register bits for 4B6B
  (100 × 2 × 384), which matches this design. For Manchester it lists
  89,600, where this design has 102,400 (100 × 2 × 512). Its request FIFO
  uses 224 memory bits, less than the 8 × 136 bits here. The FIFO depth
  is a parameter (`DEPTH`).
- **Dimming control** (puncturing and compensation symbols) is not part
  of the centralized transmitter, as in the reference build.
- **Frozen-set tie break.** Ties in the frozen-set construction go to the
  higher index.
- **Not included:**
  - the LED driver and photodiode/ADC front-ends (analog);
  - the PLL;
  - the host soft processor and its memory (the host bus is a port);
  - the multi-mode convolutional/LDPC FEC scheme. It exists only as a
    system-level study, with no hardware architecture, matrices or
    interleaver given.

## Sizes that fit

- A 158-bit beacon frame in a 256-bit codeword.
- 100 front-ends × 128-bit messages: 1,600 bytes of message memory.
- 100 × 512 front-end buffer bits plus 100 × 512 loop-register bits for
  Manchester. That is about 102,400 flip-flops, which is the dominant area
  of the centralized transmitter.
- Other codeword or message lengths (32/64/128-bit polar codes) are not
  built. The receiver is fixed to N = 256.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. `tb/tb_ref_pkg.sv` holds independent
reference models:
- generator-matrix polar encoding;
- level-by-level frozen-set construction;
- a byte-wise CRC;
- the scrambler as a recurrence;
- a recursive integer SC decoder.

Example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_vlc_system_top \
  -Mdir obj rtl/vlc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_vlc_system_top.sv
obj/Vtb_vlc_system_top
```

`tb_vlc_system_top` runs the full-size top at its default parameters:
- Six beacon frames go through the channel model, with noise that rises
  until hard decisions fail. The test checks every decoded ID, the
  160/416/386-clock timing, and that channel errors were actually
  corrected.
- All 100 front-ends are written: first a burst that queues, then paced
  writes.
- It also sends an invalid address, a double update of one lamp, and an
  over-long burst.
- It checks read-back, the 8-clock latency, every lamp's repeated codeword
  against the reference, and the overflow flag.
- Each mechanism is counted: decoded frames, corrected frames, CRC passes,
  queued cycles, busy waits, dropped requests, reloads, repetitions and
  overflow. A mechanism that never happens counts as a failure.

`tb_centralized_tx` runs an 8-front-end system in both RLL variants.
