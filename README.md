# LpGBT digital core

The LpGBT is a radiation-hard optical-link transceiver for detector
front-ends. It receives a 2.56 Gb/s down link carrying timing, trigger and
control, and it sends detector data on a 5.12 or 10.24 Gb/s up link, both in
frames locked to the 40 MHz bunch clock so that the latency is fixed. Every frame
is scrambled so that a receiver can recover a clock from it without line
coding. It is protected by an interleaved Reed-Solomon code so that bursts of
bit errors (from noise or from particle hits in the receiver) are corrected
without a retransmission. On the detector side up to 28 slow serial inputs
("e-links") arrive with arbitrary phases. Each one is sampled at a phase
chosen automatically from a delay line.

This repository holds synthesizable SystemVerilog for the digital parts of
that chip, with self-checking testbenches:

- the down-link receive chain: phase detector, frame pre-scaler, deserializer,
  frame aligner, FEC decoder and descrambler;
- the up-link transmit chain: scramblers, FEC encoder, framing and the tree
  serializer;
- the e-link phase aligners and the control of the e-link transmitters;
- the counting logic of the eye-opening monitor;
- the capacitor-bank search of the VCO calibration.

The analog parts connect through ports. These are the delay line and its DLL,
the LC VCO, charge pump and loop filter, the line driver and equalizer, the
e-link drivers, and the comparator and phase interpolator of the eye monitor.

## Frames

All rates use the same structure of header, scrambled data field and FEC field:

| link            | frame | header | data | FEC | correctable bits | scramblers       |
|-----------------|-------|--------|------|-----|------------------|------------------|
| down 2.56 Gb/s  | 64    | 4      | 36   | 24  | 12               | 1 x 36 bit       |
| up 5.12, FEC5   | 128   | 2      | 116  | 10  | 5                | 2 x 58 bit       |
| up 5.12, FEC12  | 128   | 2      | 102  | 24  | 12               | 2 x 51 bit       |
| up 10.24, FEC5  | 256   | 2      | 232  | 20  | 10               | 4 x 58 bit       |
| up 10.24, FEC12 | 256   | 2      | 204  | 48  | 24               | 4 x 51 bit       |

Frames are sent MSB first as `{header, data, FEC}`. The down-link header is
`4'b1001` and the up-link header is `2'b01`. In the 10.24 Gb/s frames the
fields add up to 254 bits. The two remaining bits are zeros placed right after
the header. The 5.12 Gb/s up-link frames sit in the low 128 bits of the 256-bit
frame port. The header values and the order of the fields are choices made in
this design (`rtl/lpgbt_pkg.sv`).

### Order of operations

The transmitter scrambles first and then computes the FEC over the scrambled
bits. The receiver corrects first and descrambles afterwards. The order
matters because the descrambler multiplies every line error by three (each
received bit feeds two later bits). Corrected data going into the descrambler
therefore stays correct, while data that were descrambled first would carry
three errors for every one on the line.

## Scrambling

`scrambler` and `descrambler` are self-synchronizing multiplicative
scramblers working on a whole word per clock:

    S_i = D_i xnor S_(i-T1) xnor S_(i-T2)        D_i = S_i xnor S_(i-T1) xnor S_(i-T2)

Here (T1, T2) = (25, 36) for the 36-bit down-link word, (39, 58) for the 58-bit
FEC5 words and (40, 49) for the 51-bit FEC12 words. Bit 0 of a word is the
earliest bit. Taps that fall inside the current word use bits computed
earlier in the same cycle. Taps that fall before it use the previous word,
which is the only state kept. Because the descrambler's state is the
*received* word, it recovers by itself one word after any error or reset.
Both blocks register their output (one clock of latency).

## Reed-Solomon FEC

Each code has two parity symbols (t = 1), so it corrects one wrong symbol. The
generator is `g(x) = (x + a)(x + a^2)`. The fields are GF(8) (`x^3+x+1`),
GF(16) (`x^4+x+1`) and GF(32) (`x^5+x^2+1`). `lpgbt_pkg` provides
`gf_mul`, `gf_alpha_pow` and an antilog table built by a constant function.

- `rs_encoder` is a combinational systematic encoder, the usual
  division LFSR unrolled over the K data symbols.
- `rs_decoder` computes `S1 = c(a)` and `S2 = c(a^2)`. For a single error at
  degree j, `S2 = S1 * a^j` and the error value is `S1 * a^-j`. The decoder
  tries every position and flips the one that matches. A non-zero syndrome
  that matches no position sets `uncorrectable`. As with every t = 1 code, two
  wrong symbols may instead be miscorrected into a third.
- `fec_encoder` / `fec_decoder` split a data field into I codes by symbol
  interleaving. Data symbol p goes to code `p mod I` and FEC symbol q to code
  `q mod I`. A code shorter than its field length is padded with zero symbols
  that are never sent.

| field                 | symbol | codes I | data symbols / code |
|-----------------------|--------|---------|---------------------|
| down link             | 3 bit  | 4       | 3 (RS(5,3), shortened RS(7,5)) |
| up FEC5, 5.12 / 10.24 | 5 bit  | 1 / 2   | 24                  |
| up FEC12, 5.12 / 10.24| 4 bit  | 3 / 6   | 9                   |

With four interleaved 3-bit codes, any burst of up to 10 bits touches at most
one symbol of each code and is corrected. The same holds for a 12-bit burst
that is aligned to symbols. The up-link code sizes are this design's reading
of the FEC and correction-bit counts in the table above. A 5-bit burst in
FEC5 at 5.12 Gb/s is corrected only when it stays within one symbol.

## Down-link receiver

```
dl_line -> alexander_pd -> dl_deserializer -> downlink_decoder -> dl_data
              |  up/dn          ^ ce   | frame      (FEC, descramble)
              v                 |      v
        (charge pump)   frame_prescaler <- dl_frame_aligner
```

- **`alexander_pd`** samples the line on the rising edge (S1, S3 one bit
  apart) and on the falling edge (S2). If there is a transition (S1 != S3),
  the falling-edge sample tells whether the clock is late
  (`up = (S1^S3)&(S1^S2)`) or early (`dn = (S1^S3)&~(S1^S2)`). The retimed bit
  is S3.
- **`frame_prescaler`** divides the bit clock by 2. On a request it makes one
  period of 3, so the frame boundary moves by one bit (390 ps). It then waits
  for the request to drop before it takes another. Its output is a one-cycle
  clock enable, not a divided clock. This circuit runs at the full line rate
  in a radiation field, so it is triplicated (parameter `TMR`, on by
  default). Three copies of the state and next-state logic are each reloaded
  from the bitwise 2-of-3 majority of all three. A flip in one copy is
  outvoted on the outputs at once and overwritten on the next clock. A
  synthesis flow has to be told to keep the three identical copies, or it
  merges them. The clock is not triplicated.
- **`dl_deserializer`** shifts the bit stream in and captures a 64-bit frame
  every 32 pre-scaler pulses. A single period of 3 therefore shifts the
  captured frame by one bit.
- **`dl_frame_aligner`** compares each frame's header with `4'b1001`. While
  hunting, it asks for a slip after each bad header and ignores the frame
  captured across the slip. It declares lock after 8 good headers in a row
  and drops it after 4 bad ones in a row. Both thresholds are parameters.
- **`downlink_decoder`** runs the four RS(5,3) decoders and the 36-bit
  descrambler, with one clock of latency. It reports `corrected` and
  `uncorrectable` per code.

The latency of the chain is fixed once the link is locked. The user data of a
frame appear 3 bit clocks after its last bit reaches the phase detector, as
measured by the top-level testbench. After a loss of lock, the aligner may settle one frame later or
earlier than before.

## Up-link transmitter

`uplink_encoder` holds two banks of scramblers, 4 x 58 bits (FEC5)
and 4 x 51 bits (FEC12). It uses the first two or all four depending on the
rate. The mode is `ul_mode_e` in `lpgbt_pkg`. The frame is valid two clocks
after `en`.

`serializer` is a tree of 2:1 multiplexers. Level 0 is loaded with the whole
256-bit frame at 40 MHz. Each following level has half as many flip-flops,
running at twice the rate, and is refilled from the two halves of the level
above. The last multiplexer drives the line directly, with no flip-flop
after it. Everything here runs from the single bit-rate clock with enables,
where the chip uses one clock per level. At 5.12 Gb/s the same tree is used
with every bit of the 128-bit frame entered twice. The first bit of a frame
appears 255 bit clocks after `load`. `load` doubles as the frame request to
the encoder.

The chip's tree has ten levels according to its description, but a 256-bit
frame at 40 MHz needs 8 levels of 2:1 (40 MHz x 2^8 = 10.24 GHz). The RTL
follows the frame size (`LEVELS = 8`).

## E-link phase aligner

Each e-link is sampled by a delay line of 1.75 bit periods with taps every
1/8 bit (15 taps). The line is locked to the bit period by a DLL. Both are
analog. `phase_aligner` receives the 15 tap samples once per bit and:

1. finds the data edges as the positions where neighbouring taps differ, and
   makes a histogram of them modulo 8 over a window of 64 bits;
2. takes the most frequent edge position plus 4 taps (half a bit) as the
   sampling tap. The first acquisition is limited to taps 4..11, so that the
   phase can later wander a full bit either way without leaving the line;
3. in **automatic** mode, keeps repeating this and moves one tap per window
   toward the target. When it reaches either end it jumps 8 taps (one bit) back
   into the line;
4. in **training** mode, acquires once and then holds that phase;
5. in **static** mode, uses `static_phase`.

In training and static modes only the selected tap's output gate is enabled
(`tap_en`). Each disabled gate turns on a dummy gate (`dummy_en = ~tap_en`),
so the delay cells are loaded the same whatever the selection. The unit cells
after the selected tap are switched off as well (`cell_en`), so the signal
stops there. Both measures save power in the modes where the phase no longer
moves. The edge binning, window length, step size and the exact meaning of
"training" are this design's choices.

## E-link transmitter control

The e-link output stage is pseudo-differential. It has a P half that drives
the bit and an M half that drives its complement. Each half has unit cells of
weight 1x, 1x, 2x and 4x, where 1x is 0.5 mA. Each cell takes two controls:

| UP_n | DOWN | cell          |
|------|------|---------------|
| 0    | 0    | drives high   |
| 1    | 1    | drives low    |
| 1    | 0    | off           |

`etx_control` keeps the first 1x cell on and lets `drive[2:0]` switch in the
other three. The current is therefore 0.5 mA x (1 + drive): 1 mA at
`drive = 1`, 2 mA at 3 and 4 mA at 7. A second set of cells with the same
weights supplies pre-emphasis, set by `pe_drive`. When `pe_en` is on, these
cells push in the direction of the new bit for the first half of every bit
that follows a transition (pulse width Tbit/2), and are off otherwise. The
block runs at twice the bit rate, so the half-bit pulse is one clock. The chip
can also time the pulse with an analog delay (120 to 960 ps) or from outside.
Those two options are not part of this logic.

## Eye-opening monitor and VCO calibration

- **`eom_counter`** measures one point of the eye. It sets the phase
  interpolator (64 phases) and the comparator threshold (31 levels) and counts,
  for `32 << win_sel` clocks, how often the comparator output is 1. The
  16-bit count saturates. Scanning all 64 x 31 points is left to the
  controller.
- **`vco_calibration`** holds the VCO control voltage (`vctrl_hold`) and
  tries every capacitor code (4 bits). For each code it counts VCO cycles over
  4 reference periods and keeps the code whose count is closest to
  128 x 4. The reference clock is synchronised into the VCO domain. The
  calibration from received data, used when there is no reference clock, is
  not included.

## Top level

`lpgbt_top` has six independent clock domains, each with its own reset:
`clk_dl`, `clk_ul`, `clk_elink`, `clk_etx`, `clk_eom`, and `clk_vco` with
`ref_clk`. The number of e-link transmitters, `N_ETX`, defaults to one. Their
data come in on `etx_din`, and their cell controls go out as `etx_cells_t`
structs. It
brings out the charge-pump controls (`cdr_up`/`cdr_dn`), the delay-line tap
enables, the eye monitor's phase/level selects and the capacitor code. These
are the ports where the analog blocks connect. The up-link user data
(`ul_data`) and the aligned e-link bits (`elink_data`) are separate ports. How
e-link bits are packed into the up-link data field is not modelled. At 160 Mb/s,
28 e-links need 28 x 4 = 112 bits per frame, which fits the 116-bit FEC5
field.

## Where this departs from the chip

- Triple modular redundancy is built only into the frame pre-scaler, and
  there without triplicated clocks. The other blocks are plain RTL.
- The serializer uses one clock with enables and 8 levels (see above). The
  chip drives its last multiplexer from a half-rate clock, using both edges.
  Here it toggles on the bit-rate clock.
- Header values, field order, bit order within words, up-link code
  arrangement and GF polynomials are choices made here. They are internally
  consistent, but a frame from this RTL is not guaranteed to match a real
  LpGBT bit for bit.
- The delay line, DLL, VCO, charge pump, line driver, equalizer, e-link
  output stages, eye comparator and phase interpolator are not modelled.
- The slow-control path, the e-link serializers and deserializers, and the
  reference-less VCO calibration are not included.

## Simulating

Each block has `tb/tb_<block>.sv`. Each testbench compares against reference
models written independently in `tb/tb_ref_pkg.sv`, stops itself with a
watchdog and prints `TB_RESULT checks=N failures=M`. `tb_frame_prescaler`
also injects single-event upsets into one copy of the triplicated state. It
checks that the pulse train is unaffected, while the same upsets do disturb a
second instance built with `TMR = 0`. Example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lpgbt_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/lpgbt_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_lpgbt_top.sv -o sim && obj_dir/sim
```

`tb_lpgbt_top` runs the whole design at its default sizes:

- 700 down-link frames with a drifting clock phase, injected bursts and
  double errors, and a period of corrupted headers (the link unlocks and
  relocks);
- 30 frames in each of the four up-link modes, deserialized and decoded by
  the testbench;
- 28 e-links with random phases, acquired in automatic mode and then frozen
  in training mode;
- 200 bits through an e-link transmitter with pre-emphasis;
- one eye-monitor point;
- one VCO calibration against a model VCO.

At the end it prints how often each mechanism happened (slips, locks,
unlocks, corrections, phase-detector up/down, per-mode frames). A mechanism
that never happened counts as a failure.
