# MP3 codec accelerator: filter banks and (I)MDCT behind a PVCI port

In MP3 encoding and decoding, the polyphase filter banks and the (inverse)
modified discrete cosine transform take most of the computing time. The rest
is control-heavy: bit allocation, Huffman coding and bitstream packing. This
RTL puts only the heavy transforms in hardware and leaves everything else to
a host processor:

* the **encode IP** turns 576 PCM samples of one channel (a *granule*) into
  576 alias-reduced MDCT frequency lines;
* the **decode IP** turns 576 dequantised, reordered and alias-reduced
  frequency lines into 576 PCM samples.

The design is built around one idea. Each processing core keeps its own
simple port protocol: START and DONE strobes, plus an address/data pair on
each side. The core is then wrapped in a *virtual component interface* that
speaks a standard bus protocol. Here that protocol is PVCI, the
peripheral-class VCI. The codec therefore attaches to any bus for which a
PVCI bridge exists, and a core can change without touching the bus side.
Two kinds of interface follow from this:

* **interface 1**, between the host bus and a core pair, is a PVCI target
  with input and output buffers (`pvci_target`);
* **interface 2**, between the two cores of one IP, is a fixed
  point-to-point buffer that regroups the data. One core produces packets of
  one shape and the next core consumes packets of another shape
  (`enc_if2`, `dec_if2`).

```
 encode IP (mp3_encoder)
 PVCI ──► pvci_target ──► analysis_fb ──► enc_if2 ──► mdct_ar ──► pvci_target ──► PVCI
          buffer1 1152      18 pkts of 32   prev+cur    32 pkts of 36   out buffer 1152
          START, channel    subband samples 32x18 each  -> 18 lines each DONE

 decode IP (mp3_decoder)
 PVCI ──► pvci_target ──► imdct ──────► dec_if2 ──► synthesis_fb ──► pvci_target ──► PVCI
          buffer1 1152      32 pkts of 18   one 32x18   18 pkts of 32   out buffer 1152
          parameter word    (+overlap,      buffer      -> PCM          DONE
          (channel, maxb,    freq. inv.)
           block_type, mix)

 mp3_codec_top = clk_sel + mp3_encoder  and  clk_sel + mp3_decoder, side by side
```

## Data shapes and interface 2

Interface 2 is the least obvious part of the design.

**Encoder.** The analysis filter bank produces one packet of 32 subband
samples for every 32 input samples, so a granule arrives as 18 packets of
32: `sb_addr = 32*t + subband`, t = 0..17. A long-block MDCT needs 36
consecutive samples of *one* subband: the 18 of the previous granule and the
18 of the current one. `enc_if2` therefore keeps two 32x18 buffers per
channel, *previous* and *current*, and serves
`mdct_addr = {subband[10:6], n[5:0]}`. Words n = 0..17 come from the previous
buffer and n = 18..35 from the current one. The buffers are never copied.
At each `sb_done` a bank pointer per channel flips, so the bank just written
becomes *current*. The old *previous* bank is the one overwritten by the next
granule. The host alternates channels freely; each channel has its own pair
of buffers. After reset the buffers are cleared (2304 cycles), so the first
granule of a channel sees silence as its predecessor.

**Decoder.** The IMDCT produces 18 time samples per subband, so a granule
arrives as 32 packets of 18: `imdct_addr = {subband[9:5], i[4:0]}`. The
synthesis filter bank needs all 32 subbands of one time slot:
`sb_addr = {t[9:5], subband[4:0]}`. `dec_if2` holds one 32x18 buffer. Its
controller maps both address forms onto the buffer index `18*subband + t`
and drives address, read/write and enable. Only the channel travels past the
IMDCT; maxb, block_type and mix_block_flag stop there.

Both interfaces pass the channel through and turn the producer's DONE into
the consumer's START one cycle later. Read data always follows its address
by one cycle, like a synchronous RAM.

## Programming model (interface 1)

The PVCI port carries a 12-bit address, 24-bit read and write data, three
byte enables, RD, VAL, EOP, ACK and RERROR. They are collected in the
`pvci_req_t` and `pvci_rsp_t` structs of `mp3_pkg`.

**Handshake.** The initiator raises VAL with the request and holds both
until it samples ACK. The target executes the request at the edge where it
first sees VAL. It then drives ACK high for exactly one cycle; read data and
RERROR are valid in that cycle. A transfer therefore takes two cycles. An
assertion in `pvci_target` flags an initiator that drops VAL early. EOP is
accepted but has no effect, because every transfer is a single word.

| address         | write                                   | read                          |
|-----------------|-----------------------------------------|-------------------------------|
| 0x000–0x47F     | buffer1 (input), byte enables apply      | output buffer                 |
| 0x800           | bit 0 = 1: START (ignored while busy)   | `{busy[2], bank[1], done[0]}` |
| 0x801           | parameter word                          | parameter word                |
| 0xA00–0xBFF     | 512-entry window table of the IP        | RERROR                        |
| anything else   | RERROR                                  | RERROR                        |

Parameter word layout (`dec_param_t`):
`{mix_block_flag[8], block_type[7:6], maxb[5:1], channel[0]}`. The encoder
keeps only the channel bit.

Both 1152-word buffers are split into two halves of 576. The core uses the
half given by `bank`, which flips at every DONE. The host can therefore load
the next granule into the other half while the present one is processed. A
host sequence looks like this:

1. Once after reset, write the 512 window coefficients (see below) to
   0xA00–0xBFF.
2. Write 576 samples to half `bank` (`576*bank + i`), then write the
   parameter word.
3. Write 1 to 0x800. Optionally fill the other half meanwhile.
4. Poll 0x800 until `done`.
5. Read the 576 results from the half that was just processed.

**Window tables must be loaded by the host.** The analysis filter bank
needs the 512-tap analysis window C[i] of ISO 11172-3. The synthesis filter
bank needs the synthesis window D[i]. Neither table is built into the RTL.
Load them in the coefficient format below (D[i] = 32·C[i] in the
standard's scaling). The long, start, stop and short windows of the
(I)MDCT, and the alias-reduction coefficients, *are* built in. They are
computed from their closed forms when the design is elaborated.

## Arithmetic

* Samples, subband values and spectral lines are 24-bit two's-complement
  integers. This matches the 24-bit data buses.
* Coefficients are 24-bit two's-complement numbers with 22 fraction bits,
  covering the range ±2.
* Each dot product accumulates exact 48-bit products at 56 bits. It then
  adds half an LSB, shifts right by 22 and saturates to 24 bits
  (`round_sat` in `mp3_pkg`). Two-stage operations, such as transform then
  window, round after each stage.
* The cosine kernels come from quarter-wave tables: 33 values of cos(mπ/64)
  for the filter banks and 37 of cos(mπ/72) for the MDCT and IMDCT. An index
  is folded into the first quadrant with the period and sign symmetries of
  the cosine. The 12-point short IMDCT reuses the π/72 table, because
  cos(mπ/24) = cos(3mπ/72).
* The synthesis V vector is stored at 24 bits and saturates. Keep about
  5 bits of headroom in the decoder input.

## The cores

All cores are sequential. Each uses one multiply-accumulate per clock and
keeps per-channel state for two channels. Cycle counts run from START to
DONE.

Every transform uses the symmetries of its cosine kernel to cut the
multiplications. The inputs are first folded into sums and differences, and
the mirrored outputs then follow from the computed half:

* analysis matrixing: Y[16], Y[16−m] + Y[16+m] and Y[16+m] − Y[80−m] give
  32 terms per subband instead of 64. The subbands are then taken in groups
  i, 31−i, 15−i, 16+i with four accumulators: for even m one product serves
  all four (signs +, +, ±, ±), and for odd m two products serve two each.
  A packet costs 384 multiplies instead of 2048;
* MDCT: z[n] − z[17−n] and z[n+9] + z[44−n] give 18 terms per line instead
  of 36;
* IMDCT: only 18 of the 36 long outputs (6 of 12 short) are summed;
  x[17−i] = −x[i] and x[35−i] = x[18+i];
* synthesis matrixing: only V rows 0–15 and 33–48 are summed; V[16] = 0,
  V[16+j] = −V[16−j] and V[48+j] = V[48−j], one cycle each. A row with odd
  multiplier m = 16+i sums 16 terms S[k] − S[31−k]. An even row sums 8 terms
  S[k] + S[31−k] ± (S[15−k] + S[16+k]). A packet costs 384 multiplies.

The folded sums are exact (they widen by two bits), so the results are the
same bits as the unfolded dot products.

| core | what it computes | cycles per granule |
|------|------------------|--------------------|
| `analysis_fb` | per packet: shift 32 samples into a 512-sample history; Y[k] = Σ_j C[k+64j]·X[k+64j]; S[i] = Σ_k cos((2i+1)(k−16)π/64)·Y[k] | 18 × 961 + 2 = 17300 |
| `mdct_ar` | per subband: window 36 samples with sin(π/36(n+½)); X[k] = Σ_n z[n]·cos(π/72(2n+19)(2k+1)); then 8 alias butterflies at each of the 31 subband boundaries; write 576 lines | 12874 |
| `imdct` | per subband: long 36-point IMDCT with the normal/start/stop window, or three 12-point IMDCTs with the short window overlapped at 6+6w+i; overlap-add with the previous granule; negate odd samples of odd subbands | long: 32 × 361 + 2 = 11554; short subband 145, skipped subband 19 |
| `synthesis_fb` | per packet: V[i] = Σ_k cos((16+i)(2k+1)π/64)·S[k] into a 1024-entry circular V; pcm[j] = Σ_n D[j+32n]·U[j+32n] | 18 × 961 + 2 = 17300 |

The decoder also handles three per-granule parameters:

* subbands above `maxb`, the last non-zero subband, are not transformed;
* `block_type` picks the window;
* in a mixed short granule (`mix_block_flag`), the two lowest subbands use
  the normal long window.

**Real-time budget.** A 48 kHz stereo stream needs one frame (2 granules ×
2 channels) every 24 ms. At the roughly 20 MHz these cores are meant to
run at, the encoder needs about 4 × 30175 cycles ≈ 6.0 ms per frame. The
decoder needs about 4 × 28855 cycles ≈ 5.8 ms with long blocks. Both
figures leave out bus transfers, which add about 2 × 2 × 576 PVCI cycles per
granule.

## Clocking and reset

Each IP has a `clk_sel` that follows a 2-bit control word: bit 0 selects
the external clock instead of the system clock, and bit 1 enables the clock.
The control word is registered on the system clock. The enable is re-timed
on the falling edge of the selected clock, so the gated IP clock never
produces a short pulse. The source multiplexer is not glitch-free, so change
bit 0 only while bit 1 is low. The whole IP, including its PVCI target,
runs on the selected clock. The PVCI initiator must run on the same clock:
`enc_clk` and `dec_clk` are top-level outputs for that purpose.

`rst_n` is asynchronous and active low. After reset the cores clear their
history memories: 1024, 2304, 1152 and 2048 cycles for the analysis bank,
encoder interface 2, IMDCT and synthesis bank. A START that arrives during
clearing is held until clearing ends.

## What is not here

* **The software half of the codec.** This covers the psychoacoustic model,
  quantisation loop, Huffman coding, side information and bitstream
  formatting in the encoder. In the decoder it covers synchronisation and
  CRC, header, side information, scalefactor and Huffman decoding, inverse
  quantisation, stereo processing, reordering and alias reduction. All of
  this belongs to the host.
* **Bridges and memory.** The PVCI-to-ISA bridge, the memory controller and
  its external memory are not included. Each IP exposes a bare PVCI target
  instead.
* **Encoder short blocks.** The encoder supports long blocks only. There is
  no psychoacoustic block-type decision and no encoder-side reordering.
* **Frequency-inversion compensation in the encoder.** Some reference
  encoders negate odd time samples of odd subbands before the MDCT. This
  design does not.
* **Window tables.** The C[] and D[] filter-bank windows are data to be
  loaded, not part of the RTL.
* **Parameters in the data buffer.** The decoder parameters travel on the
  write data bus like samples, as in the original design. They are kept in
  their own register at 0x801, however, not in a slot of the input buffer,
  so the 576 data words of a half keep a fixed layout.
* **The original cycle budget.** The design this RTL follows reports about
  68.7k cycles (3.43 ms at 20 MHz) for a whole encoder frame, without its
  arithmetic schedule. With one multiplier per core this RTL needs about
  120k. That still fits the 24 ms frame with a wide margin, but a
  cycle-for-cycle match is not claimed.
* **Parameter reading choices.** `maxb` is 5 bits wide, so it is read as
  the *index* of the last non-zero subband, not as a count.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the
outputs bit for bit with a reference written independently from the
real-valued transform formulas (`tb_ref_pkg`, `tb_mp3_model`), and each
checks cycle counts where they are fixed:

* `tb_analysis_fb`, `tb_synthesis_fb`: random windows; three granules
  alternating channels.
* `tb_mdct_ar`, `tb_imdct`: all block types, mixed blocks and maxb
  skipping.
* `tb_enc_if2`, `tb_dec_if2`: every address of the regrouping.
* `tb_pvci_target`: byte enables, banks, status, parameter word, RERROR,
  ACK timing.
* `tb_clk_sel`: source selection, gating, no short pulses.
* `tb_mp3_codec_top`: end to end at full size. The encoder and decoder run
  concurrently on different clocks. Three encoder granules (with ping-pong
  filling and a period of clock gating) and five decoder granules (normal,
  short, mixed, start, stop, maxb skipping) go through the PVCI ports and
  are compared word for word. The test also counts how often each mechanism
  occurs and fails if any never does. Finally it checks the longest
  granule of each IP (30176 encoder and 28856 decoder IP cycles from START
  to DONE) against the 120000 cycles that a 48 kHz stereo stream allows at
  20 MHz. It takes about 15 s with Verilator.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mp3_pkg.sv tb/tb_ref_pkg.sv tb/tb_mp3_model.sv \
  rtl/clk_sel.sv rtl/pvci_target.sv rtl/analysis_fb.sv rtl/enc_if2.sv \
  rtl/mdct_ar.sv rtl/imdct.sv rtl/dec_if2.sv rtl/synthesis_fb.sv \
  rtl/mp3_encoder.sv rtl/mp3_decoder.sv rtl/mp3_codec_top.sv \
  tb/tb_mp3_codec_top.sv --top tb_mp3_codec_top -o sim
./obj_dir/sim
```

For a single block, list `mp3_pkg.sv`, `tb_ref_pkg.sv`, the block's file
and its testbench. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

## Files

| file | contents |
|------|----------|
| `rtl/mp3_pkg.sv` | types, PVCI structs, number format, cosine/window/alias tables |
| `rtl/mp3_codec_top.sv` | top: two clock selectors, encode IP, decode IP |
| `rtl/mp3_encoder.sv`, `rtl/mp3_decoder.sv` | one IP each: PVCI target plus two cores plus interface 2 |
| `rtl/pvci_target.sv` | interface 1: VCI controller, input/output buffers, registers |
| `rtl/clk_sel.sv` | clock source selection and gating |
| `rtl/analysis_fb.sv`, `rtl/synthesis_fb.sv` | polyphase filter banks |
| `rtl/mdct_ar.sv`, `rtl/imdct.sv` | MDCT with alias reduction; IMDCT with overlap and frequency inversion |
| `rtl/enc_if2.sv`, `rtl/dec_if2.sv` | interface 2 of the encoder and the decoder |
| `tb/tb_*.sv` | testbenches, reference packages |
