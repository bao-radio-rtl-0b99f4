# Digital acquisition chain for a multi-channel radio telescope

A radio interferometer of this kind has hundreds of antenna channels, each sampled at
500 MS/s. Its data must be turned into spectra and shipped to PCs fast enough that nothing is
lost. This RTL holds the two FPGA designs of that chain.

- **ADC board.** It takes 8-bit samples from two ADC channels and computes an 8192-point
  *real* FFT per channel. Each FFT uses a complex FFT core of only half that size, followed
  by a small post-processor. The two spectra then share one serial link.
- **PCIe board.** It receives such links, buffers and checks the frames, and writes them
  into host memory by scatter-gather DMA through a PCIe x4 endpoint.

The central trick is on the ADC board. A 4096-point complex FFT, one block RAM of
2048 × 16 bits and two butterflies give the full 8192-point spectrum of a real signal. That
spectrum is bins 0…4096. The data rate stays one sample pair per clock, and frames follow
each other with no gap.

```
ADC board, 250 MHz
  ADC ch0 -> adc_framer -> [complex FFT, N/2 points] -> rfft_post --+
  ADC ch1 -> adc_framer -> [complex FFT, N/2 points] -> rfft_post --+-> link_framer -> [serial link]

PCIe board, 125.6 MHz, one chain per fibre (two chains)
  [fibre] or pattern_source -> input FIFO 32 KiB -> frame_filter -> flow_control
        -> frame FIFO 64 KiB -> sg_dma (+ descriptor RAM) --+
                                                              +-> write_arbiter -> [PCIe endpoint] -> host
  host_decoder: host access to descriptor RAMs, DMA and channel registers
```

Blocks in brackets are not part of this RTL. They are vendor IP or physical links, and they
appear as ports of `bao_top`.

## The real FFT from a half-size complex FFT

This is the part that needs the most care. Its RTL is `rfft_post`, `rfft_butterfly`,
`rfft_bram` and `twiddle_rom`.

### The algebra

Let `s[0..N-1]` be one frame of real samples, with N = 8192. Pack pairs of samples into a
complex signal of half the length:

```
c[i] = s[2i] + j·s[2i+1]          i = 0 .. N/2-1
Z    = FFT_{N/2}(c)                (done by the complex FFT core)
```

Let `E` be the N/2-point FFT of the even samples and `O` that of the odd samples. Both
sequences are real, so their spectra are conjugate-symmetric. This lets them be separated
out of `Z`:

```
E[k] = ( Z[k] + conj(Z[N/2-k]) ) / 2
O[k] = ( Z[k] - conj(Z[N/2-k]) ) / 2j
```

The N-point spectrum is then `X[k] = E[k] + W^k·O[k]`, with `W = exp(-j2π/N)`. Because `X` is
conjugate-symmetric too, each pair `(Z[k], Z[N/2-k])` gives two bins at once. With
`A = Z[k]` and `B = Z[N/2-k]`:

```
S = A + conj(B)          D = A - conj(B)          jW^k = sin(2πk/N) + j·cos(2πk/N)
X[k]     =       (S - jW^k·D) / 2
X[N/2-k] = conj( (S + jW^k·D) / 2 )
```

`rfft_butterfly` builds exactly this:

- two adders for `S` and `D`, which take the conjugate of `B`;
- one complex multiplication of `D` by `jW^k`;
- two final adders;
- halving, rounding and saturation.

Running `k` from 0 to N/4 covers every bin from 0 to N/2. Two pairs are special:

- **k = N/4.** `A` and `B` are the same value `Z[N/4]`.
- **k = 0.** `B = Z[N/2]`, which wraps to `Z[0]`. The two outputs are `X[0]` (DC) and
  `X[N/2]` (Nyquist).

### The two-step schedule

The complex core produces `Z[0], Z[1], …, Z[N/2-1]`, one per clock, and `rfft_post` takes
them as they come. Each `Z[k]` must meet its partner `Z[N/2-k]`. The partner of an early
output arrives late, so the first half is stored:

| clocks of a frame | input | what happens | output |
|---|---|---|---|
| 0 … N/4-1 (step 1) | Z[0] … Z[N/4-1] | written to the block RAM at address m; Z[0] is also kept in a register | none |
| N/4 (step 2 begins) | Z[N/4] | paired with itself | X[N/4], X[N/4] |
| N/4+1 … N/2-1 | Z[m] | RAM read at N/2-m, paired with Z[m] | X[N/2-m], X[m] |
| N/2 (extra clock) | Z[0] of the next frame may arrive | k = 0 from the held Z[0] | X[0], X[N/2] |

Step 2 therefore takes N/4+1 output clocks, and the bins come out in the order
k = N/4, N/4-1, …, 1, 0. The extra k = 0 clock overlaps the first step of the next frame.
This is why `Z[0]` is held in its own register: the RAM address 0 may already hold the next
frame's value. As a result, a continuous ADC stream gives one spectrum per N/2 clocks, with
no stall. During step 1 the outputs are idle, N/4-1 clocks per frame. The link framer uses
that time for its header.

The RAM read is issued in the same clock that `Z[m]` is sampled. The twiddle ROM is read in
parallel, and the butterfly has three register stages. The bin pair for `Z[m]` leaves
`rfft_post` 4 clocks after `Z[m]` was sampled.

### Numbers

- **Data.** Samples, FFT outputs and spectrum bins are 8-bit two's complement. A complex
  value is a 16-bit `cbin_t = {re, im}`, the width of the RAM.
- **Twiddles.** They are 16-bit with 1.0 = 2^14. `twiddle_rom` holds only `cos(2πk/N)` for
  k = 0 … N/4, which is 2049 entries. The sine is read from the mirrored entry, because
  `sin(2πk/N) = cos(2π(N/4-k)/N)`. The table is computed at elaboration from the cosine
  formula, rounded to nearest.
- **Butterfly output.** It is halved, rounded half-up and saturated to ±127. Negating -128
  also saturates. The output is therefore the true N-point DFT at the same scale as the
  complex core's output. Any scaling applied inside the core carries through unchanged.

## ADC board

`adc_framer` takes one 16-bit ADC word per 250 MHz clock. The word holds two 8-bit samples:
the low byte is the earlier sample `s[2i]` and the high byte is `s[2i+1]`. So one ADC word
is exactly one complex FFT input. The framer marks the first and last of the N/2 words of a
frame. `start` and `stop` take effect only on frame boundaries, so the FFT core never sees a
partial frame.

`link_framer` merges the two channels. The two post-processors run in lockstep, so each of
their output clocks gives four 16-bit bins: `X[k]` and `X[N/2-k]` for both channels. These
form one 64-bit link word:

```
header : { 16'hBA0F, frame number[31:0], word count = N/4+1 }
data   : { ch1 X[N/2-k], ch1 X[k], ch0 X[N/2-k], ch0 X[k] }     k = N/4 down to 0
```

One frame carries both 8192-point spectra in 2050 words: one header word and 2049 data words.
The post-processors report if they get out of step (`lock_err`).

## PCIe board

Each fibre has its own channel in `pcie_fpga`. The channel runs in this order.

1. **`pattern_source`** either passes the fibre data or generates frames in the link format
   itself: a header, then words `{frame, index}`. The choice is made by a host register. A
   switch waits until both sources are between frames, so no frame is cut.
2. **Input FIFO (`sync_fifo`), 4096 × 64 bit = 32 KiB.** It takes up short stalls. A word
   written while the FIFO is full is dropped, and a sticky overflow flag is set.
3. **`frame_filter`** lets through only frames that begin with a header word. Stray words
   are counted and discarded. If a frame is cut, the filter closes it with an all-ones end
   word. The filter also keeps only one good frame in `keep_every`, so the host can lower the
   data rate.
4. **`flow_control`** decides at the first word of each frame. If the frame FIFO has room
   for a whole frame plus two words, the frame goes in; otherwise the whole frame is dropped
   and counted. The host therefore only ever receives complete frames, even when it falls
   behind.
5. **Frame FIFO, 8192 × 64 bit = 64 KiB.** It holds three whole frames.
6. **`sg_dma`** follows a chain of descriptors kept in the channel's descriptor RAM
   (`onchip_ram`, 512 × 64 bit = 4 KiB, dual-port: host on one side, DMA on the other).

   | word | bits |
   |---|---|
   | 0 | next descriptor index [63:32], destination byte address [31:0] |
   | 1 | OWNED_BY_HW [63], end of frame seen [48], words written [47:32], buffer length in words [15:0] |

   For each descriptor marked as owned by the hardware, the DMA works as follows:
   - It writes words to consecutive addresses until the buffer is full or a frame has ended.
   - It writes word 1 back, with the owned bit cleared and the count filled in.
   - It raises its interrupt, if the interrupt is enabled.
   - It moves on to the next descriptor.

   The DMA stops at the first descriptor it does not own. A buffer of at least 2050 words
   therefore receives exactly one frame.

`write_arbiter` merges the DMAs of both channels onto the endpoint's single write port. It
uses round robin per write and the Avalon-style `waitrequest` handshake. An assertion checks
that a waiting master holds its address and data.

Host view (byte offsets in the BAR, handled by `host_decoder`, 64-bit accesses, reads
return one clock later):

| offset | register |
|---|---|
| 0x4000–0x4FFF | descriptor RAM, channel 0 |
| 0x6000–0x6FFF | descriptor RAM, channel 1 |
| 0x5000 + 0x20·c + 8·i | DMA register i of channel c: 0 `{irq_en[1], run[0]}`, 1 first descriptor index, 2 `{chain_end[2], irq[1], busy[0]}` (write 1 to bit 1 to clear the interrupt), 3 descriptors completed |
| 0x5400 + 16·c | channel control `{keep_every[31:16], pattern_sel[0]}` |
| 0x5408 + 16·c | channel status `{flow-control drops[63:48], bad words[47:32], frame FIFO level[31:16], input FIFO overflow[1], frame FIFO overflow[0]}` |

## Rates

| stream | needed | available |
|---|---|---|
| one ADC channel | 250 MHz × 16 bit = 500 MB/s | `adc_framer`/`rfft_post` take one word per clock, no stall |
| two spectra on one link | 2050 words × 8 B per 16.384 µs ≈ 1000 MB/s | a 4.8 Gbit/s link carries about 480 MB/s of payload with 8b/10b coding |
| one PCIe-board channel | ≈ 1000 MB/s | 64 bit × 125.6 MHz = 1004.8 MB/s |
| DMA into host memory | ≈ 430 MB/s sustained on the original system | one 64-bit write per clock, shared by both channels; the full-size test measures about 808 MB/s with the endpoint refusing one write in five |

The logic on both boards keeps up with full-rate spectra. The serial link does not: two
full-rate 8-bit spectra need about twice what a 4.8 Gbit/s link carries. The design leaves
this gap open, and the link itself is not modelled. In practice the spectra would have to be
decimated or reduced before the link. The `keep_every` decimation of the frame filter acts
only on the PCIe side.

## Where this design is its own

The structure comes from the system it models:

- the chain ADC → half-size complex FFT → two-step real-FFT post-processing → one shared link
  for two 8-bit FFT8k spectra → PCIe board;
- on the PCIe board, FIFO buffering, a frame filter, flow control, scatter-gather DMA with an
  on-chip descriptor RAM, and two channels on one x4 endpoint.

The sizes come from the same source: N = 8192, 16 bits per ADC clock, 32 KiB and 64 KiB
FIFOs, 4 KiB descriptor RAMs, and a 125.6 MHz clock.

The following points are this design's own choices and may differ from the original
firmware:

- **The complex FFT core's output.** It is assumed to come out in natural order, one value
  per clock, with frames back to back. A core with bit-reversed output would need a reorder
  buffer in front of `rfft_post`.
- **Arithmetic widths.** The twiddle width, the ½ scaling with rounding and the saturation
  are this design's choices.
- **Which byte is the earlier sample.** The low byte is taken as `s[2i]`, and samples are
  two's complement.
- **The link format.** It is entirely this design's: the word layout, the header and the
  magic number.
- **Frame filter and flow control.** Their behaviour (header check, decimation, whole-frame
  admission) is a reading of block names. Their place in the chain is also a choice:
  between the two FIFOs.
- **The frame FIFO size.** It is 64 KiB. Another drawing of the board labels it
  "64×8 KByte".
- **The DMA.** The original system uses a vendor scatter-gather DMA. This one has its own
  descriptor layout and register map, so host software for the original will not drive it.
- **The address map.** The descriptor RAM and first DMA bases follow the original. The
  second DMA's registers and the channel registers are placed here.
- **Clocking.** The PCIe board runs in a single clock domain, and the fibre receivers are
  assumed to deliver words in that domain. No clock-domain crossing is built. No timing
  adapter is needed either, because all stream handshakes match.
- **Channel count.** The ADC board has four inputs, but this design builds the two-channel
  firmware configuration.

The following are not built:

- the complex FFT core (a vendor IP core);
- the optical link and its transceivers;
- the PCIe endpoint;
- the ADCs and their clock PLL;
- the analog RF chain;
- the USB/VME control of the ADC board;
- the host software;
- the FPGA correlator/beam former that the system was heading towards. No structure for it
  is defined.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`, and each testbench compares against
values it computes independently:

- an integer and floating-point model of the butterfly (`rfft_ref_pkg`);
- an exact DFT;
- queues of expected words;
- a host-memory model.

Each testbench has also been run against a deliberately broken version of its module, and it
failed each time. The breaks included:

- a wrong conjugate in the butterfly;
- the k = N/4 self-pairing removed;
- the sine read from the wrong table entry;
- the round-robin grant stuck;
- the flow-control margin removed.

`tb_bao_top` runs the whole chain at the real size: N = 8192, full FIFOs and RAMs, and no
parameter overrides. It takes a few seconds. Two ADC channels carry different tones plus
noise. Behavioural FFT cores close the loop around the ADC board, and the link words are
carried to the PCIe board. A host model programs descriptor chains. The test checks that each
spectrum in host memory matches, word for word, the reference recombination of the FFT model
output, and that its peak is at the tone. It checks the rates: one spectrum pair leaves the ADC
board every N/2 ADC clocks, and the DMA writes at least 430 MB/s at 125.6 MHz. It also
counts, and requires, each mechanism:

- start/stop gating;
- the k = 0 clock;
- frame-filter rejection;
- the switch to the test pattern;
- a flow-control drop;
- end of the DMA chain;
- interrupts;
- contention at the endpoint.

Limits:

- The design has not been placed and routed, so the 250 MHz and 125.6 MHz clock targets are
  unverified.
- The FFT core is a model.
- Only a few frames are simulated at full size. Smaller parameter sets exercise the corner
  cases: N = 64 in `tb_rfft_post` and `tb_adc_fpga`, and small FIFOs in `tb_pcie_fpga`.

## Simulating

Verilator 5 is enough. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own. From the top of the tree:

```
verilator --binary --timing --assert rtl/bao_pkg.sv tb/rfft_ref_pkg.sv tb/tb_bao_top.sv \
          -y rtl -y tb --top-module tb_bao_top -Mdir obj_tb_bao_top
./obj_tb_bao_top/Vtb_bao_top
```

Replace `tb_bao_top` with any other `tb/tb_<module>.sv` to test one block. The `-y` options
let Verilator find the other modules by file name. `tb/tb_util.svh` holds the check, finish
and watchdog macros, and `tb/fft_model.sv` is the behavioural complex FFT.

To change the transform size, set `N` on `bao_top`, or on `adc_fpga` or `rfft_post`. N must
be a power of two; it has been simulated at 64 and 8192. The RAM depth, twiddle table, link word count and pattern
length all follow from N. On the PCIe side, keep `MAXFRAME ≥ N/4+2` and a frame FIFO of at
least `MAXFRAME+2` words.
