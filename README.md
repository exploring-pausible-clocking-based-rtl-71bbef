# Pausible-clock GALS OFDM baseband transmitter

This is an OFDM baseband transmitter split into six clock islands. Each island has
its own clock generator. There are no synchronizer flip-flops and no dual-clock
FIFOs between the islands. A word crosses from one island to another over an
asynchronous four-phase bundled-data channel. At the moment the word is written
into the receiving register, the receiving island's clock is *paused*: its next
rising edge is held back. So a register never changes close to a clock edge, and
metastability cannot occur. This is the "pausible clocking" flavour of GALS
(globally asynchronous, locally synchronous) design.

The architecture follows a published 40-nm test chip. That chip carried a 60-GHz
WLAN OFDM transmitter twice, once fully synchronous and once as a pausible-clock
GALS core, to compare the two. This RTL models the GALS core:

- its partition into six islands;
- its 16 point-to-point channels;
- the port controllers, input data registers and local clock generators that make
  up the GALS infrastructure.

The chip's design sources gave only the names of the signal-processing blocks, not
their insides. The code, polynomials, interleaver, modulation and subcarrier plan
used here are this design's own choices. They are listed in
[What is fixed and what is chosen](#what-is-fixed-and-what-is-chosen).

## Islands and channels

| Island | Contents | Clock |
|---|---|---|
| 1 | input data FIFO, input controller, scrambler, FEC encoder, interleaver interface, symbol mapping, pilot inserter, mapper [4:1], middle controller | half period 0 |
| 2, 3, 4 | two interleavers each (six in total) | half periods 1–3 |
| 5 | four 64-point IFFT units | half period 4 |
| 6 | IFFT 4p (final radix-4 stage) and output stage | half period 5 |

There are 16 channels. Each one has an output port controller (OPC) at the sending
end and an input port controller (IPC) at the receiving end:

| Channel | Direction | Word | Purpose |
|---|---|---|---|
| write, ×3 | 1 → 2/3/4 | 17 bits: {member, coded word} | fill an interleaver |
| free, ×3 | 2/3/4 → 1 | 1 bit: member | the interleaver has been read out and is free again |
| read request, ×3 | 1 → 2/3/4 | 1 bit: member | the pilot inserter asks for an interleaved block |
| read data, ×3 | 2/3/4 → 1 | 16 bits | interleaved columns |
| subcarriers | 1 → 5 | 32 bits: complex | 256 subcarriers per symbol, group-major |
| IFFT results | 5 → 6 | 32 bits: complex | 256 first-stage results, n-major |
| control | 1 → 6 | 17 bits: {last, symbol number} | from the middle controller to the output stage |
| symbol done | 6 → 1 | 1 bit | credit back to the input controller |

Each interleaver island has two members, so "member" is 0 or 1.

The top module is `moonrake_gals_tx`. Its ports:

- **Input:** bytes with valid/ready. They are sampled on `in_clk`, the island-1 clock.
- **Output:** one complex sample (`out_i`, `out_q`) per `out_clk` cycle while
  `out_valid` is high. `out_clk` is the island-6 clock.
- **Output flags:** `out_sos` marks the first sample of each OFDM symbol. `out_eof`
  marks the last sample of each frame.
- **Configuration:** a JTAG port (`tck`, `trst_n`, `tms`, `tdi`, `tdo`), handled by
  `jtag_ctrl`, a standard 1149.1 TAP with a 4-bit instruction register:
  - `0001` IDCODE (selected after reset), 32 bits, default `32'h10000A6D`;
  - `0010` CONFIG, 120 bits shifted LSB first and applied at Update-DR;
  - any other code is BYPASS.

  CONFIG layout from bit 0: six 16-bit island clock half periods in picoseconds
  (island 1 first), the 16-bit frame length in symbols, the 7-bit scrambler seed,
  and the BIST bit. A scan reads back the current value. After reset every island
  runs with a 1000 ps half period, 4-symbol frames and seed `7'h5d`. The settings
  are not synchronized into the islands, so change them while the input is idle.
- **BIST:** the CONFIG BIST bit and `misr_sig`, described under [BIST](#bist).

## How a word crosses a clock boundary

This is the part that differs most from ordinary synchronous design. Three pieces
work together.

**Pausible clock generator** (`pclk_gen`, behavioural model). It is a free-running
clock with a programmable half period. At the end of every low phase, just before
it would rise, it looks at its `pause_req` inputs:

- Each pending request is granted (`pause_gnt`).
- The rising edge is postponed until every granted request has been withdrawn.
- A grant is never given while the clock is high.

So whoever holds a grant may change flip-flops of that island without meeting a
clock edge. A request that arrives after the decision waits for the next low phase.

**Output port controller** (`opc`). The island logic sees a valid/ready port. When
a word is accepted, at a rising edge, the OPC does the following:

1. It loads the word into the bundled-data register `ch_data` and flips a *send*
   toggle.
2. Its asynchronous part raises `ch_req` after a short bundling delay.
3. It waits for `ch_ack`, drops `ch_req`, and waits for `ch_ack` to fall.
4. It requests a pause of its *own* island clock. While the clock is held, it flips
   a *done* toggle and then releases the pause.

`tx_ready` is `send == done`. So the island only ever sees `tx_ready` change while
its clock is stopped.

**Input port controller and input data register** (`ipc`, `input_data_reg`,
combined in `gals_in_port`). When `ch_req` rises, the IPC does the following:

1. It waits until the input data register is empty.
2. It requests a pause of the receiving island's clock.
3. Once granted, it pulses `cap`. This loads the word into the register and flips a
   *put* toggle.
4. It raises `ch_ack` and releases the pause, then completes the return-to-zero
   phase.

The island logic takes the word on its own clock by flipping a *get* toggle. The
register is full when `put != get`.

A full register holds back the acknowledge. That delay is the only back-pressure
mechanism between islands. Each channel is one word deep.

Timing of one transfer, receiving side:

```
ch_req   __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________
pause_req ____/‾‾‾‾‾‾‾‾‾\_____________
clk_rx   ‾‾\________________/‾‾‾\___   (edge postponed while granted)
pause_gnt ________/‾‾‾‾‾\_____________
cap      __________/‾\________________
ch_ack   _____________/‾‾‾‾‾‾‾‾‾‾\____
```

The synchronous parts (`input_data_reg`, the send register of `opc`) are ordinary
flip-flops. The asynchronous controllers and the clock generator are written with
delays and `wait` statements. They model what would be full-custom macros in
silicon, where the controllers are hand-designed asynchronous state machines and
the generator is a ring oscillator with an arbiter. They simulate but do not
synthesize. Assertions check the channel rules:

- data stays stable while `ch_req` is high;
- `ch_req` does not rise before `ch_ack` has fallen;
- capture happens only under a pause grant;
- the clock never rises while a grant is out.

The behavioural controllers start moving only after the first reset. Apply reset
once at power-up.

## One OFDM symbol, end to end

1. **Admission.** 24 input bytes make one symbol. They wait in the input FIFO
   (64 bytes). The input controller lets a symbol through only while it holds a
   credit. It starts with 6 credits and gets one back per symbol-done token from
   island 6. It flags the first byte of every frame.
2. **Scrambling and coding.** The scrambler XORs each byte with a sequence from the
   LFSR x^7 + x^4 + 1, eight bits per clock. The FEC encoder applies the rate-1/2,
   K = 7 convolutional code with generators 133/171 (octal). It turns each byte
   into a 16-bit coded word. Both restart at the first byte of a frame.
3. **Interleaving.** The interleaver interface sends symbol *s* to interleaver
   *s* mod 6, in island (*s* mod 6)/2, as member *s* mod 2. It sends only when that
   interleaver is marked free. Each interleaver is a 16 × 24 bit block: words fill
   it row by row, and column *c* is read out as word *c*.
4. **Pilot insertion and mapping.** The pilot inserter requests the interleavers in
   symbol order. It builds the 256 subcarriers in natural order:
   - k = 0 and k = 105..151 are empty;
   - of the remaining 208 subcarriers, every 13th (starting with the 7th) is a pilot
     (A, A);
   - the other 192 take Gray-coded QPSK points from successive bit pairs.

   A = 11585, which is 1/√2 in Q1.14.
5. **Mapper [4:1].** This block buffers the 256 subcarriers and resends them
   group-major: group *r* = X[4m + r].
6. **IFFT.** The 256-point IFFT is split as
   x[n + 64q] = Σ_r W256^(−rn) · Y_r[n] · j^(rq), where Y_r is the 64-point IFFT of
   group *r*.
   - Island 5 computes the four Y_r, one per `ifft64` unit, scaled by 1/16.
   - Island 6 (`ifft4`) applies the twiddles and the 4-point butterfly, scaled by
     1/4.

   The overall scaling is therefore 1/64 of the unnormalised IFFT sum. Twiddles come
   from a 256-entry cosine table, `rtl/cos256.mem`, with entry k =
   round(16384·cos(2πk/256)) and entry 0 clipped to 16383. The sine is read at
   index k − 64.
7. **Output.** The output stage holds the 256 time samples and plays them out with a
   64-sample cyclic prefix, 320 samples in total. The flags come from the symbol's
   control word. It then returns a symbol-done token.

## Flow control and deadlock freedom

Each pair of islands exchanges requests and tokens in a fixed order, and every
channel is one word deep:

- The interleaver interface never writes into an interleaver that has not returned
  its free token.
- The pilot inserter's read request for an interleaver that is not yet full stays
  in that island's input register until the block completes.
- The credits bound how many symbols are inside the pipeline.

A stall anywhere travels backwards as a withheld acknowledge.

## BIST

When the BIST bit is set:

- A 32-bit Galois LFSR (`bist_prng`, polynomial 0x80200003) feeds the input FIFO
  instead of the pads.
- A 32-bit MISR (`bist_misr`, polynomial 0x04C11DB7) compacts every output sample
  {I, Q} into `misr_sig`.

While the BIST bit is clear, the MISR is held at zero.

## What is fixed and what is chosen

Taken from the published design:

- the six-island partition and the contents of each island;
- 16 point-to-point channels and which islands they join;
- pausible local clocks with programmable period;
- bundled-data handshake channels with input and output port controllers and input
  data registers;
- a 256-point IFFT built as four 64-point IFFTs plus a 4-point stage;
- six interleavers, two per island;
- BIST built from a PRNG and a MISR.

This design's own choices:

- all word widths;
- the four-phase protocol details;
- one-word input registers (the chip averaged about 1.5 words of buffering per
  link);
- the scrambler polynomial, convolutional code, interleaver shape, QPSK and
  subcarrier/pilot plan;
- cyclic prefix length;
- the credit and token protocol and the control-word format;
- the 1/64 fixed-point scaling;
- the PRNG and MISR polynomials;
- the arbitration point of the clock generator.

Further departures from the chip:

- **Throughput.** The chip targeted up to 1 Gbps at about 160 MHz with a heavily
  parallel datapath. Here each 64-point IFFT is a serial direct DFT: 4096 cycles
  per symbol. That gives about 7.5 Mbps of information at 160 MHz. The FEC encoder
  is likewise a single byte-parallel encoder; the chip used twelve in parallel.
- **Interleaver storage.** The interleavers are flip-flop arrays, not memory macros.
- **Configuration.** The chip loaded mode and clock settings through JTAG, but its
  instruction codes and register map are not published. The ones here are my own.
- **Not included.** The synchronous twin core, the PLL that clocked it, and the pads
  are not part of this RTL.

## Files

- `rtl/moonrake_pkg.sv` holds the types and constants: the complex sample, the
  subcarrier plan and QPSK.
- **Infrastructure:** `pclk_gen`, `opc`, `ipc`, `input_data_reg`, `gals_in_port`.
- **Island 1:** `gals_block1`, `input_fifo`, `input_control`, `scrambler`,
  `fec_encoder`, `il_interface`, `pilot_inserter`, `symbol_mapper`, `mapper41`,
  `middle_control`.
- **Islands 2–4:** `gals_block_il`, `interleaver`.
- **Island 5:** `gals_block5`, `ifft64`, `cos_rom`.
- **Island 6:** `gals_block6`, `ifft4`, `output_stage`.
- **BIST and configuration:** `bist_prng`, `bist_misr`, `jtag_ctrl`.
- **Top:** `moonrake_gals_tx`.

`tb/` holds one self-checking testbench per module, named `tb_<module>`. It also
holds two channel helpers, `ch_sender` and `ch_receiver`, which play the far end of
a four-phase channel. The reference values in every testbench come from their own
models: bit-serial LFSR and encoder models, and floating-point DFTs. Each testbench
prints `TB_RESULT checks=N failures=M`.

`tb_moonrake_gals_tx` runs the whole transmitter at its default sizes:

- JTAG IDCODE read, then six different island clock periods, the frame length and
  the seed written and read back through JTAG;
- 10 symbols from the pads, followed by BIST mode switched on through JTAG;
- 14 output symbols checked sample by sample, within ±4 LSB of a floating-point
  reference.

It also checks the MISR signature. It counts clock pauses, input back-pressure,
credit stalls, interleaver rotation, full input registers, frame ends and BIST
activity, and fails if any of them never occurred. It runs in a few seconds.

## Simulating

Run the commands from the repository root, because the cosine table is read as
`rtl/cos256.mem`. Timing support is needed for the behavioural controllers:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/moonrake_pkg.sv \
    tb/tb_moonrake_gals_tx.sv --top-module tb_moonrake_gals_tx -Mdir obj
./obj/Vtb_moonrake_gals_tx
```

Any other testbench builds the same way. Replace the testbench file and the
`--top-module` name.

Random initial values (`+verilator+rand+reset+2`) are fine. Every register that
gets read is reset, and the testbenches apply a reset edge at start-up.

To change the clock ratios, write other half periods into CONFIG. The design works at any
ratio. Only the timing of pauses and stalls changes.
