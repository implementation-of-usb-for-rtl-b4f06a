# USB 3.0 SuperSpeed PHY: scrambling, 8b/10b coding and serialization

A SuperSpeed USB 3.0 port sends data over two unidirectional serial lanes,
one transmit and one receive. Above the lanes, the link layer works in bytes.
Each byte carries a flag that says whether it is data (a D symbol) or a
control character (a K symbol). This RTL is the digital part of the physical
layer between the two:

```
 transmit:  tx_data[7:0], tx_datak
              -> scrambler (data only) -> 8b/10b encoder -> parallel-to-serial -> tx_serial
 receive:   rx_serial
              -> serial-to-parallel -> 10b/8b decoder (+ error checks) -> descrambler -> rx_data[7:0], rx_datak
 clocking:  bit clock -> divide by 10 -> symbol clock / symbol strobe
```

Scrambling spreads the spectrum of repetitive data, which lowers EMI. 8b/10b
coding keeps the line DC balanced and makes invalid symbols detectable. The
design target is 2.5 Gb/s on the line: a 2.5 GHz bit clock and
250 Msymbol/s.

## Clocking and timing

Everything runs on a single clock: the bit clock. `clock_divider` counts
0..9 and makes two signals:

* `sym_clk`: the bit clock divided by 10. It is high for 5 bit clocks and
  low for 5, and is brought out as the parallel-interface clock.
* `sym_en`: a strobe that is high in the last bit clock of each symbol.

The scrambler, encoder, decoder and descrambler are symbol-rate stages. They
run on the bit clock, with `sym_en` as their clock enable. The serializer
and deserializer work on every bit clock. So there is no second clock net
and no clock-domain crossing. The source design drives the symbol-rate
stages from the divided clock itself; using the strobe instead is this
implementation's choice.

Latency in loopback (`rx_serial` tied to `tx_serial`), counted from the
`sym_en` edge that samples `tx_data`:

| point | bit clocks after sampling |
|---|---|
| `tx_scr_data` (scrambled byte) | 0 (registered at that edge) |
| `tx_enc_data` (10-bit code) | 10 |
| first bit (bit 9, `a`) on `tx_serial` | 20 |
| last bit on `tx_serial` / word captured by the receiver | 29 / 30 |
| `rx_data`, `rx_datak`, `rx_valid`, error flags | 50 |

One symbol is accepted every 10 bit clocks, with no gaps.

## Scrambler and descrambler

A 16-bit LFSR with the generator polynomial
G(X) = X^16 + X^5 + X^4 + X^3 + 1 (Galois form, feedback mask `16'h0039`)
makes 8 key bits per symbol. Bit 0 of the byte is combined first, with LFSR
bit 15, and the LFSR then steps. A data byte is XORed with its key; a K
symbol passes unchanged. The seed is `16'hFFFF`, so the first key byte is
`FF`. Starting from the seed, the key sequence begins
`FF 17 C0 14 B2 E7 02 82 72`. Reference points:

* After reset, data `5f` scrambles to `a0`.
* Data `5c` scrambles to `a3`.
* The descrambler turns `a0` back into `5f`.
* After a COM, `4a` descrambles to `b5`.

The two ends have to agree on where the key sequence starts. The control
rules follow USB 3.0:

* **COM (K28.5, `8'hBC`)**: re-seeds the LFSR. The next data byte gets key `FF`.
* **SKP (K28.1, `8'h3C`)**: leaves the LFSR unchanged, so an elasticity
  buffer further on may add or drop SKPs.
* **Any other symbol, D or K**: advances the LFSR by 8 steps.

Both ends load the seed at reset. The receiver cannot know where the remote
transmitter's sequence is until it sees a COM. Symbols that arrive before the
first COM are descrambled with the wrong key. The link must therefore begin
with a COM; USB 3.0 training sequences do. The source design treats the
descrambler as optional; here it is always in the path.

## 8b/10b encoder

The byte `HGF_EDCBA` is split into x = `EDCBA` and y = `HGF`. A 5b/6b table
turns x into `abcdei`, and a 3b/4b table turns y into `fghj`. The tables are
the standard 8b/10b ones. They are kept in `usb3_phy_pkg` in their RD- form
and shared with the decoder.

Every sub-block has either as many ones as zeros, or two more of one kind.
The running disparity (RD) register holds the sign of the accumulated
imbalance:

* An unbalanced sub-block is sent in the form that brings RD back, and RD
  flips.
* A neutral sub-block leaves RD alone.
* D.7 in the 6-bit table, and y = 3 in the 4-bit table, are neutral but
  still alternate their form with RD.

RD starts negative after reset. Across the line the running digital sum
stays within ±3, and both disparity forms are used about equally.

Special cases:

* **D.x.7**: uses the alternate code `0111`/`1000` where the primary code
  would make a run of five equal bits. That is x = 17, 18, 20 when the RD
  after the 6-bit block is negative, and x = 11, 13, 14 when it is positive.
* **Defined K codes**: K28.0–K28.7, K23.7, K27.7, K29.7 and K30.7.
  * K28 uses `001111`/`110000` for its 6-bit block.
  * Its neutral 4-bit codes are complemented, which gives K28.1, K28.5 and
    K28.7 their comma pattern.
  * K.x.7 always uses the alternate 4-bit code.
* **Undefined K byte**: any other byte requested as K sets `tx_k_err`. It is
  then sent as the D code of the same byte, not as a substitute K code,
  because a substitute K code could look like a COM and re-seed the far
  end's descrambler.

Bit order is `code[9:0] = {a,b,c,d,e,i,f,g,h,j}`: the 6-bit block in bits
9:4, the 4-bit block in 3:0, and bit 9 sent first. For example, D3.5 (`a3`)
at RD- is `110001_1010` = `10'h31a`. The source design describes the 4-bit
block as the most significant, but its own example value (`31a` for `a3`) and
its drawing put the 6-bit block first. This RTL follows the example.

## 10b/8b decoder and error detection

This is the subtlest block. The decoder takes the 10-bit word apart in the
same two sub-blocks:

1. **6-bit lookup.** The 6-bit part is matched against both disparity forms
   of every 5b/6b code. `001111`/`110000` are K28.
2. **4-bit normalisation.** For K28 with `110000`, the 4-bit part is
   complemented first. This undoes the K28 complement rule, so K28.y decodes
   through the ordinary 3b/4b table.
3. **D.x.7 / K.x.7 legality.** An alternate-form 7 is legal only:
   * after x = 11, 13, 14, 17, 18 or 20, with its first bit opposite to
     bit `i`; or
   * in K23.7, K27.7, K29.7, K30.7 or K28.7.

   A primary-form 7 after those x values, with its first bit equal to `i`,
   would make a run of five, so it is illegal. For K28, only the alternate
   form is legal.
4. **Disparity.** The RD is tracked from the raw bits.
   * A 6-bit block with four ones, or `111000`, is allowed only at RD-.
     Two ones, or `000111`, only at RD+.
   * The same rule applies to the 4-bit block, with three ones or `1100`
     versus one one or `0011`, checked against the RD after the 6-bit
     block.
   * The new RD follows the received bits even when a symbol is in error.
     So one corrupted symbol does not cause endless follow-on errors.

Two flags come out, registered with the decoded byte:

* `code_err`: the word is not an 8b/10b code at all. Either a sub-block is in
  no table or the D.x.7 rule is broken.
* `disp_err`: the word is a code, but not one allowed at the current RD.

A word that breaks the rules in both disparities may be reported only as
`disp_err`. Either flag means "bad symbol".

A single flipped bit can turn one valid code into another, of the opposite
disparity. The error then shows up at the next unbalanced symbol, as a
disparity error, not in the damaged symbol itself. The tests accept a flag
within four symbols of the damaged one. No checks are built for packet
framing, such as a missing start or end character; those belong to the link
layer.

## Serializer and deserializer

* **Serializer.** A 10-bit shift register loads on `sym_en` and shifts left
  on every bit clock. `tx_serial` is its MSB.
* **Deserializer.** It shifts `rx_serial` in on every bit clock. On `sym_en`
  it copies the last 10 bits to `par_data`, with the first received bit in
  bit 9, and sets `rx_valid` (which then stays set).

There is **no word alignment**. The receiver frames words on its own
`sym_en`, so the incoming stream must already be aligned to it. A zero-delay
loopback from a serializer driven by the same divider is aligned. A real
link would need:

* clock and data recovery;
* comma-based alignment on the K28.5 pattern;
* an elasticity buffer.

None of these are part of this RTL.

`rx_valid` rises 30 bit clocks after reset: the time for the first captured
word to pass the decoder and descrambler. That first word is the idle line,
so it normally carries `code_err`. `rx_valid` means "the pipeline holds a
received word", not "the link is locked".

## Top-level interface (`usb3_phy`)

| port | dir | width | meaning |
|---|---|---|---|
| `bit_clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset |
| `tx_data`, `tx_datak` | in | 8, 1 | symbol to send, sampled at `sym_en` edges |
| `tx_serial` | out | 1 | line output, bit `a` first |
| `tx_k_err` | out | 1 | undefined K code requested (aligned with `tx_enc_data`) |
| `tx_scr_data`, `tx_enc_data` | out | 8, 10 | scrambled byte and code, for observation |
| `rx_serial` | in | 1 | line input, word-aligned to `sym_en` |
| `rx_data`, `rx_datak`, `rx_valid` | out | 8, 1, 1 | received symbol |
| `rx_code_err`, `rx_disp_err` | out | 1 | error flags aligned with `rx_data` |
| `rx_par_data` | out | 10 | deserialized word, for observation |
| `sym_clk`, `sym_en` | out | 1 | divided clock and symbol strobe |

Parameters:

* `DIV` (default 10): must equal the symbol width; an assertion checks this.
* `LFSR_SEED` (default `16'hFFFF`).

## Files

`rtl/` holds the design:

* `usb3_phy_pkg.sv`: constants, the LFSR step function and the 8b/10b
  sub-block tables.
* `clock_divider.sv`
* `scrambler.sv`, `encoder_8b10b.sv`, `serializer.sv`, `phy_tx.sv`
* `deserializer.sv`, `decoder_8b10b.sv`, `descrambler.sv`, `phy_rx.sv`
* `usb3_phy.sv`: the top level.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and
`tb_ref_pkg.sv`. That package holds reference models written separately
from the RTL:

* an 8b/10b encoder from explicit two-column code tables;
* an LFSR stepped tap by tap.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. For example:

```
verilator --binary --timing -Irtl -Itb rtl/usb3_phy_pkg.sv tb/tb_ref_pkg.sv \
  -y rtl -y tb --top-module tb_usb3_phy tb/tb_usb3_phy.sv -o sim && obj_dir/sim
```

## What the tests cover

* **`tb_encoder_8b10b`**: every D and K code from both disparities,
  including the RD output; a random stream with a bounded digital sum; and
  the undefined-K path.
* **`tb_decoder_8b10b`**: all 1024 10-bit words at both disparities.
  * Every valid code of that RD decodes correctly and without a flag.
  * Every valid code of the other RD raises only `disp_err`.
  * Every other word raises a flag.
* **`tb_scrambler`, `tb_descrambler`**: the key sequence above, the
  reference points, the COM and SKP rules, and long random streams against
  the model.
* **`tb_phy_tx`, `tb_phy_rx`**: bit-exact line streams with the cycle
  positions of the latency table. `tb_phy_rx` also injects bit errors.
* **`tb_usb3_phy`**: 2500 symbols in loopback, at the default parameters.
  * Every symbol arrives exactly 50 bit clocks after it was sent.
  * The run also has one undefined K code and 50 injected single-bit line
    errors; each error must be flagged within four symbols.
  * The test counts each mechanism and requires every one to occur at least
    once: scrambled data, K pass-through, COM re-seed, SKP hold, both
    disparity forms, `k_err`, code errors and disparity errors.

* **`tb_waveform_examples`**: the reference points above, run through the
  whole PHY in loopback:
  * `5c` → `a3` → `31a` on the transmit side;
  * `5f` → `a0` → `5f`, and `b5` → `4a` → `b5`, end to end;
  * 1000 data symbols back to back, at one line bit per bit clock.

Timing at the 2.5 GHz target is not analysed here: the RTL has one bit per
bit clock and no multi-bit datapath on the bit clock beyond the two shift
registers.
