# Configurable radix-32 CRC generator

A network terminal that speaks several protocols needs a CRC of every packet, at
wire speed. Each protocol uses its own generator polynomial and its own CRC length. A
fixed parallel CRC circuit serves one polynomial only. A table-driven one needs its
tables rewritten before it can switch. This design is a single CRC unit that takes
**any generator polynomial of any length from 1 to 32 bits**. It absorbs **one byte per
clock**, and it switches to a new polynomial and length **within one clock**. So
back-to-back packets of different protocols pass through it without buffering.

The idea is the classic linear-feedback shift register (LFSR) that divides the
message by g(x). Every loop-back tap has a switch, and the switch settings are a
register holding the polynomial. That shift register is unrolled eight times, so a
whole byte is handled per clock. To shorten the CRC, the unused flip-flops are simply
held in reset.

The RTL also contains the pad-saving shell of a test chip around the unit. The
configuration is loaded serially. The input is a word-to-byte converter. The result is
shifted out serially.

## Files

| file | contents |
|---|---|
| `rtl/crc_pkg.sv` | sizes, the configuration struct `crc_cfg_t`, helpers `len_mask` and `align_poly` |
| `rtl/crc_radix32.sv` | the configurable CRC unit (the core of the design) |
| `rtl/crc_cfg_shiftreg.sv` | 38-bit serial configuration register |
| `rtl/crc_word_to_byte.sv` | 32-bit word to byte stream converter |
| `rtl/crc_out_serializer.sv` | serial CRC output |
| `rtl/crc_chip.sv` | top level: the four blocks wired as a chip |
| `tb/crc_ref_pkg.sv` | bit-serial reference CRC used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_crc_frames` (protocol workloads) |

## The byte-wise update

Take a bit-serial LFSR with register `c`, polynomial `g` (without its x^L term) and
data bit `d`. Each bit step computes a loop-back bit `f = c[top] ^ d` and then
`c = (c << 1) ^ (f ? g : 0)`. Unrolling eight such steps gives the following:

* **Loop-back bits.** Step j (j = 0 is the byte's MSB) produces a loop-back bit. Call it
  `LoopData(7-j)`, which counts how many more shifts it will still see. Step 0 gives
  `LoopData(7) = CRC[31] ^ data[7]`. Each later loop-back bit also picks up the earlier
  ones, through the top polynomial coefficients. All eight depend only on three things:
  the top eight CRC bits, the top eight polynomial bits and the data byte. This is a
  small triangular XOR/AND network.
* **Register update.** Every CRC bit k becomes

      NEXTCRC(k) = CRC(k-8)  xor  XOR over i = 0..7 of ( Polynomial(k-i) AND LoopData(i) )

  (terms with a negative index are 0). The AND gates are the tap switches.

In `crc_radix32.sv` the first `always_comb` block computes `loop_data` by running the
eight bit steps on a temporary copy of the register. The second block applies the
update equation to every bit.

The critical path runs through the eight chained loop-back bits, then one AND/XOR
tree per register bit. It cannot be pipelined, because the result feeds straight back
into the next byte. Widening the input to 16 bits would roughly double the loop-back
chain. For a configurable unit that buys little, and the last byte of a packet would
need special handling. That is why the input is one byte wide.

## Constraint length: top alignment

The loop-back must come from the most significant bit of the CRC. If an L-bit CRC sat
in the low L bits, the tap position would move with L. Instead this design puts
everything **top aligned**:

* the L-bit CRC occupies register bits 31 .. 32-L;
* the polynomial register holds coefficients g(L-1)..g(0) in bits 31 .. 32-L, with
  zeros below. The x^L term is implicit. `crc_pkg::align_poly(32'h1021, 16)` converts
  a conventional value.

The loop-back then always comes from bit 31. Bits below 32-L receive only zeros
anyway, because their polynomial bits are zero. They are also **held in reset**
(`len_mask`), which fixes their value and saves power. Length 0 holds the whole
register in reset. This is the shut-down setting, and `active` is low while it is
selected.

## Configuration, preset and timing of `crc_radix32`

| signal | meaning |
|---|---|
| `cfg_we`, `cfg_in` (`crc_cfg_t`: 6-bit `len`, 32-bit `poly`) | write a configuration; it is used **in the same clock** |
| `start` | preset the used CRC bits to one for a new packet; may come with the first byte |
| `in_valid`, `in_data[7:0]` | one byte per clock, MSB first, no back-pressure |
| `crc[31:0]` | CRC register, top aligned, the CRC of all bytes taken before the last clock edge |
| `crc_zero` | the used CRC bits are all zero: a received packet with its CRC appended is error free |

An N-byte packet with `in_valid` high every clock is finished N clocks after its first
byte. Packet B can follow packet A with no idle clock, even with a different
polynomial or length: in B's first cycle, assert `cfg_we` with `start`.

Reset is asynchronous and active low. It clears the configuration (unit shut down)
and the register.

## Using it for real protocols

The unit computes the plain, non-reflected CRC with the register preset to all ones
and no final inversion (CRC-32/MPEG-2 style). Other conventions are applied outside
the unit:

* **Ethernet / reflected CRCs.** Bit-reverse each byte before it goes in. The FCS is
  the complement of the 32-bit result, bit-reversed. A frame received together with
  its FCS leaves the constant residue `0xC704DD7B`, not zero.
* **ATM AAL5.** Complement the result to get the CRC field. The residue of a correct
  PDU is again `0xC704DD7B`.
* **Zero-preset CRCs** (ATM HEC, the 3GPP/UMTS CRCs). The unit presets to ones only.
  The difference between the two presets depends only on the packet length, so it can
  be removed with one XOR by a constant per length. That correction is not built in.

Polynomials used in the testbenches: CRC-32 `04C11DB7`, CRC-24 `800063`,
CRC-16 `1021`, CRC-12 `80F`, CRC-8 `9B` and `07`.

## The chip shell (`crc_chip`)

The test chip has few pads, so the unit is wrapped as follows.

* **Serial configuration** (`crc_cfg_shiftreg`). The chain is 38 bits: the 6-bit
  length, then the 32-bit top-aligned polynomial. It is sent MSB first on `cfg_sin`,
  one bit per clock with `cfg_shift` high. `cfg_sout` reads the old contents back.
  `cfg_load` copies the chain into the unit in one clock. Loading in the clock right
  after a packet's first word is taken makes that packet's first byte use the new
  configuration. Shifting in the next configuration never disturbs a running packet.
* **Input converter** (`crc_word_to_byte`). It takes 32-bit words with a valid/ready
  handshake and sends them as bytes, first byte in bits 31:24. `word_ready` is high
  when the converter is empty or is sending its last byte, so a steady stream of words
  (one every four clocks) keeps the unit busy every clock. `word_first` and
  `word_last` mark a packet's first and last words. `word_nbytes` gives the number of
  valid leading bytes of a short last word (0 = 4). An assertion checks that
  `word_nbytes` is in range.
* **Capture and serial output** (`crc_out_serializer`). One clock after the packet's
  last byte has entered the register, the CRC, its length and the zero-remainder flag
  (`crc_ok`) are captured. The CRC then leaves on `crc_sout`, MSB (bit L-1) first, one
  bit per `out_shift` clock. `out_busy` stays high until all L bits are out.

Latency: the CRC of an N-byte packet sent as back-to-back words is at `crc_sout`
N+2 clocks after the first word is taken. Another packet's result overwrites the
shifter, so read a result out before the next packet ends. This only matters for
packets shorter than the CRC length in bits.

## Where this RTL departs from the original design

* The original chip held two other designs. They are unrelated to the CRC path and
  are not included.
* The original chip used NAND gates for the tap switches. Here they are written as
  AND gates, and the gate choice is left to synthesis.
* The following are choices of this RTL: the length encoding (0 = shut down), top
  alignment, MSB-first bit order, the same-clock reconfiguration, the word width and
  handshake of the input converter, the packet marks and the automatic capture, and
  the `crc_ok`, `cfg_sout` and `out_busy` pins.
* The original chip was measured at 189 MHz in a 0.35 µm process. At 8 bits per clock
  that is about 1.5 Gbit/s. The RTL confirms the one-byte-per-clock rate but says
  nothing about frequency. 10 Gbit Ethernet would need 1.25 GHz at this width.

## Verification

Every testbench is self-checking. It compares against values computed independently
of the RTL: a bit-serial LFSR model, an LSB-first Ethernet model, and published check
values. Each testbench ends by printing `TB_RESULT checks=N failures=M`.

* `tb_crc_radix32`: check values for "123456789" (CRC-32/MPEG-2 `0376E6E7`,
  CRC-16/CCITT-FALSE `29B1`, Ethernet `CBF43926`); 400 random polynomials covering
  every length 1..32, with idle gaps; N bytes in N clocks; back-to-back packets with
  a reconfiguration; zero remainder for a codeword and a non-zero remainder after a
  bit error; shut-down.
* `tb_crc_cfg_shiftreg`, `tb_crc_word_to_byte`, `tb_crc_out_serializer`: bit order,
  handshake, back-pressure, short words, one byte per clock, shift counts.
* `tb_crc_chip`: drives the chip through its pins only, across eight protocol
  configurations and random packets. It counts and requires serial loading with
  read-back, back-to-back reconfiguration, length changes, short words, stalls, idle
  gaps, shut-down, and accepted and rejected codewords. It checks the N+2 latency.
* `tb_crc_frames`: Ethernet 64- and 1518-byte frames (FCS and residue), a 1536-byte
  ATM AAL5 PDU, the ATM header CRC-8, a 640-byte UMTS block under four CRC lengths,
  and HIPERLAN/2 PDUs.

To simulate one testbench with Verilator (packages first):

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/crc_pkg.sv tb/crc_ref_pkg.sv rtl/crc_radix32.sv rtl/crc_cfg_shiftreg.sv \
      rtl/crc_word_to_byte.sv rtl/crc_out_serializer.sv rtl/crc_chip.sv \
      tb/tb_crc_chip.sv --top-module tb_crc_chip
    ./obj_dir/Vtb_crc_chip

Every testbench runs at the default sizes in well under a second. The register width
(32) and the input width (8) are fixed by `crc_pkg`. The `CRC_WIDTH`/`DATA_WIDTH`
parameters of `crc_radix32` only restate them, and an elaboration error flags any
other value.
