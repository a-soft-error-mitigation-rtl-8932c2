# Self-Immunity register file

A register file is read more often than almost any other structure in a
processor, so a single particle-induced bit flip in it spreads quickly. Full ECC
on every register costs extra storage bits, an encoder on every write and a
checker on every read. *Self-Immunity* gets most of the protection for much less
of that cost. Most values a 32-bit program keeps in registers are small: their
upper six bits are zero. A single-error-correcting (SEC) Hamming code for 26 data
bits needs only 5 check bits, so for such a value the code fits in the register's
own unused upper bits. Each register gets one extra flag bit, **self-π**. The flag
says whether the register holds a value with embedded check bits. No other
storage is added.

This RTL implements the scheme as a 32-entry, 32-bit register file with two read
ports and one write port. It also includes a small two-stage encode/decode
pipeline that shows the coding on its own. The scheme comes from the M.Tech thesis
*A Soft Error Mitigation Scheme to Increase the Resilience of Register File*
(NIT Rourkela, 2013). The code here is an independent implementation: where
it makes its own choices, this README and the file headers say so.

## How a value is stored

A value is a "26-bit value" when bits 31:26 are zero. Such a value is stored as:

| bits  | 31  | 30:26              | 25:0             |
|-------|-----|--------------------|------------------|
| word  | `0` | check bits c[4:0]  | value bits 25:0  |
| self-π| 1   |                    |                  |

Any other value is stored exactly as written, with self-π = 0. It has no
protection. Reset clears every self-π flag and every register.

On a read, the self-π flag picks the path:

* **self-π = 1**: bits 30:0 form a 31-bit Hamming code word. The decoder corrects
  any single flipped bit among them and returns `{6'b0, corrected value}`. Bit 31
  is not covered by the code. It is simply ignored, so a flip there is harmless.
* **self-π = 0**: the stored word is returned unchanged. A flip in it reaches the
  reader.

So a single upset in a register that holds a 26-bit value is always masked. An
upset in a register that holds a wider value is not. Upsets in the self-π flag
itself are outside the model, as they are in the original scheme.

The flag and the width test carry the whole scheme. At read time nothing else
tells a coded word from a plain one: a plain value may have any pattern in bits
30:26.

## The (31,26) Hamming code

The code positions are numbered 1..31. The check bits occupy the power-of-two
positions 1, 2, 4, 8 and 16. Data bit *i* occupies the *i*-th remaining position,
so data bit 0 is at position 3, bit 1 at 5, bit 2 at 6, bit 3 at 7, bit 4 at 9, and
so on up to bit 25 at 31. Check bit *j* is the even parity of all data bits whose
position has bit *j* set. It is stored in register bit 26 + *j*.

On a read, the decoder recomputes the five check bits from the 26 data bits and
XORs them with the stored ones. The result, the *syndrome*, is the code position
of the flipped bit, or 0 if the word is clean:

* If the syndrome names a data position, that data bit is inverted.
* If it names a power of two, a check bit was hit and the data is already right.

Every non-zero 5-bit syndrome names one of the 31 positions, so every single-bit
error in bits 30:0 is corrected. Double errors are not detected. The code is SEC,
not SECDED, in line with the single-upset model the scheme assumes.

Some examples (value → check bits c[4:0]):

| value (hex) | c[4:0] |
|-------------|--------|
| 0x000009A (154) | 00111 |
| 0x0000001 | 00011 |
| 0x3FFFFFF | 11111 |
| 0x2AAAAAA | 01010 |
| 0x1555555 | 10101 |

The original description does not give its parity-check matrix. The example code
words it prints do not match this layout, or any other common (31,26) layout.
For 154 they show the check bits 00110 where this code gives 00111. The
protection is the same whichever layout is used, but the stored bits 30:26
differ. To match another layout, change the position loop in
`si_hamming_enc.sv`. The decoder reuses the encoder, so it follows
automatically.

The widths are not hard-coded. For a register of width W, `si_pkg` computes the
largest value width K with K + P + 1 ≤ W, where P is the number of Hamming check
bits for K. W = 32 gives K = 26 and P = 5. W = 64 gives K = 57 and P = 6. All
modules take `W` as a parameter. Only the 32-bit configuration is simulated.

## Blocks

```
si_top
├── si_regfile            protected register file (32 x 32, 2 read, 1 write)
│   ├── si_write_path     width test, encoder, store multiplexer
│   │   └── si_hamming_enc
│   ├── si_regfile_array  words, self-π flags, upset-injection input
│   └── si_read_path x2   decoder and output multiplexer, one per read port
│       └── si_hamming_dec
│           └── si_hamming_enc
└── si_codec_chain        clocked encoder stage -> clocked decoder stage
    ├── si_write_path
    └── si_read_path
```

`si_pkg` holds the shared sizes and the functions that derive K and P.

### si_regfile: ports and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `we`, `waddr`, `wdata` | in | 1, 5, 32 | write port |
| `raddr[2]` | in | 5 each | read addresses |
| `rdata[2]` | out | 32 each | values read, corrected |
| `rcorr[2]` | out | 1 each | a bit was repaired on this read |
| `rpi[2]` | out | 1 each | self-π of the register read |
| `inj_en`, `inj_addr`, `inj_bit` | in | 1, 5, 5 | flip one stored bit (testing only; tie to 0) |

* Writes take effect at the rising clock edge.
* Reads are combinational: the address goes in and the checked value comes out
  in the same cycle. There is no bypass, so a read in the same cycle as a write to
  the same register returns the old value.
* A corrected value goes to the reader, but it is not written back into the
  register. The upset stays until the next write to that register overwrites it.

The encoder and decoder sit on the register file's write and read paths. That
adds an XOR tree of depth about five to each.

To save power, the scheme activates the encoder and decoder only for 26-bit
values. Here that is done by operand isolation: the encoder and decoder inputs
are forced to zero when self-π is 0, so they do not toggle on wide values.

### si_codec_chain

This is a stand-alone pipeline with ports `clock`, `reset`, `input_data[31:0]`
and `output_data[31:0]`, built like the FPGA demonstrator of the scheme:

1. The first stage encodes `input_data` and registers the stored word and its
   self-π flag. That is one register of the register file.
2. The second stage decodes that word and registers the result.

`output_data` equals `input_data` two clock edges later. The decoder needs the
self-π flag, so the flag travels between the stages beside the 32-bit word.

### Upset injection

`inj_en` flips bit `inj_bit` of register `inj_addr` at the clock edge. A write to
the same register in the same cycle takes precedence, because a write always
replaces any earlier upset. This input models a particle strike for fault
injection. It has no function in a real design, so tie it low.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against the reference model in `tb/si_tb_ref_pkg.sv`, which shares no code with
the RTL:

* It builds the code word explicitly by position.
* It decodes by brute force, trying each of the 31 single-bit variants of the
  received word.

What each testbench checks:

| testbench | checks |
|-----------|--------|
| `tb_si_hamming_enc` | fixed vectors, walking ones, 3000 random values |
| `tb_si_hamming_dec` | every single-bit error position is corrected, and the syndrome names it |
| `tb_si_write_path` | classification at the 2^26 boundary and for each upper bit; stored word |
| `tb_si_read_path` | correction in bits 30:0; bit 31 ignored; wide words passed through unchanged |
| `tb_si_regfile_array` | reset, write timing, both read ports, upset injection, write beats upset |
| `tb_si_regfile` | random writes, reads and upsets against a value model |
| `tb_si_codec_chain` | two-cycle latency; the stage-1 word is the correct encoding |
| `tb_si_top` | whole design at default sizes |

`tb_si_top` runs a fault-injection campaign of 600 single-bit upsets:

* Each experiment resets the register file, writes all 32 registers and runs a
  64-cycle random trace.
* 88 % of the values written fit in 26 bits. That is the share the scheme's
  authors measured for MiBench programs on MIPS.
* One random bit of one random register is flipped at a random cycle.
* The same trace is also judged as if the register file had no protection.

Each upset is classed as one of three outcomes:

* **wrong**: a read returned a wrong value.
* **latent**: every read was right, but the upset is still in a register at the
  end of the trace.
* **effect-less**: every read was right, and a write removed the upset.

Latent and effect-less together give the fault coverage.

In a typical run, 395 of the 600 upsets reach a reader in the unprotected file.
With Self-Immunity only 58 do, so about 85 % of harmful upsets are masked. The
58 that remain hit wide values. Fault coverage rises from 34 % to 90 %.
The scheme's authors report 93 % on average for their campaign on real programs.

The testbench also requires each of these to happen at least once:

* protected and plain writes
* corrections on both read ports
* a check-bit hit
* a spare-bit-31 hit
* a wide-value upset that reaches a reader
* an upset erased by a write
* narrow and wide values through the codec chain

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/si_pkg.sv tb/si_tb_ref_pkg.sv \
          tb/tb_si_top.sv --top-module tb_si_top
./obj_dir/Vtb_si_top
```

Replace `tb_si_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

## Where this RTL departs from, or adds to, the original description

* **Hamming layout.** The parity-check matrix is this design's choice (see
  above). The stored check bits therefore differ from the original's printed
  examples.
* **Reset.** Only the clearing of self-π is specified. Clearing the register
  words too, and using a synchronous active-high reset, are this design's
  choices. The synchronous reset matches the FPGA results, which report no
  asynchronous control signals.
* **Read timing.** Combinational reads and edge-triggered writes are assumed;
  the timing is not specified.
* **Added outputs.** `rcorr`, `rpi`, the decoder's `syndrome` and the upset
  injection input are additions for observing and testing the design.
* **Demonstrator size.** The FPGA demonstrator was reported with 104
  flip-flops. `si_codec_chain` uses 65: a 32-bit word, a self-π flag and a 32-bit
  output. The demonstrator's internal structure beyond the two stages is not
  known.
* **Not included.**
  * The MIPS processor and MiBench programs used to evaluate the scheme.
  * The software fault-injection environment with its seven outcome classes.
    `tb_si_top` uses three of them: wrong, latent and effect-less.
  * The In-Register Replication scheme it was compared against.
