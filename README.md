# INS test-data decompressor

Scan test data for a chip can be stored much more compactly if each slice of it
is replaced by an irrational number that happens to begin with the same bits.
In *irrational numbers stored* (INS) coding, the test stream is cut into
N-bit segments. Each segment, read as a hexadecimal number with one integer
digit (`0001 1010 1110 ...` becomes `1.AE...`), is matched off-line with the
smallest integers x (radicand) and r (root number) for which the r-th root of x
starts with exactly those N bits. Only x and r are stored and sent to the chip.

Example: the 48 bits

    0001 1010 1110 1000 1001 1111 1001 1001 0101 1010 1101 0011  = 1.AE89F995AD3 (hex)

are the first 48 bits of 8^(1/4), so the segment is stored as x = 8, r = 4:
10 coded bits instead of 48.

On the chip, a small decompressor turns the coded serial stream back into x
and r, and the SoC's CPU evaluates x^(1/r) = 2^(log2(x)/r) with its
floating-point unit and emits the N test bits. This repository holds the RTL of
that decompressor. The CPU and the off-line encoder are not part of it.

## The code on the wire: CEBM

x and r are each sent as a CEBM codeword. Every value L >= 2 is written in
binary. Its leading 1 is dropped, and the remaining m bits become the
*odd bits* of the codeword. They are paired with m *even bits*: m-1 zeros and
then a final 1 that marks the end. On the wire, odd and even bits alternate,
odd bit first.

| L  | binary | odd bits | even bits | codeword      |
|----|--------|----------|-----------|---------------|
| 2  | 10     | 0        | 1         | `01`          |
| 3  | 11     | 1        | 1         | `11`          |
| 4  | 100    | 00       | 01        | `00 01`       |
| 8  | 1000   | 000      | 001       | `00 00 01`    |
| 9  | 1001   | 001      | 001       | `00 00 11`    |
| 15 | 1111   | 111      | 001       | `10 10 11`    |

A codeword for L is 2*floor(log2 L) bits long. Codewords of 2i bits form
group A_i, which holds 2^i values. The example pair (8, 4) is sent as
`000001 0001`.

## Decompressor datapath

```
          +-------- odd bits -----------------------------+
 bit_in --+                                               v
          |  ins_bit_split          +---------+   +-------------------+
          +---> even bits --------->|  FSM    |-->| k+1 bit counter   |--> xr (x or r)
                 ^                  |         |   | (preset-1 shift)  |
       ins_tff --+ odd/even select  |         |   +-------------------+
          ^                         |         |--> xr_valid, xr_is_r
          +----------- en ----------|         |<-- cpu_done
                                    +---------+
```

**Odd/even phase (`ins_tff`).** A T flip-flop toggles on every clock in which
data is read (`en` high). It resets to 1, the odd phase, because every
codeword begins with an odd bit. While `en` is low the phase stands still, so
the next bit read is again an odd one.

**Steering (`ins_bit_split`).** The flip-flop output routes `bit_in` either to
the counter (odd phase) or to the FSM (even phase). In the original structure
this is done by a pair of tri-state buffers, one of them with an inverted
enable. Here they are AND gates, and each side gets a strobe qualified by `en`.

**The k+1 bit counter (`ins_shift_counter`).** This is the one clever piece.
CEBM leaves out the leading 1 of each value. The register therefore starts at
1, and each odd bit is shifted in at the LSB, most significant first. The
preset 1 climbs up as bits arrive. When the codeword ends, the register holds
exactly L, with no adder or table:

    codeword of 9:  rs+shift 0 -> 0b10,  shift 0 -> 0b100,  shift 1 -> 0b1001 = 9

Although it is called a counter, it is a shift register with a preset. `rs`
restarts it at 1. `shift` takes in an odd bit. Both together load `{1, bit}`,
which is how the first odd bit of each codeword arrives.

**Controller (`ins_decomp_fsm`).** The FSM has three states:

- `READ_X`: reads the codeword of x.
- `READ_R`: reads the codeword of r.
- `WAIT_CPU`: holds `en` low until the CPU signals `cpu_done`.

An even bit of 1 ends a codeword. The FSM then registers the strobe
`xr_valid`, with `xr_is_r` telling x from r, and moves to the next state.

## Timing and the CPU handshake

- A codeword of 2m bits takes 2m clocks, one bit per clock while `en` is high.
- `xr_valid` is high in the cycle after the clock edge that takes the
  codeword's last bit.
- In that same cycle, `xr` still holds the value. This holds because the
  counter is restarted only together with the first odd bit of the next
  codeword, never in the cycle the codeword ends.
- x and r follow each other with no gap.
- After r, `en` is low from the strobe cycle on.
- The FSM goes back to `READ_X` on the edge at which it sees `cpu_done` high.
- With `cpu_done` tied high, each segment costs one idle clock.

```
clk       _/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_
bit_in      o0  e0  o1  e1  o2  e2 |o0  e0  o1  e1 | -   -
            (x = 8: 0 0 0 0 0 1)    (r = 4: 0 0 0 1)
xr_valid  ____________________________/~~\______________/~~\___
xr                                   8                 4
en        ~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~\____ ... until cpu_done
```

The tester or ATE must present a new `bit_in` in every cycle in which `en` is
high. It must hold off while `en` is low.

## Sizing the counter

The counter needs k+1 bits, with k = ceil(log2(Lmax + 1)) - 1, where Lmax is
the largest x or r in the compressed test set. The width is the parameter
`CNT_W` (default 64) of `ins_decompressor`, or `W` of `ins_shift_counter`.

The default of 64 is a choice made for this RTL:

- Lmax depends on the test set, and there is no published value to size from.
- The worked example needs only 4 bits.
- An exact search over random, fully specified 48-bit segments finds smallest
  radicands of roughly 33 to 48 bits.
- Segments with don't-care bits can settle for much smaller radicands.
- 64 bits is also the widest integer an x87-style FPU loads.

If you know Lmax for your test set, reduce `CNT_W` to match. A codeword with
more than `CNT_W-1` odd bits would push the leading 1 out of the register. An
assertion in `ins_shift_counter` reports this in simulation. There is no
hardware overflow flag.

## What is outside this RTL

- **Root evaluation.** The SoC CPU computes x^(1/r) as 2^(log2(x)/r) with its
  FPU's logarithm and power instructions, and outputs the first N bits. It
  connects through these ports:
  - `xr`, `xr_valid` and `xr_is_r` carry x and r to the CPU.
  - `cpu_done` tells the decompressor that the CPU has finished.

  The testbench contains a behavioural model of it, `tb/ins_cpu_model.sv`,
  which computes the root in double precision. N is a parameter of the
  model: 48 in the end-to-end test, 16 in the round-trip test.
- **Encoder.** The search for (x, r) runs off-line in software. It steps r
  up from 2 and binary-searches x. The testbenches get CEBM coding from
  `tb/tb_ins_pkg.sv`. `tb_ins_roundtrip` also contains a plain linear version
  of the search, which is enough for 16-bit segments.

## Choices made in this RTL

The following are not fixed by the scheme. They were decided here:

- The `cpu_done` handshake, and dropping `en` while the CPU works.
- The registered `xr_valid` / `xr_is_r` strobes.
- The exact meaning of the counter controls `rs` and `shift`, and the late
  restart.
- Driving the flip-flop's T input from `en`, and its reset to the odd phase.
- The synchronous active-low reset `rst_n` on all state.
- Replacing the tri-state buffers with gating.
- The 64-bit counter default.

## Files

| file | contents |
|------|----------|
| `rtl/ins_pkg.sv` | FSM state type |
| `rtl/ins_tff.sv` | odd/even phase T flip-flop |
| `rtl/ins_bit_split.sv` | odd/even steering |
| `rtl/ins_shift_counter.sv` | preset-1 shift counter |
| `rtl/ins_decomp_fsm.sv` | controller |
| `rtl/ins_decompressor.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the `tb_ins_roundtrip` compress-and-restore run |
| `tb/tb_ins_pkg.sv` | CEBM encoder for stimulus |
| `tb/ins_cpu_model.sv` | behavioural CPU/FPU stand-in |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ins_tff` checks toggling against a reference over random `t`.
- `tb_ins_bit_split` checks all eight input combinations exhaustively.
- `tb_ins_shift_counter` checks random values from 2 up to the full 64 bits,
  that they hold, and restarts with `rs` alone.
- `tb_ins_decomp_fsm` checks every cycle of `en`/`shift`/`rs` and the strobe
  timing over 60 random pairs. Some of these pairs have CPU waits.
- `tb_ins_decompressor` is the end-to-end test at default parameters:
  - It decodes the worked example (8, 4), and the CPU model rebuilds
    `0x1AE89F995AD3` from it.
  - It rebuilds sqrt(2) = `0x16A09E667F3B` and sqrt(3) = `0x1BB67AE8584C`
    the same way.
  - It then runs 400 random pairs, from the 2-bit group A1 up to full-width
    64-bit values, with random CPU latencies including zero.
  - It checks strobe timing, values, the x/r flag and `en`, and counts each
    mechanism it exercises. A mechanism that never happens is a failure.
- `tb_ins_roundtrip` runs the whole scheme on random test data with
  don't-care bits, using 16-bit segments and the default 64-bit counter:
  - The testbench encodes each segment. It looks for the smallest r, then the
    smallest x, whose root agrees with the segment on every specified bit.
  - The decompressor decodes x and r, and the CPU model rebuilds the segment.
  - Every specified bit must come back unchanged.

  Sixty segments are run at each don't-care share. The compression gain
  (original bits / coded bits) it prints is:

  | don't-care share | 0 % | 50 % | 80 % | 95 % |
  |------------------|-----|------|------|------|
  | gain             | 0.60 | 1.08 | 1.90 | 3.24 |

  Fully specified data does not compress. In this scheme, the gain comes from
  don't-care bits, which let the encoder settle for small x and r.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ins_pkg.sv tb/tb_ins_pkg.sv tb/tb_ins_decompressor.sv \
    --top-module tb_ins_decompressor -o sim
./obj_dir/sim
```

The double-precision root in the CPU model is exact enough for the three
known constants it is checked against. It is not a bit-accurate model of an
80-bit x87 for arbitrary x and r, so the random pairs check only x and r, not
the rebuilt bits.
