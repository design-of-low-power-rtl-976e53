# 40-bit SerDes core: staged serializer and deserializer

A serial link saves pins, area and power by sending many bits over one line
at a high rate. Its digital heart is a pair of converters: a serializer that
turns wide, slow words from the physical-coding layer (the PMA) into a fast
bit stream, and a deserializer that turns the stream back into words. This
RTL implements both for 40-bit words, aimed at a 28 Gbps line rate, and it
also includes a small test path: serial-in register, an 8-to-3 encoder as
circuit under test, and a serial-out register.

The key idea is that the conversion happens in **stages**, not in one 40:1
multiplexer:

- serializer (PISO): 40 → 20 → 4 → 2 → 1
- deserializer (SIPO): 1 → 2 → 4 → 8 → 40

Only the last one or two stages run at the bit rate. Everything wider runs at
a fraction of it. In silicon this keeps the expensive full-speed flip-flops
down to a handful. A synchronizer aligns the dividers that pace the stages to
the word clock of the parallel side.

## Clocking: one bit clock, strobes for every rate

This is the part that most needs explaining, because it is where the RTL
departs most from a transistor-level SerDes.

In silicon each stage has its own clock: /2, /4, /20 and /40 clocks,
partly multi-phase. In this RTL every flip-flop runs on **one clock, `clk`,
with one serial bit per cycle**. Every lower rate is a one-cycle *strobe*
from `serdes_clkgen`:

| strobe    | high when the divider phase is | used by                          |
|-----------|--------------------------------|----------------------------------|
| `s2`      | 0 mod 2                        | 4→2 step, 2→1 load; 1→2 / 2→4    |
| `s4`      | 0 mod 4                        | 20→4 step, 4→2 load; 2→4 / 4→8   |
| `s8`      | 0 mod 8                        | 4→8 / 8→40                       |
| `s20`     | 0 mod 20                       | 40→20 step, 20→4 load            |
| `s40`     | 0                              | 40→20 load; 8→40 publish         |
| `cap`     | 20                             | serializer samples `tx_data`     |

The divider phase is a mod-40 counter. A separate half-rate flip-flop stands
in for the /2 clock, and the strobe `s2` comes from that flip-flop. An
assertion checks that it always agrees with the counter's parity. Free-running
50 % duty clocks /2, /4, /8, /20 and /40 are also output (`divclk_t`). The
/40 clock goes out as `tx_par_clk_out`/`rx_par_clk_out` for the parallel side.

**Stage hand-off rule.** Stage *k* loads its input on the same strobe that
makes stage *k−1* step to its next output word. At that edge, stage *k*
samples the word the previous stage has been holding for one full period,
while that stage moves on. Every word is therefore taken exactly once, and
each stage adds exactly one input-word period of latency. This rule is what
makes the chain correct. `piso_stage` and `sipo_stage` each assert that a
load only ever happens on a step.

**Alignment.** `serdes_sync` samples the word clock (`tx_par_clk_in` or
`rx_par_clk_in`) through two flip-flops and detects its rising edges. While
`sync_en` is high it emits two pulses:

- `sync_2p` restarts the counter and the half-rate flip-flop at phase 0;
- `sync_2n` follows one bit later and re-forces the /2 phase (the negative
  half of the /2 clock).

If the word clock is steady, the pulses arrive exactly when the counter would
wrap anyway, so they change nothing. If its phase moves, the dividers jump to
follow it. With `sync_en` low the dividers run free and keep their phase.

Timing, counting from the bit-clock edge *n* at which a word-clock rising
edge is first sampled:

- the divider is at phase 0 in the cycle after edge *n*+3;
- the serializer captures `tx_data` at edge *n*+24, half a word later. The
  PMA's data may therefore be unsettled for up to about 15 bit periods on
  either side of its clock edge; the testbench uses ±8;
- the deserializer publishes words at edges *n*+4+40*k*.

## Serializer (`piso`)

`word_q` holds the captured 40-bit word. Four `piso_stage` instances follow
it: 40→20 (steps on `s20`), 20→4 (steps on `s4`), 4→2 (steps on `s2`) and
2→1 (steps every cycle). Each stage sends the least significant slice first,
so bit 0 of the word goes first on the line.

Latency: bit *i* of a word captured at edge *c* is on `tx_serial` in the
cycle after edge *c* + 46 + *i*. The 46 is 20 (wait for the next word
boundary) + 20 + 4 + 2, one input period for each later stage
(`serdes_pkg::TX_LATENCY`). Throughput is one word every 40 cycles, with no
gaps on the line.

The published serializer uses a different circuit at each stage: a
single-phase 2:1 stage for 40→20, a multi-phase shift register for 20→4, and
differential D flip-flops for 4→2→1. Here all four are the same
register-and-hold module with different widths. The function is the same,
but the circuit is not.

## Deserializer (`sipo`)

Four `sipo_stage` instances: 1→2 (samples every cycle, publishes on `s2`),
2→4, 4→8 and 8→40 (publishes on `s40`). Each stage shifts new words in at the
top, so the first bit received ends up in `rx_data[0]`.

The word published at edge *E* holds the bits sampled at edges *E*−53 to
*E*−14. Bit 39 reaches `rx_data` 14 bit periods after it was sampled
(8 + 4 + 2, `serdes_pkg::RX_LATENCY`). `rx_valid` is high for the one cycle
after each update.

Word boundaries come only from the phase of `rx_par_clk_in`. There is no
word aligner, comma detection or bit slip.

**Loopback.** With `rx_serial` tied to `tx_serial` and the same word clock
on both sides, the total latency is 24 + 46 + 1 + 39 + 14 = 124 edges. That
is a multiple of 40 plus 4, so the receive boundaries fall exactly on the
transmitted words. A word offered at word-clock edge *n* reappears on
`rx_data` at edge *n*+124. A channel delay of *d* bit periods needs the
receive word clock shifted by *d*.

## Hybrid test path (`hybrid_serdes`)

This is a second, separate use of serial/parallel conversion. A circuit
under test with 8 inputs and 3 outputs is reached through one serial input
and one serial output, with every part on one clock:

1. `start` marks bit 0 of an 8-bit frame on `sin`. Frames may be back to
   back or have idle gaps.
2. `hyb_s2p` shifts the 8 bits in (first bit → bit 0).
3. `enc8to3` encodes them.
4. In the cycle after the eighth bit, `hyb_p2s` loads the 3-bit result. It
   leaves on `sout`, bit 0 first, over the next 3 cycles, with `sout_valid`
   high.

The encoder is the standard OR-plane type. A one-hot input with bit *k* set
gives *k*. Other inputs give the OR of the indices of their set bits, and
there is no "valid" output.

## What is outside the RTL

The surrounding link is analog or mixed-signal, so it is represented only by
ports on `serdes_top`:

- PLL: `clk` and the word clocks are inputs.
- Feed-forward equalizer and line driver: `tx_serial` is an output.
- Receive equalizer and CDR: `rx_serial` is an input. Receive uses the same
  `clk` as transmit.

The low-power circuit style of the original design (gate-diffusion-input
cells, differential flip-flops) affects power, area and speed, not logic, so
it has no RTL counterpart. The same holds for the superconducting circuits
behind the hybrid test path, which appear only as their logic function.

## Where this design makes its own choices

- One bit clock plus strobes, instead of separate divided and multi-phase
  clocks. Reaching 28 Gbps would mean running this RTL at 28 GHz. A real
  implementation would clock the last 2:1 stage on both edges of a 14 GHz
  clock, and the slower stages on their own divided clocks, using the same
  hand-off rule.
- Capture of the parallel word mid-period, not on the word-clock edge.
- Bit order: LSB first on the line and in every stage.
- How `sync_2p`/`sync_2n` are formed and used: 2-flip-flop synchronizer,
  edge detect, and a one-bit offset between the two pulses.
- `rx_valid`, `start`/`sout_valid` framing, and an asynchronous active-low
  reset to zero everywhere.

## Files

| file | content |
|---|---|
| `rtl/serdes_pkg.sv` | widths, latencies, `strobes_t`, `divclk_t` |
| `rtl/serdes_sync.sv` | word-clock synchronizer, `sync_2p`/`sync_2n` |
| `rtl/serdes_clkgen.sv` | dividers and stage strobes |
| `rtl/piso_stage.sv`, `rtl/sipo_stage.sv` | one conversion stage, parameterized by widths |
| `rtl/piso.sv`, `rtl/sipo.sv` | serializer and deserializer |
| `rtl/hyb_s2p.sv`, `rtl/enc8to3.sv`, `rtl/hyb_p2s.sv`, `rtl/hybrid_serdes.sv` | hybrid test path |
| `rtl/serdes_top.sv` | top: serializer, deserializer and hybrid path side by side |
| `tb/tb_*.sv` | one self-checking testbench per module; `*_checker.sv` are helpers |

## Simulating

Every testbench checks the outputs against values computed in the testbench,
has a watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`. For example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/serdes_pkg.sv tb/tb_serdes_top.sv \
          -y rtl -y tb --top-module tb_serdes_top -o sim
./obj_dir/sim
```

Swap in another `tb_<module>` to test another module. `tb_serdes_top` runs
the top at its default sizes. It loops the serial line back and sends random
words for 8000 bit periods. It covers initial alignment, a word-clock phase
step, running with sync disabled, and hybrid-path frames with gaps, and it
counts each of these events, failing if any never happens. It takes well
under a second.

Every register has a reset value, and no test depends on X propagation, so
the tests give the same result on two-state and four-state simulators.

To change the word width, note that the stage widths in `serdes_pkg` must
divide each other and the divider assumes a multiple of 40 (an elaboration
check enforces it).
