# Spectrum-to-LCD link: a DSP, an 8-bit controller and a graphics LCD

This RTL takes audio samples, computes a windowed 128-point DFT power
spectrum in real time, and lets a slow 8-bit micro-controller copy each
finished spectrum out of DSP memory and draw it as a bar graph on a 128x64
graphics LCD. The central idea is a division of labour. The fast side does
the arithmetic and never waits for slow devices. The slow side does the
handshaking and pixel work at its own pace. Between the two sits a small
CPLD. It turns the controller's 8-bit multiplexed bus into the 16-bit
address/data cycles of the DSP's host memory port (IDMA port), so no wait
states are added to the DSP's own buses.

The design follows a laboratory arrangement built from an ADSP-2181 DSP
(EZ-Kit Lite), an 80C552 micro-controller, an AD1847 codec and a Seiko
G1216 LCD. In that arrangement the CPLD is real logic. The DFT ran as a DSP
program and the display steps as controller software. Here the CPLD is
rebuilt as RTL. The DFT data flow and the display steps are also turned
into dedicated logic with the same structure. The processors, the codec
and the LCD module are not part of the RTL.

```
 codec ──► sample_buffer ─► window × ─► dft_core ─► power_unit ─► spectrum_buffer ◄─ idma_port ◄─ idma_bridge ◄─ 8-bit host bus
 samples   (ping-pong)      window_rom   twiddle_rom                 (ping-pong +       (IAD15..0,     (latches A–D
                                                                     ready variable)    IS/IRD/IWR/IAL) + glue logic)
                                                  host copies words ─► lcd_display (bin buffer + lcd_writer + bargraph_pattern) ─► LCD pins
```

`dsp_lcd_link_top` holds all of it. The DSP side (`dft_system`, `idma_port`,
`idma_bridge`) is wired together inside. The display side (`lcd_display`)
stands beside it, because the controller that moves words from the bridge
into the display buffer is outside the design: its bus comes in on `ad_*`,
`a0`, `a1`, `a_hi`, `exc_n`, `wr_n` and `rd_n`, and its writes into the
display buffer come in on `disp_*`. The DSP's program memory is outside
too; the IDMA port reaches it through `pm_*`.

## One spectrum, end to end

1. **Input.** The codec delivers one sample per `s_valid`. Samples fill one
   of two 128-word input banks. When a bank is full the banks swap, and the
   full one goes to the DFT.
2. **DFT.** For each bin k the core reads x[n], w[n] and the kernel at phase
   index m = k·n mod 128. It windows the sample and accumulates the real and
   imaginary products in two 40-bit accumulators at the same time, one n per
   clock. A block takes exactly N·N + 4 = 16,388 cycles from start to the
   last bin, or 0.49 ms at a 30 ns clock, about what the original DSP
   program took.
3. **Power.** Each bin's re² + im² is written to word k of one of two
   128-word output banks.
4. **Publish.** One cycle after the last bin, the output banks swap. The
   *ready variable* is set to the data-memory base address of the bank just
   finished: 0x2000 for bank 0, 0x2080 for bank 1.
5. **Copy.** The controller polls the ready variable through the bridge
   until it is non-zero. It then writes that value back as the IDMA start
   address and reads 128 words. The address auto-increments, so no further
   address cycles are needed. Finally it writes 0 to the ready variable.
   The DFT meanwhile fills the other output bank, so the copy only has to
   finish within one block period.
6. **Draw.** The controller stores the words in the display buffer and
   pulses `disp_start`. `lcd_writer` resets the LCD, switches both halves
   on, and writes 8 pages × 64 columns of bar-graph bytes to the left half
   (bins 0–63) and then to the right half (bins 64–127).

At 20.05 kHz a block of samples arrives every 6.38 ms (212,864 cycles at
30 ns). The DFT uses 0.49 ms of that. The simulated copy of a block through
the bridge, with 12 MHz-class host timing, takes 0.53 ms. Drawing a frame
with the default LCD timing adds about 1.1 ms.

If an input bank fills while the DFT is still busy, that block is dropped
and `overrun` pulses. This cannot happen unless samples arrive faster than
one every N + 1 = 129 clocks.

## The host bridge (CPLD): 16-bit IDMA cycles from an 8-bit bus

This is the part to read carefully when connecting a real controller.

**Latches.** Four 8-bit latches, each with its own load and output enable:

| latch | direction | lanes | load / output enable |
|---|---|---|---|
| A | host → DSP | AD7..0 → IAD15..8 | `lewu` / `oewu` |
| B | DSP → host | IAD15..8 → AD7..0 | `leru` / `oeru` |
| C | host → DSP | AD7..0 → IAD7..0 | `lewl` / `oewl` |
| D | DSP → host | IAD7..0 → AD7..0 | `lerl` / `oerl` |

**Register map.** The bridge is selected while `exc_n` is low and A12..A9
equal `SEL_CODE` (default 0). A1 and A0 then pick the operation:

| host cycle | A1 A0 | what happens |
|---|---|---|
| write | x 0 | byte → latch C (low half of the next word) |
| write | 0 1 | byte → latch A, then IDMA **data write**: A and C drive IAD15..0, IS and IWR pulse |
| write | 1 1 | byte → latch A, then IDMA **address cycle**: same, with IAL in place of IWR |
| read | x 0 | IDMA **read**: IS and IRD pulse, IAD is caught in B and D; the host gets the high byte from B |
| read | x 1 | host gets the low byte from D (no IDMA activity) |

A 16-bit write is therefore *low byte, then high byte*, and the second
host write launches the IDMA cycle. This way the port sees all 16 bits at
once. A 16-bit read is *high byte, then low byte*, and the first host read
launches the IDMA cycle. An IDMA control word is bit 14 = 1 for data memory,
bits 13..0 = start address (for example 0x4000 | 0x2100 to reach the ready
variable).

**Timing.** All logic runs on one clock `clk`. `wr_n` and `rd_n` pass
through a 2-flop synchroniser. The address lines and `exc_n` must be stable
while a strobe is low, and they are sampled when the synchronised strobe
falls. Counted from the first clock edge after the host strobe falls:

- write: latch A loads at edge 4. IAD is driven from edge 4 (set-up
  cycle). IS with IWR or IAL is active from edge 5 for `STROBE_CYCLES` (2).
  IAD is held one cycle after the strobe ends. The host write strobe may be any length.
- read: IS and IRD are asserted from edge 3 for `READ_CYCLES` (4). B and D
  capture on the last of those cycles. Latch B is driven onto AD7..0 from
  edge 7 until the synchronised `rd_n` rises. **The host read strobe must
  be longer than `SYNC_STAGES + READ_CYCLES + 1` clocks (7 × 30 ns = 210 ns
  at the defaults).** A 12 MHz 8051-family part gives about 500 ns.
- `READ_CYCLES` must cover the port's read latency. The IDMA acknowledge
  (`iack_n`) is not used by the bridge, and `READ_CYCLES = 1` gives wrong
  data.

Because the outputs are synchronous, the bridge still drives AD7..0 for
up to 3 clocks after the host raises RD. Check this against the host's
bus-float requirement before using real parts. In the original circuit
the latches are transparent and combinational from the strobes.

Buses are split into value + output enable pairs (`ad_o`/`ad_oe`,
`iad_o`/`iad_oe`) instead of tri-state nets. A pad ring would form the
bidirectional pins. Assertions check that at most one IDMA strobe is
active, always under IS, and that the IAD bus never has two drivers.

## The IDMA port (`idma_port`)

This is a model of the DSP's host port. It serves both memory spaces:
data memory through `dm_*` and program memory through `pm_*`.
- IAL with IS low loads the control word. Bit 14 selects the space
  (1 = data, 0 = program) and bits 13..0 give the start address.
- IWR writes the word seen while IWR was low, at the cycle after IWR rises.
- IRD reads: the word is on `iad_o` two cycles after IRD falls, marked by
  `iack_n` low.
- A data-memory word is one 16-bit access. The address increments after
  every read or write.
- A program-memory word is 24 bits and takes two accesses at the same
  address. The first carries bits 23..8 on IAD15..0. The second carries
  bits 7..0 on IAD7..0; the upper byte reads as 0 and is ignored on writes.
  The address increments only after the second access. A new address cycle
  restarts the pairing.
- A PM read fetches the whole word on the first access. A PM write reaches
  memory on the second.

In the top level, data memory is the spectrum buffer. Program memory is
outside the design and is reached through the top's `pm_*` ports; the
end-to-end test puts a small memory model there and checks a few words
written and read back through the host bus.

## DFT arithmetic and formats

All data are 16-bit two's complement Q15.

| quantity | definition |
|---|---|
| window w[n] | round(32768·(0.5 − 0.5·cos(2πn/N))), Hann, clamped to 32767 |
| kernel | c[m] = round(32768·cos(2πm/N)) clamped; sin read as c[(m − N/4) mod N] |
| windowed sample | xw = (x·w) >>> 15 |
| accumulators | re = Σ xw·c[m], im = −Σ xw·s[m], 40 bits |
| bin output | Re, Im = sat16(acc >>> (15 + log2 N)), i.e. X[k]/N |
| power | P = min(65535, (Re² + Im²) >> 15) |

Both tables are computed at elaboration time by constant functions in
`dsp_lcd_pkg`. There are no data files. Tables read synchronously, so
`dft_core` has a 4-stage pipeline: address, window, multiply-accumulate,
scale. Because a tag travels with each product, bins follow each other
with no bubbles. The window shape is not specified by the original design,
and Hann is this design's choice. To change it, edit `hann_q15`.

Data-memory map used by `spectrum_buffer` (parameters `SPEC_BASE`,
`READY_ADDR`): bank 0 at 0x2000–0x207F, bank 1 at 0x2080–0x20FF, ready
variable at 0x2100. Other addresses read 0. Host writes change only the
ready variable, and a publish in the same cycle wins.

## Drawing the bar graph

`bargraph_pattern` scales a power value to a 6-bit height
h = value >> 10 (0–63 pixels from the bottom). Page p (0 = top) spans
heights 8·(7−p) to 8·(7−p)+7. Its byte is 0 when the bar is below the
page, and all ones when the page is wholly under the bar. Where the bar
ends inside the page, the lowest h − 8·(7−p) rows are lit. Bit 0 is the
top row of a page.

`lcd_writer` drives the module pins DB7..0, RST, R/W, D/I, E, CS1 and CS2
with fixed timing and never reads the busy flag. Each write takes 1 fetch
cycle, 1 set-up cycle, `E_CYCLES` + 1 cycles of E high and `HOLD_CYCLES`
cycles of E low. One frame is 2·`RST_CYCLES` + 1057·(`E_CYCLES` +
`HOLD_CYCLES` + 3) + 1 cycles. The 1057 writes are 1 display-on command,
then per half and page a set-page command, a set-column command and 64
data bytes. The command codes (0x3F display on, 0xB8|page, 0x40|column),
active-high chip selects and data taken on the falling edge of E are the
usual conventions of this LCD controller family. They are assumptions:
check them against the datasheet of the module you use.

## Departures and assumptions, in short

- The DFT, the publishing of blocks and the drawing are logic here. In the
  original lab setup they are processor programs. The data flow, buffer
  sizes and order of steps are kept.
- The CPLD register map (which of A0/A1 does what) and the decode of
  A12..A9/EXC are this design's choices. So are the synchroniser and all
  cycle counts.
- Every finished block is published. In the original setup only every
  other block was displayed. Here that choice is left to the host, which
  takes whatever is ready when it polls.
- The host clears the ready variable after copying a block. The original
  only says the host waits for it to change from 0 to a base address.
- The split of a 24-bit program-memory word into two IDMA accesses
  follows the usual convention of this DSP family, not a stated rule.
- The memory addresses, the window shape, the Q15 scaling, the saturation
  and the LCD command codes are also this design's choices.
- The bridge, the IDMA port, the DFT and the display side share one
  clock. The host bus is treated as asynchronous to it, and its strobes
  are synchronised in the bridge.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. `tb/tb_dft_ref_pkg.sv` is the
integer reference model of the spectrum, and `tb/lcd_g1216_model.sv` is a
behavioural LCD module. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dsp_lcd_pkg.sv tb/tb_dft_ref_pkg.sv tb/tb_dsp_lcd_link_top.sv \
  --top-module tb_dsp_lcd_link_top
./obj_dir/Vtb_dsp_lcd_link_top
```

Replace the testbench name to run another block. `tb_dsp_lcd_link_top`
runs the whole design at its default parameters in under a second. It
streams four blocks at 20.05 kHz against a 30 ns clock, with a different
tone in each. `tb_workload_22k` does the same at 22.05 kHz. Both are thin
wrappers around the parameterised test body `tb/tb_link_run.sv`. A bus
model of the controller polls, copies, clears and draws each block.
Every copied word is compared with the reference model, and every LCD
byte with the expected bar graph. The test also checks that each
mechanism happened: IDMA address, write and read cycles, auto-increment,
both output banks, empty polls, LCD frames and resets, program-memory
words written and read back, and an overrun forced at the end.

## Trust and limits

- Every module compiles without errors under Verilator lint (`-Wall`) and
  the slang front end of Yosys. Synthesis infers no latches, loops or
  multiply-driven nets. The remaining lint warnings are about unused
  bits and the reset used in assertions.
- All testbenches pass. For each module, a deliberately broken copy was
  shown to fail its testbench.
- The DFT results match the reference model bit for bit. The reference
  also checks that the tone lands in the expected bin.
- What is not verified: timing against real parts. That covers the
  host-bus timing of a real 8051-family controller, the DSP's real IDMA
  timing and the LCD's E timing. The cycle counts above are the knobs to
  set for that.
