# End-of-column TDC read-out for a pixel demonstrator

This RTL is the digital part of a pixel read-out demonstrator in which **no
clock and no digital logic run inside the pixel matrix**. Each pixel has only
analogue parts: a preamplifier, a time-over-threshold (TOT) discriminator and
a differential current-mode line driver. When a pixel is hit, it drives a
pulse down a shared transmission line to the end of the column (EOC). The
pulse is high for as long as the signal stays over threshold. All time
measurement happens at the end of the column:

* a 32-tap **DLL** on the 320 MHz clock gives the fine time, in bins of
  3125 ps / 32 = 97.7 ps;
* two 32-bit **coarse counters** give the coarse time, with a range of
  2^32 x 3.125 ns = 13.4 s. One counts on the rising clock edge and one on
  the falling edge;
* leading and trailing edges are both time-stamped, so the TOT can be used to
  correct time walk.

Each hit leaves the chip as a 197-bit word on a serial line of its own.

The demonstrator column has 45 pixels, folded into 5 segments of 9. Pixel
`p` (0..44) shares **data line** `p mod 9` with the 4 pixels at the same
position in the other segments. It also shares **address line** `p / 9` with
the other 8 pixels of its segment. A hit drives both lines, so the pair
identifies the pixel. That needs 9 data channels and 5 address lines instead
of 45 lines.

## How one hit is measured

```
receiver out ──┐  (analogue receiver, outside this RTL)
               ▼
           atd_pulse ──tdr (leading edge + 100 ps, 2.5 ns wide)──┐
                     ──tdf (trailing edge + 100 ps, 2.5 ns)──┐   │
                                                             ▼   ▼
 dll_delay_line ─32 taps─►  tdc_hit_register  ◄─ cnt_pos, cnt_neg (coarse_counter)
                            (clocked by tdr/tdf) ◄─ 5 address lines
                                   │ word (197 b), hit_tgl
                                   ▼
                           line_output_buffer ──► sout (one per data line)
                                   ▲
                               rd_clk (one per data line)
```

1. **Triggers.** The address transition detector (`atd_pulse`) is a
   monostable. It turns the leading edge of the TOT pulse into a short pulse
   `tdr` and the trailing edge into `tdf`.
2. **Capture.** The hit register bank has no clock of its own: the rising
   edges of `tdr` and `tdf` clock it.
   * On `tdr` it stores the 32 DLL taps (rise fine time), both coarse
     counters and the 5 address lines.
   * On `tdf` it stores the taps (fall fine time) and both counters again,
     then toggles `hit_tgl`.
3. **Read-out.** The line output buffer synchronises `hit_tgl` into its
   read-out clock domain and copies the word into a shift register. It then
   sends the word.

Nothing is decoded on chip: the tap pattern and all four counter values are
sent raw.

## Decoding the time off line (the subtle part)

The hit arrives asynchronously to the 320 MHz clock. A counter sampled at the
hit may be caught while it is changing. The two counters change half a period
apart, so at any instant at least one of them is far from its own clock
edge. The fine time tells which one to trust.

**Fine phase.** Tap `k` is the clock delayed by `k x T/32`. The sampled
taps are therefore the clock waveform over the last period, read backwards in
time. The last rising clock edge lies between the tap `j` that reads `1` and
tap `j+1` that reads `0`. The phase since that edge is
`phi = (j + 0.5) x T/32`, or `j = 31` if no such pair exists inside the word.

**Coarse edge.**
* If `T/4 <= phi < 3T/4`, the hit is far from a rising edge, so `cnt_pos` is
  stable. The last rising edge is at `R0 + (cnt_pos - 1) x T`.
* Otherwise `cnt_neg` is stable. The last falling edge is at
  `F0 + (cnt_neg - 1) x T`. The rising edge is half a period before that edge
  (`phi >= T/2`) or after it (`phi < T/2`).

Here `R0` and `F0` are the first rising and falling edges after Reset CNT.

**Time.** `t = edge + phi`. The trigger delay (100 ps in the model) is a
constant offset. TOT is the trailing time minus the leading time.

`tb/tb_eoc_hit_timing.sv` applies this procedure to 150 random hits. Every
leading and trailing time comes out within half a bin of the truth: the RMS
error is 28 ps, or 97.7/sqrt(12), the quantisation limit. Both counters end
up selected about equally often.

## Serial frame and the two read-out modes

Per hit, MSB first, one bit per read-out clock:

| bits | field | meaning |
|------|-------|---------|
| 1 | header `1` | start |
| 1 | header `0` | |
| 32 | `fine_rise` | DLL taps at the leading edge, tap 31 first |
| 32 | `fine_fall` | DLL taps at the trailing edge |
| 32 | `crs_rise_pos` | rising-edge counter at the leading edge |
| 32 | `crs_rise_neg` | falling-edge counter at the leading edge |
| 32 | `crs_fall_pos` | rising-edge counter at the trailing edge |
| 32 | `crs_fall_neg` | falling-edge counter at the trailing edge |
| 5 | `addr` | address lines at the leading edge (one-hot segment) |

That is 199 clocks per hit: 622 ns, or 1.6 Mhit/s per line at a 320 MHz
read-out clock. The read-out clock is independent of the 320 MHz
measurement clock and may run at any rate up to 320 MHz; the tests use
320 MHz and 100 MHz. The word is the packed struct `eoc_pkg::hit_word_t`.

* **Synchronous mode** (`async_mode = 0`). The read-out clock runs all the
  time and the idle line is `0`. The header is on the line at most 3 read-out clocks after
  the trailing edge, the delay of the synchroniser. If another hit has
  completed in the meantime, its frame follows the last bit directly, with no
  gap.
* **Asynchronous mode** (`async_mode = 1`). The read-out clock may be
  stopped. A waiting hit drives the line to `1` with no clock running: the
  `1` comes combinationally from the toggle flag. Once clocks are supplied,
  the line stays `1` for the synchroniser cycles and then carries the same
  header and data. A receiver should treat any run of `1`s followed by `0` as
  the header.

**Buffering is one hit deep per line.** The hit register holds one word and
the shift register holds a copy being sent. If a hit completes while another
one is still waiting to be copied, the waiting one is overwritten. A new
leading edge that arrives during the 2 to 3 clock copy window would corrupt
the copied word. With a 622 ns frame this limits each line to roughly one hit
per frame time.

## What is on the chip (`eoc_demonstrator`)

| structure | content | ports |
|-----------|---------|-------|
| s1 | 45-pixel folded column: `eoc_column` (9 channels, 5 address lines) plus 45-bit calibration mask | `s1_*` |
| s2 | 9-pixel column, one pixel per line: second `eoc_column`, address field sent as 0, plus 9-bit mask | `s2_*` |
| s5 | stand-alone TDC: DLL and hit registers without coarse counters, triggered from external TDR/TDF pads, 64-bit word (rise fine, fall fine), 66 clocks per hit | `s5_*` |

* Each `eoc_column` contains its own DLL and coarse counter pair. s1 and s2
  share the 320 MHz clock, `reset_cnt`, `reset_dll` and `async_mode`. s5 has
  its own clock, reset and mode inputs.
* The calibration mask (`cal_mask_register`) is loaded serially on
  `*_cal_clk`/`*_cal_data`. The first bit sent ends up in the highest index.
  Each bit enables the analogue test-charge injection of one pixel. The
  injection itself is in the pixel and is not part of this RTL.
* All analogue parts of the chip are outside this RTL: pixel front ends,
  transmission lines, line receivers, LVDS drivers, the line test
  structures, the analogue and digital single-pixel outputs, and the noise
  test transistors. The receiver outputs are the top's `*_rx_*` inputs and
  the serial outputs go to the LVDS drivers.

## Behavioural models

Two blocks are mixed-signal in silicon and are written as behavioural models
(with `#` delays, not synthesizable):

* `dll_delay_line` models a DLL already in lock at the nominal 3125 ps period
  (parameter `PERIOD_PS`). Tap `k` is the clock with a transport delay of
  `round(k x PERIOD_PS / 32)` ps. Reset DLL holds all taps low.
* `atd_pulse` produces 2.5 ns pulses, 100 ps after each edge.

Replace both with the real macros for implementation. Every other module is
synthesizable. `eoc_channel`, `eoc_column`, `eoc_tdc_test` and
`eoc_demonstrator` instantiate these models, so synthesize them with the
models as black boxes.

## Choices not fixed by the specification, and departures from it

* **Word sizes.** The specification's text gives two 32-bit coarse counters,
  four 32-bit coarse fields and a 197-bit word with a 622 ns read-out.
  Its block diagram draws an 80-bit word with 6-bit coarse fields and a
  4-bit address, and notes a change to 20-bit coarse counters. This RTL
  follows the text: 32 bits, 197 bits. `eoc_pkg::COARSE_W` changes the
  coarse width everywhere.
* **Field order.** The order of fields in the word follows the diagram (rise
  fine, fall fine, rise coarse, fall coarse, address). Putting the
  rising-edge counter first inside each coarse pair is a choice of this RTL.
* **Address capture.** The address is captured at the leading edge only.
* **Handshake.** The completion handshake (toggle flag plus two-flop
  synchroniser), the one-deep buffering, and the asynchronous-mode `1` being
  raised when a hit *completes* (after the trailing edge) are choices of this
  RTL. So is the static `async_mode` input: the pad list names no mode pad.
* **Resets.** Resets are asynchronous and active high. Reset CNT also resets
  the channel logic. The mask register has no reset.
* **s2 address.** s2 has no address lines; its address field is 0.
* **Stand-alone TDC size.** s5 follows the description of one DLL and one
  TDC. The overview instead mentions 18 receiver blocks.
* **Channel counts.** The block diagram of the column shows 11 channels and
  4 address lines in places. This RTL uses 9 and 5, as the text does.

## Files

`rtl/`: `eoc_pkg` (widths, `hit_word_t`), `coarse_counter`,
`dll_delay_line`*, `atd_pulse`*, `tdc_hit_register`, `line_output_buffer`,
`eoc_channel`, `eoc_column`, `cal_mask_register`, `eoc_tdc_test`,
`eoc_demonstrator` (top). The two marked `*` are behavioural models.

`tb/`: one self-checking testbench `tb_<module>.sv` per module, plus:

* `tb_eoc_hit_timing.sv`: the off-line time decoding test described above;
* `tb_serial_rx.sv`: a frame receiver shared by the testbenches;
* `tb_eoc_util_pkg.sv`: reference DLL and counter values computed from the
  clock waveform alone.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

All files use `timeunit 1ps`. Run from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/eoc_pkg.sv tb/tb_eoc_util_pkg.sv tb/tb_eoc_demonstrator.sv \
  --top-module tb_eoc_demonstrator -Mdir obj_top
./obj_top/Vtb_eoc_demonstrator
```

Use the same command with another `tb_*.sv` for the other tests.
`tb_eoc_demonstrator` runs the top at its default parameters in a few
seconds. It drives all 45 pixels of s1, all lines of s2 and the s5 TDC, in
both read-out modes, and includes the following:

* a back-to-back frame;
* a hit during Reset DLL;
* calibration mask loads;
* captures where the two coarse counters differ and where they agree.

It checks every decoded field against values computed from the clock
waveform and counts each of these events.
