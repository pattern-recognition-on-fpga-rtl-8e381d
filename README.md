# Morphological template-matching detector (TTMO)

This is a small hardware detector that answers one question: does a trained gray-level
pattern appear somewhere in an image? It answers with a single bit that drives an LED.
It uses no correlation and no multiplier. At every position of the pattern window it
counts how many image pixels fall inside a tolerance band around the pattern. If that
count reaches a similarity level at some position, the pattern is reported present.
The whole datapath is made of comparators, one counter and a few memories, so it fits
in LUTs and flip-flops alone, with no DSP blocks. That makes it a candidate for
low-power, radiation-tolerant FPGAs on small satellites.

The default configuration searches a 116 x 131 pixel image (a Landsat scene) for a
48 x 26 pixel pattern. It scans every window position in 9,135,186 clocks, which is
45.68 ms at 200 MHz.

## The operator

Let `f_W` be the trained pattern over window `W` (n = 48·26 = 1248 pixels), `g` the
image, and `m = 255` the largest pixel value.

1. **Slack bounds.** Two offsets `c1 <= c2` turn the pattern into a band:
   `f_W-(w) = clamp(f_W(w) + c1, 0, m)` and `f_W+(w) = clamp(f_W(w) + c2, 0, m)`.
   With `c1 = c2 = 0` the band is a single value, which gives exact matching. A
   negative `c1` and a positive `c2` allow pixel noise, for inexact matching.
2. **Erosion and anti-dilation.** For window element `w_i` at position `x`:
   - the erosion bit is 1 when `g(x + w_i) >= f_W-(w_i)`;
   - the anti-dilation bit is 1 when `g(x + w_i) <= f_W+(w_i)`.
3. **Accumulation (phi).** `lambda_i = erosion AND anti-dilation` says that the pixel
   lies inside its band. `phi(x) = sum_i lambda_i` counts such pixels and ranges
   from 0 to n. It acts as a similarity score: n means every pixel matched.
4. **Detection (psi).** `h = 1` if `phi(x) >= l` for at least one position `x` of
   the valid region. The valid region is every placement where the window lies wholly
   inside the image, (116−48+1) x (131−26+1) = 69 x 106 = 7314 positions.
   The reference operating point uses l = 86 % of n, which is 1074.

A pattern that appears with small changes in brightness still reaches a high `phi`
once the slack covers those changes. A few outlier pixels cost only a few counts.

## How the hardware computes it

The engine is sequential. It evaluates one window element per clock, and all units
work on the same element in lock step:

```
 host load port ─┬─────────────────────────────► image buffer ──g──┐
                 └─► tmo_slack ─ f_W- ─► tmo_erosion (fw1) ◄───────┤── eps ──┐
                              └─ f_W+ ─► tmo_antidilation (fw2) ◄──┘── dla ──┤
 tmo_scan_ctrl ── img addr / element index / closing clock ─────────────────►│
                                                        tmo_accumulator (phi)
                                                                  │
                                                        tmo_psi (match, h, LED)
```

- **`tmo_scan_ctrl`** walks the window positions row by row. At each position it walks
  the window elements row by row too. Each clock it issues one element: the image
  address `(row+wr)·IMG_COLS + col+wc` and the pattern index `wr·W_COLS + wc`. After
  the n elements of a position it adds one *closing clock*. In that clock the
  accumulator hands out `phi(x)` and clears. Each position therefore costs n + 1
  clocks, and a scan costs

  `scan_cycles = (IMG_ROWS−W_ROWS+1) · (IMG_COLS−W_COLS+1) · (W_ROWS·W_COLS+1)`

  which is 69 · 106 · 1249 = 9,135,186 clocks at the default size.
- **Buffers (`tmo_buffer`)** are simple dual-port memories with a one-clock synchronous
  read. There are three of them. The image buffer is in the top module. `fw1`, which
  holds `f_W-`, is inside the erosion unit. `fw2`, which holds `f_W+`, is inside the
  anti-dilation unit. Together they hold 15196·8 + 2·1248·8 = 141,536 bits.
- **`tmo_erosion` / `tmo_antidilation`** each read their bound at the same address the
  scan gives, compare it with the image pixel read in the same clock, and register
  the bit.
- **`tmo_accumulator`** ANDs the two bits and counts them.
- **`tmo_psi`** compares each `phi(x)` with `l` and emits a per-position `match` pulse.
  It sets `h`, and so the LED, on the first match and keeps it until the next scan. It
  also keeps the number of matches, the first matching position and the highest `phi`.

### Pipeline timing

| clock | activity for element issued in clock t |
|-------|----------------------------------------|
| t     | scan issues image address and element index |
| t+1   | image pixel and `f_W-`/`f_W+` come out of the three buffers; compared |
| t+2   | erosion/anti-dilation bits registered; added into the count |

The closing clock is delayed by two registers so that it reaches the accumulator right
after the last element of its position. `phi(x)` appears one clock later, with its
position, on `phi_valid/phi/phi_row/phi_col`. The `match` pulse follows one clock
after that. `done` rises `scan_cycles + 3` clock edges after the edge that samples
`start`. From then on `h`, `led` and the status outputs are final.

## Using the top module `ttmo_top`

Parameters: `IMG_ROWS`, `IMG_COLS`, `W_ROWS`, `W_COLS` (defaults 116, 131, 48, 26) and
`PIX_W` (8). The remaining parameters are derived widths.

1. **Load the image** while `busy` is low. Assert `load_we` with `load_sel = LOAD_IMAGE`,
   `load_addr = row·IMG_COLS + col` and the pixel on `load_data`, one pixel per clock.
2. **Load the pattern.** Use `load_sel = LOAD_PATTERN` and `load_addr = wr·W_COLS + wc`,
   with the wanted `c1`/`c2` (signed, `PIX_W+1` bits) held during the writes. The
   bounds are clamped and stored as they are written. Changing `c1`/`c2` later has no
   effect until the pattern is loaded again.
3. **Run.** Set `level` (l) and pulse `start`. `busy` stays high until `done`.
   While busy, the device ignores writes and any further `start`.
4. **Read the result.** Read `h`/`led`, and optionally `match_count`,
   `first_row/first_col` and `phi_max`. For observation, stream `phi_*` and
   `match_*` during the scan.

Out-of-range load addresses are dropped. Reset (`rst_n`, asynchronous, active low)
clears the control state but not the memories.

## Where this RTL departs from the reference design or fills gaps

- **Training happens outside the device.** An offline learning engine turns several
  views of the same target, taken on different satellite passes, into one
  representative pattern. That engine is not part of this RTL. The host writes its
  result through the load port.
- The **pixel width** (8 bits), the **load port**, the start/busy/done handshake, the
  **reset** scheme and the **scan order** are choices of this implementation. The
  status outputs (`match_count`, first match, `phi_max`) are additions too.
- The **erosion** compares with `f_W-` and the **anti-dilation** with `f_W+`. This
  band reading is what makes `c1`/`c2` meaningful.
- A position matches when **`phi(x) >= l`**, so equality counts as a match.
- The **extra clock per position** in the cycle count is used here as the closing
  clock. The cycle count is the same as the reference's. Three clocks of pipeline
  drain are added at the end of the scan.
- The **buffers** are written as memories, which map to block RAM. The reference
  implementation reports the images and templates as held largely in registers.
  Function and timing are the same.
- The reference reports 13,064 registers, 13,140 LUTs and 416 mW on a Kintex-7. None of
  these figures were measured for this RTL.

## Files

| file | content |
|------|---------|
| `rtl/tmo_pkg.sv` | default sizes, `PIPE_LAT`, `scan_cycles()`, load-select enum |
| `rtl/tmo_buffer.sv` | dual-port pixel buffer |
| `rtl/tmo_slack.sv` | slack bounds `f_W-`, `f_W+` |
| `rtl/tmo_scan_ctrl.sv` | position and element scan, closing clock |
| `rtl/tmo_erosion.sv`, `rtl/tmo_antidilation.sv` | bound buffers and comparators |
| `rtl/tmo_accumulator.sv` | `phi(x)` |
| `rtl/tmo_psi.sv` | detection, LED and status |
| `rtl/ttmo_top.sv` | the complete detector |
| `tb/tb_<module>.sv` | one self-checking bench per module |
| `tb/tb_tmo_ref_pkg.sv` | reference model of `phi` used by the system benches |
| `tb/tb_ttmo_top.sv` | end-to-end bench at 12 x 10 / 3 x 4 |
| `tb/tb_ttmo_full.sv` | one full-size detection at the default parameters |

## Verification

Every bench prints `TB_RESULT checks=N failures=F` and has a watchdog.

- **Unit benches.** Each checks its module against an independent model: exhaustive
  clamping, memory read latency and hold, comparator boundaries and latency, the exact
  address sequence and cycle count of the scan, count and clear of `phi`, and
  `>=`-boundary detection.
- **`tb_ttmo_top`** runs five scans at a small size, covering:
  - exact match of a planted copy;
  - a noisy copy that exact matching rejects, with the LED off;
  - the same copy found with slack at 86 %;
  - bounds that clamp at 0 and 255;
  - a level equal to an occurring `phi`.

  It also writes and restarts during a scan. It checks every `phi(x)` against the
  model, and checks the scan time.
- **`tb_ttmo_full`** runs the default 116 x 131 / 48 x 26 configuration with c1 = −4,
  c2 = +4 and l = 1074 on a random image holding a noisy copy of a random pattern.
  It checks all 7314 `phi` values and the detection at the planted position, and
  checks the scan time of 9,135,186 + 3 clocks. It needs about 10 s of Verilator
  run time.

To simulate with Verilator, for example the full-size bench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tmo_pkg.sv tb/tb_tmo_ref_pkg.sv tb/tb_ttmo_full.sv --top-module tb_ttmo_full
./obj_dir/Vtb_ttmo_full
```

Replace the bench file and `--top-module` to run another bench. Benches that do not use
the reference model do not need `tb/tb_tmo_ref_pkg.sv`.
