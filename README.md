# Sobel edge detection with a distributed-arithmetic 3x3 filter

This design detects edges in a 256-pixel-wide, 8-bit grey-scale image
stream. It applies the two 3x3 Sobel masks with **distributed arithmetic
(DA)**, so it needs no multiplier. A 3x3 convolution

    y(m,n) = sum_{k=0..2} sum_{l=0..2} h(k,l) x(m-k, n-l)

is rewritten bit by bit. Each 8-bit pixel is a two's complement number,
x = sum_{j<7} x_j 2^j - x_7 2^7. Bit j of the nine window pixels is a 9-bit
word. That word addresses a 512-entry ROM holding F_j, the sum of the
coefficients whose pixel has bit j set. The filter output is then a
shift-and-add over the eight bit planes:

    y = sum_{j<7} F_j 2^j - F_7 2^7

One ROM per mask turns the whole 3x3 multiply-accumulate into eight table
look-ups and eight additions. The vertical and horizontal gradients are
computed side by side from the same bit planes. They are then combined into
a magnitude sqrt(y_ver^2 + y_hor^2) and thresholded into a two-level edge
map.

## Data path

```
pix_in ─► frame_manager ─► 3x3 window ─► piso_bank ─► 9-bit address ─┬─► da_rom (vertical)   ─► scaling_acc ─► out_buffer ─► y_ver ─┐
          (buffer, PIPO,                (9 shift regs,               └─► da_rom (horizontal) ─► scaling_acc ─► out_buffer ─► y_hor ─┼─► grad_combine ─► mag, edge_o
           2 line delays)                LSB first)                                                                                 │
control_unit ─► lr_img, lr, clacc, lacc, s/a (sa_sub), ld_out ──────────────────────────────────────────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/da_pkg.sv` | sizes, types (`pix_t`, `win_t`, `mask_t`, `ctrl_t`), the two Sobel masks and the partial-product function |
| `rtl/line_delay.sv` | a one-line (256-sample) delay built as a RAM with a wrapping address |
| `rtl/frame_manager.sv` | input buffer, two line delays and a two-stage column shift per row, giving the window `win[k][l] = x(m-k,n-l)` |
| `rtl/piso_bank.sv` | nine parallel-in serial-out registers, one bit plane per clock, least significant bit first |
| `rtl/da_rom.sv` | 512 x 8-bit partial-product ROM, filled from a mask parameter |
| `rtl/scaling_acc.sv` | the scaling accumulator: halve, then add (or, for the sign plane, subtract) the ROM word |
| `rtl/out_buffer.sv` | takes the final sum, divides it by 8 and saturates it to an 8-bit signed sample |
| `rtl/control_unit.sv` | the 10-clock pixel schedule |
| `rtl/grad_combine.sv` | floor(sqrt(y_ver^2 + y_hor^2)) and the threshold |
| `rtl/sobel_da_top.sv` | the complete design |

## The bit-serial schedule

The whole design runs on one counter in `control_unit`. Each pixel takes
`PERIOD = PIX_W + 2 = 10` clocks:

| phase | strobe | effect |
|---|---|---|
| 0 | `lr` (+ `ld_out`) | the PISO bank loads the current window; the output buffers load the finished sum of the previous window |
| 1 | `lr_img`, `clacc` | the frame manager takes the next pixel; both accumulators clear |
| 2..9 | `lacc` | one bit plane per clock: the ROMs are read, the accumulators updated, the PISOs shifted |
| 9 | `sa_sub` | the last plane, which holds the sign bits, is subtracted |

Three pixels are in flight at once. One is entering the frame manager, one
is being shifted through the PISO bank, and the result of the one before
waits in the accumulators. A pixel taken at phase 1 of period p reaches the
output buffers at phase 0 of period p+2. `y_valid` therefore rises exactly
**20 clocks** after the `pix_take` of the same pixel. `mag`/`edge_o` follow
one clock later. For the first two periods after reset `ld_out` is held low,
so `y_valid` never shows the reset contents of the pipeline.

### Why the accumulator halves instead of doubling

The bit planes leave the PISOs least significant first. Each `lacc` step
computes `acc <- (acc >>> 1) + F_j * 2^7`, with the sign of the term flipped
on the last plane. After plane j the low 7-j bits of `acc` are zero, so the
halving never drops a one. After eight planes, `acc` holds the integer sum
exactly. The largest intermediate value is below 2^15, so 16 bits
(`ROM_W + PIX_W`) are enough for any 8-bit ROM contents.

### Unsigned pixels in a two's complement filter

The arithmetic treats pixels as two's complement, but the image has grey
levels 0..255. `piso_bank` inverts the top bit of every pixel as it loads it
(parameter `FLIP_MSB`), which turns a grey level p into p-128. Both Sobel
masks sum to zero, so the constant offset cancels and the output equals the
convolution of the unsigned image. If you load a mask that does not sum to
zero, its output is offset by -128 times the mask sum. In that case set
`FLIP_MSB = 0` and feed signed pixels.

### ROM addressing

Address bit `8-(3k+l)` carries the bit of `x(m-k,n-l)`. Address bit 8 is
therefore h(0,0), the newest pixel, and bit 0 is h(2,2), the oldest.
Address 1 holds h(2,2), address 2 holds h(2,1), address 3 holds
h(2,1)+h(2,2), and address 511 holds the sum of all nine coefficients. The
ROM contents come from the `H` parameter through `da_pkg::partial_product`
when the memory is initialised. Another 3x3 mask can therefore be used
without editing a table, as long as every partial sum fits in 8 bits.

## Frame manager and line delays

`line_delay` is a 256 x 8 RAM with one address counter. Its read port is
asynchronous, so `q` always shows the word about to be overwritten: the
sample written 256 advances earlier. The counter advances only on `lr_img`,
so the delay counts pixels, not clocks. Two of these in series give rows m-1
and m-2 of the current column. On each `lr_img`, the column
`(x(m,n), x(m-1,n), x(m-2,n))` enters `win[*][0]` and the older columns move
to `win[*][1]` and `win[*][2]`.

Image borders are not treated specially. At the left edge, the window holds
the last two pixels of the line above. For the first two lines and two
pixels after reset it holds uninitialised RAM. Results for the first
`2*256+2` pixels after reset are not meaningful. Each result is the mask
applied around image position (m-1, n-1), the window centre, where (m,n) is
the pixel just taken.

## Ports of `sobel_da_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pix_in` | in | 8 | pixel, raster order, lines of `LINE` pixels |
| `pix_take` | out | 1 | `pix_in` is sampled at the end of this clock (once every 10 clocks) |
| `thr` | in | 8 | edge threshold |
| `y_ver`, `y_hor` | out | 8 signed | Sobel sums divided by 8 (rounded down) |
| `y_valid` | out | 1 | one-clock pulse per pixel |
| `mag` | out | 8 | floor(sqrt(y_ver^2 + y_hor^2)), at most 181 |
| `edge_o` | out | 1 | `mag > thr` |
| `mag_valid` | out | 1 | one clock after `y_valid` |

Parameters: `LINE` (image width, default 256), and `H_VER`, `H_HOR` (the two
masks, defaults `da_pkg::SOBEL_VER` and `SOBEL_HOR`).

The masks are the standard Sobel operators, with h(k,l) in row k and
column l:

    SOBEL_VER = [-1 -2 -1; 0 0 0; 1 2 1]     change along the row index m
    SOBEL_HOR = [-1  0  1; -2 0 2; -1 0 1]   change along the column index n

Because the window runs from newest (k,l = 0) to oldest (k,l = 2), a
brightness that increases down the image or to the right gives a negative
output.

## Resources

After coarse synthesis the design holds 12288 memory bits:
2 ROMs x 512 x 8 plus 2 line delays x 256 x 8. It also holds about 220
flip-flops and no multiplier in the filter path. The multiplications that do
appear are the two squares in `grad_combine`.

## Where this design makes its own choices

The DA structure follows a published architecture for an FPGA. These parts
follow it: the frame manager built from PIPO shifts and 256-sample RAM
delays, the nine PISOs feeding two 512-word ROMs, two scaling accumulators
with the eighth (sign) plane subtracted, 8-bit ROM words, 8-bit pixels and
two 8-bit outputs. The following choices are this implementation's own:

* The exact phase schedule, including the overlap of `lr_img` with `clacc`,
  the 10-clock period and the warm-up gating of `ld_out`.
* The reset, and the `pix_take`, `y_valid` and `mag_valid` handshake
  signals. The original device had only pixel, clock and gradient pins.
* The mapping of grey levels to two's complement by inverting the top bit.
* The choice of output bits (sum / 8, with saturation).
* The mask values and which of the two is called vertical.
* Gradient combining and thresholding as an on-chip stage, with a run-time
  threshold and the exact floor square root. The original may have done this
  step off-chip; the two gradient outputs remain available on their own
  ports.
* Asynchronous RAM and ROM reads.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_line_delay`: random data with random enable gaps, six wraps of the
  counter.
* `tb_frame_manager`: every window entry, against the stream model
  `x[s - k*LINE - l]` (short line of 16).
* `tb_piso_bank`: every bit plane of 300 random windows, with idle clocks.
* `tb_da_rom`: all 512 words of both ROMs, plus the table rows named above.
* `tb_scaling_acc`: 2000 random and extreme eight-plane sequences against
  `sum F_j 2^j - F_7 2^7`.
* `tb_out_buffer`: scaling, both saturation limits, hold and valid.
* `tb_control_unit`: the strobe pattern clock by clock for 60 periods.
* `tb_grad_combine`: all 65536 gradient pairs.
* `tb_sobel_da_top`: the whole design at its default size. It runs one full
  256x256 frame: a checkerboard, a ramp and random noise. Every gradient,
  magnitude and edge bit is compared with a direct convolution. It also
  checks the 10-clock pixel rate and the 20-clock latency. It fails unless
  positive and negative gradients in both channels, edge and non-edge
  pixels, pixels with the top bit set and clear, and line-delay
  wrap-arounds all occurred. It takes under a second.

To run one with Verilator (the package goes first):

```
verilator --binary --timing --assert -Irtl rtl/da_pkg.sv rtl/*.sv tb/tb_sobel_da_top.sv --top-module tb_sobel_da_top
./obj_dir/Vtb_sobel_da_top
```

The simulator must start uninitialised state at random or zero values. The
RAM contents seen in the first two lines are not checked.
