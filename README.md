# Geometric moments from a cascade of accumulators

This design computes all geometric moments of an 8-bit image,

    m(p,q) = sum_x sum_y f(x,y) * x^p * y^q,      0 <= p, q <= K,

for images of up to 512 x 512 pixels and orders up to K = 59 in each direction. The order and
the image size are set at run time.

It uses no multiplier per pixel. A chain of K+1 accumulators (a feed-forward digital filter)
turns a pixel stream into binomially weighted sums. Fed the row in reverse order, stage r of the
chain ends up holding

    sum_x f(x) * C(x + r, r).

The same chain filters every row and then the columns of the row results, giving

    Y(r,s) = sum f(x,y) C(x+r,r) C(y+s,s).

A small matrix product per image turns Y into moments, because x^p is a fixed combination of
the binomials:

    x^p = sum_{r<=p} c(p,r) C(x+r,r).

Integer widths grow quickly: the order-59 values exceed 500 bits. So the datapath stores
numbers as a mantissa plus a radix-2 scale-factor. A whole filtering operation shares one
scale-factor, and every stage is halved together when any stage of that operation overflows.

## Dataflow

```
pixels -> single scaler -> K+1 filter structures -> row buffer (RAM, data + scale-factors)
             ^   (row pass, then column pass)    |           |
             |___________________________________|___________|   scale-factor compare (max)
                                                 v
                                          intermediate RAM  (Y(r,s), data + scale-factors)
                                                 v
      coefficient generator -> multiplier -> accumulator -> matrix multiplication RAM
                                                 v
                                 moments m(p,q) with scale-factors
```

| Part | File | What it does |
|---|---|---|
| top | `gm_top.sv` | Wires everything together; host ports. |
| control | `gm_control.sv` | Shadow configuration, `image_ready`/`start`, semaphore on the intermediate RAM. |
| digital filter module | `digital_filter.sv` | Scaler, cascade, row buffer, scale-factor compare, address generator 1. |
| address generator 1 | `addr_gen1.sv` | Runs the row pass and the column pass; addresses both RAMs. |
| single scaler | `single_scaler.sv` | Aligns each sample to the scale-factor of its operation. |
| cascaded filters | `cascaded_filters.sv`, `filter_structure.sv` | K+1 accumulator stages, overflow OR, two serial output chains. |
| scale-factor compare | `sf_compare.sv` | Maximum row scale-factor of an image. |
| RAMs | `dp_ram.sv` | One write port and one registered read port; used three times. |
| matrix multiplication module | `matmul.sv` | Address generator 2, coefficient generator, multiplier, accumulator, RAM. |
| address generator 2 | `addr_gen2.sv` | Loop nest of the two triangular products. |
| coefficient generator | `coef_gen.sv` | Computes c(p,r) row by row with shifts and adds. |
| multiplier / accumulator | `mm_multiplier.sv`, `mm_accumulator.sv` | Mantissa × mantissa with scale-factors added; floating-style accumulation. |
| normaliser | `sf_normalize.sv` | Rounds a wide signed value to a narrow mantissa plus a shift. |
| constants | `gm_pkg.sv` | Default widths and sizes. |

## The filter cascade and its scale-factors

Stage r computes

    y_r(n) = y_r(n-1) + y_{r-1}(n),

where y_{-1} is the incoming sample. Each stage has its own register, so there is no long
adder chain. A sample enters stage 0 and moves one stage per cycle, carrying a token with these
fields:

- `valid`;
- `first`, which starts a new sum instead of adding to the old one;
- `last`;
- `slot`, which says which of the two operations the sample belongs to.

At most two filtering operations share the cascade at one time: the tail of one row and the
head of the next. They are told apart by the slot bit, which the scaler toggles at the start of
each operation.

**Overflow.** Operands are kept non-negative and below 2^(W-1). A stage whose sum reaches bit
W-1 raises its overflow condition for the slot of the sample it holds. The conditions are ORed
over all active stages into `overflow 0` and `overflow 1`. In the same cycle, every stage working
for that slot halves (round half up) the value it is writing or holding. This includes the serial
output registers of that slot. Because the whole operation halves together, one scale-factor per
operation stays exact.

**Single scaler.** The scaler keeps the scale-factor of each slot. It adds any overflow of the
current cycle, then right-shifts each new sample, with rounding, by that updated scale-factor
minus the sample's own scale-factor. This way later samples enter already scaled. For row
filtering, pixels come in with scale-factor `pixel_sf` (normally 0). For column filtering, each
operation starts at the largest row scale-factor of the image, which the scale-factor compare
found. The row results, stored with their own scale-factors, are shifted to match.

**Masking signals.** Each stage has three masking signals:

- The first and second tell the stage that it belongs to the slot-0 or the slot-1 operation.
  This comes from its token or its held data.
- The third enables the stage at all. It is cleared at configuration load, then a one is
  shifted in for K+1 cycles, so only stages 0..K take part and raise overflows.

**Output chains.** Each stage holds two serial registers, one chain per slot. When the last
sample of an operation reaches stage r, that stage's final value is captured into the slot's
chain. Once stage K has captured, the chain shifts toward stage 0 for K+1 cycles. Stage 0's
register is the output, giving orders 0..K in turn, each with the operation's scale-factor. This
requires at least K+1 samples per operation (N, M > K), so a chain is empty again before its slot
comes back.

## Row pass, column pass and timing

Address generator 1 streams the image through the cascade, one row per operation. The K+1
outputs of each row go into the row buffer at `row*(MAXORD+1) + order`.

Then it runs K+1 column operations. Operation r reads order r of every row, and its K+1 outputs
Y(r,0..K) go to the intermediate RAM at `s*(MAXORD+1) + r`. Operations run back to back, with no
idle cycles between them.

Filtering one image takes

    w*h + (K+1)*h + 4K + 7 cycles

(row pass, column pass, pipeline fill). For 512 x 512 and K = 59 this is 293,107 cycles. The
testbenches check this number exactly. When the intermediate RAM is still occupied by the
previous image, the column pass waits for it (the cycles counted in the `S_WAITCOL` state).

## Macro pipeline

The intermediate RAM holds one image's Y matrix. A full/empty flag in the control acts as a
semaphore:

- It is set when column filtering finishes.
- It is cleared when the matrix multiplication has issued its last read of Y.

Column filtering of the next image waits while the flag is set. Meanwhile its row pass can
already run, so the row filtering of image i+1 overlaps the matrix multiplication of image i.

## Matrix multiplication and coefficients

The conversion is two triangular products:

    phase 1:  T(p,s) = sum_{r<=p} c(p,r) Y(r,s)        (reads the intermediate RAM)
    phase 2:  m(p,q) = sum_{s<=q} c(q,s) T(p,s)        (reads the matrix multiplication RAM)

Each phase issues (K+1)^2 (K+2)/2 multiply-accumulates, which is 109,800 for K = 59. Results
come out in q-major order, p fastest.

**Coefficients.** The coefficients obey

    c(0,0) = 1,    c(p+1,r) = r*(c(p,r-1) - c(p,r)) - c(p,r),

so c(p,r) = (-1)^(p-r) r! S(p+1,r+1), with S the Stirling numbers of the second kind.

- The generator keeps two RAMs of exact 297-bit integers: the row being read and the row being
  built.
- It builds row p+1 from row p while row p is in use. Multiplication by r is done by
  shift-and-add.
- On read, each coefficient is rounded to a 33-bit mantissa plus scale-factor.
- Address generator 2 waits whenever the next row is not ready yet. This happens for the small
  rows at the start.

**Datapath.** The multiplier forms a 302-bit product (270 × 33 bits) and adds the
scale-factors. The accumulator aligns each product to the larger scale-factor with a rounding
right shift, adds, and halves on overflow. Phase-1 sums are rounded back to 270 bits before they
go into the matrix multiplication RAM.

## Number formats

| Quantity | Bits |
|---|---|
| pixel | 8 |
| scale-factor | 14 |
| filter operand | 270 |
| coefficient mantissa | 33 |
| product and accumulator | 302 |
| exact coefficients | 297 |

A moment is `moment * 2^moment_sf`, with `moment` in two's complement.

## Host interface

1. Write `cfg_order`, `cfg_w`, `cfg_h` with a one-cycle `cfg_we`. The values are held until
   every image in flight is finished, then applied. Reset applies order 59 with 512 × 512 by
   itself.
2. Wait for `image_ready`, then pulse `start`.
3. Send `cfg_w*cfg_h` pixels with `pixel_valid`, in reversed raster order: the pixel
   (w-1, h-1) first, x decreasing fastest. Gaps in `pixel_valid` are allowed.
4. Read the (K+1)^2 moments from `moment_valid`, `moment`, `moment_sf`, `moment_p`,
   `moment_q`.

The next image may be started as soon as `image_ready` returns, which is before the moments of
the previous one are out.

## Accuracy

**Without overflow.** When nothing overflows, for example in small images, the moments are
exact.

**With overflow.** With overflow, each filtering operation has a single scale-factor shared by
all K+1 orders. Low orders of an operation that also produces very large high orders keep only
a few significant bits.

On the uniform 0xFF 512 × 512 image at K = 59 (`tb_gm_full`):

- The mean relative error over the 3600 moments is 0.54 %.
- Every moment with q >= 1 is within 1.7 %.
- The m(p,0) column is much worse. Y(r,0) comes from the same column operation as Y(r,59), and
  the alternating-sign conversion amplifies its rounding. The error grows past 10 % from about
  p = 36, and a few of these moments even come out with the wrong sign.

This is a property of the shared scale-factor, and the testbench reports it rather than hiding
it. A user who needs accurate low-q moments at high p should run a second pass with a smaller K.

## Departures from the document and own choices

- **One clock domain.** The document synthesises the filter and matrix modules in two clock
  domains.
- **One order K for both directions.** The document allows different p and q.
- **Back-to-back column operations.** These take (K+1)·h cycles, instead of the document's
  (q+1)(N+p+1).
- **Cycle counts at 512 × 512, K = 59:**
  - filtering 293,107 (document: 323,890);
  - matrix multiplication 219,735 (document: 220,080).
- **Coefficient recurrence.** The recurrence above and the exact 297-bit coefficient store are
  this design's; the document takes its coefficients from elsewhere.
- **Configuration range.** Configuration is applied only when idle. Sizes need not be powers of
  two, but N and M must exceed K.
- **Not built:** the host, and any external frame memory.
- **Own choices:** rounding mode (half up), RAM word layout `{scale-factor, data}`, state
  machines and address layouts.

## Simulating

Every testbench in `tb/` is self-checking and ends with `TB_RESULT checks=.. failures=..`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gm_pkg.sv tb/tb_gm_top.sv --top-module tb_gm_top -Mdir obj_top
./obj_top/Vtb_gm_top
```

Replace `tb_gm_top` with any other testbench. `-Irtl` lets Verilator find the modules by file
name.

**End-to-end test.** `tb_gm_top` runs two generators at order 5 on 16 × 12 and 8 × 6 images:

- One has the full 270-bit datapath and must match the exact moments bit for bit.
- One has a 24-bit datapath that overflows and must stay within 2 %.

It counts these mechanisms and fails if any never occurred:

- overflow in both slots;
- both output chains;
- column alignment shifts;
- coefficient waits;
- semaphore stalls;
- overlap of the two modules;
- pixel gaps;
- reconfiguration.

**Full-size test.** `tb_gm_full` runs the default configuration on one 512 × 512 image. It
compiles in about three minutes and simulates in about 15 seconds.

**Changing sizes.** The defaults are in `gm_pkg.sv`. Every module takes them as parameters, so a
smaller generator is a parameter list on `gm_top`, as in `tb_gm_top`.
