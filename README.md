# RGB to YCbCr image pipeline on a block RAM

This design runs a pixel-by-pixel image operation on an FPGA without any camera or display
hardware. The whole image sits in on-chip block RAM, and a plain counter reads it out. Each
pixel goes through the processing datapath, and the results leave as a stream that can be
captured into a file and turned back into a picture offline.

The processing here is the colour-space conversion from RGB to YCbCr. Y is luminance. Cb and Cr
are blue-difference and red-difference chrominance. The three components are far less
correlated than R, G and B, which is why skin segmentation and JPEG-style chroma subsampling use
them.

One pixel is converted per clock. A 160 x 106 image takes 16,960 clocks per pass, plus 3 clocks
of latency.

## Data flow

```
             load_we/load_addr/load_pix
                        |
                        v
 run --> addr_gen --> [addr mux] --> image_bram --> rgb2ycbcr --> out_pix (Y,Cb,Cr)
          (counter,      (load has      (16960 x 24,    (2-stage      |
           wraps)         priority)      write-first)     pipeline)    +--> comp_sel mux --> w_data[7:0]
            |                                                          |
            +--- index / last tags, delayed 3 clocks ------------------+--> out_index, out_last
```

- **Memory.** `image_bram` holds the image in raster order: row 0 first, left to right. Each word
  is one pixel: R in bits 23:16, G in 15:8 and B in 7:0.
- **Scan.** `addr_gen` is a free-running counter. While `run` is high it presents address 0, 1,
  ..., 16959, then wraps to 0. The image is therefore read again and again.
- **Conversion.** `rgb2ycbcr` converts each pixel as it comes out of the memory.
- **Output.** `image_proc_top` tags each result with its pixel index and an end-of-image flag.
  The 8-bit output `w_data` carries one component of each pixel, chosen by `comp_sel`. An offline
  capture takes one pass per component, so three passes give the Y, Cb and Cr images.

### Timing

Cycle numbers below count clock periods. If a read is requested in cycle n (`run`=1, `load_we`=0),
that pixel appears in cycle n+3:

| cycle | what happens                                                   |
|-------|----------------------------------------------------------------|
| n     | the counter's address is on the memory port                    |
| n+1   | the memory returns the RGB word; the conversion products are formed |
| n+2   | the products are summed, rounded and registered                |
| n+3   | `out_valid`=1; `out_pix`, `out_index`, `out_last` and `w_data` are valid |

There is no back-pressure on the output: whatever receives the stream must take one pixel per
clock while `out_valid` is high.

There are two ways to create gaps in the stream:
- **Stall.** Pulling `run` low stops the counter, and the stream has a gap 3 clocks later.
- **Load.** Asserting `load_we` takes the single memory port for that clock. The scan pauses for
  that clock and then resumes where it stopped. No pixel is skipped or repeated.

`rst_n` is synchronous and active low. It returns the counter to pixel 0 and empties the valid
pipeline. The image memory is not cleared.

## The colour conversion

The conversion matrix and offsets are:

```
Y  =  16 + 0.184 R + 0.614 G + 0.062 B
Cb = 128 - 0.101 R - 0.339 G + 0.439 B
Cr = 128 + 0.439 R - 0.399 G - 0.040 B
```

These are the studio-swing (16..235 luma, 16..240 chroma) coefficients, except that the R weight
of Y is 0.184 rather than the more usual 0.183. The design uses 0.184.

**Fixed point.** Each coefficient is held in signed fixed point with `FRAC` = 12 fractional bits,
rounded to nearest. `ip_pkg::coef_fix` computes the constants from the real-valued matrix at
elaboration, so changing `FRAC` or a matrix entry needs no hand-made table. At `FRAC` = 12 the
constants are:

|    | R    | G     | B    | offset      |
|----|------|-------|------|-------------|
| Y  | 754  | 2515  | 254  | 16 x 4096   |
| Cb | -414 | -1389 | 1798 | 128 x 4096  |
| Cr | 1798 | -1634 | -164 | 128 x 4096  |

**Stage 1.** The nine products are formed in parallel. Each is an unsigned 8-bit colour times a
signed 13-bit constant, giving a 22-bit signed result.

**Stage 2.** For each component, the stage adds:
- the three products of its row,
- its offset,
- half an LSB (2048), which gives round-to-nearest.

It then keeps bits [19:12] of the sum.

**Accuracy.** Coefficient rounding adds at most 3 x 255 x 2^-13 ≈ 0.09 LSB of error. So every
output is within 0.6 LSB of the exact real-valued result, and that is what the testbenches check.

**Why there is no clamp.** For any 8-bit R, G and B, the exact results lie in:
- Y: 16 .. 235.3
- Cb and Cr: 15.7 .. 240.0

Taking 8 bits of the sum therefore never wraps. A simulation assertion in `rgb2ycbcr` guards
this. If you change the matrix so that results can leave 0..255, add saturation in stage 2.

## Image memory

`image_bram` is a single-port synchronous RAM, 24 bits wide, with its enable always active. It
runs in write-first mode: a write also shows the written word on `dout` in the next clock. Reads
have one clock of latency.

**Size.** The default depth is exactly one 160 x 106 image: 16,960 words and 15 address bits,
407,040 bits in all. This is the main departure from the memory specification the design follows:

- That specification lists 10 address lines (1,024 words), a configured depth of 2,000 words and
  a size of "1 MB". These numbers disagree with each other.
- None of them matches the 160 x 106 images the pipeline is meant to process.

The depth here is sized for the image. Set `IMG_W`/`IMG_H` on the top, or `DEPTH` on the memory,
for other sizes.

Addresses from `DEPTH` up to 2^AW - 1 read as zero, and writes to them are ignored.

**Filling the memory.** There are two ways:
- **Through the loading port** (`load_we`, `load_addr`, `load_pix`): one pixel per clock, with
  priority over the scan.
- **At start-up from a hex file** (`INIT_FILE`), read with `$readmemh`. The file holds one 24-bit
  RGB word per line, in raster order. It plays the part of the memory-initialisation file used
  when the block RAM is generated. Vendor `.coe` files have a two-line header
  (`memory_initialization_radix`/`memory_initialization_vector`) and comma separators. Strip
  those to get this format.

## Component output

The offline capture records one 8-bit value per pixel, so `w_data` carries a single component:

| `comp_sel` | `w_data` |
|------------|----------|
| 0 (`COMP_Y`)  | Y  |
| 1 (`COMP_CB`) | Cb |
| 2 (`COMP_CR`) | Cr |

The full pixel is always available on `out_pix`, with Y in bits 23:16, Cb in 15:8 and Cr in 7:0.
`comp_sel` acts combinationally on the current output. Switch it on the clock after `out_last`
to change component at an image boundary.

## Files

| file | contents |
|------|----------|
| `rtl/ip_pkg.sv` | pixel structs, component enum, default image size, conversion matrix and fixed-point helper |
| `rtl/image_bram.sv` | single-port write-first image memory |
| `rtl/addr_gen.sv` | wrapping scan counter with enable and last flag |
| `rtl/rgb2ycbcr.sv` | two-stage fixed-point colour converter |
| `rtl/image_proc_top.sv` | the pipeline: memory, counter, converter, output tagging and component select |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_image_init` |
| `tb/test_image_8x4.hex` | 8 x 4 preload image for `tb_image_init`; word i = {32x+7, 60y+3, 37i mod 256} with x = i mod 8, y = i / 8 |

### Parameters of `image_proc_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W` | 160 | columns |
| `IMG_H` | 106 | rows; memory depth is `IMG_W*IMG_H`, address width `$clog2` of that |
| `FRAC` | 12 | fractional bits of the conversion constants (this design's choice) |
| `INIT_FILE` | `""` | hex file to preload the image memory from, path relative to the simulator's working directory |

## Resources

At the default size, the design needs:
- **Memory:** one 407,040-bit memory for the image.
- **Arithmetic:** nine constant multipliers (8-bit by 13-bit) and three 3-input adders.
- **Pipeline registers:** a few hundred bits, for the counter, the tags and the converter's product and result stages.

The design has no other state.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rgb2ycbcr` | Corner pixels and 20,000 random pixels with random valid gaps. Each component must be within 0.6 LSB of the real-valued matrix. `out_valid` must come exactly 2 clocks after `in_valid`. |
| `tb_image_bram` | Fills and reads back the full 16,960-word memory, then runs 40,000 random mixed reads and writes against a model. Also checks one-clock read latency, write-first output, and out-of-range addresses. |
| `tb_addr_gen` | A depth-10 counter and a full-depth counter run against a reference under random enables and a mid-run reset, with required wraps. |
| `tb_image_proc_top` | End to end at the default size, parameters untouched (details below). |
| `tb_image_init` | Preloads an 8 x 4 image from `tb/test_image_8x4.hex` and scans it twice. Checks the pixels, the unbroken one-per-clock stream, and that the first pixel arrives in cycle 3. |

`tb_image_proc_top` does the following:
- Loads a generated image through the port: red and green ramps, random blue, and black, white
  and primary pixels.
- Scans the image three times, selecting Y, Cb and Cr in turn.
- Inserts random stalls, and rewrites pixels ahead of the scan while it runs.

On every clock it checks:
- the 3-clock valid timing,
- raster order, index and end-of-image flag,
- all three components,
- `w_data`.

It also counts each mechanism: loads, stalls, scans paused by a load, image wraps, and each
component selection. It fails if any of them never happened.

To run one with Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ip_pkg.sv tb/tb_image_proc_top.sv \
          --top-module tb_image_proc_top
./obj_dir/Vtb_image_proc_top
```

Replace the testbench name to run the others. `tb_image_init` must be run from the repository
root, because it opens its hex file by relative path. All testbenches use only two-state values
and `$urandom`.

## What is this design's own

Followed from the specification:
- the block RAM, 24 bits wide, single-port, always enabled, write-first;
- reading the memory with a free-running sequential counter;
- the conversion matrix and offsets;
- the 160 x 106 image size;
- 8-bit processed output data.

This design's own choices:
- the memory depth (see above);
- the fixed-point format and the 2-stage pipeline;
- the loading port and its priority over the scan;
- the `run` stall, `rst_n`, the output tags (`out_valid`, `out_index`, `out_last`) and the
  component selector.

The offline steps around the hardware are not part of the RTL. They are: converting a JPEG into
a memory file, writing the output stream to a text file, and reshaping that file into an image.
The camera that acquires the image is not part of it either. The testbenches stand in for those
steps by generating images and checking the stream directly.
