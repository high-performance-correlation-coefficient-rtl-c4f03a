# corr2: a correlation-coefficient engine for 8-bit images

This block computes the 2-D correlation coefficient between a reference image A and a stream
of images B, as MATLAB's `corr2` does:

```
        sum (A - meanA)(B - meanB)                     Y
r = ----------------------------------------  =  -------------
    sqrt( sum (A - meanA)^2 * sum (B - meanB)^2 )   sqrt(X * Z)
```

The work is split between hardware and software. The hardware does everything that touches
every pixel: it fetches the images from memory, forms the two means and accumulates X, Y and Z.
The processor adds the four per-lane partial sums and does the one division and the one square
root per image. It was built for a Cyclone V SoC, where the processor
programs the block over one Avalon-MM port and the block reads the images from memory over
another. The RTL does not depend on any vendor primitive.

Three ideas make it fast:

* **Four pixels per clock.** Pixels are 8 bits, packed four to a 32-bit word. Four identical
  arithmetic blocks (CALBs), one per byte lane, each take one pixel pair per clock.
* **The reference image is read from memory once.** FIFO A keeps image A. During every pass the
  words read out of FIFO A are written straight back into it, on the *feedback path*. A is
  then compared against any number of images B without being fetched again.
* **Loading overlaps computing.** While image B is fetched into FIFO B, the accumulator sums its
  pixels, so B's mean is ready when the last word arrives. While the CALBs run a pass over one
  image B, the DMA can already fetch the next one into the same FIFO.

## Data flow

```
             Avalon-MM burst read                       +-------------+
 memory ==================> corr2_dma --+--> FIFO A ---+->|  4 x CALB   |--> XZ[0..3], Y[0..3]
                                         |      ^        |  |  (one per  |
                                         |      +--------+  |  byte lane)|
                                         |     feedback     |            |
                                         +--> FIFO B ------>|            |
                                         |                  +------------+
                                         +--> accumulator --> mean divider --> meanA / meanB
 processor <== Avalon-MM slave ==> corr2_csr (registers, commands, status)
```

A session runs in four steps. The processor starts each one through the registers.

1. **Load A.** The DMA copies image A into FIFO A and clears FIFO A first. The accumulator sums
   the pixels. When the DMA finishes, the mean divider produces `meanA`.
2. **X pass.** FIFO A is read through the CALBs with A on both inputs, and fed back into itself.
   Each lane's `XZ` then holds X, the lane's sum of `(a - meanA)^2`. With both inputs equal, `Y`
   holds the same value.
3. **Load B.** The DMA copies image B into FIFO B, and the accumulator and divider produce
   `meanB`. B waits in FIFO B until its mean is known. The mean is needed before any deviation
   can be formed.
4. **YZ pass.** A and B are read word by word together, and A is fed back again. Each lane's `XZ`
   then holds Z, and `Y` holds the cross sum. FIFO B ends empty and FIFO A still holds A.

Steps 3 and 4 repeat for every image B. A pass copies both means when it starts, and it reads
exactly as many words as A has. So step 3 for the next image may start as soon as step 4 has
started. The new words queue behind the ones the pass is still reading. The DMA's FIFO
threshold stops the fetch if FIFO B would overflow.

Software then forms, per image,

```
X = XZ[0]+..+XZ[3] (from the X pass)   Z = XZ[0]+..+XZ[3]   Y = Y[0]+..+Y[3]   r = Y / sqrt(X*Z)
```

### The means are truncated

`meanA` and `meanB` are integers: the pixel sum divided by the pixel count, with the fraction
dropped. The deviations are therefore taken from a mean that may be up to one grey level low.
Summed over all four lanes of an image with N pixels, this gives

```
Y' = Y + N*da*db     X' = X + N*da^2     Z' = Z + N*db^2      (0 <= da, db < 1: the dropped fractions)
```

For images with real contrast this error is far below one part in a thousand of r. It matters
only for nearly flat images. This behaviour is deliberate: it reproduces a small
reference case exactly. Two 32-word images hold 1..32 in every lane, and 1+l..32+l in lane l.
Their sums are 0x840 and 0x900, their means 16 and 18, X = 0xAB0, and the lane results are
Z = 0xAF0, 0xAB0, 0xAB0, 0xAF0 and Y = 0xA90, 0xAA0, 0xAB0, 0xAC0. `corr2_ip_full_tb` checks
exactly these values.

## The CALB

Each CALB (custom arithmetic logic block) has two pipeline stages:

* **Stage 1.** It forms `da = a - meanA` and `db = b - meanB` as 9-bit signed values and
  registers the two products, `db*db` and `da*db`. Each product is 17-bit signed.
* **Stage 2.** It adds the products into `xz` (unsigned) and `y` (signed), both 32 bits.

A pair presented with `in_valid` appears in the sums two clocks later. The CALB has no mode
input: an X pass differs from a YZ pass only in what the sequencer feeds it. The 32-bit sums
are wide enough for the largest image: 16320 words per lane times 255^2 is below 2^31.

## Registers

Avalon-MM slave with a 5-bit word address. A read returns its data one clock after `s_read`.
Writes take effect at the clock edge.

| addr | name | access | content |
|---|---|---|---|
| 0 | VERSION | R | 0xABCD0001 |
| 1 | DMA_START | RW | byte address of the first image word |
| 2 | DMA_END | RW | byte address one past the last word (image = (END-START)/4 words) |
| 3 | DMA_BURST | RW | words per burst, 1..64 (0 acts as 1); reset value 1 |
| 4 | DMA_THRESH | RW | FIFO fill limit the DMA respects (0x3FFF for a full 16384-word FIFO) |
| 5 | CTRL | RW | bit 0 `fifo_sel` (0: load into A, 1: into B), bit 1 `calb_mode` (0: X pass, 1: YZ pass), bit 2 `feedback` |
| 6 | CMD / STATUS | W / R | write: bit 0 starts a load, bit 1 starts a pass. read: bit 0 DMA busy, bit 1 mean busy, bit 2 pass busy, bit 3 pass done, bit 4 meanA valid, bit 5 meanB valid |
| 7, 8 | FIFOA_USED, FIFOB_USED | R | words stored |
| 9 | ACC | R | pixel sum of the last loaded image |
| 10, 11 | MEAN_A, MEAN_B | R | integer means |
| 12 | PIXELS | R | pixel count of the last loaded image |
| 16..19 | XZ[0..3] | R | per-lane X or Z |
| 20..23 | Y[0..3] | R | per-lane cross sum, two's complement |

A command is visible in the first status read that follows the write. A load reports busy
(bit 0 or bit 1) until its mean is stored. A pass clears "pass done" when it starts and sets
it when its last product is in the sums.

Some commands are refused, that is, dropped without effect:

* A load of A while a pass runs. The pass owns FIFO A.
* A pass while A is still loading.
* A pass whose mean is not yet valid: meanA for an X pass, meanA and meanB for a YZ pass.
* Any command to a unit that is already busy.

A dropped command never shows as busy in the status.

A typical driver sequence:

```
DMA_START, DMA_END, DMA_BURST=64, DMA_THRESH=0x3FFF; CTRL=0b100; CMD=1; poll STATUS[1:0]==0   load A
CTRL=0b100; CMD=2; poll STATUS[3]; read XZ[0..3] -> X                                          X pass
DMA_START/END of B; CTRL=0b101; CMD=1; poll STATUS[1:0]==0                                     load B
CTRL=0b110; CMD=2; (optionally start the next load of B now); poll STATUS[3]; read XZ, Y       YZ pass
```

## DMA and flow control

`corr2_dma` is an Avalon-MM burst read master. It splits the range into bursts of
`DMA_BURST` words and shortens the last one to the words left. It keeps the request stable
while `m_waitrequest` is high, and an assertion checks that. It may request the next burst
before the previous one has returned all its words.

Memory cannot be stalled once it has accepted a burst. So the DMA counts the words it has
requested but not yet received, and it asks for a new burst only if this holds:

```
FIFO words used + words in flight + new burst length <= DMA_THRESH
```

A FIFO therefore never overflows, and this is also what throttles a load that runs behind a
pass. Long bursts matter on a real SoC bus. On the boards this design targets, 64-word bursts
load an image about five times faster than single-word reads. Longer bursts gained nothing
more, so the burst count is limited to 64.

## Timing

* One pass over an N-word image takes N + 5 clocks from the accepted command to "done". That
  is one word, or four pixels, per clock.
* The mean is ready about 35 clocks after the last word of a load has arrived.
* A load runs at whatever rate the memory returns words, at most one word per clock.
* Everything is in one clock domain, with an asynchronous active-low reset `rst_n`.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `corr2_ip.FIFO_DEPTH` | 16384 | words per FIFO. The largest image the engine is specified for is 16320 words (65280 pixels), so both FIFOs hold it, and the default threshold 0x3FFF fits. |
| `corr2_pkg` constants | 32 / 8 / 4 / 32 / 7 | word, pixel, lanes, accumulator and burstcount widths |

At the default size each FIFO is 512 Kbit, which maps to block RAM. Any image from 1 word
(4 pixels) to 16320 words fits. A YZ pass needs B to have the same number of words as A.

## Where this RTL goes beyond the description it was built from

The data flow above is taken from the original design. That covers the DMA with burst count
and threshold, FIFO A with feedback, FIFO B holding B until summed, the summing accumulator,
the four CALBs with their XZ/Y results, and the split of r between hardware and software. So
are the version word, the register set and the reference values. The following are choices
made here, because the original gives no detail:

* **Registers and control.** The register addresses and bit fields, the command/status
  handshake and the interlocks.
* **Mean divider.** The mean is computed in hardware with a serial divider. The original does
  not say where it is formed.
* **Passes.** X is computed in a separate pass right after loading A. A pass copies its means
  when it starts, which is what lets the next load overlap it.
* **CALB internals.** The two-stage pipeline and having no mode input.
* **Buses.** The bus signals are Avalon-MM, and the end address is a byte address one past
  the last word.
* **FIFOs.** A FIFO read has one clock of latency. A load of A empties FIFO A first, while
  FIFO B is never emptied by a command.

The original builds the processor, the memory and the bus bridge from the SoC and does not
design them. They are outside this RTL, so the block brings out its two Avalon ports instead.

## Files

`rtl/`

* `corr2_pkg.sv`: widths, register addresses, CTRL/CMD/STATUS structs.
* `corr2_ip.sv`: top level. It also holds the load/pass interlocks and the means.
* `corr2_csr.sv`: the register slave.
* `corr2_dma.sv`: the burst read master.
* `corr2_fifo.sv`: the image FIFO, used twice.
* `corr2_accumulator.sv`: the pixel sum and count.
* `corr2_mean_div.sv`: the serial divider.
* `corr2_calb_seq.sv`: the pass sequencer and the FIFO A feedback.
* `corr2_calb.sv`: one lane's arithmetic.

`tb/` has one self-checking testbench per module (`<module>_tb.sv`), plus these:

* `corr2_ip_tb.sv`: the end-to-end test at a 64-word FIFO depth. It loads A and three images
  B with different burst sizes. It starts a load behind a running pass so that the threshold
  stall happens, tries refused commands, checks every result register against sums computed
  in the testbench, and counts that each mechanism occurred.
* `corr2_ip_full_tb.sv`: the engine at default size. It runs the 32-word reference case with
  its known results, then the largest image, 16320 words, against a second one.
* `corr2_ip_sizes_tb.sv`: the size sweep at default size. It runs every image size at which
  the engine's speed-up over software was measured, 1 to 16320 words, with bursts of up to 64 words. It checks all results
  and prints the load cycles for each size.
* `corr2_avmm_mem.sv`: a behavioural memory. It answers bursts with random wait states and
  gaps.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/corr2_pkg.sv tb/corr2_ip_tb.sv \
          --top-module corr2_ip_tb -Mdir obj_ip
./obj_ip/Vcorr2_ip_tb
```

Replace `corr2_ip_tb` with any other testbench name. Files are found by module name, so one
file per module is required. The full-size test runs in well under a second of CPU time.
Verilator lint with `--lint-only -Wall` reports only unused package constants and the
`SYNCASYNCNET` note. That note appears because the assertions sample `rst_n` synchronously
while the flops use it as an asynchronous reset.
