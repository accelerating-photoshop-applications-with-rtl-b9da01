# Grayscale conversion on an SRAM-coupled FPGA board

This is the FPGA side of a colour-to-grayscale image filter. The FPGA sits on
a PCI card next to 2 MB of SRAM. The host PC cannot feed the FPGA pixel by
pixel at a useful rate, because each register access to the FPGA costs
several bus transactions. So the work is done in batches through the SRAM:

1. The host writes a block of RGB pixels into the SRAM.
2. The host hands the whole 32-bit SRAM bus to the FPGA and starts it.
3. The FPGA reads every pixel, computes its gray value and writes the results
   back to the SRAM, four results per 32-bit word.
4. The host takes the bus back and reads the results.

The card's bus switching and the PCI side are not part of this RTL. The FPGA
converts pixels with a shift-and-add network, so it needs no multiplier:

    gray ≈ 0.299 R + 0.587 G + 0.114 B

It sustains 1.25 clock cycles per pixel. That is one SRAM read per pixel plus
one SRAM write per four pixels. At the original board's 20 MHz clock, that is
62.5 ms per million pixels.

The design follows a published description of a Photoshop filter plug-in
accelerated this way on a Xilinx XC6200 board. That description gives:

- the overall structure
- the R coefficient decomposition
- the 4-read/1-write access pattern
- the 19-bit address
- the SRAM macro's role and its CLK/CLK2/RDWR inputs

Much of the detail is this design's own: the G and B decompositions, every
handshake, the timing inside the SRAM cycle, the byte layout and the control
interface. The section "Own choices and departures" lists each of them.

## Memory layout

The SRAM has two 16-bit banks on a shared 19-bit word address. The FPGA sees
it as 512K words of 32 bits. Bank 0 holds bits 15:0 and bank 1 holds bits
31:16.

| Words | Contents |
|---|---|
| `0 .. N-1` | input: one pixel per word, `{unused[31:24], R[23:16], G[15:8], B[7:0]}` |
| `WR_BASE .. WR_BASE + N/4 - 1` | results: pixel `4k+i` in byte `i` of word `WR_BASE + k` |

`WR_BASE` defaults to `0x40000`, the upper half. A job of 262,144 pixels
(2^18) then fills exactly the lower half with input and uses the first 64K
words of the upper half for results. Larger images are processed in several
iterations, for example five for a 1280 x 1024 image.

With `same_base = 1` the results are written from word 0 instead, on top of
the input. This is safe because result word `k` is written only after pixels
up to `4k+7` have been read, and those include its own four pixels. With this
mode, a job can use nearly the whole memory (up to 524,284 pixels, since
`num_pixels` is 19 bits).

## The access schedule

This is the part that takes the most care. `access_fsm` repeats a fixed
five-cycle pattern:

    cycle:   0  1  2  3  4   5  6  7  8  9   10 ...
    bus:     R  R  R  R  -   R  R  R  R  W0  R  R  R  R  W1 ...   (Wk = result word k)

Reads are issued back to back at consecutive addresses. The fifth cycle of
each group is a write slot. A result word is not ready in the slot right
after its own four reads, because a read's gray value appears five cycles
after the read is issued:

- request registered in the macro: +1 cycle
- SRAM access and capture in the from-SRAM buffer: +1
- datapath stage 1: +1
- datapath stage 2: +1
- packer register: +1

So the write slot after group `k` carries the word of group `k-1`:

- The first write slot of a job stays empty.
- After the last read, the controller enters a drain state and writes the
  last word as soon as the packer reports it.

A job of N pixels takes 5N/4 + 5 cycles from the start pulse to `done`, as
measured in simulation.

The margin is one cycle. Group `k-1`'s word becomes pending in the cycle
just before the slot that writes it. If you lengthen the read path (for
example, more pipeline stages in the datapath), the word misses its slot and
is overwritten by the next group. The packer's `a_no_overrun` assertion
catches this. If you need a longer path, give the packer a second word
register or let the controller wait in the write slot.

The address comes from `address_gen`. It has two enabled counters (pixels
read, words written) and a 19-bit multiplexer. The controller's `sel_wr`
switches that multiplexer in the same cycle as it drives `req` and `rdwr`.

## SRAM macro timing

`sram_macro` turns one request per CLK cycle into SRAM strobes. CLK2 runs at
twice the CLK rate, and its rising edges are aligned with those of CLK.

- At the CLK edge that samples a request, the macro latches the address,
  direction and write word into its registers (the to-SRAM buffer holds the
  write word). It drives them to both banks for the whole next cycle.
- **Read:** `oe_n` is low for that cycle. The word is captured into the
  from-SRAM buffer at the following CLK edge. `rdata_valid` comes two cycles
  after the request.
- **Write:** the data bus is driven for the whole cycle. `we_n` is low only
  between the first and second falling edges of CLK2 in that cycle. That
  leaves a quarter CLK period of setup and hold on each side.

The CLK2 logic is two registers on the falling edge of CLK2. They sample a
CLK-domain toggle flop half a CLK2 period after it changes, to find the first
quarter of each CLK cycle. No CLK-domain logic reads CLK2-domain signals.

## The conversion

`grayscale_datapath` uses one 8-bit term per channel:

| Channel | Term | Effective weight | Target |
|---|---|---|---|
| R | `(R>>2) + (R>>5) + (R>>6)` | 0.296875 | 0.299 |
| G | `(G>>1) + (G>>4) + (G>>6) + (G>>7)` | 0.5859375 | 0.587 |
| B | `(B>>4) + (B>>5) + (B>>6)` | 0.109375 | 0.114 |

The R decomposition is the original one. The G and B decompositions are this
design's choice.

The weights sum to 0.992, so the sum never exceeds 244 and fits in 8 bits.
Stage 1 registers the three terms. Stage 2 adds them and registers the result.

Each shifted value is truncated before it is added. As a result, the output
is on average 5.5 gray levels below the exact weighted sum, and at most 12
below. It is never above the exact sum plus one. If you need better accuracy,
carry fraction bits through the adders and truncate once at the end. With
these weights that brings the shortfall to at most two levels, about one on
average. It costs wider adders, and the testbench's bit-exact reference must
change with it.

## Control interface

The host sets these inputs through the FPGA's register access:

- `num_pixels`: a multiple of four; the low two bits are ignored. Hold it
  stable while the job runs.
- `same_base`
- `start`: a one-cycle pulse.

The outputs:

- `busy` is high while the FPGA owns the bus.
- `done` rises when the last result word is written and stays high until the
  next `start`.

While idle, the design drives no strobes and no data (`sram_dout_en` low,
`oe_n` and `we_n` high), so the board can give the bus to the host.

Reset `rst` is synchronous and active high. The main clock `clk` ran at
20 MHz in the original system. The RTL has no frequency limit of its own.

## Files

| File | Contents |
|---|---|
| `rtl/gray_pkg.sv` | widths (19-bit address, 32-bit word, 2 x 16-bit banks), pixel struct, `rdwr_e` |
| `rtl/grayscale_rpu.sv` | top: wires the five blocks; SRAM pins and control registers as ports |
| `rtl/access_fsm.sv` | read/write-slot/drain controller, start/busy/done |
| `rtl/address_gen.sv` | read and write counters, write base, address multiplexer |
| `rtl/en_counter.sv` | enabled counter with synchronous clear |
| `rtl/sram_macro.sv` | request registers, to/from-SRAM buffers, strobe generation |
| `rtl/grayscale_datapath.sv` | two-stage shift-and-add pipeline |
| `rtl/result_packer.sv` | four 8-bit results into one word, `pending`/`take` handshake |
| `tb/sram_model.sv` | behavioural two-bank SRAM, with write-strobe setup/hold checks and host access tasks |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_grayscale_rpu` (end to end) and `tb_grayscale_rpu_full` (full size) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/gray_pkg.sv tb/tb_grayscale_rpu.sv --top-module tb_grayscale_rpu
    ./obj_dir/Vtb_grayscale_rpu

Replace the testbench name to run another one:

- **`tb_grayscale_datapath`**: checks 20,000 random pixels bit-exactly against
  the shift formula and within bounds of the exact weighting. It also checks
  the two-cycle latency and prints the mean error.
- **`tb_sram_macro`**: runs random reads and writes against the SRAM model.
  It checks data, the two-cycle read latency, and the bus state and strobe
  position in every cycle.
- **`tb_access_fsm`**: runs random job sizes with result latencies from 1 to
  5 cycles. It checks the read-run and write-slot pattern, that no word is
  lost, and that a job takes 5N/4 cycles plus the tail.
- **`tb_address_gen`** and **`tb_result_packer`**: model-based random tests.
- **`tb_grayscale_rpu`**: runs six jobs in both base modes and checks every
  result and every word that must not change. It counts each mechanism at
  least once: read runs, empty write slots, used write slots, drain writes,
  upper-half jobs and same-base jobs. It also checks that a job of N pixels
  takes 5N/4 + 5 cycles.
- **`tb_grayscale_rpu_full`**: runs the top at its default parameters. It
  converts a 1280 x 1024 image in five 262,144-pixel iterations and then
  10^6 pixels in four iterations, checking all 2.3 million gray values. It
  measures 327,685 cycles per full iteration, 1.250 cycles per pixel, or
  82 ms for the image and 62.5 ms for 10^6 pixels at 20 MHz. It runs in a
  few seconds.

## Own choices and departures

- **G and B coefficients:** only the R decomposition is original. The G and B
  shift sets were chosen to keep the sum below 1.
- **Accuracy:** the original implementation is reported to give results at
  most one level below a multiplying software version for about 5% of
  pixels. Per-term truncation as built here is less accurate (mean 5.5
  levels below the exact value). The literal shift-add formula was kept;
  see "The conversion" for the remedy.
- **Address counters:** the original mentions one enabled counter feeding
  both the read and the write address. This design uses two counter
  instances, which makes the write lag explicit.
- **Write base:** the value `WR_BASE = 0x40000`, and the run-time
  `same_base` switch (the original built the base-0 variant as a separate
  version), are this design's choices.
- **SRAM macro:** the original reused a vendor SRAM macro plus glue logic.
  The macro here is a new implementation of the described function. The
  following are this design's choices:
  - the per-bank pin set (`oe_n`, `we_n`, no chip enable)
  - the strobe timing
  - the two-cycle latency
  - the bank-to-bit mapping
- **Control:** the start/busy/done handshake, the `num_pixels` register and
  the empty first write slot are this design's choices.
- **Not included:**
  - the PCI interface and the card logic that switches the SRAM bus between
    host and FPGA
  - the host software
  - the XC6200 device itself
  - two alternatives the original only compared against: a direct-access
    version where the host writes each pixel into FPGA registers, and a
    bank-swapping schedule that gives each side one 16-bit bank at a time
