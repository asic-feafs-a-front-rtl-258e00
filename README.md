# FEAFS — front-end logic for a two-layer silicon strip module

A strip module for a high-luminosity LHC tracker made of two closely stacked
sensor layers can tell a stiff (high transverse momentum) track from a soft one:
a stiff track crosses both layers at almost the same position and leaves a
narrow cluster in each. FEAFS is the digital part of the front-end chip that
reads 2 × 64 strips of such a module. It does two things:

* **Trigger data, every bunch crossing.** It finds the clusters on both
  layers, keeps the narrow ones, keeps only those with a partner on the other
  layer within a programmable window, and sends up to four of them off-chip.
  It does this for every 40 MHz LHC clock cycle.
* **Readout data, on a level-1 accept.** It stores every sample of the 128
  strips in a 135-deep pipeline. When a level-1 (L1) accept arrives, it sends
  the full 128-bit event.

Both flows share one 4-bit output link running at up to 100 MHz. A
communication controller shares the link between them. It changes its
priorities when one of the two buffers fills up, and it tells the system when
it starts dropping data. An I2C slave gives access to the settings and to
three loss counters.

The RTL covers the complete digital part. The preamplifiers and
discriminators are outside it: the comparator outputs are the 128-bit input
`strips_in`, and their gain and threshold settings come out as 8-bit ports.

```
 strips_in[127:0] ──► input reg ─┬─► cluster finder (LHC clk) ──► trigger FIFO ─┐
     (test data in test mode)    │      (4 stages, wake-up)        16 × 35 b   │   comm. controller
                                 │                                              ├─► + link mux ──► data_out[3:0]
                                 └─► readout pipeline 135 × 128 ─► readout FIFO ┘   (link clk)     busy, trigger_off
                                                   l1_accept ─────► write 16 × 128 b
 scl/sda ─► I2C slave ─► registers (settings, test data, loss counters)
```

## Cluster finding (`cluster_finder`)

This is the hardest part to follow. Each layer goes through its own chain, and
the two chains meet at the overlap finder:

```
layer strips ─► mask ─► cluster research ─► width cut ─► priority enc. 32→6 ─┐
                        (32 cluster slots)                                   ├─► overlap finder ─► priority enc. 12→4 ─► packet
layer strips ─► mask ─► cluster research ─► width cut ─► priority enc. 32→6 ─┘     (12 slots)
```

**Blocks and addresses.** Each layer of 64 strips is cut into 16 blocks of 4
strips. A cluster is identified by the 4-bit address of the block it starts
in, not by its strip. Strip *n* of the module (1-based) is bit *n−1* of
`strips_in`. Strips 1–64 are layer 1 and strips 65–128 are layer 2.

**Look-up table per block (`cluster_lut`).** 4 strips have 16 patterns. For
each pattern, a 16-entry table gives up to two clusters found inside the block
(the pattern 1011, for example, holds two). Each cluster record has:

* a valid bit;
* its first strip (2 bits);
* its length (3 bits);
* a flag saying it touches the lower edge of the block;
* a flag saying it touches the upper edge.

The table is a function of the pattern, evaluated in combinational logic.

**Merging across block boundaries (`cluster_research`).** A cluster that
crosses a block boundary would otherwise appear twice. The rule is that the
block where the cluster starts owns it. That block reports the full width, and
the piece seen by the next block is suppressed. A chain over the blocks gives
the width of a cluster that runs through one or more fully hit blocks: each
fully hit block adds 4 strips and passes the count on. Widths saturate at 15.
The result is a bus of 32 slots (two per block) in strip order. Cluster
research is purely combinational, so it takes one clock cycle.

**Width cut (`width_cut`).** A cluster is kept only if its width is at most the
*cluster threshold* register (default 2). Wide clusters come from soft tracks
or noise.

**Bus reduction (`cluster_prio_enc`).** A priority encoder packs the first 6
valid slots of each layer (lowest address first) onto a 6-slot bus and counts
how many clusters it dropped. The bus size of 6 is enough at the expected
occupancy of about 1 %. The system testbench drives much higher occupancies on
purpose to exercise the loss path.

**Coincidence (`overlap_finder`).** A layer-1 cluster at address *a1* is kept
if some layer-2 cluster at *a2* satisfies

    | a1 + offset − a2 | ≤ window

Here *offset* is a signed 5-bit register (default 0) that corrects for a
misalignment of the two layers, and *window* is a 4-bit register (default 1).
A layer-2 cluster is kept by the same test against the layer-1 clusters. The
12 results (layer 1 first) go through a second priority encoder to at most 4.

**Pipelining and wake-up.** The chain has four registers:

* after cluster research;
* after the first encoders;
* after the overlap finder;
* after the final encoder.

To save power, each register loads only when its input or its current content
holds a valid cluster. A register whose input and content are both empty keeps
its clock-enable off, so with an empty detector the chain does not toggle.

**Packet.** The output is a 35-bit packet: the number of clusters (3 bits)
followed by four {address, width} pairs. It is written to the trigger FIFO
four LHC cycles after the strips were registered, but only if at least one
cluster survived. If the trigger FIFO is full, the packet is dropped and
counted.

## Readout path (`readout_pipeline`)

The pipeline is a 135-column shift register of 128 bits, clocked by the LHC
clock, and the input register adds one more cycle. An `l1_accept` therefore
writes into the readout FIFO the strips sampled 136 LHC cycles before it. If
the readout FIFO is full, the accept is dropped and counted, and `busy` is
already high.

## Crossing into the link clock (`async_fifo`)

Both FIFOs are 16 words deep. A word is one whole entry: a 35-bit packet or a
128-bit event. Each FIFO works as follows:

* Read and write pointers are Gray coded.
* Each pointer crosses to the other clock domain through a 2-flop
  synchroniser.
* Writes are ignored while `full` is high.
* Each clock domain has its own reset synchroniser. Reset is asserted
  asynchronously and released synchronously.
* Reads are first-word fall-through: `read_data` shows the oldest word while
  `empty` is low.
* A read-side copy of `full` (`rd_full`) lets the link-side controller see
  both FIFO states in its own clock domain.

## Output link (`comm_controller`, `link_mux`)

One nibble goes out per link clock, the most significant nibble first. The bus
carries `0000` when idle. There are two frame types:

| Frame | Nibbles | Content |
|---|---|---|
| Cluster frame | 3, 5, 7 or 9 | first nibble `01` + (number of clusters − 1) in 2 bits, then {address, width} of each cluster |
| Readout word | 5 | bit 19 = 1, bits 18:16 = word number 0–7, bits 15:0 = strips 16w+1 (bit 15) … 16w+16 (bit 0) |

An event is 8 readout words (40 nibbles). A cluster frame may be sent between
any two words of an event, because each word carries its own identifier and
word number. The first two bits of the first nibble tell the frame types apart:
cluster frames start with `01` and readout words start with `1`. Frames follow
each other back to back.

The controller picks its mode from the two FIFO `full` flags, registered in
the link clock domain:

| Mode (`mode`) | Condition | First priority | Second priority | Flags |
|---|---|---|---|---|
| Normal (0) | neither FIFO full | trigger | readout | — |
| Derated (1) | trigger FIFO full | trigger | readout not served | `trigger_off` |
| Busy (2) | readout FIFO full | readout | trigger not served | `busy` |
| Survival (3) | both full | trigger | readout | `trigger_off`, `busy` |

## Slow control (`i2c_slave`, `slow_control_regs`)

The I2C slave sits at the 7-bit address 0x40 (the `I2C_ADDR` parameter). The
LHC clock oversamples SCL and SDA. The bus protocol is:

* A write is `S addr+W reg data data … P`.
* A read is `S addr+W reg Sr addr+R data … P`.
* The register pointer increments after every data byte.

| Address | Register | Reset value |
|---|---|---|
| 0x00 | configuration, bit 0 = test mode (test data replaces the strips) | 0x00 |
| 0x01 | preamplifier gain | 0x80 |
| 0x02 | discriminator threshold | 0x80 |
| 0x03 | cluster threshold (max. kept width, 4 bits) | 0x02 |
| 0x04 | coincidence offset (signed, 5 bits) | 0x00 |
| 0x05 | coincidence window (4 bits) | 0x01 |
| 0x10–0x1F | strip enable, strips 8i+1…8i+8 in byte i, bit 0 first | 0xFF |
| 0x20–0x2F | test data, same layout | 0x00 |
| 0x30/0x31 | clusters lost in the priority encoders, low/high byte | 0 |
| 0x32/0x33 | trigger packets lost at a full trigger FIFO | 0 |
| 0x34/0x35 | L1 events lost at a full readout FIFO | 0 |

The loss counters are 16 bits wide and saturate. Writing any value to either
byte of a counter clears it.

## Latency and throughput

The link offers 4 bits × 100 MHz = 400 Mbit/s. The expected average flow is
about 76 Mbit/s:

* about 60 Mbit/s of trigger data (0.25 narrow clusters per 20 MHz, 12 bits
  per one-cluster frame);
* 16 Mbit/s of readout (100 kHz × 160 bits).

The link cannot sustain a 4-cluster coincidence in every bunch crossing (up to
36 bits per 25 ns). In that case the trigger FIFO fills up and the chip goes to
Derated mode.

The trigger latency is counted in LHC cycles, from the strips at the chip
input to the first nibble of their cluster frame on the link. It is made of:

* 1 cycle in the input register;
* 4 cycles in the finder;
* the FIFO crossing (pointer synchronisers);
* waiting for the link to finish the frame or readout word it is sending.

The minimum is 7 or 8 cycles, depending on the phase between the two clocks.
Each operating point below ran for 40 000 crossings, with the register reset
values (threshold 2, offset 0, window 1) and no data lost:

| Strip occupancy | L1 rate | Link clock | Mean latency | Max |
|---|---|---|---|---|
| 2 ‰ | 0 kHz | 100 MHz | 8.17 | 12 |
| 2 ‰ | 120 kHz | 100 MHz | 8.21 | 13 |
| 2 ‰ | 240 kHz | 100 MHz | 8.24 | 14 |
| 2 ‰ | 400 kHz | 100 MHz | 8.27 | 13 |
| 2 ‰ | 120 kHz | 40 MHz | 13.8 | 39 |
| 2 ‰ | 120 kHz | 80 MHz | 8.57 | 16 |
| 2 ‰ | 120 kHz | 120 MHz | 7.22 | 11 |
| 1 ‰ | 120 kHz | 100 MHz | 7.61 | 12 |
| 3 ‰ | 120 kHz | 100 MHz | 7.88 | 15 |
| 5 ‰ | 120 kHz | 100 MHz | 8.59 | 31 |

The L1 rate hardly matters, because a readout word holds the link for only
5 nibbles. The link clock matters most: at 40 MHz one nibble takes a whole
LHC cycle, the distribution peaks at 10 cycles and has a long tail. The
latency curves published for the original chip show the same trends, with
peaks 2 to 4 cycles earlier. Those curves do not define where latency starts
and ends, and the input register and synchronisers of this RTL may be counted
differently.

**Bus size.** With random hits at 1 % occupancy on both layers (40 000
crossings), the table below compares each bus size with an unlimited bus and
counts the cluster packets that come out different:

| Bus size | Packets changed at 1 % | Packets changed at 5 % |
|---|---|---|
| 2 | 905 | — |
| 4 | 12 | — |
| 6 (default) | 0 | 147 of 17 032 |

The testbench also sweeps the occupancy from 1 % to 20 % and measures the
share of output clusters that are lost against an unlimited bus:

* The bus of 4 loses most in the middle of the range, with a peak of 4.0 % at
  10 % occupancy. At higher occupancy the 4-cluster output is full either
  way, so the loss falls again.
* The bus of 6 stays at or below 0.3 % over the whole range.

The study published for the original chip shows the same shape with smaller
numbers: about 1.9 % and under 0.1 %. It used a stimulus that is not known
here.

## Where the design makes its own choices

The block structure, the sizes (2 × 16 blocks of 4 strips, 32 → 6 → 12 → 4
cluster buses, two 16-word FIFOs, 135 pipeline columns), the coincidence rule,
the frame layouts and the four modes follow the chip's description. The
following points are this design's own:

* **Merging rule.** The block where a cluster starts owns it, and a width
  chain handles clusters spanning several blocks.
* **Kept widths.** A cluster is kept when its width is at most the threshold.
* **Coincidence on both layers.** Layer-2 clusters are tested too, and the
  offset is signed and 5 bits wide. The offset is added to the layer-1
  address (`a1 + offset` is compared with `a2`). Which layer it should shift,
  and in which direction the blocks are numbered, is an assumption.
* **Four pipeline registers** in the cluster finder. The latency above follows
  from them, and it is somewhat longer than the roughly 4 to 7 bunch crossings
  quoted for the original chip. The original's measurement points are not
  known.
* **Cluster frame length.** The frame for four clusters has 9 nibbles
  (1 + 4 × 2). The original description mentions "3 to 8 words" elsewhere; the
  frame table was followed.
* **No time stamp.** An earlier packet estimate with a time stamp and a 2-bit
  width is not used.
* **Interleaving.** A cluster frame can be sent between any two readout words.
* **Slow control details.** The register map, the reset values, the I2C
  address and the counter behaviour.
* **Test mode** as a 128-bit pattern that replaces the input.
* **Left out.** The prototype's 32-input multiplexer and an unspecified
  "write for time" output are not implemented.

## Files

| RTL (`rtl/`) | Role |
|---|---|
| `feafs_pkg.sv` | cluster record, packet and LUT types, mode and select enums, constants |
| `feafs_top.sv` | the chip: input register, both paths, FIFOs, link, slow control |
| `cluster_finder.sv` | trigger path with wake-up registers |
| `cluster_research.sv`, `cluster_lut.sv` | per-layer cluster search |
| `width_cut.sv`, `cluster_prio_enc.sv`, `overlap_finder.sv` | cut, bus reduction, coincidence |
| `readout_pipeline.sv` | 135 × 128 shift register |
| `async_fifo.sv`, `reset_sync.sv` | dual-clock FIFO, reset synchroniser |
| `comm_controller.sv`, `link_mux.sv` | link arbitration and framing |
| `i2c_slave.sv`, `slow_control_regs.sv` | slow control |

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one compares
the block with a reference model written in the testbench, mostly on random
stimulus, and prints `TB_RESULT checks=<n> failures=<m>`. `tb_feafs_top` runs
the whole chip at its default parameters. It goes through these phases:

1. I2C configuration;
2. quiet running;
3. the nominal load (2 ‰ occupancy, 120 kHz L1);
4. a hit storm;
5. an L1 burst;
6. both at once (Survival mode);
7. draining the FIFOs;
8. test mode.

The testbench decodes every nibble on the link and compares each cluster frame
and readout word with its own model of the chip. It also checks:

* the loss counters, read back over I2C;
* the latency bound;
* that every mechanism occurred at least once: merged clusters, width cuts,
  both encoder overflows, coincidence rejects, register sleep, frame
  interleaving, each of the four modes, and both kinds of FIFO loss.

Two more testbenches run the operating points above:

* `tb_latency_sweep` runs the whole chip at the ten points of the latency
  table. It compares every frame with the model, checks for losses and
  latency bounds, and checks the trends: latency rises with the L1 rate and
  the occupancy and falls with the link clock.
* `tb_bus_size` runs cluster finders with `N_PE1` = 2, 3, 4, 6, 8 and 32 side
  by side, each against a model for its own bus size.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_feafs_top rtl/feafs_pkg.sv tb/tb_feafs_top.sv
./obj_dir/Vtb_feafs_top +verilator+rand+reset+2
```

Replace `tb_feafs_top` with any other testbench name. The full-chip test takes
a few seconds. The top-level parameters are `PIPE_DEPTH` (135), `FIFO_DEPTH`
(16, a power of two), `N_PE1` (6, the per-layer bus after the first encoder)
and `I2C_ADDR`.
