# A memory-controller Trojan triggered by an input image

This is synthesizable SystemVerilog for a hardware Trojan that attacks a
neural-network accelerator from inside the DRAM memory controller. It is a
model from the hardware-security literature. Use it to study, detect and
defend against this class of attack.

The attacker controls only the memory-controller IP. They know nothing of
the network model or of the toolchain that maps it onto the accelerator.
The Trojan works only from what every memory controller sees: the type of
each request (read or write) and the data that passes through it. It works
in three steps:

1. **Find the input image.** Convolutional and fully connected (FC) layers
   leave different traces on the memory bus. A batch of inference ends with
   FC layers. So the reads that follow the last FC layer are the next
   batch's input image.
2. **Recognise the trigger image.** The attacker's trigger is an image with
   a fractal, mirror-symmetric pattern, such as a Sierpinski carpet. Many
   small tiles of such an image look alike, even after noise, scaling,
   cropping and small rotations. Tiles of natural images rarely do. The
   Trojan compares the tiles of the input image against a reference tile
   using XOR and popcount, and counts how many match.
3. **Payload.** Once triggered, the Trojan sends zeros to DRAM in place of
   the output feature maps that the accelerator writes back. This wrecks
   the classification result. The circuit is one OR gate or one
   multiplexer at the output flip-flop of the write-data queue, so it adds
   no delay.

Clean batches pass through untouched. Reads are never modified.

## Block diagram

```
 accelerator request channel (cmd_valid/cmd_ready/cmd_write)
        |
        +--> layer_boundary_detector --boundary--> layer_type_classifier
        |                                                   | layer_done, layer_fc
        |                                                   v
        |                                              trojan_fsm
        |                                  start_image /  |  analyse   \ payload_active
 read data beats (rd_valid/rd_data)              v          v           v
        +------------------------------> trigger_image_detector     payload_portion_select
                                         (subimage_binarizer +            | sel
                                          NUM_SETS similarity_checker)    v
                                                 | image_trigger        zero
                                                 +--> trojan_fsm          |
 write data (wr_in_*) --> write_data_queue: FIFO -> payload_zero_reg --> wr_out_* (to DRAM)
```

Everything runs on one clock with a synchronous, active-high reset. The top
module is `mc_trojan_top`. The shared types and bus constants are in
`trojan_pkg`.

## Finding the input image

### Layer boundaries: `layer_boundary_detector`

An accelerator keeps its output feature maps in its on-chip buffer. It
drains them to DRAM when the buffer fills, which happens mostly near the
end of a layer. Layer ends therefore show up as bursts of writes in an
otherwise read-dominated stream.

The detector cuts the stream of accepted requests into windows of
`WINDOW` = 100 requests. It counts the writes in each window. A window with
more than `WR_THRESH` = 50 writes is *write-heavy*.

One drain usually spans several heavy windows. The boundary is therefore
reported once: at the end of the first non-heavy window after a run of
heavy ones. Two consequences follow:

- The drain writes are counted in the layer that produced them.
- The boundary is reported up to one window late. By then the next layer
  has issued up to 99 requests.
- Those early requests of the next layer are counted in the layer that
  ended. If the next layer reads the input image, its first tiles (at most
  99 of 3072 for a 256x256x3 image) are not examined for the trigger.

### Layer type: `layer_type_classifier`

An FC layer reads a large weight matrix and writes back a short vector. Its
read/write ratio is in the thousands or more. Convolutional layers stay in
the low hundreds. This holds for AlexNet, VGG16 and ResNet34, under both
output-stationary and weight-stationary dataflows.

The classifier counts the reads and writes of each layer between two
boundaries. When a layer ends, it marks the layer FC if
`reads > (writes << RW_SHIFT)`. The shift replaces a divider. The default
`RW_SHIFT` = 11 puts the threshold at a ratio of 2048, between the Conv
group and the FC group. The counters are 32 bits wide and saturate.

### Phase control: `trojan_fsm`

| phase | meaning | leaves when |
|---|---|---|
| `ST_MONITOR` | only counting traffic | an FC layer ends: go to ANALYSE |
| `ST_ANALYSE` | the current layer may be the first layer; its read data goes to the trigger detector | trigger: go to PAYLOAD. The layer ends as FC: restart ANALYSE on the next layer. The layer ends as Conv: go to MONITOR |
| `ST_PAYLOAD` | zero the data written back | an FC layer ends: go to ANALYSE (the next batch) |

The Trojan cannot know in advance which FC layer is the last one. It
therefore analyses the layer after *every* FC layer. If that layer turns
out to be FC too, the analysis simply restarts. Each entry into ANALYSE
pulses `start_image`, which clears the detector. A trigger that is still
high in that cycle comes from the previous image and is ignored.

Two consequences:

- The first batch after reset is never analysed, because no FC layer has
  been seen yet.
- The payload covers the triggered batch from the moment of the trigger up
  to the end of its first FC layer. With the usual network shape (Conv
  layers, then FC layers), this is every Conv layer and the first FC layer.

## Recognising the trigger image

### Tiles and spectrum: `subimage_binarizer`

The data bus is 64 bits wide and the burst length is 8. One read request
therefore returns 64 bytes. For image data the design reads this as an
8x8 tile of 8-bit pixels: beat *r* is row *r*, and byte *c* of the beat is
column *c*.

Each pixel is binarized as it arrives: it is black when its value is below
`BLACK_THRESH` = 128. The 64 bits are collected into a mask. The tile's
*spectrum* is the number of black pixels, from 0 to 64.

The binarizer runs all the time and counts beats modulo 8 from reset, so it
never loses burst alignment. Its results are only used while the FSM is in
ANALYSE.

### Reference and similarity: `similarity_checker`

Each checker has a *datum range* of spectra, `[SPEC_LO, SPEC_HI]`. Tiles
outside that range are ignored. This filters out the all-white and
all-black tiles that dominate most pictures.

- The first in-range tile after a clear becomes the **reference**.
- Every later in-range tile is a **testing tile**.
- The correlation of a testing tile is the number of pixels it shares with
  the reference: `64 - popcount(tile XOR reference)`.
- A tile with a correlation above `SIM_THRESH` counts as similar.
- The checker fires when more than `CNT_THRESH` tiles have been similar.
  It stays fired until the next clear.

### Several sets: `trigger_image_detector`

A natural image can occasionally fool one checker. The detector therefore
runs `NUM_SETS` checkers in parallel. Each has its own datum range, and
hence its own reference tile. The trigger needs **all** of them to fire,
which makes false triggers roughly N-th-power rarer.

The default is two sets:

| set | datum range (black pixels) | similar if | fires after |
|---|---|---|---|
| 0 | 8..24 | > 40 equal pixels | > 32 similar tiles |
| 1 | 16..47 | > 40 equal pixels | > 32 similar tiles |

The testbench shows why two sets help. A uniform-noise image pushes set 1
to 49 similar tiles, past its threshold, but leaves set 0 at 7. The noisy
Sierpinski carpet reaches 1166 and 155.

All threshold values are this design's own. No published values exist.
They were tuned so that a 256x256x3 Sierpinski carpet with +-30 levels of
pixel noise triggers, and noise or flat images do not. They have not been
calibrated against real photographs. Retune them for any real use.

## The payload

### `payload_zero_reg`

This is the write queue's output register, with one of two zero-setting
circuits, chosen by `STYLE`:

- `PAYLOAD_OR_RESET`: `reset | zero` drives the flip-flop's reset. A word
  already held in the register is cleared too.
- `PAYLOAD_MUX_INPUT` (default): a multiplexer selects 0 instead of the
  data at the D input. It only affects the word being loaded.

### `write_data_queue`

A 4-entry flip-flop FIFO followed by the register above, with valid/ready
handshakes on both sides. A word takes 2 cycles through an empty queue.
The payload changes data, never timing.

### `payload_portion_select`

A 16-bit LFSR picks which beats get zeroed: on average `PORTION`/256 of
them. The default of 256 zeroes every beat, which is the plain attack.
Smaller values give a tunable amount of accuracy loss. At the default the
selector synthesizes to a constant.

## Top-level interface (`mc_trojan_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `cmd_valid`, `cmd_ready`, `cmd_write` | in | 1 | the accelerator's request channel as the controller accepts it. One request is one 8-beat burst, counted when valid and ready are both high |
| `rd_valid`, `rd_data` | in | 1, 64 | read data beats returned to the accelerator (observed only) |
| `wr_in_valid`, `wr_in_ready`, `wr_in_data` | in/out/in | 1, 1, 64 | write data from the accelerator |
| `wr_out_valid`, `wr_out_ready`, `wr_out_data` | out/in/out | 1, 1, 64 | write data to DRAM |
| `trojan_phase` | out | 2 | 0 monitor, 1 analyse, 2 payload |
| `layer_boundary`, `layer_done`, `layer_fc`, `heavy_window` | out | 1 | layer events |
| `last_layer_reads`, `last_layer_writes` | out | 32 | counts of the layer that just ended |
| `image_start`, `image_trigger`, `payload_active` | out | 1 | analysis start, trigger, payload |
| `set_ref_valid`, `set_fired` | out | `NUM_SETS` | per-set state of the detector |

The status outputs are for observation and testing; a real Trojan would
have none. Timing:

- `layer_boundary` comes one cycle after the request that closes a window.
- `layer_done` and `layer_fc` follow one cycle after `layer_boundary`.
- `start_image` follows one cycle after `layer_done`.
- The trigger rises two cycles after the last beat of the tile that
  completes the count.

## Parameters

| parameter | default | origin |
|---|---|---|
| `WINDOW` | 100 | published method |
| `NUM_SETS` | 2 | published method (the two-set configuration) |
| bus 64 bits, burst 8, 8x8 tile (`trojan_pkg`) | | published method |
| `WR_THRESH` | 50 | this design |
| `RW_SHIFT` | 11 | this design; a ratio of 2048, read between the published Conv and FC ratios |
| `BLACK_THRESH` | 128 | this design |
| `SPEC_LO`, `SPEC_HI`, `SIM_THRESH`, `CNT_THRESH` | see above | this design |
| `CNT_W` (layer counters) | 32 | this design |
| `WQ_DEPTH` | 4 | this design |
| `STYLE` | `PAYLOAD_MUX_INPUT` | both styles are published; the choice is this design's |
| `PORTION` | 256 | this design; 256 is the plain zero-everything attack |

The arrays `SPEC_LO`, `SPEC_HI`, `SIM_THRESH` and `CNT_THRESH` always have
`MAX_SETS` = 4 entries, of which set *s* uses entry *s*. `NUM_SETS` may be
1 to 4. To override them, give all four entries, for example
`.NUM_SETS(1), .SPEC_LO('{16, 0, 0, 0})`.

## Size

After coarse synthesis, the top has about 518 flip-flop bits and about 200
word-level cells. The write FIFO's 4x64-bit storage accounts for 256
memory bits and belongs to the memory controller anyway. The part that
finds the input image (boundary detector, classifier, FSM) has about 150 flip-flop
bits. The trigger detector has about 300.

The published implementation reports about 800 µm² in a 28 nm library,
under 0.1 % of a memory controller's area.

## Where this design goes beyond the published method

- The published method says that correlation "exceeds" a threshold after
  an XOR and popcount. Taken literally, that popcount counts *differing*
  pixels. Here the correlation is the number of *equal* pixels.
- Read literally, "multiple sets" does not say how the sets are combined.
  Here all sets must fire.
- The pixel layout inside a burst, the binarization threshold and every
  threshold value are this design's choices. So are when exactly a
  boundary is reported, and how long the payload lasts.
- Memory addresses are visible to a memory controller but are not used.
- Not built:
  - the memory controller's scheduler and DRAM command logic;
  - the DRAM;
  - the accelerator;
  - the camera and software preprocessing;
  - the "data poisoning" variant, which rewrites the input image instead of
    zeroing outputs. It is only mentioned as a possible extension.

## Verifying and simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. All testbenches
compute their expected values independently of the RTL.

| testbench | what it checks |
|---|---|
| `tb_layer_boundary_detector` | windows, heavy flags and boundaries against a model on random quiet/drain traffic, including exactly 50 and 51 writes |
| `tb_layer_type_classifier` | FC/Conv decision and counts, including the exact 2048 ratio edge |
| `tb_trojan_fsm` | every phase transition, the restart rule, the stale-trigger rule |
| `tb_subimage_binarizer` | masks and spectra of 2000 random bursts with gaps |
| `tb_similarity_checker` | reference, similar count and firing against a model; the 40/41 edge |
| `tb_trigger_image_detector` | full 256x256x3 carpet, noise and grey images; exact trigger cycle; enable and clear |
| `tb_payload_zero_reg` | both gate styles against models |
| `tb_payload_portion_select` | LFSR sequence and period 65535; fractions 1, 1/4 and 0 |
| `tb_write_data_queue` | ordering, back-pressure, full queue, zeroing and 2-cycle latency, both styles |
| `tb_mc_trojan_top` | end to end at all default parameters, see below |

`tb_mc_trojan_top` replays three inference batches of a Conv-Conv-FC-FC-FC
network. Each FC layer reads 240000 bursts. Each batch reads a full
256x256x3 image with its data; the middle batch carries the trigger image.
The test checks:

- all 15 layer types;
- that the trigger fires exactly once, in the right layer;
- that exactly the 5680 write beats of the triggered batch's Conv1, Conv2
  and FC1 arrive as zeros;
- that every other beat arrives unchanged.

It also counts each mechanism and fails if one never happens: heavy
windows, boundaries, both layer types, analysis starts and restarts,
reference selection, the trigger, an untriggered analysis, zeroed and clean
beats, DRAM back-pressure and a full write queue. The run takes about
2.5 million cycles and a few seconds.

`tb_mc_trojan_variants` runs the same traffic on the other configurations:
one checker set, the OR-style zero circuit and `PORTION` = 128. With one
set, the noise image of the third batch triggers as well. That is the
false positive the second set removes. Under the payload, 40-70 % of the
beats arrive as zero and all the others unchanged. The OR circuit adds to
the half picked at load time, because it also clears words that wait in
the register.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mc_trojan_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/trojan_pkg.sv tb/tb_mc_trojan_top.sv
./obj_dir/Vtb_mc_trojan_top
```

Replace the module name to run any other testbench. The package must be
given first on the command line; Verilator finds everything else through
`-y`.
