# Block-matching motion estimation with camera-motion compensation

This design finds moving objects in video taken by a camera that may itself
be moving. It has two stages:

1. **Block-matching motion estimation.** Each 16×16 block of the current
   frame is compared with displaced 16×16 blocks of the reference frame. The
   measure is the sum of absolute differences (SAD). The displacement with the
   smallest SAD is the block's motion vector.
2. **Motion correction.** When the camera moves, every block moves, so the
   vectors contain a global component. The correction stage estimates this
   component, removes it, and flags the blocks that still move. Those blocks
   are the moving objects.

The absolute differences, the adder array, the SAD accumulator, the
comparators and the final compensation subtraction are all built on one
Kogge-Stone parallel-prefix adder (`ks_adder`). Counters, the global-motion
mean and the four-vector interpolation sum use ordinary arithmetic. The controller is a single counter whose
decoded value sequences the whole datapath.

## Data flow

```
 row_in (16 pixels/clk)
      │
   DEMUX ──► SUBM1 (current block)  ─ rotate ─► cur_row ─┐
      │ ───► SUBM2 (candidate 2) ─ newest row ─┐         │
      └────► SUBM3 (candidate 3) ─ newest row ─┴► cand_row
                                                          ▼
                               16 × |a−b| ─► reg ─► KS adder tree ─► KS accumulator ─► SAD
                                                                                     │
                         motion vector memory ◄── decision block (KS comparators) ◄──┘
                                │ (port B)
                                ▼
              motion correction: mean vector ─► 2×2 interpolation ─► minus global ─► moving flag
```

## One operation: 51 cycles

The engine works in units of one **operation**. An operation compares one
current block with two candidate blocks. The host streams 48 rows of 16
pixels, one row per clock:

- 16 rows of the current block;
- then 16 rows of candidate 2;
- then 16 rows of candidate 3.

The DEMUX writes them into SUBM1, SUBM2 and SUBM3. This is the hardest part
of the design to follow, so the schedule is written out in full. `cnt` is the
controller's counter, and cycle 0 is the cycle after `start` is taken.

| cnt | what happens |
|---|---|
| 0–15 | current block rows shift into SUBM1 (DEMUX select 0) |
| 16–31 | candidate 2 rows shift into SUBM2 (select 1) |
| 32–47 | candidate 3 rows shift into SUBM3 (select 2) |
| 17–32 | candidate 2 row *r* (the newest row of SUBM2) and current row *r* (the oldest row of SUBM1) meet in the 16 absolute difference units; the result is registered; SUBM1 rotates |
| 33–48 | the same for candidate 3 (the newest row of SUBM3); SUBM1 rotates once more through the block |
| 18–49 | the adder tree sums the registered row; the accumulator adds it (it loads at 18 and at 34) |
| 34 | the accumulator holds SAD(candidate 2); the decision block keeps it |
| 49 | the stored entry of the block is read from the vector memory |
| 50 | the accumulator holds SAD(candidate 3); decision, memory write |

After cycle 50 the controller returns to its initial state. A new `start` is
accepted in cycle 50 itself, so operations can run back to back at one per
51 cycles. The result (`res_valid`, `res`) appears one cycle later, 51 clock
edges after the edge that took `start`.

**How SUBM1 is re-read.** The sub-memories have no addresses. Each is a
shift register of 16 rows, and each row is 128 flip-flops wide. After 16
writes, the first row written sits at the tail. Rotation feeds the tail back
to the head. Each rotation brings the next row to the tail, so 16 rotations
replay the current block in order and leave it where it started. The same
stored block is therefore compared with both candidates, and no current-block
pixel is fetched twice. Each candidate row is compared in the cycle after it
is written.

## Full search as a series of operations

One operation covers two candidate displacements. The host supplies them in
`op` together with the block address:

```
me_op_t: blk_addr, cand2 (x,y), cand3 (x,y), first
```

The decision block applies two rules:

- **Between the two candidates:** candidate 3 wins only if its SAD is
  strictly smaller. On a tie, candidate 2 wins.
- **Against the stored entry:** the winner is written to the block's entry in
  the motion vector memory if its SAD is strictly smaller than the stored SAD.
  It is also written, whatever its SAD, when `first` is set. Set `first` on
  the first operation of each block.

To run a full search over a window, send all its displacements in pairs. A
±3 window has 49 displacements, so it takes 25 operations per block; in an
odd count, repeat the last displacement. The memory entry then holds the
best vector in the window. Ties go to the displacement sent earliest.

At the default size, a ±3 search of a 320×240 frame is 300 × 25 operations ×
51 cycles = 382,500 cycles.

## Motion correction

`mc_start` starts a pass over the vector memory. The memory is addressed by
counters, and the pass reads it twice.

1. **Global motion.** The first read sums all BW·BH vectors. The global
   (camera) vector is the mean, rounded to the nearest integer with halves
   rounded up: `g = floor((2·sum + NB) / (2·NB))`, where NB = BW·BH.
2. **Interpolation and compensation.** The second read goes in raster order.
   A line of BW vector registers holds the previous block row. Two more
   registers hold the left and upper-left neighbours. For every block (x, y)
   with x, y ≥ 1, this gives the four 16×16 blocks that make up the
   overlapped 32×32 block at (x−1, y−1).
   - The overlapped block's vector is `floor(sum of the four / 4)`.
   - The corrected vector is that value minus `g`. The subtraction is done on
     Kogge-Stone adders and saturated to 8 bits.
   - `moving` is set when |dx| + |dy| > `MOVE_TH`, which defaults to 1.

The output is a stream of (BW−1)·(BH−1) overlapped blocks in raster order.
Each carries its position, its interpolated vector, its corrected vector and
its `moving` flag. `done` rises 2·BW·BH + 3 clock edges after the edge that
took `mc_start`.

Because the global motion is a plain mean, a large moving object biases the
estimate. In dense scenes this can set the background slightly off zero.

## Modules

| file | block |
|---|---|
| `rtl/me_pkg.sv` | constants and types: `row_t`, `mv_t`, `mv_entry_t`, `me_op_t`, `me_res_t`, `me_ctl_t`, `mc_out_t` |
| `rtl/ks_adder.sv` | Kogge-Stone adder; the carry-in is folded into the bit-0 generate |
| `rtl/abs_diff.sv` | \|a−b\|: a + ~b + 1, sign from the carry, MUX with a two's complement made by a second KS adder |
| `rtl/adder_tree.sv` | adder array: binary tree of KS adders (16 inputs → 12-bit sum) |
| `rtl/sad_unit.sv` | 16 abs_diff units → register → adder tree → KS accumulator |
| `rtl/sub_memory.sv` | one SUBM: 16-row shift register with rotate |
| `rtl/local_memory.sv` | DEMUX and SUBM1..3 |
| `rtl/me_controller.sv` | counter, phase decoder ("decision maker") and encoder of the control word |
| `rtl/ks_comparator.sv` | a < b from the borrow of a KS subtraction |
| `rtl/decision_block.sv` | candidate choice and memory update |
| `rtl/mv_memory.sv` | dual-port block RAM, one {vector, SAD} entry per block |
| `rtl/motion_correction.sv` | global motion, interpolation, compensation, moving flag |
| `rtl/me_top.sv` | top level |

Every file begins with a comment on what it does and on its timing.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| block size | 16 × 16 | `ME_BLK` in `me_pkg` (the modules take `BLK`) |
| pixel | 8-bit grey level | `ME_PIX_W` |
| vector component | 8-bit signed | `ME_MV_W` |
| SAD | 16 bits | `ME_SAD_W` (16·16·255 = 65280) |
| frame | 320 × 240, so BW = 20 and BH = 15 blocks | `ME_BW`, `ME_BH`; `me_top` parameters `BW`, `BH` |
| moving threshold | 1 | `MOVE_TH` |

The 16×16 block and the schedule come from the source architecture. The
8-bit pixel is consistent with the storage it implies: three 16×16 blocks of
8-bit pixels make 6144 flip-flops. The frame size, vector width and threshold
are this design's choices.

To process another frame size, set `BW` and `BH` on `me_top`. The address
width `ME_AW` (9 bits) in `me_pkg` limits BW·BH to 512; raise the frame
constants in `me_pkg` for larger frames.

## Interface of `me_top`

- `clk`, `rst_n`: the reset is synchronous and active low.
- `start`, `op`, `ready`: an operation is taken in a cycle where `start` and
  `ready` are both high. `op` is latched in that cycle.
- `row_req`, `row_in`: when `row_req` is high, `row_in` must carry the next
  row in that cycle. Element 0 of a row is its leftmost pixel.
- `res_valid`, `res`: one result per operation. `res` holds the block
  address, the vector and SAD now stored for the block, `updated`, and
  `pick3`.
- `mc_start`, `mc_busy`, `mc_valid`, `mc_out`, `mc_global`, `mc_done`: the
  correction pass. It uses its own memory port, but to read a finished frame
  it should run after the frame's last operation.

The frame buffer that supplies the rows is external to this design, and so is
the conversion of video into frames.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. The testbenches are:

- `tb_ks_adder`: exhaustive at 8 bits; random at 13 bits; 1-bit case.
- `tb_abs_diff`, `tb_ks_comparator`: exhaustive at 8 bits.
- `tb_adder_tree`: random and extreme inputs; 16 inputs and a padded 5-input
  tree.
- `tb_sub_memory`, `tb_local_memory`: write, head/tail, rotation order, and
  the DEMUX selects.
- `tb_sad_unit`: SADs of random blocks against a software SAD.
- `tb_me_controller`: every control bit in every cycle against the schedule
  above; the 51-cycle length; back-to-back operation.
- `tb_mv_memory`, `tb_decision_block`: memory ports; decision rules,
  including ties.
- `tb_motion_correction`: a 5×4 and the default 20×15 instance. It covers a
  pan with an object, a negative pan, random vectors, and saturation.
- `tb_me_top`: end to end at the default size. The frame moves by (+1, −1)
  for the background and (−2, +3) for a 4×4-block object. The testbench runs
  a ±3 full search of all 300 blocks (7500 operations). It checks:
  - every operation result and its latency;
  - that the final SAD is in the accumulator in cycle 50;
  - that every block finds its true motion;
  - the whole correction pass.

  It also counts each mechanism and fails if one never occurs: back-to-back
  and idle starts, each DEMUX phase, each candidate winning, update and keep,
  and moving and still blocks.
- `tb_traffic_scenarios`: the three scene types described under
  [Scenes](#scenes) below, at the default size.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_me_top \
    rtl/me_pkg.sv tb/tb_me_top.sv
./obj_dir/Vtb_me_top
```

The full-size end-to-end run takes about a second.

## Scenes

The design targets three kinds of traffic scene:

- normal traffic seen by a fixed camera;
- dense traffic seen by a fixed camera;
- traffic seen from a moving camera.

`tb_traffic_scenarios` builds a synthetic version of each at 320×240. Real
video is not used. Vehicles are 32×32 pixels (2×2 blocks) and move 2 or 3
pixels relative to the background. For each scene the testbench prints the
true and false detection rates over the overlapped blocks, and checks every
result against the software model. An overlapped block counts as truly
moving when at least two of its four blocks belong to a vehicle.

| scene | vehicles | global vector | true detection | false detection |
|---|---|---|---|---|
| normal, fixed camera | 3 | (0, 0) | 46.6 % (7 of 15) | 0 % |
| dense, fixed camera | 12 | (0, 0) | 40.0 % (24 of 60) | 0 % |
| normal, camera panning (+1, −1) | 3 | (+1, −1) | 46.6 % (7 of 15) | 0 % |

The misses are overlapped blocks that are only half covered by a vehicle.
Averaging four vectors halves the vehicle's motion, and the floor of a
halved 2-pixel motion no longer exceeds the threshold. This is the reason
`MOVE_TH` defaults to 1: with a threshold of 2, vehicles moving 2 pixels were
never flagged at all. The camera pan is removed exactly, so the third scene
gives the same result as the first.

## Departures and omissions

- **The search is driven by the host.** The host chooses the candidate
  displacements, two per operation. The engine itself has no search-window
  address generator. Neighbouring candidates overlap, but the host streams
  each one in full. Only the current block is reused across candidates.
- **The global motion is the mean vector,** and the 32×32 vector is the plain
  average of its four 16×16 vectors. The forward-motion, bidirectional-motion
  and spatial-smoothing modules of the motion-compensated interpolation
  scheme this stage derives from are not included.
- **The frame size is assumed to be 320×240.** The size of the vector memory
  follows from it.
- **Nothing is fed back to the next frame.** The vectors stay in memory, but
  nothing uses them to seed the next frame's search.
- **Rates and resources are not reproduced.** Detection rates on real video,
  the FPGA resource figures and the maximum clock frequency are not part of
  this RTL.
