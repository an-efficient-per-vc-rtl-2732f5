# PASD: per-VC accounting buffer management for GFR cell switches

This is synthesizable SystemVerilog for one output port of an ATM/MPLS cell switch
that carries guaranteed-frame-rate (GFR) virtual connections. All VCs share **one
plain FIFO**. That is a simpler memory than the per-VC queues and weighted-fair-queueing
scheduler that GFR buffer managers often need. Fairness comes from two cheap pieces of per-VC
bookkeeping:

* **Pre-paid early packet discard (PEPD)** decides on the first cell of every
  frame whether the whole frame may enter the buffer. An accepted frame reserves
  ("prepays") room for a maximum-size frame, so accepted frames are never cut
  short by a full buffer.
* **Nonlinear RED with steepest-descent weight updating (SDWU)** marks tagged
  (CLP=1) frames of VCs that hold more than their share of the buffer. The marked
  frames are later dropped **from the front** of the FIFO, as whole frames. Each VC's
  share, its *fair index* F_i, is not fixed. Every update interval it is nudged
  by the gap between the VC's ideal share of the link and the share it actually
  got. VCs that TCP's window dynamics push below their share get more buffer.

An untagged frame that PEPD had to reject is made up for at the output: the next
tagged frame of that VC is *retagged* (CLP cleared) as it leaves.

The algorithm is the published PASD scheme (per-VC accounting with
steepest-descent weight updating). The block structure, the counters and the
decisions follow it. Widths, handshakes, the random number source, the SDWU
interval and step size, and the memory organisation are this implementation's
own choices. They are listed under [Departures and open points](#departures-and-open-points).

## Block diagram

```
 switch inputs                                                    output link
 in_cell[0..3] --> [SEL] --> [VC lookup] --> [PEPD] --push--> [FIFO] --> [Output    ] --> out_cell
   valid/ready     round      VPI/VCI->i      |   |            shared     [controller] <-- out_ready
                   robin                      |   | drop       1024 cells  |  |  |
                                              |   v (in_drop)              |  |  v drop (out_drop)
                        x_inc,u_inc ----------+   red_trigger              |  |  tx (rho_i)
                                              |        |                   |  |
                                              v        v                   |  |
                                        [Per-VC counters] <--v_inc-- [Nonlinear RED ]
                                         X_i U_i V_i X   --X_i,X-->  [with SDWU     ]
                                              ^                        F_i, LFSR
                                              +-- x_dec,u_dec,v_dec ---------+
                                                  (output controller)
 B_t lives in PEPD; every cell leaving the FIFO returns one cell to it (cell_freed).
```

| Module | Role |
|---|---|
| `pasd_pkg` | cell and FIFO-entry structs, the A2 marking enum, fixed-point widths |
| `pasd_sel` | round-robin choice of one input cell per cell time |
| `pasd_vc_lookup` | VPI/VCI to VC index table, written by management |
| `pasd_pepd` | frame accept/reject, B_t, L_i, A1_i |
| `pasd_fifo` | the single shared cell FIFO |
| `pasd_vc_counters` | X_i, U_i, V_i and X = sum X_i |
| `pasd_red_sdwu` | RED drop test, LFSR, utilisation measurement, F_i update |
| `pasd_out_ctrl` | drop-from-front, retagging, transmission, A2_i |
| `pasd_top` | all of the above wired as one output port |

One clock is one cell time everywhere. A cell taken from an input (handshake in
clock 0) is registered by SEL, pushed by PEPD in clock 1, and can be on the link
in clock 2 if the FIFO was empty.

## Cells and frames

`cell_t` holds an 8-bit VPI, a 16-bit VCI, the CLP bit (0 = untagged, 1 =
tagged), an end-of-frame flag `eof` (the AAL5 last-cell indication), and a
384-bit (48-byte) payload. A frame is the cells of one VC up to and including
the one with `eof`. Cells of different VCs may interleave freely. A VC's first
cell is recognised as the first cell after that VC's last `eof`, and PEPD
stores it in the FIFO entry (`fifo_entry_t.first`) together with the VC index,
so the output side sees frame boundaries without another lookup.

## The buffer accounting (PEPD)

PEPD keeps a signed counter **B_t**, the buffer space not yet promised to
anyone. It starts at B (1000 cells). Per VC it keeps A1_i (current frame
rejected) and L_i (cells of the current frame accepted so far).

* **First cell of a frame.** If B_t <= 0 the frame is rejected (A1_i = 1). A
  rejected untagged frame increments U_i. Otherwise the frame is accepted
  (A1_i = 0) and a whole maximum-size frame is prepaid: B_t -= M (M = 12). If the
  accepted frame is tagged, the RED test is run for it (see below).
* **Every cell** follows A1_i of its VC. Accepted cells are pushed into the FIFO
  and increment L_i and X_i. Rejected cells are dropped (`in_drop`).
* **Last cell of an accepted frame.** The unused part of the prepayment is
  refunded, B_t += M - L_i, and L_i is cleared.
* **Every cell that leaves the FIFO**, whether transmitted or dropped, gives B_t back one
  cell (`cell_freed`).

The three B_t updates can fall in the same clock and are summed.

**Why the FIFO is 1024 deep.** A frame is admitted while B_t is still positive.
If B_t is 1 when that happens, it falls to 1 - M. So admitted cells plus outstanding
prepayments can reach B + M - 1 = 1011 cells, and the physical FIFO must hold
that many. `FIFO_DEPTH = 1024` is the next power of two. An assertion in
`pasd_fifo` and one in `pasd_top` check that no push ever meets a full FIFO.
Frames longer than M cells are outside the scheme and would break this bound.

## The nonlinear RED test

When PEPD accepts the first cell of a tagged frame of VC i, the VC gets a frame
marked for dropping (V_i += 1) with probability

```
P = min{ (X_i / (X * F_i) - 1) * X / B , 1 }   if X_i > X * F_i,   else 0
```

X_i / (X F_i) compares the VC's occupancy with its fair part of the current
occupancy. X / B grows the probability as the whole buffer fills. The test is
`P > r`, with r from a 16-bit Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1,
stepped every clock). F_i is held as an unsigned fixed-point number with 16 fraction bits
(`Fq`, 0 .. 2^16 for 0 .. 1.0). X cancels out, which leaves one exact integer comparison
and no divider:

```
(X_i * 2^16 - X * Fq) * 2^16  >  r * Fq * B        (left side positive)
```

F_i = 0 gives P = 1 for any VC with cells in the buffer, as the formula's limit
says. The comparison is combinational within the clock. Its three products
(up to 44 bits) are the longest path of the design.

The RED test does not drop the frame just accepted. It only raises V_i. The drop
happens at the output, on the next tagged frame of that VC to reach the head of
the FIFO (drop-from-front). This frees buffer space at once and signals
congestion to TCP a full queueing delay earlier.

## SDWU: adapting the fair indices

TCP halves its window on a loss and grows it slowly. A VC with a small minimum cell rate
(MCR) therefore regains its share more easily than a large one, and with fixed
F_i = MCR_i / sum MCR the small VCs end up over-served. SDWU corrects this with a
steepest-descent step every update interval:

```
rho_i = (cells of VC i transmitted in the interval) / (link cell slots in the interval)
F_i  <- F_i + eta * (f_i - rho_i),      f_i = MCR_i / sum MCR
```

A VC that got less than its fair share f_i gets a larger F_i. More buffer is then
reserved for it and its drop probability falls. In this implementation:

* the interval is 2^LOG_T output-link cell slots (LOG_T = 12, so 4096). A slot is a clock
  with `out_ready` high, whether or not a cell is sent in it. This makes rho_i the VC's
  share of the link's capacity even when the link is slower than the clock, and makes rho_i
  a shift of the count;
* eta = 2^-ETA_SHIFT (ETA_SHIFT = 4, so 1/16), which makes the step an arithmetic shift;
* f_i is supplied by management on `fair_share` (Q1.16) and F_i is loaded with
  it at reset;
* F_i is kept within [0, 1];
* all N indices are updated together in the interval's last clock (`sdwu_update`).

## The output controller

Each clock it looks at the FIFO head. On the first cell of a frame it chooses the
frame's marking A2_i:

| head frame | V_i > 0 | U_i > 0 | A2_i | action |
|---|---|---|---|---|
| tagged | yes | any | 2 | drop the whole frame, V_i -= 1 |
| tagged | no | yes | 1 | transmit with CLP = 0, U_i -= 1 |
| tagged | no | no | 0 | transmit |
| untagged | any | any | 0 | transmit |

The other cells of the frame repeat A2_i of their VC. A cell to transmit waits
for `out_ready` (the link's cell slot). A cell to drop leaves in one clock
without a link slot. Every cell that leaves decrements X_i and returns one cell
to B_t. Only transmitted cells count towards rho_i.

## Parameters of `pasd_top`

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `NUM_IN` | 4 | switch inputs into SEL | chosen |
| `N_VC` | 5 | GFR VCs of the port | evaluation setup of the scheme |
| `B` | 1000 | buffer capacity for PEPD, cells | evaluation setup |
| `M` | 12 | maximum frame size, cells | evaluation setup (12-cell TCP frames) |
| `FIFO_DEPTH` | 1024 | physical FIFO entries, >= B + M - 1 | derived |
| `LOG_T` | 12 | SDWU interval = 2^LOG_T link cell slots | chosen |
| `ETA_SHIFT` | 4 | eta = 2^-ETA_SHIFT | chosen |

Management interface: write VC i's VPI/VCI with `cfg_we`, `cfg_idx`, `cfg_en`,
`cfg_vpi`, `cfg_vci`. Apply the ideal shares `fair_share[i]` = 2^16 * MCR_i / sum MCR
before reset is released. Status outputs: `bt` (B_t), `fifo_count`, `x_total`,
`fair_index[i]` (F_i), `rho[i]` (rho_i of the last interval), and single-clock
event strobes `in_drop`, `red_mark`, `out_drop`, `retag` and `sdwu_update`.

Size after coarse synthesis of `pasd_top` at the defaults: about 1100 flip-flop
bits and 429 kbit of FIFO memory (1024 entries x 419 bits).

## Verification

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

* `tb_pasd_sel`: checks the round-robin grant and the registered output against a
  reference arbiter, and the rotation when all inputs are busy.
* `tb_pasd_vc_lookup`: checks hits, misses and rewrites against a software table.
* `tb_pasd_fifo`: checks the FIFO against a queue model, filled to full and drained to empty.
* `tb_pasd_vc_counters`: checks simultaneous increments and decrements on the same VC,
  and saturation.
* `tb_pasd_pepd`: runs a reference model of the input port on random interleaved frames. It
  checks B_t each clock, the prepay and refund amounts, U_i and the RED triggers.
* `tb_pasd_red_sdwu`: checks the drop decision against the floating-point formula. It also
  checks the drop rate against the expected count, the interval length, and the exact rho_i
  and F_i after each update.
* `tb_pasd_out_ctrl`: checks drop, retag and transmit decisions, the counter strobes, and
  that drops do not wait for the link.
* `tb_pasd_top`: runs the whole port at its default parameters. It sends 5 VCs with MCR
  ratio 5:10:15:20:25 over 4 inputs. The link runs at half the offered rate, then at full
  rate, and then the port drains. The test checks:
  * the idle-port latency of 2 clocks;
  * per-VC cell order;
  * that only complete frames appear on the link;
  * a single CLP per frame, with retags matching the `retag` strobe;
  * cell conservation (in = out + input drops + front drops);
  * that B_t returns to B and the FIFO empties;
  * that the fill never exceeds B + M - 1.

  It also requires that each mechanism occurred at least once: SEL back-pressure, lookup
  miss, B_t <= 0, PEPD rejection, RED mark, front drop, retag, SDWU update and an F_i change.

* `tb_pasd_gfr_tcp` (with the helper `pasd_gfr_env`): runs the GFR workload described in
  the next section, on two ports side by side, one with SDWU and one with fixed F_i. It
  checks frame integrity and link utilisation, that every mechanism occurs, that SDWU does
  not lower fairness, and that with SDWU every VC gets within 0.02 of its ideal share.
  It runs 2 million clocks, which takes a few seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/pasd_pkg.sv tb/tb_pasd_top.sv --top-module tb_pasd_top
./obj_dir/Vtb_pasd_top
```

The end-to-end test takes well under a second. Uninitialised state does not
matter: everything that is read is reset.

## Behaviour under a GFR workload

`tb_pasd_gfr_tcp` recreates the setting the scheme was designed for:

* 5 VCs whose MCRs are in the ratio 5:10:15:20:25 and add up to half the link;
* 10 greedy window-controlled sources per VC, with slow start, additive increase, and the
  window halved once per round trip on loss;
* 12-cell frames, tagged by a token bucket at each VC's MCR;
* a 1000-cell buffer and a round trip of 2448 link cell times;
* a link that takes a cell every 4th clock.

The TCP model is deliberately simple, so the numbers show the trend, not a
calibrated result. Measured over 400 000 link slots:

| VC | ideal share f_i | rho_i with SDWU | rho_i, F_i fixed at f_i |
|---|---|---|---|
| 1 | 0.0667 | 0.0675 | 0.0743 |
| 2 | 0.1333 | 0.1321 | 0.1414 |
| 3 | 0.2000 | 0.1972 | 0.1970 |
| 4 | 0.2667 | 0.2663 | 0.2521 |
| 5 | 0.3333 | 0.3254 | 0.3178 |
| UI | 1 | 0.989 | 0.983 |
| FI | 1 | 0.9998 | 0.996 |

With fixed indices the small VCs take more than their share and the large ones
less, as the TCP dynamics predict. SDWU lowers F_1 (4369 to about 3760) and raises F_5
(21845 to about 28000), which moves every VC to within 0.01 of its share. With
this source model the buffer runs about 86 % full on average. The published
evaluation reports a much emptier buffer (about 43 %), so occupancy depends strongly on the
sources.

## Departures and open points

* **Memory.** The scheme puts cell headers in FIFO chips and payloads in external
  64-bit DDR SDRAM. That is how it reaches 10 Gbit/s STM-64 rates. Here header and payload
  sit together in one on-chip array, and no DDR controller is included. For the
  SDRAM, `pasd_fifo` would be split into a header FIFO and a payload buffer
  addressed by the same pointers.
* **Dropped cells free buffer space.** The published algorithm does not give a
  cell back to B_t, nor decrement X_i, when the output controller drops it. Its
  prose says B_t grows whenever a cell is served out of the FIFO. Dropped cells do
  leave the buffer, so this implementation frees them. Otherwise B_t and X_i would drift
  for good after every front drop.
* **Assumed values.** The update interval, eta, the random source, the number of
  switch inputs, the VPI/VCI table and all widths are not given by the scheme.
* **f_i from management.** The ideal shares f_i are given as inputs rather than divided from
  the MCRs in hardware.
* **Throughput.** The design handles one cell per clock. STM-64 needs about 23.5 Mcell/s,
  i.e. a 23.5 MHz clock, against the 166 MHz of commodity FIFO parts. Timing has not been
  checked on any technology. The one-clock RED comparison is the path to pipeline first
  if needed.
* **Approximated, not reproduced.** The scheme's own fairness and utilisation figures come
  from full TCP network simulations (New-Reno with go-back-N, edge and backbone switches).
  The workload test above approximates that setting with a much simpler source model.
