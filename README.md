# 16×16 pixel array processor for greyscale morphological filtering

This is a mesh of 16×16 processing elements (PEs). Each PE owns one 8-bit pixel and
recomputes it from the pixels of its four nearest neighbours. With one instruction word,
the array computes greyscale erosions, dilations and geodesic dilations over a 16×16 tile.
An opening by reconstruction takes two instructions:

1. an erosion;
2. a geodesic dilation, repeated until the image stops changing.

What makes the design unusual is that the PEs do **not** iterate in lock step. Each PE runs
its own loop and reads whatever value its neighbours currently show. A neighbour may be
one iteration behind or one iteration ahead. For iterated geodesic operators this
"functionally asynchronous" update converges to the same fixed point as the synchronous
update, and usually faster, because a value can be used by its neighbours as soon as it
is produced. Nothing synchronises the PEs during an instruction. The only global
synchronisation is the Req/Ack handshake at the start and the end of each instruction.

The original circuit is self-timed. This RTL is a synchronous, single-clock model of it.
A per-PE enable, `step_en`, lets each PE advance at its own pace, so the unsynchronised
behaviour can still be produced and tested (see *Modelling the asynchronism*).

## The instruction word

The 12-bit instruction is broadcast to all PEs (`morpho_pkg::instr_t`):

| bits  | field      | meaning |
|-------|------------|---------|
| 11    | `max_op`   | 1 = Maximum (dilation), 0 = Minimum (erosion) |
| 10    | `geodesic` | after the neighbourhood, combine with the reference pixel using the *dual* operation |
| 9     | `nb_b`     | include the PE's own current value |
| 8     | `nb_n`     | include the north neighbour |
| 7     | `nb_e`     | include the east neighbour |
| 6     | `nb_s`     | include the south neighbour |
| 5     | `nb_o`     | include the west neighbour ("ouest") |
| 4..0  | `n_iter`   | number of local iterations, 0..31 |

The field layout is the original one. Two points are this implementation's reading:

- **Polarity of bit 11:** 1 selects Maximum.
- **Bit 9:** it means "the PE itself". When bit 9 is clear, the first operand of each
  iteration is *passed* into the accumulator instead of being combined with it. The ALU's
  Pass input exists for this.

Examples (hexadecimal):

| operation | word |
|-----------|------|
| erosion, full 5-pixel cross, 2 iterations | `0x3E2` |
| geodesic dilation, full cross, 31 iterations | `0xFFF` |

In the geodesic dilation, each iteration computes
`x = min(max(x, xN, xE, xS, xO), ref)`.

## What one PE does

Each PE holds six 8-bit registers:

| register | role |
|----------|------|
| E | next input pixel; serial in, parallel out |
| R | next reference pixel; serial in, parallel out |
| S | previous result; parallel in, serial out |
| B | temporary value of the current iteration |
| L | value of the previous iteration; the only register the neighbours can see |
| I | reference pixel of the current instruction |

The datapath (`pe.sv`) works like this:

- An operand multiplexer picks I or the L register of the north, east, south or west
  neighbour.
- A sampling register (the "Q-Flops") captures the chosen value. The neighbour is read
  directly, with no handshake with it.
- An ALU then computes min or max of that value and B, or passes the value through.
- The result is written back into B.

The ALU compares with a rippled carry of A + ~B + 1, then selects the result with a
multiplexer.

The controller (`pe_control.sv`) advances one step per clock while `step_en` is high:

```
IDLE     Req seen           ->  S <= B, B <= E, I <= R, latch instruction   (ignores step_en)
ITER     iterations left    ->  L <= B, load the operand list
         none left          ->  DONE
SAMPLE   Q-Flops <= mux(next operand)           operands: N, E, S, O (enabled ones), then I if geodesic
COMPUTE  B <= ALU(Q-Flops, B)                   -> SAMPLE, or ITER after the last operand
DONE     done = 1 until Req falls               -> IDLE
```

An iteration with k operands takes 1 + 2k enabled cycles. From the cycle Req is first
seen high, `done` rises after 2 + n·(1 + 2k) cycles. For example, a single iteration
over the full cross with the geodesic step takes 13 cycles.

L is loaded at the *start* of each iteration. After the last iteration, therefore, L still
holds the value from before that iteration, and the final value is only in B. The final
value reaches the outside world through S when the next instruction starts.

## Getting pixels in and out

Each row of PEs has three 1-bit serial links, driven by one common `shift` enable:

- the E links and the R links enter at the west end;
- the S links leave at the east end.

Inside a row, the 16 E registers form one 128-bit shift chain, and likewise the R and S
registers.

**Bit order:** one `shift` moves every chain by one bit. Send the pixel of the east-most
column first, each pixel LSB first. The S output comes out in the same order, so `s_sout`
can be wired straight back into `e_sin`. This is how the result of an erosion becomes the
input of the following geodesic dilation without leaving the chip.

The pipeline registers let I/O overlap with computation. A typical schedule:

```
shift in E0/R0 (128 cycles)
raise Req (instr 0)  -> cycle 1: S <= old B, B <= E0, I <= R0
                        from cycle 2: shift in E1/R1 and shift out S while the PEs iterate
wait Ack, drop Req, wait for Ack to fall
raise Req (instr 1)  -> S <= result 0, B <= E1, ...; shift result 0 out while instr 1 runs
```

Handshake rules (the first is checked by an assertion in `morpho_array`):

- `shift` must be low in the cycle `req` rises.
- `instr` must be stable while `req` is high.
- `ack` is the AND of every PE's `done`. It falls one cycle after `req` falls.

## Edges of the array and larger images

The PEs on the edges read their missing neighbours from the `border_n/s/w/e` ports. For a
single tile, drive these ports with the neutral value of the operation: 255 for an
erosion, 0 for a dilation. To process a larger image in 16×16 tiles, the environment must
supply the neighbouring tiles' pixels there.

The original chip processed 256×256 images at 30 frames/s, which is 256 tiles per frame.
How it handled tile seams is not known, so that stitching logic is not part of this RTL.

`tb_frame_opening` shows what the border ports make possible. It computes an opening of
size 1 over a 256×256 frame, exactly as over the whole frame: an erosion pass over all
tiles, then a dilation pass over the eroded frame. Each tile is shifted in while the
previous one is computed. The two passes take 68,106 clock cycles, so a clock of about
2 MHz sustains 30 frames/s. An operator iterated across tile seams, such as a full
reconstruction, would need repeated passes over the frame.

## Modelling the asynchronism

`step_en[r][c]` gates every controller step of PE (r,c) except the initial transfer.
Because of this, all PEs load their inputs in the same cycle, and after that each PE
advances at its own pace.

- **Lock-step array:** tie `step_en` high. Every PE then copies L in the same cycle and
  samples its neighbours while they are stable. The array computes exactly the synchronous
  iteration, which the testbenches compare against a reference model.
- **Unsynchronised array:** drive `step_en` randomly. A PE then samples neighbours that
  may be at other iterations. This is the update mode the design was conceived for.
  - Geodesic reconstructions still reach the fixed point, provided `n_iter` leaves enough
    margin.
  - Non-geodesic iterated operators depend on the pace. For example, two unsynchronised
    erosion iterations are not exactly a size-2 erosion.

In the chip, what `step_en` models are the data-dependent delays of self-timed logic. It
is not a functional input of the original design.

## Module map

| file | contents |
|------|----------|
| `rtl/morpho_pkg.sv` | instruction struct, operand-select enum, widths |
| `rtl/morpho_array.sv` | top: the ROWS×COLS mesh, serial chains, border wiring, Ack, handshake assertions |
| `rtl/pe.sv` | one processing element (datapath + controller) |
| `rtl/pe_control.sv` | per-PE state machine (transfer, outer/inner loop, handshake) |
| `rtl/pe_operand_sel.sv` | operand multiplexer + Q-Flop sampling register |
| `rtl/pe_alu.sv` | min / max / pass with ripple-carry comparison |
| `rtl/pe_bmux.sv` | B storage: loads E at the start, ALU results afterwards |
| `rtl/pe_pipe_reg.sv` | 8-bit serial/parallel register used for E, R and S |

`morpho_array` has three parameters, all defaulting to the original sizes:

| parameter | default |
|-----------|---------|
| `ROWS` | 16 |
| `COLS` | 16 |
| `PIX_W` | 8 |

At the defaults, synthesis gives about 43k word-level cells and 22,784 flip-flop bits.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. For
example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/morpho_pkg.sv tb/tb_morpho_array.sv \
          --top-module tb_morpho_array -Mdir obj_array
./obj_array/Vtb_morpho_array
```

Replace `morpho_array` with the name of any other block to run its testbench.

| testbench | what it checks |
|-----------|----------------|
| `tb_pe_alu` | all 65,536 operand pairs in min, max and pass |
| `tb_pe_operand_sel`, `tb_pe_bmux` | random select/enable sequences against a reference |
| `tb_pe_pipe_reg` | a 4-register chain: serial in/parallel out and parallel in/serial out, bit order |
| `tb_pe_control` | 300 random instructions: the exact action sequence, the latency formula and the handshake, with steady and random `step_en` |
| `tb_pe` | one PE with random pixels, neighbours and instructions against a behavioural model, including the S-output pipeline and L |
| `tb_morpho_array` | see below |
| `tb_frame_opening` | a 256×256 frame as 256 tiles with borders from the neighbouring tiles: an opening of size 1, compared with a whole-frame model |

`tb_morpho_array` runs at the default 16×16 size and takes well under a second. It runs,
in order:

1. an erosion;
2. a dilation with a passed first operand;
3. a 31-iteration geodesic dilation, fed by looping S back into E, in lock step;
4. the same dilation with a random per-PE pace;
5. an asymmetric N+E dilation;
6. a zero-iteration instruction.

It compares every lock-step result with a synchronous model and the unsynchronised result
with the reconstruction's fixed point. It also checks the Req-to-Ack latency, and counts
each mechanism: overlapped I/O, loop-back, PEs finishing at different times.

## How this differs from the original chip

- **Clocking:** the original is self-timed, built from precharged differential (DCVSL)
  logic and asynchronous control automata, with no clock. Here:
  - one clock drives every PE;
  - B and L are flip-flops instead of latched logic stages;
  - the two-stage self-timed ring (Q-Flops → ALU/B) takes two clock cycles per operand.

  Cycle counts are therefore this design's own. The chip's reported time for one
  full-neighbourhood geodesic iteration (250 ns) corresponds here to 13 cycles.
- **Q-Flops:** the original Q-Flops sample neighbours that run on independent timing, and
  resolve metastability internally. In this single-clock model that problem does not arise.
- **Power-down:** idle PEs are not powered down. A finished PE simply waits in DONE.
- **Choices made by this design** (the original does not specify them):
  - the width and bit order of the serial links;
  - the handshake's return-to-zero phase;
  - the operand order;
  - the meaning of `n_iter = 0`;
  - reset values (all zero, asynchronous reset);
  - the border ports.
- **Not included:** the pad ring and other process-specific parts of the chip.
