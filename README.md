# Time-sharing FDTD sound rendering engine

This RTL simulates how sound travels in a rectangular room, in real time. The room is
divided into a 3-D grid of pressure points. A finite-difference time-domain (FDTD) update
moves every point forward one time step per output sample. Music is injected at a source
point, and the pressure at an observation point is the rendered output.

The main idea is **time sharing**. Earlier FPGA renderers placed one arithmetic cell on
every grid point and kept the field in flip-flops, so the room could not grow past a few
thousand points. Here a single computing unit visits the grid points one per clock cycle.
The whole field lives in two on-chip block RAMs. The room can then be as large as the block
RAM allows, and the price is a lower output sample rate:

    f_sample = f_clk / (number of grid points)

At 200 MHz and 32 x 32 x 16 = 16,384 points this gives 12.2 kHz.

The design follows the system described in *"A real-time sound rendering system based on
the finite-difference time-domain algorithm"*: the update equations, the block structure of
the rendering engine ("DHM") and its computing unit, 32-bit data, the grid size and a
reflection factor of 0.95. Many details are not given there: buffer organisation, pipeline
timing, handshakes, number formats and the converter interfaces. Those are this
implementation's own choices. Each is marked below and in the header comment of its file.

## The update scheme

The scheme is the "hardware-oriented" FDTD with Courant number 1/2. With this number, a grid
point away from the walls needs no multiplier:

    P[n+1] = (Pl + Pr + Pf + Pb + Pd + Pt + 2*P[n]) / 4  -  P[n-1]

Here `Pl`, `Pr`, and so on are the six neighbours at step n: left/right in x, front/back in
y, down/top in z. A point on a wall uses an impedance boundary. The neighbour outside the
room is a "ghost point", eliminated by mirroring: the neighbour on the opposite side counts
twice. The equation keeps the same form, but two constants depend on how many walls `m` the
point touches (1 face, 2 edge, 3 corner):

    P[n+1] = C1(m) * S  -  C2(m) * P[n-1]          S = mirrored neighbour sum + 2*P[n]
    C1(m) = (1+R) / (4(1+R) + 2m(1-R))
    C2(m) = (2(1+R) - m(1-R)) / (2(1+R) + m(1-R))

For `m = 0`, these reduce to 1/4 and 1. `R` is the wall reflection factor. The six
constants are computed during elaboration from the parameter `REFL_Q16` (R in unsigned
Q0.16), by functions in `fdtd_pkg`. They are stored as 18-bit signed values with 16 fractional bits.

**Rounding matters for stability.** A plain arithmetic right shift rounds negative numbers
down. The bias builds up over thousands of steps and pushes the field negative. Every shift
and every product is therefore rounded toward zero. For a negative operand whose
shifted-out bits are not all zero, 1 is added (`fdtd_pkg::sra_rtz`). The document
prescribes this correction for the shift. Applying it to the Q.16 products as well is this
design's choice.

## How one grid point per clock is fed

The hardest part is the memory schedule, in `dhm`, `grid_position_ctrl`,
`neighbour_buffer` and `delay_line`.

Each of the two RAMs (`block_ram`, one read port and one write port each) holds one full
time step. During step n:

* **Read side.** Both RAMs are read at the same address, walking the grid in raster order:
  `addr = i + NX*(j + NY*k)`, with i fastest, one word per clock.
  * The RAM holding P[n] feeds the **neighbour buffer**. This is a tapped delay line of
    `2*NX*NY + 1` words.
  * The RAM holding P[n-1] feeds **Buffer-P^{n-2}**. This is a delay line of `NX*NY + 1`
    words.
* **Compute side.** The grid point being updated sits at delay `NX*NY + 1` in the neighbour
  buffer.
  * Its neighbours are at fixed taps: k+1 at delay 1, j+1 at `NX*NY-NX+1`, i+1 at `NX*NY`,
    i-1 at `NX*NY+2`, j-1 at `NX*NY+NX+1`, k-1 at `2*NX*NY+1`.
  * Buffer-P^{n-2} delivers that point's P[n-1] at the same moment.
  * So compute runs `LAG = NX*NY + 2` cycles behind the read side (one extra cycle for the
    RAM read).
  * For a point on a wall, the buffer swaps the outside tap for the opposite one. That tap
    may hold a neighbouring row, plane or time step. Only `faces` from the controller
    selects it, so the computing unit needs no knowledge of geometry.
* **Write side.** Two cycles later (the computing unit's latency), P[n+1] is written into
  the RAM that held P[n-1], at the same address. That word was already read (`LAG + 2`
  cycles earlier) and is not needed again.
* **Ping-pong.** In the next step the two RAMs swap roles (`ram_we_sel`, `ram_rd_sel`).
  Even steps read neighbours from Block_RAM_1 and write Block_RAM_2. Odd steps do the
  reverse.
* **No gap between steps.** The read side of step n+1 starts the cycle after the read side
  of step n ends, while the last `LAG` points of step n are still being computed. This is
  safe because step n+1 reads address `a` N cycles after step n read it, and step n wrote
  it `LAG + 2` cycles after reading. The scheme needs `NZ >= 3`, which elaboration checks.
  After the first step, one step takes exactly N cycles, which is what the `f_clk / N`
  rate requires.

A run therefore lasts `N` (clearing) + 1 + `LAG` + `n_steps*N` + 1 + 2 cycles from `start`
to `done`. The testbenches check this number.

This differs from the document in two ways:

* The document gives one buffer as `4*NX*NY` bytes (one plane). The neighbour buffer here
  holds two planes, because one read port walking in raster order must cover both the k-1
  and the k+1 neighbour.
* The document's figure draws a single multiplexer after the two RAMs. Its text has both
  RAMs read together (neighbours from one, the old value from the other), so this design
  uses two multiplexers.

## Computing unit

`computing_unit` is built as described:

* An adder sums six neighbours plus the centre shifted left by one.
* Two multiplexers pick the multiplicands by `loc_indicator` (general/face/edge/corner).
* Two fixed-point multipliers compute `C1*S` and `C2*P[n-1]`.
* Two bypass multiplexers replace them by `S>>2` and `P[n-1]` for a general point.
* A subtractor forms the result.

This design adds the following:

* **Registers.** There are two pipeline registers, so `data_dvld` follows the inputs by
  `CU_LATENCY = 2` cycles.
* **Source injection.** The incidence is added to the result at the source point, a "soft"
  source. A hard source would make the output equal the input, because the document puts
  the source and the observer at the same middle point.
* **No overflow handling.** The result wraps to `DATA_W` bits, and there is no saturation.

## Run control and the system around the engine

`system_ctrl` runs the flow:

* `start` latches `n_steps` and clears both RAMs (N cycles of zero writes).
* It then pulses `go` to the grid counters and waits for their `finished` signal.
* After two cycles of drain it pulses `done`.
* `n_steps = 0` only clears.

Per grid point it also produces:

* `loc_indicator` and `faces`;
* `src`, brought out of `dhm` as `din_req`: the cycle in which `incidence` is read;
* the write address and write enables: `we1 = data_dvld & ram_we_sel`,
  `we2 = data_dvld & ~ram_we_sel`, or both while clearing;
* the observation strobe. `dataout` / `dataout_valid` carry one sample per step.

`sound_render_top` is the FPGA-side chain:

* `adc_if` takes 14-bit two's-complement (optionally offset-binary) samples from the A/D
  board. It sign-extends them, multiplies them by 4 and holds the latest one, so the
  converter rate is resampled to the step rate by sample-and-hold.
* The engine's output leaves on `edt_data/edt_valid`, toward the link to the second FPGA.
* `dac_if` takes the stream back on `atca_data/atca_valid` (after the board-to-board link).
  It scales and clips it to 16 bits and holds it for the D/A converter.

The two inter-chip links are not part of this RTL, because their protocols are not
described. For a single-chip build, connect `edt_*` to `atca_*`. The converter widths
(14 and 16 bits) come from the converter parts the system names. The interface logic is
this design's.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY`, `NZ` | 32, 32, 16 | grid size; RAM depth is `NX*NY*NZ`; need `NX,NY >= 2`, `NZ >= 3` |
| `DATA_W` | 32 | pressure word, signed fixed point (binary point is the user's; tests use integer Pa) |
| `REFL_Q16` | 62259 | wall reflection factor R = 0.95 in Q0.16 |
| `SRC_*`, `OBS_*` | middle (`NX/2, NY/2, NZ/2`) | source and observation grid point (`dhm`, `system_ctrl`) |
| `ADC_W`, `ADC_SHIFT` | 14, 2 | A/D word width and scaling (`adc_if`) |
| `DAC_W`, `DAC_SHIFT` | 16, 0 | D/A word width and scaling (`dac_if`) |
| `COEF_W`, `COEF_FRAC`, `CU_LATENCY` | 18, 16, 2 | in `fdtd_pkg` |

At the defaults the engine holds 2 x 16,384 x 32 bits of RAM and about 3,073 words of
buffers. A 65,536-point room (32 x 32 x 64), the largest the document reports for its
device, only needs `NZ = 64`. Its sample rate drops to about 3 kHz.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference model (`tb/fdtd_ref_pkg.sv`, plus a copy
inside `tb_dhm`) is written directly from the equations above. It uses floating-point
constants rounded to Q.16 and truncating integer division, and shares no code with the RTL.

* `tb_dhm`: a 5 x 4 x 4 room with the source and observer off-centre. It checks every word
  written to the RAMs for 60 steps, with an impulse and then random input, plus the step
  period and the run length.
* `tb_sound_render_top`: a 6 x 5 x 4 room through the A/D and D/A interfaces. It counts
  that clearing, RAM swaps, all four point types, the rounding correction, source
  injection, overlapping steps, a held A/D sample and D/A clipping each occur.
* `tb_sound_render_full`: the default 32 x 32 x 16 room, with a 16,384 pulse and 1000
  steps (about 12 s with Verilator). The response starts 16384, 8192, -6144, -5120, and
  stays below 2% of its peak after step 400. Every sample matches the model.
* `tb_sound_render_music`: the default room fed with a two-tone signal sampled at 44.1 kHz,
  with the clock taken as 200 MHz (a new A/D sample every 4,535 cycles). It renders 300
  steps, and checks every output and the 16,384-cycle step period.
* `tb_dhm_65536`: the engine built with `NZ = 64` (65,536 points), checked for 12 steps.
* Unit tests: `tb_computing_unit`, `tb_neighbour_buffer`, `tb_delay_line`, `tb_block_ram`,
  `tb_grid_position_ctrl`, `tb_system_ctrl`, `tb_adc_if`, `tb_dac_if`.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/fdtd_pkg.sv tb/fdtd_ref_pkg.sv \
        rtl/*.sv tb/tb_sound_render_full.sv --top-module tb_sound_render_full
    ./obj_dir/Vtb_sound_render_full

Not verified: clock rate (no timing analysis), FPGA resource use, and behaviour with
overflowing data.

## Where this design departs from, or adds to, the source

* Two-plane neighbour buffer, with ghost substitution done in the buffer.
* Consecutive time steps overlap.
* RAMs are cleared on every `start`.
* Soft source.
* Rounding toward zero applied to the products as well as the shift.
* 16-fractional-bit constants, two pipeline stages, and a wrapping output.
* The run handshake (`start`/`n_steps`/`busy`/`done`/`din_req`).
* The A/D and D/A interface behaviour.

Not built:

* the inter-FPGA and ATCA links;
* the converter chips;
* the alternatives the source only proposes: several computing units, or several smaller
  engines working on sub-meshes.
* the comparison designs: a one-cell-per-point parallel renderer, and a computing unit for
  the classic (Yee) FDTD scheme.
