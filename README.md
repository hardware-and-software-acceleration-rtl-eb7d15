# Streaming Hamilton-Jacobi reachability accelerator (4D Dubins car)

Hamilton-Jacobi reachability answers a safety question for a robot: from which states
(position, speed, heading) can it no longer avoid an obstacle within a time horizon? The
answer is a value function V on a 4D state grid. The backward reachable tube is the set of
grid points where V ≤ 0. V is found by marching a level-set equation backwards in time. Each
time step visits every grid point and replaces V there by a function of V at the point and
at its eight nearest neighbours.

This RTL computes that time step as a **single streaming pass over the grid**. The value
array stays in DRAM. It flows through the chip once per time step, and new values flow back.
On chip there are only:

- a banked line buffer, about two 3D slices of the grid deep, which hands every processing
  element (PE) a point and its eight neighbours each clock cycle;
- four fully pipelined PEs, which together produce four new values per cycle.

A single pass is enough because of the system modelled, an extended Dubins car. Its
dissipation coefficients can be taken from the point's own state and gradient. No grid-wide
maximum of the derivatives is needed first, so one pass computes everything for a step.

```
        host registers (launch, addresses, cycle counter)
                         |
 DRAM ==AXI4 512b==> read engine -> gearbox FIFO 512->128 -> line buffer -> 4 PEs
  ^                    \ arbiter /                                            |
  +==AXI4 512b== write engine <- gearbox FIFO 128->512 <----------------------+
```

## 1. The step computed at every grid point

The grid is N1 × N2 × N3 × N4 points over (x, y, v, θ). Its defaults are 60 points per axis
over x ∈ [0, 6] m, y ∈ [0, 5] m, v ∈ [−1, 1] m/s and θ ∈ [−π, π]. The car follows:

    x' = v cos θ,   y' = v sin θ,   v' = a,   θ' = v tan δ / L
    a ∈ [−1.5, 1.5] m/s²,   δ ∈ [−π/12, π/12],   L = 0.3 m

For one grid point and each dimension d:

1. **One-sided differences.** D−_d = (V_i − V_{i−1})/dz_d and D+_d = (V_{i+1} − V_i)/dz_d.
   At the first or last node of an axis the missing neighbour is extrapolated as
   V_i + |V_i − V_other|·sign(V_i).
2. **Gradient.** p_d = (D+_d + D−_d)/2, the central difference.
3. **Optimal control.** The control maximises p·f, so it is bang-bang.
   a = +1.5 if p_v ≥ 0, otherwise −1.5. θ' = ±|v| tan(π/12)/L, with the sign of p_θ.
   x' and y' do not depend on the control.
4. **Hamiltonian with Lax-Friedrichs dissipation.**
   H = Σ_d p_d·ż_d − Σ_d |ż_d|·(D+_d − D−_d)/2.
5. **Time step and tube update.** V_new = V + H·dt, then V_out = min(V, V_new). The minimum
   keeps the tube from shrinking.

The time step dt is a constant computed at elaboration. N_ITER steps cover a horizon of
0.5 s, so dt = 0.5 s / N_ITER, about 7.46 ms for 67 steps. dt is capped by the CFL bound
1 / Σ_d(α_d/dz_d), where α_d is the largest possible |ż_d|. The bound is 13.46 ms on the
default grid, so the CFL number is 0.55. At the CFL limit itself, the extrapolated
boundaries make negative values run away within about 17 steps.

One pass is one time step. A run makes `N_ITER` passes (default 67). It stops early if the
largest |V_out − V| of a pass falls below `EPS`; `EPS` = 0 (the default) turns that test off.

## 2. The line buffer (`hj_mem_buffer`, `fifo_segment`)

This is the part that makes the design work, and the least obvious one.

**Order of the data.** The array is stored row-major with θ (index l) fastest. A word is
128 bits and holds `NUM_PE` = 4 consecutive values along θ, so N4 must be a multiple of 4.
The buffer takes in one word per enabled cycle. Distances in words between a point and its
neighbours are:

| neighbour | distance in words |
|---|---|
| ±1 along x (i) | S1 = N2·N3·N4/4 |
| ±1 along y (j) | S2 = N3·N4/4 |
| ±1 along v (k) | S3 = N4/4 |
| ±1 along θ (l) | one lane over in the same word, or one word over |

**Delay line.** If the word holding the centre point entered S1 cycles ago, the +x
neighbour is entering now and the −x neighbour entered 2·S1 cycles ago. So the buffer is a
delay line 2·S1 words long, tapped at nine places:

    0, S1−S2, S1−S3, S1−1, S1, S1+1, S1+S3, S1+S2, 2·S1

The chain is built from eight `fifo_segment`s, one between consecutive taps. Each segment
is a circular-buffer RAM (one block RAM on an FPGA) plus an output register. Every segment
shifts on the same enable, so the taps stay aligned.

**Banking.** Every tap is a full 4-value word, so each of the four lanes (l mod 4 = 0..3)
has its own bank of the delay line. All four PEs get their stencils in the same cycle. The
±θ neighbours of lanes 0 and 3 come from the neighbouring lanes of the words at taps S1−1
and S1+1. The others come from the centre word itself.

**Size.** 2·S1 + 2 words, that is 2·N2·N3·N4 + 2·NUM_PE values. For the default grid this
is 432,008 values or 13.8 Mbit, against 51.8 MB for the whole array.

**Valid window.** A counter of shifted words marks the centre as valid from word S1+1 to
word S1 + N1·N2·N3·N4/4. Before that window the buffer is still filling. After it, the
controller shifts in zero padding so the last S1 centre words can be read out. Taps that
reach outside the grid at that time carry padding or data of the previous pass. The PE
never uses them, because it replaces them by the boundary extrapolation.

**Cost.** The first result of a pass appears S1 words after the pass starts. A pass takes
N1·N2·N3·N4/4 + S1 enabled cycles plus the pipeline latency.

## 3. The processing element (`hj_pe` and its sub-blocks)

Each PE is an 8-stage pipeline. All stages advance on one global enable, so the whole
datapath stalls as a unit.

| stage | block | work |
|---|---|---|
| 0 | `hj_pe` | register the stencil and the point's (i, j, k, l) |
| 1–2 | `hj_deriv` ×4 | boundary extrapolation, D±, p_d, (D+ − D−)/2 |
| 1–2 | `hj_state_lut` | v, \|v\|·tan(δmax)/L, cos θ, sin θ read from ROM (one stage, delayed one more) |
| 3 | `hj_dynamics` | optimal control and ż |
| 4–5 | `hj_hamiltonian` | eight products, then the sum |
| 6–7 | `hj_update` | V + H·dt, minimum, \|change\| |

**Own index counters.** A PE never receives addresses. It counts (i, j, k, l) itself: l
starts at the PE's lane number and steps by 4 on every valid input. It uses the indices for
two things:

- the boundary flags, which trigger the extrapolation;
- the addresses of its state lookup table.

**Lookup table.** Each PE has its own table, so there is no shared-ROM contention. It holds
N3 + N4 entries per function. The tables are filled at elaboration with $cos/$sin over the
grid, so no table file is needed.

## 4. Number formats (`hj_pkg`)

| quantity | format | range |
|---|---|---|
| V in DRAM, in the buffer and at the PE ports | 32-bit signed fixed point, 5 integer bits including sign, 27 fraction bits | ±16, step 7.5·10⁻⁹ |
| constants 1/dz | 32-bit, 12 integer and 20 fraction bits | 1/dz_v = 29.5 on the default grid is beyond ±16 |
| differences, derivatives and H inside the PE | 48-bit, 27 fraction bits | a value step of 0.5 across dv = 0.034 is already a slope of 14.7; H reaches several tens near kinks of V |

Products truncate. Only the final V_new is saturated back to 32 bits. If the internal
format were only 32 bits, H would wrap around after a few passes on the full-size grid.

## 5. Pass control and in-place update (`hj_top`)

The controller has five states: `S_IDLE`, `S_START`, `S_RUN`, `S_END` and `S_DONE`.

- Pass 0 reads the input array and writes the output array.
- Every later pass reads and rewrites the output array in place. This is safe because a
  point's old value always enters the chip S1 words before its new value leaves.
- The datapath enable is `running && word available && room in the write FIFO`.
- A pass ends when the last write response has arrived. Only then does the next pass start
  reading, so a read never overtakes a pending write.
- The largest |change| of the pass is compared with EPS at the end of the pass.

## 6. DRAM side (`axi_read_engine`, `axi_write_engine`, `gearbox_fifo`, `mem_arbiter`)

AXI4 with a 512-bit data bus. Both engines issue INCR bursts of `BURST` = 64 beats (4 KB),
and a shorter burst at the end of a pass.

- **Read engine.** It issues a burst only when the read FIFO has room for it plus every beat
  still in flight. It can therefore hold `rready` high and never stalls the bus.
- **Write engine.** It issues a burst address only when the whole burst is already in the
  write FIFO. It then sends the data back to back and counts B responses.
- **Arbiter.** A round-robin arbiter grants the one shared address slot to one engine at a
  time. It holds the grant until that engine's address handshake.
- **Gearbox FIFOs.** They convert 512-bit beats to 128-bit words and back. Each is two
  bursts deep.

Array base addresses must be aligned to a burst (4 KB), so no burst crosses a 4 KB boundary.

## 7. Host registers (`hj_ctrl_regs`)

A simple strobe/address/data port. Read data arrives one cycle after `reg_rd`.

| offset | register |
|---|---|
| 0x500 | control: write 1 to launch; reads 2 when finished |
| 0x504 | cycle counter: cleared at launch, counts while busy |
| 0x50C / 0x510 | input array address, low / high 32 bits |
| 0x514 / 0x518 | output array address, low / high 32 bits |

## 8. Where this RTL follows its source design and where it chooses

Taken from the source design:

- the single-pass solver step with a precomputed dt;
- 4 PEs, each pipelined, each with its own loop indices and state lookup table;
- banked line buffer built from block-RAM FIFOs, with lengths equal to the strides between
  neighbours;
- 32-bit fixed point with 27 fraction bits;
- 512-bit AXI, read/write engines with an arbiter, and width-converting FIFOs;
- register offsets;
- 67 iterations;
- car parameters.

Chosen here because the source leaves them open:

- grid size and the v and θ ranges;
- number of pipeline stages and the global-enable stall;
- the 48-bit internal format and the 12.20 coefficient format;
- burst length and FIFO depths;
- round-robin arbitration;
- in-place update after the first pass;
- zero padding at the end of a pass;
- synchronous active-low reset;
- the register port protocol.

Known differences:

- **Buffer length.** The buffer is written 2·N2·N3·N4 + 2·NUM_PE values long. This counts
  the three dimensions inside the outermost loop. The source states the length in terms of
  N1·N2·N3, which is the same for a cubic grid.
- **Heading axis.** The heading axis is not treated as periodic. It uses the same boundary
  extrapolation as the other axes.
- **Speed.** The source reports about 7.2·10⁵ cycles per pass for its (smaller, unstated)
  grid. This RTL takes 3,294,000 cycles per pass on the 60⁴ default. That is 1.13 s for 67
  passes at 196 MHz.
- **Not included.** The DRAM, the PCIe platform shell and host software are not part of this
  RTL. A behavioural AXI memory (`tb/axi_mem_model.sv`) replaces the DRAM in simulation.

## 9. Simulating

Any testbench builds with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hj_pkg.sv tb/hj_ref_pkg.sv rtl/*.sv tb/axi_mem_model.sv tb/tb_hj_top.sv \
    --top-module tb_hj_top -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
`tb/hj_ref_pkg.sv` holds a floating-point model of one step, and the testbenches compare
against it. The tolerance is 10⁻⁶ per step, which is far above the fixed-point error.

| testbench | what it covers |
|---|---|
| `tb_fifo_segment`, `tb_hj_mem_buffer` | delay lengths; every stencil tap against a software index model, with random stalls |
| `tb_hj_deriv`, `tb_hj_state_lut`, `tb_hj_dynamics`, `tb_hj_hamiltonian`, `tb_hj_update`, `tb_hj_pe` | each arithmetic stage, including slopes beyond the value range and saturation; the PE against the reference with stalls and boundaries |
| `tb_gearbox_fifo`, `tb_mem_arbiter`, `tb_axi_read_engine`, `tb_axi_write_engine`, `tb_hj_ctrl_regs` | flow control, fairness, burst framing, register map |
| `tb_hj_top` | 4×5×4×8 grid, 3 passes, random DRAM stalls. After the run, every point of the final array is compared with 3 reference steps. It counts read stalls, write stalls, padding, in-place passes, arbitration conflicts, boundary points and an early stop on a second instance with EPS set |
| `tb_hj_full` | the default 60⁴ configuration with no parameter overrides, launched through the registers and run for all 67 passes. Every 811th point of every pass is checked. Also checks the cycle counter and that no value grew. About 5 minutes of simulation |

To change the grid, set `N1`..`N4` on `hj_top`. N4 must be a multiple of `NUM_PE`. dt,
1/dz and the lookup tables follow automatically.
