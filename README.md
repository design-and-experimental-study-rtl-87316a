# Three-level NPC inverter controller: space-vector PWM in SystemVerilog

A diode-clamped (neutral-point-clamped, NPC) three-level inverter connects
each output phase to one of three potentials: the positive rail (P), the
neutral point between the two DC-link capacitors (O), or the negative rail
(N). Each leg has four IGBTs, so three legs need twelve gate signals. This
RTL is the digital controller of such an inverter, meant for an FPGA. It
takes a reference voltage vector (U-alpha, U-beta) and produces the twelve
gate signals by space-vector PWM (SVPWM). It adds dead time to every
complementary switch pair and blocks all gates when a gate driver reports a
fault or the two capacitor voltages drift apart. It also reads the inverter's
measured voltages and currents from three AD7656 converters.

The modulator works in sector I only. It finds the 60-degree sector of the
reference and rotates the reference into sector I. There it finds the small
triangle (region) that holds the reference and computes the dwell times of
the triangle's corner vectors. A fixed table then gives the switching
sequence for the region. Finally it maps that sequence back to the real
sector and converts it into two comparator thresholds per leg. A triangular
carrier compared with these thresholds gives centre-aligned, seven-segment
PWM in which every switching step moves one leg by one level.

## Contents

- [The vectors of a three-level bridge](#the-vectors-of-a-three-level-bridge)
- [Sector, rotation and region](#sector-rotation-and-region)
- [Dwell times and switching sequences](#dwell-times-and-switching-sequences)
- [Back to the real sector](#back-to-the-real-sector)
- [Carrier, comparators and the twelve gates](#carrier-comparators-and-the-twelve-gates)
- [Protection](#protection)
- [AD7656 read-out](#ad7656-read-out)
- [Timing of the whole chain](#timing-of-the-whole-chain)
- [Top-level interface](#top-level-interface)
- [What is a choice of this design](#what-is-a-choice-of-this-design)
- [Verification and simulation](#verification-and-simulation)
- [Files](#files)

## The vectors of a three-level bridge

Write each leg's state as Sx in {-1, 0, +1} (N, O, P). The output space
vector is

    V = (Ud/3) * (Sa + Sb*e^{j2pi/3} + Sc*e^{-j2pi/3})

The 27 states give 19 distinct vectors:

- the zero vector: PPP, OOO or NNN;
- 6 short vectors of length Ud/3, each with two redundant states (for
  example POO and ONN);
- 6 middle vectors of length sqrt(3)*Ud/3 (for example PON);
- 6 long vectors of length 2Ud/3 (for example PNN).

Together they span a hexagon cut into 24 triangles. In sector I
(0 to 60 degrees) the corners are named as follows:

| point | vector | states     | position (units of Ud/3) |
|-------|--------|------------|--------------------------|
| U0    | zero   | OOO        | 0                        |
| U1    | short  | POO / ONN  | 1 at 0 deg               |
| U2    | short  | PPO / OON  | 1 at 60 deg              |
| U3    | long   | PNN        | 2 at 0 deg               |
| U4    | middle | PON        | sqrt(3) at 30 deg        |
| U5    | long   | PPN        | 2 at 60 deg              |

**Number format.** U-alpha and U-beta are signed 16-bit numbers. Ud/3
(the length of a short vector) is 8192 = 2^13 (`svpwm_pkg::UNIT`). The
long vector is therefore 16384, and the largest circle inside the hexagon
has radius sqrt(3)*8192 = 14189. Constants such as sqrt(3) and 1/sqrt(3)
are Q14 integers.

## Sector, rotation and region

**Sector (`sector_calc`).** Sector k covers the angles [(k-1)*60, k*60)
degrees. The angle itself is never computed. With p = sqrt(3)*U-alpha and
q = U-beta, three sign tests are enough:

    q >= 0:  q < p -> I,   q < -p -> III,  else II
    q <  0:  q > p -> IV,  q > -p -> VI,   else V

**Rotation (`ref_rotate`).** The reference is turned by -(k-1)*60 degrees.
The sine and cosine of that angle are always 0, +-1/2, +-sqrt(3)/2 or +-1,
so the rotation needs only constant multiplications. The result lies in
sector I. A y' that rounds to slightly below zero is clamped to zero. A
reference far outside the hexagon can rotate to more than 16 bits (up to
sqrt(2) times full scale); x' and y' then saturate at +32767 instead of
wrapping.

**Region (`area_calc`).** Sector I is split into six regions:

    1, 2 : triangle U0-U1-U2    (1 below the 30-degree line U0-U4, 2 above)
    3, 4 : triangle U1-U4-U2    (3 below, 4 above)
    5    : triangle U1-U3-U4
    6    : triangle U2-U4-U5

The key step is to write the reference as m1*U1 + m2*U2, with

    m1 = x - y/sqrt(3)
    m2 = 2y/sqrt(3)        (units of Ud/3)

Every border is then a comparison:

- m1 + m2 <= 1 gives region 1 or 2;
- m1 >= 1 gives region 5;
- m2 >= 1 gives region 6;
- otherwise region 3 or 4.

The 30-degree line is m1 = m2. Regions 1 and 3 lie on the m1 >= m2 side.

Regions 1/2 and 3/4 use the same three vectors. They differ only in which
redundant short vector the sequence starts from: U1 below the 30-degree
line, U2 above it. Splitting the inner triangles this way gives each of the
six regions one fixed sequence.

## Dwell times and switching sequences

**Two products (`vector_time`).** Only two products need the carrier
period. With th the half carrier period in clocks (the cycle register):

    t1 = m1 * th        t2 = m2 * th        (each clamped to [0, 2*th])

Every dwell time of every region is a sum or difference of t1, t2 and th.
This follows from solving Vref = a*A + b*B + c*C with a + b + c = 1 for
the region's corners A, B and C.

**Sequences (`switch_timing`).** The table below gives, for each region,
the four states played during the up-slope of the carrier. They are played
in reverse on the down-slope. d0..d3 are the dwell times per half period;
they add up to th.

| region | S0  | S1  | S2  | S3  | d0    | d1        | d2        | d3         |
|--------|-----|-----|-----|-----|-------|-----------|-----------|------------|
| 1      | ONN | OON | OOO | POO | t1/2  | t2        | th-t1-t2  | t1-t1/2    |
| 2      | OON | OOO | POO | PPO | t2/2  | th-t1-t2  | t1        | t2-t2/2    |
| 3      | ONN | OON | PON | POO | tA/2  | tB        | tC        | tA-tA/2    |
| 4      | OON | PON | POO | PPO | tB/2  | tC        | tA        | tB-tB/2    |
| 5      | ONN | PNN | PON | POO | tS/2  | t1-th     | t2        | tS-tS/2    |
| 6      | OON | PON | PPN | PPO | tS/2  | t1        | t2-th     | tS-tS/2    |

where

    tA = th - t2   (time on U1)
    tB = th - t1   (time on U2)
    tC = t1 + t2 - th   (time on U4)
    tS = 2*th - t1 - t2

Three rules hold in every row:

- S0 and S3 are the two redundant states of one short vector, and its time
  is split between them;
- each step raises exactly one leg by one level;
- no leg ever falls during the up-slope.

Because no leg ever falls, each leg can be described by two instants per
half period: when it leaves N and when it reaches P. The outputs of
`switch_timing` are the four states and the cumulative instants
d0, d0+d1 and d0+d1+d2, each saturated at th. A dwell time that comes out
negative counts as zero. This happens when rounding puts the reference a
hair outside its region, or beyond the hexagon (overmodulation).

## Back to the real sector

**Rotation rule (`sector_map`).** Turning a state by +60 degrees maps
(Sa, Sb, Sc) to (-Sb, -Sc, -Sa). This follows from the vector formula,
because e^{j60deg} = -e^{-j120deg}. The sector-I states are turned n = k-1
times:

    n = 0: ( a,  b,  c)    n = 1: (-b, -c, -a)    n = 2: ( c,  a,  b)
    n = 3: (-a, -b, -c)    n = 4: ( b,  c,  a)    n = 5: (-c, -a, -b)

**Odd sectors.** An odd n negates the levels, so every leg would fall
during the up-slope. For odd n the sequence is therefore also reversed:
state j becomes state 3-j, and the instants become th minus the mirrored
instants. The result again has only rising legs.

**Thresholds.** For each leg the block emits:

- `no`: the carrier count at which the leg leaves N;
- `op`: the carrier count at which the leg reaches P.

A leg that starts at O or P gets 0. A leg that never gets there gets all
ones.

## Carrier, comparators and the twelve gates

**Carrier (`tri_counter`).** The carrier counts 0, 1, ..., th-1 and then
th-1, ..., 1, 0. One carrier period is exactly 2*th clocks. A threshold c
therefore gives a pulse of exactly 2*(th-c) clocks centred on the peak, with
no rounding error. The new half period is adopted only at the end of a
period.

**Comparators (`pwm_gen`).** The thresholds are copied into shadow
registers on the last clock of each period, so a period never mixes two
references. Per leg, two registered comparators give the level:

- O or above while cnt >= no;
- P while cnt >= op.

**Switches.** The switches of a leg are numbered from the positive rail:
S1 (outer), S2 (inner), S3 (inner), S4 (outer).

| level | switches on |
|-------|-------------|
| P     | S1, S2      |
| O     | S2, S3      |
| N     | S3, S4      |

S1/S3 and S2/S4 are complementary pairs. Each pair passes through a
`dead_time` generator. When the request changes, the active switch turns off
at once. Its partner turns on only after `dead` clocks (the dead register),
which gives break-before-make.

**Outputs.** The outputs are registered:

    pwm[4*p + 0] = S1,  pwm[4*p + 1] = S2,  pwm[4*p + 2] = S3,  pwm[4*p + 3] = S4
    p = 0, 1, 2 for phases a, b, c

The carrier-to-gate latency is three clocks on every channel. Assertions
in `pwm_gen` check that the two switches of a pair are never on together.

## Protection

`protect_unit` latches a blocking condition. Two sources set it:

- any of the twelve active-low gate-driver fault lines, after a
  two-flip-flop synchronizer (three clocks);
- neutral-point unbalance from `adc_proc` (one clock).

While the latch is set, `pwm_gen` forces all twelve gates off from the next
clock on. `block_clr` releases the latch only when no fault is present.
`block_cause` records the source:

- bit 0: driver fault;
- bit 1: neutral point.

`adc_proc` stores each sample word at its index. At the end of each frame
it compares the two DC-link capacitor voltages: words `VC1_IDX` and
`VC2_IDX`, two's complement. If |Vc1 - Vc2| > `np_limit`, it sets
`np_fault` until a later frame is balanced.

## AD7656 read-out

`ad7656_ctrl` is a six-state machine:

| state   | what happens |
|---------|--------------|
| ST0     | Idle, CONVST low. |
| START   | CONVST is high for 10 clocks; its rising edge starts conversion in all three converters. |
| JUDGE   | Waits until every BUSY is low. |
| WAITING | RD is high. After 3 clocks, if words remain, RD drops and the machine moves to READ. |
| READ    | RD is low for 4 clocks. The bus is captured on the last clock, then RD rises and the machine returns to WAITING. |
| STOP    | Entered once the read-phase counter cnt_v reaches 129 (binary 10000001). CONVST drops; 4 clocks later the machine returns to ST0 with `frame_done`. |

The three converters are read one after another, six words each, each under
its own chip select `cs_n[i]`. A frame delivers 18 words indexed
converter*6 + channel.

A low on `soft_rst_n` sends ST0, START and JUDGE back to ST0 (it aborts a
frame that has not started reading). `rst_n` is the power-on reset. In the
top level a frame starts at the end of every carrier period.

## Timing of the whole chain

The SVPWM data path has one register per block:

    U-alpha/U-beta registers -> sector_calc -> ref_rotate
      -> area_calc and vector_time (in parallel) -> switch_timing -> sector_map
      -> shadow registers of pwm_gen

**Starting the chain.** The chain starts:

- one clock after a write to the reference registers (`uref_we`);
- at every carrier peak.

`calc_done` rises six clocks after `uref_we`. A new reference takes effect
from the first carrier period that begins after that.

**Cycle register.** The cycle register is read when the chain starts and
travels with the thresholds. The carrier adopts it together with them, so
a period always runs with thresholds that were computed for its own length.
A new cycle register value takes effect from the period after the next
carrier peak.

## Top-level interface

`svpwm_top` parameters: `NUM_ADC = 3`, `CH_PER_ADC = 6`, `ADC_W = 16`,
`DEAD_W = 10`, `VC1_IDX = 0`, `VC2_IDX = 1`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| en | in | 1 | run the carrier |
| ua_in, ub_in, uref_we | in | 16, 16, 1 | reference vector and its write strobe |
| cycle_reg | in | 16 | half carrier period in clocks |
| dead_reg | in | 10 | dead time in clocks |
| adc_convst, adc_cs_n, adc_rd_n | out | 1, 3, 1 | converter control |
| adc_busy, adc_db | in | 3, 16 | converter BUSY lines and data bus |
| adc_soft_rst_n | in | 1 | abort/hold of the read-out machine |
| samples | out | 18 x 16 | last sampled words |
| np_limit | in | 16 | allowed capacitor voltage difference |
| drv_fault_n | in | 12 | gate-driver fault lines, active low |
| block_clr | in | 1 | release the blocking latch |
| blocked, block_cause | out | 1, 2 | protection state |
| pwm | out | 12 | gate signals |
| leg_level | out | 3 x 2 | leg levels before dead time (N = 0, O = 1, P = 2) |
| sector, region | out | 3, 3 | result of the last calculation |
| prd_load, carrier_th | out | 1, 16 | end of carrier period, running half period |
| calc_done, adc_frame_valid, adc_state | out | 1, 1, 3 | status |

## What is a choice of this design

This RTL follows a published design description for its block structure:

- the SVPWM signal generator made of sector calculation, reference
  rotation, region calculation, fixed-vector time calculation, sector-I
  switch timing, and mapping to the other sectors;
- U-alpha/U-beta, cycle and dead registers;
- a twelve-channel PWM module built from a triangular counter, comparators
  and a dead-time generator;
- PWM blocking on IGBT fault or neutral-point unbalance;
- the AD7656 state machine: its six states, the 10-clock START, BUSY, RD,
  the cnt_v >= 10000001 exit and the 4-clock STOP;
- three converter chip selects;
- the region numbering of sector I;
- the state names;
- the test point of modulation index 1.0 at 50 Hz.

The description names most of these blocks without giving their insides.
Everything below is this design's own choice:

- **Arithmetic.** The number format (Ud/3 = 8192), the sign-test sector
  finder, the rotation, the m1/m2 formulation and all formulas above.
- **Sequences.** The seven-segment order: it starts from the short vector
  nearest the reference, halves the redundant vector's time, and plays odd
  sectors in reverse.
- **Pipeline.** The one-register-per-block pipeline and its start points
  (reference write, carrier peak).
- **Carrier.** The carrier shape (0..th-1..0) and shadow loading at the end
  of a period.
- **Switch pairing.** The numbering S1..S4 and the pairing S1/S3, S2/S4.
- **Blocking.** All twelve gates turn off in the same clock. A staged
  shutdown (outer switches first), which real NPC hardware often uses, is
  not built.
- **Read-out details.** The RD pulse lengths (4 low, 3 high), six words per
  converter, CONVST held high from START to STOP, and reading cnt_v's limit
  as the binary number 129.
- **Neutral-point check.** The absolute-difference test and the channel
  assignment (words 0 and 1).
- **Where the reference comes from.** The reference registers are written
  through ports. How the outer control loop derives the reference from the
  samples is not part of this RTL. Neither are the keyboard and display.
- **Clocking.** The testbench assumes a 50 MHz clock, a 5 kHz carrier
  (cycle register 5000) and a 2 us dead time (dead register 100). These are
  register settings; no constant in the RTL depends on them.
- **Modulation index.** M is taken as |Vref| / (Ud/sqrt(3)), so M = 1.0 is
  the largest circle inside the hexagon, |Vref| = 14189.

Not in this RTL: the power stage, gate drivers, analog sampling front ends,
the AD7656 devices themselves, clock generation, keyboard/display, output
filter and motor.

## Verification and simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values are
computed independently of the RTL:

| testbench | what it checks |
|-----------|----------------|
| `tb_sector_calc` | sector from atan2 |
| `tb_ref_rotate` | real-valued rotation |
| `tb_area_calc` | point-in-triangle tests on the sector geometry |
| `tb_vector_time` | real-valued m1*th, m2*th |
| `tb_switch_timing` | one-level steps, corner vectors only, exact volt-second balance |
| `tb_sector_map` | average vector of the thresholds equals the rotated input vector |
| `tb_tri_counter` | clock-exact reference counter |
| `tb_dead_time` | exact dead band |
| `tb_pwm_gen` | per-period level times, gate patterns, break-before-make, blocking |
| `tb_protect_unit` | latencies, latch and release |
| `tb_adc_proc` | storage, unbalance test |
| `tb_ad7656_ctrl` | state durations, 18 words, aborts; uses three converter models |

`tb/ad7656_model.sv` is a behavioural model of the converter's parallel
interface (3 us conversion). It is for simulation only.

`tb_svpwm_top` runs the whole design at its default parameters, with a 50
MHz clock, a 5 kHz carrier and a 2 us dead time. It applies a 50 Hz
reference updated every carrier period for one full output cycle at each of
M = 0.3, 0.7 and 1.0, then 12 periods at a 10 kHz carrier. In every carrier
period it rebuilds the average output vector from the leg levels and
compares it with the reference. The error must be within 16 LSB (0.2 % of
Ud/3); in practice it is a few LSB. It also forces and counts:

- a neutral-point unbalance and a driver fault, with all gates off while
  blocked, and the release of both;
- 311 ADC frames, checked word by word;
- every sector and every region;
- dead-time gaps on every gate;
- the six-clock reference latency.

It runs in about 3 seconds.

**Running a testbench.** To run one with plain Verilator (5.x), from the
directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        --top-module tb_svpwm_top rtl/svpwm_pkg.sv tb/tb_svpwm_top.sv
    ./obj_dir/Vtb_svpwm_top

Replace the top module and file for any other testbench. Lint a module
with `verilator --lint-only -Wall -Irtl -y rtl rtl/svpwm_pkg.sv rtl/<module>.sv`.

**Lint warnings.** Two kinds of lint warning remain on purpose:

- The assertions use `rst_n` in `disable iff`, so Verilator reports the
  reset as used both synchronously and asynchronously.
- A block that imports `svpwm_pkg` without using every constant in it gets
  an unused-parameter warning for each constant it does not use.

## Files

| file | contents |
|------|----------|
| `rtl/svpwm_pkg.sv` | shared types (`level_t`, `sw_state_t`, `phase_cmp_t`) and constants |
| `rtl/svpwm_top.sv` | top level |
| `rtl/sector_calc.sv`, `ref_rotate.sv`, `area_calc.sv`, `vector_time.sv`, `switch_timing.sv`, `sector_map.sv` | SVPWM signal generator chain |
| `rtl/pwm_gen.sv`, `tri_counter.sv`, `dead_time.sv` | twelve-channel PWM |
| `rtl/protect_unit.sv` | blocking protection |
| `rtl/ad7656_ctrl.sv`, `adc_proc.sv` | converter read-out and sample processing |
| `tb/tb_*.sv` | testbenches |
| `tb/ad7656_model.sv` | converter model for simulation |
