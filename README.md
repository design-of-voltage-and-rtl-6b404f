# Clock-path circuits for a high-speed DRAM interface

A DRAM interface running at several Gb/s per pin has two timing problems in its
clock path that are independent of the data protocol:

* **Delay drift.** In a DRAM the strobe (DQS) travels through a long amplifier,
  delay-line and buffer path before it samples the data (DQ), while the data
  path is short. After write training has centred the sampling edge on the data
  eye, a supply or temperature change moves the strobe-path delay and eats the
  timing margin.
* **Quadrature error.** Four clock phases (I, Q, IB, QB, 90 degrees apart) are
  distributed over millimetres of wire. Mismatch along the way skews them, and
  every phase error is lost sampling margin.

This repository holds SystemVerilog for three circuits that address these
problems. They are separate designs. The top module `dram_clk_top` places them
side by side without connecting them:

| circuit | top module | what it does |
|---|---|---|
| Quadrature error corrector (QEC) | `qec_top` | Removes the skew between four quadrature clocks. It delays each phase by the least amount that aligns them, so the added jitter stays small. Calibration can be switched off and on at any time. |
| Forwarded-clock receiver (FC RX) | `fcrx_top` | A four-lane receiver. A two-stage cascaded DLL holds the DQS-to-sampling-clock delay at a whole number of unit intervals, so a trained sampling point survives supply and temperature drift without re-training. |
| Clock-tree divider | `ct_cml_div` | The divide-by-2 of an open-loop-compensated clock tree. It turns a 12 GHz clock into a 6 GHz quadrature clock. The rest of that tree is analog and is not modelled. |

The QEC gets the most space below because its control loop is the least obvious
part.

---

## 1. Quadrature error corrector

### 1.1 Idea

Each input phase passes through its own digitally controlled delay line (DCDL):
C_I, C_Q, C_IB and C_QB are 7-bit codes with a 1.23 ps step. To correct the
skew, only the *differences* between the four delays matter, so one degree of
freedom is left over. The corrector spends it on keeping **at least one main
code at 0**. The corrected clocks therefore carry the least possible added
delay, and the least delay-line jitter.

The loop compares two adjacent phases at a time:

* the signal selector outputs the pair (I,Q), then (Q,IB), then (IB,QB), then
  (QB,I), and repeats;
* the leading clock of the pair (O_MUX0) goes through a delay line set to
  **C_QUAD**; the lagging clock (O_MUX1) goes through an identical line held at
  code 0;
* a bang-bang phase detector (one flip-flop) gives `BB = 0` if the delayed
  leading clock is still early. That means the pair spacing is larger than
  C_QUAD × LSB.

C_QUAD is shared by all four pairs. It is driven to the *average* spacing,
which is T/4, and the main codes are driven until every spacing equals it.
No absolute time reference is needed.

### 1.2 Update rule

Four detector bits, one per pair, make a decision word. Bit k belongs to pair
(k, k+1), with phases numbered I=0, Q=1, IB=2, QB=3. A pair with `BB = 0` is too
wide: it votes to delay its leading phase k more and its lagging phase k+1
less. Summing the votes of the two pairs that share phase k gives:

| condition | action |
|---|---|
| BB = 0000 (all pairs wide) | raise C_QUAD |
| BB = 1111 (all pairs narrow) | lower C_QUAD |
| BB[k] = 0 and BB[k−1] = 1 | phase k may be raised |
| BB[k] = 1 and BB[k−1] = 0 | phase k may be lowered |

Every mixed word has at least one "raise" candidate and one "lower"
candidate. Which one is used depends on a one-bit **update direction state
(UDS)**:

* **UDS = DN (default).** Lower a candidate. If every main code is above 0,
  UDS is forced to DN, so the codes drift down together until one reaches 0.
* **Lowering a code that is already 0 (underflow).** The code is left alone and
  UDS flips to UP.
* **UDS = UP.** Raise a candidate. This covers the case where the phase that
  needs less delay is already at 0: the others are delayed instead.
* **Raising a code at its maximum (overflow).** The code is left alone and UDS
  returns to DN.

With several candidates, the highest-numbered phase wins. The result is the
unique solution with the right spacings and min(code) = 0. The testbenches
compute that solution from the applied skews and compare each code with it.

### 1.3 Timing of the loop (`qec_sel_gen`, `qec_qed`, `qec_dlf`)

* **Selector.** A 2-bit counter advances on each O_MUX0 rising edge. Its
  one-hot decode is re-timed into two select words:
  * SEL0<k> takes the decode on the falling edge of phase k;
  * SEL1<k> takes SEL0<k> on the falling edge of phase k+1.

  A mux input is therefore only switched while the clock it passes is low, and
  a select bit is always cleared before the next one is set. The mux outputs
  never glitch, and O_MUX0 runs at 0.8 × f.
* **Detector and deserializer.** Detector results are shifted into a 4-bit
  deserializer together with SEL1<3>, which acts as a tag marking pair (QB,I).
  A divide-by-4 of O_MUX1D gives CLK_LF,PRE at 0.2 × f.
* **Loop filter.** The filter uses the tag position to put the 4 bits in pair
  order. A word whose tag is not one-hot is ignored. It then runs a 3-cycle
  MODE sequence:
  * **COMPUTE:** decide and compute the new code;
  * **UPDATE:** write the code;
  * **REST:** one idle cycle, so that the next word measured was taken
    entirely after the delay change and no limit cycle builds up.

  Codes move by one LSB per update.

### 1.4 Asynchronous calibration on/off (`qec_ens`, `qec_clk_gate`)

CAL may change at any time. It is synchronized to the always-running I_OUT
clock, and a small state machine orders the two enables:

* **Switching on:** EN_B gates the clocks into the selector; EN_A starts the
  loop-filter clock 16 reference cycles later.
* **Switching off:** EN_A stops first, then EN_B.

EN_A crosses into the CLK_LF,PRE domain through a second synchronizer and
drives a latch-based clock gate. The loop filter therefore never sees a
partial word or a runt clock. Its codes are held while off, and calibration
resumes from them.

### 1.5 Numbers

| quantity | value | origin |
|---|---|---|
| main DCDL code | 7 bits × 1.23 ps = 156 ps range | step and range from the reference design, width derived |
| C_QUAD | 8 bits: T/4 up to 313 ps, which covers 0.8 GHz | width chosen here |
| frequency range tested | 0.8, 1.5 and 2.3 GHz | reference design's range |
| input skew spread tested | 100 ps | reference design corrects 101.6 ps |
| residual phase error in simulation | below 0.35 degrees (limit 2.18 degrees) | `qec_freq_tb` |
| lock time from reset | a few µs (testbenches allow 16000 input periods at 0.8 GHz) | one LSB per update, see section 5 |

---

## 2. Forwarded-clock receiver

### 2.1 Why two DLLs

Outside a continuous burst, DQS does not toggle while DQS_I (the delayed
sampling strobe) has its edge. DQS_I therefore cannot be compared directly with
the incoming DQS. The delay is split into two stages:

1. **DCDL1** delays the amplified DQS into DQS_edge_t and DQS_edge_c. PD_L1
   samples the raw DQS_c on DQS_edge_t. The first loop aligns DQS_edge_t with
   the next transition of DQS_c, so DQS_edge is N1 × UI after DQS.
2. **DCDL2** delays DQS_edge_t into DQS_I. A second detector samples DQS_I on
   DQS_edge_t (giving PD_t) and on DQS_edge_c (giving PD_c). The second loop
   aligns DQS_I with the next DQS_edge edge.

The total delay is then N × UI and stays there. After write training has put
the DQ eye centre on the sampling edges, drift of the amplifier or the lines
is cancelled. No DQ transitions are needed and no re-training is done.

### 2.2 Loop filter flow (`fcrx_dlf`)

1. **Lock points.** With both codes at 0, the filter records:
   * `lp1 = PD_L1`. 0 means lock to the rising edge of DQS_c; 1 means lock to
     its falling edge.
   * `lp2`. (PD_c, PD_t) = (0,1) means lock to DQS_edge_t and track PD_t.
     Any other pattern means lock to DQS_edge_c and track PD_c.
2. **Coarse sweep** (optional). Each code in turn is raised 15 codes (one
   coarse stage) at a time, until its detector leaves its lock-point value.
3. **Tracking.** Both codes move at once, each by its programmable gain (1–7):
   * code1 rises while PD_L1 still equals lp1;
   * code2 rises while the tracked stage-2 detector reads 1.

   Codes saturate at 0 and 89.

The filter steps once every 8 slow-clock cycles (`SETTLE`), so every decision
sees a detector result taken after the previous move. The detector outputs come
from the fast DQS domain and are synchronized by two flip-flops.

### 2.3 Delay line and its code (`fcrx_dcdl_dec`, `fcrx_dcdl`)

Each DCDL has two NAND coarse lines, CLKU and CLKD, each controlled by a 6-bit
thermometer code. An interpolator mixes the two with weight w/15 on CLKD. The
binary code c = 15k + f maps as follows:

* **k even:** CLKU has k stages, CLKD has k+1 stages, and w = f.
* **k odd:** CLKU has k+1 stages, CLKD has k stages, and w = 15 − f.

The delay is therefore k + f/15 coarse steps. At a coarse boundary the
interpolator already sits fully on one line, and only the other, unweighted,
line changes stage count. No boundary glitch or jump occurs. `fcrx_dcdl_dec_tb`
checks this property for every code.

### 2.4 Data path

* DQS_I is divided by two into four 1.6 GHz quadrature clocks (`fcrx_iq_div`).
* Each of the four lanes is sampled on all four phases (`fcrx_dq_sampler`).
* A 1:4 deserializer on the I clock assembles 16-bit words, oldest bit in bit 0
  (`fcrx_des`). Its divide-by-4 count (400 MHz at 6.4 Gb/s) also clocks the
  loop filter.

---

## 3. Clock-tree divider

`ct_cml_div` is a behavioural master–slave model. The master takes the inverted
slave output on the rising input edge, and the slave copies the master on the
falling edge, each after 5 ps. The slave therefore lags by a quarter output
period.

The compensated CMOS part of the tree is analog and has no model here. That
part is made of:

* CML buffers;
* a CML-to-CMOS converter;
* current-starved inverters;
* a bias generator whose outputs track the supply.

---

## 4. Behavioural models and how they simulate

Four modules are behavioural models, not synthesizable logic:

* `qec_dcdl`
* `fcrx_dcdl`
* `fcrx_pd_l1`
* `ct_cml_div`

They stand in for circuits whose function is a delay or an analog decision.
Each delays every clock edge separately:

```
always @(posedge clk_i) fork begin #(dly) t_rise <= $realtime; end join_none
```

The same is done for the falling edge, and the output is high when the latest
edge to leave was a rising one. This is a true transport delay, so a delay
longer than half a clock period is reproduced correctly. A plain intra-assignment
delay would cancel pending edges in some simulators.

The delay values are `real` run-time quantities, so lint notes that a `#`
control might be zero. It never is, because every intrinsic delay is positive.
Synthesis front ends cannot elaborate `real` parameters. As a result, `qec_top`,
`fcrx_top` and `dram_clk_top` elaborate and simulate, but cannot be sized by
synthesis. Every other module is plain synthesizable RTL.

All files use `` `timescale 1ps / 10fs ``.

---

## 5. Where this RTL departs from the reference design

* **QEC search (not built).** The reference design reaches lock in about
  500 ns by a binary search whose details are not given. Here codes move one LSB per
  update, so lock from reset takes some microseconds (C_QUAD alone needs
  up to 254 updates of three loop-filter cycles each).
* **UCON tie-break.** When several phases are candidates, the highest-numbered
  one is chosen. This matches the reference rule for decision word 0101. For
  1010 its description is ambiguous, and the same tie-break was applied.
* **QEC overflow.** A main code at its maximum is not raised, and UDS returns
  to DN. Overflow handling is not specified in the reference design.
* **QEC circuit detail.** The dual-coarse-line delay lines with their pipelined
  interpolator, and the detector delay lines, are linear behavioural delays.
  The C_QUAD width (8 bits) is a choice made here.
* **QEC enable timing.** The enable sequencer's synchronizer depth and its
  16-cycle EN_B/EN_A spacing are choices made here.
* **FC RX analog parts.** The input amplifier, clock buffers, I²C slave and
  the transmitter/channel used for test are not built. The receiver takes the
  amplified DQS as an input, and its settings (run, coarse sweep, gains) are
  ports.
* **FC RX assumed values.** t_NAND = 15 ps (so one code = 2 ps), the 20 ps
  intrinsic delay of each line, SETTLE = 8 and the synchronizers are
  assumptions.
* **FC RX drift size.** The supply range the receiver is meant to tolerate
  (±6 % around 1 V) gives no delay figure. The testbenches use a 40 ps drift.
* **Clock tree.** Only the divider is modelled. The supply-compensation
  mechanism itself (bias generator driving current-starved stages) is analog
  and absent.

---

## 6. Files

| file | contents |
|---|---|
| `rtl/qec_pkg.sv` | phase count; select and MODE enums |
| `rtl/qec_top.sv` | QEC: 4 main DCDLs, enable gates, selector, detector DCDLs, QED, ENS, DLF |
| `rtl/qec_dcdl.sv` | delay-line model (linear, 1.23 ps/LSB) |
| `rtl/qec_en.sv` | EN_B clock gates |
| `rtl/qec_sig_sel.sv`, `rtl/qec_sel_gen.sv` | pair multiplexers and their glitch-free select generation |
| `rtl/qec_qed.sv` | bang-bang detector, 1:4 deserializer, CLK_LF,PRE divider |
| `rtl/qec_ucon.sv` | update controller (decision table of section 1.2) |
| `rtl/qec_dlf.sv` | reordering, UDS, adder with under/overflow, MODE sequence |
| `rtl/qec_ens.sv`, `rtl/qec_clk_gate.sv` | enable sequencer and latch clock gate |
| `rtl/fcrx_pkg.sv` | code constants, DLF state enum |
| `rtl/fcrx_top.sv` | receiver: DCDL1 (t and c), DCDL2, PD_L1, PD2, divider, samplers, DES, DLF |
| `rtl/fcrx_dcdl_dec.sv`, `rtl/fcrx_dcdl.sv` | code decoder and delay-line model |
| `rtl/fcrx_pd_l1.sv`, `rtl/fcrx_pd2.sv` | stage-1 latch model, stage-2 flip-flops |
| `rtl/fcrx_iq_div.sv`, `rtl/fcrx_dq_sampler.sv`, `rtl/fcrx_des.sv` | data path |
| `rtl/fcrx_dlf.sv` | two-stage DLL loop filter |
| `rtl/ct_cml_div.sv` | clock-tree divide-by-2 model |
| `rtl/dram_clk_top.sv` | the three circuits side by side, plain ports with `qec_`, `rx_`, `ct_` prefixes |

Every file begins with a comment on its function, interface and timing.

---

## 7. Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/qec_pkg.sv rtl/fcrx_pkg.sv tb/dram_clk_top_tb.sv \
    --top-module dram_clk_top_tb -o sim
./obj_dir/sim
```

Use the same command for any other testbench. Other modules are found through
`-Irtl`.

* **`dram_clk_top_tb`** runs all three circuits at once, with every parameter
  at its default (about 2 s):
  * QEC at 2.3 GHz: lock, calibration off with codes frozen while the skew
    changes, calibration on and re-lock;
  * receiver: lock, training, 40 ps drift, PRBS7 data checked on all lanes;
  * divider timing.

  It counts each loop mechanism and fails if one never happened:
  * QEC: C_QUAD up/down, main code up/down, UDS flips, calibration off/on;
  * receiver: lock-point setting, coarse sweep of both stages, tracking in
    both directions, drift.
* **`qec_top_tb`, `qec_freq_tb`, `fcrx_top_tb`** are deeper end-to-end tests:
  * QEC enable ordering;
  * QEC over 0.8–2.3 GHz with a 100 ps skew spread;
  * receiver across a DQS gap.
* **Unit testbenches** (`<module>_tb`) check each block against values the
  testbench derives on its own:
  * an exhaustive decision table;
  * a reference model of the loop filter;
  * timing of every selector edge;
  * and so on.

The behavioural delay models need `--timing`. Verilator notes that their
run-time `#` delays might be zero (they are not); `-Wno-fatal` keeps such
notes from stopping the build. The simulator is two-state, so
every testbench drives reset with a real falling edge.
