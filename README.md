# Compressed-sensing read-out of a large-area tactile skin

A tactile skin made in large-area electronics (thin-film transistors, TFTs, on glass or
foil) can carry many force sensors cheaply. The expensive part is wiring each of them to a
silicon chip. The usual scanned or active-matrix readout needs one wire, or one row/column
line, per group of sensors. This design needs only one signal wire plus a 5-bit
differential row-selection bus, for any number of sensors up to 120.

It works because contact is usually sparse: only a few sensors (K ≈ 3) are pressed at a
time. Instead of reading each sensor, the system measures M = 32 sums of sensor currents.
Each sum uses a different pseudo-random 0/1 selection of sensors:

    y[m] = Σ_s φ[m][s] · I_s      m = 0..31,  I_s = 0.4 V / (R_sensor,s + R_access)

Compressed-sensing theory says such a K-sparse vector can be recovered from about
K·log2(N/K) random 0/1 sums. Recovery happens off chip, by a sparse solver on a PC. The
hardware only has to produce the 32 sums, reliably and 31 times a second.

This repository holds SystemVerilog for the whole chain:

* **The TFT switch network** that sets the φ matrix. It is described by its logic function.
* **The CMOS read-out IC**: 8 channels, each with a transimpedance amplifier (TIA), an
  offset-correcting current DAC with its register file, a 10-bit SAR ADC and an output
  shift register. One controller drives them all.
* **Behavioural models** of the analog parts. These let the complete system simulate in
  plain Verilator.

## How one row of φ is formed: the matrix-control network

Each sensor is in series with an *access TFT*. All the access TFTs feed the same wire, the
CS output, which the TIA holds at 0.4 V. When an access TFT is on, its sensor adds its
current to the sum. The access TFT's gate is driven by that sensor's *matrix-control
network* (`matrix_control_logic`):

* 32 branches of 5 series TFTs connect the gate either to V_ON or to V_OFF.
* In branch *b*, the TFT for bit *i* is gated by `C[i]` if bit *i* of *b* is 1, and by
  `Cb[i]` otherwise.
* So for a complementary pair C/Cb exactly one branch conducts: branch *b = C*. The gate
  takes that branch's rail.
* Which branches go to V_ON is fixed in `cs_pkg::BRANCH_ON`. The table is identical for
  every sensor.

The sensors differ only in **wiring**. Each network's pins C/Cb[4:0] connect to the shared
bus R/Rb[4:0] in a different bit order, with `C[i] = Rb[j]` and `Cb[i] = R[j]`. The same row
code therefore gives each sensor a different branch, and a different φ element.

Sensor 1 is wired straight through. Sensor 20 is wired

    C[4] C[3] C[2] C[1] C[0]  <-  Rb[2] Rb[0] Rb[4] Rb[1] Rb[3]

which gives these entries of its φ column:

| R[4:0] | C[4:0] | φ(row, sensor 20) |
|--------|--------|-------------------|
| 00000  | 11111  | 1 |
| 00001  | 10111  | 1 |
| 00010  | 11101  | 0 |
| 00011  | 10101  | 1 |
| 11110  | 01000  | 0 |
| 11111  | 00000  | 0 |

There are 5! = 120 bit orders, so up to 120 sensors get distinct columns. That is why
`lae_cs_array` accepts 1 to 120 sensors.

`cs_pkg::sensor_wiring(s)` gives sensor *s* (0-based) its order:

* It is the *s*-th permutation in descending-lexicographic order.
* Sensor 20 (index 19) is the exception and uses the order above.
* The sensor whose place that order would take (index 67) uses permutation 19 instead.

`cs_pkg::phi(row, s)` evaluates one element.

**What is known and what is chosen.** Six of the 32 `BRANCH_ON` bits are fixed by the
sensor-20 column above:

* codes 31, 23 and 21 go to V_ON;
* codes 29, 8 and 0 go to V_OFF.

The other 26 bits are one fixed random draw, `32'h9AE5_3CA6`. The wirings of sensors 2–19
are likewise this design's choice. Change the constant or the function to match a
particular TFT die.

### Matrix-TFT faults

Each sensor has 160 matrix TFTs, so TFT faults matter. Their effect on φ can be modelled.
`lae_cs_array`, and through it `hybrid_cs_system`, take `OPEN_PPM`, `SHORT_PPM` and
`FAULT_SEED`. These pick faulty TFTs at random, at a rate in parts per million. The
default is no faults.

* **Source-drain open.** The TFT's branch never conducts. When that branch is selected,
  nothing drives the access gate. The gate keeps the previous row's charge, so φ(m, s)
  repeats φ(m−1, s). A per-sensor latch in `lae_cs_array` models the floating gate. It is
  transparent when no fault is present.
* **Source-drain short, or gate leakage.** The TFT conducts whatever its gate. Its branch
  then also conducts for the neighbouring code. If the two branches go to different rails,
  the gate sits in between (`mixed_col`). The sensor then passes a fixed fraction of its
  current, drawn once per sensor from (0, 1).

The solver is not told about the faults. It just sees a slightly wrong φ, and statistical
recovery tolerates that.

In `tb_workload_faults` (120 sensors, 0.1 % of each kind) 53 of 3840 elements are wrong.
The three pressed sensors are still found, one of them with a corrupted column, with
resistances within 10 %. At 1 % open TFTs the testbench's simple least-squares search
picks a wrong sensor. A better solver and more measurements degrade more gracefully, but
quality falls at such rates. Gate shorts that load the shared R/Rb lines are not
modelled.

## The read-out channel

```
 CS output ──► IN ──┬──────────────────────┐
                    │          10 kΩ        │
              I-DAC ┘     ┌───/\/\/───┐     │
   (reg file[row])   IN ──┤−          │     │
                  0.4 V ──┤+  TIA ────┴──► 10-bit SAR ADC ──► shift reg ──► chain
```

**TIA** (`tia_model`). It holds IN at 0.4 V, which is also the bias across every selected
sensor. Sensor current is drawn out of the node through the 10 kΩ feedback resistor, so

    V_out = 0.4 V + 10 kΩ · (I_sensors + I_DAC)

With no current the output is 0.4 V, which is ADC code 341. Three sensors at 15 kΩ draw
73 µA and give 1.13 V. That is still inside the 1.2 V range.

**I-DAC** (`idac_model`). It has two banks of six binary-weighted sources, 1× to 32×
(0.5 µA units):

* Code bit 6 = 1 selects the NMOS bank, which draws current and raises the output.
* Code bit 6 = 0 selects the PMOS bank, which pushes current in and lowers the output.
* Bits 5:0 give the magnitude.

The correction range is therefore ±31.5 µA.

**Register file** (`offset_regfile`). It holds 32 words of 7 bits, one I-DAC code per row.
It is read combinationally by the current row code and written during calibration.

**SAR ADC** (`sar_adc` = `sar_logic` + `sar_cdac_comparator`). The SAR register is
synthesizable. The capacitor DAC and comparator are modelled as an ideal 10-bit converter
with a 1.2 V full scale. The real circuit uses a 5-bit main and a 5-bit sub array joined by
a bridge capacitor. Conversion timing:

* `start` goes high in cycle *t*;
* the input is sampled in *t+1*;
* one bit is decided per cycle, MSB first, in *t+2* to *t+11*;
* `done` goes high in *t+12*.

At 1.2 MHz that is 100 kS/s.

**Output shift register** (`out_shift_reg`). It takes a parallel load of the ADC code and
shifts out MSB first. The eight channels are chained into one 80-bit register. The chip's
`sdo` carries channel 1 first.

## Start-up offset calibration

Every row switches on a different set of access TFTs, so every row has its own baseline
current, even with no force applied. The register file stores a per-row correction. It is
found at start-up, with the skin unloaded, by `digital_ctrl` together with each channel:

1. For each row, a 7-bit search value `cal_off` is built bit by bit, MSB first. It is
   offset binary: 64 means no current; 64+n draws n units; 64−n pushes n units, clamped at
   63.
2. For each bit, the controller pulses `cal_set` and the channel sets that bit on trial.
3. The controller waits `SETTLE_CYCLES` and runs a conversion.
4. It then pulses `cal_decide`. The channel clears the bit if the ADC code is above
   `CAL_TARGET`, which defaults to 341, the zero-current code.
5. After the LSB, `cal_write` stores `idac_from_offset(cal_off)` for the row.

This takes 7 conversions per row and 224 in all. At the default timing that is about
140 k cycles, or 0.12 s at 1.2 MHz. Each channel searches independently, in lock step. The
result is the largest correction whose zero-force code does not exceed the target, i.e.
within one I-DAC unit (about 4 ADC codes) of it.

## Acquisition timing

`digital_ctrl` steps R[4:0] through 0, 1, …, 31 and drives Rb = ~R. Every row lasts exactly
`ROW_CYCLES` = 1200 cycles, which is 1 kHz at an assumed 1.2 MHz clock. A frame of 32 rows
therefore arrives at 31.25 frames/s.

Within a row:

| cycle of the row | action |
|------------------|--------|
| 0 | new R/Rb; each channel's I-DAC takes its register-file word for the row (`frame_start` high in row 0) |
| 600 (`SETTLE_CYCLES`) | `adc_start`: all channels convert together |
| 612 | `done`; next cycle `sr_load` |
| 614 … 693 | `sr_shift` / `sdo_valid` high: 80 bits on `sdo`, channel 1 MSB first |
| … 1199 | idle, then the next row |

`cal_req` (pulse, while idle) runs the calibration and ends with `cal_done`. `run_en` runs
frames continuously. When it falls, the current frame is finished first.

## Module map

```
hybrid_cs_system                     whole system; the array sits on channel 1
├── lae_cs_array                     N sensors, superimposed currents (behavioural)
│   ├── matrix_control_logic ×N      TFT switch network, logic function
│   └── sensor_access_tft ×N         sensor + access TFT (behavioural)
└── cmos_readout_ic
    ├── digital_ctrl                 row sequencer, calibration, read-out schedule
    └── readout_channel ×8
        ├── offset_regfile           32 × 7 bit
        ├── idac_model               (behavioural)
        ├── tia_model                (behavioural)
        ├── sar_adc
        │   ├── sar_logic
        │   └── sar_cdac_comparator  (behavioural)
        └── out_shift_reg
cs_pkg                               constants, wiring and φ functions, types
```

The synthesizable parts are:

* `matrix_control_logic`
* `offset_regfile`
* `sar_logic`
* `out_shift_reg`
* `digital_ctrl`
* the calibration search register in `readout_channel`

The behavioural models carry analog values on `real` nets: currents in amperes, voltages
in volts. Sensor resistances enter the top as 32-bit integers in ohms. Channels 2–8 take
their input currents from the `i_ext_a` ports, where further arrays would connect.

## How far to trust it, and where it departs

Taken from the published design:

* the 5-bit differential row code and 32 rows;
* 32 branches × 5 TFTs per sensor;
* the wiring of sensors 1 and 20 and six φ entries;
* the 0.4 V bias, 10 kΩ feedback and 1.5 kΩ access resistance;
* 8 channels, a 32-word register file, a 7-bit I-DAC made of two 6-bit banks, a 10-bit SAR
  ADC at 100 kS/s;
* a shift register per channel, the 1 kHz row rate and start-up offset codes taken with no
  force.

Chosen here, and worth checking against a real implementation:

* the remaining 26 branch-table bits and the wirings of the other sensors;
* the 1.2 MHz clock, 600-cycle settle time and read-out schedule;
* one controller shared by the eight channels;
* the bit-by-bit calibration search and its target code;
* the I-DAC bank coding and its 0.5 µA unit (estimated from a measured
  ADC-code-versus-I-DAC-code slope);
* the 1.2 V ADC full scale;
* the serial bit and channel order.

Left out:

* Analog non-idealities: TIA bandwidth and its 500 pF input load, ADC nonlinearity, and
  the spread of access-TFT resistance (1.0–1.9 kΩ in measurement). Matrix-TFT faults can
  be injected, as described above.
* The sparse-recovery solver, which runs on a PC.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/cs_pkg.sv tb/tb_ref_pkg.sv tb/tb_hybrid_cs_system.sv \
    --top-module tb_hybrid_cs_system -o sim && ./obj_dir/sim
```

`tb_ref_pkg` holds the testbenches' independent reference models: TIA/ADC transfer, I-DAC
current, calibration search and φ from a wiring list.

**`tb_hybrid_cs_system`** runs the whole design at its default size in about ten seconds:
20 sensors and 1200-cycle rows. It:

1. calibrates with all sensors above 100 MΩ;
2. presses sensors 3, 9 and 13 (55.7, 54.4 and 19.3 kΩ);
3. reads one frame from `sdo` and checks all 256 codes and the frame time;
4. recovers the three pressed sensors from channel 1's 32 codes with a brute-force
   3-sparse least-squares search.

Recovered resistances agree within about 0.5 %. It also checks that calibration, row
switching, both I-DAC banks and the selection of every pressed sensor actually happened.

**`tb_workload_n120`** does the same for a 120-sensor array, the largest with distinct
columns. It recovers the three pressed sensors within about 3 %. The extra error comes
from the unpressed sensors (200 MΩ each). About 60 of them are selected in every row. Their
combined current is smaller than one I-DAC step, so calibration cannot remove it and it
stays in the measurement.

**`tb_workload_faults`** repeats the 120-sensor test with faulty matrix TFTs. It checks
every φ element against an independent fault model.

The block testbenches use shorter rows (200–300 cycles) to stay fast.

## Changing it

* `hybrid_cs_system #(.SENSORS(n))` sets the array size, from 1 to 120.
* `ROW_CYCLES` and `SETTLE_CYCLES` set the row timing. An elaboration-time assertion checks
  that settle, conversion and the 80-bit read-out fit in one row.
* For a different die, change `BRANCH_ON` and `sensor_wiring` in `cs_pkg`.
* `V_BIAS`, `R_FB`, `R_ACC`, `ADC_VREF` and `IDAC_LSB_A` in `cs_pkg` set the analog
  operating point of the models.
* `readout_channel #(.CAL_TARGET(c))` moves the zero-force code. For example, set it lower
  to leave more headroom for force.
