# 10-bit differential low-power SAR ADC: SAR logic and split-array DAC

A successive-approximation ADC finds a digital code by binary search. It
samples the input once, then for ten clock cycles compares the held input
against a voltage that a capacitor DAC produces from the bits decided so far,
deciding one bit per cycle from the MSB down. This design targets a
battery-powered biomedical sensor, so two choices reduce power:

* **Capacitive split-array DAC.** Each side of the differential input has a
  10-bit capacitor array split into two 5-bit halves joined by a bridge
  capacitor. The largest capacitor is 16 Cu instead of 512 Cu.
* **Three-level switching.** Every capacitor's bottom plate starts at the
  mid-supply reference VCM (0.9 V), not at a rail. It then moves once, to VDD
  or to VSS, so no plate swings more than VDD/2.

The converter is fully differential, with inputs Vinp and Vinn. The first
comparison, made with every capacitor at VCM, gives the sign of Vinp − Vinn.
Each later comparison halves the remaining difference.

The digital part (SAR and SPI output) is synthesizable SystemVerilog. The
analog parts are behavioural models that carry voltages as `real`
values. Together they simulate the whole converter end to end.

## Block diagram

```
 Vinp ─[bootstrap_switch bs_p]─ vsmp_p ─┐                    ┌──────────────┐
 Vinn ─[bootstrap_switch bs_n]─ vsmp_n ─┤   cap_dac dac_inst │ dyn_comparator│
                 ▲ SAR_Samp             ├── Vpos ───────────►│ + comp_inst   │─Vcomp─┐
 Vref (0.9 V, bandgap) ── Vcm ─────────►│   (20 × tg_mux3)   │ −             │─Vcomn─┤
                                        └── Vneg ───────────►└──────────────┘       │
                 SAR_con_p[9:0], SAR_con_n[9:0] (2 bits each)                  latch_sr
                        ▲                                                            │ SAR_vin
              ┌─────────┴──────────── adc_digital digital_inst ─────────────────────▼──┐
 SPI_sck ───► │ sar_lp sar_lp_inst: fsm_i (sar_fsm), result register,                  │
 SPI_cs  ───► │                     DobleRegs (sar_doble_regs = 20 × sar_sw_ctrl)       │──► SAR_data_out[9:0], SAR_ready
 reset   ───► │ spi_tx spi_inst ───────────────────────────────────────────────────────│──► SPI_SDO
              └────────────────────────────────────────────────────────────────────────┘
```

The whole converter runs from `SPI_sck`:

* `SPI_cs` is the SAR's enable: 1 means selected and converting.
* `reset` is active low and resets the SAR, the SPI block and the comparator.
* The bandgap reference is not modelled. Its 0.9 V output enters as the
  `Vref` input port and is the DAC's VCM.

## One conversion, cycle by cycle

A conversion takes **12 clock cycles** and conversions repeat back to back:

| cycle | SAR state | what happens |
|---|---|---|
| 0 | SAMPLE | `SAR_sampling` = 1. The bootstrap switches track Vinp/Vinn. All 20 switch controls are 01 (VCM). `SAR_data_out` = 0. |
| 1 | bit 9 | Nodes hold the sampled inputs. The comparator decides on the falling edge. On the rising edge that ends the cycle, the SAR stores the decision as bit 9 (the sign) and switches capacitor 9 on both arrays. |
| 2 … 10 | bits 8 … 0 | Same as cycle 1 for each lower bit. The DAC moves on a rising edge, settles during the high half-cycle, and the comparator decides on the falling edge. |
| 11 | READY | `SAR_ready` = 1. `SAR_data_out` holds the full result. |

Four things in this sequence are easy to get wrong:

* **The SAR reads `SAR_in` directly on the rising edge.** There is no input
  register. A register would add a cycle to the comparator → SAR → DAC
  loop, and one bit per cycle would no longer work.
* **The comparator is a dynamic one.** Its outputs are both 0 while the clock
  is high (reset phase). On the falling edge exactly one output rises. The
  SR latch keeps that decision through the next reset phase, so the SAR reads
  a stable value on the rising edge.
* **`SAR_data_out` fills up during the conversion.** It shows the bits decided
  so far, MSB first, and returns to zero on the edge that starts the next
  sampling cycle. Read it while `SAR_ready` is 1.
* **`SAR_sampling` is also 1 during reset and while `SPI_cs` is 0.** In both
  cases the SAR waits in its sampling state.

## Switch control and the DAC

Each capacitor has a 2-bit control. It drives a 3:1 analog multiplexer,
`{Con2, Con1}`:

| code | reference |
|---|---|
| 00 | VSS (0 V) |
| 01 | VCM (0.9 V) |
| 10 | VDD (1.8 V) |

When bit k is decided as 1 (Vpos > Vneg), positive capacitor k goes to VDD
and negative capacitor k goes to VSS. When it is decided as 0, they go the
other way. In this design's convention VDD *lowers* a node and VSS *raises*
it. So each decision pulls Vpos and Vneg toward each other by the same amount.

Bit k moves each node by `0.9 V · 2^k / 1024`, which is 0.45 V for bit 9.
Switching capacitor 0 after the last comparison changes nothing that is
measured.

`cap_dac` solves the two-node split array in closed form:

* The MSB half holds bits 9..5, with capacitors 16, 8, 4, 2, 1 Cu.
* The LSB half holds bits 4..0, with capacitors 16, 8, 4, 2, 1 Cu plus a
  1 Cu terminator to VSS.
* The bridge capacitor is sized as Cbridge = ΣC_LSB / ΣC_MSB · Cu = 32/31 Cu.
* The unit capacitance is Cu = 1 pF.

Let D = (C_M + Cb)(C_L + Cb) − Cb². A step ΔV on the bottom plate of an MSB
capacitor C reaches the comparator node as C(C_L + Cb)/D · ΔV. A step on an
LSB capacitor C reaches it as C·Cb/D · ΔV. With the sizes above this gives
exactly 2^k/1024 per bit. If you change `CU` or the sizing rule inside
`cap_dac`, the weights follow.

Each capacitor's multiplexer is a `tg_mux3`, built from four `tg_switch`
transmission gates:

* two switches on Con1 choose Vin1 or Vin2;
* two switches on Con2 choose between that result and Vin3.

This gives 00 → Vin1, 01 → Vin2, 1x → Vin3. Wired to VSS/VCM/VDD, that is
the code table above.

## Result code

The output is offset binary over a ±1.8 V differential range. One LSB is
3.6 V / 1024 = 3.515625 mV.

```
code = ceil((Vinp − Vinn + 1.8) / LSB) − 1,   limited to 0 … 1023
```

* A difference that lies exactly on a threshold resolves downward, because
  the comparator treats a tie as "not greater". So Vinp = Vinn gives
  0111111111.
* Bit 9 is the sign (1 = Vinp > Vinn).
* For a positive input, bits 8..0 are the magnitude in LSBs.
* For a negative input, bits 8..0 are the one's complement of the magnitude.

For example, +0.6 V gives 1010101010 (magnitude 170) and −0.6 V gives
0101010101.

## Serial output (`spi_tx`)

The result of each conversion is shifted out MSB first on `SPI_SDO` during
the *next* conversion, one bit per `SPI_sck` rising edge.

* **Capture:** on every edge where `SAR_Samp` is low, the block copies
  `SAR_data_out`. On the first edge where `SAR_Samp` is high, it loads that
  copy into the shift register. The SAR has already cleared `SAR_data_out` on
  that edge, so the copy taken one edge earlier is the finished result.
* **Bit timing:** counting from the edge that raises `SAR_ready`, bit 9 is on
  `SPI_SDO` after the 2nd rising edge and bit 0 after the 11th. A receiver
  samples on the following edges. Zeros follow the last bit.
* **Deselected:** while `SPI_cs` is 0, `SPI_SDO` is 0 (two-state, no
  tri-state).
* **After an interruption:** after `SPI_cs` is dropped in mid-conversion,
  the first word shifted out is the partial result of the interrupted
  conversion; after a reset it is zero.

## Files

| file | kind | content |
|---|---|---|
| `rtl/sar_pkg.sv` | package | `sw_ctrl_e` (00/01/10), FSM state type, `ADC_BITS` = 10 |
| `rtl/sar_fsm.sv` | RTL | 12-cycle Moore sequencer |
| `rtl/sar_sw_ctrl.sv` | RTL | one 2-bit switch-control register |
| `rtl/sar_doble_regs.sv` | RTL | the 2 × 10 switch-control registers |
| `rtl/sar_lp.sv` | RTL | the SAR: sequencer, result register, switch bank, assertions |
| `rtl/spi_tx.sv` | RTL | serial result output |
| `rtl/adc_digital.sv` | RTL | digital core: SAR + SPI |
| `rtl/latch_sr.sv` | RTL (latch) | SR latch after the comparator |
| `rtl/dyn_comparator.sv` | behavioural | clocked dynamic comparator |
| `rtl/bootstrap_switch.sv` | behavioural | track-and-hold input switch |
| `rtl/tg_switch.sv` | behavioural | transmission-gate switch |
| `rtl/tg_mux3.sv` | behavioural | 3:1 analog multiplexer of four switches |
| `rtl/cap_dac.sv` | behavioural | differential split-array DAC with 20 multiplexers |
| `rtl/adc_lp.sv` | top | the complete converter |

Parameters:

* `NBITS` (default 10): the SAR and SPI logic are generic in it. The
  `cap_dac` weight formula assumes an even split of bits between the two
  halves.
* `CU` (default 1 pF) and `VDD` (default 1.8 V) are set on `adc_lp` and
  `cap_dac`.

Only `adc_digital` (with what it contains) and `latch_sr` are meant for synthesis. The
behavioural models use `real` ports and are for simulation only.

## Simulation

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. Build one with Verilator 5 (the package goes
first):

```
verilator --binary --timing --assert -Irtl -Itb rtl/sar_pkg.sv tb/tb_adc_lp.sv \
          --top-module tb_adc_lp -Mdir obj_adc -o sim
obj_adc/sim
```

| testbench | what it checks |
|---|---|
| `tb_adc_lp` | Whole converter at default parameters, 50 kHz clock. Covers the 15-point reference table, 200 random mid-code inputs, and the full ramp (Vinp stepped one LSB per conversion from 0 to 1.8 V with Vinn = 0, then swapped: 1024 conversions, codes 512..1023 and 511..0). Also checks the SPI word of every conversion, the 12-clock ready spacing, a pause of `SPI_cs` and a reset in mid-conversion, and counts that each of these really happened. Runs in well under a second. |
| `tb_sar_lp` | Cycle model of the SAR: sampling/ready timing, bit-by-bit result, all 20 switch buses. Includes the classic input patterns (first half 1 then 0 → 1111100000; toggle every cycle → 0101010101; toggle every two cycles → 1001100110), random sequences, enable pause, asynchronous reset. |
| `tb_adc_digital` | SAR + SPI driven by an ideal digital comparator that searches for a target code. Checks the result, the switch buses and the serial word. |
| `tb_spi_tx` | Capture and MSB-first shifting, zero fill, `SPI_cs` low, reset. |
| `tb_cap_dac` | Each capacitor's weight in both directions on both arrays, random control patterns, and the residue halving over one conversion. |
| `tb_tg_mux3`, `tb_tg_switch`, `tb_bootstrap_switch`, `tb_dyn_comparator`, `tb_latch_sr` | The model or latch behaviour described above. |

## How far to trust it, and where it departs from the original design

Digital part:

* The SAR's ports, control codes, 12-cycle conversion and output behaviour
  follow the original description closely.
* These details are this design's own choices:
  * enable low parks the SAR in its sampling state with the result cleared;
  * the SAR reads the comparator directly at the clock edge;
  * the internal split into sequencer, result register and switch bank.
* The original description gives the SPI block only by its pins and its
  purpose. Its capture rule, bit order, clock edge and `SPI_cs` polarity
  (active high, because the same pin enables the SAR) are assumptions. Check
  them against the real receiver.
* The reset pin is taken as active low throughout.
* Ties: the textbook form of the algorithm stores a 1 when the input equals
  the DAC voltage. The reference results of the differential converter store
  a 0 (a zero input gives 0111111111). This design follows the reference
  results.
* Clock: the converter was specified for a 50 kHz system clock, and its
  logic was timed for 250 MHz. Nothing in the RTL depends on the frequency;
  the behavioural DAC settles instantly, so slow clocks are only needed for
  real silicon.

Analog part:

* The models are ideal. They have no comparator offset or noise, no switch
  resistance or charge injection, no capacitor mismatch, no parasitics at
  the split-array nodes, and no settling time.
* The converter therefore reaches the ideal transfer curve. A
  transistor-level implementation showed codes up to one LSB off it; for
  example, +1.2 V gave 852 there against the ideal 853. `tb_adc_lp` accepts
  ±1 code against those reference values and demands the exact ideal code
  elsewhere.
* The DAC uses one sign convention: connecting a plate to VDD lowers its
  node. A plain top-plate-sampled array moves the other way. If you build
  one, swap the comparator inputs or the VDD/VSS codes.
* The DAC takes its comparator node at the MSB half of the split array.
* The sampled input voltages reach the DAC model as separate inputs. In
  silicon the switch output, the DAC top plate and the comparator input are
  one node.
* The bandgap reference is not modelled. Drive `Vref` with 0.9 V.

Ties: a differential input exactly on a code threshold may resolve either
way in the `real` model, through floating-point rounding. Such inputs are
only checked to within one code.
