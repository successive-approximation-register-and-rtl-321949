// adc_lp: 10-bit differential low-power SAR ADC (mixed-signal top).
//
// Wires the converter as in the document's block diagram:
//   Vinp/Vinn -> bootstrap switches (controlled by SAR_Samp)
//             -> capacitor-array DAC nodes Vpos/Vneg -> dynamic comparator
//             -> SR latch (SAR_vin) -> SAR -> DAC switch controls
//   SAR_data_out -> SPI module -> SPI_SDO, and SAR_data_out also out.
// The digital core (adc_digital: SAR + SPI) is synthesizable RTL; the
// analog blocks are behavioural models using `real` voltages. The bandgap
// reference is not modelled: its 0.9 V output enters as the Vref port and
// is the DAC's VCM.
//
// Timing: everything runs from SPI_sck. With SPI_cs = 1 the ADC converts
// continuously, one conversion per 12 SPI_sck cycles (1 sampling cycle,
// 10 bit cycles, 1 ready cycle). SAR_data_out is valid while SAR_ready = 1
// and is shifted out MSB first on SPI_SDO during the following conversion.
// SAR_ready is brought out as a port for convenience; the document's
// diagram shows only SAR_data_out, SPI_SDO and the reference as outputs.
// reset is active low.
//
// Result coding: code = floor((Vinp - Vinn + VDD) / LSB), LSB = 2 VDD / 1024
// = 3.515625 mV, limited to 0..1023, with a difference exactly on a
// threshold resolving downward; bit 9 is the sign (1 = positive).
module adc_lp
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS,
  parameter real         CU    = 1.0e-12,
  parameter real         VDD   = 1.8
) (
  input  logic             reset,
  input  logic             SPI_sck,
  input  logic             SPI_cs,
  input  real              Vinp,
  input  real              Vinn,
  input  real              Vref,
  output logic             SPI_SDO,
  output logic [NBITS-1:0] SAR_data_out,
  output logic             SAR_ready
);

  logic                 SAR_Samp, SAR_vin, Vcomp, Vcomn;
  sw_ctrl_e [NBITS-1:0] SAR_con_p, SAR_con_n;
  real                  vsmp_p, vsmp_n, Vpos, Vneg;

  bootstrap_switch bs_p (.Vin(Vinp), .SAR_Samp(SAR_Samp), .Vout(vsmp_p));
  bootstrap_switch bs_n (.Vin(Vinn), .SAR_Samp(SAR_Samp), .Vout(vsmp_n));

  cap_dac #(.NBITS(NBITS), .CU(CU), .VDD(VDD)) dac_inst (
    .vsmp_p, .vsmp_n,
    .Vcm       (Vref),
    .SAR_con_p, .SAR_con_n,
    .Vpos, .Vneg
  );

  dyn_comparator comp_inst (
    .clk   (SPI_sck),
    .reset (reset),
    .Vinp  (Vpos),
    .Vinn  (Vneg),
    .Vcomp, .Vcomn
  );

  latch_sr latch_inst (.Vcomp, .Vcomn, .SAR_vin);

  adc_digital #(.NBITS(NBITS)) digital_inst (
    .reset, .SPI_sck, .SPI_cs, .SAR_vin,
    .SAR_Samp, .SAR_ready, .SAR_data_out,
    .SAR_con_p, .SAR_con_n,
    .SPI_SDO
  );

endmodule
