// adc_digital: digital core of the ADC (SAR and SPI module).
//
// Groups the standard-cell part of the converter, as the document's
// synthesized ADC does with its digital instance: the SAR (sar_lp) and the
// serial interface (spi_tx). Following the document's block diagram, both
// run from SPI_sck, the SAR's enable is SPI_cs ("start") and both share the
// reset input (active low here). SAR_vin is the SR latch output; the
// sampling strobe and the 2*NBITS switch controls go to the analog part.
// A conversion takes NBITS+2 SPI_sck cycles; the previous result is shifted
// out on SPI_SDO during the next conversion.
module adc_digital
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS
) (
  input  logic                 reset,
  input  logic                 SPI_sck,
  input  logic                 SPI_cs,
  input  logic                 SAR_vin,
  output logic                 SAR_Samp,
  output logic                 SAR_ready,
  output logic [NBITS-1:0]     SAR_data_out,
  output sw_ctrl_e [NBITS-1:0] SAR_con_p,
  output sw_ctrl_e [NBITS-1:0] SAR_con_n,
  output logic                 SPI_SDO
);

  sar_lp #(.NBITS(NBITS)) sar_lp_inst (
    .SAR_clk         (SPI_sck),
    .SAR_nrst        (reset),
    .SAR_en          (SPI_cs),
    .SAR_in          (SAR_vin),
    .SAR_ready       (SAR_ready),
    .SAR_sampling    (SAR_Samp),
    .SAR_data_out    (SAR_data_out),
    .SAR_DAC_pos_out (SAR_con_p),
    .SAR_DAC_neg_out (SAR_con_n)
  );

  spi_tx #(.NBITS(NBITS)) spi_inst (
    .reset        (reset),
    .SPI_sck      (SPI_sck),
    .SPI_cs       (SPI_cs),
    .SAR_Samp     (SAR_Samp),
    .SAR_data_out (SAR_data_out),
    .SPI_SDO      (SPI_SDO)
  );

endmodule
