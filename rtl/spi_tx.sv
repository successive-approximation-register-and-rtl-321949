// spi_tx: serial output of the ADC result.
//
// The whole ADC runs from SPI_sck, so one conversion (NBITS+2 clocks) also
// gives room to shift out the previous result. On every rising edge on
// which SAR_Samp is low the module copies SAR_data_out into a capture
// register; the last copy before a sampling cycle is therefore the finished
// result (the SAR clears its output on the edge that starts sampling). On
// the first edge that sees SAR_Samp high it loads that word into the shift
// register, and on each following rising edge shifts it one place, MSB
// first; zeros follow the last bit. SPI_SDO shows the shift register's MSB
// while SPI_cs is 1 and is 0 otherwise.
//
// Timing: after the load edge, bit NBITS-1 is on SPI_SDO for one clock, then
// bit NBITS-2, and so on; a receiver samples SPI_SDO on the rising edges
// that follow. The document only gives the module's pins (reset, SPI_sck,
// SPI_cs, SAR_Samp, SAR_data_out in, SPI_SDO out) and its purpose, sending
// the result serially; the capture rule, bit order, active-high SPI_cs and
// the active-low asynchronous reset are this design's choices.
module spi_tx #(
  parameter int unsigned NBITS = 10
) (
  input  logic             reset,       // active low, asynchronous
  input  logic             SPI_sck,
  input  logic             SPI_cs,
  input  logic             SAR_Samp,
  input  logic [NBITS-1:0] SAR_data_out,
  output logic             SPI_SDO
);

  logic [NBITS-1:0] capture, shreg;
  logic             samp_d;

  always_ff @(posedge SPI_sck or negedge reset) begin
    if (!reset) begin
      capture <= '0;
      shreg   <= '0;
      samp_d  <= 1'b0;
    end else begin
      samp_d <= SAR_Samp;
      if (!SAR_Samp) capture <= SAR_data_out;
      if (SAR_Samp && !samp_d) shreg <= capture;
      else                     shreg <= {shreg[NBITS-2:0], 1'b0};
    end
  end

  assign SPI_SDO = SPI_cs && shreg[NBITS-1];

endmodule
