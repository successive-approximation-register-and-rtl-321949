// sar_pkg: types and constants shared by the SAR ADC digital core.
//
// Each DAC capacitor is driven by a 3:1 analog multiplexer whose 2-bit control
// selects the bottom-plate reference: 00 = VSS, 01 = VCM, 10 = VDD. The code
// 11 also selects VDD in the multiplexer but the SAR never produces it. These
// codes follow the document's switch-control table; the enum and the state
// type are this design's own packaging.
package sar_pkg;

  // Default resolution of the converter (bits of SAR_data_out).
  localparam int unsigned ADC_BITS = 10;

  // Bottom-plate reference selected by one DAC switch control bus.
  typedef enum logic [1:0] {
    SW_VSS = 2'b00,
    SW_VCM = 2'b01,
    SW_VDD = 2'b10
  } sw_ctrl_e;

  // Phases of one conversion: one sampling cycle, one cycle per bit, one
  // cycle in which the result is flagged ready.
  typedef enum logic [1:0] {
    ST_SAMPLE  = 2'd0,
    ST_CONVERT = 2'd1,
    ST_READY   = 2'd2
  } sar_state_e;

endpackage
