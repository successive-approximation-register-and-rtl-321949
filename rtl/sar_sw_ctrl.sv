// sar_sw_ctrl: 2-bit control register of one DAC capacitor switch.
//
// Holds SW_ctrl, the code of the reference the capacitor's bottom plate is
// connected to. It starts at VCM (01) after reset and at the start of every
// conversion (clear). When its bit is decided (load), it moves to VDD (10)
// or VSS (00) from the comparator result `comp`:
//   positive-array switch (INVERT = 0): comp = 1 -> VDD, comp = 0 -> VSS
//   negative-array switch (INVERT = 1): comp = 1 -> VSS, comp = 0 -> VDD
// so the two arrays always move in opposite directions, as the document's
// three-reference switching scheme requires. Updates on the rising edge;
// reset is asynchronous, active low.
module sar_sw_ctrl
  import sar_pkg::*;
#(
  parameter bit INVERT = 1'b0
) (
  input  logic     clk,
  input  logic     nrst,
  input  logic     clear,
  input  logic     load,
  input  logic     comp,
  output sw_ctrl_e SW_ctrl
);

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst)      SW_ctrl <= SW_VCM;
    else if (clear) SW_ctrl <= SW_VCM;
    else if (load)  SW_ctrl <= (comp ^ INVERT) ? SW_VDD : SW_VSS;
  end

endmodule
