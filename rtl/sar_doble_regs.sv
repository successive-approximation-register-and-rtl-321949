// sar_doble_regs: the bank of DAC switch-control registers of the SAR.
//
// One sar_sw_ctrl pair per bit k: swKp drives the positive capacitor array,
// swKn the negative one. Bit k's pair loads the comparator result when the
// sequencer decides bit k (decide = 1 and bit_idx = k); all pairs return to
// VCM on clear. Outputs are registered; they change on the rising edge that
// decides the bit, the same edge that stores the bit in the result register.
// The bank's name and the swKp/swKn instance names follow the synthesized
// netlist the document shows; the structure inside is this design's own.
module sar_doble_regs
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS
) (
  input  logic                     clk,
  input  logic                     nrst,
  input  logic                     clear,
  input  logic                     decide,
  input  logic [$clog2(NBITS)-1:0] bit_idx,
  input  logic                     comp,
  output sw_ctrl_e [NBITS-1:0]     sw_pos,
  output sw_ctrl_e [NBITS-1:0]     sw_neg
);

  for (genvar k = 0; k < NBITS; k++) begin : g_bit
    logic load;
    assign load = decide && (bit_idx == ($clog2(NBITS))'(k));

    sar_sw_ctrl #(.INVERT(1'b0)) swp (
      .clk, .nrst, .clear, .load, .comp, .SW_ctrl(sw_pos[k])
    );
    sar_sw_ctrl #(.INVERT(1'b1)) swn (
      .clk, .nrst, .clear, .load, .comp, .SW_ctrl(sw_neg[k])
    );
  end

endmodule
