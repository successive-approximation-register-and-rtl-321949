// sar_lp: successive approximation register of the 10-bit differential
// low-power SAR ADC.
//
// Function. Each conversion takes NBITS+2 = 12 clock cycles:
//   cycle 0        SAR_sampling = 1; result cleared; all 2*NBITS DAC switch
//                  controls at VCM (01). The bootstrap switches sample.
//   cycles 1..10   bit k = 9 down to 0 is decided on the rising edge that
//                  ends the cycle: SAR_in (the comparator result, 1 when
//                  Vpos > Vneg) is stored in SAR_data_out[k], the positive
//                  switch k goes to VDD (10) if SAR_in = 1 and to VSS (00)
//                  otherwise, and negative switch k goes the opposite way.
//                  Bit 9 is decided with every switch still at VCM, so it is
//                  the sign of Vinp - Vinn.
//   cycle 11       SAR_ready = 1; SAR_data_out holds the complete result.
// SAR_data_out is cleared on the edge that starts the next sampling cycle,
// and otherwise shows the bits decided so far.
//
// Result coding (offset binary): SAR_data_out[9] = 1 for Vinp > Vinn; the
// other nine bits are the magnitude for a positive input and its one's
// complement for a negative one.
//
// Interface. Port names follow the document's pin list; the twenty 2-bit
// buses SAR_DAC_pos_#_out / SAR_DAC_neg_#_out are packed here into two
// arrays indexed by the switch number #. SAR_nrst is an asynchronous
// active-low reset; SAR_en low holds the SAR in its sampling state with the
// result cleared (this design's reading of "0 would turn off"). SAR_in is
// sampled directly on the rising edge, so the comparator must have settled
// by then. The split into sequencer (fsm_i), result register and switch
// bank (DobleRegs) follows the synthesized netlist the document shows.
// The assertions at the end use SAR_nrst as their disable condition, so a
// lint tool may report the reset as used both asynchronously and
// synchronously; the flip-flops themselves only use it asynchronously.
module sar_lp
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS
) (
  input  logic                 SAR_clk,
  input  logic                 SAR_nrst,
  input  logic                 SAR_en,
  input  logic                 SAR_in,
  output logic                 SAR_ready,
  output logic                 SAR_sampling,
  output logic [NBITS-1:0]     SAR_data_out,
  output sw_ctrl_e [NBITS-1:0] SAR_DAC_pos_out,
  output sw_ctrl_e [NBITS-1:0] SAR_DAC_neg_out
);

  logic                     clear_st, clear, decide;
  logic [$clog2(NBITS)-1:0] bit_idx;

  sar_fsm #(.NBITS(NBITS)) fsm_i (
    .clk      (SAR_clk),
    .nrst     (SAR_nrst),
    .en       (SAR_en),
    .sampling (SAR_sampling),
    .ready    (SAR_ready),
    .clear    (clear_st),
    .decide   (decide),
    .bit_idx  (bit_idx)
  );

  // While disabled, keep the result and the switches in their start state.
  assign clear = clear_st || !SAR_en;

  // Result register: one bit written per conversion cycle.
  always_ff @(posedge SAR_clk or negedge SAR_nrst) begin
    if (!SAR_nrst)   SAR_data_out <= '0;
    else if (clear)  SAR_data_out <= '0;
    else if (decide) SAR_data_out[bit_idx] <= SAR_in;
  end

  sar_doble_regs #(.NBITS(NBITS)) DobleRegs (
    .clk     (SAR_clk),
    .nrst    (SAR_nrst),
    .clear   (clear),
    .decide  (decide),
    .bit_idx (bit_idx),
    .comp    (SAR_in),
    .sw_pos  (SAR_DAC_pos_out),
    .sw_neg  (SAR_DAC_neg_out)
  );

  // A conversion step never happens in the sampling or ready cycle.
  a_decide_phase: assert property (@(posedge SAR_clk) disable iff (!SAR_nrst)
    decide |-> !SAR_sampling && !SAR_ready);
  // Both arrays always switch in opposite directions (or both stay at VCM).
  for (genvar k = 0; k < NBITS; k++) begin : g_chk
    a_opposite: assert property (@(posedge SAR_clk) disable iff (!SAR_nrst)
      (SAR_DAC_pos_out[k] == SW_VCM) == (SAR_DAC_neg_out[k] == SW_VCM) &&
      (SAR_DAC_pos_out[k] == SW_VCM || SAR_DAC_pos_out[k] != SAR_DAC_neg_out[k]));
  end

endmodule
