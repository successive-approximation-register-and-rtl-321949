// dyn_comparator: behavioural model of the clocked dynamic comparator.
//
// Behavioural model (not synthesizable logic) of a StrongArm-type dynamic
// comparator clocked by the ADC clock. While clk = 1 (and while reset is
// low) it is in its reset phase and both outputs are 0. On the falling edge
// of clk it decides once: Vcomp = 1 if Vinp > Vinn, otherwise Vcomn = 1
// (a tie counts as "not greater"), and holds that decision until clk rises.
// The SR latch after it keeps the decision across the reset phase, so the
// SAR sees a settled comparator result at every rising edge: the DAC moves
// on the rising edge, settles during the high phase and is compared on the
// falling edge. Which clock phase evaluates, and the reset polarity of the
// outputs, are this design's choices; offset, noise and metastability are
// not modelled.
module dyn_comparator (
  input  logic clk,
  input  logic reset,  // active low
  input  real  Vinp,
  input  real  Vinn,
  output logic Vcomp,
  output logic Vcomn
);

  always @(posedge clk or negedge clk or negedge reset) begin
    if (!reset || clk) begin
      Vcomp <= 1'b0;
      Vcomn <= 1'b0;
    end else begin
      Vcomp <= (Vinp > Vinn);
      Vcomn <= !(Vinp > Vinn);
    end
  end

endmodule
