// latch_sr: set-reset latch after the dynamic comparator.
//
// The dynamic comparator returns both outputs to 0 during its reset phase
// and raises exactly one of them when it has decided. This latch keeps the
// last decision through the reset phase and presents it as one
// single-ended signal: Vcomp = 1 sets SAR_vin, Vcomn = 1 clears it, both 0
// hold. (Both 1 never happens with a working comparator; set wins.) It is a
// level-sensitive storage element on purpose, the latch the document puts
// between comparator and SAR; its internal gates are not given there, and
// this is the plain behavioural form.
module latch_sr (
  input  logic Vcomp,
  input  logic Vcomn,
  output logic SAR_vin
);

  always_latch begin
    if (Vcomp)      SAR_vin = 1'b1;
    else if (Vcomn) SAR_vin = 1'b0;
  end

endmodule
