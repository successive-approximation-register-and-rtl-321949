// bootstrap_switch: behavioural model of a bootstrapped sampling switch.
//
// Behavioural model (not synthesizable logic). While SAR_Samp = 1 the switch
// conducts and Vout tracks Vin; when SAR_Samp falls it opens and Vout keeps
// the last value (the charge held on the DAC's capacitors). The ADC uses
// two, one per differential input, both driven by the SAR's sampling
// output. On-resistance, charge injection and droop are not modelled.
module bootstrap_switch (
  input  real  Vin,
  input  logic SAR_Samp,
  output real  Vout
);

  always_latch begin
    if (SAR_Samp) Vout = Vin;
  end

endmodule
