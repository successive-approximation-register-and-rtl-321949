// tg_switch: behavioural model of a transmission-gate analog switch.
//
// Behavioural model (not synthesizable logic): the real part is a CMOS
// transmission gate with an inverter on its control, four transistors in
// all. When CK = 1 both transistors of the gate conduct and Vout follows
// Vin; when CK = 0 the gate is open and Vout is high impedance. Because the
// model is two-state, the open state is reported on the extra output `on`
// (1 = conducting) and Vout then reads 0.0; whoever joins several switches
// on one node uses `on` to resolve it. On-resistance and charge injection
// are not modelled: the switch is ideal and settles at once. Transistor
// sizes of the real gate (W/L 1.9u/200n, 760n/200n, 1.9u/200n, 1.9u/200n)
// are documentation only.
module tg_switch (
  input  real  Vin,
  input  logic CK,
  output real  Vout,
  output logic on
);

  always_comb begin
    on   = CK;
    Vout = CK ? Vin : 0.0;
  end

endmodule
