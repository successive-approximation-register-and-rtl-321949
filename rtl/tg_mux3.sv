// tg_mux3: behavioural model of the 3-input analog multiplexer that
// connects one DAC capacitor's bottom plate to VSS, VCM or VDD.
//
// Behavioural model (not synthesizable logic), built like the real part
// from four transmission-gate switches: Con1 chooses between Vin1 and Vin2
// onto an internal node (switches s1, s2), and Con2 chooses between that
// node and Vin3 onto Vout (switches s3, s4). The resulting truth table is
//   Con2 Con1 : Vout
//     0    0  : Vin1
//     0    1  : Vin2
//     1    x  : Vin3
// With Vin1 = VSS, Vin2 = VCM and Vin3 = VDD, the control {Con2, Con1} is
// exactly the SAR's 2-bit switch code (00 VSS, 01 VCM, 10 VDD). Which
// switch sits on which input is read from the truth table; the switches
// are ideal and settle at once.
module tg_mux3 (
  input  real  Vin1,
  input  real  Vin2,
  input  real  Vin3,
  input  logic Con1,
  input  logic Con2,
  output real  Vout
);

  real  v_s1, v_s2, v_s3, v_s4, v_mid;
  logic on_s1, on_s2, on_s3, on_s4;

  tg_switch s1 (.Vin(Vin1), .CK(!Con1), .Vout(v_s1), .on(on_s1));
  tg_switch s2 (.Vin(Vin2), .CK(Con1),  .Vout(v_s2), .on(on_s2));

  // Internal node: exactly one of s1, s2 conducts.
  always_comb v_mid = on_s1 ? v_s1 : v_s2;

  tg_switch s3 (.Vin(v_mid), .CK(!Con2), .Vout(v_s3), .on(on_s3));
  tg_switch s4 (.Vin(Vin3),  .CK(Con2),  .Vout(v_s4), .on(on_s4));

  always_comb Vout = on_s3 ? v_s3 : v_s4;

  // The two switches onto one node never conduct together.
  always_comb begin
    a_node_mid: assert (on_s1 != on_s2);
    a_node_out: assert (on_s3 != on_s4);
  end

endmodule
