// cap_dac: behavioural model of the differential capacitive split-array DAC.
//
// Behavioural model (not synthesizable logic) of two identical 10-bit
// capacitive split arrays, one on the comparator's positive node Vpos and
// one on its negative node Vneg. Each array has an MSB sub-array (bits 9..5,
// capacitors 16, 8, 4, 2, 1 Cu) and an LSB sub-array (bits 4..0, 16, 8, 4,
// 2, 1 Cu plus a terminating Cu to VSS), joined by the bridge capacitor
//   Cbridge = (sum of LSB capacitance) / (sum of MSB capacitance) * Cu
//           = 32/31 Cu.
// Every capacitor's bottom plate goes through a tg_mux3 to VSS, VCM or VDD
// as its 2-bit control says (00, 01, 10); 2*NBITS multiplexers in all.
//
// The model solves the two-node capacitor network once, in closed form:
// with C_M and C_L the capacitance of the MSB and LSB sub-arrays and
// D = (C_M + Cb)(C_L + Cb) - Cb^2, moving the bottom plate of an MSB
// capacitor C by dV moves the comparator node by C (C_L + Cb) / D * dV, and
// of an LSB capacitor by C Cb / D * dV. For the 10-bit array this gives
// bit k a weight of 2^k / 1024, so bit 9 moves its node by (VDD - VCM)/2 =
// 0.45 V. The comparator node is taken at the MSB sub-array. Charge is
// conserved from the sampling phase, in which every control is VCM and the
// node equals the sampled input (vsmp_p / vsmp_n, from the bootstrap
// switches; in silicon this is the same node). Hence
//   Vpos = vsmp_p - sum_k w_k (Vbot_p[k] - Vcm), likewise for Vneg.
// The minus sign follows the document's statement that connecting a
// capacitor to VDD lowers its node and connecting it to VSS raises it,
// which is what lets the SAR's switch rule (comparator 1 -> positive
// capacitor to VDD, negative to VSS) drive Vpos and Vneg together.
// Parasitics, mismatch and settling time are not modelled.
module cap_dac
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS,
  parameter real         CU    = 1.0e-12,  // unit capacitance, 1 pF
  parameter real         VDD   = 1.8,
  parameter real         VSS   = 0.0
) (
  input  real                  vsmp_p,     // sampled Vinp (bootstrap output)
  input  real                  vsmp_n,     // sampled Vinn (bootstrap output)
  input  real                  Vcm,        // common-mode reference (bandgap)
  input  sw_ctrl_e [NBITS-1:0] SAR_con_p,
  input  sw_ctrl_e [NBITS-1:0] SAR_con_n,
  output real                  Vpos,
  output real                  Vneg
);

  localparam int unsigned NLSB = NBITS / 2;
  localparam int unsigned NMSB = NBITS - NLSB;

  // Capacitance of the capacitor of bit k inside its sub-array.
  function automatic real cap_of(int unsigned k);
    return (k >= NLSB) ? CU * real'(1 << (k - NLSB)) : CU * real'(1 << k);
  endfunction

  // Fraction of a bottom-plate step that reaches the comparator node.
  function automatic real weight(int unsigned k);
    real c_m, c_l, c_b, d;
    c_m = CU * real'((1 << NMSB) - 1);       // MSB sub-array
    c_l = CU * real'(1 << NLSB);             // LSB sub-array with terminator
    c_b = c_l / c_m * CU;                    // bridge, by the sizing rule
    d   = (c_m + c_b) * (c_l + c_b) - c_b * c_b;
    return (k >= NLSB) ? cap_of(k) * (c_l + c_b) / d : cap_of(k) * c_b / d;
  endfunction

  real vbot_p [NBITS];
  real vbot_n [NBITS];

  for (genvar k = 0; k < NBITS; k++) begin : g_sw
    tg_mux3 mux_p (.Vin1(VSS), .Vin2(Vcm), .Vin3(VDD),
                   .Con1(SAR_con_p[k][0]), .Con2(SAR_con_p[k][1]),
                   .Vout(vbot_p[k]));
    tg_mux3 mux_n (.Vin1(VSS), .Vin2(Vcm), .Vin3(VDD),
                   .Con1(SAR_con_n[k][0]), .Con2(SAR_con_n[k][1]),
                   .Vout(vbot_n[k]));
  end

  always_comb begin
    Vpos = vsmp_p;
    Vneg = vsmp_n;
    for (int unsigned k = 0; k < NBITS; k++) begin
      Vpos -= weight(k) * (vbot_p[k] - Vcm);
      Vneg -= weight(k) * (vbot_n[k] - Vcm);
    end
  end

endmodule
