// tb_cap_dac: self-checking test of the split-array DAC model.
//
// Expected node voltages are computed here from the ideal binary weights a
// correctly sized 10-bit split array must have: switching capacitor k from
// VCM to VDD lowers its node by (VDD - VCM) * 2^k / 1024, to VSS raises it
// by VCM * 2^k / 1024 (VCM = 0.9 V, so 0.45 V for bit 9 and 0.88 mV for
// bit 0). The test checks: with every control at VCM the nodes equal the
// sampled inputs; each capacitor alone in both directions on both arrays;
// random combinations of controls against the sum of weights; and the
// differential sequence of one ideal conversion, where Vpos - Vneg must
// halve towards zero bit after bit.
module tb_cap_dac;
  import sar_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  real            vsmp_p, vsmp_n, Vcm, Vpos, Vneg;
  sw_ctrl_e [9:0] SAR_con_p, SAR_con_n;
  cap_dac dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  function automatic real vref_of(sw_ctrl_e c);
    return (c == SW_VDD) ? 1.8 : (c == SW_VSS) ? 0.0 : 0.9;
  endfunction

  function automatic real expect_node(real vs, sw_ctrl_e [9:0] con);
    real v = vs;
    for (int k = 0; k < 10; k++)
      v -= (vref_of(con[k]) - 0.9) * real'(1 << k) / 1024.0;
    return v;
  endfunction

  initial begin
    real diff, vd;
    bit  gt;
    Vcm = 0.9;
    vsmp_p = 1.3; vsmp_n = 0.4;
    SAR_con_p = {10{SW_VCM}};
    SAR_con_n = {10{SW_VCM}};
    #5;
    check(near(Vpos, 1.3) && near(Vneg, 0.4), "all VCM");

    for (int k = 0; k < 10; k++) begin
      SAR_con_p = {10{SW_VCM}};
      SAR_con_n = {10{SW_VCM}};
      SAR_con_p[k] = SW_VDD;
      SAR_con_n[k] = SW_VSS;
      #5;
      check(near(Vpos, 1.3 - 0.9 * real'(1 << k) / 1024.0),
            $sformatf("pos bit %0d to VDD: %f", k, Vpos));
      check(near(Vneg, 0.4 + 0.9 * real'(1 << k) / 1024.0),
            $sformatf("neg bit %0d to VSS: %f", k, Vneg));
      SAR_con_p[k] = SW_VSS;
      SAR_con_n[k] = SW_VDD;
      #5;
      check(near(Vpos, 1.3 + 0.9 * real'(1 << k) / 1024.0), $sformatf("pos bit %0d to VSS", k));
      check(near(Vneg, 0.4 - 0.9 * real'(1 << k) / 1024.0), $sformatf("neg bit %0d to VDD", k));
    end

    for (int i = 0; i < 200; i++) begin
      vsmp_p = 1.8 * real'($urandom_range(1000)) / 1000.0;
      vsmp_n = 1.8 * real'($urandom_range(1000)) / 1000.0;
      for (int k = 0; k < 10; k++) begin
        SAR_con_p[k] = sw_ctrl_e'($urandom_range(2));
        SAR_con_n[k] = sw_ctrl_e'($urandom_range(2));
      end
      #5;
      check(near(Vpos, expect_node(vsmp_p, SAR_con_p)), "random pos");
      check(near(Vneg, expect_node(vsmp_n, SAR_con_n)), "random neg");
    end

    // One ideal conversion of a 0.7 V difference: after deciding bit k the
    // remaining difference must lie within +-1.8 V / 2^(10-k).
    vsmp_p = 1.25; vsmp_n = 0.55;
    SAR_con_p = {10{SW_VCM}};
    SAR_con_n = {10{SW_VCM}};
    #5;
    vd = 1.8;
    for (int k = 9; k >= 0; k--) begin
      gt = Vpos > Vneg;
      SAR_con_p[k] = gt ? SW_VDD : SW_VSS;
      SAR_con_n[k] = gt ? SW_VSS : SW_VDD;
      #5;
      vd = vd / 2.0;
      diff = Vpos - Vneg;
      check(diff <= vd + 1e-9 && diff >= -vd - 1e-9,
            $sformatf("residue after bit %0d: %f", k, diff));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
