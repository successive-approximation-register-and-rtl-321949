// tb_bootstrap_switch: self-checking test of the sampling switch model.
//
// While SAR_Samp = 1 Vout must track a changing Vin; after SAR_Samp falls
// Vout must keep the last tracked value however Vin moves.
module tb_bootstrap_switch;
  timeunit 1ns; timeprecision 1ns;

  real  Vin, Vout;
  logic SAR_Samp;
  bootstrap_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    real held;
    for (int n = 0; n < 50; n++) begin
      SAR_Samp = 1;
      for (int i = 0; i < 4; i++) begin
        Vin = 1.8 * real'($urandom_range(1000)) / 1000.0;
        #5;
        check(Vout == Vin, "track");
      end
      held = Vin;
      SAR_Samp = 0;
      #5;
      for (int i = 0; i < 4; i++) begin
        Vin = 1.8 * real'($urandom_range(1000)) / 1000.0 + 0.0001;
        #5;
        check(Vout == held, $sformatf("hold %f exp %f", Vout, held));
      end
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
