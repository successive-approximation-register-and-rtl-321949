// tb_tg_switch: self-checking test of the transmission-gate switch model.
//
// With CK = 1 Vout must follow Vin and `on` be 1; with CK = 0 the switch
// is open: `on` = 0 and Vout reads 0.0 whatever Vin does.
module tb_tg_switch;
  timeunit 1ns; timeprecision 1ns;

  real  Vin, Vout;
  logic CK, on;
  tg_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      Vin = 1.8 * real'($urandom_range(1000)) / 1000.0;
      CK  = 1'($urandom);
      #5;
      check(on == CK, "on flag");
      if (CK) check(Vout == Vin, $sformatf("closed: Vout %f Vin %f", Vout, Vin));
      else    check(Vout == 0.0, "open");
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
