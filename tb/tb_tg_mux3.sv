// tb_tg_mux3: self-checking test of the 3:1 analog multiplexer model.
//
// Drives three different random voltages and every control combination,
// checking the truth table {Con2, Con1}: 00 -> Vin1, 01 -> Vin2,
// 10 -> Vin3, 11 -> Vin3.
module tb_tg_mux3;
  timeunit 1ns; timeprecision 1ns;

  real  Vin1, Vin2, Vin3, Vout;
  logic Con1, Con2;
  tg_mux3 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    real expv;
    for (int i = 0; i < 100; i++) begin
      Vin1 = 0.0 + 0.6 * real'($urandom_range(1000)) / 1000.0;
      Vin2 = 0.7 + 0.4 * real'($urandom_range(1000)) / 1000.0;
      Vin3 = 1.2 + 0.6 * real'($urandom_range(1000)) / 1000.0;
      for (int c = 0; c < 4; c++) begin
        {Con2, Con1} = 2'(c);
        #5;
        expv = (c == 0) ? Vin1 : (c == 1) ? Vin2 : Vin3;
        check(Vout == expv, $sformatf("con=%b Vout=%f exp=%f", 2'(c), Vout, expv));
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
