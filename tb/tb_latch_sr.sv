// tb_latch_sr: self-checking test of the SR latch after the comparator.
//
// Applies random sequences of comparator output pairs (10 = set, 01 =
// reset, 00 = hold) and checks SAR_vin against the last set/reset seen.
module tb_latch_sr;
  timeunit 1ns; timeprecision 1ns;

  logic Vcomp, Vcomn, SAR_vin;
  latch_sr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit expq;
  int n_hold = 0;

  initial begin
    Vcomp = 1; Vcomn = 0; #5;
    expq = 1;
    check(SAR_vin == 1'b1, "set");
    Vcomp = 0; #5;
    check(SAR_vin == 1'b1, "hold 1");
    Vcomn = 1; #5;
    check(SAR_vin == 1'b0, "reset");
    Vcomn = 0; #5;
    check(SAR_vin == 1'b0, "hold 0");
    expq = 0;
    for (int i = 0; i < 500; i++) begin
      case ($urandom_range(2))
        0: begin Vcomp = 1; Vcomn = 0; expq = 1; end
        1: begin Vcomp = 0; Vcomn = 1; expq = 0; end
        default: begin Vcomp = 0; Vcomn = 0; n_hold++; end
      endcase
      #5;
      check(SAR_vin == expq, $sformatf("step %0d", i));
    end
    check(n_hold > 0, "hold exercised");
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
