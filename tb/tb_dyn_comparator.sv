// tb_dyn_comparator: self-checking test of the dynamic comparator model.
//
// Checks that both outputs are 0 while clk is high and while reset is low,
// that on each falling edge exactly one output rises (Vcomp when
// Vinp > Vinn, including differences of a fraction of a millivolt, Vcomn
// otherwise and on a tie), and that the decision holds while the inputs
// move during the low phase.
module tb_dyn_comparator;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 1, reset, Vcomp, Vcomn;
  real  Vinp, Vinn;
  dyn_comparator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    bit gt;
    int n_gt = 0, n_le = 0;
    reset = 0; Vinp = 1.0; Vinn = 0.5;
    #5 clk = 0; #5;
    check(!Vcomp && !Vcomn, "outputs low in reset");
    clk = 1; #5;
    reset = 1;
    for (int i = 0; i < 400; i++) begin
      Vinn = 1.8 * real'($urandom_range(1000)) / 1000.0;
      case (i % 4)
        0: Vinp = Vinn + 0.0004;
        1: Vinp = Vinn - 0.0004;
        2: Vinp = Vinn;
        default: Vinp = 1.8 * real'($urandom_range(1000)) / 1000.0;
      endcase
      gt = Vinp > Vinn;
      #5;
      check(!Vcomp && !Vcomn, "reset phase");
      clk = 0; #5;
      check(Vcomp == gt && Vcomn == !gt, $sformatf("decide %f vs %f", Vinp, Vinn));
      if (gt) n_gt++; else n_le++;
      Vinp = Vinn - Vinp + Vinn;   // swap the sign of the difference
      #5;
      check(Vcomp == gt && Vcomn == !gt, "hold through input change");
      clk = 1; #5;
    end
    check(n_gt > 0 && n_le > 0, "both decisions seen");
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
