// tb_adc_digital: self-checking test of the digital core (SAR + SPI).
//
// Stands in for the analog part with an ideal digital comparator: for a
// target code T chosen by the test, SAR_vin during the cycle that decides
// bit k is 1 exactly when the switch controls decided so far, plus bit k
// set, stay at or below T, i.e. the successive approximation of T. The
// result at SAR_ready must then be T, the switch controls must mirror it
// (bit 1 -> positive VDD / negative VSS), SAR_Samp must mark the first
// cycle, and SPI_SDO must carry T during the following conversion. SPI_cs
// low must stop conversions and silence SPI_SDO.
module tb_adc_digital;
  import sar_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic           reset, SPI_sck = 0, SPI_cs, SAR_vin;
  logic           SAR_Samp, SAR_ready, SPI_SDO;
  logic [9:0]     SAR_data_out;
  sw_ctrl_e [9:0] SAR_con_p, SAR_con_n;

  adc_digital dut (.*);

  always #10 SPI_sck = ~SPI_sck;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Ideal comparator from the positive-array controls seen so far.
  logic [9:0] target;
  always_comb begin
    logic [9:0] trial;
    int         k;
    trial = '0;
    k     = -1;
    for (int b = 9; b >= 0; b--) begin
      if (SAR_con_p[b] == SW_VDD) trial[b] = 1'b1;
      if (SAR_con_p[b] == SW_VCM && k < 0) k = b;
    end
    if (k >= 0) trial[k] = 1'b1;
    SAR_vin = (trial <= target);
  end

  logic [9:0] prev;
  bit         have_prev;
  int         n_conv = 0, n_spi = 0;

  // One conversion from the sampling cycle to the ready cycle; checks the
  // serial output of the previous result on the way.
  task automatic conversion(logic [9:0] t);
    logic [9:0] sdo_word;
    target = t;
    check(SAR_Samp && !SAR_ready, "sampling cycle");
    for (int c = 1; c <= 11; c++) begin
      @(negedge SPI_sck);
      check(!SAR_Samp, "no sampling");
      if (c <= 10) sdo_word[10 - c] = SPI_SDO;
    end
    check(SAR_ready, "ready in cycle 11");
    check(SAR_data_out == t, $sformatf("result %b exp %b", SAR_data_out, t));
    for (int k = 0; k < 10; k++) begin
      check(SAR_con_p[k] == (t[k] ? SW_VDD : SW_VSS), $sformatf("con_p %0d", k));
      check(SAR_con_n[k] == (t[k] ? SW_VSS : SW_VDD), $sformatf("con_n %0d", k));
    end
    if (have_prev) begin
      check(sdo_word == prev, $sformatf("SPI word %b exp %b", sdo_word, prev));
      n_spi++;
    end
    prev      = t;
    have_prev = 1;
    n_conv++;
    @(negedge SPI_sck);
  endtask

  initial begin
    reset = 0; SPI_cs = 1; target = '0; have_prev = 0;
    repeat (2) @(negedge SPI_sck);
    reset = 1;
    conversion(10'h000);
    conversion(10'h3FF);
    conversion(10'h200);
    conversion(10'h1FF);
    for (int i = 0; i < 60; i++) conversion(10'($urandom));
    // Deselect: SAR parks in sampling, SDO stays 0.
    SPI_cs = 0;
    repeat (15) begin
      @(negedge SPI_sck);
      check(SAR_Samp && !SAR_ready && SPI_SDO == 1'b0, "deselected");
    end
    SPI_cs = 1;                    // this cycle is the sampling cycle
    have_prev = 0;
    for (int i = 0; i < 5; i++) conversion(10'($urandom));
    check(n_spi > 60, "SPI words compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge SPI_sck);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
