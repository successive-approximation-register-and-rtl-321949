// tb_adc_lp: end-to-end test of the mixed-signal ADC at its default size.
//
// Runs the 10-bit converter with a 50 kHz SPI_sck (20 us period) and checks
// every conversion result against an ideal converter computed here:
//   code = ceil((Vinp - Vinn + 1.8) / LSB) - 1, limited to 0..1023,
//   LSB = 3.6 V / 1024
// (a difference exactly on a threshold resolves downward). Phases:
//   1. the fifteen input pairs of the reference result table (taken from a
//      transistor-level simulation of the converter), checked against the
//      listed codes within one code, and exactly against the ideal code
//      where the input does not sit on a threshold; the listed +1.2 V code
//      (852) is one below the ideal 853;
//   2. 200 random differential inputs placed mid-code;
//   3. the ramp test: Vinn = 0 and Vinp rising one LSB per conversion from
//      0 to 1.8 V (codes 512..1023), then the same with the inputs swapped
//      (codes 511..0);
//   4. SPI_cs dropped in the middle of a conversion, and a reset in the
//      middle of a conversion; both must restart cleanly.
// Throughout, the serial word on SPI_SDO is compared with the previous
// result, the spacing of SAR_ready pulses must be 12 clocks, and each
// mechanism (positive and negative sign, both clamps, SPI word, enable
// pause, reset) must have happened at least once.
module tb_adc_lp;
  timeunit 1ns; timeprecision 1ns;

  localparam real VDD     = 1.8;
  localparam real LSB     = 2.0 * VDD / 1024.0;
  localparam int  PERIOD  = 12;         // clocks per conversion
  localparam int  TCLK_NS = 20000;      // 50 kHz

  logic       reset, SPI_sck, SPI_cs, SPI_SDO, SAR_ready;
  logic [9:0] SAR_data_out;
  real        Vinp, Vinn, Vref;

  adc_lp dut (.*);

  int checks = 0, failures = 0;
  int n_conv = 0, n_pos = 0, n_neg = 0, n_top = 0, n_bot = 0;
  int n_spi = 0, n_pause = 0, n_reset = 0, n_ramp = 0;

  initial SPI_sck = 1'b0;
  always #(TCLK_NS / 2) SPI_sck = ~SPI_sck;

  function automatic int ideal_code(real vd);
    real x;
    int  c;
    x = (vd + VDD) / LSB;
    c = int'($ceil(x)) - 1;
    if (c < 0)    c = 0;
    if (c > 1023) c = 1023;
    return c;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- SPI word and ready-spacing monitor -------------------------------
  // cyc counts rising edges since the edge that raised SAR_ready; during
  // cycles 2..11 after it, SPI_SDO carries bits 9..0 of that result.
  logic [9:0] last_word;
  bit         word_valid = 0;
  int         cyc = 0, last_ready_edge = -1, edge_no = 0;
  logic       ready_d = 0;

  always @(posedge SPI_sck) begin
    edge_no++;
    cyc++;
  end

  always @(negedge SPI_sck) begin
    if (SAR_ready && !ready_d) begin
      if (last_ready_edge >= 0 && word_valid)
        check(edge_no - last_ready_edge == PERIOD,
              $sformatf("ready spacing %0d at %0t", edge_no - last_ready_edge, $time));
      last_ready_edge = word_valid ? edge_no : -1;
      last_word       = SAR_data_out;
      cyc             = 0;
    end
    ready_d = SAR_ready;
    if (word_valid && SPI_cs && cyc >= 2 && cyc <= 11) begin
      check(SPI_SDO == last_word[11 - cyc], $sformatf("SPI bit %0d", 11 - cyc));
      if (cyc == 11) n_spi++;
    end
    if (!SPI_cs) check(SPI_SDO == 1'b0, "SDO idle while cs low");
  end

  // ---- one conversion ----------------------------------------------------
  // Called at a falling edge inside a ready cycle: applies the inputs, waits
  // for the next ready cycle and checks the result.
  task automatic convert(real vp, real vn, int expect_code, string tag);
    Vinp = vp;
    Vinn = vn;
    do @(negedge SPI_sck); while (!SAR_ready);
    n_conv++;
    check(SAR_data_out == 10'(expect_code),
          $sformatf("%s Vinp=%f Vinn=%f got %0d exp %0d", tag, vp, vn,
                    SAR_data_out, expect_code));
    if (SAR_data_out[9]) n_pos++; else n_neg++;
    if (SAR_data_out == 10'h3FF) n_top++;
    if (SAR_data_out == 10'h000) n_bot++;
  endtask

  task automatic wait_ready();
    do @(negedge SPI_sck); while (!SAR_ready);
  endtask

  // Reference table: Vinp, Vinn, listed code.
  real tab_p [15] = '{0.9, 0.6, 1.2, 0.6, 1.8, 0.9, 1.4, 0.4, 1.5, 0.3, 1.7,
                      0.2, 1.8, 0.0, 1.0};
  real tab_n [15] = '{0.6, 0.9, 0.6, 1.2, 0.9, 1.8, 0.4, 1.4, 0.3, 1.5, 0.2,
                      1.7, 0.0, 1.8, 1.0};
  int  tab_c [15] = '{10'b1001010101, 10'b0110101010, 10'b1010101010,
                      10'b0101010101, 10'b1011111111, 10'b0011111111,
                      10'b1100011100, 10'b0011100011, 10'b1101010100,
                      10'b0010101010, 10'b1110101010, 10'b0001010101,
                      10'b1111111111, 10'b0000000000, 10'b0111111111};

  initial begin
    real vd, vn;
    int  c;
    reset  = 1'b0;
    SPI_cs = 1'b1;
    Vinp   = 0.9;
    Vinn   = 0.9;
    Vref   = 0.9;                     // bandgap output, VCM
    repeat (3) @(negedge SPI_sck);
    reset = 1'b1;
    wait_ready();                     // first conversion after reset
    @(posedge SPI_sck) word_valid = 1;

    // 1. reference table
    // Listed codes must be met within one code (the table's own acceptance
    // rule); where the input is not exactly on a threshold the result must
    // also equal the ideal code. On a threshold the real-valued model may
    // resolve either way by rounding.
    for (int i = 0; i < 15; i++) begin
      real x;
      Vinp = tab_p[i];
      Vinn = tab_n[i];
      wait_ready();
      n_conv++;
      if (SAR_data_out[9]) n_pos++; else n_neg++;
      if (SAR_data_out == 10'h3FF) n_top++;
      if (SAR_data_out == 10'h000) n_bot++;
      $display("table Vinp=%.2f Vinn=%.2f code=%b listed=%b", tab_p[i], tab_n[i],
               SAR_data_out, 10'(tab_c[i]));
      check(int'(SAR_data_out) - tab_c[i] <= 1 && tab_c[i] - int'(SAR_data_out) <= 1,
            $sformatf("table %0d got %0d listed %0d", i, SAR_data_out, tab_c[i]));
      x = (tab_p[i] - tab_n[i] + VDD) / LSB;
      if (x - $floor(x + 0.5) > 1e-6 || $floor(x + 0.5) - x > 1e-6)
        check(SAR_data_out == 10'(ideal_code(tab_p[i] - tab_n[i])),
              $sformatf("table %0d ideal", i));
    end

    // 2. random mid-code inputs
    for (int i = 0; i < 200; i++) begin
      c  = int'($urandom_range(1023));
      vd = (real'(c) - 512.0 + 0.5) * LSB;
      vn = (vd > 0.0) ? (VDD - vd) * real'($urandom_range(1000)) / 1000.0
                      : -vd + (VDD + vd) * real'($urandom_range(1000)) / 1000.0;
      convert(vn + vd, vn, c, "random");
    end

    // 3. ramp, positive then negative input
    for (int i = 0; i < 512; i++) begin
      convert((real'(i) + 0.5) * LSB, 0.0, 512 + i, "ramp+");
      n_ramp++;
    end
    for (int i = 0; i < 512; i++) begin
      convert(0.0, (real'(i) + 0.5) * LSB, 511 - i, "ramp-");
      n_ramp++;
    end

    // 4a. enable pause in the middle of a conversion
    Vinp = 1.2; Vinn = 0.3;
    repeat (5) @(negedge SPI_sck);
    SPI_cs = 1'b0;
    word_valid = 0;
    repeat (7) @(negedge SPI_sck);
    check(dut.SAR_data_out == 10'd0, "result cleared while disabled");
    SPI_cs = 1'b1;
    n_pause++;
    wait_ready();
    check(SAR_data_out == 10'(ideal_code(0.9 + 0.5 * LSB - 0.5 * LSB)),
          "conversion after pause");
    Vinp = 1.2 + 0.5 * LSB; Vinn = 0.3;
    wait_ready();
    check(SAR_data_out == 10'(ideal_code(0.9 + 0.5 * LSB)), "second after pause");
    @(posedge SPI_sck) word_valid = 1;   // monitors restart from the next word

    // 4b. reset in the middle of a conversion
    Vinp = 0.3; Vinn = 1.0 + 0.5 * LSB;
    repeat (6) @(negedge SPI_sck);
    reset = 1'b0;
    word_valid = 0;
    @(negedge SPI_sck);
    check(SAR_data_out == 10'd0, "result cleared by reset");
    reset = 1'b1;
    n_reset++;
    wait_ready();
    check(SAR_data_out == 10'(ideal_code(0.3 - 1.0 - 0.5 * LSB)),
          "conversion after reset");
    @(posedge SPI_sck) word_valid = 1;
    convert(0.5, 0.5 + 100.5 * LSB, 411, "final");
    convert(0.9, 0.9, 511, "final-spi");   // lets the monitor read the last word

    check(n_conv > 0,  "conversions happened");
    check(n_pos > 0,   "positive results");
    check(n_neg > 0,   "negative results");
    check(n_top > 0,   "positive full-scale clamp");
    check(n_bot > 0,   "negative full-scale clamp");
    check(n_spi > 0,   "SPI words read");
    check(n_pause > 0, "enable pause");
    check(n_reset > 0, "reset mid-conversion");
    check(n_ramp == 1024, "ramp steps");
    $display("conversions=%0d pos=%0d neg=%0d clamp_top=%0d clamp_bot=%0d spi_words=%0d pause=%0d reset=%0d",
             n_conv, n_pos, n_neg, n_top, n_bot, n_spi, n_pause, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge SPI_sck);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
