// tb_sar_lp: self-checking test of the successive approximation register.
//
// A cycle model kept here predicts, for each of the 12 cycles of a
// conversion, SAR_sampling, SAR_ready, SAR_data_out and the twenty switch
// controls from the SAR_in values the test drives. The SAR_in sequences
// include the three classic cases (1 for the first half of the conversion
// then 0; toggling every cycle; toggling every two cycles over two
// back-to-back conversions), whose expected results 1111100000, 0101010101
// and 1001100110 are also checked literally, then random sequences, an
// enable pause in mid-conversion and a reset in mid-conversion. SAR_in is
// changed at falling edges; outputs are checked at falling edges.
module tb_sar_lp;
  import sar_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic                SAR_clk = 0, SAR_nrst, SAR_en, SAR_in;
  logic                SAR_ready, SAR_sampling;
  logic [9:0]          SAR_data_out;
  sw_ctrl_e [9:0]      SAR_DAC_pos_out, SAR_DAC_neg_out;

  sar_lp dut (.*);

  always #10 SAR_clk = ~SAR_clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Model: phase 0 = sampling, 1..10 = bit 9..0 decided at the end of the
  // cycle, 11 = ready.
  int         phase;
  logic [9:0] m_data;
  logic [1:0] m_pos [10];
  logic [1:0] m_neg [10];

  task automatic model_clear();
    m_data = '0;
    for (int k = 0; k < 10; k++) begin
      m_pos[k] = 2'b01;
      m_neg[k] = 2'b01;
    end
  endtask

  task automatic compare(string tag);
    check(SAR_sampling == (phase == 0), {tag, " sampling"});
    check(SAR_ready == (phase == 11), {tag, " ready"});
    check(SAR_data_out == m_data,
          $sformatf("%s data %b exp %b", tag, SAR_data_out, m_data));
    for (int k = 0; k < 10; k++) begin
      check(SAR_DAC_pos_out[k] == m_pos[k], $sformatf("%s pos %0d", tag, k));
      check(SAR_DAC_neg_out[k] == m_neg[k], $sformatf("%s neg %0d", tag, k));
    end
  endtask

  // One clock cycle: check, drive SAR_in for this cycle, advance the model.
  task automatic cycle(bit in, string tag);
    compare(tag);
    SAR_in = in;
    @(posedge SAR_clk);
    if (phase >= 1 && phase <= 10) begin
      m_data[10 - phase] = in;
      m_pos[10 - phase]  = in ? 2'b10 : 2'b00;
      m_neg[10 - phase]  = in ? 2'b00 : 2'b10;
    end
    if (phase == 11) model_clear();
    phase = (phase + 1) % 12;
    @(negedge SAR_clk);
  endtask

  logic [9:0] result;
  task automatic conversion(bit seq [12], string tag);
    for (int c = 0; c < 12; c++) begin
      if (c == 11) result = SAR_data_out;
      cycle(seq[c], tag);
    end
  endtask

  bit seq [12];
  int n_ready = 0;

  initial begin
    SAR_nrst = 0; SAR_en = 1; SAR_in = 0;
    model_clear();
    phase = 0;
    @(negedge SAR_clk);
    compare("in reset");
    @(negedge SAR_clk);
    SAR_nrst = 1;

    // Test 1: 1 for the first half, then 0.
    foreach (seq[c]) seq[c] = (c < 6);
    conversion(seq, "test1");
    check(result == 10'b1111100000, "test1 literal");

    // Test 2: toggling every cycle, starting with 1 in the sampling cycle.
    foreach (seq[c]) seq[c] = (c % 2 == 0);
    conversion(seq, "test2");
    check(result == 10'b0101010101, "test2 literal");

    // Test 3: toggling every two cycles, two conversions back to back.
    for (int n = 0; n < 2; n++) begin
      foreach (seq[c]) seq[c] = ((12 * n + c) / 2) % 2 == 0;
      conversion(seq, "test3");
      check(result == 10'b1001100110, "test3 literal");
    end

    // Random sequences.
    for (int n = 0; n < 50; n++) begin
      foreach (seq[c]) seq[c] = 1'($urandom);
      conversion(seq, "random");
    end

    // Enable low in mid-conversion: back to sampling, result cleared.
    for (int c = 0; c < 6; c++) cycle(1'($urandom), "pre-pause");
    SAR_en = 0;
    @(posedge SAR_clk);
    phase = 0;
    model_clear();
    @(negedge SAR_clk);
    repeat (3) begin
      compare("paused");
      @(negedge SAR_clk);
    end
    SAR_en = 1;
    for (int n = 0; n < 3; n++) begin
      foreach (seq[c]) seq[c] = 1'($urandom);
      conversion(seq, "after pause");
    end

    // Reset in mid-conversion.
    for (int c = 0; c < 7; c++) cycle(1'($urandom), "pre-reset");
    SAR_nrst = 0;
    #1;
    phase = 0;
    model_clear();
    compare("async reset");
    @(negedge SAR_clk);
    SAR_nrst = 1;
    for (int n = 0; n < 3; n++) begin
      foreach (seq[c]) seq[c] = 1'($urandom);
      conversion(seq, "after reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge SAR_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
