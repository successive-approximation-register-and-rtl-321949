// tb_spi_tx: self-checking test of the serial result output.
//
// Plays the SAR's side of the interface: a 12-cycle frame with SAR_Samp
// high in cycle 0, SAR_data_out cleared on the edge that starts the frame
// and filled with a random word bit by bit during the frame. It then checks
// that during the next frame SPI_SDO carries the previous word MSB first,
// one bit per clock in cycles 2..11 counted from the load edge, that it is
// 0 after the last bit, that it is held at 0 while SPI_cs is low, and that
// reset clears it.
module tb_spi_tx;
  timeunit 1ns; timeprecision 1ns;

  logic       reset, SPI_sck = 0, SPI_cs, SAR_Samp, SPI_SDO;
  logic [9:0] SAR_data_out;

  spi_tx dut (.*);

  always #10 SPI_sck = ~SPI_sck;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [9:0] word, prev;
  bit         have_prev = 0;

  // One SAR-like frame of 12 cycles. Values change 1 ns after rising
  // edges; SPI_SDO is checked at falling edges.
  task automatic frame();
    word = 10'($urandom);
    for (int c = 0; c < 12; c++) begin
      // state for cycle c
      SAR_Samp = (c == 0);
      if (c == 0) SAR_data_out = '0;
      else if (c >= 2) SAR_data_out[11 - c] = word[11 - c];
      if (c == 11) SAR_data_out = word;
      @(negedge SPI_sck);
      if (have_prev && SPI_cs) begin
        if (c >= 1 && c <= 10)
          check(SPI_SDO == prev[10 - c], $sformatf("bit %0d of %b", 10 - c, prev));
        if (c == 11)
          check(SPI_SDO == 1'b0, "zero after last bit");
      end
      if (!SPI_cs) check(SPI_SDO == 1'b0, "idle while cs low");
      @(posedge SPI_sck) #1;
    end
    prev      = word;
    have_prev = 1;
  endtask

  initial begin
    reset = 0; SPI_cs = 1; SAR_Samp = 1; SAR_data_out = '0;
    repeat (2) @(posedge SPI_sck);
    #1;
    check(SPI_SDO == 1'b0, "reset");
    reset = 1;
    for (int n = 0; n < 40; n++) frame();
    SPI_cs = 0;
    frame();
    SPI_cs = 1;
    have_prev = 0;
    for (int n = 0; n < 10; n++) frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge SPI_sck);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
