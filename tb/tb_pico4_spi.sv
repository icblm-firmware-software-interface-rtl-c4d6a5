// tb_pico4_spi: the SPI readout against a model of the four ADCs at 75 MHz
// SPI clock and 125 MHz xuser clock. Checks that each sample set carries the
// values of consecutive conversions on all four channels, the 12-bit sample
// number counting from 0, and the published rate of one set per microsecond.
`include "tb_check.svh"
`timescale 1ns/1ps
module tb_pico4_spi;
  `TB_COUNTERS
  logic spi_clk = 0, clk = 0, spi_rst = 1, rst = 1;
  always #6.667 spi_clk = ~spi_clk;
  always #4 clk = ~clk;
  logic adc_cnv, adc_sck; logic [3:0] adc_sdo;
  logic [31:0] sample [4]; logic [11:0] sample_num; logic valid;
  pico4_spi dut (.*);
  adc_model adc (.cnv(adc_cnv), .sck(adc_sck), .sdo(adc_sdo));
  int k = 0;
  realtime last = 0;
  initial begin
    repeat (4) @(posedge spi_clk); spi_rst = 0; rst = 0;
  end
  always @(posedge clk) if (valid && !rst) begin
    for (int c = 0; c < 4; c++)
      `CHECK(sample[c] == {12'(k), adc.value(c, k)}, $sformatf("set %0d channel %0d: %h", k, c, sample[c]))
    `CHECK(sample_num == 12'(k), "sample number")
    if (k > 0) `CHECK($realtime - last > 990 && $realtime - last < 1010, "1 MSPS")
    last = $realtime;
    k++;
    if (k == 40) `TB_FINISH
  end
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
endmodule
