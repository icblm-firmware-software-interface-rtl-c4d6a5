// tb_clock_monitor: reference clock 100 MHz with a 1000-cycle gate (10 us);
// channel 0 is the reference itself, channel 1 a 75 MHz clock. Expected
// counts per gate are 1000 and 750 (+-2 for synchronisation).
`include "tb_check.svh"
`timescale 1ns/1ps
module tb_clock_monitor;
  `TB_COUNTERS
  logic ref_clk = 0, c75 = 0, rst = 1;
  always #5 ref_clk = ~ref_clk;
  always #6.667 c75 = ~c75;
  logic [31:0] freq [2];
  clock_monitor #(.NCLK(2), .REF_FREQ(1000)) dut (.ref_clk(ref_clk), .rst(rst), .mclk({c75, ref_clk}), .freq(freq));
  initial begin
    repeat (5) @(posedge ref_clk); rst = 0;
    repeat (2500) @(posedge ref_clk);
    for (int g = 0; g < 3; g++) begin
      $display("freq0=%0d freq1=%0d", freq[0], freq[1]);
      `CHECK(freq[0] >= 998 && freq[0] <= 1002, "reference channel")
      `CHECK(freq[1] >= 748 && freq[1] <= 752, "75 MHz channel")
      repeat (1000) @(posedge ref_clk);
    end
    `TB_FINISH
  end
  initial begin repeat (20000) @(posedge ref_clk); failures++; `TB_FINISH end
endmodule
