// tb_pico4_support: the whole PICO4 module with the ADC model. Checks the ID
// register, that nothing is streamed while RST is 0, the 4x32-bit stream
// after RST=1 (values of consecutive conversions, sample numbers), a TMEM
// pattern replacing channel 1 under PATTERN_MASK, and the two clock monitor
// registers (gate shortened to 1000 xuser cycles: expect 1000 and 600).
`include "tb_check.svh"
`timescale 1ns/1ps
module tb_pico4_support;
  `TB_COUNTERS
  logic clk = 0, spi_clk = 0, rst = 1;
  always #4 clk = ~clk;
  always #6.667 spi_clk = ~spi_clk;
  logic [7:0] tcsr_addr = 0; logic tcsr_wr = 0, tcsr_rd = 0; logic [31:0] tcsr_wdata = 0, tcsr_rdata;
  logic [7:0] tmem_addr = 0; logic tmem_wr = 0, tmem_rd = 0; logic [31:0] tmem_wdata = 0, tmem_rdata;
  logic adc_cnv, adc_sck; logic [3:0] adc_sdo;
  logic [127:0] axis_tdata; logic axis_tvalid, axis_tready = 1, p_o_clk_adc;
  pico4_support #(.REF_FREQ(1000), .TMEM_DEPTH(64)) dut (.*);
  adc_model adc (.cnv(adc_cnv), .sck(adc_sck), .sdo(adc_sdo));

  task automatic write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); tcsr_addr = a; tcsr_wdata = d; tcsr_wr = 1; @(negedge clk); tcsr_wr = 0;
  endtask
  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); tcsr_addr = a; tcsr_rd = 1; @(negedge clk); tcsr_rd = 0; d = tcsr_rdata;
  endtask

  int got = 0;
  logic [127:0] words [$];
  always @(posedge clk) if (!rst && axis_tvalid && axis_tready) begin words.push_back(axis_tdata); got++; end

  initial begin
    logic [31:0] d;
    repeat (5) @(posedge clk); rst = 0;
    read(8'h80, d); `CHECK(d == 32'hDEADBEE2, "ID")
    repeat (500) @(posedge clk);
    `CHECK(got == 0, "no data while RST = 0")
    // pattern for channel 1: word i = 0xABC00 + i
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); tmem_addr = 8'(64 + i); tmem_wdata = 32'hABC00 + 32'(i); tmem_wr = 1;
    end
    @(negedge clk); tmem_wr = 0;
    write(8'h81, 1);
    wait (got == 10);
    for (int k = 0; k < 10; k++)
      for (int c = 0; c < 4; c++)
        `CHECK(words[k][32*c +: 32] == {12'(k), adc.value(c, k)}, "ADC data on the stream")
    write(8'h85, 32'h2);
    wait (got == 14);
    begin
      int k;
      k = 13;
      `CHECK(words[k][63:32] == {12'(k), 20'hABC00 + 20'(k)}, "pattern on channel 1")
      `CHECK(words[k][31:0] == {12'(k), adc.value(0, k)}, "channel 0 still ADC")
    end
    // back-pressure: the word is held until taken
    axis_tready = 0; repeat (300) @(posedge clk);
    `CHECK(axis_tvalid, "tvalid held")
    axis_tready = 1;
    repeat (1500) @(posedge clk);
    read(8'h86, d); `CHECK(d >= 998 && d <= 1002, $sformatf("CLK_MON0 %0d", d))
    read(8'h87, d); `CHECK(d >= 598 && d <= 602, $sformatf("CLK_MON1 %0d", d))
    `TB_FINISH
  end
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
endmodule
