// tb_pico4_regs: reset values and read/write of the PICO4 registers
// (ID 0xDEADBEE2, RST, PATTERN_MASK) and read-back of the clock monitor.
`include "tb_check.svh"
module tb_pico4_regs;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0] addr = 0; logic wr = 0, rd = 0; logic [31:0] wdata = 0, rdata;
  logic run; logic [3:0] pattern_mask; logic [31:0] clk_mon [2];
  pico4_regs dut (.*);
  task automatic write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1; @(negedge clk); rd = 0; d = rdata;
  endtask
  initial begin
    logic [31:0] d;
    clk_mon[0] = 32'd122000000; clk_mon[1] = 32'd75000000;
    repeat (3) @(posedge clk); rst = 0;
    read(8'h80, d); `CHECK(d == 32'hDEADBEE2, "ID default")
    read(8'h81, d); `CHECK(d == 0 && !run, "RST default 0")
    write(8'h81, 32'hFFFF_FFFF); read(8'h81, d); `CHECK(d == 1 && run, "RST bit 0")
    write(8'h85, 32'h0000_00FA); read(8'h85, d); `CHECK(d == 32'hA && pattern_mask == 4'hA, "PATTERN_MASK")
    read(8'h86, d); `CHECK(d == 32'd122000000, "CLK_MON0")
    read(8'h87, d); `CHECK(d == 32'd75000000, "CLK_MON1")
    read(8'h82, d); `CHECK(d == 0, "reserved reads 0")
    write(8'h80, 32'h1234_5678); read(8'h80, d); `CHECK(d == 32'h1234_5678, "ID writable")
    `TB_FINISH
  end
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
endmodule
