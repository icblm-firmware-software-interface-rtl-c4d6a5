// tb_irq_generator: drives enable masks and DATA_COLLECTED flags and checks
// the registered interrupt level and the rising-edge pulse.
`include "tb_check.svh"
module tb_irq_generator;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [3:0] irq_enable = 0, data_collected = 0;
  logic irq, irq_pulse;
  irq_generator #(.NCH(4)) dut (.*);
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [3:0] e, d, dprev;
      dprev = data_collected & irq_enable;
      e = 4'($urandom); d = 4'($urandom);
      irq_enable <= e; data_collected <= d;
      @(posedge clk); #1;
      @(posedge clk); #1;
      `CHECK(irq == |(e & d), "irq level")
      `CHECK(irq_pulse == 1'b0, "pulse lasts one cycle")
    end
    // a rising enabled flag gives exactly one pulse
    irq_enable <= 4'b0100; data_collected <= 0; repeat (3) @(posedge clk);
    data_collected <= 4'b0100; @(posedge clk); #1;
    `CHECK(irq_pulse && irq, "pulse on rise")
    @(posedge clk); #1;
    `CHECK(!irq_pulse && irq, "single pulse")
    data_collected <= 4'b1011; repeat (3) @(posedge clk); #1;
    `CHECK(!irq, "masked channels give no interrupt")
    `TB_FINISH
  end
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
endmodule
