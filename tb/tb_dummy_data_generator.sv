// tb_dummy_data_generator: counts words over fixed windows for several
// multiplier/divider pairs (M per D cycles, one per cycle when M >= D, none
// when either is 0) and checks that the words count up from 0.
`include "tb_check.svh"
module tb_dummy_data_generator;
  `TB_COUNTERS
  logic clk = 0, rst = 1, enable = 0;
  always #4 clk = ~clk;
  logic [7:0] mult = 0; logic [23:0] div = 0;
  logic [127:0] wdat; logic valid;
  dummy_data_generator dut (.*);
  logic [127:0] expect_w;

  task automatic run(input int m, input int d, input int cycles, input int expected);
    int n = 0;
    mult = 8'(m); div = 24'(d); enable = 0;
    @(posedge clk); enable = 1;
    expect_w = 0;
    repeat (cycles) begin
      @(posedge clk);
      if (valid) begin
        `CHECK(wdat == expect_w, "word count sequence")
        expect_w++;
        n++;
      end
    end
    enable = 0;
    $display("M=%0d D=%0d cycles=%0d words=%0d", m, d, cycles, n);
    `CHECK(n >= expected - 1 && n <= expected + 1, "rate")
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    run(1, 3, 300, 100);
    run(2, 7, 700, 200);
    run(5, 3, 200, 199);
    run(3, 4, 400, 300);
    run(0, 4, 100, 0);
    run(4, 0, 100, 0);
    `TB_FINISH
  end
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
endmodule
