// tb_raw_decimator: with a microsecond tick every 4 cycles, checks that the
// gate is open for DUTY of every PERIOD microseconds, and always open when
// PERIOD is 0. Every complete open and closed stretch inside the measured
// window must last exactly DUTY and PERIOD-DUTY microseconds (4 cycles each).
`include "tb_check.svh"
module tb_raw_decimator;
  `TB_COUNTERS
  logic clk = 0, rst = 1, us_tick = 0, gate;
  always #4 clk = ~clk;
  logic [15:0] period = 0, duty = 0;
  raw_decimator dut (.*);
  int t = 0;
  always @(posedge clk) begin t++; us_tick <= (t % 4 == 0); end

  task automatic measure(input int p, input int d, input int us, input int exp_open);
    int open = 0, run = 0, runs = 0;
    logic g_prev;
    period = 16'(p); duty = 16'(d);
    repeat (4 * 20) @(posedge clk);       // settle
    g_prev = gate;
    repeat (4 * us) begin
      @(posedge clk);
      if (gate) open++;
      if (gate != g_prev) begin
        // a stretch ended; the first one may have started before the window
        if (runs > 0) `CHECK(run == 4 * (g_prev ? d : p - d), $sformatf("stretch of %0d cycles (open=%b)", run, g_prev))
        runs++; run = 1; g_prev = gate;
      end else run++;
    end
    if (d > 0 && d < p) `CHECK(runs >= 2, "gate toggles")
    $display("P=%0d D=%0d open=%0d of %0d", p, d, open, 4 * us);
    `CHECK(open >= 4 * exp_open - 4 && open <= 4 * exp_open + 4, "duty")
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    measure(0, 0, 100, 100);
    measure(10, 3, 100, 30);
    measure(20, 15, 200, 150);
    measure(5, 9, 50, 50);
    measure(8, 0, 80, 0);
    `TB_FINISH
  end
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
endmodule
