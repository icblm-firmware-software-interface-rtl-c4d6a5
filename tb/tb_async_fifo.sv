// tb_async_fifo: random writes at 125 MHz and random reads at 250 MHz through
// async_fifo (39 bits, 16 deep); every word read must equal the oldest word
// written and not yet read, full must stop writes and empty must stop reads.
`include "tb_check.svh"
module tb_async_fifo;
  `TB_COUNTERS
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4 wclk = ~wclk;
  always #2 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [38:0] wdata = '0, rdata;
  logic [38:0] q [$];
  int nw = 0, nr = 0, saw_full = 0;

  async_fifo #(.WIDTH(39), .DEPTH(16)) dut (.*);

  initial begin
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    `CHECK(empty && !full, "empty after reset")
  end
  // writer: bursty, so the FIFO fills up
  always @(posedge wclk) if (!wrst) begin
    if (wr_en && !full) begin q.push_back(wdata); nw++; end
    if (full) saw_full++;
    wr_en <= (nw < 400) && ($urandom_range(0, 99) < ((nw / 50) % 2 ? 90 : 30));
    wdata <= {$urandom, 7'($urandom)};
  end
  always @(posedge rclk) if (!rrst) begin
    if (rd_en && !empty) begin
      if (q.size() == 0) `CHECK(0, "read with nothing written")
      else `CHECK(rdata == q.pop_front(), "data order")
      nr++;
    end
    rd_en <= ($urandom_range(0, 99) < ((nr / 60) % 2 ? 10 : 60));
  end
  initial begin
    wait (nr == 400);
    repeat (10) @(posedge rclk);
    `CHECK(empty, "empty at end")
    `CHECK(saw_full > 0, "full was reached")
    `CHECK(q.size() == 0, "all words read")
    `TB_FINISH
  end
  initial begin
    repeat (200000) @(posedge wclk);
    failures++; $display("watchdog"); `TB_FINISH
  end
endmodule
