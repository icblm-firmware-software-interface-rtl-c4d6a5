// tb_smem_writer: offers bursts of random address and size to the writer,
// feeds it from a model Data FIFO that is empty at random, and lets the SMEM
// model stall at random. Checks that each burst arrives in memory at its
// address with its words in order, that WADD/WSIZ are passed on, that
// transfer_done comes once per burst and that in_progress covers the burst.
// Also checks that a stall-free burst of N words takes N + a few cycles.
`include "tb_check.svh"
module tb_smem_writer;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic channel_ready = 0, in_progress, dat_empty, dat_rd, transfer_done;
  logic [28:0] wadd_i = 0; logic [9:0] wsiz_i = 0;
  logic [63:0] wdat_i;
  logic [63:0] WDAT; logic [28:0] WADD; logic [9:0] WSIZ; logic [1:0] WREQ, WACK;
  logic hold = 0;
  int stall_pct = 30;

  smem_writer dut (.*);
  smem_model #(.STALL_PCT(25)) mem (.clk(clk), .WDAT(WDAT), .WADD(WADD), .WSIZ(WSIZ), .WREQ(WREQ), .WACK(WACK), .hold(hold));

  // model Data FIFO: word k of the current burst is {addr, k}
  int k = 0;
  logic src_empty = 0;
  assign dat_empty = src_empty;
  assign wdat_i = {35'(wadd_i), 29'(k)};
  always @(posedge clk) begin
    if (dat_rd) k <= k + 1;
    src_empty <= ($urandom_range(0, 99) < stall_pct);
  end

  int dones = 0;
  always @(posedge clk) if (!rst && transfer_done) dones++;

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int b = 0; b < 30; b++) begin
      int unsigned a, n, t0;
      a = 29'($urandom_range(0, 1000)) * 4096 + 29'($urandom_range(0, 255)) * 16;
      n = (b == 0) ? 1 : $urandom_range(1, 512);
      if (b == 29) begin stall_pct = 0; n = 64; end
      @(negedge clk);
      wadd_i = 29'(a); wsiz_i = 10'(n); k = 0; channel_ready = 1;
      @(posedge clk); #1;
      `CHECK(in_progress, "in_progress after channel_ready")
      channel_ready = 0;
      t0 = $time;
      while (!transfer_done) begin @(posedge clk); #1; end
      `CHECK(WADD == 29'(a) && WSIZ == 10'(n), "command passed on")
      if (b == 29) begin
        $display("64-word burst took %0d cycles", ($time - t0) / 4);
        `CHECK(($time - t0) / 4 <= 64 * 100 / 75 + 12, "burst time")
      end
      @(posedge clk); #1;
      `CHECK(!in_progress, "in_progress drops after the burst")
      `CHECK(mem.burst_addr[b] == a && mem.burst_size[b] == n, "burst logged by memory")
      for (int i = 0; i < n; i++)
        `CHECK(mem.mem.exists(a / 8 + i) && mem.mem[a / 8 + i] == {35'(a), 29'(i)}, "word in memory")
    end
    `CHECK(dones == 30, $sformatf("one transfer_done per burst (%0d)", dones))
    `TB_FINISH
  end
  initial begin repeat (200000) @(posedge clk); failures++; `TB_FINISH end
endmodule
