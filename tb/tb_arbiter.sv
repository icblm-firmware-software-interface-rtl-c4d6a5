// tb_arbiter: three controllers with pending bursts; a writer model raises
// in_progress, reads a few words and pulses transfer_done. Checks the
// round-robin order (0,1,2,0,... with all ready, skipping idle channels),
// that data and strobes are routed to the granted channel only.
`include "tb_check.svh"
module tb_arbiter;
  `TB_COUNTERS
  localparam int N = 3;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic [N-1:0] ch_ready, ch_dat_empty, ch_dat_rd, ch_transfer_done;
  logic [28:0] ch_wadd [N]; logic [9:0] ch_wsiz [N]; logic [63:0] ch_wdat [N];
  logic channel_ready, in_progress = 0, dat_empty, dat_rd = 0, transfer_done = 0;
  logic [28:0] wadd; logic [9:0] wsiz; logic [63:0] wdat; logic [1:0] sel;
  int pending [N];
  int served [$];

  arbiter #(.N(N)) dut (.*);

  for (genvar c = 0; c < N; c++) begin : g_src
    assign ch_ready[c] = pending[c] > 0;
    assign ch_wadd[c] = 29'(c * 4096 + pending[c]);
    assign ch_wsiz[c] = 10'(c + 1);
    assign ch_wdat[c] = 64'(100 * c);
    assign ch_dat_empty[c] = 1'b0;
    logic my_turn;
    assign my_turn = (sel == 2'(c));
    always @(posedge clk) begin
      if (ch_transfer_done[c]) pending[c] <= pending[c] - 1;
      if ((ch_dat_rd[c] || ch_transfer_done[c]) && !my_turn) begin failures++; $display("FAIL strobe to channel %0d", c); end
    end
  end

  // writer model
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    forever begin
      @(posedge clk); #1;
      if (channel_ready) begin
        int c, n;
        c = int'(sel);
        `CHECK(wadd == 29'(c * 4096 + pending[c]) && wsiz == 10'(c + 1), "burst routed")
        in_progress = 1; n = int'(wsiz);
        served.push_back(c);
        repeat (n) begin
          dat_rd = 1; @(posedge clk); #1;
          `CHECK(wdat == 64'(100 * c), "data routed")
        end
        dat_rd = 0; transfer_done = 1; @(posedge clk); #1;
        transfer_done = 0; in_progress = 0;
      end
    end
  end

  initial begin
    pending[0] = 4; pending[1] = 4; pending[2] = 4;
    wait (served.size() == 12);
    wait (pending[0] == 0 && pending[1] == 0 && pending[2] == 0);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 12; i++) `CHECK(served[i] == i % 3, "round robin with all ready")
    // only channels 0 and 2
    pending[0] = 3; pending[2] = 3;
    wait (served.size() == 18);
    for (int i = 12; i < 18; i++) `CHECK(served[i] == ((i % 2) ? 2 : 0) || served[i] == ((i % 2) ? 0 : 2), "skip idle channel")
    for (int i = 13; i < 18; i++) `CHECK(served[i] != served[i-1], "alternation")
    `TB_FINISH
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog served=%0d", served.size()); `TB_FINISH end
endmodule
