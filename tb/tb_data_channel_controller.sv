// tb_data_channel_controller: one controller between a 125 MHz source and a
// 250 MHz writer model that serves every burst with random stalls.
// Ring 0x1000..0x3000 (8 kB), BURST_SIZE 64 B, DATA_THRESHOLD 256 B,
// LATENCY_THRESHOLD 3 ms (a "ms" tick every 40 cycles here).
// Checks, against a model of the ring: the FSM steps through reset, enable
// and disable; bursts are contiguous, wrap at END_ADDR, never cross a 4 kB
// page and have the nominal size; QWs leave in order (low half first);
// W_POINTER, DATA_COLLECTED by amount and by latency and its clearing by an
// R_POINTER write; a latency-driven short burst; DATA_OVERFLOW when the
// source writes into a full FIFO and its clearing; DATA_OVERWRITTEN and
// R_POINTER_OVERWRITTEN when the ring is overrun; reset ignored while enabled.
`include "tb_check.svh"
module tb_data_channel_controller;
  import icblm_pkg::*;
  `TB_COUNTERS
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4 wclk = ~wclk;
  always #2 rclk = ~rclk;

  logic [127:0] wdat = '0; logic wr_en = 0, wfull;
  dch_cfg_t cfg;
  logic en_req = 0, rst_req = 0, rptr_wr = 0, ovw_clr = 0, ovf_clr = 0, ms_tick = 0;
  logic [28:0] rptr_val = '0;
  dch_state_e state;
  logic enabled, data_collected, fifo_empty, data_overwritten, data_overflow;
  logic [28:0] w_pointer, r_pointer, r_pointer_ovw;
  logic channel_ready, dat_empty, dat_rd = 0, transfer_done = 0;
  logic [28:0] wadd; logic [9:0] wsiz; logic [63:0] dat_q;

  data_channel_controller #(.DATA_FIFO_DEPTH(64), .AS_FIFO_DEPTH(16)) dut (.*);

  int tcount = 0;
  always @(posedge wclk) begin tcount++; ms_tick <= (tcount % 40 == 0); end

  // writer model (250 MHz)
  logic serve = 1;
  logic [63:0] got [$];
  int unsigned b_addr [$];
  int unsigned b_size [$];
  initial begin
    forever begin
      @(posedge rclk); #0.5;
      if (channel_ready && serve) begin
        int n;
        n = int'(wsiz);
        b_addr.push_back(wadd); b_size.push_back(n);
        while (n > 0) begin
          dat_rd = !dat_empty && ($urandom_range(0, 3) != 0);
          @(posedge rclk);
          if (dat_rd) begin got.push_back(dat_q); n--; end
          #0.5; dat_rd = 0;
        end
        transfer_done = 1; @(posedge rclk); #0.5; transfer_done = 0;
        @(posedge rclk); #0.5;
      end
    end
  end

  int sent = 0;   // DQWs written so far
  task automatic put(input int n);
    repeat (n) begin
      @(negedge wclk);
      wdat = {32'hA5A5_0000 + 32'(sent), 32'h1111_0000 + 32'(sent), 32'h5A5A_0000 + 32'(sent), 32'h2222_0000 + 32'(sent)};
      wr_en = 1;
      @(negedge wclk);
      wr_en = 0;
      if (!wfull) sent++;
    end
  endtask

  task automatic waitw(input int n); repeat (n) @(posedge wclk); endtask

  int unsigned exp_addr;
  int bursts_checked = 0;
  task automatic check_bursts();
    while (bursts_checked < b_addr.size()) begin
      int unsigned a, s;
      a = b_addr[bursts_checked]; s = b_size[bursts_checked] * 8;
      `CHECK(a == exp_addr, $sformatf("burst %0d address %h expected %h", bursts_checked, a, exp_addr))
      `CHECK((a / 4096) == ((a + s - 1) / 4096), "burst within one page")
      exp_addr = a + s; if (exp_addr == 32'h3000) exp_addr = 32'h1000;
      bursts_checked++;
    end
  endtask

  initial begin
    cfg = '{base_addr: 29'h1000, end_addr: 29'h3000, burst_size: 12'd64, data_thr: 29'd256, latency_thr: 16'd3};
    exp_addr = 32'h1000;
    waitw(4); wrst = 0; rrst = 0; waitw(2);
    `CHECK(state == DCH_WAIT_FOR_RESET, "starts in WAIT_FOR_RESET")
    en_req = 1; waitw(4);
    `CHECK(!enabled, "enable ignored before reset")
    en_req = 0; rst_req = 1; waitw(1); #1;
    `CHECK(state == DCH_IN_RESET, "IN_RESET")
    waitw(12);
    `CHECK(state == DCH_WAIT_FOR_NO_RESET, "WAIT_FOR_NO_RESET while reset bit set")
    rst_req = 0; waitw(2);
    `CHECK(state == DCH_DISABLED, "DISABLED")
    `CHECK(w_pointer == 29'h1000 && r_pointer == 29'h1000, "pointers at BASE_ADDR")
    put(2);
    `CHECK(sent == 0, "no data taken while disabled")
    en_req = 1; waitw(2);
    `CHECK(enabled, "ENABLED")
    rst_req = 1; waitw(4); #1;
    `CHECK(state == DCH_ENABLED, "reset ignored while enabled")
    rst_req = 0;

    // 1) nominal bursts: 40 DQW = 640 B = 10 bursts of 64 B
    put(40);
    waitw(200);
    check_bursts();
    `CHECK(b_addr.size() == 10, $sformatf("ten nominal bursts, got %0d", b_addr.size()))
    for (int i = 0; i < b_size.size(); i++) `CHECK(b_size[i] == 8, "nominal burst = 8 QW")
    `CHECK(w_pointer == 29'h1000 + 29'd640, "W_POINTER after 640 B")
    `CHECK(data_collected, "DATA_COLLECTED for 640 B >= 256 B")
    for (int i = 0; i < got.size(); i++) begin
      logic [127:0] w;
      w = {32'hA5A5_0000 + 32'(i/2), 32'h1111_0000 + 32'(i/2), 32'h5A5A_0000 + 32'(i/2), 32'h2222_0000 + 32'(i/2)};
      `CHECK(got[i] == ((i % 2) ? w[127:64] : w[63:0]), "QW order")
    end
    // software reads everything: R_POINTER = W_POINTER
    @(negedge wclk); rptr_val = w_pointer; rptr_wr = 1; @(negedge wclk); rptr_wr = 0; waitw(2);
    `CHECK(!data_collected, "DATA_COLLECTED cleared by R_POINTER")
    `CHECK(r_pointer == 29'h1000 + 29'd640, "R_POINTER written")

    // 2) latency: one DQW (16 B < 64 B) is sent after 3 ms
    put(1);
    waitw(60);
    `CHECK(b_addr.size() == 10, "small amount waits")
    while (w_pointer == 29'h1000 + 29'd640) waitw(1);
    `CHECK(b_addr.size() == 11 && b_size[10] == 2, "latency-driven burst of 2 QW")
    check_bursts();
    waitw(2);
    `CHECK(!data_collected, "16 B below DATA_THRESHOLD")
    waitw(200);
    `CHECK(data_collected, "DATA_COLLECTED by read latency")
    @(negedge wclk); rptr_val = w_pointer; rptr_wr = 1; @(negedge wclk); rptr_wr = 0; waitw(2);

    // 3) overflow: stop the writer, fill the FIFO, then write more
    serve = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge wclk); wr_en = 1; @(negedge wclk); wr_en = 0;
    end
    `CHECK(data_overflow, "DATA_OVERFLOW on a full FIFO")
    `CHECK(!fifo_empty, "FIFO not empty while stalled")
    @(negedge wclk); ovf_clr = 1; @(negedge wclk); ovf_clr = 0; waitw(1);
    `CHECK(!data_overflow, "CLEAR_OVERFLOW")
    serve = 1;
    waitw(600);
    check_bursts();
    `CHECK(fifo_empty, "FIFO drained")

    // 4) ring overrun: more than 8 kB without reading
    got.delete();
    put(700);
    waitw(400);
    check_bursts();
    `CHECK(data_overwritten, "DATA_OVERWRITTEN after ring overrun")
    `CHECK(r_pointer_ovw == r_pointer, "R_POINTER_OVERWRITTEN latched")
    @(negedge wclk); ovw_clr = 1; @(negedge wclk); ovw_clr = 0; waitw(1);
    `CHECK(!data_overwritten, "overwritten flag cleared")

    // 5) disable: remaining data flushed, then DISABLED
    put(3);
    en_req = 0;
    waitw(2);
    waitw(400);
    `CHECK(state == DCH_DISABLED, "disabled after flush")
    check_bursts();
    `CHECK(w_pointer == 29'(exp_addr), "all data stored before disabling")
    `TB_FINISH
  end
  initial begin repeat (100000) @(posedge wclk); failures++; $display("watchdog"); `TB_FINISH end
endmodule
