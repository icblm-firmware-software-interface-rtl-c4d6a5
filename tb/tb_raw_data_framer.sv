// tb_raw_data_framer: feeds numbered samples with a running timestamp and
// takes frames with a randomly stalling sink. Every frame is parsed and
// checked against an independent model: SOF, timestamp of its first sample,
// INFO, SAMPLES, the samples in order four per word with zero padding, the
// CRC-32 (computed bit by bit here) and EOF. Scenarios: frames at
// SAMPLE_THRESHOLD, a long stall giving a longer frame, a latency-driven
// short frame, and a short frame flushed by disabling the framer.
`include "tb_check.svh"
module tb_raw_data_framer;
  import icblm_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic enable = 0, s_valid = 0, m_valid, m_ready = 0, ms_tick = 0;
  logic [31:0] s_data = 0, mtw_index = 0;
  logic [7:0] s_idx = 0, info = 8'h2C;
  logic [15:0] sample_thr = 6, latency_thr = 0, dropped, frames;
  logic busy;
  logic [127:0] m_data;

  raw_data_framer #(.BUF_DEPTH(64)) dut (.*);

  int t = 0;
  always @(posedge clk) begin
    t++;
    ms_tick <= (t % 50 == 0);
    s_idx <= (s_idx == 8'd9) ? 8'd0 : s_idx + 8'd1;
    if (s_idx == 8'd9) mtw_index <= mtw_index + 1;
  end

  // source
  int feed = 0;       // samples still to send
  int period = 3;
  int sent = 0;
  logic [39:0] ts_of [int];
  always @(posedge clk) begin
    s_valid <= 1'b0;
    if (feed > 0 && (t % period == 0)) begin
      s_valid <= 1'b1;
      s_data  <= 32'hC000_0000 + 32'(sent);
      sent++;
      feed--;
    end
  end

  // timestamp the framer stores with each sample: the one present at the edge that takes it
  int taken = 0;
  always @(posedge clk) if (s_valid && enable) begin ts_of[taken] = {mtw_index, s_idx}; taken++; end

  // sink
  int stall = 0;
  always @(posedge clk) m_ready <= (stall == 0) && ($urandom_range(0, 99) < 70);

  function automatic logic [31:0] crc_bits(input logic [31:0] c, input logic [127:0] w);
    for (int i = 0; i < 128; i++) begin
      logic fb;
      fb = c[0] ^ w[i];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return c;
  endfunction

  logic [127:0] words [$];
  int next_sample = 0;
  int sizes [$];
  always @(posedge clk) if (m_valid && m_ready) words.push_back(m_data);

  // parse complete frames
  always @(posedge clk) begin
    if (words.size() > 0 && words[0][127:64] == 64'h50F50F50F50F50F5) begin
      int n, nw;
      n = int'(words[0][15:0]);
      nw = (n + 3) / 4 + 2;
      if (words.size() >= nw) begin
        logic [31:0] c;
        c = 32'hFFFFFFFF;
        `CHECK(n > 0, "frame not empty")
        `CHECK(words[0][23:16] == info, "INFO")
        `CHECK(ts_of.exists(next_sample) && words[0][63:24] == ts_of[next_sample], "timestamp of first sample")
        for (int w = 0; w < nw - 1; w++) c = crc_bits(c, words[w]);
        for (int k = 0; k < (nw - 2) * 4; k++) begin
          logic [31:0] v;
          v = words[1 + k / 4][32 * (k % 4) +: 32];
          if (k < n) begin
            `CHECK(v == 32'hC000_0000 + 32'(next_sample), "sample order")
            next_sample++;
          end else `CHECK(v == 0, "zero padding")
        end
        `CHECK(words[nw-1][127:96] == ~c, "CRC32")
        `CHECK(words[nw-1][95:0] == 96'hE0FE0FE0FE0FE0FE0FE0FE0F, "EOF")
        sizes.push_back(n);
        repeat (nw) void'(words.pop_front());
      end
    end else if (words.size() > 0) begin
      `CHECK(0, "frame does not start with SOF")
      void'(words.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; enable = 1;
    // A: frames at SAMPLE_THRESHOLD = 6
    feed = 60; wait (feed == 0); repeat (200) @(posedge clk);
    foreach (sizes[i]) `CHECK(sizes[i] >= 6, "nominal frame size")
    `CHECK(next_sample == 60, "all samples framed (A)")
    // B: the sink stalls; samples pile up and go out as one longer frame
    sizes.delete();
    stall = 1; feed = 20; period = 2; wait (feed == 0); repeat (5) @(posedge clk);
    stall = 0; repeat (300) @(posedge clk);
    begin
      int mx = 0;
      foreach (sizes[i]) if (sizes[i] > mx) mx = sizes[i];
      `CHECK(mx > 6, "longer frame after a stall")
    end
    `CHECK(next_sample == 80, "all samples framed (B)")
    // C: latency-driven frame
    sizes.delete(); sample_thr = 100; latency_thr = 2; period = 3;
    feed = 5; wait (feed == 0); repeat (40) @(posedge clk);
    `CHECK(sizes.size() == 0, "waits for latency")
    repeat (150) @(posedge clk);
    `CHECK(sizes.size() == 1 && sizes[0] == 5, "short frame after LATENCY_THRESHOLD")
    // D: disabling flushes a short frame
    sizes.delete(); latency_thr = 0;
    feed = 7; wait (feed == 0); repeat (20) @(posedge clk);
    `CHECK(sizes.size() == 0, "no frame below threshold")
    `CHECK(busy, "busy while samples are buffered")
    enable = 0; repeat (100) @(posedge clk);
    `CHECK(sizes.size() == 1 && sizes[0] == 7, "flush on disable")
    `CHECK(!busy, "idle after the flush")
    `CHECK(dropped == 0, "nothing dropped")
    `CHECK(int'(frames) > 10, "frame counter")
    `TB_FINISH
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("watchdog"); `TB_FINISH end
endmodule
