// tb_icblm_top: end-to-end run of the icBLM logic with the ADC model and two
// SMEM memory models (random stalls), driven through the register buses the
// way software would drive it. Reduced sizes: 1 "ms" = 10 us, Data FIFO 64
// DQW, framer buffer 256 samples, TMEM 64 words, clock monitor gate 1000.
//   ch0 (bank 0): raw frames of ADC 0, SAMPLE_THRESHOLD 8, 64 B bursts
//   ch1 (bank 0): dummy generator, 1 DQW per 4 cycles, 48 B bursts, 8 kB ring
//   ch2 (bank 1): raw frames of ADC 2 with a TMEM pattern, latency-driven
//   ch3 (bank 1): dummy generator at full rate (overflows the Data FIFO)
// The frames of ch0 and ch2 are read back from memory and checked (SOF,
// samples, sample numbers, CRC32, EOF); the generator words of ch1 must count
// up; R_POINTER updates clear DATA_COLLECTED and the interrupt. Every
// mechanism of the design is counted and must occur at least once.
`include "tb_check.svh"
`timescale 1ns/1ps
module tb_icblm_top;
  import icblm_pkg::*;
  `TB_COUNTERS
  logic clk125 = 0, clk250 = 0, spi_clk = 0, rst = 1;
  always #4 clk125 = ~clk125;
  always #2 clk250 = ~clk250;
  always #6.667 spi_clk = ~spi_clk;

  logic [7:0] tcsr_addr = 0, fmc_tcsr_addr = 0;
  logic tcsr_wr = 0, tcsr_rd = 0, fmc_tcsr_wr = 0, fmc_tcsr_rd = 0;
  logic [31:0] tcsr_wdata = 0, tcsr_rdata, fmc_tcsr_wdata = 0, fmc_tcsr_rdata;
  logic [7:0] tmem_addr = 0; logic tmem_wr = 0, tmem_rd = 0; logic [31:0] tmem_wdata = 0, tmem_rdata;
  logic adc_cnv, adc_sck; logic [3:0] adc_sdo;
  logic [63:0] smem_wdat [2]; logic [28:0] smem_wadd [2]; logic [9:0] smem_wsiz [2];
  logic [1:0] smem_wreq [2]; logic [1:0] smem_wack [2];
  logic irq, irq_pulse;
  logic [15:0] framer_frames [4], framer_dropped [4];

  icblm_top #(.US_PER_MS(10), .DATA_FIFO_DEPTH(64), .FRAMER_BUF_DEPTH(256), .TMEM_DEPTH(64),
              .REF_FREQ(1000)) dut (.*);
  adc_model adc (.cnv(adc_cnv), .sck(adc_sck), .sdo(adc_sdo));
  smem_model #(.STALL_PCT(20)) mem0 (.clk(clk250), .WDAT(smem_wdat[0]), .WADD(smem_wadd[0]), .WSIZ(smem_wsiz[0]),
                                     .WREQ(smem_wreq[0]), .WACK(smem_wack[0]), .hold(1'b0));
  smem_model #(.STALL_PCT(20)) mem1 (.clk(clk250), .WDAT(smem_wdat[1]), .WADD(smem_wadd[1]), .WSIZ(smem_wsiz[1]),
                                     .WREQ(smem_wreq[1]), .WACK(smem_wack[1]), .hold(1'b0));

  // ---------------- register access ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk125); tcsr_addr = a; tcsr_wdata = d; tcsr_wr = 1; @(negedge clk125); tcsr_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk125); tcsr_addr = a; tcsr_rd = 1; @(negedge clk125); tcsr_rd = 0; d = tcsr_rdata;
  endtask
  task automatic cbw(input int ch, input int idx, input logic [31:0] d);
    wr(8'hC0, {16'(ch), 16'(idx)}); wr(8'hC4, d);
  endtask
  task automatic cbr(input int ch, input int idx, output logic [31:0] d);
    wr(8'hC0, {16'(ch), 16'(idx)}); rd(8'hC4, d);
  endtask
  task automatic fmc_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk125); fmc_tcsr_addr = a; fmc_tcsr_wdata = d; fmc_tcsr_wr = 1; @(negedge clk125); fmc_tcsr_wr = 0;
  endtask
  task automatic fmc_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk125); fmc_tcsr_addr = a; fmc_tcsr_rd = 1; @(negedge clk125); fmc_tcsr_rd = 0; d = fmc_tcsr_rdata;
  endtask

  // ---------------- mechanism counters ----------------
  int m_nominal, m_latency_burst, m_page_cut, m_ring_wrap, m_overflow, m_overwritten, m_arb_switch,
      m_smem_stall, m_frame_thr, m_frame_lat, m_frame_flush, m_dec_closed, m_irq, m_rlat_collect,
      m_disable_flush, m_reset;
  initial begin
    m_nominal = 0; m_latency_burst = 0; m_page_cut = 0; m_ring_wrap = 0; m_overflow = 0; m_overwritten = 0;
    m_arb_switch = 0; m_smem_stall = 0; m_frame_thr = 0; m_frame_lat = 0; m_frame_flush = 0; m_dec_closed = 0;
    m_irq = 0; m_rlat_collect = 0; m_disable_flush = 0; m_reset = 0;
  end
  for (genvar c = 0; c < 4; c++) begin : g_mon
    always @(posedge clk125) if (!rst) begin
      automatic logic sn = dut.g_ch[c].u_dch.sched_now;
      automatic logic fa = dut.g_ch[c].u_dch.force_all;
      if (sn && !fa) m_nominal++;
      if (sn && fa && dut.g_ch[c].u_dch.en_req && !dut.g_ch[c].u_dch.dat_full) m_latency_burst++;
      if (sn && fa && !dut.g_ch[c].u_dch.en_req) m_disable_flush++;
      if (sn && dut.g_ch[c].u_dch.limit == dut.g_ch[c].u_dch.page_left &&
          dut.g_ch[c].u_dch.size_b < dut.g_ch[c].u_dch.burst_eff && !fa) m_page_cut++;
      if (sn && dut.g_ch[c].u_dch.next_addr == dut.g_ch[c].u_dch.cfg_q.base_addr) m_ring_wrap++;
      if (dut.g_ch[c].u_dch.accept && dut.g_ch[c].u_dch.dat_full) m_overflow++;
      if (dut.g_ch[c].u_dch.done && dut.g_ch[c].u_dch.used_sum > dut.g_ch[c].u_dch.ring) m_overwritten++;
      if (dut.g_ch[c].u_dch.state == DCH_IN_RESET) m_reset++;
      if (dut.data_collected[c] && dut.g_ch[c].u_dch.used < dut.g_ch[c].u_dch.cfg_q.data_thr) m_rlat_collect++;
      if (dut.g_ch[c].u_framer.start) begin
        if (!dut.g_ch[c].u_framer.enable) m_frame_flush++;
        else if (dut.g_ch[c].u_framer.count >= 9'(dut.g_ch[c].u_framer.sample_thr)) m_frame_thr++;
        else m_frame_lat++;
      end
    end
  end
  logic prev_sel = 0;
  always @(posedge clk250) if (!rst) begin
    if (dut.g_bank[1].u_arb.st == 2'd1 && dut.g_bank[1].sel != prev_sel) begin m_arb_switch++; prev_sel = dut.g_bank[1].sel; end
    if ((smem_wreq[0][1] && !smem_wack[0][1]) || (smem_wreq[1][1] && !smem_wack[1][1])) m_smem_stall++;
  end
  always @(posedge clk125) if (!rst) begin
    if (!dut.dec_gate) m_dec_closed++;
    if (irq_pulse) m_irq++;
  end

  // ---------------- frame checker ----------------
  function automatic logic [127:0] dqw(input int bank, input int unsigned a);
    if (bank == 0) return {mem0.mem.exists(a/8+1) ? mem0.mem[a/8+1] : 64'hDEAD, mem0.mem.exists(a/8) ? mem0.mem[a/8] : 64'hDEAD};
    else           return {mem1.mem.exists(a/8+1) ? mem1.mem[a/8+1] : 64'hDEAD, mem1.mem.exists(a/8) ? mem1.mem[a/8] : 64'hDEAD};
  endfunction
  function automatic logic [31:0] crc_bits(input logic [31:0] c, input logic [127:0] w);
    for (int i = 0; i < 128; i++) begin
      logic fb;
      fb = c[0] ^ w[i];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return c;
  endfunction
  // Parse frames from base to end; samples must be consecutive ADC values.
  // kind 0: ADC channel `adc_ch`; kind 1: TMEM pattern 0x50000 + (num mod 64)
  task automatic check_frames(input int bank, input int unsigned base, input int unsigned stop,
                              input int adc_ch, input int kind, output int nframes, output int nsamples,
                              output int gaps);
    int unsigned a;
    int k0, off;
    a = base; off = -1; nframes = 0; nsamples = 0; k0 = -1; gaps = 0;
    while (a < stop) begin
      logic [127:0] h;
      logic [31:0] c;
      int n, nw;
      h = dqw(bank, a);
      `CHECK(h[127:64] == SOF_PATTERN, $sformatf("SOF at %h", a))
      if (h[127:64] != SOF_PATTERN) break;
      `CHECK(h[23:16] == 8'(adc_ch), "INFO = source channel")
      n = int'(h[15:0]); nw = (n + 3) / 4 + 2;
      c = 32'hFFFFFFFF;
      for (int w = 0; w < nw - 1; w++) c = crc_bits(c, dqw(bank, a + 16 * w));
      `CHECK(dqw(bank, a + 16 * (nw - 1)) == {~c, EOF_PATTERN}, "CRC32 and EOF")
      for (int s = 0; s < n; s++) begin
        logic [31:0] v;
        int k;
        v = dqw(bank, a + 16 + 16 * (s / 4))[32 * (s % 4) +: 32];
        k = int'(v[31:20]);
        // gaps are allowed only where the decimator closed the gate
        if (k0 >= 0 && k != ((k0 + 1) % 4096)) gaps++;
        k0 = k;
        // the ADC model numbers every conversion since power-up; line the
        // first sample up with it, then every later one must follow
        if (kind == 0 && off < 0) off = adc.index_of(adc_ch, v[19:0]) - k;
        if (kind == 0) `CHECK(v[19:0] == adc.value(adc_ch, k + off), "ADC value")
        else           `CHECK(v[19:0] == 20'h50000 + 20'(k % 64), "TMEM pattern value")
      end
      nframes++; nsamples += n;
      a += 16 * nw;
    end
    `CHECK(a == stop, "frames end at W_POINTER")
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] d;
    int nf, ns, ng;
    repeat (5) @(posedge clk125); rst = 0;
    repeat (5) @(posedge clk125);
    fmc_rd(8'h80, d); `CHECK(d == 32'hDEADBEE2, "PICO4 ID")
    for (int i = 0; i < 64; i++) begin
      @(negedge clk125); tmem_addr = 8'(2 * 64 + i); tmem_wdata = 32'h50000 + 32'(i); tmem_wr = 1;
    end
    @(negedge clk125); tmem_wr = 0;
    fmc_wr(8'h85, 32'h4);             // pattern on ADC channel 2
    // channel parameters
    cbw(0, 0, 32'h0000_0000); cbw(0, 1, 32'h0000_4000); cbw(0, 2, 64);  cbw(0, 3, 128); cbw(0, 4, 0); cbw(0, 9, 8);
    cbw(1, 0, 32'h0010_0000); cbw(1, 1, 32'h0010_2000); cbw(1, 2, 48);  cbw(1, 3, 1024); cbw(1, 4, 0); cbw(1, 8, 32'h0100_0004);
    cbw(2, 0, 32'h0000_0000); cbw(2, 1, 32'h0000_4000); cbw(2, 2, 32'hFF0); cbw(2, 3, 32'h0001_0000); cbw(2, 4, 3); cbw(2, 9, 1000);
    cbw(3, 0, 32'h0100_0000); cbw(3, 1, 32'h0100_2000); cbw(3, 2, 256); cbw(3, 3, 0); cbw(3, 4, 0); cbw(3, 8, 32'h0100_0001);
    wr(8'hD8, {20'h0, 3'd0, 3'd2, 3'd0, 3'd0});   // ch0 <- ADC0, ch2 <- ADC2
    wr(8'h98, 32'h5);                  // interrupts from ch0 and ch2
    wr(8'hA0, 32'hF); repeat (20) @(posedge clk125); wr(8'hA0, 32'h0); repeat (5) @(posedge clk125);
    rd(8'hAC, d); `CHECK(d[3:0] == 4'hF, "FIFO_EMPTY after reset")
    fmc_wr(8'h81, 1);                  // start acquisition
    wr(8'h9C, 32'hF);
    repeat (4) @(posedge clk125);
    rd(8'h9C, d); `CHECK(d[3:0] == 4'hF, "all channels enabled")

    // run 150 us
    repeat (150 * 125) @(posedge clk125);
    rd(8'hB4, d); `CHECK(d[3], "ch3 DATA_OVERFLOW")
    `CHECK(!d[1], "ch1 no overflow")
    wr(8'hA4, 32'h8);
    rd(8'hA8, d); `CHECK(d[0], "ch0 DATA_COLLECTED")
    `CHECK(irq, "interrupt pending")
    // software consumes ch0: R_POINTER = W_POINTER
    cbr(0, 6, d); cbw(0, 5, d);
    repeat (3) @(posedge clk125);
    `CHECK(!dut.data_collected[0], "ch0 DATA_COLLECTED cleared by R_POINTER")

    // decimator: 10 us open every 20 us for 60 us
    wr(8'hDC, {16'd20, 16'd10});
    repeat (60 * 125) @(posedge clk125);
    wr(8'hDC, 32'h0);
    repeat (30 * 125) @(posedge clk125);

    // disable everything; remaining data is flushed
    wr(8'h9C, 32'h0);
    repeat (3000) @(posedge clk125);
    rd(8'h9C, d); `CHECK(d[3:0] == 4'h0, "all channels disabled")
    rd(8'hB0, d); `CHECK(d[1], "ch1 DATA_OVERWRITTEN (ring overrun)")
    cbr(1, 7, d); rd(8'hB0, d); `CHECK(!d[1], "overwritten flag cleared by reading R_POINTER_OVERWRITTEN")

    // ch0: frames from BASE to W_POINTER (ring not wrapped)
    cbr(0, 6, d);
    check_frames(0, 0, d, 0, 0, nf, ns, ng);
    $display("ch0: %0d frames, %0d samples, %0d gaps", nf, ns, ng);
    `CHECK(ng >= 1 && ng <= 3, "ch0 sample gaps only from the 3 decimator periods")
    `CHECK(nf > 10 && ns > 100, "ch0 frames stored")
    cbr(2, 6, d);
    check_frames(1, 0, d, 2, 1, nf, ns, ng);
    $display("ch2: %0d frames, %0d samples, %0d gaps", nf, ns, ng);
    `CHECK(ng >= 1 && ng <= 3, "ch2 sample gaps only from the 3 decimator periods")
    `CHECK(nf > 3 && ns > 100, "ch2 frames stored")
    // ch1: generator words count up across the last ring pass
    begin
      int unsigned wp, a;
      logic [127:0] prev, cur;
      cbr(1, 6, d); wp = d;
      a = (wp == 32'h0010_0000) ? 32'h0010_2000 - 16 : wp - 16;
      prev = dqw(0, a);
      for (int i = 0; i < 100; i++) begin
        a = (a == 32'h0010_0000) ? 32'h0010_2000 - 16 : a - 16;
        cur = dqw(0, a);
        `CHECK(cur + 1 == prev, "generator words count up")
        prev = cur;
      end
    end
    `CHECK(framer_dropped[0] == 0 && framer_dropped[2] == 0, "no samples dropped")

    // clock monitor
    fmc_rd(8'h86, d); `CHECK(d >= 998 && d <= 1002, "CLK_MON0")
    fmc_rd(8'h87, d); `CHECK(d >= 598 && d <= 602, "CLK_MON1")

    $display("mechanisms: nominal=%0d latency_burst=%0d page_cut=%0d ring_wrap=%0d overflow=%0d overwritten=%0d arb_switch=%0d smem_stall=%0d",
             m_nominal, m_latency_burst, m_page_cut, m_ring_wrap, m_overflow, m_overwritten, m_arb_switch, m_smem_stall);
    $display("            frame_thr=%0d frame_lat=%0d frame_flush=%0d dec_closed=%0d irq=%0d rlat_collect=%0d disable_flush=%0d reset=%0d",
             m_frame_thr, m_frame_lat, m_frame_flush, m_dec_closed, m_irq, m_rlat_collect, m_disable_flush, m_reset);
    `CHECK(m_nominal > 0, "nominal bursts")
    `CHECK(m_latency_burst > 0, "latency-driven bursts")
    `CHECK(m_page_cut > 0, "bursts cut at a page end")
    `CHECK(m_ring_wrap > 0, "ring wrap")
    `CHECK(m_overflow > 0, "Data FIFO overflow")
    `CHECK(m_overwritten > 0, "ring overwritten")
    `CHECK(m_arb_switch > 1, "arbiter switches channels")
    `CHECK(m_smem_stall > 0, "SMEM stalls")
    `CHECK(m_frame_thr > 0, "frames at SAMPLE_THRESHOLD")
    `CHECK(m_frame_lat > 0, "frames by framer latency")
    `CHECK(m_frame_flush > 0, "frames flushed on disable")
    `CHECK(m_dec_closed > 0, "decimator closed the gate")
    `CHECK(m_irq > 0, "interrupt raised")
    `CHECK(m_rlat_collect > 0, "DATA_COLLECTED by read latency")
    `CHECK(m_disable_flush > 0, "bursts flushed on disable")
    `CHECK(m_reset > 0, "controller reset")
    `TB_FINISH
  end
  initial begin repeat (200000) @(posedge clk125); failures++; $display("watchdog"); `TB_FINISH end
endmodule
