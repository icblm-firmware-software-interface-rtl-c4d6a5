// tb_icblm_full: the icBLM logic at its default sizes (no parameter
// overrides) taken through one complete acquisition. Channel 0 frames ADC 0
// with SAMPLE_THRESHOLD 16 into a 64 kB ring of bank 0, channel 1 runs the
// dummy generator into bank 0 as well, and channel 2 frames ADC 2 through a
// TMEM pattern into bank 1. After 100 us every channel is disabled (which
// flushes the remaining data), and the frames are read back from the memory
// model and checked word by word: SOF, INFO, sample numbers, sample values,
// CRC32 and EOF. The generator ring must hold a counting sequence.
`include "tb_check.svh"
`timescale 1ns/1ps
module tb_icblm_full;
  import icblm_pkg::*;
  `TB_COUNTERS
  logic clk125 = 0, clk250 = 0, spi_clk = 0, rst = 1;
  always #4 clk125 = ~clk125;
  always #2 clk250 = ~clk250;
  always #6.667 spi_clk = ~spi_clk;

  logic [7:0] tcsr_addr = 0, fmc_tcsr_addr = 0;
  logic tcsr_wr = 0, tcsr_rd = 0, fmc_tcsr_wr = 0, fmc_tcsr_rd = 0;
  logic [31:0] tcsr_wdata = 0, tcsr_rdata, fmc_tcsr_wdata = 0, fmc_tcsr_rdata;
  logic [13:0] tmem_addr = 0; logic tmem_wr = 0, tmem_rd = 0; logic [31:0] tmem_wdata = 0, tmem_rdata;
  logic adc_cnv, adc_sck; logic [3:0] adc_sdo;
  logic [63:0] smem_wdat [2]; logic [28:0] smem_wadd [2]; logic [9:0] smem_wsiz [2];
  logic [1:0] smem_wreq [2]; logic [1:0] smem_wack [2];
  logic irq, irq_pulse;
  logic [15:0] framer_frames [4], framer_dropped [4];

  icblm_top dut (.*);
  adc_model adc (.cnv(adc_cnv), .sck(adc_sck), .sdo(adc_sdo));
  smem_model #(.STALL_PCT(10)) mem0 (.clk(clk250), .WDAT(smem_wdat[0]), .WADD(smem_wadd[0]), .WSIZ(smem_wsiz[0]),
                                     .WREQ(smem_wreq[0]), .WACK(smem_wack[0]), .hold(1'b0));
  smem_model #(.STALL_PCT(10)) mem1 (.clk(clk250), .WDAT(smem_wdat[1]), .WADD(smem_wadd[1]), .WSIZ(smem_wsiz[1]),
                                     .WREQ(smem_wreq[1]), .WACK(smem_wack[1]), .hold(1'b0));

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

  function automatic logic [127:0] dqw(input int bank, input int unsigned a);
    if (bank == 0) return {mem0.mem.exists(a/8+1) ? mem0.mem[a/8+1] : 64'hDEAD, mem0.mem.exists(a/8) ? mem0.mem[a/8] : 64'hDEAD};
    else           return {mem1.mem.exists(a/8+1) ? mem1.mem[a/8+1] : 64'hDEAD, mem1.mem.exists(a/8) ? mem1.mem[a/8] : 64'hDEAD};
  endfunction
  // CRC32 over the 16 bytes of a word, byte 0 (bits 7:0) first, LSB first
  function automatic logic [31:0] crc_bits(input logic [31:0] c, input logic [127:0] w);
    for (int i = 0; i < 128; i++) begin
      logic fb;
      fb = c[0] ^ w[i];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return c;
  endfunction
  task automatic check_frames(input int bank, input int unsigned base, input int unsigned stop,
                              input int adc_ch, input int kind, output int nframes, output int nsamples);
    int unsigned a;
    int k0, off;
    a = base; off = -1; nframes = 0; nsamples = 0; k0 = -1;
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
        if (k0 >= 0) `CHECK(k == ((k0 + 1) % 4096), "consecutive sample numbers")
        k0 = k;
        // the ADC model numbers every conversion since power-up; line the
        // first sample up with it, then every later one must follow
        if (kind == 0 && off < 0) off = adc.index_of(adc_ch, v[19:0]) - k;
        if (kind == 0) `CHECK(v[19:0] == adc.value(adc_ch, k + off), $sformatf("ADC value %h k=%0d exp %h", v, k, adc.value(adc_ch, k + off)))
        else           `CHECK(v[19:0] == 20'h70000 + 20'(k ^ 12'hA5A), "TMEM pattern value")
      end
      nframes++; nsamples += n;
      a += 16 * nw;
    end
    `CHECK(a == stop, "frames end at W_POINTER")
  endtask

  initial begin
    logic [31:0] d;
    int nf, ns;
    repeat (5) @(posedge clk125); rst = 0;
    repeat (5) @(posedge clk125);
    // pattern for ADC 2: word k of channel 2 holds 0x70000 + (k xor 0xA5A)
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk125); tmem_addr = 14'(2 * 4096 + i); tmem_wdata = 32'h70000 + 32'(i ^ 32'hA5A); tmem_wr = 1;
    end
    @(negedge clk125); tmem_wr = 0;
    fmc_wr(8'h85, 32'h4);
    cbw(0, 0, 32'h0000_0000); cbw(0, 1, 32'h0001_0000); cbw(0, 2, 256); cbw(0, 3, 1024); cbw(0, 4, 0); cbw(0, 9, 16);
    cbw(1, 0, 32'h0100_0000); cbw(1, 1, 32'h0101_0000); cbw(1, 2, 1024); cbw(1, 3, 4096); cbw(1, 4, 0); cbw(1, 8, 32'h0100_0010);
    cbw(2, 0, 32'h0000_0000); cbw(2, 1, 32'h0001_0000); cbw(2, 2, 512); cbw(2, 3, 1024); cbw(2, 4, 0); cbw(2, 9, 64);
    wr(8'hD8, {20'h0, 3'd0, 3'd2, 3'd0, 3'd0});
    wr(8'hA0, 32'h7); repeat (20) @(posedge clk125); wr(8'hA0, 32'h0); repeat (5) @(posedge clk125);
    fmc_wr(8'h81, 1);
    wr(8'h9C, 32'h7);
    repeat (100 * 125) @(posedge clk125);
    wr(8'h9C, 32'h0);
    repeat (2000) @(posedge clk125);
    rd(8'h9C, d); `CHECK(d[2:0] == 3'h0, $sformatf("channels disabled %h frames2=%0d", d, framer_frames[2]))
    rd(8'hB4, d); `CHECK(d[2:0] == 3'h0, "no overflow")
    cbr(0, 6, d);
    check_frames(0, 0, d, 0, 0, nf, ns);
    $display("ch0: %0d frames, %0d samples", nf, ns);
    `CHECK(nf >= 6 && ns >= 95, "ch0 frames for 100 us")
    cbr(2, 6, d);
    check_frames(1, 0, d, 2, 1, nf, ns);
    $display("ch2: %0d frames, %0d samples", nf, ns);
    `CHECK(nf >= 2 && ns >= 95, "ch2 frames for 100 us")
    begin
      int unsigned wp;
      cbr(1, 6, d); wp = d;
      `CHECK(wp > 32'h0100_0000, "generator data written")
      for (int unsigned a = 32'h0100_0010; a < wp; a += 16)
        `CHECK(dqw(0, a) == dqw(0, a - 16) + 1, "generator words count up")
    end
    `TB_FINISH
  end
  initial begin repeat (60000) @(posedge clk125); failures++; $display("watchdog"); `TB_FINISH end
endmodule
