// pico4_tmem: test pattern memory and channel mux of the PICO4 module.
//
// The memory holds DEPTH 20-bit pattern words for each of the four ADC
// channels and is written and read over the TMEM bus with the word address
// {channel, index}. For every incoming sample set the pattern word at index
// (sample number mod DEPTH) is read; each channel whose PATTERN_MASK bit is
// 1 replaces its ADC sample (bits 19:0) with the pattern word, keeping the
// sample number (bits 31:20); channels with a 0 bit pass the ADC data.
// Output follows input by one clock (synchronous memory read).
// Published: the memory, its upload over TMEM and the per-channel mux under
// PATTERN_MASK. Memory size, addressing by sample number and the bus timing
// (read data one cycle after the read strobe) are this design's choices.
module pico4_tmem #(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  // TMEM bus
  input  logic [$clog2(DEPTH)+1:0] tmem_addr,
  input  logic        tmem_wr,
  input  logic        tmem_rd,
  input  logic [31:0] tmem_wdata,
  output logic [31:0] tmem_rdata,
  // data path
  input  logic [3:0]  pattern_mask,
  input  logic [31:0] in_sample [4],
  input  logic [11:0] in_num,
  input  logic        in_valid,
  output logic [31:0] out_sample [4],
  output logic        out_valid
);
  localparam int AW = $clog2(DEPTH);

  logic [19:0] pat [4];
  logic [19:0] bus_q [4];
  logic        rd_q;
  logic [31:0] in_q [4];
  logic [1:0]  bus_ch;
  logic [AW-1:0] bus_idx, pidx;
  assign bus_ch  = tmem_addr[AW +: 2];
  assign bus_idx = tmem_addr[AW-1:0];
  assign pidx    = AW'(in_num);

  // one memory per channel: a bus port and a pattern read port
  for (genvar c = 0; c < 4; c++) begin : g_ch
    logic [19:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (tmem_wr && bus_ch == 2'(c)) mem[bus_idx] <= tmem_wdata[19:0];
      bus_q[c] <= mem[bus_idx];
      if (in_valid) pat[c] <= mem[pidx];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q       <= 1'b0;
      out_valid  <= 1'b0;
      for (int c = 0; c < 4; c++) in_q[c] <= '0;
    end else begin
      rd_q <= tmem_rd;
      out_valid <= in_valid;
      if (in_valid) in_q <= in_sample;
    end
  end

  logic [1:0] rd_ch;
  always_ff @(posedge clk) rd_ch <= bus_ch;
  assign tmem_rdata = rd_q ? {12'h0, bus_q[rd_ch]} : '0;

  always_comb begin
    for (int c = 0; c < 4; c++)
      out_sample[c] = pattern_mask[c] ? {in_q[c][31:20], pat[c]} : in_q[c];
  end
endmodule
