// tb_pico4_tmem: uploads a pattern over the TMEM bus (DEPTH 64 here), reads
// it back, then sends sample sets with PATTERN_MASK 0101: masked channels
// must carry the pattern word of the sample number, the others the ADC data,
// all with the sample number kept in bits 31:20, one cycle later.
`include "tb_check.svh"
module tb_pico4_tmem;
  `TB_COUNTERS
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0] tmem_addr = 0; logic tmem_wr = 0, tmem_rd = 0; logic [31:0] tmem_wdata = 0, tmem_rdata;
  logic [3:0] pattern_mask = 0;
  logic [31:0] in_sample [4]; logic [11:0] in_num = 0; logic in_valid = 0;
  logic [31:0] out_sample [4]; logic out_valid;
  pico4_tmem #(.DEPTH(DEPTH)) dut (.*);
  function automatic logic [19:0] pat(input int c, input int i); return 20'(c * 4096 + i * 7 + 1); endfunction
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int c = 0; c < 4; c++) for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); tmem_addr = 8'(c * DEPTH + i); tmem_wdata = {12'hFFF, pat(c, i)}; tmem_wr = 1;
    end
    @(negedge clk); tmem_wr = 0;
    for (int j = 0; j < 20; j++) begin
      int c, i;
      c = j % 4; i = (j * 13) % DEPTH;
      @(negedge clk); tmem_addr = 8'(c * DEPTH + i); tmem_rd = 1;
      @(negedge clk); tmem_rd = 0;
      `CHECK(tmem_rdata == 32'(pat(c, i)), "TMEM read back")
    end
    pattern_mask = 4'b0101;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_num = 12'(n * 5);
      for (int c = 0; c < 4; c++) in_sample[c] = {12'(n * 5), 20'(n * 100 + c)};
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      `CHECK(out_valid, "out_valid one cycle later")
      for (int c = 0; c < 4; c++)
        `CHECK(out_sample[c] == {12'(n * 5), pattern_mask[c] ? pat(c, (n * 5) % DEPTH) : 20'(n * 100 + c)}, "mux")
      if (n == 50) pattern_mask = 4'b1010;
    end
    `TB_FINISH
  end
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
endmodule
