// pico4_support: support module for the PICO4 FMC card (four bipolar current
// channels, 20-bit, 1 MSPS).
//
// It reads the four ADCs over SPI (pico4_spi, in the 75 MHz SPI clock domain,
// with the crossing to xuser_CLK and the 12-bit sample number inside), lets
// the TMEM pattern memory replace any channel under PATTERN_MASK
// (pico4_tmem), measures xuser_CLK and the SPI clock (clock_monitor) and
// holds the FMC TCSR registers (pico4_regs). The result leaves as a 128-bit
// AXI-stream word, four 32-bit samples with channel c in bits 32c+31:32c,
// all synchronous to xuser_CLK; p_o_clk_adc is xuser_CLK forwarded.
// The RST register (bit 0, default 0) holds the SPI readout, the sample
// numbering and the stream in reset until software sets it.
//
// Published: the block structure, the 20+12 bit sample word, the interface
// list and the registers. This design's choices: tvalid stays high until
// tready, and a newer sample set replaces one that was not taken; the PLL
// and the FMC IO buffers are outside (spi_clk comes in, the ADC pins go out);
// the unused axis_aclk input of the original interface is left out.
module pico4_support #(
  parameter int REF_FREQ   = 125_000_000,
  parameter int TMEM_DEPTH = 4096,
  parameter int SPI_CLK_PER_SAMPLE = 75
) (
  input  logic         clk,        // xuser_CLK
  input  logic         rst,        // xuser_RESET
  input  logic         spi_clk,    // 75 MHz from the PLL
  // FMC TCSR bus
  input  logic [7:0]   tcsr_addr,
  input  logic         tcsr_wr,
  input  logic         tcsr_rd,
  input  logic [31:0]  tcsr_wdata,
  output logic [31:0]  tcsr_rdata,
  // TMEM bus
  input  logic [$clog2(TMEM_DEPTH)+1:0] tmem_addr,
  input  logic         tmem_wr,
  input  logic         tmem_rd,
  input  logic [31:0]  tmem_wdata,
  output logic [31:0]  tmem_rdata,
  // ADC pins (through the FMC IO buffers)
  output logic         adc_cnv,
  output logic         adc_sck,
  input  logic [3:0]   adc_sdo,
  // application side
  output logic [127:0] axis_tdata,
  output logic         axis_tvalid,
  input  logic         axis_tready,
  output logic         p_o_clk_adc
);
  logic        run, sub_rst, spi_rst;
  logic [3:0]  pattern_mask;
  logic [31:0] clk_mon [2];
  logic [31:0] adc_s [4];
  logic [31:0] mux_s [4];
  logic [11:0] num;
  logic        adc_v, mux_v;

  pico4_regs u_regs (
    .clk(clk), .rst(rst), .addr(tcsr_addr), .wr(tcsr_wr), .rd(tcsr_rd),
    .wdata(tcsr_wdata), .rdata(tcsr_rdata), .run(run), .pattern_mask(pattern_mask),
    .clk_mon(clk_mon));

  assign sub_rst = rst || !run;
  sync2 #(.RESET_VAL(1'b1)) u_spi_rst (.clk(spi_clk), .rst(1'b0), .d(sub_rst), .q(spi_rst));

  clock_monitor #(.NCLK(2), .REF_FREQ(REF_FREQ)) u_clkmon (
    .ref_clk(clk), .rst(rst), .mclk({spi_clk, clk}), .freq(clk_mon));

  pico4_spi #(.SPI_CLK_PER_SAMPLE(SPI_CLK_PER_SAMPLE)) u_spi (
    .spi_clk(spi_clk), .spi_rst(spi_rst), .adc_cnv(adc_cnv), .adc_sck(adc_sck), .adc_sdo(adc_sdo),
    .clk(clk), .rst(sub_rst), .sample(adc_s), .sample_num(num), .valid(adc_v));

  pico4_tmem #(.DEPTH(TMEM_DEPTH)) u_tmem (
    .clk(clk), .rst(rst), .tmem_addr(tmem_addr), .tmem_wr(tmem_wr), .tmem_rd(tmem_rd),
    .tmem_wdata(tmem_wdata), .tmem_rdata(tmem_rdata), .pattern_mask(pattern_mask),
    .in_sample(adc_s), .in_num(num), .in_valid(adc_v), .out_sample(mux_s), .out_valid(mux_v));

  always_ff @(posedge clk) begin
    if (sub_rst) begin
      axis_tdata  <= '0;
      axis_tvalid <= 1'b0;
    end else begin
      if (axis_tvalid && axis_tready) axis_tvalid <= 1'b0;
      if (mux_v) begin
        axis_tdata  <= {mux_s[3], mux_s[2], mux_s[1], mux_s[0]};
        axis_tvalid <= 1'b1;
      end
    end
  end

  assign p_o_clk_adc = clk;
endmodule
