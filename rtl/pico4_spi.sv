// pico4_spi: readout of the four 20-bit ADCs of the PICO4 FMC card and the
// Sample Number Generator.
//
// In the SPI clock domain (75 MHz from the PLL) a counter divides the clock
// into sample periods of SPI_CLK_PER_SAMPLE cycles (75 -> 1 MSPS). At the
// start of a period CNV is high for two cycles, then after a conversion wait
// SCK makes ADC_BITS pulses (SCK = SPI clock / 2, high on odd counts from
// CONV_CYCLES+1). The four SDO lines are shifted in MSB first at each falling
// SCK edge, i.e. the value the ADC drove during the high phase. The finished
// set of four samples is parked in a holding register and announced by
// toggling a flag, which crosses into the xuser clock domain through two
// flops; the holding register is stable for the rest of the period, so it
// can be copied safely. There the 12-bit sample number is added and the set
// is output for one cycle with `valid`: word c = {number, sample c} with the
// sample in bits 19:0 and the number in bits 31:20.
//
// Published: 20-bit samples, four simultaneous channels at 1 MSPS, 75 MHz SPI
// clock, 12-bit sample number, crossing to xuser_CLK inside this block. The
// pin protocol (CNV/SCK/SDO timing) and the bit order are this design's
// choices. Latency: about four xuser cycles after the last SCK pulse.
module pico4_spi #(
  parameter int SPI_CLK_PER_SAMPLE = 75,
  parameter int ADC_BITS           = 20,
  parameter int CONV_CYCLES        = 10
) (
  // SPI domain
  input  logic        spi_clk,
  input  logic        spi_rst,
  output logic        adc_cnv,
  output logic        adc_sck,
  input  logic [3:0]  adc_sdo,
  // xuser domain
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] sample [4],
  output logic [11:0] sample_num,
  output logic        valid
);
  localparam int CW = $clog2(SPI_CLK_PER_SAMPLE);
  localparam int LAST_SHIFT = CONV_CYCLES + 2*ADC_BITS;

  logic [CW-1:0] cnt, cnt_n;
  logic [ADC_BITS-1:0] sh   [4];
  logic [ADC_BITS-1:0] hold [4];
  logic tog;

  assign cnt_n = (cnt == CW'(SPI_CLK_PER_SAMPLE - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge spi_clk) begin
    if (spi_rst) begin
      cnt <= '0; adc_cnv <= 1'b0; adc_sck <= 1'b0; tog <= 1'b0;
      for (int c = 0; c < 4; c++) begin sh[c] <= '0; hold[c] <= '0; end
    end else begin
      cnt     <= cnt_n;
      adc_cnv <= (cnt_n < CW'(2));
      adc_sck <= cnt_n[0] && cnt_n > CW'(CONV_CYCLES) && cnt_n < CW'(LAST_SHIFT);
      // falling SCK edge: leaving an odd count CONV_CYCLES+1 .. LAST_SHIFT-1
      if (cnt[0] && cnt > CW'(CONV_CYCLES) && cnt < CW'(LAST_SHIFT))
        for (int c = 0; c < 4; c++) sh[c] <= {sh[c][ADC_BITS-2:0], adc_sdo[c]};
      if (cnt == CW'(LAST_SHIFT + 1)) begin
        hold <= sh;
        tog  <= ~tog;
      end
    end
  end

  // crossing to the xuser domain
  logic tog_s, tog_q;
  logic [11:0] num_next;
  sync2 u_tog_sync (.clk(clk), .rst(rst), .d(tog), .q(tog_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      tog_q <= 1'b0; valid <= 1'b0; sample_num <= '0; num_next <= '0;
      for (int c = 0; c < 4; c++) sample[c] <= '0;
    end else begin
      tog_q <= tog_s;
      valid <= 1'b0;
      if (tog_s != tog_q) begin
        valid <= 1'b1;
        for (int c = 0; c < 4; c++) sample[c] <= {num_next, 20'(hold[c])};
        sample_num <= num_next;
        num_next   <= num_next + 12'd1;
      end
    end
  end

  initial assert (LAST_SHIFT + 2 <= SPI_CLK_PER_SAMPLE);
endmodule
