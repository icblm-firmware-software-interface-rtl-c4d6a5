// pico4_regs: FMC TCSR registers of the PICO4 module (word addresses):
//   0x80 ID           R/W, resets to 0xDEADBEE2 (firmware identification)
//   0x81 RST          R/W, bit 0: 0 keeps the acquisition in reset, 1 runs
//   0x85 PATTERN_MASK R/W, bits 3:0: 1 routes the pattern memory to channel
//   0x86 CLK_MON0     R, measured xuser_CLK frequency (Hz)
//   0x87 CLK_MON1     R, measured SPI clock frequency (Hz)
// Other addresses read 0. The map and defaults are published; the bus timing
// (write strobe, read data one cycle after the read strobe) is this design's.
module pico4_regs (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  addr,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        run,
  output logic [3:0]  pattern_mask,
  input  logic [31:0] clk_mon [2]
);
  logic [31:0] id;
  always_ff @(posedge clk) begin
    if (rst) begin
      id <= 32'hDEAD_BEE2; run <= 1'b0; pattern_mask <= '0; rdata <= '0;
    end else begin
      if (wr) begin
        unique case (addr)
          8'h80: id           <= wdata;
          8'h81: run          <= wdata[0];
          8'h85: pattern_mask <= wdata[3:0];
          default: ;
        endcase
      end
      if (rd) begin
        unique case (addr)
          8'h80: rdata <= id;
          8'h81: rdata <= {31'h0, run};
          8'h85: rdata <= {28'h0, pattern_mask};
          8'h86: rdata <= clk_mon[0];
          8'h87: rdata <= clk_mon[1];
          default: rdata <= '0;
        endcase
      end
    end
  end
endmodule
