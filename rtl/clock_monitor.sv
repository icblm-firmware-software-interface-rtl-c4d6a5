// clock_monitor: measures the frequency of NCLK clocks with the reference
// clock (xuser_CLK) as time base, for the CLK_MON registers.
//
// Each monitored clock drives its own free-running binary counter, which is
// passed on in Gray code. The reference domain synchronises each Gray value
// through two flops and converts it back to binary. Every REF_FREQ reference
// cycles (one second when REF_FREQ is the reference frequency in Hz) it
// subtracts the previous reading from the current one: the difference is the
// number of monitored-clock edges in one second, i.e. the frequency in Hz,
// held in freq[i] until the next gate. The first result appears after one
// gate. The method is this design's choice; the source gives only the
// function and that results go to the registers.
module clock_monitor #(
  parameter int NCLK     = 2,
  parameter int REF_FREQ = 125_000_000
) (
  input  logic            ref_clk,
  input  logic            rst,
  input  logic [NCLK-1:0] mclk,
  output logic [31:0]     freq [NCLK]
);
  logic [31:0] gray_m [NCLK];

  for (genvar i = 0; i < NCLK; i++) begin : g_mon
    logic [31:0] bin_m, gray;
    logic        rst_m;
    sync2 #(.RESET_VAL(1'b1)) u_rst (.clk(mclk[i]), .rst(1'b0), .d(rst), .q(rst_m));
    always_ff @(posedge mclk[i]) begin
      if (rst_m) begin
        bin_m <= '0;
        gray  <= '0;
      end else begin
        bin_m <= bin_m + 32'd1;
        gray  <= (bin_m + 32'd1) ^ ((bin_m + 32'd1) >> 1);
      end
    end
    assign gray_m[i] = gray;
  end

  logic [31:0] g1 [NCLK];
  logic [31:0] g2 [NCLK];
  logic [31:0] prev [NCLK];
  logic [31:0] gate;

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int k = 30; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  always_ff @(posedge ref_clk) begin
    if (rst) begin
      gate <= '0;
      for (int i = 0; i < NCLK; i++) begin
        g1[i] <= '0; g2[i] <= '0; prev[i] <= '0; freq[i] <= '0;
      end
    end else begin
      g1 <= gray_m;
      g2 <= g1;
      if (gate == 32'(REF_FREQ - 1)) begin
        gate <= '0;
        for (int i = 0; i < NCLK; i++) begin
          freq[i] <= gray2bin(g2[i]) - prev[i];
          prev[i] <= gray2bin(g2[i]);
        end
      end else begin
        gate <= gate + 32'd1;
      end
    end
  end
endmodule
