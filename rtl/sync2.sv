// sync2: two-flop synchroniser for a single level signal crossing into the
// clock domain of `clk`. Output follows the input two `clk` edges later; the
// registers reset to RESET_VAL. Used for status flags that cross between the
// 125 MHz and 250 MHz domains of the Data Channel Controller, and for the
// reset synchronisers, which is why both flops also power up at RESET_VAL
// (an FPGA configuration value): logic behind a reset synchroniser is held
// in reset from the first clock edge instead of running on power-up
// contents until the reset has travelled through.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta = RESET_VAL;
  logic q_r  = RESET_VAL;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q_r  <= RESET_VAL;
    end else begin
      meta <= d;
      q_r  <= meta;
    end
  end
  assign q = q_r;
endmodule
