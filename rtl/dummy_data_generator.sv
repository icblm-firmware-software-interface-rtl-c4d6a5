// dummy_data_generator: verification data source for a Data Channel
// Controller. It produces GENERATOR_MULTIPLIER 128-bit words (DQW) every
// GENERATOR_DIVIDER clock cycles, but never more than one per cycle, so with
// MULTIPLIER >= DIVIDER it produces a word every cycle (published rate rule).
// It is off when either value is 0 or `enable` is low.
//
// The rate is made with an accumulator: each cycle MULTIPLIER is added; when
// the sum reaches DIVIDER a word is produced and DIVIDER is subtracted. The
// sum is held below 2*DIVIDER so it cannot run away when MULTIPLIER > DIVIDER.
// The word is a 128-bit count of the words produced since the generator was
// switched on (this design's choice), valid for one cycle with `valid`.
module dummy_data_generator (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic [7:0]   mult,
  input  logic [23:0]  div,
  output logic [127:0] wdat,
  output logic         valid
);
  logic        on;
  logic [24:0] acc, sum;
  assign on  = enable && mult != '0 && div != '0;
  assign sum = acc + 25'(mult);

  always_ff @(posedge clk) begin
    if (rst || !on) begin
      acc   <= '0;
      valid <= 1'b0;
      wdat  <= '0;
    end else begin
      valid <= 1'b0;
      if (valid) wdat <= wdat + 128'd1;
      if (sum >= 25'(div)) begin
        valid <= 1'b1;
        acc   <= (sum - 25'(div) >= 25'(div)) ? 25'(div) : sum - 25'(div);
      end else begin
        acc   <= sum;
      end
    end
  end
endmodule
