// raw_decimator: gate for the raw data framers. With DECIMATOR_PERIOD P and
// DECIMATOR_DUTY D (both in microseconds) the gate is open for the first D
// microseconds of every P-microsecond period (published behaviour). A period
// of 0 keeps the gate always open, so the register default acquires
// continuously (this design's choice); D >= P also keeps it open. The
// microsecond position advances on `us_tick`; the gate is registered.
module raw_decimator (
  input  logic        clk,
  input  logic        rst,
  input  logic        us_tick,
  input  logic [15:0] period,
  input  logic [15:0] duty,
  output logic        gate
);
  logic [15:0] pos;
  always_ff @(posedge clk) begin
    if (rst) begin
      pos  <= '0;
      gate <= 1'b1;
    end else begin
      if (period == '0) begin
        pos <= '0;
      end else if (us_tick) begin
        pos <= (pos >= period - 16'd1) ? '0 : pos + 16'd1;
      end
      gate <= (period == '0) || (pos < duty);
    end
  end
endmodule
