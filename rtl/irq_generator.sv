// irq_generator: the common interrupt of the icBLM channels. `irq` is high
// while any channel has DATA_COLLECTED set and its IRQ_ENABLE bit set;
// `irq_pulse` is a one-cycle strobe whenever a new enabled flag rises. The
// source has one interrupt for all channels and both memory banks; the level
// plus pulse form is this design's choice. Outputs are registered.
module irq_generator #(
  parameter int NCH = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] irq_enable,
  input  logic [NCH-1:0] data_collected,
  output logic           irq,
  output logic           irq_pulse
);
  logic [NCH-1:0] act, act_q;
  assign act = irq_enable & data_collected;
  always_ff @(posedge clk) begin
    if (rst) begin
      act_q <= '0; irq <= 1'b0; irq_pulse <= 1'b0;
    end else begin
      act_q     <= act;
      irq       <= |act;
      irq_pulse <= |(act & ~act_q);
    end
  end
endmodule
