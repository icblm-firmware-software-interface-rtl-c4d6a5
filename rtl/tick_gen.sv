// tick_gen: time base of the icBLM logic. Divides the 125 MHz clock into a
// one-cycle microsecond strobe (every CLK_PER_US cycles) and a millisecond
// strobe (every US_PER_MS microseconds), and keeps the frame timestamp: the
// serial number of the current 1 us window (mtw_index, 32 bits) and the clock
// cycle within that window (s_idx, 8 bits). The published text defines the
// timestamp as window number plus sample within the window; the widths and
// the derivation from the local clock are this design's choices.
module tick_gen #(
  parameter int CLK_PER_US = 125,
  parameter int US_PER_MS  = 1000
) (
  input  logic        clk,
  input  logic        rst,
  output logic        us_tick,
  output logic        ms_tick,
  output logic [31:0] mtw_index,
  output logic [7:0]  s_idx
);
  logic [$clog2(US_PER_MS+1)-1:0] us_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_idx <= '0; us_cnt <= '0; mtw_index <= '0; us_tick <= 1'b0; ms_tick <= 1'b0;
    end else begin
      us_tick <= 1'b0;
      ms_tick <= 1'b0;
      if (s_idx == 8'(CLK_PER_US - 1)) begin
        s_idx     <= '0;
        mtw_index <= mtw_index + 32'd1;
        us_tick   <= 1'b1;
        if (us_cnt == $bits(us_cnt)'(US_PER_MS - 1)) begin
          us_cnt  <= '0;
          ms_tick <= 1'b1;
        end else begin
          us_cnt <= us_cnt + 1'b1;
        end
      end else begin
        s_idx <= s_idx + 8'd1;
      end
    end
  end
  initial assert (CLK_PER_US >= 1 && CLK_PER_US <= 256);
endmodule
