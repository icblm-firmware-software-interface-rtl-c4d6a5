// smem_model: behavioural model of a bank's SMEM (DDR) write controller for
// testbenches. Accepts a command (WREQ[0] with WADD/WSIZ) with WACK[0] after a
// random 0-3 cycle delay, then takes WSIZ 64-bit words offered with WREQ[1],
// stalling WACK[1] at random with probability STALL_PCT percent. Stored words
// go into a sparse memory indexed by byte address / 8; each finished burst is
// logged. `hold` stops all acceptance (to provoke back-pressure).
module smem_model #(
  parameter int STALL_PCT = 20
) (
  input  logic        clk,
  input  logic [63:0] WDAT,
  input  logic [28:0] WADD,
  input  logic [9:0]  WSIZ,
  input  logic [1:0]  WREQ,
  output logic [1:0]  WACK,
  input  logic        hold
);
  logic [63:0] mem [int unsigned];
  int unsigned burst_addr [$];
  int unsigned burst_size [$];
  int unsigned cur_addr, left;
  int          delay;
  logic        busy;
  int          words;

  initial begin
    WACK = 2'b00; busy = 1'b0; delay = 0; words = 0; left = 0; cur_addr = 0;
  end

  always @(posedge clk) begin
    WACK <= 2'b00;
    if (!hold) begin
      if (!busy && WREQ[0] && !WACK[0]) begin
        if (delay == 0) begin
          WACK[0]  <= 1'b1;
          busy     <= (WSIZ != 0);   // an empty burst completes at once
          cur_addr = WADD;
          left     = WSIZ;
          burst_addr.push_back(WADD);
          burst_size.push_back(WSIZ);
          delay    = $urandom_range(0, 3);
        end else delay--;
      end
      if (busy && left != 0 && ($urandom_range(0, 99) >= STALL_PCT)) WACK[1] <= 1'b1;
    end
    // a word moves when WREQ[1] and WACK[1] are both high at this edge
    if (busy && WREQ[1] && WACK[1]) begin
      mem[cur_addr / 8] = WDAT;
      cur_addr += 8;
      left--;
      words++;
      if (left == 0) begin busy <= 1'b0; WACK[1] <= 1'b0; end
    end
  end
endmodule
