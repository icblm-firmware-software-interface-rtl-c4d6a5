// smem_writer: moves one burst at a time from the selected Data Channel
// Controller to the SMEM (DDR) controller of a memory bank (250 MHz).
//
// When the arbiter raises channel_ready the writer latches the burst's start
// address WADD (bytes) and size WSIZ (64-bit words), raises in_progress and
// presents the command with WREQ[0] until the controller accepts it with
// WACK[0]. It then offers one 64-bit word per cycle from the Data FIFO with
// WREQ[1] (low while the FIFO is empty), and a word is taken and read from
// the FIFO when WACK[1] is high. After the last word it pulses transfer_done,
// which pops the burst from the Forward FIFO and pushes it to the Back FIFO,
// and drops in_progress. The widths (WDAT 64, WADD 29, WSIZ 10, WREQ 2,
// WACK 2) and the channel_ready / in_progress handshake are published; the
// meaning given to the two WREQ and WACK bits is this design's choice.
module smem_writer
  import icblm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // arbiter side
  input  logic              channel_ready,
  output logic              in_progress,
  input  logic [ADDR_W-1:0] wadd_i,
  input  logic [SIZE_W-1:0] wsiz_i,
  input  logic [QW_W-1:0]   wdat_i,
  input  logic              dat_empty,
  output logic              dat_rd,
  output logic              transfer_done,
  // SMEM controller side
  output logic [QW_W-1:0]   WDAT,
  output logic [ADDR_W-1:0] WADD,
  output logic [SIZE_W-1:0] WSIZ,
  output logic [1:0]        WREQ,
  input  logic [1:0]        WACK
);
  typedef enum logic [1:0] {W_IDLE, W_CMD, W_DATA, W_DONE} wr_state_e;
  wr_state_e st;
  logic [SIZE_W:0] left;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= W_IDLE; WADD <= '0; WSIZ <= '0; left <= '0;
    end else begin
      unique case (st)
        W_IDLE: if (channel_ready) begin
          WADD <= wadd_i;
          WSIZ <= wsiz_i;
          left <= {1'b0, wsiz_i};
          st   <= (wsiz_i == '0) ? W_DONE : W_CMD;
        end
        W_CMD:  if (WACK[0]) st <= W_DATA;
        W_DATA: if (dat_rd) begin
          left <= left - 1'b1;
          if (left == 1) st <= W_DONE;
        end
        W_DONE: st <= W_IDLE;
        default: st <= W_IDLE;
      endcase
    end
  end

  assign in_progress   = (st != W_IDLE);
  assign WREQ[0]       = (st == W_CMD);
  assign WREQ[1]       = (st == W_DATA) && !dat_empty;
  assign WDAT          = wdat_i;
  assign dat_rd        = WREQ[1] && WACK[1];
  assign transfer_done = (st == W_DONE);

  // The command stays stable while it is requested.
  assert property (@(posedge clk) disable iff (rst) WREQ[0] && !WACK[0] |=> $stable(WADD) && $stable(WSIZ));
endmodule
