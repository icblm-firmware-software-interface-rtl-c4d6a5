// arbiter: round-robin selection among the Data Channel Controllers of one
// memory bank (250 MHz domain).
//
// In IDLE the arbiter looks for a controller whose channel_ready is high,
// starting with the one after the controller served last, and selects it.
// The selected controller's burst (WADD, WSIZ) and data (WDAT, Data FIFO
// empty) are routed to the SMEM Writer together with channel_ready. When the
// writer raises in_progress the arbiter holds the selection; when in_progress
// falls the transfer is over and the arbiter goes back to IDLE to pick the
// next controller. The writer's Data FIFO read and transfer_done strobes go
// only to the selected controller. Round-robin order and the channel_ready /
// in_progress handshake follow the source; the one-cycle IDLE step between
// bursts is this design's choice.
module arbiter
  import icblm_pkg::*;
#(
  parameter int N = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  // controllers
  input  logic [N-1:0]         ch_ready,
  input  logic [ADDR_W-1:0]    ch_wadd [N],
  input  logic [SIZE_W-1:0]    ch_wsiz [N],
  input  logic [QW_W-1:0]      ch_wdat [N],
  input  logic [N-1:0]         ch_dat_empty,
  output logic [N-1:0]         ch_dat_rd,
  output logic [N-1:0]         ch_transfer_done,
  // SMEM writer
  output logic                 channel_ready,
  input  logic                 in_progress,
  output logic [ADDR_W-1:0]    wadd,
  output logic [SIZE_W-1:0]    wsiz,
  output logic [QW_W-1:0]      wdat,
  output logic                 dat_empty,
  input  logic                 dat_rd,
  input  logic                 transfer_done,
  output logic [$clog2(N > 1 ? N : 2)-1:0] sel
);
  localparam int SW = $clog2(N > 1 ? N : 2);

  typedef enum logic [1:0] {A_IDLE, A_GRANT, A_BUSY} arb_state_e;
  arb_state_e st;
  logic [SW-1:0] last;
  logic          found;
  logic [SW-1:0] pick;

  // first ready channel after `last`, cyclically
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      if (!found && ch_ready[(int'(last) + k) % N]) begin
        found = 1'b1;
        pick  = SW'((int'(last) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= A_IDLE;
      sel  <= '0;
      last <= SW'(N - 1);
    end else begin
      unique case (st)
        A_IDLE:  if (found) begin sel <= pick; st <= A_GRANT; end
        A_GRANT: if (in_progress) st <= A_BUSY;
                 else if (!ch_ready[sel]) st <= A_IDLE;
        A_BUSY:  if (!in_progress) begin last <= sel; st <= A_IDLE; end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign channel_ready = (st == A_GRANT) && ch_ready[sel];
  assign wadd      = ch_wadd[sel];
  assign wsiz      = ch_wsiz[sel];
  assign wdat      = ch_wdat[sel];
  assign dat_empty = ch_dat_empty[sel];

  always_comb begin
    ch_dat_rd        = '0;
    ch_transfer_done = '0;
    ch_dat_rd[sel]        = dat_rd && st != A_IDLE;
    ch_transfer_done[sel] = transfer_done && st != A_IDLE;
  end

  // The writer may only work for the channel that was granted.
  assert property (@(posedge clk) disable iff (rst) transfer_done |-> st == A_BUSY);
endmodule
