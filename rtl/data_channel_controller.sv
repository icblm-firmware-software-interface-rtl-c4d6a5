// data_channel_controller: one circular-buffer channel between a data source
// (raw data framer or dummy generator, 125 MHz) and the SMEM write path
// (arbiter and SMEM writer, 250 MHz).
//
// Structure (as published): a Data FIFO that carries 128-bit words (DQW) from
// the 125 MHz side and hands them out as 64-bit words (QW) on the 250 MHz
// side, lower half first; a Forward Address/Size FIFO that carries bursts
// scheduled for memory to the 250 MHz side; a Back Address/Size FIFO that
// returns finished bursts. On the 125 MHz side a Write Data Counter counts
// bytes in the Data FIFO not yet scheduled, a Read Data Counter counts bytes
// stored in memory and not yet read, and two latency counters count ms ticks
// of waiting data. A five-state FSM (WAIT_FOR_RESET, IN_RESET,
// WAIT_FOR_NO_RESET, DISABLED, ENABLED) is driven by the DCH_RESET and
// DCH_ENABLE register bits.
//
// Burst scheduling: a burst of min(BURST_SIZE, room to the 4 kB page end,
// room to END_ADDR) bytes is scheduled once the Write Data Counter reaches
// BURST_SIZE. When the write latency timer expires, the Data FIFO is full, or
// the channel is being disabled, all unscheduled bytes are scheduled (still
// cut at the page and ring end). Addresses wrap from END_ADDR to BASE_ADDR.
// WSIZ is in QWs and WADD is a byte address.
//
// Status: DATA_COLLECTED when unread data >= DATA_THRESHOLD (any data if it is
// 0) or unread data has waited LATENCY_THRESHOLD ms; DATA_OVERFLOW when data
// arrives at a full Data FIFO; DATA_OVERWRITTEN when a finished burst made the
// unread amount exceed the ring (END_ADDR - BASE_ADDR), R_POINTER being
// latched in r_pointer_ovw. A request to disable takes effect after the last
// scheduled burst is back ("enabled" stays high until then).
//
// Choices of this design, not of the source: FIFO depths, the QW order, the
// >= comparisons, flushing on disable, the saturation of the unread amount.
// Timing: scheduling decisions are registered, one per 125 MHz cycle;
// channel_ready follows the Forward FIFO with two synchroniser stages.
module data_channel_controller
  import icblm_pkg::*;
#(
  parameter int DATA_FIFO_DEPTH = 512,
  parameter int AS_FIFO_DEPTH   = 16
) (
  // 125 MHz side
  input  logic              wclk,
  input  logic              wrst,
  input  logic [127:0]      wdat,
  input  logic              wr_en,
  output logic              wfull,
  input  dch_cfg_t          cfg,
  input  logic              en_req,
  input  logic              rst_req,
  input  logic              rptr_wr,
  input  logic [ADDR_W-1:0] rptr_val,
  input  logic              ovw_clr,
  input  logic              ovf_clr,
  input  logic              ms_tick,
  output dch_state_e        state,
  output logic              enabled,
  output logic              data_collected,
  output logic              fifo_empty,
  output logic              data_overwritten,
  output logic              data_overflow,
  output logic [ADDR_W-1:0] w_pointer,
  output logic [ADDR_W-1:0] r_pointer,
  output logic [ADDR_W-1:0] r_pointer_ovw,
  // 250 MHz side
  input  logic              rclk,
  input  logic              rrst,
  output logic              channel_ready,
  output logic [ADDR_W-1:0] wadd,
  output logic [SIZE_W-1:0] wsiz,
  output logic [QW_W-1:0]   dat_q,
  output logic              dat_empty,
  input  logic              dat_rd,
  input  logic              transfer_done
);
  localparam int AS_W = ADDR_W + SIZE_W;

  dch_cfg_t cfg_q;
  logic [3:0] rst_cnt;
  logic fifo_rst_w, fifo_rst_r, fifo_rst_r_s;

  // ---------------- FSM ----------------
  logic [ADDR_W-1:0] wdc;         // Write Data Counter (bytes)
  logic [ADDR_W-1:0] used;        // Read Data Counter (bytes)
  logic [15:0]       wlc, rlc;    // latency counters (ms)
  logic [7:0]        outstanding; // scheduled, not yet returned bursts
  logic [ADDR_W-1:0] sched_addr;
  logic              sched_now, fwd_full;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      state   <= DCH_WAIT_FOR_RESET;
      rst_cnt <= '0;
    end else begin
      unique case (state)
        DCH_WAIT_FOR_RESET:    if (rst_req) begin state <= DCH_IN_RESET; rst_cnt <= '0; end
        DCH_IN_RESET: begin
          rst_cnt <= rst_cnt + 4'd1;
          if (rst_cnt == 4'd7) state <= DCH_WAIT_FOR_NO_RESET;
        end
        DCH_WAIT_FOR_NO_RESET: if (!rst_req) state <= DCH_DISABLED;
        DCH_DISABLED: begin
          if (rst_req) begin state <= DCH_IN_RESET; rst_cnt <= '0; end
          else if (en_req) state <= DCH_ENABLED;
        end
        DCH_ENABLED:
          if (!en_req && wdc == '0 && outstanding == '0 && !sched_now) state <= DCH_DISABLED;
        default: state <= DCH_WAIT_FOR_RESET;
      endcase
    end
  end
  assign enabled    = (state == DCH_ENABLED);
  assign fifo_rst_w = wrst || (state == DCH_IN_RESET);

  always_ff @(posedge wclk) begin
    if (wrst) cfg_q <= '0;
    else if (state == DCH_IN_RESET) cfg_q <= cfg;
  end

  // ---------------- Data FIFO ----------------
  logic dat_full;
  logic accept, push;
  logic [127:0] dfifo_q;
  logic dfifo_empty, dfifo_rd, half;

  assign accept = enabled && en_req && wr_en;
  assign push   = accept && !dat_full;
  assign wfull  = dat_full || !(enabled && en_req);

  sync2 u_rst_sync (.clk(rclk), .rst(1'b0), .d(fifo_rst_w), .q(fifo_rst_r_s));
  assign fifo_rst_r = rrst || fifo_rst_r_s;

  async_fifo #(.WIDTH(128), .DEPTH(DATA_FIFO_DEPTH)) u_data_fifo (
    .wclk(wclk), .wrst(fifo_rst_w), .wr_en(push), .wdata(wdat), .full(dat_full),
    .rclk(rclk), .rrst(fifo_rst_r), .rd_en(dfifo_rd), .rdata(dfifo_q), .empty(dfifo_empty));

  // 128 -> 64 bit width change on the read side, lower QW first
  always_ff @(posedge rclk) begin
    if (fifo_rst_r) half <= 1'b0;
    else if (dat_rd && !dfifo_empty) half <= ~half;
  end
  assign dfifo_rd  = dat_rd && half;
  assign dat_q     = half ? dfifo_q[127:64] : dfifo_q[63:0];
  assign dat_empty = dfifo_empty;

  sync2 #(.RESET_VAL(1'b1)) u_empty_sync (.clk(wclk), .rst(wrst), .d(dfifo_empty), .q(fifo_empty));

  // ---------------- burst scheduling ----------------
  logic [ADDR_W-1:0] page_left, end_left, limit, burst_eff, size_b, next_addr;
  logic nominal_ok, force_all;
  logic [15:0] lat_thr;
  assign lat_thr   = cfg_q.latency_thr;
  assign page_left = ADDR_W'(13'd4096 - {1'b0, sched_addr[11:0]});
  assign end_left  = cfg_q.end_addr - sched_addr;
  assign limit     = (page_left < end_left) ? page_left : end_left;
  assign burst_eff = (cfg_q.burst_size == '0) ? ADDR_W'(16) : ADDR_W'(cfg_q.burst_size);
  assign nominal_ok = (wdc >= burst_eff);
  assign force_all  = (wdc != '0) &&
                      ((lat_thr != '0 && wlc >= lat_thr) || dat_full || !en_req);
  always_comb begin
    if (force_all) size_b = (wdc < limit) ? wdc : limit;
    else           size_b = (burst_eff < limit) ? burst_eff : limit;
  end
  assign sched_now = enabled && (nominal_ok || force_all) && !fwd_full && limit != '0;
  assign next_addr = (sched_addr + size_b == cfg_q.end_addr) ? cfg_q.base_addr : sched_addr + size_b;

  logic [AS_W-1:0] fwd_q, back_q;
  logic fwd_empty, back_empty, back_full;
  async_fifo #(.WIDTH(AS_W), .DEPTH(AS_FIFO_DEPTH)) u_fwd_fifo (
    .wclk(wclk), .wrst(fifo_rst_w), .wr_en(sched_now), .wdata({sched_addr, SIZE_W'(size_b >> 3)}), .full(fwd_full),
    .rclk(rclk), .rrst(fifo_rst_r), .rd_en(transfer_done), .rdata(fwd_q), .empty(fwd_empty));

  assign channel_ready = !fwd_empty;
  assign wadd = fwd_q[AS_W-1:SIZE_W];
  assign wsiz = fwd_q[SIZE_W-1:0];

  async_fifo #(.WIDTH(AS_W), .DEPTH(AS_FIFO_DEPTH)) u_back_fifo (
    .wclk(rclk), .wrst(fifo_rst_r), .wr_en(transfer_done && !fwd_empty), .wdata(fwd_q), .full(back_full),
    .rclk(wclk), .rrst(fifo_rst_w), .rd_en(!back_empty), .rdata(back_q), .empty(back_empty));

  // ---------------- counters and pointers (125 MHz) ----------------
  logic [ADDR_W-1:0] ring, done_addr, done_bytes, done_end, wptr_next, used_sum, rp_dist;
  logic done;
  assign done       = !back_empty;
  assign ring       = cfg_q.end_addr - cfg_q.base_addr;
  assign done_addr  = back_q[AS_W-1:SIZE_W];
  assign done_bytes = ADDR_W'(back_q[SIZE_W-1:0]) << 3;
  assign done_end   = done_addr + done_bytes;
  assign wptr_next  = done ? ((done_end == cfg_q.end_addr) ? cfg_q.base_addr : done_end) : w_pointer;
  assign used_sum   = used + done_bytes;
  assign rp_dist    = (wptr_next >= rptr_val) ? (wptr_next - rptr_val) : (wptr_next + ring - rptr_val);

  always_ff @(posedge wclk) begin
    if (fifo_rst_w) begin
      wdc <= '0; used <= '0; wlc <= '0; rlc <= '0; outstanding <= '0;
      sched_addr <= cfg.base_addr; w_pointer <= cfg.base_addr; r_pointer <= cfg.base_addr;
      r_pointer_ovw <= '0; data_overwritten <= 1'b0; data_overflow <= 1'b0;
    end else begin
      // Write Data Counter
      wdc <= wdc + (push ? ADDR_W'(16) : '0) - (sched_now ? size_b : '0);
      if (sched_now) sched_addr <= next_addr;
      outstanding <= outstanding + 8'(sched_now) - 8'(done);
      // Write Latency Counter
      if (wdc == '0 || sched_now) wlc <= '0;
      else if (ms_tick && wlc != 16'hFFFF) wlc <= wlc + 16'd1;
      // overflow
      if (ovf_clr) data_overflow <= 1'b0;
      if (accept && dat_full) data_overflow <= 1'b1;
      // pointers and Read Data Counter
      w_pointer <= wptr_next;
      if (rptr_wr) begin
        r_pointer <= rptr_val;
        used      <= rp_dist;
      end else if (done) begin
        if (used_sum > ring) used <= ring;
        else                 used <= used_sum;
      end
      if (ovw_clr) data_overwritten <= 1'b0;
      if (done && !rptr_wr && used_sum > ring) begin
        data_overwritten <= 1'b1;
        r_pointer_ovw    <= r_pointer;
      end
      // Read Latency Counter
      if (used == '0 || used >= cfg_q.data_thr) rlc <= '0;
      else if (ms_tick && rlc != 16'hFFFF) rlc <= rlc + 16'd1;
    end
  end

  assign data_collected = (used != '0) &&
                          (used >= cfg_q.data_thr || (lat_thr != '0 && rlc >= lat_thr));

  // A burst is only returned after it was scheduled.
  assert property (@(posedge wclk) disable iff (fifo_rst_w) done |-> outstanding != '0);

  logic unused;
  assign unused = back_full;
endmodule
