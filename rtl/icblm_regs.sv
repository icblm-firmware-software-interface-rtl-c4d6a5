// icblm_regs: TCSR register file of the icBLM application.
//
// Direct registers (byte offsets from the application base 0x100):
//   0x98 IRQ_ENABLE  R/W   0x9C DCH_ENABLE R/W   0xA0 DCH_RESET R/W
//   0xA4 CLEAR_OVERFLOW W  0xA8 DATA_COLLECTED R 0xAC FIFO_EMPTY R
//   0xB0 DATA_OVERWRITTEN R  0xB4 DATA_OVERFLOW R
//   0xC0 CBRS R/W (31:16 channel, 15:0 index)  0xC4 CBRV R/W
//   0xD0 AMRS R/W  0xD4 AMRV  0xD8 RAW_DATA_SELECTOR R/W (3 bits/channel)
//   0xDC DECIMATOR_PARAMETERS R/W (31:16 period, 15:0 duty, in us)
// The per-channel flag registers use bit i for channel i (14 bits wide).
// Through CBRS/CBRV the per-channel parameters are reached indirectly:
// 0 BASE_ADDR (28:12), 1 END_ADDR (28:12), 2 BURST_SIZE (11:4),
// 3 DATA_THRESHOLD (28:4), 4 LATENCY_THRESHOLD (15:0, ms), 5 R_POINTER (28:4),
// 6 W_POINTER (28:4, R), 7 R_POINTER_OVERWRITTEN (28:4, R; reading it clears
// the channel's DATA_OVERWRITTEN flag), 8 GENERATOR_PARAMETERS (31:24
// multiplier, 23:0 divider), 9 SAMPLE_THRESHOLD (15:0). Bits outside the
// printed fields read as zero and are ignored on write. This map is the
// published one.
//
// Choices of this design: the bus has a one-cycle write strobe and returns
// read data one cycle after the read strobe; parameter writes are dropped
// while the selected channel is enabled (R_POINTER is always writable);
// DCH_ENABLE reads back the real controller state; AMRV reads zero because
// there are no algorithm modules in this design.
module icblm_regs
  import icblm_pkg::*;
#(
  parameter int NCH = 4
) (
  input  logic              clk,
  input  logic              rst,
  // TCSR bus
  input  logic [7:0]        addr,
  input  logic              wr,
  input  logic              rd,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  // control to the channels
  output logic [NCH-1:0]    irq_enable,
  output logic [NCH-1:0]    en_req,
  output logic [NCH-1:0]    rst_req,
  output logic [NCH-1:0]    ovf_clr,
  output logic [NCH-1:0]    ovw_clr,
  output logic [NCH-1:0]    rptr_wr,
  output logic [ADDR_W-1:0] rptr_val,
  output dch_cfg_t          cfg         [NCH],
  output logic [7:0]        gen_mult    [NCH],
  output logic [23:0]       gen_div     [NCH],
  output logic [15:0]       sample_thr  [NCH],
  output logic [2:0]        raw_sel     [NCH],
  output logic [15:0]       dec_period,
  output logic [15:0]       dec_duty,
  // status from the channels
  input  logic [NCH-1:0]    enabled,
  input  logic [NCH-1:0]    data_collected,
  input  logic [NCH-1:0]    fifo_empty,
  input  logic [NCH-1:0]    data_overwritten,
  input  logic [NCH-1:0]    data_overflow,
  input  logic [ADDR_W-1:0] w_pointer     [NCH],
  input  logic [ADDR_W-1:0] r_pointer     [NCH],
  input  logic [ADDR_W-1:0] r_pointer_ovw [NCH]
);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [31:0] cbrs, amrs;
  logic [15:0] cb_ch;
  logic [15:0] cb_idx;
  logic [CW-1:0] ch;
  logic        ch_ok;
  assign cb_ch  = cbrs[31:16];
  assign cb_idx = cbrs[15:0];
  assign ch     = CW'(cb_ch);
  assign ch_ok  = (cb_ch < 16'(NCH));

  function automatic logic [31:0] flags(input logic [NCH-1:0] v);
    return 32'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_enable <= '0; en_req <= '0; rst_req <= '0;
      cbrs <= '0; amrs <= '0; dec_period <= '0; dec_duty <= '0;
      for (int i = 0; i < NCH; i++) begin
        cfg[i] <= '0; gen_mult[i] <= '0; gen_div[i] <= '0;
        sample_thr[i] <= '0; raw_sel[i] <= '0;
      end
      ovf_clr <= '0; ovw_clr <= '0; rptr_wr <= '0; rptr_val <= '0; rdata <= '0;
    end else begin
      ovf_clr <= '0;
      ovw_clr <= '0;
      rptr_wr <= '0;
      if (wr) begin
        unique case (addr)
          8'h98: irq_enable <= wdata[NCH-1:0];
          8'h9C: en_req     <= wdata[NCH-1:0];
          8'hA0: rst_req    <= wdata[NCH-1:0];
          8'hA4: ovf_clr    <= wdata[NCH-1:0];
          8'hC0: cbrs       <= wdata;
          8'hD0: amrs       <= wdata;
          8'hD8: for (int i = 0; i < NCH; i++) raw_sel[i] <= wdata[3*i +: 3];
          8'hDC: begin dec_period <= wdata[31:16]; dec_duty <= wdata[15:0]; end
          8'hC4: if (ch_ok) begin
            if (cb_idx == IDX_R_POINTER) begin
              rptr_wr[ch] <= 1'b1;
              rptr_val    <= {wdata[28:4], 4'h0};
            end else if (!enabled[ch]) begin
              unique case (cb_idx)
                IDX_BASE_ADDR:      cfg[ch].base_addr   <= {wdata[28:12], 12'h0};
                IDX_END_ADDR:       cfg[ch].end_addr    <= {wdata[28:12], 12'h0};
                IDX_BURST_SIZE:     cfg[ch].burst_size  <= {wdata[11:4], 4'h0};
                IDX_DATA_THRESHOLD: cfg[ch].data_thr    <= {wdata[28:4], 4'h0};
                IDX_LATENCY_THR:    cfg[ch].latency_thr <= wdata[15:0];
                IDX_GENERATOR_PAR:  begin gen_mult[ch] <= wdata[31:24]; gen_div[ch] <= wdata[23:0]; end
                IDX_SAMPLE_THR:     sample_thr[ch] <= wdata[15:0];
                default: ;
              endcase
            end
          end
          default: ;
        endcase
      end
      if (rd) begin
        unique case (addr)
          8'h98: rdata <= flags(irq_enable);
          8'h9C: rdata <= flags(enabled);
          8'hA0: rdata <= flags(rst_req);
          8'hA8: rdata <= flags(data_collected);
          8'hAC: rdata <= flags(fifo_empty);
          8'hB0: rdata <= flags(data_overwritten);
          8'hB4: rdata <= flags(data_overflow);
          8'hC0: rdata <= cbrs;
          8'hD0: rdata <= amrs;
          8'hD8: begin
            rdata <= '0;
            for (int i = 0; i < NCH; i++) rdata[3*i +: 3] <= raw_sel[i];
          end
          8'hDC: rdata <= {dec_period, dec_duty};
          8'hC4: begin
            rdata <= '0;
            if (ch_ok) begin
              unique case (cb_idx)
                IDX_BASE_ADDR:      rdata <= {3'b0, cfg[ch].base_addr[28:12], 12'h0};
                IDX_END_ADDR:       rdata <= {3'b0, cfg[ch].end_addr[28:12], 12'h0};
                IDX_BURST_SIZE:     rdata <= {20'h0, cfg[ch].burst_size[11:4], 4'h0};
                IDX_DATA_THRESHOLD: rdata <= {3'b0, cfg[ch].data_thr[28:4], 4'h0};
                IDX_LATENCY_THR:    rdata <= {16'h0, cfg[ch].latency_thr};
                IDX_R_POINTER:      rdata <= {3'b0, r_pointer[ch][28:4], 4'h0};
                IDX_W_POINTER:      rdata <= {3'b0, w_pointer[ch][28:4], 4'h0};
                IDX_R_POINTER_OVW: begin
                  rdata       <= {3'b0, r_pointer_ovw[ch][28:4], 4'h0};
                  ovw_clr[ch] <= 1'b1;
                end
                IDX_GENERATOR_PAR:  rdata <= {gen_mult[ch], gen_div[ch]};
                IDX_SAMPLE_THR:     rdata <= {16'h0, sample_thr[ch]};
                default: ;
              endcase
            end
          end
          default: rdata <= '0;
        endcase
      end
    end
  end

  // The channel flag registers hold at most 14 channels.
  initial assert (NCH >= 1 && NCH <= 14);
endmodule
