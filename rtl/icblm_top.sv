// icblm_top: icBLM (ionisation chamber beam loss monitor) acquisition logic
// on an FMC carrier: four current channels of a PICO4 card are sampled at
// 1 MSPS, packed into timestamped, CRC-protected frames and written into two
// DDR memory banks as circular buffers that the host reads over DMA.
//
// Data path per channel c (NUM_OF_CHANNELS = 4): the PICO4 support module
// delivers four 32-bit samples per microsecond; RAW_DATA_SELECTOR picks one
// ADC channel for raw data framer c (gated by the raw data decimator); the
// framer's 128-bit words, or those of dummy data generator c when its
// GENERATOR_PARAMETERS are non-zero, go to Data Channel Controller c.
// Controllers 2b and 2b+1 share memory bank b (NUM_BANKS = 2): a round-robin
// arbiter hands their bursts to that bank's SMEM writer. All registers sit on
// the application TCSR bus (icblm_regs) and the FMC TCSR bus (pico4_regs);
// one interrupt signals DATA_COLLECTED of any enabled channel.
//
// Disabling a framed channel: the framer stops taking samples at once and
// sends what it holds as a short frame; the controller's enable request is
// held until the framer is idle, so that frame is still stored before the
// controller flushes and drops to DISABLED (an ordering chosen here).
//
// Clocks: clk125 (xuser_CLK) runs registers, PICO4 logic, framers and the
// write side of the controllers; clk250 runs the read side of the
// controllers, the arbiters and the SMEM writers; spi_clk (75 MHz from a PLL
// outside) runs the ADC readout. `rst` is synchronised into each domain.
// The SMEM controller, the PLL and the FMC IO buffers are not part of this
// RTL; their signals are ports. The bank assignment and the data source mux
// follow the published data flow; the time base derivation is this design's.
module icblm_top
  import icblm_pkg::*;
#(
  parameter int NUM_OF_CHANNELS    = 4,
  parameter int NUM_BANKS          = 2,
  parameter int CLK_PER_US         = 125,
  parameter int US_PER_MS          = 1000,
  parameter int DATA_FIFO_DEPTH    = 512,
  parameter int FRAMER_BUF_DEPTH   = 1024,
  parameter int TMEM_DEPTH         = 4096,
  parameter int REF_FREQ           = 125_000_000,
  parameter int SPI_CLK_PER_SAMPLE = 75
) (
  input  logic              clk125,
  input  logic              clk250,
  input  logic              spi_clk,
  input  logic              rst,
  // application TCSR bus
  input  logic [7:0]        tcsr_addr,
  input  logic              tcsr_wr,
  input  logic              tcsr_rd,
  input  logic [31:0]       tcsr_wdata,
  output logic [31:0]       tcsr_rdata,
  // FMC TCSR bus
  input  logic [7:0]        fmc_tcsr_addr,
  input  logic              fmc_tcsr_wr,
  input  logic              fmc_tcsr_rd,
  input  logic [31:0]       fmc_tcsr_wdata,
  output logic [31:0]       fmc_tcsr_rdata,
  // TMEM bus
  input  logic [$clog2(TMEM_DEPTH)+1:0] tmem_addr,
  input  logic              tmem_wr,
  input  logic              tmem_rd,
  input  logic [31:0]       tmem_wdata,
  output logic [31:0]       tmem_rdata,
  // PICO4 ADC pins
  output logic              adc_cnv,
  output logic              adc_sck,
  input  logic [3:0]        adc_sdo,
  // SMEM write interfaces, one per bank (clk250)
  output logic [QW_W-1:0]   smem_wdat [NUM_BANKS],
  output logic [ADDR_W-1:0] smem_wadd [NUM_BANKS],
  output logic [SIZE_W-1:0] smem_wsiz [NUM_BANKS],
  output logic [1:0]        smem_wreq [NUM_BANKS],
  input  logic [1:0]        smem_wack [NUM_BANKS],
  // interrupt and monitoring
  output logic              irq,
  output logic              irq_pulse,
  output logic [15:0]       framer_frames  [NUM_OF_CHANNELS],
  output logic [15:0]       framer_dropped [NUM_OF_CHANNELS]
);
  localparam int NCH = NUM_OF_CHANNELS;
  localparam int CPB = NCH / NUM_BANKS;   // channels per bank

  logic rst125, rst250;
  sync2 #(.RESET_VAL(1'b1)) u_rst125 (.clk(clk125), .rst(1'b0), .d(rst), .q(rst125));
  sync2 #(.RESET_VAL(1'b1)) u_rst250 (.clk(clk250), .rst(1'b0), .d(rst), .q(rst250));

  // time base
  logic us_tick, ms_tick;
  logic [31:0] mtw_index;
  logic [7:0]  s_idx;
  tick_gen #(.CLK_PER_US(CLK_PER_US), .US_PER_MS(US_PER_MS)) u_tick (
    .clk(clk125), .rst(rst125), .us_tick(us_tick), .ms_tick(ms_tick),
    .mtw_index(mtw_index), .s_idx(s_idx));

  // registers
  logic [NCH-1:0] irq_enable, en_req, rst_req, ovf_clr, ovw_clr, rptr_wr;
  logic [ADDR_W-1:0] rptr_val;
  dch_cfg_t    cfg [NCH];
  logic [7:0]  gen_mult [NCH];
  logic [23:0] gen_div [NCH];
  logic [15:0] sample_thr [NCH];
  logic [2:0]  raw_sel [NCH];
  logic [15:0] dec_period, dec_duty;
  logic [NCH-1:0] enabled, data_collected, fifo_empty, data_overwritten, data_overflow;
  logic [ADDR_W-1:0] w_pointer [NCH];
  logic [ADDR_W-1:0] r_pointer [NCH];
  logic [ADDR_W-1:0] r_pointer_ovw [NCH];

  icblm_regs #(.NCH(NCH)) u_regs (
    .clk(clk125), .rst(rst125), .addr(tcsr_addr), .wr(tcsr_wr), .rd(tcsr_rd),
    .wdata(tcsr_wdata), .rdata(tcsr_rdata),
    .irq_enable(irq_enable), .en_req(en_req), .rst_req(rst_req), .ovf_clr(ovf_clr),
    .ovw_clr(ovw_clr), .rptr_wr(rptr_wr), .rptr_val(rptr_val), .cfg(cfg),
    .gen_mult(gen_mult), .gen_div(gen_div), .sample_thr(sample_thr), .raw_sel(raw_sel),
    .dec_period(dec_period), .dec_duty(dec_duty),
    .enabled(enabled), .data_collected(data_collected), .fifo_empty(fifo_empty),
    .data_overwritten(data_overwritten), .data_overflow(data_overflow),
    .w_pointer(w_pointer), .r_pointer(r_pointer), .r_pointer_ovw(r_pointer_ovw));

  // PICO4 support module
  logic [127:0] axis_tdata;
  logic         axis_tvalid;
  logic         p_o_clk_adc;
  pico4_support #(.REF_FREQ(REF_FREQ), .TMEM_DEPTH(TMEM_DEPTH),
                  .SPI_CLK_PER_SAMPLE(SPI_CLK_PER_SAMPLE)) u_pico4 (
    .clk(clk125), .rst(rst125), .spi_clk(spi_clk),
    .tcsr_addr(fmc_tcsr_addr), .tcsr_wr(fmc_tcsr_wr), .tcsr_rd(fmc_tcsr_rd),
    .tcsr_wdata(fmc_tcsr_wdata), .tcsr_rdata(fmc_tcsr_rdata),
    .tmem_addr(tmem_addr), .tmem_wr(tmem_wr), .tmem_rd(tmem_rd),
    .tmem_wdata(tmem_wdata), .tmem_rdata(tmem_rdata),
    .adc_cnv(adc_cnv), .adc_sck(adc_sck), .adc_sdo(adc_sdo),
    .axis_tdata(axis_tdata), .axis_tvalid(axis_tvalid), .axis_tready(1'b1),
    .p_o_clk_adc(p_o_clk_adc));

  // raw data decimator, shared by all framers
  logic dec_gate;
  raw_decimator u_dec (
    .clk(clk125), .rst(rst125), .us_tick(us_tick), .period(dec_period), .duty(dec_duty),
    .gate(dec_gate));

  // 250 MHz side of the controllers
  logic              ch_ready     [NCH];
  logic [ADDR_W-1:0] ch_wadd      [NCH];
  logic [SIZE_W-1:0] ch_wsiz      [NCH];
  logic [QW_W-1:0]   ch_wdat      [NCH];
  logic              ch_dat_empty [NCH];
  logic              ch_dat_rd    [NCH];
  logic              ch_done      [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [127:0] fr_data, gen_data, wdat;
    logic         fr_valid, fr_ready, gen_valid, wr_en, wfull, use_gen, src_ok;
    logic [31:0]  sample;
    dch_state_e   state;
    logic         fr_busy, dch_en_req;

    // A framed channel being disabled stays enabled in its controller until
    // the framer has sent out its last (partial) frame.
    assign dch_en_req = en_req[c] || (enabled[c] && !use_gen && fr_busy);

    assign src_ok = (raw_sel[c] < 3'd4);
    assign sample = axis_tdata[32*raw_sel[c][1:0] +: 32];

    raw_data_framer #(.BUF_DEPTH(FRAMER_BUF_DEPTH)) u_framer (
      .clk(clk125), .rst(rst125), .enable(enabled[c] && en_req[c] && dec_gate && !use_gen),
      .s_data(sample), .s_valid(axis_tvalid && src_ok),
      .mtw_index(mtw_index), .s_idx(s_idx), .info({5'h0, raw_sel[c]}),
      .sample_thr(sample_thr[c]), .latency_thr(cfg[c].latency_thr), .ms_tick(ms_tick),
      .m_data(fr_data), .m_valid(fr_valid), .m_ready(fr_ready),
      .dropped(framer_dropped[c]), .frames(framer_frames[c]), .busy(fr_busy));

    dummy_data_generator u_gen (
      .clk(clk125), .rst(rst125), .enable(enabled[c] && en_req[c]),
      .mult(gen_mult[c]), .div(gen_div[c]), .wdat(gen_data), .valid(gen_valid));

    // data source mux
    assign use_gen  = (gen_mult[c] != '0) && (gen_div[c] != '0);
    assign fr_ready = !use_gen && !wfull;
    assign wdat     = use_gen ? gen_data : fr_data;
    assign wr_en    = use_gen ? gen_valid : (fr_valid && !wfull);

    data_channel_controller #(.DATA_FIFO_DEPTH(DATA_FIFO_DEPTH)) u_dch (
      .wclk(clk125), .wrst(rst125), .wdat(wdat), .wr_en(wr_en), .wfull(wfull),
      .cfg(cfg[c]), .en_req(dch_en_req), .rst_req(rst_req[c]),
      .rptr_wr(rptr_wr[c]), .rptr_val(rptr_val), .ovw_clr(ovw_clr[c]), .ovf_clr(ovf_clr[c]),
      .ms_tick(ms_tick), .state(state), .enabled(enabled[c]),
      .data_collected(data_collected[c]), .fifo_empty(fifo_empty[c]),
      .data_overwritten(data_overwritten[c]), .data_overflow(data_overflow[c]),
      .w_pointer(w_pointer[c]), .r_pointer(r_pointer[c]), .r_pointer_ovw(r_pointer_ovw[c]),
      .rclk(clk250), .rrst(rst250), .channel_ready(ch_ready[c]),
      .wadd(ch_wadd[c]), .wsiz(ch_wsiz[c]), .dat_q(ch_wdat[c]), .dat_empty(ch_dat_empty[c]),
      .dat_rd(ch_dat_rd[c]), .transfer_done(ch_done[c]));
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [CPB-1:0]    a_ready, a_empty, a_rd, a_done;
    logic [ADDR_W-1:0] a_wadd [CPB];
    logic [SIZE_W-1:0] a_wsiz [CPB];
    logic [QW_W-1:0]   a_wdat [CPB];
    logic              chan_ready, in_progress, dat_empty, dat_rd, done;
    logic [ADDR_W-1:0] wadd;
    logic [SIZE_W-1:0] wsiz;
    logic [QW_W-1:0]   wdat;
    logic [$clog2(CPB > 1 ? CPB : 2)-1:0] sel;

    for (genvar k = 0; k < CPB; k++) begin : g_map
      assign a_ready[k] = ch_ready[b*CPB + k];
      assign a_empty[k] = ch_dat_empty[b*CPB + k];
      assign a_wadd[k]  = ch_wadd[b*CPB + k];
      assign a_wsiz[k]  = ch_wsiz[b*CPB + k];
      assign a_wdat[k]  = ch_wdat[b*CPB + k];
      assign ch_dat_rd[b*CPB + k] = a_rd[k];
      assign ch_done[b*CPB + k]   = a_done[k];
    end

    arbiter #(.N(CPB)) u_arb (
      .clk(clk250), .rst(rst250), .ch_ready(a_ready), .ch_wadd(a_wadd), .ch_wsiz(a_wsiz),
      .ch_wdat(a_wdat), .ch_dat_empty(a_empty), .ch_dat_rd(a_rd), .ch_transfer_done(a_done),
      .channel_ready(chan_ready), .in_progress(in_progress), .wadd(wadd), .wsiz(wsiz),
      .wdat(wdat), .dat_empty(dat_empty), .dat_rd(dat_rd), .transfer_done(done), .sel(sel));

    smem_writer u_wr (
      .clk(clk250), .rst(rst250), .channel_ready(chan_ready), .in_progress(in_progress),
      .wadd_i(wadd), .wsiz_i(wsiz), .wdat_i(wdat), .dat_empty(dat_empty), .dat_rd(dat_rd),
      .transfer_done(done), .WDAT(smem_wdat[b]), .WADD(smem_wadd[b]), .WSIZ(smem_wsiz[b]),
      .WREQ(smem_wreq[b]), .WACK(smem_wack[b]));
  end

  irq_generator #(.NCH(NCH)) u_irq (
    .clk(clk125), .rst(rst125), .irq_enable(irq_enable), .data_collected(data_collected),
    .irq(irq), .irq_pulse(irq_pulse));

  initial assert (NCH % NUM_BANKS == 0);
endmodule
