// tb_icblm_regs: bus writes and reads of every register of the application
// register file. Checks field masking of the CBRS/CBRV parameters, that
// parameter writes are dropped while a channel is enabled, the R_POINTER
// write strobe, the clear-on-read of R_POINTER_OVERWRITTEN, the
// CLEAR_OVERFLOW strobe, status read-back and the parameter outputs.
`include "tb_check.svh"
module tb_icblm_regs;
  import icblm_pkg::*;
  `TB_COUNTERS
  localparam int NCH = 4;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0] addr = 0; logic wr = 0, rd = 0; logic [31:0] wdata = 0, rdata;
  logic [NCH-1:0] irq_enable, en_req, rst_req, ovf_clr, ovw_clr, rptr_wr;
  logic [28:0] rptr_val;
  dch_cfg_t cfg [NCH];
  logic [7:0] gen_mult [NCH]; logic [23:0] gen_div [NCH];
  logic [15:0] sample_thr [NCH]; logic [2:0] raw_sel [NCH];
  logic [15:0] dec_period, dec_duty;
  logic [NCH-1:0] enabled = 0, data_collected = 4'b1010, fifo_empty = 4'b0110, data_overwritten = 4'b0001, data_overflow = 4'b1000;
  logic [28:0] w_pointer [NCH], r_pointer [NCH], r_pointer_ovw [NCH];
  icblm_regs #(.NCH(NCH)) dut (.*);

  int n_rptr_wr = 0, n_ovw_clr = 0, n_ovf_clr = 0;
  always @(posedge clk) if (!rst) begin
    if (rptr_wr[2]) n_rptr_wr++;
    if (ovw_clr[1]) n_ovw_clr++;
    if (ovf_clr == 4'b0101) n_ovf_clr++;
  end

  task automatic write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1; @(negedge clk); rd = 0; d = rdata;
  endtask
  task automatic cb_write(input int ch, input int idx, input logic [31:0] d);
    write(8'hC0, {16'(ch), 16'(idx)}); write(8'hC4, d);
  endtask
  task automatic cb_read(input int ch, input int idx, output logic [31:0] d);
    write(8'hC0, {16'(ch), 16'(idx)}); read(8'hC4, d);
  endtask

  initial begin
    logic [31:0] d;
    for (int c = 0; c < NCH; c++) begin
      w_pointer[c] = 29'(32'h0010_0000 * c + 32'h40); r_pointer[c] = 29'(32'h10 * c); r_pointer_ovw[c] = 29'h1_2345_67F;
    end
    repeat (3) @(posedge clk); rst = 0;
    write(8'h98, 32'hFFFF_FFF5); read(8'h98, d); `CHECK(d == 32'h5, "IRQ_ENABLE masked to channels")
    `CHECK(irq_enable == 4'h5, "irq_enable output")
    write(8'h9C, 32'h3); `CHECK(en_req == 4'h3, "DCH_ENABLE request")
    read(8'h9C, d); `CHECK(d == 0, "DCH_ENABLE reads the real state")
    write(8'hA0, 32'h4); read(8'hA0, d); `CHECK(d == 4 && rst_req == 4'h4, "DCH_RESET")
    read(8'hA8, d); `CHECK(d == 32'hA, "DATA_COLLECTED")
    read(8'hAC, d); `CHECK(d == 32'h6, "FIFO_EMPTY")
    read(8'hB0, d); `CHECK(d == 32'h1, "DATA_OVERWRITTEN")
    read(8'hB4, d); `CHECK(d == 32'h8, "DATA_OVERFLOW")
    write(8'hA4, 32'h5); @(posedge clk); #1; `CHECK(n_ovf_clr == 1, "CLEAR_OVERFLOW strobe")
    // parameters of channel 2
    cb_write(2, 0, 32'hFFFF_FFFF); cb_read(2, 0, d); `CHECK(d == 32'h1FFF_F000, "BASE_ADDR bits 28-12")
    cb_write(2, 1, 32'h0123_4567); cb_read(2, 1, d); `CHECK(d == 32'h0123_4000, "END_ADDR")
    cb_write(2, 2, 32'hFFFF_FFFF); cb_read(2, 2, d); `CHECK(d == 32'h0000_0FF0, "BURST_SIZE bits 11-4")
    cb_write(2, 3, 32'hFFFF_FFFF); cb_read(2, 3, d); `CHECK(d == 32'h1FFF_FFF0, "DATA_THRESHOLD bits 28-4")
    cb_write(2, 4, 32'h1234_5678); cb_read(2, 4, d); `CHECK(d == 32'h5678, "LATENCY_THRESHOLD")
    cb_write(2, 8, 32'h0300_0007); cb_read(2, 8, d); `CHECK(d == 32'h0300_0007, "GENERATOR_PARAMETERS")
    cb_write(2, 9, 32'h0001_0040); cb_read(2, 9, d); `CHECK(d == 32'h40, "SAMPLE_THRESHOLD")
    `CHECK(cfg[2].base_addr == 29'h1FFF_F000 && cfg[2].end_addr == 29'h0123_4000 && cfg[2].burst_size == 12'hFF0
           && cfg[2].latency_thr == 16'h5678 && gen_mult[2] == 3 && gen_div[2] == 7 && sample_thr[2] == 16'h40, "parameter outputs")
    `CHECK(cfg[1].base_addr == 0, "other channel untouched")
    cb_read(2, 6, d); `CHECK(d == 32'h0020_0040, "W_POINTER")
    cb_read(2, 5, d); `CHECK(d == 32'h20, "R_POINTER read")
    cb_write(2, 5, 32'hFFFF_FFFF); repeat (2) @(negedge clk); `CHECK(n_rptr_wr == 1 && rptr_val == 29'h1FFF_FFF0, "R_POINTER write strobe")
    cb_read(1, 7, d); repeat (2) @(negedge clk); `CHECK(d == 32'h1234_5670 && n_ovw_clr == 1, "R_POINTER_OVERWRITTEN read clears flag")
    // writes dropped while enabled
    enabled = 4'b0100;
    read(8'h9C, d); `CHECK(d == 32'h4, "DCH_ENABLE state")
    cb_write(2, 0, 32'h0000_5000); cb_read(2, 0, d); `CHECK(d == 32'h1FFF_F000, "BASE_ADDR locked while enabled")
    cb_write(2, 5, 32'h0000_0100); repeat (2) @(negedge clk); `CHECK(n_rptr_wr == 2, "R_POINTER writable while enabled")
    enabled = 0;
    cb_write(2, 0, 32'h0000_5000); cb_read(2, 0, d); `CHECK(d == 32'h0000_5000, "BASE_ADDR writable when disabled")
    cb_write(9, 0, 32'h0000_7000); cb_read(9, 0, d); `CHECK(d == 0, "channel out of range")
    write(8'hD8, 32'h0000_0ABC); read(8'hD8, d); `CHECK(d == 32'hABC && raw_sel[0] == 3'd4 && raw_sel[1] == 3'd7 && raw_sel[3] == 3'd5, "RAW_DATA_SELECTOR")
    write(8'hDC, 32'h0064_000A); read(8'hDC, d); `CHECK(d == 32'h0064_000A && dec_period == 100 && dec_duty == 10, "DECIMATOR_PARAMETERS")
    write(8'hD0, 32'h0003_0011); read(8'hD0, d); `CHECK(d == 32'h0003_0011, "AMRS")
    read(8'hD4, d); `CHECK(d == 0, "AMRV")
    `TB_FINISH
  end
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
endmodule
