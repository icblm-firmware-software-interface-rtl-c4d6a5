// async_fifo: dual-clock FIFO used for the Data FIFO and the Forward and Back
// Address/Size FIFOs of the Data Channel Controller.
//
// Write and read pointers are kept in binary and Gray code; each Gray pointer
// crosses into the other domain through two flops. `full` is computed in the
// write domain, `empty` in the read domain, both pessimistic, so neither ever
// lies in the unsafe direction. The read side is show-ahead: `rdata` is the
// head entry whenever `empty` is low, and `rd_en` drops it. Writes while full
// and reads while empty are ignored. Each side has its own synchronous reset;
// both must be held for a few cycles of both clocks for a clean restart.
// DEPTH must be a power of two. The structure is a standard one chosen for
// this design; the source only states what each FIFO carries.
module async_fifo #(
  parameter int WIDTH = 39,
  parameter int DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; wq1_rgray <= '0; wq2_rgray <= '0; full <= 1'b0;
    end else begin
      wbin  <= wbin_n;
      wgray <= bin2gray(wbin_n);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      full  <= (bin2gray(wbin_n) == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
    end
  end

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; rq1_wgray <= '0; rq2_wgray <= '0; empty <= 1'b1;
    end else begin
      rbin  <= rbin_n;
      rgray <= bin2gray(rbin_n);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      empty <= (bin2gray(rbin_n) == rq2_wgray);
    end
  end
  assign rdata = mem[rbin[AW-1:0]];

endmodule
