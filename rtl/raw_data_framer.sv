// raw_data_framer: packs 32-bit raw samples into frames of 128-bit words for
// a Data Channel Controller.
//
// Frame layout (published): a header word {SOF 50F50F50F50F50F5, MTW INDEX,
// S, INFO, SAMPLES}, the payload with the samples packed back to back, and a
// trailer word {CRC32, EOF E0FE0FE0FE0FE0FE0FE0FE0F} where the CRC covers all
// earlier words of the frame. Field placement chosen here: SOF [127:64],
// MTW INDEX [63:32], S [31:24], INFO [23:16], SAMPLES [15:0]; CRC [127:96],
// EOF [95:0]; sample k of the frame sits in lane k mod 4 (lane 0 = bits
// 31:0) of payload word k/4, the last word padded with zeros. The CRC is the
// reflected CRC-32 (0xEDB88320, init and final XOR all ones) fed byte 0 of
// each word first.
//
// Samples enter a buffer with the timestamp of their arrival. A frame starts
// when the buffer holds SAMPLE_THRESHOLD samples (any sample if it is 0),
// when LATENCY_THRESHOLD ms have passed since the last frame with samples
// waiting (not if it is 0), or when the framer is disabled with samples
// waiting. A frame takes everything buffered at its start (at most 65535
// samples), so a stalled output gives longer frames. The header carries the
// timestamp of its first sample. Samples are taken while `enable` is high;
// those arriving at a full buffer are dropped and counted in `dropped`.
// `busy` stays high while samples are buffered or a frame is being sent, so
// that a channel being disabled can wait for its last frame. Output is a
// valid/ready stream; one payload word is assembled every four
// cycles (one sample per cycle), header and trailer take one cycle each.
module raw_data_framer
  import icblm_pkg::*;
#(
  parameter int BUF_DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic [31:0]  s_data,
  input  logic         s_valid,
  input  logic [31:0]  mtw_index,
  input  logic [7:0]   s_idx,
  input  logic [7:0]   info,
  input  logic [15:0]  sample_thr,
  input  logic [15:0]  latency_thr,
  input  logic         ms_tick,
  output logic [127:0] m_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [15:0]  dropped,
  output logic [15:0]  frames,
  output logic         busy      // samples buffered or a frame under way
);
  localparam int AW = $clog2(BUF_DEPTH);
  localparam int EW = 32 + 8 + 32;   // MTW INDEX, S, sample

  logic [EW-1:0] buf_mem [BUF_DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          push, pop, full;

  assign full = (count == (AW+1)'(BUF_DEPTH));
  assign push = enable && s_valid && !full;

  always_ff @(posedge clk) begin
    if (push) buf_mem[wp] <= {mtw_index, s_idx, s_data};
  end

  typedef enum logic [1:0] {F_IDLE, F_HDR, F_PAY, F_OUT} fr_state_e;
  fr_state_e st;
  logic [15:0]  left;       // samples of this frame still in the buffer
  logic [1:0]   lane;
  logic [127:0] word;
  logic         trailer;    // F_OUT is sending the trailer
  logic [31:0]  crc;
  logic [15:0]  lat;
  logic [15:0]  n_frame;
  logic         start;
  logic [EW-1:0] head;

  assign head = buf_mem[rp];
  assign busy = (st != F_IDLE) || (count != '0);
  assign n_frame = (32'(count) > 32'hFFFF) ? 16'hFFFF : 16'(count);
  assign start = (st == F_IDLE) && count != '0 &&
                 ((count >= (AW+1)'(sample_thr)) ||
                  (latency_thr != '0 && lat >= latency_thr) || !enable);
  assign pop = (st == F_PAY) && left != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; dropped <= '0; frames <= '0;
      st <= F_IDLE; left <= '0; lane <= '0; word <= '0; trailer <= 1'b0;
      crc <= '1; lat <= '0; m_data <= '0; m_valid <= 1'b0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (enable && s_valid && full && dropped != 16'hFFFF) dropped <= dropped + 16'd1;

      // latency timer: time since last frame while samples wait
      if (count == '0 || start) lat <= '0;
      else if (ms_tick && lat != 16'hFFFF) lat <= lat + 16'd1;

      unique case (st)
        F_IDLE: if (start) begin
          left    <= n_frame;
          m_data  <= {SOF_PATTERN, head[EW-1 -: 40], info, n_frame};
          m_valid <= 1'b1;
          st      <= F_HDR;
        end
        F_HDR: if (m_ready) begin
          crc     <= crc32_dqw(32'hFFFF_FFFF, m_data);
          m_valid <= 1'b0;
          lane    <= '0;
          word    <= '0;
          st      <= F_PAY;
        end
        F_PAY: begin
          // gather up to four samples, then send the word
          if (left != '0) begin
            word[32*lane +: 32] <= head[31:0];
            left <= left - 16'd1;
            lane <= lane + 2'd1;
          end
          if (left == '0 || (left == 16'd1) || lane == 2'd3) begin
            m_data <= word;
            if (left != '0) m_data[32*lane +: 32] <= head[31:0];
            m_valid <= 1'b1;
            trailer <= 1'b0;
            st      <= F_OUT;
          end
        end
        F_OUT: if (m_ready) begin
          if (trailer) begin
            m_valid <= 1'b0;
            crc     <= '1;
            frames  <= frames + 16'd1;
            st      <= F_IDLE;
          end else begin
            logic [31:0] c;
            c = crc32_dqw(crc, m_data);
            crc <= c;
            if (left == '0) begin
              m_data  <= {~c, EOF_PATTERN};
              trailer <= 1'b1;
            end else begin
              m_valid <= 1'b0;
              lane    <= '0;
              word    <= '0;
              st      <= F_PAY;
            end
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) m_valid && !m_ready |=> m_valid && $stable(m_data));
endmodule
