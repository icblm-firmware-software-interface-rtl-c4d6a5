// icblm_pkg: types and constants shared by the icBLM data acquisition blocks.
//
// Holds the Data Channel Controller FSM encoding, the per-channel
// configuration record that the register file hands to each controller, the
// frame start/end patterns of the raw data frame, the CRC-32 step used by the
// framer and the widths of the SMEM write interface (WADD 29 bit byte address,
// WSIZ 10 bit size in 64-bit words, WDAT 64 bit). Patterns and widths follow
// the published interface; the CRC polynomial and the encodings are this
// design's choices.
package icblm_pkg;

  localparam int ADDR_W = 29;   // WADD: byte address
  localparam int SIZE_W = 10;   // WSIZ: size in QWs (64-bit words)
  localparam int QW_W   = 64;

  localparam logic [63:0] SOF_PATTERN = 64'h50F5_0F50_F50F_50F5;
  localparam logic [95:0] EOF_PATTERN = 96'hE0FE_0FE0_FE0F_E0FE_0FE0_FE0F;

  // Indices of the circular buffer / framer parameters reached through CBRS.
  typedef enum logic [15:0] {
    IDX_BASE_ADDR      = 16'h0000,
    IDX_END_ADDR       = 16'h0001,
    IDX_BURST_SIZE     = 16'h0002,
    IDX_DATA_THRESHOLD = 16'h0003,
    IDX_LATENCY_THR    = 16'h0004,
    IDX_R_POINTER      = 16'h0005,
    IDX_W_POINTER      = 16'h0006,
    IDX_R_POINTER_OVW  = 16'h0007,
    IDX_GENERATOR_PAR  = 16'h0008,
    IDX_SAMPLE_THR     = 16'h0009
  } cb_index_e;

  typedef enum logic [2:0] {
    DCH_WAIT_FOR_RESET,
    DCH_IN_RESET,
    DCH_WAIT_FOR_NO_RESET,
    DCH_DISABLED,
    DCH_ENABLED
  } dch_state_e;

  // Parameters of one Data Channel Controller, byte addresses/amounts.
  typedef struct packed {
    logic [ADDR_W-1:0] base_addr;   // bits 11:0 zero (4 kB page)
    logic [ADDR_W-1:0] end_addr;    // bits 11:0 zero
    logic [11:0]       burst_size;  // bits 3:0 zero (DQW)
    logic [ADDR_W-1:0] data_thr;    // bits 3:0 zero
    logic [15:0]       latency_thr; // ms
  } dch_cfg_t;

  // One step of the reflected CRC-32 (polynomial 0x04C11DB7) over one byte.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'h0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  // CRC over a 128-bit word, byte 0 (bits 7:0) first.
  function automatic logic [31:0] crc32_dqw(input logic [31:0] crc, input logic [127:0] w);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 16; i++)
      c = crc32_byte(c, w[8*i +: 8]);
    return c;
  endfunction

endpackage
