// Shared types and constants of the 4-stream MIMO WLAN interleaver.
//
// The configuration inputs use the two encodings of the design: one bit for
// the channel bandwidth (0 = 20 MHz, 1 = 40 MHz) and two bits for the
// modulation (00 BPSK, 01 QPSK, 10 16-QAM, 11 64-QAM). The interleaver is a
// C-column by D-row block: C is 13 or 18 columns, D = N / C rows, N the block
// size in coded bits (at most 648). Counters are 6 bits wide, addresses 10.
package intlv_pkg;

  typedef enum logic {
    BW_20MHZ = 1'b0,
    BW_40MHZ = 1'b1
  } bw_e;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'b00,
    MOD_QPSK  = 2'b01,
    MOD_QAM16 = 2'b10,
    MOD_QAM64 = 2'b11
  } mod_e;

  localparam int unsigned NUM_STREAMS = 4;
  localparam int unsigned CNT_WIDTH       = 6;     // row/column counters, C, D, offsets
  localparam int unsigned ADDR_WIDTH      = 10;    // write and read addresses
  localparam int unsigned DATA_WIDTH      = 6;     // memory word per stream
  localparam int unsigned MAX_N       = 648;   // largest block, 64-QAM at 40 MHz (288H)
  localparam int unsigned COLS_20     = 13;
  localparam int unsigned COLS_40     = 18;

  typedef logic [CNT_WIDTH-1:0]  cnt_t;
  typedef logic [ADDR_WIDTH-1:0] addr_t;

endpackage
