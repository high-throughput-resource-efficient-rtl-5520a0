// 4-stream MIMO WLAN (802.11n-style) block interleaver with a floor-free
// address generator.
//
// Each of four spatial streams receives a 6-bit word per clock from the
// 24-bit input (stream 1 in bits 5:0, stream 4 in bits 23:18). Word k of a
// block of N words is written into that stream's memory at its interleaved
// position WA_x(k), computed from a column/row counter walk by adders,
// comparators, multiplexers and one multiplier by D; after N clocks the block
// is read back in natural order while the next block is written into the
// other half of the same dual-port memory. BW (0 = 20 MHz, 1 = 40 MHz) and
// the modulation code (00 BPSK, 01 QPSK, 10 16-QAM, 11 64-QAM) select the
// block size N = 52, 104, 208, 312 or 108, 216, 432, 648.
//
// Timing: one word per stream per clock, continuously. After reset, the
// words of block b enter in cycles b*N .. b*N+N-1 (cycle 0 being the first
// clock with rst low); the interleaved block b leaves on dout in cycles
// (b+1)*N+1 .. (b+2)*N, i.e. N+1 cycles of latency. Change BW or the
// modulation only together with a reset. The write addresses, read address
// and selects are brought out for observation.
module mimo_interleaver
  import intlv_pkg::*;
#(
  parameter int unsigned DATA_W      = intlv_pkg::DATA_WIDTH,
  parameter int unsigned ADDR_W      = intlv_pkg::ADDR_WIDTH,
  parameter int unsigned BANK_OFFSET = intlv_pkg::MAX_N
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               bw,
  input  logic [1:0]                         nbpscs,
  input  logic [NUM_STREAMS*DATA_W-1:0]      din,
  output logic [NUM_STREAMS-1:0][DATA_W-1:0] dout,
  output logic [NUM_STREAMS-1:0][ADDR_W-1:0] int_add,
  output logic [ADDR_W-1:0]                  rd_add,
  output logic [NUM_STREAMS-1:0]             sel
);

  logic [NUM_STREAMS-1:0][ADDR_W-1:0] ra;

  address_generator #(.ADDR_W(ADDR_W)) u_agen (
    .clk, .rst, .bw(bw_e'(bw)), .nbpscs(mod_e'(nbpscs)),
    .wa(int_add), .ra, .sel
  );

  for (genvar s = 0; s < NUM_STREAMS; s++) begin : g_mem
    memory_block #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .BANK_OFFSET(BANK_OFFSET)) u_mem (
      .clk, .sel(sel[s]), .wa(int_add[s]), .ra(ra[s]),
      .din(din[s*DATA_W +: DATA_W]), .dout(dout[s])
    );
  end

  assign rd_add = ra[0];

endmodule
