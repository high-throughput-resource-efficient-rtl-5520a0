// Ping-pong interleaver memory of one spatial stream.
//
// A dual-port memory is split into two halves: the first BANK_OFFSET words
// (288H = 648) belong to port A, the next BANK_OFFSET to port B, whose
// address passes through an adder that inserts the offset. While one half is
// written at the permuted address WA_x, the other is read at the sequential
// address RA_x; sel_x swaps the roles at the end of every block:
//   sel = 1 : port A writes DIN at WA_x,  port B reads RA_x + 648, D_ss = B
//   sel = 0 : port A reads RA_x,          port B writes DIN at WA_x + 648, D_ss = A
// Write enables are WE_A = sel and WE_B = ~sel, and the output multiplexer
// passes port A on sel = 0 and port B on sel = 1, as in the original
// schematic; that schematic labels the inputs of the two address multiplexers the
// other way round, which would write and read the same half, so they are
// taken here as shown in the table above.
//
// Timing: the write happens at the clock edge ending the cycle in which WA_x
// is presented. Read data appear one clock after RA_x, so the output
// multiplexer uses sel delayed by one clock (this implementation's addition,
// needed for the last word of each block).
module memory_block #(
  parameter int unsigned ADDR_W      = 10,
  parameter int unsigned DATA_W      = 6,
  parameter int unsigned BANK_OFFSET = 648
) (
  input  logic              clk,
  input  logic              sel,
  input  logic [ADDR_W-1:0] wa,
  input  logic [ADDR_W-1:0] ra,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned AW = $clog2(2 * BANK_OFFSET);

  logic [ADDR_W-1:0] add_a, mux_b;
  logic [AW-1:0]     add_b;
  logic [DATA_W-1:0] dout_a, dout_b;
  logic              sel_d;

  assign add_a = sel ? wa : ra;
  assign mux_b = sel ? ra : wa;
  assign add_b = AW'(mux_b) + AW'(BANK_OFFSET);

  dp_ram #(.DEPTH(2 * BANK_OFFSET), .DATA_W(DATA_W), .AW(AW)) u_ram (
    .clk,
    .we_a(sel),  .addr_a(AW'(add_a)), .din_a(din), .dout_a,
    .we_b(~sel), .addr_b(add_b),      .din_b(din), .dout_b
  );

  always_ff @(posedge clk) sel_d <= sel;

  assign dout = sel_d ? dout_b : dout_a;

endmodule
