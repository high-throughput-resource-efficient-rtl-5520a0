// Dual-port memory, the interleaver's storage (a block RAM on an FPGA).
//
// Two independent read/write ports on one clock. Each port writes din at
// addr when its we is high and returns the word at addr one clock later
// (synchronous read, old data on a read of the address being written). The
// two ports are never aimed at the same word in this design, since each works
// in its own half. DEPTH defaults to two halves of 648 words; the address is
// 11 bits because the upper half reaches word 1295. Contents are not reset.
module dp_ram #(
  parameter int unsigned DEPTH  = 1296,
  parameter int unsigned DATA_W = 6,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we_a,
  input  logic [AW-1:0]     addr_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  input  logic              we_b,
  input  logic [AW-1:0]     addr_b,
  input  logic [DATA_W-1:0] din_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end

endmodule
